// Testbench of newton_alpha_solver: a behavioural one-stage converter
// (alpha, beta from capacitor mismatch and finite gain) converts Vref/4 with
// its first code forced to 0 and to +1; the solver's alpha and beta after five
// Newton iterations must match the model, and the calibrated output
// sum D_i*beta/alpha^i must reproduce random inputs better than uncalibrated
// binary weights do.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_newton_alpha_solver;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;

  localparam int N_BITS = 10;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  code_t codes0 [N_BITS], codes1 [N_BITS];
  logic busy, done;
  fxp_t alpha, beta;
  logic [2:0] iter_count;

  newton_alpha_solver #(.N_BITS(N_BITS), .N_ITER(5)) dut (
    .clk, .rst_n, .start, .codes0, .codes1, .busy, .done, .alpha, .beta, .iter_count
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Algorithmic conversion of v: D1 forced when f >= 0.
  function automatic ivec_t algo(real v, real a, real b, int f);
    ivec_t d;
    real r;
    r = v;
    for (int k = 0; k < N_BITS; k++) begin
      d[k] = (k == 0 && f >= 0) ? f : decide(r);
      r = a * r - b * real'(d[k]);
    end
    return d;
  endfunction

  initial begin
    real mm [4] = '{0.0625, -0.0625, 0.03, -0.02};
    real gn [4] = '{1.0e6, 1.0e6, 2000.0, 398.0};
    for (int k = 0; k < N_BITS; k++) begin
      codes0[k] = CODE_Z;
      codes1[k] = CODE_Z;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 4; t++) begin
      real ta, tb_, ea, eb, err_cal, err_raw;
      ivec_t d0, d1;
      ta  = mx2_alpha(1.0, 1.0 + mm[t], 0.05, gn[t]);
      tb_ = mx2_beta (1.0, 1.0 + mm[t], 0.05, gn[t]);
      d0 = algo(0.25, ta, tb_, 0);
      d1 = algo(0.25, ta, tb_, 1);
      for (int k = 0; k < N_BITS; k++) begin
        codes0[k] = enc(d0[k]);
        codes1[k] = enc(d1[k]);
      end
      start <= 1;
      @(posedge clk);
      start <= 0;
      @(posedge clk);
      while (!done) @(posedge clk);
      #1;
      ea = fx2r(longint'(alpha), FRAC);
      eb = fx2r(longint'(beta), FRAC);
      $display("case %0d: alpha %f (true %f) beta %f (true %f)", t, ea, ta, eb, tb_);
      check(iter_count == 3'd5, "five Newton iterations");
      check(absr(ea - ta) < 0.01, $sformatf("alpha case %0d", t));
      check(absr(eb - tb_) < 0.01, $sformatf("beta case %0d", t));
      // Output error over random inputs, calibrated against binary weights.
      err_cal = 0.0;
      err_raw = 0.0;
      for (int s = 0; s < 200; s++) begin
        real v, oc, orw, p;
        ivec_t d;
        v = (real'($urandom_range(20000)) - 10000.0) / 10001.0;
        d = algo(v, ta, tb_, -1);
        oc = 0.0; orw = 0.0; p = 1.0;
        for (int k = 0; k < N_BITS; k++) begin
          p = p * ea;
          oc += real'(d[k]) * eb / p;
          orw += real'(d[k]) / real'(2 << k);
        end
        if (absr(oc - v) > err_cal) err_cal = absr(oc - v);
        if (absr(orw - v) > err_raw) err_raw = absr(orw - v);
      end
      $display("  worst output error: calibrated %f, uncalibrated %f", err_cal, err_raw);
      check(err_cal < 0.01 && err_cal < err_raw, $sformatf("calibrated output case %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
