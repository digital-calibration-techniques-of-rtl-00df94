// Testbench of fpi_algo_cal with one stage (a 12-bit algorithmic converter).
// A behavioural MX2 loop with capacitor mismatch and finite op-amp gain
// answers the Vcal/force requests, one code every second clock; the
// testbench checks the forcing sequence (0 then +1, only in the first cycle of
// an acquisition), the number of codes taken, the iteration count and the
// final alpha, beta against the model's values. Several mismatch cases run.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_fpi_algo_cal;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;

  localparam int N_BITS = 12;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic code_valid = 0;
  code_t code_in = CODE_Z;
  logic busy, acq, vcal_sel, frc_en, frc_val, frc_stage, coef_valid;
  fxp_t alpha [1], beta [1];
  logic [3:0] iter_count;

  fpi_algo_cal #(.N_BITS(N_BITS), .NSTG(1)) dut (
    .clk, .rst_n, .start, .code_valid, .code_in, .busy, .acq, .vcal_sel,
    .frc_en, .frc_val, .frc_stage, .alpha, .beta, .coef_valid, .iter_count
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real ta, tb_;
  real lv = 0.0;
  int  ncodes = 0, nforce = 0;
  int  forced_seq [$];

  // Algorithmic converter: one MX2 stage whose residue is fed back.
  always @(posedge clk) begin
    code_valid <= 1'b0;
    if (acq && !code_valid) begin
      real vin;
      int d;
      vin = vcal_sel ? 0.25 : lv;
      if (frc_en) begin
        d = frc_val ? 1 : 0;
        nforce++;
        forced_seq.push_back(d);
      end else d = decide(vin);
      lv = ta * vin - tb_ * real'(d);
      code_in    <= enc(d);
      code_valid <= 1'b1;
      ncodes++;
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mm [3] = '{0.0625, -0.05, 0.03};
    real gn [3] = '{1.0e6, 398.0, 2000.0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!busy && alpha[0] == FXP_TWO && beta[0] == FXP_ONE, "reset state");
    for (int t = 0; t < 3; t++) begin
      real ea, eb;
      ta  = mx2_alpha(1.0, 1.0 + mm[t], 0.1, gn[t]);
      tb_ = mx2_beta (1.0, 1.0 + mm[t], 0.1, gn[t]);
      ncodes = 0; nforce = 0;
      forced_seq.delete();
      start <= 1;
      @(posedge clk);
      start <= 0;
      @(posedge clk);
      wait (coef_valid);
      @(posedge clk);
      check(ncodes == 2 * N_BITS, $sformatf("codes taken %0d", ncodes));
      check(nforce == 2 && forced_seq.size() == 2 && forced_seq[0] == 0 && forced_seq[1] == 1,
            "forced 0 then +1, first cycle only");
      check(iter_count >= 2 && iter_count <= 10, $sformatf("iterations %0d", iter_count));
      ea = fx2r(longint'(alpha[0]), FRAC);
      eb = fx2r(longint'(beta[0]), FRAC);
      $display("case %0d: alpha %f (true %f) beta %f (true %f), %0d iterations",
               t, ea, ta, eb, tb_, iter_count);
      check(absr(ea - ta) < 0.01, $sformatf("alpha case %0d", t));
      check(absr(eb - tb_) < 0.01, $sformatf("beta case %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
