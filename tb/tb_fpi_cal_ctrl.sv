// Testbench of fpi_cal_ctrl: a behavioural 12-stage pipeline with capacitor
// mismatch and finite op-amp gain in its four MSB stages answers the
// controller's CAL/CALn/FRC settings; the testbench checks the acquisition
// order and switch decoding against the control table of the design, and the
// converged alpha/beta against the model's true values.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_fpi_cal_ctrl;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;

  localparam int N_ST = 12, NCAL = 4;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  code_t codes_in [N_ST];
  logic cal, frc, coef_valid;
  logic [NCAL-1:0] cal_n;
  logic [1:0] in_sel [NCAL];
  logic [2:0] be_src;
  fxp_t alpha [NCAL], beta [NCAL];
  logic [3:0] iter_count;

  fpi_cal_ctrl #(.N_ST(N_ST), .NCAL(NCAL)) dut (
    .clk, .rst_n, .start, .codes_in, .cal, .cal_n, .frc, .in_sel, .be_src,
    .alpha, .beta, .coef_valid, .iter_count
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  rvec_t ta, tb_;
  // Mismatches -10%, -5%, +10%, +5% on C2 (as in the convergence example of
  // the design), open-loop gain 52 dB (~398), small parasitic.
  initial begin
    real mm [4] = '{-0.10, -0.05, 0.10, 0.05};
    ta = ideal_alpha();
    tb_ = ideal_beta();
    for (int i = 0; i < 4; i++) begin
      ta[i]  = mx2_alpha(1.0, 1.0 + mm[i], 0.1, 398.0);
      tb_[i] = mx2_beta (1.0, 1.0 + mm[i], 0.1, 398.0);
    end
  end

  // Analog pipeline: answers the current switch setting.
  always @(posedge clk) begin
    ivec_t order, d;
    int n;
    n = -1;
    for (int i = 0; i < NCAL; i++) if (cal_n[i]) n = i;
    if (n >= 0) begin
      for (int m = 0; m < NCAL; m++) order[m] = (n + m) % NCAL;
      for (int k = NCAL; k < N_ST; k++) order[k] = k;
      d = run_chain(0.25, order, N_ST, ta, tb_, frc ? 1 : 0);
    end else begin
      d = convert(0.1, N_ST, ta, tb_);
    end
    for (int k = 0; k < N_ST; k++) codes_in[k] <= enc(d[k]);
  end

  // Record the acquisition sequence (CALn, FRC) at every change.
  int seq_n [$];
  int seq_f [$];
  logic [NCAL-1:0] last_caln = '0;
  logic last_frc = 0;
  always @(posedge clk) begin
    if (cal && cal_n != 0 && (cal_n != last_caln || frc != last_frc)) begin
      int n;
      n = 0;
      for (int i = 0; i < NCAL; i++) if (cal_n[i]) n = i + 1;
      seq_n.push_back(n);
      seq_f.push_back(int'(frc));
      // switch decoding for this setting
      if (!(in_sel[n-1] == 2'd1)) begin checks++; failures++; $display("FAIL: in_sel of CAL stage"); end
      else checks++;
      if (n != 1) begin
        checks++;
        if (in_sel[0] != 2'd2 || be_src != 3'(n - 1)) begin failures++; $display("FAIL: ring switch decode n=%0d", n); end
      end
    end
    last_caln <= cal_n;
    last_frc  <= frc;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_n [8] = '{1, 1, 4, 4, 3, 3, 2, 2};
    int exp_f [8] = '{0, 1, 0, 1, 0, 1, 0, 1};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(cal == 0 && coef_valid == 0, "idle after reset");
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (coef_valid);
    @(posedge clk);
    check(cal == 0, "CAL low after convergence");
    check(seq_n.size() == 8, $sformatf("8 acquisitions, got %0d", seq_n.size()));
    for (int i = 0; i < 8 && i < seq_n.size(); i++)
      check(seq_n[i] == exp_n[i] && seq_f[i] == exp_f[i],
            $sformatf("acquisition %0d: CAL%0d FRC=%0d", i, seq_n[i], seq_f[i]));
    check(iter_count >= 2 && iter_count <= 10, $sformatf("iterations %0d", iter_count));
    for (int i = 0; i < NCAL; i++) begin
      real ea, eb;
      ea = fx2r(longint'(alpha[i]), FRAC);
      eb = fx2r(longint'(beta[i]), FRAC);
      $display("stage %0d: alpha %f (true %f)  beta %f (true %f)", i + 1, ea, ta[i], eb, tb_[i]);
      check(absr(ea - ta[i]) < 0.01, $sformatf("alpha%0d", i + 1));
      check(absr(eb - tb_[i]) < 0.01, $sformatf("beta%0d", i + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
