// Testbench of pair_cal_ctrl (two stages at a time, two extra stages,
// fixed-point iteration on a two-stage cyclic loop). A behavioural loop of
// the two stages being calibrated (the extra pair while `cal_ex` is high,
// stages 2p+1, 2p+2 while `cal_pair[p]` is high) answers the controller, one
// code per clock. Mismatches +7.5% and -5% on the first pair follow the
// convergence example of the design. Checked: the order extra pair, (1,2),
// (3,4); the staggered swap signals around cal12/cal34; S_in1/S_in2 on the
// calibration signal only while the forced stage samples Vref/4; the
// coefficient substitution; and all alphas and betas against the model.
`timescale 1ns/1ps
module tb_pair_cal_ctrl;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;

  localparam int NCAL = 4;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic code_valid = 0;
  code_t code_in = CODE_Z;
  logic cal_ex, acq, frc_en, frc_val, frc_stage, busy, coef_valid;
  logic [NCAL/2-1:0] cal_pair;
  logic [NCAL-1:0] swap;
  logic [1:0] s_in_calib;
  fxp_t alpha_ex [2], beta_ex [2];
  fxp_t alpha [NCAL], beta [NCAL], alpha_use [NCAL], beta_use [NCAL];

  pair_cal_ctrl #(.NCAL(NCAL)) dut (
    .clk, .rst_n, .start, .code_valid, .code_in, .cal_ex, .cal_pair, .swap, .s_in_calib, .acq,
    .frc_en, .frc_val, .frc_stage, .alpha_ex, .beta_ex, .alpha, .beta, .alpha_use,
    .beta_use, .busy, .coef_valid
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real ta [6], tb_ [6];   // 0,1: extra stages; 2..5: pipeline stages 1..4
  real lv = 0.0;
  int  cyc = 0;
  int  order_seen [$];
  int  rule_errs = 0, subst_errs = 0, sin_errs = 0;

  // Cyclic loop of the pair under calibration.
  always @(posedge clk) begin
    code_valid <= 1'b0;
    if (acq && (cal_ex || cal_pair != 0) && !code_valid) begin
      int base, st, d;
      real vin;
      base = 0;
      for (int p = 0; p < NCAL / 2; p++) if (cal_pair[p]) base = 2 + 2 * p;
      if (s_in_calib != 0) begin
        cyc = 0;
        vin = 0.25;
        if (s_in_calib[frc_stage] !== 1'b1 || $countones(s_in_calib) != 1) sin_errs++;
      end else vin = lv;
      st = base + ((int'(frc_stage) + cyc) % 2);
      d = frc_en ? (frc_val ? 1 : 0) : decide(vin);
      lv = ta[st] * vin - tb_[st] * real'(d);
      cyc++;
      code_in    <= enc(d);
      code_valid <= 1'b1;
    end
  end

  // Protocol monitor.
  logic [NCAL-1:0] swap_q = '0;
  logic [NCAL/2-1:0] pair_q = '0;
  logic ex_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (cal_ex && !ex_q) order_seen.push_back(0);
    for (int p = 0; p < NCAL / 2; p++) begin
      if (cal_pair[p] && !pair_q[p]) begin
        order_seen.push_back(p + 1);
        if (!(swap_q[2*p] && swap_q[2*p+1])) rule_errs++;   // both swapped before
      end
      if (swap[2*p+1] && !swap_q[2*p+1] && !swap_q[2*p]) rule_errs++;  // second after first
      if (!swap[2*p] && swap_q[2*p] && (cal_pair[p] || !swap[2*p+1])) rule_errs++;
      if (!swap[2*p+1] && swap_q[2*p+1] && swap[2*p]) rule_errs++;
    end
    for (int k = 0; k < NCAL; k++) begin
      if (swap[k] && (alpha_use[k] != alpha_ex[k%2] || beta_use[k] != beta_ex[k%2])) subst_errs++;
      if (!swap[k] && (alpha_use[k] != alpha[k] || beta_use[k] != beta[k])) subst_errs++;
    end
    if ($countones(cal_pair) + int'(cal_ex) > 1) rule_errs++;
    swap_q <= swap;
    pair_q <= cal_pair;
    ex_q   <= cal_ex;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mm [6] = '{0.02, -0.03, 0.075, -0.05, 0.04, -0.06};
    for (int s = 0; s < 6; s++) begin
      ta[s]  = mx2_alpha(1.0, 1.0 + mm[s], 0.05, 22000.0);
      tb_[s] = mx2_beta (1.0, 1.0 + mm[s], 0.05, 22000.0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!busy && swap == 0 && cal_pair == 0 && !cal_ex, "idle after reset");
    order_seen.delete();
    rule_errs = 0; subst_errs = 0; sin_errs = 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    wait (coef_valid);
    @(posedge clk);
    check(order_seen.size() == 3, $sformatf("three calibrations, saw %0d", order_seen.size()));
    for (int i = 0; i < 3 && i < order_seen.size(); i++)
      check(order_seen[i] == i, $sformatf("calibration %0d is pair %0d", i, order_seen[i]));
    check(rule_errs == 0, $sformatf("swap/cal ordering errors %0d", rule_errs));
    check(subst_errs == 0, $sformatf("substitution errors %0d", subst_errs));
    check(sin_errs == 0, $sformatf("S_in selection errors %0d", sin_errs));
    for (int k = 0; k < 2; k++) begin
      check(absr(fx2r(longint'(alpha_ex[k]), FRAC) - ta[k]) < 0.01, $sformatf("alpha ex%0d", k + 1));
      check(absr(fx2r(longint'(beta_ex[k]), FRAC) - tb_[k]) < 0.01, $sformatf("beta ex%0d", k + 1));
    end
    for (int k = 0; k < NCAL; k++) begin
      real ea, eb;
      ea = fx2r(longint'(alpha[k]), FRAC);
      eb = fx2r(longint'(beta[k]), FRAC);
      $display("stage %0d: alpha %f (true %f) beta %f (true %f)", k + 1, ea, ta[k+2], eb, tb_[k+2]);
      check(absr(ea - ta[k+2]) < 0.01, $sformatf("alpha%0d", k + 1));
      check(absr(eb - tb_[k+2]) < 0.01, $sformatf("beta%0d", k + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
