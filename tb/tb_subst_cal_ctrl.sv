// Testbench of subst_cal_ctrl (one stage at a time, extra stage, Newton-
// Raphson). A behavioural loop answers the controller: the extra stage while
// `calex` is high, stage n while `cal[n]` is high, one code every third clock
// (the slow calibration clock). Checked: the order calex, 1, 2, 3, 4; each
// cal_e[n] rising and falling exactly one clock before cal[n]; never two
// stages out at once; the clock selects (fast clock for the extra stage from
// cal_e, phases exchanged for stages 2 and 4, stage n on the slow clock);
// the coefficient substitution while a stage is out; and the final alpha, beta
// of all five stages against the model.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_subst_cal_ctrl;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;

  localparam int NCAL = 4;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  logic code_valid = 0;
  code_t code_in = CODE_Z;
  logic calex, vcal_sel, frc_en, frc_val, ex_clk_fast, ex_clk_swap, busy, coef_valid;
  logic [NCAL-1:0] cal_e, cal, slow_clk;
  fxp_t alpha_ex, beta_ex;
  fxp_t alpha [NCAL], beta [NCAL], alpha_use [NCAL], beta_use [NCAL];

  subst_cal_ctrl #(.NCAL(NCAL)) dut (
    .clk, .rst_n, .start, .code_valid, .code_in, .calex, .cal_e, .cal, .vcal_sel,
    .frc_en, .frc_val, .ex_clk_fast, .ex_clk_swap, .slow_clk, .alpha_ex, .beta_ex,
    .alpha, .beta, .alpha_use, .beta_use, .busy, .coef_valid
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  real ta [5], tb_ [5];   // index 0: extra stage, 1..4: pipeline stages
  real lv = 0.0;
  int  div = 0;
  int  order_seen [$];
  int  rule_errs = 0, subst_errs = 0, clk_errs = 0;

  // Loop of the stage under calibration (the extra stage or stage n).
  always @(posedge clk) begin
    code_valid <= 1'b0;
    div = (div + 1) % 3;
    if (busy && (calex || cal != 0) && div == 0 && !code_valid) begin
      int st, d;
      real vin;
      st = 0;
      for (int k = 0; k < NCAL; k++) if (cal[k]) st = k + 1;
      vin = vcal_sel ? 0.25 : lv;
      d = frc_en ? (frc_val ? 1 : 0) : decide(vin);
      lv = ta[st] * vin - tb_[st] * real'(d);
      code_in    <= enc(d);
      code_valid <= 1'b1;
    end
  end

  // Protocol monitor.
  logic [NCAL-1:0] cal_q = '0, cal_e_q = '0;
  logic calex_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (calex && !calex_q) order_seen.push_back(0);
    for (int k = 0; k < NCAL; k++) begin
      if (cal[k] && !cal_q[k]) begin
        order_seen.push_back(k + 1);
        if (!cal_e_q[k]) rule_errs++;          // cal_e must have risen a clock earlier
      end
      if (cal_e[k] && !cal_e_q[k] && cal[k]) rule_errs++;
      if (!cal[k] && cal_q[k] && cal_e_q[k]) rule_errs++;  // cal_e must already be low
      if (cal[k] && (alpha_use[k] != alpha_ex || beta_use[k] != beta_ex)) subst_errs++;
      if (!cal[k] && (alpha_use[k] != alpha[k] || beta_use[k] != beta[k])) subst_errs++;
      if (cal_e[k] && (!ex_clk_fast || ex_clk_swap != (k % 2 == 1))) clk_errs++;
      if (slow_clk[k] != (cal[k] && cal_e[k])) clk_errs++;
    end
    if ($countones(cal) > 1 || (calex && cal != 0)) rule_errs++;
    cal_q   <= cal;
    cal_e_q <= cal_e;
    calex_q <= calex;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mm [5] = '{0.02, 0.075, -0.05, 0.04, -0.03};
    for (int s = 0; s < 5; s++) begin
      ta[s]  = mx2_alpha(1.0, 1.0 + mm[s], 0.05, 22000.0);
      tb_[s] = mx2_beta (1.0, 1.0 + mm[s], 0.05, 22000.0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!busy && cal == 0 && cal_e == 0 && !calex, "idle after reset");
    order_seen.delete();
    rule_errs = 0; subst_errs = 0; clk_errs = 0;
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    wait (coef_valid);
    @(posedge clk);
    foreach (order_seen[i]) $write("%0d ", order_seen[i]);
    $display("");
    check(order_seen.size() == 5, $sformatf("five calibrations, saw %0d", order_seen.size()));
    for (int i = 0; i < 5 && i < order_seen.size(); i++)
      check(order_seen[i] == i, $sformatf("calibration %0d is stage %0d", i, order_seen[i]));
    check(rule_errs == 0, $sformatf("cal_e/cal ordering errors %0d", rule_errs));
    check(subst_errs == 0, $sformatf("substitution errors %0d", subst_errs));
    check(clk_errs == 0, $sformatf("clock select errors %0d", clk_errs));
    check(absr(fx2r(longint'(alpha_ex), FRAC) - ta[0]) < 0.01, "alpha of the extra stage");
    check(absr(fx2r(longint'(beta_ex), FRAC) - tb_[0]) < 0.01, "beta of the extra stage");
    for (int k = 0; k < NCAL; k++) begin
      real ea, eb;
      ea = fx2r(longint'(alpha[k]), FRAC);
      eb = fx2r(longint'(beta[k]), FRAC);
      $display("stage %0d: alpha %f (true %f) beta %f (true %f)", k + 1, ea, ta[k+1], eb, tb_[k+1]);
      check(absr(ea - ta[k+1]) < 0.01, $sformatf("alpha%0d", k + 1));
      check(absr(eb - tb_[k+1]) < 0.01, $sformatf("beta%0d", k + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
