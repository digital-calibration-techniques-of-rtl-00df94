// Testbench of seq_cal_ctrl: a slow ramp from 0 to just above Vref/4 drives a
// behavioural 10-stage pipeline with mismatched MSB stages. The controller
// must watch stages 3, 2, 1 in that order and find each stage's alpha and beta
// within the resolution of the 7-stage ideal backend (4*2^-7 for alpha).
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_seq_cal_ctrl;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;

  localparam int N_ST = 10, NCAL = 3;

  logic clk = 0, rst_n = 0, start = 0, valid_in = 0;
  always #5 clk = ~clk;

  code_t codes_in [N_ST];
  logic busy, coef_valid;
  logic [1:0] cal_stage;
  fxp_t alpha [NCAL], beta [NCAL];

  seq_cal_ctrl #(.N_ST(N_ST), .NCAL(NCAL)) dut (
    .clk, .rst_n, .start, .valid_in, .codes_in, .busy, .cal_stage,
    .alpha, .beta, .coef_valid
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
  int stage_seq [$];
  always @(posedge clk) if (busy && (stage_seq.size() == 0 || stage_seq[$] != int'(cal_stage)))
    stage_seq.push_back(int'(cal_stage));

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mm [3] = '{0.10, -0.08, 0.06};   // both gains above and below 2
    ivec_t d;
    real v;
    ta = ideal_alpha();
    tb_ = ideal_beta();
    for (int i = 0; i < 3; i++) begin
      ta[i]  = mx2_alpha(1.0, 1.0 + mm[i], 0.05, 22000.0);
      tb_[i] = mx2_beta (1.0, 1.0 + mm[i], 0.05, 22000.0);
    end
    for (int k = 0; k < N_ST; k++) codes_in[k] = 2'b01;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    v = 0.0;
    while (v < 0.27 && !coef_valid) begin
      d = convert(v, N_ST, ta, tb_);
      for (int k = 0; k < N_ST; k++) codes_in[k] <= enc(d[k]);
      valid_in <= 1;
      @(posedge clk);
      valid_in <= 0;
      repeat (3) @(posedge clk);
      v = v + 1.0 / 16384.0;
    end
    repeat (400) @(posedge clk);
    check(coef_valid, "calibration finished during the ramp");
    check(stage_seq.size() == 3 && stage_seq[0] == 3 && stage_seq[1] == 2 && stage_seq[2] == 1,
          "stages calibrated in the order 3, 2, 1");
    for (int i = 0; i < NCAL; i++) begin
      real ea, eb;
      ea = fx2r(longint'(alpha[i]), FRAC);
      eb = fx2r(longint'(beta[i]), FRAC);
      $display("stage %0d: alpha %f (true %f)  beta %f (true %f)", i + 1, ea, ta[i], eb, tb_[i]);
      check(absr(ea - ta[i]) < 0.04, $sformatf("alpha%0d", i + 1));
      check(absr(eb - tb_[i]) < 0.02, $sformatf("beta%0d", i + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
