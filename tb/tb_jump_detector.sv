// Testbench of jump_detector: a behavioural 10-stage pipeline (capacitor
// mismatch only, so alpha = 1 + beta) is driven with a rising ramp 0..0.3 Vref
// and then a falling one, in steps of a fifth of an LSB. Unit 1 watches
// stage 1, whose gain 2.06 is above 2: it must ask for the capacitor swap, and
// after the swap (gain 1 + 1/1.06) it must measure S1, the step of the raw code where
// code 1 changes (taken from the model).
// Unit 2 watches stage 2, gain 1.94: no swap, S2 likewise.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_jump_detector;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;

  localparam int N_ST = 10, RW = 11;
  logic clk = 0, rst_n = 0, arm = 0, valid_in = 0, up_down = 1;
  always #5 clk = ~clk;
  logic msb1, msb2;
  logic signed [RW-1:0] d;
  logic swap1, swap2, sd1, sd2, cd1, cd2;
  logic signed [RW-1:0] s1, s2;

  jump_detector #(.RW(RW)) u1 (.clk, .rst_n, .arm, .valid_in, .up_down, .msb(msb1), .d,
                               .swap(swap1), .swap_done(sd1), .s(s1), .s_done(cd1));
  jump_detector #(.RW(RW)) u2 (.clk, .rst_n, .arm, .valid_in, .up_down, .msb(msb2), .d,
                               .swap(swap2), .swap_done(sd2), .s(s2), .s_done(cd2));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  rvec_t ta, tb_;
  function automatic int rawcode(real v);
    ivec_t c;
    int r;
    c = convert(v, N_ST, ta, tb_);
    r = 0;
    for (int k = 0; k < N_ST; k++) r += c[k] * (1 << (N_ST - 1 - k));
    return r;
  endfunction

  task automatic sample(real v);
    ivec_t c;
    int r;
    c = convert(v, N_ST, ta, tb_);
    r = 0;
    for (int k = 0; k < N_ST; k++) r += c[k] * (1 << (N_ST - 1 - k));
    d <= RW'(r);
    msb1 <= (c[0] == 1);
    msb2 <= (c[1] == 1);
    valid_in <= 1;
    @(posedge clk);
    valid_in <= 0;
    @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real step, v, b1s;
    int e1, e2;
    step = 1.0 / 1024.0 / 5.0;
    ta = ideal_alpha(); tb_ = ideal_beta();
    tb_[0] = 1.06; ta[0] = 2.06;      // C2 > C1: gain above 2
    tb_[1] = 0.94; ta[1] = 1.94;      // gain below 2
    d = '0; msb1 = 0; msb2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    arm <= 1; @(posedge clk); arm <= 0;
    up_down <= 1;
    for (v = 0.0; v <= 0.3; v += step) sample(v);
    check(sd1 && sd2, "both swap decisions latched on the rising ramp");
    check(swap1 == 1, "stage 1 (gain > 2) swaps");
    check(swap2 == 0, "stage 2 (gain < 2) does not swap");
    // Apply the swap of stage 1: gain 1 + C1/C2, reference gain C1/C2.
    b1s = 1.0 / 1.06;
    if (swap1) begin tb_[0] = b1s; ta[0] = 1.0 + b1s; end
    up_down <= 0;
    for (v = 0.3; v >= 0.0; v -= step) sample(v);
    check(cd1 && cd2, "both jumps latched on the falling ramp");
    // Expected heights: the model's raw step across each threshold.
    e1 = rawcode(0.25 + 1e-9) - rawcode(0.25 - 1e-9);
    e2 = rawcode(0.25 / ta[0] + 1e-9) - rawcode(0.25 / ta[0] - 1e-9);
    $display("S1 = %0d (expected ~%0d), S2 = %0d (expected ~%0d)", s1, e1, s2, e2);
    check(int'(s1) >= e1 - 2 && int'(s1) <= e1 + 2, "S1 height");
    check(int'(s2) >= e2 - 2 && int'(s2) <= e2 + 2, "S2 height");
    // A second falling ramp must not change the latched values.
    tb_[1] = 0.80; ta[1] = 1.80;
    for (v = 0.3; v >= 0.0; v -= step * 20) sample(v);
    check(int'(s2) >= e2 - 2 && int'(s2) <= e2 + 2, "S2 latched only once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
