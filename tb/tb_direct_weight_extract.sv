// Testbench of direct_weight_extract: a fine ramp from 0 to 0.31 Vref is
// converted by a behavioural 12-stage pipeline whose four MSB stages have
// gains 2.05, 2.0375, 2.025, 2.0125 (5%, 3.75%, 2.5%, 1.25% mismatch) and by
// an ideal reference ADC. The extracted weights must match
// beta_k/(alpha_1..alpha_k) and 2^-(k-4)/(alpha_1..alpha_4) of the model.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_direct_weight_extract;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;

  localparam int N_ST = 12;

  logic clk = 0, rst_n = 0, start = 0, valid_in = 0;
  always #5 clk = ~clk;

  code_t codes_in [N_ST];
  fxp_t d_algo;
  logic [4:0] found;
  logic done;
  fxp_t w [N_ST];

  direct_weight_extract #(.N_ST(N_ST)) dut (
    .clk, .rst_n, .start, .valid_in, .codes_in, .d_algo, .found, .done, .w
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mm [4] = '{0.05, 0.0375, 0.025, 0.0125};
    rvec_t ta, tb_;
    real tw [N_ST];
    real p;
    ivec_t d;
    real v;
    ta = ideal_alpha();
    tb_ = ideal_beta();
    for (int i = 0; i < 4; i++) begin
      ta[i]  = 2.0 + mm[i];
      tb_[i] = 1.0 + mm[i];
    end
    p = 1.0;
    for (int k = 0; k < N_ST; k++) begin
      if (k < 4) begin
        p = p * ta[k];
        tw[k] = tb_[k] / p;
      end else begin
        tw[k] = 1.0 / (p * real'(1 << (k - 3)));
      end
    end
    for (int k = 0; k < N_ST; k++) codes_in[k] = 2'b01;
    d_algo = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(w[0] == FXP_HALF && w[4] == (FXP_HALF >>> 4), "binary weights after reset");
    start <= 1;
    @(posedge clk);
    start <= 0;
    v = 0.0;
    while (v < 0.31) begin
      d = convert(v, N_ST, ta, tb_);
      for (int k = 0; k < N_ST; k++) codes_in[k] <= enc(d[k]);
      d_algo   <= fxp_t'($rtoi(v * 65536.0));
      valid_in <= 1;
      @(posedge clk);
      v = v + 1.0 / 131072.0;
    end
    valid_in <= 0;
    repeat (3) @(posedge clk);
    check(found == 5'b11111, $sformatf("all five patterns seen (found=%b)", found));
    check(done, "done");
    for (int k = 0; k < N_ST; k++) begin
      real e;
      e = fx2r(longint'(w[k]), FRAC);
      if (k < 6) $display("W%0d = %f (true %f)", k + 1, e, tw[k]);
      check(absr(e - tw[k]) < 2.5e-4, $sformatf("W%0d", k + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
