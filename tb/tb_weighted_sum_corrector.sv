// Testbench of weighted_sum_corrector: random weights near beta/alpha^k and
// random code vectors; Dout and the rounded 12-bit code are compared with a
// sum computed in the testbench.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_weighted_sum_corrector;
  import adc_cal_pkg::*;
  localparam int N_ST = 12, NOUT = 12;
  logic clk = 0, rst_n = 0, valid_in = 0, valid_out;
  always #5 clk = ~clk;
  code_t codes [N_ST];
  fxp_t w [N_ST];
  fxp_t dout;
  logic signed [NOUT-1:0] dout_code;
  int checks = 0, failures = 0;

  weighted_sum_corrector #(.N_ST(N_ST), .NOUT(NOUT)) dut (
    .clk, .rst_n, .valid_in, .codes, .w, .valid_out, .dout, .dout_code
  );

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint s;
    longint c;
    for (int k = 0; k < N_ST; k++) begin
      codes[k] = CODE_Z;
      w[k] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      s = 0;
      for (int k = 0; k < N_ST; k++) begin
        int dv;
        longint wk;
        wk = (longint'(1) << (FRAC - 1 - k)) + longint'($urandom_range(400)) - 200;
        if (wk < 0) wk = 0;
        w[k] <= fxp_t'(wk);
        dv = int'($urandom_range(2)) - 1;
        codes[k] <= (dv > 0) ? CODE_P1 : (dv < 0) ? CODE_M1 : CODE_Z;
        s += dv * wk;
      end
      valid_in <= 1;
      @(posedge clk);
      valid_in <= 0;
      #1;
      c = (s + 16) >>> 5;   // round to 12 bits: 2^(FRAC-(NOUT-1)) = 32
      if (c > 2047) c = 2047;
      if (c < -2048) c = -2048;
      checks++;
      if (!valid_out || longint'(dout) != s || longint'(dout_code) != c) begin
        failures++;
        $display("FAIL: dout=%0d (exp %0d) code=%0d (exp %0d)", dout, s, dout_code, c);
      end
    end
    // saturation at both ends
    for (int k = 0; k < N_ST; k++) begin
      w[k] <= FXP_HALF;
      codes[k] <= CODE_P1;
    end
    valid_in <= 1;
    @(posedge clk);
    #1;
    checks++;
    if (dout_code != 12'sd2047) begin failures++; $display("FAIL: positive saturation %0d", dout_code); end
    for (int k = 0; k < N_ST; k++) codes[k] <= CODE_M1;
    @(posedge clk);
    #1;
    valid_in <= 0;
    checks++;
    if (dout_code != -12'sd2048) begin failures++; $display("FAIL: negative saturation %0d", dout_code); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
