// Testbench of raw_code_adder: random 10-stage code vectors are summed with
// binary weights in the testbench and compared with the registered raw code,
// one clock after valid_in.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_raw_code_adder;
  import adc_cal_pkg::*;
  localparam int N_ST = 10;
  logic clk = 0, rst_n = 0, valid_in = 0, valid_out;
  always #5 clk = ~clk;
  code_t codes [N_ST];
  logic signed [N_ST:0] raw;
  int checks = 0, failures = 0;

  raw_code_adder #(.N_ST(N_ST)) dut (.clk, .rst_n, .valid_in, .codes, .valid_out, .raw);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    for (int k = 0; k < N_ST; k++) codes[k] = CODE_Z;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      exp_v = 0;
      for (int k = 0; k < N_ST; k++) begin
        int dv;
        dv = (i < 2) ? ((i == 0) ? 1 : -1) : int'($urandom_range(2)) - 1;
        codes[k] <= (dv > 0) ? CODE_P1 : (dv < 0) ? CODE_M1 : CODE_Z;
        exp_v += dv * (1 << (N_ST - 1 - k));
      end
      valid_in <= 1;
      @(posedge clk);
      valid_in <= 0;
      #1;
      checks++;
      if (!valid_out || int'(raw) != exp_v) begin
        failures++;
        $display("FAIL: raw=%0d expected %0d", raw, exp_v);
      end
      @(posedge clk);
      #1;
      checks++;
      if (valid_out) begin failures++; $display("FAIL: valid_out stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
