// Testbench of code_align: stage k of a 12-stage pipeline is given the code of
// sample j at step j+k (one step per stage); after the fill-up delay every
// aligned output set must be the code vector of a single sample.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_code_align;
  import adc_cal_pkg::*;
  localparam int N_ST = 12;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  code_t codes_in [N_ST], codes_out [N_ST];
  logic valid_out;
  int checks = 0, failures = 0;

  code_t smp [200][N_ST];

  code_align #(.N_ST(N_ST)) dut (.clk, .rst_n, .en, .codes_in, .codes_out, .valid_out);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int step;
    for (int j = 0; j < 200; j++)
      for (int k = 0; k < N_ST; k++) smp[j][k] = val_code(2'($urandom_range(2)) - 2'sd1);
    for (int k = 0; k < N_ST; k++) codes_in[k] = CODE_Z;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++;
    if (valid_out) begin failures++; $display("FAIL: valid right after reset"); end
    step = 0;
    for (int s = 0; s < 150; s++) begin
      // stage k shows sample s-k
      for (int k = 0; k < N_ST; k++) codes_in[k] <= (s - k >= 0) ? smp[s-k][k] : CODE_Z;
      en <= ($urandom_range(3) != 0) || s < 2;
      @(posedge clk);
      if (!en) begin
        // hold: repeat this step
        s--;
        continue;
      end
      step++;
      #1;
      // the set just clocked in was step s; the output now shows sample s-(N_ST-1)
      if (s >= N_ST - 1) begin
        checks++;
        if (!valid_out) begin failures++; $display("FAIL: valid_out low at step %0d", s); end
        for (int k = 0; k < N_ST; k++) begin
          checks++;
          if (codes_out[k] !== smp[s-(N_ST-1)][k]) begin
            failures++;
            $display("FAIL: step %0d stage %0d", s, k);
          end
        end
      end else if (s < N_ST - 2) begin
        checks++;
        if (valid_out) begin failures++; $display("FAIL: valid_out early at step %0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
