// Testbench of flash2_encoder: an input sweep over -Vref..+Vref drives three
// comparators at -Vref/2, 0, +Vref/2; the 2-bit code must count the
// thresholds below the input.
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_flash2_encoder;
  logic [2:0] t;
  logic [1:0] d;
  int checks = 0, failures = 0;

  flash2_encoder dut (.t, .d);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_d;
    for (int i = -99; i <= 99; i++) begin
      real v;
      v = real'(i) / 100.0;
      t = {v > 0.5, v > 0.0, v > -0.5};
      #1;
      exp_d = (v > 0.5) ? 3 : (v > 0.0) ? 2 : (v > -0.5) ? 1 : 0;
      checks++;
      if (int'(d) != exp_d) begin
        failures++;
        $display("FAIL: v=%f t=%b d=%0d expected %0d", v, t, d, exp_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
