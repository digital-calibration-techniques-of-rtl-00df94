// Testbench of stage_encoder: all comparator and force combinations are
// applied and the code compared with the decision table of a 1.5-bit stage
// (B1 B0 = 00 -> -1, 01 -> 0, 1x -> +1; forced: +1 or 0).
// The stimulus values (mismatches, gains, ramps) are this testbench's own
// choice unless they are the design's example numbers named above.
`timescale 1ns/1ps
module tb_stage_encoder;
  import adc_cal_pkg::*;
  logic b1, b0, force_en, force_p1;
  code_t code;
  int checks = 0, failures = 0;

  stage_encoder dut (.b1, .b0, .force_en, .force_p1, .code);

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int exp_v;
      {force_en, force_p1, b1, b0} = 4'(i);
      #1;
      if (force_en)  exp_v = force_p1 ? 1 : 0;
      else if (b1)   exp_v = 1;
      else if (b0)   exp_v = 0;
      else           exp_v = -1;
      checks++;
      if (int'(code_val(code)) != exp_v || code == 2'b11) begin
        failures++;
        $display("FAIL: in=%b code=%b expected %0d", 4'(i), code, exp_v);
      end
    end
    // Comparator outputs from an input sweep: thresholds at +-Vref/4.
    for (int i = -100; i <= 100; i++) begin
      real v;
      v = real'(i) / 100.0;
      force_en = 0; force_p1 = 0;
      b1 = (v > 0.25);
      b0 = (v > -0.25);
      #1;
      checks++;
      if (code != ((v > 0.25) ? CODE_P1 : (v > -0.25) ? CODE_Z : CODE_M1)) begin
        failures++;
        $display("FAIL: v=%f code=%b", v, code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
