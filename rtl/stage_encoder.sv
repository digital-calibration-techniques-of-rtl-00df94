// Code encoder of one 1.5-bit stage.
//
// The stage's two comparators compare its input with +Vref/4 (output B1) and
// -Vref/4 (output B0). Below -Vref/4 both are low and the code is -1; between
// the thresholds only B0 is high and the code is 0; above +Vref/4 B1 is high
// and the code is +1. The two-bit code {M,L} is 00 for -1, 01 for 0 and 10 for
// +1. The stage's code can also be forced during calibration: with `force_en`
// high the comparators are overridden and `force_p1` selects +1 (high) or 0
// (low), the FRC function of the stage-cycling technique.
//
// B1 = 1 is decoded as +1 whatever B0 shows, since the design lists both B0 = 1
// and B0 = 0 with B1 = 1 for inputs above +Vref/4. Combinational.
// The function follows the design; the structure and timing are this
// implementation's own choice.
module stage_encoder
  import adc_cal_pkg::*;
(
  input  logic  b1,        // comparator against +Vref/4
  input  logic  b0,        // comparator against -Vref/4
  input  logic  force_en,  // calibration: override the comparators
  input  logic  force_p1,  // forced code: 1 -> +1, 0 -> 0
  output code_t code
);
  always_comb begin
    if (force_en)  code = force_p1 ? CODE_P1 : CODE_Z;
    else if (b1)   code = CODE_P1;
    else if (b0)   code = CODE_Z;
    else           code = CODE_M1;
  end
endmodule
