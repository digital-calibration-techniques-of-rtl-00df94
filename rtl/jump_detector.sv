// Calibration unit of one stage for the jump-based (non-nested) technique.
//
// The input ramp passes through the point where the stage's code changes
// between 0 and +1 twice: once rising, once falling. The unit compares the raw
// output code D of the sample just after the change with the delayed code DI
// of the sample just before it, computing DI - D:
//
//  * ramp rising (up_down = 1), M bit of the stage code 0 -> 1: if DI - D does
//    not borrow (D <= DI), the output fell at the transition, i.e. the stage
//    gain is above 2, and `swap` is set so that the stage's sampling and
//    feedback capacitors are exchanged (gain becomes 1 + C1/C2 < 2);
//    otherwise `swap` is cleared;
//  * ramp falling (up_down = 0), M bit 1 -> 0: DI - D is the height S of the
//    upward jump this stage causes, its calibration coefficient.
//
// Each result is latched once; a flag per result (set by `arm`, cleared when
// the result is latched) blocks later transitions. The comparison, the
// direction of the ramps and the latch-once flag follow the design; using
// two flags instead of one is this implementation's choice.
//
// Interface: pulse `arm` before the ramps; one raw code and stage code per
// `valid_in`. `swap_done` / `s_done` show which results are latched.
module jump_detector
  import adc_cal_pkg::*;
#(
  parameter int RW = 11        // raw code width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 arm,
  input  logic                 valid_in,
  input  logic                 up_down,     // 1: ramp rising, 0: ramp falling
  input  logic                 msb,         // M bit of this stage's code
  input  logic signed [RW-1:0] d,           // raw output code
  output logic                 swap,
  output logic                 swap_done,
  output logic signed [RW-1:0] s,
  output logic                 s_done
);
  logic signed [RW-1:0] di;
  logic                 msb_d;
  logic                 have_prev;
  logic signed [RW:0]   diff;               // DI - D with borrow in the top bit

  assign diff = {di[RW-1], di} - {d[RW-1], d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      di        <= '0;
      msb_d     <= 1'b0;
      have_prev <= 1'b0;
      swap      <= 1'b0;
      swap_done <= 1'b0;
      s         <= '0;
      s_done    <= 1'b0;
    end else if (arm) begin
      have_prev <= 1'b0;
      swap_done <= 1'b0;
      s_done    <= 1'b0;
      swap      <= 1'b0;
      s         <= '0;
    end else if (valid_in) begin
      di        <= d;
      msb_d     <= msb;
      have_prev <= 1'b1;
      if (have_prev && up_down && !swap_done && !msb_d && msb) begin
        swap      <= !diff[RW];
        swap_done <= 1'b1;
      end
      if (have_prev && !up_down && !s_done && msb_d && !msb) begin
        s      <= diff[RW-1:0];
        s_done <= 1'b1;
      end
    end
  end
endmodule
