// Output correction of the jump-based (non-nested) technique.
//
// With every calibrated stage's gain at or below 2, a stage n causes upward
// jumps of one height S_n wherever its code changes; the transfer curve falls
// apart into segments (23 for three calibrated stages). Taking the segment
// where all calibrated codes are 0 as reference, every other segment is moved
// by a combination of the S_n:
//
//   out = raw - sum_n S_n * (sum_{m<=n} 2^(n-m) * D_m)
//
// e.g. with three stages, codes (-1,-1,-1) get S1 + 3*S2 + 7*S3 added and
// codes (0,0,+1) get S3 subtracted, as in the design's correction table. The
// closed form covers all 27 code combinations; the table lists the 23 that
// occur. Only additions are needed in hardware besides small constant
// multiples.
//
// Timing: one register stage; `valid_out` follows `valid_in` by one clock.
module segment_corrector
  import adc_cal_pkg::*;
#(
  parameter int RW   = 11,   // raw code width
  parameter int NCAL = 3     // calibrated stages
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid_in,
  input  logic signed [RW-1:0] raw,
  input  code_t                dcal [NCAL],   // codes of the calibrated stages
  input  logic signed [RW-1:0] s    [NCAL],   // jump heights S_1..S_NCAL
  output logic                 valid_out,
  output logic signed [RW+3:0] out
);
  localparam int OW = RW + 4;

  logic signed [OW-1:0] corr;
  logic signed [OW-1:0] mult;   // sum_{m<=n} 2^(n-m) D_m for the current n
  always_comb begin
    corr = '0;
    mult = '0;
    for (int n = 0; n < NCAL; n++) begin
      mult = (mult <<< 1) + OW'(code_val(dcal[n]));
      corr = corr + mult * OW'(s[n]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      out       <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) out <= OW'(raw) - corr;
    end
  end
endmodule
