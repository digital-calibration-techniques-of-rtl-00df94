// Calibrated output of the converter during normal operation:
//
//   Dout = D1*W1 + D2*W2 + ... + DN*WN
//
// with D_k in {-1, 0, +1} the time-aligned stage codes of one sample and W_k
// the stage weights found by calibration (beta_k / (alpha_1...alpha_k) for a
// calibrated stage, 2^-(k-NCAL) / (alpha_1...alpha_NCAL) for an ideal backend
// stage, or weights measured directly). As in the design's output block, each
// code drives the select lines of a three-input multiplexer choosing -W_k, 0
// or +W_k, and one adder sums the multiplexer outputs.
//
// Dout is in units of Vref with FRAC fractional bits; `dout_code` is the same
// value as a signed NOUT-bit converter code (Dout * 2^(NOUT-1), rounded,
// saturated). Timing: one register stage, Dout appears one clock after the
// codes; `valid_out` follows `valid_in` by that clock.
module weighted_sum_corrector
  import adc_cal_pkg::*;
#(
  parameter int N_ST = 12,   // stages of the converter
  parameter int NOUT = 12    // resolution of the output code
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   valid_in,
  input  code_t                  codes [N_ST],
  input  fxp_t                   w     [N_ST],
  output logic                   valid_out,
  output fxp_t                   dout,
  output logic signed [NOUT-1:0] dout_code
);
  fxp_t sum;
  always_comb begin
    sum = '0;
    for (int k = 0; k < N_ST; k++) sum = sum + code_mul(w[k], codes[k]);
  end

  // Scale to an NOUT-bit code with rounding: sum * 2^(NOUT-1) / 2^FRAC.
  localparam int SH = FRAC - (NOUT - 1);
  logic signed [CW:0] scaled;
  assign scaled = (SH > 0) ? (($signed({sum[CW-1], sum}) + (CW+1)'(1 <<< (SH - 1))) >>> SH)
                           : ($signed({sum[CW-1], sum}) <<< (-SH));

  localparam logic signed [CW:0] CMAX = (CW+1)'((1 <<< (NOUT - 1)) - 1);
  localparam logic signed [CW:0] CMIN = -(CW+1)'(1 <<< (NOUT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      dout      <= '0;
      dout_code <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        dout <= sum;
        if (scaled > CMAX)      dout_code <= CMAX[NOUT-1:0];
        else if (scaled < CMIN) dout_code <= CMIN[NOUT-1:0];
        else                    dout_code <= scaled[NOUT-1:0];
      end
    end
  end
endmodule
