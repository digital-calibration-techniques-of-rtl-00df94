// Uncalibrated output code of a 1.5 bit/stage pipelined ADC.
//
// The stage codes D_k in {-1, 0, +1} of one sample are added with binary
// weights, stage 1 being the most significant:
//
//   raw = sum_k D_k * 2^(N_ST-k)        (k = 1..N_ST)
//
// which is the usual redundant-sign-digit sum of a 1.5-bit pipeline, an
// (N_ST+1)-bit two's-complement number with one LSB = Vref / 2^N_ST. This is
// the raw code D[..] that the jump-based calibration compares sample to
// sample and corrects. The design shows only its width; the signed
// representation is this implementation's choice.
//
// Timing: one register stage; `valid_out` follows `valid_in` by one clock.
module raw_code_adder
  import adc_cal_pkg::*;
#(
  parameter int N_ST = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid_in,
  input  code_t                codes [N_ST],
  output logic                 valid_out,
  output logic signed [N_ST:0] raw
);
  logic signed [N_ST:0] sum;
  always_comb begin
    sum = '0;
    for (int k = 0; k < N_ST; k++)
      case (codes[k])
        CODE_P1: sum = sum + ((N_ST+1)'(1) <<< (N_ST - 1 - k));
        CODE_M1: sum = sum - ((N_ST+1)'(1) <<< (N_ST - 1 - k));
        default: ;
      endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      raw       <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) raw <= sum;
    end
  end
endmodule
