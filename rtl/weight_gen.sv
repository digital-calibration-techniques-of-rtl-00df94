// Stage weights of the calibrated output from the calibration coefficients.
//
// For NCAL calibrated stages with coefficients alpha_k, beta_k followed by
// ideal stages, the calibrated output is
//
//   Dout = sum_k D_k * beta_k / (alpha_1...alpha_k)              k <= NCAL
//        + sum_k D_k * 2^-(k-NCAL) / (alpha_1...alpha_NCAL)      k >  NCAL
//
// This module computes those N_ST weights once, after calibration, so that the
// output adder needs no divider. It runs the running inverse product
// inv_k = inv_(k-1) / alpha_k on one sequential divider and multiplies by
// beta_k; the backend weights are inv_NCAL shifted right. Setting NCAL = N_ST
// with equal alphas and betas gives the weights beta/alpha^k of an algorithmic
// converter.
//
// Interface: pulse `start` with alpha/beta stable until `done` pulses. `w`
// changes only at `done` (the complete new set is written at once), so the
// output adder never sees a half-updated set. Timing: NCAL divisions of
// CW+FRAC+2 clocks each plus 2 clocks.
// The function follows the design; the structure and timing are this
// implementation's own choice.
module weight_gen
  import adc_cal_pkg::*;
#(
  parameter int N_ST = 12,
  parameter int NCAL = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fxp_t alpha [NCAL],
  input  fxp_t beta  [NCAL],
  output logic busy,
  output logic done,
  output fxp_t w     [N_ST]
);
  typedef enum logic [1:0] {S_IDLE, S_DIV, S_WAIT, S_OUT} state_t;
  state_t state;

  localparam int KW = $clog2(NCAL + 1);
  logic [KW-1:0] k;
  fxp_t inv;
  fxp_t wn [N_ST];

  logic div_start, div_busy, div_done, div_ovf;
  fxp_t div_q;

  fxp_divider #(.W(CW), .F(FRAC)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .a(inv), .b(alpha[k]),
    .busy(div_busy), .done(div_done), .q(div_q), .ovf(div_ovf)
  );

  assign div_start = (state == S_DIV);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
      inv   <= FXP_ONE;
      done  <= 1'b0;
      for (int i = 0; i < N_ST; i++) begin
        // Ideal binary weights until the first calibration.
        w[i]  <= FXP_HALF >>> i;
        wn[i] <= FXP_HALF >>> i;
      end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          k     <= '0;
          inv   <= FXP_ONE;
          state <= S_DIV;
        end
        S_DIV:  state <= S_WAIT;
        S_WAIT: if (div_done) begin
          inv      <= div_q;
          wn[k]    <= fxp_mul(beta[k], div_q);
          if (k == KW'(NCAL - 1)) begin
            state <= S_OUT;
          end else begin
            k     <= k + 1'b1;
            state <= S_DIV;
          end
        end
        S_OUT: begin
          for (int i = 0; i < N_ST; i++) begin
            if (i < NCAL) w[i] <= wn[i];
            else          w[i] <= inv >>> (i - NCAL + 1);
          end
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
