// Background calibration of the NCAL most significant pipeline stages two at
// a time, with two extra pipeline stages that take the places of the pair
// under calibration (calibration technique 2).
//
// Sequence. `cal_ex` is raised first and the two extra stages are calibrated
// as a two-stage cyclic converter. Then for each pair (1,2), (3,4), ...:
//   * `swap[2p]` rises and, one clock (half a conversion period) later,
//     `swap[2p+1]`: the stages of the pair are exchanged with the extra
//     stages one after the other, each between finishing its residue and
//     sampling the next input, so no sample in flight is lost;
//   * `cal_pair[p]` (cal12, cal34) rises and the pair, looped into a
//     two-stage cyclic converter, is calibrated by fixed-point iteration
//     (fpi_algo_cal with two stages). The input switch of the forced stage
//     (S_in1 or S_in2) is on Vref/4 only while that sample is taken
//     (`s_in_calib`), on the other stage's residue otherwise;
//     `acq` is high while the loop's codes are taken: a code counts if its
//     conversion cycle began with `acq` high;
//   * `cal_pair[p]` falls, then `swap[2p]` and one clock later `swap[2p+1]`.
// While a stage is swapped out `alpha_use`/`beta_use` carry the coefficients
// of the extra stage in its place. No clock switching is needed, since the
// pair is calibrated at the converter's own rate.
//
// The order, the staggered swap signals, the substitution and the
// fixed-point iteration follow the design. That the extra pair is calibrated
// by the same procedure, the one-clock stagger and the code handshake are
// this implementation's choices.
module pair_cal_ctrl
  import adc_cal_pkg::*;
#(
  parameter int NCAL     = 4,    // calibrated MSB stages (even)
  parameter int N_BITS   = 12,   // conversion cycles of the cyclic loop
  parameter int MAX_ITER = 10,
  parameter int TOL      = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            code_valid,      // one cycle of the cyclic loop done
  input  code_t           code_in,         // its code
  output logic            cal_ex,
  output logic [NCAL/2-1:0] cal_pair,      // cal12, cal34, ...
  output logic [NCAL-1:0] swap,            // swap1, swap2, ...
  output logic [1:0]      s_in_calib,      // S_in1 / S_in2 on the calibration signal
  output logic            acq,             // loop codes are being taken
  output logic            frc_en,
  output logic            frc_val,
  output logic            frc_stage,       // 0: first stage of the pair, 1: second
  output fxp_t            alpha_ex  [2],
  output fxp_t            beta_ex   [2],
  output fxp_t            alpha     [NCAL],
  output fxp_t            beta      [NCAL],
  output fxp_t            alpha_use [NCAL],
  output fxp_t            beta_use  [NCAL],
  output logic            busy,
  output logic            coef_valid
);
  localparam int NP = NCAL / 2;
  localparam int PW = (NP > 1) ? $clog2(NP) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_RUN, S_RUN_W, S_SWAP_A, S_SWAP_B, S_CAL_ON, S_UNSWAP_A, S_UNSWAP_B, S_DONE
  } state_t;
  state_t state;

  logic          ex;
  logic [PW-1:0] p;

  logic f_start, f_busy, f_vcal, f_valid;
  fxp_t f_alpha [2], f_beta [2];
  logic [$clog2(MAX_ITER+1)-1:0] f_iter;
  fpi_algo_cal #(.N_BITS(N_BITS), .NSTG(2), .MAX_ITER(MAX_ITER), .TOL(TOL)) u_fpi (
    .clk(clk), .rst_n(rst_n), .start(f_start), .code_valid(code_valid), .code_in(code_in),
    .busy(f_busy), .acq(acq), .vcal_sel(f_vcal), .frc_en(frc_en), .frc_val(frc_val),
    .frc_stage(frc_stage), .alpha(f_alpha), .beta(f_beta), .coef_valid(f_valid),
    .iter_count(f_iter)
  );
  assign f_start = (state == S_RUN);

  assign busy = (state != S_IDLE);
  assign s_in_calib[0] = f_vcal && !frc_stage;
  assign s_in_calib[1] = f_vcal &&  frc_stage;

  always_comb begin
    for (int k = 0; k < NCAL; k++) begin
      alpha_use[k] = swap[k] ? alpha_ex[k % 2] : alpha[k];
      beta_use[k]  = swap[k] ? beta_ex[k % 2]  : beta[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cal_ex     <= 1'b0;
      cal_pair   <= '0;
      swap       <= '0;
      ex         <= 1'b0;
      p          <= '0;
      coef_valid <= 1'b0;
      for (int k = 0; k < 2; k++) begin
        alpha_ex[k] <= FXP_TWO;
        beta_ex[k]  <= FXP_ONE;
      end
      for (int k = 0; k < NCAL; k++) begin
        alpha[k] <= FXP_TWO;
        beta[k]  <= FXP_ONE;
      end
    end else begin
      case (state)
        S_IDLE: if (start) begin
          coef_valid <= 1'b0;
          cal_ex     <= 1'b1;
          ex         <= 1'b1;
          p          <= '0;
          state      <= S_RUN;
        end
        S_RUN: state <= S_RUN_W;
        S_RUN_W: if (f_valid) begin
          if (ex) begin
            alpha_ex <= f_alpha;
            beta_ex  <= f_beta;
            cal_ex   <= 1'b0;
            ex       <= 1'b0;
            state    <= S_SWAP_A;
          end else begin
            alpha[2*p]   <= f_alpha[0];
            beta[2*p]    <= f_beta[0];
            alpha[2*p+1] <= f_alpha[1];
            beta[2*p+1]  <= f_beta[1];
            cal_pair[p]  <= 1'b0;
            state        <= S_UNSWAP_A;
          end
        end
        S_SWAP_A: begin
          swap[2*p] <= 1'b1;
          state     <= S_SWAP_B;
        end
        S_SWAP_B: begin
          swap[2*p+1] <= 1'b1;
          state       <= S_CAL_ON;
        end
        S_CAL_ON: begin
          cal_pair[p] <= 1'b1;
          state       <= S_RUN;
        end
        S_UNSWAP_A: begin
          swap[2*p] <= 1'b0;
          state     <= S_UNSWAP_B;
        end
        S_UNSWAP_B: begin
          swap[2*p+1] <= 1'b0;
          if (int'(p) == NP - 1) state <= S_DONE;
          else begin
            p     <= p + 1'b1;
            state <= S_SWAP_A;
          end
        end
        S_DONE: begin
          coef_valid <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
