// Background calibration of the NCAL most significant pipeline stages, one
// stage at a time, with an extra pipeline stage that takes the place of the
// stage under calibration (calibration technique 1).
//
// Sequence. `calex` is raised first: the extra stage, looped through the extra
// sample-and-hold amplifier (ESHA) as a one-stage algorithmic converter, is
// calibrated. Then for n = 1..NCAL:
//   * `cal_e[n]` rises: the extra stage's clock switches from the slow to the
//     fast clock (S_cl3/S_cl4), with phi1/phi2 exchanged for even stages
//     because neighbouring stages work in opposite phases;
//   * one clock later `cal[n]` rises: stage n and the extra stage trade inputs,
//     outputs and code flip-flops; stage n, on the slow clock, forms the
//     algorithmic loop with the ESHA;
//   * stage n converts Vref/4 twice with its first code forced to 0 and to
//     +1; the N_BITS codes of each conversion go to the Newton-Raphson solver;
//   * `cal_e[n]` falls (stage n back on the fast clock), one clock later
//     `cal[n]` falls and stage n is back in the pipeline; alpha_n, beta_n are
//     stored.
// While stage n is out, `alpha_use`/`beta_use` give the extra stage's
// coefficients in its place, so the output stays calibrated.
//
// The ordering, the early signals one cycle ahead, the phase exchange for
// even stages, the Vcal/forcing procedure and the substitution follow the
// design. The handshake (`code_valid` per slow conversion cycle), the number
// of codes per conversion (N_BITS) and the one-clock spacings on the fast
// clock are this implementation's choices.
module subst_cal_ctrl
  import adc_cal_pkg::*;
#(
  parameter int NCAL   = 4,    // calibrated MSB stages
  parameter int N_BITS = 12,   // codes per calibration conversion
  parameter int N_ITER = 5     // Newton iterations
) (
  input  logic            clk,           // fast (conversion) clock
  input  logic            rst_n,
  input  logic            start,         // pulse: calibrate the extra stage and stages 1..NCAL
  input  logic            code_valid,    // one slow conversion cycle of the loop done
  input  code_t           code_in,       // its code (from the extra flip-flop array)
  output logic            calex,
  output logic [NCAL-1:0] cal_e,
  output logic [NCAL-1:0] cal,
  output logic            vcal_sel,      // ESHA input on Vcal
  output logic            frc_en,        // force this cycle's code
  output logic            frc_val,       // 0 or +1
  output logic            ex_clk_fast,   // S_cl3/S_cl4 on phi1/phi2 (else slow clock)
  output logic            ex_clk_swap,   // S_cl3/S_cl4 on phi2/phi1
  output logic [NCAL-1:0] slow_clk,      // stage n on the slow clock
  output fxp_t            alpha_ex,
  output fxp_t            beta_ex,
  output fxp_t            alpha     [NCAL],
  output fxp_t            beta      [NCAL],
  output fxp_t            alpha_use [NCAL],
  output fxp_t            beta_use  [NCAL],
  output logic            busy,
  output logic            coef_valid
);
  localparam int NW = $clog2(NCAL + 1);
  localparam int CC = $clog2(N_BITS + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_EARLY, S_ACQ, S_SOLVE, S_SOLVE_W, S_END_E, S_END, S_DONE
  } state_t;
  state_t state;

  logic          ex;      // calibrating the extra stage
  logic [NW-1:0] n;       // stage under calibration, 0-based
  logic          v;       // forced code of the acquisition
  logic [CC-1:0] cnt;

  code_t set0 [N_BITS], set1 [N_BITS];

  logic s_start, s_busy, s_done;
  fxp_t s_alpha, s_beta;
  logic [$clog2(N_ITER+1)-1:0] s_iter;
  newton_alpha_solver #(.N_BITS(N_BITS), .N_ITER(N_ITER)) u_solve (
    .clk(clk), .rst_n(rst_n), .start(s_start), .codes0(set0), .codes1(set1),
    .busy(s_busy), .done(s_done), .alpha(s_alpha), .beta(s_beta), .iter_count(s_iter)
  );
  assign s_start = (state == S_SOLVE);

  assign busy     = (state != S_IDLE);
  assign vcal_sel = (state == S_ACQ) && (cnt == '0);
  assign frc_en   = vcal_sel;
  assign frc_val  = v;

  // Extra stage on the fast clock while it stands in for a pipeline stage;
  // phases exchanged for the even stages (2, 4, ...).
  always_comb begin
    ex_clk_fast = |cal_e;
    ex_clk_swap = 1'b0;
    for (int k = 1; k < NCAL; k += 2) ex_clk_swap |= cal_e[k];
    slow_clk = cal & cal_e;
    for (int k = 0; k < NCAL; k++) begin
      alpha_use[k] = cal[k] ? alpha_ex : alpha[k];
      beta_use[k]  = cal[k] ? beta_ex  : beta[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      calex      <= 1'b0;
      cal_e      <= '0;
      cal        <= '0;
      ex         <= 1'b0;
      n          <= '0;
      v          <= 1'b0;
      cnt        <= '0;
      coef_valid <= 1'b0;
      alpha_ex   <= FXP_TWO;
      beta_ex    <= FXP_ONE;
      for (int k = 0; k < NCAL; k++) begin
        alpha[k] <= FXP_TWO;
        beta[k]  <= FXP_ONE;
      end
      for (int k = 0; k < N_BITS; k++) begin
        set0[k] <= CODE_Z;
        set1[k] <= CODE_Z;
      end
    end else begin
      case (state)
        S_IDLE: if (start) begin
          coef_valid <= 1'b0;
          calex      <= 1'b1;
          ex         <= 1'b1;
          n          <= '0;
          v          <= 1'b0;
          cnt        <= '0;
          state      <= S_ACQ;
        end
        S_EARLY: begin
          cal[n] <= 1'b1;
          v      <= 1'b0;
          cnt    <= '0;
          state  <= S_ACQ;
        end
        S_ACQ: if (code_valid) begin
          if (!v) set0[cnt] <= code_in;
          else    set1[cnt] <= code_in;
          if (cnt != CC'(N_BITS - 1)) cnt <= cnt + 1'b1;
          else begin
            cnt <= '0;
            if (!v) v <= 1'b1;
            else    state <= S_SOLVE;
          end
        end
        S_SOLVE:   state <= S_SOLVE_W;
        S_SOLVE_W: if (s_done) begin
          if (ex) begin
            alpha_ex <= s_alpha;
            beta_ex  <= s_beta;
            calex    <= 1'b0;
            ex       <= 1'b0;
            cal_e[0] <= 1'b1;
            state    <= S_EARLY;
          end else begin
            alpha[n] <= s_alpha;
            beta[n]  <= s_beta;
            cal_e[n] <= 1'b0;
            state    <= S_END;
          end
        end
        S_END: begin
          cal[n] <= 1'b0;
          if (n == NW'(NCAL - 1)) state <= S_DONE;
          else begin
            n     <= n + 1'b1;
            state <= S_END_E;
          end
        end
        S_END_E: begin
          cal_e[n] <= 1'b1;
          state    <= S_EARLY;
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
