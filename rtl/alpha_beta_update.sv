// One coefficient update of a stage under calibration.
//
// The stage's input is held at Vref/4 and its own code is forced, once to 0
// and once to +1. Its residue is then alpha*Vref/4 and alpha*Vref/4 - beta*Vref.
// The stages behind it convert the two residues into code sets; from them the
// residue estimator gives the digital residues Dres0 and Dres1 (in units of
// Vref), and
//
//   alpha = 4 * Dres0          beta = Dres0 - Dres1.
//
// This is the update of the fixed-point iteration (pipeline cycling and the
// algorithmic and two-stage cyclic variants) and, with exact coefficients for
// the stages behind, the direct solution of the ramp technique. The two
// estimates are computed one after the other on a single residue estimator.
//
// Interface: pulse `start`; codes0/init0 (code forced to 0) and codes1/init1
// (code forced to +1), sel, n_terms and the coefficient arrays must stay stable
// until `done` pulses with `alpha_u`, `beta_u` valid (held until next start).
// Timing: two residue estimates back to back plus 2 clocks.
// The function follows the design; the structure and timing are this
// implementation's own choice.
module alpha_beta_update
  import adc_cal_pkg::*;
#(
  parameter int L_MAX = 11,
  parameter int NC    = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [$clog2(L_MAX+1)-1:0]   n_terms,
  input  code_t                        codes0 [L_MAX],
  input  code_t                        codes1 [L_MAX],
  input  logic [$clog2(NC+1)-1:0]      sel    [L_MAX],
  input  fxp_t                         init0,
  input  fxp_t                         init1,
  input  fxp_t                         alpha  [NC],
  input  fxp_t                         beta   [NC],
  output logic                         busy,
  output logic                         done,
  output fxp_t                         alpha_u,
  output fxp_t                         beta_u,
  output fxp_t                         dres0,
  output fxp_t                         dres1
);
  typedef enum logic [1:0] {S_IDLE, S_RUN0, S_RUN1} state_t;
  state_t state;

  logic  h_start, h_busy, h_done;
  fxp_t  h_r;
  code_t h_codes [L_MAX];
  logic  second;

  assign second = (state == S_RUN1);
  always_comb begin
    for (int i = 0; i < L_MAX; i++) h_codes[i] = second ? codes1[i] : codes0[i];
  end

  horner_eval #(.L_MAX(L_MAX), .NC(NC)) u_horner (
    .clk(clk), .rst_n(rst_n), .start(h_start), .n_terms(n_terms),
    .codes(h_codes), .sel(sel), .init(second ? init1 : init0),
    .alpha(alpha), .beta(beta), .busy(h_busy), .done(h_done), .r(h_r)
  );

  logic kick;
  assign h_start = kick;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      kick    <= 1'b0;
      done    <= 1'b0;
      alpha_u <= FXP_TWO;
      beta_u  <= FXP_ONE;
      dres0   <= '0;
      dres1   <= '0;
    end else begin
      kick <= 1'b0;
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          kick  <= 1'b1;
          state <= S_RUN0;
        end
        S_RUN0: if (h_done) begin
          dres0 <= h_r;
          kick  <= 1'b1;
          state <= S_RUN1;
        end
        S_RUN1: if (h_done) begin
          dres1   <= h_r;
          alpha_u <= dres0 <<< 2;
          beta_u  <= dres0 - h_r;
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
