// Foreground calibration of the NCAL MSB stages of a 1.5 bit/stage pipelined
// ADC from a slow input ramp, one stage after the other starting with the
// least significant calibrated stage.
//
// While the input ramps from 0 up to Vref/4, the code of stage n changes from
// 0 to +1 when its input crosses Vref/4 (near Vin = Vref/16 for stage 3,
// Vref/8 for stage 2, Vref/4 for stage 1). The sample before the change and
// the sample after it are two conversions of (almost) the same input that
// differ only in D_n; non-ideal alpha_n, beta_n show up as a step in the
// output there. Their codes give the digital residues of stage n with D_n = 0
// and D_n = +1, estimated through the stages n+1..NCAL (whose coefficients are
// already known) and the ideal backend:
//
//   alpha_n = 4 * Dres(D_n=0)      beta_n = Dres(D_n=0) - Dres(D_n=1)
//
// For stage NCAL the estimate is the backend code sum alone. The controller
// watches stage NCAL first, then NCAL-1, ... 1, so the coefficients each
// stage's estimate needs are always ready. This order and the equations are
// the design's; the capture logic and its handshake are this implementation's.
//
// Interface: pulse `start` before the ramp; then present one time-aligned code
// set per `valid_in`. Transitions seen while a computation runs (about
// 2*(NCAL-n)*(CW+FRAC+2) clocks) are ignored, so the ramp must not reach the
// next stage's transition sooner. `coef_valid` rises once stage 1 is done;
// `cal_stage` tells which stage (1-based) is being watched.
module seq_cal_ctrl
  import adc_cal_pkg::*;
#(
  parameter int N_ST = 10,   // pipeline stages
  parameter int NCAL = 3     // calibrated MSB stages
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        valid_in,
  input  code_t       codes_in [N_ST],
  output logic        busy,
  output logic [$clog2(NCAL+1)-1:0] cal_stage,
  output fxp_t        alpha [NCAL],
  output fxp_t        beta  [NCAL],
  output logic        coef_valid
);
  localparam int LM = (NCAL > 1) ? NCAL - 1 : 1;
  localparam int SW = $clog2(NCAL + 1);

  typedef enum logic [1:0] {S_IDLE, S_WATCH, S_CALC} state_t;
  state_t state;

  code_t prev [N_ST];
  logic  prev_ok;
  code_t set0 [N_ST], set1 [N_ST];
  logic [SW-1:0] t;        // 0-based stage under calibration

  // Residue-estimate inputs: stages t+1 .. NCAL-1, then the backend sum.
  code_t c0 [LM], c1 [LM];
  logic [SW-1:0] sel [LM];
  fxp_t init0, init1;
  always_comb begin
    for (int m = 0; m < LM; m++) begin
      sel[m] = SW'(int'(t) + 1 + m);
      c0[m]  = (int'(t) + 1 + m < NCAL) ? set0[int'(t) + 1 + m] : CODE_Z;
      c1[m]  = (int'(t) + 1 + m < NCAL) ? set1[int'(t) + 1 + m] : CODE_Z;
    end
    init0 = '0;
    init1 = '0;
    for (int k = NCAL; k < N_ST; k++) begin
      init0 = init0 + code_mul(FXP_ONE >>> (k - NCAL + 1), set0[k]);
      init1 = init1 + code_mul(FXP_ONE >>> (k - NCAL + 1), set1[k]);
    end
  end

  logic u_start, u_busy, u_done;
  fxp_t a_u, b_u, d0, d1;
  alpha_beta_update #(.L_MAX(LM), .NC(NCAL)) u_upd (
    .clk(clk), .rst_n(rst_n), .start(u_start),
    .n_terms($clog2(LM+1)'(NCAL - 1 - int'(t))),
    .codes0(c0), .codes1(c1), .sel(sel), .init0(init0), .init1(init1),
    .alpha(alpha), .beta(beta), .busy(u_busy), .done(u_done),
    .alpha_u(a_u), .beta_u(b_u), .dres0(d0), .dres1(d1)
  );

  logic transition;
  assign transition = valid_in && prev_ok && (prev[t] == CODE_Z) && (codes_in[t] == CODE_P1);

  assign busy      = (state != S_IDLE);
  assign cal_stage = t + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      prev_ok    <= 1'b0;
      t          <= '0;
      u_start    <= 1'b0;
      coef_valid <= 1'b0;
      for (int k = 0; k < N_ST; k++) begin
        prev[k] <= CODE_Z;
        set0[k] <= CODE_Z;
        set1[k] <= CODE_Z;
      end
      for (int n = 0; n < NCAL; n++) begin
        alpha[n] <= FXP_TWO;
        beta[n]  <= FXP_ONE;
      end
    end else begin
      u_start <= 1'b0;
      if (valid_in) begin
        for (int k = 0; k < N_ST; k++) prev[k] <= codes_in[k];
        prev_ok <= (state == S_WATCH);
      end
      case (state)
        S_IDLE: if (start) begin
          t          <= SW'(NCAL - 1);
          prev_ok    <= 1'b0;
          coef_valid <= 1'b0;
          for (int n = 0; n < NCAL; n++) begin
            alpha[n] <= FXP_TWO;
            beta[n]  <= FXP_ONE;
          end
          state <= S_WATCH;
        end
        S_WATCH: if (transition) begin
          for (int k = 0; k < N_ST; k++) begin
            set0[k] <= prev[k];
            set1[k] <= codes_in[k];
          end
          u_start <= 1'b1;
          state   <= S_CALC;
        end
        S_CALC: if (u_done) begin
          alpha[t] <= a_u;
          beta[t]  <= b_u;
          prev_ok  <= 1'b0;
          if (t == '0) begin
            coef_valid <= 1'b1;
            state      <= S_IDLE;
          end else begin
            t     <= t - 1'b1;
            state <= S_WATCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
