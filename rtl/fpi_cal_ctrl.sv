// Foreground calibration of the NCAL most significant stages of a 1.5 bit/stage
// pipelined ADC by cycling the stages and fixed-point iteration.
//
// Acquisition. For each calibrated stage n, in the order 1, NCAL, NCAL-1, ...,
// 2, the controller raises CAL and CALn. The stage switches then put Vcal =
// Vref/4 on stage n's input and rotate the calibrated stages into a ring so
// that stage n is first, followed by n+1, ..., NCAL, 1, ..., n-1, and then the
// ideal backend stages NCAL+1..N_ST. FRC forces stage n's code to 0 and then
// to +1; for each, after ACQ_WAIT clocks the time-aligned codes of all stages
// are stored (2*NCAL code sets). The switch selects are decoded here from CALn:
// `in_sel[s]` is 0 for the normal input, 1 for Vcal, 2 for the residue of
// stage NCAL looped back to stage 1; `be_src` is the stage whose residue feeds
// the backend.
//
// Iteration. With alpha = 2, beta = 1 to start, each stage n in the same order
// gets alpha_n = 4*Dres0, beta_n = Dres0 - Dres1, where Dres is the residue
// estimate from the stored codes of the stages behind n with their latest
// coefficients and the backend's binary code sum. One pass over the stages is
// one iteration; the stored codes are reused, so the iterations need no more
// conversions. Iteration stops once no coefficient moves by more than TOL
// (in 2^-FRAC units) over a pass, or after MAX_ITER passes. CAL stays high
// until then; `coef_valid` rises when the coefficients are final.
//
// All of the above follows the design; ACQ_WAIT, TOL and the stopping rule are
// this implementation's choices.
module fpi_cal_ctrl
  import adc_cal_pkg::*;
#(
  parameter int N_ST     = 12,   // pipeline stages
  parameter int NCAL     = 4,    // calibrated MSB stages
  parameter int ACQ_WAIT = 16,   // clocks from a control change to a stable aligned code set
  parameter int MAX_ITER = 10,   // passes at most
  parameter int TOL      = 2     // convergence threshold, 2^-FRAC units
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,                 // pulse: begin calibration
  input  code_t       codes_in [N_ST],       // time-aligned stage codes
  output logic        cal,                   // CAL
  output logic [NCAL-1:0] cal_n,             // CAL1..CALNCAL, one-hot during acquisition
  output logic        frc,                   // FRC: forced code 0 (low) or +1 (high)
  output logic [1:0]  in_sel [NCAL],         // stage input switch select
  output logic [$clog2(NCAL+1)-1:0] be_src,  // 1-based stage feeding the backend
  output fxp_t        alpha [NCAL],
  output fxp_t        beta  [NCAL],
  output logic        coef_valid,
  output logic [$clog2(MAX_ITER+1)-1:0] iter_count
);
  localparam int LM = (NCAL > 1) ? NCAL - 1 : 1;
  localparam int SW = $clog2(NCAL + 1);
  localparam int WW = $clog2(ACQ_WAIT + 1);

  typedef enum logic [2:0] {S_IDLE, S_ACQ_WAIT, S_ACQ_STORE, S_IT_START, S_IT_WAIT, S_IT_NEXT, S_DONE} state_t;
  state_t state;

  code_t store [NCAL][2][N_ST];

  logic [SW-1:0] j;            // position in the calibration order
  logic          f;            // forced code of the current acquisition
  logic [WW-1:0] wcnt;
  fxp_t          maxd;

  // Calibration order 1, NCAL, NCAL-1, ..., 2 (0-based stage index).
  function automatic logic [SW-1:0] order(logic [SW-1:0] jj);
    if (jj == '0) return '0;
    return SW'(NCAL) - jj;
  endfunction

  logic [SW-1:0] s0;
  assign s0 = order(j);

  // ---- switch decoding --------------------------------------------------------
  always_comb begin
    for (int s = 0; s < NCAL; s++) in_sel[s] = 2'd0;
    be_src = SW'(NCAL);
    for (int n = 0; n < NCAL; n++) begin
      if (cal_n[n]) begin
        in_sel[n] = 2'd1;
        if (n != 0) in_sel[0] = 2'd2;
        be_src = (n == 0) ? SW'(NCAL) : SW'(n);
      end
    end
  end

  // ---- residue estimates for the stage under update ----------------------------
  code_t c0 [LM], c1 [LM];
  logic [SW-1:0] sel [LM];
  fxp_t init0, init1;
  always_comb begin
    for (int m = 0; m < LM; m++) begin
      sel[m] = SW'((int'(s0) + 1 + m) % NCAL);
      c0[m]  = store[s0][0][sel[m]];
      c1[m]  = store[s0][1][sel[m]];
    end
    init0 = '0;
    init1 = '0;
    for (int k = NCAL; k < N_ST; k++) begin
      init0 = init0 + code_mul(FXP_ONE >>> (k - NCAL + 1), store[s0][0][k]);
      init1 = init1 + code_mul(FXP_ONE >>> (k - NCAL + 1), store[s0][1][k]);
    end
  end

  logic u_start, u_busy, u_done;
  fxp_t a_u, b_u, d0, d1;

  alpha_beta_update #(.L_MAX(LM), .NC(NCAL)) u_upd (
    .clk(clk), .rst_n(rst_n), .start(u_start),
    .n_terms($clog2(LM+1)'(NCAL - 1)),
    .codes0(c0), .codes1(c1), .sel(sel), .init0(init0), .init1(init1),
    .alpha(alpha), .beta(beta), .busy(u_busy), .done(u_done),
    .alpha_u(a_u), .beta_u(b_u), .dres0(d0), .dres1(d1)
  );

  assign u_start = (state == S_IT_START);

  function automatic fxp_t absd(fxp_t x, fxp_t y);
    return (x > y) ? x - y : y - x;
  endfunction

  fxp_t da, db;
  assign da = absd(a_u, alpha[s0]);
  assign db = absd(b_u, beta[s0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cal        <= 1'b0;
      cal_n      <= '0;
      frc        <= 1'b0;
      j          <= '0;
      f          <= 1'b0;
      wcnt       <= '0;
      maxd       <= '0;
      coef_valid <= 1'b0;
      iter_count <= '0;
      for (int n = 0; n < NCAL; n++) begin
        alpha[n] <= FXP_TWO;
        beta[n]  <= FXP_ONE;
        for (int b = 0; b < 2; b++)
          for (int k = 0; k < N_ST; k++) store[n][b][k] <= CODE_Z;
      end
    end else begin
      case (state)
        S_IDLE: if (start) begin
          cal        <= 1'b1;
          coef_valid <= 1'b0;
          iter_count <= '0;
          j          <= '0;
          f          <= 1'b0;
          frc        <= 1'b0;
          cal_n      <= NCAL'(1);
          wcnt       <= '0;
          for (int n = 0; n < NCAL; n++) begin
            alpha[n] <= FXP_TWO;
            beta[n]  <= FXP_ONE;
          end
          state      <= S_ACQ_WAIT;
        end
        S_ACQ_WAIT: begin
          if (wcnt == WW'(ACQ_WAIT)) state <= S_ACQ_STORE;
          else wcnt <= wcnt + 1'b1;
        end
        S_ACQ_STORE: begin
          for (int k = 0; k < N_ST; k++) store[s0][f][k] <= codes_in[k];
          wcnt <= '0;
          if (!f) begin
            f     <= 1'b1;
            frc   <= 1'b1;
            state <= S_ACQ_WAIT;
          end else if (j != SW'(NCAL - 1)) begin
            f     <= 1'b0;
            frc   <= 1'b0;
            j     <= j + 1'b1;
            cal_n <= NCAL'(1) << order(j + 1'b1);
            state <= S_ACQ_WAIT;
          end else begin
            f     <= 1'b0;
            frc   <= 1'b0;
            cal_n <= '0;
            j     <= '0;
            maxd  <= '0;
            state <= S_IT_START;
          end
        end
        S_IT_START: state <= S_IT_WAIT;
        S_IT_WAIT: if (u_done) begin
          alpha[s0] <= a_u;
          beta[s0]  <= b_u;
          if (da > maxd || db > maxd) maxd <= (da > db) ? da : db;
          state <= S_IT_NEXT;
        end
        S_IT_NEXT: begin
          if (j != SW'(NCAL - 1)) begin
            j     <= j + 1'b1;
            state <= S_IT_START;
          end else begin
            iter_count <= iter_count + 1'b1;
            j          <= '0;
            maxd       <= '0;
            if (maxd <= fxp_t'(TOL) || iter_count == ($clog2(MAX_ITER+1))'(MAX_ITER - 1))
              state <= S_DONE;
            else
              state <= S_IT_START;
          end
        end
        S_DONE: begin
          cal        <= 1'b0;
          coef_valid <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
