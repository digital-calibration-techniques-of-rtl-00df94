// Calibration of an algorithmic (one-stage) or two-stage cyclic 1.5 bit/stage
// ADC by fixed-point iteration.
//
// Acquisition. For each of the NSTG stages f of the loop, the input is
// connected to Vcal = Vref/4 for the first conversion cycle (`vcal_sel`) and
// that cycle's code of stage f is forced (`frc_en`), first to 0 and then to +1
// (`frc_val`). The loop then keeps converting its own residue; the next
// N_BITS-1 codes D2..D_N_BITS are stored. With one stage all codes come from
// that stage; with two stages they come alternately from the other stage and
// from stage f (D2 from the other one), since the residue of one stage is the
// input of the other.
//
// Iteration. From alpha = 2, beta = 1, every stage f in turn gets
//   alpha_f = 4*Dres0,   beta_f = Dres0 - Dres1,
// where Dres0/Dres1 are the residue estimates of its two code sets, evaluated
// from D_N_BITS back to D2 as r <- (beta_s*D + r)/alpha_s with the latest
// coefficients of the stage s that produced each code. The stored codes are
// reused, so iterating needs no more conversions. Iteration stops when no
// coefficient moves by more than TOL (2^-FRAC units) in a pass, or after
// MAX_ITER passes; `coef_valid` then rises.
//
// NSTG = 1 is the algorithmic converter; NSTG = 2 is the pair of pipeline
// stages calibrated together as a two-stage cyclic converter. The equations,
// the Vcal/forcing sequence and the code order follow the design; the
// handshake (one code per `code_valid`), TOL and the stopping rule are this
// implementation's.
module fpi_algo_cal
  import adc_cal_pkg::*;
#(
  parameter int N_BITS   = 12,  // conversion cycles per sample (resolution)
  parameter int NSTG     = 1,   // stages in the loop: 1 or 2
  parameter int MAX_ITER = 10,
  parameter int TOL      = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,          // pulse: begin calibration
  input  logic  code_valid,     // one conversion cycle done
  input  code_t code_in,        // the code of that cycle
  output logic  busy,
  output logic  acq,            // acquiring codes
  output logic  vcal_sel,       // input switch on Vcal (first cycle)
  output logic  frc_en,         // force the code of this cycle
  output logic  frc_val,        // forced code: 0 (low) or +1 (high)
  output logic  frc_stage,      // loop stage being forced (0 or 1)
  output fxp_t  alpha [NSTG],
  output fxp_t  beta  [NSTG],
  output logic  coef_valid,
  output logic [$clog2(MAX_ITER+1)-1:0] iter_count
);
  localparam int L  = N_BITS - 1;
  localparam int CC = $clog2(N_BITS + 1);
  localparam int IW = $clog2(MAX_ITER + 1);
  localparam int SW = $clog2(NSTG + 1);

  typedef enum logic [2:0] {S_IDLE, S_ACQ, S_IT_START, S_IT_WAIT, S_IT_NEXT, S_DONE} state_t;
  state_t state;

  code_t store [NSTG][2][L];
  logic  f;            // stage being acquired / updated
  logic  v;            // forced code of the acquisition
  logic [CC-1:0] cnt;  // conversion cycle within the acquisition
  fxp_t  maxd;

  // Which loop stage produced list entry m (code D_(m+2)) of stage f's sets.
  function automatic logic src(logic ff, int m);
    if (NSTG == 1) return 1'b0;
    return (m % 2 == 0) ? ~ff : ff;
  endfunction

  code_t c0 [L], c1 [L];
  logic [SW-1:0] sel [L];
  always_comb begin
    for (int m = 0; m < L; m++) begin
      sel[m] = SW'(src(f, m));
      c0[m]  = store[f][0][m];
      c1[m]  = store[f][1][m];
    end
  end

  logic u_start, u_busy, u_done;
  fxp_t a_u, b_u, d0, d1;
  alpha_beta_update #(.L_MAX(L), .NC(NSTG)) u_upd (
    .clk(clk), .rst_n(rst_n), .start(u_start),
    .n_terms($clog2(L+1)'(L)),
    .codes0(c0), .codes1(c1), .sel(sel), .init0('0), .init1('0),
    .alpha(alpha), .beta(beta), .busy(u_busy), .done(u_done),
    .alpha_u(a_u), .beta_u(b_u), .dres0(d0), .dres1(d1)
  );
  assign u_start = (state == S_IT_START);

  function automatic fxp_t absd(fxp_t x, fxp_t y);
    return (x > y) ? x - y : y - x;
  endfunction
  fxp_t da, db;
  assign da = absd(a_u, alpha[f]);
  assign db = absd(b_u, beta[f]);

  assign busy      = (state != S_IDLE);
  assign acq       = (state == S_ACQ);
  assign vcal_sel  = acq && (cnt == '0);
  assign frc_en    = vcal_sel;
  assign frc_val   = v;
  assign frc_stage = f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      f          <= 1'b0;
      v          <= 1'b0;
      cnt        <= '0;
      maxd       <= '0;
      coef_valid <= 1'b0;
      iter_count <= '0;
      for (int s = 0; s < NSTG; s++) begin
        alpha[s] <= FXP_TWO;
        beta[s]  <= FXP_ONE;
        for (int b = 0; b < 2; b++)
          for (int m = 0; m < L; m++) store[s][b][m] <= CODE_Z;
      end
    end else begin
      case (state)
        S_IDLE: if (start) begin
          f          <= 1'b0;
          v          <= 1'b0;
          cnt        <= '0;
          coef_valid <= 1'b0;
          iter_count <= '0;
          for (int s = 0; s < NSTG; s++) begin
            alpha[s] <= FXP_TWO;
            beta[s]  <= FXP_ONE;
          end
          state <= S_ACQ;
        end
        S_ACQ: if (code_valid) begin
          if (cnt != '0) store[f][v][int'(cnt) - 1] <= code_in;
          if (cnt != CC'(N_BITS - 1)) begin
            cnt <= cnt + 1'b1;
          end else begin
            cnt <= '0;
            if (!v) v <= 1'b1;
            else begin
              v <= 1'b0;
              if (int'(f) != NSTG - 1) f <= 1'b1;
              else begin
                f     <= 1'b0;
                maxd  <= '0;
                state <= S_IT_START;
              end
            end
          end
        end
        S_IT_START: state <= S_IT_WAIT;
        S_IT_WAIT: if (u_done) begin
          alpha[f] <= a_u;
          beta[f]  <= b_u;
          if (da > maxd || db > maxd) maxd <= (da > db) ? da : db;
          state <= S_IT_NEXT;
        end
        S_IT_NEXT: begin
          if (int'(f) != NSTG - 1) begin
            f     <= 1'b1;
            state <= S_IT_START;
          end else begin
            f          <= 1'b0;
            iter_count <= iter_count + 1'b1;
            maxd       <= '0;
            if (maxd <= fxp_t'(TOL) || iter_count == IW'(MAX_ITER - 1)) state <= S_DONE;
            else state <= S_IT_START;
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
