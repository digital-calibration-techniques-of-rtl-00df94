// Newton-Raphson solution for the coefficients alpha and beta of a one-stage
// (algorithmic) 1.5 bit/stage converter.
//
// Vcal = Vref/4 is converted twice, with the first code forced to 0 and to +1,
// giving the code sets D0_1..D0_N and D1_1..D1_N. A correct calibration gives
// both the same output, sum_i D_i*beta/alpha^i; beta cancels and leaves
//
//   f(alpha) = sum_i c_i * alpha^-i = 0,      c_i = D0_i - D1_i,
//
// which is solved by Newton-Raphson from alpha = 2:
//
//   x = 1/alpha,  g = sum c_i x^i,  h = sum i*c_i x^(i+1),
//   alpha <- alpha + g/h                      (= alpha - f/f')
//
// for N_ITER iterations. Then beta follows from the forced-0 conversion, whose
// calibrated output must be 1/4: beta = (1/4) / sum_i D0_i x^i.
//
// The equations, the start value and the use of Newton-Raphson follow the
// design. The datapath is this implementation's: one fixed-point multiplier
// evaluating g and h by Horner's rule (one code per clock) and one sequential
// divider for 1/alpha, g/h and beta.
//
// Interface: pulse `start` with both code sets stable until `done` pulses.
// Timing: N_ITER*(2 divisions + N + 3) + 2 divisions + N + a few clocks.
module newton_alpha_solver
  import adc_cal_pkg::*;
#(
  parameter int N_BITS = 10,   // codes per conversion
  parameter int N_ITER = 5     // Newton iterations
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  code_t codes0 [N_BITS],   // D1 forced to 0; index 0 = D1
  input  code_t codes1 [N_BITS],   // D1 forced to +1
  output logic  busy,
  output logic  done,
  output fxp_t  alpha,
  output fxp_t  beta,
  output logic [$clog2(N_ITER+1)-1:0] iter_count
);
  localparam int IW = $clog2(N_ITER + 1);
  localparam int KW = $clog2(N_BITS + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_INV, S_INV_W, S_POLY, S_STEP, S_STEP_W, S_BINV, S_BINV_W,
    S_BPOLY, S_BDIV, S_BDIV_W, S_DONE
  } state_t;
  state_t state;

  fxp_t x, g, hp, s0;
  logic [KW-1:0] i;   // current term index 1..N_BITS

  function automatic fxp_t cdiff(code_t a, code_t b);
    return fxp_t'(code_val(a)) - fxp_t'(code_val(b));
  endfunction

  fxp_t ci, g_next, hp_next, s0_next;
  always_comb begin
    ci      = cdiff(codes0[int'(i) - 1], codes1[int'(i) - 1]) <<< FRAC;
    g_next  = fxp_mul(g + ci, x);
    hp_next = fxp_mul(hp + ci * fxp_t'(i), x);
    s0_next = fxp_mul(s0 + (fxp_t'(code_val(codes0[int'(i) - 1])) <<< FRAC), x);
  end

  logic dv_start, dv_busy, dv_done, dv_ovf;
  fxp_t dv_a, dv_b, dv_q;
  fxp_divider #(.W(CW), .F(FRAC)) u_div (
    .clk(clk), .rst_n(rst_n), .start(dv_start), .a(dv_a), .b(dv_b),
    .busy(dv_busy), .done(dv_done), .q(dv_q), .ovf(dv_ovf)
  );

  always_comb begin
    dv_start = (state == S_INV) || (state == S_STEP) || (state == S_BINV) || (state == S_BDIV);
    case (state)
      S_STEP:  begin dv_a = g;                  dv_b = fxp_mul(hp, x); end
      S_BDIV:  begin dv_a = FXP_ONE >>> 2;      dv_b = s0;             end
      default: begin dv_a = FXP_ONE;            dv_b = alpha;          end
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      alpha      <= FXP_TWO;
      beta       <= FXP_ONE;
      x          <= FXP_HALF;
      g          <= '0;
      hp         <= '0;
      s0         <= '0;
      i          <= '0;
      iter_count <= '0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          alpha      <= FXP_TWO;
          iter_count <= '0;
          state      <= S_INV;
        end
        S_INV:   state <= S_INV_W;
        S_INV_W: if (dv_done) begin
          x     <= dv_q;
          g     <= '0;
          hp    <= '0;
          i     <= KW'(N_BITS);
          state <= S_POLY;
        end
        S_POLY: begin
          g  <= g_next;
          hp <= hp_next;
          if (i == KW'(1)) state <= S_STEP;
          else i <= i - 1'b1;
        end
        S_STEP:   state <= S_STEP_W;
        S_STEP_W: if (dv_done) begin
          alpha      <= alpha + dv_q;
          iter_count <= iter_count + 1'b1;
          state      <= (iter_count == IW'(N_ITER - 1)) ? S_BINV : S_INV;
        end
        S_BINV:   state <= S_BINV_W;
        S_BINV_W: if (dv_done) begin
          x     <= dv_q;
          s0    <= '0;
          i     <= KW'(N_BITS);
          state <= S_BPOLY;
        end
        S_BPOLY: begin
          s0 <= s0_next;
          if (i == KW'(1)) state <= S_BDIV;
          else i <= i - 1'b1;
        end
        S_BDIV:   state <= S_BDIV_W;
        S_BDIV_W: if (dv_done) begin
          beta  <= dv_q;
          state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
