// Residue estimator: the digital equivalent of the residue voltage of a stage,
// computed from the codes of the stages behind it and their current alpha and
// beta coefficients.
//
// A stage with gain alpha and reference gain beta maps its input v to
// alpha*v - beta*D*Vref. Reading a chain of such stages backwards, the input of
// a stage is (beta*D + r)/alpha, where r is the (digital) input of the next
// stage. Starting from the value `init` of whatever follows the chain (the
// ideal backend's weighted code sum, or 0 for an algorithmic converter whose
// last residue is not converted), this module applies that step for list
// entries n_terms-1 down to 0 and returns the input of entry 0's stage:
//
//   r = D0*b0/a0 + D1*b1/(a0*a1) + ... + init/(a0*a1*...)
//
// which is the form of every residue estimate of the calibration schemes
// (pipeline stage cycling, algorithmic and two-stage cyclic converters, and
// the stage-by-stage ramp technique). Entry k carries a stage code codes[k] and
// the index sel[k] of the coefficient pair it uses. The evaluation order is the
// design's; the one-divider sequential form is this implementation's choice.
//
// Interface: pulse `start`; all inputs must stay stable until `done` pulses.
// Timing: n_terms divisions of CW+FRAC+2 clocks each, plus 2 clocks.
module horner_eval
  import adc_cal_pkg::*;
#(
  parameter int L_MAX = 11,   // longest list (11 backend codes of a 12-stage converter)
  parameter int NC    = 4     // number of coefficient pairs
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [$clog2(L_MAX+1)-1:0]   n_terms,
  input  code_t                        codes [L_MAX],
  input  logic [$clog2(NC+1)-1:0]      sel   [L_MAX],
  input  fxp_t                         init,
  input  fxp_t                         alpha [NC],
  input  fxp_t                         beta  [NC],
  output logic                         busy,
  output logic                         done,
  output fxp_t                         r
);
  typedef enum logic [1:0] {S_IDLE, S_STEP, S_WAIT} state_t;
  state_t state;

  logic [$clog2(L_MAX+1)-1:0] k;
  logic  div_start, div_busy, div_done, div_ovf;
  fxp_t  div_a, div_b, div_q;

  // Term of entry k-1: beta*D + r over alpha.
  logic [$clog2(NC+1)-1:0] s_idx;
  assign s_idx = sel[k - 1'b1];
  assign div_a = code_mul(beta[s_idx], codes[k - 1'b1]) + r;
  assign div_b = alpha[s_idx];

  fxp_divider #(.W(CW), .F(FRAC)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .a(div_a), .b(div_b),
    .busy(div_busy), .done(div_done), .q(div_q), .ovf(div_ovf)
  );

  assign div_start = (state == S_STEP) && (k != '0);
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      k     <= '0;
      r     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          r     <= init;
          k     <= n_terms;
          state <= S_STEP;
        end
        S_STEP: begin
          if (k == '0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_WAIT;
          end
        end
        S_WAIT: if (div_done) begin
          r     <= div_q;
          k     <= k - 1'b1;
          state <= S_STEP;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
