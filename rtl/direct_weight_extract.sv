// Direct extraction of the output weights W1..W12 of a 12-stage, 1.5 bit/stage
// pipelined ADC whose four MSB stages are calibrated, using a slow, accurate
// reference ADC (a calibrated algorithmic ADC) that converts the same ramp.
//
// The calibrated output is Dout = sum D_k*W_k. For a code vector with a single
// nonzero code the output is that stage's weight, so the reference ADC's
// reading of the input that produces it *is* the weight. As the ramp rises,
// the first sample showing each of these patterns latches the reference
// reading (a flag then blocks further latching):
//
//   P5 = (0,0,0,0,+1,0,...,0)  near Vref/32   A5 -> W5
//   P4 = (0,0,0,+1,0,...,0)    near Vref/16   A4 -> W4
//   P3 = (0,0,+1,-1,0,...,0)   near Vref/16   A3 -> W3 = A3 + A4
//   P2 = (0,+1,0,...,0)        near Vref/4    A2 -> W2
//   P1 = (+1,-1,0,...,0)       near Vref/4    A1 -> W1 = A1 + A2
//
// and W6..W12 are W5 shifted right by 1..7 (ideal backend). Measuring W3 and
// W1 through the (+1,-1) patterns keeps the fine ramp to three short regions.
// Pattern matching on the M bit of the +1 stage and the L bits of the others
// follows the design's circuit; a pattern is matched on the whole code vector.
//
// Interface: pulse `start`; then one aligned code set and the reference
// reading `d_algo` (fixed point, units of Vref) per `valid_in`. `found[4:0]`
// shows which of P1..P5 have been latched; `done` rises when all five have
// and `w` holds the weights (ideal binary weights before that).
module direct_weight_extract
  import adc_cal_pkg::*;
#(
  parameter int N_ST = 12    // pipeline stages (stages 6..N_ST follow W5)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       valid_in,
  input  code_t      codes_in [N_ST],
  input  fxp_t       d_algo,
  output logic [4:0] found,
  output logic       done,
  output fxp_t       w [N_ST]
);
  // Is the code vector the given pattern? p_stage: 0-based stage with +1,
  // m_stage: 0-based stage with -1 (or -1 for none); all others 0.
  function automatic logic match(code_t c [N_ST], int p_stage, int m_stage);
    logic ok;
    ok = 1'b1;
    for (int k = 0; k < N_ST; k++) begin
      if (k == p_stage)      ok &= (c[k] == CODE_P1);
      else if (k == m_stage) ok &= (c[k] == CODE_M1);
      else                   ok &= (c[k] == CODE_Z);
    end
    return ok;
  endfunction

  logic [4:0] hit;
  assign hit[4] = match(codes_in, 4, -1);
  assign hit[3] = match(codes_in, 3, -1);
  assign hit[2] = match(codes_in, 2, 3);
  assign hit[1] = match(codes_in, 1, -1);
  assign hit[0] = match(codes_in, 0, 1);

  fxp_t acc [5];
  logic armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found <= '0;
      done  <= 1'b0;
      armed <= 1'b0;
      for (int i = 0; i < 5; i++) acc[i] <= '0;
      for (int k = 0; k < N_ST; k++) w[k] <= FXP_HALF >>> k;
    end else begin
      if (start) begin
        found <= '0;
        done  <= 1'b0;
        armed <= 1'b1;
      end else if (armed) begin
        if (valid_in) begin
          for (int i = 0; i < 5; i++)
            if (hit[i] && !found[i]) begin
              acc[i]   <= d_algo;
              found[i] <= 1'b1;
            end
        end
        if (&found) begin
          w[0] <= acc[0] + acc[1];
          w[1] <= acc[1];
          w[2] <= acc[2] + acc[3];
          w[3] <= acc[3];
          for (int k = 4; k < N_ST; k++) w[k] <= acc[4] >>> (k - 4);
          done  <= 1'b1;
          armed <= 1'b0;
        end
      end
    end
  end
endmodule
