// Time alignment of the stage codes (the D flip-flop array behind the
// pipeline).
//
// Stage k of the pipeline converts a sample one step after stage k-1, so its
// code appears LAT*(k-1) steps later. Each stage code goes through a chain of
// LAT*(N_ST-k)+1 registers (the last stage through one, so all outputs are
// registered); at the output all N_ST codes belong to the same sample, one
// step after the last stage resolved it. The design only
// names the flip-flop array; one LAT per stage is this implementation's
// model of the stage-to-stage delay.
//
// Interface: `en` advances all chains (one conversion step); `valid_out`
// rises once the deepest chain has been filled.
module code_align
  import adc_cal_pkg::*;
#(
  parameter int N_ST = 12,
  parameter int LAT  = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  code_t codes_in  [N_ST],   // as produced by the stages
  output code_t codes_out [N_ST],   // aligned to one sample
  output logic  valid_out
);
  localparam int DMAX = LAT * (N_ST - 1);
  localparam int CW_  = $clog2(DMAX + 2);

  // q[k][i] holds the code stage k showed i+1 enabled steps ago.
  code_t q [N_ST][DMAX + 1];
  logic [CW_-1:0] fill;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_ST; k++)
        for (int i = 0; i <= DMAX; i++) q[k][i] <= CODE_Z;
      fill <= '0;
    end else if (en) begin
      for (int k = 0; k < N_ST; k++) begin
        q[k][0] <= codes_in[k];
        for (int i = 1; i <= DMAX; i++) q[k][i] <= q[k][i-1];
      end
      if (fill != CW_'(DMAX + 1)) fill <= fill + 1'b1;
    end
  end

  always_comb begin
    for (int k = 0; k < N_ST; k++) codes_out[k] = q[k][LAT * (N_ST - 1 - k)];
  end
  assign valid_out = (fill == CW_'(DMAX + 1));
endmodule
