// Calibration codes of a 1 bit/stage algorithmic ADC for the jump-based
// (segment) correction.
//
// An algorithmic ADC is one MX2 stage used N_BITS times in a loop, so one
// forced conversion yields the codes of all "stages" at once. With the input
// at 0 V and the first bit forced to 1, the converter produces the remaining
// N_BITS-1 bits; call the N_BITS-bit result R1. For j = 1..NCAL, R_j is the
// top N_BITS-j+1 bits of R1 and R_j' its bit-wise complement; then
//
//   S_j = R_j - R_j'
//
// is the jump height that stage j would show in a pipeline (a stage gain
// below 2 gives a positive S_j, an ideal gain gives S_j = 1, the one-code
// step of an ideal converter). The procedure and the formula follow the
// design. NCAL (how many codes are derived) is left open by it ("as many bits
// as is desired"); 3 matches its pipelined examples.
//
// Interface: pulse `start`. The block raises `input_zero` (loop input on
// 0 V) and `force_msb` (the first decision forced to 1) and counts the
// converter's bits, one per `bit_valid`, MSB first: the first accepted bit is
// the forced one and is taken as 1 whatever `bit_in` says. `force_msb` falls
// after it; `input_zero` stays high until the last bit. One clock after the
// N_BITS-th bit, `s` holds S_1..S_NCAL and `s_done` is high (until the next
// `start`). The handshake and timing are this implementation's own.
module algo_s_extract
  import adc_cal_pkg::*;
#(
  parameter int N_BITS = 9,   // resolution of the algorithmic ADC
  parameter int NCAL   = 3    // number of codes S_j derived
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic                   bit_valid,
  input  logic                   bit_in,
  output logic                   input_zero,   // loop input switched to 0 V
  output logic                   force_msb,    // first decision forced to 1
  output logic                   busy,
  output logic signed [N_BITS+1:0] s [NCAL],   // S_1..S_NCAL
  output logic                   s_done
);
  localparam int CW_ = $clog2(N_BITS + 1);
  localparam int SW  = N_BITS + 2;

  logic [N_BITS-1:0] r1;
  logic [CW_-1:0]    cnt;   // bits collected

  // S_j from the collected word: R_j = r1 >> (j-1), width N_BITS-j+1.
  function automatic logic signed [SW-1:0] s_of(logic [N_BITS-1:0] r, int j);
    logic [N_BITS-1:0] rj, mask, rc;
    mask = {N_BITS{1'b1}} >> (j - 1);
    rj   = r >> (j - 1);
    rc   = ~rj & mask;
    return $signed({2'b00, rj}) - $signed({2'b00, rc});
  endfunction

  assign force_msb  = busy && (cnt == '0);
  assign input_zero = busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      cnt    <= '0;
      r1     <= '0;
      s_done <= 1'b0;
      for (int j = 0; j < NCAL; j++) s[j] <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      cnt    <= '0;
      r1     <= '0;
      s_done <= 1'b0;
    end else if (busy && bit_valid) begin
      r1  <= {r1[N_BITS-2:0], (cnt == '0) ? 1'b1 : bit_in};
      cnt <= cnt + 1'b1;
      if (cnt == CW_'(N_BITS - 1)) busy <= 1'b0;
    end else if (!busy && cnt == CW_'(N_BITS) && !s_done) begin
      for (int j = 0; j < NCAL; j++) s[j] <= s_of(r1, j + 1);
      s_done <= 1'b1;
    end
  end
endmodule
