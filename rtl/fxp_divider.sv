// Sequential signed fixed-point divider: q = a / b, both operands and the
// result in two's complement with F fractional bits.
//
// Every calibration engine of the design has to divide by stage gains (the
// alpha coefficients): the residue estimates divide a partial sum by alpha, the
// output weights are beta over a product of alphas. The design does not say how
// the division is done; this is the simplest hardware for it, a restoring
// divider that produces one quotient bit per clock on the magnitudes and fixes
// the sign at the end.
//
// Interface: pulse `start` with `a` and `b` valid; the operands are captured.
// `busy` is high while dividing; `done` pulses for one clock when `q` is valid,
// W+F+1 clocks after `start`. `q` holds until the next `start`. A quotient
// outside the W-bit range saturates and sets `ovf`, as does b = 0.
// The function follows the design; the structure and timing are this
// implementation's own choice.
module fxp_divider #(
  parameter int W = 24,   // operand and result width
  parameter int F = 16    // fractional bits
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] q,
  output logic                ovf
);
  localparam int NW = W + F;               // dividend and quotient width
  localparam int CNTW = $clog2(NW + 1);

  logic [NW-1:0] num;                      // shifts out the dividend, shifts in quotient bits
  logic [W:0]    rem;                      // partial remainder
  logic [W-1:0]  den;
  logic          neg;
  logic          dz;
  logic [CNTW-1:0] cnt;

  logic [W:0]    rem_sh;
  logic [W:0]    rem_sub;

  assign rem_sh  = {rem[W-1:0], num[NW-1]};
  assign rem_sub = rem_sh - {1'b0, den};

  logic [W-1:0] mag_a, mag_b;
  assign mag_a = a[W-1] ? W'(-a) : W'(a);
  assign mag_b = b[W-1] ? W'(-b) : W'(b);

  // Result conversion once the magnitude quotient is complete.
  localparam logic [NW-1:0] MAXPOS = NW'({1'b0, {(W-1){1'b1}}});
  logic [NW-1:0] qmag;
  assign qmag = num;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num  <= '0;
      rem  <= '0;
      den  <= '0;
      neg  <= 1'b0;
      dz   <= 1'b0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      q    <= '0;
      ovf  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        num  <= {mag_a, {F{1'b0}}};
        rem  <= '0;
        den  <= mag_b;
        neg  <= a[W-1] ^ b[W-1];
        dz   <= (b == '0);
        cnt  <= CNTW'(NW);
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt != '0) begin
          if (!rem_sub[W]) begin
            rem <= rem_sub;
            num <= {num[NW-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            num <= {num[NW-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (dz || qmag > MAXPOS) begin
            ovf <= 1'b1;
            q   <= neg ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
          end else begin
            ovf <= 1'b0;
            q   <= neg ? -$signed(qmag[W-1:0]) : $signed(qmag[W-1:0]);
          end
        end
      end
    end
  end
endmodule
