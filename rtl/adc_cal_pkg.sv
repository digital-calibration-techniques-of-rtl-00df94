// Shared types and helpers of the digital calibration logic for a 1.5 bit/stage
// pipelined or algorithmic ADC.
//
// Stage codes. Every 1.5-bit stage resolves its input into one of three codes,
// -1, 0 or +1, carried on two wires {M,L}: +1 = 2'b10, 0 = 2'b01, -1 = 2'b00.
// This is the encoding of the stage outputs used throughout the calibration
// hardware of the design (M is the "MSB" bit that a transition detector
// watches, L the "LSB" bit). 2'b11 never occurs; it is read as 0.
//
// Fixed point. The calibration coefficients alpha (residue gain, ideally 2) and
// beta (reference gain, ideally 1), the residue estimates and the weights are
// signed two's-complement numbers in units of Vref with FRAC = 16 fractional
// bits, as the design keeps alpha and beta to 16 bits for a 12-bit converter
// with four calibrated stages. CW = 24 bits leaves 7 integer bits, enough for
// products of four stage gains (about 2^4).
// The function follows the design; the structure and timing are this
// implementation's own choice.
package adc_cal_pkg;

  typedef logic [1:0] code_t;

  localparam code_t CODE_P1 = 2'b10;
  localparam code_t CODE_Z  = 2'b01;
  localparam code_t CODE_M1 = 2'b00;

  localparam int FRAC = 16;
  localparam int CW   = 24;

  typedef logic signed [CW-1:0] fxp_t;

  localparam fxp_t FXP_ONE  = fxp_t'(1) <<< FRAC;
  localparam fxp_t FXP_TWO  = fxp_t'(2) <<< FRAC;
  localparam fxp_t FXP_HALF = fxp_t'(1) <<< (FRAC - 1);

  // Signed value (-1, 0, +1) of a stage code.
  function automatic logic signed [1:0] code_val(code_t c);
    case (c)
      CODE_P1: return 2'sd1;
      CODE_M1: return -2'sd1;
      default: return 2'sd0;
    endcase
  endfunction

  // Stage code for a value -1, 0, +1.
  function automatic code_t val_code(logic signed [1:0] v);
    if (v > 0) return CODE_P1;
    if (v < 0) return CODE_M1;
    return CODE_Z;
  endfunction

  // w * D for a stage code D: the three-way multiplexer of the output adder.
  function automatic fxp_t code_mul(fxp_t w, code_t c);
    case (c)
      CODE_P1: return w;
      CODE_M1: return -w;
      default: return '0;
    endcase
  endfunction

  // Fixed-point product a*b, truncated to FRAC fractional bits.
  function automatic fxp_t fxp_mul(fxp_t a, fxp_t b);
    logic signed [2*CW-1:0] p;
    p = a * b;
    return fxp_t'(p >>> FRAC);
  endfunction

endpackage
