// Shared constants, types and digit-code conversions of the binary/decimal
// fused multiply-add unit.
//
// The unit works on IEEE 754-2008 binary64 and decimal64 (DPD) operands.
// Decimal digits travel in several 4-bit weighted codes: BCD-8421 between
// blocks, 4221 inside the decimal carry-save adder (every 4-bit pattern is a
// valid digit and inverting the bits gives the nine's complement), 5421 to
// double a digit and 5211 to multiply by five or to double a 4221 vector
// with a one-bit shift. The code tables follow the first column of each
// code's entry in the decimal representation table of the design notes.
// Redundant digits use the signed digit set [-6,6] in 4-bit two's
// complement, the same for radix 10 (decimal) and radix 8 (octal groups of
// binary bits).
package bdfma_pkg;

  // Rounding directions (3-bit rounding_mode input).
  typedef enum logic [2:0] {
    RM_NE   = 3'b000,   // nearest, ties to even
    RM_AWAY = 3'b001,   // away from zero
    RM_PINF = 3'b010,   // toward +infinity
    RM_NINF = 3'b011,   // toward -infinity
    RM_ZERO = 3'b100,   // toward zero
    RM_NA   = 3'b101,   // nearest, ties away from zero
    RM_NZ   = 3'b110    // nearest, ties toward zero
  } rnd_mode_e;

  // Format constants.
  localparam int P_DEC      = 16;     // decimal64 precision in digits
  localparam int P_BIN      = 53;     // binary64 precision in bits
  localparam int DEC_BIAS   = 398;
  localparam int DEC_QMIN   = -398;   // smallest quantum exponent
  localparam int DEC_QMAX   = 369;    // largest quantum exponent
  localparam int DEC_EMIN   = -383;   // smallest normal exponent
  localparam int BIN_BIAS   = 1023;
  localparam int BIN_QMIN   = -1074;  // exponent of the subnormal LSB
  localparam int BIN_EMIN   = -1022;

  // Decoded operand.
  typedef struct packed {
    logic        sign;
    logic [10:0] bexp;     // biased exponent (decimal uses the low 10 bits)
    logic [63:0] sig;      // 16 BCD digits or a 53-bit integer significand
    logic        is_zero;
    logic        is_inf;
    logic        is_nan;
    logic        is_snan;
  } operand_t;

  // BCD-8421 -> 4221
  function automatic logic [3:0] bcd_to_4221(input logic [3:0] d);
    case (d)
      4'd0: return 4'b0000; 4'd1: return 4'b0001; 4'd2: return 4'b0010;
      4'd3: return 4'b0011; 4'd4: return 4'b1000; 4'd5: return 4'b1001;
      4'd6: return 4'b1010; 4'd7: return 4'b1011; 4'd8: return 4'b1110;
      default: return 4'b1111;
    endcase
  endfunction

  // value of a 4221 digit, returned in BCD-8421
  function automatic logic [3:0] c4221_to_bcd(input logic [3:0] c);
    return 4'(4 * c[3] + 2 * c[2] + 2 * c[1] + c[0]);
  endfunction

  // 4221 -> 5211 (same digit value)
  function automatic logic [3:0] c4221_to_5211(input logic [3:0] c);
    case (c4221_to_bcd(c))
      4'd0: return 4'b0000; 4'd1: return 4'b0001; 4'd2: return 4'b0100;
      4'd3: return 4'b0101; 4'd4: return 4'b0111; 4'd5: return 4'b1000;
      4'd6: return 4'b1001; 4'd7: return 4'b1100; 4'd8: return 4'b1101;
      default: return 4'b1111;
    endcase
  endfunction

  // value of a 5211 digit, returned in BCD-8421
  function automatic logic [3:0] c5211_to_bcd(input logic [3:0] c);
    return 4'(5 * c[3] + 2 * c[2] + c[1] + c[0]);
  endfunction

  // BCD-8421 -> 5421
  function automatic logic [3:0] bcd_to_5421(input logic [3:0] d);
    case (d)
      4'd0: return 4'b0000; 4'd1: return 4'b0001; 4'd2: return 4'b0010;
      4'd3: return 4'b0011; 4'd4: return 4'b0100; 4'd5: return 4'b1000;
      4'd6: return 4'b1001; 4'd7: return 4'b1010; 4'd8: return 4'b1011;
      default: return 4'b1100;
    endcase
  endfunction

endpackage
