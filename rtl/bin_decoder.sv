// binary64 operand decoder.
//
// Splits a binary64 word into its sign, its 11-bit biased exponent and its
// 52-bit trailing significand, prefixes the hidden one for normal numbers
// and flags zero, infinity and (signaling) NaN. A subnormal number is
// reported with biased exponent 1 and no hidden one, so that the significand
// times 2^(bexp-1075) is its value in every finite case. Purely
// combinational; the field split follows the design notes, the subnormal
// exponent convention is this design's.
module bin_decoder
  import bdfma_pkg::*;
(
  input  logic [63:0] op,
  output operand_t    dec
);
  logic [10:0] e;
  logic [51:0] t;
  assign e = op[62:52];
  assign t = op[51:0];
  always_comb begin
    dec         = '0;
    dec.sign    = op[63];
    dec.bexp    = (e == 11'd0) ? 11'd1 : e;
    dec.sig     = {11'd0, (e != 11'd0), t};
    dec.is_zero = (e == 11'd0) && (t == 52'd0);
    dec.is_inf  = (e == 11'h7ff) && (t == 52'd0);
    dec.is_nan  = (e == 11'h7ff) && (t != 52'd0);
    dec.is_snan = dec.is_nan && !t[51];
    if (e == 11'h7ff) dec.sig = '0;
  end
endmodule
