// Addend preparation: exponent difference, complement and alignment of C.
//
// Works beside the multiplier. The product M is always placed at a fixed
// position of a wide window (digit 34 of 101 decimal digits, bit 57 of 273
// binary bits); this block computes the product exponent
// ExpM = ExpA + ExpB - bias and from ExpC - ExpM the position of C's least
// significant digit/bit in the same window, and the exponent qwin of the
// window's least significant position.
// Decimal: C sits at 34 + (ExpC - ExpM), limited to 0..84. Beyond the
// limits the smaller operand can only act as a sticky bit, so the limit
// only rescales it (qwin follows C when the upper limit is hit). A zero
// product places C relative to the preferred exponent instead
// (the zero-multiplication exceptional path), and a zero C leaves the
// product window alone. qpref = min(ExpM, ExpC) is the preferred exponent.
// Binary: C sits at 57 + (ExpC - ExpM), limited to 0..219, exponents taken
// of the significand LSBs (biased exponent - 1075).
// C is recoded to BCD-4221 in the decimal window. With effective
// subtraction (eop) every bit of the window is inverted, which is the
// nine's (one's) complement of the whole window; the +1 that completes the
// ten's (two's) complement is added later as the carry-in of the
// conversion to redundant form.
// Follows the design notes for ExpM, eop, the 4221 recoding, the inversion
// and the right/left shifter; the window size and shift limits are this
// design's (the notes limit the shifts to 2p+1 right and 3p+1 / p+1 left
// and then narrow the window in a selection stage). Purely combinational.
module addend_prep
  import bdfma_pkg::*;
(
  input  logic               bd,
  input  operand_t           a, b, c,     // decoded operands
  input  logic               eop,         // effective subtraction
  output logic [403:0]       dvec,        // 101 digits, BCD-4221, complemented
  output logic [272:0]       bvec,        // 273 bits, complemented
  output logic signed [13:0] qwin,        // exponent of window position 0
  output logic signed [13:0] qpref,       // decimal preferred exponent
  output logic signed [13:0] expm         // product exponent (diagnostic)
);
  localparam int DOFF = 34, DMAX = 84;
  localparam int BOFF = 57, BMAX = 219;

  logic zero_m;
  int   em, ec, d, pos;
  assign zero_m = a.is_zero | b.is_zero;

  always_comb begin
    if (!bd) begin
      em = int'(a.bexp) + int'(b.bexp) - 2 * DEC_BIAS;
      ec = int'(c.bexp) - DEC_BIAS;
    end else begin
      em = int'(a.bexp) + int'(b.bexp) - 2 * (BIN_BIAS + 52);
      ec = int'(c.bexp) - (BIN_BIAS + 52);
    end
    d = ec - em;
    if (!bd) begin
      if (zero_m) begin
        pos = (d < 0) ? 0 : ((d > DMAX) ? DMAX : d);
        qwin = 14'(ec - pos);
      end else if (c.is_zero) begin
        pos = DOFF;
        qwin = 14'(em - DOFF);
      end else if (d > DMAX - DOFF) begin
        pos = DMAX;
        qwin = 14'(ec - DMAX);
      end else if (d < -DOFF) begin
        pos = 0;
        qwin = 14'(em - DOFF);
      end else begin
        pos = DOFF + d;
        qwin = 14'(em - DOFF);
      end
    end else begin
      if (zero_m) begin
        pos = 0;
        qwin = 14'(ec);
      end else if (c.is_zero) begin
        pos = BOFF;
        qwin = 14'(em - BOFF);
      end else if (d > BMAX - BOFF) begin
        pos = BMAX;
        qwin = 14'(ec - BMAX);
      end else if (d < -BOFF) begin
        pos = 0;
        qwin = 14'(em - BOFF);
      end else begin
        pos = BOFF + d;
        qwin = 14'(em - BOFF);
      end
    end
    qpref = 14'((em < ec) ? em : ec);
    expm  = 14'(em);
  end

  // complementer + right/left shifter
  logic [403:0] c4221;
  always_comb begin
    c4221 = '0;
    for (int i = 0; i < 16; i++) c4221[4*i +: 4] = bcd_to_4221(c.sig[4*i +: 4]);
    dvec = (c4221 << (4 * pos)) ^ {404{eop}};
    bvec = ({220'd0, c.sig[52:0]} << pos) ^ {273{eop}};
  end
  logic unused_fields;
  assign unused_fields = ^{a, b, c};
endmodule
