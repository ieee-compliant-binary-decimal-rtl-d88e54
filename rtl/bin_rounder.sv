// Binary rounder working on the six least significant bits.
//
// lsbs[5:0] are the lowest bits of the not yet finely shifted result; the
// fine shift (0, 1 or 2 bits) decides which of them is the LSB, which is
// the round bit and which join the sticky (table of the design notes):
//   fine 0: LSB lsbs[3], RB lsbs[2], sticky stin|lsbs[1]|lsbs[0]
//   fine 1: LSB lsbs[2], RB lsbs[1], sticky stin|lsbs[0]
//   fine 2: LSB lsbs[1], RB lsbs[0], sticky stin
// and the sticky sign is kept only when the discarded bits above the input
// sticky are zero. rounding_cell decides incp / incn; in parallel the kept
// field lsbs[5:i] (i = 3 - fine) is incremented and decremented and the
// right one is chosen. cout / bout tell the part above lsbs[5] to add or
// subtract one (the carry-select pick of the converter). Bits below the
// LSB come out zero. Purely combinational.
module bin_rounder (
  input  logic [5:0] lsbs,
  input  logic [1:0] fine,
  input  logic       stin, st_sign, sign,
  input  logic [2:0] mode,
  output logic [5:0] lsbs_out,
  output logic       cout, bout, inexact
);
  logic lsb, rb, st, ses, incp, incn;
  logic [6:0] fld, fld_p, fld_n;     // kept field, aligned at bit 0
  logic [2:0] i;
  always_comb begin
    unique case (fine)
      2'd1:    begin lsb = lsbs[2]; rb = lsbs[1]; st = stin | lsbs[0];
                     ses = ~lsbs[0] & st_sign; end
      2'd2:    begin lsb = lsbs[1]; rb = lsbs[0]; st = stin;
                     ses = st_sign; end
      default: begin lsb = lsbs[3]; rb = lsbs[2]; st = stin | lsbs[1] | lsbs[0];
                     ses = ~(lsbs[1] | lsbs[0]) & st_sign; end
    endcase
  end
  rounding_cell u_cell (.mode, .lsb, .rb, .sticky(st), .st_sign(ses), .sign,
                        .incp, .incn);
  always_comb begin
    i     = 3'd3 - {1'b0, fine};
    fld   = {1'b0, lsbs} >> i;
    fld_p = fld + 7'd1;
    fld_n = fld - 7'd1;
    if (incp)      lsbs_out = 6'(fld_p << i);
    else if (incn) lsbs_out = 6'(fld_n << i);
    else           lsbs_out = 6'(fld << i);
    cout    = incp & fld_p[6 - i];
    bout    = incn & (fld == 7'd0);
    inexact = rb | st;
  end
endmodule
