// Rounding decision cell shared by the binary and decimal rounders.
//
// Inputs describe the discarded part relative to the least significant
// kept position: RB (round bit, the discarded part is at least half when
// the sticky part is non-negative), sticky (anything non-zero below RB) and
// st_sign (that sticky part is negative, i.e. it is subtracted from the
// magnitude). With the result sign and the rounding direction it decides
// incp (add one unit in the last place) or incn (subtract one). The
// equations implement the design notes' truth tables for the seven
// directions; mode 111, which the notes do not list, rounds to nearest
// even. Purely combinational.
module rounding_cell
  import bdfma_pkg::*;
(
  input  logic [2:0] mode,
  input  logic       lsb, rb, sticky, st_sign, sign,
  output logic       incp, incn
);
  logic up_away, dn_zero;
  // discarded part > 0 (away) and discarded part < 0 (toward zero)
  assign up_away = rb | (sticky & ~st_sign);
  assign dn_zero = ~rb & sticky & st_sign;
  always_comb begin
    incp = 1'b0;
    incn = 1'b0;
    case (rnd_mode_e'(mode))
      RM_AWAY: incp = up_away;
      RM_PINF: begin incp = ~sign & up_away; incn = sign & dn_zero; end
      RM_NINF: begin incp = sign & up_away;  incn = ~sign & dn_zero; end
      RM_ZERO: incn = dn_zero;
      RM_NA:   incp = rb & ~(sticky & st_sign);
      RM_NZ:   incp = rb & sticky & ~st_sign;
      default: incp = rb & (sticky ? ~st_sign : lsb);     // ties to even
    endcase
  end
endmodule
