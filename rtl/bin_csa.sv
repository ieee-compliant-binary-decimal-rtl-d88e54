// Binary 4:2 carry-save adder.
//
// Reduces the multiplier's three vectors B1, B2, B3 and the prepared addend
// to a sum and a carry vector with two rows of full adders, modulo 2^NB.
// The design notes name a 4:2 binary CSA at this point; the two-row
// structure is this design's. Purely combinational.
module bin_csa #(
  parameter int NB = 273
) (
  input  logic [NB-1:0] b1, b2, b3, c,
  output logic [NB-1:0] s, cy
);
  logic [NB-1:0] s1, c1;
  assign s1 = b1 ^ b2 ^ b3;
  assign c1 = ((b1 & b2) | (b1 & b3) | (b2 & b3)) << 1;
  assign s  = s1 ^ c1 ^ c;
  assign cy = ((s1 & c1) | (s1 & c) | (c1 & c)) << 1;
endmodule
