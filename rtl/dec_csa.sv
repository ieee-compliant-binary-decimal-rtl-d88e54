// Decimal 4:2 carry-save adder in BCD-4221.
//
// Adds four decimal vectors (the multiplier's U, T, H in BCD-8421 and the
// prepared addend already in 4221) into a sum and a carry vector, both
// returned in BCD-8421. U, T, H are recoded to 4221 and added bit-wise by a
// row of full adders (a 3:2 compressor works unchanged on 4221 digits
// because every 4-bit pattern is a digit). The carry row has twice the
// weight: it is doubled by recoding each digit to 5211 and shifting the
// vector one bit left, which reads as 4221 again. A second 3:2 row adds the
// first sum, the doubled carry and the addend; its carry is doubled the
// same way. All arithmetic is modulo 10^NDIG. Structure as in the design
// notes' decimal carry-save adder figure. Purely combinational.
module dec_csa
  import bdfma_pkg::*;
#(
  parameter int NDIG = 101
) (
  input  logic [4*NDIG-1:0] u, t, h,   // BCD-8421
  input  logic [4*NDIG-1:0] c,         // BCD-4221
  output logic [4*NDIG-1:0] s,         // BCD-8421
  output logic [4*NDIG-1:0] cy         // BCD-8421
);
  function automatic logic [4*NDIG-1:0] times2(input logic [4*NDIG-1:0] x);
    logic [4*NDIG-1:0] r;
    for (int i = 0; i < NDIG; i++) r[4*i +: 4] = c4221_to_5211(x[4*i +: 4]);
    return r << 1;
  endfunction

  logic [4*NDIG-1:0] u4, t4, h4, s1, c1, c1x2, s2, c2, c2x2;
  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      u4[4*i +: 4] = bcd_to_4221(u[4*i +: 4]);
      t4[4*i +: 4] = bcd_to_4221(t[4*i +: 4]);
      h4[4*i +: 4] = bcd_to_4221(h[4*i +: 4]);
    end
    s1   = u4 ^ t4 ^ h4;
    c1   = (u4 & t4) | (u4 & h4) | (t4 & h4);
    c1x2 = times2(c1);
    s2   = s1 ^ c1x2 ^ c;
    c2   = (s1 & c1x2) | (s1 & c) | (c1x2 & c);
    c2x2 = times2(c2);
    for (int i = 0; i < NDIG; i++) begin
      s[4*i +: 4]  = c4221_to_bcd(s2[4*i +: 4]);
      cy[4*i +: 4] = c4221_to_bcd(c2x2[4*i +: 4]);
    end
  end
endmodule
