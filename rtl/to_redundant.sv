// Conversion of BCD or octal digits into the redundant digit set [-6,6].
//
// Every input digit above 5 is replaced by digit - radix (radix 10 when
// bd = 0, 8 when bd = 1) and passes a transfer of +1 to the next digit;
// each output digit is the intermediate digit plus the transfer from
// below, which stays inside [-6,6], and the top transfer becomes one more
// digit. The transfer into the least significant digit is the carry-in
// cin, which adds the +1 of a ten's / two's complement at no cost.
// Digits are 4-bit two's complement numbers. Binary operands arrive as
// octal digits, one 3-bit group per 4-bit slot. Tables of the design
// notes. Purely combinational, no carry propagation.
module to_redundant #(
  parameter int ND = 101
) (
  input  logic              bd,
  input  logic [4*ND-1:0]   x,
  input  logic              cin,
  output logic [4*ND+3:0]   r
);
  always_comb begin
    logic itd, otd;
    logic [3:0] intd;
    itd = cin;
    for (int i = 0; i < ND; i++) begin
      logic [3:0] d;
      d = x[4*i +: 4];
      otd  = d > 4'd5;
      intd = otd ? (d - (bd ? 4'd8 : 4'd10)) : d;
      r[4*i +: 4] = intd + {3'b000, itd};
      itd = otd;
    end
    r[4*ND +: 4] = {3'b000, itd};
  end
endmodule
