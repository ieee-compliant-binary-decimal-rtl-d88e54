// DPD declet to BCD: unpacks one 10-bit densely packed decimal declet
// (I9..I0) into three BCD-8421 digits {O2,O1,O0}.
//
// The three indicator bits I3, I2, I1 and, for I3=I2=I1=1, the bits I6, I5
// tell which digits are large (8 or 9, stored as one bit) and where the
// remaining bits of the small digits sit. The case table is the one of
// IEEE 754-2008, which the design notes print as their declet decoding
// table. Purely combinational.
module declet_decoder (
  input  logic [9:0]  dpd,
  output logic [11:0] bcd    // {O2, O1, O0}, O0 least significant
);
  always_comb begin
    unique casez ({dpd[3], dpd[2], dpd[1], dpd[6], dpd[5]})
      5'b0????: bcd = {1'b0, dpd[9:7], 1'b0, dpd[6:4], 1'b0, dpd[2:0]};
      5'b100??: bcd = {1'b0, dpd[9:7], 1'b0, dpd[6:4], 3'b100, dpd[0]};
      5'b101??: bcd = {1'b0, dpd[9:7], 3'b100, dpd[4], 1'b0, dpd[6:5], dpd[0]};
      5'b110??: bcd = {3'b100, dpd[7], 1'b0, dpd[6:4], 1'b0, dpd[9:8], dpd[0]};
      5'b11100: bcd = {3'b100, dpd[7], 3'b100, dpd[4], 1'b0, dpd[9:8], dpd[0]};
      5'b11101: bcd = {3'b100, dpd[7], 1'b0, dpd[9:8], dpd[4], 3'b100, dpd[0]};
      5'b11110: bcd = {1'b0, dpd[9:7], 3'b100, dpd[4], 3'b100, dpd[0]};
      default:  bcd = {3'b100, dpd[7], 3'b100, dpd[4], 3'b100, dpd[0]};
    endcase
  end
endmodule
