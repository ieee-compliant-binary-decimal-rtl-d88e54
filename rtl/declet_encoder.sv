// BCD to DPD: packs three BCD-8421 digits into one 10-bit densely packed
// decimal declet, the inverse of declet_decoder.
//
// The most significant bit of each digit (large digit 8/9) picks one of the
// eight IEEE 754-2008 layouts. Purely combinational. The design notes only
// name the encoder at the output of the unit; the layout is the standard's.
module declet_encoder (
  input  logic [11:0] bcd,   // {D2, D1, D0}
  output logic [9:0]  dpd
);
  logic [3:0] d2, d1, d0;
  assign d2 = bcd[11:8];
  assign d1 = bcd[7:4];
  assign d0 = bcd[3:0];
  always_comb begin
    unique case ({d2[3], d1[3], d0[3]})
      3'b000: dpd = {d2[2:0], d1[2:0], 1'b0, d0[2:0]};
      3'b001: dpd = {d2[2:0], d1[2:0], 3'b100, d0[0]};
      3'b010: dpd = {d2[2:0], d0[2:1], d1[0], 3'b101, d0[0]};
      3'b011: dpd = {d2[2:0], 2'b10, d1[0], 3'b111, d0[0]};
      3'b100: dpd = {d0[2:1], d2[0], d1[2:0], 3'b110, d0[0]};
      3'b101: dpd = {d1[2:1], d2[0], 2'b01, d1[0], 3'b111, d0[0]};
      3'b110: dpd = {d0[2:1], d2[0], 2'b00, d1[0], 3'b111, d0[0]};
      default: dpd = {2'b00, d2[0], 2'b11, d1[0], 3'b111, d0[0]};
    endcase
  end
endmodule
