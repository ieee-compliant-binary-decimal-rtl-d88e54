// decimal64 (DPD) operand decoder.
//
// Splits a decimal64 word into sign, 13-bit combination field G and 50-bit
// trailing field T. G12..G8 give the exponent's two leading bits and the
// most significant digit (MSD = 0 G10 G9 G8 when G12 G11 != 11, else
// 1 0 0 G8 with exponent bits G10 G9), or flag infinity (11110) and NaN
// (11111, G7 = 1 for signaling). G7..G0 are the exponent continuation.
// Each of the five declets of T is unpacked by declet_decoder, giving 16
// BCD-8421 digits. Purely combinational. The field layout follows the
// design notes and IEEE 754-2008; for the NaN kind the standard is followed.
module dpd_decoder
  import bdfma_pkg::*;
(
  input  logic [63:0] op,
  output operand_t    dec
);
  logic [12:0] g;
  logic [3:0]  msd;
  logic [9:0]  ex;
  logic [59:0] trail;
  assign g = op[62:50];

  for (genvar i = 0; i < 5; i++) begin : g_decl
    declet_decoder u_decl (.dpd(op[10*i +: 10]), .bcd(trail[12*i +: 12]));
  end

  always_comb begin
    if (g[12:11] != 2'b11) begin
      msd = {1'b0, g[10:8]};
      ex  = {g[12:11], g[7:0]};
    end else begin
      msd = {3'b100, g[8]};
      ex  = {g[10:9], g[7:0]};
    end
    dec         = '0;
    dec.sign    = op[63];
    dec.is_inf  = (g[12:8] == 5'b11110);
    dec.is_nan  = (g[12:8] == 5'b11111);
    dec.is_snan = dec.is_nan && g[7];
    if (dec.is_inf || dec.is_nan) begin
      dec.bexp = '0;
      dec.sig  = '0;
    end else begin
      dec.bexp = {1'b0, ex};
      dec.sig  = {msd, trail};
    end
    dec.is_zero = !(dec.is_inf || dec.is_nan) && ({msd, trail} == 64'd0);
  end
endmodule
