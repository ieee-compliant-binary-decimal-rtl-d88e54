// decimal64 (DPD) result encoder.
//
// Packs a sign, a 10-bit biased exponent (0..767) and 16 BCD digits into a
// decimal64 word: the MSD and the exponent's two leading bits form G12..G8,
// the exponent's low eight bits G7..G0, and the 15 trailing digits are
// packed three at a time by declet_encoder. Purely combinational. The
// design notes name this block at the output of the unit; the layout is the
// IEEE 754-2008 one.
module dpd_encoder (
  input  logic        sign,
  input  logic [9:0]  bexp,
  input  logic [63:0] sig,    // 16 BCD digits
  output logic [63:0] res
);
  logic [3:0]  msd;
  logic [49:0] t;
  logic [4:0]  comb;
  assign msd = sig[63:60];
  for (genvar i = 0; i < 5; i++) begin : g_decl
    declet_encoder u_enc (.bcd(sig[12*i +: 12]), .dpd(t[10*i +: 10]));
  end
  always_comb begin
    if (msd[3]) comb = {2'b11, bexp[9:8], msd[0]};
    else        comb = {bexp[9:8], msd[2:0]};
  end
  assign res = {sign, comb, bexp[7:0], t};
endmodule
