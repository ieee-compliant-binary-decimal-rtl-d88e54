// Shared binary/decimal significand multiplier.
//
// Decimal (bd = 0): A and B are 16 BCD digits. Each multiplier digit is SD
// radix-5 recoded (dec_recoder) into an upper digit selecting 0, 5A or 10A
// and a signed lower digit selecting 0, +-A or +-2A, so 32 partial products
// of up to 17 digits are formed. The multiples need no carry propagation:
// 2A is each digit recoded to 5421 and the vector shifted left one bit, 5A
// is each digit recoded to 4221, the vector shifted left three bits, read
// as 5211 and recoded back to BCD, 10A is a one-digit shift.
// Binary (bd = 1): A and B are 53-bit integers. B, extended with three zero
// bits, is cut into 14 hexadecimal groups, each SD radix-4 recoded
// (bin_recoder) into an upper digit selecting 0, +-4A, +-8A and a lower
// digit selecting 0, +-A, +-2A: 28 partial products, kept as hexadecimal
// digits so that the same column hardware serves both radices.
// A negative partial product is its digit-wise nine's (fifteen's) complement
// extended with nines (F digits) up to the top column, plus a +1 increment
// in its least significant column. Every one of the 33 columns is then
// summed to a 9-bit count. In decimal the count is split into units, tens
// and hundreds (vectors U, T, H); in binary into its 4-bit groups (vectors
// B1, B2, B3). v1 + v2 + v3 equals the product modulo R^33 (R = 10 or 16);
// kcarry is the carry out of that sum beyond the 33rd digit (0..2), which
// the caller subtracts when it extends the vectors (the sign extension of
// the product).
// Follows the design notes for the recoding, the multiples and the
// column-wise reduction. This design's own choices: the plain nines/ones
// sign extension instead of the offline-reduced partial-product array, and
// the column adder written as a sum rather than a CSA tree.
// Purely combinational.
module bd_multiplier
  import bdfma_pkg::*;
#(
  parameter int NCOL = 33              // columns (digits) of the product array
) (
  input  logic              bd,        // 1 binary, 0 decimal
  input  logic [63:0]       a,         // multiplicand
  input  logic [63:0]       b,         // multiplier
  output logic [4*NCOL-1:0] v1,        // U  / B1
  output logic [4*NCOL-1:0] v2,        // T  / B2
  output logic [4*NCOL-1:0] v3,        // H  / B3
  output logic [1:0]        kcarry
);
  localparam int NPP = 32;

  // ---------------- decimal multiples (17 digits each) ----------------
  logic [67:0] dA1, dA2, dA5, dA10, t5421, t4221;
  logic [71:0] sh3;
  always_comb begin
    for (int i = 0; i < 16; i++) begin
      t5421[4*i +: 4] = bcd_to_5421(a[4*i +: 4]);
      t4221[4*i +: 4] = bcd_to_4221(a[4*i +: 4]);
    end
    t5421[67:64] = '0;
    t4221[67:64] = '0;
    dA1  = {4'd0, a};
    dA2  = t5421 << 1;             // 5421 shifted one bit reads as 2A in BCD
    sh3  = {4'd0, t4221} << 3;     // 4221 shifted three bits reads as 5A in 5211
    for (int i = 0; i < 17; i++) dA5[4*i +: 4] = c5211_to_bcd(sh3[4*i +: 4]);
    dA10 = {a, 4'd0};
  end

  // ---------------- recoding ----------------
  logic [15:0] d_y1u, d_y2u, d_yp1, d_yp2, d_ym1, d_ym2, d_ys;
  for (genvar i = 0; i < 16; i++) begin : g_drec
    dec_recoder u_rec (.y(b[4*i +: 4]), .y1u(d_y1u[i]), .y2u(d_y2u[i]),
                       .yp1(d_yp1[i]), .yp2(d_yp2[i]), .ym1(d_ym1[i]),
                       .ym2(d_ym2[i]), .ys(d_ys[i]));
  end
  logic [55:0] bb;
  assign bb = {3'b000, b[52:0]};
  logic [13:0] b_lp1, b_lp2, b_lm1, b_lm2, b_ls, b_up4, b_up8, b_um4, b_um8, b_us, b_co;
  for (genvar i = 0; i < 14; i++) begin : g_brec
    bin_recoder u_rec (.y(bb[4*i +: 4]), .cin(i == 0 ? 1'b0 : bb[4*i-1]),
                       .lp1(b_lp1[i]), .lp2(b_lp2[i]), .lm1(b_lm1[i]),
                       .lm2(b_lm2[i]), .lsgn(b_ls[i]), .up4(b_up4[i]),
                       .up8(b_up8[i]), .um4(b_um4[i]), .um8(b_um8[i]),
                       .usgn(b_us[i]), .cout(b_co[i]));
  end

  // ---------------- partial products and column sums ----------------
  logic [67:0] mag   [NPP];   // selected multiple (17 digits), unshifted
  logic        neg   [NPP];
  logic [5:0]  offs  [NPP];   // digit offset of the partial product
  logic [8:0]  csum  [NCOL];
  logic [55:0] bA;
  assign bA = {3'b000, a[52:0]};

  always_comb begin
    for (int k = 0; k < NPP; k++) begin
      mag[k] = '0; neg[k] = 1'b0; offs[k] = '0;
    end
    if (!bd) begin
      for (int i = 0; i < 16; i++) begin
        // upper partial product: 0, 5A, 10A (never negative)
        mag[2*i]   = d_y1u[i] ? dA5 : (d_y2u[i] ? dA10 : '0);
        offs[2*i]  = 6'(i);
        // lower partial product: 0, +-A, +-2A
        mag[2*i+1] = (d_yp1[i] | d_ym1[i]) ? dA1 : ((d_yp2[i] | d_ym2[i]) ? dA2 : '0);
        neg[2*i+1] = d_ys[i];
        offs[2*i+1] = 6'(i);
      end
    end else begin
      for (int i = 0; i < 14; i++) begin
        mag[2*i]    = {12'd0, b_up8[i] | b_um8[i] ? (bA << 3) : ((b_up4[i] | b_um4[i]) ? (bA << 2) : 56'd0)};
        neg[2*i]    = b_us[i];
        offs[2*i]   = 6'(i);
        mag[2*i+1]  = {12'd0, (b_lp2[i] | b_lm2[i]) ? (bA << 1) : ((b_lp1[i] | b_lm1[i]) ? bA : 56'd0)};
        neg[2*i+1]  = b_ls[i];
        offs[2*i+1] = 6'(i);
      end
    end
    for (int j = 0; j < NCOL; j++) begin
      csum[j] = '0;
      for (int k = 0; k < NPP; k++) begin
        logic [3:0] dg;
        int         idx;
        idx = j - int'(offs[k]);
        dg  = 4'd0;
        if (idx >= 0 && idx < 17) dg = mag[k][4*idx +: 4];
        if (neg[k] && idx >= 0) dg = (bd ? 4'd15 : 4'd9) - dg;   // complement + extension
        csum[j] = csum[j] + 9'(dg);
        if (neg[k] && idx == 0) csum[j] = csum[j] + 9'd1;         // +1 increment
      end
    end
  end

  // ---------------- split the column counts ----------------
  always_comb begin
    v1 = '0; v2 = '0; v3 = '0;
    for (int j = 0; j < NCOL; j++) begin
      if (!bd) begin
        v1[4*j +: 4] = 4'(int'(csum[j]) % 10);
        if (j + 1 < NCOL) v2[4*(j+1) +: 4] = 4'((int'(csum[j]) / 10) % 10);
        if (j + 2 < NCOL) v3[4*(j+2) +: 4] = 4'(int'(csum[j]) / 100);
      end else begin
        v1[4*j +: 4] = csum[j][3:0];
        if (j + 1 < NCOL) v2[4*(j+1) +: 4] = csum[j][7:4];
        if (j + 2 < NCOL) v3[4*(j+2) +: 4] = {3'b000, csum[j][8]};
      end
    end
  end

  // carry of v1 + v2 + v3 out of the top column
  always_comb begin
    logic [5:0] t;
    logic [1:0] c;
    c = '0;
    for (int j = 0; j < NCOL; j++) begin
      t = 6'(v1[4*j +: 4]) + 6'(v2[4*j +: 4]) + 6'(v3[4*j +: 4]) + 6'(c);
      if (!bd) c = 2'(t / 10);
      else     c = 2'(t >> 4);
    end
    kcarry = c;
  end

  logic unused;
  assign unused = ^b_co;
endmodule
