// Combined binary64 / decimal64 fused multiply-add unit.
//
// result = round(A * B + C) (or A * B - C when op = 1) with a single
// rounding, or, selected by opsel, the sum A +/- C or the product A * B,
// for IEEE 754-2008 binary64 operands when bd = 1 and decimal64
// (DPD) operands when bd = 0. The expensive parts, the significand
// multiplier and the final adder, are one piece of hardware for both
// radices:
//  1. decode the three operands (bin_decoder / dpd_decoder);
//  2. multiply the significands (bd_multiplier: SD radix-5 / radix-4
//     recoding, column-wise reduction into three vectors) while the addend
//     is complemented for effective subtraction and aligned
//     (addend_prep);
//  3. place the three product vectors in a wide window (101 digits / 273
//     bits, the product's sign extension from kcarry above it) and reduce
//     the four vectors to two with a 4:2 carry-save adder (dec_csa or
//     bin_csa);
//  4. convert both to the redundant digit set [-6,6] (to_redundant, one
//     octal digit per slot in binary) and add them carry-free
//     (redundant_adder);
//  5. find the intermediate sign from a first conversion of the sum
//     (redundant_converter, then dec_sign_detector in decimal), negate the
//     redundant sum digit by digit when negative (redundant_complementer)
//     and convert the magnitude back to BCD / binary;
//  6. count leading zeros (lzd_bin on the decimal digits, lzd_base3 on the
//     binary bits), choose the rounding position from the precision, the
//     decimal preferred exponent and the underflow limit, shift, and round
//     (dec_rounder / bin_rounder around rounding_cell, sticky_detector);
//  7. compute sign and exponent, handle overflow (with the decimal clamp
//     of large exponents), underflow and inexact, encode (dpd_encoder /
//     binary packing), and let special_values override NaN / infinity
//     cases.
// Interface: purely combinational, no clock; every output is a function of
// the current inputs (one operation per evaluation). flags = {invalid,
// division by zero (always 0), overflow, underflow, inexact}.
// Follows the design notes for the block structure and for every block's
// function; this design's own choices are the wide window in place of the
// notes' width-selection stage (so the adder is 103 digits wide, not 50),
// leading-zero detection after the addition instead of anticipation from
// the carry-save vectors, and rounding after the conversion of the
// magnitude instead of while the sum is still redundant.
module bd_fma
  import bdfma_pkg::*;
#(
  parameter int ND = 101     // digits of the operating window (decimal digits)
) (
  input  logic        bd,
  input  logic        op,
  input  logic [1:0]  opsel,      // 00 / 11: A*B +/- C, 01: A +/- C, 10: A*B
  input  logic [2:0]  rnd_mode,
  input  logic [63:0] opa, opb, opc,
  output logic [63:0] result,
  output logic [4:0]  flags
);
  localparam int NB   = 273;         // binary window bits (91 octal digits)
  localparam int NOCT = NB / 3;
  localparam int DOFF = 34;          // product position, decimal digits
  localparam int BOFF = 57;          // product position, binary bits

  // ---------------- 0. operation select ----------------
  // Addition multiplies A by one; multiplication adds a zero that carries
  // the product's sign and the largest exponent, so that neither the
  // preferred exponent nor the sign of an exact zero is disturbed.
  logic [63:0] opb_sel, opc_sel;
  always_comb begin
    opb_sel = opb;
    opc_sel = opc;
    if (opsel == 2'b01) opb_sel = bd ? 64'h3ff0_0000_0000_0000 : 64'h2238_0000_0000_0001;
    if (opsel == 2'b10) opc_sel = bd ? {opa[63] ^ opb[63] ^ op, 63'd0}
                                : {opa[63] ^ opb[63] ^ op, 63'h43fc_0000_0000_0000};
  end

  // ---------------- 1. decoding ----------------
  operand_t da, db, dc, ba, bb, bc, a, b, c;
  dpd_decoder u_dda (.op(opa), .dec(da));
  dpd_decoder u_ddb (.op(opb_sel), .dec(db));
  dpd_decoder u_ddc (.op(opc_sel), .dec(dc));
  bin_decoder u_bda (.op(opa), .dec(ba));
  bin_decoder u_bdb (.op(opb_sel), .dec(bb));
  bin_decoder u_bdc (.op(opc_sel), .dec(bc));
  assign a = bd ? ba : da;
  assign b = bd ? bb : db;
  assign c = bd ? bc : dc;

  logic sm, sceff, eop;
  assign sm    = a.sign ^ b.sign;
  assign sceff = c.sign ^ op;
  assign eop   = sm ^ sceff;

  // ---------------- 2. multiplier and addend ----------------
  logic [131:0] v1, v2, v3;
  logic [1:0]   kcarry;
  bd_multiplier u_mul (.bd, .a(a.sig), .b(b.sig), .v1, .v2, .v3, .kcarry);

  logic [4*ND-1:0]   dvec;
  logic [NB-1:0]     bvec;
  logic signed [13:0] qwin, qpref, expm;
  addend_prep u_add (.bd, .a, .b, .c, .eop, .dvec, .bvec, .qwin, .qpref, .expm);

  // ---------------- 3. window placement and CSA ----------------
  logic [4*ND-1:0] du, dt, dh, ds, dcy;
  logic [NB-1:0]   b1, b2, b3, bs, bcy;
  always_comb begin
    du = '0; dt = '0; dh = '0;
    du[4*DOFF +: 132] = v1;
    dt[4*DOFF +: 132] = v2;
    dh[4*DOFF +: 132] = v3;
    // sign extension of the product: subtract kcarry * 10^(DOFF+33)
    for (int i = DOFF + 33; i < ND; i++)
      dh[4*i +: 4] = (kcarry == 2'd0) ? 4'd0 :
                     ((kcarry == 2'd2 && i == DOFF + 33) ? 4'd8 : 4'd9);
    b1 = '0; b2 = '0; b3 = '0;
    b1[BOFF +: 132] = v1;
    b2[BOFF +: 132] = v2;
    b3[BOFF +: 132] = v3;
    for (int i = BOFF + 132; i < NB; i++)
      b3[i] = (kcarry == 2'd0) ? 1'b0 : !(kcarry == 2'd2 && i == BOFF + 132);
  end
  dec_csa #(.NDIG(ND)) u_dcsa (.u(du), .t(dt), .h(dh), .c(dvec), .s(ds), .cy(dcy));
  bin_csa #(.NB(NB))   u_bcsa (.b1, .b2, .b3, .c(bvec), .s(bs), .cy(bcy));

  // ---------------- 4. redundant addition ----------------
  logic [4*ND-1:0] xs, xcy;
  always_comb begin
    if (bd) begin
      xs = '0; xcy = '0;
      for (int i = 0; i < NOCT; i++) begin
        xs[4*i +: 4] = {1'b0, bs[3*i +: 3]};
        xcy[4*i +: 4] = {1'b0, bcy[3*i +: 3]};
      end
    end else begin
      xs = ds;
      xcy = dcy;
    end
  end
  logic [4*ND+3:0] rs, rc;
  logic [4*ND+7:0] rsum, rneg;
  to_redundant #(.ND(ND)) u_tr_s (.bd, .x(xs), .cin(eop), .r(rs));
  to_redundant #(.ND(ND)) u_tr_c (.bd, .x(xcy), .cin(1'b0), .r(rc));
  redundant_adder #(.ND(ND+1)) u_radd (.bd, .x(rs), .y(rc), .cin(1'b0), .s(rsum));

  // ---------------- 5. intermediate sign, complement, conversion ----------------
  logic [4*ND+7:0] conv1, conv2;
  logic            bout1, bout2, dgt, deq, neg;
  logic [4*ND-1:0] half_m1;
  redundant_converter #(.ND(ND+2)) u_conv1 (.bd, .x(rsum), .bsel(1'b0), .y(conv1), .bout(bout1));
  always_comb begin
    half_m1 = '1;                                   // 4999...9 in BCD
    for (int i = 0; i < ND; i++) half_m1[4*i +: 4] = 4'd9;
    half_m1[4*(ND-1) +: 4] = 4'd4;
  end
  dec_sign_detector #(.NDIG(ND)) u_sign (.a(conv1[4*ND-1:0]), .b(half_m1), .gt(dgt), .eq(deq));
  assign neg = bd ? conv1[4*(NOCT-1)+2] : dgt;
  redundant_complementer #(.ND(ND+2)) u_cmp (.neg, .x(rsum), .y(rneg));
  redundant_converter #(.ND(ND+2)) u_conv2 (.bd, .x(rneg), .bsel(1'b0), .y(conv2), .bout(bout2));

  logic [4*ND-1:0] dmag;
  logic [NB-1:0]   bmag;
  logic            magzero;
  always_comb begin
    dmag = conv2[4*ND-1:0];
    for (int i = 0; i < NOCT; i++) bmag[3*i +: 3] = conv2[4*i +: 3];
    magzero = bd ? (bmag == '0) : (dmag == '0);
  end

  // ---------------- 6. leading zeros, rounding position, rounding ----------------
  logic [127:0] dnz;
  logic [6:0]   dlzc;
  logic         dlzv;
  always_comb begin
    dnz = '0;
    for (int i = 0; i < ND; i++) dnz[128 - ND + i] = (dmag[4*i +: 4] != 4'd0);
    dnz[127 - ND] = 1'b1;                          // stop at ND when all zero
  end
  lzd_bin #(.N(128)) u_dlzd (.x(dnz), .lzc(dlzc), .valid(dlzv));

  logic [323:0] bx;
  logic [2:0]   btop;
  logic [7:0]   bdig;
  logic [10:0]  blzc;
  logic         blzv;
  assign bx = {bmag, 1'b1, 50'd0};
  lzd_base3 #(.LEVELS(3)) u_blzd (.x(bx), .top(btop), .digits(bdig), .lzc_bin(blzc), .valid(blzv));

  int nd, r;
  always_comb begin
    if (!bd) begin
      nd = ND - int'(dlzc);
      r  = 0;
      if (int'(qpref) - int'(qwin) > r) r = int'(qpref) - int'(qwin);
      if (nd - P_DEC > r)               r = nd - P_DEC;
      if (DEC_QMIN - int'(qwin) > r)    r = DEC_QMIN - int'(qwin);
      if (r > ND + 2) r = ND + 2;
    end else begin
      nd = NB - int'(blzc);
      r  = 0;
      if (nd - P_BIN > r)               r = nd - P_BIN;
      if (BIN_QMIN - int'(qwin) > r)    r = BIN_QMIN - int'(qwin);
      if (r > NB + 3) r = NB + 3;
    end
  end

  logic sign_r;
  assign sign_r = magzero ? ((sm == sceff) ? sm : (rnd_mode == RM_NINF)) : (sm ^ neg);

  // decimal: two extra zero digits below the window hold GD / RD
  logic [4*(ND+2)-1:0] dext, dsh;
  logic [ND+1:0]       dmask;
  logic                dstin, dstsign, dcout, dbout, dinex;
  logic [7:0]          ddig;
  always_comb begin
    dext = {dmag, 8'h00};
    dsh  = dext >> (4 * r);
    for (int i = 0; i < ND + 2; i++) dmask[i] = (i < r);
  end
  sticky_detector #(.N(ND+2)) u_dst (.x(dext), .mask(dmask), .sticky(dstin), .st_sign(dstsign));
  dec_rounder u_drnd (.lsd(dsh[11:8]), .gd(dsh[7:4]), .rd(dsh[3:0]), .msd_zero(1'b0),
                      .stin(dstin), .st_sign(1'b0), .sign(sign_r), .mode(rnd_mode),
                      .dig_out(ddig), .cout(dcout), .bout(dbout), .inexact(dinex));

  // binary: three extra zero bits below the window
  logic [NB+2:0] bext, bsh, bmask;
  logic          bstin, bcout, bbout, binex;
  logic [5:0]    blsbs;
  always_comb begin
    bext  = {bmag, 3'b000};
    bsh   = bext >> r;
    bmask = ~('1 << r);
    bstin = |(bext & bmask);
  end
  bin_rounder u_brnd (.lsbs(bsh[5:0]), .fine(2'd0), .stin(bstin), .st_sign(1'b0),
                      .sign(sign_r), .mode(rnd_mode), .lsbs_out(blsbs), .cout(bcout),
                      .bout(bbout), .inexact(binex));

  // ---------------- 7. result assembly ----------------
  logic to_inf;
  always_comb
    to_inf = !(rnd_mode == RM_ZERO ||
               (rnd_mode == RM_PINF && sign_r) || (rnd_mode == RM_NINF && !sign_r));

  logic [63:0] dres, bres;
  logic        d_ovf, d_unf, d_inx, b_ovf, b_unf, b_inx;
  logic [63:0] dcoef;
  logic [9:0]  dbexp;
  int          dq, nc;
  always_comb begin
    logic [63:0] up;
    logic        cy;
    nc = 0;
    // decimal coefficient after rounding
    up = {4'd0, dsh[71:12]};
    cy = dcout;
    for (int i = 0; i < 15; i++) begin
      if (cy) begin
        if (up[4*i +: 4] == 4'd9) up[4*i +: 4] = 4'd0;
        else begin up[4*i +: 4] = up[4*i +: 4] + 4'd1; cy = 1'b0; end
      end
    end
    dq = int'(qwin) + r;
    if (cy) begin                                   // 9999..9 rounded up
      dcoef = 64'h1000_0000_0000_0000;
      dq    = dq + 1;
    end else begin
      dcoef = {up[59:0], ddig[7:4]};
    end
    d_inx = dinex;
    d_ovf = 1'b0;
    if (magzero) begin
      dcoef = '0;
      dq    = int'(qpref);
      if (dq < DEC_QMIN) dq = DEC_QMIN;
      if (dq > DEC_QMAX) dq = DEC_QMAX;
    end else if (dq > DEC_QMAX) begin
      for (int i = 0; i < 16; i++) if (dcoef[4*i +: 4] != 4'd0) nc = i + 1;
      if (dq - DEC_QMAX <= 16 - nc) begin          // clamp: pad with zeros
        dcoef = dcoef << (4 * (dq - DEC_QMAX));
        dq    = DEC_QMAX;
      end else begin
        d_ovf = 1'b1;
        d_inx = 1'b1;
      end
    end
    dbexp = 10'(dq + DEC_BIAS);
    d_unf = !magzero && (int'(qwin) + nd - 1 < DEC_EMIN) && d_inx;
  end
  logic [63:0] dres_enc;
  dpd_encoder u_denc (.sign(sign_r), .bexp(dbexp), .sig(dcoef), .res(dres_enc));
  always_comb begin
    if (d_ovf) dres = to_inf ? {sign_r, 63'h7800_0000_0000_0000}
                             : {sign_r, 63'h77fc_ff3f_cff3_fcff};
    else       dres = dres_enc;
  end

  int          bq, bexp_i;
  logic [53:0] bcoef;
  always_comb begin
    bcoef = {1'b0, bsh[55:6], blsbs[5:3]} + (bcout ? 54'd8 : 54'd0);
    bq    = int'(qwin) + r;
    if (bcoef[53]) begin
      bcoef = bcoef >> 1;
      bq    = bq + 1;
    end
    bexp_i = bcoef[52] ? bq + BIN_BIAS + 52 : 0;
    b_inx  = binex;
    b_ovf  = 1'b0;
    if (magzero) bres = {sign_r, 63'd0};
    else if (bexp_i >= 2047) begin
      b_ovf = 1'b1;
      b_inx = 1'b1;
      bres  = to_inf ? {sign_r, 63'h7ff0_0000_0000_0000} : {sign_r, 63'h7fef_ffff_ffff_ffff};
    end else bres = {sign_r, 11'(bexp_i), bcoef[51:0]};
    b_unf = !magzero && (int'(qwin) + nd - 1 < BIN_EMIN) && b_inx;
  end

  logic        sp, sp_inv;
  logic [63:0] sp_res;
  special_values u_spec (.bd, .op, .a, .b, .c, .opa, .opb(opb_sel), .opc(opc_sel),
                         .is_special(sp), .res(sp_res), .invalid(sp_inv));

  always_comb begin
    if (sp) begin
      result = sp_res;
      flags  = {sp_inv, 4'b0000};
    end else if (bd) begin
      result = bres;
      flags  = {1'b0, 1'b0, b_ovf, b_unf, b_inx};
    end else begin
      result = dres;
      flags  = {1'b0, 1'b0, d_ovf, d_unf, d_inx};
    end
  end

  logic unused;
  assign unused = ^{bout1, bout2, deq, dlzv, btop, bdig, blzv, dstsign, dbout, bbout,
                    expm, dsh[4*ND+7:72], ddig[3:0], blsbs[2:0], conv1[4*ND+7:4*ND], conv2[4*ND+7:4*ND], bsh[NB+2:56]};
endmodule
