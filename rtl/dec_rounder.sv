// Decimal rounder working on three digits.
//
// LSD, GD and RD are the three lowest digits that may matter: when the
// result's most significant digit is non-zero, LSD is the last kept digit
// and GD, RD are discarded; when it is zero (the leading-zero count was
// one short), the result is one digit further left, GD is the last kept
// digit and RD is discarded. The discarded digits are mapped onto the
// binary rounding cell's inputs (table of the design notes):
//   MSD > 0: LSB LSD[0], RB GD >= 5, sticky (GD not 0 or 5) | RD != 0 | stin
//   MSD = 0: LSB GD[0],  RB RD >= 5, sticky (RD not 0 or 5) | stin
// The sticky sign only matters while the discarded digits above the input
// sticky are exactly 0 or 5 followed by zeros; this design reads the
// printed condition that way (see the rounder's assumptions). Decimal
// increment and decrement of the kept digit run beside the rounding cell
// and the decision picks one. dig_out = {new LSD, new GD}; GD is zero when
// it was discarded. cout / bout: add / subtract one above the LSD.
// Purely combinational.
module dec_rounder (
  input  logic [3:0] lsd, gd, rd,
  input  logic       msd_zero,
  input  logic       stin, st_sign, sign,
  input  logic [2:0] mode,
  output logic [7:0] dig_out,
  output logic       cout, bout, inexact
);
  logic lsb, rb, st, ses, incp, incn;
  logic gd_nz, rd_nz, gd_5, rd_5;
  assign gd_nz = gd != 4'd0;
  assign rd_nz = rd != 4'd0;
  assign gd_5  = gd == 4'd5;
  assign rd_5  = rd == 4'd5;
  always_comb begin
    if (!msd_zero) begin
      lsb = lsd[0];
      rb  = gd >= 4'd5;
      st  = (!gd_5 && gd_nz) || rd_nz || stin;
      ses = (gd_5 || !gd_nz) && !rd_nz && st_sign;
    end else begin
      lsb = gd[0];
      rb  = rd >= 4'd5;
      st  = (!rd_5 && rd_nz) || stin;
      ses = (rd_5 || !rd_nz) && st_sign;
    end
  end
  rounding_cell u_cell (.mode, .lsb, .rb, .sticky(st), .st_sign(ses), .sign,
                        .incp, .incn);
  // kept digits: {lsd} or {lsd, gd}; BCD +1 / -1 prepared in parallel
  logic [7:0] kept, kp, kn;
  logic       kp_c, kn_b;
  always_comb begin
    kept = msd_zero ? {lsd, gd} : {4'd0, lsd};
    kp = kept; kn = kept; kp_c = 1'b0; kn_b = 1'b0;
    if (!msd_zero) begin
      kp[3:0] = (lsd == 4'd9) ? 4'd0 : lsd + 4'd1;  kp_c = (lsd == 4'd9);
      kn[3:0] = (lsd == 4'd0) ? 4'd9 : lsd - 4'd1;  kn_b = (lsd == 4'd0);
      kp = {kp[3:0], 4'd0}; kn = {kn[3:0], 4'd0}; kept = {lsd, 4'd0};
    end else begin
      kp[3:0] = (gd == 4'd9) ? 4'd0 : gd + 4'd1;
      kp[7:4] = (gd == 4'd9) ? ((lsd == 4'd9) ? 4'd0 : lsd + 4'd1) : lsd;
      kp_c    = (gd == 4'd9) && (lsd == 4'd9);
      kn[3:0] = (gd == 4'd0) ? 4'd9 : gd - 4'd1;
      kn[7:4] = (gd == 4'd0) ? ((lsd == 4'd0) ? 4'd9 : lsd - 4'd1) : lsd;
      kn_b    = (gd == 4'd0) && (lsd == 4'd0);
    end
    dig_out = incp ? kp : (incn ? kn : kept);
    cout    = incp & kp_c;
    bout    = incn & kn_b;
    inexact = rb | st;
  end
endmodule
