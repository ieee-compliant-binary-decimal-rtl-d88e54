// Leading-zero detector with a base-3 count.
//
// The input is cut into 3-bit groups; a cell gives each group's count as one
// base-3 digit (2 bits: LZC[0] = X1 & ~X2, LZC[1] = ~X1 & ~X2) and a valid
// bit (X0 | X1 | X2). Groups of three neighbours are merged: the count of
// the leftmost valid group is kept and one more base-3 digit is prefixed,
// {~(v1 | v2), v1 & ~v2} (2 or 1 whole groups skipped). After LEVELS such
// merges, four top groups are merged with the prefix
// {~(v1|v2|v3), v1 & ~v2 & ~v3, v2 & ~v3} (3, 2 or 1 groups skipped,
// one-hot). Because every digit weight except the last is a multiple of 3,
// the count can shift an octal-digit (3-bit) redundant vector directly.
// Equations from the design notes. The notes use LEVELS = 2 (108 bits);
// this design uses LEVELS = 3 (324 bits) for its 273-bit window.
// lzc_bin gives the same count in binary. valid = 0: input all zero.
// Purely combinational.
module lzd_base3 #(
  parameter int LEVELS = 3
) (
  input  logic [4*(3**(LEVELS+1))-1:0] x,
  output logic [2:0]                   top,      // one-hot: 3/2/1 groups skipped
  output logic [2*(LEVELS+1)-1:0]      digits,   // base-3 digits, LSD first
  output logic [10:0]                  lzc_bin,
  output logic                         valid
);
  localparam int NG = 4 * (3 ** LEVELS);     // number of 3-bit cells
  localparam int ND = LEVELS + 1;            // base-3 digits below the top
  logic [2*ND-1:0] cnt [LEVELS+1][NG];
  logic [NG-1:0]   vld [LEVELS+1];
  always_comb begin
    for (int l = 0; l <= LEVELS; l++) begin
      vld[l] = '0;
      for (int i = 0; i < NG; i++) cnt[l][i] = '0;
    end
    for (int i = 0; i < NG; i++) begin
      logic [2:0] g;
      g = x[3*i +: 3];
      cnt[0][i][0] = g[1] & ~g[2];
      cnt[0][i][1] = ~g[1] & ~g[2];
      vld[0][i]    = |g;
    end
    for (int l = 1; l <= LEVELS; l++) begin
      for (int i = 0; i < (NG / (3 ** l)); i++) begin
        logic v0, v1, v2;
        v0 = vld[l-1][3*i];
        v1 = vld[l-1][3*i+1];
        v2 = vld[l-1][3*i+2];
        cnt[l][i] = v2 ? cnt[l-1][3*i+2] : (v1 ? cnt[l-1][3*i+1] : cnt[l-1][3*i]);
        cnt[l][i][2*l +: 2] = {~(v1 | v2), v1 & ~v2};
        vld[l][i] = v0 | v1 | v2;
      end
    end
    begin
      logic v0, v1, v2, v3;
      v0 = vld[LEVELS][0]; v1 = vld[LEVELS][1]; v2 = vld[LEVELS][2]; v3 = vld[LEVELS][3];
      digits = v3 ? cnt[LEVELS][3] : (v2 ? cnt[LEVELS][2] : (v1 ? cnt[LEVELS][1] : cnt[LEVELS][0]));
      top    = {~(v1 | v2 | v3), v1 & ~v2 & ~v3, v2 & ~v3};
      valid  = v0 | v1 | v2 | v3;
    end
    lzc_bin = '0;
    for (int k = 0; k < ND; k++) lzc_bin = lzc_bin + 11'(int'(digits[2*k +: 2]) * (3 ** k));
    lzc_bin = lzc_bin + 11'((top[2] ? 3 : (top[1] ? 2 : (top[0] ? 1 : 0))) * (3 ** ND));
  end
endmodule
