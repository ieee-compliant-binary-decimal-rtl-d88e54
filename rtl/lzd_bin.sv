// Leading-zero detector tree with a binary count.
//
// Built from 2-bit cells that give valid v = b1 | b0 and count P = ~b1, as
// in the design notes. Two halves (hi, lo) are merged by
//   v = v_hi | v_lo,  P = v_hi ? {0, P_hi} : {1, P_lo}
// level by level until one N-bit count remains (log2(N)-1 merge levels).
// valid = 0 means the input is all zeros; lzc is then N-1.
// N must be a power of two (the notes draw N = 32; this design uses 128 to
// count the leading zero digits of the 101-digit decimal result).
// Purely combinational.
module lzd_bin #(
  parameter int N = 128
) (
  input  logic [N-1:0]         x,
  output logic [$clog2(N)-1:0] lzc,
  output logic                 valid
);
  localparam int L = $clog2(N);
  logic [N-1:0] v [L+1];
  logic [L-1:0] p [L+1][N];
  always_comb begin
    for (int l = 0; l <= L; l++) begin
      v[l] = '0;
      for (int i = 0; i < N; i++) p[l][i] = '0;
    end
    // 2-bit cells
    for (int i = 0; i < N / 2; i++) begin
      v[1][i]    = x[2*i+1] | x[2*i];
      p[1][i][0] = ~x[2*i+1];
    end
    // merge levels: a count of the low half gains the weight 2^(l-1)
    for (int l = 2; l <= L; l++) begin
      for (int i = 0; i < (N >> l); i++) begin
        v[l][i] = v[l-1][2*i+1] | v[l-1][2*i];
        p[l][i] = v[l-1][2*i+1] ? p[l-1][2*i+1]
                                : (p[l-1][2*i] | L'(1 << (l - 1)));
      end
    end
    valid = v[L][0];
    lzc   = p[L][0];
  end
endmodule
