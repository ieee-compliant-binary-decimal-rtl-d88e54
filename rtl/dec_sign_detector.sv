// Decimal magnitude comparator tree (intermediate sign detector).
//
// For each digit position it forms zero_i (A_i = B_i) and Gr_i (A_i > B_i),
// the signals the decimal leading-zero anticipator also produces, and
// merges neighbouring positions in a binary tree whose cell computes
//   Gr   = Gr_hi | (zero_hi & Gr_lo)
//   zero = zero_hi & zero_lo
// as drawn in the design notes' sign-detection figure. gt = A > B and
// eq = A == B for the whole vectors. Purely combinational, log2(NDIG)
// cell levels.
module dec_sign_detector #(
  parameter int NDIG = 101
) (
  input  logic [4*NDIG-1:0] a, b,   // BCD-8421
  output logic              gt,
  output logic              eq
);
  localparam int NP = 1 << $clog2(NDIG);
  logic [NP-1:0] gr [$clog2(NDIG)+1];
  logic [NP-1:0] zr [$clog2(NDIG)+1];
  always_comb begin
    for (int i = 0; i < NP; i++) begin
      if (i < NDIG) begin
        gr[0][i] = a[4*i +: 4] > b[4*i +: 4];
        zr[0][i] = a[4*i +: 4] == b[4*i +: 4];
      end else begin
        gr[0][i] = 1'b0;       // padding digits are equal
        zr[0][i] = 1'b1;
      end
    end
    for (int l = 1; l <= $clog2(NDIG); l++) begin
      gr[l] = '0;
      zr[l] = '0;
      for (int i = 0; i < (NP >> l); i++) begin
        gr[l][i] = gr[l-1][2*i+1] | (zr[l-1][2*i+1] & gr[l-1][2*i]);
        zr[l][i] = zr[l-1][2*i+1] & zr[l-1][2*i];
      end
    end
    gt = gr[$clog2(NDIG)][0];
    eq = zr[$clog2(NDIG)][0];
  end
endmodule
