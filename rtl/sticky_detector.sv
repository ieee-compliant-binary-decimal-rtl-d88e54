// Sticky and sticky-sign detector.
//
// Looks at the digits selected by mask (the digits right of the rounding
// position). sticky is 1 when any of them is non-zero. st_sign is the sign
// of the value they form, i.e. the sign of the most significant non-zero
// one: like a carry out of a look-ahead adder with generate = the digit's
// sign bit and propagate = the digit is zero, as in the design notes
// (written here as a ripple-free prefix over the digits). Works on
// redundant digits in [-6,6] and on plain BCD digits (whose sign is
// always 0). Purely combinational.
module sticky_detector #(
  parameter int N = 103
) (
  input  logic [4*N-1:0] x,
  input  logic [N-1:0]   mask,
  output logic           sticky,
  output logic           st_sign
);
  logic [N-1:0] sgn, zero;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      sgn[i]  = mask[i] & x[4*i+3];
      zero[i] = !mask[i] || (x[4*i +: 4] == 4'd0);
    end
    sticky  = ~&zero;
    st_sign = 1'b0;
    for (int i = 0; i < N; i++) st_sign = sgn[i] | (zero[i] & st_sign);
  end
endmodule
