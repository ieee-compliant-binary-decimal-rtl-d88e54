// Redundant result complementer.
//
// When the intermediate result is negative (neg = 1) every redundant digit
// is negated on its own (4-bit two's complement), which negates the whole
// number with no carry propagation; otherwise the vector passes unchanged.
// As in the design notes. Purely combinational.
module redundant_complementer #(
  parameter int ND = 103
) (
  input  logic            neg,
  input  logic [4*ND-1:0] x,
  output logic [4*ND-1:0] y
);
  always_comb
    for (int i = 0; i < ND; i++) y[4*i +: 4] = neg ? (4'd0 - x[4*i +: 4]) : x[4*i +: 4];
endmodule
