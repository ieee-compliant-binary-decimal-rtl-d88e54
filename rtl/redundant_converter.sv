// Redundant to BCD / binary converter.
//
// A non-negative redundant digit is already a BCD (octal) digit; a negative
// one needs the radix added and a borrow taken from the next digit, and a
// zero digit passes a borrow from below on. The borrow into every digit is
// therefore a carry-look-ahead problem with generate = the digit's sign bit
// and propagate = the digit is zero; it is solved here with a parallel
// prefix (Kogge-Stone) network. Two such conversions run, for a borrow into
// the least significant digit of 0 and of 1, and the correct one is picked
// by bsel once it is known (carry-select), as in the design notes'
// rounding-and-conversion figure. bout is the borrow out of the top digit
// (1 when the number is negative). Octal digits come out one per 4-bit
// slot. Purely combinational.
module redundant_converter #(
  parameter int ND = 103
) (
  input  logic            bd,
  input  logic [4*ND-1:0] x,
  input  logic            bsel,     // borrow into digit 0
  output logic [4*ND-1:0] y,
  output logic            bout
);
  localparam int L = $clog2(ND);
  logic [ND-1:0] g, p;
  logic [ND-1:0] gg [L+1];
  logic [ND-1:0] pp [L+1];
  logic [ND:0]   b0, b1;          // borrow into digit i for bin = 0 / 1
  logic [4*ND-1:0] y0, y1;
  always_comb begin
    for (int i = 0; i < ND; i++) begin
      g[i] = x[4*i+3];
      p[i] = (x[4*i +: 4] == 4'd0);
    end
    gg[0] = g; pp[0] = p;
    for (int l = 1; l <= L; l++) begin
      for (int i = 0; i < ND; i++) begin
        if (i >= (1 << (l - 1))) begin
          gg[l][i] = gg[l-1][i] | (pp[l-1][i] & gg[l-1][i - (1 << (l - 1))]);
          pp[l][i] = pp[l-1][i] & pp[l-1][i - (1 << (l - 1))];
        end else begin
          gg[l][i] = gg[l-1][i];
          pp[l][i] = pp[l-1][i];
        end
      end
    end
    b0[0] = 1'b0; b1[0] = 1'b1;
    for (int i = 0; i < ND; i++) begin
      b0[i+1] = gg[L][i];
      b1[i+1] = gg[L][i] | pp[L][i];
    end
    for (int i = 0; i < ND; i++) begin
      y0[4*i +: 4] = x[4*i +: 4] - {3'b000, b0[i]} + (b0[i+1] ? (bd ? 4'd8 : 4'd10) : 4'd0);
      y1[4*i +: 4] = x[4*i +: 4] - {3'b000, b1[i]} + (b1[i+1] ? (bd ? 4'd8 : 4'd10) : 4'd0);
    end
  end
  assign y    = bsel ? y1 : y0;
  assign bout = bsel ? b1[ND] : b0[ND];
endmodule
