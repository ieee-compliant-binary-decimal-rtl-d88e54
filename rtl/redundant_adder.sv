// Carry-free redundant adder for binary and decimal operands.
//
// ND redundant_adder_cell digits in a row; each cell's output transfer is
// the next cell's input transfer, which does not ripple (a cell's transfer
// depends only on its own inputs). The input transfer of the least
// significant digit is the adder carry-in. The top transfer is the extra
// output digit. Value of s = value of x + value of y + cin exactly.
// As in the design notes. Purely combinational, constant depth.
module redundant_adder #(
  parameter int ND = 102
) (
  input  logic            bd,
  input  logic [4*ND-1:0] x, y,
  input  logic            cin,
  output logic [4*ND+3:0] s
);
  logic [ND:0] tp, tn;
  assign tp[0] = cin;
  assign tn[0] = 1'b0;
  for (genvar i = 0; i < ND; i++) begin : g_cell
    redundant_adder_cell u_cell (.bd, .x(x[4*i +: 4]), .y(y[4*i +: 4]),
                                 .itdp(tp[i]), .itdn(tn[i]),
                                 .s(s[4*i +: 4]), .otdp(tp[i+1]), .otdn(tn[i+1]));
  end
  assign s[4*ND +: 4] = tp[ND] ? 4'd1 : (tn[ND] ? 4'hf : 4'd0);
endmodule
