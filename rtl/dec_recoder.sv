// SD radix-5 recoder for one BCD multiplier digit.
//
// A decimal multiplier digit Y in 0..9 is rewritten as Y = 5*U + L with
// U in {0,1,2} and L in {-2..2}. U is given as two one-hot selects (y1u
// picks 5A, y2u picks 10A) and L as four one-hot selects (+1,+2,-1,-2 times
// A) plus its sign ys, directly from the four BCD bits by the two-level
// logic of the design notes (their SD radix-5 recoding equations and
// table). Purely combinational.
module dec_recoder (
  input  logic [3:0] y,
  output logic       y1u, y2u,          // upper digit 1 / 2 (5A / 10A)
  output logic       yp1, yp2, ym1, ym2, // lower digit +1 / +2 / -1 / -2
  output logic       ys                 // lower digit is negative
);
  assign y2u = y[3];
  assign y1u = y[2] | (y[1] & y[0]);
  assign yp2 = y[1] & ((y[2] & y[0]) | (~y[2] & ~y[0]));
  assign yp1 = (~y[3] & ~y[2] & ~y[1] & y[0]) | (y[2] & y[1] & ~y[0]);
  assign ym1 = (y[3] & y[0]) | (y[2] & ~y[1] & ~y[0]);
  assign ym2 = (y[3] & ~y[0]) | (~y[2] & y[1] & y[0]);
  assign ys  = ym2 | ym1;
endmodule
