// SD radix-4 recoder for one hexadecimal multiplier digit.
//
// A 4-bit multiplier group Y plus the carry-in from the group below is
// rewritten as Y + cin = 16*cout + 4*U + L with U and L in {-2..2}. The
// lower digit is given as one-hot selects of +-A, +-2A, the upper as
// one-hot selects of +-4A, +-8A, each with its sign. cout = y[3] does not
// depend on cin, so there is no carry ripple between groups. Equations as
// in the design notes. Purely combinational.
module bin_recoder (
  input  logic [3:0] y,
  input  logic       cin,
  output logic       lp1, lp2, lm1, lm2, lsgn,  // lower digit selects, sign
  output logic       up4, up8, um4, um8, usgn,  // upper digit selects, sign
  output logic       cout
);
  assign lp1  = (~y[1] & ~y[0] & cin) | (~y[1] & y[0] & ~cin);
  assign lp2  = ~y[1] & y[0] & cin;
  assign lm1  = (~y[0] & y[1] & cin) | (y[1] & y[0] & ~cin);
  assign lm2  = ~y[0] & y[1] & ~cin;
  assign lsgn = (y[1] & ~y[0]) | (y[1] & ~cin);
  assign up4  = (~y[3] & ~y[2] & y[1]) | (~y[3] & y[2] & ~y[1]);
  assign up8  = ~y[3] & y[2] & y[1];
  assign um4  = (~y[2] & y[3] & y[1]) | (y[3] & y[2] & ~y[1]);
  assign um8  = ~y[2] & y[3] & ~y[1];
  assign usgn = (y[3] & ~y[2]) | (y[3] & ~y[1]);
  assign cout = y[3];
endmodule
