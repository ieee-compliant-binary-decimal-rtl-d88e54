// One digit of the carry-free binary/decimal redundant adder.
//
// x and y are digits in [-6,6] (4-bit two's complement). A 4-bit adder
// forms the intermediate sum; in parallel the output transfer digit is
// found from the inputs alone: +1 (otdp) when x + y > 5, -1 (otdn) when
// x + y < -5. The correction digit, -radix*OTD + ITD, is one of four
// vectors formed from the input transfer (itdp, itdn) and picked by a 4:1
// multiplexer: I1 = ITD (no transfer), I2 = ITD - 10 (decimal, +1),
// I3 = ITD + 8 = ITD - 8 modulo 16 (binary, either transfer),
// I4 = ITD + 10 (decimal, -1). A second 4-bit adder adds it to the
// intermediate sum, which lands in [-6,6]. Structure of the design notes'
// redundant adder cell; the reading of I1..I4 and of the select is this
// design's where the printed equations are ambiguous. Combinational.
module redundant_adder_cell (
  input  logic       bd,             // 1 binary (radix 8), 0 decimal (radix 10)
  input  logic [3:0] x, y,
  input  logic       itdp, itdn,     // input transfer +1 / -1
  output logic [3:0] s,
  output logic       otdp, otdn
);
  logic [3:0] isum, corr, itd4, i1, i2, i3, i4;
  logic [1:0] sel;
  logic signed [4:0] full;
  assign isum = x + y;                                  // first 4-bit adder
  assign full = 5'($signed(x)) + 5'($signed(y));
  assign otdp = full > 5'sd5;                           // transfer generation
  assign otdn = full < -5'sd5;
  assign itd4 = {4{itdn & ~itdp}} | {3'b000, itdp & ~itdn};
  assign i1 = itd4;
  assign i2 = itd4 + 4'd6;      // ITD - 10 mod 16
  assign i3 = itd4 ^ 4'b1000;   // ITD +- 8 mod 16
  assign i4 = itd4 + 4'd10;     // ITD + 10 mod 16
  always_comb begin
    if (!otdp && !otdn) sel = 2'd0;
    else if (bd)        sel = 2'd2;
    else if (otdp)      sel = 2'd1;
    else                sel = 2'd3;
    unique case (sel)
      2'd0: corr = i1;
      2'd1: corr = i2;
      2'd2: corr = i3;
      default: corr = i4;
    endcase
  end
  assign s = isum + corr;                               // second 4-bit adder
endmodule
