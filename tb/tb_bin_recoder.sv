// Self-checking testbench for bin_recoder: for all 16 groups and both
// carry inputs the recoded digits must satisfy y + cin = U + L + 16*cout
// with U in {0, +-4, +-8} and L in {0, +-1, +-2}, one-hot selects and sign
// bits matching the digit signs.
module tb_bin_recoder;
  logic [3:0] y;
  logic cin, lp1, lp2, lm1, lm2, lsgn, up4, up8, um4, um8, usgn, cout;
  bin_recoder dut (.y, .cin, .lp1, .lp2, .lm1, .lm2, .lsgn, .up4, .up8, .um4, .um8, .usgn, .cout);
  int checks = 0, failures = 0;
  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask
  initial begin
    for (int v = 0; v < 32; v++) begin
      int u, l;
      {cin, y} = 5'(v);
      #1;
      u = up4 ? 4 : up8 ? 8 : um4 ? -4 : um8 ? -8 : 0;
      l = lp1 ? 1 : lp2 ? 2 : lm1 ? -1 : lm2 ? -2 : 0;
      chk(int'(y) + int'(cin) === u + l + 16 * int'(cout)
          && (int'(lp1) + int'(lp2) + int'(lm1) + int'(lm2) <= 1)
          && (int'(up4) + int'(up8) + int'(um4) + int'(um8) <= 1)
          && (l < 0 ? lsgn : 1'b1) && (u < 0 ? usgn : 1'b1),
          $sformatf("y=%0d cin=%0d u=%0d l=%0d cout=%0d", y, cin, u, l, cout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
