// Self-checking testbench for dec_recoder: for every BCD digit the upper
// digit (0, 5 or 10) plus the signed lower digit (-2..2) must equal the
// digit, and exactly the selected one-hot lines must be active.
module tb_dec_recoder;
  logic [3:0] y;
  logic y1u, y2u, yp1, yp2, ym1, ym2, ys;
  dec_recoder dut (.y, .y1u, .y2u, .yp1, .yp2, .ym1, .ym2, .ys);
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
    for (int v = 0; v < 10; v++) begin
      int u, l;
      y = 4'(v);
      #1;
      u = y1u ? 5 : (y2u ? 10 : 0);
      l = yp1 ? 1 : yp2 ? 2 : ym1 ? -1 : ym2 ? -2 : 0;
      chk(u + l === v && (int'(y1u) + int'(y2u) <= 1) && (int'(yp1) + int'(yp2) + int'(ym1) + int'(ym2) <= 1)
          && (ys === (l < 0)), $sformatf("digit %0d: u=%0d l=%0d", v, u, l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
