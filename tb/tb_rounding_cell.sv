// Self-checking testbench for rounding_cell: every mode and every
// combination of LSB, round bit, sticky, sticky sign and result sign. The
// discarded part is modelled as round_bit/2 plus or minus a small amount
// and the reference picks T-1, T or T+1 by the rounding-direction rules.
module tb_rounding_cell;
  logic [2:0] mode;
  logic lsb, rb, sticky, st_sign, sign, incp, incn;
  rounding_cell dut (.mode, .lsb, .rb, .sticky, .st_sign, .sign, .incp, .incn);
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
    for (int m = 0; m < 7; m++)
      for (int v = 0; v < 32; v++) begin
        int f, d;
        logic away;
        mode = 3'(m);
        {lsb, rb, sticky, st_sign, sign} = 5'(v);
        // fraction in quarters of an LSB: -1, 0, 1, 2, 3
        f = 2 * int'(rb) + (sticky ? (st_sign ? -1 : 1) : 0);
        away = (m == 1) || (m == 2 && !sign) || (m == 3 && sign);
        case (m)
          0: d = (f > 2 || (f == 2 && lsb)) ? 1 : 0;
          5: d = (f >= 2) ? 1 : 0;
          6: d = (f > 2) ? 1 : 0;
          default: d = away ? ((f > 0) ? 1 : 0) : ((f < 0) ? -1 : 0);
        endcase
        #1 chk(incp === (d === 1) && incn === (d === -1),
               $sformatf("mode=%0d lsb=%0d rb=%0d st=%0d sts=%0d s=%0d -> %0d%0d exp %0d", m, lsb, rb, sticky,
                         st_sign, sign, incp, incn, d));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
