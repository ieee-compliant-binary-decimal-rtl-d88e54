// Self-checking testbench for redundant_adder_cell: for all digit pairs in
// [-6, 6], both radices and every input transfer value (-1, 0, +1), the
// cell must satisfy x + y + in_transfer = s + R * out_transfer, with s in
// [-6, 6] and at most one transfer line active.
module tb_redundant_adder_cell;
  logic bd, itdp, itdn, otdp, otdn;
  logic [3:0] x, y, s;
  redundant_adder_cell dut (.bd, .x, .y, .itdp, .itdn, .s, .otdp, .otdn);
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
    for (int b = 0; b < 2; b++)
      for (int i = -6; i <= 6; i++)
        for (int j = -6; j <= 6; j++)
          for (int t = -1; t <= 1; t++) begin
            int sv;
            bd = 1'(b); x = 4'(i); y = 4'(j); itdp = (t == 1); itdn = (t == -1);
            #1 sv = int'(signed'(s));
            chk(i + j + t === sv + (bd ? 8 : 10) * (int'(otdp) - int'(otdn)) && sv >= -6 && sv <= 6
                && !(otdp && otdn), $sformatf("bd=%0d %0d+%0d+%0d -> s=%0d t=%b%b", b, i, j, t, sv, otdp, otdn));
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
