// Self-checking testbench for addend_prep. Random operands whose
// exponent difference keeps C inside the window: in binary the window
// vector must be the significand of C shifted to bit 57 + (ExpC - ExpM),
// inverted under effective subtraction; in decimal it must be the BCD-4221
// form of the coefficient at digit 34 + (ExpC - ExpM), with all other
// digits zero (or all nines when complemented). The window exponent and
// the preferred exponent are checked as well.
module tb_addend_prep;
  import bdfma_pkg::*;
  logic bd, eop;
  operand_t a, b, c;
  logic [403:0] dvec;
  logic [272:0] bvec;
  logic signed [13:0] qwin, qpref, expm;
  addend_prep dut (.bd, .a, .b, .c, .eop, .dvec, .bvec, .qwin, .qpref, .expm);
  function automatic operand_t mkop(input logic [10:0] be, input logic [63:0] sig);
    operand_t o;
    o = '0;
    o.bexp = be; o.sig = sig; o.is_zero = (sig == 0);
    return o;
  endfunction
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
    for (int n = 0; n < 3000; n++) begin
      int ea, eb, ec, qm, qc, d;
      logic [63:0] sc;
      bd = 1'(n % 2); eop = 1'($urandom);
      if (bd) begin
        logic [272:0] rv;
        ea = 900 + int'($urandom % 200); eb = 900 + int'($urandom % 200);
        qm = ea + eb - 2150;
        d = int'($urandom % 220) - 57;
        qc = qm + d; ec = qc + 1075;
        sc = {11'd0, 1'b1, 20'($urandom), 32'($urandom)};
        a = mkop(11'(ea), 64'(1) << 52); b = mkop(11'(eb), 64'(1) << 52); c = mkop(11'(ec), sc);
        #1;
        rv = 273'(sc) << (57 + d);
        if (eop) rv = ~rv;
        chk(bvec === rv && int'(qwin) === qm - 57, $sformatf("bin d=%0d eop=%0d", d, eop));
      end else begin
        logic [403:0] rv;
        ea = 398 + int'($urandom % 100) - 50; eb = 398 + int'($urandom % 100) - 50;
        qm = ea + eb - 796;
        d = int'($urandom % 85) - 34;
        qc = qm + d; ec = qc + 398;
        for (int i = 0; i < 16; i++) sc[4*i +: 4] = 4'($urandom % 10);
        sc[63:60] = 4'(1 + $urandom % 9);
        a = mkop(11'(ea), 64'd1); b = mkop(11'(eb), 64'd1); c = mkop(11'(ec), sc);
        #1;
        rv = '0;
        for (int i = 0; i < 16; i++)
          if (34 + d + i < 101) rv[4*(34 + d + i) +: 4] = bcd_to_4221(sc[4*i +: 4]);
        if (eop) rv = ~rv;
        chk(dvec === rv && int'(qwin) === qm - 34 && int'(qpref) === ((qc < qm) ? qc : qm),
            $sformatf("dec d=%0d eop=%0d qwin=%0d", d, eop, qwin));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
