// Self-checking testbench for special_values: directed binary64 and
// decimal64 cases for NaN propagation and quieting, the invalid operations
// (0 x infinity, infinity - infinity, signalling NaN), infinite results with
// their signs, and finite operands that must not be flagged special.
module tb_special_values;
  import bdfma_pkg::*;
  logic bd, op, is_special, invalid;
  logic [63:0] opa, opb, opc, res;
  operand_t ba, bb, bc, da, db, dc;
  bin_decoder u_ba (.op(opa), .dec(ba));
  bin_decoder u_bb (.op(opb), .dec(bb));
  bin_decoder u_bc (.op(opc), .dec(bc));
  dpd_decoder u_da (.op(opa), .dec(da));
  dpd_decoder u_db (.op(opb), .dec(db));
  dpd_decoder u_dc (.op(opc), .dec(dc));
  special_values dut (.bd, .op, .a(bd ? ba : da), .b(bd ? bb : db), .c(bd ? bc : dc), .opa, .opb, .opc,
                      .is_special, .res, .invalid);
  task automatic t(input logic b_d, input logic o, input logic [63:0] x, input logic [63:0] y,
                   input logic [63:0] z, input logic sp, input logic [63:0] r, input logic inv, input string w);
    bd = b_d; op = o; opa = x; opb = y; opc = z;
    #1 chk(is_special === sp && (!sp || (res === r && invalid === inv)), $sformatf("%s: %0d %h %0d", w, is_special, res, invalid));
  endtask
  localparam logic [63:0] ONE = 64'h3ff0_0000_0000_0000, INF = 64'h7ff0_0000_0000_0000;
  localparam logic [63:0] NAN = 64'h7ff8_0000_0000_0000, ZERO = 64'd0;
  localparam logic [63:0] DONE = 64'h2238_0000_0000_0001, DINF = 64'h7800_0000_0000_0000;
  localparam logic [63:0] DNAN = 64'h7c00_0000_0000_0000, DZERO = 64'h2238_0000_0000_0000;
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
    t(1, 0, ONE, ONE, ONE, 0, 0, 0, "finite");
    t(1, 0, INF, ZERO, ONE, 1, NAN, 1, "inf*0");
    t(1, 0, ZERO, INF, NAN | 64'd5, 1, NAN | 64'd5, 1, "0*inf+qnan");
    t(1, 0, INF, ONE, INF | 64'h8000_0000_0000_0000, 1, NAN, 1, "inf-inf");
    t(1, 1, INF, ONE, INF, 1, NAN, 1, "inf-inf via op");
    t(1, 0, INF, ONE, INF, 1, INF, 0, "inf+inf");
    t(1, 0, INF | 64'h8000_0000_0000_0000, ONE, ONE, 1, INF | 64'h8000_0000_0000_0000, 0, "-inf");
    t(1, 1, ONE, ONE, INF, 1, INF | 64'h8000_0000_0000_0000, 0, "1-inf");
    t(1, 0, ONE, NAN | 64'd7, NAN | 64'd9, 1, NAN | 64'd7, 0, "first nan");
    t(1, 0, ONE, ONE, INF | 64'd3, 1, NAN | 64'd3, 1, "snan quieted");
    t(0, 0, DONE, DONE, DONE, 0, 0, 0, "dec finite");
    t(0, 0, DINF, DZERO, DONE, 1, DNAN, 1, "dec inf*0");
    t(0, 1, DINF, DONE, DINF, 1, DNAN, 1, "dec inf-inf");
    t(0, 0, DONE, DINF, DONE, 1, DINF, 0, "dec inf");
    t(0, 0, DNAN | 64'd42, DONE, DONE, 1, DNAN | 64'd42, 0, "dec qnan");
    t(0, 0, DONE, 64'h7e00_0000_0000_0011, DONE, 1, DNAN | 64'h11, 1, "dec snan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
