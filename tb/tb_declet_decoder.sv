// Self-checking testbench for declet_decoder: every canonical declet
// (encoding of each of the 1000 digit triples) must decode to its digits,
// and the 24 non-canonical declets must decode to the same digits as
// their canonical twin with bits 9:8 cleared.
module tb_declet_decoder;
  logic [9:0]  dpd;
  logic [11:0] bcd;
  declet_decoder dut (.dpd, .bcd);
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
  function automatic logic [9:0] dpd_enc(input logic [11:0] d);
    logic a, b, c, dd, e, f, g, h, i, j, k, m;
    {a, b, c, dd} = d[11:8];
    {e, f, g, h}  = d[7:4];
    {i, j, k, m}  = d[3:0];
    case ({a, e, i})
      3'b000: return {b, c, dd, f, g, h, 1'b0, j, k, m};
      3'b001: return {b, c, dd, f, g, h, 1'b1, 1'b0, 1'b0, m};
      3'b010: return {b, c, dd, j, k, h, 1'b1, 1'b0, 1'b1, m};
      3'b011: return {b, c, dd, 1'b1, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      3'b100: return {j, k, dd, f, g, h, 1'b1, 1'b1, 1'b0, m};
      3'b101: return {f, g, dd, 1'b0, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
      3'b110: return {j, k, dd, 1'b0, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      default: return {1'b0, 1'b0, dd, 1'b1, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
    endcase
  endfunction
  function automatic logic [11:0] rbcd3();
    return {4'($urandom % 10), 4'($urandom % 10), 4'($urandom % 10)};
  endfunction
  initial begin
    logic [11:0] d;
    for (int v = 0; v < 1000; v++) begin
      d = {4'(v / 100), 4'((v / 10) % 10), 4'(v % 10)};
      dpd = dpd_enc(d);
      #1 chk(bcd === d, $sformatf("%h -> %h exp %h", dpd, bcd, d));
    end
    for (int v = 0; v < 1024; v++) begin
      logic [11:0] ref_d;
      dpd = 10'(v);
      if (dpd[3:1] == 3'b111 && dpd[6:5] == 2'b11 && dpd[9:8] != 2'b00) begin
        #1 ref_d = bcd;
        dpd[9:8] = 2'b00;
        #1 chk(bcd === ref_d, $sformatf("non-canonical %h", v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
