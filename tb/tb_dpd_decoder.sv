// Self-checking testbench for dpd_decoder: random finite decimal64
// operands (both combination-field forms) are built from their fields and
// the decoded sign, biased exponent, BCD coefficient and class flags are
// compared; infinities, quiet and signalling NaNs and zeros are checked
// directly.
module tb_dpd_decoder;
  import bdfma_pkg::*;
  logic [63:0] op;
  operand_t    dec;
  dpd_decoder dut (.op, .dec);
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
    for (int n = 0; n < 3000; n++) begin
      logic [4:0] g;
      logic [9:0] be;
      logic [63:0] sig;
      logic s;
      s   = 1'($urandom);
      be  = 10'($urandom % 768);
      sig = {rbcd3(), rbcd3(), rbcd3(), rbcd3(), rbcd3(), 4'($urandom % 10)};
      if (n % 3 == 0) sig[63:60] = 4'(8 + $urandom % 2);
      if (n % 50 == 0) sig = '0;
      if (sig[63:60] < 4'd8) g = {be[9:8], sig[62:60]};
      else                 g = {2'b11, be[9:8], sig[60]};
      op = {s, g, be[7:0], dpd_enc(sig[59:48]), dpd_enc(sig[47:36]), dpd_enc(sig[35:24]),
            dpd_enc(sig[23:12]), dpd_enc(sig[11:0])};
      #1 chk(dec.sign === s && dec.bexp === 11'(be) && dec.sig === sig && !dec.is_inf && !dec.is_nan
             && dec.is_zero === (sig === 0), $sformatf("op %h", op));
    end
    op = 64'h7800_0000_0000_0000; #1 chk(dec.is_inf && !dec.is_nan, "inf");
    op = 64'hf800_0000_0000_0000; #1 chk(dec.is_inf && dec.sign, "-inf");
    op = 64'h7c00_0000_0000_0001; #1 chk(dec.is_nan && !dec.is_snan, "qnan");
    op = 64'h7e00_0000_0000_0001; #1 chk(dec.is_nan && dec.is_snan, "snan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
