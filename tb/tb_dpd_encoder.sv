// Self-checking testbench for dpd_encoder: random signs, biased exponents
// and 16-digit coefficients are packed and compared with a reference
// assembly of the decimal64 fields (combination field, exponent
// continuation, five declets).
module tb_dpd_encoder;
  logic        sign;
  logic [9:0]  bexp;
  logic [63:0] sig, res;
  dpd_encoder dut (.sign, .bexp, .sig, .res);
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
      logic [63:0] r;
      sign = 1'($urandom);
      bexp = 10'($urandom % 768);
      sig  = {rbcd3(), rbcd3(), rbcd3(), rbcd3(), rbcd3(), 4'($urandom % 10)};
      if (n % 3 == 0) sig[63:60] = 4'(8 + $urandom % 2);
      if (sig[63:60] < 4'd8) g = {bexp[9:8], sig[62:60]};
      else                 g = {2'b11, bexp[9:8], sig[60]};
      r = {sign, g, bexp[7:0], dpd_enc(sig[59:48]), dpd_enc(sig[47:36]), dpd_enc(sig[35:24]),
           dpd_enc(sig[23:12]), dpd_enc(sig[11:0])};
      #1 chk(res === r, $sformatf("%h %h -> %h exp %h", bexp, sig, res, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
