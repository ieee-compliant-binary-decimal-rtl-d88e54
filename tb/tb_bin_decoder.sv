// Self-checking testbench for bin_decoder: random binary64 operands of
// every class (normal, subnormal, zero, infinity, quiet and signalling
// NaN) are decoded and the sign, effective biased exponent, significand
// with hidden bit and class flags are compared with the field slicing.
module tb_bin_decoder;
  import bdfma_pkg::*;
  logic [63:0] op;
  operand_t    dec;
  bin_decoder dut (.op, .dec);
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
    for (int n = 0; n < 4000; n++) begin
      logic [10:0] e;
      logic [51:0] f;
      logic nan, inf, zero;
      e = 11'($urandom);
      f = {20'($urandom), 32'($urandom)};
      case (n % 6)
        0: e = 0;
        1: begin e = 0; f = 0; end
        2: e = 11'h7ff;
        3: begin e = 11'h7ff; f = 0; end
        default: ;
      endcase
      op = {1'($urandom), e, f};
      nan = (e == 11'h7ff) && f != 0; inf = (e == 11'h7ff) && f == 0; zero = (e == 0) && f == 0;
      #1 chk(dec.sign === op[63] && dec.is_nan === nan && dec.is_inf === inf && dec.is_zero === zero
             && (nan ? dec.is_snan === !f[51] : 1'b1)
             && (nan || inf || zero || (dec.sig === 64'({e !== 0, f}) && dec.bexp === ((e === 0) ? 11'd1 : e))),
             $sformatf("op %h", op));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
