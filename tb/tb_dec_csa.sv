// Self-checking testbench for dec_csa at full width: random BCD vectors
// U, T, H and a BCD-4221 vector C are reduced to two BCD vectors; the sum
// of the two outputs must equal U + T + H + C modulo 10^101, computed here
// with a digit-serial BCD adder.
module tb_dec_csa;
  import bdfma_pkg::*;
  localparam int N = 101;
  logic [4*N-1:0] u, t, h, c, s, cy;
  dec_csa #(.NDIG(N)) dut (.u, .t, .h, .c, .s, .cy);
  function automatic logic [4*N-1:0] badd(input logic [4*N-1:0] a, input logic [4*N-1:0] b);
    logic [4*N-1:0] r;
    int carry = 0;
    for (int i = 0; i < N; i++) begin
      int d = int'(a[4*i +: 4]) + int'(b[4*i +: 4]) + carry;
      r[4*i +: 4] = 4'(d % 10);
      carry = d / 10;
    end
    return r;
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
    for (int n = 0; n < 1000; n++) begin
      logic [4*N-1:0] cb, ref_s;
      for (int i = 0; i < N; i++) begin
        u[4*i +: 4] = 4'($urandom % 10); t[4*i +: 4] = 4'($urandom % 10);
        h[4*i +: 4] = 4'($urandom % 10); cb[4*i +: 4] = (n % 4 == 0) ? 4'd9 : 4'($urandom % 10);
        if (n % 4 == 1) begin u[4*i +: 4] = 4'd9; t[4*i +: 4] = 4'd9; h[4*i +: 4] = 4'd9; end
        c[4*i +: 4] = bcd_to_4221(cb[4*i +: 4]);
      end
      ref_s = badd(badd(u, t), badd(h, cb));
      #1 chk(badd(s, cy) === ref_s, $sformatf("vector %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
