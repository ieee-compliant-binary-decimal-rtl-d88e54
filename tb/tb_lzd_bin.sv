// Self-checking testbench for lzd_bin (N = 128): random vectors with a
// random number of leading zeros, single-bit vectors and the all-zero
// vector; the count and the valid flag are compared with a linear scan.
module tb_lzd_bin;
  logic [127:0] x;
  logic [6:0]   lzc;
  logic         valid;
  lzd_bin #(.N(128)) dut (.x, .lzc, .valid);
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
      int z, rz;
      for (int i = 0; i < 128; i += 32) x[i +: 32] = $urandom;
      z = int'($urandom % 129);
      x = (z == 128) ? '0 : (x >> z) | (128'(1) << (127 - z));
      if (n % 7 == 0 && z < 128) x = 128'(1) << (127 - z);
      rz = 128;
      for (int i = 0; i < 128; i++) if (x[i]) rz = 127 - i;
      #1 chk(valid === (x !== 0) && (x === 0 || int'(lzc) === rz), $sformatf("x=%h lzc=%0d exp %0d", x, lzc, rz));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
