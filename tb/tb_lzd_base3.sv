// Self-checking testbench for lzd_base3 (324 bits): random vectors with a
// random number of leading zeros; the binary count and the count formed
// from the one-hot top-level selection (81 bits per step) plus the four
// base-3 digits must both agree with a linear scan.
module tb_lzd_base3;
  logic [323:0] x;
  logic [2:0]   top;
  logic [7:0]   digits;
  logic [10:0]  lzc_bin;
  logic         valid;
  lzd_base3 #(.LEVELS(3)) dut (.x, .top, .digits, .lzc_bin, .valid);
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
      int z, rz, dv, p;
      for (int i = 0; i < 324; i += 32) x[i +: 32] = $urandom;
      z = int'($urandom % 325);
      x = (z == 324) ? '0 : (x >> z) | (324'(1) << (323 - z));
      rz = 324;
      for (int i = 0; i < 324; i++) if (x[i]) rz = 323 - i;
      #1;
      dv = 0; p = 1;
      for (int i = 0; i < 4; i++) begin dv += int'(digits[2*i +: 2]) * p; p *= 3; end
      chk(valid === (x !== 0) && (x === 0 || (int'(lzc_bin) === rz && dv + 81 * (top[2] ? 3 : top[1] ? 2 : top[0] ? 1 : 0) === rz)),
          $sformatf("z=%0d lzc=%0d digits=%0d", rz, lzc_bin, dv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
