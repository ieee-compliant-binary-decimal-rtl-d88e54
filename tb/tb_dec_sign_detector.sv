// Self-checking testbench for dec_sign_detector at full width: random BCD
// pairs, pairs that differ in a single random digit, and equal pairs are
// compared; gt and eq must match the numeric comparison.
module tb_dec_sign_detector;
  localparam int N = 101;
  logic [4*N-1:0] a, b;
  logic gt, eq;
  dec_sign_detector #(.NDIG(N)) dut (.a, .b, .gt, .eq);
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
      logic rgt;
      int k;
      for (int i = 0; i < N; i++) begin a[4*i +: 4] = 4'($urandom % 10); b[4*i +: 4] = 4'($urandom % 10); end
      if (n % 3 != 0) begin
        b = a;
        k = int'($urandom % N);
        if (n % 3 == 1) b[4*k +: 4] = 4'($urandom % 10);
      end
      rgt = 1'b0;
      for (int i = 0; i < N; i++)
        if (a[4*i +: 4] != b[4*i +: 4]) rgt = a[4*i +: 4] > b[4*i +: 4];
      #1 chk(eq === (a === b) && gt === rgt, $sformatf("vector %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
