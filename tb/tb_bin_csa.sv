// Self-checking testbench for bin_csa at full width: the two outputs of
// the 4:2 carry-save adder must add up to the sum of the four inputs
// modulo 2^273, for random and all-ones vectors.
module tb_bin_csa;
  localparam int N = 273;
  logic [N-1:0] b1, b2, b3, c, s, cy;
  bin_csa #(.NB(N)) dut (.b1, .b2, .b3, .c, .s, .cy);
  function automatic logic [N-1:0] rv();
    logic [N-1:0] r;
    for (int i = 0; i < N; i += 32) r[i +: 32] = $urandom;
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
    for (int n = 0; n < 2000; n++) begin
      b1 = rv(); b2 = rv(); b3 = rv(); c = rv();
      if (n % 5 == 0) begin b1 = '1; b2 = '1; end
      #1 chk(s + cy === b1 + b2 + b3 + c, $sformatf("vector %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
