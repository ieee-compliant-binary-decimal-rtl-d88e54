// Self-checking testbench for sticky_detector (N = 20): random
// signed-digit vectors and masks; sticky must flag a nonzero masked digit
// and st_sign the sign of the value formed by the masked digits.
module tb_sticky_detector;
  localparam int N = 20;
  logic [4*N-1:0] x;
  logic [N-1:0] mask;
  logic sticky, st_sign;
  sticky_detector #(.N(N)) dut (.x, .mask, .sticky, .st_sign);
  // numeric value of a vector of signed 4-bit redundant digits
  function automatic logic signed [127:0] rval(input logic [4*24-1:0] v, input int n, input int radix);
    logic signed [127:0] acc = 0;
    for (int i = n - 1; i >= 0; i--) acc = acc * radix + 128'(signed'(v[4*i +: 4]));
    return acc;
  endfunction
  function automatic logic signed [127:0] uval(input logic [4*24-1:0] v, input int n, input int radix);
    logic signed [127:0] acc = 0;
    for (int i = n - 1; i >= 0; i--) acc = acc * radix + 128'(v[4*i +: 4]);
    return acc;
  endfunction
  function automatic logic signed [127:0] pw(input int radix, input int n);
    logic signed [127:0] p = 1;
    for (int i = 0; i < n; i++) p = p * radix;
    return p;
  endfunction
  function automatic logic [3:0] rdig(input logic bd);
    return bd ? 4'($urandom % 8) : 4'($urandom % 10);
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
    for (int n = 0; n < 4000; n++) begin
      logic [4*N-1:0] xm;
      logic signed [127:0] v;
      int k;
      for (int i = 0; i < N; i++) begin
        x[4*i +: 4] = 4'(int'($urandom % 13) - 6);
        if ($urandom % 3 == 0) x[4*i +: 4] = 4'd0;
      end
      k = int'($urandom % (N + 1));
      mask = (n % 2) ? ~('1 << k) : N'($urandom);
      for (int i = 0; i < N; i++) xm[4*i +: 4] = mask[i] ? x[4*i +: 4] : 4'd0;
      v = rval(96'(xm), N, 10);
      #1 chk(sticky === (v !== 0) && (v === 0 || st_sign === (v < 0)), $sformatf("x=%h mask=%h", x, mask));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
