// Self-checking testbench for to_redundant (ND = 20): random BCD and
// octal vectors with a carry input; the value of the signed-digit result
// must equal the input plus the carry, and every digit must lie in
// [-6, 6].
module tb_to_redundant;
  localparam int N = 20;
  logic bd, cin;
  logic [4*N-1:0] x;
  logic [4*N+3:0] r;
  to_redundant #(.ND(N)) dut (.bd, .x, .cin, .r);
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
      logic ok;
      int radix;
      bd = 1'(n % 2); cin = 1'($urandom); radix = bd ? 8 : 10;
      for (int i = 0; i < N; i++) x[4*i +: 4] = (n % 5 == 0) ? (bd ? 4'd7 : 4'd9) : rdig(bd);
      #1;
      ok = rval(96'(r), N + 1, radix) == uval(96'(x), N, radix) + cin;
      for (int i = 0; i <= N; i++) if (signed'(r[4*i +: 4]) > 6 || signed'(r[4*i +: 4]) < -6) ok = 0;
      chk(ok, $sformatf("bd=%0d x=%h cin=%0d r=%h", bd, x, cin, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
