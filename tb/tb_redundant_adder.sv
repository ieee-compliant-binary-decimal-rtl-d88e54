// Self-checking testbench for redundant_adder (ND = 20): two random
// signed-digit vectors with digits in [-6, 6] and a carry input are added;
// the value of the ND+1 digit result must equal the exact sum and every
// result digit must stay in [-6, 6]. Both radices are exercised.
module tb_redundant_adder;
  localparam int N = 20;
  logic bd, cin;
  logic [4*N-1:0] x, y;
  logic [4*N+3:0] s;
  redundant_adder #(.ND(N)) dut (.bd, .x, .y, .cin, .s);
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
      for (int i = 0; i < N; i++) begin
        x[4*i +: 4] = 4'(int'($urandom % 13) - 6);
        y[4*i +: 4] = 4'(int'($urandom % 13) - 6);
        if (n % 6 == 0) begin x[4*i +: 4] = 4'd6; y[4*i +: 4] = 4'd6; end
        if (n % 6 == 1) begin x[4*i +: 4] = 4'(-6); y[4*i +: 4] = 4'(-6); end
      end
      #1;
      ok = rval(96'(s), N + 1, radix) == rval(96'(x), N, radix) + rval(96'(y), N, radix) + cin;
      for (int i = 0; i <= N; i++) if (signed'(s[4*i +: 4]) > 6 || signed'(s[4*i +: 4]) < -6) ok = 0;
      chk(ok, $sformatf("bd=%0d x=%h y=%h s=%h", bd, x, y, s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
