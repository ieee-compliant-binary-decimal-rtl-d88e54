// Self-checking testbench for redundant_complementer (ND = 20): with neg
// set the value of the output must be the negated input value, with neg
// clear the input must pass unchanged.
module tb_redundant_complementer;
  localparam int N = 20;
  logic neg;
  logic [4*N-1:0] x, y;
  redundant_complementer #(.ND(N)) dut (.neg, .x, .y);
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
    for (int n = 0; n < 2000; n++) begin
      neg = 1'($urandom);
      for (int i = 0; i < N; i++) x[4*i +: 4] = 4'(int'($urandom % 13) - 6);
      #1 chk(rval(96'(y), N, 10) === (neg ? -rval(96'(x), N, 10) : rval(96'(x), N, 10)),
             $sformatf("neg=%0d x=%h y=%h", neg, x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
