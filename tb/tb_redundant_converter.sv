// Self-checking testbench for redundant_converter (ND = 20): random
// signed-digit vectors (digits in [-6, 6]) and a borrow input are converted;
// the BCD / octal result must equal (value - borrow) modulo R^ND and the
// borrow output must flag a negative difference. Runs of zero digits are
// included so that borrows must propagate far.
module tb_redundant_converter;
  localparam int N = 20;
  logic bd, bsel, bout;
  logic [4*N-1:0] x, y;
  redundant_converter #(.ND(N)) dut (.bd, .x, .bsel, .y, .bout);
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
      logic signed [127:0] v, m;
      int radix;
      logic ok;
      bd = 1'(n % 2); bsel = 1'($urandom); radix = bd ? 8 : 10;
      for (int i = 0; i < N; i++) begin
        x[4*i +: 4] = 4'(int'($urandom % 13) - 6);
        if (n % 3 == 0 && $urandom % 4 != 0) x[4*i +: 4] = 4'd0;
      end
      #1;
      v = rval(96'(x), N, radix) - bsel;
      m = v < 0 ? v + pw(radix, N) : v;
      ok = uval(96'(y), N, radix) == m && bout == (v < 0);
      for (int i = 0; i < N; i++) if (y[4*i +: 4] >= radix) ok = 0;
      chk(ok, $sformatf("bd=%0d x=%h bsel=%0d y=%h bout=%0d", bd, x, bsel, y, bout));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
