// Self-checking testbench of bd_multiplier.
// Random and corner decimal and binary significands; the three output
// vectors, read as integers in radix 10 or 16 and summed, must equal the
// integer product plus kcarry * R^33. The reference is wide integer
// multiplication, independent of the recoding in the block.
module tb_bd_multiplier;
  logic         bd;
  logic [63:0]  a, b;
  logic [131:0] v1, v2, v3;
  logic [1:0]   kcarry;
  int checks = 0, failures = 0;

  bd_multiplier dut (.bd, .a, .b, .v1, .v2, .v3, .kcarry);

  function automatic logic [139:0] vec_val(input logic [131:0] v, input logic dec);
    logic [139:0] r = '0;
    for (int j = 32; j >= 0; j--) r = r * (dec ? 140'd10 : 140'd16) + 140'(v[4*j +: 4]);
    return r;
  endfunction

  function automatic logic [139:0] bcd_val(input logic [63:0] x);
    logic [139:0] r = '0;
    for (int j = 15; j >= 0; j--) r = r * 140'd10 + 140'(x[4*j +: 4]);
    return r;
  endfunction

  function automatic logic [63:0] rand_bcd();
    logic [63:0] r;
    for (int j = 0; j < 16; j++) r[4*j +: 4] = 4'($urandom_range(0, 9));
    return r;
  endfunction

  task automatic check(input logic dec);
    logic [139:0] want, got, radix33;
    bd = !dec;
    #1;
    radix33 = dec ? 140'd1 : 140'd1;
    for (int j = 0; j < 33; j++) radix33 = radix33 * (dec ? 140'd10 : 140'd16);
    want = dec ? bcd_val(a) * bcd_val(b) : 140'(a[52:0]) * 140'(b[52:0]);
    got  = vec_val(v1, dec) + vec_val(v2, dec) + vec_val(v3, dec) - 140'(kcarry) * radix33;
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 5) $display("FAIL dec=%0d a=%h b=%h got=%h want=%h", dec, a, b, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // decimal corners
    a = 64'h9999999999999999; b = 64'h9999999999999999; check(1);
    a = 64'h0; b = 64'h9999999999999999; check(1);
    a = 64'h1; b = 64'h1; check(1);
    a = 64'h3434343434343434; b = 64'h8989898989898989; check(1);
    for (int n = 0; n < 300; n++) begin a = rand_bcd(); b = rand_bcd(); check(1); end
    // binary corners
    a = {11'd0, {53{1'b1}}}; b = {11'd0, {53{1'b1}}}; check(0);
    a = {11'd0, 1'b1, 52'd0}; b = {11'd0, 1'b1, 52'd0}; check(0);
    a = 64'd1; b = 64'd0; check(0);
    for (int n = 0; n < 300; n++) begin
      a = {11'd0, $urandom(), $urandom()} & 64'h1f_ffff_ffff_ffff;
      b = {11'd0, $urandom(), $urandom()} & 64'h1f_ffff_ffff_ffff;
      check(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
