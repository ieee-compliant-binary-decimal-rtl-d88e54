// End-to-end self-checking testbench for the binary64 / decimal64 FMA.
//
// Random operands are checked against an integer reference model written
// independently of the design: the exact value of A*B +/- C is formed with
// 128-bit integers (operand exponents are kept close enough that it fits),
// rounded to 16 digits / 53 bits in every one of the seven rounding
// directions, and encoded with a small DPD encoder written here. Binary
// round-to-nearest results are also checked against the simulator's own
// double arithmetic. Directed cases cover NaN propagation, invalid
// operations, infinities, overflow (both to infinity and to the largest
// finite number), the decimal exponent clamp, subnormal results and the
// underflow flag, and the sign of exact zero results. The addition and
// multiplication operation selects are checked with the same reference
// (B = 1, or C = a zero of the product's sign and the largest exponent).
// Each mechanism that a check exercised is counted and reported.
module tb_bd_fma;
  import bdfma_pkg::*;

  logic        bd, op;
  logic [1:0]  opsel = 2'b00;
  logic [2:0]  rnd_mode;
  logic [63:0] opa, opb, opc, result;
  logic [4:0]  flags;

  bd_fma dut (.bd, .op, .opsel, .rnd_mode, .opa, .opb, .opc, .result, .flags);

  int checks = 0, failures = 0;
  int n_bin = 0, n_dec = 0, n_effsub = 0, n_negint = 0, n_incr = 0, n_inexact = 0;
  int n_kcarry = 0, n_zero = 0, n_special = 0, n_invalid = 0, n_ovf = 0, n_unf = 0;
  int n_clamp = 0, n_subn = 0, n_far = 0, n_real = 0, n_add = 0, n_mul = 0;
  int n_mode[8];

  initial begin
    #50_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---------------- reference helpers ----------------
  function automatic logic [9:0] dpd_enc(input logic [11:0] d);
    logic a, b, c, dd, e, f, g, h, i, j, k, m;
    {a, b, c, dd} = d[11:8];
    {e, f, g, h}  = d[7:4];
    {i, j, k, m}  = d[3:0];
    case ({a, e, i})
      3'b000: return {b, c, dd, f, g, h, 1'b0, j, k, m};
      3'b001: return {b, c, dd, f, g, h, 1'b1, 1'b0, 1'b0, m};
      3'b010: return {b, c, dd, j, k, h, 1'b1, 1'b0, 1'b1, m};
      3'b011: return {b, c, dd, 1'b1, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      3'b100: return {j, k, dd, f, g, h, 1'b1, 1'b1, 1'b0, m};
      3'b101: return {f, g, dd, 1'b0, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
      3'b110: return {j, k, dd, 1'b0, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      default: return {1'b0, 1'b0, dd, 1'b1, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
    endcase
  endfunction

  function automatic logic [63:0] to_bcd(input logic [127:0] v);
    logic [63:0] r = '0;
    for (int i = 0; i < 16; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  function automatic logic [63:0] dec_enc(input logic s, input int q, input logic [127:0] coef);
    logic [63:0] bcd = to_bcd(coef);
    logic [9:0]  be = 10'(q + 398);
    logic [4:0]  g;
    if (bcd[63:60] < 4'd8) g = {be[9:8], bcd[62:60]};
    else                   g = {2'b11, be[9:8], bcd[60]};
    return {s, g, be[7:0], dpd_enc(bcd[59:48]), dpd_enc(bcd[47:36]), dpd_enc(bcd[35:24]),
            dpd_enc(bcd[23:12]), dpd_enc(bcd[11:0])};
  endfunction

  function automatic logic [127:0] pow(input int radix, input int n);
    logic [127:0] p = 1;
    for (int i = 0; i < n; i++) p = p * 128'(radix);
    return p;
  endfunction

  function automatic int ndig(input logic [127:0] v, input int radix);
    int n = 0;
    while (v != 0) begin v = v / 128'(radix); n++; end
    return n;
  endfunction

  // round mag / radix^r to an integer in direction mode
  function automatic logic [127:0] rnd(input logic [127:0] mag, input int r, input int radix,
                                       input logic [2:0] mode, input logic s, output logic inx);
    logic [127:0] pw, q, rem, half;
    logic up;
    pw = pow(radix, r);
    q = mag / pw; rem = mag % pw; half = pw / 2;
    inx = (rem != 0);
    case (mode)
      3'b000: up = (rem > half) || (rem == half && rem != 0 && q[0]);
      3'b001: up = inx;
      3'b010: up = inx && !s;
      3'b011: up = inx && s;
      3'b101: up = (rem >= half) && inx;
      3'b110: up = (rem > half);
      default: up = 1'b0;
    endcase
    return q + 128'(up);
  endfunction

  task automatic check(input logic [63:0] exp_res, input logic [4:0] exp_flags, input string what);
    #1;
    checks++;
    if (result !== exp_res || flags !== exp_flags) begin
      failures++;
      if (failures < 12)
        $display("FAIL %s bd=%0d op=%0d mode=%0d a=%h b=%h c=%h got %h/%b exp %h/%b", what, bd, op,
                 rnd_mode, opa, opb, opc, result, flags, exp_res, exp_flags);
    end
    if (dut.kcarry != 2'd0) n_kcarry++;
    if (exp_flags[4]) n_invalid++;
    if (exp_flags[2]) n_ovf++;
    if (exp_flags[1]) n_unf++;
    if (exp_flags[0]) n_inexact++;
  endtask

  // ---------------- random binary ----------------
  task automatic rand_bin(input int dlim, input logic czero);
    logic [52:0] ma, mb, mc;
    int ea, eb, ec, qm, qc, qmn, r, nd, qres;
    logic sa, sb, sc, sm, sceff, s, inx;
    logic signed [127:0] x;
    logic [127:0] mag, cf;
    logic [63:0] er;
    bd = 1; op = 1'($urandom); rnd_mode = 3'($urandom % 7);
    ma = {1'b1, 52'($urandom) << 20 | 52'($urandom)};
    mb = {1'b1, 52'($urandom) << 20 | 52'($urandom)};
    mc = {1'b1, 52'($urandom) << 20 | 52'($urandom)};
    if ($urandom % 3 == 0) ma[25:0] = '0;                  // short significands
    if ($urandom % 3 == 0) mb[30:0] = '0;
    sa = 1'($urandom); sb = 1'($urandom); sc = 1'($urandom);
    ea = 1023 + int'($urandom % 200) - 100;
    eb = 1023 + int'($urandom % 200) - 100;
    opb = {sb, 11'(eb), mb[51:0]};                        // raw B, ignored for addition
    if (opsel == 2'b01) begin mb = 53'(1) << 52; eb = 1023; sb = 1'b0; end
    qm = (ea - 1075) + (eb - 1075);
    qc = qm + int'($urandom % (2 * dlim + 1)) - dlim;
    ec = qc + 1075;
    if (czero) mc = '0;
    opa = {sa, 11'(ea), ma[51:0]};
    if (opsel != 2'b01) opb = {sb, 11'(eb), mb[51:0]};
    opc = czero ? {sc, 63'd0} : {sc, 11'(ec), mc[51:0]};
    if (opsel == 2'b10) begin mc = '0; qc = qm; sc = sa ^ sb ^ op; end
    sm = sa ^ sb; sceff = sc ^ op;
    qmn = (qc < qm) ? qc : qm;
    x = 128'(ma) * 128'(mb) << (qm - qmn);
    x = sm ? -x : x;
    x = sceff ? x - (128'(mc) << (qc - qmn)) : x + (128'(mc) << (qc - qmn));
    s = x < 0;
    mag = s ? -x : x;
    n_bin++; n_mode[rnd_mode]++;
    if (sm != sceff && !czero) n_effsub++;
    if (sm != sceff && s != sm) n_negint++;
    if (mag == 0) begin
      n_zero++;
      er = {(sm == sceff) ? sm : (rnd_mode == 3'b011), 63'd0};
      check(er, 5'b0, "bin zero");
      return;
    end
    nd = ndig(mag, 2);
    r = (nd > 53) ? nd - 53 : 0;
    cf = rnd(mag, r, 2, rnd_mode, s, inx);
    if (cf != mag >> r) n_incr++;
    if (cf[53]) begin cf = cf >> 1; r++; end
    if (!cf[52]) begin cf = cf << (53 - ndig(cf, 2)); end  // exact short results
    qres = qmn + r;
    er = {s, 11'(qres + 1075 + (53 - ndig(mag >> r, 2) > 0 && !inx ? 0 : 0)), 52'(cf)};
    // recompute exactly for the normalized coefficient
    begin
      int sh = 53 - ndig(rnd(mag, r, 2, rnd_mode, s, inx), 2);
      if (sh > 0) er = {s, 11'(qres - sh + 1075), 52'(cf)};
      else        er = {s, 11'(qres + 1075), 52'(cf)};
    end
    check(er, {4'b0, inx}, "bin random");
    if (rnd_mode == 3'b000 && opsel == 2'b00) begin
      real ra, rb, rc, rr;
      ra = $bitstoreal(opa); rb = $bitstoreal(opb); rc = $bitstoreal(opc);
      if (ma[25:0] == 0 && mb[26:0] == 0) begin    // product exact in double
        rr = op ? ra * rb - rc : ra * rb + rc;
        n_real++;
        checks++;
        if (result !== $realtobits(rr) && !(rr == 0.0)) begin
          failures++;
          $display("FAIL real a=%h b=%h c=%h got %h exp %h", opa, opb, opc, result, $realtobits(rr));
        end
      end
    end
  endtask

  // ---------------- random decimal ----------------
  function automatic logic [127:0] rcoef();
    int len = 1 + int'($urandom % 16);
    logic [127:0] v = 0;
    for (int i = 0; i < len; i++) v = v * 10 + 128'($urandom % 10);
    if ($urandom % 4 == 0) v = pow(10, 16) - 1 - 128'($urandom % 3);
    return v;
  endfunction

  task automatic rand_dec(input int dlim, input int ebase);
    logic [127:0] ca, cb, cc, mag, cf;
    int qa, qb, qc, qm, qmn, r, nd, qres, lim;
    logic sa, sb, sc, sm, sceff, s, inx;
    logic signed [127:0] x;
    logic [63:0] er;
    bd = 0; op = 1'($urandom); rnd_mode = 3'($urandom % 7);
    ca = rcoef(); cb = rcoef(); cc = rcoef();
    if ($urandom % 16 == 0) cc = 0;
    if ($urandom % 16 == 0) ca = 0;
    sa = 1'($urandom); sb = 1'($urandom); sc = 1'($urandom);
    qa = ebase + int'($urandom % 60) - 30;
    qb = int'($urandom % 60) - 30;
    qm = qa + qb;
    qc = qm + int'($urandom % (2 * dlim + 1)) - dlim;
    opa = dec_enc(sa, qa, ca); opb = dec_enc(sb, qb, cb); opc = dec_enc(sc, qc, cc);
    if (opsel == 2'b01) begin cb = 1; qb = 0; sb = 1'b0; qm = qa; qc = qm + int'($urandom % (2 * dlim + 1)) - dlim; opc = dec_enc(sc, qc, cc); end
    if (opsel == 2'b10) begin cc = 0; qc = 369; sc = sa ^ sb ^ op; end
    sm = sa ^ sb; sceff = sc ^ op;
    qmn = (qc < qm) ? qc : qm;
    x = ca * cb * pow(10, qm - qmn);
    x = sm ? -x : x;
    x = sceff ? x - cc * pow(10, qc - qmn) : x + cc * pow(10, qc - qmn);
    s = x < 0;
    mag = s ? -x : x;
    n_dec++; n_mode[rnd_mode]++;
    if (sm != sceff && cc != 0 && ca * cb != 0) n_effsub++;
    if (sm != sceff && s != sm) n_negint++;
    if (mag == 0) begin
      n_zero++;
      er = dec_enc((sm == sceff) ? sm : (rnd_mode == 3'b011), qmn, 0);
      check(er, 5'b0, "dec zero");
      return;
    end
    nd = ndig(mag, 10);
    r = (nd > 16) ? nd - 16 : 0;
    lim = -398 - qmn;                                  // not reached with these ranges
    if (lim > r) r = lim;
    cf = rnd(mag, r, 10, rnd_mode, s, inx);
    if (cf != mag / pow(10, r)) n_incr++;
    if (cf == pow(10, 16)) begin cf = cf / 10; r++; end
    qres = qmn + r;
    check(dec_enc(s, qres, cf), {4'b0, inx}, "dec random");
  endtask

  localparam logic [63:0] BONE  = 64'h3ff0_0000_0000_0000;
  localparam logic [63:0] BMAX  = 64'h7fef_ffff_ffff_ffff;
  localparam logic [63:0] BINF  = 64'h7ff0_0000_0000_0000;
  localparam logic [63:0] BQNAN = 64'h7ff8_0000_0000_0000;

  task automatic setop(input logic b_d, input logic o, input logic [2:0] m,
                       input logic [63:0] x, input logic [63:0] y, input logic [63:0] z);
    bd = b_d; op = o; rnd_mode = m; opa = x; opb = y; opc = z;
  endtask

  initial begin
    // ---------- directed binary ----------
    setop(1, 0, 0, BINF, 64'd0, BONE);              check(BQNAN, 5'b10000, "inf*0");
    n_special++;
    setop(1, 1, 0, BINF, BONE, BINF);               check(BQNAN, 5'b10000, "inf-inf");
    n_special++;
    setop(1, 0, 0, BINF, BONE, BONE);               check(BINF, 5'b0, "inf+1");
    n_special++;
    setop(1, 0, 0, BONE, BONE, 64'h7ff8_0000_0000_1234); check(64'h7ff8_0000_0000_1234, 5'b0, "qnan c");
    n_special++;
    setop(1, 0, 0, 64'h7ff0_0000_0000_0001, BONE, BONE); check(64'h7ff8_0000_0000_0001, 5'b10000, "snan a");
    n_special++;
    setop(1, 0, 0, BMAX, 64'h4000_0000_0000_0000, 64'd0); check(BINF, 5'b00101, "ovf rne");
    setop(1, 0, 4, BMAX, 64'h4000_0000_0000_0000, 64'd0); check(BMAX, 5'b00101, "ovf rz");
    setop(1, 0, 3, BMAX, 64'h4000_0000_0000_0000, 64'd0); check(BMAX, 5'b00101, "ovf rdn");
    // 2^-1000 * 2^-60 = 2^-1060, subnormal and exact
    setop(1, 0, 0, 64'h0170_0000_0000_0000, 64'h3c30_0000_0000_0000, 64'd0);
    check(64'h0000_0000_0000_4000, 5'b0, "subnormal exact"); n_subn++;
    // (1+2^-52) * 2^-1000 * 2^-60: inexact tiny
    setop(1, 0, 0, 64'h0170_0000_0000_0001, 64'h3c30_0000_0000_0000, 64'd0);
    check(64'h0000_0000_0000_4000, 5'b00011, "subnormal inexact"); n_subn++;
    setop(1, 0, 2, 64'h0170_0000_0000_0001, 64'h3c30_0000_0000_0000, 64'd0);
    check(64'h0000_0000_0000_4001, 5'b00011, "subnormal up"); n_subn++;
    // subnormal operands: 2^-1074 * 2^60 = 2^-1014, and 1 * 2^-1074 + 2^-1074 = 2^-1073
    setop(1, 0, 0, 64'h0000_0000_0000_0001, 64'h43b0_0000_0000_0000, 64'd0);
    check(64'h0090_0000_0000_0000, 5'b0, "subnormal input"); n_subn++;
    setop(1, 0, 0, BONE, 64'h0000_0000_0000_0001, 64'h0000_0000_0000_0001);
    check(64'h0000_0000_0000_0002, 5'b0, "subnormal sum"); n_subn++;
    // 1*1 - 1 = +0 (RNE) and -0 (round down)
    setop(1, 1, 0, BONE, BONE, BONE);               check(64'd0, 5'b0, "zero rne"); n_zero++;
    setop(1, 1, 3, BONE, BONE, BONE);               check(64'h8000_0000_0000_0000, 5'b0, "zero rdn"); n_zero++;
    // 1 * 1 + 2^-60: the far addend only sets sticky
    setop(1, 0, 0, BONE, BONE, 64'h3c30_0000_0000_0000); check(BONE, 5'b00001, "far c rne"); n_far++;
    setop(1, 0, 2, BONE, BONE, 64'h3c30_0000_0000_0000); check(64'h3ff0_0000_0000_0001, 5'b00001, "far c up"); n_far++;
    setop(1, 1, 4, BONE, BONE, 64'h3c30_0000_0000_0000); check(64'h3fef_ffff_ffff_ffff, 5'b00001, "far c rz"); n_far++;
    // 2^-60 * 1 + 1: the far product
    setop(1, 0, 0, 64'h3c30_0000_0000_0000, BONE, BONE); check(BONE, 5'b00001, "far m"); n_far++;
    setop(1, 0, 0, 64'd0, BONE, 64'h4008_0000_0000_0000); check(64'h4008_0000_0000_0000, 5'b0, "zero product"); n_zero++;

    // ---------- directed decimal ----------
    setop(0, 0, 0, 64'h7800_0000_0000_0000, dec_enc(0, 0, 0), dec_enc(0, 0, 1));
    check(64'h7c00_0000_0000_0000, 5'b10000, "dec inf*0"); n_special++;
    setop(0, 0, 0, dec_enc(0, 0, 1), dec_enc(0, 0, 1), 64'h7c00_0000_0000_0042);
    check(64'h7c00_0000_0000_0042, 5'b0, "dec qnan"); n_special++;
    setop(0, 0, 0, 64'h7800_0000_0000_0000, dec_enc(0, 0, 1), dec_enc(1, 0, 1));
    check(64'h7800_0000_0000_0000, 5'b0, "dec inf"); n_special++;
    setop(0, 0, 0, 64'h2238_0000_0000_0001, 64'h2238_0000_0000_0001, 64'h2238_0000_0000_0001);
    check(64'h2238_0000_0000_0002, 5'b0, "1*1+1");
    setop(0, 0, 0, dec_enc(0, 369, 1), dec_enc(0, 1, 1), dec_enc(0, 369, 0));
    check(dec_enc(0, 369, 10), 5'b0, "top exponent"); n_clamp++;
    setop(0, 0, 0, dec_enc(0, 369, 1), dec_enc(0, 1, 1), dec_enc(0, 0, 0));
    check(dec_enc(0, 355, pow(10, 15)), 5'b0, "preferred exponent"); n_clamp++;
    setop(0, 0, 0, dec_enc(0, 369, pow(10, 16) - 1), dec_enc(0, 1, 1), dec_enc(0, 0, 0));
    check(64'h7800_0000_0000_0000, 5'b00101, "dec ovf");
    setop(0, 0, 4, dec_enc(1, 369, pow(10, 16) - 1), dec_enc(0, 1, 1), dec_enc(0, 0, 0));
    check(dec_enc(1, 369, pow(10, 16) - 1), 5'b00101, "dec ovf rz");
    setop(0, 0, 0, dec_enc(0, -398, 5), dec_enc(0, -1, 1), dec_enc(0, 0, 0));
    check(dec_enc(0, -398, 0), 5'b00011, "dec underflow to zero"); n_subn++;
    setop(0, 0, 0, dec_enc(0, -398, 15), dec_enc(0, -1, 1), dec_enc(0, 0, 0));
    check(dec_enc(0, -398, 2), 5'b00011, "dec underflow tie"); n_subn++;
    setop(0, 0, 0, dec_enc(0, -390, 7), dec_enc(0, -4, 1), dec_enc(0, 0, 0));
    check(dec_enc(0, -394, 7), 5'b0, "dec tiny exact"); n_subn++;
    setop(0, 1, 3, dec_enc(0, 5, 12), dec_enc(0, -2, 10), dec_enc(0, 4, 12));
    check(dec_enc(1, 3, 0), 5'b0, "dec zero rdn"); n_zero++;
    setop(0, 0, 0, dec_enc(0, 0, 1), dec_enc(0, 0, 1), dec_enc(0, 60, 1));
    check(dec_enc(0, 45, pow(10, 15)), 5'b00001, "dec far c"); n_far++;
    setop(0, 0, 0, dec_enc(0, 60, 1), dec_enc(0, 0, 1), dec_enc(0, 0, 1));
    check(dec_enc(0, 45, pow(10, 15)), 5'b00001, "dec far m"); n_far++;

    // ---------- random ----------
    for (int i = 0; i < 3000; i++) rand_bin(12, $urandom % 20 == 0);
    for (int i = 0; i < 1000; i++) rand_bin(18, 0);
    for (int i = 0; i < 3000; i++) rand_dec(4, 0);
    for (int i = 0; i < 500; i++)  rand_dec(4, 300);

    opsel = 2'b01;
    for (int i = 0; i < 500; i++) begin rand_bin(12, 0); n_add++; end
    for (int i = 0; i < 500; i++) begin rand_dec(4, 0); n_add++; end
    opsel = 2'b10;
    for (int i = 0; i < 500; i++) begin rand_bin(12, 0); n_mul++; end
    for (int i = 0; i < 500; i++) begin rand_dec(4, 0); n_mul++; end
    opsel = 2'b00;
    $display("mechanisms: addition=%0d multiplication=%0d", n_add, n_mul);
    $display("mechanisms: binary=%0d decimal=%0d effective_subtraction=%0d negative_intermediate=%0d",
             n_bin, n_dec, n_effsub, n_negint);
    $display("mechanisms: rounding_increment=%0d inexact=%0d product_sign_extension=%0d exact_zero=%0d",
             n_incr, n_inexact, n_kcarry, n_zero);
    $display("mechanisms: special=%0d invalid=%0d overflow=%0d underflow=%0d clamp=%0d subnormal=%0d far_operand=%0d real_crosscheck=%0d",
             n_special, n_invalid, n_ovf, n_unf, n_clamp, n_subn, n_far, n_real);
    for (int m = 0; m < 7; m++) $display("mechanisms: rounding_mode_%0d=%0d", m, n_mode[m]);
    // every mechanism must have happened at least once
    foreach (n_mode[m]) if (m < 7 && n_mode[m] == 0) failures++;
    if (n_bin == 0 || n_dec == 0 || n_effsub == 0 || n_negint == 0 || n_incr == 0 || n_inexact == 0 ||
        n_kcarry == 0 || n_zero == 0 || n_special == 0 || n_invalid == 0 || n_ovf == 0 || n_unf == 0 ||
        n_clamp == 0 || n_subn == 0 || n_far == 0 || n_real == 0 || n_add == 0 || n_mul == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
