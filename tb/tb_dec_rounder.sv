// Self-checking testbench for dec_rounder at both rounding positions
// (msd_zero = 0: round at the LSD; msd_zero = 1: keep the guard digit too):
// random digits with extra weight on ties and zero round digits, sticky,
// sticky sign and sign, in every mode. The rounded digits, carry out, borrow
// out and inexact flag are compared with an integer reference in which a
// negative sticky counts as slightly less than the digits above it.
module tb_dec_rounder;
  logic [3:0] lsd, gd, rd;
  logic msd_zero, stin, st_sign, sign, cout, bout, inexact;
  logic [2:0] mode;
  logic [7:0] dig_out;
  dec_rounder dut (.lsd, .gd, .rd, .msd_zero, .stin, .st_sign, .sign, .mode, .dig_out, .cout, .bout, .inexact);
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
    for (int mz = 0; mz < 2; mz++)
      for (int m = 0; m < 7; m++)
        for (int n = 0; n < 3000; n++) begin
          int t, rv, half, d, q;
          logic inx, away, tz;
          msd_zero = 1'(mz); mode = 3'(m);
          lsd = 4'($urandom % 10); gd = 4'($urandom % 10); rd = 4'($urandom % 10);
          if (n % 4 == 0) gd = 4'd5;
          if (n % 4 == 1) rd = 4'd0;
          if (n % 8 == 2) begin gd = 4'd0; rd = 4'd5; end
          stin = 1'($urandom); st_sign = 1'($urandom); sign = 1'($urandom);
          if (!msd_zero) begin
            t = int'(lsd);
            rv = 20 * int'(gd) + 2 * int'(rd) + (stin ? (st_sign ? -1 : 1) : 0);   // in 1/200
            half = 100;
            inx = gd != 0 || rd != 0 || stin;
          end else begin
            t = 10 * int'(lsd) + int'(gd);
            rv = 2 * int'(rd) + (stin ? (st_sign ? -1 : 1) : 0);                   // in 1/20
            half = 10;
            inx = rd != 0 || stin;
          end
          away = (m == 1) || (m == 2 && !sign) || (m == 3 && sign);
          tz = (m == 4) || (m == 2 && sign) || (m == 3 && !sign);
          if (rv < 0) d = tz ? -1 : 0;
          else case (m)
            0: d = (rv > half || (rv == half && t % 2 == 1)) ? 1 : 0;
            5: d = (rv >= half) ? 1 : 0;
            6: d = (rv > half) ? 1 : 0;
            default: d = (away && rv > 0) ? 1 : 0;
          endcase
          q = t + d;
          #1;
          if (!msd_zero)
            chk(dig_out[7:4] === 4'((q + 10) % 10) && cout === (q == 10) && bout === (q == -1) && inexact === inx,
                $sformatf("mode=%0d lsd=%0d gd=%0d rd=%0d st=%0d sts=%0d s=%0d -> %0d c=%0d b=%0d", m, lsd, gd, rd,
                          stin, st_sign, sign, dig_out[7:4], cout, bout));
          else
            chk(dig_out === {4'(((q + 100) % 100) / 10), 4'((q + 100) % 10)} && cout === (q == 100)
                && bout === (q == -1) && inexact === inx,
                $sformatf("msd0 mode=%0d lsd=%0d gd=%0d rd=%0d st=%0d sts=%0d s=%0d -> %h c=%0d b=%0d", m, lsd, gd,
                          rd, stin, st_sign, sign, dig_out, cout, bout));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
