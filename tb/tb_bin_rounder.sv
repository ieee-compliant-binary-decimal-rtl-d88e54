// Self-checking testbench for bin_rounder: every 6-bit input, sticky,
// sticky sign and result sign, in every mode and for the three fine-shift
// rounding positions (bit 3, 2 or 1). The rounded field, carry out, borrow
// out and inexact flag are compared with an integer reference in which a
// negative sticky counts as slightly less than the bits above it.
module tb_bin_rounder;
  logic [5:0] lsbs, lsbs_out;
  logic [1:0] fine;
  logic stin, st_sign, sign, cout, bout, inexact;
  logic [2:0] mode;
  bin_rounder dut (.lsbs, .fine, .stin, .st_sign, .sign, .mode, .lsbs_out, .cout, .bout, .inexact);
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
    for (int fs = 0; fs < 3; fs++)
      for (int m = 0; m < 7; m++)
        for (int v = 0; v < 512; v++) begin
          int sh, t, low, rv, half, d, q;
          logic inx, away, tz;
          fine = 2'(fs); mode = 3'(m);
          {st_sign, sign, stin, lsbs} = 9'(v);
          sh = 3 - fs;                               // rounding position
          t = int'(lsbs) >> sh;
          low = int'(lsbs) & ((1 << sh) - 1);
          half = 1 << sh;                            // in halves of the lowest bit
          rv = 2 * low + (stin ? (st_sign ? -1 : 1) : 0);
          inx = (low != 0) || stin;
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
          #1 chk(lsbs_out === 6'(q << sh) && cout === (q == (1 << (6 - sh))) && bout === (q == -1)
                 && inexact === inx,
                 $sformatf("fine=%0d mode=%0d lsbs=%b st=%0d sts=%0d s=%0d -> %b c=%0d b=%0d", fs, m, lsbs, stin,
                           st_sign, sign, lsbs_out, cout, bout));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
