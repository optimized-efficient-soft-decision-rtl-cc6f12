// acs_tb: self-check of the add-compare-select unit.
// True (unbounded) path metrics are drawn so that the two candidate sums
// differ by less than 2^17; the unit sees them modulo 2^18. The surviving
// metric must be the smaller true sum modulo 2^18, and the decision bit must
// be 0 when the 0-input candidate wins (ties included) and 1 otherwise.
module acs_tb;
  logic [17:0] pm0, pm1, bm0, bm1, pm_out;
  logic        dec;
  int checks = 0, failures = 0, ones = 0, ties = 0;

  acs dut (.pm0(pm0), .bm0(bm0), .pm1(pm1), .bm1(bm1), .pm_out(pm_out), .dec(dec));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 30000; i++) begin
      longint t0, t1, b0, b1, d, m1, m2, win;
      t0 = longint'($urandom_range(1 << 22, 1 << 20));
      b0 = longint'($urandom_range(130050, 0));
      b1 = longint'($urandom_range(130050, 0));
      d  = (i % 8 == 0) ? 0 : longint'($urandom_range(2 * 131071, 0)) - 131071;
      t1 = t0 + b0 - b1 + d;                 // m2 - m1 = d
      m1 = t0 + b0;
      m2 = t1 + b1;
      pm0 = 18'(t0); pm1 = 18'(t1); bm0 = 18'(b0); bm1 = 18'(b1);
      #1;
      win = (m1 <= m2) ? m1 : m2;
      if (m1 == m2) ties++;
      if (m1 > m2) ones++;
      checks += 2;
      if (pm_out !== 18'(win)) begin
        failures++;
        if (failures < 10) $display("FAIL pm_out=%h want=%h", pm_out, 18'(win));
      end
      if (dec !== (m1 > m2)) begin
        failures++;
        if (failures < 10) $display("FAIL dec=%b m1=%0d m2=%0d", dec, m1, m2);
      end
    end
    checks++;
    if (ones == 0 || ties == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
