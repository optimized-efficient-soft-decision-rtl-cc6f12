// mod_cmp_tb: self-check of the modulo-normalization comparator.
// Pairs of 18-bit metrics are made from a random base value and a random
// true difference d with |d| < 2^17; both are reduced modulo 2^18, so many
// pairs straddle a wrap-around. z must be 1 exactly when d <= 0 (m1 is the
// smaller or equal true value).
module mod_cmp_tb;
  localparam int W = 18;
  logic [W-1:0] m1, m2;
  logic         z;
  int checks = 0, failures = 0, straddles = 0;

  mod_cmp #(.W(W)) dut (.m1(m1), .m2(m2), .z(z));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40000; i++) begin
      int base, d;
      base = int'($urandom_range((1 << W) - 1, 0));
      case (i % 4)
        0: d = -int'($urandom_range((1 << (W-1)) - 1, 0));
        1: d = int'($urandom_range(2 * ((1 << (W-1)) - 1), 0)) - ((1 << (W-1)) - 1);
        2: d = int'($urandom_range(8, 0)) - 4;
        default: d = 0;
      endcase
      m2 = W'(base);
      m1 = W'(base + d);
      #1;
      if (m1[W-1] != m2[W-1]) straddles++;
      checks++;
      if (z !== (d <= 0)) begin
        failures++;
        if (failures < 10) $display("FAIL m1=%h m2=%h d=%0d z=%b", m1, m2, d, z);
      end
    end
    checks++;
    if (straddles == 0) begin failures++; $display("FAIL no straddling pair"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
