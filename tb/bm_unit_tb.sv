// bm_unit_tb: self-check of the branch-metric unit.
// Two instances (expected pair (-1,-1) and (+1,-1)) see every value of
// symbol0 against a sweep of symbol1; the result must equal
// (e0 - s0)^2 + (e1 - s1)^2 computed with integers.
module bm_unit_tb;
  logic signed [7:0] s0, s1;
  logic [17:0]       bm_a, bm_b;
  int checks = 0, failures = 0;

  bm_unit dut_a (.symbol0(s0), .symbol1(s1), .bm(bm_a));
  bm_unit #(.EXP0(8'sh7F), .EXP1(8'sh80)) dut_b (.symbol0(s0), .symbol1(s1), .bm(bm_b));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sqdist(input int e0, input int e1, input int r0, input int r1);
    return (e0 - r0) * (e0 - r0) + (e1 - r1) * (e1 - r1);
  endfunction

  initial begin
    for (int v0 = -128; v0 < 128; v0++)
      for (int v1 = -128; v1 < 128; v1 += 5) begin
        s0 = 8'(v0); s1 = 8'(v1);
        #1;
        checks += 2;
        if (int'(bm_a) != sqdist(-128, -128, v0, v1)) begin
          failures++;
          if (failures < 10) $display("FAIL a s0=%0d s1=%0d bm=%0d", v0, v1, bm_a);
        end
        if (int'(bm_b) != sqdist(127, -128, v0, v1)) begin
          failures++;
          if (failures < 10) $display("FAIL b s0=%0d s1=%0d bm=%0d", v0, v1, bm_b);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
