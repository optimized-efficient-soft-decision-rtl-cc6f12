// pe_tb: self-check of the butterfly processing element.
// Two variants (LABEL 2'b00 and 2'b10) are clocked with random symbols and
// random, mutually close path metrics. After each clock with en high their
// registered metrics and decisions must match a model computed here from
// the squared distances to the expected symbol pairs; with en low the
// registers must hold.
module pe_tb;
  logic clk = 0, en = 0;
  logic signed [7:0] s0, s1;
  logic [17:0] pi0, pi1;
  logic [17:0] a_o0, a_o1, b_o0, b_o1;
  logic        a_d0, a_d1, b_d0, b_d1;
  int checks = 0, failures = 0;

  pe #(.LABEL(2'b00)) dut_a (.clk, .en, .symbol0(s0), .symbol1(s1), .pm_in0(pi0), .pm_in1(pi1),
                             .pm_out0(a_o0), .pm_out1(a_o1), .dec0(a_d0), .dec1(a_d1));
  pe #(.LABEL(2'b10)) dut_b (.clk, .en, .symbol0(s0), .symbol1(s1), .pm_in0(pi0), .pm_in1(pi1),
                             .pm_out0(b_o0), .pm_out1(b_o1), .dec0(b_d0), .dec1(b_d1));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint bmv(input logic [1:0] lab, input int r0, input int r1);
    int e0, e1;
    e0 = lab[0] ? 127 : -128;
    e1 = lab[1] ? 127 : -128;
    return longint'((e0 - r0) * (e0 - r0) + (e1 - r1) * (e1 - r1));
  endfunction

  // expected {pm_out0, dec0, pm_out1, dec1} for a butterfly whose 2j->j branch carries lab
  task automatic model(input logic [1:0] lab, input longint t0, input longint t1,
                       input int r0, input int r1,
                       output logic [17:0] o0, output logic d0,
                       output logic [17:0] o1, output logic d1);
    longint m1, m2;
    m1 = t0 + bmv(lab, r0, r1);  m2 = t1 + bmv(~lab, r0, r1);
    d0 = m1 > m2;  o0 = 18'(d0 ? m2 : m1);
    m1 = t0 + bmv(~lab, r0, r1); m2 = t1 + bmv(lab, r0, r1);
    d1 = m1 > m2;  o1 = 18'(d1 ? m2 : m1);
  endtask

  initial begin
    logic [17:0] ea0, ea1, eb0, eb1, hold;
    logic        fa0, fa1, fb0, fb1;
    for (int i = 0; i < 3000; i++) begin
      longint t0, t1;
      int r0, r1;
      @(negedge clk);
      t0 = longint'($urandom_range(1 << 22, 1 << 20));
      t1 = t0 + longint'($urandom_range(2000, 0)) - 1000;  // keeps |m1 - m2| < 2^17
      r0 = int'($urandom_range(255, 0)) - 128;
      r1 = int'($urandom_range(255, 0)) - 128;
      s0 = 8'(r0); s1 = 8'(r1); pi0 = 18'(t0); pi1 = 18'(t1);
      en = (i % 5 != 4);
      hold = a_o0;
      model(2'b00, t0, t1, r0, r1, ea0, fa0, ea1, fa1);
      model(2'b10, t0, t1, r0, r1, eb0, fb0, eb1, fb1);
      @(posedge clk);
      #1;
      if (en) begin
        checks += 8;
        if (a_o0 !== ea0 || a_d0 !== fa0) begin failures++; $display("FAIL a state j");    end
        if (a_o1 !== ea1 || a_d1 !== fa1) begin failures++; $display("FAIL a state j+32"); end
        if (b_o0 !== eb0 || b_d0 !== fb0) begin failures++; $display("FAIL b state j");    end
        if (b_o1 !== eb1 || b_d1 !== fb1) begin failures++; $display("FAIL b state j+32"); end
      end else begin
        checks++;
        if (a_o0 !== hold) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
