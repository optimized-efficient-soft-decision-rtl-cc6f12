// squarer_tb: exhaustive self-check of the squaring unit.
// Every 9-bit two's-complement input is applied and the result is compared
// with the integer square worked out in the testbench.
module squarer_tb;
  localparam int W = 9;
  logic signed [W-1:0] x;
  logic [2*W-1:0]      sq;
  int checks = 0, failures = 0;

  squarer #(.W(W)) dut (.x(x), .sq(sq));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -(1 << (W-1)); v < (1 << (W-1)); v++) begin
      int expect_sq;
      x = W'(v);
      #1;
      expect_sq = v * v;
      checks++;
      if (int'(sq) != expect_sq) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d sq=%0d expected %0d", v, sq, expect_sq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
