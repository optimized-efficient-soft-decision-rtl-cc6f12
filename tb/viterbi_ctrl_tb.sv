// viterbi_ctrl_tb: self-check of the decoder sequencer.
// in_valid is driven with random gaps, with long runs so that packets also
// follow back to back. A model kept here counts accepted pairs; each clock
// the outputs must match it: acs_en = in_valid, first on the first pair of
// each 38-pair packet, lifo_read_en one clock after each accepted pair and
// lifo_load two clocks after the 38th pair of a packet.
module viterbi_ctrl_tb;
  localparam int LEN = 38;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic acs_en, first, lifo_read_en, lifo_load;
  int checks = 0, failures = 0, loads = 0, b2b = 0;

  viterbi_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int count = 0;        // pairs accepted so far
    logic v1 = 0, v2 = 0, l1 = 0, l2 = 0;   // in_valid / last-pair history
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = (i < 2000) ? ($urandom_range(9, 0) != 0) : 1'b1;
      #1;
      checks += 4;
      if (acs_en !== in_valid) begin failures++; $display("FAIL acs_en %0d", i); end
      if (first !== (count % LEN == 0)) begin failures++; $display("FAIL first %0d", i); end
      if (lifo_read_en !== v1) begin failures++; $display("FAIL read_en %0d", i); end
      if (lifo_load !== (v2 && l2)) begin failures++; $display("FAIL load %0d", i); end
      if (lifo_load) begin loads++; if (lifo_read_en) b2b++; end
      v2 = v1; l2 = l1;
      v1 = in_valid; l1 = in_valid && (count % LEN == LEN - 1);
      if (in_valid) count++;
    end
    checks++;
    if (loads < 10 || b2b == 0) begin failures++; $display("FAIL coverage loads=%0d b2b=%0d", loads, b2b); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
