// lifo_sr_tb: self-check of the flip-flop LIFO.
// Phase 1 follows the plain protocol: DEPTH bits are shifted in, one load
// clock copies them, and shifting out must return them newest first,
// followed by zeros. Phase 2 streams packets back to back: while one packet
// is shifted out, the next one is shifted in, and the load of the next
// packet falls in the clock that reads the last bit of the previous one.
module lifo_sr_tb;
  localparam int D = 38;
  logic clk = 0, din = 0, read_en = 0, write_en = 0, load = 0;
  logic dout;
  int checks = 0, failures = 0;

  lifo_sr #(.DEPTH(D)) dut (.clk, .din, .read_en, .write_en, .load, .dout);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic want, input int tag);
    checks++;
    if (dout !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %0d dout=%b want=%b", tag, dout, want);
    end
  endtask

  initial begin
    logic [D-1:0] pkt, nxt;
    // ---- phase 1: plain protocol, with a pause while filling
    pkt = {$urandom(), $urandom()};
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      read_en = (i != 7); din = pkt[i];
      if (i == 7) begin @(negedge clk); read_en = 1; end
    end
    @(negedge clk);
    read_en = 0; write_en = 1; load = 1;
    @(negedge clk);
    load = 0;
    for (int k = 0; k < D + 3; k++) begin
      expect_out(k < D ? pkt[D-1-k] : 1'b0, k);
      @(negedge clk);
    end
    write_en = 0;
    // ---- phase 2: streaming
    pkt = {$urandom(), $urandom()};
    for (int i = 0; i < D; i++) begin
      read_en = 1; din = pkt[i];
      @(negedge clk);
    end
    for (int p = 0; p < 10; p++) begin
      nxt = {$urandom(), $urandom()};
      // load clock, next packet's first bit shifted in at the same edge
      write_en = 1; load = 1; read_en = 1; din = nxt[0];
      @(negedge clk);
      load = 0;
      for (int k = 0; k < D; k++) begin
        expect_out(pkt[D-1-k], 100 + k);
        if (k < D - 1) begin
          din = nxt[k+1];
          @(negedge clk);
        end
      end
      // the next loop iteration's load clock reads the last bit just checked
      pkt = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
