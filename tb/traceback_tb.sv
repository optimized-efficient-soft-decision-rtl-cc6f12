// traceback_tb: self-check of the trace-back stage.
// The testbench plays the LIFO array: for each packet it draws random
// decision bits for every step and state; after start it presents the newest
// step and moves one step back at each clock with shift high, in butterfly
// slot order (state s at slot 2s for s < 32, 2(s-32)+1 otherwise). The
// output bits must equal a trace from state 0 computed here; the first bit
// must come two clocks after start, the 38 bits on consecutive clocks, and
// out_last must mark the 38th. Some packets start in the last trace clock of
// the previous one, others after a pause.
module traceback_tb;
  localparam int LEN  = 38;
  localparam int NPKT = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [63:0] dec;
  logic shift, out_bit, out_valid, out_last;
  int checks = 0, failures = 0;

  traceback dut (.*);

  always #5 clk = ~clk;

  logic [63:0]    dc   [NPKT][LEN];   // dc[p][t][slot]
  logic [LEN-1:0] want [NPKT];
  int start_cyc [NPKT];
  int cycle = 0, cur = 0, rd = 0, loaded = 0;

  assign dec = dc[cur][rd];

  function automatic int slot_of(input int s);
    return (s < 32) ? 2 * s : 2 * (s - 32) + 1;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // LIFO array model: load on start, step back on shift
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (start) begin
      cur    <= loaded;
      loaded <= loaded + 1;
      rd     <= LEN - 1;
    end else if (shift && rd > 0) begin
      rd <= rd - 1;
    end
  end

  // start schedule
  initial begin
    int st, c;
    for (int p = 0; p < NPKT; p++) begin
      for (int t = 0; t < LEN; t++) dc[p][t] = {$urandom(), $urandom()};
      st = 0;
      for (int t = LEN - 1; t >= 0; t--) begin
        want[p][LEN-1-t] = dc[p][t][slot_of(st)];
        st = ((st << 1) | int'(want[p][LEN-1-t])) & 63;
      end
    end
    c = 4;
    for (int p = 0; p < NPKT; p++) begin
      start_cyc[p] = c;
      c += (p % 3 == 2) ? LEN + 9 : LEN;   // back to back or after a pause
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPKT; p++) begin
      while (cycle != start_cyc[p]) @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
    end
  end

  // checker
  initial begin
    int p = 0, n = 0;
    while (p < NPKT) begin
      @(negedge clk);
      if (out_valid) begin
        if (n == 0) begin
          checks++;
          if (cycle - start_cyc[p] != 2) begin
            failures++; $display("FAIL p%0d latency %0d", p, cycle - start_cyc[p]);
          end
        end
        checks += 2;
        if (out_bit !== want[p][n]) begin failures++; $display("FAIL p%0d bit %0d", p, n); end
        if (out_last !== (n == LEN - 1)) begin failures++; $display("FAIL p%0d last %0d", p, n); end
        n++;
        if (n == LEN) begin n = 0; p++; end
      end else if (n != 0) begin
        failures++; $display("FAIL p%0d gap at bit %0d", p, n);
      end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (shift || out_valid) begin failures++; $display("FAIL not idle at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
