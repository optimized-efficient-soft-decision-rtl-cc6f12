// viterbi_fullscale_tb: end-to-end test with full-scale soft symbols.
//
// Same procedure as the default-size end-to-end test, but the coded bits are
// sent at the full (1.7) range, +127 for a 1 and -127 for a 0, with noise of
// up to about +-190 (clipped). Competing path metrics then differ by up to
// several times 2^17, so the decoder is built with 21-bit path metrics
// (PM_W = 21); with the default 18 bits the modulo comparison would pick
// wrong survivors. Every output bit must equal the wide-metric reference
// decoder, clean packets must decode to the sent data, and the mechanisms
// of the default test must occur, except metric wrap-around:
// at 21 bits the metrics of a 38-step packet stay below 2^21.
module viterbi_fullscale_tb;
  localparam int NPKT    = 60;
  localparam int LEN     = 38;
  localparam int DBITS   = 32;
  localparam int AMP     = 127;
  localparam int OUT_LAT = 3;
  localparam longint PEN = 1 << 14;
  localparam longint MOD = 1 << 21;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [7:0] symbol0 = 0, symbol1 = 0;
  logic out_valid, out_bit, out_last;

  viterbi_decoder #(.PM_W(21)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // stimulus per packet
  logic [LEN-1:0]    data      [NPKT];
  logic signed [7:0] rx0       [NPKT][LEN];
  logic signed [7:0] rx1       [NPKT][LEN];
  logic [LEN-1:0]    ref_bits  [NPKT];    // reference output, in output order
  bit                noisy     [NPKT];
  int                last_cyc  [NPKT];

  // mechanism counters
  int n_straddle = 0, n_tie = 0, n_gap = 0, n_b2b = 0, n_wrap = 0;
  int n_corrected = 0, n_hard_err = 0;
  longint max_diff = 0;

  // ---------------- encoder and reference decoder ----------------
  function automatic logic [1:0] enc_out(input logic [6:0] r);
    // r = {newest input, six previous inputs, newest first}
    return {^(r & 7'b1111001), ^(r & 7'b1011011)};
  endfunction

  function automatic longint sqd(input int e, input int r);
    return longint'(e - r) * longint'(e - r);
  endfunction

  task automatic reference(input int p);
    longint pm [64];
    longint nx [64];
    logic   dc [LEN][64];
    int     st;
    for (int s = 0; s < 64; s++) pm[s] = (s == 0) ? 0 : PEN;
    for (int t = 0; t < LEN; t++) begin
      for (int s = 0; s < 64; s++) begin
        int     p0, p1, u;
        logic [1:0] l0, l1;
        longint m1, m2, w1, w2;
        u  = s >> 5;
        p0 = (s & 31) * 2;
        p1 = p0 + 1;
        l0 = enc_out({u[0], p0[5:0]});
        l1 = enc_out({u[0], p1[5:0]});
        m1 = pm[p0] + sqd(l0[0] ? 127 : -128, rx0[p][t]) + sqd(l0[1] ? 127 : -128, rx1[p][t]);
        m2 = pm[p1] + sqd(l1[0] ? 127 : -128, rx0[p][t]) + sqd(l1[1] ? 127 : -128, rx1[p][t]);
        if (m1 == m2) n_tie++;
        if ((m1 / MOD) != (pm[p0] / MOD)) n_wrap++;   // the sum wraps in the design
        w1 = m1 % MOD; w2 = m2 % MOD;
        if ((w1 >> 20) != (w2 >> 20)) n_straddle++;
        if ((m1 > m2 ? m1 - m2 : m2 - m1) > max_diff) max_diff = (m1 > m2 ? m1 - m2 : m2 - m1);
        dc[t][s] = (m1 <= m2) ? 1'b0 : 1'b1;
        nx[s]    = (m1 <= m2) ? m1 : m2;
      end
      for (int s = 0; s < 64; s++) pm[s] = nx[s];
    end
    st = 0;
    for (int t = LEN - 1; t >= 0; t--) begin
      logic d;
      d = dc[t][st];
      ref_bits[p][LEN-1-t] = d;
      st = ((st << 1) | int'(d)) & 63;
    end
  endtask

  function automatic int noise(input int spread);
    // sum of three uniform values: roughly bell-shaped, zero mean
    int v = 0;
    for (int i = 0; i < 3; i++) v += int'($urandom_range(2 * spread, 0)) - spread;
    return v;
  endfunction

  function automatic logic signed [7:0] clip(input int v);
    if (v > 127) return 8'sd127;
    if (v < -128) return -8'sd128;
    return 8'(v);
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    repeat (NPKT * 120 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- drive ----------------
  initial begin
    for (int p = 0; p < NPKT; p++) begin
      logic [6:0] r;
      data[p] = {6'b0, $urandom()};       // bit t is the input of step t
      noisy[p] = (p % 3 != 0);
      r = '0;
      for (int t = 0; t < LEN; t++) begin
        logic [1:0] c;
        int n0, n1;
        r = {data[p][t], r[6:1]};
        c = enc_out(r);
        n0 = noisy[p] ? noise(AMP / 2) : 0;
        n1 = noisy[p] ? noise(AMP / 2) : 0;
        rx0[p][t] = clip((c[0] ? AMP : -AMP) + n0);
        rx1[p][t] = clip((c[1] ? AMP : -AMP) + n1);
        if ((rx0[p][t] >= 0) != c[0]) n_hard_err++;
        if ((rx1[p][t] >= 0) != c[1]) n_hard_err++;
      end
      reference(p);
    end

    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int p = 0; p < NPKT; p++) begin
      for (int t = 0; t < LEN; t++) begin
        // occasional gap inside a packet, never in the middle third of packets
        if (p % 5 == 4 && t == 17) begin
          in_valid <= 0;
          n_gap++;
          @(posedge clk);
          #1;
        end
        in_valid <= 1;
        symbol0  <= rx0[p][t];
        symbol1  <= rx1[p][t];
        @(posedge clk);
        #1;
        if (t == LEN - 1) last_cyc[p] = cycle;
      end
      // pause between some packets, back to back otherwise
      if (p % 4 == 3) begin
        in_valid <= 0;
        repeat (50) @(posedge clk);
        #1;
      end
    end
    in_valid <= 0;
  end

  // ---------------- back-to-back observation ----------------
  always @(posedge clk) begin
    if (rst_n && dut.lifo_load && dut.tb_shift && dut.lifo_read_en) n_b2b++;
  end

  // ---------------- check ----------------
  initial begin
    int p = 0, i = 0;
    logic [LEN-1:0] got;
    @(posedge rst_n);
    while (p < NPKT) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (i == 0) begin
          checks++;
          if (cycle - last_cyc[p] != OUT_LAT) begin
            failures++;
            $display("FAIL packet %0d latency %0d, expected %0d", p, cycle - last_cyc[p], OUT_LAT);
          end
        end
        got[i] = out_bit;
        checks++;
        if (out_bit !== ref_bits[p][i]) begin
          failures++;
          if (failures < 20) $display("FAIL packet %0d bit %0d got %0b expected %0b", p, i, out_bit, ref_bits[p][i]);
        end
        checks++;
        if (out_last !== (i == LEN - 1)) begin
          failures++;
          $display("FAIL packet %0d out_last at bit %0d", p, i);
        end
        i++;
        if (i == LEN) begin
          logic [LEN-1:0] want;
          // expected order: data bits 31..0, then six zeros
          for (int k = 0; k < DBITS; k++) want[k] = data[p][DBITS-1-k];
          for (int k = DBITS; k < LEN; k++) want[k] = 1'b0;
          if (noisy[p]) begin
            if (got == want) n_corrected++;
          end else begin
            checks++;
            if (got !== want) begin
              failures++;
              $display("FAIL clean packet %0d decoded %h expected %h", p, got, want);
            end
          end
          i = 0;
          p++;
        end
      end else if (i != 0) begin
        failures++;
        $display("FAIL packet %0d output interrupted at bit %0d", p, i);
      end
    end
    repeat (5) @(posedge clk);

    $display("mechanisms: wraps=%0d straddles=%0d ties=%0d gaps=%0d back_to_back=%0d",
             n_wrap, n_straddle, n_tie, n_gap, n_b2b);
    $display("noisy packets decoded exactly=%0d, hard-decision symbol errors=%0d, max |m1-m2|=%0d",
             n_corrected, n_hard_err, max_diff);
    checks++; if (n_tie == 0)       begin failures++; $display("FAIL no tie"); end
    checks++; if (n_gap == 0)       begin failures++; $display("FAIL no input gap"); end
    checks++; if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back packets"); end
    checks++; if (n_hard_err == 0 || n_corrected == 0) begin failures++; $display("FAIL no corrected errors"); end
    checks++; if (max_diff >= (1 << 20)) begin failures++; $display("FAIL metric spread beyond modulo range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
