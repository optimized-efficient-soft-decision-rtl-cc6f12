// squarer: dedicated two's-complement squaring unit of the branch metric.
//
// The square is formed from a folded partial-product matrix instead of a
// general multiplier. For the W-1 magnitude bits L of the input x:
//   * a bit times itself is the bit (x_i * x_i = x_i), so the diagonal holds
//     single bits;
//   * x_i*x_j and x_j*x_i are merged into one product one column to the left;
//   * the diagonal bit x_i and the product x_i*x_(i-1), which share column 2i,
//     are recoded as x_i&x_(i-1) in column 2i+1 plus x_i&~x_(i-1) in column 2i.
// The sign bit s (weight -2^(W-1)) adds x^2 = L^2 - 2^W*s*L + s*2^(2W-2).
// Modulo 2^(2W) the negative term is the row s&~L shifted by W, plus the
// constant bits s at columns W and 2W-1; the s*2^(2W-2) term is one more bit.
// The bits of each column are stacked top down (as in a dot diagram), the
// rows are reduced by a tree of 3:2 carry-save adders and a final
// carry-propagate adder produces the result.
//
// Interface: x (W-bit two's complement) in, sq = x*x (2W bits, unsigned) out.
// Purely combinational. The matrix folding and recoding follow the described
// squarer; the carry-save tree stands in for its Dadda reduction and the
// final adder is left to synthesis.
module squarer #(
  parameter int W = 9
) (
  input  logic signed [W-1:0] x,
  output logic [2*W-1:0]      sq
);

  localparam int N    = W - 1;      // magnitude bits
  localparam int OW   = 2 * W;      // output width
  localparam int ROWS = N / 2 + 3;  // tallest column of the folded matrix

  logic [OW-1:0] rows [ROWS];
  logic [OW-1:0] red  [ROWS];
  logic [OW-1:0] nxt  [ROWS];
  logic [N-1:0]  l;
  logic          s;

  always_comb begin
    int h [OW];
    int cnt, grp, rem;
    l = x[N-1:0];
    s = x[W-1];
    for (int c = 0; c < OW; c++) h[c] = 0;
    for (int r = 0; r < ROWS; r++) rows[r] = '0;

    // diagonal, with the x_i / x_i*x_(i-1) recoding
    rows[h[0]][0] = l[0]; h[0]++;
    for (int i = 1; i < N; i++) begin
      rows[h[2*i]][2*i]     = l[i] & ~l[i-1]; h[2*i]++;
      rows[h[2*i+1]][2*i+1] = l[i] &  l[i-1]; h[2*i+1]++;
    end
    // merged cross products x_i*x_j, i > j+1
    for (int i = 2; i < N; i++)
      for (int j = 0; j < i - 1; j++) begin
        rows[h[i+j+1]][i+j+1] = l[i] & l[j]; h[i+j+1]++;
      end
    // sign-bit correction
    for (int j = 0; j < N; j++) begin
      rows[h[W+j]][W+j] = s & ~l[j]; h[W+j]++;
    end
    rows[h[W]][W]           = s; h[W]++;
    rows[h[2*N]][2*N]       = s; h[2*N]++;
    rows[h[2*N+1]][2*N+1]   = s; h[2*N+1]++;

    // 3:2 carry-save reduction, one tree level per pass
    for (int r = 0; r < ROWS; r++) red[r] = rows[r];
    cnt = ROWS;
    for (int lvl = 0; lvl < ROWS; lvl++) begin
      for (int r = 0; r < ROWS; r++) nxt[r] = '0;
      if (cnt > 2) begin
        grp = cnt / 3;
        rem = cnt % 3;
        for (int g = 0; g < ROWS / 3; g++)
          if (g < grp) begin
            nxt[2*g]   = red[3*g] ^ red[3*g+1] ^ red[3*g+2];
            nxt[2*g+1] = ((red[3*g] & red[3*g+1]) | (red[3*g] & red[3*g+2]) |
                          (red[3*g+1] & red[3*g+2])) << 1;
          end
        for (int r = 0; r < 2; r++)
          if (r < rem) nxt[2*grp+r] = red[3*grp+r];
        cnt = 2 * grp + rem;
        for (int r = 0; r < ROWS; r++) red[r] = nxt[r];
      end
    end
  end

  // final carry-propagate adder
  assign sq = red[0] + red[1];

endmodule
