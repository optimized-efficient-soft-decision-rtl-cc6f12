// log_cmp: unsigned magnitude comparator of logarithmic depth.
//
// The operands are cut into 2-bit subwords (zero-padded at the top to a
// power-of-two count). A leaf cell compares one pair of subwords; each cell
// of the next level merges the results of two neighbouring cells, taking the
// more significant result unless it reports equality, in which case the less
// significant result is passed on. After log2(W/2) levels the root holds the
// result for the whole word.
//
// Result code (2 bits): 2'b00 a == b, 2'b01 a < b, 2'b10 a > b
// (2'b11 does not occur). The code, the 2-bit subwords and the tree follow
// the described comparator. Purely combinational.
module log_cmp #(
  parameter int W = 17
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [1:0]   res
);

  localparam int LEAVES = 1 << $clog2((W + 1) / 2);  // number of 2-bit subwords
  localparam int LEVELS = $clog2(LEAVES);
  localparam int PW     = 2 * LEAVES;

  logic [PW-1:0] ap, bp;
  assign ap = PW'(a);
  assign bp = PW'(b);

  // Level 0: one leaf cell per subword pair.
  logic [1:0] leaf [LEAVES];
  for (genvar k = 0; k < LEAVES; k++) begin : g_leaf
    logic [1:0] sa, sb;
    assign sa = ap[2*k +: 2];
    assign sb = bp[2*k +: 2];
    assign leaf[k] = {sa > sb, sa < sb};
  end

  // Level l holds LEAVES >> l cells, each merging two cells of level l-1.
  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    logic [1:0] node [LEAVES >> l];
    for (genvar k = 0; k < (LEAVES >> l); k++) begin : g_cell
      logic [1:0] hi, lo;
      if (l == 1) begin : g_from_leaf
        assign hi = leaf[2*k+1];
        assign lo = leaf[2*k];
      end else begin : g_from_node
        assign hi = g_lvl[l-1].node[2*k+1];
        assign lo = g_lvl[l-1].node[2*k];
      end
      assign node[k] = (hi != 2'b00) ? hi : lo;
    end
  end

  if (LEVELS == 0) begin : g_single
    assign res = leaf[0];
  end else begin : g_root
    assign res = g_lvl[LEVELS].node[0];
  end


endmodule
