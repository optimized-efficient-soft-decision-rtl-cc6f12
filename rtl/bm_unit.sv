// bm_unit: soft-decision branch metric.
//
// Computes the squared Euclidean distance between the received symbol pair
// and the pair expected on one trellis branch:
//   bm = (exp0 - symbol0)^2 + (exp1 - symbol1)^2.
// Each 8-bit difference is formed with one extra integer bit (9 bits) so it
// cannot overflow, squared by the dedicated squarer (18 bits) and the two
// squares are added. The expected values are fixed by parameters, one
// instance per branch. With 8-bit inputs the largest metric is
// 2 * 255^2 = 130050, which fits the 18-bit result.
//
// Interface: symbol0, symbol1 (two's complement (1.7)) in, bm (18 bits,
// unsigned, scale 2^-14) out. Purely combinational. Structure and widths
// follow the described branch-metric unit.
module bm_unit
  import viterbi_pkg::*;
#(
  parameter sym_t EXP0 = SYM_ZERO,
  parameter sym_t EXP1 = SYM_ZERO
) (
  input  sym_t symbol0,
  input  sym_t symbol1,
  output bm_t  bm
);

  logic signed [DIFF_W-1:0] d0, d1;
  logic [SQ_W-1:0]          s0, s1;

  // subtractors with one added integer bit
  assign d0 = DIFF_W'(EXP0) - DIFF_W'(symbol0);
  assign d1 = DIFF_W'(EXP1) - DIFF_W'(symbol1);

  squarer #(.W(DIFF_W)) u_sq0 (.x(d0), .sq(s0));
  squarer #(.W(DIFF_W)) u_sq1 (.x(d1), .sq(s1));

  assign bm = BM_W'(s0 + s1);

endmodule
