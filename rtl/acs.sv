// acs: add-compare-select unit for one trellis state.
//
// Two two's-complement adders form the candidate metrics m1 = pm0 + bm0
// (path through the predecessor on the 0 input) and m2 = pm1 + bm1 (through
// the predecessor on the 1 input), both modulo 2^PM_W. The modified
// comparator drives z = 1 when m1 is the smaller (modulo normalization, ties
// go to m1); z steers the 2:1 multiplexer to the new path metric, and its
// inverse is the decision bit: dec = 0 when the 0-input path survives,
// dec = 1 when the 1-input path survives.
//
// Interface: pm0/bm0, pm1/bm1 in; pm_out (PM_W bits) and dec out. Purely
// combinational; the registers are in the processing element. Structure
// follows the described ACS unit.
module acs
  import viterbi_pkg::*;
#(
  parameter int PM_W = viterbi_pkg::PM_WIDTH
) (
  input  logic [PM_W-1:0] pm0,
  input  bm_t             bm0,
  input  logic [PM_W-1:0] pm1,
  input  bm_t             bm1,
  output logic [PM_W-1:0] pm_out,
  output logic            dec
);

  logic [PM_W-1:0] m1, m2;
  logic z;

  assign m1 = pm0 + PM_W'(bm0);
  assign m2 = pm1 + PM_W'(bm1);

  mod_cmp #(.W(PM_W)) u_cmp (.m1(m1), .m2(m2), .z(z));

  assign pm_out = z ? m1 : m2;
  assign dec    = ~z;

endmodule
