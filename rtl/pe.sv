// pe: processing element for one butterfly of the trellis.
//
// Butterfly j joins the predecessor states 2j (metric pm_in0) and 2j+1
// (pm_in1) to the successor states j (input bit 0, output pm_out0 / dec0)
// and j+32 (input bit 1, pm_out1 / dec1). Four branch-metric units, one per
// branch, feed two ACS units. Because both generators tap the newest and the
// oldest register bit, the branches 2j->j and 2j+1->j+32 carry the coded
// pair LABEL and the two crossing branches carry its complement, so a PE is
// fully described by the 2-bit LABEL ({c1, c0}); four PE variants exist.
//
// Timing: when en is high the new path metrics and decision bits are
// captured in the output registers at the rising clock edge; with en low
// they hold. No reset: the first step of a packet takes its predecessor
// metrics from outside. Structure follows the described PE; the LABEL
// parameter is this design's way of selecting the four variants.
module pe
  import viterbi_pkg::*;
#(
  parameter logic [1:0] LABEL = 2'b00,
  parameter int         PM_W  = viterbi_pkg::PM_WIDTH
) (
  input  logic clk,
  input  logic en,
  input  sym_t symbol0,
  input  sym_t symbol1,
  input  logic [PM_W-1:0] pm_in0,
  input  logic [PM_W-1:0] pm_in1,
  output logic [PM_W-1:0] pm_out0,
  output logic [PM_W-1:0] pm_out1,
  output logic dec0,
  output logic dec1
);

  localparam logic [1:0] LBAR = ~LABEL;

  bm_t  bm00, bm01, bm10, bm11;
  logic [PM_W-1:0] pm_n0, pm_n1;
  logic dec_n0, dec_n1;

  // BMxy: x = input bit (successor), y = which predecessor (2j or 2j+1)
  bm_unit #(.EXP0(expected_sym(LABEL[0])), .EXP1(expected_sym(LABEL[1]))) u_bm00 (
    .symbol0(symbol0), .symbol1(symbol1), .bm(bm00));
  bm_unit #(.EXP0(expected_sym(LBAR[0])),  .EXP1(expected_sym(LBAR[1])))  u_bm01 (
    .symbol0(symbol0), .symbol1(symbol1), .bm(bm01));
  bm_unit #(.EXP0(expected_sym(LBAR[0])),  .EXP1(expected_sym(LBAR[1])))  u_bm10 (
    .symbol0(symbol0), .symbol1(symbol1), .bm(bm10));
  bm_unit #(.EXP0(expected_sym(LABEL[0])), .EXP1(expected_sym(LABEL[1]))) u_bm11 (
    .symbol0(symbol0), .symbol1(symbol1), .bm(bm11));

  acs #(.PM_W(PM_W)) u_acs0 (.pm0(pm_in0), .bm0(bm00), .pm1(pm_in1), .bm1(bm01),
              .pm_out(pm_n0), .dec(dec_n0));
  acs #(.PM_W(PM_W)) u_acs1 (.pm0(pm_in0), .bm0(bm10), .pm1(pm_in1), .bm1(bm11),
              .pm_out(pm_n1), .dec(dec_n1));

  always_ff @(posedge clk) begin
    if (en) begin
      pm_out0 <= pm_n0;
      pm_out1 <= pm_n1;
      dec0    <= dec_n0;
      dec1    <= dec_n1;
    end
  end

endmodule
