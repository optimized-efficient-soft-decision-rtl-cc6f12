// viterbi_decoder: soft-decision Viterbi decoder for the IEEE 802.11
// rate-1/2, K = 7 convolutional code, one trellis step per clock.
//
// Structure: 32 butterfly processing elements (the whole trellis in
// parallel) compute branch metrics from the received soft symbols and update
// all 64 path metrics each clock; the 64 decision bits go, through the PE
// registers, into 64 flip-flop LIFOs of PKT_LEN bits; when a packet is
// complete, the LIFOs hand their contents to the trace-back stage, which
// walks the trellis back from state 0 and emits the decoded bits in reverse
// order. Path metrics wrap modulo 2^PM_W and are compared with the modulo
// normalization rule, so no metric rescaling is needed.
//
// Interface:
//   in_valid, symbol0, symbol1 : one received pair per clock, two's
//     complement (1.7): 8'h7F is an ideal coded 1, 8'h80 an ideal coded 0.
//     symbol0 belongs to generator 133 (octal), symbol1 to 171. A packet is
//     PKT_LEN = 38 pairs (32 data bits and 6 zero tail bits); packets may
//     follow each other without a gap, and in_valid may drop inside a packet.
//   out_valid, out_bit, out_last : 38 decoded bits per packet on consecutive
//     clocks. out_valid rises on the third rising edge after the edge that
//     takes the packet's last pair. Order: the 32 data bits newest first,
//     then 6 zeros; out_last marks the 38th.
//
// Parameters: PM_W, the path-metric width, defaults to the described 18
// bits. The modulo comparison is exact only while two competing candidate
// metrics differ by less than 2^(PM_W-1); with 18 bits that holds for
// symbol amplitudes up to about 16/128, and full-scale symbols need about
// 21 bits. INIT_PEN is the starting metric of every state except state 0
// (which starts at 0, since a packet starts in state 0); that value, the
// handshake and the packet overlap are this design's choices. Everything
// else follows the described architecture.
module viterbi_decoder
  import viterbi_pkg::*;
#(
  parameter int PM_W     = viterbi_pkg::PM_WIDTH,
  parameter int INIT_PEN = 1 << 14
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  sym_t symbol0,
  input  sym_t symbol1,
  output logic out_valid,
  output logic out_bit,
  output logic out_last
);

  logic               acs_en, first, lifo_read_en, lifo_load, tb_shift;
  logic [PM_W-1:0]    pm_q    [NSTATES];   // registered path metric per state
  logic [PM_W-1:0]    pm_prev [NSTATES];   // metrics entering the array
  logic [NSTATES-1:0] dec_q;               // registered decisions, slot order
  logic [NSTATES-1:0] lifo_out;            // LIFO outputs, slot order

  viterbi_ctrl u_ctrl (
    .clk, .rst_n, .in_valid,
    .acs_en, .first, .lifo_read_en, .lifo_load
  );

  always_comb begin
    for (int s = 0; s < NSTATES; s++)
      pm_prev[s] = first ? ((s == 0) ? '0 : PM_W'(INIT_PEN)) : pm_q[s];
  end

  for (genvar j = 0; j < NPE; j++) begin : g_pe
    pe #(.LABEL(branch_label(state_t'(2*j), 1'b0)), .PM_W(PM_W)) u_pe (
      .clk     (clk),
      .en      (acs_en),
      .symbol0 (symbol0),
      .symbol1 (symbol1),
      .pm_in0  (pm_prev[2*j]),
      .pm_in1  (pm_prev[2*j+1]),
      .pm_out0 (pm_q[j]),
      .pm_out1 (pm_q[j+NPE]),
      .dec0    (dec_q[2*j]),
      .dec1    (dec_q[2*j+1])
    );
  end

  for (genvar k = 0; k < NSTATES; k++) begin : g_lifo
    lifo_sr #(.DEPTH(PKT_LEN)) u_lifo (
      .clk      (clk),
      .din      (dec_q[k]),
      .read_en  (lifo_read_en),
      .write_en (lifo_load | tb_shift),
      .load     (lifo_load),
      .dout     (lifo_out[k])
    );
  end

  traceback u_tb (
    .clk, .rst_n,
    .start     (lifo_load),
    .dec       (lifo_out),
    .shift     (tb_shift),
    .out_bit, .out_valid, .out_last
  );

endmodule
