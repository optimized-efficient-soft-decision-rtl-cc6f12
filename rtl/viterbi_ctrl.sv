// viterbi_ctrl: sequencing of the add-compare-select array and the LIFOs.
//
// Each accepted symbol pair (in_valid high) is one trellis step: acs_en
// clocks the PE registers, and first marks the first step of a packet so the
// array starts from the initial path metrics. The decision bits reach the PE
// output registers at that edge and are shifted into the LIFO input
// registers one clock later (lifo_read_en). After the PKT_LEN-th decision
// has been shifted in, lifo_load is high for one clock: the LIFOs copy their
// input registers to their output registers and the trace-back starts. The
// next packet's symbols may follow without a gap; a gap inside a packet
// simply holds the array.
//
// Interface: in_valid in; acs_en, first, lifo_read_en, lifo_load out. The
// enable/load order follows the described LIFO protocol (fill with the
// read enable, one clock of load with the write enable, then shift out);
// the counters and the overlap of packets are this design's own. acs_en is
// simply in_valid: every pair offered is taken, there is no back-pressure.
module viterbi_ctrl
  import viterbi_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic acs_en,
  output logic first,
  output logic lifo_read_en,
  output logic lifo_load
);

  localparam int CW = $clog2(PKT_LEN);

  logic [CW-1:0] step;
  logic          last, dec_valid, dec_last;

  assign acs_en       = in_valid;
  assign first        = (step == '0);
  assign last         = (step == CW'(PKT_LEN - 1));
  assign lifo_read_en = dec_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step      <= '0;
      dec_valid <= 1'b0;
      dec_last  <= 1'b0;
      lifo_load <= 1'b0;
    end else begin
      if (in_valid) step <= last ? '0 : step + 1'b1;
      dec_valid <= in_valid;
      dec_last  <= in_valid && last;
      lifo_load <= dec_valid && dec_last;
    end
  end

endmodule
