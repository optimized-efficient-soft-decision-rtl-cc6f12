// traceback: trace-back decode stage.
//
// After a packet's decisions have been copied into the output registers of
// the LIFOs, the stage walks the trellis backwards from the all-zero state
// (the tail bits force the encoder back to it). Each clock, the 6:6 decoder
// turns the current state into the position of its LIFO in the
// butterfly-ordered array (state s sits at slot {s[4:0], s[5]}), the 64:1
// multiplexer picks that LIFO's decision bit, the bit is registered as the
// output and is appended on the right of the state register, which gives the
// predecessor state: s <= {s[4:0], bit}. After PKT_LEN steps the state is
// back at zero.
//
// Interface: start (one clock, the LIFO load clock) begins a trace; dec[k]
// is the output bit of LIFO slot k; shift is high during the PKT_LEN trace
// clocks and advances the LIFO output registers. out_bit/out_valid follow
// one clock later; out_last marks the final bit. The bits come out in
// reverse order: the PKT_LEN-6 data bits newest first, then six zeros (the
// starting state). A start in the last trace clock is accepted, so packets
// can follow back to back. The datapath follows the described trace-back
// unit; the counter and the handshake signals are this design's own.
module traceback
  import viterbi_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [NSTATES-1:0] dec,
  output logic               shift,
  output logic               out_bit,
  output logic               out_valid,
  output logic               out_last
);

  localparam int CW = $clog2(PKT_LEN + 1);

  state_t        state;
  state_t        slot;
  logic [CW-1:0] remaining;
  logic          bit_sel;

  assign shift   = (remaining != '0);
  assign slot    = state_to_slot(state);      // 6:6 decoder
  assign bit_sel = dec[slot];                 // 64:1 multiplexer

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      remaining <= '0;
      out_bit   <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= shift;
      out_last  <= (remaining == CW'(1));
      if (shift) begin
        out_bit <= bit_sel;
        state   <= {state[SW-2:0], bit_sel};
      end
      if (start) begin
        // a trace may only be restarted in its last step
        a_no_overrun: assert (remaining <= CW'(1));
        state     <= '0;
        remaining <= CW'(PKT_LEN);
      end else if (shift) begin
        remaining <= remaining - 1'b1;
      end
    end
  end


endmodule
