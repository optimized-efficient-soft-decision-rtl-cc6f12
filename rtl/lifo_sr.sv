// lifo_sr: last-in-first-out store for the decision bits of one trellis
// state, built from two flip-flop shift registers instead of a RAM.
//
// The input (read) register shifts din in at every clock with read_en high:
// rd[0] takes din, rd[i] takes rd[i-1]. Once a packet's DEPTH decisions are
// in, one clock with write_en and load high copies rd[i] into wr[i] in
// parallel. Afterwards, each clock with write_en high and load low shifts the
// output (write) register towards dout = wr[0], filling zeros from the top.
// dout thus presents the decisions newest first. Because the two registers
// are independent, the next packet can be shifted in while the previous one
// is being read out, and the copy may happen in the same clock as a shift-in
// (it takes the contents from before that clock).
//
// Interface: din, read_en, write_en, load in; dout out. The two clock
// enables replace the gated clocks of the described circuit; the structure
// (two registers, load multiplexers, zero fill) follows it. No reset: the
// contents are meaningful only after a load.
module lifo_sr #(
  parameter int DEPTH = 38
) (
  input  logic clk,
  input  logic din,
  input  logic read_en,
  input  logic write_en,
  input  logic load,
  output logic dout
);

  logic [DEPTH-1:0] rd;  // input shift register, rd[0] newest
  logic [DEPTH-1:0] wr;  // output shift register, wr[0] drives dout

  always_ff @(posedge clk) begin
    if (read_en) rd <= {rd[DEPTH-2:0], din};
  end

  always_ff @(posedge clk) begin
    if (write_en) wr <= load ? rd : {1'b0, wr[DEPTH-1:1]};
  end

  assign dout = wr[0];

endmodule
