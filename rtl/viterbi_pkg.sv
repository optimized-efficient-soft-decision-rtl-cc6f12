// viterbi_pkg: shared constants and trellis helpers of the soft-decision
// Viterbi decoder.
//
// The code is the rate-1/2, constraint-length-7 convolutional code of
// IEEE 802.11 (generators 133 and 171 octal). The encoder state is the six
// most recent input bits with the newest bit in the MSB, so a new input bit
// enters at the left: next = {u, s[5:1]}. A trellis butterfly therefore joins
// the predecessor states 2j and 2j+1 to the successor states j (input 0) and
// j+32 (input 1). The widths (8-bit received symbols, 9-bit differences,
// 18-bit squares, branch and path metrics) and the 38-bit packet (32 data bits
// plus 6 tail zeros) follow the described design; the helper functions are
// this implementation's own formulation of the trellis.
package viterbi_pkg;

  localparam int K        = 7;                 // constraint length
  localparam int SW       = K - 1;             // state width
  localparam int NSTATES  = 1 << SW;           // 64 trellis states
  localparam int NPE      = NSTATES / 2;       // 32 butterfly processing elements
  localparam int SYM_W    = 8;                 // received symbol, two's complement (1.7)
  localparam int DIFF_W   = SYM_W + 1;         // subtractor output
  localparam int SQ_W     = 2 * DIFF_W;        // squarer output
  localparam int BM_W     = 18;                // branch metric
  localparam int PM_WIDTH = 18;                // path metric (modulo arithmetic)
  localparam int DATA_BITS = 32;               // data bits per packet
  localparam int PKT_LEN  = DATA_BITS + K - 1; // 38 trellis steps per packet

  localparam logic [K-1:0] G0 = 7'o133;        // generator of symbol 0
  localparam logic [K-1:0] G1 = 7'o171;        // generator of symbol 1

  // Ideal received values for a coded 1 (+1 -> 0.1111111) and 0 (-1 -> 1.0000000).
  localparam logic signed [SYM_W-1:0] SYM_ONE  = 8'sh7F;
  localparam logic signed [SYM_W-1:0] SYM_ZERO = 8'sh80;

  typedef logic signed [SYM_W-1:0] sym_t;
  typedef logic [BM_W-1:0]         bm_t;
  typedef logic [SW-1:0]           state_t;

  // Coded bit pair {c1, c0} on the branch that leaves state s with input u.
  // The register vector is {u, s}: the MSB of each generator taps the input.
  function automatic logic [1:0] branch_label(input state_t s, input logic u);
    logic [K-1:0] r;
    r = {u, s};
    return {^(r & G1), ^(r & G0)};
  endfunction

  // Expected received value of one coded bit.
  function automatic sym_t expected_sym(input logic c);
    return c ? SYM_ONE : SYM_ZERO;
  endfunction

  // Position of a state's decision bit in the butterfly-ordered array:
  // PE j writes state j to slot 2j and state j+32 to slot 2j+1.
  function automatic state_t state_to_slot(input state_t s);
    return {s[SW-2:0], s[SW-1]};
  endfunction

endpackage
