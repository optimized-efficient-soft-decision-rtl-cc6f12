// mod_cmp: modified comparator of the add-compare-select unit, with modulo
// normalization.
//
// Path metrics are kept modulo 2^W and are allowed to wrap around. As long as
// two competing sums differ by less than 2^(W-1), the smaller one is the one
// for which (m1 - m2) mod 2^W has its MSB set. That MSB is
//   z = m1[W-1] ^ m2[W-1] ^ y,
// where y is the unsigned comparison of the two words below their MSBs,
// done by the logarithmic-depth comparator. A 2:1 decoder reduces the
// comparator's 2-bit code to y = 1 for m1 <= m2 and y = 0 for m1 > m2, so
// that equal sums select m1.
//
// Interface: m1, m2 (W bits) in; z = 1 when m1 is the smaller (or equal)
// modular value. Purely combinational.
//
// The XOR of the two MSBs with an unsigned comparison follows the described
// design. The described unit also inverts both MSBs ahead of the unsigned
// comparator; combined with the XOR that would reduce z to a plain unsigned
// comparison, which fails as soon as a metric wraps, so here the comparator
// sees only the W-1 bits below the MSBs. Choosing m1 on a tie is this
// design's choice (either is allowed).
module mod_cmp #(
  parameter int W = 18
) (
  input  logic [W-1:0] m1,
  input  logic [W-1:0] m2,
  output logic         z
);

  logic [1:0] code;
  logic       y;

  log_cmp #(.W(W-1)) u_cmp (
    .a  (m1[W-2:0]),
    .b  (m2[W-2:0]),
    .res(code)
  );

  // 2:1 decoder: 00 (equal) and 01 (less) -> 1, 10 (greater) -> 0
  assign y = (code != 2'b10);
  assign z = m1[W-1] ^ m2[W-1] ^ y;

endmodule
