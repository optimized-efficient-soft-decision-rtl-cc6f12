# Soft-decision Viterbi decoder with a dedicated squarer and modulo-normalized ACS

This is a fully parallel, one-step-per-clock Viterbi decoder for the
convolutional code of IEEE 802.11: constraint length K = 7 (64 trellis
states), rate 1/2, generators 133 and 171 (octal). It takes the received
signal as 8-bit soft values, not as hard bits. Its branch metric is the
squared Euclidean distance between the received pair and the pair each
branch expects. Soft decisions give about 3 dB of coding gain over
hard-decision (Hamming-distance) decoding on a Gaussian channel. The
price is two squarings per branch, every clock. The design keeps that cost
down in three ways:

- **Squaring unit.** A squarer folds its partial-product matrix. It is not a
  general multiplier.
- **Path-metric wrap-around.** Path metrics are allowed to overflow. The
  add-compare-select units compare them modulo 2^18, so no metrics ever
  need rescaling.
- **No RAM.** Decision bits are kept in flip-flop shift-register LIFOs.
  There is no memory, no address generator and no pointer.

The decoder works on packets of 38 trellis steps: 32 data bits plus the six
zero tail bits that return the encoder to state 0. It takes 38 symbol pairs
and returns the 38 decoded bits in reverse order.

## Trellis conventions

The state is the six most recent input bits, newest in the MSB. A new bit
enters on the left: `next = {u, s[5:1]}`. The coded pair on a branch is
computed from the 7-bit register `{u, s}` (the newest input in the MSB):

    c0 = ^({u,s} & 7'b1011011)   // 133 octal -> symbol0
    c1 = ^({u,s} & 7'b1111001)   // 171 octal -> symbol1

A coded 1 is expected as `8'h7F` (0.1111111, about +1), a coded 0 as
`8'h80` (-1.0000000). The trellis splits into 32 butterflies. Butterfly j
joins the predecessors 2j and 2j+1 to the successors j (input 0) and j+32
(input 1). Both generators tap the newest and the oldest bit, so:

- the branches 2j→j and 2j+1→j+32 carry the same pair;
- the two crossing branches carry its complement.

Only four kinds of butterfly therefore exist. The `LABEL` parameter of
`pe` selects the kind.

## Datapath

```
symbol0/1 ─┬─> pe[0]  ──dec0,dec1──> lifo_sr[0],[1]  ─┐
           ├─> ...                                    ├─> traceback ──> out_bit
           └─> pe[31] ──dec62,dec63─> lifo_sr[62],[63]┘
     path metrics pe -> pe (registered, 64 x 18 bit), routed by the trellis
```

- **`bm_unit`**: the branch metric `(e0-s0)^2 + (e1-s1)^2`. Each
  8-bit difference is formed with one extra bit (9 bits). It is squared to
  18 bits and the two squares are added. The largest metric is
  2·255² = 130050.
- **`squarer`**: the dedicated squarer. For the 8 magnitude bits:
  - each diagonal product x_i·x_i becomes the bit x_i;
  - each pair x_i·x_j + x_j·x_i becomes one product, moved one column
    left;
  - the diagonal bit x_i and the product x_i·x_(i-1) share column 2i.
    They are recoded as x_i·x_(i-1) in column 2i+1 plus x_i·¬x_(i-1) in
    column 2i.

  The sign bit s is handled as x² = L² − 2^9·s·L + 2^16·s, with the
  negative row complemented and constant bits added, modulo 2^18. The
  bits of each column are stacked and reduced to two rows by a tree of
  3:2 carry-save adders. One final adder adds the two rows.
- **`acs`**: forms m1 = pm0 + bm0 (the path through predecessor 2j) and
  m2 = pm1 + bm1 (through 2j+1), both modulo 2^18. `mod_cmp` gives z = 1
  when m1 wins; a multiplexer keeps the winner. The decision bit is ¬z: 0
  means the path from the even predecessor survived.
- **`pe`**: four branch-metric units, two ACS units, and registers on the
  two new metrics and the two decision bits. It updates when `en` is high.
- **`viterbi_decoder`**: 32 PEs wired as the trellis. On the first step of a
  packet, the PEs read the initial metrics instead of the registers: 0 for
  state 0, and `INIT_PEN` = 2^14 for every other state.

## Modulo normalization (the subtle part)

Path metrics only grow, and at low symbol amplitudes each step adds about
25,000 to every metric. An 18-bit metric therefore wraps several times
inside a 38-step packet. The ACS never needs the metric values themselves,
only which of two candidates is smaller. If the candidates differ by less
than 2^17, the smaller one is m1 exactly when (m1 − m2) mod 2^18 has its MSB
set. `mod_cmp` computes that bit as

    z = m1[17] ^ m2[17] ^ y,    y = (m1[16:0] <= m2[16:0])

y comes from `log_cmp`, a comparator of logarithmic depth. It compares
2-bit subwords in leaf cells and merges neighbouring results up a binary
tree: the more significant result wins unless it reports equality. The
result codes are 00 (equal), 01 (a < b) and 10 (a > b). A 2:1 decoder
maps 00 and 01 to y = 1, so a tie keeps m1.

**Limit of the 18-bit width.** The rule is only exact while competing
candidates differ by less than 2^17 = 131,072. Whether they do depends on
the signal level:

| Signal level | Cost of one wrong coded bit | Largest difference seen | Result at 18 bits |
|---|---|---|---|
| ±16/128 (with noise) | — | 95,370 | exact |
| ±24/128 | — | 144,840 | wrong survivors chosen |
| ±1 (full scale, noise-free) | (127+128)² = 65,025 | several times 2^17 | wrong survivors chosen |

At full scale the candidate differences far exceed 2^17, and decoding
fails at 18 bits. `PM_W` is therefore a parameter of `viterbi_decoder`,
`pe` and `acs`. It defaults to 18. With `PM_W = 21`, full-scale symbols
decode correctly: at that width the metrics of a 38-step packet never wrap,
and differences stay below 2^20. The alternative is to scale the receiver
input to about ±16/128 before the decoder.

### Departure: no MSB inversion in the comparator

The MSB-invert stage that usually precedes the unsigned comparator is
deliberately left out. If both MSBs are inverted before an 18-bit unsigned
comparison and the result is then XORed with the two MSBs, z reduces to a
plain unsigned comparison. A plain unsigned comparison picks the wrong path
whenever a metric has just wrapped. The comparator here therefore looks only
at the 17 bits below the MSBs. The formula above is the sign of the modular
difference.

## Decision storage: shift-register LIFOs

Each state has a `lifo_sr` of 38 bits, made of two shift registers:

- **Input register.** Takes one decision per clock while `read_en` is high.
- **Output register.** One clock with `write_en` and `load` high copies all
  38 bits across in parallel. After that, each clock with `write_en`
  shifts the output register towards `dout`, newest decision first, and
  fills zeros behind.

The two registers are independent, so the decoder overlaps packets. While
packet n is traced back out of the output registers, packet n+1 fills the
input registers. The next load falls exactly in the last trace-back clock.
The design has 64 × 76 = 4864 flip-flops of decision storage in total.

`viterbi_ctrl` sequences this:

- `acs_en` follows `in_valid`, and `first` marks step 0 of a packet.
- `lifo_read_en` is `in_valid` delayed by one clock, because decisions pass
  through the PE register first.
- `lifo_load` is a one-clock pulse two clocks after the 38th pair.

## Trace-back

`traceback` starts at state 0 in the load clock. In each of the next 38
clocks:

1. The 6:6 decoder maps the state to its LIFO slot, `{s[4:0], s[5]}`. PE j
   writes state j to slot 2j and state j+32 to slot 2j+1.
2. The 64:1 multiplexer picks that slot's decision bit.
3. The bit goes to the output register and is appended on the right of the
   state (`s <= {s[4:0], bit}`). The result is the predecessor state.

With this state convention, the decision bits along the survivor path are
the input bits six steps earlier. The output is therefore data bit 31 down
to data bit 0, followed by six zeros, and the state returns to 0 after
38 steps.

## Interface and timing (`viterbi_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of control state |
| `in_valid` | in | 1 | a symbol pair is present (may drop inside a packet) |
| `symbol0`, `symbol1` | in | 8 | soft values, two's complement (1.7), generators 133 / 171 |
| `out_valid`, `out_bit`, `out_last` | out | 1 | decoded bits, reversed order, `out_last` on the 38th |

- **Input.** There is no back-pressure: a new packet may start in the clock
  after the previous packet's last pair.
- **Latency.** `out_valid` rises on the third rising edge after the edge
  that takes the last pair. The 38 bits then follow on consecutive clocks.
- **Throughput.** One trellis step per clock, sustained.
- **Reset.** The datapath registers (PE, LIFO) have no reset. They are
  never read before being written.

## Files

- `rtl/viterbi_pkg.sv`: code constants, widths and trellis helper
  functions.
- `rtl/squarer.sv`, `rtl/log_cmp.sv`, `rtl/mod_cmp.sv`, `rtl/bm_unit.sv`,
  `rtl/acs.sv`, `rtl/pe.sv`, `rtl/lifo_sr.sv`, `rtl/traceback.sv`,
  `rtl/viterbi_ctrl.sv`: the blocks above.
- `rtl/viterbi_decoder.sv`: the top level.
- `tb/<block>_tb.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/viterbi_decoder_tb.sv`: the end-to-end test at default parameters.
  - It encodes 60 random packets, adds noise to two thirds of them and
    decodes them.
  - A reference Viterbi decoder in the testbench uses wide integer metrics
    that never wrap. Every output bit must match it.
  - Noise-free packets must decode to the sent data.
  - The testbench checks the latency, and that every mechanism occurs at
    least once: metric wrap-around, wrap-straddling comparisons, ties,
    input gaps, back-to-back packets and corrected errors.
- `tb/viterbi_fullscale_tb.sv`: the same test with full-scale ±127 symbols
  and `PM_W = 21`.

Simulate with Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal -Irtl \
        rtl/viterbi_pkg.sv tb/viterbi_decoder_tb.sv -y rtl --top-module viterbi_decoder_tb
    ./obj_dir/Vviterbi_decoder_tb

Every testbench finishes in seconds.

## How closely this follows the described architecture

These parts follow the described architecture:

- the code and the packet format;
- the 8/9/18-bit widths;
- the folded and recoded squaring matrix;
- the PE made of four BM units and two ACS units;
- the ACS structure and the decision polarity;
- the 2-bit comparator codes and tree;
- the XOR form of the modulo comparison;
- the two-register LIFO with load multiplexers and zero fill;
- the trace-back from state 0 with a 6:6 decoder, a 64:1 multiplexer and a
  state register that shifts left;
- overlapped LIFO reading and writing.

These parts are this design's own choices:

- **Comparator inputs.** The MSB inversion is dropped and the comparator
  sees the 17 low bits. This is explained above.
- **Ties** go to the even predecessor.
- **Initial metrics.** State 0 starts at 0 and the other states at 2^14.
- **Clock enables** replace gated clocks in the LIFO.
- **Handshake, counters and output flags.**
- **Symbol mapping.** symbol0 belongs to generator 133.
- **Squarer details.** The sign-bit handling is this design's own. A
  carry-save tree replaces a Dadda column-height schedule. The final
  adder is left to synthesis. The optional recursive split into
  halves, meant for wider operands, is not used for 9 bits.
- **`PM_W` parameter.** It defaults to 18 and exists to show the limit
  described above.

A multiplier-based baseline used for comparison is not included.
Synthesis at 1 GHz in a 32 nm library has not been reproduced. Generic
synthesis reports about 6,100 flip-flop bits, consistent with 64 LIFOs of
76 bits, 64 18-bit metrics and the decision and control registers.
