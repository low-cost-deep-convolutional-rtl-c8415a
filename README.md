# Binary-interfaced stochastic-computing convolution tile

This RTL computes the convolution layers of a deep CNN with stochastic
computing (SC), without the cost SC usually brings. Conventional SC multiplies
two numbers by ANDing or XNORing two random bitstreams. It needs a random
number generator and comparator for every operand, a long stream for modest
accuracy, and a counter to turn the result back into binary. Here the
multiplier takes ordinary binary inputs and gives binary outputs. Only one
operand, the activation x, is turned into a bitstream, and that stream is
deterministic. The other operand, the weight w, becomes a count: the stream of
x is read for exactly |w|·2^(p-1) bits, and the ones seen are counted up or
down. The count is the product, with an error of at most a few stream bits.
It needs no random numbers, it has no bias, and its latency shrinks with the
weight. Small weights, which dominate trained networks, finish in a clock or
two.

Around this multiplier the design adds:

- **Bit-parallel processing.** 2^HWP stream bits are counted per clock.
- **Dynamic precision scaling (DPS).** The precision p is chosen per pass at
  run time.
- **Half-range specialisation (HRS).** Non-negative activations (after a ReLU)
  get twice the resolution.
- **Log-quantised weights.** These are 5-bit words. The multiply then needs
  only a small shifter instead of the adder tree.
- **Successive log quantisation (SLQ).** A weight may be the sum of two log
  words.

Three smaller designs from the same line of work sit beside the tile:

- a conventional LFSR-based bit-parallel SC-MAC with an approximate parallel
  counter;
- a tile-parallel array of those MACs that shares its stream generators;
- a binary shift-and-add MAC for log and SLQ weights.

## The multiplication

### The bitstream of x

x is a Q-bit word held in the lane's X register. Number the stream bits
c = 1, 2, 3, … At bit c a multiplexer outputs bit x[Q-1-tz(c)], where tz(c) is
the number of trailing zeros of c. It outputs 0 once tz(c) ≥ Q.

So x's MSB appears at every odd c, the next bit at every c ≡ 2 (mod 4), and so
on. After n bits, the number of ones is the exact fraction x·n rounded to a
neighbouring integer. Reading the stream for n = |W| bits multiplies x by
|W|/2^Q. The order of the bits does not matter for the count, and that is what
makes the bit-parallel version cheap.

### Signed operands

- **x.** In signed mode (`xis = 1`) the MSB of x is inverted before the
  multiplexer, which turns two's complement into offset binary. The
  accumulator then adds +1 for a one and −1 for a zero. The result of a
  multiplication is 2k − n for k ones in n bits.
- **Half-range mode (`xis = 0`).** x must be non-negative. There is no
  inversion, zeros add nothing, and the MSB becomes a magnitude bit.
- **w.** The weight's sign only flips the counting direction.

### 2^HWP bits per clock

A clock processes one column of b = 2^HWP consecutive stream bits. Each
aligned column of b bits holds every one of the top HWP bits of x exactly
2^(HWP-i) times. It also holds one further bit, which the shared selector FSM
picks: x[Q-1-HWP-tz(col+1)]. So a full column contributes
`{x[Q-1:Q-HWP]} + mux_bit` ones.

The last, partial column of m < b bits counts Σ x[Q-i]·((m>>i) + m[i-1]). This
is the adder tree in `ones_counter`.

When |W| is a power of two, as it always is for log weights, the partial
column has a single one at position `pos`. The count then reduces to a shift
and one multiplexed bit, `(x[Q-1:Q-HWP] >> (HWP-pos)) + x[Q-1-pos]`
(`ones_counter_log`).

A multiplication takes max(1, ⌈|W|/b⌉) clocks.

### Precision and weight formats (`weight_decoder`)

The decoder turns a weight word into |W|, the number of stream bits, and a
sign. At software precision p:

| format | word | \|W\| |
|---|---|---|
| `WF_LINEAR` | Q-bit two's complement fraction, MSB aligned | top p bits: `word >>> (Q-p)` |
| `WF_LOG` | 5-bit sign-magnitude {s, m}, w = ±2^-m | 2^(p-1-m); 0 if m = 0 or m > p-1 |
| `WF_SLQ` | 5-bit two's complement q, w = sign(q)·2^-\|q\| | as `WF_LOG`; q = −16 is the special code |
| `WF_SLQ_TAG` | q in bits [4:0], tag in bit 5 | as `WF_LOG` |

A pass at precision p produces accumulators with p−1 fraction bits.
`dps_align` shifts them left by Q−p, saturating, so every pass leaves results
with the same decimal point (Q−1 fraction bits). Lowering p from 16 to 9
divides every multiplication's stream length by 128.

### SLQ series

An SLQ weight is a short sum of log words; 0.4375 is 0.5 − 0.0625.

- **Special-code encoding.** The word value −16 (5'b10000) announces that the
  next two words form one weight. Single-word weights cost no extra bit.
- **Tag encoding.** Bit 5 of a word says the next word belongs to the same
  weight.

`slq_sequencer` turns the word stream into terms. It marks the terms that must
reuse the previous activation, and the lanes then keep their X register.

## The tile (`sc_dcnn_accel`)

```
 host ─► x buffer (LANES×Q per entry) ─┐
 host ─► w buffer (Q per entry) ─► SLQ parser ─► FIFO ─► bisc_mvm (LANES lanes) ─► dps_align ─► o buffer ─► host
                           └──────── tile_ctrl ─────────────────────────────┘
```

**The lanes.** They are LANES output pixels of one output feature map. All
lanes share the weight, so `bisc_mvm` has one weight decoder, one down counter
and one selector FSM. Every lane has:

- an X register;
- a multiplexer;
- both ones counters;
- an (Q+A)-bit saturating up/down accumulator.

**A pass.** One pass accumulates, in every lane j, Σ_i w_i·x_ij:

- w_i runs over `n_words` weight words from `wbase`.
- x_i runs over activation vectors from `xbase`. The vector index advances once
  per weight, so the two words of an SLQ pair share one vector.

**Data layout.** The host lays the activations out im2col-style. Entry i of the
x buffer holds filter tap i for all LANES output pixels. With K×K×Z taps a
filter fits one pass if K·K·Z ≤ XBUF_DEPTH. If it does not fit, successive
passes without `clear` keep accumulating.

**Draining.** With `drain`, the LANES results are then aligned and written to
o buffer entries `obase`…`obase+LANES-1`, one per clock.

**Controller pipeline** (`tile_ctrl`):

1. Read the weight word.
2. Parse it, then read the activation vector.
3. Put the term and vector into a 4-entry FIFO.
4. The multiplier takes terms with a valid/ready handshake.

Reads are issued only while the FIFO has room for everything in flight. A
multi-clock multiplication therefore stalls the reads, and nothing is dropped.
A stream of small weights runs at one term per clock.

**Zero skipping.** Between steps 2 and 3 a second weight decoder checks the
parsed word. If its weight is zero at the pass's precision, the term is not put
into the FIFO and costs the multiplier no clock. Low precisions turn many small
weights into zero, so this matters most there. A dropped term can be the first
word of an SLQ pair. The second word then goes without its hold flag: it
carries the same activation vector, so the lanes reload it.

### Host protocol

1. Write the x buffer (`x_we`, `x_waddr`, `x_wdata`) and the w buffer (`w_we`,
   …) while `busy` is low.
2. Pulse `start` for one clock with `cfg` = {wfmt, prec, xis} and with
   `n_words`, `wbase`, `xbase`, `obase`, `clear` and `drain`.
3. Wait for `done`, a one-clock pulse.
4. Read results with `o_re`/`o_raddr`. Data appears on `o_rdata` one clock
   later.

The ports are plain: no off-chip memory interface or bus is included.

### Parameters

| parameter | default | meaning |
|---|---|---|
| LANES | 256 | SC-MACs (output pixels per pass) |
| Q | 16 | data width and maximum precision |
| HWP | 4 | log2 of the stream bits per clock |
| A | 2 | extra accumulator bits (ACC_W = Q+A = 18) |
| XBUF_DEPTH / WBUF_DEPTH / OBUF_DEPTH | 512 / 1024 / 512 | buffer entries |
| ZERO_SKIP | 1 | drop zero-weight terms in the controller |
| APC_N / APC_Q | 128 / 16 | bit-parallelism and precision of the conventional SC-MACs |
| TILE_TM / TILE_TR / TILE_TC | 4 / 4 / 4 | shape of the conventional SC-MAC array (maps x rows x columns) |

The following defaults come from the original design: 256 MACs, 16-bit data,
hardware precision 4, A = 2, and 128-bit parallelism for the approximate
conventional SC-MAC. The buffer depths are this implementation's choice. The
original evaluates the conventional array at 8x8x8; the default here is 4x4x4
so that the whole top simulates quickly, and the parameters take 8.

## The side designs

**`apc_sc_mac`** is conventional SC, kept for comparison and for the
tile-parallel design style. It is built as follows:

- **Stream generation.** N LFSR stochastic number generators (`lfsr_sng`) make
  N stream bits per clock for each operand. Each SNG has one LFSR: x is
  compared with its state and w with the bit-reversed state.
- **Multiplication.** XNOR gates multiply the bipolar streams.
- **Approximate counting.** Pairs of product bits are reduced, alternately by
  AND and by OR, to N/2 bits. These are counted, and the count is doubled.
- **Accumulation.** A saturating up/down accumulator adds 2·ones − N.

Its accuracy is that of random streams: several percent of full scale after
256 bits. The parallel counter and accumulator are a separate module,
`apc_pc_acc`, so that the array below can reuse them.

**`sc_compute_tile`** is the tile-parallel arrangement of such MACs: TM x TR x
TC MACs compute TM output maps for a TR x TC block of pixels. Each clock it
takes TM weights and TR*TC activations. All MACs of one map use the same weight
stream, and all MACs of one pixel use the same activation stream, so
comparators are needed per operand, not per MAC. N LFSRs are shared by every
comparator: activations compare against the LFSR state, weights against its
bit-reversed state. Output `y[m*TR*TC + pixel]` is the accumulator of map m.

**`slq_bin_mac`** is the binary datapath for log and SLQ weights. For every
word, an arithmetic right shift of x by |q| is added to or subtracted from y.
The x register is held for the following words of an SLQ series, which are
found by the same `slq_sequencer`.

## Files

| file | block |
|---|---|
| `rtl/sc_pkg.sv` | weight format enum, pass configuration struct |
| `rtl/sc_dcnn_accel.sv` | top: tile plus the side designs |
| `rtl/tile_ctrl.sv` | pass sequencing, parser, FIFO, result drain |
| `rtl/bisc_mvm.sv` | shared weight side and LANES lanes |
| `rtl/sc_mac_lane.sv` | one lane |
| `rtl/sel_fsm.sv` | column counter / MUX select |
| `rtl/weight_decoder.sv` | log-to-linear conversion, precision scaling |
| `rtl/ones_counter.sv`, `rtl/ones_counter_log.sv` | ones counters for linear and power-of-two counts |
| `rtl/ud_accumulator.sv` | saturating up/down accumulator |
| `rtl/slq_sequencer.sv` | SLQ word parser |
| `rtl/dps_align.sv` | decimal-point alignment |
| `rtl/buffer_ram.sv` | 1W1R synchronous buffer |
| `rtl/apc_sc_mac.sv`, `rtl/lfsr_sng.sv` | conventional SC-MAC and its SNG |
| `rtl/apc_pc_acc.sv` | approximate parallel counter and saturating accumulator |
| `rtl/sc_compute_tile.sv` | array of conventional SC-MACs with shared LFSRs |
| `rtl/slq_bin_mac.sv` | binary log/SLQ MAC |

## Simulating

Every testbench `tb/tb_<block>.sv` is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sc_pkg.sv tb/tb_sc_ref_pkg.sv \
    tb/tb_sc_dcnn_accel.sv --top-module tb_sc_dcnn_accel -Mdir obj -o sim
obj/sim
```

Verilator finds the other modules through `-Irtl`. Add `tb/tb_sc_ref_pkg.sv`
for the testbenches that use the reference model. Those are every testbench
under the tile: the multiplier's blocks, the controller and the top.

**Reference model.** `tb_sc_ref_pkg` does not reuse the hardware's column
formulas. It walks the stream one bit at a time from the definition above, and
counts with saturation once per b bits as the hardware does.

**Top-level testbenches.**

- `tb_sc_dcnn_accel` runs 20 passes at 8 lanes over every format. Their
  precisions range from 4 to 16, they mix signed and half-range x, and they
  accumulate over passes. It checks:
  - every result;
  - the multiplier's busy clocks against Σ⌈|W|/b⌉.

  It also counts that each mechanism happens at least once: special codes,
  held activations, stalls, saturation, multi-clock and partial columns, zero
  weights and their skipping (including a skipped first SLQ word), the log counter, HRS, DPS, and accumulation over passes.
- `tb_sc_dcnn_accel_full` runs the top at its default size.

- `tb_workload_conv` runs two convolution layers through the default-size top,
  with the testbench acting as host: it unrolls the filter windows into
  activation vectors. The first is a LeNet-style layer: 20 maps, 5x5 filters,
  an 8x8 output, precision 5, one pass. The second is a CIFAR-10-style layer:
  32 maps, 5x5 filters, a 16x16 output block, precision 9. Its 800 taps exceed
  the input buffer, so it runs as two passes that accumulate.

The first two testbenches also exercise the side designs: worked SLQ examples in both series
encodings, saturation of the conventional SC-MAC in both directions, and a
signed product in every MAC of the array.

## How far it can be trusted

**Verification.**

- Every block is checked against an independent model, mostly exhaustively or
  with thousands of random cases.
- The multiplier has also been checked against the worked bit sequence of a
  4-bit bit-serial example.
- For each block a deliberately broken copy was shown to fail its testbench.
- All modules pass Verilator lint and the slang/Yosys front end.
- The full 256-lane top synthesises with Yosys.

**Departures from the original design, and choices it leaves open:**

- **Output width.** The output buffer stores all 18 aligned accumulator bits.
  The original takes the top 16 bits as the output; drop the 2 LSBs to get
  that.
- **Zero skipping.** With `ZERO_SKIP` = 1 (default), the controller drops
  terms whose weight is zero at the pass's precision before they reach the
  multiplier. With 0, each such term costs the multiplier one clock. Where the
  zero test sits is this implementation's choice.
- **Both ones counters in every lane.** Each lane has the linear and the log
  counter, so one build runs every weight format. The original treats the
  linear-weight and log-weight MACs as separate designs. Set `SUPPORT_LIN` or
  `SUPPORT_LOG` to 0 in `bisc_mvm` for a single-format build.
- **Buffers.** Depths, single buffering, and the host port protocol are this
  implementation's. So are the controller's pipeline and FIFO. There is no
  off-chip memory interface, DMA, bus or processor. In the original FPGA
  prototype those were vendor parts.
- **Log weights below the precision.** A log weight whose magnitude is below
  the precision (m > p−1) becomes zero.
- **Special code.** The SLQ special code is fixed at −16, with series length
  2. Tagged series may be longer.
- **Side SC-MAC details.** The AND/OR pairing of the approximate counter, the
  LFSR taps and seeds, and the sharing of one LFSR between x and w are this
  implementation's choices.
