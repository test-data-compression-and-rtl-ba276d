# Golomb-coded scan test decompression with interleaved cores

An embedded core is tested by shifting precomputed patterns into its
internal scan chain. This design cuts both the test data held in the tester
and the tester speed needed. It sends a Golomb code of the *differences*
between patterns, not the patterns themselves, and decodes it on chip.

The main idea is to reuse the core's own scan chain as the decompression
register. After pattern `t_(i-1)` has been applied, the chain captures the
core's fault-free response `r_(i-1)`. The next pattern is shifted in as

    t_i = d_i XOR r_(i-1)

Each decoded difference bit is XORed with the bit leaving the chain and fed
back in. Test patterns are ordered so that each one lies close to the
previous response, so the difference vectors `d_i` are mostly zeros. Runs of
zeros compress well with a Golomb code.

A second idea lets several cores share one tester channel. A *channel
selector* interleaves the codes of `m` cores into one composite stream
`T_C`, one bit per core in turn. The cores are then decoded in parallel.

The RTL is parameterised by the Golomb group size `M` (a power of two,
default 4). `M` is also the number of interleaved cores. `LEN` is the scan
chain length (default 250) and `CAP` is the number of cells that capture
core outputs (default 250).

## The Golomb code

The stream is cut into runs of `L` zeros, each ended by a one. The code
word for a run has two parts:

* **prefix:** `floor(L/M)` ones, then a separator zero;
* **tail:** `L mod M` as a `log2(M)`-bit binary number, most significant bit first.

For `M = 4`:

| run | code  | run | code   |
|-----|-------|-----|--------|
| 0   | 000   | 6   | 1010   |
| 1   | 001   | 7   | 1011   |
| 3   | 011   | 8   | 11000  |
| 4   | 1000  | 11  | 11011  |

A stream that ends in zeros is closed with an extra one. That bit is shifted
into the chain after the last capture, so it does no harm.

Encoding is done off line and is not part of this design. This covers
pattern ordering, filling don't-care bits from the previous response, and
building `T_C`. The testbench package `tb/tb_golomb_pkg.sv` contains a
reference encoder and interleaver.

## Decoder timing: why every tail takes M cycles

`golomb_decoder` is an FSM plus a `log2(M)`-bit counter. It takes one code
bit per cycle when it needs one and emits at most one difference bit per
cycle. The emitted bit doubles as the scan shift enable. Its timing is fixed:

| code part           | cycles | output                       |
|---------------------|--------|------------------------------|
| prefix one          | M      | M zeros, one per cycle       |
| separator zero      | 1      | none                         |
| tail (`log2 M` bits)| M      | `L mod M` zeros, then the one |

The tail is always padded to `M` cycles. The first `log2 M` tail cycles read
the tail bits. A zero leaves early whenever the tail bits read so far already
prove it is due: the known leading bits, shifted to full weight, are a lower
bound on the count. The last cycle emits the closing one.

For `M = 4` this gives exactly the outputs of the published decoder, which
has three padding states. In this design that state diagram is folded into
five states plus counters, and it works for any power of two. The published
`m = 4` circuit has four flip-flops. This generic version has 11, because the
tail value and the count of zeros already sent are kept in registers.

Because of the fixed timing, decoding one core's code always takes the
maximum `m*n_c - r*(m*log2(m) - 1)` cycles, where `n_c` is the number of
code bits and `r` the number of ones.

The fixed timing is also what makes interleaving possible. Each core needs a
new code bit at most once every `M` cycles, except inside a tail, where its
`log2 M` bits are needed back to back.

**Departure from the published diagram.** In the published diagram, the
prefix-counting state leaves on the counter's done signal without emitting
a bit. Read literally, a prefix one would then take `M+1` cycles. The timing
analysis, and interleaving itself, need exactly `M` cycles. So here the last
zero is emitted on that transition.

## The channel selector

`soc_channel_selector` has three parts:

* `selector_fsm` reads `T_C`;
* `channel_counter`, a `log2(M)`-bit counter, selects the core;
* `channel_demux` forwards each bit to that core's decoder.

**Prefix bits.** On a prefix one, the FSM forwards the bit and the counter
steps to the next core.

**Separator and tail.** On a separator zero, the FSM forwards the zero and
raises `clk_stop` for the next `M` cycles. During those cycles it forwards
the `log2 M` tail bits and then idles. The channel therefore stays on the
same core for `1 + M` cycles: the separator plus the whole tail. The
decoder's tail budget of `M` cycles matches this.

**Tester handshake.** The tester interface is `data_in` plus `v_in`. `v_in`
high means that the next cycle reads a new bit, so the tester moves on at
every clock edge where `v_in` is high. The tester presents the first bit of
`T_C` from reset.

**Output timing.** `data_out` and `v_out` are registered. `clk_stop` is
combinational and acts as the counter's clock enable. As a result, a bit and
its channel number change on the same edge. The published figure gates the
counter clock with `clk AND NOT clk_stop`; this design uses a single clock
with an enable instead.

**Reset.** The counter resets to `M-1`, so that the first bit of `T_C` goes
to core 0.

**Cost in cycles.** Each prefix one costs one cycle of the shared channel.
Each separator with its tail costs `1 + M` cycles.

**Building `T_C`.** The cores are visited in turn. Each turn takes one
symbol from that core: either a prefix one, or a separator zero with its
whole tail. A core whose code has run out gets a filler one. A filler only
shifts zeros into a chain that is already done; this filler rule is this
design's choice.

## Scan capture

Each `core_decompressor` contains one decoder, the XOR and the core's scan
chain (`scan_chain`, mux-D cells), plus a shift counter. After `LEN` shifts,
the chain captures the core outputs in the next cycle. With `CAP < LEN`,
only the first `CAP` cells (at the scan-in end) capture, and the rest keep
their pattern bits. This covers a core with more chain-driven inputs than
outputs. With `CAP = LEN`, every cell captures. For a core with more outputs
than inputs, the encoder sets the unused difference bits to zero; no extra
hardware is needed.

In `golomb_soc_test`, a capture by any core stalls the selector and every
decoder for that cycle. `v_in` is held low during the stall, so the tester
waits. Because everything stalls together, the fixed schedule between the
selector and the decoders is kept. Two cores may capture in the same cycle.

The source only asks that parallel chains capture in a synchronised way.
The stall mechanism is this design's own.

The top module checks one rule with an assertion: a decoder must be ready
whenever the selector sends it a bit.

## Modules

| file | role |
|------|------|
| `rtl/golomb_pkg.sv` | state enums, `log2m()` |
| `rtl/golomb_decoder.sv` | Golomb decoder, tail padded to M cycles |
| `rtl/scan_chain.sv` | internal scan chain with partial capture |
| `rtl/core_decompressor.sv` | decoder + XOR + chain + capture control for one core |
| `rtl/selector_fsm.sv` | selector FSM (`clk_stop`, `v_in`, `data_out`, `v_out`) |
| `rtl/channel_counter.sv` | i-bit channel counter |
| `rtl/channel_demux.sv` | demultiplexer to the M decoders |
| `rtl/soc_channel_selector.sv` | FSM + counter + demux |
| `rtl/golomb_soc_test.sv` | top: selector and M core decompressors |

**Top ports.** The logic of each core stays outside the design:

* `core_cells[c]` drives the inputs of core `c`;
* `core_resp[c]` takes its outputs;
* `capture[c]` marks the cycle in which a pattern has been applied and is being captured.

`scan_out`, the decoded difference bits, `sel` and `clk_stop` are brought
out for observation. The source does not say how responses are observed
beyond their use in the next pattern. `scan_out` is available for a
compactor or for comparison.

Reset is synchronous and active low (`rst_n`) everywhere, and clears every
chain to zero.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=F` and ends with
`$finish`. Example with plain Verilator:

    verilator --binary --timing --assert -Mdir obj rtl/golomb_pkg.sv \
      rtl/golomb_decoder.sv rtl/scan_chain.sv rtl/core_decompressor.sv \
      rtl/selector_fsm.sv rtl/channel_counter.sv rtl/channel_demux.sv \
      rtl/soc_channel_selector.sv rtl/golomb_soc_test.sv \
      tb/tb_golomb_pkg.sv tb/tb_core_model.sv tb/tb_soc_harness.sv \
      tb/tb_golomb_soc_test.sv --top-module tb_golomb_soc_test
    obj/Vtb_golomb_soc_test

Add `tb/tb_decoder_harness.sv` or `tb/tb_decomp_harness.sv` for the tests
that use them. `tb/tb_core_model.sv` is a stand-in core: a fixed nonlinear
function of the chain.

| testbench | what it shows |
|-----------|---------------|
| `tb_golomb_decoder` | m = 2, 4, 8, 32, 2048 random streams with random holds; every bit; the `en` request; exact cycle count; the m = 4 code table |
| `tb_scan_chain` | shifts and partial/full capture against a reference model |
| `tb_core_decompressor` | patterns `t_i` at every capture, difference stream, cycle count, Case `CAP < LEN` |
| `tb_fig3_example` | a worked four-pattern example: differences 1000, 0100, 1010, 0000 with responses 0000, 0100, 0011 apply 1000, 0100, 1110, 0011 |
| `tb_selector_fsm` | the four-core stream `1010110011011`, cycle by cycle; random streams with stalls |
| `tb_channel_counter`, `tb_channel_demux` | counting, stop and reset; routing |
| `tb_soc_channel_selector` | which core gets which bit; spacing of at least M cycles; tails back to back |
| `tb_golomb_soc_test` | whole design at default size, end to end; counts each mechanism (prefix ones, tails, tail values 0 and M-1, counter wrap, fillers, capture stalls, simultaneous captures) |
| `tb_golomb_soc_m8`, `tb_golomb_soc_m2` | the same with 8 and 2 cores, and with partial capture |
| `tb_golomb_soc_example` | four cores with code sizes 40/60/80/100 bits and 4/6/8/10 ones |
| `tb_table2_workloads` | single-chain runs shaped like five ISCAS'89 benchmarks (m = 4, 8, 32; chains up to 1742 cells) |

## Results and limits

**Tester frequency ratio.** `tb_table2_workloads` uses random data with the
group size, pattern count and density of ones of five ISCAS'89 benchmark
test sets. Decoding takes exactly `T_max` cycles, plus one cycle per
capture. The tester-frequency ratio `p*n / (T_max/m)` against
ATPG-compacted external test comes out close to the published values:

| circuit | measured ratio | published ratio |
|---------|----------------|-----------------|
| s9234   | 1.94           | 1.91            |
| s15850  | 4.11           | 3.92            |
| s13207  | 17.8           | 16.8            |
| s38417  | 2.03           | 1.95            |
| s38584  | 4.09           | 3.88            |

The real test sets are not included. The chain lengths and pattern counts
used in these runs are derived, not given by the source.

**Interleaving time.** In the four-core example, the design takes 432
cycles plus 4 capture stalls. Testing the cores one by one would take 924
cycles. The closed-form interleaved time is 420 cycles. It counts only the
prefix ones of the largest core. In the hardware, that core's own tails also
take turns in the rotation, which costs 12 more cycles here.

**Defaults and sizes.** Only circuits that use `m = 4` with a 250-cell chain
fit the defaults. Other group sizes and chain lengths are set through `M`,
`LEN` and `CAP`. At `M = 2048` only the decoder has been simulated, on a
40000-bit stream. The whole design has not been simulated at that size.

**Not modelled.**

* The core logic itself.
* The tester.
* The circuit that synchronises the tester clock with a scan clock at
  `f_scan = m*f_ext`. Here everything runs on one clock.
