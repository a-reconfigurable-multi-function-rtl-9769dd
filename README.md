# A cache that turns into a function unit

This design is a processor-side cache module whose data array is made of
look-up tables instead of plain SRAM rows. As a cache it holds 8 KB in a
direct-mapped organisation. When a program needs a heavy, regular
computation, the host writes LUT contents through the ordinary cache write
path. The same array then works as an 8-tap convolution (FIR) unit or as an
8-point DCT/IDCT unit. Two more buffers hold the unit's input and
intermediate data, and a small controller sequences the work.

There are two points to the idea:

* Most of the silicon of a function unit built this way is memory. When no
  computation is needed, that memory stays useful as cache.
* Each function has its own fixed wiring between the LUTs, so nothing has to
  be routed at run time. Reconfiguration only writes memory, which is far
  faster than loading an FPGA bitstream.

The RTL covers these parts:

* the LUT array with its memory-mode decoding;
* the cache tags;
* the LUT-based adders, multipliers and distributed-arithmetic PEs;
* the FIR and DCT/IDCT mappings;
* the controller and its two data buffers;
* a top level that joins them.

Each part has a self-checking testbench.

## The LUT array

The array has 32 rows of 8 LUTs (`rc_lut_array`). Every LUT is a 4-input
table with 16 lines of 16 bits, and it has its own 4-to-16 decoder. In
function mode, therefore, all 256 LUTs can be read at 256 different
addresses in the same cycle.

In memory mode (`mem_mode = 1`), a multiplexer in front of every decoder
switches the LUT input to the four line bits of the cache address. Each row
then presents one 128-bit block on its local bit lines. The row bits of the
address choose which row drives the global bit lines. A column decoder picks
one 16-bit word out of the block.

The word address inside the array is `{row[4:0], line[3:0], word[2:0]}`,
which gives 4096 words (8 KB). Reads are combinational and writes take
effect on the clock edge.

### Interleaved storage, and why configuration is cheap

A block stores its eight words bit-interleaved: bit `b` of word `w` lives in
column `b*8 + w`. As a result, each LUT (16 columns) holds bits `2k` and
`2k+1` of every word. Seen from the LUT, entry bit `e` of LUT `k` is bit
`2k + e%2` of word `e/2`.

So one word written through the cache port sets 2 bits in every LUT of the
row. A 6-bit LUT function fills words 0..2 of a line. The host writes LUT
contents with ordinary word writes, which are marked `c_cfg = 1` so they do
not set tags.

The testbench package `tb/tb_rc_pkg.sv` contains `pack_word`, which
converts eight LUT entries into the cache word that holds them.

## The carry-select LUT adder

Every adder in the design is built from "2-bit adder" LUTs (`lut_cs_adder`):

* The LUT address is `{b[2i+1:2i], a[2i+1:2i]}`.
* Bits `[2:0]` of the entry hold `{carry, sum}` for carry-in 0. Bits `[5:3]`
  hold the same for carry-in 1.
* All LUTs are read at once. Only a multiplexer chain sees the carry ripple,
  which is the carry-select principle.

Subtraction uses a second context in bits `[11:6]` of the same entry, which
holds the table of `a + ~b`. Setting `ctx_sub = 1` and `cin = 1` therefore
gives `a - b` from the same LUTs with no extra logic.

The adders come in three sizes:

| Use | LUTs | Width |
|---|---|---|
| FIR multiplier combine | 6 | 12 bits |
| FIR accumulate | 12, over two rows | 24 bits |
| DCT PEs and pre/post | 8 | 16 bits |

## Convolution (FIR) mapping

One tap takes four LUT rows (`fir_stage`), so the 32 rows hold 8 taps.

| Row | LUTs | Content |
|---|---|---|
| 0 | 0/1 | `c * x[3:0]`, product bits 5:0 and 11:6 |
| 0 | 2/3 | `c * x[7:4]`, the same split |
| 0 | 4..7 | unused |
| 1 | 0..5 | 12-bit adder: `(c*x[3:0] >> 4) + c*x[7:4]`, the upper 12 bits of the 8x8 product |
| 2, 3 | 0..5 each | 24-bit adder: `y_out = y_in + c*x` |

The coefficient `c` is never an input signal: it lives in the multiplier
tables. Samples and coefficients are 8-bit unsigned, and sums are 24-bit.

Each stage delays the sample by two registers and the partial sum by one.
A chain of stages is therefore a systolic filter: `y` leaving tap 7 at
enabled cycle `t` is `sum_j c_j * x(t - 8 - j)`. One cycle covers three LUT
reads in series (multiply, combine, accumulate).

**More than 8 taps.** A filter with TAP taps runs as TAP/8 passes over the
same data:

1. Pass `p` streams all X samples from buffer A.
2. It adds the partial sums left by the earlier passes, reading them from
   buffer B.
3. It writes the new partial sums back into buffer B, shifted by `8p`
   positions.
4. Between passes, the controller raises `cfg_req` with the next pass number
   and waits for `cfg_ack`. In that time the host rewrites only row 0 of each
   tap (the multiplier tables) with the next eight coefficients.
5. After the last pass, `B[0 .. X+TAP-2]` holds the full convolution.

A pass takes `X + 15` cycles plus one cycle of read latency, which matches
the expected `(TAP/8) * (X + 2*8 - 1)` cycles for the whole filter.

## DCT/IDCT by distributed arithmetic

The 8-point transform uses 20 rows (`dct_unit`). PE `k` (`dct_pe`) uses two
rows:

* **Row `2k`:** LUT 3 is a 16x16 ROM. Its address is one bit from each of
  four input values, and each entry is a sum of four cosine weights.
* **Row `2k+1`:** a 16-bit adder/subtracter that works as a shift-
  accumulator.

Bits arrive least significant first. For each bit the PE computes
`acc = (acc >>> 1) + ROM`. On the sign bit it subtracts the ROM value
instead.

Rows 16..19 hold four 16-bit adder/subtracters (`dct_prepost`). Each one
gives `a + b` and `a - b` from a single read, using two carry chains over the
same entries.

**Forward DCT.** The pre-adders form `s_i = x_i + x_(7-i)` and
`d_i = x_i - x_(7-i)` for `i = 0..3`. Then:

* PEs 0..3 take `s_0..s_3` and produce `X0, X2, X4, X6`.
* PEs 4..7 take `d_0..d_3` and produce `X1, X3, X5, X7`.

**Inverse DCT.** PEs 0..3 take `X0, X2, X4, X6` and give the even parts
`E_j`. PEs 4..7 take the odd inputs and give `O_j`. The post-adders form
`y_j = E_j + O_j` and `y_(7-j) = E_j - O_j`.

**Timing.** Pre-added values are 9 bits wide, so one row takes 9 cycles. An
8-row 1-D transform therefore takes 8 + 8x8 = 72 cycles once the pipeline is
full. Rows overlap through double buffering:

* while the PEs work on one row, the load register collects the next row;
* at the same time, the output register streams the previous result out one
  16-bit word per cycle.

**Scaling.** A ROM weight is `0.5 * C(u) * cos((2i+1)u*pi/16) * 2^13`, where
`C(0) = 1/sqrt(2)` and `C(u) = 1` otherwise. The host computes these values
and writes them with `c_cfg` writes. A 1-D output is therefore about 32 times
the exact orthonormal result.

**2-D transform.** The controller runs two 1-D passes per 8x8 block:

1. **Pass 1** reads the block from buffer A. It writes the results into
   buffer B, transposed.
2. **Pass 2** reads B. It shifts each word right by `inter_shift` and
   saturates it to 8 bits, so the value fits the unit's input width again.
   It writes the final block back into A over the consumed input, so the two
   buffers swap roles.

With `inter_shift = 7`, the 2-D output is about 8 times the exact
orthonormal 2-D DCT.

The controller interleaves the passes of consecutive blocks in the order
P1(0), P1(1), P2(0), P1(2), P2(1), and so on. The row pipeline therefore
never drains between passes. Pass 2 of a block waits only until pass 1 of
that block has written all its results, and with two or more blocks it
never has to wait.

A job of n blocks takes `144n + 19` cycles. That is the `2 * (N + Wd*N)`
cycles per block of the original formula, plus 19 cycles to fill and drain
the pipeline once. A single-block job has to drain between its two passes
and takes 182 cycles.

## Cache behaviour

Each block has a tag and a valid bit (`rc_tag_array`). The cache is direct
mapped with 512 blocks of 8 words, and an address is
`{tag, row, line, word}`. With the default 20-bit word address the tag is
8 bits.

Cache behaviour follows these rules:

* A read in cache mode reports `c_hit`.
* A normal write stores the word and marks its block valid with the tag. The
  host fills a whole block on a miss.
* Leaving cache mode clears every valid bit, since the array is about to be
  overwritten with LUT contents.
* Writing back dirty data before that is the host's responsibility. It is
  not modelled.

## Controller, buffers and top level

`rcma_top` instantiates three parts:

* the reconfigurable module `rc_module`;
* the controller `rc_controller`;
* two 16384 x 24-bit buffers (`data_buffer`): A for input, B for
  intermediate data.

While the controller is idle, the host loads and reads the buffers through
the `hb_*` port. A job works as follows:

1. The host sets `mode`, `n_elem` (X), `n_pass` (TAP/8), `n_blocks` and
   `inter_shift`.
2. The host pulses `start` while the controller is idle. An assertion checks
   this.
3. The controller raises `busy` during the run. In FIR mode it also handles
   the `cfg_req`/`cfg_ack` exchanges.
4. At the end it pulses `done`, and `cycles` reports the length of the run.

All addresses are generated sequentially by the controller. `rst_n` is
active low and synchronous.

Several such modules could share a host and main memory over a
reconfigurable multiple-bus network. That network, the host and main
memory are not part of this RTL. Their connections are the top level's
ports.

## What follows the original architecture, and what is this design's own

**Taken from the architecture:**

* the 8 KB, 32 x 8 LUT array of 16x16-bit 4-LUTs with a decoder per LUT;
* memory-mode input multiplexing and interleaved word storage;
* carry-select adders built from 2-bit adder LUTs, and multi-context add and
  subtract entries;
* the four-row FIR tap with the 6-bit split of the 4x8 multipliers, the
  12-bit and 24-bit adders, and the doubly delayed sample;
* 8 taps per module, with multi-pass operation that rewrites only the
  multiplier rows;
* distributed-arithmetic PEs made of a ROM at the fourth LUT, a
  divide-by-two shift-accumulator and sign-bit subtraction;
* 20 rows for the DCT (16 for PEs, 4 for pre/post);
* a half-and-half even/odd split of the inputs;
* double input and output registers;
* two 1-D passes through an intermediate store, with the two data stores
  swapping roles;
* a controller that generates sequential addresses.

**This design's choices:**

* the exact interleave column order `b*8+w`;
* the bit order of LUT addresses, `{b, a}`;
* unsigned FIR data;
* 9 cycles per DCT row, because pre-added values need 9 bits;
* the DCT results leave the accumulators in parallel at the end of a row
  rather than bit-serially;
* word-serial load and unload ports on the DCT unit;
* requantisation with saturation between the 1-D passes;
* the pass offsets and the `cfg_req`/`cfg_ack` handshake of the controller;
* the interleaved order of DCT passes across blocks;
* tags and flush-on-mode-change;
* buffer width and depth;
* synchronous reset;
* point-to-point wiring in place of the bus network.

**Known differences in performance:**

* A 2-D 8x8 block takes 144 cycles within a multi-block job, as in the
  formula above; that is 2.30 µs at a 16 ns cycle. Each job adds 19 cycles,
  and a job of one block takes 182 cycles (2.91 µs).
* A single job handles at most 255 blocks, because each buffer holds
  16384 words. Full images (768x512 is 6144 blocks, 1920x1152 is 34560)
  must be streamed through the buffers by the host.
* A FIR of up to 256 taps over up to 8192 samples fits in one job. It needs
  32 passes, and the worst-case sum stays below 2^24.

**Lint notes:**

* Verilator flags the LUT input array as a combinational loop (UNOPTFLAT).
  One LUT row's output addresses the next row, and both live in one array
  variable. No element actually depends on itself.
* Verilator also flags the unused upper bits of buffer A's read data.

Both notes are repeated in the module headers.

## Testbenches and how far to trust the RTL

Every module has a testbench `tb/tb_<module>.sv`. Each one compares the
outputs against values computed independently in the testbench:

* LUT tables are computed from their definitions.
* The DCT is checked against a bit-exact serial model and a floating-point
  transform.
* The FIR is checked against a direct convolution.

Each testbench ends by printing `TB_RESULT checks=N failures=M`, and each
has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_rc_lut_array` | memory-mode reads and writes, the interleave, function-mode reads of all LUTs |
| `tb_lut_cs_adder` | random add and subtract, carry in and out |
| `tb_fir_stage` | one tap against `y_in + c*x`, and the two-cycle sample delay |
| `tb_dct_pe`, `tb_dct_prepost` | the DA accumulator and the dual add/subtract rows |
| `tb_dct_unit` | rows of forward and inverse transforms, 9 cycles per row |
| `tb_rc_tag_array`, `tb_rc_module` | hits, misses, flush on a mode change, FIR and DCT through the module |
| `tb_rc_controller` | multi-pass FIR and two-pass DCT sequencing against behavioural models |
| `tb_rcma_top` | full-size run with default parameters |
| `tb_rcma_workloads` | the largest workloads at default parameters |

`tb_rcma_top` runs the following sequence with every parameter at its
default:

1. cache hits, misses and a flush;
2. a 16-tap FIR in two passes with a reconfiguration between them;
3. two 8x8 DCT blocks, then two 8x8 IDCT blocks, with a check on the cycle
   count per block.

It counts each mechanism it exercises and checks that each one happened.

`tb_rcma_workloads` runs the largest sizes the system is meant for:

* a 256-tap convolution over 8192 samples, in 32 passes. All 8447 outputs
  and the run length are checked. A stretch of full-scale samples pushes the
  sums past 2^23.
* a 255-block DCT job and a 255-block IDCT job, checked like the small
  blocks in `tb_rcma_top`.

Each of the two system tests simulates in seconds once built.

## Simulating

Every testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rc_pkg.sv tb/tb_rc_pkg.sv tb/tb_rcma_top.sv \
    --top-module tb_rcma_top --Mdir obj -o sim
./obj/sim
```

Replace `tb_rcma_top` with any other testbench name. Both packages must come
first on the command line. `-Wno-fatal` keeps the lint warnings described
above from stopping the build.

Useful places to make changes:

* Array and mapping sizes are in `rtl/rc_pkg.sv`.
* The tables the host must write are described by the functions in
  `tb/tb_rc_pkg.sv`: `adder_entry`, `mult_entry`, `rom_entry` and
  `pack_word`.
