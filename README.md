# Rectangular decoder for test-data decompression

Scan test data is usually compressed with a *linear* decompressor, such as
an LFSR with reseeding or an XOR network. A linear decompressor handles
don't-care bits very well, but it cannot exploit correlation. It has to
produce every specified bit of every test cube, so its compressed data can
never be smaller than the number of specified bits.

Rectangular encoding adds a small *nonlinear* decoder between the linear
decompressor and the scan chains. Test cubes that resemble one another are
grouped into **clusters**. Within a cluster, many scan chains hold the same
value, or a don't-care, over a run of consecutive scan slices in every cube
of the cluster. Such a block of slices × cubes is a **rectangle**. The
decoder fills those chains with a constant fill value. The linear
decompressor then only has to produce the bits that are left, which means
fewer specified bits and better compression.

The decoder does not depend on the test set. The same hardware decodes any
set of rectangles, so it can be designed before the test data exists and
reused across cores.

This repository holds synthesizable SystemVerilog for the decoder, plus
self-checking testbenches.

```
 tester ──b──► linear decompressor ──N──► rectangular decoder ──N──► scan chains 1..N
                (not included)            (this RTL: rect_decoder)    (circuit under test)
```

## Rectangles and control words

Take a test cube of `m` bits loaded into `N` scan chains. It is shifted in as
`m/N` scan slices of `N` bits, one slice per clock cycle. All cubes of a
cluster are cut into the same sequence of rectangles, each a run of whole
slices. One **control word** describes each rectangle:

```
 MSB                                                      LSB
 ┌──────────────┬──────────────────────────────┬────────────┐
 │ width        │ chain select mask            │ fill       │
 │ W_BITS       │ C_BITS = ceil(N_CHAINS / K)  │ 1 bit      │
 └──────────────┴──────────────────────────────┴────────────┘
```

* **width** is the number of slices the rectangle spans, in binary. The
  value 0 means 2^W_BITS slices.
* **chain select mask** has one bit per group of `K` neighbouring chains.
  The first group's bit sits next to the width field. A bit of 1 means
  "these chains take the fill value", and 0 means "these chains take the
  decompressor's bit".
* **fill** is the constant loaded into the selected chains.
* A rectangle narrower than `MIN_WIDTH` ignores mask and fill. Every chain
  then takes the decompressor bit. This lets the encoder leave mask and fill
  of short rectangles unspecified, which costs the decompressor nothing.

A small example uses 4 chains, K = 1, a 2-bit width field and 7 slices. It
has two cubes in a cluster, with chains shown as rows and slices b1..b7 as
columns:

```
 cube 1   b1..b7          cube 2   b1..b7
 sc1      0XX111X         sc1      XX01X1X
 sc2      X00X11X         sc2      X00X10X
 sc3      0XXXX11         sc3      0X0XXX1
 sc4      XXXX110         sc4      XXXX110
```

Three rectangles cover it:

| rectangle | slices | width | mask (sc1..sc4) | fill | effect |
|-----------|--------|-------|-----------------|------|--------|
| 1 | b1-b3 | 11 | 111x | 0 | sc1-sc3 filled with 0, sc4 don't care |
| 2 | b4-b6 | 11 | 1011 | 1 | sc1, sc3, sc4 filled with 1; sc2 has a 1/0 conflict in b6 and comes from the decompressor |
| 3 | b7    | 01 | xxxx | x | narrower than 2 slices: all chains from the decompressor |

The control data costs 21 bits, of which 15 are specified (the x bits are
free). In return, the decompressor no longer has to produce most of the
cubes' specified bits. The testbench `tb_rect_decoder_sec` decodes exactly
this example and checks every specified bit of both cubes.

### Secondary encoding (`SECONDARY = 1`)

This enhanced format replaces the 1-bit fill value with a 2-bit code. With
it, more and cheaper rectangles pay off:

| code | name | chain i receives | span |
|------|------|------------------|------|
| 11 | fill 1 | 1 | width field |
| 10 | fill 0 | 0 | width field |
| 01 | fill 0/1 | mask bit of its group, so the mask holds the fill values | always 1 slice |
| 00 | fill with conflict | the width field's MSB where the mask bit is 1, the decompressor bit where it is 0 | always 1 slice |

With codes 01 and 00 the width field is mostly free. In code 00 only its MSB
is used, as the fill value. The narrow-rectangle bypass is not used in this
format. The same example, in the secondary format, becomes four rectangles:

| rectangle | word | meaning |
|-----------|------|---------|
| 1 | `11 xxxx 10` | b1-b3 all 0 |
| 2 | `10 xxxx 11` | b4-b5 all 1 |
| 3 | `1x 1011 00` | b6: sc1, sc3, sc4 get 1, sc2 from the decompressor |
| 4 | `xx xx10 01` | b7: sc3 gets 1, sc4 gets 0 |

## Decoder hardware

```
                 ┌───────────── control register ─────────────┐
  RAM ──rdata──► │ width │ chain select mask │ fill           │
   ▲             └───┬───────────┬───────────────┬────────────┘
   │ addr            │ (<MIN)    │ 1 bit per K   │
 address ◄── controller          ▼ chains        ▼
 pointer      (FSM)  │    ┌── MUX per chain: fill or ld_data[i] ──► scan_in[i]
   ▲                 │    │   (+ bypass MUX for narrow rectangles)
   └─────────────────┤    │
      width counter ─┘ (= width → next rectangle)
```

| file | block |
|------|-------|
| `rtl/rect_pkg.sv` | shared types: controller states, fill codes, and the span of a control word |
| `rtl/rect_decoder.sv` | top level; wires the blocks below |
| `rtl/rect_controller.sv` | FSM: flag cycle, loading of control words, rectangle sequencing |
| `rtl/rect_ctrl_ram.sv` | control-word memory; synchronous write, asynchronous read |
| `rtl/rect_addr_ptr.sv` | RAM address pointer (loadable counter) |
| `rtl/rect_width_counter.sv` | slice counter with the equality comparator |
| `rtl/rect_ctrl_reg.sv` | control register, narrow-rectangle comparator, span decoding |
| `rtl/rect_fill_mux.sv` | one 2-to-1 MUX per chain, mask bit fan-out to K chains, narrow bypass |
| `rtl/rect_fill_mux2.sv` | secondary-encoding MUXes; reuses `rect_fill_mux` for code 00 |

The RAM can be a functional RAM of the chip, reused in test mode, or plain
registers. Only one cluster's words need to be on chip at a time. This is
why the default RAM is 20 words.

## Operation and timing

The decompressor side is `ld_valid` / `ld_data[N_CHAINS-1:0]`. Bit `i` feeds
scan chain `i+1`. The decoder accepts every valid word: there is no
back-pressure. When `ld_valid` is low nothing moves. This is how the tester
pauses.

Each test cube is one sequence of valid cycles:

1. **Flag cycle.** `ld_data[0]` is 1 if this cube starts a new cluster and 0
   if it belongs to the same cluster as the previous cube. Nothing is
   shifted in this cycle. The test set must be ordered so that the cubes of
   a cluster come one after another.
2. **Loading** (new cluster only, incremental mode). The cluster's control
   words follow, one word per `ceil(WORD / N_CHAINS)` cycles. The first
   cycle carries the word's MSB on `ld_data[0]`, the next bit on
   `ld_data[1]`, and so on. No word count is sent. Loading ends with the word
   whose spans bring the total to at least `SCAN_LEN` slices. Word 0 also
   goes straight into the control register.
3. **Shifting.** `SCAN_LEN` cycles with `scan_en` high. In each cycle
   `scan_in` is a combinational function of `ld_data` and the control
   register, so the decoder adds no latency between decompressor and
   chains. On the cycle that is the last slice of a rectangle, the width
   counter hits. On that clock edge the next word moves from the RAM into
   the control register and the pointer steps on, so there is no bubble
   between rectangles. If the last rectangle runs past the cube's end, it
   is cut there. `cube_done` marks the last slice. After it, the pointer
   goes back to the cluster's first word.

A cube therefore costs `1 + SCAN_LEN` valid cycles. A cube that starts a new
cluster costs `R × ceil(WORD / N_CHAINS)` more, where R is the cluster's
rectangle count. With the defaults (WORD = 15 bits, N_CHAINS = 20), one word
takes one cycle.

**Loading everything at the start (`LOAD_ALL = 1`).** The control words of
all clusters are sent once, right after reset, while the `preload` input is
high, and are written to consecutive RAM words. After that, no cube has load
cycles. A flag of 1 moves to the cluster that follows the current one: it
starts where the pointer stood at the last slice of the previous cube. A
flag of 0 returns to the current cluster's first word. In this mode the RAM
has to hold the whole test set. For example, 107 rectangles × 15 bits for
s38417 with 20 chains needs `RAM_DEPTH ≥ 107`. `preload` is ignored when
`LOAD_ALL = 0`.

Status outputs: `new_cluster` (flag cycle of a new cluster), `loading`
(control words being received) and `cube_done`. Reset (`rst_n`) is
asynchronous and active low. It clears all control state but not the RAM.

## Parameters

| parameter | default | meaning | where the default comes from |
|-----------|---------|---------|------------------------------|
| `N_CHAINS` | 20 | scan chains | 20-chain configurations of the published results |
| `K` | 2 | chains per mask bit | K = 2 was used for all basic-scheme results and gave the best result |
| `W_BITS` | 4 | width field bits (widths 1..16) | 4 bits gave the best results (3 for s38584, which a 4-bit field also holds) |
| `MIN_WIDTH` | 2 | rectangles narrower than this bypass the mask | own choice: the threshold is user-defined; the worked example implies 2 or 3 |
| `RAM_DEPTH` | 20 | control words on chip | largest 20-chain RAM of the basic-scheme results: 300 bits / 15-bit words |
| `SCAN_LEN` | 84 | slices per test cube | own choice: s38417 has 1664 scan inputs (1636 flip-flops + 28 inputs), and 1664 / 20 rounds up to 84 |
| `SECONDARY` | 0 | 1 selects the 2-bit fill code format | the basic scheme is the default |
| `LOAD_ALL` | 0 | 1 selects loading all control data at the start | incremental loading is the default (it is what the RAM sizes are quoted for) |

Derived sizes: `C_BITS = ceil(N_CHAINS/K)`, and the word is
`W_BITS + C_BITS + 1` bits, or `+ 2` with `SECONDARY`. At the defaults the
word is 4 + 10 + 1 = 15 bits and the RAM is 300 bits. After coarse
synthesis, the default decoder has about 125 word-level cells and 41
flip-flops, plus the 300-bit memory. The main parts match the published
area breakdown for 20 chains:

* a 4-bit width counter;
* one 2-to-1 MUX per chain (20), plus the narrow bypass;
* a 15-bit control register.

The remaining flip-flops are this design's own. They are the 5-bit
address pointer and the controller: its state, its slice counter and the
sum of widths that ends a load.

### Sizes of the published configurations

The default build runs the basic scheme on 20 chains:

* **s38417, 20 chains:** 376 cubes, 7 clusters, 107 rectangles, at most 17
  words per cluster, 84 slices per cube. This is an exact fit.
* **s13207 and s15850, 20 chains:** their cubes are 35 and 31 slices long.
  They run padded to 84 slices with leading don't-care slices, which only
  pass through the chains. This costs a few more rectangles, at most 14 and
  13 words per cluster.
* **s38584, 20 chains:** it already needs 20 words per cluster, so padding
  its 74-slice cubes may overflow the RAM. Use `SCAN_LEN = 74` instead.
* **Other chain counts (10, 30, 40):** these need `N_CHAINS` changed.
* **Secondary-encoding results:** these used K = 1, 16-45-bit words and up
  to 58 words per cluster. They need `SECONDARY = 1`, `K = 1` and a larger
  `RAM_DEPTH`. When the word is wider than `N_CHAINS`, each word takes two
  load cycles.

The cube lengths above come from the benchmark circuits' scan-cell counts.
The testbenches `tb_rect_decoder_wl2` and `tb_rect_decoder_wl3` build the
decoder at the parameters of seven of these other configurations, and run
test sets with their published numbers of cubes, clusters and rectangles.

## Where this design makes its own choices

The published scheme fixes the control-word contents, the MUX structure,
the width counter behaviour, the extra flag cycle per cube, the two loading
options and the decoding of the 2-bit fill codes. It leaves the following
open, and this RTL decides them:

* The flag bit is on decompressor output 0.
* Control words are sent MSB first over outputs 0, 1, 2, …, and split over
  several cycles if wider than `N_CHAINS`.
* Incremental loading ends by adding up the rectangle widths against
  `SCAN_LEN`. A cluster's widths must therefore add up to at least one cube.
* Width 0 means 2^W_BITS slices.
* The width counter compares its incremented value, so rectangles follow
  one another without a lost cycle. The RAM has an asynchronous read port
  for the same reason.
* K neighbouring chains share a mask bit: chain i uses bit i/K.
* In the secondary format, code 00 takes its fill value from the width
  field's MSB. This follows the written description. The printed example
  table places that bit in the other width position.
* The narrow-rectangle bypass is applied only in the basic format.
* `ld_valid` pauses the decoder, and the `preload` input marks the preload
  phase of `LOAD_ALL`.
* `MIN_WIDTH = 2` and `SCAN_LEN = 84` (see the parameter table).

Two assertions in the controller flag a cluster, or a preloaded test set,
that does not fit in `RAM_DEPTH`. The RAM has no reset, so it must be
written before it is read. The flag of the very first cube must therefore
be 1, or the test set must be preloaded.

## Not included

* **The linear decompressor.** Any LFSR-reseeding or XOR-based decompressor
  with at least `N_CHAINS` outputs can drive `ld_data`.
* **The scan chains.** These belong to the circuit under test.
* **The encoder software.** This software builds the control data: it
  clusters the cubes by correlation, greedily partitions slices into
  rectangles and optionally maps cubes to a per-slice "representative cube"
  for clustering. It runs off-chip and changes nothing in the hardware. The
  testbenches draw random rectangle sets instead, so they show that the
  decoder reproduces any rectangle set exactly. They do not show a
  compression ratio.

## Testbenches

Each testbench is self-checking. It ends with
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| testbench | what it runs |
|-----------|--------------|
| `tb_rect_decoder` | default build, end to end: 40 random clusters of 1-3 cubes, every slice and cube-cycle count checked; requires a new-cluster load, cluster reuse, rectangle switches, the narrow bypass, fill 0 and fill 1, the widest rectangle, a cut last rectangle and tester pauses during loading and shifting |
| `tb_rect_decoder_sec` | the worked example in both formats (4 chains, 7 slices) plus random clusters; the secondary format with 8-bit words over 4 outputs exercises two-cycle word loading and all four fill codes |
| `tb_rect_decoder_all` | `LOAD_ALL = 1` with a 128-word RAM: preload of about ten clusters, then new and repeated clusters |
| `tb_rect_decoder_wl` | three default-size decoders on test sets shaped like the 20-chain results (s38417: 376 cubes, 7 clusters, 107 rectangles; s13207 and s15850 padded); checks the total cycle count cubes × 85 + rectangles |
| `tb_rect_decoder_wl2` | the secondary format with K = 1 at the sizes of three enhanced-scheme results: s13207 on 10 chains (415 rectangles, 35-word RAM), s38417 on 20 chains (1645 rectangles, 58 words) and s38584 on 40 chains (2396 rectangles, 37 words); two load cycles per word; checks the total cycle count cubes × (1 + slices) + 2 × rectangles |
| `tb_rect_decoder_wl3` | the basic format at the chain counts and width fields of four other basic-scheme results: s13207 on 10 chains, s38584 on 20 and 30 chains (3-bit widths) and s38417 on 40 chains, each with its published RAM size |
| `tb_rect_controller`, `tb_rect_ctrl_ram`, `tb_rect_addr_ptr`, `tb_rect_width_counter`, `tb_rect_ctrl_reg`, `tb_rect_fill_mux`, `tb_rect_fill_mux2` | one block each, against reference models written in the testbench |

`tb/rect_dec_env.sv` is the shared stimulus and reference model of the
decoder-level tests. It plays tester plus decompressor, computes the
expected scan bits from the rectangle list on its own, and records what the
scan chains receive.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rect_pkg.sv tb/tb_rect_decoder.sv \
          --top-module tb_rect_decoder -Mdir obj_tb
./obj_tb/Vtb_rect_decoder
```

Replace the testbench name to run any other. Once compiled, each one
finishes in under a second. Lint with
`verilator --lint-only -Wall -Irtl rtl/rect_pkg.sv rtl/rect_decoder.sv`.
The remaining warnings are intentional:

* Some decompressor bits beyond the word width go unused while loading.
* Some signals are unused in one configuration.
* The reset is used both by flip-flops and by the assertion's
  `disable iff`.

### How far the results can be trusted

* The expected values in every testbench come from models written
  separately from the RTL: a per-slice reference decode of the rectangle
  list, and plain reference models of each block. They do not come from
  the RTL's own signals.
* Every block testbench was also run against a copy of its module with one
  deliberate bug, and each one failed. The bugs were:
  * a swapped priority in the pointer;
  * an off-by-one in the width comparator;
  * a lost RAM bit;
  * a wrong threshold comparison;
  * an ignored bypass;
  * swapped fill codes;
  * a wrong pointer value after a load;
  * the control register fed from the RAM during a load.
* The decoder-level tests run with random pauses. They check the exact
  cycle count of every cube.

What is not covered:

* There is no gate-level or timing verification.
* No real test cubes were used. The rectangle sets are random, with the
  published sizes, so the compression figures of the scheme are not
  reproduced here.
* The secondary format and `LOAD_ALL` are tested only at non-default
  parameters, as they are off by default.
