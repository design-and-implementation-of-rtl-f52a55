# Bit-plane scalable JPEG 2000 encoder datapath

In JPEG 2000 most of the work is in the embedded block coder (EBC). It
walks every bit-plane of every code-block three times (three coding
passes) and feeds one binary decision per visited sample to an arithmetic
coder. A word-level coder works on all bit-planes of a coefficient at
once, so it pays for all ten bit-planes even when the rate control later
throws most of them away. At ordinary compression ratios fewer than half
of a coefficient's bit-planes survive truncation.

This design goes the other way round:

* It decides **before coding** which bit-planes of a code-block are worth
  coding.
* It stores the DWT coefficients **bit-plane by bit-plane**, lightly
  compressed, so that later only the wanted bit-planes are read back.
* It codes **four bit-planes of a code-block in parallel**, one lane per
  bit-plane, with a scan order and context rule chosen so that the lanes
  never wait for each other. Code-blocks with more bit-planes are coded in
  rounds of four, with a small state memory between rounds.

Its cost therefore grows with the number of bit-planes actually coded, not
with the coefficient width.

This repository holds synthesizable SystemVerilog for the encoder path
below the wavelet transform. That path has five parts:

* the rate-distortion (RDO) controller;
* the data conversion with its run-length compression, towards the tile
  memory and back;
* the bit-plane parallel EBC, with its lanes, arithmetic coders,
  dispatcher and state memory;
* the bit-stream controller;
* the main controller that sequences them.

The RTL has self-checking testbenches. Each code word is compared with an
independent software model of the coder.

## Data flow

```
 DWT coefficients (sign-magnitude, one per cycle, EBC scan order)
        |
        +--> pre_rdo ------------------------------+  nbp, kend
        |                                          |
        +--> window of 8 --> dataconv_enc --> ec_rlc_enc --> tile memory (off chip)
                                                              | records of bit-planes
                                                              | nbp-1 .. kend only
             ebc <-- dataconv_dec <-- ec_rlc_dec <------------+
              |  four lanes + 2 extra ACs + state memory
              v
             bsc --> bytes tagged with their bit-plane, end-of-code-word marks
```

`jp2k_codec` runs one code-block at a time through three phases:

1. **Ingest.** Coefficients arrive in EBC scan order: stripe by stripe
   (a stripe is four rows), column by column within a stripe, top to
   bottom within a column. Every eight coefficients (two stripe columns)
   are converted into ten tile-memory records, one per bit-plane. While
   this happens `cf_ready` is low.
2. **Decide.** `pre_rdo` has seen the whole block go by. It reports:
   * `nbp`, the number of non-blank bit-planes (the ones above are all
     zero);
   * `kend`, the lowest bit-plane that fits the block's rate budget.
3. **Read back and code.** For every window only the records of bit-planes
   `nbp-1 .. kend` are read. They are expanded and written into the EBC's
   code-block buffer, and the EBC codes those bit-planes. A block with no
   non-zero coefficient codes nothing.

## The bit-plane parallel coder

This is the part that needs the most explanation. It is in `ebc.sv`,
`ebc_lane.sv`, `dispatcher.sv`, `mq_ac.sv` and `state_mem.sv`.

### Why the lanes can run in lock-step

In the standard coder, bit-plane k cannot start before bit-plane k+1 is
finished, and within a bit-plane Pass 2 and Pass 3 must wait for Pass 1.
Two rules remove both dependencies.

**Neighbour significance from the magnitude bits.** A neighbour counts as
significant for bit-plane k in two cases:

* one of its magnitude bits above k is 1;
* it is scanned before the current sample in this bit-plane, it is coded
  in Pass 1, and its bit k is 1.

The encoder has all bit-planes of the coefficients at hand. So each lane
can compute, for its own bit-plane, what the lane above would already know
at that point. The lane does not have to wait for it. The rule is
stripe-causal: samples of the next stripe always count as insignificant.
Decoders must decode with the same vertically causal rule. This is the
standard's "causal" code-block style.

**Column-switching scan.** Within a bit-plane, the column step for column
c works in two parts:

1. It first visits the Pass 1 samples of column c+1.
2. It then visits the Pass 2 and Pass 3 samples of column c.

By the time Pass 2 and Pass 3 look at column c, every neighbour that could
become significant in Pass 1 has been decided. Each visited sample costs
one cycle. Samples that belong to neither sub-scan cost nothing.

The order of decisions within a bit-plane therefore differs from the
standard three-pass order. The decisions themselves (contexts and values)
are those of the standard's causal mode. The code word is decodable by a
decoder that walks the same order.

Neighbour significance is judged with these states, per neighbour
position:

| neighbour | Pass 1 | Pass 2 | Pass 3 |
|---|---|---|---|
| scanned earlier (above, left, previous stripe) | bits above k, or coded in Pass 1 with bit k = 1 | same as Pass 1 | bits above k, or bit k = 1 |
| scanned later (below, right) | bits above k | bits above k, or Pass 1 with bit k = 1 | bits above k, or Pass 1 with bit k = 1 |

The sign context uses the signs of the neighbours that count as
significant.

### A lane

`ebc_lane` holds a lane's nineteen context states and MQ coder registers.
It also keeps three pieces of state:

* which samples of the current and next columns went through Pass 1;
* a one-row line buffer with the Pass 1 flags of the previous stripe's
  bottom row;
* a small sequencer that lists the step's visits.

Most visits make one decision. Some make two:

* a newly significant sample, which codes its bit and then its sign;
* the run-length mode, which codes the run bit and the first two position
  bits, then the last position bit and the sign.

The first decision goes through the lane's own AC. The second is chained
through one of the **two extra ACs** shared by the four lanes. Both ACs
are combinational (`mq_ac` is one step of the MQ coder from given
registers), so the two decisions finish in the same cycle.

`dispatcher` grants the extra ACs to the lowest-numbered requesting lanes.
A lane that gets no extra AC codes its second decision in the next cycle.
This is the *extra cycle*. It is rare: in the EBC test (random 16x16
blocks) it costs 5 cycles out of about 4,500. That is well below the 2.1%
overhead the published architecture reports for real images.

### Rounds and the state memory

With four lanes, a block that needs ten bit-planes is coded in three
rounds: bit-planes 9..6, then 5..2, then 1..0. At the end of a round the
EBC sweeps the block, four samples per cycle. For every sample it writes
into `state_mem`:

* significance: any bit at or above the round's lowest bit-plane is 1;
* refinement: any bit above that bit-plane is 1;
* the sign.

In the next round the lanes take the state of earlier bit-planes from this
memory. They only look at the magnitude bits of their own round. The
memory is three 64x64-bit arrays, 1.5 KB in all.

### Code words

Each bit-plane has its own code word. It is started with fresh contexts
and terminated with the standard MQ flush at the end of the bit-plane. A
lane delivers 0 to 4 bytes per cycle. `bsc` keeps one FIFO per lane and
hands out one byte per cycle, round-robin, each byte tagged with its
bit-plane. An entry with `bs_eop` marks the end of a code word. When any
FIFO has less room than two cycles of output, `bsc` stalls the EBC.

## Bit-plane storage

`dataconv_enc` turns a window of eight coefficients into one word per
bit-plane. It works through the window in scan order:

* each coefficient contributes its bit of bit-plane k;
* if that bit is its first 1 (most significant 1), the sign follows
  immediately.

A reader that walks the bit-planes from the top therefore meets each sign
exactly when it needs it, and no sign is stored for a zero coefficient.

Example with four coefficients: magnitudes 5, 9, 0 and 2, the first one
negative. Over bit-planes 3..0 this gives the words `01000`, `11000`,
`00010` and `1100`.

`ec_rlc_enc` then codes each word:

* an all-zero word becomes the single bit `0`;
* any other word becomes `1` followed by the word.

A record holds this code word (up to 17 bits, left-aligned) and its
length. Going back, `ec_rlc_dec` and `dataconv_dec` reverse both steps.
The testbenches report the tile-memory traffic against word-level storage
(11 bits per coefficient). On random test blocks the write side saves
about 40%. The read side, with truncation, needs about 40–45% of
word-level.

## Choosing the bit-planes (`pre_rdo`)

`pre_rdo` keeps, for every bit-plane j, the count of coefficients whose
most significant 1 is at j. It estimates what bit-plane j costs to code:

* 2 bits for each coefficient that becomes significant at j;
* 1 bit for each coefficient already significant above j.

Bit-planes are kept from the top down while the running total fits the
block's budget (`cf_budget`, sampled with the last coefficient). The top
bit-plane is always kept, and a budget of all ones keeps everything.

This is a simple stand-in. A real rate-distortion optimiser would estimate
both rate and distortion per coding pass and pick truncation points across
code-blocks. The interface (`nbp`, `kend`, one cycle after the last
coefficient) is meant to stay when the estimator is replaced.

## Interfaces and timing of `jp2k_codec`

| group | signals | notes |
|---|---|---|
| input | `cf_valid/cf_ready/cf_mag/cf_sgn`, `cf_band`, `cf_budget` | one coefficient per cycle when ready; sign 1 = negative; band (LL/HL/LH/HH) sampled with the first coefficient of a block, budget with the last |
| tile memory | `tm_we/tm_waddr/tm_wdata/tm_wlen`, `tm_re/tm_raddr` → `tm_rdata/tm_rlen` | address = bit-plane × (CB²/8) + window; read data one cycle after `tm_re` |
| output | `bs_valid/bs_ready/bs_eop/bs_k/bs_byte` | bytes per bit-plane, with an end mark per code word |
| status | `blk_done`, `blk_nbp`, `blk_kend`, `blk_est`, `tm_wbits`, `tm_rbits`, `tm_rblank`, `cnt_dual`, `cnt_extra`, `cnt_stall`, `len_err` | `blk_done` pulses per block; the counters run freely |

Cycle budget for one 64x64 block:

* Ingest: 4096 cycles, plus 10 conversion cycles per window, about 9.2k
  in all.
* Read back: (2 × coded bit-planes + 1) cycles per window.
* Coding: one cycle per visited sample per lane, one cycle per column step,
  and a 1024-cycle state-memory sweep between rounds.

The phases do not overlap. A production version would pipeline ingest of
block n+1 with coding of block n.

Parameters, with their defaults:

* `CB` = 64: code-block side.
* `MW` = 10: magnitude bits.
* `NPAR` = 4: parallel bit-planes. It is a package constant.
* Two extra ACs.
* `BSC_DEPTH` = 64: bytes per lane FIFO.
* The window is 8 coefficients.

## Where this departs from the published architecture

* **Termination.** The reference architecture terminates the arithmetic
  coder after each coding pass. Here the passes of a bit-plane are
  interleaved column by column, so there is one code word per bit-plane,
  terminated once. Truncation is therefore at bit-plane boundaries.
* **Pre-RDO.** The rate and distortion models are replaced by the simple
  rate estimate above.
* **Not built:**
  * the DWT core (its filter structure is not available), which should
    deliver about three coefficients per cycle on 256x256 tiles with
    three decomposition levels;
  * the decoder direction of the codec;
  * the SDRAM memory interface. The tile memory is reached through the
    plain record interface above. `tb/tile_mem.sv` is a behavioural
    stand-in for simulation only.
* **One code-block at a time.** The reference architecture can also share
  a round between several code-blocks. That is not built.
* **Choices made where no specification was available:**
  * the window size;
  * the record format;
  * contexts reset per bit-plane;
  * FIFO sizes;
  * the lane priority in the dispatcher;
  * the main controller's sequencing.
* **State memory.** It is built from flip-flops with 24 combinational read
  ports (20 for the context window, 4 for the sweep). A memory macro would
  need a narrower, registered organisation.

## Verification

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`:

| testbench | what it checks |
|---|---|
| `tb_mq_ac` | MQ coder steps, renormalisation, carry, bit stuffing and flush against a software coder |
| `tb_ebc` | 16x16 blocks in all four sub-bands, one and several rounds, stalled output: every bit-plane's code word byte-exact against `ebc_ref_pkg`, plus a cycle bound; counts dual decisions, extra cycles and stalls (also the test for `ebc_lane`) |
| `tb_dispatcher` | grant order, at most two grants, results routed back to the right lane |
| `tb_state_mem` | random writes and 20-port reads against an array model, clear |
| `tb_dataconv_enc` | the 5/9/0/2 example above, then random windows against a bit-serial model |
| `tb_dataconv_dec` | random windows and bit-plane ranges: lengths, magnitudes, signs |
| `tb_ec_rlc_enc`, `tb_ec_rlc_dec` | the example `0 / 1 001100001 / 0` and random words |
| `tb_pre_rdo` | decisions and estimates against a model, result timing |
| `tb_bsc` | per-lane byte order under random back-pressure, stall, no loss |
| `tb_jp2k_codec` | end to end at 16x16 (8 blocks) |
| `tb_jp2k_codec_full` | end to end at the default 64x64 (5 blocks) |

`tb_jp2k_codec` and `tb_jp2k_codec_full` check four things:

* every tile-memory record;
* the RDO decision;
* the number of bits written and read;
* every code word against the reference model.

They also count mechanisms and fail if any never occurred: skipped blank
bit-planes, truncation, an all-zero block, several rounds, blank groups, a
BSC stall, an extra cycle, a dual decision, and input back-pressure.

`tb/ebc_ref_pkg.sv` is the reference. It is a plain three-pass coder,
written independently of the RTL, that uses the causal neighbour rule and
records each decision. It then reorders the decisions into the
column-switching order and runs them through a software MQ coder.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/jp2k_pkg.sv rtl/*.sv \
    tb/ebc_ref_pkg.sv tb/tile_mem.sv tb/tb_jp2k_codec_full.sv \
    --top-module tb_jp2k_codec_full -Mdir obj
./obj/Vtb_jp2k_codec_full
```

Unit testbenches need only the package and the modules they use. All of
them finish in seconds.

## Files

* `rtl/jp2k_pkg.sv`: constants, types, and the context and probability
  tables.
* `rtl/jp2k_codec.sv`: the top module and main controller.
* `rtl/pre_rdo.sv`: the RDO controller.
* `rtl/dataconv_enc.sv`, `rtl/dataconv_dec.sv`: the data conversion, both
  directions.
* `rtl/ec_rlc_enc.sv`, `rtl/ec_rlc_dec.sv`: the run-length compression,
  both directions.
* `rtl/ebc.sv`, `rtl/ebc_lane.sv`, `rtl/dispatcher.sv`, `rtl/mq_ac.sv`,
  `rtl/state_mem.sv`: the EBC.
* `rtl/bsc.sv`: the bit-stream controller.
* `tb/`: the testbenches, the tile-memory model, the shared end-to-end
  body (`codec_tb_body.svh`) and the reference coder.
