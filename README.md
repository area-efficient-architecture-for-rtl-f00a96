# Embedded block coder for JPEG 2000 without state-variable memory

JPEG 2000 entropy-codes each code-block bit-plane by bit-plane. Every
bit-plane is split into three coding passes: significance propagation (pass 1),
magnitude refinement (pass 2) and cleanup (pass 3). The context of each bit
depends on the *current* significance of its eight neighbours. A conventional
tier-1 coder therefore keeps per-sample state memories (significance, "already
coded", "already refined"). For a 64x64 block these take several kilobits and
most of the area. It also scans the block three times per bit-plane.

This RTL keeps no such memory. Each time a coefficient is read, its state for
bit-plane *k* is derived from the magnitude bits alone. A little look-ahead is
enough to decide, in a single scan, which pass every bit belongs to and what
each neighbour looks like at the moment that bit would be coded in the
sequential order. All three passes are thus formed in one scan per bit-plane.
A pass-switching MQ arithmetic coder with three sets of coding registers then
codes the three pair streams side by side. The only memory left is a 64 x 5-bit
line buffer.

## On-the-fly state variables

Let `mu` be the magnitude, `mu^k` its bit in plane *k*, and "before" / "after" the
stripe scan order (stripes of four rows, column by column, top to bottom).

| variable | definition | meaning |
|---|---|---|
| `sig` (sigma~^k) | `|(mu >> (k+1))` | significant before plane *k* |
| `gam` (gamma^k) | `sigma~^k & ~sigma~^(k+1)` | became significant in plane *k+1*, so this is its first refinement |
| `rho` | sample is insignificant and is coded in pass 1 of plane *k* | computed from the neighbours, see below |

**Pass of a sample c.** If `sig_c` is set, c is in pass 2. Otherwise c is in pass 1
when some neighbour *s* "contributes", and in pass 3 when none does:

* a neighbour scanned before c contributes `sig_s | (rho_s & mu_s)`: it was
  significant, or it became significant earlier in pass 1;
* a neighbour scanned after c contributes `sig_s`.

`rho_c` is "c is in pass 1". It needs the `rho` of earlier neighbours and the
`sig` of later ones. It is therefore computed one column ahead of the column
being coded.

**Neighbour significance when c is coded** (used for ZC, SC and MR contexts):

| neighbour | c in pass 1 | c in pass 2 | c in pass 3 |
|---|---|---|---|
| scanned before c | `sig \| (mu & rho)` | `sig \| (mu & rho)` | `sig \| mu` |
| scanned after c | `sig` | `sig \| (mu & rho)` | `sig \| (mu & rho)` |

The context window is **vertically causal**. Samples of the next stripe count as
insignificant, so nothing below the current stripe is ever needed. The row
above the stripe has been fully coded and counts as "scanned before", even at
the upper right. This is JPEG 2000's CAUSAL mode. Together with the per-pass
termination and per-pass contexts described below, the output is a
pass-parallel variant of JPEG 2000, not the default mode.

## Datapath

```
 coefficient   +---------------------------+  0..4 pairs  +--------+  1 pair  +------------------+  0..3 bytes  +---------+  1 byte
 memory  ----->| context formation (CF)    |------------->| FIFO   |--------->| MQ coder (AE)    |------------->| output  |-------->
 (read port)   | state gen, 2D shift regs, |  + pass      | 4 x 7  |          | 3 register suites|  + pass      | buffer  |  + pass
               | MSB pass gen, pass/contrib|              +--------+          | 2 pipeline stages|              | 7 deep  |  + last
               | ZC / MR / SC, run-length  |                                  +------------------+              +---------+
               +---------------------------+
                         ^  controller: bit-plane loop, drain, flush, done
```

`ebc_top` wires these together. Back-pressure runs from right to left. The
output buffer stalls stage 2 of the coder when it has less room than the bytes
about to be produced. A full FIFO stalls the context formation.

### Context formation (`context_formation`)

Per bit-plane it reads every coefficient once, one per cycle, in stripe order.
It asks for them itself with `coef_req`, `coef_row` and `coef_col`, and takes
`coef_mag` and `coef_sign` in the same cycle. `state_generator` turns each
coefficient into a 5-bit word `{rho, sig, gam, sgn, mu}`.

`shift_reg_2d` holds four stripe columns of five words each: the word above the
stripe plus rows 0..3. The columns are:

* `xn` (j+2): newest;
* `xr` (j+1): `rho` known;
* `x0` (j): being coded;
* `xl` (j-1).

A four-word staging column collects column j+3. When the staging column is full
and row 3 of `x0` has been coded, everything shifts one column. On that shift:

* `msb_pass_generator` computes `rho` for the column moving from `xn` to `xr`. It
  needs the staging column's `sig`, which is why it runs one column ahead.
* row 3 of that column, with its `rho`, is written into `line_buffer`;
* the staging column receives its top word from `line_buffer`.

The top word is the previous stripe's row 3 at that column, or zero in stripe 0.
The first sample of the next column is loaded in the same cycle.

`x0` is coded one row per cycle. `pass_contrib_generator` gives the pass and the
eight neighbour significances. `zero_coding`, `sign_coding` (with the XOR bit
folded into the decision) and `magnitude_refinement` give the contexts.
`run_length_coding` assembles the pairs.

Timing is four cycles per column. Stripes follow each other without emptying
the pipeline: the first column of the next stripe enters right behind the last
column of the current one. Wherever the window would straddle that boundary,
the column on the far side is replaced by zeros. This happens for the rho
computation of `xn` and for the coding of `x0`. Filling the pipeline at the
start of a bit-plane and emptying it at the end cost 13 cycles. A bit-plane
therefore takes `(H/4)*4*W + 13` cycles, plus one for every cycle the FIFO
lacks room. Every testbench that runs the CF checks this exactly.

### Run-length columns

A cleanup column is run-length coded when all four samples are in pass 3 and
nothing significant surrounds the column. This uses the pass-3 significance of
the column's other neighbours: left column, right column and the row above.
Rows of the same column are insignificant by definition.

* If all four bits are 0, one `RL,0` pair is sent.
* Otherwise the row *f* of the first 1 sends `RL,1`, `UNI,f[1]`, `UNI,f[0]` and
  its sign pair: four pairs in one cycle, the worst case the FIFO must absorb.
  Rows above *f* send nothing. Rows below *f* are coded normally.

All pairs of one cycle belong to the same pass. The FIFO word is therefore
7 bits: pass, a 4-bit context local to the pass, and the decision. The local
context numbers are:

* passes 1 and 3: ZC 0..8, SC 9..13, RL 14, UNI 15;
* pass 2: MR 0 (first refinement, no significant neighbour), 1 (first
  refinement, some neighbour significant), 2 (later refinement).

### Pass-switching MQ coder (`arith_encoder`)

There are three suites of coding registers, one per pass. Each suite has A, C,
CT, the byte register and a 16-entry table of context states. One set of
arithmetic logic switches between the suites pair by pair:

* **Stage 1** reads the context state and looks up `mq_prob_table` (the 47
  JPEG 2000 states). It updates A and the context state, and works out the C
  offset and the renormalisation shift. The state is written back in this stage,
  so back-to-back pairs in one context need no forwarding.
* **Stage 2** (`mq_code_update`) adds the offset to C and performs the whole
  shift with byte-out in one cycle. That includes bit stuffing after 0xFF and
  carry propagation into the pending byte. A shift of up to 15 bits can cross
  three byte boundaries, so up to three bytes leave per cycle.

One pair is consumed per cycle when nothing stalls. Two rules go beyond
textbook JPEG 2000:

* Context states are **separate per pass**. They are reset to the JPEG 2000
  initial states at code-block start and kept across bit-planes. A decoder must
  therefore keep three context sets too.
* At the end of every bit-plane, each suite that coded at least one pair is
  **terminated** with the standard FLUSH procedure. Its A, C and CT restart.
  Every (bit-plane, pass) thus gets its own codeword, a natural truncation
  point for rate control.

### Output (`output_buffer`)

The three codeword streams leave interleaved through one 8-bit port. Each byte
is tagged with its pass (`out_pass`, 1..3). `out_last` marks the final byte of a
codeword. To rebuild the codewords, keep one byte list per pass and cut it at
each `out_last`. The k-th codeword of pass p belongs to the k-th bit-plane, from
the top, in which pass p had at least one pair.

## Interface (`ebc_top`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | rising edge; asynchronous active-low reset |
| `start` | in | 1 | pulse to code one block; hold `num_planes` and `band` until `done` |
| `num_planes` | in | 4 | number of non-zero magnitude bit-planes (0..10) |
| `band` | in | 2 | 0 LL, 1 HL, 2 LH, 3 HH (selects the zero-coding table) |
| `coef_req`, `coef_row`, `coef_col` | out | 1, 6, 6 | coefficient read, row/column in the block |
| `coef_mag`, `coef_sign` | in | 10, 1 | sign-magnitude coefficient, valid in the same cycle |
| `out_valid`, `out_ready` | out, in | 1 | byte handshake |
| `out_byte`, `out_pass`, `out_last` | out | 8, 2, 1 | codeword byte, its pass, end of codeword |
| `busy`, `done` | out | 1 | coding in progress; one-cycle pulse after the last byte |

Parameters: `W` = 64, `H` = 64 (a multiple of 4) and `MW` = 10 magnitude bits.
The line buffer is `W` words deep.

A 64x64 block with *N* bit-planes takes `N * 4109` scan cycles, plus FIFO and
output stalls and a few cycles per bit-plane for codeword termination. For the
typical *N* = 6 the scan alone is 24,654 cycles, at most 0.166 samples per
cycle, against the 1/6 published for the architecture. The coder takes one pair
per cycle, so a bit-plane that yields more pairs than its scan has cycles makes
the context formation wait. In simulation, blocks with half the samples zero
reach 0.159 samples per cycle. Blocks with no zero samples reach 0.149. The
published design targets 100 MHz in a 0.18 um process.

## Where this RTL makes its own choices

The published architecture fixes the algorithm, the block structure and the
sizes used here:

* 64 x 5 line buffer;
* 4 x 7 FIFO;
* 7-entry output buffer;
* three register suites and two stages in the coder;
* three byte lanes;
* 0..4 pairs per cycle.

The following are this design's own:

* **Causal window, per-pass termination, per-pass contexts.** These are inferred
  from the published structure: only the previous stripe is stored, there are
  three independent register suites, and the passes run in parallel.
* **Column-wide look-ahead.** The shift register moves by whole columns. The
  published bank is 20 x 5 bits (four columns of five words). This one adds a
  4-word staging column, so it holds 24 words. `rho` is computed for a whole column at a time. The
  original shifts sample by sample and buffers the ZC/MR/SC results for three
  cycles before the run-length decision. Here the whole column is in registers,
  so no delay line is needed.
* **Timing of the pairs of a failed run.** They are emitted in the cycle of the
  first 1, not of the first row. The pair stream is identical.
* **Stripe boundaries are masked.** The pipeline runs straight from one stripe
  into the next. The neighbour column across the boundary is replaced by
  zeros.
* **Added interface details:**
  * the coefficient read port;
  * the `num_planes` and `band` inputs;
  * the end-of-codeword flag, which makes an output-buffer entry 11 bits instead
    of 10;
  * `out_ready` back-pressure.
* **Zero-coding, sign-coding, refinement and MQ tables** are those of the
  JPEG 2000 standard.

## Verification

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_ebc_top` runs at full size. Several 64x64 blocks, with every subband and
  1 to 10 bit-planes, are coded at the default parameters, with random output
  back-pressure. The reference is a separate model (`tb/ebc_ref_pkg.sv`):
  * it runs the three passes one after another over the whole block, with
    explicit significance and visited flags;
  * it feeds a bit-serial MQ coder per pass.

  Every pair entering the coder and every output byte, with its pass and
  end-of-codeword mark, must match. The scan time of every bit-plane is checked.
  The test also counts, and requires, each mechanism at least once:
  * FIFO-full stalls;
  * four-pair cycles;
  * run-length columns with and without a 1;
  * output-buffer stalls;
  * three-byte cycles;
  * 0xFF bytes;
  * flushes.
* `tb_ebc_rate` codes six-bit-plane 64x64 blocks of every subband at full
  speed. It checks the bytes and the start-to-done cycle count, and prints the
  samples per cycle.
* `tb_context_formation` runs at 16x12 with random FIFO room. It checks the
  pair streams and the cycle count against the same reference.
* `tb_arith_encoder` and `tb_mq_code_update` check the coder against the
  bit-serial reference, with stalls and several codewords.
* Every other module has a unit testbench: exhaustive for the context tables,
  randomised against a model for the rest.

Run one with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/ebc_pkg.sv tb/ebc_ref_pkg.sv $(ls rtl/*.sv | grep -v _pkg) tb/tb_ebc_top.sv \
    --top-module tb_ebc_top -o sim && ./obj_dir/sim
```

The packages must come first. `-Wno-fatal` keeps Verilator's width lint
warnings on the reference model from stopping the build. The full-size test
runs in about a second once built.

## Files

* `rtl/ebc_pkg.sv`: shared types (state word, column, pair, pass, subband) and
  initial context states.
* Context formation: `rtl/state_generator.sv`, `line_buffer.sv`,
  `shift_reg_2d.sv`, `msb_pass_generator.sv`, `pass_contrib_generator.sv`,
  `zero_coding.sv`, `sign_coding.sv`, `magnitude_refinement.sv`,
  `run_length_coding.sv` and `context_formation.sv`.
* `rtl/cxd_fifo.sv`.
* MQ coder: `rtl/mq_prob_table.sv`, `mq_code_update.sv` and `arith_encoder.sv`.
* `rtl/output_buffer.sv`, `rtl/ebc_controller.sv` and `rtl/ebc_top.sv`.
* `tb/`: one `tb_<module>.sv` per module, plus `ebc_ref_pkg.sv` (reference
  models).
