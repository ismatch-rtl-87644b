# ISMatch: inexact string matching of DNA in a Levenshtein systolic array

This RTL searches a long text, typically a DNA sequence streamed by a host into the board's
DRAM, for several short patterns at once. It tolerates mismatches, insertions and deletions.
Every time a fixed-length window slides one character along the text, each pattern
engine computes the Levenshtein (edit) distance between its pattern and the window. A distance
at or below a user threshold is a *hit*. Neighbouring window positions produce many hits for the
same place in the text. A per-pattern *validation* stage keeps only the best, non-overlapping
ones, and a writer stores each surviving *occurrence* back in DRAM as two 32-bit words.

The architecture follows the ISMatch accelerator from "ISMATCH: A real-time hardware accelerator for
inexact string matching of DNA sequences on FPGA". That paper describes the blocks and their
dataflow, but not every signal. The sections "Where this RTL departs from or adds to the source"
and "Limits" say which parts are its choices and which were added here.

```
 host ──> DRAM ──> text_window ──┬──> edit_distance #0 ──> validation #0 ──┐
   (text, 1 char per 32-bit word)├──> edit_distance #1 ──> validation #1 ──┤
                                 ├──> ...                                   ├──> data_writer ──> DRAM
                                 └──> edit_distance #P-1 ─> validation #P-1 ┘      (results)
                  ismatch_top: step controller, host registers
```

## The distance array (`edit_distance`, `lev_pe`)

For pattern `p` (N characters) and window `s` (N characters), the Levenshtein matrix is

```
d[i][0] = i,  d[0][j] = j
d[i][j] = min(d[i-1][j] + 1, d[i][j-1] + 1, d[i-1][j-1] + (p_i != s_j))
```

Each cell depends only on its upper, left and upper-left neighbours. So all cells on one
anti-diagonal (`i + j` constant) can be computed at the same time. The array has one processing
element per pattern character. PE `k` owns matrix row `k+1` and holds that row in a register array
`r[0..N]`, where `r[0]` is the fixed border value `k+1`. A shared wavefront counter `t` runs from 0
to 2N-2. In step `t`, PE `k` computes column `j = t - k + 1` when that column lies in 1..N. It
does this in four parts:

* a multiplexer picks window character `s_j`,
* a comparator gives the cost (0 when `s_j` equals the PE's pattern character, 1 otherwise),
* `up` and `diag` come from the previous PE's row registers, which that PE wrote in step `t-1`,
  and `left` comes from the PE's own row, also written in step `t-1`,
* the minimum of the three sums is stored in `r[j]`.

After 2N-1 steps the last PE's row holds `d[N][1..N]`. This is the distance between the whole
pattern and every *prefix* of the window, at no extra cost. The result is the smallest of these
values, and the occurrence length is the prefix length where it occurs. When several prefixes tie,
the shortest one wins. For example, pattern `CTGA` against window `CTTAC` gives the last row
`4 3 2 2 1 2`, so the result is distance 1 and length 4 (`CTTA`).

Timing of one comparison:

| cycle after `start` | what happens |
|---|---|
| 0 | window and text index copied into the array (the shared window may slide from now on) |
| 1 .. 2N-1 | wavefront steps t = 0 .. 2N-2 |
| 2N | last row reduced to distance, length and hit |
| 2N+1 | `done` pulse with `hit` and `occ` = {distance, length, index} |

For N = 8 this makes 17 cycles, and the next `start` is accepted in cycle 2N. So windows start
every 2N = 16 cycles when text is available. `hit` means distance <= `threshold`.

Matrix values never exceed N, so the registers use `$clog2(N+2)` bits. The reported distance and
length are widened to 16 bits.

## Validation (`validation`, `validation_block`)

This part is the hardest to follow. Consider an approximate copy of the pattern in the text. It
is seen by several consecutive windows, with different distances. A window that holds only part
of it may also match within the threshold. The validation stage reports each such place once, at
its best distance.

Each pattern has K+1 `validation_block`s, one per distance 0..K. A lower distance has a higher
priority. Each block holds at most one *candidate*. The stage advances by one *step* per window
position. In each step, a hit goes to the block of its distance. That block then does the
following:

1. **Capture.** The block takes the hit only when it is itself free and no block of a lower
   distance is busy. Otherwise the hit is *dropped*. A block that finishes in this same step may
   capture at once. Capture sets `busy` and clears the counter.
2. **Count.** Each later step increments the counter, because the window has moved one more
   character.
3. **Decide.** A block may decide only while no lower-distance block is busy:
   * counter == candidate length: the candidate is **valid**. No better match appeared while
     the window moved across it.
   * counter > length: the candidate was held back by a better candidate. It is valid only when
     `counter - last_len > length`, where `last_len` is the length of the occurrence the scheme
     validated last. This test says the candidate started before that occurrence, with no
     overlap. Otherwise it is **discarded** as part of the better occurrence.

A block stays busy during the step in which it validates. So a lower-priority block cannot
decide in that step, and at most one occurrence per pattern leaves per step, as the
`a_one_valid` assertion checks. A held-back block therefore decides one step after the block
that held it back. `valid` is a one-cycle pulse in the cycle after the step.

Hits with a distance above K are ignored. Keep `threshold` <= K.

## Text window (`text_window`)

The text sits in DRAM one character per 32-bit word, in the low 8 bits, at byte addresses
`text_base + 4*i`. One window of N characters serves all pattern engines, which run in
lockstep. The block reads characters until the window is full, and refills it after each slide.
It allows one read at a time: a one-cycle `rd_req`, then the data returns on `rd_valid` after
any latency. The host may still be writing the text during the search. A character is read only
once `chars_avail` says it is in DRAM, and until then `waiting_text` is high. No character at or
past `text_len` is read.

## Result writing (`data_writer`)

All engines can validate in the same cycle, so each engine has a small FIFO (`sync_fifo`,
default depth 4). A round-robin arbiter takes one occurrence at a time and writes two words from
`result_base` on:

| word | bits 31:16 | bits 15:0 |
|---|---|---|
| 0 | occurrence length | Levenshtein distance |
| 1 | text index of the window where the occurrence starts (32 bits) | |

The write port holds `wr_req/wr_addr/wr_data` until `wr_ready`. When any FIFO has fewer than
two free entries, `space_low` makes the controller hold the next window. No result is ever lost:
a slow DRAM only slows the search.

## Step controller and host interface (`ismatch_top`)

| port | use |
|---|---|
| `pat_we`, `pat_sel`, `pat_in[N]` | load the pattern of engine `pat_sel` (at any time while idle) |
| `threshold` | largest distance reported, at most K |
| `text_base`, `text_len`, `chars_avail` | where the text is, how long it is, how much is already written |
| `result_base` | where results go |
| `start` → `busy` … `done`, `n_results` | one search; `done` stays high until the next `start` |
| `rd_*`, `wr_*` | DRAM read and write ports |

A search runs in four phases:

1. `start` clears the window and the writer.
2. **Run.** The controller launches all arrays whenever the window is full, the arrays are
   ready and the writer has room. Each launch also slides the window. Each array result is one
   validation step.
3. **Flush.** After the result of the last window, the one ending at `text_len`, the controller
   keeps stepping the validation stages without hits until none is busy. Occurrences near the
   end of the text are decided in this phase.
4. **Drain.** The controller waits for the writer to empty, then raises `done`.

A text shorter than N gives no window and finishes at once. Record addresses follow the writer's
order, so results of different patterns are interleaved.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| `ismatch_top` | `N` pattern/window length = PEs per engine | 8 | the source's main configuration |
| | `P` pattern engines | 4 | chosen here (the source leaves it open) |
| | `K` highest validated distance | 2 | the source's evaluated threshold |
| | `FIFO_DEPTH` per-engine result FIFO | 4 | chosen here |

The characters are 8 bits, and the distance, length and index are 16, 16 and 32 bits. These
are defined in `ismatch_pkg`. At the defaults the top synthesises to about 4.9k flip-flop bits:
about 500 per distance array (mostly the N x (N+1) row registers and the window copy), about 460
per validation scheme (the stored candidates), and about 1.2k for the writer's FIFOs.

## Where this RTL departs from or adds to the source

* **Hit rule.** The source describes a hit both as "below K" and as one of the K+1 distances
  0..K. This RTL reports distance <= threshold, so K+1 validation levels are used.
* **Latency.** The source gives 2N-1 cycles for the wavefront and 17 cycles per 8-character
  comparison. The load and reduce cycles here make up that difference, and 17 is checked.
* **Shared window.** In the source's drawing, the window and DRAM address sit inside each
  Levenshtein block. Here one window serves all engines, because all engines read the same
  data.
* **Chosen here.** The following are not specified by the source: the host handshake
  (`chars_avail`), the read/write protocols, the FIFOs and back-pressure, the flush phase, the
  tie rule for equal prefix distances, capture in the step a block finishes, the restart of the
  counter at capture and its saturation, and the meaning of `last_len` (last occurrence validated
  by any level).
* **No pattern number in results.** The result format has no pattern number, as in the source.
  With P > 1 the host cannot tell which pattern an occurrence belongs to.
* **Not included.** The PCIe link, the DRAM controller and the host software are not RTL here.
  They appear only as the top-level ports. The HLS and CPU versions used as baselines are not
  included either.

## Limits

* There is exactly one PE per pattern character. A smaller array that folds the matrix over
  several passes, trading speed for area, is not provided.
* Patterns all have length N; shorter patterns are not supported.
* Only full windows are compared. The last window ends at the last character, and the final
  N-1 start positions are seen only as prefixes of earlier windows.
* Late validation (the `counter > length` branch) is rare on random DNA with the timing above.
  It is tested directly at block level and occurs in the end-to-end test.

## Verification

Every module except `sync_fifo` (covered through `tb_data_writer`) has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>`, and a watchdog stops it if it hangs.

| testbench | what it checks |
|---|---|
| `tb_lev_pe` | one PE against a reference matrix, column by column, including the 5-character worked example |
| `tb_edit_distance` | 400 random and near-match comparisons at N = 8: distance, length, index, hit and the 17-cycle latency, including back-to-back starts |
| `tb_validation_block` | directed capture/validate/late/discard cases and 30k random steps against a single-level model |
| `tb_validation` | 20k random steps of a K = 2 scheme against a step-level model; every branch must occur |
| `tb_text_window` | window contents, index, read addresses and end-of-text flag, while text arrives slowly |
| `tb_data_writer` | four sources and a DRAM that refuses writes: every record stored once, in per-source order |
| `tb_ismatch_top` | the whole accelerator at its default parameters on 600-character texts with planted (mutated) pattern copies. It checks every stored record against a reference (matrix + step-level validation model + flush). Streaming text, slow DRAM, held steps, flush, multi-engine hits, late validation, discards and drops must each occur. It also checks the 2N-cycle window rate. |
| `tb_ismatch_long_text` | the default top on 10,000- and 20,000-character texts: every record against the reference, one window per 16 cycles |

`tb/ismatch_ref_pkg.sv` holds the reference models, and `tb/dram_model.sv` is a behavioural DRAM.

To run a testbench with Verilator 5, for example the end-to-end one:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_ismatch_top rtl/ismatch_pkg.sv tb/ismatch_ref_pkg.sv tb/tb_ismatch_top.sv
./obj_dir/Vtb_ismatch_top
```

Swap in another testbench name for the others. The end-to-end run takes a few seconds. The
testbenches use two-state simulation and `$urandom`, so every variable that is read is reset
or initialised.
