# A memory-centred layered LDPC decoder for 802.11n / 802.16e codes

Most of the area and energy of an LDPC decoder goes into its memories, not its
arithmetic. This decoder is built around that fact. It uses the layered
(turbo-decoding message-passing, TDMP) schedule, which needs only two data
memories:

* the **posterior memory** (γ), one soft value per codeword bit;
* the **extrinsic memory** (λ), one compressed record per parity-check row.

A small **H storage** describes the parity-check matrix. Everything else
moves data between these memories:

* a controller;
* two shuffling networks;
* P serial processing units.

The RTL is synthesizable SystemVerilog. It decodes the quasi-cyclic codes of
IEEE 802.11n and 802.16e, where Z is a multiple of P (see
[Limits](#limits-and-departures)). Every testbench runs under plain
Verilator. The end-to-end test compares each posterior value with a
behavioural model and finds them bit-identical.

```
            +---------+        +-----------+   pi    +--------------+  pi^-1
 H storage->| control |------->| posterior |--rot--->| P processing |--rot--+
 (h_rom)    +---------+        |  memory   |         |    units     |       |
                 |             | (2 banks) |<--------| + λ memory   |<------+
                 +------------>+-----------+  write  |   each       |
                                                     +--------------+
```

## The algorithm as implemented

The matrix H is an m_b × 24 array of Z × Z blocks. Each block is either zero
or an identity matrix rotated right by a *shift* s. The Z rows of one block
row never share a column, so any subset of them can be processed at once.
The layered schedule walks through the block rows one after another. Row i,
with edge set I_i of size c_i, is updated like this:

1. read λ^i (the row's old outgoing messages) and the posteriors γ(I_i);
2. ρ = γ(I_i) − λ^i;
3. Λ = SISO(ρ), where the SISO kernel is normalized Min-Sum:
   Λ_j = (∏_{k≠j} sign ρ_k) · min(31, ¾ · min_{k≠j} |ρ_k|);
4. write λ^i ← Λ and γ(I_i) ← ρ + Λ.

γ starts out as the channel LLRs. The hard decision is the sign bit of γ:
1 where γ < 0, so a positive LLR means bit 0.

Min-Sum output takes only two magnitudes per row: the smallest |ρ| and, for
the edge that holds it, the second smallest. So λ^i is stored as:

* c_i sign bits;
* min1 and min2, each 7 bits and already scaled by ¾ and capped;
* the 5-bit index of min1.

That is 41 bits for any row degree up to 22, against 176 bits for 22 full
8-bit messages.

Arithmetic details, all of them this design's own choices:

* **Message format.** Messages are 8-bit two's complement. ρ and γ saturate
  to ±127.
* **Normalization.** The scaling is floor(3m/4). With plain Min-Sum and 8-bit
  saturated posteriors, the decoder converged and then drifted away from the
  codeword after about three iterations. The reference model showed the same
  drift, so the cause is the arithmetic, not the RTL. The ¾ normalization
  removes it.
* **Extrinsic cap.** Outgoing magnitudes are capped at 31 after scaling, a
  quarter of the posterior range. Without the cap, longer decodes broke down.
  Once a posterior sits at +127, the sum it stands for is larger than 127, so
  γ − λ_old under-reports the prior ρ. When λ is allowed to reach 95, that
  error can exceed ρ and flip its sign. A noise-free 1944-bit rate-1/2 frame
  then ended 8 iterations with about 1,300 wrong bits, after being clean at 2
  and 4 iterations. With the cap the same frames decode cleanly. The cap is
  the constant `LAM_MAX` in `ldpc_pkg`.
* **Ties.** When two inputs share the smallest magnitude, the first one
  becomes min1. Both minima are then equal, so the result does not depend on
  this choice.
* **First iteration.** λ counts as zero in the first iteration (`lam_zero`).
  The extrinsic memory is therefore never cleared.

## How the posterior memory is organised

This part is the hardest to follow, and it sets both the throughput and the
number of memory accesses.

**Which samples a group of rows needs.** The P processing units work on P
consecutive rows of a block row together: rows g·P … g·P+P−1 form group g.
A block row has Z/P groups. Take an edge into
block column `col` with shift s. Unit p needs sample

```
x_p = (g·P + p + s) mod Z        of block column col
```

So the P units always need P *consecutive* samples of one block column,
modulo Z.

**Word layout (micro-organization).** A memory word holds P consecutive
samples of one block column. Word w of block column `col` holds samples
w·P … w·P+P−1. The group's samples therefore start at offset `off = x_0 mod P`
in word `w0 = x_0 / P`. They continue into word `w1 = (w0+1) mod (Z/P)`
unless `off` is 0.

**Bank layout.** Consecutive words of a block column alternate between the
two banks:

```
bank    = w mod 2
address = col · 16 + w / 2        (16 = (96/P)/2 words per column per bank)
```

So w0 and w1 normally sit in different banks, and the two banks deliver both
words in one cycle.

**Conflicts.** There is one exception: when Z/P is odd, the last word of a
block column and word 0 sit in the same bank. This happens for Z = 81, 27, 45
and so on. A group that wraps around the end of the column then needs both
words from one bank. The controller reads (or writes) them in two
consecutive cycles and asserts `stall`.

**Example** (Z = 81, P = 3, so 27 words per column):

* Group g = 0, shift s = 2. x_0 = 2, so the group needs word 0 at offset 2
  (bank 0) and word 1 at offset 0 (bank 1). Both banks answer in one cycle,
  and the units get samples 2, 3, 4.
* Group g = 26, shift s = 2. x_0 = 80, so the group needs word 26 at offset 2
  and word 0. Both are in bank 0, so this access takes two cycles. The units
  get samples 80, 0, 1.

**Forward shuffler π.** `shuffle_fwd` joins the lower and upper words and
rotates them by `off`, so unit p gets sample off+p. For a same-bank pair, the
lower word arrives one cycle early. It waits in the shuffler's holding
register (`load_reg`, then `use_reg`).

**Reusing leftover samples.** Group g+1 needs the word after the one group g
needed, so group g's upper word is group g+1's lower word. The samples group
g did not use from that word are exactly the ones group g+1 uses, and no
other group of the block row has written them in between. The shuffler
therefore keeps each edge's upper word, one P-sample register per edge
(`use_left`). After the first group of a block row, a read fetches only one
new word per edge. This halves the posterior read traffic. As a result,
same-bank read pairs can occur only in the first group of a block row.
Writebacks still write both masked parts every group.

**Inverse shuffler π⁻¹.** `shuffle_inv` does the reverse. Unit p's result
goes to position off+p of the lower word, or to position off+p−P of the
upper word. Per-sample write masks leave the other samples of both words
unchanged. Each bank has one read port and one write port.

With the default sizes, each bank is 384 words × 24 bits. The two banks
together hold 2304 samples, enough for the longest 802.16e codeword.

## H storage format

`h_rom` is a 324 × 48-bit array with four 12-bit entries per word, read one
entry per cycle by entry address. An entry is `{shift[6:0], col[4:0]}`. A
matrix is a list of entries in block-row order:

* for each block row, the non-zero blocks of the information part, and of
  the first parity column if that block row has one;
* then one end-marker entry with `col = 31`.

The rest of the parity part is the dual-diagonal staircase that both
standards use. It is not stored. The controller adds these edges itself,
with shift 0 and kb = 24 − m_b:

* column kb+r, in every block row r > 0;
* column kb+r+1, in every block row r < m_b − 1.

`cfg_smode` selects how a stored shift s becomes the shift for the current Z:

| `cfg_smode`        | shift used    | for                                 |
|--------------------|---------------|-------------------------------------|
| `SHIFT_DIRECT` (0) | s             | 802.11n, and any matrix stored for its own Z |
| `SHIFT_SCALE` (1)  | ⌊s · Z / 96⌋  | 802.16e base matrices (most rates)  |
| `SHIFT_MOD` (2)    | s mod Z       | 802.16e rate 2/3A                   |

Several matrices can be stored together. `cfg_hbase` gives the first entry
of the matrix to decode. The standards' matrices are not included: load them
through `rom_we` / `rom_waddr` / `rom_wdata`, or turn the array into a mask
ROM.

## Processing unit and extrinsic memory

Each `proc_unit` handles one row at a time and works in two stages.

**Read stage.** One edge arrives per cycle. The unit:

* rebuilds the old λ_j from the stored record: the sign bit of edge j, and
  min2 if j is the stored index, else min1;
* forms ρ_j = γ_j − λ_j;
* stores ρ_j in a 22-entry buffer;
* feeds ρ_j to `siso_minsum`, which tracks the sign product, min1, min2 and
  the index of min1.

**Writeback stage.** One edge leaves per cycle: γ_j = ρ_j + Λ_j. The new
compressed record (`rec_out`) is written to the unit's `lambda_mem` in the
first writeback cycle.

Each unit owns one `lambda_mem`. All units use the same address, which is
the group's index: `block_row · Z/P + g`. The memory is split into 4
partitions of 96 records. Only the partition being addressed is enabled.
`lam_part_en` shows which one that is, so that partitions a short code never
reaches could be power-gated. The largest code (1152 rows on 3 units) fills
all 384 records.

## Timing

All memories have registered reads (one-cycle latency). Group g of block
row r, with row degree c, takes:

```
c reads + 1 turn-around + c writebacks + (1 cycle per same-bank word pair)
```

Same-bank pairs occur in writebacks whenever a group wraps around the end of
a block column with an odd Z/P. They occur in reads only in the first group
of a block row.

Each block row first spends (stored entries + 2) cycles fetching its H
entries. After the last writeback of the last iteration, `done` pulses for
one cycle. A whole decode therefore takes

```
sum over iterations and block rows of [ (n_stored + 2) + sum over groups (2c + 1 + conflicts) ]
```

plus one cycle for `start`. The end-to-end testbench checks this count
exactly. For example, a 1944-bit, rate-1/2-shaped matrix (Z = 81, 12 block
rows, degree 7–8, 6966 edges) takes about 40,800 cycles for 8 iterations.
A 2304-bit one (Z = 96, degree 6–7, 7296 edges) takes about 42,600.

Clock rates and deadlines for these codes:

* The 802.16e deadline is 0.25 ms. At 648 MHz every 802.16e size the design
  accepts finishes 8 iterations well inside it: about 66 µs for N = 2304 and
  17 µs for N = 576, rate 5/6.
* The 802.11n deadline is 8 µs. With three 1-edge-per-cycle units, no
  802.11n case meets it at 648 MHz: about 63 µs for N = 1944, 22 µs for
  N = 648 at rate 5/6, and 22 µs for N = 648 at rate 3/4. Meeting 8 µs takes about 12 posterior samples consumed
  per cycle, which means wider units or more of them than this
  configuration has.

## Interface (`ldpc_decoder_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset (control and kernel state; memories are not reset) |
| `rom_we`, `rom_waddr[8:0]`, `rom_wdata[47:0]` | in | load one H-storage word (entry 4k+i in bits 12i+11 … 12i) |
| `start` | in | accepted while `busy` is low; samples the `cfg_*` inputs |
| `cfg_z[6:0]` | in | expansion factor Z (multiple of P, ≤ 96) |
| `cfg_mb[3:0]` | in | block rows m_b (information block columns = 24 − m_b) |
| `cfg_hbase[10:0]` | in | first H entry of the matrix |
| `cfg_smode` | in | shift rule (table above) |
| `cfg_iters[3:0]` | in | number of iterations (fixed, no early stop) |
| `busy`, `done` | out | decoding in progress; one-cycle end pulse |
| `stall` | out | a bank-conflict cycle |
| `lam_part_en[P][4]` | out | extrinsic partitions enabled this cycle |
| `host_we`, `host_re`, `host_col[4:0]`, `host_word[4:0]`, `host_wdata[P]` | in | posterior-memory access while idle; word `host_word` of block column `host_col` holds samples `host_word·P … +P−1` |
| `host_rdata[P]`, `host_hd[P]` | out | data one cycle after `host_re`; hard decisions (sign bits) |

A decode goes like this:

1. Load the H storage.
2. Write the 24·Z/P words of LLRs.
3. Pulse `start` with the configuration.
4. Wait for `done`.
5. Read the posteriors or hard decisions back.

Parameters (defaults in brackets):

* `P` [3] — processing units;
* `NBANK` [2] — posterior banks;
* `ROM_WORDS` [324] — H-storage words;
* `LPART` [4] and `LPDEPTH` [96] — extrinsic partitions per unit, and records
  per partition.

Package `ldpc_pkg` holds the fixed sizes: 8-bit messages, 24 block columns,
at most 12 block rows, Z ≤ 96, row degree ≤ 22.

## Limits and departures

* **Z must be a multiple of P.** With P = 3 this supports every 802.11n
  size: Z = 27, 54, 81. For 802.16e it supports only Z = 24, 36, 48, 60, 72,
  84, 96. Other Z values would need groups that are only partly filled, and
  words that wrap mid-word.
* **Serial units with a 2c+1 cycle group.** The reference sizing assumes
  12 posterior samples per cycle at 648 MHz. This configuration reads P = 3
  useful samples per cycle. The cycle count above, not a sample-rate figure,
  describes it.
* **Bank layout.** Banks are assigned by word parity. A layout that assigns
  whole block columns to banks would use a colouring of per-block-row
  conflict graphs, computed offline. That is not used here, and there is no
  per-code bank allocation table.
* **Shuffler structure.** The shufflers are multiplexer rotators, not Benes
  networks. Leftover samples are kept for reads only. Writes are not merged
  across groups, so each edge writes two masked words per group.
* **Extrinsic record width.** An extrinsic record is one 41-bit entry. A
  24-bit-word organisation (4 × 96 × 24 per unit) would hold rows up to
  degree 7 in one word. It would need multi-word records for the high-rate
  codes, which this design does not implement.
* **H storage contents.** The H storage has a load port and an end marker per
  block row. The first parity column is stored with the information part.
* **Kernel and stopping rule.** The SISO kernel is normalized Min-Sum (¾),
  with outgoing magnitudes capped at 31.
  The decoder runs a fixed number of iterations and has no early
  termination.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|-----------|--------------------|
| `tb_ldpc_decoder_top` | default parameters, four use cases (Z = 81/12 block rows, Z = 96/12, Z = 48/6 with scaled shifts, Z = 24/4 with degree-20–22 rows and modulo shifts); every posterior compared bit for bit with a behavioural layered Min-Sum model over full arrays; hard decisions all zero after 8 iterations at 2 % channel errors; exact cycle count; stalls, holding-register use, saturation, upper extrinsic partitions, both iteration modes and all three shift rules must each occur |
| `tb_workloads` | default parameters, 8 iterations each of the five sizing use cases: 802.11n N = 1944 and 802.16e N = 2304 at rate 1/2, 802.11n N = 648 and 802.16e N = 576 at rate 5/6, and 802.11n N = 648 at rate 3/4. The matrices have the standard's Z, block-row count and row degrees, and random shifts. Edge counts are checked (6966, 7296, 2376, 1920), and so is every posterior bit for bit and the exact cycle count. The two rate-1/2 frames must decode to the all-zero codeword. Time at 648 MHz is printed against the deadline; the 802.16e cases must meet theirs |
| `tb_ldpc_control` | every posterior read/write (bank, address, part written), extrinsic address and stall cycle against a list built from the matrix; total cycles |
| `tb_proc_unit` | two passes per random row (first-iteration and with its own record); outputs against a direct row update; 2c cycles per row |
| `tb_siso_minsum` | every outgoing message and the compressed record, including ties |
| `tb_gamma_mem`, `tb_lambda_mem`, `tb_h_rom` | storage against a shadow copy; masks, latency, partition enables, entry packing |
| `tb_shuffle_fwd`, `tb_shuffle_inv` | all offsets, bank orders, the holding-register path and write masks |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ldpc_pkg.sv tb/tb_ldpc_decoder_top.sv \
          --top-module tb_ldpc_decoder_top -o sim && ./obj_dir/sim
```

The full-size end-to-end run takes well under a second.
