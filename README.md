# Doubly parallel layered QC-LDPC decoder for IEEE 802.11ad

IEEE 802.11ad protects its 60 GHz links with quasi-cyclic LDPC codes: 672-bit
codewords with rates 1/2, 5/8, 3/4 and 13/16. Each parity-check matrix H is a
grid of 42 x 42 blocks with 16 block columns and 3 to 8 block rows. Each block
is either zero or a cyclically shifted identity.

This decoder uses the *layered* offset-min-sum algorithm. It works through
the block rows (layers) one after another. Each layer uses the messages that
earlier layers have just updated. That makes it converge in about half the
iterations that a flooding decoder needs. The catch is that the work is
sequential. The way around it here is to split the 16 block columns into two
groups of 8 and give each group its own processing units. Both groups work on
the same layer at the same time. A combiner then merges their partial results
into exactly what one serial unit would have found. So the decoder takes the
same steps as a plain layered decoder, about twice as fast.

The whole decoder is driven by a **command sequence**. A software scheduler
builds it offline for a given code and column split. Each command says what
every pipeline stage does in that cycle. The hardware does no hazard
detection of its own.

## Algorithm and number format

For layer *j* and each variable *i* in it:

    T_i   = Q_i - R_ji                                  (remove old message)
    R_ji  = sign * max(0, min_{k != i} |T_k| - 1)       (offset beta = 1)
            sign = product over k != i of sign(T_k)
    Q_i   = T_i + R_ji

At the start, Q holds the channel LLRs and every R is zero. After I
iterations, the hard decision for each bit is the sign of its Q.

The minimum over k != i needs only the two smallest magnitudes m1 and m2 and
where m1 was found. The sign needs only the product of all signs. The unit
then takes back its own sign with an XOR.

Q, T and R are all 5-bit two's-complement values. They saturate to the
symmetric range -15..+15 (`ldpc_pkg::sat_msg`). Input LLRs of -16 are
clipped to -15.

## Structure

```
ldpc_decoder
 ├─ seq_controller        sequence memory (4 codes x 64 commands), iteration loop, flush, output reads
 ├─ proc_group  x2        one per column group (8 block columns each)
 │   ├─ ldpc_ram  Q       8 words x 42 messages
 │   ├─ ldpc_ram  T       8 words x 42 messages
 │   ├─ ldpc_ram  R       28 words x 42 messages (one word per non-zero block)
 │   ├─ cyclic_shifter    differential shifts, orientation table
 │   ├─ min_unit  x42     serial two-minimum search, one per check node
 │   └─ sel_unit  x42     new R and Q
 └─ comb_unit   x42       merges the two groups' minima, holds the row result
```

The two groups never touch each other's memory addresses. So each of the
Q-, T- and R-memories is two independent half-size memories, each with one
read port and one write port. Only the combiners link the two groups.

### Differential shifting

Check node k of a block with shift a is connected to variable (k + a) mod 42
of that block column. Q-values are not rotated back to natural order after a
layer. Each block column is written back in the orientation in which the
layer just used it. The shifter remembers that orientation per column. When
the next layer reads the column with shift a', the shifter rotates it by
(a' - stored) mod 42. So each group needs one rotator, not two.

When decoding starts, every orientation is reset to 0, because the LLRs are
loaded in natural order. To read out the result, each column goes through the
shifter once more with a target shift of 0.

### Combiner

Say group g has minima m_g1 <= m_g2 and sign s_g. Then:

    m1 = min(m_11, m_21)
    m2 = min(first minimum of the other group, second minimum of the winning group)
    s  = s_1 xor s_2

The combiner also records which group and which column within that group
held m1. The SEL unit of that block uses m2, and all other blocks use m1. If
the two first minima are equal, group 0 wins, which gives the same messages.
If a group has no block in a row, its MIN units stay at (15, 15, +), so the
other group decides the result on its own.

## Pipeline and command format (the part to get right)

A command (`ldpc_pkg::cmd_t`) has these fields:

| field | meaning |
|---|---|
| `first` | the first MIN command of a row: MIN units restart |
| `row_end` | the last MIN command of a row: combiners latch the row result |
| `min_op[g]` | `valid`, `col` (0..7 within the group), `shift` (H entry), `raddr` (R word of this block), `fwd`, `byp` |
| `sel_op[g]` | `valid`, `col`, `shift` (orientation Q will be stored in), `raddr`, `tbyp` |

If every operation in a command is invalid, the command is a stall bubble.

Timing is counted from the cycle *t* in which a command leaves the
controller:

| path | cycle | action |
|---|---|---|
| MIN | t | Q-memory read at `col`, R-memory read at `raddr` |
| MIN | t+1 | rotate, T = sat(Q - R) (R = 0 in iteration 1), update MIN units, write T at `col`; if `row_end`, the combiners latch at the end of this cycle |
| SEL | s | T-memory read at `col` |
| SEL | s+1 | SEL units compute R and Q from T and the latched row result, into the write-back register |
| SEL | s+2 | write Q at `col`, R at `raddr`, and the orientation `shift` |

Memory reads are registered and read-first. A write is visible to a read
issued in any later cycle; a read issued in the write cycle itself gets the
old word unless it is bypassed. Whoever builds the
sequence must follow these rules. Here *w* is the issue cycle of the SEL that
last wrote column c, and *e* is the `row_end` cycle of a row:

* A MIN of column c must be issued at t >= w + 1.
  * If t = w + 1, set `fwd`: Q and its orientation come from the write-back
    register.
  * If t = w + 2, set `byp`: the Q-memory read in the write cycle returns the
    write data.
  * If t >= w + 3, no flag is needed.
* The SELs of a row are issued at s >= e + 1. If a SEL reads the T of a
  block whose MIN was issued in the previous cycle, set `tbyp`.
* The combiners hold only one row result. So every SEL of a row must be
  issued no later than the `row_end` of the next row.
* MIN commands of the next row may overlap the SEL commands of the current
  row. This overlap is the point of the schedule.
* The sequence repeats from the top for every iteration, so it must be
  hazard-free across that wrap. The scheduler in `tb/tb_ldpc_decoder.sv` pads
  the sequence for this. The first MIN of each column in a sequence must
  come at least 3 cycles after the last write of that column in the
  previous pass. The same holds for each R word.

The number of commands L per iteration sets the throughput. One decoding,
from the `start` cycle to the first output block, takes **L * I + 6 cycles**:
the L * I commands, plus the controller's start and command registers, two
flush cycles, the Q read of the output pass and the output register.
The 16 output blocks follow, one per cycle.

## Interface and operation (`ldpc_decoder`)

The decoder holds four code slots (one per code rate). Each slot has its
own command sequence, length and block-column map. All writes below are
accepted only while `busy` is low.

Once per code slot c, with `cfg_code` = c:

1. Write the sequence: `cfg_we`, `cfg_addr`, `cfg_cmd`, up to 64 commands.
2. Write its length: `len_we`, `cfg_len` (L, 1..64). A slot with L = 0
   cannot be started.
3. Write the block-column map: `map_we`, `map_blk`, `map_grp`, `map_col`.
   This places block column b of the code in group `map_grp`, slot
   `map_col`. After reset, columns 0..7 are in group 0 and columns 8..15 in
   group 1.

Per codeword:

4. Set `code` to the slot to use. Write the 16 LLR blocks in natural order:
   `llr_valid`, `llr_blk`, and `llr[0..41]`, which holds bits
   42*b .. 42*b+41. The map of slot `code` decides where each block goes.
   Set `n_iter` (I) and pulse `start`. The code is latched at `start`, so
   `code` may change after that.
5. After L * I + 6 cycles, `out_valid` is high for 16 cycles.
   * `out_blk` counts 0..15.
   * `out_bits[k]` is the hard decision for codeword bit 42 * `out_blk` + k,
     with 1 meaning a negative LLR.
   * `done` marks the last output block.

The `ev_fwd`, `ev_byp` and `ev_stall` outputs flag cycles in which a
forward, a memory bypass or an empty command took place.

Reset (`rst_n`) is asynchronous and active low. It clears control and
pipeline state but not memory contents.

## Throughput for the 802.11ad codes

The sequence lengths below were obtained for the four codes with an exhaustive
search over all splits of the 16 block columns into two groups of 8, after
reordering the rows of the rate 1/2 and 5/8 matrices so that non-overlapping
rows follow each other:

| rate | L (natural split) | L (best split) | cycles, I = 5 | Gbps at 850 MHz |
|---|---|---|---|---|
| 1/2 | 34 | 29 | 151 | 3.78 |
| 5/8 | 34 | 28 | 146 | 3.91 |
| 3/4 | 40 | 35 | 181 | 3.16 |
| 13/16 | 30 | 28 | 146 | 3.91 |

The worst case is L = 35. That gives 672 / 181 * 850 MHz = 3.16 Gbps coded,
enough for the BPSK (1.54 Gbps) and QPSK (3.08 Gbps) modes.

These figures assume that the design is synthesized at 850 MHz. Its pipeline
is shorter than one built for that clock would be (see below), so its timing
at that frequency is not established.

The base matrices and their shift values are not included here. To decode a
real 802.11ad code, you have to produce its sequence and column map
yourself, following the rules above.

## Design choices and departures

The decoder follows a published doubly parallelized layered architecture for
802.11ad. That description gives the split into two groups, the combiner,
the units, the memory sizes and the command-sequence control, but not every
detail. The points below are where this RTL fills gaps or goes its own way.

* **Pipeline depth.** The MIN path is only two stages and the write-back is
  one. The rotator, subtraction, MIN update and combiner therefore share one
  cycle. A pipeline built for 850 MHz in 40 nm would be deeper. Its flush
  would take about 8 cycles instead of 2, and the hazard distances above
  would grow.
* **Stalls** are bubble commands, not per-stage stall bits.
* **Sequence storage.** The four sequences are held in a writable memory
  of 4 x 64 commands, loaded at run time, not in a ROM. The R-memory
  halves hold 28 block words each. Together that is the 56 non-zero blocks
  of the largest code, provided the code's non-zero blocks split evenly
  between the two groups.
* **First iteration.** R is not cleared before decoding. An `iter0` flag
  travels with each command in the first iteration and forces the old R to
  zero.
* **Memories** are plain arrays with a registered read: one read port and
  one write port per half. No SRAM macro is instantiated.
* **Ties.** Ties in the minimum search keep the earlier value as m1.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_min_unit`, `tb_sel_unit`, `tb_comb_unit`: random inputs against a
  direct computation.
* `tb_cyclic_shifter`: rotation, forwarded orientation and clear, against a
  model in natural order.
* `tb_ldpc_ram`: registered read, same-cycle read with and without bypass.
* `tb_seq_controller`: command order for each code slot (up to the full
  length 64), iteration flag, flush gap, output reads, the code latched at
  start, and configuration writes blocked while running.
* `tb_proc_group`: a single group on a random 4-row code over 3 iterations,
  against an unrotated layered model. It checks MIN results per row and
  every final Q value. Forward, Q-bypass and T-bypass each occur.
* `tb_ldpc_decoder`: the whole decoder at default parameters.
  * Random codes with 8, 6, 4 and 3 block rows (the shapes of the four
    802.11ad matrices) and random column splits, loaded into the four code
    slots. Seven codewords are decoded, switching codes between them.
  * A built-in greedy scheduler writes the command sequence.
  * Noisy all-zero codewords and random LLRs, 5 iterations.
  * All 672 hard decisions are compared with a bit-true layered
    offset-min-sum model, and the latency is checked against L * I + 6.
  * It fails if no forward, bypass, stall command or code switch occurred.

Simulate with Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -y rtl -Irtl rtl/ldpc_pkg.sv \
    tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder -o sim
./obj_dir/sim
```

The full-decoder test runs in well under a second.
