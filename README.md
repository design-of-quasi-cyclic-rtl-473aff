# 5G NR quasi-cyclic LDPC decoder (layered offset min-sum)

This is synthesizable SystemVerilog for a layered offset-min-sum (L-OMS) decoder for the
quasi-cyclic LDPC codes of 5G NR. It follows the "5G Eagle" architecture: an Eagle 802.11n
decoder scaled up to 5G NR. The default parameters are the full 5G sizes:

| Quantity | Default |
|---|---|
| Lifting sizes | all 51 lifting sizes, Z = 2 … 384 |
| Prototype matrix | up to 68 columns and 316 non-zero blocks (base graph 1) |
| Node computation units (NCUs) | 384, in 16 clock-gated groups of 24 |
| Messages | 7-bit LLR, Q and T messages; 5-bit R messages |
| Q and T memories | 68 words each |
| R memory | 316 words |
| Sequence memory | 512 words of 47 bits |
| Command word | 38 bits |

The schedule, meaning the order of the MIN and SEL operations, is computed outside the chip and
loaded as sequence words. The decoder runs it for a fixed number of iterations. There is no
early termination.

## Files

`rtl/` holds one module or package per file.

| File | Contents |
|---|---|
| `ldpc_pkg.sv` | sizes, the sequence-word and command-word formats, the lifting-size table |
| `ldpc_decoder_top.sv` | the top: the pipeline that wires the blocks below together |
| `ldpc_interface.sv` | pad interface: splits the input stream, serializes decoded columns |
| `control_unit.sv` | FSM in, FSM control and FSM out; command register; clock lookup table |
| `sequence_memory.sv` | 512 × 47-bit schedule memory |
| `q_memory.sv` | 68 × 384 × 7-bit Q memory with a lane-masked write and read forwarding |
| `shift_memory.sv` | each column's current rotation and a shift buffer; computes the delta shift |
| `cyclic_shifter.sv` | rotates the Z used lanes |
| `clock_control.sv` | 16 latch-based clock gates |
| `ncu_pool.sv` | the 16 groups (`ncu_group.sv`) of 3 macro computation cells |
| `mcc.sv` | a macro computation cell (MCC): 8 NCUs with their T and R memory slices |
| `ncu.sv` | one NCU: a MIN unit and a SEL unit |
| `min_unit.sv` | the MIN phase of one lane |
| `sel_unit.sv` | the SEL phase of one lane |

`tb/` holds one self-checking testbench per block, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`.

## Algorithm

Each layer m is one row of the prototype matrix. For each non-zero block (m, n) of the layer the
**MIN phase** does the following:

1. Rotate column n's Q vector by the delta shift.
2. Compute t = sat(q − r_old). In the first iteration r_old is taken as 0.
3. Store t in the T memory.
4. Track, per lane, the smallest and second-smallest |t|, the column of the smallest, and the
   product of the signs.

The **SEL phase** revisits every block of the layer. For each one it does the following:

1. Pick the magnitude m: the second minimum when the block holds the first minimum, otherwise
   the first minimum.
2. Compute r = sign · max(m − β, 0), limited to ±15.
3. Clip r so that |t + r| ≤ 63: r = max(min(r, 63 − t), −63 − t).
4. Write r to the R memory and q = t + r back to the Q memory.

Q vectors stay in the Q memory in the rotation of the last block that used them. The shift
memory holds that rotation, c_n, for each column. A MIN read of a block with prototype shift H
is rotated by (Z − c_n + H) mod Z. H is kept in the shift buffer until the SEL phase writes the
column back, and only then does it become the column's rotation.

## Pipeline

A sequence word may carry one MIN operation and one SEL operation at the same time. While the
SEL phase finishes layer m, the MIN phase already works on layer m+1. Each word passes through
four stages:

| Stage | What happens |
|---|---|
| 0 | The control unit issues the sequence-memory address. |
| 1 | The word arrives. The Q memory is read at the MIN column (`q_addr`), and the shift memory computes the delta shift. |
| 2 | The cyclic shifter rotates the Q vector. The MCCs read the R word (`r_rd_addr`) and the T word (`t_addr`). |
| 3 | The MIN units take the rotated Q vector. The SEL units produce new R and Q. The new Q is written to the Q memory at `t_addr`, and that column's rotation is updated. |

Two forwarding paths remove hazards:

- **Q memory.** A stage-1 read of the column that stage 3 writes in the same cycle gets the new
  data.
- **T memory.** A stage-2 read of the column the MIN phase writes in the same cycle gets the
  MIN output. This lets a layer's SEL phase start right after its MIN phase ends.

The MIN units keep their running minima until the word with `row_end`. They then hand the
layer's results to the registers that the SEL phase reads, so the next layer's MIN can start at
once.

During decoding, group g (24 lanes) is clocked only when g < ceil(Z/24). Outside decoding no
group is clocked. Lanes at or above Z are never written.

## Sequence words and the schedule

A sequence word (`ldpc_pkg::seq_word_t`, 47 bits, MSB first):

| Field | Bits | Meaning |
|---|---|---|
| `q_addr` | 7 | MIN: column whose Q vector is read |
| `t_addr` | 7 | SEL: column whose T word is read and whose Q vector is written back |
| `r_rd_addr` | 9 | MIN: R word of the block (the previous iteration's R message) |
| `r_wr_addr` | 9 | SEL: R word written |
| `shift` | 9 | MIN: the block's prototype shift, 0 … Z−1 |
| `min_stall` | 1 | no MIN operation in this word |
| `sel_stall` | 1 | no SEL operation in this word |
| `row_end` | 1 | the MIN block is the last of its layer |
| `iter_end` | 1 | last word of the loop |
| `seq_end` | 1 | last word of the sequence |
| `last_q` | 1 | the SEL block is the last of its layer (carried, not needed) |

**Loop and tail.** Words 0 … `iter_end` form the *loop*, which is replayed `max_iters` times.

- In steady state, one pass of the loop does two things: it finishes the SEL phase of the last
  layer of the previous iteration, and it runs the MIN and SEL phases of all layers of the
  current iteration.
- In the first pass there is no previous iteration. Its SEL operations are ignored until the
  first `row_end` has passed.

The words after `iter_end`, up to `seq_end`, form the *tail*. It is issued once and finishes the
last iteration's SEL phase. The controller then waits 4 cycles for the pipeline to drain. A
codeword therefore takes

    cycles = max_iters × L_loop + L_tail + 4

from the first word to the start of the read-out.

**Schedule rules.** A valid schedule must obey these rules, with "slot" meaning the position of
a word in the sequence:

- A MIN read of column n comes at least 2 slots after the SEL write-back of the latest earlier
  layer that uses n. A gap of 2 is the Q-forwarding case.
- The SEL of a block comes at least 1 slot after its layer's `row_end`.
- A layer's `row_end` comes no earlier than the last SEL of the previous layer.
- Where no operation fits, the word carries a stall bit.

## Command word and interface

The command word (`ldpc_pkg::cmd_word_t`, 38 bits) follows the document's field list:

| Field | Bits | Use |
|---|---|---|
| standard | 1 | unused |
| mode | 6 | lifting-size index 0 … 50, in increasing Z |
| code rate | 2 | unused |
| number of columns | 7 | used |
| code attribute | 1 | unused |
| max-iters | 4 | used |
| early termination | 2 | stored, not used |
| output mode | 1 | 1 = hard bits, 0 = LLRs |
| operation | 1 | 1 = a new schedule follows |
| β | 3 | the offset |
| ET window | 5 | stored, not used |
| ET no-progress | 5 | stored, not used |

The pads carry 48 bits each way. A beat moves in a cycle where req and ack are both high. One
frame on the input is made of:

1. One command beat. It is accepted only while the decoder is idle and the output buffer is
   empty.
2. If `operation` = 1, the sequence words, one per beat, up to and including the word with
   `seq_end`.
3. For each of the `n_cols` columns, ceil(Z/6) beats of six 7-bit LLRs. Bits [7k+6:7k] hold
   LLR k, lanes go in increasing order, and column 0 comes first.

Decoding starts as soon as the last beat is in. Afterwards each column is read back through the
shifter, rotated to natural order, and sent in one of two forms:

- ceil(Z/6) beats of six LLRs, or
- ceil(Z/48) beats of 48 hard decisions, where bit k is 1 for a negative LLR.

## Simulation

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv tb/tb_ldpc_decoder_top.sv \
        --top-module tb_ldpc_decoder_top -j 8
    ./obj_dir/Vtb_ldpc_decoder_top

Any other testbench is built the same way: replace the file and top name with `tb_<module>`.

`tb_ldpc_decoder_top` runs the top at its default, full size. It builds synthetic prototype
matrices shaped like the two base graphs, with pseudo-random shifts:

- 46 × 68 with 316 non-zero blocks (base-graph-1 shape);
- 42 × 52 with 197 non-zero blocks (base-graph-2 shape).

It then does the following:

1. Computes a schedule with a greedy scheduler that obeys the rules above.
2. Loads the schedule through the pads.
3. Decodes four frames:
   - Z = 384, 15 iterations, LLR output;
   - Z = 352, 15 iterations, hard-bit output;
   - Z = 352, 7 iterations, β = 2, reusing the stored schedule;
   - Z = 5, 9 iterations.
4. Compares the Q memory after loading and every output beat bit-for-bit with an unpipelined
   reference model of the same algorithm.
5. Checks the cycle count against the formula above.
6. Counts each mechanism to confirm it was exercised: Q, T and shift forwarding, stalls, the
   tail, clock-gated groups, schedule reuse and both output modes.

## Results

All testbenches pass. The full-size run of the top model with 316 non-zero blocks, Z = 384 and
15 iterations takes 5334 cycles: the loop is 355 words (39 of them stalls) and the tail is 5
words. The base-graph-2 shape at 15 iterations takes 3383 cycles. The document reports 5230 and
3284 cycles for the same block counts. The difference comes from the schedule, which here is a
simple greedy one rather than the document's.

## Departures from the document and choices made here

- **Early termination.** Not implemented; the document's decoder does not have it either. Its
  command fields are stored only.
- **Command length.** The command word has the 38 bits of the field list. The architecture
  summary quotes 34; the difference is the four unused bits.
- **Shift-memory address.** The address is 7 bits for the 68 columns. One sentence of the
  document says 6.
- **Word formats and handshakes.** The document does not give the pad width, the beat formats,
  the meaning of the `operation` bit, the handshake timing or the loop/tail reading of the
  three end bits. The choices made for them are described above.
- **R messages.** R messages are 5 bits: the magnitude is limited to 15 before clipping.
- **R memory.** It is not cleared at the start of a codeword. The MIN operations of the first
  iteration use r = 0 instead, which has the same effect.
- **Minimum index.** The index of the first minimum is its column number.
- **Memories.** They have registered reads and are not reset.
- **Control registers.** They have an asynchronous active-low reset.
- **Cyclic shifter.** It is built from two barrel shifts and a per-lane select. Its 16 groups
  of 24 lanes are not clock-gated separately; only the NCU groups are.
- **Lifting-size table.** The mode-to-Z table is the 51 sizes of 3GPP TS 38.212, in increasing
  order.
