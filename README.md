# Radix-4 LDPC decoder for the 802.11n rate-1/2 codes

This is a partially parallel decoder for the three rate-1/2 low-density parity-check codes of
IEEE 802.11n: codeword lengths 1944, 1296 and 648 bits, with sub-block sizes Z = 81, 54 and 27.
Its central idea is the **Radix-4 check node update**. A check node has to combine the messages
of all its other edges. Instead of folding them two at a time, the decoder folds **three at a
time**, using a log-sum-exp evaluated with a max/second-max and a small correction table. That
halves the depth of the check-node tree: rows with 7 or 8 nonzero entries need two operation
stages instead of three. The second idea is a **reordered parity-check matrix**, which lets
check-node and bit-node phases overlap in time. Together they give a decoding time of
`(Z+2)·(1+4·iterations)` clock cycles. For Z = 81 that is 415 cycles for one iteration and
2407 cycles for seven. At 62.5 MHz this is 292 to 50 Mbit/s.

All arithmetic is 8-bit signed fixed point, Q4.4 (value = code/16). Inputs are channel
log-likelihood ratios (LLRs): positive means bit 0 is more likely.

## The code and how the decoder sees it

Each parity-check matrix H is a 12 × 24 array of Z × Z sub-blocks. A sub-block is either zero
or an identity matrix cyclically shifted by `s`. In this design's convention, check `j` of the
block row connects to bit `(j+s) mod Z` of the block column. Block rows have 7 or 8 nonzero
sub-blocks. Block columns have 2, 3, 4, 11 or 12.

The decoder never uses the standard row and column order. Rows and columns are permuted into
three **row groups** of 4 block rows (R0, R1, R2) and three **column groups** of 8 block
columns (G0, G1, G2). The permutation is chosen so that:

* R0 has no nonzero sub-block in G2, and
* R2 has no nonzero sub-block in G0.

For Z = 81 the permutation is:

* columns: standard 7 11 13 12 24 23 22 21 | 5 1 9 2 10 6 4 14 | 3 8 20 19 18 17 16 15 (1-based);
* rows: 1 9 11 10 12 8 7 6 5 4 3 2.

For Z = 27 and Z = 54 the orders in `ldpc_pkg` are the result of a search for the same zero
structure. Permuting rows and columns does not change the code. The input buffer maps the
standard bit order onto reordered columns, and the output buffer maps it back. All code tables
are constants in `rtl/ldpc_pkg.sv` and are already in the reordered order:

* `SLOT_COL`/`SLOT_SHIFT`: for each row, the column and shift of its e-th nonzero block.
* `COL_SLOT`: the inverse lookup, from column and row to slot.
* `NEW_COL`/`ORIG_COL`: the column permutation in both directions.

## Overlapped schedule

There are four CNUs (check node units), one per block row of a row group. Each handles one check
node per cycle. There are eight BNUs (bit node units), one per block column of a column group.
Each handles one bit per cycle. Decoding is a sequence of **slots** of `Z+2` cycles:

* in the first Z cycles the controller issues indices 0..Z−1;
* in the last two cycles the two-stage pipelines drain and write back.

A slot runs a CNU phase `Cg` (row group g), a BNU phase `Bg` (column group g), or one of each.

| slot | 0  | 1  | 2       | 3  | 4       | 5  | 6       | 7  | … | last |
|------|----|----|---------|----|---------|----|---------|----|---|------|
| work | C0 | C1 | C2 + B0 | B1 | B2 + C0 | C1 | C2 + B0 | B1 | … | B2   |

Why the pairs in one slot are safe:

* C2 and B0 touch disjoint sub-blocks, because R2 has nothing in G0.
* B2 and C0 are disjoint for the same reason, with R0 and G2.

Why each phase sees fresh data:

* C0 of iteration i+1 needs the bit messages of G0 and G1, which B0 and B1 have already
  written. C0 has no edges in G2, which B2 is updating at that moment.
* B0 needs the check messages of all three row groups. R2 has nothing in G0, so B0 can start
  while C2 is still running.

Each iteration therefore costs 4 slots instead of 6, plus one leading slot:

| | cycles | Z=81, 1 iteration | Z=81, 7 iterations |
|---|---|---|---|
| this design (overlapped) | (Z+2)(1+4I) | 415 | 2407 |
| without overlap | (Z+2)·6I | 498 | 3486 |

A frame goes through four stages:

1. LOAD: 24·Z cycles, one LLR per cycle.
2. DECODE: the count above.
3. CHECK: 3·Z cycles.
4. OUTPUT: 24 cycles.

A new frame can be loaded only after the previous one has been output. The controller in
`ldpc_ctrl` has the states IDLE, LOAD, DECODE, CHECK and OUTPUT.

## Radix-4 check node update

Let `f(x) = ln(1 + e^{-|x|})`. The exact update of a check node, written as a two-input
operator, is:

    a ⊞ b = sign(a)·sign(b)·min(|a|,|b|) + f(a+b) − f(a−b)

This is the **two-input unit** (`ldpc_cnu_op2`). Three inputs can be combined in one step. The
result is a difference of two log-sum-exps:

    a ⊞ b ⊞ c = ln(e^{a+b+c} + e^a + e^b + e^c) − ln(e^{a+b} + e^{b+c} + e^{a+c} + 1)

Each log-sum-exp over four terms is approximated by:

    largest + f(largest − second largest)

So the **Radix-4 unit** (`ldpc_cnu_op3`) works as follows:

1. Form α = {a+b+c, a, b, c} and β = {a+b, b+c, a+c, 0}.
2. Find the largest and second-largest element of each set.
3. Look up f of the two gaps.
4. Output `maxα + f(gapα) − maxβ − f(gapβ)`, saturated to 8 bits.

The internal width is 11 bits, so that a+b+c cannot overflow.

**Tree per edge** (`ldpc_cnu`). A row of degree d needs, for each edge e, the combination of
the other d−1 messages:

* stage 1: two Radix-4 units combine other inputs 1–3 and 4–6;
* stage 2 for degree 8: a Radix-4 unit combines both results with the seventh other input;
* stage 2 for degree 7: a two-input unit combines both results.

Both row degrees of these codes therefore take exactly two stages. A register sits between
the stages. Each CNU has 8 copies of this tree, one per edge: a full result set per check
node and cycle, with no forward/backward recursion.

**Correction table** (`ldpc_lut`). f is replaced by a piece-wise linear function. Its slopes
are powers of two, so each segment is just a shift and a subtraction. In units of 1/16, with
x the magnitude in units of 1/16:

| |x| range | value (1/16) | real form |
|---|---|---|
| [0, 0.5) | 11 − x/2 | −x/2 + 0.6875 |
| [0.5, 1.5) | 9 − x/4 | −x/4 + 0.5625 |
| [1.5, 2) | 6 − x/8 | −x/8 + 0.375 |
| [2, 3) | 4 − x/16 | −x/16 + 0.25 |
| [3, 4.5) | 2 − x/32 | −x/32 + 0.125 |
| ≥ 4.5 | 0 | 0 |

The value is never more than 1/16 above the piece-wise line, and the error against the true f
stays below about 0.07. The second segment's offset is 0.5625 rather than 0.575: 0.575 has no
exact 4-fractional-bit form.

## Memories and addressing

* **Channel memories.** There are 24 one-port register files (`ldpc_rf1`), each 81 × 8 bits,
  one per reordered block column. They hold the channel LLRs of the frame, which the BNUs
  read in every bit-node phase.
* **Message memories.** There are 96 two-port register files (`ldpc_rf2`), each 81 × 8 bits,
  one per (block row, slot) position. Slot e of row i is the e-th nonzero sub-block of that row
  in the current mode. The codes use 86 (Z=54, 81) or 88 (Z=27) of them. Having a fixed 12 × 8
  grid means a CNU always reads the same eight memories, whatever the mode.

Word `j` of a message memory holds the message of the edge (check j, bit (j+s) mod Z):

* CNU u in row group g reads word `idx` of the 8 memories of row 4g+u.
* BNU v in column group g needs bit `k = idx` of column 8g+v. For each of the 12 rows it reads
  the memory of that row's slot in the column (`COL_SLOT`), at word `(k − s) mod Z`.
* Absent rows are masked off at the BNU inputs.

Results go back to the same address two cycles after the read:

* registered read: 1 cycle;
* unit pipeline: 1 cycle.

The write overwrites the message in place. A CNU-phase and a BNU-phase never own the same
memory in one cycle; the memory bank asserts this.

At load time every edge memory of a column is written with that bit's channel LLR. The first
CNU phase therefore sees the channel values as its bit-to-check messages.

## Bit node update and decisions

The BNU (`ldpc_bnu`) adds the channel value to the up to 12 incoming check messages to form the
posterior P. It registers P and the inputs. Each outgoing message is `P − r_i`, clipped to
8 bits. The sign bit of P is the hard decision. The BNUs write the decisions of every
bit-node phase into the output buffer (`ldpc_out_buffer`, 24 × 81 flip-flops), so after the last
B2 the buffer holds the decisions of the final iteration.

The syndrome unit (`ldpc_syndrome`) then evaluates the parity checks:

* four rows of a row group per cycle, 3·Z cycles in total;
* `parity_ok` reports whether every check is satisfied.

The decoder always runs the configured number of iterations. It does not stop early when the
syndrome is satisfied.

## Top-level interface (`ldpc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| cfg_mode | in | 2 | `MODE_Z27`, `MODE_Z54`, `MODE_Z81`; sampled with the first LLR of a frame |
| cfg_iter | in | 3 | iterations 1..7 (0 counts as 1); sampled with the first LLR |
| in_valid / in_ready | in / out | 1 | LLR handshake; 24·Z LLRs in standard bit order |
| in_llr | in | 8 | signed Q4.4 LLR, positive = bit 0 likely |
| out_valid, out_col, out_bits, out_last | out | 1, 5, 81, 1 | one block column per cycle, standard column order 0..23; bits ≥ Z are zero |
| parity_ok | out | 1 | decoded word satisfies H·vᵀ = 0; valid with the output stream |
| dec_done | out | 1 | pulse in the last decoding cycle |
| busy | out | 1 | high from the first LLR until the last output column |

Bit `k` of `out_bits` in column `c` is codeword bit `c·Z + k`. A 1 means the bit was decided
as 1.

## Where this design departs from the original architecture

* The original design uses 88 two-port memories, one per nonzero sub-block of the Z=27 code.
  This design uses the full 12 × 8 grid of 96 memories, which keeps the routing mode-independent.
* Memories are 81 words deep, not 82.
* Message arithmetic is two's complement throughout. The two-input unit takes magnitudes by
  negation. The original description of that unit reads more like sign-magnitude inputs.
* The overlapped slot order above, the per-edge CNU trees and the memory addressing are this
  design's choices. The original architecture describes the overlap, the two-stage CNU and
  the slot count, but not these details.
* Row and column orders for Z = 27 and 54 are this design's own. So are the base matrices of
  those two modes, which are taken from the 802.11n standard.
* LLRs enter one per cycle and decisions leave one block column per cycle. The syndrome is
  checked once, after decoding. There is no early termination.
* Memory BIST, scan insertion and I/O pads of a chip implementation are not part of this RTL.

## Files

* `rtl/ldpc_pkg.sv`: types, code tables and helper functions.
* `rtl/ldpc_decoder.sv`: the top.
* `rtl/ldpc_ctrl.sv`: the controller and scheduler.
* `rtl/ldpc_input_buffer.sv`, `rtl/ldpc_out_buffer.sv`: the input and output buffers.
* `rtl/ldpc_rf1.sv`, `rtl/ldpc_rf2.sv`: the register files.
* `rtl/ldpc_msg_bank.sv`: the message memory bank with its addressing.
* `rtl/ldpc_cnu.sv`, `rtl/ldpc_cnu_op3.sv`, `rtl/ldpc_cnu_op2.sv`, `rtl/ldpc_lut.sv`: the
  check node datapath.
* `rtl/ldpc_bnu.sv`: the bit node unit.
* `rtl/ldpc_syndrome.sv`: the syndrome check.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=… failures=…`.

## Simulation

Every testbench is self-checking. To run one, for example the full decoder:

    verilator --binary --timing --assert --top-module tb_ldpc_decoder -Mdir obj \
        rtl/ldpc_pkg.sv $(ls rtl/*.sv | grep -v ldpc_pkg) tb/tb_ldpc_decoder.sv
    ./obj/Vtb_ldpc_decoder

`tb_ldpc_decoder` runs the top at its default parameters and takes under a second. It works as
follows:

* It encodes random messages with the dual-diagonal parity structure of the 802.11n matrices.
* It adds Gaussian noise, quantises to Q4.4 and feeds the frames in.
* It checks the decoded words, the `parity_ok` flag, the decoding cycle count and the output
  format.
* It covers all three modes, 1 to 7 iterations, a mode switch between frames, input stalls,
  and frames with channel errors that the decoder must correct. Each of these mechanisms is
  counted, and one that never happens counts as a failure.

The unit testbenches compare each block against an independent model:

* the operation units against real-valued log-sum-exp and exact `2·atanh(∏tanh)` formulas;
* the CNU against a bit-exact integer model;
* the memory bank against a model of H's edge addressing;
* the syndrome unit against a software parity check.
