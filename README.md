# Time distributed voting (TDV) with three C6288 multiplier PEs

Lockstep triple modular redundancy (TMR) runs three copies of a processing
element (PE) on the same input and takes the majority. It masks any single
faulty PE. When two PEs are faulty, though, TMR can fail in two ways: all
three results differ, so there is no majority, or the two faulty PEs agree
on the same wrong result (*aliasing*) and outvote the healthy one.

Time distributed voting spreads the decision over many inputs. Each vote
updates a weight per PE: the PE that disagrees with the other two loses a
point, and the two that agree gain one. A fault only changes the output when
an input activates it, and two different faults rarely get activated together
*and* produce the same wrong word. So over hundreds of inputs the healthy PE
collects the highest weight, even with both other PEs faulty. The healthy PE
is called the *golden* PE.

This repository is RTL for such a system. The PEs are 16x16 array
multipliers with the structure of the ISCAS-85 C6288 benchmark. Each PE has a
stuck-at fault injection port. The three PEs work on independent streams, and
CAM-based FIFOs find the inputs that all three have computed.

## Block overview

```
 in_a/in_b[0] -> c6288_pe 0 --\
 in_a/in_b[1] -> c6288_pe 1 ---> tdv_align --> tdv_voter --> tdv_weights --> weight[], golden_id
 in_a/in_b[2] -> c6288_pe 2 --/  (3 x cam_fifo)     |
                                                    +--> vote_result, vote_outcome
```

| file | role |
|---|---|
| `rtl/tdv_pkg.sv` | widths, `fault_t`, `entry_t`, `vote_outcome_e` |
| `rtl/c6288_fa.sv`, `rtl/c6288_ha.sv` | full and half adder cells |
| `rtl/c6288_pe.sv` | 16x16 array multiplier PE with fault injection |
| `rtl/cam_fifo.sv` | per-PE store of waiting results, searched by input pattern |
| `rtl/tdv_align.sv` | finds patterns that all three PEs computed and aligns their results |
| `rtl/tdv_voter.sv` | classifies a vote and produces the weight changes |
| `rtl/tdv_weights.sv` | weight accumulators and golden-PE identification |
| `rtl/tdv_top.sv` | the whole system |

## The vote rule

For each input pattern the PEs computed, the three results go to the voter:

| results (PE0 PE1 PE2) | outcome | weight change |
|---|---|---|
| X X X | `VOTE_ALL_AGREE` | 0 0 0 |
| Y X X | `VOTE_MINORITY_0` | -1 +1 +1 |
| X Y X | `VOTE_MINORITY_1` | +1 -1 +1 |
| X X Y | `VOTE_MINORITY_2` | +1 +1 -1 |
| X Y Z | `VOTE_NO_MAJORITY` | 0 0 0 |

The voter never knows the correct answer. It only counts agreement, so the
rule does not favour any PE. The weights are signed 16-bit saturating
counters (`WEIGHT_W`). The golden PE is the one with the highest weight. On a
tie the lowest-numbered PE wins. `golden_valid` is 0 only while all three
weights are equal, for example right after `clear_weights` or when every vote
so far agreed.

Two consequences are worth knowing:

* With one faulty PE (the case TMR covers), both healthy PEs rise together
  and stay tied. `golden_id` then names the lower-numbered healthy PE.
* With two faulty PEs whose faults alias often enough, the healthy PE is
  outvoted more often than the faulty ones. TDV then names a faulty PE.
  `tdv_top_tb` contains such a pair on purpose: PE1 stuck-at-1 on partial
  product a3·b2 and PE2 stuck-at-1 on a2·b3. Both faults have the same
  weight, so they agree whenever both are activated.

The system result `vote_result` is the majority result when there is one.
When all three results differ, it is the result of the current golden PE,
using the weights before this vote. `vote_result_ok` is 0 when there is
neither a majority nor a golden PE.

## Finding a vote: streams, CAM FIFOs and alignment

Unlike lockstep TMR, the PEs here do not share an input. Each has its own
operand stream (`in_valid`/`in_ready`/`in_a`/`in_b`). A vote is only possible
for an input pattern that all three streams happen to carry. `tdv_align`
detects such patterns:

1. Each PE's result is tagged with its input pattern, `key = {a, b}`. It is
   caught in a one-entry holding register with a valid/ready handshake.
2. A round-robin arbiter takes one held result per clock. In the same cycle
   it searches all three CAM FIFOs for that key.
3. If both *other* PEs' CAMs hold the key, the three results are put in PE
   order and registered as one aligned triple. The two matched CAM entries
   are removed. Otherwise the result is written into its own PE's CAM to wait
   for the other two.

`cam_fifo` is a ring of `DEPTH` (default 8) entries, all compared with the key
at once. When several entries match, the oldest one is used. Each write goes
to the oldest slot. If that slot still holds a result that was never voted,
the result is lost and `drop[i]` pulses. A pattern therefore gets voted only
if the three streams carry it within about `DEPTH` results of each other.
Streams that drift further apart lose votes but never produce wrong ones.
`cam_count[i]` shows how many results are waiting.

The aligner takes one result per cycle for all three PEs together. When all
three streams run at full rate, each one gets a result through every third cycle,
and the others see `in_ready` low.

### Timing

* A PE is combinational. Its result is captured when the stream handshake
  completes.
* If it is granted at once, the held result is matched in the next cycle. An
  aligned triple leaves `tdv_align` on the first clock edge after the edge
  that accepted the completing result.
* `tdv_top` registers the vote once more. `vote_valid` rises two clock edges
  after the completing result was accepted, and `weight[]` changes on that
  same edge.
* `clear_weights` zeroes the weights on the next edge. Reset (`rst_n`) is
  synchronous and active low. It clears the holding registers, the CAM valid
  bits, the weights and the output valid.

## The PE: a C6288-style array multiplier

`c6288_pe` multiplies two unsigned 16-bit numbers into a 32-bit product. It
contains no registers:

* 256 AND gates form the partial products `pp[j][i] = a[i] & b[j]`.
* 240 adder cells, in 16 rows of 15, sum them as a carry-save (Braun) array:
  * Row 1 has 15 half adders. They have no carry input, because there is no
    row above.
  * Rows 2 to 15 are full adders. Each one adds its partial product, the sum
    from the cell up and to the left, and the carry from the cell above.
  * The bottom row is a 15-cell ripple-carry adder that produces product
    bits 16 to 31. Its first cell is a half adder, because nothing ripples
    into it.
* Product bit r, for r below 16, leaves the right edge of row r.

That is 224 full adders and 16 half adders, as in the benchmark. The
benchmark is a NOR-gate netlist with 2,448 fault nodes. This PE is written at
the adder-cell level, with the same function and cell arrangement.

### Fault injection

`fault` (`fault_t`: `en`, `site`, `value`) forces one net to 0 or 1. The sites
are numbered as follows:

| site | net |
|---|---|
| `j*16 + i` (0..255) | partial product `a[i] & b[j]` |
| `256 + 2*cell` | sum output of a cell |
| `256 + 2*cell + 1` | carry output of a cell |

`cell` is `(row-1)*15 + column` for rows 1 to 15, and `225 + k` for bottom
cell k. That gives 736 sites, or 1,472 single stuck-at faults.

The array adds every bit it is given exactly, and the 32 output bits hold
the whole sum. So forcing a net of weight 2^w from value o to value v changes
the product by exactly (v − o)·2^w. The testbenches use this to predict the
output of a faulty PE without reading the PE's internals.

## Interface of `tdv_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid[3]`, `in_ready[3]` | in/out | 1 | per-PE stream handshake |
| `in_a[3]`, `in_b[3]` | in | 16 | operands per PE |
| `fault[3]` | in | `fault_t` | injected stuck-at fault per PE |
| `clear_weights` | in | 1 | start a new evaluation |
| `vote_valid` | out | 1 | one-cycle pulse per vote |
| `vote_key` | out | 32 | `{a, b}` of the pattern voted on |
| `vote_outcome` | out | `vote_outcome_e` | row of the vote table |
| `vote_result`, `vote_result_ok` | out | 32, 1 | system result and whether it can be trusted |
| `weight[3]` | out | 16 signed | accumulated weights |
| `golden_id`, `golden_valid` | out | 2, 1 | identified healthy PE |
| `drop[3]`, `cam_count[3]` | out | 1, 4 | CAM overflow pulse and occupancy |

Parameters: `DEPTH` = 8 (CAM entries per PE) and `WEIGHT_W` = 16.

## What follows the TDV scheme and what is this design's choice

These parts follow the TDV scheme:

* three PEs on independent streams;
* a CAM-based FIFO per PE to spot patterns the streams have in common;
* alignment of the three results and vote execution;
* the weight-update table;
* the C6288 PE: a 16x16 multiplier, an AND partial-product array and a
  15x16 array of half and full adders, with half adders in the top row and
  one in the bottom row.

These are this design's own choices:

* Carry-save array with a ripple-carry bottom row, and adder-level rather
  than NOR-gate cells.
* The fault injection port and its site numbering. The adder-level model has
  736 sites, not the benchmark's 2,448 gate nodes, so fault-coverage and
  aliasing figures measured on it are not those of the gate-level netlist.
* CAM depth 8, oldest-slot overwrite, and oldest match first.
* The holding registers, round-robin arbitration and one result per cycle.
* 16-bit saturating weights, the tie-break, and the meaning of
  `golden_valid`.
* The system result when there is no majority.

These are not built:

* **Removing a PE.** The TDV scheme speaks of evicting PEs, but no rule for
  when to evict is given. The design reports `golden_id` and the weights and
  leaves eviction to the surrounding system.
* **More than three PEs.** Adding PEs is suggested as a way to reduce
  aliasing, but the vote table is defined for three, so `N_PE` is fixed at 3
  in `tdv_pkg`.
* **The lockstep TMR voters** (bit-level and word-level). They are only a
  baseline for comparison.

## Verification

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and has a cycle-count watchdog.

| testbench | what it shows |
|---|---|
| `c6288_fa_tb`, `c6288_ha_tb` | exhaustive truth tables |
| `c6288_pe_tb` | random products, plus stuck-at faults on partial products, top-row cells and the last carry, each matching the (v−o)·2^w prediction |
| `cam_fifo_tb` | random writes, searches and removals against a reference model, including multiple matches, drops and reset |
| `tdv_voter_tb` | every row of the vote table |
| `tdv_weights_tb` | random updates against reference counters, saturation at both ends (4-bit weights), ties and clear |
| `tdv_align_tb` | latency, every common pattern voted exactly once with lanes in PE order, no vote for a pattern only two PEs saw, and drops and stalls from a lagging stream |
| `tdv_top_tb` | default parameters, five evaluations of 1,200 patterns: fault-free, one faulty PE, two faulty PEs, an aliasing pair, and a lagging stream. Every vote is checked against a reference model. Each outcome, stalls, drops, no-majority votes resolved by the golden PE, and correct golden identification must all occur |
| `c6288_coverage_tb` | all 1,472 single stuck-at faults of the PE are detected by a fixed set of LFSR patterns; all are found within the first 66 |
| `tdv_pairs_tb` | default parameters, 1,000 random fault pairs with 200 patterns each. It checks weight bookkeeping, and that PE0 stays golden whenever it was never outvoted |

Result of `tdv_pairs_tb`: the healthy PE was identified in 987 of 1,000
pairs, which is 98.7%. Aliasing happened in 20 pairs.

To simulate with Verilator 5, for example the full system test:

```
verilator --binary --timing --assert -Irtl rtl/tdv_pkg.sv tb/tdv_top_tb.sv \
          --top-module tdv_top_tb -Mdir obj_tdv_top
./obj_tdv_top/Vtdv_top_tb
```

Swap in any other testbench name. The package must come first on the command
line; `-Irtl` lets Verilator find the other modules. All testbenches finish in
a few seconds.

To change the design:

* `DEPTH` sets how far apart the streams may drift before votes are lost.
  `WEIGHT_W` sets how many votes the weights can count before they saturate.
* A different PE can replace `c6288_pe`, as long as it keeps the `a`, `b`,
  `fault` and `p` ports. `tdv_align` and the voter only see keys and 32-bit
  results.
