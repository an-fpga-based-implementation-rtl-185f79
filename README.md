# Control vector detector: a word-list-derived FSM for serial command decoding

A processor with few spare pins can still control many devices if it sends
them fixed-length command words ("control vectors") one bit per clock on a
single port. Each receiving device then needs a small circuit that
recognises its own words in the bit stream and turns each one into an output
pattern. This RTL implements such a receiver: a finite state machine whose
reduced state table is derived **directly from the list of words**. No state
diagram is drawn and no general state minimisation is run. The construction
runs at elaboration time. Change the word list, the word length or the
output patterns through parameters, and a new reduced FSM comes out.

The design has two parts:

* **Part-1** (`cvd_part1_fsm`) is a Mealy FSM. On the last bit of a desired
  word it drives that word's output combination: a single `1`, or a
  user-defined multi-bit code.
* **Part-2** (`cvd_part2_counter`) is a modulo-M counter that "detects every
  M-bit word". Its output pulses on the M-th bit of every frame and sends
  Part-1 back to its initial state.

Part-1 alone cannot deal with words that overlap in the stream. After a
mismatch it falls back to a default state and can lose track of where a word
begins. Part-2 fixes the framing: words arrive back to back in M-bit frames,
and every frame is examined from the initial state.

`cvd_detector` joins the two parts. `cvd_robot_top` is the application built
on it: three detectors share one serial port and drive the arm, direction and
speed controls of a robot.

## Framing and timing

```
clk        _/‾\_/‾\_/‾\_ ... _/‾\_/‾\_/‾\_
x           b1  b2  b3   ...  bM  b1' b2'     (MSB of each word first)
frame       0   0   0    ...  1   0   0
z           0   0   0    ...  code 0  0       (code only if b1..bM is a desired word)
```

* One bit is taken on every rising clock edge.
* After a synchronous, active-high reset, the next bit is bit 1 of a frame.
* `z` is combinational (Mealy). It is valid in the same cycle in which the
  last bit of the word is on `x`, so there is no added latency. Register it
  outside if a glitch-free output is needed.
* `frame` comes from Part-2's state register and is high in that same cycle.
  At the following edge Part-1 is forced to its initial state, whatever it
  was doing.
* Words that are not in the list give all-zero outputs. The next frame is
  still decoded correctly.

## How the reduced state table is derived

This part is the core of the design. It is implemented as a constant function
(`build_fsm`) inside `cvd_part1_fsm`. Take N words of M bits, each with an
output code.

1. **Prefix tree of the first M-1 bits.** There is one state per distinct
   prefix. The states form columns: column d holds the prefixes of length d.
   The initial state is the empty prefix, S0.
2. **Default states F0 and F1.** F1 is the state reached from S0 by a first
   bit `1`, or S0 itself if no word starts with `1`. F0 is the same for `0`.
   When a state has no tree edge for the input bit, the FSM moves to F0 or
   F1. This is what the FSM does after a mismatch.
3. **Last column merged into the first.** In a state of column M-1, the final
   bit of a desired word gives that word's code and returns to S0. Any other
   final bit gives 0 and moves to F0 or F1.
4. **Column-wise merging, last column first.** Two states of the same column
   are merged if they have the same next state for input 0, the same next
   state for input 1, and the same outputs for both inputs. The children have
   already been merged when their parents are compared, so identical subtrees
   collapse from the leaves upwards. States are only merged within a column,
   never across columns.

The surviving states are numbered compactly, with S0 as 0. The resulting
table of `{next state, output}` entries, indexed by `{state, x}`, becomes a
constant ROM. The state register, `$clog2(NUM_STATES)` bits wide, is the only
storage. `NUM_STATES` is a localparam of the module.

### Worked example: eight 21-bit words (the default configuration)

```
100011001000111110000   100011001010111111000
100011001000111110011   100011001010111111011
100011001000111110110   100011001010111111110
100011001000111110111   100011001010111111111
```

All words start with `1`, so F1 = S1 (after `1`) and F0 = S0. The words share
their first 10 bits and then split into two groups at bit 11. Within each
group, bits 19 to 21 are one of `000`, `011`, `110` or `111`.

* With a single output, the three column-20 states of the first group are
  identical to those of the second group.
* After those merge, the two column-19 states of each group become pairwise
  identical, and then so do the two column-18 states.
* The 37 states of the prefix tree shrink to **31**. The state that follows
  bit 18 is now shared: the first group reaches it on a `0` and the second
  group on a `1`.

`tb_cvd_part1_fsm` compares this table, on every cycle of long random
streams, with an independently written 31-state reference.

Give the same words four-bit one-hot codes instead (`cvd_pkg::EX2_CODES`:
`…000` of group 1 gives 1000, of group 2 gives 0100, `…011` gives 0010,
`…11x` gives 0001). Now the `…000` states of the two groups differ, so fewer
states merge and the table has **34** states.

## The robot controller (`cvd_robot_top`)

Each intermediate device is a complete `cvd_detector` with M = 8:

| device | outputs | commands → output |
|---|---|---|
| 1, arm | `z1_1 z2_1` | `00000001` clockwise, `00000010` anti-clockwise |
| 2, direction | `z1_2..z4_2` | `00000011` forward, `00000100` backward, `00000101` left, `00000110` right |
| 3, speed | `z1_3..z5_3` | `00000111`..`00001011` levels 1 to 5 |

* All three devices listen to `bit_stream_x` and ignore each other's
  commands.
* The top has 14 pins: `clock`, `clear`, `bit_stream_x` and 11 outputs.
* Each output is a one-clock pulse.
* The three Part-2 counters always run in lock step, and an assertion checks
  this.
* To add a device or change what a command does, edit the word and code
  tables in `cvd_pkg`. Nothing in the detector itself changes.
* After reduction the three Part-1 FSMs have 9, 11 and 12 states (4 bits
  each). The whole top holds 21 flip-flops.

## Parameters and the word-list format

`cvd_detector` and `cvd_part1_fsm` take:

| parameter | meaning | default |
|---|---|---|
| `M` | word length (frame length), ≥ 2 | 21 |
| `N` | number of desired words | 8 |
| `OW` | output width | 1 |
| `VECTORS` | `N*M` bits: word k is `VECTORS[k*M +: M]`, its MSB is sent first | `cvd_pkg::EX1_VECTORS` |
| `CODES` | `N*OW` bits: code of word k is `CODES[k*OW +: OW]`, its MSB is output z1 | all ones |

* If two listed words are equal, their codes are ORed together.
* Elaboration cost grows with N·M. The tree has at most N·(M-1)+1 states,
  and the merge step compares every pair of states within a column.
* `cvd_part2_counter` takes only `M`.

## Files

| file | contents |
|---|---|
| `rtl/cvd_pkg.sv` | word lists and codes of the three configurations |
| `rtl/cvd_part1_fsm.sv` | Part-1: table construction and FSM |
| `rtl/cvd_part2_counter.sv` | Part-2: modulo-M frame counter |
| `rtl/cvd_detector.sv` | Part-1 + Part-2 |
| `rtl/cvd_robot_top.sv` | three-device robot controller (top) |
| `tb/tb_cvd_part1_fsm.sv` | Part-1 against the 31-state reference table |
| `tb/tb_cvd_part2_counter.sv` | frame pulses, reset in mid frame (M = 21 and 8) |
| `tb/tb_cvd_detector.sv` | single-output and 4-bit-code configurations, random frames and near misses |
| `tb/tb_cvd_robot_top.sv` | full-size top: all eleven commands, unknown commands, clear in mid command |
| `tb/tb_cvd_state_counts.sv` | reduced state counts of all five word lists (31, 34, 9, 11, 12) |
| `tb/tb_cvd_workload_4bit.sv` | all 560 three-word and 1820 four-word sets of 4-bit words |

Every testbench checks itself. It prints `TB_RESULT checks=<n> failures=<n>`,
stops on a watchdog, and counts a failure for any mechanism it never
exercised. To simulate one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/cvd_pkg.sv tb/tb_cvd_robot_top.sv --top-module tb_cvd_robot_top -o sim
./obj_dir/sim
```

Lint any module with `verilator --lint-only -Wall -y rtl +libext+.sv
rtl/cvd_pkg.sv rtl/<module>.sv`.

On this Verilator, `tb_cvd_workload_4bit` takes about two minutes to build
(2380 detector instances) and runs in well under a second. The others build
in seconds.

## What was verified

* Part-1 matches the hand-written 31-state reference table on about 9,500
  cycles.
* The detector was run on 600 random frames in both 21-bit configurations.
* The robot top was run on 2,000 random commands at its default size.
* Every set of three and of four 4-bit words was checked against all 16
  frames plus random ones.
* The state counts checked by hand are 31, and several of the 4-bit sets.
  Across all 4-bit sets, Part-1 needs 5 to 8 states for three words and 4 to
  9 states for four words.
* The flip-flop count is Part-1 plus the 2-bit counter. It is 5 for every
  three-word set and 4 to 6 for four-word sets.

## Choices of this implementation, and limits

* **Resets are synchronous and active high.** The external reset drives
  Part-1 as well as Part-2, so Part-1 starts at S0 after power-up. In the
  original block diagram only Part-2 receives it.
* **The F0/F1 rule** (step 2 above) generalises the three starting patterns
  of the method: all words start with 1, all start with 0, or both occur.
* **Part-2 output.** The terminal state of the counter is decoded by one AND
  term. The counter uses ⌈log2 M⌉ binary-encoded flip-flops, and its bit
  input has no effect, so it is not a port.
* **State encoding** is plain binary in construction order. A power-oriented
  encoding could be applied by synthesis.
* **Words are not sorted** before the tree is built. Sorting changes only
  the state numbering.
* **Outputs are pulses.** They are not held until the next command.
* **Flip-flop count.** The FPGA build of the robot controller reported 47
  slice flip-flops. This RTL needs 21. The reference build's encoding and
  output registers are unknown, so the figures are not directly comparable.
* **State counts for the 4-bit sets** come from this construction. The
  published curves are described as approximate, and they were not matched
  set by set.
* **Not implemented.** The closed-form estimate of the number of memory
  elements is a design-time aid, not hardware. The processor that sends the
  commands and the output devices are outside the design: the testbench
  drives `bit_stream_x` directly, and the outputs are plain pins.
* **Overlapping words are not detected.** This is inherent to the method:
  every word must sit in its own M-bit frame.
