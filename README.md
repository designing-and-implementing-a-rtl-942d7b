# Self-checking shift register with a Berger code

A shift register that watches itself while it works. Next to the 4-bit data
word it keeps a 3-bit Berger check symbol: the number of ones the word is
supposed to hold. On every clock a generator counts the ones actually held,
and a two-rail checker compares that count with the stored prediction. If a
flip-flop flips or sticks so that ones are gained or lost, the two disagree
and the checker's two output rails become equal, in the same cycle the bad
word is held. No second copy of the shifter is needed: the redundancy is the
3-bit check symbol and the logic that keeps it up to date.

The trick is that the prediction is never recomputed from the data it
guards. After a load it is taken from the word just loaded. After that it
only changes when a shift throws away a bit, and then only if that bit was a
one.

## Structure

```
            Din ──┐
   RL, RR ──┬─────┼──────────────────────────────┐
            v     v                              v
        ┌────────────────┐  q (Q1..Q4)   ┌──────────────────┐
  clk ─>│ shift_register │──────┬───────>│  check_register  │<─ clk
        │      (B1)      │      │  Q4,Q1 │ (B3, holds ~RFCS)│
        └────────────────┘      v        └──────────────────┘
                         ┌────────────┐    ^         │ rfcs_n
                         │ berger_csg │────┘ ncs     │
                         │    (B2)    │─────┐        │
                         └────────────┘ ncs v        v
                                       ┌──────────────────┐
                                       │ two_rail_checker │──> f, g
                                       └──────────────────┘      error = (f == g)
```

| Module | Role |
|---|---|
| `berger_pkg` | mode enum `shift_mode_e`, `check_width(n)` = ceil(log2(n+1)) |
| `shift_register` | the N-bit data register B1 |
| `berger_csg` | combinational ones counter; its output is the new check symbol NCS |
| `check_register` | 3-bit register B3 holding the complement of the reference check symbol RFCS, and its update logic |
| `two_rail_checker` | compares NCS with ~RFCS bit pair by bit pair, reduced by a chain of `two_rail_cell`s |
| `self_checking_shifter` | the top, wiring the four together |

## The data register and its modes

Two control lines choose the operation for the next rising clock edge:

| RL | RR | Operation | Word afterwards (Q4 Q3 Q2 Q1) |
|---|---|---|---|
| 0 | 0 | reset | 0 0 0 0 |
| 0 | 1 | shift right | 0 Q4 Q3 Q2 (Q1 is lost) |
| 1 | 0 | shift left | Q3 Q2 Q1 0 (Q4 is lost) |
| 1 | 1 | serial load | Q3 Q2 Q1 Din (Q4 is lost) |

Q1 (`q[0]`) is the least significant bit and the end where serial data
enters, and Q4 (`q[N-1]`) is the most significant bit. Loading a word takes N
clocks, most significant bit first. For example, loading 1001 means driving
Din with 1, 0, 0, 1. There is no hold mode and no separate reset pin: every
clock performs one of the four operations, and reset is synchronous.

## Keeping the check symbol honest

The check register B3 stores ~RFCS, the complement of the predicted count.
On each rising edge it is updated by the same mode as the data register:

| Mode | New RFCS | Why |
|---|---|---|
| reset | 0 | the cleared word has no ones |
| load | NCS − Q4 + Din | the count of the word being pushed in |
| shift left | RFCS − Q4 | the lost MSB took a one with it if it was 1 |
| shift right | RFCS − Q1 | the lost LSB took a one with it if it was 1 |

Some points that are easy to miss:

* **Load re-seeds the prediction from the data.** On load, B3 is re-derived
  from the generator's count of the current word, plus the bit entering and
  minus the bit leaving. The prediction is therefore right in the cycle after
  the edge, with no dead cycle. It also means that errors are not checked
  across a load: whatever is in the register then becomes the reference.
* **Shifts do not look at the generator.** During shifts the prediction moves
  only by the bit that falls out. A flip-flop that goes wrong therefore makes
  NCS and RFCS disagree.
* **Storing the complement.** Decrementing RFCS is the same as incrementing
  the stored ~RFCS. The stored bits can go straight to the checker's
  complement rail.
* **Wrap-around.** The arithmetic is modulo 2^CW. Once an error has been
  flagged, later shifts may leave the count mismatched in either direction.
  The flag is only a guarantee for the cycle in which the error first
  appears. A reset or a fresh load clears it.

## The two-rail checker

Bit i of NCS and bit i of the stored ~RFCS form a pair that must be
complementary. Each `two_rail_cell` merges two pairs into one:

```
f = a0·a1 + b0·b1        g = a0·b1 + b0·a1
```

(f, g) is 01 or 10 only if both input pairs are complementary. A chain of
W−1 cells reduces the W pairs to the final (F, G).

Why the result is on two wires instead of one: a single "ok" wire stuck at
its good value would hide every error. With two rails, a line stuck at 0 or
1 shows up as 00 or 11 the next time that rail ought to toggle. `error` is
just F == G, a convenience output. A system that wants the self-checking
property should take F and G themselves.

## What is and is not detected

* Any error that changes the number of ones in the word is flagged in the
  cycle it appears. This includes any single bit flip and any set of flips
  all in the same direction (a unidirectional error), whether ones turn to
  zeros or zeros to ones.
* An error that turns as many ones into zeros as zeros into ones is not
  detected. This limit holds for any Berger code. The end-to-end testbench
  injects such swaps and checks that they pass silently.
* Faults inside the generator or the check register show up as a mismatch
  too. The design has no correction or retry: the shifter reports an error,
  and what happens next is up to the system around it.

## Interface and timing (`self_checking_shifter`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rl`, `rr` | in | 1 | mode, see the table above |
| `din` | in | 1 | serial data in |
| `q` | out | N | data word, `q[0]` = Q1 |
| `ncs` | out | CW | count of ones in `q` |
| `rfcs_n` | out | CW | stored ~RFCS |
| `f`, `g` | out | 1 | two-rail result; f ≠ g means no error |
| `error` | out | 1 | f == g |

Parameters: `N` = 4 (word width) and `CW` = `check_width(N)` = 3. Other widths
work unchanged; the unit testbenches also run the counter and checker at
other widths.

`q` and `rfcs_n` change on the rising edge. `ncs`, `f`, `g` and `error` are
combinational from them, so they settle in the same cycle. Before the first
clock in the reset mode (or N load clocks) both registers hold arbitrary
values, and `f`/`g` mean nothing.

## Where this departs from, or adds to, the design it follows

* The mode table, the 4-bit word with a 3-bit check symbol, the four-part
  structure and the keep-or-decrement rules for shifts are as specified.
* The original block diagram has two further select inputs, SEL1 and SEL2,
  on the logic in front of the 3-bit register, but never defines them. Here
  the register's next value comes only from the mode and the discarded bit,
  and those inputs do not exist.
* The original describes a load as "save the new check symbol". Here that is
  done as NCS − Q4 + Din on the same edge. Reset clearing the check register
  is also this design's choice.
* The internals of the generator (an adder chain) and of the checker (the
  textbook two-rail cell) are this design's own. Only their function is
  specified.
* Rising-edge clocking, synchronous reset, which end is the MSB, and the
  extra `error` output are this design's choices.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_shift_register` | load of 1001, shifts with zero fill, 400 random operations against an integer model |
| `tb_berger_csg` | every 4-bit and 7-bit word |
| `tb_check_register` | 300 random updates against a model; every update rule exercised |
| `tb_two_rail_checker` | all rail combinations for 1, 3 and 5 pairs |
| `tb_self_checking_shifter` | end to end at the default size; see below |

The end-to-end test does the following:

* It resets the register, loads 1001 and shifts it out, checking the word,
  NCS, ~RFCS and F ≠ G after every clock.
* It runs 600 random operations with the same checks.
* It loads 200 random words and overrides the register outputs between clock
  edges with corrupted words: single flips, 0→1 only, 1→0 only, and
  count-preserving swaps. Each time it checks that `error` rises exactly when
  the count changed.
* It counts each mechanism (reset, load, both shifts with the lost bit 0 and
  1, detected and undetected errors) and fails if any never occurred.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/berger_pkg.sv tb/tb_self_checking_shifter.sv \
  --top-module tb_self_checking_shifter -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. `berger_pkg.sv` must come first
because the other files import it.
