# Self-repairing stopwatch timer: DMR detection, TMR repair with pre-placed spares

This is a small digital system that repairs itself after a fault without
stopping and without loading a new bitstream. It borrows an idea from cell
biology. Every functional block is a *mother cell*. In normal operation the
mother cell runs as a checked pair: the working cell and an identical
duplicate, compared bit by bit (DMR, double modular redundancy). When the two
disagree, the working cell's output is blocked. Two spare *daughter* cells are
already in the fabric next to it. They are switched in and take over the
count. From then on the block's output is the 2-of-3 majority of the
duplicate and the two daughters (TMR, triple modular redundancy).

Because the spares are pre-placed, a repair takes two clock cycles and never
waits for reconfiguration. The price is area: each block is built four times.
After one repair there is no spare left. A second fault in the same block is
still outvoted, but the block then reports a *crack*: it can no longer repair
itself.

The application is a stopwatch. It runs on a 10 MHz clock and has four stages,
each of which is one self-repairing block:

| stage | block | counts | ticked by |
|---|---|---|---|
| 0 | A | hundredths, 0..9 | 100 Hz prescaler tick |
| 1 | B | tenths, 0..9 | carry of stage 0 |
| 2 | C | seconds, 0..59 | carry of stage 1 |
| 3 | D | minutes, 0..59 | carry of stage 2 |

## How one block repairs itself (`mother_cell`)

```
 stage tick en ──► A (working)  ──► isolation_buffer(orig_oe) ──┐
               ──► A' (duplicate) ─────────────────────────────┐ │
   en & active ──► A1 (daughter) ──► isolation_buffer(dtr_oe)  │ │
   en & active ──► A2 (daughter) ──► isolation_buffer(dtr_oe)  │ │
                   A1, A2 load A''s value in RS_ISOLATE        │ │
                                                               ▼ ▼
   dmr_compare(A, A')   majority_voter(A', A1, A2)    output select
              └──────────────► repair_controller ──► (state picks A, A' or vote)
```

The four copies are `counter_cell` instances with the same modulus. The
`repair_controller` steps through four states:

| state | output | what happens |
|---|---|---|
| `RS_DMR` | working cell A | A is compared with A'. The compare bit (`error`) is 0 when they agree and 1 when they differ. A 1 moves the block to isolate. |
| `RS_ISOLATE` | duplicate A' | Lasts one clock. A's isolation buffer closes. The daughters' inputs are enabled and both load A''s value. If the stage ticks in that clock, they count it too. |
| `RS_TMR` | majority(A', A1, A2) | Repaired. The compare bit now says whether the three copies disagree. A disagreement moves the block to crack. |
| `RS_CRACK` | majority(A', A1, A2) | `crack` is high. The vote still masks one faulty copy. Only reset leaves this state. |

**Timing of a repair.** Say a fault appears on A's output during clock *n*.
The compare bit rises in that same clock. Because detection is registered, A
still drives the faulty value until the end of clock *n*: a fault is visible
for exactly one clock. In clock *n*+1 the duplicate drives the output and the
daughters take over. From clock *n*+2 on, the output is the vote. The stage
carry is taken from the selected output. A fault therefore has to be injected
in a clock with no tick, or it can send one wrong carry to the next stage.

**Which cell is blamed.** A DMR pair cannot tell which of its two cells is
wrong. This design always blames and isolates the working cell. A fault that
hits the duplicate first is handled wrongly: the working cell is blocked and
the daughters copy the duplicate's corrupted value. The design only protects
against faults in the working cell while in DMR, and against any single fault
among A', A1 and A2 once repaired.

**How a daughter gets the right count.** Until they are activated, the
daughters sit idle at their reset value. On activation they load the
duplicate's output. This hand-over is a choice of this implementation. The
other option would be daughters that count from reset in lock-step and only
have their outputs switched in.

**Where the fault is.** Each stage flags the cells it currently judges
faulty (`fault_cell`). In DMR a mismatch flags the working cell. In TMR each
copy that differs from the vote is flagged. `fault_locator` watches all 16
flags. When a flag rises, it records that fault's `{stage, cell}` as the
`coordinate` output and counts the event. This shows which block and which
copy failed, even after the vote has hidden the fault from the timer value.

**Fault model.** A `fault` input on each cell stands for a push button. While
it is high, the cell's output bits are inverted (`FAULT_MASK`, all ones by
default). The cell's internal count stays intact. The isolation "three-state
buffer" is gating to zero (`isolation_buffer`), since no internal tri-state
bus is used.

## Modules

| file | role |
|---|---|
| `rtl/self_repair_pkg.sv` | Shared constants (4 stages, 4 cells per stage, 6-bit counts, stage moduli, cell indices) and the `repair_state_e` enum. |
| `rtl/self_repair_timer.sv` | Top: prescaler, the four stages chained by carries, FND decoding, status outputs. |
| `rtl/mother_cell.sv` | One self-repairing stage: four `counter_cell`s, three `isolation_buffer`s, `dmr_compare`, `majority_voter`, `repair_controller` and the output select. |
| `rtl/repair_controller.sv` | The repair state machine above. |
| `rtl/counter_cell.sv` | Modulo-N counter with enable, load and an injectable output fault. |
| `rtl/dmr_compare.sv` | The compare bit: OR of the bitwise XOR. |
| `rtl/majority_voter.sv` | Bitwise 2-of-3 majority plus a "not all equal" flag. |
| `rtl/isolation_buffer.sv` | Output blocking of one cell. |
| `rtl/fault_locator.sv` | Registers the `{stage, cell}` coordinate of each newly located fault. |
| `rtl/timer_prescaler.sv` | Divides `CLK_HZ` down to a one-clock `TICK_HZ` pulse. |
| `rtl/fnd_display.sv` | Seven-segment patterns for six digits. |

### Top-level interface (`self_repair_timer`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | Main clock (10 MHz by default). |
| `rst_n` | in | 1 | Synchronous reset, active low. |
| `fault_btn` | in | [4][4] | `fault_btn[stage][cell]`. The cell index is `CELL_ORIG`=0, `CELL_COPY`=1, `CELL_DTR1`=2 or `CELL_DTR2`=3. The input must already be synchronous to `clk`; it is not debounced. |
| `tick` | out | 1 | The 100 Hz base tick. |
| `hundredths`, `tenths`, `seconds`, `minutes` | out | 6 each | Stage counts. |
| `fnd_seg` | out | [6][7] | Segment patterns in `{g,f,e,d,c,b,a}` order, active high. Digits 0..5 are hundredths, tenths, second units, second tens, minute units, minute tens. |
| `error_code` | out | 4 | The current compare bit of each stage. |
| `repaired` | out | 4 | The stage runs on its daughters. |
| `crack` | out | 4 | The stage has seen a fault with no spare left. |
| `repair_state` | out | [4] of `repair_state_e` | The state of each stage. |
| `system_crack` | out | 1 | OR of `crack`. |
| `coordinate` | out | 4 (`coord_t`) | `{stage, cell_id}` of the most recently located fault. It is valid once `located` is high. |
| `located` | out | 1 | At least one fault has been located. |
| `locate_count` | out | 8 | Number of location events, saturating at 255. |

Parameters: `CLK_HZ` (default 10,000,000) and `TICK_HZ` (default 100).
Counting reaches 59:59.99 and then wraps to zero. The last carry is not used.

## Where this departs from, or goes beyond, the original scheme

These points follow the original description:

- the four blocks and their rates (1/100 s, 1/10 s, 1 s, 1 min);
- the 10 MHz clock;
- DMR detection with a compare bit that is 0 for normal and 1 for error;
- blocking the working cell's output;
- two daughter cells per block, then TMR with majority select;
- "system crack" when a daughter fails.

These are choices of this implementation:

- the stage moduli (10, 10, 60, 60) and the 6-bit count width;
- the output-inversion fault model;
- the one-clock isolate state and the way the count is handed over;
- the crack flag being latched;
- the display layout;
- the encodings of `error_code` and `coordinate`, and the fault-location
  register.

Not built:

- **Sub-modules.** The original partitions each module further into a 2x2 set
  of sub-modules (A11, A12, A21, A22). It does not say what part of a counter
  each one holds. Repair here works per stage.
- **Stem cells rebuilt by partial reconfiguration.** The original rebuilds
  stem cells by partially reconfiguring the FPGA from an external PC. This is
  outside the logic. The pre-placed daughters are the part that works without
  it.
- **Board-specific circuits.** Push-button debouncing, FND multiplexing and
  other board-specific drive circuits are not included.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one prints `TB_RESULT checks=N failures=M` at the end and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_counter_cell` | Random enable, load and fault patterns against a count model. |
| `tb_dmr_compare`, `tb_majority_voter`, `tb_isolation_buffer` | Random and single-fault vectors against independently computed results. |
| `tb_repair_controller` | Random compare bits against a model of the state machine. It also checks the two-clock repair latency. |
| `tb_fault_locator` | Random flag patterns against a model of the coordinate, `located` and the event count. |
| `tb_timer_prescaler` | Tick period and width. |
| `tb_fnd_display` | All digit patterns. |
| `tb_mother_cell` | Working-cell fault: detected and located at once, isolated after one clock, TMR after two, count correct throughout. Then a daughter fault: masked by the vote, and `crack` rises. Carry is checked on every tick. |
| `tb_self_repair_timer` | 61 minutes of timer time with a 4-clock prescaler (about 1.5 M clocks). Every output is checked on every clock against an elapsed-time model. It faults the working cell of every stage, then a daughter of the seconds stage and the duplicate of the minutes stage. It counts each mechanism (ticks, each stage stepping, DMR detect, isolate and repair in each stage, masked TMR faults, cracks, minute wrap) and fails if one never happens. After each fault it checks the reported coordinate. |
| `tb_self_repair_timer_full` | The top at its default parameters (10 MHz, 100 Hz): 1.2 s of timer time, which is 12 M clocks. Faults are injected into stages 0 and 2. Each must be repaired two clocks after the press. |

To run one with Verilator:

```
verilator --binary --timing --assert -y rtl rtl/self_repair_pkg.sv \
    tb/tb_self_repair_timer.sv --top-module tb_self_repair_timer
./obj_dir/Vtb_self_repair_timer
```

`-y rtl` lets Verilator find each module in `rtl/<module>.sv`. The package is
named first because every module imports it.

The full-size test takes about 15 s of simulation. All the others take a few
seconds or less.
