# Variable-latency ripple-carry adder with carry chain interrupt detection

A ripple-carry adder is the smallest and most regular adder there is, but its
worst-case delay grows linearly with the word length: a carry born at bit 0 may
have to travel to bit L-1. For random operands that worst case is extremely
rare. This design keeps the cheap ripple-carry adder and, instead of clocking it
for the worst case, looks at the operands to decide how many clock cycles this
particular addition needs. A 128-bit addition usually finishes in one cycle of
a clock that is about six times faster than a plain 128-bit ripple-carry adder
would allow, and takes up to 8 cycles when the operands really do produce a long
carry chain.

## The idea: where can a carry chain be cut?

A full adder passes its incoming carry on only when exactly one of its two
operand bits is 1 ("propagate"). If both are 0 the carry dies ("kill"), if both
are 1 a carry is produced regardless of the input ("generate"). Either way the
chain is interrupted at that bit.

The L-bit adder is cut into D partial adders (PAs) of Q = L/D bits each. The
carries still ripple straight through all of them; nothing about the sum
changes. Next to the top C bits of every PA except the last sits a small
**carry chain interrupt detector (CCID)**. It decides whether the carry that
leaves the PA can depend on the carry that entered it:

- if the C-bit slices of a and b add up to exactly 2^C - 1, every bit pair
  propagates, and the outgoing carry is the incoming one: `r = 0`;
- otherwise some pair in the group kills or generates, the outgoing carry is
  fixed by the group itself (0 if the partial sum is below 2^C - 1, 1 if it is
  above), and the next PA can start immediately: `r = 1`.

For random operands a group is decisive with probability 1 - 2^-C (15/16 for
C = 4). The test "sum equals 2^C - 1" is the same as "b is the bit-wise
complement of a", so the CCID is an XOR per bit and a C-input AND.

## Counting cycles: the maximum run length

The clock period is chosen to cover one C-bit group plus one PA, roughly
2(C + Q) gate delays in a unit-delay model (the carry may be generated anywhere
in the group under the CCID and then has to cross a whole PA). In one period:

- PA 0 settles, since its carry-in is the adder's own carry-in;
- every PA whose lower neighbour has `r = 1` settles, since its carry-in is
  fixed by the group below it.

A PA whose lower neighbour has `r = 0` has to wait for that neighbour. A run of
k consecutive zeros in `r[D-2:0]` therefore chains k + 1 PAs, and the whole sum
is final after **M_RL + 1** cycles, where M_RL is the longest run of zeros in
the CCID vector. M_RL ranges from 0 (all boundaries decisive, one cycle) to D-1
(all propagate, D cycles, which is the plain ripple-carry delay again).

The maximum run-length detector computes M_RL through a lookup table indexed by
the D-1 CCID bits (128 entries for D = 8). The table is filled at elaboration
from the definition of the longest zero run, so there is no data file. For
D-1 > `LUT_MAX_BITS` (12) the table would be impractically large and the same
function is built as plain logic instead. The detector also produces the
completion signal: high once the number of cycles already spent on the
addition reaches M_RL.

## Synchronous operation

`ccid_adder` wraps the datapath for use in an ordinary synchronous design:

```
 a,b,cin ─► operand regs ─► ccid_adder_core (PAs + CCIDs + run-length LUT) ─► result regs ─► sum, cout
                                 │ completion                                   ▲
                                 └──────────► cycle counter / control ──────────┘
```

- `start` with `ready` high loads `a`, `b`, `cin` into the operand registers.
- A counter (`elapsed`) counts the cycles since the load. In the cycle where the
  completion signal is high (`elapsed >= M_RL`), the result registers capture
  `sum` and `cout`, and `done` pulses in the following cycle, together with
  `latency` = M_RL + 1.
- `ready` is high when idle and also in that final cycle, so additions can be
  issued back to back: one result every M_RL + 1 cycles. `start` while `ready`
  is low is ignored.
- `rst_n` is an asynchronous active-low reset; it aborts a running addition.

Timing: an addition accepted at clock edge k has its result registered at edge
k + M_RL + 1, and `done` is high during the following cycle.

**What the RTL does and does not model.** In RTL simulation the combinational
adder has no delay, so the sum is already correct in the first cycle. The
variable latency is a timing contract for implementation: the path from the
operand registers through the adder to the result registers must be
constrained as a multicycle path of up to D periods, with the clock period set
by one CCID group plus one PA. The CCID and the lookup table must fit in a
single period, which holds while they are shallower than one PA; with much
faster PAs (carry-lookahead or tree adders) that margin, and the benefit, goes
away. The RTL schedules the cycles correctly; a gate-level timing check is
needed to confirm the contract in a given technology.

The start/ready/done handshake, back-to-back issue and reset behaviour are
choices of this implementation. The technique itself only fixes that an
addition takes between 1 and D cycles, M_RL + 1 for given operands.

## Configuration

All modules take the sizes as parameters; defaults come from `ccid_pkg`.

| parameter      | default | meaning                                               |
|----------------|---------|-------------------------------------------------------|
| `L`            | 128     | operand width                                         |
| `D`            | 8       | number of partial adders (latency 1 .. D cycles)      |
| `C`            | 4       | bits examined by each CCID (1 <= C <= L/D)            |
| `LUT_MAX_BITS` | 12      | largest D-1 for which M_RL comes from a lookup table  |

`L` must be divisible by `D`, and `D >= 2`; other configurations stop
elaboration with an error. 128/8 with C = 4 is the main configuration: seven
4-bit CCIDs on a 128-bit adder. 128/4, 256/4 and 256/8 are the other
synthesized sizes this design was evaluated at.

Choosing C is a trade-off. A larger C makes each boundary more likely to be
decisive, so fewer cycles, but adds C bits to the clock period. In the
unit-delay model the best C lies around 5 to 7 for L = 128 (see the sweep
below).

## Expected performance

`tb_ccid_workloads` measures the average cycle count on uniformly random
operands and converts it into average delay relative to a plain 128-bit
ripple-carry adder, with period (C + L/D) / L. The measured means agree with
the exact expectation of the longest-run distribution. Some results (4000
additions per point):

| D  | C | mean cycles | period (rel.) | average delay (rel.) | speedup |
|----|---|-------------|---------------|----------------------|---------|
| 2  | 6 | 1.01        | 0.547         | 0.553                | 1.8x    |
| 4  | 6 | 1.04        | 0.297         | 0.310                | 3.2x    |
| 8  | 4 | 1.39        | 0.156         | 0.217                | 4.6x    |
| 8  | 6 | 1.10        | 0.172         | 0.189                | 5.3x    |
| 16 | 7 | 1.12        | 0.117         | 0.131                | 7.6x    |
| 32 | 4 | 1.96        | 0.063         | 0.123                | 8.2x    |

The gain flattens beyond D = 8 because the period can no longer shrink below
the CCID group, and the number of boundaries that can line up into long runs
grows. The area cost is D-1 CCIDs (a few gates per bit of C) and one small
table on top of the ripple-carry adder, plus the operand and result registers
and a counter of log2(D) bits.

## Files

RTL (`rtl/`), bottom-up:

| file                         | contents                                                 |
|------------------------------|----------------------------------------------------------|
| `ccid_pkg.sv`                | default sizes L, D, C                                    |
| `full_adder.sv`              | one full-adder stage (majority carry, XOR sum)           |
| `partial_adder.sv`           | Q-bit ripple-carry partial adder, a chain of full adders |
| `ccid.sv`                    | carry chain interrupt detector over C bit pairs          |
| `max_runlength_detector.sv`  | M_RL lookup table and completion signal                  |
| `ccid_adder_core.sv`         | D partial adders, D-1 CCIDs and the detector             |
| `ccid_adder.sv`              | top: synchronous variable-latency wrapper                |

Testbenches (`tb/`), each self-checking and ending with a `TB_RESULT` line:

| testbench                        | what it checks                                                     |
|----------------------------------|--------------------------------------------------------------------|
| `tb_full_adder`                  | all 8 input combinations                                           |
| `tb_partial_adder`               | 16-bit PA against integer addition                                 |
| `tb_ccid`                        | all operand pairs for C = 4 and C = 2                              |
| `tb_max_runlength_detector`      | D = 8 exhaustively, D = 16 (table) and D = 24 (logic) randomly     |
| `tb_ccid_adder_core`             | sum, every CCID, and M_RL against a step-by-step settling model, 128/8 and 256/4 |
| `tb_ccid_adder`                  | the top at default size: results, measured cycle counts, every latency 1..8, back-to-back issue, ignored requests, reset during an addition |
| `tb_ccid_workloads`              | the D/C sweep and the 256-bit sizes (uses `ccid_workload_point.sv`) |

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ccid_pkg.sv tb/tb_ccid_adder.sv \
          --top-module tb_ccid_adder -o sim
./obj_dir/sim
```

Replace `tb_ccid_adder` by any other testbench name. The package must come
first on the command line; the other files are found through `-I`. Every
testbench finishes in well under a minute; `tb_ccid_workloads` takes longest to
build, since it elaborates over thirty adder configurations.

## Limits and departures

- Only the synchronous, clocked use is built. The same CCIDs and run-length
  information could drive a self-timed or locally clocked (GALS) environment
  through the completion signal, but no such clock generator is part of this
  RTL.
- The partial adders are ripple-carry only. Carry-lookahead partial adders are
  a possible variant, giving shorter periods for more area, but are not
  provided.
- The CCID also outputs the carry it has decided (`group_carry`), for
  observation. The sum never uses it; all carries come from the ripple chain.
- The lookup table is replaced by logic for D > 13, an implementation choice
  for very large D.
- Performance numbers above come from the unit-delay model (an n-bit ripple
  adder costs about 2n gate delays), not from a synthesized netlist.
