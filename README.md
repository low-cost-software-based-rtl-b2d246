# Software-based self-test of a gshare branch predictor

A faulty branch predictor never produces a wrong result. Every
misprediction is caught and repaired by the pipeline, so a broken
counter in the Pattern History Table (PHT) shows up only as lost
performance. Functional tests therefore pass on a defective part.

This RTL implements a gshare predictor together with the small amount of
hardware needed to test it deterministically from software. The test
program uses nothing but ordinary conditional branches. Their directions
steer the Global History Register (GHR) like a linear-feedback shift
register (LFSR), so the program controls which PHT entry every branch
reaches and which way that entry's counter moves. A fixed schedule of
traversals walks every counter through all eight transitions of its
state machine. A checker then knows, from the traversal number alone,
whether each prediction should be right or wrong. Two observers are
provided:

* **DFT checker** (`bp_fault_detector` + `border_checker`): a per-branch
  pass/fail output. In simulation it finds every single faulty counter
  transition.
* **MISR** (`misr`): compresses the predictions into a signature, which
  is compared with the fault-free one at the end. It costs less, at the
  price of a small loss of coverage.

## How a traversal works

The GHR shifts each branch outcome into bit 0. Suppose a program keeps a
software copy `X` of the GHR. At each step it executes a branch whose
direction is the feedback bit `f(X)` of an n-bit external-XOR LFSR with a
primitive polynomial. The GHR then steps through all 2^n − 1 non-zero
values and returns to 1. With the branch address held at zero, the gshare
index equals the GHR. So one such **forward (F)** traversal visits every
entry except 0 exactly once, and moves each counter one step in the
direction `f(index)`.

A **reverse (R)** traversal uses the complement `~f(X)`. This is the XNOR
form of the same LFSR, which also starts at 1 and runs through 2^n − 1
states. It visits every entry except the all-ones one, and moves each
counter the other way. Its last branch sits at entry 0 and is taken,
which brings the GHR back to 1.

## The 17-sequence schedule

Each counter is a 2-bit saturating counter: S0 is strongly not taken and
S3 is strongly taken, and the predictor predicts taken in S2 and S3. The
traversals are applied in this order:

| sequence | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 | 16 | 17 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| type | F | F | F | R | R | F | R | R | R | F | F | R | F | F | F | R | R |
| prediction = outcome? | – | – | – | no | no | no | no | yes | yes | no | no | no | no | yes | yes | no | no |

The first three F traversals saturate every counter in its own forward
direction, whatever its start state. From then on, take an entry whose
forward direction is "up". Its state runs
S3→S2→S1→S2→S1→S0→S0→S1→S2→S1→S2→S3→S3→S2→S1, which exercises all eight
transitions. For a "down" entry the walk is the mirror image. The
match/mismatch row is the same for every entry. From sequence 4 on it
has a period of six, with a match in the 5th and 6th sequence of each
period. If any transition of any entry goes to a wrong state, a later
prediction of that entry breaks the row.

Entries 0 and 2^n − 1 are each visited in only one traversal direction,
so the main schedule excludes them. A **border phase** follows the 17
sequences. By then both border entries are saturated: entry 0 has only
seen taken updates, and the all-ones entry only forward updates. Each
border entry then gets 14 single-branch "sequences" whose directions
repeat sequences 4..17 relative to the entry's saturation direction, so
the expected pattern is the same. The program reaches the all-ones entry
by branching taken until the GHR is all ones, and entry 0 by branching
not taken. The all-ones entry is tested first, because walking to it
from 1 never passes entry 0, and walking back down to 0 never passes the
all-ones entry.

## The test program (processor side)

The processor is not part of this RTL. The program it runs has two
routines, and its branch stream is modelled in `tb/sbst_prog_pkg.sv` and
`tb/tb_bpu_sbst_top.sv`:

```
FORWARD: for i in 1 .. 2^n-1 : branch(dir = f(X));  X = X<<1 | dir
REVERSE: for i in 1 .. 2^n-2 : branch(dir = ~f(X)); X = X<<1 | dir
         branch(taken)           -- closes the cycle: GHR 0 -> 1
         branch(any)             -- dummy, keeps the alternation
```

Before the test the program shifts n−1 not-taken branches and one taken
branch, so that the GHR holds 1. It then raises `test_en`.

Each routine is a loop, so its IF branches alternate with loop-closing
branches. `loop_mask` is a toggle flip-flop. While `test_en` is high it
passes the first branch, blocks the second, and so on. Blocked branches
neither index the PHT nor shift the GHR. REVERSE's dummy branch keeps
the alternation intact across routine boundaries.

## Hardware blocks

```
               br_valid/br_pc/br_taken           test_en   border_en
                        |                           |          |
                   loop_mask  <----------------------+          |
                        | bp_valid                               |
                     gshare  (ghr + gshare_pht, index = GHR ^ pc)|
                        | pht_idx, pred_taken                    |
        +---------------+------------------+                     |
 bp_fault_detector   border_checker <------+---------------------+
        |                   |              misr (enabled by 'armed')
        +----- AND ---------+ -> test_out   -> misr_signature, misr_fail
```

| module | role |
|---|---|
| `bpu_pkg` | counter type `ctr_t`, counter FSM `ctr_next`, MISR polynomials |
| `ghr` | history shift register, newest outcome in bit 0 |
| `gshare_pht` | 2^n × 2-bit counter memory (no reset), read port, update port, fault-injection hook |
| `gshare` | GHR + PHT, index = GHR xor `pc[PC_LSB +: n]` |
| `loop_mask` | blocks every other branch in test mode |
| `bp_fault_detector` | main checker (below) |
| `border_checker` | checker for entries 0 and 2^n − 1 |
| `misr` | signature register with final compare |
| `bpu_sbst_top` | everything wired together |

### Main checker (`bp_fault_detector`)

Every sequence starts with the GHR at 1, and no other branch in the
sequence sees that value. A *GHR = 1* detector therefore marks sequence
starts, and a 3-bit counter counts them. A set-up flip-flop stays clear
during sequences 1–3. When the counter reads 3 and the flip-flop is
clear, the next start sets the flip-flop and restarts the counter at 1.
After that the counter runs 1..6 and wraps. A *5 or 6* decode selects
"prediction must equal outcome". Everywhere else a mismatch is expected.
A *GHR = 0 or all ones* detector masks the border entries. A branch that
opens a sequence is already judged by the new sequence number.
`test_out` is combinational per branch and is 0 on a violation. `armed`
(the flip-flop value in effect) tells the MISR when set-up is over.

### Border checker (`border_checker`)

The border checker is enabled by `border_en`. It has three phases: ONES,
then ZERO, then DONE. In each of the first two phases it counts the
branches whose index is the entry under test, which are visits 1..14. It
expects a match on visits 5, 6, 11 and 12, which correspond to sequences
8, 9, 14 and 15, and ignores the walking branches. In the top the main
checker is idle while `border_en` is high, and `test_out` is the AND of
both checkers.

### MISR (`misr`)

The MISR is an internal-XOR signature register. Each cycle it shifts
left, folds in the polynomial when the bit shifted out is 1, and XORs
the inputs into the low bits. In the top its single input is the
prediction. It compresses only while `armed` is high, that is during
sequences 4–17. This keeps the golden signature independent of the PHT's
power-up contents. It does not see the border phase.

Choosing the polynomial matters here. Every primitive polynomial of
degree 8 has period 255, which is exactly one traversal of a 256-entry
PHT. A faulty entry usually produces the same error in every traversal,
and errors spaced by the register's period cancel. With
x^8+x^4+x^3+x^2+1 the 8-bit MISR caught only 60% of the faults at 256
entries. The 8-bit default is therefore x^8+x^7+x^2+1 = (x+1)(x^7+x+1).
Its period is 127, and 127 divides none of 2^n − 1 for n = 8..12. The
16-bit (x^16+x^15+x^13+x^4+1) and 32-bit (x^32+x^22+x^2+x+1) polynomials
are primitive. Override `POLY` for other choices.

## Interface and timing of `bpu_sbst_top`

| parameter | default | meaning |
|---|---|---|
| `IDX_W` | 12 | GHR length n; the PHT has 2^n entries (4096) |
| `PC_W` | 32 | branch address width |
| `PC_LSB` | 2 | lowest address bit used in the index |
| `MISR_W` | 8 | signature width (8, 16 or 32) |

* The processor presents one resolved branch per cycle on
  `br_valid`/`br_pc`/`br_taken`. `pred_taken` is the combinational
  prediction for it. The counter and the GHR update at the next rising
  edge. Lookup and resolution are folded into one cycle, so the history
  is non-speculative. A pipelined core would register `pht_idx` at fetch
  and return it with the outcome.
* `test_en` is high for the whole test, including the border phase.
  `border_en` is high for the border phase only. `test_out` is 0 on any
  branch that breaks the expected pattern.
* `misr_clear` loads the seed (0). `misr_check` compares the signature
  with `misr_golden`, and `misr_fail` shows the result from the next
  cycle.
* `fi_en`, `fi_idx`, `fi_state`, `fi_taken` and `fi_next` make one
  transition of one entry go to `fi_next`. They exist for fault
  experiments; tie `fi_en` low otherwise.
* Reset is asynchronous and active low. It clears the GHR, the checkers,
  the mask and the MISR. The PHT is not reset, like the SRAM it would
  be, and the test does not need it to be.

One full test at n = 12 takes 17 × 4095 predictor branches, the same
number of loop branches, and the border phase (28 visits plus the
walking branches). That is about 140 k cycles at one branch per cycle.

## Verification

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_ghr`, `tb_gshare_pht`, `tb_gshare`, `tb_loop_mask`, `tb_misr` | blocks against independent models; the MISR against GF(2) polynomial arithmetic |
| `tb_bp_fault_detector` | the 17-sequence program on a model table; randomly flipped predictions are flagged exactly where the schedule checks them |
| `tb_border_checker` | the border program; exactly the flipped visits of the entry under test are flagged |
| `tb_bpu_sbst_top` | the whole design at its default size (4096 entries) running the full program, with loop branches and the border phase. A fault-free run passes; injected faults in ordinary and border entries are caught; the MISR verdict matches a model; normal operation with non-zero addresses works. Every mechanism is counted. |
| `tb_fault_coverage` (with `fault_campaign`) | single faulty transitions (entry × 4 states × 2 outcomes × 3 wrong next states) for PHTs of 256 to 4096 entries: all of them at 256 and 512 entries (6144 and 12288 faults), 600 random ones at 1024, 2048 and 4096 |

Coverage measured by `tb_fault_coverage` (the main checker alone caught
every fault of the ordinary entries at every size):

| PHT entries | faults | main + border checker | 8-bit MISR | 16-bit MISR | 32-bit MISR |
|---|---|---|---|---|---|
| 256 | all 6144 | 100% | 99.20% | 99.53% | 99.53% |
| 512 | all 12288 | 100% | 99.47% | 99.78% | 99.78% |
| 1024 | 600 sampled | 100% | 99.50% | 100% | 100% |
| 2048 | 600 sampled | 100% | 100% | 100% | 100% |
| 4096 | 600 sampled | 100% | 99.83% | 100% | 100% |

The MISRs see only the basic traversal, not the border phase. The 16-
and 32-bit registers miss the same number of faults, so their misses are
faults that leave the predictions of the basic traversal unchanged, not
aliasing. Faults in the two border entries belong here. Their number
stays constant while the table grows, so coverage rises with the table
size. The method's own evaluation reports MISR
coverage from 99.09% (8-bit, 256 entries) to 99.93% (32-bit, 4096
entries), with the same trend. Its polynomials are not known, so the
figures are comparable in trend only. The sampled sizes carry a sampling
error of a few tenths of a percent.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/bpu_pkg.sv tb/sbst_prog_pkg.sv tb/tb_bpu_sbst_top.sv \
  --top-module tb_bpu_sbst_top -o sim && obj_dir/sim
```

The top-level run takes about 15 s; the coverage campaign about 3 minutes.

## Where this RTL goes beyond, or departs from, the method

* The checker follows the method's block list: the GHR = 1 detector, a
  3-bit counter, the *sequence 5 or 6*, *sequence 6* and *3rd sequence &
  flip-flop* decodes, the set-up flip-flop and the border mask. Its gate
  structure and counter timing are this design's own.
* The method states the purpose of the border phase, its length (14
  sequences) and that the hardware recognises the entry under test. The
  sequences themselves, their order and the `border_en` control are this
  design's reading of that.
* These are this design's choices: the MISR polynomials, seed and
  compare timing; gating the MISR to sequences 4–17; and the single-cycle
  predict/update interface and `PC_LSB`.
* Only gshare is implemented. The method also applies to the Agree and
  two-level local predictors, which differ in how the PHT is indexed.
  They are not included here.
* The test program is not provided as processor code. Its branch
  behaviour is modelled in the testbenches.
