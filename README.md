# Partitioned fault-tolerant arithmetic arrays

Triple modular redundancy (TMR) makes an arithmetic unit tolerate any fault
in one copy: three copies compute the result and a majority voter picks it.
The price is three times the hardware. This RTL follows a cheaper route,
described in "A Partitioning Approach to Design Fault-Tolerant Arithmetic
Arrays". Cut the arithmetic array into **m** equal parts. Triplicate only
**one** part. Feed the three copies with the m parts of the work one after
another, in m steps, and vote at every step. An n-bit operation then needs three
n/m-bit copies plus some multiplexers, registers and voters, instead of
three n-bit units. It still masks any error confined to one copy. It takes m
short steps instead of one long one, and each step is about 1/m of the full
array's delay.

Three units are provided, all built on this scheme:

| unit | module | operation |
|---|---|---|
| adder | `ft_adder` | N-bit + N-bit + carry-in, sub-adders ripple-carry or 4-bit lookahead |
| multiplier | `ft_csm` | N x N unsigned, carry-save (Pezaris) array |
| divider | `ft_nrd` | (2N-1)-bit / N-bit, nonrestoring array |

`ft_arith_top` places the three side by side with a shared clock and reset.
The defaults are N = 32 and M = 4. Cost estimates for the scheme put the
best area-time product (AT²) at m = 4 for the 32-bit adder and multiplier.
For the divider the cost keeps falling as m grows, up to m = n. `M = 1` gives
plain TMR of each unit, useful as a reference.

## Common structure and timing

Every unit has the same skeleton:

* **Step sequencer** (`step_ctrl`). `start` sampled at a clock edge begins an
  operation. Steps 0 .. M-1 then run in the next M cycles, with `busy` high.
  The result is valid during the last of them, flagged by `done`. The latency
  is therefore exactly M cycles. A new `start` may be raised in the `done`
  cycle, so operations can run back to back.
* **M-to-1 operand multiplexers**, one set per replica, pick the part of the
  operands that belongs to the current step. The operands themselves are not
  registered. They are read during the M step cycles, so they may change
  just after the start edge but must then hold until the `done` cycle ends. An assertion in each unit
  checks this.
* **Three replicas** of one partition.
* **2-to-1 multiplexers** choose, in step 0, the initial value of whatever is
  carried from step to step. In later steps they choose the registered value.
* **Majority voters** (`tmr_voter`, bitwise 2-of-3) where results leave the
  replicas. **Result registers** hold the voted pieces of steps 0 .. M-2. The
  last piece goes straight from the voter to the output.

The original scheme speaks of latches and counts time in gate delays. Here,
every storage element is an edge-triggered register with an asynchronous
active-low reset, and one step takes one clock cycle. The clock period must
cover one partition plus multiplexers and voter, about 1/M of the full
array's delay.

### Fault emulation

Each unit has a `flip` input, one XOR mask per replica, applied to that
replica's outputs before the voters. It also reaches the replica's own
step-to-step state. Tie it to zero in normal use. Set one replica's mask to
model a faulty module. Any mask confined to a single replica must leave the
results unchanged. This is the scheme's fault model: one faulty module among
three.

## Adder (`ft_adder`)

R = N/M. In step k, all three R-bit sub-adders add operand bits
k·R .. k·R+R-1, starting with the least significant slice. The voter is
R+1 bits wide, because it votes the sum and the carry-out. The carry-out can
be wrong too, so it is voted before being stored. The voted carry is
registered and becomes the carry-in of the next step through the 2-to-1
multiplexer. In step 0 that multiplexer passes the external `cin`. Slices
0 .. M-2 are registered. The top slice and `cout` come straight from the
voter in the last step.

The sub-adders (`sub_adder`) may use any internal structure. The only
requirement is that the carry goes in at the bottom and out at the top.
`KIND = ADD_RCA` builds a ripple chain of full adders. `KIND = ADD_CLA`
builds a ripple chain of 4-bit carry-lookahead blocks (`cla4`). R must then
be a multiple of 4.

## Multiplier (`ft_csm`) — the tricky one

**The array.** The unsigned carry-save array has one row of N-1 full
adders for each multiplier bit y_j. The adder in column i of row j adds three
inputs:

* the partial product x_i·y_j;
* the sum from column i+1 of the row above;
* the carry from column i of the row above.

The column-0 sum of row j is product bit P_j. The leftmost sum input of row j
is simply x_{N-1}·y_{j-1}, so no adder is needed there.

**Why N carry-save rows, not N-1.** The classic array folds y_0 and y_1 into
its first row. Here an extra first row takes zeros in place of the sums and
carries from above. That makes N rows, which divide evenly into M groups when
M divides N. A final ripple-carry row of N-1 full adders turns the last
row's sums and carries into P_N .. P_{2N-1}.

**What crosses a step boundary.** Each replica (`csm_slice`) holds R = N/M
carry-save rows plus the ripple row. Step k runs rows k·R .. k·R+R-1. At the
end of a step the last row leaves 2N-3 values: N-1 carries and the N-2 sums
of columns 1 .. N-2. (The column-0 sum is a finished product bit.) The
replica stores these values in **its own** registers, and they are **not
voted**. This keeps the voter off the per-step path, so a multiplication pays
for only one voter delay. An error in one replica stays in that replica's
state and is outvoted later.

In the next step, the first row also needs x_{N-1}·y_{kR-1}. The multiplexer
provides it straight from the operands. Each replica forms all N² AND-gate
partial products and multiplexes the R rows it needs. That gate count matches
the published area estimate.

**Where voting happens.** Each step's R low product bits pass an R-bit voter.
Those of steps 0 .. M-2 are registered. In the last step, the N high bits
from the ripple row pass an N-bit voter. Placing the low-bit voters this way
is this implementation's own choice. The published description of the
multiplier's voters is incomplete. Its area formula counts N voter bits and
its delay formula counts a single voter. The choice mirrors the divider,
whose voting is fully specified: per-step voting of the bits that leave the
array, and end-of-operation voting of the wide result. The implementation
has N + N/M voter bits.

## Divider (`ft_nrd`)

**The array.** N rows of N controlled add/subtract cells (`cas_cell`: the
divisor bit XOR the row control, then a full adder). A row with control 1
subtracts the divisor: the row's carry-in is 1 and the divisor is inverted.
A row with control 0 adds it. Each row's carry-out is that row's quotient
bit and becomes the next row's control. A row that leaves a negative
partial remainder therefore makes the next row add the divisor back. The
operand of each row is built from the previous row's result:

* its top bit is dropped;
* the rest is shifted up one place;
* the next dividend bit enters at the bottom.

The first row subtracts. Its operand is the top N bits of the dividend.

**Partitioning.** Each replica (`nrd_slice`) has R = N/M rows. Each replica
keeps an N-bit register inside itself, unvoted. It holds the N-1 remainder
bits passed on and the last quotient bit, which is the next control. Each
step's R quotient bits pass an R-bit voter into registers. The last step's
quotient bits and N-bit remainder are voted directly.

**Number format.** Vector bit i has weight 2^i, so `w[2N-2]` is the most
significant dividend bit. The divisor's top bit must be 0. The dividend must
be below d·2^(N-1), otherwise the quotient does not fit. Then:

* `quo` = w / d (its top bit is always 0);
* `rem`, read as an N-bit two's-complement number, is either w mod d or
  (w mod d) − d.

Add d to a negative `rem` to get the true remainder. As in the classic
nonrestoring array, that correction is outside the array. The first step
produces the most significant quotient bits.

## Files

| file | content |
|---|---|
| `rtl/ftarith_pkg.sv` | `add_kind_e`, `NREP` = 3, `maj3` |
| `rtl/full_adder.sv`, `rtl/cla4.sv`, `rtl/cas_cell.sv` | cells |
| `rtl/sub_adder.sv` | W-bit ripple or CLA-chain adder |
| `rtl/tmr_voter.sv` | W-bit majority voter |
| `rtl/step_ctrl.sv` | step sequencer and handshake |
| `rtl/csm_slice.sv`, `rtl/ft_csm.sv` | multiplier partition and unit |
| `rtl/nrd_slice.sv`, `rtl/ft_nrd.sv` | divider partition and unit |
| `rtl/ft_adder.sv` | adder unit |
| `rtl/ft_arith_top.sv` | the three units side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per unit and partition module |
| `tb/tb_wl_*.sv`, `tb/wl_*_runner.sv` | size and partition-count sweeps |

## Verification

Every testbench compares against integer arithmetic. Each one ends by
printing `TB_RESULT checks=<n> failures=<n>`.

* `tb_cla4` is exhaustive. `tb_sub_adder` is random, with both sub-adder
  kinds.
* `tb_tmr_voter` checks masking of a corrupted word and per-bit majority.
* `tb_csm_slice` and `tb_nrd_slice` build a 6-bit array two ways: as one
  slice, and as two chained 3-row slices. The 6-bit multiplier is checked
  exhaustively. The divider is checked for all divisors with random
  dividends.
* `tb_ft_adder`, `tb_ft_csm` and `tb_ft_nrd` run 32-bit instances with
  M = 4, 8 and 1 side by side (the adder test also runs a lookahead
  instance). Each result is checked, along with a latency of exactly M
  cycles. One replica in two thirds of the operations has random output bits
  flipped.
* `tb_ft_arith_top` is the end-to-end test at the default parameters. It
  issues 300 back-to-back operations to each of the three units
  concurrently. It counts the mechanisms it exercised and fails if any count
  is zero:
  * a voted carry passed between adder slices;
  * a masked error in each replica of each unit;
  * back-to-back starts;
  * all three units busy at once;
  * a divider step that begins by adding back;
  * a negative final remainder.

* `tb_wl_adder`, `tb_wl_mul16_32`, `tb_wl_mul64` and `tb_wl_div` sweep the
  sizes of the cost evaluation, using the generic drivers `tb/wl_*_runner.sv`:
  * adder: 16, 32 and 64 bits with M = 2 to 16, ripple sub-adders
    throughout, and lookahead sub-adders wherever a slice has at least
    4 bits;
  * multiplier: 16, 32 and 64 bits with M up to N/2;
  * divider: 16, 32 and 64 bits with M up to N.

  Each sweep has 40 checked operations per configuration, with faults.

To simulate with Verilator (5.x), from the directory holding `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl rtl/ftarith_pkg.sv tb/tb_ft_arith_top.sv \
          -y rtl --top-module tb_ft_arith_top -Mdir obj && ./obj/Vtb_ft_arith_top
```

Swap in another testbench name to run the others. They all finish in well
under a second.

## Departures and open points

* **Registers, not latches; one step per clock cycle.** The original scheme
  counts time in gate delays and does not define a clock, handshake or
  reset.
* **Multiplier voting is this implementation's reading** (see above). So is
  its realisation of the 1-to-2 demultiplexer in front of the ripple row:
  the ripple row always computes, and its result is used in the last step
  only.
* **Divider remainder is uncorrected.** The final remainder is not corrected
  and no divide-overflow flag is produced.
* **The `flip` fault-emulation ports are an addition** for test. They cost
  one XOR per replica output bit. Remove them for a production build.
* **The step sequencer and the few shared registers are single points of
  failure.** The step counter, the adder's carry register and 2-to-1
  multiplexer, and the voted result registers exist once, not three times.
  The original scheme counts the carry register and multiplexer once as
  well, and it does not discuss the control. Protecting them takes a
  voted or triplicated version.
* **The unprotected baselines are not built.** The only baseline provided is
  TMR, through `M = 1`. The cited alternatives (NMR, spares, self-purging
  redundancy, other multiplier and divider arrays) are not implemented.
* **`cla4` has one five-input AND.** Its carry-out uses a five-input AND
  term, one more than the four-input limit the lookahead adders are meant to
  keep to.
