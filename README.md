# Pipelined adder accumulator and frame threshold generator

This design computes the mean grey level of a video frame, 256 x 256 pixels
of 8 bits, while the frame streams in at one pixel per clock (18 MHz in the
target image-processing system). The mean serves as the threshold for later
binarisation.

The sum of 65,536 eight-bit pixels needs 24 bits. A 24-bit adder in the
accumulation loop would set the clock period. Here the running sum is cut
into six 4-bit slices instead. Each slice has its own small adder, and the
carry between two slices goes through a flip-flop. The clock period then
only has to cover one 4-bit adder, whatever the width of the sum. The cost
is a flush: a carry made by the last pixel needs five more clock steps to
reach the top slice.

Both kinds of 4-bit adder are also given in a fault-tolerant form. Each
adder unit is duplicated, and a small correction circuit picks the right
value from the two copies. The top uses these fault-tolerant adders by
default.

## The pipelined accumulator (`adder_accumulator`)

The 24-bit sum D is stored as six nibbles, D03-D00 up to D23-D20. Five
carry flip-flops, FF1 to FF5, sit between them. Each accepted word `P` goes
through this recurrence, with FF0 = 0:

```
slice 0:  {FF1, D03-D00} <= D03-D00 + P3-P0
slice 1:  {FF2, D07-D04} <= D07-D04 + P7-P4 + FF1
slice k:  {FFk+1, Dk}    <= Dk + FFk            (k = 2..5, no FF6)
```

All slices and carries update on the same clock edge, each from the values
stored at the previous edge. A carry therefore climbs one slice per
accepted word. The two lowest slices receive pixel bits and use **full
adders** (A + B + cin). The four upper slices only ever add one carry bit,
so they use **partial adders** (A + cin). A partial adder is much smaller,
and that saving grows with the width of the sum.

The stored nibbles are *not* the running sum while carries are in flight.
Their value plus the pending carries is. The sum is exact once five more
words have been accepted with no new input. The `threshold_generator` feeds
zero words for this. Example: the sum holds 7FFFFF, then 0F arrives and is
followed by zeros.

| step | P  | D03-00 | FF1 | D07-04 | FF2 | D11-08 | FF3 | D15-12 | FF4 | D19-16 | FF5 | D23-20 |
|------|----|--------|-----|--------|-----|--------|-----|--------|-----|--------|-----|--------|
| 0    | 0F | E      | 1   | F      | 0   | F      | 0   | F      | 0   | F      | 0   | 7      |
| 1    | 00 | E      | 0   | 0      | 1   | F      | 0   | F      | 0   | F      | 0   | 7      |
| 2    | 00 | E      | 0   | 0      | 0   | 0      | 1   | F      | 0   | F      | 0   | 7      |
| 3    | 00 | E      | 0   | 0      | 0   | 0      | 0   | 0      | 1   | F      | 0   | 7      |
| 4    | 00 | E      | 0   | 0      | 0   | 0      | 0   | 0      | 0   | 0      | 1   | 7      |
| 5    | 00 | E      | 0   | 0      | 0   | 0      | 0   | 0      | 0   | 0      | 0   | 8      |

The sum 80000E appears at step 5 and not before. `tb_adder_accumulator`
replays this table cycle by cycle.

The carry out of the top slice is dropped. The largest frame sum is
65,536 x 255 = FF0000 (hex), which fits in 24 bits.

Interface: `data_valid` accepts `pixel` on the rising edge of `clk`, and the
pixel must be stable during that cycle. `init` clears all nibbles and
carries synchronously, and wins over `data_valid`. `rst_n` clears them
asynchronously. `acc` is D23-D00. `carry_ff` shows FF1 to FF5, and `pending`
is high while any carry is still in flight.

## The two 4-bit adders

Both adders are carry-look-ahead adders. They are built from the units
listed below, which the fault-tolerant versions duplicate one by one.

**Full adder** (`full_adder4`), A + B + cin:
- `pg_gen4` (Gen:P&G) computes G = A AND B and P = A XOR B. P uses XOR
  rather than OR, so P and G are never both 1. P also serves as the half sum.
- `carry_gen4` (Gen:Car) computes all four carries directly from P, G and
  cin: C_i = G_i + P_i C_(i-1), written as a sum of products.
- `sum_xor4` computes S_i = P_i XOR C_(i-1).

**Partial adder** (`partial_adder4`), A + cin:
- `carryb_gen4` computes the carries of an AND chain, C_i = A_i C_(i-1). Its
  outputs are active low ("carryb"), as the nodes of the original chain are.
- Four inverters turn carryb into carries.
- `sum_xor4` computes S_i = A_i XOR C_(i-1).

All these units are combinational. The original circuits are dynamic
(precharged) CMOS gates, evaluated in the clock phase after the registers
present their data. That clocking is replaced here by ordinary
edge-triggered registers around combinational logic.

## Fault-tolerant adders

`ft_partial_adder4` and `ft_full_adder4` have the same function and ports as
the plain adders, plus a `faults` input (see below). Each of the three units
is duplicated, and each pair feeds a correction circuit. The next unit only
ever sees corrected values. So a fault stays in the copy where it occurs,
and faults in different units can be masked at the same time. The
correction circuits follow one of two strategies.

**Pick the copy that matches the known answer.** Some units have an output
that can be recomputed cheaply from inputs that are already corrected. For
those, the circuit passes a 1 only when the known answer is 1 and at least
one copy says 1:

| circuit  | function                                          | used after |
|----------|---------------------------------------------------|------------|
| `pgcor`  | Pc = (A xor B)(P1 + P2), Gc = (A B)(G1 + G2)      | Gen:P&G    |
| `invcor` | C = not(Cb_corrected)(C1 + C2)                    | inverters  |
| `xorcor` | S_i = (X_i xor C_(i-1))(S1_i + S2_i)              | XOR sets   |

The output is wrong only if both copies read 0 where 1 is right.

**Trust the likely direction.** The carry trees are too large to recompute.
Their correction relies on which way their faults most often go:

| circuit   | function                 | masks                           | does not mask          |
|-----------|--------------------------|---------------------------------|------------------------|
| `carcorb` | Cb = Cb1 AND Cb2         | carryb stuck at 1 or weak high  | a copy wrongly at 0    |
| `carcor`  | C = C1 + C2 + Gcorrect   | carry stuck at 0 or weak low    | a copy wrongly at 1    |

`carcor` also ORs in the corrected generate term, because G = 1 always means
a carry.

The correction circuits themselves are assumed to be fault free. Two copies
that fail to the same wrong value are not masked. Both testbenches check
such a double fault to show where the protection ends.

### Fault injection

Every unit copy in the fault-tolerant adders has a stuck-at mask
(`adder_pkg::stuck_t`). The mask forces an output bit to 0 (`sa0`) or to 1
(`sa1`, which wins). An adder's six masks form one `ft_faults_t`, ordered
u1/u1d, u2/u2d, u3/u3d, where d marks the duplicate. For the full adder, u1
covers G in bits [3:0] and P in bits [7:4]. The accumulator and the top take
one `ft_faults_t` per slice.

This port is for simulation. Tie it to zero (`adder_pkg::NO_FAULTS`) in use,
and synthesis then removes the masking logic. Weak ("soft") levels of a real
faulty gate cannot be expressed in two-state logic. They are modelled by the
nearest stuck-at value.

## The threshold generator (`threshold_generator`, top)

Behaviour:
- `frame_start` clears the accumulator (INIT) and the pixel counter.
- Each cycle with `pixel_valid` feeds one pixel. Cycles without it leave
  everything unchanged.
- After ROWS x COLS pixels, the controller feeds five zero words to flush
  the carries.
- It then raises `threshold_valid`, on the 5th clock edge after the edge
  that took the last pixel.
- `threshold` = `sum >> log2(ROWS*COLS)`, which is bits 23:16 for a
  256 x 256 frame. This is the mean, truncated.
- The result is held until the next `frame_start`.
- Pixels that arrive while flushing or after the frame are ignored.
- `busy` is high from `frame_start` until the result is valid.

The frame size must be a power of two, and the parameters are checked at
elaboration.

| parameter        | default | meaning                                              |
|------------------|---------|------------------------------------------------------|
| `ROWS`, `COLS`   | 256     | frame size; the product must be a power of two       |
| `ACC_W`          | 24      | sum width, a multiple of 4, at least PIX_W + log2(ROWS*COLS) |
| `PIX_W`          | 8       | pixel width, a multiple of 4                         |
| `FAULT_TOLERANT` | 1       | 1: fault-tolerant adders in every slice; 0: plain    |

An assertion in the top checks that no carry is left in the pipeline once
the result is valid.

## Where this RTL departs from the original circuit

- The original uses dynamic logic. Each register is a pair of latches, one
  loaded by a "data valid" pulse and one by a "result valid" pulse, placed
  at fixed nanosecond offsets inside the clock period. Here each such pair
  is one flip-flop on the rising edge, enabled by `data_valid`. The input
  latch for the pixel is merged into the same edge. The timing is the same
  counted in clock steps (one word per clock, 5-step flush). Sub-cycle
  delays are not modelled.
- The pixel counter, the state machine, the asynchronous reset, the
  ignoring of surplus pixels and the fault-injection ports are this design's
  own additions.
- Having the fault-tolerant adders in the accumulator by default is a
  choice. The original states that the overall circuit was made fault
  tolerant, but it only simulates the accumulator with the plain adders.
  `FAULT_TOLERANT = 0` gives that plain version.
- The camera, the A/D converter and the host system are outside this
  design. They connect to the top's pixel inputs and threshold outputs.

## Files

| file | content |
|------|---------|
| `rtl/adder_pkg.sv` | shared types: stuck-at masks, fault sets |
| `rtl/threshold_generator.sv` | top |
| `rtl/adder_accumulator.sv` | 6-slice pipelined accumulator |
| `rtl/full_adder4.sv`, `pg_gen4.sv`, `carry_gen4.sv`, `sum_xor4.sv` | full 4-bit adder and its units |
| `rtl/partial_adder4.sv`, `carryb_gen4.sv` | partial 4-bit adder and its carry chain |
| `rtl/ft_full_adder4.sv`, `pgcor.sv`, `carcor.sv` | fault-tolerant full adder and its correction circuits |
| `rtl/ft_partial_adder4.sv`, `carcorb.sv`, `invcor.sv`, `xorcor.sv` | fault-tolerant partial adder and its correction circuits |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_threshold_generator_full.sv` | two full 256 x 256 frames at default parameters |
| `tb/ft_tb_pkg.sv` | random fault sets that the correction circuits should mask |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog that counts a failure if the run hangs.
With Verilator 5, from the top folder:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/adder_pkg.sv tb/ft_tb_pkg.sv tb/tb_threshold_generator.sv \
    --top-module tb_threshold_generator
./obj_dir/Vtb_threshold_generator
```

Replace the testbench name to run another test. Each run takes well under a
second.

What the tests cover:
- The unit and correction-circuit tests are exhaustive, or nearly so, and
  compare against integer arithmetic or truth tables.
- The fault-tolerant adder tests apply every input with many random fault
  sets that the design claims to mask.
- `tb_adder_accumulator` replays the worked examples step by step, and
  checks that four FF words give 3FC after a five-word flush. It then
  runs 20,000 random words with gaps in `data_valid` and injected faults
  against a slice-level reference model. It checks the plain and the
  fault-tolerant accumulator side by side.
- `tb_threshold_generator` runs seven 128 x 64 frames through both
  versions: all FF, all 00, random, random with gaps, random with faults,
  and a frame restarted half way. For each frame it checks the sum, the
  threshold and the 5-cycle latency, and it counts that every one of these
  events happened.
- `tb_threshold_generator_full` runs two 256 x 256 frames at the default
  parameters.
