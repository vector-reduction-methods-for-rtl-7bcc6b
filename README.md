# Vector reduction on a single arithmetic pipeline

A vector reduction turns a vector into one scalar: a sum, a maximum, a
minimum, a chain product, a mean value (a sum divided by N at the output),
or (with a multiplier in front) an inner product.
Written as a loop, `Z[i] = f(X[i], Z[i-1])`, every step needs the result of
the step before, so a K-segment pipeline running it directly would sit idle
K-1 cycles out of K. The usual pipelined fix, recursive halving, needs two
half-vector buffers and copies every operand between memories.

This processor instead closes a feedback loop around one K-segment pipeline
and uses the K operations in flight as K independent partial results:

1. **Input.** Elements stream in, one per cycle. The first K enter the empty
   pipeline. Each later element is combined with the value that leaves the
   pipeline in the same cycle, the partial result begun K elements earlier.
   After N cycles the pipeline holds K partial groups. Group i holds elements
   i, i+K, i+2K, ...
2. **Merge.** The K groups are merged in pairs as they come out of the loop.
   A one-word latch holds the first group of a pair until its partner comes
   out. This repeats until one group is left. Two schedules are provided:
   *symmetric* (SR) and *asymmetric* (AR).
3. **Drain.** The final group travels to the end of the pipeline (K cycles)
   and is output.

No memory for intermediate vectors is needed. A reduction takes
`N + Tm + K` cycles, where Tm (the merge time) depends only on K, and on N
when N < K. Recursive halving needs about `3N + K log2 N` cycles.

Several vectors can share the pipeline by interleaving their elements. Each
vector then occupies every M-th slot of the loop. A programmable delay line
(the *dummy segment buffer*) lengthens the loop to a multiple of M, and the
latch becomes a FIFO with one slot per vector.

## Datapath

```
             +--------------------- feedback B(t) ----------------------+
             |                 |                                         |
             |            +---------+  e (push)                          |
             |            |  FIFO   |  c0 (pop)                          |
             |            |  latch  |                                    |
             |            +---------+                                    |
   C --->[ MUX c1 ]     [ MUX c0 ]<--- X[i] (x_a, or x_a*x_b)            |
             |  a          |  b                                          |
          +----------------------+                                       |
          |  segment 1   f(a,b)  |                                       |
          |  segment 2           |                                       |
          |   ...                |       +-------------------------+     |
          |  segment K           |------>| dummy segment buffer, D |-----+
          +----------------------+       +-------------------------+
                     |
                     +--> z_data (final results, tagged)
```

* `c1` selects the left operand: the constant C (0) or the feedback B(t) (1).
* `c0` selects the right operand: the element X[i] (0) or the latched group
  (1). When no element is being supplied, C takes the place of X[i].
* `e` writes B(t) into the latch/FIFO.

C is the identity of the operator: 0 for sum, the most negative word for
max, the most positive for min, 1 for product. A pair that includes C
therefore passes its other operand through unchanged, and `(C, C)` gives a
harmless empty slot.

The control words used are:

| (c1,c0,e) | operands        | use                                            |
|-----------|-----------------|------------------------------------------------|
| 0 0 0     | (C, X) or (C,C) | fill the loop; idle slot while merging          |
| 1 0 0     | (B(t), X)       | add an element to its group                    |
| 0 0 1     | (C, C), latch   | a group leaves and waits in the latch          |
| 1 1 0     | (B(t), latch)   | merge the leaving group with the waiting one   |
| 0 1 0     | (C, latch)      | put a waiting group back unchanged (SR only)   |

## The two merge schedules

Both schedules see the loop as a ring of Q slots. Q = K for a single vector.
Each step, the slot at the end of the ring leaves, is handled, and whatever
is issued enters slot 1. A group is *productive*; an empty slot is not.

### Asymmetric reduction (AR)

The controller keeps one bit per slot: S1..SQ for the ring, and S0 for the
latch. A set bit means that place holds a productive group. Each step:

```
c1 = c0 = S0 & SQ          e = ~S0 & SQ
S0' = S0 ^ SQ              S1' = S0 & SQ          Si' = S(i-1), 2 <= i <= Q
```

A group leaving the ring is latched when the latch is empty. It is merged
when the latch is full. The latch and slot 1 are never productive at the
same time (an assertion checks this). Merging ends when S1 is the only bit
set. No step waits for a pattern, so an iteration over an odd number of
groups is shorter than Q.

### Symmetric reduction (SR)

SR keeps the groups evenly spaced, so only counters are needed, not a state
bit per slot. Before iteration i, the n groups sit 2^(i-1) slots apart,
starting at slot 1. The group from the first partition is always in slot 1.
Number the groups r = 0, 1, ... from slot 1 upwards. They leave the ring from
the highest r down:

* **n even.** Pairs are (r = 2m+1, 2m). The upper group of each pair leaves
  first and is latched. The lower one is merged with it. Each merged group
  ends the pass at its lower member's position. The iteration takes Q steps.
* **n odd.** Pairs are (2m+2, 2m+1). The group at slot 1 (r = 0) has no
  partner. It is latched when it leaves and put back with `(C, latch)`
  2^(i-1) steps later. Waiting those extra steps shifts the whole pattern, so
  the groups are again evenly spaced from slot 1. The iteration takes
  Q + 2^(i-1) steps.

After each iteration n becomes ceil(n/2) and the spacing doubles. For K = 10
the groups merge as (1,2)(3,4)(5,6)(7,8)(9,10), then (3,5)(7,9) with 1
alone, then (5,9) with 1 alone, then (1,9).

### Merge time

For one vector with N >= K, the measured merge times are:

| K  | 2 | 3 | 4 | 5  | 6  | 7  | 8  | 9  | 10 | 11 | 12 | 13 | 14 | 15 | 16 |
|----|---|---|---|----|----|----|----|----|----|----|----|----|----|----|----|
| SR | 2 | 7 | 8 | 18 | 20 | 22 | 24 | 43 | 46 | 49 | 52 | 55 | 58 | 61 | 64 |
| AR | 2 | 5 | 8 | 12 | 16 | 20 | 24 | 29 | 34 | 39 | 44 | 49 | 54 | 59 | 64 |

In closed form, with L = ceil(log2 K):

* SR: `Tm = K*L + 2^L - K`
* AR: `Tm = K*L - 2^L + K`

When N < K, only N groups exist. Replace K by N in the formula, then add
`(K-N)*ceil(log2 N)`. The two methods are equal when K is a power of two.

## Several vectors at once

M vectors of N elements are supplied interleaved:
X[1,1], X[2,1], ..., X[M,1], X[1,2], and so on. The loop length is made a
multiple of M, so that each vector keeps its own slots:

* **M < K.** Each vector gets Q = ceil(K/M) slots. The dummy segment buffer
  is set to D = Q*M - K. Each vector builds min(N, Q) groups, which are
  merged by the same SR or AR controller running on a ring of Q slots. Each
  control word is held for M consecutive cycles, once per vector, so the
  latch becomes a FIFO. The FIFO is K-1 deep, enough for M <= K-1 waiting
  groups.
* **M >= K.** Each vector gets one slot and D = M - K. No merging is needed.
  With M = K, the pipeline is busy every cycle except while filling and
  draining.

The operation takes `M*N + M*Tm + K` cycles. Tm is the merge time for
min(N,Q) groups on a Q-slot ring, from the formulas above. Results leave in
vector order, one per cycle.

## Interface (`vr_processor`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start` | in | start an operation. Sampled only while `busy` is low |
| `cfg_n` | in | elements per vector N, at least 1 (`NW` = 16 bits) |
| `cfg_m` | in | number of vectors M, 1..`MMAX` (= 2K) |
| `cfg_op` | in | `OP_SUM`, `OP_MAX`, `OP_MIN`, `OP_PROD` (`vr_pkg`) |
| `cfg_meth` | in | `METH_SR` or `METH_AR` |
| `cfg_ip` | in | inner-product mode: reduce `x_a*x_b` instead of `x_a` |
| `cfg_mean` | in | mean-value mode: with `OP_SUM`, each result is divided by N (rounded toward zero) |
| `x_ready`, `x_vec`, `x_elem` | out | in this cycle, the memory must put element `x_elem` of vector `x_vec` (both from 0) on `x_a`/`x_b` |
| `x_a`, `x_b` | in | element data (signed, `W` = 32 bits) |
| `z_valid`, `z_vec`, `z_data` | out | one final scalar per cycle, in vector order |
| `busy`, `done` | out | operation in progress; one-cycle pulse after the last result |

Rules for using the interface:

* `cfg_op` and `cfg_ip` are used live and must stay steady while `busy` is
  high. The other `cfg_*` inputs are registered at `start`.
* The element source must answer in the same cycle and cannot stall.
* Products keep the low `W` bits.

Timing is counted from the first cycle with `x_ready` high to the cycle with
the last `z_valid`: `M*N + M*Tm + K` cycles. For one vector, that is
`N + Tm + K`.

## Modules

| file | what it is |
|------|-----------|
| `rtl/vr_pkg.sv` | operator and method enums, the `(c1,c0,e)` control struct, identity constants |
| `rtl/vr_processor.sv` | the top: wires the blocks below into the loop |
| `rtl/vr_seg_pipe.sv` | K-segment pipeline for f, with a one-bit tag marking final results |
| `rtl/vr_operand_mux.sv` | the two operand multiplexers and the constant C |
| `rtl/vr_fifo_latch.sv` | latch/FIFO, depth K-1, first-word fall-through |
| `rtl/vr_dummy_buf.sv` | dummy segment buffer: shift register with a run-time tap D (0..DMAX) |
| `rtl/vr_seq.sv` | sequencer: loop sizing (Q, D), input/fill/partition, merge stepping, drain, result count |
| `rtl/vr_sr_ctrl.sv` | symmetric-reduction merge controller (counters) |
| `rtl/vr_ar_ctrl.sv` | asymmetric-reduction merge controller (state bits S0..SQ) |
| `rtl/vr_ip_mult.sv` | signed multiplier for the inner product |
| `rtl/vr_mean_div.sv` | signed divider on the result path for the mean value |

Parameters of `vr_processor`:

* `K` = 6: pipeline segments. Any K >= 2 works.
* `W` = 32: word width.
* `NW` = 16: width of the vector length.
* `MMAX` = 2K: most vectors per operation.
* `DMAX` = MMAX - K: longest dummy segment buffer.

## Simulation

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vr_pkg.sv \
    tb/tb_vr_processor.sv --top-module tb_vr_processor -o sim
./obj_dir/sim
```

* `tb_vr_processor` tests the whole processor at default parameters. It
  sweeps N (1 to 1000), M (1 to 12), both methods, all operators, the
  inner-product mode and the mean value. It checks every scalar against a sequential reduction
  and every operation's cycle count against the formula above. It also fails
  if any mechanism is never exercised: fill, partition, latch, merge,
  pass-back, dummy segments, two or more groups in the FIFO, or the no-merge
  path.
* `tb_vr_table4` builds processors with K = 2..16 and reproduces the merge
  time table above from real reductions.
* `tb_vr_sr_ctrl` and `tb_vr_ar_ctrl` check the two controllers against a
  model of the ring that rejects any control word that would lose or corrupt
  a group. They cover K = 2..16 and every N <= K.
* The remaining testbenches check one block each.

## Own choices and limits

These points are design choices, not part of the method itself:

* **How f is split into segments.** f is computed in full in segment 1.
  Segments 2..K only delay the result. The schedules depend only on the
  latency (K) and the rate (one pair per cycle). Any K-stage arithmetic unit
  with the same behaviour can replace `vr_seg_pipe`.
* **Multi-vector timing.** The design holds each merge step for M cycles,
  one per vector. This gives `M*N + M*Tm + K`. A formula with Q in place of
  M (`M*N + Q*Tm + K`) would not match this schedule.
* **M > K.** Results leave straight from segment K, so the operation takes
  `M*N + K` cycles rather than `M*(N+1)`.
* **Limits.** Up to 2K vectors (`MMAX`) and up to 65535 elements per vector
  (`NW`). Larger vector sets must be split into blocks by the caller.
* **Arithmetic units.** The inner-product multiplier and the mean-value
  divider are plain combinational units. Neither is pipelined.
* **Not included.** The recursive-halving baseline, with its A and B
  buffers, is not part of this RTL. Nor is overlapping the drain of one
  operation with the input of the next: a new `start` is taken only when
  the processor is idle. Interleaving several vectors in one operation is
  the intended way to keep the pipeline busy.
* **Result tagging.** Final results are identified by a tag bit that travels
  through the pipeline.
* **No back-pressure.** The memory must supply one element per cycle without
  stalling.
