# Pseudo-inverse of a MIMO channel matrix with two shared CORDICs

A V-BLAST style MIMO detector has to invert the channel matrix `H`
(N receive x M transmit antennas) again and again: once to find the order in
which to detect the layers and once for every nulling vector. The
square-root algorithm for MMSE-VBLAST avoids repeated inversions. It builds
two matrices by unitary transformations only:

* `P^(1/2)` (M x M), a square root of `P = (H^* H + alpha I)^-1`, and
* `Q_a` (N x M), equal to `H P^(1/2)`.

Together they are the QR decomposition of the augmented matrix
`[H; sqrt(alpha) I]`. The MMSE pseudo-inverse is then `P^(1/2) Q_a^*`.

This RTL computes `P^(1/2)` and `Q_a` for a 4 x 4 system, in 16Q8 fixed
point (1 sign bit, 7 integer bits, 8 fraction bits). Its main idea is economy
of hardware. Each unitary step needs an angle (CORDIC *vectoring*) and then
that angle applied to many vectors (CORDIC *rotation*). An earlier design
spent a third CORDIC on vectoring alone, and that CORDIC was idle most of
the time. Here two identical pipelined CORDICs do both jobs. Every sample
carries a mode bit down the pipeline, so vectoring and rotation samples can
follow each other freely. Two smaller savings follow the same idea:

* The CORDIC gain is corrected by a shift-and-add circuit, not a multiplier.
* Idle pipeline stages keep their registers unchanged, so they do not switch.

## The algorithm as the hardware runs it

The working array lives in a dual-port RAM. It has `R = 1+M+N = 9` rows and
`M+1 = 5` columns of complex 16Q8 words:

| rows        | column 0 | columns 1..M      |
|-------------|----------|-------------------|
| 0 (leader)  | 1        | `H_i P^(1/2)`     |
| 1..M        | 0        | `P^(1/2)`         |
| M+1..M+N    | `-e_i`   | `Q_a`             |

At the start, `P^(1/2) = I / sqrt(alpha)` and `Q_a = 0`. For each row
`H_i` of `H`, the control unit runs eight passes:

1. **COL0**: write column 0 as `[1; 0; -e_i]`.
2. **MAC**: compute the leader entries `sum_k H(i,k) P^(1/2)(k,j)` on the
   complex MAC (four real multipliers). Write them to row 0.
3. **PHASE (1,2)** and **PHASE (3,4)**: make the four leaders real.
   CORDIC-1 vectors the (re, im) of one leader and gets its phase. It then
   turns every other entry of that column by the same angle. CORDIC-2 does
   the same for the second column of the pair, with its own angle.
4. **GIVENS (1,2), (3,4), (1,3), (0,1)**: a parallel-Jacobi tree that
   zeroes the four real leaders into column 0.
   * Both CORDICs vector the same real leader pair, so each holds the angle.
   * Then, row by row, CORDIC-1 rotates the real parts of the two columns
     and CORDIC-2 rotates the imaginary parts.
   * Rotating real and imaginary parts by the same angle is a unitary
     operation on the complex columns.

After the last row of `H`, rows 1..M of columns 1..M hold `P^(1/2)` and
rows M+1..M+N hold `Q_a`. Column 0 is discarded. Every pass is a unitary
column operation, so `Q_a = H P^(1/2)` holds at every step. The testbench
checks that relation.

The result's `P^(1/2)` is *a* square root of `P`, not a triangular one. Each
CORDIC vectoring turns a vector onto the *nearer* half of the x axis, so a
leader with a negative real part stays negative. Both choices are valid
unitary factors. They change `P^(1/2)` and `Q_a` by the same unitary factor
on the right, so `P^(1/2) Q_a^*` does not change.

### Inside one CORDIC pass

A pass first issues one vectoring sample, which is row 0 of the two
columns. It waits for the result (14 cycles). It captures the output angle
and feeds it back as the `z` input. Then it issues the other `R-1 = 8`
rows as rotation samples, one per cycle, and writes them back in order as
they leave the pipelines. The 14-cycle pipeline is longer than the 8 read
cycles, so a pass's reads always end before its writes begin. One port pair
of the RAM therefore serves both directions. An assertion in `pinv_ctrl`
guards this.

## Blocks

| file | what it is |
|------|------------|
| `rtl/pinv_pkg.sv` | 16Q8 word and complex types, the CORDIC mode enum, the micro-cell control struct, the `atan(2^-i)` table, Q16 to 16Q8 rounding |
| `rtl/pinv_top.sv` | the pseudo-inverse module: wires the blocks below |
| `rtl/pinv_ctrl.sv` | control unit and multiplexing: pass sequencer, RAM/CORDIC/MAC data steering, result streaming |
| `rtl/cordic_pipe.sv` | 13-cell pipelined CORDIC with scale correction; instantiated twice |
| `rtl/cordic_cell.sv` | one micro-cell: shift-add step, angle update, mode carried with the data |
| `rtl/cordic_cell_ctrl.sv` | micro-cell control unit: direction from sign(x), sign(y), sign(z) and the mode |
| `rtl/scale_corr.sv` | multiplication by 155/256 as `x + x<<1 + x<<3 + x<<4 + x<<7`, then `>>> 8` |
| `rtl/cmac.sv` | complex multiply-accumulate, four multipliers, Q16 accumulators |
| `rtl/dpram.sv` | 45-word dual-port RAM, two 32-bit ports, one-cycle read |

### CORDIC conventions

Each micro-cell `i` turns `(x, y)` by `atan(2^-i)`:

* clockwise: `x' = x + (y >>> i)`, `y' = y - (x >>> i)`;
* counter-clockwise: the opposite signs.

The micro-cell control unit decides the direction:

* **Vectoring** (drive `y` to 0): turn clockwise when `x` and `y` have the
  same sign, and add the elementary angle to `z`. `z` then ends as the
  clockwise angle turned, `atan(y/x)`.
* **Rotation** (drive `z` to 0): turn clockwise while `z >= 0`, and subtract
  the elementary angle.

So a rotation sample whose `z` is the output of a vectoring sample gets the
same turn.

**Number formats inside the CORDIC:**

* Angles are 16 bits with 13 fraction bits (radians).
* `x` and `y` carry 2 extra integer bits (room for the 1.647 gain) and
  4 extra fraction bits.

**Scale correction:**

* The output goes through `scale_corr` (x 155/256), then is rounded to
  8 fraction bits and saturated to 16 bits.
* The CORDIC gain of 13 cells is `K = 1.64676`. The 8-bit constant
  `10011011b = 0.6055` cancels it only to `K * 0.6055 = 0.99706`. Every
  CORDIC pass therefore shrinks the vectors it touches by about 0.3 %.
* This loss is uniform down a column, so the relation
  `Q_a = H P^(1/2)` is not affected. `P^(1/2) P^(*/2)` does drift from
  `(H^*H + alpha I)^-1`, by about 5 % after the 24 passes of a
  4 x 4 run.
* A finer constant would remove the drift. The 8-bit pattern is kept
  because it is the design's shift-add circuit.

## Interface and timing (`pinv_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse while idle; samples `inv_sqrt_alpha` |
| `inv_sqrt_alpha` | in | 16 | `1/sqrt(alpha)` in 16Q8 |
| `busy`, `done` | out | 1 | busy from start; `done` pulses after the last output beat |
| `h_rd`, `h_row`, `h_col` | out | 1, 2, 2 | read request for `H(h_row, h_col)` |
| `h_data` | in | 32 | `{re, im}` 16Q8, valid the cycle after `h_rd` |
| `out_valid` | out | 1 | result beat |
| `out_row` | out | 3 | 0..3: row of `P^(1/2)`; 4..7: row of `Q_a` |
| `out_col` | out | 2 | first of the two columns in the beat (0 or 2) |
| `out_data` | out | 64 | `{entry(out_col), entry(out_col+1)}` |

`H` must stay readable for the whole run. The time from start to `done` is

    1 + (R-1)M/2 + N * ( ceil(R/2)+2 + M^2+3 + (M/2+M)(2L+R+3) ) + (R-1)M/2 + 1

where `L = 14` is the CORDIC latency. For M = N = 4 this is **1098
cycles**. Most of it (960 cycles) is the 24 CORDIC passes: each pass waits
twice for the 14-stage pipeline, once for its angle and once for its last
rotated row.

Parameters: `M` and `N` on `pinv_top` (defaults 4 and 4). `M` must be a
power of two, because the Givens tree pairs columns by halving. The
pipeline latency must exceed `R-1`, so that a pass's reads end before its
writes begin. The cell count `NC` of `cordic_pipe` defaults to 13.

## Where this departs from, or adds to, the reference architecture

* **MAC operands.** The block diagram this design follows draws the MAC fed
  by the CORDIC outputs. Here the MAC takes `P^(1/2)` entries from the RAM,
  because every leader needs all of `P^(1/2)`.
* **RAM organisation.** The diagram gives 64-bit paths to and from the RAM.
  Here they are two 32-bit ports, one complex word each.
* **Angle sharing.** Each CORDIC feeds back only its own angle, as in the
  diagram. For a Givens pass both therefore vector the same leader pair.
* **Serial angles.** The two angles of the first Jacobi level are found one
  after the other, not together.
* **CORDIC-2 workload.** The reference reports CORDIC-2 idling more than
  CORDIC-1. In this schedule both work the same cycles.
* **Own choices.** The angle format, guard bits, rounding points, the order
  of the tree, the control encoding, all handshakes and all timing are
  choices of this implementation.
* **Output.** The output is the two factors. The product `P^(1/2) Q_a^*`
  and the ordering and nulling stages of V-BLAST are not part of this
  module.
* **Not evaluated.** Area and power depend on a cell library and are not
  evaluated here.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_pinv_top` | full-size end-to-end test (M = N = 4, all defaults); see below |
| `tb_pinv_ctrl` | the control unit against stand-in RAM, CORDICs (delay lines) and MAC: pass order, data steering in both modes, angle feedback, write-back addresses, initial array, column 0, MAC write-back, H addressing, latency, output beats |
| `tb_cordic_pipe` | 400 mixed vectoring/rotation samples with idle gaps against real-arithmetic rotation (x/y within 4 LSB, angle within 8 LSB of 2^-13 rad), latency of exactly 14 cycles |
| `tb_cordic_cell` | one cell against the shift-add step, and the idle hold |
| `tb_cordic_cell_ctrl` | all 16 input combinations |
| `tb_scale_corr` | against `floor(x*155/256)` for 2006 inputs |
| `tb_cmac` | runs of complex products against exact integer sums |
| `tb_dpram` | random traffic on both ports against an array model |

`tb_pinv_top` runs 8 random channels, with entries uniform in [-1, 1] and
`alpha` alternating between 0.5 and 0.1. It compares every entry of `P^(1/2)` and `Q_a` with a
real-arithmetic model of the same pass sequence, which includes the 0.99706
residual gain. Observed error is at most 0.03; the limit is 0.06. It checks
`Q_a = H P^(1/2)` (observed at most 0.016; limit 0.04). It also checks the
1098-cycle latency and the counts of vectoring samples, rotation samples,
MAC results and output beats. It fails if phase passes, Givens passes,
vectoring with negative `x`, rotation, or idle-hold of a CORDIC never
happened.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -y rtl rtl/pinv_pkg.sv \
        tb/tb_pinv_top.sv --top-module tb_pinv_top
    ./obj_dir/Vtb_pinv_top

The full-size run takes well under a second.
