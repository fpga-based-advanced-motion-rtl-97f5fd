# Column-combination NOILC engine

A machine that repeats the same motion over and over (a pick-and-place axis
stepping through the same trajectory) makes nearly the same position error
every time. Iterative learning control uses that: after each pass it computes a
feedforward signal for the next pass from the error it has just seen. The
norm-optimal variant (NOILC) updates the feedforward of pass j+1 as

    u_ff,j+1 = L * e_j + Q * u_ff,j

where e_j and u_ff,j are the N samples of error and feedforward of pass
(iteration) j, and L and Q are N x N filter matrices computed offline from a
model of the closed loop and three weighting matrices.

Done the obvious way, this is two full matrix-vector products: buffer all N
error samples, then compute all N outputs at once with 2*N*N multipliers. For
N = 325 that is 211,250 multipliers, far beyond any affordable FPGA. This RTL
implements the alternative: **column combination**, which needs exactly two
multipliers for any N.

## The idea: consume each sample as it arrives

Sample i of the error only ever meets column i of L, and u_ff,j[i] only column
i of Q:

    u_ff,j+1 = sum over i of ( e_j[i] * L(:,i) + u_ff,j[i] * Q(:,i) )

So nothing has to wait for the end of the iteration. When sample i arrives, it
is multiplied with the N elements of column i, one per clock, by one
multiplier; the same happens for u_ff,j[i] and column i of Q on a second
multiplier. The two products of each row are added at once (so the L and Q
halves share all later hardware), the N row sums are gathered into a vector,
and that vector is added into a running vector. After the N-th sample of the
iteration the running vector is u_ff,j+1. It is then held for the whole next
iteration and played out one element per sample; the played-out value is both
the engine's output and the u_ff,j[i] that the Q multiplier uses next time.

The price is clock rate: the multipliers run N times faster than the sample
rate. At N = 325 and a 16 kHz sample rate the engine needs a clock of at least
330 x 16 kHz = 5.3 MHz, which any FPGA can provide. Storage is the two
matrices, which are read strictly in order and therefore live in block RAM,
plus four N-word register banks.

## Dataflow

```
 e_in ──► upsampler ──► fx_mult ◄── coef_ram (L, column order)
                           │
                           ▼
                         fx_add ──► deserializer ──► column_accumulator ──► output_hold
                           ▲         (N scalars      (running sum, cleared   (holds u_ff,j+1
                           │          → 1 vector)     at column 0)            for an iteration)
 ┌─► upsampler ──────► fx_mult ◄── coef_ram (Q, column order)                    │
 │                                                                               ▼
 └──────────────────────────────── uff_out ◄──────────────────────────────── serializer
```

`noilc_sequencer` drives the rate change: every sample strobe starts a burst of
N reads from both RAMs at addresses `col*N .. col*N+N-1`.

| Module | Role |
|---|---|
| `noilc_top` | Wires the blocks; brings out the sample stream, coefficient write port and status. |
| `noilc_sequencer` | Sample index, iteration counter, column-order RAM addresses, `busy`. |
| `upsampler` (x2) | Holds e_j[i] and u_ff,j[i] for the N clocks of their column. |
| `coef_ram` (x2) | L and Q, N*N words each, element (row k, column i) at address i*N + k. |
| `fx_mult` (x2) | e_j[i]*L[k,i] and u_ff,j[i]*Q[k,i]; the only multipliers in the design. |
| `fx_add` | C[k] = A[k] + B[k], the two products of row k. |
| `deserializer` | N-1 shift registers plus N output registers with a common enable: turns the N row sums of a column into one vector. |
| `column_accumulator` | N adders and an N-word register; a switch feeds zero instead of the stored sum at the first column of every iteration. |
| `output_hold` | Switch plus register that takes the finished sum after the N-th column and otherwise keeps its own value. |
| `serializer` | Copies the held vector once per iteration (down-sampling) and shifts out one element per sample. |
| `noilc_pkg` | Default sizes, pipeline latency, minimum sample period. |

## Timing of one sample

A strobe `sample_en` at clock s (with `e_in` valid in that clock) sets off:

| Clock | What happens |
|---|---|
| s | `e_in` taken into its upsampler; serializer puts u_ff,j[i] out; sample index advances |
| s+1 | `uff_out` = u_ff,j[i], `uff_valid` pulses; u_ff,j[i] taken into its upsampler; first RAM read |
| s+1 .. s+N | N reads, rows 0..N-1 of column i |
| s+3 .. s+N+2 | products; s+4 .. s+N+3 row sums |
| s+N+4 | the column vector leaves the deserializer and is added into the running sum |
| s+N+5 | after the last column of an iteration: u_ff,j+1 latched, `uff_vec_valid` pulses |

`busy` is high from s+1 to s+N+4. The next strobe may come at s+N+5 at the
earliest (`noilc_pkg::min_sample_period(N)`); a strobe while `busy` is high is
illegal and caught by an assertion. Any longer sample period is fine, which is
the normal case: at 100 MHz and 16 kHz a sample period is 6,250 clocks and the
engine is idle most of it.

### Iterations

The sample index (`sample_idx`) counts 0..N-1 and wraps; each wrap is one
iteration and increments `iteration`. In the first iteration the held vector is
zero, so `uff_out` is zero throughout. The vector computed during iteration j
is latched a few clocks after the last strobe of iteration j and is played out
during iteration j+1, sample i of it in the clock after strobe i. There is no
separate start or clear: the accumulator discards its old contents by itself
at the first column of each iteration, so the engine runs indefinitely once the
matrices are loaded. Reset (`rst`, synchronous, active high) returns it to
sample 0 of iteration 0 with a zero feedforward vector.

## Number format and arithmetic

All words (e, u_ff, L, Q and every intermediate result) are 24-bit two's
complement with 12 fraction bits: range -2048 .. +2047.99976, resolution
1/4096. Each product is the full 48-bit product shifted right by 12
(rounding toward minus infinity) and clamped to 24 bits; the product adder and
the N accumulator adders clamp as well. Nothing is accumulated at higher
precision than the 24-bit format, so the result of a long column sum can differ
by a few LSBs from an exact computation; the testbenches model this rounding
exactly.

## Loading the matrices

`coef_we_l` / `coef_we_q` write `coef_wdata` at `coef_addr` into the L or Q
RAM. Element (row k, column i) goes to address `i*N + k`. Load both matrices
before the first strobe; the RAMs have separate write and read ports, but the
engine reads every address once per iteration, so a write during operation
takes effect in the next iteration that reads that address.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 325 | samples per iteration (order of L and Q) |
| `BW` | 24 | word width |
| `FRAC` | 12 | fraction bits |

`PIPE_LAT` (4) and the iteration counter width `ITER_W` (16) are in
`noilc_pkg`. N must be at least 2.

Storage at the defaults: 2 x 105,625 x 24 = 5.07 Mbit of coefficient RAM and
about (5N - 2) x 24 = 38,952 flip-flops in the register banks. The
flip-flops grow linearly with N, the RAM quadratically, the multiplier count
not at all. Note that 5.07 Mbit is slightly more than the block RAM of a small
Zynq-7020-class device (about 4.9 Mbit), so at N = 325 with 24-bit
coefficients that device needs part of the matrices in distributed RAM, a
narrower coefficient word, or a larger device.

## Where this RTL makes its own choices

The block structure, dataflow and number format follow the original
column-combination design. These points are choices made here:

- **Sample timing.** The original runs the multiplier clock at exactly N times
  the sample rate. Here the sample period is set by an external strobe and may
  be any length of at least N + 5 clocks.
- **Rounding and overflow.** Products round toward minus infinity; every
  result saturates. The original does not fix either.
- **Reset and coefficient port.** A synchronous reset and a plain write port
  per RAM; how the matrices reach the RAMs is otherwise open.
- **Down-sampling** is merged into the serializer: the held vector is copied
  once per iteration, at the first sample.
- **Pipeline registers** after the RAM read, the multipliers, the adder and
  the deserializer, giving the latency above.

Not included: the feedback controller and the plant, which run elsewhere (on a
processor, or are the machine itself); the processor-to-FPGA bus interface; and
the fully parallel "classical" implementation that column combination is
measured against.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog:

| Testbench | What it shows |
|---|---|
| `tb_fx_mult`, `tb_fx_add` | random and corner operands against 64-bit reference arithmetic, saturation both ways, one-clock latency |
| `tb_upsampler`, `tb_coef_ram`, `tb_output_hold`, `tb_serializer` | hold/load behaviour, column-order storage, read latency, once-per-iteration copy |
| `tb_deserializer` | vector order, enable exactly after the N-th input, gaps in the input |
| `tb_column_accumulator` | running sums across three iterations, zero-switch at column 0, `last` flag, saturation |
| `tb_noilc_sequencer` | N reads per strobe at column-order addresses, `busy` length, index and iteration wrap |
| `tb_noilc_top` | N = 6, four iterations, every output sample and held vector against a bit-exact reference; latencies N+4 and N+5; counts that each mechanism happened (preload, zero first iteration, accumulator clear, vector update, Q feedback, saturation, waiting on `busy`, minimum-period strobes) |
| `tb_noilc_full` | the same at the default size (N = 325), three iterations |
| `tb_noilc_sweep` | the engine built at twelve sizes from N = 2 to N = 128 side by side, each computing the single product L*e (Q = 0) for two iterations against the reference |
| `tb_noilc_learning` | closed loop at N = 325 for 20 iterations: L and Q computed in the testbench from an assumed closed-loop impulse response with weights W_e = I, W_f = 0.01 I, W_df = 0; the error norm falls from 19.1 to about 1.3 after two iterations and stays there (the floor is set by the 1/4096 resolution), and every output sample matches the bit-exact reference |

Run any of them with Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noilc_pkg.sv \
    tb/tb_noilc_full.sv --top-module tb_noilc_full -Mdir obj_full -o sim
obj_full/sim
```

The full-size test runs in a few seconds; the learning run in under half a
minute, most of it spent computing L and Q in the testbench.

What has not been checked: timing closure and resource use on a real device,
and behaviour with the real L, Q and plant of a specific machine (the learning
testbench uses a stand-in model).
