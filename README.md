# IMM tracking co-processor: floating-point model-probability loop on an FPGA

A radar tracking a target that can turn or accelerate at any moment cannot
rely on one motion model. The interacting multiple model (IMM) filter runs
several Kalman filters side by side. Here there are two: a constant-velocity
(CV, 6 states) filter and a constant-acceleration (CA, 9 states) filter. Each
frame, the IMM filter blends their outputs, weighted by how probable each
model currently is. In the system this RTL belongs to, a DSP receives the
radar measurements (range, azimuth, elevation) and an FPGA does the
floating-point filtering. The two talk over the DSP's external memory
interface (EMIF), and the FPGA raises an interrupt when a frame's result is
ready.

The main idea of the FPGA side is to cut every equation into small
**pipelined IEEE-754 single-precision units** joined by a one-word-per-clock
valid handshake (`clk_enable_*`). One word moves per clock. Each unit's
latency is fixed: multiply 5, add 7, square root 16. Delay registers re-align
operands that take different paths. The two models share the hardware and
are processed one after the other. Their results are fed back to the next
frame through FIFOs.

This repository implements the following parts of the co-processor:

- the floating-point units;
- the complete model-probability loop: prediction, likelihood, normalisation;
- the mixed state estimation, which gives each model's filter its start state;
- the one-step state prediction of both models;
- the measurement residual and its covariance;
- the inverse and determinant of that covariance;
- the state interaction output, which produces the combined estimate;
- the DSP memory interface, with a result buffer and an interrupt;
- the loop FIFOs and the initial/loop selectors.

The two model-conditioned Kalman filters and the spherical-to-Cartesian
measurement conversion are not part of this RTL. Their signals are ports of
the top module `imm_fpga_top` (see "What is outside").

## Floating-point units (`fp_pkg`, `fp_mul`, `fp_addsub`, `fp_div`, `fp_sqrt`, `fp_exp`, `fp_delay`)

`fp_pkg` holds the 32-bit word type `fp32_t`, a few constants, and
combinational functions for each operation. Each pipelined unit computes its
function in one combinational stage and then passes the result through
`fp_delay`. `fp_delay` is a shift register of `LAT` stages that carries data
and a valid bit. Latency is therefore only a parameter:

| unit        | latency (clocks) | origin of the number |
|-------------|------------------|----------------------|
| `fp_mul`    | 5                | original design      |
| `fp_addsub` | 7                | original design      |
| `fp_sqrt`   | 16               | original design      |
| `fp_div`    | 6                | this design's choice |
| `fp_exp`    | 17               | this design's choice |

How numbers are handled:

- Rounding is to nearest, with ties away from zero.
- Subnormals are flushed to zero.
- Overflow saturates to infinity.
- NaNs are never produced.

`fp_exp` works in three steps:

1. It takes k = round(x·log2 e).
2. It reduces the argument to r = x − k·ln 2.
3. It evaluates a degree-7 polynomial in r and adds k to the exponent.

For |x| above about 88.7, `fp_exp` saturates to infinity or zero.

A single combinational stage followed by a delay is not how a fast FPGA unit
would be built. It keeps the cycle behaviour exact, though, and a unit with
internal pipeline registers can replace it without changing anything around
it. Expect a long critical path if you synthesise these units as they are.

## Model-probability loop (the core of this RTL)

For r = 2 models with transition matrix P (P_ij = probability of switching
from model i to model j), the loop runs these steps every frame:

```
predict   c_j      = sum_i P_ij u_i                       (mp_predict, pmp)
          mu_(i|j) = P_ij u_i / c_j                        (mp_predict, mixw)
likelihood
  step 1  msme_j   = exp(-1/2 v_j' S_j^-1 v_j)            (mp_update1)
  step 2  L_j      = msme_j / sqrt((2 pi)^3 det S_j)      (mp_update2)
update    u_j      = L_j c_j / sum_k L_k c_k               (mp_update3)
```

Here v_j is model j's 3-element measurement residual, and S_j is its
residual covariance. `residual` computes v_j and S_j. `mat_inv3` computes
S_j^-1 (9 words, row-major) and det S_j. Each step is its own module. The handshake is the same everywhere: a
word is accepted on each clock its enable is high.

**`mp_predict`.**

- P is written once, as P11 P12 P21 P22, and is held.
- Each frame, two words of u start the module.
- Two multipliers form P_1j·u_1 and P_2j·u_2 for j = 1, then for j = 2 on the
  next clock.
- One adder sums each pair. The two predicted probabilities leave on `pmp`
  13 clocks after the last u.
- The products and sums are held and fed to one divider. The four mixing
  weights leave on `mixw` in the order (1|1), (2|1), (1|2), (2|2).

**`mp_update1`**, the hardest part to follow. The quadratic form v'S⁻¹v is
computed in two passes through one "dot product of three" datapath:

- Three multipliers run in parallel.
- One adder sums the first two products.
- A 7-cycle delay line holds the third product.
- A second adder adds the third product to that sum.

A row takes 5 + 7 + 7 = 19 clocks. The two passes are:

1. Pass 1 issues the three rows of S⁻¹ against v on consecutive clocks. This
   yields w = S⁻¹v.
2. Pass 2 issues w against v. This yields the scalar q.

Halving and negating q needs no arithmetic unit: the sign bit is flipped and
the exponent decremented. The 17-cycle exponential then gives msme. The
latency is 59 clocks from the last input word. The module accepts the next
model's inputs only after msme has left.

**`mp_update2`.**

- One multiplier forms (2π)³·det S.
- A 16-cycle square root follows the multiplier.
- msme waits in 5- and 16-cycle delay lines so that it meets the root at the
  divider.
- The latency is 27 clocks.

msme and det S each have a two-entry queue. The second model's determinant
may therefore arrive while the first model is still waiting for its msme.

**`mp_update3`.**

- Collects both likelihoods and both predicted probabilities.
- Two multipliers form L_j·c_j, and an adder sums them.
- Delay lines hold the products.
- One divider produces u_1, then u_2 on the next clock, 19 clocks after the
  last input.

Each u_j is sent to the state interaction output and also to the
model-probability FIFO for the next frame.

## State interaction output (`oex`)

The combined estimate is x = u_1·x_CV + u_2·x_CA, taken element by element
over 9 states. The CV state has zeros in the acceleration positions.

- The module stores 15 updated-state words: 6 of CV, then 9 of CA.
- It also stores the two model probabilities.
- It issues the 9 element pairs on consecutive clocks to two multipliers and
  one adder.
- The first combined word appears 13 clocks after the last input. The other
  eight follow on consecutive clocks.

The state vector is [x y z ẋ ẏ ż ẍ ÿ z̈]. Elements 0 to 5 (positions and
velocities) exist in both models. Elements 6 to 8 (accelerations) exist only
in CA, so there they are u_2·x_CA alone.

## Mixed state estimation (`mix_state`)

At the start of a frame, each filter begins from a blend of both models'
previous states:

```
x0_j[e] = x_CV[e]·mu_(1|j) + x_CA[e]·mu_(2|j)
```

The blend is weighted by the mixing weights from `mp_predict`. The datapath
has the same shape as `oex`: two multipliers and one adder, one element per
clock.

- The module stores the 15 state words from the state selector and the 4
  mixing weights.
- It issues 6 elements for the CV filter, then 9 for the CA filter.
- The output enables `x0_valid_cv` and `x0_valid_ca` tell the two groups
  apart.
- The first word leaves 13 clocks after the last input.
- CV has no acceleration states. They count as zero when mixing into CA.

## One-step state prediction (`state_predict`)

Each filter predicts its state one radar period T ahead, X(k|k−1) = F·x0.
The default T is 10 ms. With the state order above, every row of F has the
form:

```
xp[e] = x0[e] + c1·x0[e+3] + c2·x0[e+6]
```

| model | velocity → position | acceleration → velocity | acceleration → position |
|-------|---------------------|-------------------------|-------------------------|
| CV    | c1 = T              | none                    | none                    |
| CA    | c1 = T              | c1 = T                  | c2 = T²/2               |

T²/2 is computed from the parameter `T` when the design is elaborated.

The datapath, one row per clock:

1. Two multipliers form the two products.
2. An adder sums the two products.
3. A second adder adds x0[e]. While the products are formed, x0[e] waits in a
   12-cycle delay line.

The CV vector (6 words) is issued first, then the CA vector (9 words). Each
model's first word leaves 20 clocks after that model's last input.

## Residual and residual covariance (`residual`)

The converted measurement is a Cartesian position. The measurement matrix is
therefore H = [I3 0], and the two residual equations reduce to element-wise
arithmetic:

```
v_j = z − (first 3 elements of xp_j)
S_j = (upper-left 3×3 of the predicted covariance of model j) + R
```

- The module holds z and R for the frame, and the predicted positions of both
  models.
- Per model, it waits for the model's 9-word covariance block.
- It then issues 3 subtractions and 9 additions on consecutive clocks, to one
  subtractor and one adder.
- v goes straight into `mp_update1`. S goes into `mat_inv3`, and is also
  copied to the `s_cov` port.
- The first words leave 8 clocks after the model's inputs are complete.

## Inverse and determinant of S (`mat_inv3`)

The module uses cofactors. With cyclic row and column indices,
C[i][j] = S[i+1][j+1]·S[i+2][j+2] − S[i+1][j+2]·S[i+2][j+1], which includes
the sign. The inverse is the transposed cofactor matrix divided by the
determinant. The module runs four phases, each on its own pipelined units:

| phase | what it computes | units |
|-------|------------------|-------|
| cofactors | 9 cofactors, one per clock | 2 multipliers and a subtractor |
| determinant | S[0][0]·C00 + S[0][1]·C01 + S[0][2]·C02 | 3 multipliers, 2 adders and a 7-cycle delay |
| reciprocal | 1/det | the divider |
| scaling | 9 products C[j][i]·(1/det), one per clock | one multiplier |

Timing, from the last word of S:

- det leaves after 41 clocks, on its way to `mp_update2`.
- The first inverse word leaves after 54 clocks, on its way to `mp_update1`
  and to the `sinv` port.
- The next matrix may be sent once the last inverse word is out.

A singular S is not guarded against, since a residual covariance is positive
definite.

## Frame loop: FIFOs and double selection (`loop_fifo`, `init_select`)

Three values are handed from one frame to the next: the updated states, the
updated covariances, and the model probabilities. Each goes into its own
`loop_fifo`:

| FIFO                | words per frame | depth |
|---------------------|-----------------|-------|
| states              | 15              | 16    |
| covariances         | 36 + 81 = 117   | 128   |
| model probabilities | 2               | 2     |

Each FIFO output feeds an `init_select` 2:1 selector. In the first frame, the
selector passes the initial values the DSP wrote. From then on, it passes the
FIFO contents.

The DSP chooses between the two with bit 0 of the control byte. A control
write with bit 1 set starts a frame and drains the three FIFOs:

- the states go to `state_in` and into `mix_state`;
- the covariances go to `cov_in`;
- the probabilities go into `mp_predict`.

`loop_fifo` has a one-clock read, and an assertion that flags a write while
it is full.

## DSP interface (`emif_slave`) and memory map

The DSP's strobes are asynchronous to the FPGA clock. Each is synchronised
with two flip-flops, and the slave acts on their edges.

Writes:

- Bytes are captured while CE and AWE are low.
- A byte is committed when AWE rises.
- Bytes to one address are assembled into a 32-bit word, most significant
  byte first. The DSP writes the word 43 33 18 B0 to address 0x28 as four
  byte writes.
- A byte to a different address restarts assembly.
- Addresses from 0x38 upward are byte registers, not word addresses.

Reads:

- A falling read strobe requests a byte, which appears on `d_out` on the next
  clock.
- The DSP must hold its read strobe for at least 5 FPGA clocks.
- An assertion flags read and write strobes low at the same time.

| address | dir | contents |
|---------|-----|----------|
| 0x20 | W | initial state, 15 words |
| 0x24 | W | initial covariance |
| 0x28 | W | measurement words, passed out on `meas_word` |
| 0x2C | W | initial model probabilities, 2 words |
| 0x30 | W | transition probabilities P11 P12 P21 P22 |
| 0x38 | W | control: bit 0 = use loop values, bit 1 = start frame. Any write clears the interrupt |
| 0x40 | R | result: 9 combined-state words, 36 bytes, MSB first, auto-incrementing |
| 0x44 | R | status: bit 0 = result ready |

`int_n[0]` goes low when the 9th result word is buffered. It goes high again
after the last result byte is read, or after a control write. `int_n[4:1]`
stay high.

Address 0x28 and the byte order come from the original design. The other
addresses are this design's own.

## What is outside this RTL

The top module brings these signals out as ports:

- **Towards the DSP-side measurement conversion:** `meas_word`.
- **Towards the two Kalman filters:**
  - `xp`: the predicted states, for the gain and state update;
  - `sinv`: the inverse residual covariance, for the gain;
  - `s_cov`: the residual covariance, for observation;
  - `x0`: the mixed start states, for observation;
  - `state_in`, `cov_in`: initial or loop values, for the covariance mixing;
  - `pmp`, `mixw`: predicted probabilities and mixing weights.
- **From the two Kalman filters:**
  - `upd_state` and `upd_cov`, model 1 first;
- **From the measurement conversion and covariance prediction:**
  - `zc` and `rcov`, once per frame;
  - `ppos`, the 3×3 position block of each model's predicted covariance.
    Model 2's block follows once model 1's msme is out.
- **Observation:** `oex_word`, a copy of the combined estimate.

The following blocks are not built:

- spherical-to-Cartesian conversion and its debiasing;
- mixed covariance estimation;
- one-step covariance prediction;
- gain;
- state and covariance update.

Their function is standard Kalman-filter algebra. The original design names
these blocks and gives their function, but not their internal structure. The
debiasing formulas are not given at all.

## Timing budget

The original system runs the FPGA at 25 MHz (40 ns) and reports one filter
cycle in about 23 µs, roughly 570 clocks. The radar frame is 10 ms. The
blocks built here use the following per frame:

| step | clocks |
|------|--------|
| prediction | 13 |
| mixed start states, 15 words | 13 + 14 |
| state prediction, per model | 20 + 5 or 20 + 8 |
| residual, per model | 8 + 9 |
| inverse and determinant, per model | 41 for det, 54 + 8 for the inverse |
| likelihood and normalisation, per model | 59 + 27 |
| normalisation, after both likelihoods | 19 |
| combined estimate, all 9 words | 13 + 8 |

All of these are small next to the frame time.

## Where this design departs from the original

- The original `mp_update1` is described with three multipliers and six
  adders. This version reuses one three-multiplier, two-adder datapath for
  both passes. It is slower, at 59 clocks, but smaller.
- Divider and exponential latencies (6 and 17) are this design's own choice.
- The rounding and special-value handling of the floating-point units are
  this design's own choice.
- The memory map, apart from 0x28, is this design's own, as are the control
  byte and the interrupt protocol.
- The order in which words stream between units is this design's own, as are
  the row-major S⁻¹ and the states of model 1 before model 2.
- FIFO depths are rounded up to powers of two.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  tb/tb_fp_util.sv rtl/fp_pkg.sv tb/tb_imm_fpga_top.sv --top tb_imm_fpga_top -o sim
./obj_dir/sim
```

| testbench | what it covers |
|-----------|----------------|
| `tb_fp_units` | all five arithmetic units, against real-number models, with latency checks |
| `tb_mp_predict` | pmp latency 13 |
| `tb_mp_update1` | latency 59 |
| `tb_mp_update2` | latency 27 |
| `tb_mp_update3` | latency 19 |
| `tb_mix_state` | 6 + 9 mixed words, model enables, first word 13 clocks after the last input |
| `tb_state_predict` | F_1/F_2 rows with T = 10 ms, model enables, latency 20 |
| `tb_residual` | v and S for both models in two stream orders, latency 8 |
| `tb_mat_inv3` | inverse and determinant of symmetric and general matrices, latencies 41 and 54 |
| `tb_oex` | first word 13 clocks after the last input, then consecutive words |
| `tb_loop_fifo` | the loop FIFO |
| `tb_init_select` | the selector |
| `tb_emif_slave` | the DSP interface, through the bus model `dsp_emif_bfm` |
| `tb_imm_fpga_top` | end to end, see below |

`tb_imm_fpga_top` runs the top at its default parameters with a 25 MHz
clock, and checks that every mechanism happened. It drives three frames
through the DSP bus:

- The first frame uses initial values:
  - transition matrix [0.99 0.01; 0.01 0.99];
  - probabilities [0.5 0.5];
  - a target at (10000, 6000, 4000) m.
- The next two frames use the loop values.

It checks the predicted probabilities, the mixing weights, the 45 mixed
start states, the 45 predicted states, the 54 residual-covariance words, the 54 inverse words and the 9 result
words read back byte by byte. The result words depend on the updated
probabilities. It also counts
the initial and loop selections, the FIFO drains, the interrupts raised and
cleared, and the status reads. It runs in about 10 seconds.
