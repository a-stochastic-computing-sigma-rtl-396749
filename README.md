# SCSD: a sigma-delta adder for stochastic-computing neural networks

In stochastic computing (SC) a number is a stream of bits: a value x in
[-1, 1] is carried by a stream whose fraction of ones is p = (1 + x) / 2
("bipolar" format). Multiplying two independent bipolar streams takes one
XNOR gate. Adding many of them is the hard part: two-input multiplexer adders
halve the result at every level of an adder tree, and parallel counters give
a binary result that the next single-bit stage cannot consume.

The stochastic computing sigma-delta (SCSD) adder counts the product bits of
one cycle in ordinary binary, then hands that multi-bit count to a
first-order digital sigma-delta modulator. The modulator outputs one bit per
cycle. Over a sequence, the bipolar average of that bit follows the sum of the
products. The output is again a plain SC stream, clipped to [-1, 1] by the
modulator's saturating register. Any single-bit state machine can therefore
follow it. Here the next stage is a clipped-ReLU activation, and the result is
a complete SC neuron.

This repository holds synthesizable SystemVerilog for the adder, the neuron
and a one-hidden-layer perceptron (multi-layer perceptron, MLP) built from
them. The MLP is sized by default for MNIST: 784 inputs, 100 hidden neurons
and 10 outputs, with 1024-cycle sequences.

## Data path of one neuron

```
 X_j ─┐XNOR U_j                                    ┌──────── first-order DSDM ────────┐
 W_j ─┘──────► popcount Y ─► V = 2Y - k ─► (+) ─► T_n ─► MSB ─► Z_n ─► stoch_max ─► G_n
  (j = 1..k)    c bits        c' = c+1 bits  ▲ │                 │        ▲
                                             │ └─ m-bit register ┘        │ reference
                                             └── -(+1 / -1) ◄── D ◄───────┘ p = 0.5
```

* **Products.** U_j = XNOR(X_j, W_j). Bit j is 1 with probability
  (1 + x_j w_j) / 2.
* **Binary sum.** Y = sum of the U_j, in c = floor(log2 k) + 1 bits (10 for
  k = 784). No random source is used after the inputs: the addition itself is
  exact.
* **Range conversion.** V = 2Y - k, a left shift and a subtraction. It maps
  [0, k] to [-k, k] in c' = c + 1 signed bits. Its mean is the bipolar sum
  s = sum of x_j w_j.
* **Modulator** (`dsdm`). An unsigned m-bit register T holds the running error.
  Each cycle:

      T_n = max(0, min(T_{n-1} + V_n - F_{n-1}, 2^m - 1))
      Z_n = MSB(T_n)
      F_{n-1} = +1 if Z_{n-1} = 1, else -1   (the previous output, from a D flip-flop)

  The threshold of the MSB quantizer sits at mid-scale, 2^(m-1), which is
  also the reset value. Summed over N cycles this gives
  `sum(2 Z_n - 1) = sum(V_n) - (T_N - T_0)`, so the bipolar output average
  equals s up to (T_N - T_0) / N. If s lies outside [-1, 1], T runs into a
  rail and stays there, and the output saturates at +1 or -1. T_n is the
  combinational adder output, so Z_n depends on the bits of the same cycle.
  The register and the flip-flop store T_n and Z_n at the clock edge.
* **Register width.** m >= c' + 1. The default is the minimum: 12 bits for
  784 inputs, 6 bits for the 8-plus-bias neuron in its testbench.

### The activation: stochastic MAX (`stoch_max`)

The clipped ReLU min(max(0, s), 1) is computed as MAX(Z, R), where R is a
stream carrying bipolar 0 (probability 0.5, from an LFSR). An MP-bit (default
4) saturating counter counts the ones of R that Z has not matched: it counts
up on R=1, Z=0 and down on Z=1, R=0. A flip-flop holds J = (counter > 0). The
output is

    G_n = R_n OR (Z_n AND NOT J_{n-1})

Every one of R passes to the output. A one of Z that R lacks passes only if no
earlier excess of R is waiting to cancel it. The output rate therefore tracks
max(p_Z, p_R), which is the clipped ReLU in bipolar terms. This counting
direction is the one that gives a maximum. Counting the other way gives the
minimum.

Expect a small upward bias near 0. When both streams are close to 0.5, the
4-bit counter is often empty, and some ones of Z pass uncancelled. The
hidden-neuron average of about +0.16 for strongly negative sums in the
full-size test below comes from this effect.

## The perceptron (`scsd_mlp`)

* **Input layer.** Each of the 784 input values and each weight is a B-bit
  binary number. A comparator turns it into a stream: the bit is 1 when the
  shared random value R is below the number (`sng_bank`). The random values
  come from Sobol low-discrepancy generators (`sobol_gen`), one per group:
  dimension 1 for all inputs, dimension 2 for all hidden-layer weights and
  dimension 3 for all output-layer weights. Over one period of N = 2^B cycles
  a Sobol sequence visits every B-bit value exactly once. A comparator fed by
  one therefore emits exactly `value` ones.
* **Hidden layer.** There are N_HID `scsd_neuron` instances without bias,
  each over all 784 input streams. One LFSR (`lfsr_sng`, 16-bit, seeded at
  start) provides the p = 0.5 reference stream for every neuron's MAX.
* **Output layer** (`out_mac`). For each class, the N_HID products
  XNOR(G_i, W_i) are counted every cycle and added into an accumulator.
  After N cycles it holds S, and `2 S / N - N_HID` estimates the sum of
  g_i w_i. The predicted class is the one with the largest S. The softmax of
  training is not needed to rank the classes, and the argmax is left to the
  user.

### Interface and timing

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start` | in | one-cycle pulse; accepted when idle or while `done` is high |
| `x_in[N_IN]` | in | B-bit input values; bipolar value 2*x/2^B - 1 |
| `w_hid[N_HID][N_IN]`, `w_out[N_OUT][N_HID]` | in | B-bit weights, same encoding |
| `lfsr_seed` | in | seed of the reference LFSR (vary it between runs) |
| `busy`, `done` | out | inference in progress; one-cycle result strobe |
| `score[N_OUT]` | out | ACC_W-bit accumulated counts, held until the next start |

Inputs must stay stable from `start` until `done`. The clock edge that samples
`start` moves the controller into a clear cycle. On the next edge, every
generator and state register is re-initialised: Sobol generators to 0, the
modulators to mid-scale, the MAX counters to 0, accumulators to 0, and the
LFSR to its seed. Then N streaming cycles follow, and `done` is high for
exactly one cycle, N + 1 edges after the edge that sampled `start`. Raising
`start` during `done` runs the next inference back to back, which gives one
result every N + 2 cycles.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `N_IN`, `N_HID`, `N_OUT` | 784, 100, 10 | network shape (the 784-200-10 network is `N_HID = 200`) |
| `B` | 10 | SNG width; sequence length N = 2^B (8 and 9 give 256 and 512) |
| `M_BITS` | 12 | modulator register m, default c' + 1 |
| `MP` | 4 | MAX counter width m' |
| `LFSR_W` | 16 | reference LFSR width (16 is the only polynomial provided) |
| `ACC_W` | B + ceil(log2(N_HID+1)) = 17 | output accumulator width |

## What was chosen here rather than given

The adder, the modulator equations and saturation, the MSB quantizer, the
neuron structure, the MAX circuit and its output equation, the XNOR/popcount
output unit, the sharing of Sobol generators between inputs and between
weights, and the network sizes all follow the published architecture. The
following are this implementation's own:

* **The Sobol generator.** It uses the Gray-code construction with the
  direction numbers of dimensions 1 to 3. A third generator serves the
  output-layer weights.
* **The reference LFSR.** Its polynomial is x^16+x^14+x^13+x^11+1, and one
  LFSR is shared by all hidden neurons.
* **The output accumulator is b + b' bits wide, not b bits.** A b-bit
  register (N = 2^b) would overflow after N cycles of counts up to N_HID.
* **The modulator starts at mid-scale.** Any starting state is allowed. The
  MAX counter starts at 0.
* **Which input of the MAX gets the reference.** The adder output goes to the
  MAX's first input and the p = 0.5 reference to its second.
* **The bias stream** (neuron only, `USE_BIAS`, unused in the MLP) enters the
  adder as one more term with weight +1.
* **The controller, the reset scheme, and weights as port arrays.** There is
  no weight memory.

## Accuracy to expect

The RTL matches the testbenches' cycle-accurate references bit for bit. How
well that arithmetic approximates the real-valued network is a separate
question. `tb_scsd_mlp_full` measures it for one full-size inference with
random data: uniform inputs in [-1, 1] and hidden weights in [-0.06, 0.06].

* The adders' output averages correlate at 0.98 with the exact 784-term sums.
* The average is compressed and shifted toward the middle. For example,
  an exact sum of -1.29 comes out as -0.23, and +1.02 comes out as +0.72.
* The mean absolute error of the hidden outputs, after the ReLU, is about
  0.3.
* `tb_scsd_mlp_784_200` runs the same kind of data through 784-200-10 with
  N = 256. There the correlation is 0.93 and the hidden-output error is about
  0.6.

The reason is the generator sharing. All 784 input streams come from one
Sobol value and all weights from another, so the product bits of a cycle move
together. The per-cycle sum V then swings by hundreds, while the feedback
corrects only 1 per cycle. The residual (T_N - T_0) / N stays large even
though the register never saturates. Independent or decorrelated sources per
input would change this, but they cost generators. This behaviour with
real MNIST weights, and the classification accuracy that results, has not been
measured here.

## Not included

* **Deeper networks.** The architecture allows any number of hidden layers
  of SCSD neurons. Only the single-hidden-layer network is built, because the
  evaluated MNIST networks have one. A second layer would take its input
  streams directly from the first layer's G outputs, with no comparators.
* **Weight storage and the final class decision.** Neither is built.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog.

| testbench | what it checks |
|---|---|
| `tb_sobol_gen` | dimensions 1–3 against the Gray-code definition, permutation per period, hold, restart |
| `tb_sng_bank` | R < B on random values; exactly B ones per Sobol period |
| `tb_lfsr_sng` | reference LFSR, period 65535, 32767 ones, seed load, zero seed |
| `tb_dsdm` | the k = 3, M = 8 transition list state by state; both rails; output rate |
| `tb_scsd_adder` | cycle-exact model (k = 4); averages within 0.05 of the sum; clipping at ±1 |
| `tb_stoch_max` | output equation per cycle; rate ≈ max(p1, p2); clipped ReLU; cancel and full-scale events |
| `tb_scsd_neuron` | adder and activation per cycle with bias; clipped ReLU of positive, negative and >1 sums |
| `tb_out_mac` | accumulated counts with idle cycles; full scale L·N; clear |
| `tb_scsd_mlp` | 16-6-3 network, N = 64: three inferences bit-exact against a reference, latency, back-to-back start; requires modulator saturation at both rails, MAX cancelling and full scale, a clipped neuron |
| `tb_scsd_mlp_full` | one 784-100-10, N = 1024 inference at default parameters, bit-exact, latency, accuracy report above |
| `tb_scsd_mlp_784_200` | the same for the wider 784-200-10 network at the shortest sequence length, N = 256 |

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -yrtl rtl/scsd_pkg.sv tb/tb_scsd_mlp_full.sv \
          --top-module tb_scsd_mlp_full -Mdir obj_full
./obj_full/Vtb_scsd_mlp_full
```

The full-size test compiles in under a minute and simulates one inference in
about 5 s. Elaborating the full-size `scsd_mlp` takes minutes in other
front ends. The design holds about 80,000 comparators and 100 popcounts of 784
bits, all unrolled.

## Files

`rtl/scsd_pkg.sv` holds the shared functions, which compute the popcount
width and the Sobol direction numbers, and the controller state type. There is
one module per file: `sobol_gen`, `sng_bank`, `lfsr_sng`, `dsdm`,
`scsd_adder`, `stoch_max`, `scsd_neuron`, `out_mac` and the top level
`scsd_mlp`.
