# Distributed LIS positioning: panel networks, Ethernet hand-off and Gaussian fusion

A large intelligent surface (LIS) is split into four panels. Each panel sees
the channel state information (CSI) of a user: 1024 INT8 features per
snapshot. A small neural network next to each panel turns its CSI into a 2-D
Gaussian estimate of the user's position: a mean and a lower-triangular scale
matrix. Two panels sit on a *sending* board. Their estimates cross an Ethernet
link to a *receiving* board, which has the other two panels. The receiving
board fuses the four Gaussians into one by conflation: it adds the inverse
covariances, and it weights the means with them.

This repository holds the SystemVerilog for that whole data path:

```
 sending board                               receiving board
 M1 ─► NN0 ─┐                                 M3 ─► NN2 ─┐
 M2 ─► NN1 ─┴► RR ─► tx_*  ══ Ethernet ══►   M4 ─► NN3 ─┴► RR ─► lrr_* ─(FIFO)─► lcv_*
                  (FIFO, DMA, software)                                          │
                                             rx_* (DMA) ────────────────────────►┤
                                                           RR-and-converter ─► prefusion ─► fusion ─► out_*
```

`lis_top` holds both boards side by side. The FIFOs, DMA engines, processor
software and the Ethernet link are vendor IP or software, so the RTL does not
contain them. Every place one of them would sit is a pair of stream ports on
`lis_top`, and the integrator (or a testbench) closes the loop.

## The panel network (`nn_accel`)

The network is 1024 → 200 → batch norm → 100 → 20 → 5. It has ReLU after the
first three dense layers and no biases. The five outputs are `[mean x,
mean y, s1, s2, s3]`, where the scale matrix is `[s1 0; s2 s3]`. The
accelerator accepts one input vector every **200 clocks** (CCY = 200). At
100 MHz that is 500 000 inferences per second, against 32 000 per second
needed for 16 users every 0.5 ms.

The layers are grouped into two large pipeline stages. Each stage needs 200
clocks, and each works on a different inference.

| Stage | Layer | Work per clock | Module |
|---|---|---|---|
| 1 | 1 (INT8) | 512 inputs × 2 neurons; one neuron pair finishes every 2 clocks | `dense_l1` |
| 1 | batch norm | one value per clock: subtract mean, divide by the stored standard deviation, scale and shift | `batch_norm` |
| 1 | 2 | one input × all 100 neurons, as soon as that input exists | `dense_l2` |
| 2 | 3 | 10 inputs × 1 neuron; one neuron every 10 clocks | `dense_l34` |
| 2 | 4 | one multiply per clock, consuming layer-3 neurons as they appear | `dense_l34` |

Three points take the most thought:

- **Overlapping consecutive layers.** Layer 1 finishes its neurons one pair at
  a time, and layer 2 is organised "one input, all outputs". So layer 2
  starts on neuron 0 of layer 1 while layer 1 is still computing neuron 2.
  Stage 1 therefore ends a few clocks after layer 1 does, not 200 clocks
  later. Layers 3 and 4 work the same way. A register between the two stages
  holds the 100 layer-2 activations.
- **Two INT8 products per multiplier** (`dual_int8_mul`).
  - The two weights are packed as `wb·2¹⁶ + wa` and multiplied by the shared
    activation.
  - The low 16 bits hold `x·wa`. The high 16 bits hold `x·wb`, less one when
    `x·wa` is negative. The module adds that borrow back.
  - This is how each of layer 1's 512 lanes serves two neurons.
- **Batch normalisation at one value per clock** (`nr_divider`).
  - The square root of the variance is a trained constant, so only a division
    is left.
  - The division is non-restoring. It is unrolled three quotient bits per
    stage over 8 stages, so a new quotient starts every clock.
  - The result has 24 bits: 16 integer bits and 8 fraction bits.

Adder trees (`adder_tree`) add layer 1's 512 products and layer 3's 10
products. They have a register every third level.

Fixed point: layer 1 uses INT8 inputs and weights. Its sums are shifted right
by `L1_SHIFT` = 6 and saturated to 16 bits. Everything after that is signed
16-bit Q8.8, so products are shifted right by 8 and saturated.

Measured timing: the first result appears 561 clocks after the first of the
128 input beats. About 433 of those clocks come after layer 1 starts; the rest
is the input buffer filling. Results then follow every 200 clocks.

## Floating point for the fusion

The fusion needs a dynamic range from about 1e-5 to 1e3 and beyond, so it
works in a small custom floating-point format (`lis_pkg::fp_t`):

- a sign bit;
- a signed 8-bit exponent;
- a 23-bit mantissa, Q1.22, with the leading one stored explicitly;
- zero is encoded as a zero mantissa.

All operations truncate; nothing rounds. Results saturate when the exponent
overflows and flush to zero when it underflows.

- `fp_add` and `fp_mul` are one-clock registered units, with
  `subordinate_valid` in and `manager_valid` out.
- `to_float` converts a Q8.8 network output exactly, since 16 bits fit in the
  mantissa.
- `fp_recip` computes a reciprocal by Newton–Raphson. A 16-entry table of
  first guesses is indexed by the top four fraction bits, then three
  iterations follow. Latency is 5 clocks.
- `mat_inv2` inverts a symmetric 2×2 matrix as adjoint × 1/det, using one
  shared multiplier and adder plus `fp_recip`. Latency is 19 clocks.
- `fp_exp` and `fp_log1p` are short polynomial programs. They run on a tiny
  engine (`fp_uop_engine`) of one adder, one multiplier and three registers,
  taking 2 clocks per step.
  - exp(x) uses a Taylor-type expansion around −1.5, in nested form. It
    has 14 steps and a latency of 29 clocks.
  - ln(1+x) uses a fifth-order expansion around 0.625. It has 18 steps and a
    latency of 37 clocks.
  - The polynomials are accurate only near their expansion points, roughly
    −3…0 for exp and 0…1.5 for ln(1+x). That is the range the network outputs
    are expected to fall in.

## Prefusion and fusion

`prefusion` turns one panel tuple into what the fusion needs:

```
l1 = ln(1 + e^s1) + 1e-5      l3 = ln(1 + e^s3) + 1e-5        (softplus)
Σ  = L·Lᵀ,  L = [l1 0; s2 l3]  →  [l1², l1·s2; l1·s2, s2² + l3²]
output  Σ⁻¹ (three entries) and the mean, unchanged
```

It is a four-register pipeline (init, exp, log, inverse) with three stages of
`STAGE` = 40 clocks each; 40 clocks is what the logarithm needs. It accepts
one tuple per 40 clocks (`in_ready` is high one clock in 40). The result comes
out 3·STAGE + 2 = 122 clocks after the tuple was accepted.

`fusion` adds `P` = 4 panels, one at a time, using a shared adder and
multiplier:

```
S = Σ Σᵢ⁻¹      v = Σ Σᵢ⁻¹·μᵢ      Σ_f = S⁻¹      μ_f = Σ_f · v
```

Folding one panel into the sums takes 11 operations, about 23 clocks. After
the last panel, a separate finishing unit inverts S with `mat_inv2` and
multiplies by v, so the next estimate can start accumulating meanwhile. The
fused result appears 56 clocks after the last panel. One estimate of four
panels takes 160 clocks of prefusion time.

## Streams between the blocks

| Stream | Width | Format |
|---|---|---|
| CSI memory → network (`csi_*` → `nn_*`) | 64 bits | 8 INT8 features per beat, feature 0 in the low byte; 128 beats per vector; TLAST on beat 128 |
| Round-robin router out (`tx_*`, `lrr_*`) | 32 bits | 3 words per panel tuple: `{v1,v0}`, `{v3,v2}`, `{panel id, v4}`; TLAST on the third word |
| Converter in (`lcv_*`, `rx_*`) | 32 bits | same as the router output |

The router, `rr_packer`, keeps one holding register per network. It serves the
full registers in turn, so a waiting network is served next. The networks
cannot be stalled, so if a network delivers a new tuple while its previous one
is still waiting, the new tuple is dropped. The sticky `rr_overflow` flag
records this. Keep the downstream FIFO deep enough that this never happens.

The converter, `rr_converter`, has one slot per panel. It fills a slot from
whichever stream carries that panel's id. When all four slots are full, it
converts the panels one at a time and hands them to the prefusion in order
0…3. A stream whose next tuple is for a slot that is still occupied is
stalled. This is why the receiving board needs a FIFO between its router and
the converter. Remote tuples arrive later than local ones, by the link
latency, and the local tuples must wait somewhere. In the system test, a
700-clock link needs about 22 words of FIFO.

`csi_source` (one per panel, M1…M4) stands in for the CSI front end. It holds
16 vectors and sends all of them every `PERIOD` = 250 000 clocks (2.5 ms)
while `enable` is high. It counts the bursts it starts (`bursts`). The sticky
flag `late` records a burst that could not finish within its period.

## Loading parameters

Trained parameters go through `p_we`/`p_nn`/`p_sel`/`p_addr`/`p_data`. `p_nn`
picks the network. `p_sel` picks the memory, and the address layout depends
on it:

| `p_sel` | Memory | Address | Data |
|---|---|---|---|
| 0 | layer 1 | `{row t, lane, neuron of the pair}`, where row t = pair·2 + input/512 and lane = input mod 512 | INT8, in the low byte |
| 1 | batch norm | `{neuron, sel}`, where sel is 0 mean, 1 standard deviation, 2 gamma, 3 beta | Q8.8 |
| 2 | layer 2 | `{input, output}` | Q8.8 |
| 3 | layer 3 | `{output·10 + input/10, input mod 10}` | Q8.8 |
| 4 | layer 4 | `{input, output}` | Q8.8 |

The class `nn_model` in `tb/nn_model_pkg.sv` has helpers (`a1` … `a4`,
`abn`) that compute these addresses, and a bit-exact model of the network.
The CSI memories load through `c_we`/`c_src`/`c_addr`/`c_data`. Word
`v·128 + b` holds beat `b` of vector `v`.

## How far it follows the original design

Taken from the design as published:

- the system structure and the two boards;
- the layer sizes and the parallelism per layer (512/2, 1/100, 10/1, 1/1);
- the 200-clock stage time and the merging of layers into two stages;
- dual INT8 packing and the batch norm with a precomputed standard deviation
  and a pipelined non-restoring division;
- truncating floating point, `to_float`, and the Newton–Raphson reciprocal
  with a table seed and three iterations;
- the two polynomial expansions and their expansion points, softplus with
  1e-5, and L·Lᵀ;
- the 2×2 inversion by adjoint;
- the 40-clock prefusion stages, and conflation of four panels with reused
  adders.

Choices made here:

- All widths, fixed-point scalings and memory layouts.
- The 8-feature input beat.
- The order of values in a tuple.
- The word order of the 32-bit packing and the panel id in its spare half
  word.
- The slot-and-stall scheme in the converter and the overflow rule in the
  router.
- Three division bits per stage, and the 16-entry reciprocal table.
- The micro-program sequencing of exp and ln. The published block uses a
  dedicated chain of adders and multipliers. Here one adder and one
  multiplier are time-shared, and the latency still fits in the 40-clock
  stage.
- The handshakes: prefusion `in_ready`, and the fusion accepting one tuple
  per ~24 clocks.

Known differences:

- The reference latencies are 429 clocks for the network and 283 for the
  fusion. Here the network takes 561 clocks from the first input beat, with
  the same 200-clock interval. Most of the difference is the time to stream
  1024 features in through a 64-bit port. The prefusion plus fusion latency
  is 122 clocks per panel plus 56 after the last one.
- The published ln(1+x) block diagram shows one adder constant with the
  opposite sign to its equation. This RTL follows the equation, which is the
  one that matches ln(1+x).
- The exponential keeps the nesting of the published equation, which is not
  exactly the Taylor series. Multiplied out, it gives
  1 + q + q²/2 + q³/6 + (1/24 + 1/120)·q⁴ + q⁵/720, with no q⁶ term. The
  relative error is 0 at x = −1.5, 1.2e-3 at −2, 7e-3 at 0 and 37 % at −3.
  The testbenches model this polynomial, not e^x.
- The logarithm's expansions are accurate to about 1e-5 inside their ranges: ln(1+x)
  stays within 1e-5 for x between 0.3 and 1. Outside those ranges, the error
  grows quickly.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/lis_pkg.sv tb/lis_tb_pkg.sv tb/nn_model_pkg.sv tb/tb_lis_top.sv \
  --top-module tb_lis_top
obj_dir/Vtb_lis_top +verilator+rand+reset+2
```

Every testbench needs a reset value for randomly initialised state, hence the
`+verilator+rand+reset+2` option.

`tb_lis_top` runs the whole system at its default sizes in about 20 seconds.
It does the following:

- It loads four different random networks, at about 920 000 load clocks.
- It sends 16 vectors from each of the four memories.
- It carries the sending board's stream to the receiving board's DMA port
  through a 700-clock delay line.
- It puts a 64-word FIFO between the receiving board's router and its
  converter.

It checks:

- every tuple on both router streams, bit for bit, against `nn_model`;
- all 16 fused estimates, against a real-valued model of the prefusion and
  fusion, within 2 %.

It also counts input back-pressure, router waits, link tuples, converter
stalls and prefusion holds, and fails if any of them never happened.

`tb_nn_accel` runs one network at full size and checks the 200-clock interval.
The arithmetic units are checked against `real` models, with thousands of
random operands each. `tb_to_float` covers all 65 536 inputs, and
`tb_dual_int8_mul` covers every pair of multiplicands for many activations.

## Files

- `rtl/lis_pkg.sv`: the float type and the add, multiply and pack functions.
- `rtl/<block>.sv`: one module per file. The opening comment of each file
  describes its interface and timing.
- `tb/tb_<block>.sv`: the testbenches.
- `tb/lis_tb_pkg.sv`: float/real conversion and the polynomial models.
- `tb/nn_model_pkg.sv`: the network reference.
