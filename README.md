# ZF and MMSE detectors for a two-way MIMO-SDM relay with network coding

In a two-way relay network, two nodes N1 and N2 exchange data through a relay.
Each node sends two parallel BPSK streams from two antennas (spatial division
multiplexing). The relay has four antennas. It does not decode the two messages
separately: it estimates the XOR of the two nodes' bits on each stream
(physical-layer network coding) and broadcasts these two network-coded streams
back to both nodes.

A node then receives

    u = (1/sqrt(2)) * H * x_r + n          (H: 2x2 complex channel from the relay)

It knows H and its own transmitted bits s. To recover the other node's bits it
must do three things:

1. undo the channel with a linear weight matrix G, giving the decision statistics `xhat = G u`;
2. make a hard BPSK decision on each stream, which gives the network-coded bits;
3. XOR those bits with s.

This RTL implements the two weight matrices as two complete detectors:

| detector | weight matrix                        | cycles per input set |
|----------|--------------------------------------|----------------------|
| ZF       | `G = (H^H H)^-1 H^H`                 | 54                   |
| MMSE     | `G = (H^H H + sigma_n^2 I)^-1 H^H`   | 55                   |

The design follows the conference paper "FPGA Design and Implementation of the
Detector for the MIMO-SDM System Using PNC". That paper gives these parts:

- the block set;
- the 38-bit complex word;
- the 3-cycle matrix multiply and the 41-cycle matrix inverse;
- division built from shifts and subtractions;
- the total cycle counts above.

The paper does not give the insides of the blocks. Those are this design's own,
and the sections below mark each place where the design makes its own choice.
The relay (MMSE detection with LLR combining) is only background in the paper,
so it is not part of this design.

## Number format

Every matrix element is a 38-bit complex word `a + jb`, held in `mimo_pkg::cplx_t`:

- the real part `a` is in bits [37:19];
- the imaginary part `b` is in bits [18:0];
- each part is a 19-bit two's complement number.

This layout is the paper's. The binary point is this design's choice: `FRAC = 10`
fraction bits. Each part therefore covers ±256 with a step of 1/1024. The MMSE
noise-variance input `sigma2` is one such 19-bit part, and it holds σ² itself.

Products are kept at full precision until a stage finishes: 40-bit parts with 20
fraction bits (`cplx_acc_t`). The stage then rescales the result back to a part:
it shifts right by FRAC (rounding toward minus infinity) and saturates. Every
addition also saturates. Nothing wraps.

## Pipeline

Each stage is a separate unit. It starts on a one-cycle `in_valid` pulse and
reports with a one-cycle `out_valid` pulse. The stages of the ZF detector
(`zf_detector`) are:

| stage | block           | what it computes                        | cycles |
|-------|-----------------|-----------------------------------------|--------|
| IN    | input register  | capture H, u, s                         | 1      |
| TRAN  | `herm_tran`     | H^H                                     | 1      |
| MUL   | `mul_matrix`    | H^H H                                   | 3      |
| INV   | `inv_matrix`    | (H^H H)^-1                              | 41     |
| MUL   | `mul_matrix`    | G = (H^H H)^-1 H^H                      | 3      |
| MUL   | `mul_matrix`    | xhat = G u                              | 3      |
| Q     | `bpsk_decide`   | network-coded bit = sign of Re(xhat)    | 1      |
| XOR   | `bpsk_decide`   | recovered bit = coded bit XOR s         | 1      |
|       |                 | **total**                               | **54** |

The stages from TRAN through the first two MULs form `g_zf`, which takes 48 cycles.

The MMSE detector (`mmse_detector`, with its weight block `g_mmse`, 49 cycles)
adds two blocks:

- `sigma` forms σ² I. It runs in the same cycle as TRAN, so it adds no cycles.
- `add_matrix` (ADD) adds σ² I to H^H H. It takes one cycle, which makes 55.

The paper gives the 3-cycle MUL, the 41-cycle INV and the totals of 54 and 55
cycles. The order in the table follows the weight-matrix formulas, and its
cycle counts add up to the paper's totals.

### Throughput: one set at a time

The paper defines throughput as `T = N·F/c`, where c is the number of cycles per
input set. So a detector works on one set at a time. It accepts a new set in the
same cycle as it outputs the result of the previous one, which gives exactly one
set every 54 (or 55) cycles. Only one set is in flight, so the stages of
different sets never overlap.

Overlapping them would not help much: the inverse is a sequential unit that is
busy for 41 of the 54 cycles.

One input set is 4×38 + 2×38 + 2 = 230 bits for ZF. For MMSE, the 19-bit σ² is
added, which makes 249 bits. The paper's clock of 214.5 MHz would give
230 × 214.5 / 54 ≈ 914 Mbit/s for ZF. That frequency is an FPGA result from the
paper. It has not been checked for this RTL.

## The 2x2 inverse and the divider (41 cycles)

`inv_matrix` uses the closed form for a 2x2 matrix:

    A = [a b; c d]    det = a·d − b·c    A^-1 = [d −b; −c a] / det

It runs in two steps:

- **Cycle 1.** Two complex multipliers (`comp_mul`) and a subtraction form det.
  It is rounded to the part format and registered, together with the adjugate
  [d −b; −c a].
- **Cycles 2–41.** Four complex dividers (`comp_div`) divide the four adjugate
  elements by det, in parallel and in lockstep. Each takes 40 cycles:
  - 1 setup cycle computes `n·conj(d)` (two numerators) and `|d|²` with
    ordinary multipliers. It stores the numerators as magnitudes and signs,
    scaled up by 2^FRAC so that the quotient comes out with FRAC fraction bits.
  - 19 cycles divide the real part.
  - 19 cycles divide the imaginary part. One `real_div` is shared by both
    parts, one after the other.
  - 1 cycle applies the signs and clamps each part to the 19-bit range.

`real_div` is a restoring divider. On each clock it tries to subtract the
divisor, shifted left by i, from the remainder, and keeps the difference if it
is not negative. That gives one quotient bit per cycle, most significant first.
When the operands are loaded, one comparison checks whether the quotient fits
in 19 bits. If it does not, or if the divisor is zero, the result saturates and
`ovf` is raised.

Using only shifts and subtractions for division is the paper's chosen design
option. Multiplication stays on the ordinary `*` operator, which is also what
that option does. This design chose these parts itself:

- the restoring algorithm;
- sharing one divider between the real and imaginary parts;
- the adjugate method.

Together they produce exactly the 41 cycles that the paper gives for INV.

`mul_matrix` (3 cycles) is fully pipelined. Its three cycles are:

1. all complex products, at full precision;
2. the inner sums;
3. the rescale and saturation.

## Interfaces and timing

Both detectors have the same ports (`pnc_detectors_top` brings both out, side by side):

| port        | dir | width  | meaning                                              |
|-------------|-----|--------|------------------------------------------------------|
| `in_valid`  | in  | 1      | an input set is offered                              |
| `in_ready`  | out | 1      | the detector is idle, or is outputting its last result |
| `in_h`      | in  | 2x2 × 38 | channel from the relay (`cplx_t [2][2]`)           |
| `in_u`      | in  | 2 × 38 | received vector                                      |
| `in_s`      | in  | 2      | this node's own transmitted bits                     |
| `in_sigma2` | in  | 19     | noise variance σ² (MMSE only)                        |
| `out_valid` | out | 1      | one-cycle result pulse, 54/55 cycles after acceptance |
| `out_bits`  | out | 2      | the other node's bits                                |
| `out_nc`    | out | 2      | estimated network-coded bits                         |
| `out_xhat`  | out | 2 × 38 | decision statistics G·u                              |
| `out_sat`   | out | 1      | the inverse had to clamp: the channel is (nearly) singular |

- A set is accepted on a rising edge where `in_valid && in_ready` is true.
- The outputs hold their values until the next result.
- Reset (`rst_n`) is active-low and asynchronous.
- BPSK maps bit 0 to +1 and bit 1 to −1.

The handshake, the reset and the bit mapping are all this design's choice. The
paper does not specify them.

On the top, both detectors share the input bus, but each has its own
valid/ready pair. The ZF detector finishes one cycle before the MMSE detector,
so when both are offered the same set, the ZF detector takes it first.

## Accuracy and where it breaks down

The fixed-point result follows a floating-point evaluation of the same formulas
closely when the channel is reasonably conditioned. The testbenches require:

| condition                       | what must hold                                   |
|---------------------------------|--------------------------------------------------|
| det(H^H H) > 0.25               | every element of G within 3% (+0.03) of floating point |
| det(H^H H) > 0.25               | xhat within 5% (+0.05)                           |
| decision statistic above 0.1    | the bit decision agrees with floating point      |

Below that, accuracy degrades. det is rounded to 1/1024 before the division, so
its relative error grows as det shrinks. On Rayleigh channels with det(H^H H)
around 0.05, errors of 10–20% in G were seen.

For a singular channel, the inverse normally clamps and `out_sat` is raised.
Rounding can leave a tiny nonzero determinant, though. In that case the weights
come out large but are not flagged; this happened for 1 of 40 rank-deficient
channels in the top-level test. Either way, the bit decisions are then
meaningless for ZF. MMSE keeps working, because its diagonal
loading keeps the matrix invertible. Both the singular ZF case and the MMSE
rescue are exercised by the top-level test.

If an application meets weak channels often, there are two ways to improve it:

- increase FRAC in `mimo_pkg`, which trades range for resolution;
- carry det at a wider width into `comp_div`.

The 1/sqrt(2) power-normalisation factor is not compensated. It only scales xhat
and cannot change a BPSK decision. Note that this scaling does interact with σ²
in the MMSE formula. The formula is implemented exactly as written, with σ²
added to H^H H.

## Differences from the paper

- Only the destination-node detectors are built. The relay's detector, and the
  two alternative options that the paper compares, are not:
  - no optimisation at all;
  - multiplication also made from shifts and adds.
- The paper reports slice counts and clock frequencies on a Virtex-7 FPGA.
  These have not been reproduced.
- The stage order is this design's reading of the weight-matrix formulas,
  fitted to the paper's per-block and total cycle counts (see Pipeline).
- This design's own choices are:
  - the fraction width;
  - truncating on rescale;
  - saturating everywhere;
  - the handshake;
  - the division-by-zero result;
  - the internal structure of INV, Comp div and Real div.

## Files

`rtl/` holds one module or package per file:

- `mimo_pkg.sv`: the types, widths, and the helpers `cconj`, `cadd`, `csub`,
  `rmul` and the saturating rescale.
- `comp_mul.sv`, `real_div.sv`, `comp_div.sv`: the complex multiply, the
  sequential real divide and the complex divide.
- `herm_tran.sv`, `mul_real.sv`, `mul_matrix.sv`, `add_matrix.sv`, `sigma.sv`,
  `inv_matrix.sv`: the matrix stages.
- `g_zf.sv`, `g_mmse.sv`: the weight-matrix chains.
- `bpsk_decide.sv`: the quantizer and the XOR.
- `zf_detector.sv`, `mmse_detector.sv`: the detectors.
- `pnc_detectors_top.sv`: both detectors together.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_util_pkg.sv`. That package provides:

- the integer reference arithmetic;
- the floating-point weight matrix;
- a Box–Muller Gaussian generator for channels and noise.

Each testbench prints `TB_RESULT checks=N failures=M` at the end and has a
watchdog. What the testbenches cover:

- The block tests compare against bit-exact 64-bit integer models.
- `tb_inv_matrix` also checks that A·A^-1 ≈ I.
- The latency of every sequential block is checked cycle by cycle.
- The detector tests run 400 random sets each, through Rayleigh channels with
  noise, with `in_valid` held high. They check that a new set is accepted
  every 54 or 55 cycles.
- `tb_pnc_detectors_top` runs both detectors at their default sizes on 1000
  sets. It checks that every mechanism occurs: results from each detector, a
  set waiting for a busy detector, the ZF clamp on a rank-deficient channel,
  and the MMSE loading avoiding it.
- `tb_pnc_stream` is a throughput run. It feeds each detector a never-ending
  stream of random sets for 110,000 cycles, which is about 2,000 sets each.
  It requires exactly one accepted set per 54 cycles for ZF (230/54 = 4.26
  input bits per clock) and per 55 cycles for MMSE (249/55 = 4.53). It also
  requires correct recovered bits on well-conditioned channels at
  Es/N0 = 20 dB.

## Simulating

With Verilator 5, from the project root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mimo_pkg.sv tb/tb_util_pkg.sv tb/tb_pnc_detectors_top.sv \
        --top-module tb_pnc_detectors_top -o sim
    ./obj_dir/sim

To run any other testbench, swap in its name. The whole top-level run takes a
few seconds.

Every variable that is read is reset or initialised, so the results do not
depend on the initial values of state.
