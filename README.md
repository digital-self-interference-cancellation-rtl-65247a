# Adaptive-filter digital self-interference cancellation

An in-band full-duplex radio transmits and receives at the same time on the
same frequency. Its receiver therefore picks up its own transmit signal, the
*self-interference* (SI), which is usually far stronger than the wanted signal.
The transmitter knows what it sent, so the receiver can estimate the SI
channel, rebuild the interference from the transmitted samples and subtract it.

This RTL does that subtraction in the digital baseband with a short adaptive
FIR filter. For every sample pair it does the following:

    r[n]      = x[n] * h[n] + d[n] + noise        (what the receiver sees)
    x_hat[n]  = sum_k w'_k[n] x[n-k]              (SI estimate, k = 0..L-1)
    d_hat[n]  = r[n] - x_hat[n]                   (cleaned receive sample)
    w_k[n+1]  = w_k[n] + update(d_hat[n], x[n-k]) (adaptation)

Here `x[n]` is the transmitted sample, `h` is the unknown SI channel, `d[n]` is
the wanted receive signal and `w_k` are the filter weights. The cleaned sample
`d_hat[n]` is also the error signal that drives the adaptation. The filter
length is L = 3. A second-order Taylor expansion of a channel made of many
short, weak reflections leaves only three unknowns, and three taps capture
them.

Three adaptation policies are provided as three filter cores with the same
outside:

| core | weight update | `w'_k` in the SI estimate | cost |
|------|---------------|---------------------------|------|
| LMS  | `w_k += mu * conj(d_hat) * x[n-k]` | `conj(w_k)` | lowest, no divider |
| NLMS | `w_k += mu * conj(d_hat) * x[n-k] / (c + sum_j abs(x[n-j])^2)` | `conj(w_k)` | one complex divider |
| RLS  | `g_k = lambda^-1 P_k x[n-k] / (1 + lambda^-1 P_k abs(x[n-k])^2)`<br>`w_k += d_hat * conj(g_k)`<br>`P_k = lambda^-1 P_k (1 - g_k conj(x[n-k]))` | `w_k` | one complex divider per tap |

`mu` is the step size (0.001 by default) and `lambda` is the RLS forgetting
factor (0.999 by default). RLS converges in far fewer iterations. LMS has by
far the shortest logic path, so on an FPGA it can run at a much higher clock.
The original FPGA implementation of this design closed timing at roughly
60 MHz (LMS), 20 MHz (NLMS) and 15 MHz (RLS). In samples per second, LMS is
the fastest of the three.

## Number formats and stream layout

Every value that is stored or crosses an interface uses one of two
signed fixed-point formats. `sfi(a,b)` means `a` bits in total, of which `b`
are fractional, with a range of [-2^(a-b-1), 2^(a-b-1)).

| quantity | format | range |
|----------|--------|-------|
| x[n], r[n], d_hat[n] (each of I and Q) | sfi(16,14) | [-2, 2) |
| weights w_k, P_k, mu, lambda (each of I and Q) | sfi(32,30) | [-2, 2) |

Input frame, 64 bits (`in_frame_t`):

    63      48 47      32 31      16 15       0
    | x[n] Q  | x[n] I  | r[n] Q  | r[n] I  |

Output word, 32 bits (`csig_t`): `d_hat Q` in [31:16] and `d_hat I` in [15:0].

One frame carries both the transmit sample and the receive sample taken at the
same instant. The two sequences therefore cannot slip against each other, and
the filter needs no alignment logic.

Saturation is a real part of the behaviour. A receive sample whose I or Q
would leave [-2, 2) is clipped at the input, before it reaches the core. An
output `d_hat` that would leave [-2, 2) is clipped by the core. With a strong
SI, `r[n]` itself saturates. With the test channel used below, this starts
at about +7 dB. The filter cannot undo that distortion. A wider sample
format would raise that limit at the cost of more logic.

## How a core works, cycle by cycle

`adaptive_fir_core` is one combinational step between two sets of registers.

1. When a frame is accepted (`s_axis_tvalid && s_axis_tready`), the following
   happens in the same cycle:
   - `x[n]` joins the delay line: tap 0 is the live input, and taps 1..L-1
     are registers.
   - The weight multiplier forms `x_hat` at full precision (44 fractional
     bits).
   - `d_hat = r - x_hat` is rounded and saturated to sfi(16,14).
   - The weight updater computes the next weights from that rounded `d_hat`.
2. On the clock edge, three things are stored together: `d_hat` goes into the
   output register, the new weights go into the weight registers, and `x[n]`
   shifts into the delay line.

The filter therefore does one adaptation per sample, and the sample rate
equals the clock rate. Latency is one cycle from the accepted frame to
`m_axis_tvalid`.

The handshake is AXI4-Stream with a single output register:
`s_axis_tready = !m_axis_tvalid || m_axis_tready`. While the output is stalled,
the core takes no new frame. Weights only move on an accepted frame, so
back-pressure never makes the filter adapt twice on the same sample or skip
one. An assertion checks that a stalled output stays valid and unchanged.

`weights_o` exposes the current weights for monitoring.

### Arithmetic inside the updaters

Products are formed at full precision in a 128-bit signed type (`acc_t`). A
result is rounded only when it is stored (weights, `P_k`) or leaves the core
(`d_hat`). Rounding is to nearest with ties upward, and every rounding also
saturates. The precision of each path is as follows:

- **LMS.** `mu * conj(d_hat)` is formed once (44 fractional bits) and
  multiplied by each tap (58 bits). It is added to the weight, aligned to
  58 bits, and the sum is rounded to sfi(32,30).
- **NLMS.** The denominator is `c + sum |x|^2`, held with 30 fractional bits.
  `c` defaults to 2^-10. `mu * conj(d_hat)` is divided by the denominator once,
  in `complex_divide`. The quotient has 44 fractional bits and is multiplied by
  each tap, as in LMS.
- **RLS.** Each tap has its own scalar recursion with its own `P_k`. There is
  no L x L inverse-covariance matrix.
  - `rls_gain_updater` computes the numerator `lambda^-1 P_k x` and the
    denominator `1 + Re(numerator * conj(x))`, both rounded to 40 fractional
    bits, and divides them.
  - The divider takes a real denominator. For the real `P_k` that the
    recursion produces, the imaginary part of the denominator is only
    rounding noise.
  - The gain is used in the same cycle and is not stored.
  - `rls_p_updater` holds `P_k`, which resets to `P_INIT` = 1.0. That value
    stands for 1/sigma^2, the inverse of an initial input-variance estimate.
  - `lambda^-1` is computed from `LAMBDA` at elaboration.
- **Divider** (`complex_divide`). The numerator is pre-shifted by `SHIFT` bits
  and then divided as an integer, truncating towards zero. A zero denominator
  gives zero. It is combinational and is the longest path in NLMS and RLS.

## Modules

    dsic_top                      three cores side by side (LMS, NLMS, RLS)
    └─ adaptive_fir_core          AXI4-Stream core, FILTER selects the policy
       ├─ filter_taps             L-1 delay registers
       ├─ weight_multiplier       L complex multiplies + sum -> x_hat
       └─ one of
          ├─ lms_weight_updater
          ├─ nlms_weight_updater  ── complex_divide
          └─ rls_weight_updater
             ├─ rls_gain_updater  ── complex_divide   (per tap)
             └─ rls_p_updater                          (per tap)
    dsic_pkg                      formats, types, rounding/saturation helpers

`dsic_top` gives each core its own stream ports (`lms_*`, `nlms_*`, `rls_*`)
and shares only the clock and the synchronous active-low reset `rst_n`. The
cores are alternatives: feed one, or feed all three the same stream to compare
them.

In a complete system, other parts sit around these streams:
- a DMA buffer that supplies `{x, r}` frames and collects `d_hat`;
- a processor that loads the samples;
- a sample memory and a DAC link that replay `d_hat` as analog I/Q.

Those parts are not part of this RTL.

Parameters (all `dsic_top` defaults are the design's operating point):

| parameter | default | meaning |
|-----------|---------|---------|
| `L` | 3 | filter length |
| `MU_LMS`, `MU_NLMS` / `MU` | 0.001 (`32'sd1073742`) | step size, sfi(32,30) |
| `LAMBDA` | 0.999 (`32'sd1072668082`) | RLS forgetting factor, sfi(32,30) |
| `C_SAFE` | 2^-10 (`32'sd1048576`) | NLMS denominator safety constant, own choice |
| `P_INIT` | 1.0 (`2^30`) | RLS initial P_k = 1/sigma^2, own choice |
| `FILTER` (core only) | `FILT_LMS` | `FILT_LMS`, `FILT_NLMS` or `FILT_RLS` |

`mu` must lie in (0, 2). `lambda` should lie between 1 - 1/(2L) and 1. Values
are written in sfi(32,30), i.e. `round(value * 2^30)`.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The floating-point reference models in
`tb/tb_dsic_pkg.sv` are written straight from the equations above. The only
fixed-point step they share with the RTL is the rounding of `d_hat` to
sfi(16,14), because that rounded value is what feeds the update.

- The unit testbenches check each module against the models:
  - the delay line;
  - the divider, including sign and zero cases;
  - the weight multiplier, with and without conjugation;
  - each updater against a double-precision run of its recursion.
- `tb_adaptive_fir_core` runs all three policies with a raised step size.
  It checks:
  - every `d_hat` against the model, within 3 LSB;
  - one frame per clock in a back-to-back burst;
  - one-cycle latency;
  - no input taken while the output is stalled;
  - more than 95 % SI power removed.
- `tb_dsic_top` runs the whole subsystem at its default parameters over
  27,000 samples, with random bubbles and back-pressure. `x` and `d` are
  independent QPSK streams, the noise gives about 20 dB SNR, and the SI
  channel has three fixed complex taps. The run has three segments:
  1. SI gain -5 dB (initial convergence);
  2. a step to 0 dB (de-convergence and re-convergence);
  3. a sign-flipped channel at +5 dB, which drives `d_hat` into saturation.

  The testbench checks every output against the model within 8 LSB, because
  RLS rounding accumulates over the run. It also checks that each of these
  mechanisms happened in every core: stall, bubble, convergence,
  de-convergence, re-convergence and saturation.

Typical results from `tb_dsic_top`:

| core | d_hat RMS EVM, -5 dB segment | t_ic (samples) | t_rc after +5 dB step |
|------|------------------------------|----------------|------------------------|
| LMS  | 10.4 % | ~4700 | ~4200 |
| NLMS | 10.6 % | ~7000 | ~6000 |
| RLS  | 10.7 % | ~390  | ~2100 |

Other figures from the same run:
- The RMS EVM of the noisy wanted signal alone is 10.0 %. The residual after
  cancellation is close to that: the filters remove the interference but
  cannot remove the additive noise.
- The EVM of `r` before cancellation is about 100 %.
- t_ic and t_rc are counted until the 200-sample windowed error is within 2x
  of its steady-state value.
- RLS needs well under 500 iterations to converge.

`tb_workload_sweep` streams one signal through twelve cores at once. The
signal runs at -5 dB SI for 12,000 samples and then at 0 dB for another
12,000. The cores cover four step sizes for each of LMS and NLMS and four
forgetting factors for RLS. The test checks the trade-off between speed and
residual error. It also checks that RLS at lambda = 0.999 converges in under
500 samples and faster than LMS at mu = 0.001. Measured values:

| core, setting | t_ic | t_rc | steady-state EVM |
|---------------|------|------|------------------|
| LMS mu = 0.001 / 0.0025 / 0.005 / 0.0095  | 4590 / 1810 / 960 / 640 | 3780 / 1670 / 800 / 500 | 10.3 / 10.7 / 11.3 / 12.3 % |
| NLMS mu = 0.001 / 0.0025 / 0.005 / 0.0095 | 6540 / 3000 / 1490 / 820 | 6160 / 2630 / 1160 / 680 | 10.4 / 10.5 / 10.9 / 11.6 % |
| RLS lambda = 0.99 / 0.995 / 0.999 / 0.9995 | 230 / 250 / 320 / 330 | 340 / 480 / 2140 / 3780 | 14.6 / 12.4 / 10.6 / 10.3 % |

The same testbench raises the SI by 7.6 dB over the 0 dB channel. At that
level about 7 % of the receive samples clip in sfi(16,14), and the LMS output
EVM doubles, from 10.2 % to 20.1 %.

The weights have a range limit of their own: they are sfi(32,30), so no weight
component can go beyond +-2. An SI channel whose taps need a larger weight
cannot be cancelled fully, however long the filter adapts. With the test
channel above this happens from about +8 dB.

Simulate with plain Verilator, from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/dsic_pkg.sv tb/tb_dsic_pkg.sv tb/tb_dsic_top.sv --top-module tb_dsic_top
    ./obj_dir/Vtb_dsic_top

Replace `tb_dsic_top` with any other testbench name. The full-subsystem run
takes a few seconds.

## Where this RTL departs from, or adds to, the original design

The following follow the original design:
- the three update equations and their conjugation conventions;
- L = 3, mu = 0.001 and lambda = 0.999;
- the sfi(16,14) and sfi(32,30) formats;
- the 64/32-bit frame layout;
- one adaptation per clock with the update in a single combinational step;
- a per-tap scalar `P_k`;
- a complex-by-real divider.

The following are this implementation's own choices:
- **Handshake.** Cores are AXI4-Stream, but the exact handshake used here is
  this implementation's: tvalid/tready with one output register and no
  `tlast`.
- **Reset.** Synchronous, active low. Weights and taps reset to zero, `P_k`
  to `P_INIT`.
- **Rounding.** To nearest, ties upward, with saturation at every store.
  Intermediates stay at full precision except in the RLS gain path, which is
  rounded to 40 fractional bits.
- **Unspecified values.** `c` = 2^-10 and `P_INIT` = 1.0 (sigma^2 = 1); the
  original does not give values for either.
- **Divider.** An integer division that truncates towards zero and returns 0
  for a zero denominator.
- **RLS denominator.** Its real part is used, since the divider takes a real
  denominator while `P_k` is stored as a complex number.
- **RLS gain timing.** The gain is computed from the current `P_k` and used in
  the same cycle. One form of the gain equation indexes it one step later;
  the chosen form needs no gain register.
- **Multiplier counts.** NLMS forms `abs(x)^2` with two real multiplies per
  tap, and RLS shares `mu`/`lambda` products differently. The core therefore
  uses 10L+2 multipliers for NLMS and about 26L for RLS, where the original
  operator count gives 12L+2 and 28L. LMS matches at 8L+2.
- **Weight monitor.** `weights_o` is an added monitoring port.
- **Top level.** `dsic_top` instantiates all three cores at once. The original
  evaluated them one at a time in the same slot.

No FPGA timing or resource figures were re-measured for this RTL.
