# Real-time integer wavelet denoiser (5/3 lifting, hard threshold)

This design removes noise from a stream of 8-bit samples as they arrive. It
takes a five-level integer wavelet transform (IWT) of the signal with the
(5/3) biorthogonal filter in lifting form. It sets the small detail
coefficients of every level to zero (hard thresholding). Then it rebuilds the
signal with the inverse transform. It has no frame buffer. Each level is a few
adders, shifts and registers, and the only storage besides those is a short
delay line per level. The output is the denoised input, delayed by a fixed
124 samples.

The main idea is that lifting can be made causal. Each forward level and each
backward level then adds a fixed, known delay. The decomposition and
reconstruction chains can be cascaded without stalling, as long as every
detail stream is delayed by exactly as much as the deeper levels delay the
approximation it must meet again.

## Structure

```
 in_x ─► F1 ─a1─► F2 ─a2─► F3 ─a3─► F4 ─a4─► F5 ─a5──┐
         │d1      │d2      │d3      │d4      │d5      ▼
        TH1      TH2      TH3      TH4      TH5 ────► B5
         │        │        │        │                 │ar4
      Z^-60    Z^-28    Z^-12     Z^-4 ────────────► B4
         │        │        │                          │ar3
         │        │        └───────────────────────► B3
         │        │                                   │ar2
         │        └──────────────────────────────► B2
         │                                            │ar1
         └──────────────────────────────────────► B1 ─► out_y
```

`Fj` is `fiwt_level`, `THj` is `hard_threshold`, `Z^-D` is `delay_line` and
`Bj` is `biwt_level`. The top, `iwt_denoise_top`, builds this tandem with a
generate loop for any number of levels `J`.

| file | contents |
|---|---|
| `rtl/iwt_pkg.sv` | default sizes and `delay_units(j, J)` = 4(2^(J-j) - 1) |
| `rtl/fiwt_level.sv` | one forward level: split, predict, update |
| `rtl/biwt_level.sv` | one backward level: inverse update, inverse predict, merge |
| `rtl/hard_threshold.sv` | two's complement hard threshold |
| `rtl/delay_line.sv` | enabled shift register for the detail alignment |
| `rtl/iwt_denoise_top.sv` | J-level tandem |

## One lifting level

A forward level takes a stream x, starting with an even sample. It holds every
odd sample. When the next even sample arrives, the level computes, in that
cycle:

```
d[n]   = x_o[n-1] - floor((x_e[n] + x_e[n-1]) / 2)      predict
a[n-1] = x_e[n-1] + floor((d[n-1] + d[n]) / 4)         update
```

Here `x_o[n-1]` is the odd sample between `x_e[n-1]` and `x_e[n]`. Halving
and quartering are arithmetic right shifts, so there are no multipliers. The
two unit delays hold the previous even sample and the previous detail. Note
that the approximation comes out one index behind the detail: at pair n the
level emits `a[n-1]` together with `d[n]`. This one-sample lag is what makes
the update step causal.

A backward level gets `a[n-1]` and `d[n]` in that same pairing and undoes
the two steps in reverse order:

```
x_e[n-1] = a[n-1] - floor((d[n-1] + d[n]) / 4)
x_o[n-2] = d[n-1] + floor((x_e[n-1] + x_e[n-2]) / 2)
```

It sends `x_e[n-2]` out in the pair's cycle. It holds `x_o[n-2]` for the next
output slot. A forward level wired straight to a backward level therefore
returns its input exactly, four samples of its input rate later. In time that
is 2 × 2^j T_s at level j, where T_s is the input sampling period.

Integer lifting is exactly invertible. This still holds with the floors and
with W-bit wrap-around, because each backward step subtracts the very value
its forward step added. With thresholding switched off, the whole tandem is
lossless.

## Delay alignment

This is the part that needs the most care. The backward level j must receive
`ar_j[n-1]` (the approximation rebuilt by levels j+1..J) in the same cycle as
`d_j[n]`. That is the pairing in which forward level j produced them.

- The path from forward level j's approximation output, through all deeper
  forward and backward levels, back to backward level j's input takes some
  time A_j.
- Each forward or backward level k delays by U_k = 2^k T_s.
- So A_j = 2 · Σ_{k=j+1..J} 2^k T_s = 4(2^(J-j) - 1) · 2^j T_s.

Level j's detail stream has one sample per 2^j T_s. Its delay line therefore
needs

```
D_j = 4(2^(J-j) - 1)   samples of level j
```

| j | 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| D_j (J = 5) | 124 | 60 | 28 | 12 | 4 | 0 |

Level J needs no delay. D_0 = 124 is the end-to-end latency in input
samples. The recursion D_j = 2·D_{j+1} + 4 gives the same numbers. The `+4` is
the four-sample turnaround of one level pair. Each delay line shifts only on
its own level's sample strobe, so its length is counted in that level's
samples whatever the input rate or gaps.

Because every register and delay stage resets to zero, the design starts in
the state of an all-zero past signal. That state is consistent across all
levels, so the output is exact from the very first sample. The first 124
output samples are reconstructions of that zero past.

## Timing and sample strobes

There is one clock. `in_valid` marks an input sample. It may be high every
cycle or have gaps. Each forward level derives the strobe of the next level:
it fires on every second sample of its own input. Level j thus runs at
Fs/2^j. Backward level j uses forward level j's output strobe as its pair
strobe and forward level j's input strobe as its output slot strobe. As a
result, every rate in the design follows `in_valid`. There is no rate
controller and no back-pressure.

`out_valid` equals `in_valid`. `out_y` comes only from registers (backward
level 1's hold registers). When the deepest level fires, a coefficient pair
passes through all forward and backward levels within one clock. This follows
the direct-mapped lifting schematic. Pipeline registers would break the delay
accounting above, since every stage's delay is defined in samples. The cost is
that the longest combinational path grows with J. On the original FPGA
mapping, the clock period reportedly grew from about 54 ns for one level to
about 71 ns for five levels, with the threshold included.

## Hard threshold

The threshold follows the comparator circuit from the original architecture.
A full signed magnitude comparison is not used:

1. The sign bit of `d` picks `+TH` or `-TH` as the B input of an unsigned
   comparator. The A input is `d` itself.
2. The comparator gives `LT = A < B` (unsigned).
3. `LT XOR sign` selects zero or `d` at the output mux.

For positive `d` this zeroes `d < TH`. For negative `d` it zeroes
`d >= -TH`. This is the rule "keep d only if |d| > TH", with two edge cases
that the circuit brings and that this RTL keeps on purpose:

- `d = +TH` is **kept**, while `d = -TH` is zeroed.
- `TH = 0` zeroes **every negative** `d`, because `-0 = 0` and no unsigned
  value is below 0. Use `TH >= 1`. To get a transform without thresholding,
  set the parameter `USE_THRESHOLD = 0`. Do not set the thresholds to zero.

Each level j has its own threshold `th[j-1]`, given from outside. A usual
choice is TH_j = σ_j √(2 ln N_j). Here N_j is the number of coefficients at
level j, and σ_j is the noise standard deviation estimated at that level. The
estimate is made off-chip. The testbench uses median(|d_j|)/0.6745.

## Word length and interface

Inputs are 8-bit two's complement (`B = 8`). Internally every word is
`W = B + 3 = 11` bits. Over five levels the (5/3) filter can grow the signal
by two bits, and one more bit covers the sum or difference of two words. The
input is sign-extended to 11 bits. Sums inside a level are formed one bit
wider, so the floor shifts are exact. Results wrap to W bits; with these
sizes, they are not expected to overflow. `out_y` keeps all 11 bits and is not
narrowed back to 8.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `in_valid` | in | 1 | input sample strobe |
| `in_x` | in | B | noisy sample |
| `th` | in | W × J | `th[j-1]` = threshold of level j, 1 .. 2^(W-1)-1 |
| `out_valid` | out | 1 | = `in_valid` |
| `out_y` | out | W | denoised sample from `4(2^J-1)` input samples earlier |

| parameter | default | |
|---|---|---|
| `J` | 5 | levels |
| `B` | 8 | input width |
| `W` | 11 | word width |
| `USE_THRESHOLD` | 1 | 0 removes the threshold: a plain forward/backward IWT |

At the defaults, synthesis gives about 1470 flip-flop bits. The 104 words of
11-bit detail delay (1144 bits) make up most of them.

## Verification

Each testbench checks itself. It ends by printing
`TB_RESULT checks=N failures=M`, and it has a watchdog.

- `tb_fiwt_level` checks a forward level against the array model. Random
  input has random gaps. It also checks that the output strobe fires only on
  even samples.
- `tb_biwt_level` feeds forward coefficients computed in the testbench. It
  requires the original signal back exactly four samples late.
- `tb_hard_threshold` is exhaustive over all 2048 values of `d` for 15
  thresholds, including 0, 1 and the largest.
- `tb_delay_line` tests depths 4 and 60 with a random enable.
- `tb_iwt_reconstruct` runs J = 1, 3 and 5 with thresholding off. The output
  must equal the input delayed by 4, 28 and 124 samples. This tests the delay
  alignment without any model.
- `tb_iwt_denoise_top` runs the top at its default parameters. It uses the
  Blocks, Bumps, Heavy sine and Doppler test signals (2048 samples). Each is
  scaled to a fixed variance (317, 339, 2307, 1438) and given Gaussian noise
  at 5, 10, 15 and 20 dB input SNR. It runs with and without gaps in
  `in_valid`. Every output sample must match `tb/iwt_ref_pkg.sv` bit for bit.
  That package is an array-based model of the whole tandem. The testbench also
  requires:
  - an SNR gain in the 5 and 10 dB cases;
  - threshold zeroing and passing at every level;
  - nonzero data through every delay line.

One run of `tb_iwt_denoise_top` measured these output SNRs:

| signal | 5 dB | 10 dB | 15 dB | 20 dB |
|---|---|---|---|---|
| Blocks | 12.2 | 15.5 | 17.8 | 20.2 |
| Bumps | 11.0 | 14.3 | 19.1 | 21.5 |
| Heavy sine | 17.3 | 20.7 | 24.6 | 25.3 |
| Doppler | 14.5 | 18.0 | 20.0 | 23.3 |

These depend on how the thresholds are chosen, which is outside the hardware.
At 15 and 20 dB the gain is small, and with this threshold rule Blocks at
20 dB comes out slightly worse than its input. The original evaluation
reported higher output SNRs at low noise, with a threshold procedure that is
not fully specified.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_iwt_denoise_top \
    rtl/iwt_pkg.sv tb/iwt_ref_pkg.sv tb/tb_iwt_denoise_top.sv
./obj_dir/Vtb_iwt_denoise_top
```

Unit testbenches need only `rtl/iwt_pkg.sv`, plus `tb/iwt_ref_pkg.sv` where
they import it.

## Design choices and departures

These parts follow the original architecture:

- the lifting equations and where the unit delays sit;
- the shift-based floors;
- the 11-bit word;
- the delay formula and its table;
- the comparator/XOR threshold circuit;
- the tandem structure.

These are this implementation's own choices:

- the valid-strobe timing;
- that the first sample after reset is even;
- the reset to zero;
- placing each threshold between the forward level and its delay line;
- the `USE_THRESHOLD` switch;
- the W-bit output.

Known differences and limits:

- The threshold's behaviour at `d = +TH` and `TH = 0` is as described above.
  The written rule |d| ≤ TH → 0 and the comparator circuit disagree at those
  points. The circuit was followed.
- The critical path grows with J (see the timing section). The claim that
  cascading does not lower the clock rate does not hold for this direct
  mapping.
- Threshold estimation is not in hardware.
- FPGA-specific figures (slices, LUTs, power) are not reproduced.
