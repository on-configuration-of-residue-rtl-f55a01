# Pipelined radix-4 FFT in the modified quadratic residue number system

This is a streaming 1024-point FFT processor whose arithmetic is done entirely
in residues: every number is held as its remainders modulo seven small
coprime moduli. The seven channels never carry into each other, so each
adder and multiplier is only six bits wide and the pipeline can run at the
speed of a small adder.

The price is scaling. Twiddle factors are fractions. They are multiplied by
a constant K and rounded to integers, so every butterfly result carries an
extra factor K. That factor has to be divided out before the next stage
overflows the number range. Division is hard in a residue system: a scaler
needs a mixed-radix conversion across all channels, and it is the largest
unit in the design.

A radix-4 butterfly produces four complex results, which is eight real
numbers. Scaling them side by side would take eight scalers per stage, or 40
for five stages. Instead this design puts a small **parallel-to-serial
converter** behind each stage. It delays the eight numbers by staggered
amounts and multiplexes them onto just **two scalers**, one for real parts and
one for imaginary parts. The scalers then handle one complex number per
clock. The cost is a few cycles of latency per stage.

## Number system

All shared constants live in `rtl/mqrns_pkg.sv`.

| item | value |
|---|---|
| moduli m1..m7 | 61, 59, 53, 47, 43, 41, 37 (6-bit residues) |
| dynamic range M | product of the moduli, about 5.85e11 (2^39.1) |
| signed range | -(M-1)/2 .. (M-1)/2 |
| scaling constant K | m1·m2 = 3599 |
| MQRNS constant n | 77, with J_i² ≡ -77 (mod m_i) in every channel |

- `rvec_t` is one real number: seven residues, 42 bits.
- `cvec_t` is one complex number in CRNS form: a real and an imaginary
  `rvec_t`, 84 bits.

**Complex products (MQRNS).** Plain QRNS needs a square root of -1 modulo
every modulus. No such root exists for 59, 47 and 43. MQRNS instead uses J
with J² = -n, and maps a + ib to A = a + Jb and A* = a − Jb. For data (a, b)
and a twiddle (c, d):

    E  = A·C   + (n−1)·b·d  =  (ac − bd) + J(ad + bc)
    E* = A*·C* + (n−1)·b·d  =  (ac − bd) − J(ad + bc)

That makes three real multiplications per channel: A·C, A*·C*, and b times
the constant-scaled d. The butterfly then returns to CRNS form with
re = (E + E*)/2 and im = (E − E*)/(2J). The value n = 77 is the smallest
constant for which all seven moduli have such a J.

## Data flow

`mqrns_fft` chains log4 N stages: five for N = 1024. Each stage is an
`fft_stage`:

```
 stream in ─► c4_reorder ─► 4 inputs ─┬─► bf4_mqrns mod 61 ─┐
   (1/clk)    (ping-pong   + group i  ├─► bf4_mqrns mod 59 ─┤ 8 real numbers
              frame buf)      │       │        ...          ├─► p2s_conv ─┬─► rns_scaler (Re) ─┐
                              │       └─► bf4_mqrns mod 37 ─┘             └─► rns_scaler (Im) ─┴─► stream out
                              └─► twiddle_gen ─► K·W^(k·i·N/4L) per channel                            (1/clk)
```

- **c4_reorder** is the commutator. A radix-4 DIF stage whose butterflies span
  4L points needs x[b·4L + i + p·L] for p = 0..3 together. The commutator
  keeps two banks of N words. While one bank is written, the other, complete
  frame is read one word per clock, and every four reads become one butterfly
  input set. Both sides use one address map: the c-th number of a stream,
  with c = 4g + p and g = b·L + i, sits at in-place position
  `b·4L + p·L + i`. The writer applies this map with the previous stage's L,
  or stores in natural order in stage 0. The reader applies it with its own L.
- **twiddle_gen** returns round(K·cos θ) and −round(K·sin θ) for θ = 2π·k·i/(4L),
  k = 0..3, reduced per modulus. It reads a 257-entry quarter-wave table
  `rtl/twiddle_cos.hex`, where entry t = round(3599·cos(2πt/1024)), and gets
  the other quadrants and the sine by symmetry. k = 0 yields K itself, so all
  four butterfly outputs are scaled the same way.
- **bf4_mqrns** is one per modulus. It forms the radix-4 sums (y1 uses −i·x1,
  y3 uses +i·x1), multiplies them by the twiddles in MQRNS form, and returns
  CRNS results. Pipeline: sums | products | back to CRNS, 3 clocks.
- **p2s_conv** and the **rns_scaler** pair are described below.

The output stream of a stage is, for each group, y0, y1, y2, y3 in turn. That
is exactly the order the next stage's commutator expects with its writer map.
After the last stage the outputs come out in radix-4 digit-reversed order.
`out_bin` gives each output's frequency index: output position c holds
X[digit-reverse4(c)].

## The parallel-to-serial converter (`p2s_conv`)

This is the core of the design, and its timing is what makes two scalers
enough.

1. When a butterfly set is valid, all eight numbers Re0..Re3 and Im0..Im3
   enter a first register level.
2. Every clock they move one level further.
3. Path k has DELAY + k levels, with DELAY = 4. Re_k therefore reaches the
   end of its chain exactly DELAY + k clocks after the set arrived.
4. A 2-bit multiplexer select follows the valid bit down a delay line. It
   passes Re0/Im0 to SCALER1/SCALER2 four clocks after the set, then
   Re1/Im1, Re2/Im2 and Re3/Im3 on the next three clocks.

Because each set occupies the scalers for four clocks, butterfly sets must be
at least four clocks apart. An assertion checks this. The commutator issues
exactly one set per four clocks, so the butterflies run at 25 % duty while the
scalers and the stream run at one complex number per clock.

## The residue scaler (`rns_scaler`)

The scaler computes Y = floor((X + r)/K) for a signed X, where H = (M−1)/2 and
r = H mod K. The result is X/K to within one unit. The pipeline has 8 stages
and accepts one number per clock:

1. X' = X + H, which moves the signed range onto 0..M−1.
2. The first mixed-radix digit a1 = X' mod m1 is removed from all other
   channels: v ← (v − a1)·m1⁻¹.
3. Likewise for a2 with m2. Channels m3..m7 now hold Y' = floor(X'/K) exactly,
   since Y' < M/K.
4. Base extension. Y' is converted to mixed radix over m3..m7, one digit per
   stage. Each digit, weighted by the product of the moduli below it, is
   accumulated modulo m1 and m2. This rebuilds Y' in the two channels the
   division emptied.
5. Y = Y' − (H div K) in every channel.

## Timing

| block | latency |
|---|---|
| c4_reorder | 5 clocks from a frame's last input to its first butterfly set; a frame is buffered whole |
| twiddle alignment | 1 clock |
| bf4_mqrns | 3 clocks |
| p2s_conv | 4 clocks (DELAY) |
| rns_scaler | 8 clocks |
| fft_stage | 21 clocks from a frame's last input to its first output |

Throughput is one complex sample per clock. Frames may follow back to back,
and input gaps are allowed.

Control is valid-only. There is no back-pressure: the output must be accepted
when `out_valid` is high. Reset is synchronous and active low, and clears only
the valid and control state.

## Interface of `mqrns_fft`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, synchronous active-low reset |
| in_valid, in_data | in | 1, 84 | input sample in residue form (`cvec_t`), natural order |
| out_valid, out_data | out | 1, 84 | DFT value in residue form |
| out_bin | out | 10 | frequency index of `out_data` |
| bank_swap, bf_fire, p2s_valid | out | 5 | per-stage status: frame entered, butterfly set issued, converter active |
| mux_sel | out | 5×2 | per-stage converter multiplexer setting |

The processor works on residues only:

- To feed it, reduce each signed integer component modulo each modulus.
- To read it, use the Chinese remainder theorem and map values above (M−1)/2
  to negative numbers. `from_rvec` in `tb/mqrns_tb_pkg.sv` does this.

Each stage scales by exactly the K it multiplied by, so the result is the
unscaled DFT: X[k] ≈ Σ x[n]·e^(−2πjnk/N). Input components up to ±8191 keep
every intermediate value inside the signed range with a wide margin. The
full-scale case peaks near 4.3e10 before scaling, against a limit of 2.9e11.

## What follows the source design and what is this design's own

Taken from the source design:

- five radix-4 stages for N = 1024
- one butterfly per modulus in each stage (seven channels)
- MQRNS complex multiplication with three real multiplications
- CRNS butterfly outputs
- scaling after every stage
- the converter that staggers the eight outputs and multiplexes them onto two
  scalers, starting four cycles after the butterfly
- mixed-radix conversion as the basis of the scaler

Chosen here, because the source leaves them open:

- the modulus values, the constant n and the scaling constant K
- the internal pipeline of the scaler and the butterfly
- the triangular delay lengths DELAY + k
- the commutator, built as a two-bank frame buffer of 2N words per stage
  instead of a minimal delay commutator. This costs memory and one frame of
  latency per stage, but any stage order is simple to prove correct.
- DIF ordering with digit-reversed output
- the valid-only interface
- the quarter-wave twiddle table

Not included: converters between binary and residue form at the processor's
edges, and any overflow detection. The input range must be respected by the
user.

## Verification

Each block has a self-checking testbench in `tb/`. They share the reference
arithmetic in `tb/mqrns_tb_pkg.sv`: residue conversion, CRT, twiddles from
`$cos`/`$sin`, the scaler's rounding rule, and an integer model of one DIF
stage. That model uses 64-bit integers and does not depend on the residue
hardware.

| testbench | what it checks |
|---|---|
| tb_rns_scaler | 3000 values including both range ends and zero; exact result and 8-clock latency |
| tb_bf4_mqrns | channel mod 59, which has no square root of −1; 2000 random sets against direct complex arithmetic mod 59 |
| tb_p2s_conv | order, multiplexer setting and DELAY + k timing of every number |
| tb_twiddle_gen | all twiddles of a 1024-point stage and of a 64-point stage |
| tb_c4_reorder | three 64-point frames with gaps: group contents, group index, spacing, latency |
| tb_fft_stage | a 64-point stage 1 against the integer model, latency, multiplexer use |
| tb_mqrns_fft | full 1024-point processor at default parameters, three frames (see below) |

In `tb_mqrns_fft` the three frames are: random samples with input gaps,
random samples back to back, and a full-scale frame. Every output is checked
against the integer model bit for bit and against a floating-point DFT. The
DFT tolerance is 500 + 0.2 % of |X|; the largest error observed is about 290
on full-scale input. It also counts:

- frame swaps and butterfly sets per stage
- each multiplexer setting per stage
- negative results and input gaps

Simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`,
because the twiddle table is read as `rtl/twiddle_cos.hex`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mqrns_pkg.sv tb/mqrns_tb_pkg.sv tb/tb_mqrns_fft.sv \
    --top-module tb_mqrns_fft -o sim && ./obj_dir/sim
```

Swap in another `tb_*.sv` and its top-module name for the block tests. Each
testbench ends with a line `TB_RESULT checks=N failures=0`. The full-size run
takes well under a second.

## Changing it

- `N` on `mqrns_fft` (or on `fft_stage`) can be any power of four up to 1024.
  The twiddle table has 1024-point resolution and is sampled more coarsely for
  smaller N.
- To use other moduli, edit `MODULI` and `RW` in the package. Then:
  - `MQ_N` must make −MQ_N a quadratic residue modulo every modulus.
  - The twiddle table must be regenerated for the new K = m1·m2:
    round(K·cos(2πt/1024)), t = 0..256, three hex digits per entry.
  - The inverses and J values are computed at elaboration.
- `P2S_DELAY` on `fft_stage` sets the converter delay; it must be at least 1.
