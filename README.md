# Low-power spectral-sharpening noise reduction core

Hearing-aid speech processing has to run on microwatts, so this core does
its filtering with as little switching activity as it can. It reduces
noise by **spectral sharpening**. An adaptive lattice *decorrelator*
follows the short-term spectrum of the input and estimates eight
partial-correlation (Parcor) coefficients k1..k8 for every sample. Those
coefficients set an analysis filter `1 - A(z/β)` and a synthesis filter
`1 / [1 - A(z/γ)]`, with `0 < β < γ < 1`. Together the two filters give
`H(z) = [1 - A(z/β)] / [1 - A(z/γ)]`, which raises the formant peaks of the
speech above the valleys between them, where the noise lies. The result
is one 16-bit output sample per 16-bit input sample at 8 kHz.

The architecture keeps capacitance and clock activity low:

* **Serial-parallel arithmetic.** Each multiply-accumulate unit (MAC)
  takes one radix-4 Booth digit of the coefficient per clock. It needs no
  array multiplier, and audio rates leave plenty of clock budget for this.
* **Sequential memories.** Filters read their states in a fixed order,
  so the memories have no address decoder. A shift register along the
  rows selects them one after another, and delay lines shift only
  virtually.
* **Time-multiplexed units with a fixed binding.** Two identical MACs do
  all 92 multiply-accumulates of a sample. Unit 1 always runs the
  decorrelator and unit 2 always runs the two filters, so data stay
  local. Two small dedicated operators handle the power estimate and the
  coefficient update.
* **A ROM-microcoded sequencer** runs a fixed, hierarchical schedule:
  48 *macro-cycles* per sample, each the length of one MAC operation.

The highpass pre-filter that normally comes before the analysis filter is
not part of this core. `x_in` should be highpassed already.

## Algorithm, as computed bit for bit

Signals are 16-bit two's complement fractions with 15 fraction bits.
`Q(·)` is sign-magnitude truncation: the magnitude is truncated, so values
round toward zero, and results saturate to ±(2^15 − 1). Products are exact
until they are quantised.

**Decorrelator (gradient adaptive lattice), stage i = 1..8**, with
`f0 = b0 = x[n]`:

```
f_i  = Q(f_{i-1}      - k_i · b_{i-1}[n-1])
b_i  = Q(b_{i-1}[n-1] - k_i · f_{i-1})
e    = f_{i-1}² + b_{i-1}[n-1]²                      (exact)
P_i  = P_i - P_i>>6 - P_i>>8 + e>>6                  η ≈ 1 - 2^-6 - 2^-8 ≈ 0.98
s    = floor(log2 P_i)                               power of two approximating P_i
c    = f_i · b_{i-1}[n-1] + b_i · f_{i-1}            (exact)
k_i  = sat(k_i + trunc(c / 2^max(0, s + 5 - 15)))    μ = 2^-5, coarse division
```

**Analysis, stage i = 1..8**, with `f0 = x[n]`. Delay i holds `b'_{i-1}`, and
the first delay takes `x` itself:

```
f_i = Q(f_{i-1} - k_i · b'_{i-1})
b_i = Q(b'_{i-1} - k_i · f_{i-1})          i < 8
next input of delay i+1 = Q(β · b_i)       i < 8
```

**Synthesis, stage i = 8..1**. `f8` is the analysis output and
`y[n] = f0`. Delay 1 takes `y`:

```
f_{i-1} = Q(f_i + k_i · b'_{i-1})
b_i     = Q(b'_{i-1} - k_i · f_{i-1})      i < 8
next input of delay i+1 = Q(γ · b_i)       i < 8
```

The β (γ) scaling sits between a stage's backward output and the next
delay, so the first delay is not scaled. That makes 8 + 7 + 7 = 22
operations per filter. With `β = γ` the synthesis filter is the exact
inverse of the analysis filter, up to quantisation. The filters of sample n
use the coefficients that the decorrelator reached after sample n−1.

## The serial-parallel Booth MAC (`arith_unit`)

This is the least obvious block. A coefficient `c` (WC bits) goes into a
parallel-in serial-out register. Every clock, two new bits plus the last
bit of the previous pair form a Booth window (`booth_recoder`). The window
gives a digit `d ∈ {−2..2}`, and the selection stage turns the held data
word `x` into `d·x`. The adder adds `d·x` to the **high register**. Both
accumulator registers then shift right by two ("divide by four"):

```
u      = H + d_j·x + L[1:0]        (L[1:0] = digit j of the old low part)
H     <= u >>> 2
L     <= {u[1:0], L[WC-1:2]}       (new result digit enters at the top)
```

**Full-precision accumulation.** Before a product starts, the value `A`
to accumulate onto is split. Its high part goes back into H at full weight
(`H = A` with the low WC bits cleared). Its low WC bits stay in L. At every
step the two bits leaving the bottom of L are added into the adder, and
the new result bits take their place at the top. After WC/2 steps
`{H, L} = A + c·x` exactly. So a sum of products is exact with no wide
final adder. The accumulator is WD + WC + 4 bits wide; the 4 guard bits
allow sums of up to 16 full-scale products.

Commands, sampled with `start`:

| mode     | result                       |
|----------|------------------------------|
| `AU_CLR` | `acc = ±c·x`                 |
| `AU_ACC` | `acc = acc ± c·x`            |
| `AU_ADD` | `acc = addend·2^15 ± c·x`    |

`sub` negates the Booth digits, which gives the minus sign. `q` is `acc`
quantised to WD bits. Latency is 1 + WC/2 clocks: 9 for 16 bits, 11 for
20, 17 for 32. All command inputs are captured at `start`.

This unit is slower than the one it is modelled on. That unit was
specified at 6 clocks for a 20 × 20-bit product. The block structure
followed here (one selection stage, one adder, a shift of two bits per
clock) needs 11.

## Sequential memories (`seq_addr`, `seq_mem`)

`seq_addr` is a chain of NWORDS flip-flops that can each be set to 1:

* **Reset.** All stages are set to 1.
* **Advance.** A 0 is shifted in at stage 0, so the chain holds a
  thermometer code: `1111…`, then `0111…`, `0011…`, and so on, up to
  `0…01`.
* **Row select.** Row i is selected where the code changes from 0 to 1
  (`q[i] & ~q[i-1]`), so exactly one row is selected at any time.
* **Wrap.** When the chain is in its last state, the next advance sets
  every stage back to 1.

`seq_mem` is an NWORDS × W array with two such chains: one for reads and
one for writes. A delay line is kept by reading a row, writing the new
word into the same row, and advancing. The data never move.

The synthesis filter walks its stages from 8 down to 1. It only learns
the new input of delay i+1 at stage i, so its writes trail its reads by
one row, and y is written last.

Memories in the core:

| memory                               | size    | module               |
|--------------------------------------|---------|----------------------|
| decorrelator backward delays         | 8 × 16  | `seq_mem`            |
| power estimates                      | 8 × 32  | `seq_mem`            |
| Parcor coefficients                  | 8 × 16  | register array, copied in one clock to the filters |
| analysis delays                      | 8 × 16  | `seq_mem`            |
| synthesis delays                     | 8 × 16  | `seq_mem`            |

## Power estimate and coarse division (`eta_acc`, `norm`, `k_acc`)

The normalised gradient update `k += μ·c/P` would need a divider. Instead:

* **`eta_acc`** forms the power recursion with `η = 1 − 2^-6 − 2^-8`, using
  two subtractions of shifted copies and no multiplier.
* **`norm`** finds `s = floor(log2 P)` with a leading-one detector.
* **`k_acc`** shifts the cross term right by `s + 5 − 15` instead of
  dividing, adds it to k, and saturates k to ±(1 − 2^-15).

All three are combinational, and each runs once per stage per sample.
The 1/64 input scaling in `eta_acc` keeps the 32-bit estimate in range: it
settles near 0.8 × the mean energy. The step size μ = 2^-5 is the
parameter `MU_LOG2`.

## Schedule (`sequencer`)

One sampling interval is 1 + 48 × MC_LEN clocks. A macro-cycle is
MC_LEN = 10 clocks: 1 start clock, 8 Booth steps and 1 write-back clock.
The micro-program ROM has one word per macro-cycle. The words are computed
at elaboration by `rom_word()`:

| macro-cycles | unit 1 (decorrelator)                                              |
|--------------|--------------------------------------------------------------------|
| 0–47         | stage `mc/6 + 1`, op `mc%6`: f, b, f², +b², f_i·b, +b_i·f (load 48/48) |

| macro-cycles | unit 2 (filters)                                   |
|--------------|----------------------------------------------------|
| 0–21         | analysis: stages 1–7 do f, b, β; stage 8 does f    |
| 22–43        | synthesis: stage 8 does f; stages 7–1 do f, b, γ   |
| 44–47        | idle (load 44/48 ≈ 92 %)                           |

After operation +b² the power memory is updated (`eta_acc`, `norm`).
After operation +b_i·f the coefficient is updated (`k_acc`) and the
backward delay is rewritten.

When a unit has no operation it does not start, and its registers keep
their values, so it does not switch. The RTL has no clock gating or
power-down control.

## Interface and timing (`nr_core`)

| port                | dir | width  | meaning                                   |
|---------------------|-----|--------|-------------------------------------------|
| `clk`, `rst_n`      | in  | 1      | clock, asynchronous active-low reset      |
| `x_in`, `x_valid`   | in  | 16, 1  | input sample and its one-clock strobe     |
| `ready`             | out | 1      | the core can take a sample                |
| `beta`, `gamma`     | in  | 16     | β, γ as fractions with 15 fraction bits; hold them steady |
| `y_out`, `y_valid`  | out | 16, 1  | output sample and its one-clock strobe    |
| `k_out`             | out | 8 × 16 | Parcor coefficients, for observation      |
| `err_out`           | out | 16     | forward error of decorrelator stage 8     |

`y_valid` rises 481 clocks after the clock that accepts `x_valid`. At
8 kHz this needs a clock of at least 3.85 MHz. Reset clears all
coefficients, delays and power estimates.

Parameters of `nr_core`:

| parameter | default | meaning                                |
|-----------|---------|----------------------------------------|
| `M`       | 8       | filter order, 2..16                    |
| `W`       | 16      | data and coefficient width             |
| `WP`      | 32      | power estimate width                   |
| `MC_LEN`  | W/2+2   | clocks per macro-cycle                 |
| `MU_LOG2` | 5       | adaptation step, μ = 2^-MU_LOG2        |

The schedule scales with M: there are 6·M macro-cycles per sample.

## Source choices and departures

These parts follow the original architecture: the signal flow, the
operation counts (48 + 22 + 22 MACs per sample), the unit binding, the
48-macro-cycle period, the word lengths (16-bit data and coefficients,
32-bit power estimates), the η approximation, the coarse division, the
sign-magnitude quantiser, the Booth recoding, the shift-register row
addressing and the ROM-microcoded sequencer.

These parts are this design's own:

* **MAC latency.** Described above. It limits the computational margin to
  about 5 when the MAC clocks at 20 MHz; the original claims a margin
  above 10.
* **Full-precision accumulation scheme.** The split of the accumulated
  value and the re-adding of the low digits in the Booth MAC are this
  design's own reading of its exchange path.
* **Adaptation.** The exact signs, μ, the 1/64 energy scaling, the
  clamping of the shift and the saturation of k.
* **Schedule.** The order of operations within the schedule, and the
  point at which the filters take their copy of the coefficients (the
  start of each sample).
* **Memory access and interface.** The separate read and write chains in
  the memories, the sample handshake, and the reset values.
* **Filter structure.** The β/γ placement follows the filter signal flow,
  so the first delay is unscaled. The resulting response is close to
  `1 − A(z/β)` but not exactly that.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_nr_core`          | Default parameters, 400 samples of resonant noise, full-scale tones and silence. y and all k are compared bit for bit with an independent reference model (`tb/nr_ref_pkg.sv`). Also checks the interval length and that coefficient saturation, quantiser saturation, negative truncation, unit-2 idle cycles and coefficient transfer all occur. |
| `tb_nr_core_m10`      | The same at filter order 10 (60 macro-cycles). |
| `tb_decorrelator`     | Bit-exact against the model. Also checks that k1 converges (about 0.85 for the test resonance) and that the error power drops to about 17 % of the input. |
| `tb_lattice_filters`  | Bit-exact against the model. With β = γ the output stays within 18 LSB of the input. |
| `tb_arith_unit`       | Random and extreme operands in all modes, 8-term sums, and the 9-clock latency. |
| `tb_table1_sizes`     | A 32 × 64 memory, and 32 × 32 and 20 × 20 MACs with their latencies. |
| `tb_seq_addr`, `tb_seq_mem`, `tb_booth_recoder`, `tb_eta_acc`, `tb_norm`, `tb_k_acc`, `tb_sequencer` | Unit checks against formulas. |

To simulate with Verilator 5, compile the package first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nr_pkg.sv tb/nr_ref_pkg.sv tb/tb_nr_core.sv --top-module tb_nr_core
./obj_dir/Vtb_nr_core
```

The full-size end-to-end test takes well under a second.

## Not included

* The first-order highpass pre-filter. It has no coefficient here and is
  expected outside the core.
* Clock gating, voltage scaling and layout. The original's area and power
  (about 4 mm² and 4 mW at 5 V in a 1.2 µm process, or 0.65 mW at 2 V)
  are properties of its silicon, not of this RTL.
