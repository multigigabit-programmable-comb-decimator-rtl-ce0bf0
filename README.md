# Two-stage decimator for a multi-GHz sigma-delta bit stream

An oversampling (sigma-delta) A/D converter that must deliver video-rate
samples at high resolution runs its modulator at gigahertz rates and emits one
bit per clock. This RTL turns that bit stream into multi-bit words at a rate
2·M1 times lower, in two stages:

1. **Comb decimator** (the part the original chip implemented): a third-order
   comb filter `H(z) = [(1 - z^-M1)/(1 - z^-1)]^3` with decimation by
   M1 = 8, 16, …, 64. It needs no multipliers and no coefficients, only adders
   and registers, so it can run at the full bit rate (2 GHz in the source
   design, built in a GaAs HEMT process).
2. **Half-band FIR decimator by 2**: a 51-tap half-band low-pass filter that
   corrects the comb's pass-band droop and cuts off sharply before the final
   halving of the rate. It uses a single multiplier, time-shared over the 13
   distinct coefficient pairs.

The main configuration is M1 = 16 (total ratio 32). With a 2 GHz bit clock
that gives 62.5 MHz output words, one every 16 ns.

Both stages run from one clock here, with enable strobes in place of the
divided clocks of the original chip. The original design proposed putting the
second stage on a separate, slower (CMOS or BiCMOS) chip.

## Stage 1: the comb decimator (`comb_decimator`)

### Structure

```
data ─► bit_counter ─► comb_integrator ─► acc_dump ──► held ─► diff1 ─► diff2 ─► q
        (integ. 1)      (integ. 2)        (integ. 3 +     │  fb_1    fb_2    fb_3   fb_4
                                          compressor +
                                          diff. 0)
r[2:0] ─► pdiv (÷ R+1) ─► divide8 (÷ 8) ─► acc_res, fb_1..fb_4
```

The textbook form of a third-order comb decimator is three integrators at the
high rate, a rate compressor, and three differentiators at the low rate. This
design makes three simplifications:

* **Integrator 1 is a counter.** Its input is a single bit, so it counts the
  ones (`bit_counter`).
* **Integrator 3, the compressor and the first differentiator are one
  accumulate-and-dump stage (`acc_dump`).** "Integrate, sample every M,
  subtract the previous sample" equals "sum each block of M inputs". On the
  dump clock, the register's feedback into its adder is forced to zero. The
  register therefore restarts with the current input, and the block sum it
  held is taken by the next stage on the same edge.
* **Only two differentiators are left** (`comb_differentiator`), running at
  the low rate.

### Modulo arithmetic and the 13-bit width

Every adder and register is `WIDTH = 13` bits and wraps around freely. The
integrators overflow all the time. This is harmless: the comb's output is
exactly determined modulo 2^WIDTH, and the differentiators cancel the wraps.
The output is exact whenever the true result fits. For a unipolar bit stream
the output ranges over 0 … M1³, which needs `1 + 3·log2(M1)` bits: 13 for
M1 = 16.

The ratio is programmable up to 64, but the width stays 13 bits, as on the
original chip. For M1 = 24 … 64 the output is therefore the true comb value
modulo 8192. A wider `WIDTH` fixes that (19 bits covers 64), but
`cla_adder` needs `WIDTH − 1` to be a multiple of 4, so use 17 or 21.

### Ratio control and timing

`pdiv` emits a strobe every R+1 clocks. `divide8` counts eight of those
strobes and then raises `acc_res` for one clock, so M1 = 8·(R+1).

`divide8` also produces `fb_1 … fb_4`. These are `acc_res` delayed by 0, 1,
2 and 3 clocks, and they load, in turn:

* the hand-over register;
* the two differentiators;
* the output register.

Each low-rate stage therefore sees the settled result of the stage before it.

Let the dump strobe be high in cycle T, and let `data(t)` be the bit sampled
at the clock edge that ends cycle t (cycles counted from reset release).
Then `q_valid` is high in cycle T+4, and

    q = Σ_k h[k] · data(T − 3 − k)   (mod 2^13)

where h is the impulse response of H(z): three length-M1 boxcars convolved.
The first dump is in cycle M1 − 1, and one follows every M1 cycles after it.
A new `r` takes effect at the next pre-divider strobe. Reset the block after
changing `r` if the first output must be clean.

### The adders

The original chip got its speed from the adder design, and the RTL keeps that
structure so the logic can be studied.

* `sdcfl_full_adder` is the seven-gate full adder. It has one AOI22 gate for
  A xor B, an OAI22 gate for the sum, an AOI22 gate for the carry, and
  inverters. Its carry-out is active low. The mirrored cell
  (`CIN_ACTIVE_LOW = 1`) takes an active-low carry and gives an active-high
  one: its carry gate sees inverted inputs and becomes an OAI22.
* `alt_carry_adder` alternates the two cells. This removes every inverter
  from the ripple path. The differentiators use it, because they run at the
  low rate.
* `cla_adder` is three 4-bit look-ahead groups (`cla4`) plus the sum half of a
  full adder for bit 12. The two integrators use it, because they run at the
  bit rate.

The gate types come from the source design. The pin-to-pin wiring of the cell
is inferred from those gate types and the cell's function.

## Stage 2: the half-band decimator (`halfband_decimator`)

### Why it needs only 13 multiplications per output

A half-band filter of length 51 has two useful properties:

* Every odd tap is zero except the centre tap, h(25) = ½.
* The even taps are symmetric: h(2m) = h(50 − 2m).

Decimating by 2 in polyphase form gives

    y(n) = Σ_{m=0}^{12} h(2m) · [x(2n−2m) + x(2n−50+2m)]  +  ½ · x(2n−25)

So each output needs:

* 13 additions of sample pairs and 13 multiplications, which share one
  multiplier;
* one shift for the centre tap.

All of this runs at the output rate.

Samples alternate between two branches; the first sample after reset is
even:

* Even samples x(2n) go to the rotating **top register**.
* Odd samples go to the plain **bottom register**, a 13-word delay line whose
  last word is x(2n−25).

### The rotating top register (`hb_top_shift_reg`)

This is the least obvious part of the design. The register holds the 26
newest even samples in two circular paths, and each clock it must present one
symmetric pair at its two taps. The two paths are:

* a **lower path** of 13 words;
* a **higher path** of 15 words.

A single selector signal S controls both paths:

* **S = 0 (one clock per even sample, `shift_in`).** The new sample enters
  the lower path. The lower path's last word moves into the higher path. The
  higher path's last word is dropped.
* **S = 1 (the next 13 clocks, `rotate`).** Each path feeds its last word back
  to its first.

A period is 14 clocks and the higher path is 15 words long. The higher path
therefore slips one place per period relative to the lower path. Its contents
end up in the reverse age order, which is what pairs the newest samples of
the lower path with the oldest samples of the higher path.

Let x_e(n) be the newest even sample. After clock k of a period (k = 0 is the
S = 0 clock):

    tap_lo = x_e(n − (12 − k))      tap_hi = x_e(n − 13 − k)

Over k = 0 … 12 these are the pairs (x24,x26), (x22,x28), …, (x0,x50), in
full-rate sample numbering. They meet coefficients h(24), h(22), …, h(0).

This is the source design's scheme: two rotating paths, a selector that is 0
only on the first clock, and the lower path's last word feeding the higher
path. The path lengths and tap positions are this design's own. They were
chosen by a search over path lengths of 10 to 15 words and all tap positions,
which found this as the only combination that delivers all 13
pairs with one tap per path. Any NP-pair version works with paths of NP and
NP+2 words and NP+1 clocks.

### Arithmetic and sequencing

`hb_control` drives a 14-clock sequence for each even sample:

* **Clock 0:** load (`shift_in`), clear the accumulator, and capture x25.
* **Clocks 1 … 13:** rotate, read ROM address 12, 11, …, 0, and accumulate.
* **Clock 13** (`last`) also writes `y = acc + product + (x25 << 9)`.

`y_valid` pulses 14 clocks after the even sample. Even samples must be at
least 14 clocks apart, so input samples must be at least 7 apart. An
assertion checks this.

In the main configuration, samples arrive every 16 clocks. The 16 ns output
period is 32 clocks, against the 14 the sequence needs.

`hb_arith` does the arithmetic:

* a 10-bit + 10-bit pre-adder, giving 11 bits;
* an 11 × 11 signed Baugh–Wooley array multiplier (`par_multiplier`);
* a 22-bit (S + C + 1) accumulator and output.

The 22-bit width holds the largest possible output of these coefficients:
1024 · 637 + 512 · 512 < 2^21.

### Coefficients (`hb_coeff_rom`)

The source design specifies only the following:

* the filter length, 51;
* 11-bit coefficients;
* the half-band structure;
* a response curve: pass band to about 28 MHz, stop band from about 34 MHz at
  about −50 dB, for a 125 MHz input rate.

The stored values are this design's own. They come from an equiripple
(Parks–McClellan) design with 51 taps, pass band 0–28 MHz and stop band from
34.5 MHz at fs = 125 MHz. Each value is rounded as `round(h · 1024)`, the odd
taps are forced to 0 and the centre tap to 512:

| m      | 0 | 1  | 2 | 3  | 4 | 5   | 6  | 7   | 8  | 9   | 10 | 11   | 12  |
|--------|---|----|---|----|---|-----|----|-----|----|-----|----|------|-----|
| h(2m)  | 3 | −3 | 4 | −6 | 9 | −12 | 16 | −22 | 29 | −41 | 61 | −106 | 325 |

After rounding, the filter keeps about 45 dB of stop-band attenuation and
under 0.05 dB of pass-band ripple. The DC gain is 1026/1024. To use other
coefficients, replace the table; any symmetric 51-tap half-band set with
|Σ| small enough for 22 bits works.

## Top level (`two_stage_decimator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | bit clock; synchronous active-high reset |
| `data` | in | 1 | sigma-delta bit, one per clock (1 counts as +1, 0 as 0) |
| `r` | in | 3 | comb ratio M1 = 8·(r+1); r = 1 is the main configuration |
| `comb_q`, `comb_valid` | out | 13, 1 | first-stage output, unsigned, modulo 2^13 |
| `y`, `y_valid` | out | 22, 1 | final output, signed, scale 2^10 per input LSB |

The second stage takes 10 bits of the first stage's output: bits 12:3 with
bit 12 inverted. This turns the unsigned comb count into a two's complement
sample, centred at 4096, which is the comb's mid-scale for M1 = 16. That
coupling is this design's choice, and the source says nothing about it. The
final output therefore equals `(comb_q/8 − 512)` filtered, times 1024.

Shared constants live in `decim_pkg`:

| constant | value |
|---|---|
| `COMB_W` | 13 |
| `HB_N` | 51 |
| `HB_S` | 10 |
| `HB_C` | 11 |
| `HB_NP` | 13 |
| `HB_YW` | 22 |

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/decim_pkg.sv tb/tb_two_stage_decimator.sv --top-module tb_two_stage_decimator
./obj_dir/Vtb_two_stage_decimator
```

(Replace the testbench name for the others.) The testbenches draw random
numbers with `$urandom`. The random draws are fixed by Verilator's seed.

What each testbench compares against:

* **`tb_two_stage_decimator`** runs the design at its default sizes. A
  second-order sigma-delta modulator model turns a sine wave into bits. The
  run uses M1 = 16, 8, 32 and 64 in turn, with a reset between them. Every
  comb word is compared with a direct convolution of the bits (modulo 2^13).
  Every final word is compared with a direct-form 51-tap FIR of the coupled
  samples. Final words must come every 2·M1 clocks (32 clocks, 16 ns at
  2 GHz, for M1 = 16). The testbench also requires that each mechanism
  happened at least once:
  * ratio changes;
  * dumps;
  * the bit counter wrapping around;
  * comb outputs beyond 13 bits;
  * top-register rotations;
  * non-zero centre-tap terms.
* **`tb_dynamic_range`** measures the main configuration with a sigma-delta
  encoded sine at half of full scale. It least-squares fits 256 output
  words. The result is a SINAD of 51.3 dB, which puts the noise floor about
  57 dB below a full-scale sine; the original design states 56 dB of dynamic
  range for this configuration. The 10-bit coupling between the stages is
  the main limit: widen it (and `HB_S`) for more.
* **`tb_comb_decimator`** checks four ratios against the convolution. It also
  checks the output rate and the T+4 latency.
* **`tb_halfband_decimator`** uses random and full-scale square-wave inputs
  with 7 to 12 clocks between samples. It checks against the direct form and
  checks the 14-clock latency.
* **`tb_hb_top_shift_reg`** checks the pair formula above on every clock.
* **The adder and multiplier testbenches** compare against integer
  arithmetic: exhaustively for the full-adder cell, on corner and random
  operands for the others.

All testbenches pass.

## Departures from the source design, and how far to trust this RTL

* **Single clock with enables.** The chip used several clocks: the divided
  clock, `fb_1 … fb_4`, and a buffered fast clock. Here these are one-clock
  strobes. The timing of the chip's `divide8` outputs was not specified, so
  the 0/1/2/3-clock stagger is this design's choice.
* **Register timing.** The chip's latches are modelled as edge-triggered
  registers.
* **Chosen parts.** The following are the design's own: the reset behaviour,
  the encoding of the ratio input (M1 = 8·(R+1)), the input handshake of the
  second stage, the stage coupling and the filter coefficients.
* **Top-register sizes.** The top register's path lengths (13 + 15 words)
  differ from the published sketch (12 + 14 words plus taps). That sketch's
  exact labels could not be made to produce all 13 pairs. The function
  (y as defined above) is what the testbenches verify.
* **One accumulator register.** The source's cell count budgets four
  accumulator words; a single 22-bit register is enough for the sequence
  used here.
* **Comb width.** The comb keeps 13 bits for all ratios, as on the original
  chip. It is therefore exact only up to M1 = 16.

## Not in the RTL

The source design also covers parts with no logic function:

* the transistor-level SDCFL NAND gate;
* the clock buffer;
* the ring-oscillator test chip used to measure adder delay;
* its 50 Ω output driver.

It also reports speed, power and area figures (2 GHz, 2.2 W and 4525
transistors for the comb stage). Those are properties of the GaAs
implementation, not of this RTL.

## Files

* `rtl/decim_pkg.sv` — shared constants.
* **Stage 1:**
  * `rtl/sdcfl_full_adder.sv`, `rtl/alt_carry_adder.sv`, `rtl/cla4.sv`,
    `rtl/cla_adder.sv` — adders;
  * `rtl/bit_counter.sv`, `rtl/comb_integrator.sv`, `rtl/acc_dump.sv`,
    `rtl/comb_differentiator.sv` — filter stages;
  * `rtl/pdiv.sv`, `rtl/divide8.sv` — ratio control;
  * `rtl/comb_decimator.sv` — the stage.
* **Stage 2:**
  * `rtl/hb_coeff_rom.sv`, `rtl/hb_top_shift_reg.sv`,
    `rtl/hb_bottom_shift_reg.sv`, `rtl/par_multiplier.sv`, `rtl/hb_arith.sv`,
    `rtl/hb_control.sv` — parts;
  * `rtl/halfband_decimator.sv` — the stage.
* **Top:** `rtl/two_stage_decimator.sv`.
* `tb/tb_*.sv` — one testbench per module (none for the `cla4` helper, which
  `tb_cla_adder` covers).
