# Two-stage comb decimators for sigma-delta ADCs

A sigma-delta modulator produces a coarse (1- to 4-bit) code at a rate tens
to hundreds of times above the signal's Nyquist rate. The decimator behind it
must low-pass filter that stream and bring the rate down by the
oversampling ratio M. Comb filters do the first and largest part of this job
because their coefficients are all one. They come in two classic forms, and
each is good at one thing only:

* **CIC (recursive comb).** K integrators at the full input rate, then
  K differentiators at the low rate. The area is small, but every integrator
  runs at the full word length and the full clock rate, so power is high.
* **Non-recursive comb.** A chain of decimate-by-2 stages, each
  (1 + z^-1)^K. Each stage halves the rate, so power is low. The word grows
  stage by stage, though, and the total area grows roughly with the square of
  log2 M.

This RTL uses a **two-stage structure** that gets the best of both. A short
non-recursive comb first lowers the rate by a small factor M1 (4 for
M = 512). A CIC then does the remaining factor M2 = M / M1. The CIC
integrators, the only full-width, always-running circuits, now run M1 times
slower, so power is close to that of the non-recursive comb. The
non-recursive part stays only a few stages long, so area is close to that of
the CIC. Referred to the input rate, the transfer function is

    H_P(z) = [ prod_{i<log2 M1} (1 + z^-2^i)  *  (1 - z^-M2) / (1 - z^-1) ]^K

which is exactly the response of a single comb of length M. Only the
implementation differs.

The same idea is built out into a family of structures:

* Other factorisations of M: even factors, powers of three and multiples of
  three.
* *Modified* structures with extra sections at the low rate, for better alias
  rejection.
* Two *corrected* structures. They add a small multiplierless FIR filter at the
  low rate that flattens the comb's passband droop and raises the attenuation
  of the odd folding bands.

The top level puts these decimators behind an fs/4 digital down-converter
(DDC) for a band-pass modulator.

## Top level: `bp_sdm_ddc_top`

```
                  +--------------------+   I  +------------------------------+
 bp_code  ------> | fs/4 quadrature    |----->| corrected-1, M=512 (4*64 |C3|2) |--> i_data
 (fs, WIN bits)   | mixer (1,0,-1,0)   |   Q  +------------------------------+
                  |                    |----->| corrected-1, M=512            |--> q_data
                  +--------------------+      +------------------------------+

 lp_code  --+--> Direct-1           4 * 36                 --> dir1_data
 (fs)       +--> Direct-2           2 * 72                 --> dir2_data
            +--> Direct-3           2 * 3 * 24             --> dir3_data
            +--> Modified-Direct-1  2 * 36 * 2  (K+1 last)  --> mod1_data
            +--> Modified-Direct-3  2 * 24 * 3  (K+1 last)  --> mod3_data
            +--> Polyphase-4        3(poly) * 48           --> pp4_data
            +--> Corrected-2        2 * 36 * [sharpened C1, 2] --> cor2_data
```

The top has two independent parts:

* **Down-converter (`bp_*`, `i_*`, `q_*`).** A band-pass modulator with its
  notch at fs/4 feeds `bp_code`. Multiplying by e^{-j pi n/2} needs only
  +1, 0 and -1, so the mixer passes, zeroes or negates each sample. The I and
  Q streams then each go through a corrected-1 decimator (M = 512, K = 3,
  corrector C_3).
* **M = 144 bank (`lp_*`).** One low-pass modulator stream feeds seven
  structures in parallel. They all decimate by 144 with K = 3 but trade power,
  area and alias rejection differently. Every branch can be read out at the
  same time, which makes them easy to compare.

Parameters: `WIN` (input code width, default 2) and `K` (number of cascaded
comb sections, default 3). The output widths are derived parameters. The
factorisations above are fixed in the top; each sub-block takes them as
parameters.

## The two-stage decimator (`two_stage_decimator`)

One parameterised module builds the whole family. Stages in order:

1. `N_DEC2` decimate-by-2 stages, each `(1 + z^-1)^K`.
2. `N_DEC3` decimate-by-3 stages, each `(1 + z^-1 + z^-2)^K`.
3. A CIC decimating by `M2`.
4. An optional last non-recursive stage: decimate by `FINAL_N` with
   `K_FINAL` sections, in direct form or, with `FINAL_POLYPHASE = 1`, in
   polyphase form.

Stages 1 and 2 are built in direct form, or in polyphase form when
`POLYPHASE = 1`.

| structure | M | parameters |
|---|---|---|
| proposed, power of two (default) | 512 = 4 * 128 | `N_DEC2=2, M2=128` |
| proposed, optimum for M = 1024 / 2048 / 4096 / 8192 | M1 = 8, 8, 16, 16 | `N_DEC2=3` or `4`, `M2=M/M1` |
| modified, power of two (K1 cosine filters) | 512 = 4 * 64 * 2 | `N_DEC2=2, M2=64, FINAL_N=2, K_FINAL=K+K1` |
| Direct-1 / Polyphase-1 | 4 * L1 | `N_DEC2=2, M2=L1` (`POLYPHASE=1`) |
| Direct-2 / Polyphase-2 | 2 * L | `N_DEC2=1, M2=L` |
| Direct-3 / Polyphase-3 | 2 * 3 * N2 | `N_DEC2=1, N_DEC3=1, M2=N2` |
| Modified-Direct-1 | 2 * L1 * 2 | `N_DEC2=1, M2=L1, FINAL_N=2, K_FINAL=K+K1` |
| Modified-Direct-3 | 2 * N2 * 3 | `N_DEC2=1, M2=N2, FINAL_N=3, K_FINAL=K+K1` |
| Modified-Polyphase-1 / -3 | as the two rows above | add `POLYPHASE=1, FINAL_POLYPHASE=1` |
| NR-CIC-1 | 3^P | `N_DEC3=log3 M1, M2=M/M1` |
| NR-CIC-2 | 729 = 9 * 81 | `N_DEC3=2, POLYPHASE=1, M2=81` |
| Polyphase-4 | 3 * L | `N_DEC3=1, POLYPHASE=1, M2=L` |

How to choose M1: make it as small as you can while the power is already
near that of a full non-recursive comb.

* Powers of two: M1 = 4 for M = 512, 8 for M = 1024 and 2048, 16 for
  M = 4096 and 8192.
* Powers of three: M1 = 9 for the polyphase form at M = 729, and M1 = 3 for
  the direct form at M = 3^10.
* Multiples of three in general: Polyphase-4 (decimate by 3 in polyphase
  form, then a CIC) is the practical choice. Prime factors of 5 or more in
  the first stage cost too much area.

### Why the modified structures are exact

The power-of-two modified structure adds K1 "cosine" filters
0.5 (1 + z^-M/2) at a low rate. Splitting the CIC makes this a plain
parameter choice:

    (1 - z^-M2)/(1 - z^-1) = (1 - z^-M2/2)/(1 - z^-1) * (1 + z^-M2/2)

So "CIC by M2 with K sections, then K1 cosine filters, then down-sample by 2"
is the same filter as "CIC by M2/2, then a (1 + z^-1)^(K+K1) stage that
decimates by 2". Each extra section improves the worst-case alias attenuation
by about 8.3 dB, in the odd folding bands. With
K = 3 and K1 = 2 the worst case goes from about -30 dB to about -46 dB. Keep
K1 < K, or the later folding bands stop decaying. The Modified-Direct
structures work the same way, with K1 = 1 extra section in the last /2 or /3
stage.

## Droop correction

### Corrected-1 (`corrected1_decimator`, `corrector_filter`)

    H(z) = H_P(z) * C_K(z^(M/2))

The corrector C_K is a short symmetric FIR filter with small integer
coefficients, chosen by K only:

| K | C_K(z) coefficients, z^0 first | sum | growth |
|---|---|---|---|
| 1 | -3 2 17 17 2 -3 | 32 | 6 bits |
| 2 | 1 -1 -5 3 18 18 3 -5 -1 1 | 32 | 6 |
| 3 | 1 -1 -6 2 21 21 2 -6 -1 1 | 34 | 6 |
| 4 | 1 1 -2 -8 1 24 24 1 -8 -2 1 1 | 34 | 7 |
| 5 | 1 2 -2 -11 0 27 27 0 -11 -2 2 1 | 34 | 7 |

C_K(z^(M/2)) must run at 2 fs / M, one octave above the output rate. So the
CIC decimates by only M2/2, but with a comb differential delay of 2
(`CIC_D = 2`), which keeps the response of an M2 CIC. The corrector then keeps
every second result and provides the last factor of two. Every tap is a shift
and add (`decim_pkg::mul_const` sums shifted copies for the set bits of the
constant), so no multiplier is used. The C_3 version reaches about -61 dB of
worst-case alias attenuation and compensates the passband droop.

### Corrected-2 (`corrected2_decimator`, `sharpened_corrector`)

Correctors for larger K need more adders. Corrected-2 instead always uses the
simplest corrector, plus a sharpened filter. With

    G(z) = C_1(z) (1 + z^-1) = -3 -1 19 34 19 -1 -3      (gain 64)
    S(z) = 128 z^-3 G(z) - G(z)^2                        (= 64^2 (2H - H^2), H = G/64)

the last stage computes S(C_1(x)) at the output rate of the two-stage part
and down-samples by 2, so M = M1 * M2 * 2. The z^-3 matches the group delay
of H on the linear term, which keeps the sharpened filter linear-phase. The
1/64 normalisation is folded into the integer gain. This stage does not
depend on K.

## Arithmetic, gain and word widths

Nothing is ever rounded or truncated. Each stage widens the word by
ceil(log2(sum |h|)) of its own impulse response h:

* a /N comb stage by ceil(log2 N^K);
* the CIC by ceil(log2 (M2 * D)^K);
* a corrector by 6 or 7 bits;
* the sharpened stage by 6 + 15 bits.

The output is therefore the exact integer convolution. It still carries the
filter gain, which is M^K for the plain structures and 34 * 512^3 for the
I/Q outputs. Divide by the gain, or keep the top bits, to get a
normalised sample. The full-scale value -2^(WIN-1) * M^K fits the word
exactly. The CIC integrators wrap in two's complement, and the wrap cancels
in the combs because the word is wide enough.

Default widths:

| output | width |
|---|---|
| I/Q | 36 bits |
| Direct-1, Direct-2, Direct-3, Polyphase-4 | 24 bits |
| Modified-Direct-1 | 25 bits |
| Modified-Direct-3 | 26 bits |
| Corrected-2 | 42 bits |

`decim_pkg` computes all widths at elaboration, using 64-bit arithmetic.
Configurations must therefore stay below 64-bit words, which holds up to the
3^10 example (50 bits).

## Streams, rates and timing

Everything runs on one clock, at or above the modulator rate. Each block
takes an `in_valid` / `in_data` sample stream and produces an
`out_valid` / `out_data` stream:

* `out_valid` is a one-cycle pulse.
* `out_data` holds its value until the next output.
* `in_valid` may have gaps. Idle cycles change nothing.

Every stage keeps a phase counter, which acts as the clock divider for the
next stage: the next stage uses the `out_valid` pulses as its clock enable.
Each decimating stage keeps the result that contains the last input of its
group. Output m of a decimator by M is therefore

    y[m] = sum_j h[j] x[M(m+1) - 1 - j]

where h is the overall impulse response at the input rate. A later stage adds
no half-sample offsets.

Latency counts clock cycles from the last input an output contains. Each
registered stage adds one cycle:

| path | latency |
|---|---|
| M = 512 two-stage | 3 cycles |
| corrected-1 | 4 cycles |
| corrected-2 | 4 cycles |
| DDC I/Q (mixer + corrected-1) | 5 cycles |
| Direct-2, Polyphase-4 | 2 cycles |
| Direct-1, Direct-3, Modified-Direct-1/3 | 3 cycles |

Sums inside a stage are combinational, up to K + 1 wide adders (or one tap sum
in the polyphase and corrector blocks) between registers. At very high input
rates, retime or pipeline the first-stage sections.

Reset is synchronous and active low. It clears all state, including the
mixer's oscillator phase.

## Down-converter (`fs4_quadrature_mixer`)

I[n] = x[n] cos(pi n/2) and Q[n] = -x[n] sin(pi n/2), so the sequences are
1, 0, -1, 0 and 0, -1, 0, 1. The oscillator phase advances once per accepted
sample. The outputs are one bit wider than the input, so negating the most
negative code stays exact. Only the fs/4 notch is supported. A modulator
tuned to another notch frequency would need a real NCO (a sine/cosine
generator) and true multipliers, and neither is included.

## Verification

Each block has a self-checking testbench in `tb/`:

* The reference in `tb/tb_ref_pkg.sv` builds each structure's impulse response
  by polynomial algebra. It uses boxcars, powers, up-sampled copies (noble
  identity) and the corrector polynomials typed in from the table above, and
  shares no code with the RTL.
* Every output is checked for value and for latency in cycles.
* The number of outputs must equal the number of inputs divided by M.
* The input valid strobe has random gaps.
* Stimulus runs in phases: random full-range codes, long constant runs at both
  extremes (to reach the full-scale output), and random ±1 bitstreams.
* Testbenches also instantiate the other configurations listed in the
  structure table:
  * Direct-3, and Polyphase-1, -2, -3 and -4;
  * NR-CIC-2 at M = 729, and M = 1024;
  * the modified M = 512 structure with K1 = 2, and Modified-Polyphase-1
    and -3;
  * corrected-1 with K = 2;
  * corrected-2 with K = 5, and with M = 128.

`tb_large_decimation` covers the largest factors:

* M = 4096 = 16 * 256 and M = 8192 = 16 * 512;
* NR-CIC-1 at M = 243 and at its full size, M = 3^10 = 59049 = 3 * 19683.

The last of these has an impulse response of about 177,000 taps and takes
under a minute to simulate.

`tb_bp_sdm_ddc_top` runs the whole top at its default parameters. It adds a
fifth stimulus phase driven by two behavioural modulators, which are
testbench code only:

* a second-order one-bit low-pass modulator with a 0.5-amplitude sine input;
* the same loop with z^-1 replaced by -z^-2, which makes a band-pass
  modulator with its notch at fs/4, driven by a tone fs/8192 above the notch.

After the filter gain and delay are removed, the checks are:

* the Direct-1 and Corrected-2 outputs follow the sine to within 0.03;
* the magnitude of the I/Q output stays at 0.25 ± 0.03.

The testbench counts the idle cycles, the outputs of every branch and how
often each branch reached full scale, and it fails if any of these never
happens.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/decim_pkg.sv tb/tb_ref_pkg.sv tb/tb_bp_sdm_ddc_top.sv \
    -y rtl -y tb --top-module tb_bp_sdm_ddc_top -o sim
./obj_dir/sim
```

Use the same command with another `tb/tb_<block>.sv` to run that block's
testbench. Each testbench prints `TB_RESULT checks=N failures=F` at the end.
The full-size top test takes under a second.

## What this RTL does and does not cover

**Built:** all the comb-based decimation structures described above, the two
corrector schemes, and the fs/4 down-converter.

**Not built, with the reasons:**

* **The modulators.** These are fourth-order LC-resonator continuous-time
  band-pass modulators with a notch tunable from 0.1 fs to 0.4 fs, a B-bit
  flash quantizer, and an FIR feedback DAC (RZ, NRZ or raised-cosine)
  implemented with current steering. They are analog circuits, so here they
  are represented only by the input ports (and, in the testbench, by simple
  discrete-time models).
* **A general NCO** for notch frequencies other than fs/4. It would be a
  sine/cosine lookup table driven by a phase accumulator, plus two true
  multipliers. It is treated as a standard component outside this design.

**Choices made here where the source structures leave room:**

* **Widths and gain.** Full precision everywhere, with no pruning and no 1/M
  scaling.
* **Interface.** The valid-strobe interface, and keeping the last sample of
  each group when decimating.
* **DDC structure.** The top pairs the DDC with the corrected-1 structure.
* **Factorisations of M = 144.** Direct-3 decimates by 2 before 3.
  Modified-Direct-3 uses 2 * 24 * 3, Polyphase-4 uses 3 * 48, and corrected-2
  at M = 128 uses 2 * 32 * 2.
* **Table fixes.** The fifth coefficient of C_4 is read as z^-4, and the
  missing z^-4 and z^-7 terms of C_5 as 0.
* **Sharpening delay.** The exact form of the corrected-2 sharpening stage:
  the z^-3 delay on its linear term.
* **Polyphase and corrector arithmetic.** The polyphase and corrector taps use
  plain binary shift-and-add without subexpression sharing or symmetric
  pre-addition. Adder counts therefore differ from hand-optimised versions,
  for example the 11 full-width adders of a hand-built C_3.

No power or area figures are claimed. The relative power and area savings
quoted above (for example about 47 % less power than a CIC for Direct-1 at
M = 144) come from gate-level and FPGA implementations of these structures,
not from this RTL.

## Files

* `rtl/decim_pkg.sv`: word-growth functions, comb and corrector coefficient
  tables, shift-and-add constant multiply.
* `rtl/nr_comb_stage.sv`: direct-form /N comb stage.
* `rtl/polyphase_comb_stage.sv`: polyphase /N comb stage.
* `rtl/cic_decimator.sv`: CIC with differential delay D.
* `rtl/two_stage_decimator.sv`: the configurable two-stage structure.
* `rtl/corrector_filter.sv`, `rtl/corrected1_decimator.sv`: corrected-1.
* `rtl/sharpened_corrector.sv`, `rtl/corrected2_decimator.sv`: corrected-2.
* `rtl/fs4_quadrature_mixer.sv`: fs/4 DDC mixer.
* `rtl/bp_sdm_ddc_top.sv`: top level.
* `tb/tb_ref_pkg.sv`: reference models.
* `tb/tb_<module>.sv`: testbenches.
