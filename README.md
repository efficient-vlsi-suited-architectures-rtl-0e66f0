# Multiplier-free Daubechies-4 wavelet transform: a CORDIC lattice filter pair, carry-pipelined and folded over three octaves

A one-dimensional discrete wavelet transform (DWT) passes a signal through a lowpass
filter H(z) and a highpass filter G(z), keeps every second output of each, and repeats
the split on the lowpass half. Three such octaves give four bands: the highpass band
of each octave and the lowpass band of the last one.

This design computes that transform with the Daubechies wavelet of length 4, using no
multipliers. The filter pair is built as an **orthogonal lattice** whose rotations each
need only one CORDIC step: two adders and a hard-wired shift. The constant gain that
the CORDIC steps leave behind is cancelled by a scaling factor K, itself two adders
per line at 16 bits. The whole filter pair has **10 word-level adders**. Each adder's
carry chain is cut by a register every B bits, so the clock rate does not depend on the word length.
**One filter pair serves all three octaves** ("word-level folding"), and the design
accepts one input sample per clock cycle.

```
 x_in ─────────► commutator 0 ─► hold 0 ─┐
 h of octave 0 ─► commutator 1 ─► hold 1 ─┼─► arbiter ─► CORDIC lattice ─► h_out, g_out, out_oct
 h of octave 1 ─► commutator 2 ─► hold 2 ─┘  (+ tag)      filter pair        │
        ▲                                                                   │
        └──────────────── h of octave o feeds commutator o+1 ◄──────────────┘
```

## 1. The filter pair as a lattice of CORDIC steps (`cordic_dwt_lattice`)

The input is split into its polyphase components: the even sample x(2m) goes to the
upper line u and the odd sample x(2m+1) to the lower line l. Each pair then passes
through the following steps:

| step | operation on (u, l) | angle |
|---|---|---|
| scale | u·K, l·K (K is built twice, once per line) | |
| rotation 1, s = 0, σ = −1 | u' = u + l, l' = l − u | −45.00° |
| rotation 2, s = 2, σ = −1 | u' = u + l/4, l' = l − u/4 | −14.04° |
| z⁻¹ | l is replaced by the l of the previous pair of the same octave | |
| rotation 3, s = 2, σ = +1 | h = u − l/4, g = l + u/4 | +14.04° |

A CORDIC step with shift s computes u' = u − σ·2⁻ˢ·l and l' = l + σ·2⁻ˢ·u. This is a
rotation by σ·arctan(2⁻ˢ), scaled up by √(1+2⁻²ˢ). The exact Daubechies-4 lattice needs
the angles β1 = −60° and β2 = +15°. Here β1 ≈ −45° − 14.04° = −59.04° and β2 ≈ +14.04°.
The angles add up to exactly −45°, which keeps G's response to a constant input at
exactly zero (the first vanishing moment), whatever the approximation error. The
lattice stays orthogonal, so its inverse exists in the same form.

**K.** The three steps together have a gain of 1/K, where
K = cos 45° · cos²(arctan ¼) = (1/√2)·(16/17) = 0.66551. K is built as a canonical
signed digit (CSD) constant. Its digits are the truncated binary expansion of 2/3,
2⁻¹ + 2⁻³ + 2⁻⁵ + 2⁻⁷. Longer words get more digits, chosen automatically from W:

| W | digits of K | K' | error | adders for K (both lines) | adders, whole filter pair |
|---|---|---|---|---|---|
| ≤ 8 | 2 | 0.625 | −6.1 % | 2 | 8 |
| 9 – 16 | 3 | 0.65625 | −1.4 % | 4 | 10 |
| > 16 | 4 | 0.6640625 | −0.2 % | 6 | 12 |

Both outputs are scaled by the same factor, so orthogonality is kept up to the gain
K'/K. `cordic_scale` also takes other digits and signs through its parameters.

The resulting filters, as built at 16 bits (the gain 0.9861 = 0.65625/0.66551 is included):

| output | x(2m) | x(2m+1) | x(2m−2) | x(2m−1) |
|---|---|---|---|---|
| h (built) | 0.4922 | 0.8203 | 0.2051 | −0.1230 |
| h (exact Daubechies-4) | 0.4830 | 0.8365 | 0.2241 | −0.1294 |
| g (built) | 0.1230 | 0.2051 | −0.8203 | 0.4922 |
| g (exact Daubechies-4) | 0.1294 | 0.2241 | −0.8365 | 0.4830 |

Every shift truncates toward −∞ (arithmetic shift), and every sum wraps modulo 2^W.
There is no rounding. The four fractional bits of the word format absorb the
truncation error.

## 2. Cutting the carry chains: the skewed word format

This is the part of the design that is hardest to follow when reading the code.

**Slices.** Every adder is split into slices of B bits: slice k holds bits k·B to
k·B+B−1, and there are NS = ⌈W/B⌉ slices. The carry out of a slice is registered, so
the longest combinational path is one B-bit ripple. Slice k therefore has to work one
cycle after slice k−1. Inside the datapath a word travels **skewed**: slice k of a
word is k cycles behind slice 0. `word_skew` builds this triangle at the input, and
`word_deskew` removes it at the output. With B = 1 the result is the systolic,
bit-level pipeline: neighbouring bits are one cycle apart. With B ≥ W it is a plain
pipelined adder.

**Shifts across slices.** A rotation adds 2⁻ˢ·l to u. Bit j of the adder needs bit
j+s of l, and that bit lives in a later slice, so it arrives later. `skew_addsub`
therefore runs slice k at a common time, D = ⌈s/B⌉ cycles after that slice's own
input arrives. Each operand bit is delayed so that it arrives exactly then:

```
latches(j, src) = floor(j/B) + D − floor(src/B),   src = min(j + s, W−1)
```

The top s positions take the sign bit. For the unshifted operand (src = j) this gives
D latches. For the shifted one it gives fewer. For B = 1 the direct path gets s latches
plus the output register, which is the s+1 latches of a systolic rotation. The delays
are generated from this formula for any W, B and s.

**Latency.** One adder takes D + 1 cycles, and its output is again skewed, so adders
chain without de-skewing. The stage latencies at W = 16 are:

| B | scale K | rot 1 | rot 2 | rot 3 | deskew | filter pair |
|---|---|---|---|---|---|---|
| 1 (systolic) | 10 | 1 | 3 | 3 | 15 | 32 |
| 4 (default) | 5 | 1 | 2 | 2 | 3 | **13** |
| 16 (no cut) | 4 | 1 | 2 | 2 | 0 | 9 |

**The z⁻¹ in a skewed pipeline.** The pipeline registers advance every cycle, whether
or not they hold valid data. Only the z⁻¹ register (`lattice_delay`) holds state, and
in the polyphase domain it must step once per valid pair, not once per clock.
The valid flag and the octave tag therefore travel down a shift register beside the
data. Slice k of the z⁻¹ register loads under the flag delayed by k extra cycles, so
it sees exactly the cycle in which its own slice of the pair passes. An assertion
checks that these enables follow the skew.

## 3. Folding three octaves onto one filter pair (`dwt_folded`)

Octave o receives 2⁻ᵒ of the input samples, and it needs one filter-pair slot per two
of them. At one input sample per cycle, the three octaves need 1/2 + 1/4 + 1/8 = 7/8
of the slots. So one fully pipelined filter pair is enough.

- Each octave has a `polyphase_commutator`. Octave 0's takes the input. The commutator
  of octave o > 0 takes the h outputs of octave o−1 as they leave the filter pair.
- A completed pair waits in a one-pair holding register of its octave. Each cycle, the
  lowest octave with a pair waiting is issued, together with its octave tag.
- The tag selects the z⁻¹ word of that octave, so the octaves do not mix. The tag
  comes out with the result as `out_oct`.
- Octave 0 always wins arbitration, so its outputs have a fixed latency: 15 cycles
  after the odd sample at the defaults. The higher octaves wait at most a few cycles.
  An assertion checks that no holding register is overwritten.

Outputs appear in the order they are computed. The g outputs of octaves 0–2 and the
h outputs of octave 2 form the transform. The h outputs of octaves 0 and 1 also
appear on the ports.

Signal boundaries: the z⁻¹ words start at zero after reset, so a signal is treated as
preceded by zeros. Apply reset between independent signals, for example between
image rows. There is no symmetric extension at the edges.

## 4. Word length

The default is W = 16: 8 bits of pixel, 3 bits of growth for three octaves, 1 bit
for the 45° rotation (u + l can double), and 4 fractional bits. An 8-bit pixel p
enters as p·16. The lowpass gain per octave is √2·0.986, and the worst case (all
pixels 255) reaches 11057 after three octaves, against a limit of 32767.

## 5. Interface of the top, `dwt_folded`

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock; everything is on the rising edge |
| rst_n | in | 1 | synchronous reset, active low |
| in_valid | in | 1 | x_in holds a sample this cycle (gaps allowed, no back-pressure) |
| x_in | in | W | sample, two's complement |
| out_valid | out | 1 | one result pair this cycle |
| out_oct | out | ⌈log2 NOCT⌉ | octave of the result, 0 = first |
| h_out | out | W | lowpass output of that octave |
| g_out | out | W | highpass output of that octave |

Parameters: `W` (16), `B` (4), `NOCT` (3). Shared defaults live in `rtl/dwt_pkg.sv`.

## 6. Files

| file | role |
|---|---|
| `rtl/dwt_folded.sv` | top: commutators, holding registers, arbiter, one filter pair |
| `rtl/cordic_dwt_lattice.sv` | the filter pair: skew, K, three rotations, z⁻¹, deskew, valid/tag pipeline |
| `rtl/cordic_rotation.sv` | one CORDIC step (two `skew_addsub`) |
| `rtl/cordic_scale.sv` | K as three CSD digits (two `skew_addsub`) |
| `rtl/skew_addsub.sv` | (a>>>SA) ± (b>>>SB) with carry cut every B bits |
| `rtl/lattice_delay.sv` | per-octave z⁻¹ on skewed data |
| `rtl/polyphase_commutator.sv` | sample stream into (even, odd) pairs |
| `rtl/word_skew.sv`, `rtl/word_deskew.sv` | input and output triangles of the skewed format |
| `rtl/pipe_delay.sv` | shift register used for the latch chains |
| `rtl/dwt_pkg.sv` | defaults and small helper functions |

## 7. Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_dwt_ref_pkg.sv` holds a word-level model of
the filter pair, with the same truncations in the same order, and the Daubechies-4 taps.

- `tb_skew_addsub`, `tb_cordic_rotation`, `tb_cordic_scale`: random and corner-case
  words at B = 1, 2, 3, 4 and 16, and K with 2, 3 and 4 digits. The tests check the
  exact output cycle and every bit.
- `tb_cordic_dwt_lattice`: the filter pair at B = 4, 1 and 16, a three-octave copy fed
  interleaved octave tags, and 8-bit and 18-bit copies. The tests check bit-exactness against the model,
  the exact latency, and agreement with the floating-point Daubechies-4 pair to 2.5 %.
  They also check that G is zero for a constant input, and cover gaps, impulses and a
  reset with data in flight.
- `tb_dwt_folded`: the top at its defaults. Several signals are separated by resets.
  It checks every output of every octave against a cascaded model, and the octave-0
  latency. It also exercises arbitration conflicts, a constant row, input gaps and a
  reset mid-row.
- `tb_dwt_full`: the top at its defaults on a 512-pixel row at one pixel per cycle,
  three octaves (448 output pairs). The checks are bit-exactness, Daubechies-4
  agreement, no word overflow, and the lowpass gain on a constant stretch. It also
  checks that the decomposition ends within 100 cycles of the last pixel (it takes 44).

Running one with plain Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/dwt_pkg.sv tb/tb_dwt_ref_pkg.sv \
          tb/tb_dwt_full.sv --top-module tb_dwt_full
./obj_dir/Vtb_dwt_full
```

## 8. Where this RTL makes its own choices

The lattice itself follows the source architecture: the signal flow, the shifts, the
signs, the position of z⁻¹, K on both lines, the carry-cut two's-complement adders and
the 16-bit budget. The following points are this implementation's own:

- **K's digits.** Only the exact value of K follows from the rotations. The digit
  values are this implementation's own. The digit count per word length is matched to
  adder budgets of 8 (8-bit words), 10 (10 to 16 bits) and 12 (18 bits) per filter pair.
- **Common adder time.** The register placement gives every adder slice a common
  working time, ⌈s/B⌉ cycles after its input. A per-bit timing is equivalent after
  retiming. The skew and deskew triangles at the ends are also added here.
- **B = 4.** The carry-path length is a free parameter of the architecture.
- **Folding control.** The commutators, holding registers, lowest-octave-first
  arbitration, the octave tag and the per-octave z⁻¹ words are this implementation's.
  The architecture only states that one filter stage computes all octaves.
- **Interfaces.** The valid-strobe interface without back-pressure, the synchronous
  reset, truncation without rounding, and zero history at signal start.

Not in this RTL:
- A digit-serial variant, in which each octave has fewer parallel digits.
- The bit-slice layout work: the shift-wire cells, the interleaving of adder cells and
  the layout generator. These fix placement, not logic, and the logic they place is
  `skew_addsub`.
