# Index-based RNS wavelet filter bank

This is a discrete wavelet transform (DWT) filter bank, analysis and synthesis, that computes in a
residue number system (RNS). Each sample is carried as a set of small residues, one per prime
modulus m_j. Every residue channel is a short, carry-free datapath that works on its own. The
filter coefficients are programmable at run time. They cost no extra tables, because each
multiplication is done in the *index domain* of GF(m_j): a product of two residues becomes a
sum of their discrete logarithms.

The default configuration is an 8-tap filter bank with one octave of analysis and one of
synthesis. Both sides cascade to more octaves by parameter.

| quantity | value |
|---|---|
| input | 8-bit two's complement |
| coefficients | 10-bit signed |
| moduli | {31, 29, 23, 19, 17}, all 5 bits wide |
| dynamic range | M = 6 678 671 (about 2^22.7), enough for a signed 21-bit result |
| binary outputs | 16 bits, scaled |

Parameters reach the other published configurations: 4 or 8 taps, 8- to 14-bit inputs, and the
6-bit modulus sets {61, 59, 53, 47, ...}.

## Arithmetic background

**RNS.** A number X in [-M/2, M/2) is held as its residues X_j = X mod m_j, where
M = prod m_j. Addition and multiplication work channel by channel, modulo m_j. The result is
exact as long as the true value stays inside the dynamic range.

**Index transform.** For a prime m, every non-zero residue q equals g^i mod m for exactly one
i in 0..m-2. Here g is a primitive root of m. The map from q to i is Phi(q), and its inverse is
Phi^-1(i) = g^i. So

    q1 * q2 mod m  =  Phi^-1( (Phi(q1) + Phi(q2)) mod (m-1) ).

A multiplier is then an adder modulo m-1 plus one 2^n x n table, where n = ceil(log2 m). Zero
has no index, so zeros are detected and handled apart: the product register is cleared instead
of loaded.

This design always uses the **smallest primitive root** of each modulus:

| m | 31 | 29 | 23 | 19 | 17 | 61 | 59 | 53 | 47 | 43 | 41 |
|---|---|---|---|---|---|---|---|---|---|---|---|
| g | 3 | 2 | 5 | 2 | 3 | 2 | 2 | 2 | 5 | 3 | 6 |

## Programming the coefficients

The coefficients are inputs of the top level, given per modulus and per tap in index form.
For a signed integer coefficient c, tap k and modulus m_j:

    r = c mod m_j                        (taken in 0 .. m_j-1)
    *_zero[j][k] = (r == 0)
    *_idx[j][k]  = the i with g_j^i = r (mod m_j), or any value when r == 0

The arrays are `ana_g_*` and `ana_h_*` for the analysis low-pass and high-pass filters, and
`syn_g_*` and `syn_h_*` for the synthesis filters. A host computes these indices once, when it
changes filters. No table in the datapath depends on the coefficients.

## Analysis channel (`rns_dwt_channel`)

One octave of analysis computes

    a_n = sum_k g_k x_(2n-k)        d_n = sum_k h_k x_(2n-k)        k = 0 .. N-1

This is filtering followed by decimation by two. The channel works in polyphase form, which is
the part that needs the most care:

* The input arrives as pairs (x_2n, x_2n+1). Two Phi tables turn the even and odd samples into
  indices and flag zeros.
* Even taps k = 2l use the even sample from l pairs back. The even line therefore has no
  register in front of tap 0, and one register between each pair of even taps.
* Odd taps k = 2l+1 use x_(2n-2l-1), which is the odd sample from l+1 pairs back. The odd line
  therefore starts with a register.
* Tap k feeds two products: g_k for the approximation and h_k for the detail. Both share the
  sample's index and its zero flag.
* Each product is an `rns_index_tap`: an adder modulo m-1 on the sample and coefficient
  indices, a Phi^-1 table, and a clearable register. The register loads zero when the sample
  or the coefficient is zero.
* Two trees of modulo-m adders (`rns_adder_tree`) add the eight g products and the eight h
  products.

The zero flags travel in registers beside the index delay line. Together they form the
"clear" shift register that drives the product registers.

**Timing.** The channel takes at most one pair per clock. The product registers load on the
clock edge that takes the pair, and the tree result is registered once more. `out_valid`
therefore follows `in_valid` by 2 clocks. After reset the delay lines hold zero samples, so
the first outputs are those of a signal that is zero before time 0.

## Synthesis channel (`rns_idwt_channel`)

One octave of synthesis rebuilds two samples of the finer signal from one approximation
sample a_n and one detail sample d_n:

    y_2n   = sum_l gs_2l   a_(n-l) + hs_2l   d_(n-l)
    y_2n+1 = sum_l gs_2l+1 a_(n-l) + hs_2l+1 d_(n-l)        l = 0 .. N/2-1

gs and hs are the synthesis low-pass and high-pass filters. There is one index delay line each
for a and d, with N/2-1 registers. Position l of each line feeds two taps, 2l and 2l+1, so one
zero flag clears two product registers.

The even output is one 8-input adder tree. Its first half sums the approximation terms and its
second half the detail terms, and the root adds the two halves. The odd output is built the same
way. Both outputs leave together, 2 clocks after `in_valid`.

For perfect reconstruction, the usual choice is gs_k = g_(N-1-k) and hs_k = h_(N-1-k). The
reconstruction then has the fixed delay and gain of that filter pair. The testbenches use the
Haar pair g = gs = {1, 1} and h = hs = {1, -1}, which gives y_2n = 2 x_2n and
y_2n+1 = 2 x_2n-1.

## Converters

**Binary to RNS (`rns_bin2rns`).** The B-bit input is cut into 4-bit groups. For every modulus,
each group addresses a 16-entry table that holds (group value * 2^(4i)) mod m_j. The input's
sign bit counts with weight -2^(B-1) inside the top group's table. A modulo-m_j adder tree adds
the table outputs. The converter has two pipeline stages: the table outputs, then the sum.

**RNS to binary (`rns_rns2bin`, epsilon-CRT).** The Chinese Remainder Theorem gives
X/M = frac( sum_j |X_j * Mj^-1|_mj / m_j ), where Mj = M / m_j. Each channel's table stores its
term scaled to n = OUT_W bits and rounded. A plain n-bit binary adder tree, with wrap-around,
adds the terms. The result is X * 2^n / M as an n-bit two's complement word: the value scaled so
that the dynamic range fills the word. No reduction modulo M is needed.

Because each table rounds, the result can be off by up to NUM_MOD/2 units in the last place.
The residue outputs stay exact; only the binary words are scaled approximations. The converter
has one stage for the tables and one register per tree level. That is 4 clocks for five moduli
and 3 clocks for four.

Every table in the design is computed at elaboration from the modulus, by functions in
`rns_pkg`. No data files are involved, and a new modulus set needs only new parameters.

## Top level (`rns_dwt_top`)

```
x --> rns_bin2rns --> rns_even_odd_split --> NUM_MOD x rns_dwt_channel --+--> d residues --> rns_rns2bin --> d_bin
                                                                          +--> a residues --> (next octave, or) rns_rns2bin --> a_bin

syn_a_res, syn_d_res[0] --> NUM_MOD x rns_idwt_channel --> even/odd residues --+
                                                                                  |  (SYN_OCTAVES > 1)
      +--------- rns_pair_serialize <---------------------------------------------+
      |
      +--> a, with syn_d_res[1] --> NUM_MOD x rns_idwt_channel --> ... --> 2 x rns_rns2bin --> rec_*_bin
```

* `rns_even_odd_split` pairs sample 2n with sample 2n+1. The first sample after reset counts as
  sample 0.
* With `OCTAVES > 1`, the approximation residues of each octave pass straight into the next
  octave's splitter. No conversion back to binary happens between octaves. All octaves use the
  same analysis coefficients.
* The synthesis path is separate, with residue inputs. Feeding its first octave the last
  analysis octave's `a_res` and `d_res` closes the analysis/synthesis loop, as the end-to-end
  tests do.
* With `SYN_OCTAVES > 1`, synthesis octaves are chained from coarse to fine.
  `rns_pair_serialize` sends the (even, odd) pair of octave s out as two consecutive samples.
  These are the approximation input of octave s+1.
* Octave s+1 pulls its detail samples. In every cycle where `syn_d_take[s+1]` is high, it
  reads the next sample of its detail sequence from `syn_d_res[s+1]`. That sequence is usually
  the matching analysis octave's `d_res`, buffered by the user.
* `syn_d_take[0]` is simply `syn_valid`. Only the finest octave's output reaches `rec_*`.
* With `SYN_OCTAVES > 1`, `syn_valid` may not be high on two consecutive clocks, because a pair
  takes two clocks to serialise. An assertion in the serialiser checks this. Analysis output
  always meets the rule, since each octave halves the rate.
* Handshake: single-cycle `*_valid` strobes with no back-pressure. Inputs may have gaps.
* Throughput: one input sample per clock, sustained. Each octave then delivers one
  (a, d) pair every second clock.
* Reset: `rst_n` is asynchronous and active low.
* Analysis latency: 5 clocks from an odd input sample to `a_valid`/`d_valid`. The binary words
  follow 1 + ceil(log2 NUM_MOD) clocks later.
* Synthesis latency: 2 clocks per octave, plus 1 clock per serialiser (2 for the odd sample).
* All residue channels run in lock step. Assertions check that their valid strobes agree.

| parameter | default | meaning |
|---|---|---|
| `B_IN` | 8 | input width |
| `N_TAPS` | 8 | filter length (even, at least 4) |
| `NUM_MOD` | 5 | number of moduli |
| `MODULI` | {31,29,23,19,17} | prime moduli |
| `W` | 5 | residue width; must be at least ceil(log2 max m_j) |
| `OUT_W` | 16 | width of the scaled binary outputs |
| `OCTAVES` | 1 | analysis octaves in cascade |
| `SYN_OCTAVES` | 1 | synthesis octaves in cascade |

**Sizing.** Choose the moduli so that M/2 exceeds the largest result,
2^(B-1) * 2^(C-1) * N_TAPS for C-bit coefficients. Examples:

* 10-bit input, 10-bit coefficients, 8 taps: {61, 59, 53, 47}, W = 6.
* 14-bit input, 12-bit coefficients, 8 taps: {61, 59, 53, 47, 43, 41}, W = 6.

In a cascade, the later octaves grow by the coefficient gain at each octave. When they leave the
range, the residues remain correct modulo M, but the value wraps.

## Where this design makes its own choices

The channel structure follows the published index-transform architecture: Phi tables, zero
detection, clear shift registers, index adders, Phi^-1 tables, clearable product registers, and
modular adder trees. The following are this design's own choices:

* **Coefficient zero flags.** The architecture clears products only for zero samples. A
  coefficient that is a multiple of m_j has no index either, so a flag per coefficient and
  modulus was added.
* **Pipelining.** Besides the delay lines, the architecture registers only the products. The output register of each
  channel, the splitter register, and the per-level registers of the epsilon-CRT tree were
  added here.
* **Sign bit in the binary-to-RNS converter.** The sign term goes into the top group's table
  instead of a separate term.
* **epsilon-CRT tables.** They use the standard scaled-CRT rounding given above.
* **Fixed configuration details.** The primitive root is fixed (the smallest). Valid strobes,
  reset, the even/odd pairing and both octave cascades are this design's.
* **Synthesis chaining.** The architecture defines one synthesis octave and rebuilds the signal
  by iterating it. Here the iteration is joined by the pair serialiser with pulled detail input.
  Buffering the detail sequences of the finer octaves until they are needed is left to the
  surroundings.

Area and clock rate results for the FPGA and standard-cell implementations that this
architecture was published with are not reproduced here.

## Files

* `rtl/rns_pkg.sv`: default sizes, and the functions that fill every table (primitive root,
  Phi, Phi^-1, converter tables).
* `rtl/rns_mod_add.sv`, `rtl/rns_adder_tree.sv`: modular adder and adder tree.
* `rtl/rns_index_lut.sv`, `rtl/rns_inv_index_lut.sv`: Phi with zero detect, and Phi^-1.
* `rtl/rns_index_tap.sv`: index-domain product with its clearable register.
* `rtl/rns_dwt_channel.sv`, `rtl/rns_idwt_channel.sv`: analysis and synthesis channels.
* `rtl/rns_even_odd_split.sv`, `rtl/rns_pair_serialize.sv`: stream splitter and its inverse.
* `rtl/rns_bin2rns.sv`, `rtl/rns_rns2bin.sv`: converters.
* `rtl/rns_dwt_top.sv`: the complete filter bank.
* `tb/`: one self-checking testbench per module, plus the end-to-end tests:
  * `tb_rns_dwt_top`: two analysis and two synthesis octaves, Haar perfect reconstruction
    through both, random and 8-tap Daubechies coefficients.
  * `tb_rns_dwt_top_full`: the same sets at the default parameters (one octave each way).
  * `tb_rns_dwt_workloads`: all ten published 4- and 8-tap configurations, through
    `tb_rns_dwt_cfg_run`.

  `tb_rns_ref_pkg` holds the testbenches' own reference arithmetic. It is independent of
  `rns_pkg`. Every testbench prints `TB_RESULT checks=N failures=F`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/rns_pkg.sv tb/tb_rns_ref_pkg.sv tb/tb_rns_dwt_top_full.sv \
    --top-module tb_rns_dwt_top_full -o sim
./obj_dir/sim
```

Replace the testbench name to run any other test. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/rns_pkg.sv rtl/<module>.sv --top-module <module>`.

The end-to-end tests compare every residue output with an integer model reduced modulo each
m_j. They compare every binary output with the model value scaled by 2^16/M, within the
converter's rounding tolerance. They also count the mechanisms they exercise, and fail if any
of them never occurs:

* zero samples and zero coefficients being cleared,
* negative results,
* gaps in the input,
* second-octave outputs,
* chained synthesis steps,
* sustained input of one sample per clock, with an output pair every second clock,
* exact Haar reconstruction.
