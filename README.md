# Distributive FIR chromatic dispersion equalizer

A coherent optical receiver has to undo the chromatic dispersion (CD) that
thousands of kilometres of fibre pile onto the signal. In the time domain
this is a long complex FIR filter, N = 901 taps for a 4000 km link sampled
at 50 GSa/s. Built directly, it needs one complex multiplication per tap
pair for every output sample. This design avoids almost all of those
multiplications.

The main idea is to quantize the real and imaginary parts of every tap to
one of a few levels m/DELTA, m = -DELTA..DELTA. A coefficient value then
recurs hundreds of times across the filter. By the distributive law, the
filter can first **add up all samples that share a level** and then
**multiply each of those sums once**. The number of multiplications then
depends on DELTA alone, not on N. When DELTA is a power of two, each of
those few multiplications is a couple of shifts and at most one adder. The
datapath then has no multipliers at all: this is the *multiplierless* form,
and it is the default here.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Its defaults
are the design point described above: N = 901 taps, DELTA = 4, and
NP = 128 samples per clock (a 64 GSa/s ADC and a 500 MHz DSP clock).
There are two polarizations.

## What one output sample costs

Let x(n-k) be the window of N input samples, with M = (N-1)/2. Let
qr(k), qi(k) be the integer levels of the real and imaginary tap parts,
each in -DELTA..DELTA.

1. **Symmetric folding** (`sym_preadd`). A CD-compensating filter is
   symmetric, c(k) = c(N-1-k). So the window is folded first:
   xs(k) = x(n-k) + x(n-N+k+1) for k < M, and xs(M) = x(n-M). This costs M
   complex adders and leaves M+1 terms.
2. **Routing** (`cde_control_unit`, two instances). One instance sorts the
   M+1 folded terms by their real-part level, the other by their
   imaginary-part level. The output order is: all terms of level +1, then
   -1, +2, -2, ..., +DELTA, -DELTA, and the level-0 terms last. Level-0
   terms are never read again, so taps that quantize to zero cost nothing.
   The dispersion is fixed, so this sort is fixed wiring, computed during
   elaboration.
3. **Set sums** (`csum_tree`, 4*DELTA instances). Each group is summed by a
   binary adder tree. A group of n members costs n-1 complex adders.
4. **Differences**. For each level, S_m = sum(+m) - sum(-m), for the real
   (S_m^r) and the imaginary (S_m^i) coefficient parts. This takes 2*DELTA
   complex subtractions.
5. **One multiplication per level** (`sam_mult`). Each difference is
   multiplied by m:
   - With `MULTIPLIERLESS = 1`, `sam_mult` writes m in canonical signed
     digits and adds shifted copies of the input, e.g. 3s = 4s - s.
   - With `MULTIPLIERLESS = 0`, it uses two real multipliers.

   Level DELTA is always a plain shift. The multiplication count is
   therefore 4(DELTA-1) real multiplications, or shift-and-add units:
   4, 12 and 28 for DELTA = 2, 4 and 8.
6. **Recombination**. The products are summed over m, giving two complex
   values: y_r = sum_m m*S_m^r and y_i = sum_m m*S_m^i. They are then
   combined as y = y_r + j*y_i. Both are complex, so
   Re y = Re y_r - Im y_i and Im y = Im y_r + Re y_i.

The additions per output sample are
2 * sum_m (n_m + n_-m - 2) + 8*DELTA + N - 3. Here n_m counts the taps at
level m. With the coefficient tables built here, for N = 901:

| DELTA | multiplications | shift-and-add: shifts / extra adders | additions |
|-------|-----------------|--------------------------------------|-----------|
| 2     | 4               | 4 / 0                                | 2430      |
| 4     | 12              | 12 / 4                               | 2544      |
| 8     | 28              | 36 / 16                              | 2634      |

The published analysis of this architecture reports 2396, 2542 and 2618
additions. Those counts come from coefficients computed by a different
method, so the level multiplicities differ slightly. A direct symmetric
FIR with full-precision taps needs 1353 real multiplications and
4055 additions for the same N.

## Coefficient tables

Everything that depends on the coefficients is a constant, computed by
constant functions in `cde_pkg`:

- `coef_levels(N, DELTA, imag)` evaluates the closed-form CD-compensating
  filter c(k) ~ sqrt(jA) exp(-j*pi*A*t^2), with t = k - M and
  A = T^2 / (2*pi*|beta2|*L). It normalises by the largest real or
  imaginary part over all taps. Then it rounds DELTA*c/cmax to the nearest
  integer (ties away from zero). The result is the integer level of taps
  0..M. The other half of the filter is the mirror image.
- The link constants are `BETA2_PS2_PER_KM = -20.4`, `LINK_KM = 4000` and
  `TS_PS = 20` (50 GSa/s, two samples per 25 GBd symbol). To compensate a
  different fibre, change these constants. The hardware is re-derived when
  it is next elaborated.
- `group_offsets` and `route_perm` derive the routing and the group sizes.
  `csd_digit` derives the shift-and-add digits.
- `dfir_cde_lane`, `dfir_cde_parallel` and `cde_control_unit` also accept
  any level table through their `QR` / `QI` parameters. The testbenches use
  this for made-up tables.

With these constants the full filter would be 1283 taps long. The design
truncates it to the centre 901, which is about 70% of the full length.
Tables hold up to 1024 half-filter entries (`MAX_HALF`), so N can go up to
2047.

## Parallel organisation and timing

`dfir_cde_parallel` equalizes one polarization.

- Each clock, up to NP new samples arrive as `x_in[0..NP-1]`, oldest
  first, qualified by `in_valid`.
- `sample_buffer` keeps the N-1 samples before the current block. It shows
  a window of N + NP - 1 samples, newest first.
- Lane p reads window positions NP-1-p .. NP-2-p+N. These are exactly
  x(n), x(n-1), ..., x(n-N+1) for the p-th sample n of the block.
- All NP lanes are identical `dfir_cde_lane` instances with the same
  tables.

Each lane is one combinational stage followed by an output register. An
input block accepted at a clock edge therefore shows up equalized after
that edge: `out_valid` is `in_valid` delayed by one clock. Cycles where
`in_valid` is low hold the buffer and produce no output.

Latency, measured from a sample's arrival to the output that uses it as the
centre tap, is floor((p+M)/NP) + 1 clocks for block position p. The worst
case is ceil((M+1/2)/NP) + 1 clocks. That is 5 clocks at N = 901 and
NP = 128, i.e. 10 ns at 500 MHz. Most of the latency is waiting for the
samples after the centre tap; the processing itself takes one clock.

`dfir_cde_top` instantiates two `dfir_cde_parallel` equalizers, one each
for the X and Y polarizations. They share one set of tables and one
`in_valid`.

Reset (`rst_n`) is asynchronous and active low. It clears the sample
history and the output registers. The first N-1 outputs after reset
therefore see zeros in place of the samples that came before.

## Number format

- Inputs are 8-bit signed I and Q (`cde_pkg::cin_t`).
- From the folding step on, every node is 24-bit signed I and Q
  (`cacc_t`). No node rounds, saturates or overflows for N = 901 with DELTA
  up to 8. The worst output magnitude is N*DELTA*2^8 = 1.85 M, and 24 bits
  hold up to 8.39 M.
- The levels are integers m rather than m/DELTA. The output is therefore
  DELTA times the quantized filter output, i.e. a fixed-point value with
  log2(DELTA) fraction bits. Scaling or rounding it for later stages is
  left to the user.

## Module map

```
dfir_cde_top                 two polarizations
 └─ dfir_cde_parallel (x2)   buffer + NP lanes, out_valid register
     ├─ sample_buffer        N-1 sample history, N+NP-1 window
     └─ dfir_cde_lane (xNP)  one output sample per clock
         ├─ sym_preadd       symmetric folding
         ├─ cde_control_unit (x2) routing by real / imaginary level
         ├─ csum_tree (x4*DELTA)  set sums
         └─ sam_mult (x2*DELTA)   multiply by level m
cde_pkg                      types, widths, link constants, table functions
```

## Choices this design makes

The architecture fixes the arithmetic, but it leaves several decisions open.
This design settles them as follows:

- **Word widths** (8 bits in, 24 bits inside) and lossless integer scaling.
- **Coefficient source.** The closed-form time-domain taps are used, rather
  than an inverse FFT of the transfer function. Normalisation uses one
  maximum over the whole filter.
- **Control Units.** Fixed wiring, with no table memory. Changing the
  dispersion means re-elaborating. A run-time reconfigurable routing engine
  is not part of this design.
- **Timing.** The summation trees are one combinational stage, matching the
  latency estimate of a single processing stage. At 901 taps the deepest
  tree holds about 9 adders in series. A real 500 MHz implementation would
  add pipeline registers, which add the same number of clocks to the
  latency.
- **Interfaces.** The `in_valid` / `out_valid` strobes, the asynchronous
  reset, and one strobe shared by both polarizations.
- **Rounding.** The shift-and-add units work on the integer level, so no
  bits are shifted out. The digit set is canonical signed digit
  (non-adjacent form). For DELTA = 8 this gives 36 shifts. Another count of
  the same units gives 32, because some digit choices are equivalent.

## Verification

Every module has a self-checking testbench in `tb/`. The reference model
(`tb/cde_ref_pkg.sv`) is a plain direct-form FIR over all N mirrored taps in
64-bit arithmetic. It shares no structure with the design.

| testbench | what it shows |
|-----------|---------------|
| `tb_cde_pkg` | levels match an independent evaluation of the taps (N = 31, 901; DELTA = 2, 4, 8); the routing order is a permutation grouped correctly; the CSD digits rebuild 1..255 with no adjacent non-zero digits; shift/adder counts for DELTA = 2, 4, 8 |
| `tb_sym_preadd` | folding at N = 901, including full-scale inputs |
| `tb_cde_control_unit` | every tap lands in its level's group, exactly once; made-up table and both N = 901 tables |
| `tb_csum_tree` | sets of 0, 1, 13, 16 and 40 members |
| `tb_sam_mult` | levels 1..8, 11, 23, 45; shift-and-add and multiplier forms |
| `tb_dfir_cde_lane` | N = 901 / DELTA = 4 lane, N = 61 / DELTA = 8 with multipliers, N = 15 / DELTA = 2; one-clock timing, hold while disabled, full-scale inputs |
| `tb_sample_buffer` | window contents every cycle with gaps and a mid-stream reset |
| `tb_dfir_cde_parallel` | latency for every block position, against the formula above; random streams with gaps; NP larger than N |
| `tb_dfir_cde_top` | both polarizations end to end (N = 101, DELTA = 4, NP = 8); counts that an impulse, a stall, a reset, null taps and the adder-using level all occurred |
| `tb_workload_4000km` | the 4000 km point, N = 901, for DELTA = 2, 4, 8 (NP = 2); operation counts against the published figures |

The largest configuration simulated is N = 901 with NP = 2 lanes per
polarization. The defaults (N = 901, NP = 128, two polarizations) compile
and lint, but have not been simulated. Verilator generates about 1 MB of
C++ per lane instance, so 256 lanes is too much C++ to build in reasonable
time. The lanes are identical and independent, so the missing coverage is
the wiring of lanes 2..127 in `dfir_cde_parallel`. `tb_dfir_cde_parallel`
covers that wiring at NP = 4 and 8.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cde_pkg.sv tb/cde_ref_pkg.sv tb/tb_dfir_cde_top.sv \
    --top-module tb_dfir_cde_top -o sim
./obj_dir/sim
```

Other testbenches build the same way: give the packages first, then the
testbench, and let `-Irtl` find the modules. Each testbench ends with a
line `TB_RESULT checks=N failures=F`.

- A lane at N = 901 builds in about 10 s.
- `tb_workload_4000km` builds in about 30 s.
- Linting the full-size `dfir_cde_top` takes about a minute and 6 GB of
  memory.
