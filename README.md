# 3-D Daubechies wavelet transform, pipelined direct-mapped (Daub4 and Daub6)

This RTL computes a three-dimensional discrete wavelet transform of a volume of pixels, such as a stack of CT slices. It is the
transform step of a medical-image compressor. A separable 3-D transform is three 1-D transforms, one along each axis.
The design therefore builds **one** 1-D transform core and uses it three times. Two *transpose modules* sit
between the cores. Each one reorders the data, so the next core again receives plain lines of samples, now
along the next axis:

```
pixels ─► 1-D core (x) ─► slice transpose ─► 1-D core (y) ─► volume transpose ─► 1-D core (z) ─► coefficients
```

Two filters are provided, each as a complete 3-D transform:

| variant | filter | multipliers per stage | stages per 1-D core | multiply-add latency |
|---------|--------|----------------------|---------------------|-------------------|
| Daub4   | Daubechies 4-tap | 8  | 3 | 2 cycles |
| Daub6   | Daubechies 6-tap | 12 | 2 | 3 cycles |

`dwt3d_top` holds both side by side with separate ports. Daub4 is the smaller of the two. Daub6 has more
vanishing moments and so approximates smooth regions better.

## The filters and the edge problem

A Daubechies stage turns a signal x[0..L-1] into L/2 scaling (low-pass) values and L/2 wavelet (high-pass)
values:

```
s[m] = Σ_j h_j · x[(2m + j) mod L]        d[m] = Σ_j g_j · x[(2m + j) mod L],   m = 0 .. L/2-1
```

The scaling coefficients are the closed forms

* Daub4: h = (1+√3, 3+√3, 3−√3, 1−√3) / (4√2)
* Daub6: with z1 = √10 and z2 = √(5+2√10), h = (1+z1+z2, 5+z1+3z2, 10−2z1+2z2, 10−2z1−2z2, 5+z1−3z2, 1+z1−z2) / (16√2)

The wavelet coefficients are g_j = (−1)^j · h_(TAPS−1−j).

The last windows of a row reach past its end. For example, the last Daub4 window needs x[L] and x[L+1].
This is the *edge problem* of every Daubechies filter. The design treats the row as periodic, so those
samples are read as x[0], x[1], and so on. The wrap-around is done by the shifter in front of each stage
(see below). This keeps every row at exactly L coefficients, with no extra border values to store.

**Number format.** Pixels are 8-bit unsigned. Inside the design every value is an 18-bit signed integer
(`dwt_pkg::sample_t`). Coefficients are 16-bit signed with 14 fraction bits, rounded to the nearest value:

* Daub4: 7913, 13705, 3672, −2120
* Daub6: 5450, 13220, 7535, −2212, −1400, 577

Products are summed at full precision. Each sum is rounded half up once, back to 18 bits. There is no
saturation. The worst-case gain keeps all results inside 18 bits: about 1.67^9 for Daub4 with three stages
on three axes, and 1.86^6 for Daub6. Both leave margin for 8-bit pixels. The transform is exact up to this
one rounding per output. It is therefore not lossless, and not an integer-to-integer lifting scheme.

## The 1-D pipelined core (`daub_1d`)

This is the heart of the design and the part that needs the most care to follow.

### Stages form a pyramid

The core takes a row i(0)..i(N-1) and passes it through `STAGES` decomposition stages (`daub_level`). Each
stage is the same circuit:

* a **shifter** holding the samples to transform;
* **multipliers** with fixed coefficients, one per tap for h and one per tap for g;
* a **register row** behind the multipliers;
* **adders** that sum the products into s and d;
* an **output register**.

Only the scaling output s of a stage goes on to the next stage. The wavelet output d of each stage is carried
down, unchanged, to the output. Stage k therefore works on N/2^(k−1) values. The output row is in the usual
pyramid order:

```
o(0) ................................................ o(N-1)
[ s_S (N/2^S) | d_S (N/2^S) | d_(S-1) (N/2^(S-1)) | ... | d_1 (N/2) ]
```

For Daub4 with N = 8 that is `[s3 | d3 | d2 d2 | d1 d1 d1 d1]`.

To do this, a stage receives the whole N-entry row. It transforms only the first L entries. It writes s[m]
to entry m and d[m] to entry L/2+m, in place, and passes entries L..N−1 through as they are. These untouched
entries are the "bypass" registers that carry earlier detail coefficients down the pipeline.

### One output pair per cycle: the shifter

A stage has one set of multipliers, so it computes one (s[m], d[m]) pair per cycle and needs L/2 cycles per
row. It works like this (`daub_shifter`):

1. On acceptance, the first L entries are loaded into a rotating register.
2. The window is the first four positions of that register.
3. After every window the register rotates left by **two**.

After m rotations the window holds x[2m], x[2m+1], …, always modulo L. That is exactly the stride-2 window of
the formula above, wrap-around included. Rows shorter than the window wrap more than once, and that is still
correct periodic extension. One example is the 2-sample row seen by the third Daub4 stage when N = 8.

### Multiply-add stages

* **`daub4_mac`** has eight multipliers, four for h and four for g. A register row follows them, then one
  four-input adder per output, rounding, and the output register. Latency is 2 cycles.
* **`daub6_mac`** has twelve multipliers and a register row. Each output sum is split into a *head*
  (taps 0–2) and a *tail* (taps 3–5), and only the head partial sum is registered. The tail is computed one
  cycle later from the *next* window. After the shifter's rotate-by-two, window positions 1..3 of window
  m+1 hold x[2m+3..2m+5], which are exactly the tail samples of window m. A two-input adder joins the
  registered head with the fresh tail, followed by rounding and the output register. Latency is 3 cycles.

The Daub6 split has three consequences:

* Daub6, like Daub4, needs only a four-sample window per cycle.
* A Daub6 stage issues one extra window per row, L/2 + 1 in all. The extra window only completes the tail of
  the last pair.
* The head register sits in one partial-sum path only, which is easy to mistake for a missing register. It
  is what lines up the two halves of the same window.

Both stages accept a new window every cycle. A tag (the window index m) travels with each window, so the
stage knows where to write each result.

### Handshake and timing

* A stage accepts a row only when it is idle (`in_ready = !busy`).
* It issues its L/2 windows (L/2 + 1 for Daub6) and waits for the last result. It then pulses `out_valid` for one cycle, in the
  same cycle that it becomes ready again.
* Accept-to-output time of a stage is **L/2 + MAC latency + 1** cycles.
* A core takes a row every **N/2 + MAC latency + 1** cycles: 7 for Daub4 and 8 for Daub6 at N = 8.
* Latency through a core is the sum over its stages: 7 + 5 + 4 = 16 cycles for Daub4 at N = 8, and
  8 + 6 = 14 for Daub6.

Later stages work on shorter rows, so they are always idle by the time the stage before them finishes. Only
the first stage can make the input wait. An assertion in `daub_1d` checks this.

Several rows are in flight at once, one per stage. While stage 1 works on row r+1, stage 2 works on row r.

## Transposes and the order of data in 3-D (`dwt_transpose`, `dwt3d`)

**Volume layout.** The volume v[z][y][x] (N × N × N) enters as N² lines of N pixels. The lines arrive slice by
slice and row by row, so line index is z·N + y and element index is x.

**Transpose rule.** The transpose module stores a block of D = N·S lines and reads it back as

```
out_line[b·N + m][a] = in_line[a·S + b][m]        a, m ∈ 0..N−1,  b ∈ 0..S−1
```

* With **S = 1** this is an N × N transpose of each slice. Lines along x become lines along y.
* With **S = N** the whole volume is buffered, and the slice index is swapped with the element index. Lines
  along y become lines along z.

The volume transpose has to hold a complete volume before it can send its first line, because the first
z-line needs a value from the last slice.

**Banks.** Each transpose has two banks used in turn (ping-pong). One bank fills while the other drains, so
consecutive volumes stream without gaps. The banks are register arrays, so a full output line, N words from
N different input lines, is read in one cycle.

**Flow control.** The input of a transpose has no back-pressure. All three cores run at the same line rate,
so a bank is always free in time. If one is not, the line is dropped and the sticky `overflow` flag is set.
In normal use this flag stays low, and the testbenches check that.

**Output order.** The last core writes line p·N + q, with N elements indexed by r. Here p, q and r are the
x-, y- and z-frequency indices. Each index is in the pyramid order of the 1-D core. With `STAGES = 1` the
eight octants of this cube are the familiar LLL … HHH sub-bands.

**Throughput.** In steady state a volume takes N²·(N/2 + MAC latency + 1) cycles:

* 448 cycles for Daub4 at N = 8;
* 512 cycles for Daub6 at N = 8.

## Top-level interface (`dwt3d_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset of the control state (data registers are not reset) |
| `d4_in_valid` / `d4_in_ready` | in / out | 1 | Daub4 input line handshake |
| `d4_in_pix` | in | N × IW | one line of pixels |
| `d4_out_valid` | out | 1 | one-cycle pulse per output line, no back-pressure |
| `d4_out_row` | out | N × 18 | one line of coefficients |
| `d4_overflow` | out | 1 | sticky transpose overrun flag |
| `d6_*` | | | the same for the Daub6 transform |

| parameter | default | meaning |
|-----------|---------|---------|
| `N`  | 8 | volume edge and line length; a power of two, at least 2^STAGES |
| `IW` | 8 | pixel width |

Inside, `dwt3d` has two more parameters:

* `TAPS` is 4 or 6.
* `STAGES` is 3 for the Daub4 instance and 2 for the Daub6 instance.

Storage grows with N³, mostly in the volume transpose, which holds 2·N³ words. N = 8 is a small test volume.
A larger N, for example 64, is only a parameter change, but the register-array transposes then become large.
At such sizes they should be mapped to RAM with a column-wise access scheme.

## Design choices to know about

These points are this implementation's choices:

* **N = 8, the word widths and the rounding rule.** None of these numbers is fixed by the architecture.
* **Stage counts.** The stage counts are 3 for Daub4 and 2 for Daub6. Setting `STAGES = 1` gives a plain
  one-level 3-D transform with eight sub-bands.
* **Daub6 head/tail pairing.** The Daub6 stage registers only the first three-tap partial sum. It reads
  taps 3–5 from the next window, which is how the skewed partial-sum register lines up with the shifter.
* **Row handshake.** Each stage takes one row at a time. This gives up a few cycles per row (the
  multiply-add latency) in exchange for simple control.
* **Transposes.** They use two banks of flip-flops, with the gather pattern above.
* **Output order.** The output stays in (x-frequency, y-frequency) line order with z-frequency along the
  line. No third reorder is done.
* **Not included.** The image source, the inverse transform and any quality metric are not part of this RTL.

**Verification.** Every block has a self-checking testbench. The reference model (`tb/dwt_ref_pkg.sv`)
computes the coefficients from the closed forms with real arithmetic. It then evaluates the transform directly
with modular indexing and the same rounding. Results must match bit for bit, and latencies and rates are
checked to the cycle. `tb_dwt3d_top` runs the top with its default parameters. It sends three volumes through
each transform: a smooth blob, a constant full-scale volume and random data. It also confirms that each of
these happened:

* a window wrapped around a row end;
* two stages of one core were busy at once;
* the last stage produced rows;
* a transpose filled one bank while the other was being read;
* the input was held off by `in_ready`.

## Simulating

All files are SystemVerilog-2017. Each module, package and testbench is in its own file, named after it.
`rtl/dwt_pkg.sv` and `tb/dwt_ref_pkg.sv` must come first. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt3d_top.sv --top-module tb_dwt3d_top
./obj_dir/Vtb_dwt3d_top
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.

| testbench | covers |
|-----------|--------|
| `tb_daub_shifter` | wrap-around windows, long and short rows, load priority |
| `tb_daub4_mac`, `tb_daub6_mac` | inner products at full scale and random, latency; Daub6 driven with the head/tail window sequence |
| `tb_daub_level` | one stage (Daub4 full row, Daub6 on part of a row with bypass), latency |
| `tb_daub_1d` | Daub4 ×3 stages and Daub6 ×2 stages at N = 8, Daub4 at N = 16; row latency and rate |
| `tb_dwt_transpose` | slice and volume transposes, random stalls on both sides, both banks, overflow |
| `tb_dwt3d` | 3-D transform: Daub4 1-stage at N = 4, Daub4 3-stage and Daub6 2-stage at N = 8, Daub4 3-stage at N = 16, volume rate |
| `tb_dwt3d_top` | the top at default parameters, both transforms, mechanism counts |

`tb/dwt3d_driver.sv` and `tb/daub_1d_harness.sv` are the shared stimulus and checking helpers.

## Files

| file | content |
|------|---------|
| `rtl/dwt_pkg.sv` | widths, sample type, coefficient tables, rounding |
| `rtl/daub_shifter.sv` | wrap-around rotate-by-two shifter |
| `rtl/daub4_mac.sv`, `rtl/daub6_mac.sv` | multiply-add stages |
| `rtl/daub_level.sv` | one decomposition stage |
| `rtl/daub_1d.sv` | 1-D pyramid core |
| `rtl/dwt_transpose.sv` | two-bank transpose |
| `rtl/dwt3d.sv` | 3-D transform: three cores and two transposes |
| `rtl/dwt3d_top.sv` | Daub4 and Daub6 3-D transforms side by side |
