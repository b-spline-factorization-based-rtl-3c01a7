# B-spline factorized inverse DWT for the (10,18) wavelet

This is a streaming inverse discrete wavelet transform (one synthesis stage)
for the (10,18) biorthogonal filter bank. Each clock it takes one lowpass and
one highpass subband sample and returns two reconstructed samples.

The point of the architecture is how the two synthesis filters are split.
Each one factors into a B-spline part, which is a power of (1+z^-1) or
(1-z^-1), and a short symmetric "distributed" part:

    Ht(z) = (1+z^-1)^9 / 8 · Q(z)     Q = [v1 v2 v3 v4 v5 v4 v3 v2 v1]
    Gt(z) = (1-z^-1)^5 / 4 · R(z)     R = z^-4 · [v6 v7 v8 v7 v6]

    v1 =  0.0076535   v2 = -0.0687398   v3 = 0.2681664   v4 = -0.6004576
    v5 =  0.808888    v6 = -0.1154104   v7 = -0.57672    v8 = -1.0994

Only the distributed part needs multipliers. Because it is symmetric, mirrored
taps share one multiplier, so the whole bank needs 8 multipliers. A direct
implementation of the 18-tap and 10-tap filters needs 14 to 26. The B-spline
part costs only adders and one register per factor. Adders are much cheaper
than multipliers, so the trade pays off.

## Data flow

    lp_i ──┬─ Qe (v1 v3 v5 v3 v1) ─┐odd   ┌──────────────────────────┐
           └─ Qo (v2 v4 v4 v2)  ───┘even  │ 9 × (1+z^-1), ÷8 by shifts│──┐
                                          └──────────────────────────┘  │  + ─ y_odd_o
    hp_i ──┬─ Re (v6 v8 v6)     ───┐odd   ┌──────────────────────────┐  │  + ─ y_even_o
           └─ Ro (v7 v7)        ───┘even  │ 5 × (1-z^-1), ÷4 by shifts│──┘
                                          └──────────────────────────┘

- **Polyphase filters.** Q(z) = Qe(z^2) + z^-1·Qo(z^2), and R likewise. Both
  polyphase filters of a channel read the same subband sample. Qe/Re make the
  earlier output sample of each pair and Qo/Ro the later one. After
  retiming, Re and Ro lose their two leading zero taps (see below).
- **Two-phase B-spline sections** (`bspline_stage`). The signal between the
  filters and the output moves two samples per clock: `odd` is the earlier
  sample of the pair and `even` the later one, counting samples from 1. For
  y[n] = x[n] ± x[n-1] in this form, the later output is the sum or
  difference of the two current samples. The earlier output combines the
  current odd sample with the even sample of the previous pair. So a section
  is two adders and one register:

      even_o = even_i ± odd_i
      odd_o  = odd_i  ± even_q        (even_q = last clock's even_i)

  A chain of nine (or five) such sections (`bspline_part`) is the B-spline
  part. The output ports are named by the same convention: `y_odd_o` is the
  earlier sample.
- **Output.** The two channels are added phase by phase.

The structure does not depend on the (10,18) bank. `idwt_bspline_core`
takes as parameters the two B-spline orders, the four polyphase
coefficient sets, the shift positions, the pipeline cut, and extra
highpass delay registers. It works for any bank whose synthesis filters
factor this way. Coefficient sets need not be symmetric. A symmetric set
uses one multiplier per mirrored tap pair; any other set uses one
multiplier per tap. `idwt_bspline_top` is the core configured for the
(10,18) bank.

## Scaling and word length

All data words are 16 bits, all multipliers are 16×16, and all adders are
16 bits. Coefficients are signed 16-bit values with 14 fraction bits
(v8 needs two integer bits). Each product is shifted right by 14 bits, so
the filter outputs are in the same units as the input.

The factors /8 and /4 are done as one-bit arithmetic right shifts inside
chosen sections. A shifting section forms its sum at 17 bits and halves
it, so that section cannot overflow. The lowpass chain halves after
sections 4, 6 and 8, and the highpass chain after sections 2 and 4. These
are the points where the worst-case swing of this particular bank roughly
doubles. With these choices, no internal node can overflow when every
input is below 2^14 in magnitude. Every word wraps silently beyond that.

Precision is limited by the 16-bit words. The (1+z^-1)^9/8 chain has a DC
gain of 64, so rounding errors made in the distributed part are amplified.
Against the ideal real-valued bank, the worst error seen with
random input up to the no-overflow limit is about 200 LSB. Reconstruction of a ±6000 signal through the
analysis and synthesis banks is within 205 LSB. To get more precision,
widen `DW` and feed the input pre-scaled, so the truncations fall below the
signal's LSB.

## Build variants

| STYLE | PIPELINE | multipliers | adders | registers | longest path |
|---|---|---|---|---|---|
| FIR_SERIAL | 0 | 8 | 40 | 24 | Tm + 11 Ta |
| FIR_SERIAL (default) | 1 (default) | 8 | 40 | 28 | cut after section 3 |
| FIR_PARALLEL | 0 | 8 | 40 | 20 | Tm + 13 Ta |
| FIR_PARALLEL | 1 | 8 | 40 | 24 | cut after section 1 |

A synthesis run gives exactly these counts for each variant.

- **Serial filters** (`poly_fir_serial`) use the transposed form. The
  input is broadcast to the multipliers, and the products run along a chain
  of adders and registers. Each filter adds only a multiplier and one adder
  to the path. It needs one register per tap after the first, and none of
  them are shared.
- **Parallel filters** (`poly_fir_parallel`) use the direct form. The even
  and odd filters of a channel share one input delay line, so fewer
  registers are needed. Pre-adders combine mirrored taps before the
  multiplier. The path is longer: pre-adder, multiplier and product sum.
- **Pipelining.** Without a cut, the longest path runs from a multiplier
  through every section of the nine-section chain. One register on each of
  the two wires of each chain (four in all) halves this path. The cut goes
  after section 3 with serial filters and after section 1 with parallel
  filters. It adds one clock of latency.
- **Retiming** (`RETIME`, default 1). Re and Ro start with two zero taps
  in z^-1 of the subband rate. The retimed circuit drops them and saves the
  registers. As a result the highpass channel runs two subband samples
  ahead: the circuit computes y = Ht·up(lp) + z^+4·Gt·up(hp). **A caller
  must present each highpass sample two clocks after the lowpass sample
  with the same index.** `RETIME = 0` puts the two delays back as registers
  on `hp_i`.

## Interface and timing

`idwt_bspline_top` ports: `clk`, `rst_ni` (asynchronous, active low),
`lp_i`, `hp_i`, `y_odd_o`, `y_even_o`, all signed `DW` bits. There is no
handshake: one pair in and one pair out on every clock. There are no
input or output registers. Without pipelining the outputs are
combinational in the inputs of the same clock, and with pipelining they
appear one clock later. Reset clears every register, which is the same as a
history of zero samples.

If the subbands come from the matching (10,18) analysis bank, take the
filters H(z) = -Gt(-z) and G(z) = Ht(-z) (Gt with its z^-4 factor), keep every second output, and
apply the two-clock highpass offset above. The output is then the original
signal delayed by 17 samples, plus 2 more with the pipeline cut.

## Files

| file | contents |
|---|---|
| `rtl/idwt1018_pkg.sv` | coefficients v1..v8, B-spline orders, filter-style enum, fixed-point conversion |
| `rtl/bspline_stage.sv` | one two-phase (1±z^-1) section, optional halving |
| `rtl/bspline_part.sv` | chain of N sections, shift mask, optional pipeline cut |
| `rtl/poly_fir_serial.sv` | transposed FIR (one of Qe, Qo, Re, Ro), shared products for symmetric sets |
| `rtl/poly_fir_parallel.sv` | pair of direct-form FIRs on a shared delay line, pre-adders for symmetric sets |
| `rtl/idwt_bspline_core.sv` | general B-spline synthesis bank (any orders and coefficients) |
| `rtl/idwt_bspline_top.sv` | the (10,18) synthesis bank: the core with its coefficients and build options |
| `tb/idwt_tb_pkg.sv` | reference models: word-exact one-dimensional model, ideal real-valued bank, analysis bank, stimulus |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_idwt_full` runs the default build end to end |

The coefficient table is not stored anywhere. The package computes it
during elaboration as round(v·2^14).

## Verification

Each testbench compares against a model in `tb/idwt_tb_pkg.sv`. The models
work on the plain interleaved sample stream (y[n] = x[n] ± x[n-1], direct
convolution) rather than on the two-phase form of the hardware. They model
every wrap and shift exactly.

- `tb_bspline_stage`, `tb_bspline_part`, `tb_poly_fir_serial`,
  `tb_poly_fir_parallel` check the blocks bit-exactly with random inputs,
  including wrapping inputs. They also check the one-clock delay of the
  pipeline cut. The filter tests include non-symmetric coefficient sets.
- `tb_idwt_bspline_core` runs the core with two other banks. One is the
  LeGall 5/3 bank, which has one-tap polyphase filters. The other has
  non-symmetric polyphase filters, orders 3 and 2, parallel filters, a
  cut beyond the end of the shorter chain, and a highpass delay. Outputs
  are checked bit-exactly and against the ideal banks.
- `tb_idwt_bspline_top` runs four variants side by side: serial/pipelined,
  parallel/pipelined, serial/unpipelined, and parallel/unpipelined without
  retiming. For each it checks the outputs bit-exactly, then against the
  ideal filter bank (within 320 LSB), then for perfect reconstruction of a
  signal passed through the analysis bank (within 400 LSB). It also checks
  the latency of an impulse in every variant. It counts the pipeline delay,
  the retiming offset, both filter styles and reconstruction, and fails if
  any of them never shows.
- `tb_idwt_full` runs the default build, with no parameter overrides, on a
  2000-sample reconstruction.

To run one with plain Verilator:

    verilator --binary --timing -Irtl -Itb rtl/idwt1018_pkg.sv tb/idwt_tb_pkg.sv \
        rtl/bspline_stage.sv rtl/bspline_part.sv rtl/poly_fir_serial.sv \
        rtl/poly_fir_parallel.sv rtl/idwt_bspline_core.sv rtl/idwt_bspline_top.sv \
        tb/tb_idwt_full.sv \
        --top-module tb_idwt_full && ./obj_dir/Vtb_idwt_full

Each testbench prints `TB_RESULT checks=N failures=M`.

## Design choices beyond the published architecture

The structure follows the published architecture: the factorization, the
coefficients, the polyphase split, the two-phase sections, the serial and
parallel filter forms, the pipeline positions and the retiming. The
following are choices made here:

- which sections do the halving;
- the fixed-point format of the coefficients (14 fraction bits), and
  truncation by arithmetic shift rather than rounding;
- wrap-around on overflow;
- the reset;
- having no handshake and no input or output registers;
- reading the serial filter as the transposed form and the parallel filter
  as the direct form with a shared delay line (these reproduce the published
  register and adder counts);
- the sample-order convention. The later sample of a pair is called even;
  the sections and the crossover in front of the chains are wired so that
  the bank computes the correct filter.

Only one decomposition level is built. A multi-level 2-D inverse transform
would need line buffers and control around this stage, and none are
described here.
