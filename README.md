# Four-distribution random number generator

This generator produces one sample per clock from each of four distributions:
uniform, normal N(0,1), exponential and Rayleigh. It uses only two 12-bit
LFSRs, two tables of 4096 entries, three multipliers and a divider. The
non-uniform outputs come from two classic transforms of uniform variables
U1 and U2:

* **Box-Muller** (normal): `X = sqrt(-2 ln U1) * sin(2 pi U2)`
* **Inverse transform** (exponential): `X = -ln(U1) / lambda`. The exact
  inverse is `-ln(1-U)/lambda`, but `U` and `1-U` have the same
  distribution.
* **Inverse transform** (Rayleigh): `X = sigma * sqrt(-2 ln U1)`

The key idea is that one table term, `y1 = sqrt(-2 ln U1)`, serves three of
the outputs. Squaring it and halving it gives `-ln U1` back for the exponential
path, so the logarithm never has to be computed in hardware. The only
elementary functions are two ROM look-ups, each indexed directly by an LFSR
state.

```
 LFSR U1 --+------------------------------------------------> uniform
           |    +-------------+  y2 = sin(2piU2)
 LFSR U2 --|--->|             |-------------+
           +--->| LUT circuit |              \
                |             |--y1----------[MUL]-----------> normal
                +-------------+  |
                                 +--[MUL y1*y1]--[>>1]--[/ lambda]--> exponential
                                 +--[MUL sigma*y1]-------------> rayleigh
```

## Number formats

All values are two's-complement fixed point. `m.f` means m integer bits,
counting the sign bit, and f fraction bits.

| signal | format | bits | note |
|---|---|---|---|
| U1, U2, `uniform` | 0.12 | 12 | value = state / 4096, never 0 |
| y1 = sqrt(-2 ln U1) | 4.12 | 16 | at most 4.079 (for U1 = 1/4096) |
| y2 = sin(2 pi U2) | 2.14 | 16 | signed; exactly +1.0 = 0x4000 at U2 = 1/4 |
| `lamda` (lambda) | 4.8 | 12 | input; 2.0 = 0x200; must be non-zero |
| `sigma` | 5.8 | 13 | input; 2.0 = 0x0200 |
| `normal` | 6.26 | 32 | y1 * y2, full product |
| `exponential` | 13.17 | 30 | -ln(U1) / lambda |
| `rayleigh` | 9.20 | 29 | sigma * y1, full product |

The multipliers keep the full product. Each output format is exactly the sum of
its operand formats, so nothing is rounded after the tables.

## The uniform source: 12-bit LFSR (`rtl/lfsr.sv`)

The LFSR is a Fibonacci shift register with feedback polynomial
x^12 + x^6 + x^4 + x + 1. Stage 1 is bit 0. Each clock the register shifts
towards bit 11, and bit 0 takes `q[11] ^ q[5] ^ q[3] ^ q[0]`. It visits all
4095 non-zero states and then repeats.

The two LFSRs run the same polynomial and differ only in their power-up values:
U1 = 0x800 and U2 = 0x100. These seeds reproduce the published reference
trace. Because of them, **U2 is U1 delayed by three clocks**. That correlation
matters for the quality of the normal output (see *Statistical quality*). The
seeds are the `SEED_U1` and `SEED_U2` parameters of `rng_top`.

There is no reset pin. Each LFSR powers up holding its seed, as an FPGA
flip-flop takes its configured initial value. The design's pin budget has no
reset input: 129 pins, which is exactly clk, lamda, sigma and the four outputs.

## The LUT circuit (`rtl/lut_circuit.sv`, `rtl/lut_bram.sv`)

Each of the two functions is a 4096 x 16 table. Each table is split over four
1k x 16 block RAMs, eight RAMs in all:

* bits 11..2 of the LFSR state address all four RAMs of a table at once;
* bits 1..0 go through a 2-bit flip-flop and then drive a 4:1 mux. The
  flip-flop makes the bank select arrive in the same cycle as the synchronous
  RAM data.

Bank `b` therefore holds the table entries whose index has `b` in its low two
bits: word `a` of bank `b` is entry `4a + b`. The contents are computed when
the memory is initialised, by `rng_pkg::lut_entry`, and rounded to nearest:

```
sqrt table:  entry(i) = round(4096  * sqrt(-2 ln(i/4096)))    i = 1..4095
sin table:   entry(i) = round(16384 * sin(2 pi i/4096))       i = 0..4095
```

Entry 0 of the sqrt table is never read, because an LFSR state is never 0. It
holds the value for i = 1/2 so that the table stays monotonic. Nothing writes
the tables after initialisation, so the "block RAMs" are ROMs.

## The exponential path and the non-restoring divider (`rtl/nr_divider.sv`)

`y1 * y1` is `-2 ln U1` in 8.24. The `>>1` box halves it to `-ln U1`.
Dividing an x.24 dividend by the x.8 `lamda` leaves 16 fraction bits. The
dividend is therefore shifted left once more, which gives the 17 fraction bits
of the 13.17 result. Since `-ln U1 < 8.32`, that dividend fits in 30 bits.
The divider is thus a 30-bit by 12-bit unsigned divider with a 30-bit quotient:

```
exponential = floor( ((y1*y1) >>> 1) * 2 / lamda )
```

The divider uses the non-restoring recurrence. The partial remainder `r`
starts at 0. For each dividend bit, MSB first, `r` becomes `2r + bit`. The
divisor is then subtracted if `r` was non-negative and added if it was
negative, and the quotient bit is 1 when the new `r` is non-negative. No step
ever restores the remainder. The 30 steps are unrolled into 30 combinational
add/subtract rows of 14 bits each, so a new division starts every clock. The
remainder is not produced because nothing uses it. With `lamda = 0` the
quotient has no meaning.

## Timing

* `uniform` is the current U1 and changes on every rising edge.
* `normal`, `exponential` and `rayleigh` come one clock later than the U1/U2
  they were computed from, because of the table read. Everything after the
  tables is combinational.
* In any one cycle, the three transformed outputs belong to the `uniform`
  value of the previous cycle. The published trace shows the same offset.
* A change of `lamda` or `sigma` reaches `exponential` or `rayleigh` in the
  same cycle, combinationally.
* The only flip-flops outside the RAMs are 2 x 12 LFSR bits and 2 x 2 select
  bits, 28 in all. The long combinational path runs from the RAM outputs
  through a 16x16 multiplier and the 30-row divider. Add pipeline registers
  there if your target needs a faster clock; every output then gains the same
  delay.

Reference trace, with lambda = sigma = 2 and power-up seeds. These are the
first five clocks after power-up, and `tb/tb_rng_top.sv` checks them:

| uniform | normal | exponential | rayleigh |
|---|---|---|---|
| 001 | 01cd6dd2 | 0000b178 | 0025ae00 |
| 003 | 0b892bc2 | 0008514a | 00828400 |
| 007 | 0f330000 | 00073821 | 00799800 |
| 00f | 00000000 | 00065f2f | 00723c00 |
| 01e | 00053bd8 | 00059c25 | 006b3000 |

The uniform, normal and Rayleigh columns, and the exponential values
0000b178 and 00065f2f, match the published trace exactly. In the published
trace, the other three exponential values differ from this table in the last
hex digit: 0008514f, 00073820 and 00059c20. The divider here computes exact
floor division. Those three digits could not be read with certainty, so they
are not checked.

## Statistical quality

`tb/tb_rng_chisq.sv` takes 1000 consecutive samples of each output, with
lambda = sigma = 2, and applies Pearson's chi-square test at the 5% level:

| output | bins | dof | chi^2 | critical |
|---|---|---|---|---|
| uniform | 6 equiprobable | 5 | 1.916 | 11.070 |
| normal | 6, edges at -2 -1 0 1 2 | 5 | 1.160 | 11.070 |
| exponential | 7 equiprobable | 6 | 4.500 | 12.592 |
| Rayleigh | 7 equiprobable | 6 | 4.500 | 12.592 |

All four pass. The normal result depends on the binning:

* With six equiprobable bins (edges +-0.967, +-0.431, 0), the same 1000
  samples give 11.588, which fails.
* Over the full 4095-sample period, equiprobable bins give about 25, while
  bins one standard deviation wide give about 8.6.

The cause is that U2 is U1 delayed by three clocks. Because of this, each U1
is the U2 of the same cycle shifted left three places (U1 is about 8·U2
mod 1), so the pairs (U1, U2) do not cover the unit square evenly.

Keep in mind what this generator is and is not:

* It is a deterministic sequence of period 4095.
* It is not suitable for cryptography.
* It is weak wherever the joint behaviour of successive normal samples
  matters.

Two independent polynomials or seeds chosen far apart would improve the
normal output. Either change departs from the reference design, and the
reference trace would no longer match.

## Files

| file | contents |
|---|---|
| `rtl/rng_pkg.sv` | widths, table function enum, `lut_entry()` table formula |
| `rtl/lfsr.sv` | 12-bit Fibonacci LFSR |
| `rtl/lut_bram.sv` | one 1k x 16 ROM bank, synchronous read |
| `rtl/lut_circuit.sv` | 2 x (4 banks + 2-bit select DFF + 4:1 mux) |
| `rtl/fx_mul.sv` | signed full-width multiplier |
| `rtl/nr_divider.sv` | unrolled 30-bit non-restoring divider |
| `rtl/rng_top.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_rng_chisq` |

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. Here is
what each one checks:

* `tb_rng_top` runs the top at its default parameters for two full LFSR
  periods. It compares every output, every cycle, against a reference model
  that uses real arithmetic. It also checks the trace above, changes lambda
  and sigma every 1000 clocks, and counts wrap-arounds, bank selections and
  normal samples of both signs.
* `tb_lfsr` checks the LFSR's period and that all states are visited.
* `tb_lut_bram` and `tb_lut_circuit` check the table values to within one
  LSB.
* `tb_fx_mul` and `tb_nr_divider` compare the multiplier and the divider with
  integer arithmetic.

## Simulating

The package has to come first on the command line. For example:

```
verilator --binary --timing -Irtl rtl/rng_pkg.sv tb/tb_rng_top.sv --top tb_rng_top -o sim
./obj_dir/sim
```

Replace `tb_rng_top` with any other testbench name. Every run takes well under
a second.

For synthesis, the tables are filled by an `initial` loop that calls `$sqrt`,
`$ln` and `$sin`. FPGA flows that evaluate such initialisers turn them into
block-RAM contents. A flow that cannot evaluate them needs the same formula
written out as a memory file.

## Where this implementation makes its own choices

The block structure, polynomial, table organisation, number formats,
divider size and method, and one-sample-per-clock rate follow the reference
design. The following are choices of this implementation:

* the LFSR power-up seeds (chosen to reproduce the reference trace) and the
  absence of a reset;
* round-to-nearest table contents, and the value of the unused sqrt entry 0;
* the scaling of the divider's dividend (one extra left shift to reach 17
  fraction bits);
* a fully combinational divider and multipliers, with no pipeline registers;
* undefined output for `lamda = 0`;
* the chi-square binning used in the statistical test.
