# NLFSR generator: gate form and time-discrete form

A nonlinear-feedback shift register (NLFSR) is a shift register whose first
cell is loaded, on every clock, with a Boolean function of its own cells.
With a linear (XOR-only) function this is the familiar LFSR; here the
function may also contain products (ANDs) of cells, which makes the register
a pseudo-random sequence generator with richer behaviour.

This RTL implements such generators from a compact description, a 0/1
matrix, and builds the feedback function in two equivalent ways:

* **gate form**: products are AND gates, the sum is an XOR gate, as one
  would put it on an FPGA;
* **time-discrete form**: the register taps are treated as integer samples
  `x[n-1] ... x[n-N]` that happen to be 0 or 1, and the function is built
  only from multipliers, adders, subtracters and a gain of 2, the way a
  discrete-time system (a Simulink diagram, a DSP data path) is drawn.

The design's main instance is the four-cell generator
`y = x1·x2·x3 ⊕ x4`. Started from `1111` it emits `1 1 1 1 0` over and
over: period 5, one bit per clock. The top level runs the gate form and
the discrete form of that generator in lock-step and flags whether they
agree.

## Describing a feedback function with a matrix

The feedback bit is a sum of products over GF(2):

    y = XOR over rows i of ( AND over the columns j where M[i][j] = 1 of x_j )

`M` has `K` rows (product terms) and `N` columns (register cells). A 1 in
column `j` connects tap `x_j` (cell `B_j`) to product `i`. A row of zeros is
a term that is not there. Three matrices are used in this repository
(constants in `nlfsr_pkg`):

| name      | matrix                  | feedback                        | cells |
|-----------|-------------------------|---------------------------------|-------|
| `MAIN_M`  | `[1110; 0001]`          | `x1x2x3 ⊕ x4`                   | 4     |
| `EX1_M`   | `[1011; 1100; 0001]`    | `x1x3x4 ⊕ x1x2 ⊕ x4`            | 4     |
| `EX2_M`   | `[100; 010; 101]`       | `x1 ⊕ x2 ⊕ x1x3`                | 3     |

**How a matrix is written in SystemVerilog.** Each row is an `N`-bit literal
whose *leftmost* bit is column 1, so the code reads like the matrix on
paper: `[1110; 0001]` is `{4'b1110, 4'b0001}`. In the packed parameter type
`logic [K-1:0][N-1:0]` this puts row 1 at index `K-1`. Inside the modules,
column `j` of row `r` is bit `M[r][N-j]`, and it selects input `x[j-1]`.
Tap vectors are the other way round: `x[0]` / `taps[0]` is cell `B1`.

## The register and its timing

Cells `B1..BN` form a serial-in shift register. At each rising clock edge
with `ce` high, the feedback bit enters `B1`, every cell moves one place
towards `BN`, and `BN` is the output bit. `ce` low holds the state.
`rst_n` low at a clock edge loads the seed (synchronous, active low).

For the main generator, starting from `B1..B4 = 1111`:

| clock | B1 B2 B3 B4 | y = x1x2x3 ⊕ x4 | output (B4) |
|-------|-------------|-----------------|-------------|
| 0     | 1 1 1 1     | 0               | 1           |
| 1     | 0 1 1 1     | 1               | 1           |
| 2     | 1 0 1 1     | 1               | 1           |
| 3     | 1 1 0 1     | 1               | 1           |
| 4     | 1 1 1 0     | 1               | 0           |
| 5     | 1 1 1 1     | 0               | 1           |

Because `x4` enters the feedback linearly, the next-state map is a
permutation: the 16 states split into cycles of length 1 (`0000`), 2, 4, 4
and 5. Only the seed `1111` (or any state on its cycle) gives the period-5
sequence; `0000` is a fixed point. The seed is therefore a parameter, and
reset loads it.

## The time-discrete form

Over the integers restricted to {0, 1}, XOR can be written as

    A ⊕ B = A + B − 2·A·B

and AND is plain multiplication. `nlfsr_feedback_discrete` uses exactly
these two facts. Each product term `p_i` is an integer multiplier over the
samples its row selects. The terms are then folded into a running value,
row 1 first, starting from 0:

    acc ← acc + p_i − 2·acc·p_i

For the main matrix this comes out as

    y[n] = x1x2x3 + x4 − 2·x1x2x3·x4

and for the three-cell example `EX2_M` as two folds,

    s    = x1 + x2 − 2·x1·x2
    y[n] = s + x1x3 − 2·s·x1x3

The samples are signed two's-complement numbers of `DISC_W` = 4 bits. With
inputs of 0 and 1, every intermediate value lies in −1..2 and the final
value is again 0 or 1, so 4 bits are enough. The module also reports
`in_range` (the sample is 0 or 1) so that this property is checked in
hardware rather than assumed. Synthesised, this form is of course larger
than the gates (11 word-level cells against 2 for the main matrix); its
purpose is to show, cycle by cycle, that the arithmetic model gives the
same sequence as the logic.

Row order matters to the shape of the arithmetic (which fold happens
first) but not to its result. The single fold drawn for the main
generator, `x4 + P − 2·(x1x2x3x4)`, is the same value as the general fold
used here.

## Modules

| module                    | what it is                                                         |
|---------------------------|--------------------------------------------------------------------|
| `nlfsr_pkg`               | matrices, seed, sample type `disc_t`, enum `fb_model_e`            |
| `nlfsr_shift_reg`         | N-cell shift register with seed load and clock enable              |
| `nlfsr_feedback_gf2`      | feedback as AND/XOR gates, from `M`                                 |
| `nlfsr_feedback_discrete` | feedback as multipliers, adders and a gain of 2, from `M`           |
| `nlfsr_generator`         | register + feedback; `MODEL` selects `FB_GF2` or `FB_DISCRETE`      |
| `nlfsr_top`               | main generator in both forms, side by side, with agreement flag    |

### `nlfsr_generator` parameters and ports

| parameter | default          | meaning                                   |
|-----------|------------------|-------------------------------------------|
| `N`       | 4                | register cells                            |
| `K`       | 2                | product terms (rows of `M`)               |
| `M`       | `{4'b1110, 4'b0001}` | feedback matrix                       |
| `SEED`    | `4'b1111`        | state loaded by reset, bit 0 = `B1`       |
| `MODEL`   | `FB_GF2`         | `FB_GF2` or `FB_DISCRETE`                 |

Ports: `clk`, `rst_n`, `ce` in; `taps[N-1:0]` (cells), `y` (feedback bit
about to be shifted in), `out_bit` (cell `BN`), `fb_val` (feedback as a
signed sample), `fb_in_range` out. Outputs follow the register with no
extra latency; `y` and `fb_val` are combinational from `taps`.

### `nlfsr_top` ports

| port            | dir | width | meaning                                               |
|-----------------|-----|-------|-------------------------------------------------------|
| `clk`           | in  | 1     | generator clock                                       |
| `rst_n`         | in  | 1     | synchronous active-low load of `1111` into both copies|
| `ce`            | in  | 1     | clock enable (tie high for free running)              |
| `led[3:0]`      | out | 4     | cells `B1..B4` (lines Q0..Q3), e.g. for four LEDs     |
| `out_bit`       | out | 1     | generator output, cell `B4`                            |
| `model_out_bit` | out | 1     | output of the discrete-form copy                       |
| `models_agree`  | out | 1     | both copies hold the same state and feedback, and the discrete sample is 0 or 1 |

The gate copy is the circuit one would put on an FPGA: a four-bit shift
register with clock enable whose serial input is
`XOR(AND3(Q0, Q1, Q2), Q3)`. It uses 4 flip-flops, one 3-input AND and one
XOR. The whole top, with the discrete copy and the comparison, is 8
flip-flops and about 22 word-level cells; any FPGA holds it many times over.

## Design choices and departures

* **Seed by synchronous reset.** The original four-cell hardware had its
  register's clear input tied low and took its `1111` start state from
  power-up initialisation. A clear to zero would in fact trap this
  generator in `0000`. Here `rst_n` loads `SEED`, which works on any
  target.
* **Clock enable kept as a port.** It was tied high in the original
  hardware; it costs nothing and lets a system gate the generator.
* **Output buffers** driving LEDs are not modelled; `led` is the register
  state and the pad buffers are left to the FPGA tools.
* **Number format of the discrete form** (4-bit signed) is this design's
  choice; the method itself is stated over the reals.
* **Lock-step comparison** (`models_agree`) is an addition of this design:
  it turns the claim that both forms give identical waveforms into a
  signal that can be watched.
* **Matrix as parameter.** One RTL covers any `N`, `K`, `M`; the top is
  fixed to the main matrix. The two example matrices are exercised through
  the generator and feedback testbenches, not through the top.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>` and stops itself with a watchdog.

| testbench                    | what it checks                                                                 |
|------------------------------|--------------------------------------------------------------------------------|
| `tb_nlfsr_shift_reg`         | 4- and 7-cell registers against a bit-array model: seed load, shift, hold, random `ce`, reset mid-run |
| `tb_nlfsr_feedback_gf2`      | all inputs for `MAIN_M`, `EX1_M`, `EX2_M` and a matrix with an empty row, against the hand-written equations |
| `tb_nlfsr_feedback_discrete` | all inputs, integer value against the difference equations above, `in_range` always 1 |
| `tb_nlfsr_generator`         | main generator (both forms) gives `11110` repeated; `EX1_M` generator from all 16 seeds, both forms, random `ce`, against a reference |
| `tb_nlfsr_top`               | 200 clocks at the design's own sizes: sequence `11110`, `led`, both outputs, `models_agree`, and counts of resets, holds, cycle wraps and agreeing cycles (each must occur) |

Each testbench has been shown to fail on a deliberately broken copy of its
module (clock enable ignored, OR instead of XOR, gain of 2 dropped, taps
reversed, wrong seed).

To run one with Verilator 5 from the repository root:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/nlfsr_pkg.sv tb/tb_nlfsr_top.sv --top-module tb_nlfsr_top
    ./obj_dir/Vtb_nlfsr_top

Replace `tb_nlfsr_top` by any other testbench name. Lint with

    verilator --lint-only -Wall -Irtl rtl/nlfsr_pkg.sv rtl/nlfsr_top.sv

The only remaining lint warnings are unused package constants (the example
matrices are used by the testbenches only).

## Changing the generator

To build another NLFSR, instantiate `nlfsr_generator` with your own `N`,
`K`, `M` and `SEED`, for example the three-term example:

    nlfsr_generator #(.N(4), .K(3), .M(nlfsr_pkg::EX1_M), .SEED(4'b0110)) u_gen (...);

Choose the seed with the state cycles in mind: a seed on a short cycle, or
on a fixed point such as all zeros, gives a short or constant sequence.
Widening `N` needs no other change. The discrete form keeps every sample in
−1..2 whatever `N` and `K` are, so `DISC_W` does not grow with them.
