# LUT-based constant and dynamic-coefficient convolvers

An N-tap convolution (FIR filter) computes

    y(i) = sum_{k=0}^{N-1} h(k) * x(i-k)

In many filters the coefficients h(k) are constant or change rarely (a new
filter per video frame, a new kernel when the lighting changes). A multiplier
by a constant is much smaller than a general multiplier, and on an FPGA the
natural constant multiplier is a look-up table: split the input into 4-bit
chunks, let each chunk address a 16-entry table holding `chunk * h`, and add
the table outputs with the right shifts. If the tables are RAMs instead of
ROMs, the coefficient can be changed at run time in 16 clock cycles by
rewriting the tables, without touching the FPGA configuration.

This repository holds synthesizable SystemVerilog for that family of circuits,
following the paper "Dynamic Constant Coefficient Convolvers Implemented in
FPGAs":

| Module | What it is |
|---|---|
| `dklc` | **Dynamic LUT convolver**: N taps, coefficients in LUT RAMs, reprogrammed by RAM programming units; address multiplexer at each tap (DKLC-M) or at the filter input (DKLC-C); serial or parallel programming |
| `klc` | Constant LUT convolver: same datapath with ROMs; taps with similar coefficients share tables |
| `dkcm` | Dynamic constant coefficient multiplier: one multiplier with RAM tables and its own programming unit |
| `lm` | LUT constant multiplier (ROM tables) |
| `mm_kcm` | Multiplierless constant multiplier: shifts and adds from a signed-digit recoding, with a shared sub-expression |
| `sco_group` | Similar-coefficient grouping: taps whose coefficients differ by a power of two and a sign share one multiplier |
| `fir_pipe_opt` | The filter 2 + 5z^-1 - 5z^-2, grouped and pipelined without balancing registers |
| `rpu` | RAM programming unit: writes `addr * coef` into every table entry |
| `lut_ram` | 16-word LUT RAM, synchronous write, asynchronous read |
| `conv_adders` | The adder network shared by all taps |
| `conv_pkg` | Elaboration-time functions: signed-digit recoding and sharing plan |
| `convolver_top` | All of the above side by side, each with its own ports |

All arithmetic is unsigned (inputs 0..2^K-1, coefficients 1..2^K-1) except
`sco_group`, `fir_pipe_opt` and the grouped x5 product in the top, which are
two's complement.

## LUT multiplication

For an 8-bit input x and 8-bit coefficient h, x = 16*xM + xL. Two 16 x 12-bit
tables hold `a*h` for a = 0..15. Then

    x*h = (T[xM] << 4) + T[xL]

The low 4 bits of `T[xL]` go straight to the output; only a 12-bit addition is
needed, and the product has 16 bits. `lm` builds this for any K, CW and CHUNK:
the input is cut into ceil(K/CHUNK) chunks (the top one zero-padded) and the
tables are computed at elaboration from the parameter `COEF`. For 14-bit
operands use CHUNK = 7: two 128 x 21-bit tables and a 28-bit result. How a
table is spread over block RAM and LUTs is left to synthesis.

## One adder network for the whole filter

A filter built from separate LUT multipliers adds each multiplier's two tables
and then adds the products. `klc` and `dklc` drop the multiplier boundaries:
`conv_adders` first adds all table outputs of the same weight over all taps
(all "M" tables together, all "L" tables together), then combines the two
sums with one shift-add. For 2 taps of 8 x 8 bits this gives two 12+12-bit
adders, one adder for the upper 9 bits of the low sum, and an 18-bit output.
The output width of the convolvers is K + CW + clog2(N) + 1.

The adders are written as loops; the tool chooses the netlist. The original
work searches for the cheapest tree of two-input adders (greedy search or
simulated annealing); that search is not reproduced.

## Changing the coefficients: the RAM programming unit

`rpu` is started by a one-cycle `load` pulse. It latches the coefficients and,
from the next cycle, drives `addr = 0, 1, ..., 15` with `data = addr * coef`
(built by adding `coef` once per cycle) and `we` high. `busy` (the "not
ready" flag) is high for exactly the write cycles; `load` is ignored while
busy. With `NT > 1` one unit serves NT multipliers one after another, 16
cycles each, raising `we[t]` for the multiplier being written.

In `dkcm` both tables of the multiplier hold the same contents, so they are
written together. While `not_ready` is high, a 2:1 multiplexer in front of
each RAM replaces the data chunk by the programming address. Afterwards
`y = x * coef` combinationally.

Reprogramming costs r = 16 idle cycles. If the coefficients change every n
samples, the useful throughput falls by the factor 1 / (1 + r/n); for n much
larger than r the dynamic multiplier loses almost nothing to a fixed one.

## The dynamic convolver `dklc`: where the multiplexer sits

This is the part with the least obvious timing. Parameters:

- `MUX_AT_INPUT = 0` — **DKLC-M.** Each tap has its own address multiplexer.
  The delay line keeps shifting samples during programming. The RPU output
  goes directly to the tap RAMs.
- `MUX_AT_INPUT = 1` — **DKLC-C** (default). One multiplexer sits at the
  filter input. While programming, the address replaces the sample and walks
  down the delay line, so tap k sees it k cycles later. For this to work the
  write enable and write data of tap k pass through k registers of their
  own. There is less address multiplexing but more control logic, and
  programming ends N-1 cycles later. The delay line also holds addresses
  afterwards: the first N-1 outputs after `not_ready` falls are not valid
  filter outputs.
- `PARALLEL_RPU = 0` (default) — one RPU programs tap 0, then tap 1, and so on.
  `PARALLEL_RPU = 1` — one RPU per tap, all taps at once. In DKLC-C all units
  walk the same address sequence, so the single input multiplexer suffices.

Programming time (cycles of `not_ready`) for N taps and 16-entry tables:

| | serial RPU | parallel RPUs |
|---|---|---|
| DKLC-M | 16 N | 16 |
| DKLC-C | 16 N + N - 1 | 16 + N - 1 |

For N = 3: 48, 16, 50, 18.

Timing: `x(i)` applied in cycle c gives `y(i)` after the next clock edge
(one output register; two edges with `LUT_REG = 1`). `y` is valid for samples applied while `not_ready`
is low; in the cycle where `not_ready` falls, `y` still holds a sum taken
during programming.

The serial unit needs one RPU for the whole filter; the parallel option needs
N. The choice depends on how often coefficients change. DKLC-C with one RPU
suits a filter reloaded once per frame. DKLC-M with an RPU per tap suits
filters that change often, e.g. to shorten the kernel at the ends of a line.

## Multiplierless constant multiplier `mm_kcm`

`conv_pkg::csd_recode` recodes the coefficient into digits {+1, 0, -1}. A -1
appears only where it lowers the number of non-zero digits: a run of three or
more ones b..t becomes +2^(t+1) - 2^b, while shorter runs stay as they are.
So 14 = 1110b becomes 16 - 2, but 27 = 11011b stays binary.

`conv_pkg::ss_plan` then looks for a pair of digits, `gap` apart, that occurs
at least twice. It builds it once, t = x ± (x << gap), and reuses shifted
copies of t. For 27 this gives t = x + (x << 1) and 27x = t + (t << 3). Only
one shared sub-expression is extracted.

## Similar coefficients and the pipelining example

Coefficients such as 5, -5, -10 and 20 are all ±5 * 2^s, so the taps can
share one multiplier. `klc` does this at elaboration when `SCO = 1`
(default). Taps whose coefficients have the same odd part form a group. Their
delayed samples are shifted by the difference of their powers of two and
added. The sum goes into one set of tables holding the group's smallest
coefficient; the other taps of the group get no tables. For
h = {5, 10, 3, 20, 40} the taps 0, 1, 3 and 4 form one group:
`(x0 + 2 x1 + 4 x3 + 8 x4) * 5`. Tap 2 keeps its own tables. A group sum is
wider than a sample, so with grouping each tap is given enough chunks for
K + CW + clog2(N) bits; constant-zero chunks are removed by synthesis.
`klc` is unsigned, so its groups only shift. For mixed signs, `sco_group` forms
`a = x_i - x_j - 2 x_k + 4 x_l` and one x5 multiplier finishes the job. In
`convolver_top`, the group feeds an `mm_kcm` by 5 (`s_y`). The sum is
sign-extended to 16 bits and the product taken modulo 2^16.

`fir_pipe_opt` is 2 + 5z^-1 - 5z^-2 with x(i-1) - x(i-2) through one
subtractor and a 512-entry x5 table. Fed from the delay line, the
subtractor-table path would be two stages longer than the 2x path, which then
needs balancing registers. Instead the subtractor takes x(i) - x(i-1) from
the input and the input register, and its result, one table stage later,
meets 2*x through that same input register. Pipeline: `x1 <= x`,
`d <= x - x1`, `m <= 5*d`, `y <= 2*x1 + m`; y(n) appears two clocks after
x(n). In `klc` and `dklc` the parameter `LUT_REG = 1` adds one register level
between the tables and the adders block, which costs one cycle of latency;
the adder tree itself is not cut further.

## Parameters and defaults

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| dklc | N, K, CW, CHUNK | 3, 8, 8, 4 | taps, data width, coefficient width, table address width |
| dklc | MUX_AT_INPUT, PARALLEL_RPU | 1, 0 | DKLC-C, single RPU |
| klc | N, COEFS | 2, {200, 77} | taps and fixed coefficients (example values) |
| klc | SCO | 1 | group similar coefficients |
| klc / dklc | LUT_REG | 0 | register the table outputs (latency 2) |
| dkcm / lm / mm_kcm | K, CW | 8, 8 | operand widths |
| lm / mm_kcm | COEF | 173 / 27 | fixed coefficient (example values) |
| lut_ram | AW, DW | 4, 12 | 16 words of chunk+coefficient bits |
| rpu | NT, AW, CW | 1, 4, 8 | multipliers served, table address width, coefficient width |
| sco_group | N, W, SHIFTS, NEGS | 4, 8, {0,0,1,2}, {+,-,-,+} | the group 1, -1, -2, 4 |

The example coefficients are arbitrary choices. The widths, the 4-bit split,
the 2-tap and 3-tap sizes and the x5 example are those of the original
circuits.

## Simulating

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/conv_pkg.sv \
        tb/tb_dklc.sv --top-module tb_dklc
    ./obj_dir/Vtb_dklc

Testbenches:

- `tb_convolver_top` — whole top at default sizes for 6000 cycles. DKLC-C and
  DKLC-M are reloaded repeatedly while data flows; programming times of 50
  and 16 cycles and the DKLC-C refill are checked and counted. All other
  parts are compared every cycle.
- `tb_dklc` (with helper `dklc_runner`) — all four dklc arrangements at 3
  taps, plus 5 taps, 1 tap and the registered-table option.
- `tb_kcm_sweep` — `lm`, `mm_kcm` and `dkcm` for every width K = CW = 3..15.
- `tb_lm` — adds the 14-bit, 7+7 configuration.
- `tb_klc` — includes a 5-tap filter with a similar-coefficient group and
  checks the grouping chosen at elaboration.
- One testbench per remaining module.

All of them pass. For each module, a copy with one deliberate bug was checked
to make its testbench fail.

## Where this RTL departs from the original circuits

- FPGA resource mapping is not described: no BlockSelectRAM/LUT split of wide
  tables, and plain multiplexers rather than tri-state buffers.
- Adder-tree and table-size optimisations are done by the original generator
  tool; here the adders are behavioural and every table is full size.
- Only one shared sub-expression in `mm_kcm`.
- Pipelining is limited to the output register, the optional table-output
  register (`LUT_REG`) and the hand-pipelined `fir_pipe_opt`; there is no
  general "maximum logic levels between registers" control.
- The variable-coefficient multiplier the original work compares against is
  not included.
- 2-D image convolution (line buffers, frame control) is not included.
- Reset values, the `load`/`not_ready` handshake, the output register and the
  DKLC-C write-delay chains are this design's own choices.
