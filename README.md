# An FPGA logic block with a built-in multiplier cell

A LUT-based FPGA does multiplication badly. Every partial-product bit costs a
LUT, and every sum and carry between cells crosses the general routing
switches. The logic block here adds three pieces of dedicated logic to a
conventional block of three 4-input LUTs and two registers:

* a **Flexible Multiplier Unit (FMU)**: one cell of an array multiplier. It
  ANDs two operand bits into a partial product and adds that product to an
  incoming sum and carry. It can also act as a plain full adder.
* a **configurable carry circuit (CF)**, which gives either an adder carry
  or a multiplier-cell carry.
* a **special programmable multiplexer (SPM)** for barrel shifters.

Blocks next to each other are joined by **dedicated, switch-free sum and
carry wires**. A whole array multiplier, an adder or a shift-and-add
multiplier can then be built from a grid of blocks without using general
routing for any sum or carry.

The RTL models the block (`functional_block`) and a grid of blocks joined by
the dedicated wires (`fb_array`, the top). The configuration memory and the
general routing are not modelled. Each block's configuration word and its
general-routing pins are ports of the grid. A testbench or a wrapper plays
the part of the bitstream and the routing.

## The functional block

```
            COUT   CMUL  SMUL            (dedicated, to neighbours)
              ^      ^     ^
 Y1..Y4 ──> Y-FG ──┐ CF <─┘ ...                  ┌─> CY ─> F/L ─> RY
 BS1,BS2 ─> SPM ───┤                 Z-FG ──>  out mux Y
 D1,D2,SUM ─> FMU ─┤                            out mux X
 X1..X4 ──> X-FG ──┘ carry unit                  └─> CX ─> F/L ─> RX
              ^ PM ^
           CIN1   CIN  (+ SUM1)       (dedicated, from neighbours)
```

| part | what it does here |
|---|---|
| `pm_unit` (PM) | Three 2:1 configured selects. They choose the FMU carry-in (CIN or CIN1), the carry into the X/Y carry chain (CIN or CIN1) and the FMU sum-in (SUM or SUM1). |
| `fmu` | Multiplier cell or full adder; outputs SMUL and CMUL. |
| `carry_unit` | Full-adder carry of X1 + X2 + carry-in. This is the low bit of a two-bit ripple adder. |
| `carry_circuit` (CF) | The carry of the high bit. AFC mode: carry of Y1 + Y2 + low-bit carry. MFC mode: carry of Y3 + Y1·Y2 + low-bit carry, which lets the Y half work as a second multiplier cell. Output COUT. |
| `lut4` ×3 | X-FG on {X4 or carry-in, X3, X2, X1}. Y-FG on {Y4 or X-half carry, Y3, Y2, Y1}. Z-FG on {EX2, SMUL or SPM, FY, FX}. |
| `spm_unit` | BS1/BS2 multiplexer. Its select is a configuration bit, or the live input EX1 for a shifter stage. |
| output muxes | Each of CX and CY picks one of FX, FY, FZ, SMUL, CMUL, SPM, COUT, EX2. |
| `flip_flop_latch` ×2 | Registers CX into RX and CY into RY. Each is configured as a rising-edge flip-flop or as a latch that is transparent while CLK is high. Each has its own EN and an asynchronous clear. |

Everything is combinational except RX and RY.

With the LUTs programmed as 3-input XORs, the X-FG/carry-unit/Y-FG/CF path
adds two bits per block. COUT feeds the next block's CIN1, the same way the
XC4000 CLB's carry logic works. This path and the FMU are separate, so one
block can hold an adder bit pair and a multiplier cell at the same time.

### The multiplier cell

With `cm_sum_add = cm_carry_add = 0` the FMU computes

```
pp        = Ai & Bj
Sum out   = Sumin ^ pp ^ Cin
Carry out = Sumin ? (pp | Cin) : (pp & Cin)      -- the "IM" select
```

So {Carry out, Sum out} = Sumin + Ai·Bj + Cin. The carry is the majority of
the three addends, built as a multiplexer steered by the incoming sum. With
Sumin = 1 the cell propagates a carry if either of the other two terms is 1.
With Sumin = 0 it generates one only if both are 1. The two CM output
multiplexers can instead select the full adder Ai + Bj + Cin, each output
independently.

The carry circuit's MFC half computes the same kind of carry another way:
`(Ci ^ Sumi) ? (Ai & Bi) : Sumi`.

## The dedicated interconnect (`fb_array`)

In the grid, row `r` runs bottom to top and column `c` is the bit weight.
Block (r,c) receives:

| pin | driven by | used for |
|---|---|---|
| SUM  | SMUL of (r-1, c), the block below | row-to-row sum in array multipliers |
| CIN  | CMUL of (r, c-1) | ripple carry between FMUs |
| CIN1 | COUT of (r, c-1) | the two-bit-per-block carry chain |
| SUM1 | RX of (r, c+1) | an accumulator that shifts down one place per clock |

Grid edges take these from the ports `sum_edge`, `cin_edge`, `cin1_edge` and
`sum1_edge`. The default size, 8 × 16, is just large enough for an 8 × 8
multiplier.

## How applications map onto the grid

**Parallel multiply and multiply-accumulate.** Configure every block's FMU as
a multiplier cell, with CIN and SUM selected and CX = SMUL. Drive
`D1 = A[c-r]` (0 outside 0..7) and `D2 = B[r]`. Each row is then a 16-bit
ripple adder that adds `A·B[r]·2^r` to the row below. The top row's SMUL
(or CX) holds `A·B + S mod 2^16`, where `S` is the value on `sum_edge`.
With `S = 0` this is a plain ripple-carry array multiplier. Otherwise it is a
multiply-accumulate.

Cells to the right of a row's partial product have a zero partial product.
They pass the finished low product bits upward. The leftmost cell of each row
absorbs the row's carry-out.

**Bit-serial multiply.** This uses one row of N+1 blocks. Each block's FMU
takes its sum from SUM1 (the neighbour's register) and its carry from CIN.
CX = SMUL goes into the flip-flop, with D1 = A[c] and D2 = B[t] in cycle t.
Each clock then computes `S(t+1) = (S(t) >> 1) + B[t]·A`. The bit shifted out
of block 0 each cycle is the next low product bit. After N clocks the
product is `S(N)·2^(N-1)` plus the N-1 collected low bits. An 8 × 8 product
takes 9 blocks and 8 clocks.

**Adders.** There are two ways to build an adder:

* one bit per block, with the FMUs as full adders rippling over CIN;
* two bits per block, on the LUT/carry chain rippling over CIN1 and COUT.

**Barrel shifter.** Each SPM is one 2:1 multiplexer of a logarithmic
shifter, with EX1 carrying one shift-amount bit. An 8-bit shifter takes
3 stages of 8 multiplexers. The wiring from one stage to the next uses
general routing, which is outside this model.

**Counter.** Use the two-bit carry chain with CIN1 = 1 at column 0 and the
registers fed back to X1 and Y1 through general routing. This counts two bits
per block.

## Configuration word (`fb_pkg::fb_cfg_t`, 67 bits)

| field | meaning |
|---|---|
| `lut_x`, `lut_y`, `lut_z` | truth tables, output = `table[{in3,in2,in1,in0}]` |
| `x4_carry`, `y4_carry` | LUT input 4 from X4/Y4 (0) or from the carry (1) |
| `pm_fmu_cin1`, `pm_cc_cin1`, `pm_sum1` | PM selects |
| `cm_sum_add`, `cm_carry_add` | FMU outputs from the multiplier cell (0) or the full adder (1) |
| `cf_mfc` | carry circuit: AFC (0) or MFC (1) |
| `spm_dyn`, `spm_sel` | SPM select from EX1, or the constant `spm_sel` |
| `z_spm` | Z-FG input 2 from SMUL (0) or the SPM (1) |
| `out_x`, `out_y` | output multiplexer codes (`out_sel_e`) |
| `fl_x`, `fl_y` | `FL_FLOP` or `FL_LATCH` |

## What is firm and what is chosen

Taken from the block's description:

* the list of parts in a block;
* the pin names;
* the presence of input multiplexers on X4, Y4 and in front of Z-FG;
* the FMU's structure: a multiplier cell, a full adder, an internal carry
  multiplexer steered by the previous sum, and two configured output
  multiplexers;
* the carry circuit's two halves and their output multiplexer;
* the SPM's purpose;
* switch-free dedicated wires between adjacent blocks.

Chosen in this design:

* the exact gate networks inside the FMU and the CF;
* which signal reaches each multiplexer input;
* the output-multiplexer input lists;
* the inputs of the carry unit and the CF;
* the SUM1 pin and its link to the higher-weight neighbour's register;
* the SPM's dynamic select on EX1;
* the flip-flop/latch polarity, the EN behaviour and the asynchronous clear;
* which neighbour each dedicated wire comes from;
* the 8 × 16 grid;
* all of the application mappings above.

**Block counts.** The reference block counts are 20 blocks for an 8 × 8
multiplier, 5 for an 8-bit barrel shifter and 2 for an 8-bit counter. These
mappings use more: 128, 24 and 4 blocks. The RTL provides one multiplier
cell (the FMU), one more multiplier cell (Y half in MFC mode), one SPM and
two registers per block. The description does not say how its tighter
packing is reached, so it is not reproduced.

**Loop through a latch.** Lint reports a combinational loop through SUM1.
It closes only when a block's register is set to latch mode and its
neighbour selects SUM1. The serial multiplier uses flip-flop mode, where RX
is a register output.

**Other serial forms.** Serial versions of addition and multiply-accumulate
are not worked out. The registers have no parallel load, so a serial
accumulator always starts from zero.

**Not modelled.** The configuration memory, the row and column routing
multiplexers, and any timing or area figures are not modelled.

## Simulating

Every file in `rtl/` is one module or package; `fb_pkg.sv` must come first.
The testbenches in `tb/` are self-checking. Each prints
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fb_pkg.sv tb/fb_tb_pkg.sv tb/tb_fb_array.sv --top-module tb_fb_array
./obj_dir/Vtb_fb_array
```

`-Wno-fatal` is needed for the grid. Verilator warns (UNOPTFLAT) about the
latch-mode loop through SUM1 that is described above.

`tb_fb_array` runs the default 8 × 16 grid through these tests:

* parallel multiply and multiply-accumulate (400 operand pairs, with corner
  cases);
* FMU adders;
* AFC and MFC carry chains;
* serial multiply (checking the 8-clock latency);
* an 8-bit barrel shift for all shift amounts;
* a 700-cycle counter with enable and wrap;
* latch mode.

It counts each of these and fails if one never occurred. It runs in well
under a second. The other testbenches cover one module each. Most are
exhaustive for the combinational parts. `tb_functional_block` sweeps every
configuration group of a single block.

To change the grid, override `ROWS`/`COLS` on `fb_array`. To add a
configuration option, extend `fb_cfg_t` and the multiplexer in
`functional_block`.
