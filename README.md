# ADAPTO — a full-adder based reconfigurable unit for bit-level operations

A processor that works on 32-bit words does poorly on short or odd-sized data: a
shift followed by a NOT and an AND on 8-bit fields, a bitwise merge of packed pixels,
or the parity network of a convolutional encoder each cost several instructions. This
RTL is an independent implementation of ADAPTO (Adder-based Dynamic Architecture
for Processing Tailored Operators), the architecture proposed by Cardarilli,
Di Nunzio, Re and Nannarelli: a small reconfigurable array meant to sit next to the
processor's ALU and do such an operation in a single cycle.

Two ideas keep the array cheap and its reconfiguration instant:

* **The cell is a full adder, not a LUT.** A full adder with one input forced to a
  constant is already an AND, OR, XOR, XNOR, NOT or PASS gate; with all three inputs
  free it is a 3-input XOR (sum) or a majority gate (carry), and chained it is an
  adder. Four program bits per cell are enough, against 16+ for a 3-input LUT.
* **The interconnect stores line numbers, not switch bits.** Each cell input can be
  joined to any of 33 lines, but only one at a time, so a 6-bit number and a decoder
  replace 33 switch bits.

All configuration is kept for `N_CTX` contexts in memories next to the logic it
controls. Changing the array's function is just presenting a different context
address, and it takes effect in the same cycle the data passes through.

## Array organisation

```
            din[31:0]
               |
   +-----------v-----------+   stripe 0: lines 0..31 = din, line 32 = extra line
   |  interconnect stripe  |   96 columns, each picks one line for one LB input
   +-----------+-----------+
   |  LB31 ... LB1  LB0    |   row 0: 32 logic blocks, carry LB0 -> LB1 -> ... LB31
   +-----------+-----------+
   |  interconnect stripe  |   stripe 1: lines 0..31 = row 0 outputs, line 32 = extra
   +-----------+-----------+
   |  LB row 1             |
   +-----------+-----------+
   |  interconnect stripe  |
   +-----------+-----------+
   |  LB row 2             |
   +-----------+-----------+
               |
            dout[31:0]
```

Data flows strictly top to bottom through three layers (`N_ROWS = 3`), each an
interconnect stripe followed by a row of 32 logic blocks (`N_LB = 32`). There is no
feedback and no register in the data path: `dout` is a combinational function of
`ctx` and `din`. The processor's own pipeline register is expected to capture
`dout`, so an operation, including the switch to its configuration, costs one clock.

The only horizontal connection inside a row is the carry chain: LB *i*'s carry out
feeds LB *i*+1's carry input directly, so multi-bit adders do not go through the
interconnect. LB 0 receives a constant 0 on that input.

## The logic block

```
            Co (from LB i-1)  P  D3  0
                  \           |  |  /
                   +--[ Cin mux: S1,S0 ]--+
                                          |
        P ---+                            v
             +--[ X selector: S1,S0 ]--> X   +------------+  R   +----------+
        D2 --+                               | full adder |----->| out mux  |--> out
        D1 ------------------------------->Y |            |----->|   S2     |
                                             +------------+ Cout +----------+
                                                          |
                                                          +--> Co of LB i+1
```

The four program bits are `{S1,S0}`, `S2` and `P` (`adapto_pkg::lb_cfg_t`). `S1,S0`
drive the Cin multiplexer and the X selector together, so one 2-bit code picks both
sources:

| `{S1,S0}` (`lb_mode_e`) | Cin      | X    | Y    | use                                            |
|--------------------------|----------|------|------|------------------------------------------------|
| `00` `MODE_CHAIN`        | Co       | D2   | D1   | adder bit inside a carry chain                 |
| `01` `MODE_CINP`         | P        | D2   | D1   | 2-input gates; adder LSB with carry-in P       |
| `10` `MODE_CIND3`        | D3       | D2   | D1   | 3-input XOR and majority                       |
| `11` `MODE_UNARY`        | 0        | P    | D1   | PASS (P=0) and NOT (P=1) of D1                 |

`S2 = 0` outputs the sum R, `S2 = 1` the carry Cout. The resulting functions:

| function            | `{S1,S0}` | P | S2 | output                     |
|---------------------|-----------|---|----|----------------------------|
| AND  D1·D2          | 01        | 0 | 1  | Cout                        |
| OR   D1+D2          | 01        | 1 | 1  | Cout                        |
| XOR  D1⊕D2          | 01        | 0 | 0  | R                           |
| XNOR                | 01        | 1 | 0  | R                           |
| XOR3 D1⊕D2⊕D3       | 10        | – | 0  | R                           |
| majority(D1,D2,D3)  | 10        | – | 1  | Cout                        |
| PASS D1             | 11        | 0 | 0  | R                           |
| NOT D1              | 11        | 1 | 0  | R                           |
| add, LSB            | 01        | 0 (1 for subtract) | 0 | R, carry to next LB |
| add, other bits     | 00        | – | 0  | R, carry to next LB         |

A 3-input XNOR has no code of its own; it is an XOR3 with one operand inverted in
the row above, or an XNOR of two operands.

## Interconnect and the extra line

A stripe has 33 lines. Lines 0..31 carry the outputs of LB 0..31 of the row above
(for the top stripe, the bits of `din`). Line 32, the *extra line*, carries a constant
stored per stripe and per context. Every LB input pin (3 × 32 per row) has its own
column: a 6-bit line number is decoded one-hot (`adapto_line_decoder`) and closes one
of 33 switches (`adapto_ic_column`, modelled as AND-OR). Codes 33..63 close none and
the pin reads 0.

Everything that only moves bits happens here, at no LB cost:

* a shift by a fixed amount: LB *i* takes line *i − k*, and the vacated positions take
  the extra line, which inserts 0 or 1;
* bit permutations, duplication of one bit to many pins, and constant inputs: an
  unused pin can read the extra line.

A shift amount is part of the configuration. A variable shift needs one context per
amount.

## Contexts and configuration

Each LB cell owns a small memory (`adapto_ctx_ram`) of `N_CTX` words of 22 bits:
`{sel_d3, sel_d2, sel_d1, lb_cfg}`. Each stage also has a 1-bit memory for its extra
line. Reads are asynchronous at address `ctx`. Per context the array holds:

| item                        | bits                      |
|-----------------------------|---------------------------|
| LB program bits             | 3 × 32 × 4 = 384          |
| line numbers                | 3 × 96 × 6 = 1728         |
| extra-line values           | 3                         |
| total                       | 2115 (× 8 contexts = 16 920) |

Configuration is written through a synchronous port, one LB cell per clock:

| port                           | meaning                                               |
|--------------------------------|-------------------------------------------------------|
| `cfg_we`                       | store one cell at the rising edge of `clk`            |
| `cfg_ctx`, `cfg_row`, `cfg_col`| which context, row (0 = top) and LB                   |
| `cfg_lb`                       | program bits (`lb_cfg_t`)                             |
| `cfg_sel_d1/d2/d3`             | line numbers 0..32 for D1, D2, D3                     |
| `cfg_line_we`, `cfg_line_val`  | store the extra-line value of stripe `cfg_row`        |
| `ctx`, `din` → `dout`          | execution, combinational                              |

Writing one context while another executes is safe: a write only affects the word it
addresses. The memories are not reset. Write every cell of a context before you use
it. The testbench's `clear_ctx` task does this by making every LB pass the extra line.
Assertions check that `cfg_row`, `cfg_col` and the write address are in range.

## Mapping applications

`tb/tb_adapto_ru.sv` programs eight contexts with these mappings and checks each
against a formula.

**Decoding step `A = A AND NOT(B << C)`** (8-bit A, B; `din = {16'b0, B, A}`).
Stripe 0 does the shift and routes A. Row 0: LB 0..7 PASS A, and LB 8..15 NOT
`(B<<C)` (positions below C read the extra line, 0). Row 1: LB 0..7 AND. Row 2:
PASS. One context per shift amount C.

**Union of two monochrome images** (0 = black; `din` = two 16-pixel words). Row 0
inverts all 32 pixels, row 1 ORs the pairs, row 2 inverts again: 16 pixels per cycle.

**Convolutional encoder of DRM / Eureka-147** (constraint length 7, generators 133,
171, 145 and 133 octal). The 7-bit shift register A6..A0 stays in a processor
register (`din[k] = Ak`; A6 is the newest bit). Row 0: three XOR3 cells form
`temp0 = A6⊕A4⊕A3`, `temp1 = A6⊕A5⊕A4`, `temp2 = A6⊕A5⊕A2`. Three more cells pass
A0, A1 and A3. Row 1 forms `B0 = temp0⊕A1⊕A0`, `B1 = temp1⊕A3⊕A0` and `B2 = temp2⊕A0`.
The fourth output repeats B0. The result is one encoded bit per cycle, on
`dout[2:0] = {B2, B1, B0}`.

**16-bit addition**: row 0 LB 0 in `MODE_CINP` with P = 0, LB 1..15 chained, and
LB 16 chained with both operands on the extra line, so that it outputs the carry.

## Files

| file                          | content                                                   |
|-------------------------------|-----------------------------------------------------------|
| `rtl/adapto_pkg.sv`           | sizes, `lb_mode_e`, `lb_out_e`, `lb_cfg_t`                |
| `rtl/adapto_fa.sv`            | full adder                                                |
| `rtl/adapto_lb.sv`            | logic block                                               |
| `rtl/adapto_lb_row.sv`        | row of LBs with carry chain                               |
| `rtl/adapto_line_decoder.sv`  | 6-bit → 33 one-hot column decoder                         |
| `rtl/adapto_ic_column.sv`     | one interconnect column (decoder + switches)              |
| `rtl/adapto_interconnect.sv`  | one 33-line stripe with 96 columns                        |
| `rtl/adapto_ctx_ram.sv`       | multicontext memory, asynchronous read                    |
| `rtl/adapto_stage.sv`         | stripe + LB row + their context memories                  |
| `rtl/adapto_ru.sv`            | top: three stages and the configuration port              |
| `tb/adapto_tb_pkg.sv`         | function-level LB reference model                         |
| `tb/tb_*.sv`                  | one self-checking testbench per module                    |

Parameters of `adapto_ru`: `N_LB = 32`, `N_ROWS = 3`, `N_CTX = 8`. The derived widths
(`SEL_W = 6`, `CTX_W`, `COL_W`, `ROW_W`) follow from them. The lower modules and
testbenches work with other sizes, but the end-to-end testbench's mappings assume the
defaults.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself, with a
watchdog that counts a failure if it hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/adapto_pkg.sv tb/adapto_tb_pkg.sv tb/tb_adapto_ru.sv \
    --top-module tb_adapto_ru -Mdir obj_ru
./obj_ru/Vtb_adapto_ru
```

Replace `tb_adapto_ru` with any other `tb_*` to test one module. The end-to-end test
runs the full-size array (32 × 3, 8 contexts). It executes about 5,600 checked
operations, mostly with a different context every cycle. It also reprograms one
context while the others run. It counts each mechanism, and fails if one never
occurs: context switch, correct result in the switching cycle, carry ripple, carry
out, 0 and 1 insertion, background writes, and every LB function. It takes under a
minute to build and a fraction of a second to run.

Lint: `verilator --lint-only -Wall -Irtl rtl/adapto_pkg.sv rtl/adapto_ru.sv`. Its
remaining warnings are expected: the package's default-size constants are unused in
some modules, and so is the last LB's carry out.

## What follows the architecture and what is this design's choice

These follow the published architecture:

* the full-adder cell and its functions;
* the LB structure (Cin multiplexer fed by Co, P, D3 and 0; X selector fed by P and
  D2; D1 on Y; output multiplexer; four program bits S0, S1, S2, P);
* 32 LBs per row, 3 rows, and stripes alternating with rows;
* 33 lines per stripe, including the extra line that inserts 0 or 1;
* the 6-bit decoded line number per LB input;
* a direct carry chain;
* multicontext local memories addressed by log2(N) lines;
* 384 + 1728 configuration bits per context;
* the application mappings above.

These are choices of this implementation:

* which `{S1,S0}` code selects which sources, and `S2 = 0` selecting R (the
  architecture gives the structure, not the encoding);
* the element between P and the X selector passes P unchanged;
* the carry runs from LB *i* to *i*+1, LB 0 gets a constant 0, and the last carry out
  is not brought out;
* a single 32-bit operand word feeds the top stripe, so two operands are packed into
  it;
* `N_CTX = 8`, since the architecture leaves the number of contexts open;
* the configuration write port, and the extra-line value stored per stripe and per
  context (3 bits more than 2112);
* line codes above 32 read 0, where a pass-transistor column would float;
* no reset of configuration memories;
* pass-transistor switches and the transistor-level adder are modelled as logic.
  Nothing here says anything about their area, transistor count or speed.

The RO generator, which turns an instruction into a context address, belongs to the
host processor and is not included. Its output is the `ctx` port. The host's register
file supplies `din` and takes `dout`.
