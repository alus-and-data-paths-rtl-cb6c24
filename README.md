# Five ways to build an ALU and its data path

An arithmetic-logic unit can be organised in very different ways. This
repository holds synthesizable SystemVerilog for five of them. All come from
one classic course on processor data paths. They share no data and sit side
by side in one top module:

| Design | Top module | Idea |
|---|---|---|
| Bit-sliced ALU | `bitslice_alu16` | Four identical 4-bit slices. Each slice has its own register set, Q register, shifters and ALU. A carry-lookahead generator joins them into a 16-bit microprogrammed data path. This follows the well-known 2901/2902 slice pair. |
| Accumulator ALU | `fixed_point_alu` | A classic single-accumulator unit with an accumulator (AC), a multiplier-quotient register (MQ) and a data register (DR). Multiply and divide run one bit per clock. |
| Generic-function-unit ALU | `gfu_alu` | Every bit is built from 4-to-1 multiplexers that compute any 2-input function given as a 4-bit truth table. Arithmetic and logic differ only in the codes applied. |
| Brute-force ALU | `mux_alu` | One circuit per function, and a multiplexer picks a result. |
| Split ALU | `split_alu` | A logic unit and an arithmetic unit in parallel, with a 2-to-1 multiplexer. |

`alu_datapaths_top` instantiates all five. Its ports carry a prefix that names
the design: `bs_`, `fp_`, `gf_`, `mx_` or `sp_`. Only `clk` and `rst_n` are
shared. The reset is synchronous and active low.

The bit-sliced ALU has the most structure, so most of this file is about it.

---

## 1. The 16-bit bit-sliced ALU

### One slice (`am2901_slice`)

```
        D (4)                      RAM shifter <----- F
          |                             | (F, F/2 or 2F)
          |        A addr, B addr -> 16 x 4 register set  (write at B)
          |                          A out      B out
          |                            |          |        Q shifter <- F or Q
          |                            |          |            |
          +---> R mux (A, D, 0)        |     S mux (A, B, Q, 0) <- Q register
                       \              /
                        4-bit ALU  -- c_out, g_n, p_n, f0 (sign), ovr, z
                            |  F
                   Y mux (F or RAM(A)) ---> Y (4)
```

Y and all the flags are combinational in the same cycle as the instruction.
The register set and the Q register load on the rising edge of `clk`. The
register set reads combinationally. A write becomes visible one cycle later.

### The 9-bit instruction (`am2901_pkg`)

The instruction is a packed struct `{dst, fn, src}` of three 3-bit fields.
Each field value is the 3-digit binary code below.

| code | source: R, S | function F | destination: Y; RAM(B) ←; Q ← |
|---|---|---|---|
| 000 | RAM(A), Q | R + S + Cin | F; —; F |
| 001 | RAM(A), RAM(B) | S − R − Cin | F; —; — |
| 010 | 0, Q | R − S − Cin | RAM(A); F; — |
| 011 | 0, RAM(B) | R OR S | F; F; — |
| 100 | 0, RAM(A) | R AND S | F; F/2; Q/2 |
| 101 | D, RAM(A) | (NOT R) AND S | F; F/2; — |
| 110 | D, Q | R XOR S | F; 2F; 2Q |
| 111 | D, 0 | R XNOR S (R XOR NOT S) | F; 2F; — |

### Carries and borrows

The two subtractions are defined as `S − R − Cin` and `R − S − Cin`. In
them, `c_in` is a **borrow in** and `c_out` a **borrow out**. This differs
from the commercial 2901, which computes `S − R − 1 + Cin`. The benefit is
that a chain of slices, or of 16-bit words, passes borrows exactly as it
passes carries. So a multi-word subtraction is "subtract, then subtract
with borrow", with `c_out` of the low word wired to `c_in` of the high word.

Each slice also reports active-low generate and propagate signals `g_n` and
`p_n`. They are defined so that `c_out = g | (p & c_in)` in whichever sense
the function uses, carry or borrow. Here `g` is the carry or borrow out
when `c_in` = 0, and `p` says that `c_in` would pass through. The lookahead
generator therefore works unchanged for additions and subtractions. The
five logic functions produce no carry, so `g`, `p`, `c_out` and `ovr` are
all 0 for them.

### Bit numbering and shift pins

The original drawings number bits from the most significant end: bit 0 is
the sign. The shift pins keep those names. `ram0`/`q0` sit at the **most**
significant end of a slice, and `ram3`/`q3` at the **least** significant
end. Internally, vectors use ordinary `[3:0]` order.

The pins are bidirectional on the real part. Here each one is split into an
input `*_i` and an always-driven output `*_o`:

* F/2 and Q/2 shift toward the least significant end. `ram0_i`/`q0_i`
  enter at the top, and the bottom bits leave on `ram3_o`/`q3_o`.
* 2F and 2Q shift toward the most significant end. `ram3_i`/`q3_i` enter
  at the bottom, and the top bits leave on `ram0_o`/`q0_o`.

For destination 000 the Q shifter passes F straight into Q.

### The array (`bitslice_alu16`, `am2902_cla`)

All four slices receive the same instruction and register addresses, so
they behave as one 16-bit machine. That machine has 16 registers of 16 bits
and a 16-bit Q register. Slice 0 holds bits 3:0.

The shift pins of neighbouring slices are cross-wired, so a shift moves
bits across the whole word. Only the pins at the two ends of the word are
brought out.

Carries depend on the `LOOKAHEAD` parameter:

* `LOOKAHEAD = 1` (the default): the carries into slices 1 to 3 come from
  `am2902_cla`, which computes them in parallel from the lower slices' g/p.
* `LOOKAHEAD = 0`: the carries ripple from slice to slice.

Sign, overflow and carry out come from the top slice. The array's zero flag
is the AND of the four slice zero flags. The top slice's `g_n`/`p_n` are
brought out for a second level of lookahead. Group outputs of the lookahead
generator are not built.

### Using it: double-length multiply

With the Q register and the double shift, the array runs shift-and-add
multiplication as a 16-step microprogram. The end-to-end testbench runs
exactly this:

```
R1 = multiplicand, R2 = 0, Q = multiplier
repeat 16:
    instr = {RAMQD, ADD, Q[0] ? AB : ZB}, A = 1, B = 2, c_in = 0
    ram0_i = c_out          // carry becomes R2's new top bit
    q0_i   = ram3_o         // bit falling out of R2 enters Q's top
result: R2 = high half, Q = low half
```

Q's bottom bit is visible on `q3_o`.

## 2. The accumulator ALU (`fixed_point_alu`)

There are three registers: AC, MQ and DR. A parallel adder/logic block
(`fpalu_adder_logic`) does all the arithmetic. A control unit
(`fpalu_control`) sequences it.

| `fp_op_t` | effect | cycles to `done` |
|---|---|---|
| LDAC, LDMQ, LDDR | register ← `bus_in` | 1 |
| ADD, SUB | AC ← AC ± DR; sets Z, N, C (the borrow after SUB) and V | 1 |
| AND, OR, XOR | AC ← AC op DR; sets Z and N, clears C and V | 1 |
| NOT | AC ← NOT AC; sets Z and N, clears C and V | 1 |
| MUL | AC,MQ ← DR × MQ (unsigned; AC is the high half) | WIDTH+1 |
| DIV | MQ ← MQ / DR, AC ← MQ mod DR (unsigned) | WIDTH+1 |

An operation is accepted when `start` is high and `busy` is low. `done`
pulses for one cycle once the result is in the registers.

MUL is shift-and-add. After a cycle that clears AC, each step does two
things:

* if `MQ[0]` is 1, it adds DR to AC;
* it then shifts {carry, AC, MQ} one place right.

DIV is restoring division. Each step does three things:

* it shifts {AC, MQ} one place left;
* it tries AC − DR;
* if there is no borrow, it keeps the difference and sets the new quotient
  bit.

Dividing by zero gives a quotient of all ones and leaves the dividend as the
remainder. It also sets V.

Assertions in `fpalu_control` check two rules. `done` is never high
together with `busy`, and the step counter stays within range.

The default width is 16 bits (`WIDTH`).

## 3. The generic-function-unit ALU (`gfu`, `gfu_alu_slice`, `gfu_alu`)

A `gfu` is a 4-to-1 multiplexer. The data bits `a` and `b` drive its select
inputs, and a 4-bit code `G = {G3,G2,G1,G0}` drives its data inputs. The
output is `G[{a,b}]`, so the code is simply the truth table of the function:

| code | 8 | 14 | 6 | 12 | 10 | 1 | 7 | 9 | 3 |
|---|---|---|---|---|---|---|---|---|---|
| function | AND | OR | XOR | A | B | NOR | NAND | XNOR | NOT A |

One bit of the ALU has four parts:

* a propagate unit, `P = fP(A,B)`;
* a kill unit, `K = fK(A,B)`;
* a carry cell, `C(i+1) = P·C + P'·K'`;
* a result unit, `R = fR(P, C)`.

The codes for P, K and R are shared by all bits. The carry ripples from
`c_in`, and the default width is eight bits.

| operation | P | K | R | c_in |
|---|---|---|---|---|
| A | 12 | – | 12 | – |
| A AND B / A OR B / any logic function G | 8 / 14 / G | – | 12 | – |
| A + B + Cin | 6 | 1 | 6 | Cin |
| A + 1 | 12 | 3 | 6 | 1 |
| A − B − Bin | 9 | 4 | 9 | borrow |

For subtraction, `c_out` is the borrow out.

Why it works: when P = 1 the incoming carry passes through. When P = 0
both operand bits are equal, and the kill signal decides. With K = A'B' for
addition, `K'` is the carry generated when A = B = 1.

## 4. The multiplexer ALUs (`mux_alu`, `split_alu`)

**`mux_alu`** has one circuit per function: AND, OR, XOR, NOT A, and a
ripple chain of full adders computing A + B + Cin. A 3-bit code
(`mx_fn_t`) selects one result. Codes 5 to 7 give zero.

**`split_alu`** computes two results side by side, and `s` picks one:

* `logic_unit` (`s` = 0) offers AND, OR, XOR, NOT A, NOT B, A, B and zero.
* `arith_unit` (`s` = 1) offers A+B, A+B+Cin, A−B, A−B−Cin, B−A, B−A−Cin,
  −A, −B, A+1, B+1, A−1 and B−1.

The arithmetic unit uses one adder with operand multiplexers. For the
subtracting functions, Cin is a borrow in and `c_out` a borrow out. `ovf`
is two's complement overflow.

A classic ALU function list also names a multiply step, a divide step, mask,
conditional AND/OR and shift. Without a definition of those functions they
are **not implemented** here.

## 5. What follows the source material and what is this design's choice

These parts follow the source closely:

* the slice structure;
* the three instruction tables;
* the 16-bit four-slice array with lookahead or ripple carries;
* the accumulator machine's registers and register transfers;
* the generic function unit, its code table and its carry equation;
* the structure of the two multiplexer ALUs.

These are this design's own choices, where the source gives no detail:

* Clocking and reset: every register loads on the rising edge, and the
  synchronous reset clears the Q register and all accumulator-ALU state.
  The 16-word register set is not reset.
* The split shift pins, and the packing of the instruction word.
* The generate/propagate definition, and all flags of the logic functions.
* Borrow semantics in all subtractions. This follows the printed function
  definitions, not the commercial part.
* For the accumulator ALU: its width, its flag set and operation encoding,
  its handshake, unsigned MUL/DIV algorithms, and the divide-by-zero result.
* The widths of the generic and multiplexer ALUs.
* All function codes of `mux_alu`, `logic_unit` and `arith_unit`. The NOT A
  element of the brute-force ALU is also an interpretation.

These are not modelled:

* the transistor-level pass-gate form of the generic function unit;
* Manchester-chain or ECL lookahead versions of its carry chain;
* the output enable and group lookahead outputs of the commercial parts.

## 6. Files

* `rtl/*_pkg.sv`: types and codes (`am2901_pkg`, `fpalu_pkg`,
  `alu_ops_pkg`).
* `rtl/<module>.sv`: one module per file. Each file opens with a
  description of its function, interface and timing.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.
* `tb/au_ref.svh`: the integer reference for the arithmetic-unit functions.
* `tb/tb_alu_datapaths_top.sv`: the end-to-end test, at default parameters.

The end-to-end test covers all five designs. It runs multiplications,
32-bit additions and subtractions, shifts and register reads through Y on
the bit-sliced ALU. It also runs multiply, divide, divide by zero,
overflow and logic operations on the accumulator ALU, and arithmetic and
logic codes on the other three. It counts each mechanism it exercises and
fails if any of them never happened. The mechanisms are:

* lookahead carries between slices;
* shifts down and up across slice boundaries, and Q shifts;
* RAM(A) shown on Y;
* overflow;
* multi-cycle multiply and divide, and divide by zero;
* borrow and increment codes;
* both paths of the split ALU.

Simulate any testbench with Verilator 5, for example:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/am2901_pkg.sv rtl/fpalu_pkg.sv rtl/alu_ops_pkg.sv \
    tb/tb_alu_datapaths_top.sv --top-module tb_alu_datapaths_top
./obj_dir/Vtb_alu_datapaths_top
```

Every module passes `verilator --lint-only -Wall` and elaborates in Yosys
(slang front end). All testbenches pass. Each testbench has been shown to
fail against a deliberately broken copy of its module. Most checks
compare against integer arithmetic or against the instruction and code
tables, not against the RTL's own equations.
