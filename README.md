# 32-bit ALU with a Han-Carlson adder and a radix-4 Booth / Dadda multiplier

This is a purely combinational 32-bit arithmetic logic unit built around
two fast arithmetic structures:

- every addition-type operation (add, subtract, increment, decrement) goes
  through a **Han-Carlson parallel-prefix adder**, whose carries settle in
  log2(N)+1 logic levels instead of the N of a ripple-carry adder;
- signed multiplication uses **radix-4 Booth recoding**, which halves the
  partial products (16 instead of 32), a **Dadda tree** that compresses them
  to two rows with full and half adders, and a 64-bit **Han-Carlson adder**
  that adds those two rows.

A bitwise logic unit, a barrel shifter, an operation decoder and an output
multiplexer complete the ALU. There is no clock and no register: every unit
evaluates the operands at once and the multiplexer keeps the one the
operation code asks for. The longest path runs through the multiplier.

## Operations and ports

`alu_top_32` (parameter `WIDTH`, default 32; the unit is meant for 32 bits)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `a`, `b`    | in  | 32    | operands; `b[4:0]` is the shift amount |
| `op`        | in  | 4     | operation code, `alu_pkg::alu_op_e` |
| `result`    | out | 32    | result; low word of the product for `MUL` |
| `result_hi` | out | 32    | high word of the product for `MUL`, else 0 |
| `carry`     | out | 1     | carry out of the adder for arithmetic operations, else 0 |
| `overflow`  | out | 1     | two's complement overflow for arithmetic operations, else 0 |

| code | name   | result                         | unit |
|------|--------|--------------------------------|------|
| 0    | `ADD`  | a + b                          | arithmetic |
| 1    | `SUB`  | a − b                          | arithmetic |
| 2    | `INC`  | a + 1                          | arithmetic |
| 3    | `DEC`  | a − 1                          | arithmetic |
| 4    | `AND`  | a & b                          | logic |
| 5    | `OR`   | a \| b                         | logic |
| 6    | `XOR`  | a ^ b                          | logic |
| 7    | `NAND` | ~(a & b)                       | logic |
| 8    | `NOR`  | ~(a \| b)                      | logic |
| 9    | `NOT`  | ~a                             | logic |
| 10   | `MUL`  | {result_hi, result} = a × b, signed 64-bit | multiplier |
| 11   | `SLL`  | a << b[4:0]                    | shifter |
| 12   | `SRL`  | a >> b[4:0] (zero fill)        | shifter |
| 13   | `SRA`  | a >>> b[4:0] (sign fill)       | shifter |
| 14, 15 | —    | all outputs 0                  | none |

`carry` is the raw carry out of the adder. For `SUB` and `DEC` it is
therefore 1 when no borrow occurred (a ≥ b for `SUB`, a ≠ 0 for `DEC`).

## Module hierarchy

```
alu_top_32
├── u_decoder  alu_decoder              opcode -> unit select + sub-operation
├── u_arith    arithmetic_unit_32bit    operand steering for ADD/SUB/INC/DEC
│   └── u_adder  han_carlson_adder #(32)
├── u_mul      booth_multiplier_32bit
│   ├── u_booth        booth_radix4_encoder   16 partial products
│   ├── u_dadda        dadda_tree             16 rows -> 2 rows
│   └── u_final_adder  han_carlson_adder #(64)
├── u_logic    logic_unit_32bit
├── u_shift    barrel_shifter_32bit
└── u_outmux   alu_output_mux
```

`alu_pkg` holds the shared encodings (`alu_op_e`, `unit_sel_e`,
`arith_op_e`, `logic_op_e`, `shift_op_e`) and the control word `alu_ctrl_t`
that the decoder hands to the units and the multiplexer.

## The Han-Carlson adder

Each bit forms generate `g = a & b` and propagate `p = a ^ b`; the carry in is
folded into bit 0 as `g[0] |= p[0] & cin`. The prefix operator
`(G, P) o (G', P') = (G | P & G', P & P')` is then applied in three phases:

1. **Brent-Kung level.** Every odd bit combines with the even bit below it, so
   odd bit i now covers bits i..i−1.
2. **Kogge-Stone levels, odd bits only.** At distances 2, 4, 8, 16, odd bit i
   combines with odd bit i−d. After log2(N)−1 levels every odd bit holds the
   group generate of bits i..0.
3. **Brent-Kung level.** Every even bit i ≥ 2 combines with odd bit i−1, which
   is already complete.

For 32 bits this takes 6 levels, one more than Kogge-Stone. In exchange, only
half the bit positions carry a Kogge-Stone tree, which halves its cells and
long wires. The sum is `p ^ carry`, `cout` is the group generate of all bits,
and `ovf` is the carry into the top bit XOR the carry out of it. The module
takes any `WIDTH` ≥ 2. The multiplier uses it at 64 bits, where it has 7 levels.

The arithmetic unit drives the second adder input and the carry in as
follows: `ADD` (b, 0), `SUB` (~b, 1), `INC` (0, 1), `DEC` (all ones, 0).

## The multiplier

### Radix-4 Booth recoding

Multiplier `b` is read in 16 overlapping 3-bit groups `{b[2i+1], b[2i], b[2i−1]}`,
with `b[−1] = 0`. Each group gives a digit −2b[2i+1] + b[2i] + b[2i−1] in
{−2, −1, 0, +1, +2}. So `b` = Σ digit_i · 4^i holds exactly for a signed
32-bit `b`, and no correction row is needed. Each row is `a` (sign-extended
to 33 bits) times |digit|, meaning 0, `a` or `a << 1`. For a negative digit
the row is bitwise inverted and a separate `neg[i]` bit is raised. That bit
supplies the +1 of the two's complement, and the tree adds it at the row's
lowest column (column 2i).

### Sign handling

Sign-extending 16 rows of 33 bits out to 64 bits would almost double the
tree. Instead, the tree inverts the sign bit s of each row. For a row of
weight 2^k that means storing (1 − s)·2^k where −s·2^k is meant, so every row
is too large by exactly 2^k. A single constant row
K = −Σ 2^(32+2i) (mod 2^64), for i = 0..15, cancels all of these. The tree
therefore reduces:

- the 16 rows, each 33 bits, with inverted sign bits, at offsets 2i;
- the 16 `neg` bits;
- the ones of K.

The tallest column holds 17 bits.

### Dadda reduction

Dadda's rule keeps every stage to the minimum work. The target heights are
2, 3, 4, 6, 9, 13, 19, … (each is ⌊1.5×⌋ the previous one). A stage reduces
every column to the next lower target. A 17-bit-high matrix thus takes
six stages: 13, 9, 6, 4, 3, 2. Columns are processed from the least
significant upward. A column's excess counts the carries that arrive from
the column to its right in the same stage. If the excess is e, the column
gets ⌊e/2⌋ full adders (height −2 each) and, for odd e, one half adder
(height −1).

All of this depends on `WIDTH` only, so the schedule (heights and adder
counts per stage and column) is worked out by constant functions during
elaboration and stored in a packed localparam. Generate loops then lay the
adders out as a fixed network. Within a column the slots are ordered as
follows: full-adder sums, then the half-adder sum, then the bits passed
through unchanged, then the carries from the column to the right.
Generate-time `$error` checks confirm that the carries each column sends
match what its neighbour expects.

The two remaining rows go to the 64-bit Han-Carlson adder with carry in 0.
The carry out of column 63 is dropped, because the product is taken
modulo 2^64 and is exact for signed 32-bit operands. `dadda_tree` and
`booth_radix4_encoder` take any even `WIDTH`. The testbenches also run
them at 8 bits.

## Barrel shifter

There are five stages of 2:1 multiplexers, shifting right by 1, 2, 4, 8
and 16 under control of `shamt[0..4]`. Each stage fills the vacated bits
with 0, or with the sign bit for `SRA`. A left shift reverses the bit
order, shifts right and reverses back, so all three shifts share the
same stages.

## Timing

The ALU is combinational: outputs are valid after the propagation delay
of the path the operation uses, with no latency in cycles. To run it in a
clocked system, register the operands and/or the outputs around
`alu_top_32`. The multiplier is the longest path: Booth selection, six
full-adder levels, then a 7-level 64-bit prefix adder.

## What is and is not specified by the design description

Taken from the described design:

- the unit list: arithmetic unit (add, subtract, increment, decrement);
  logic unit (AND, OR, XOR, NAND, NOR); multiplier (Booth encoder, Dadda
  tree, Han-Carlson final adder); control unit (decoder plus output
  multiplexer);
- the Han-Carlson idea of a Brent-Kung / Kogge-Stone hybrid;
- signed radix-4 Booth recoding in overlapping 3-bit groups;
- reduction to two rows with carry-save adders;
- the combinational nature of the ALU;
- the 32-bit width;
- the module names `alu_top_32`, `han_carlson_adder`,
  `booth_multiplier_32bit`, `logic_unit_32bit` and `barrel_shifter_32bit`.

Choices made here, where the description gives nothing:

- the opcode map and control word;
- the flags (`carry`, `overflow`) and their conventions;
- `result_hi` for the upper product word;
- `NOT` operates on `a`; `INC` and `DEC` operate on `a`;
- the shift kinds (SLL, SRL, SRA) and taking the amount from `b[4:0]`;
- the Booth row format (one's complement plus `neg` bit) and the constant-row
  sign handling;
- Dadda's standard height sequence with full and half adders.

Known departures:

- The barrel shifter appears only in the original module hierarchy, with
  no description of its operations.
- The original hierarchy also lists a `dadda_4to2` cell in the multiplier,
  probably a 4:2 compressor. Its function and placement are not given, so
  this tree uses 3:2 and 2:2 counters only. Adder counts and delays
  therefore differ from a 4:2-based tree.
- No divider is built. Division is mentioned only as a general ALU
  capability, not as a unit of this design.
- The original FPGA build used 143 I/O pins. These ports add up to 136
  (32+32+4 in, 32+32+1+1 out), so the original port list was somewhat
  different.
- The reported results for the original ALU (2.65 ns critical path,
  14.8 mW, 1,248 LUTs on a Xilinx 7-series part) cannot be assumed for
  this RTL. They depend on the original source and the tool flow.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_han_carlson_adder` | 32-, 64- and 13-bit adders; full carry chains; every generate position; 60k random sums, carries and overflows |
| `tb_arithmetic_unit_32bit` | all four operations on corner-value pairs and random operands; result, carry, overflow |
| `tb_logic_unit_32bit` | every operation against a per-bit truth table |
| `tb_barrel_shifter_32bit` | every amount 0..31 of every shift kind |
| `tb_booth_radix4_encoder` | each row equals digit × a; weighted row sum equals a × b |
| `tb_dadda_tree` | random matrices at 32 and 8 bits; output rows sum to the weighted row sum |
| `tb_booth_multiplier_32bit` | corner and 20k random signed products at 32 bits; exhaustive at 8 bits |
| `tb_alu_decoder` | all 16 codes against a table |
| `tb_alu_output_mux` | every select code with random inputs |
| `tb_alu_top_32` | end to end at default size: every opcode on corner and random operands |
| `tb_alu_exhaustive_8bit` | the whole ALU at `WIDTH = 8`: all 16 codes on all 65,536 operand pairs |

`tb_alu_top_32` also counts how often each case occurred: carry out,
overflow, borrow, negative product and sign-filling shift. If any of
them never occurred, the test fails.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/alu_pkg.sv tb/tb_alu_top_32.sv --top-module tb_alu_top_32
./obj_dir/Vtb_alu_top_32
```

Swap in any other testbench name. `alu_pkg.sv` must come first because
the modules import it. Everything in `rtl/` is synthesizable.
Elaboration of `dadda_tree` takes a few seconds, because of the constant
functions that build its schedule.
