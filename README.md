# A 16-bit ALU with stored condition flags

This is the arithmetic and logic unit of a small accumulator-style
microprocessor, together with the three flip-flops that remember the
condition flags of its latest operation. The ALU itself is purely
combinational: given two operands, an operation code and (for shifts) a
count, it produces a 16-bit result and three flags, **neg**, **ovf** and
**zro**. The flags are captured on each rising clock edge into a separate
register, from which the CPU's controller reads them to make decisions such
as conditional branches.

In the full CPU the ALU's left and right operands come, through
multiplexers, from the register file, the accumulator and the data bus, and
its result goes to the accumulator. Those surrounding units are not part of
this RTL; the ALU's operand, result and flag connections are the ports of
the top module.

```
            a ──┐        ┌── b
                ▼        ▼
   shift_cnt ─►┌──────────┐
shift_cnt_src ►│   alu    │── result
         sel ─►└──────────┘
                   │ cf_in (neg, ovf, zro)
                   ▼
              ┌──────────┐
        clk ─►│cond_flags│── cf
      rst_n ─►└──────────┘
```

## Operations

The operation is selected by `sel`, of type `micro_pk::alu_op_e`
(5 bits, codes in this order, starting at 0):

| code | name       | result                                   | ovf            |
|-----:|------------|------------------------------------------|----------------|
| 0    | `ADD_OP`   | a + b                                    | signed overflow |
| 1    | `SUB_OP`   | a − b                                    | signed overflow |
| 2    | `MULT_OP`  | low 16 bits of the signed product a × b  | product does not fit in 16 signed bits |
| 3    | `DIV_OP`   | not implemented: 0                       | 0              |
| 4    | `REM_OP`   | not implemented: 0                       | 0              |
| 5    | `AND_OP`   | a & b                                    | 0              |
| 6    | `OR_OP`    | a \| b                                   | 0              |
| 7    | `XOR_OP`   | a ^ b                                    | 0              |
| 8    | `INV_OP`   | ~a                                       | 0              |
| 9    | `INC_OP`   | a + 1                                    | a = 0x7FFF     |
| 10   | `DEC_OP`   | a − 1                                    | a = 0x8000     |
| 11   | `ZRO_OP`   | 0                                        | 0              |
| 12   | `PASS_A`   | a                                        | 0              |
| 13   | `PASS_B`   | b                                        | 0              |
| 14   | `SHR_ARTH` | arithmetic shift right                   | 0              |
| 15   | `SHR_LGC`  | logic shift right                        | 0              |
| 16   | `SHL_ARTH` | arithmetic shift left                    | a bit unlike the sign was shifted out |
| 17   | `SHL_LGC`  | logic shift left                         | 0              |
| 18   | `ROTR`     | rotate right                             | 0              |
| 19   | `ROTL`     | rotate left                              | 0              |

Operands are two's-complement numbers. For every operation, `neg` is bit 15
of the result and `zro` is set when the result is zero.

`DIV_OP` and `REM_OP` have codes so that a decoder can use the whole
operation set, but this ALU does not divide: both return zero.

## The shifter

The six shift and rotate operations are where the ALU is most particular.
All of them move the bits of **a** by a count:

- **Arithmetic right** (`SHR_ARTH`): bits fall off the right end; the sign
  bit is copied into every vacated position on the left. This divides a
  signed number by 2^count, rounding towards minus infinity.
- **Arithmetic left** (`SHL_ARTH`): the sign bit stays where it is. The 15
  bits below it move left, bits pushed past the sign position are lost, and
  zeros enter on the right. When a lost bit differed from the sign bit the
  result is no longer a × 2^count, and `ovf` is set.
- **Logic right / left** (`SHR_LGC`, `SHL_LGC`): plain shifts with zeros
  entering at the vacated end; the sign gets no special treatment.
- **Rotate right / left** (`ROTR`, `ROTL`): bits leaving one end re-enter at
  the other.

The count is 6 bits wide. It comes from `b[5:0]` when `shift_cnt_src` is 1,
and from the `shift_cnt` input when it is 0, so a program can shift either
by a constant from the instruction or by a computed value in a register.

Because 6 bits can express counts up to 63 on a 16-bit word, counts of 16
or more need a rule. Here the shifts then lose every bit (logic shifts and
`SHL_ARTH` give 0 below the kept sign bit, `SHR_ARTH` gives all sign bits),
and the rotates turn by the count modulo 16. `SHL_ARTH` by 16 or more sets
`ovf` for any non-zero a.

## Condition flags

`cond_flags` is three D flip-flops with an asynchronous active-low reset
that clears them. They load `cf_in` on every rising edge of `clk`, with no
enable, so `cf` always shows the flags of the operation that was on the
ALU inputs at the last edge. The three bits are packed in the struct
`micro_pk::cond_flags_t` as `{neg, ovf, zro}` (neg in bit 2).

If the surrounding CPU must keep flags across instructions that do not use
the ALU, a load enable has to be added to `cond_flags`; nothing in this
design asks for one.

## Modules

| file | contents |
|------|----------|
| `rtl/micro_pk.sv` | package: `DATA_W = 16`, `SHCNT_W = 6`, `alu_op_e`, `cond_flags_t` |
| `rtl/alu_shifter.sv` | the six shift and rotate operations and the `SHL_ARTH` overflow |
| `rtl/alu.sv` | the ALU: operation decode, adder/subtractor, multiplier, logic, flags |
| `rtl/cond_flags.sv` | the flag register |
| `rtl/alu_datapath.sv` | top: ALU plus flag register |

`alu`, `alu_shifter` and `alu_datapath` take the parameters `WIDTH`
(default 16) and `CNT_W` (default 6). `WIDTH` must be at least `CNT_W`,
because the count is a slice of b. The ALU is combinational with no
internal state; the only storage is the three flag bits. A synthesis of the
top gives about 60 word-level cells and 3 flip-flops, the multiplier being
the largest.

## What follows the original specification and what is this design's choice

Taken from the specification: the list and names of the operations, the
two operands, the 6-bit count taken from `b[5:0]` or from a separate input
under control of `shift_cnt_src`, the six shift and rotate behaviours (sign
extension, preserved sign bit, zero fill, wrap-around), the three flags and
their storage in three clocked flip-flops outside a purely combinational
ALU, and the omission of division and remainder.

Chosen here, because the specification leaves it open:

- the 16-bit word, read from the 16-bit words in the shift diagrams;
- the binary codes of the operations;
- the rule for `ovf` for each operation, and that `neg`/`zro` are updated
  by every operation, including logic ones;
- the result width of `MULT_OP` (low half of the product);
- the behaviour for shift counts of 16 or more;
- the flag register's reset and the absence of a load enable;
- the bit order of the flags.

The rest of the CPU (register file, accumulator, operand multiplexers,
memory buffer and address registers, program counter, stack, instruction
register, fetch unit, controller and data bus) is named by the original
architecture but not specified there, and is not included.

## Verification

Each module has a self-checking testbench in `tb/`. They compare against
`tb/alu_ref_pkg.sv`, a reference model that works out every operation from
integer arithmetic and bit-by-bit loops rather than from the RTL's
expressions. Each prints `TB_RESULT checks=N failures=M`.

- `alu_tb`: the ALU at 16 bits and at 8 bits. Every operation is run on
  corner operands (0, 1, −1, the most positive and most negative values,
  mixed patterns) with counts 0, 1, 7, 15, 16 and 63 from both count
  sources, followed by 20,000 random cases.
- `cond_flags_tb`: one-cycle capture, hold between edges, asynchronous
  reset.
- `alu_datapath_tb`: the top at its default parameters, 50,000 random
  operations, one per clock. It checks the result and the flags in the same
  cycle and the stored flags one edge later. It counts, and requires at
  least once, every operation, an overflow from each of ADD, SUB, MULT, INC,
  DEC and SHL_ARTH, a negative and a zero result, both count sources, a
  count of 16 or more, and a reset clearing stored flags.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/micro_pk.sv tb/alu_ref_pkg.sv tb/alu_datapath_tb.sv \
    --top-module alu_datapath_tb -Mdir obj
./obj/Valu_datapath_tb
```

Replace the testbench name to run `alu_tb` or `cond_flags_tb`. All three
pass, and each fails when the module it tests is deliberately broken (count
source inverted, two flags swapped in storage, operands swapped).
