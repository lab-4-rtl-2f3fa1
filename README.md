# 8-bit accumulator ALU with 7-segment readout

This is the arithmetic logic unit of a small accumulator machine, in the style
of the 6800/68HC11 family. Every instruction works on the accumulator, `ACCA`. Some
instructions also take a second operand from the data bus, `Data_Out`. The ALU
returns the new accumulator value, `Result`, a carry flag `C` and a zero flag `Z`.
A 4-bit select, `Alu_Ctrl`, picks one of twelve instructions: load, add, subtract,
AND, OR, complement, increment, three shifts, clear and reset.

The ALU is purely combinational. Writing `Result` back into the accumulator
register is the job of the surrounding CPU, which is not part of this RTL.

A board-level top, `main`, turns the ALU into a stand-alone demo for a small FPGA
board:

- `ACCA` (8 bits) and `Alu_Ctrl` (4 bits) come from 12 DIP switches.
- The data operand is fixed at `0xAA`.
- The 8-bit result is shown in hexadecimal on two 7-segment displays.

## Files

| file | contents |
|------|----------|
| `rtl/alu_pkg.sv` | `alu_op_t`, the 4-bit opcode map; `DEFAULT_ALU`; `is_optional()` |
| `rtl/ALU.sv` | the ALU (`WIDTH`, `OPTIONAL_OPS`) |
| `rtl/seven_seg.sv` | hex digit to 7-segment decoder (`ACTIVE_LOW`) |
| `rtl/main.sv` | top: ALU with `Data_Out = DATA`, plus two decoders |
| `tb/ALU_tb.sv` | exhaustive ALU test, default and optional configurations |
| `tb/seven_seg_tb.sv` | all 16 digits in both polarities |
| `tb/main_tb.sv` | end-to-end test of `main` at its default parameters |

## Opcode map

The codes follow a fixed opcode map that a later control unit is meant to share.
That is why the values are not in instruction order.

| `Alu_Ctrl` | name (`alu_op_t`) | instruction | `Result` | `C` |
|---|---|---|---|---|
| 0 | `ALU_ZERO` | ZERO | 0 | 0 |
| 1 | `ALU_ONES` | RST  | 0xFF (all ones) | 0 |
| 2 | `ALU_LOAD` | LDDA | `Data_Out` | 0 |
| 3 | `ALU_ADDA` | ADDA | `ACCA + Data_Out` | carry out |
| 4 | `ALU_SUBA` | SUBA | `ACCA - Data_Out` | borrow: 1 when `Data_Out > ACCA` (unsigned) |
| 5 | `ALU_COMA` | COMA | `~ACCA` | 1 |
| 7 | `ALU_ORAA` | ORAA | `ACCA \| Data_Out` | `(ACCA != 0) \|\| (Data_Out != 0)` |
| 9 | `ALU_ANDA` | ANDA | `ACCA & Data_Out` | `(ACCA != 0) && (Data_Out != 0)` |
| A | `ALU_INCA` | INCA | `ACCA + 1` | carry out (only for `ACCA = 0xFF`) |
| C | `ALU_LSRA` | LSRA | `ACCA >> 1`, 0 enters at the MSB | old bit 0 |
| E | `ALU_LSLA` | LSLA | `ACCA << 1`, 0 enters at the LSB | old bit 7 |
| F | `ALU_ASRA` | ASRA | `ACCA >> 1`, bit 7 kept | old bit 0 |

`Z` is `Result == 0` for every instruction. As a result, ZERO always sets `Z`
and RST always clears it.

### Details that are easy to get wrong

- **Carry after a subtraction is a borrow.** SUBA computes `{C, Result}` as the
  9-bit difference `{0,ACCA} - {0,Data_Out}`. `C = 1` means the subtraction
  wrapped. Some CPUs use the opposite convention, where carry = NOT borrow.
  This design does not.
- **AND and OR set `C` from the operands as a whole, not from a bit.**
  For ANDA, `C` is the logical AND of "ACCA is non-zero" and "Data_Out is non-zero".
  ORAA uses the logical OR of the same two tests. So ANDA can give
  `Result = 0, Z = 1` with `C = 1`, for example with `0xF0 & 0x0F`.
- **COMA always sets `C`.** INCA and LDDA do not keep the old carry: the ALU has
  no state, so every instruction drives `C`.
- **ASRA is a true arithmetic shift, not a rotate.** The sign bit is copied.

### Unused and optional codes

Codes 6, 8, B and D belong to instructions that the opcode map lists as
optional:

| code | name | `Result` | `C` |
|---|---|---|---|
| 6 | `ALU_COMA2` | `-ACCA` (two's complement) | borrow of `0 - ACCA` |
| 8 | `ALU_XORA` | `ACCA ^ Data_Out` | logical XOR of the two non-zero tests |
| B | `ALU_DECA` | `ACCA - 1` | borrow (only for `ACCA = 0`) |
| D | `ALU_ASLA` | `ACCA << 1` (same as LSLA) | old bit 7 |

With `OPTIONAL_OPS = 0`, the default, these four codes are unused. Any unused code
runs `DEFAULT_ALU`, which is ZERO: `Result = 0, C = 0, Z = 1`. The mapping
happens before decoding (`op` in `ALU.sv`), so there is no separate "illegal"
path. Set `OPTIONAL_OPS = 1` to decode them.

## Board top (`main`)

```
 ACCA[7:0] ------> +-----+ Result[7:4] -> seven_seg -> Seg_Hi[6:0]
 Alu_Ctrl[3:0] --> | ALU | Result[3:0] -> seven_seg -> Seg_Lo[6:0]
 DATA = 8'hAA ---> +-----+ C, Z ----------------------> C, Z
  (Data_Out)
```

- The 8 + 4 switch inputs and the 2 × 7 segment outputs use 26 pins. Each
  display is driven directly, with no multiplexing and no decimal point.
- `C` and `Z` are extra output ports. Route them to two LEDs, or leave them out
  of the pin constraints.
- Segment vectors are `{G,F,E,D,C,B,A}`, so bit 0 is segment A (top). Going
  clockwise, B is top right through F at top left, and G is the middle bar.
- `SEG_ACTIVE_LOW = 0` (the default) lights a segment with a 1, for
  common-cathode displays. Set it to 1 for common-anode parts.
- The font is the usual hex font: `0-9 A b C d E F`.
- There is no clock, so the displays follow the switches after gate delay only.

Parameters of `main`: `DATA` (default `8'hAA`), `OPTIONAL_OPS` (default 0) and
`SEG_ACTIVE_LOW` (default 0).

## Simulating

The testbenches are self-checking. Each one ends with a line
`TB_RESULT checks=N failures=M`. With plain Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/alu_pkg.sv rtl/ALU.sv rtl/seven_seg.sv rtl/main.sv tb/main_tb.sv \
  --top-module main_tb -Mdir obj_main && ./obj_main/Vmain_tb
```

Replace `main_tb` with `ALU_tb` or `seven_seg_tb` to run the other tests. The
testbenches compare against their own models, not against the RTL:

- **`ALU_tb`** applies every code with every operand pair, 16 × 256 × 256 cases.
  It checks two instances: one at the defaults and one with `OPTIONAL_OPS = 1`.
  The reference is an integer model of the table above. The run takes about a
  quarter of a second.
- **`seven_seg_tb`** builds the expected patterns from a list of the digits on
  which each segment is dark.
- **`main_tb`** runs `main` at its default parameters. It applies every switch
  setting (16 codes × 256 `ACCA` values) and reads the result back from the
  segment outputs, using a font written as segment letters. It also counts how
  often these events occurred:
  - each code was applied
  - `C` was set
  - `Z` was set
  - SUBA borrowed
  - an unused code fell back to ZERO

  If any count stays at zero, the test fails.

## How far to trust it, and where it is interpretation

The instruction list, operand names, widths and opcode values follow the lab
specification this ALU was written for. So do the flag rules of ZERO, RST, ADDA,
ANDA, ORAA, COMA, the three shifts and `Z`. The following are this design's own
readings or choices:

- **Instruction count.** The specification mentions ten functions in one place,
  but lists and requires twelve. All twelve are built.
- **SUBA's carry as a borrow.** The specification calls it the carry "in" of the
  subtraction.
- **Flags the specification leaves open.** `C = 0` for LDDA, and `C` = carry out
  for INCA.
- **ASRA.** The opcode map also calls this shift a "ring" shift. ASRA follows the
  instruction description, which is an arithmetic shift.
- **Code D.** In the opcode map, code D has a duplicated name, with the comment
  "arithmetic shift left". It is built as ASLA, an optional instruction.
- **The optional instructions.** Their flag rules are not given; the rules above
  are this design's choice. They are disabled by default.
- **The display side:** which display shows which nibble, the segment bit order,
  the polarity and the font.
- **The `C` and `Z` ports on `main`.** They go beyond the 26-pin budget.

Not included: the accumulator register itself, and the CPU the opcode map is
meant for. That CPU has a control unit with a reset/fetch/execute state machine,
an address multiplexer over reset vector / PC / MAR / IR, and a bidirectional
I/O port. Only their encodings are defined, so they are not implemented. The
board pin assignment is also left to the user's constraints file.
