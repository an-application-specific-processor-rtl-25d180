# FDI8051DEC: hardware support for dictionary-compressed Java Card bytecode

Smart cards run Java Card applets on small 8-bit processors with little ROM.
Dictionary compression shrinks an applet by replacing frequently repeated bytecode sequences with
*macro* bytecodes. The definitions of the macros are stored once, in a dictionary. This saves about
10 % of the applet's method code. Unlike general-purpose compression, nothing has to be decompressed
into RAM: when the interpreter meets a macro, it simply runs the bytecodes of its definition,
as if it were a subroutine call.

The cost is speed, because each macro adds two extra bytecodes to interpret: the macro itself and a
closing `ret_macro`. This RTL is an extension to an 8051 core that removes most of that cost. It
does so in two parts:

1. **Hardware fetch and decode.** The Java program counter (JPC) lives in hardware. A single
   machine instruction, `GOTONEXTJBCFUNCT`, fetches the next bytecode, looks up its handler
   in a jump table and jumps there. The interpreter is "pseudo-threaded": every bytecode handler
   ends with that instruction, instead of returning to a central dispatch loop.
2. **Hardware macro call and return.** `PRECALL_MACRO` saves JPC, looks up the macro's definition
   address in the dictionary and points JPC at it, all in one instruction. `REST_DICT_JBC` restores
   the saved JPC when the definition's `ret_macro` is reached.

The 8051 core itself is not part of this code. The extension connects to it through a small
instruction-issue interface, described below.

## Code memory layout

Everything lives in one byte-wide code memory (`code_rom`, 64 KiB, the whole 8051 code space).
All addresses stored in tables are 16 bits, most significant byte first.

| Region | Contents |
|---|---|
| bytecode jump table | 256 entries × 2 bytes; entry *b* is the address of the handler of bytecode *b*. Its base is a register (`SET_JBC_TABLE`, reset 0x0100). |
| handlers | 8051 code of the bytecode functions. |
| dictionary look-up table | one 2-byte entry per macro: the address of its definition. |
| macro definitions | each one is a plain bytecode sequence that ends with `ret_macro`. |
| applet bytecode | the compressed method code. |

The macro value is the bytecode value itself. The look-up address is
`MACRO_TABLE + 2 × macro_bytecode`, so software loads `MACRO_TABLE` with
*table start − 2 × first macro bytecode*. For example, if macros use bytecodes 0xC0…0xC7 and the
table starts at 0x3000, `MACRO_TABLE` = 0x3000 − 0x180 = 0x2E80. The Java Card instruction set
leaves 68 bytecode values undefined, and any of them can serve as a macro. The hardware does not
care which values are chosen, because the jump table maps each one to its handler.

## Extended instructions

The core's spare opcode 0xA5 is followed by a selector byte. The operand is the 16-bit pair
{B, A}, because addresses are 16 bits.

| Selector | Instruction | Effect | Extra cycles |
|---|---|---|---|
| 0x01 | `GET_JPC_IN_A` | {B,A} ← JPC | 0 |
| 0x02 | `SET_JPC_FROM_A` | JPC ← {B,A} | 0 |
| 0x03 | `GOTONEXTJBCFUNCT` | JBC ← mem[JPC]; PC ← table[JBC]; JPC ← JPC+1 | 3 |
| 0x04 | `SET_JBC_TABLE` | jump table base ← {B,A} | 0 |
| 0x05 | `SET_DICTLOOKUP_TABLE` | MACRO_TABLE ← {B,A} | 0 |
| 0x06 | `PRECALL_MACRO` | macro call, see below (macro value in A) | 3 |
| 0x07 | `REST_DICT_JBC` | JPC ← JPC_RET | 0 |
| other | — | no operation, `ext_illegal_o` | 0 |

The current bytecode JBC is also readable by the core as a register (`jbc_o`), so that a handler
can do `MOV A, JBC`. With these instructions, the two dictionary handlers are:

```
macro_jbc:   MOV A,#lo(MACRO_TABLE) ; MOV B,#hi(MACRO_TABLE) ; SET_DICTLOOKUP_TABLE
             MOV A,JBC ; PRECALL_MACRO
             GOTONEXTJBCFUNCT
ret_macro:   REST_DICT_JBC
             GOTONEXTJBCFUNCT
```

A processor without the dictionary hardware can still run macros in software. It uses only
`GET_JPC_IN_A` and `SET_JPC_FROM_A`, and reads the table itself. This RTL supports both ways.
`tb_macro_workload` runs both on the same program.

## The fetch/decode engine (`jbc_fetch_decode`)

`GOTONEXTJBCFUNCT` runs three steps:

| Cycle | State | Code-bus address | Action |
|---|---|---|---|
| 0 (issue) | idle → State1 | JPC | read the bytecode |
| 1 | State1 → State2 | base + 2·JBC | JBC ← data; read handler address, high byte |
| 2 | State2 | base + 2·JBC + 1 | read low byte |
| 3 | State3 | — | core PC ← handler address; JPC ← JPC + 1; `done` |

JPC is therefore left pointing at the first operand byte, if the bytecode has any. A handler that
consumes operands reads them with `GET_JPC_IN_A` and the code bus. It then moves JPC past them with
`SET_JPC_FROM_A`.

## The macro call (`dict_macro_unit`)

`PRECALL_MACRO` runs in three steps. The core PC is *moved*, not only read: the unit borrows the
core's program counter to address the look-up table and then puts it back.

| Cycle | Step | Action |
|---|---|---|
| 0 (issue) | 1 | PC_RET ← core PC, JPC_RET ← JPC, latch the macro value |
| 1 | 2 | core PC ← MACRO_TABLE + 2·macro; read the entry's high byte at that address |
| 2 | 3 | read the low byte |
| 3 | 3 | JPC ← entry (definition address); core PC ← PC_RET; `done` |

The `GOTONEXTJBCFUNCT` that follows then dispatches the first bytecode of the definition.
`ret_macro`'s handler issues `REST_DICT_JBC`, which copies JPC_RET back into JPC in its issue
cycle. Execution then continues with the bytecode after the macro.

There is only one JPC_RET register, so **macros cannot nest**: a definition must not contain
another macro bytecode. This matches a dictionary that is built from plain bytecode sequences.

## Core interface and timing (`fdi8051dec_ext`)

- The core drives `ext_valid_i` for one cycle, with `ext_opcode_i` (the selector), `ext_opnd_i`
  ({B,A}) and `core_pc_i` (the address of the next instruction).
- Instructions with no extra cycles complete in the same cycle, with `ext_done_o` high. For
  `GET_JPC_IN_A`, the result is on `res_o`, and `res_we_o` is high.
- For `GOTONEXTJBCFUNCT` and `PRECALL_MACRO`, `ext_busy_o` is high for the next three cycles. The
  core must stall until `ext_done_o`. Issuing while busy violates an assertion.
- When `pc_load_o` is high, the core must load `pc_wdata_o` into its PC. During `PRECALL_MACRO` this
  happens twice: once with the table address, then with the restored PC.
- The code memory has one read port, with reads returning one cycle after the address. The
  extension drives the address while one of its units reads, that is, in the issue cycle of
  `GOTONEXTJBCFUNCT` and during busy cycles. At all other times the core's fetch address
  `core_code_addr_i` drives it. `code_rdata_o` is the read data for both.
- `rom_we_i`/`rom_waddr_i`/`rom_wdata_i` load the memory image. They stand in for programming the
  non-volatile memory.
- Reset (`rst_n`, asynchronous, active low) clears JPC, JBC, MACRO_TABLE, JPC_RET and PC_RET, and
  sets the jump-table base to `TABLE_RESET` (0x0100). The memory is not cleared.
- `jbc_table_o`, `macro_table_o`, `jpc_ret_o` and `pc_ret_o` are read-only debug views.

## Files

| File | Contents |
|---|---|
| `rtl/fdi_pkg.sv` | widths, selector byte values, command enum |
| `rtl/ext_decoder.sv` | selector byte → command |
| `rtl/jbc_fetch_decode.sv` | JPC, JBC, jump-table base; dispatch state machine |
| `rtl/dict_macro_unit.sv` | MACRO_TABLE, JPC_RET, PC_RET; PRECALL_MACRO state machine; REST_DICT_JBC |
| `rtl/code_rom.sv` | 64 KiB code memory, synchronous read, load port |
| `rtl/fdi8051dec_ext.sv` | top: the above plus the code-bus multiplexer and the core-side handshake |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_macro_workload` |

Parameters: `code_rom` has `ADDR_W` (16) and `DATA_W` (8). The top has `ROM_ADDR_W` (16) and
`TABLE_RESET` (0x0100). The package fixes the 16-bit address width and the 2-byte table entry.

## Verification

Every testbench checks the design against values it computes on its own. Each one ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_ext_decoder`: all 256 selector bytes, each with and without the strobe.
- `tb_code_rom`: writes and reads back a full random image, and checks the one-cycle read latency.
- `tb_jbc_fetch_decode`: 1000 dispatches from random JPC and table values against a memory model.
  It checks JBC, the handler address, the JPC increment, the 3-cycle latency, and table wrap-around
  at the top of memory.
- `tb_dict_macro_unit`: 300 macro calls with random table base, macro value, PC and JPC. It checks
  each step's effect and cycle, then the JPC restore by `REST_DICT_JBC`.
- `tb_fdi8051dec_ext` (whole design, default parameters): a behavioural model of the interpreter
  software stands in for the 8051. It runs a randomly generated compressed program of 300 items:
  plain bytecodes, `bspush` with an operand, and 8 macros of 1–5 bytecodes. The bytecodes and
  operands actually executed must match the program expanded independently. The testbench also
  checks every instruction's latency, the core PC's detour to the look-up table and its restore,
  and the function-entry bytes that the core reads over the shared bus. It counts every mechanism
  (dispatch, macro call, macro return, both table loads, JPC read and write, core stall, core
  fetch, operand handling, unknown selector), and each one must occur.
- `tb_macro_workload`: macros of three bytecodes, the average macro length reported for
  compressed banking applets, built from the bytecodes most often executed. The program runs once
  through the dictionary hardware and once through the software macro path. Both runs must execute
  the same expanded stream, with exactly two extra dispatches per macro. With the hardware path,
  the macro and `ret_macro` handlers spend 5 and 1 cycles in extended instructions.

To run one testbench with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fdi_pkg.sv tb/tb_fdi8051dec_ext.sv --top-module tb_fdi8051dec_ext -o sim
./obj_dir/sim
```

All testbenches finish in well under a second.

## How far it goes, and where it departs

- **Not included:** the 8051 core and the interpreter software. The top's core-side ports are
  where a real core's decoder, accumulator/B registers, PC and code fetch would connect. No
  real 8051 program has been run on this RTL.
- **Cycle counts.** Published measurements for this kind of design are whole-handler cycle counts
  on an FPGA 8051 and include the core's own instruction timing. In those measurements, an average
  three-bytecode macro costs about 20 % overhead on a plain software interpreter, 13 % with
  hardware fetch/decode, and 7 % with the dictionary hardware, at roughly 400 cycles for the
  sequence itself. They cannot be reproduced without the core. This RTL fixes only the extension's
  own latencies given in the tables above.
- **Choices not dictated by the architecture:**
  - the selector byte values
  - the 16-bit {B,A} operand
  - the extra `SET_JBC_TABLE` instruction and its reset value
  - big-endian 2-byte table entries and the scaling of the macro value by 2
  - the synchronous memory and its load port
  - the stall/done handshake
  - treating unknown selectors as no-operations
  - reset values
- **Size.** After coarse synthesis, the extension has about 116 flip-flop bits and a handful of
  16-bit adders, not counting the memory. Published FPGA figures for adding fetch/decode plus
  dictionary support to an 8051 are about 84 extra flip-flops. The difference comes mainly from the
  dedicated 16-bit table registers here, which a tighter integration could share with the core's
  data pointer.
