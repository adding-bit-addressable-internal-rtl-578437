# Wimp51 with bit-addressable internal registers

The Wimp51 is a small teaching processor with the 8051 instruction format. It
executes one instruction in three clock cycles from a single memory that holds
the program. In its original form, registers R0..R7 could only be written a
whole byte at a time, by copying the accumulator (`MOV Rn,A`). This design adds
a way to set or clear **any single bit of any of R0..R7** with one instruction,
without going through the accumulator and without changing the other seven bits.

Everything is in SystemVerilog (IEEE 1800-2017), synthesizable, and simulates
with plain Verilator.

## The bit instruction

The new instruction is two bytes long:

```
byte 1   1 1 0 1 1 r r r     D8..DF   rrr = register R0..R7
byte 2   0 0 0 0 s b b b              s = 1 set, s = 0 clear; bbb = bit 0..7
```

| bytes   | meaning   | effect on R0 = FF |
|---------|-----------|-------------------|
| `D8 0F` | SETB R0.7 | FF                |
| `D8 07` | CLR R0.7  | 7F                |
| `DF 0F` | SETB R7.7 | (R7 bit 7 set)    |
| `D8 02` | CLR R0.2  | FB                |

Bits 7..4 of the second byte are ignored.

## How one bit gets written

This path is the heart of the change. It runs over the three machine states:

1. **FETCH**: the opcode (`D8`..`DF`) is loaded into IR and the PC steps.
2. **DECODE**: `bit_address_en` sees `11011` in IR[7:3] and raises its output.
   `aux_we` sees a two-byte opcode and loads the byte now on the memory bus (the
   second byte) into AUX. In the same edge, `reg_in` stores bit 3 of that byte
   (set or clear). `pc_alu` steps the PC a second time, past the second byte.
3. **EXECUTE**: the bit-address enable is ANDed with EXECUTE and drives the
   register file's `decoder_enable`. Inside `register_top`:
   - the *original* 3-8 decoder turns IR[2:0] into one register-select line;
   - the *second* 3-8 decoder, enabled only now, turns AUX[2:0] into one
     bit-select line;
   - the **8-2-1 mux** (eight 2-to-1 muxes) puts the set/clear value on all eight
     data lines instead of the accumulator byte;
   - in every register, eight `bit_sel_control` gates form
     `register-select AND decoder_enable AND bit-select`. Exactly one of the 64
     gates is high, so exactly one flip-flop loads the set/clear value. All other
     flip-flops keep their value through their hold loop.

A byte write (`MOV Rn,A`, F8..FF) uses the same flip-flops. `reg_we` raises
`write_enable` in EXECUTE, the mux passes the accumulator, and all eight
flip-flops of the selected register load together (`parallel_load`).

Each register also has an 8-to-1 mux that reads one bit. At the top level,
`sel_bit` shows bit AUX[2:0] of register IR[2:0]. Right after a bit instruction,
that is the bit just written.

## The processor around it

| block | what it does |
|---|---|
| `wimp51_control` | FETCH → DECODE → EXECUTE, one clock each. Holds PC, IR and AUX. The memory address is always the PC. |
| `pc_alu` | Computes the next PC with one 8-bit ripple-carry adder (`rca8`): PC+1 in FETCH, PC+1 in DECODE for a two-byte instruction, and PC+offset for a taken jump in EXECUTE. |
| `aux_we` | Loads AUX in DECODE for the two-byte opcodes 34, 60, 74, 80 and D8..DF. |
| `wimp51_alu` | Holds the accumulator A and the carry C, and updates them in EXECUTE. |
| `wimp51_mem` | 256 × 8 memory. Combinational read at the PC, plus a write port for loading a program. |
| `register_top`, `bit_register`, `bit_sel_control`, `bit_address_en`, `reg_we`, `reg_in` | The register file and the decode logic of the bit path described above. |
| `dec3to8`, `mux8to1`, `rca8` | Helpers: decoder, bit-read mux, adder. |
| `wimp51_pkg` | The state type, opcode constants and `is_two_byte()`. |

Instructions executed (8051 encodings and meaning):

| opcode | instruction | opcode | instruction |
|---|---|---|---|
| E8-EF | MOV A,Rn | F8-FF | MOV Rn,A |
| 74 dd | MOV A,#d | 48-4F | ORL A,Rn |
| 58-5F | ANL A,Rn | 68-6F | XRL A,Rn |
| 38-3F | ADDC A,Rn | 34 dd | ADDC A,#d |
| C3 | CLR C | C4 | SWAP A |
| 60 rr | JZ rel | 80 rr | SJMP rel |
| D8-DF 0s bbb | SETB / CLR Rn.b | | |

Jump offsets are signed and counted from the address after the jump, as on the
8051. So `80 FE` is a jump to itself, which the test program uses as a halt. Any
other opcode takes three cycles and does nothing.

### Timing

- Every instruction takes exactly 3 clock cycles, whether it is one byte or two.
- Registers, A, C, PC, IR and AUX all change on the rising edge of `clk`.
- `rst_n` is asynchronous and active low. It clears PC, IR, AUX, A, C, R0..R7
  and the set/clear flag, and it puts the sequencer into FETCH.

## Top-level ports (`wimp51`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `load_we`, `load_addr`, `load_data` | in | 1, 8, 8 | memory write port (use while `rst_n` is low) |
| `pc`, `state` | out | 8, 2 | program counter; FETCH=0, DECODE=1, EXECUTE=2 |
| `acc`, `carry` | out | 8, 1 | A and C |
| `regs` | out | 8×8 | R0..R7 (`regs[n]` is Rn) |
| `sel_bit` | out | 1 | bit AUX[2:0] of register IR[2:0] |

`wimp51_mem` has one parameter, `DEPTH` (256 by default). This matches the
8-bit PC.

## Where this RTL departs from, or fills in, the original design

Only the added bit-addressing hardware is described in detail: block names,
signal names and some gate types. For the rest, the instruction set comes from
the original test program and from 8051 conventions. The following were chosen
here:

- **Base processor.** The sequencer, ALU, memory and their timing (one clock per
  state, asynchronous memory read, load port) are a minimal Wimp51 that runs
  the test program. They are not a copy of the original base design. Only the
  instructions listed above exist.
- **Bit-address decoder inputs.** The original decoder's inputs are printed as
  IR7, IR0, IR5, IR4, IR3. Here IR6 is used in place of IR0. IR0 is part of the
  register number and cannot be decoded, because D8..DF must all match.
- **`reg_in`.** The original block has inputs Decode, IR3 and SEL_BIT_EN. Here it
  is a flip-flop that stores bit 3 of the second byte in DECODE. The original
  text hints that this block's output may also steer the 8-2-1 mux. Here the mux
  is steered by the bit-address enable instead.
- **`aux_we`.** The original block shows IR7..IR4, DECODE and EXECUTE as inputs.
  Here the whole opcode is decoded, because the upper nibble cannot tell 34 from
  38..3F or 60 from 68..6F. EXECUTE is not used.
- **Second-byte source.** The bit number comes from AUX[2:0]. The set/clear flag
  is stored separately in `reg_in`.
- **Register data input.** The bit-level register's data byte is a separate
  input `d`. Its `second_dec[7:0]` are the one-hot bit-select lines.
- **Read port.** `register_top.rdata` (register IR[2:0], feeding the ALU) is this
  design's own. The original read path is not shown.
- **Memory size.** 256 bytes is inferred from the 8-bit PC adder. No size is
  given.

## Verification

Each block has a self-checking testbench in `tb/`, named `tb_<module>`. Each
one compares the block with an independent reference model, using exhaustive
or random stimulus. Each one also has a watchdog and ends with one
`TB_RESULT checks=N failures=M` line.

`tb_wimp51` runs the whole processor at its default size on the original
set/clear test program. The program:

1. sets bit n of Rn for n = 0..7;
2. combines R7, R5, R3 and R1 in the accumulator (MOV, ORL, SWAP, ADDC with
   immediate, CLR C, ADDC, ORL) to get AA, and stores it in R0;
3. loads 55, XORs it with R0 to get FF, and stores that in R0;
4. clears bits 7, 6, 5, 4, 2 and 0 of R0, giving 0A;
5. ANDs A with R0, stores the result, loads 0, takes `JZ` and halts in `SJMP $`.

After every instruction, the testbench checks the fetch address, A, C, all
eight registers, `sel_bit`, and the 3-cycle instruction length. Addresses
2F..31, which the JZ skips, hold a trap (`MOV A,#FF`) that would show up in A.
The testbench also counts the bit sets (8), bit clears (6), byte register writes
(3), two-byte instructions and taken jumps. A mechanism that never happens
counts as a failure. The final state is A=00, R0..R7 = 0A 02 04 08 10 20 40 80,
and the PC looping at 32.

The original program's comment for `ANL A,R0` gives 0A in hex but 0000 1111 in
binary. 0A is what the instructions compute, and it is what the testbench
expects.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wimp51_pkg.sv tb/tb_wimp51.sv --top-module tb_wimp51
./obj_dir/Vtb_wimp51
```

Replace `tb_wimp51` with any `tb_<module>` to test a single block. The whole
processor run takes well under a second.
