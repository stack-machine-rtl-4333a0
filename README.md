# A byte-wide stack machine in SystemVerilog

This is a small processor with no general-purpose registers. Every operand
lives on a stack in memory. An arithmetic instruction pops its operands into
the ALU's two input latches, computes into an output latch, sets the flags
and pushes the result back. Instructions therefore need no operand fields,
except for the loads, stores, jumps and I/O instructions that name an
address, an immediate value or a port. Programs are compact. The price is
many memory accesses per instruction, and so a high number of cycles per
instruction (CPI).

The machine is 8 bits wide. Most arithmetic and logic instructions also have
a 16-bit ("word") form that pops two bytes per operand. It has a 16 KB
memory, a four-bit flag register and 256 I/O ports. The RTL is
synthesizable. It comes with self-checking testbenches for every block, an
end-to-end test and a 100-element sort benchmark.

## Programmer's model

| Item | Description |
|---|---|
| Memory | 16 KB, byte addressed. Code and data grow up from `0x0000` to `0x2FFF`. The stack starts at `0x3FFF` and grows down to `0x3000`. The segment bounds are a convention only: the hardware does not check them. |
| PC | 16-bit program counter. It is 0 after reset. |
| SP | 16-bit stack pointer. It points at the next free byte and is `0x3FFF` after reset. A push writes `MEM[SP]` and then decrements SP. A pop increments SP and then reads `MEM[SP]`. |
| IR | Instruction register, which holds the opcode. |
| Flags | C (carry or borrow), O (overflow), S (sign) and Z (zero). All four are 0 after reset. |
| ALU latches | A and B (16 bits each) are filled by pops. C (16 bits) holds the result, and R holds a division's remainder. |
| I/O | 256 input ports and 256 output ports, one byte each. `IN n` and `OUT n` address them. |

Words are little-endian in memory (low byte at the lower address). On the
stack, the high byte is pushed first, so the low byte is on top. A
three-byte instruction carries its 16-bit operand low byte first.

**Operand order.** A binary operation computes `C = A op B`. A is the first
value popped (the top of the stack) and B the second. So `LDI 5 ; LDI 30 ;
SUB` leaves 30 − 5. Likewise, `CMP` after pushing x and then y compares
y − x.

## Instruction set

"Cycles" is the length of the instruction in clock cycles with the default
`STRETCH = 1`, counting its fetch cycle (see the next section).

| Opcode | Mnemonic | Bytes | Action | Cycles |
|---|---|---|---|---|
| 00 / 01 | LDI / LDIW | 2 / 3 | push an immediate byte / word | 4 / 5 |
| 02 / 03 | LDD / LDDW | 3 | push the byte / word at an address | 5 / 7 |
| 04 / 6A | LDA / LDAW | 3 | push the byte / word that the 16-bit pointer at the address points to | 7 / 9 |
| 06 / 07 | STD / STDW | 3 | pop a byte / word into an address | 5 / 7 |
| 05 / 6B | STA / STAW | 3 | pop a byte / word into the location the pointer at the address points to | 7 / 9 |
| 08 / 09 | IN / OUT | 2 | push input port n / pop into output port n | 4 / 4 |
| 16 / 17 | ADD / ADDW | 1 | C = A + B | 7 / 10 |
| 14 / 15 | SUB / SUBW | 1 | C = A − B | 7 / 9 |
| 10 / 11 | MUL / MULW | 1 | C = A × B. MUL pushes the low byte. MULW multiplies two bytes and pushes the 16-bit product. | 6 / 9 |
| 12 / 13 | DIV / DIVW | 1 | push the quotient A ÷ B, then the remainder A mod B (the remainder ends on top) | 6 / 10 |
| 18, 1A / 19, 1B | INC, DEC / INCW, DECW | 1 | A ± 1 | 5 / 7 |
| 60, 62, 66 / 61, 63, 67 | AND, OR, XOR / ...W | 1 | bitwise | 6, 7, 7 / 10, 10, 9 |
| 64 / 65 | NOT / NOTW | 1 | bitwise complement | 6 / 8 |
| 50, 52 / 51, 53 | SHL, SHR / ...W | 1 | shift by one bit; C gets the bit shifted out; SHR is a logical shift | 5 / 7 |
| 54, 56 / 55, 57 | ROL, ROR / ...W | 1 | rotate by one bit; only C changes | 5 / 7 |
| 68 / 69 | CMP / CMPW | 1 | set the flags from A − B and push nothing | 6 / 8 |
| 30 | JMP | 3 | jump to a 16-bit address | 6 |
| 31 | JMR | 2 | PC += signed 8-bit offset, relative to the next instruction | 5 |
| 32–39 | JZ JNZ JO JNO JC JNC JS JNS | 3 | conditional jump on Z, O, C or S | 6 |
| 20 / 21 | CALL / RET | 3 / 1 | CALL pushes the return address (high byte first) and jumps. RET pops it into PC. | 5 / 4 |
| 40 / 41 | NOP / HLT | 1 | no operation / stop until reset | 4 / 2 |

Opcodes not in the table execute as one-cycle no-ops.

### Flags

Every ALU instruction except the rotates updates all four flags. The rotates
change only C.

- **Z**: the result (byte or word) is zero.
- **S**: for SUB, CMP and DEC, S is the sign of the *true* difference of the
  unsigned operands, so S = 1 exactly when A < B. This makes `CMP ; JS` an
  unsigned less-than test, which the sort benchmark relies on to order bytes
  from 0 to 255. For every other operation, S is the MSB of the result.
- **C**: carry out (ADD, INC), borrow (SUB, CMP, DEC), the bit shifted or
  rotated out, or "product overflows a byte" (byte MUL).
- **O**: signed overflow (ADD, SUB, INC, DEC), "product overflows a byte"
  (byte MUL), or division by zero. Dividing by zero gives an all-ones
  quotient and returns the dividend as the remainder.
- AND, OR, XOR, NOT and MULW clear C and O; the shifts clear O.

## How an instruction executes

This is the part of the design that needs the most explanation.

Each instruction is a fetch/decode cycle (`IR <= MEM[PC]; PC++`) followed by
a list of **micro-steps**, one per clock. The micro-step list of every
opcode is written out in `sm_pkg::uprog`. The control unit (`sm_control`)
steps an index through that list. The micro-step kinds are:

| Micro-step | Effect |
|---|---|
| `U_OPND` | operand byte from the code: `AR[byte] <= MEM[PC]; PC++` |
| `U_POPA`, `U_POPB` | pop into ALU latch A or B: `SP++`, then read `MEM[SP]` |
| `U_ALU` | `C, R <= A op B`; flags updated |
| `U_PUSH` | `MEM[SP] <= src; SP--`, where src is an operand byte, C, R, D or PC |
| `U_RDT`, `U_RDD` | read a pointer byte (into T) or a data byte (into D) at AR, AR+1, T or T+1 |
| `U_WR` | write a byte of A to AR, AR+1, T or T+1 |
| `U_IN`, `U_OUT` | port read pushed onto the stack; port write from A |
| `U_JCC`, `U_JMR`, `U_CALLJ`, `U_RET` | control transfers (`U_CALLJ` is the last push of CALL combined with the jump) |
| `U_HLT` | stop |

The memory has a single port and reads combinationally. Any one read or
write therefore fits in one cycle, but a value read from memory and then
pushed takes two cycles. For example, `ADD` is pop A, pop B, ALU, push:
4 micro-steps.

**Stretching to the instruction table.** The machine's instruction table
gives a cost in "clock units" for every opcode, not counting the one unit of
fetch and decode. With `STRETCH = 1` (the default), the control unit loads
that cost into a down-counter at fetch. If the micro-steps finish first, it
idles in a pad state until the counter runs out; the `stretch` output is high
during those cycles. An instruction therefore takes 1 + max(table units,
micro-steps) cycles. For instance, ADD costs 6 units and has 4 micro-steps,
so it takes 1 + 6 = 7 cycles.

Seven instructions need more memory accesses than the table allows on one
port: LDDW, STDW, LDA, STA, LDAW, STAW and DIVW. They run at their
micro-step count, which is 1 to 2 cycles over the table. The table gives
SHL 6 units and SHLW 4, the reverse of every other shift/rotate pair; this
design uses 4 and 6. With `STRETCH = 0`, every instruction runs at its bare
micro-step count. The worked examples that accompany the table (ADD costing
4 units, a jump costing 2 or 3) match that mode more closely than the table
does.

## Blocks

| File | Block |
|---|---|
| `rtl/sm_pkg.sv` | Opcodes, ALU operation codes, flag struct, micro-programs, clock-unit table. |
| `rtl/sm_control.sv` | Fetch/decode and micro-step sequencer. Holds IR, PC, SP and the internal AR/T/D byte pairs. |
| `rtl/sm_alu.sv` | ALU with the A, B, C (and R) latches. Computes the flag values and flag write enables. |
| `rtl/sm_flags.sv` | Flag register with a write enable per flag. |
| `rtl/sm_memory.sv` | `2**ADDR_W`-byte memory: asynchronous read, synchronous write. |
| `rtl/sm_io_ports.sv` | 256 output registers with write strobes; 256 input ports read combinationally. |
| `rtl/stack_machine.sv` | Top level. Wires the blocks together and adds a host port on the memory. |

Top-level parameters: `ADDR_W = 14` (16 KB), `N_PORTS = 256`, `STRETCH = 1`.

Top-level ports:

- `clk`, and `rst`: synchronous reset, active high.
- Host port: `host_en`, `host_we`, `host_addr`, `host_wdata`, `host_rdata`.
  While `host_en` is high, the host owns the memory port. Use it only while
  `rst` is held or after `halted` rises; an assertion checks this.
- I/O pins: `port_in[256][8]`, `port_out[256][8]`, `port_wstb[256]`.
  `port_wstb[n]` pulses for one cycle when `OUT n` writes.
- Status: `halted`, `instr_start` (high in each fetch cycle), `stretch`,
  `pc`, `sp`, `ir`, `flags`.

To run a program:

1. Hold `rst` high.
2. Write the image through the host port.
3. Release `rst`.
4. Wait for `halted`.
5. Read the results through the host port.

## Interpretations and departures

Where the machine's description was ambiguous or silent, these choices were
made:

- **Operand order** follows the micro-steps (A = top of stack). This also
  holds for SUB and DIV, although a prose description of the machine puts
  the subtrahend and the divisor on top.
- **DIV and DIVW push the quotient and then the remainder.** The
  instruction table describes this behaviour, and it fits DIV's cost.
- **MULW** is byte × byte → word, as its micro-steps pop only two bytes.
- **LDA/STA (and LDAW/STAW)** are indirect: the 16-bit word at the operand
  address is a pointer to the data. The sort benchmark uses them this way.
- **JMR** is relative to the address of the following instruction.
- **CMP** updates C and O as well as S and Z.
- **Reset values, undefined opcodes, divide by zero, the host port, and the
  I/O strobe** are this design's own choices.
- **Not implemented:** detection of stack overflow or underflow, and
  interrupts. Neither is described.
- **Procedure frames** (activation records for block-structured
  languages) are a software convention on the stack. The machine has no
  frame-pointer register: CALL and RET move only the return address, and
  the registers are PC, SP, IR and the flags.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb/tb_sm_alu.sv` | Every ALU operation, byte and word, on corner and random operands, against an integer reference model. Checks results, flag values and flag enables. |
| `tb/tb_sm_flags.sv` | Per-flag write enables and reset. |
| `tb/tb_sm_memory.sv` | Random writes and read-back, combinational read, and neighbours left undisturbed. |
| `tb/tb_sm_io_ports.sv` | Port writes, one-cycle strobes, input reads, and reset. |
| `tb/tb_sm_control.sv` | Two control units run with the real ALU and flags, one with `STRETCH = 1` and one with `STRETCH = 0`, each on one program that executes every opcode. Checks every result, both outcomes of each conditional jump, CALL/RET, JMR both ways, balanced SP, and **each instruction's length in cycles** (the table above, or 1 + micro-steps when not stretched). |
| `tb/tb_stack_machine.sv` | End to end through the host port: a loop with IN, LDA, CALL/RET, XOR, ROL, OUT and DEC/JNZ, then a divide by zero tested with JO. Counts and requires at least one each of: stretch cycles, taken and untaken jumps, calls, returns, port reads and writes, division by zero, and halt. |
| `tb/tb_sm_random.sv` | 24 random programs of about 500 instructions each. They mix every instruction, jumps over short blocks, calls, and immediates biased to 0, 0x7F, 0x80 and 0xFF. An instruction-level reference model runs alongside the machine. PC, SP and flags are compared at every instruction boundary, every port write is compared, and the whole memory is compared after HLT. Instruction lengths are checked too. |
| `tb/tb_bubble_sort.sv` | Full-size benchmark at default parameters: an exchange sort of 100 bytes at address 1000. Compares the sorted array with the expected list and checks every instruction's length. |

`tb/sm_asm_pkg.sv` is a small label-resolving assembler that the
program-driven testbenches use. It also holds the expected cycle count of
every opcode, stretched and bare.

Run a test with Verilator 5, for example the benchmark:

```
verilator --binary --timing --assert -Mdir obj_sort \
  rtl/sm_pkg.sv rtl/sm_alu.sv rtl/sm_flags.sv rtl/sm_control.sv \
  rtl/sm_memory.sv rtl/sm_io_ports.sv rtl/stack_machine.sv \
  tb/sm_asm_pkg.sv tb/tb_bubble_sort.sv --top-module tb_bubble_sort
./obj_sort/Vtb_bubble_sort
```

**Benchmark result:** sorting the 100 bytes executes 69,974 instructions in
464,562 cycles, a CPI of 6.64 with `STRETCH = 1`. The program is 82 bytes,
plus two 2-byte pointer variables. It never uses more than 4 bytes of stack.

## Changing the design

- **Instruction timing:** edit `clock_units()` in `sm_pkg.sv` and update
  `expected_cycles()` in `tb/sm_asm_pkg.sv` to match. With `STRETCH = 0`,
  the lengths the tests expect are those of `bare_cycles()`, which change
  whenever a micro-step list changes.
- **Adding an instruction:** add its opcode to `opcode_e`, its micro-step
  list to `uprog()` (at most `MAX_STEPS` steps) and its cost to
  `clock_units()`. Add an ALU operation only if it needs one. Then teach
  the reference model in `tb/tb_sm_random.sv` the new instruction.
- **A synchronous-read (SRAM) memory** would need an extra cycle for each
  read micro-step, or a pipelined address phase in `sm_control`. The current
  control unit assumes data comes back in the same cycle.
