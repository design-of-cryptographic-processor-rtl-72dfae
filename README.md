# A 32-bit load/store processor for AES and RC6 arithmetic

Block ciphers such as AES and RC6 use arithmetic that an ordinary
integer processor does poorly. It needs products in the finite field
GF(2^8), the AES MixColumn matrix, data-dependent rotations and RC6's
quadratic `x(2x+1)`. This processor runs each of those as a single
instruction on 32-bit registers. It has no addressing modes. Words move
between memory and sixteen registers only through LOAD and STORE, and
every other instruction works register to register.

The architecture follows a published description of a small Harvard-style
cryptographic processor. That description gives the block structure, the
operations and the controller's states. It leaves the instruction
encoding, the state transitions, the memory sizes and the timing open.
Where this RTL fills such gaps, the text below says so.

## Block map

```
             +-----------------+  SelA,SelB,SelC,SelD,Fetch, MemRd/MemWr, LoadPc ...
             | control_decoder |---------------------------------------------+
             +-----------------+                                             |
                  ^ opcode                                                   v
   +-------------+   OpsAddr   +---------+   Addr   +---------------------------+
   | instruction |------------>| addr_mux|--------->| crypto_memory             |
   | register    |             |  (MUX)  |          |  program[2^ADDR_W]        |
   +-------------+             +---------+          |  data   [2^ADDR_W]        |
        ^   |OpsAddr                ^ PcOut         |  DataReg -> data bus      |
        |   +--------------->+-----------------+    +---------------------------+
        |                    | program_counter |           |  data bus (32)   ^ store data
        +--------------------+-----------------+           v                  |
        data bus                        +--------------------------+          |
                                        | gp_registers (16 x 32)   |<-- write-back
                                        +--------------------------+   (ALU result or data bus)
                                          | all 16          | all 16          |
                                     +---------+       +---------+            |
                                     |  MUXA   |       |  MUXD   |            |
                                     +---------+       +---------+            |
                                          a |               | b               |
                                          +-------------------+               |
                                          |   crypto_alu      |--> result register
                                          +-------------------+
```

| Module | Role |
|---|---|
| `crypto_processor` | top level; wires the blocks and holds the ALU result register |
| `control_decoder` | FSM that sequences instructions and drives every select line |
| `program_counter` | next instruction address: reset, jump load, or increment |
| `addr_mux` | memory address: PC while `Fetch` is high, else the instruction's operand address |
| `crypto_memory` | separate program and data arrays, synchronous read into `DataReg` |
| `instruction_register` | captures the instruction and splits it into fields |
| `gp_registers` | sixteen 32-bit registers, all visible to the operand multiplexers |
| `reg_select_mux` | 16-to-1 multiplexer, instantiated twice as MUXA and MUXD |
| `crypto_alu` | the cipher arithmetic (combinational) |
| `crypto_pkg` | opcodes, instruction and state types, GF(2^8) functions |

The published block list also names a *buffer*. Its function and
connections are not described anywhere, so it is not built. The memory's
output register drives the data bus directly.

## The arithmetic

This part is the reason the processor exists, and it is the easiest to get
wrong. All GF(2^8) arithmetic reduces modulo an irreducible polynomial of
degree 8. It is given by its low eight bits, the parameter `POLY`. The
default is `8'h1B`, which is the AES polynomial x^8 + x^4 + x^3 + x + 1.
Bytes are numbered from the least significant end: byte 0 is bits [7:0].

* **Addition (`ADD`)** is addition modulo 2, that is `a ^ b`. The processor
  has no integer adder.
* **GF(2^8) multiplication (`GFMUL`)** computes four independent byte
  products, byte *i* of `a` times byte *i* of `b`. Each product is a
  shift-and-add: for each bit of `b`, from the top bit down, multiply the
  partial product by x (shift left, and XOR `POLY` if a bit fell out), then
  XOR in `a` if the bit is set. Applying it to all four bytes of a word is
  this design's choice.
* **MixColumn (`MIXCOL`)** treats the register as one AES state column and
  multiplies it by the circulant matrix
  `[2 3 1 1; 1 2 3 1; 1 1 2 3; 3 1 1 2]`. Here ×2 is the GF "xtime" (shift
  with conditional reduction) and ×3 is xtime XOR the byte itself. So
  `c0 = 2·a0 ^ 3·a1 ^ a2 ^ a3`, and the other rows follow by rotation.
* **Word matrix multiplication (`MATMUL`)** treats `a` and `b` as
  polynomials of degree 3 whose coefficients are bytes. It multiplies them
  modulo x^4 + 1: `d_k = XOR_i a_(k-i mod 4) · b_i`. For example
  `d0 = a0·b0 ^ a3·b1 ^ a2·b2 ^ a1·b3`. With `b = 32'h03010102` this equals
  MixColumn. The workload test checks that.
* **Fixed coefficient multiplier (`FCM`)** multiplies every byte of `a` by
  the constant `FIXED_COEFF`, which defaults to {02}. Only the name of this
  operation is published, so the constant and its default are this
  design's choice.
* **Shifts (`SHL`, `SHR`) and circular shifts (`ROL`, `ROR`)** move `a` by
  `b[4:0]` places. RC6 takes its rotation amounts from data the same way.
* **RC6 function (`RC6F`)** computes `a · (2a + 1) mod 2^32`. It uses one
  32×32 multiplier, whose second operand is `{a[30:0], 1}`.

Any other opcode gives `y = a`.

## Instruction format and set

```
 31    28 27   24 23   20 19   16 15                    0
+--------+-------+-------+-------+-----------------------+
| opcode |  rd   |  ra   |  rb   |  address (ADDR_W used)|
+--------+-------+-------+-------+-----------------------+
```

| code | mnemonic | effect |
|---|---|---|
| 0 | NOP | nothing |
| 1 | LOAD | `R[rd] <= DMEM[address]` |
| 2 | STORE | `DMEM[address] <= R[ra]` |
| 3 | ADD | `R[rd] <= R[ra] ^ R[rb]` |
| 4 | GFMUL | byte-wise GF(2^8) product |
| 5 / 6 | SHL / SHR | logical shift of `R[ra]` by `R[rb][4:0]` |
| 7 / 8 | ROL / ROR | rotation of `R[ra]` by `R[rb][4:0]` |
| 9 | MIXCOL | AES MixColumn of `R[ra]` |
| 10 | MATMUL | word matrix multiplication of `R[ra]`, `R[rb]` |
| 11 | FCM | `R[ra]` byte-wise times `FIXED_COEFF` |
| 12 | RC6F | `R[ra]·(2·R[ra]+1)` |
| 13 | JMP | `PC <= address` |
| 14 | (reserved) | executed as NOP |
| 15 | HALT | return to IDLE; the next `start` resumes after the HALT |

The published description lists the operations, but the encoding and the
JMP and HALT instructions are this design's. JMP stands in for the
described "transfer instructions" that load the PC. HALT stands in for the
described idle state.

## How an instruction runs

The controller is a finite state machine with the states RESET, IDLE,
FETCH, DECODE (decode and load), ADDR_SETUP, OPERAND_FETCH and
STORE_RESULT. The state names and the select lines come from the published
description. Which state follows which is this design's choice.

| cycle | ALU op | LOAD | STORE | JMP |
|---|---|---|---|---|
| 1 | DECODE: IR ← bus, PC+1 | DECODE | DECODE | DECODE |
| 2 | OPERAND_FETCH: SelA/SelB → ALU, latch result | ADDR_SETUP: `Fetch`=0 | ADDR_SETUP: write `R[ra]` | ADDR_SETUP: PC ← address |
| 3 | STORE_RESULT: `R[rd]` ← result, **fetch next** | OPERAND_FETCH: read data memory | FETCH | FETCH |
| 4 | | STORE_RESULT: `R[rd]` ← bus, **fetch next** | | |

The DECODE state chooses the next state from the opcode while that opcode
is still on the data bus, so the decision does not wait for the
instruction register. In STORE_RESULT the memory would otherwise sit idle,
so the next instruction is fetched in the same cycle as the register
write-back. That overlap is how this design realizes the described three
pipeline stages: fetch, then decode and operand, then execute and
write-back. At most two instructions are in flight. No hazards arise,
because the next instruction reads its registers no earlier than the cycle
after the write has completed.

Cycles from one DECODE to the next:

| class | cycles |
|---|---|
| ALU op | 3 |
| LOAD | 4 |
| STORE | 3 |
| JMP | 3 |
| NOP | 2 |

A run costs one FETCH cycle after `start`, plus one DECODE cycle for the
HALT. For example, one AES MixColumns plus AddRoundKey on a full 128-bit
state, with its loads and stores, is 51 instructions and takes 166 cycles.

## Memories and the host port

There are two arrays of `2**ADDR_W` words each, one for the program and
one for data (`ADDR_W` = 8 by default). A single address reaches both, and
it comes from the address multiplexer. `Fetch` selects the array, so the
processor never reads both memories in the same cycle. Reads are
synchronous: the word lands in `DataReg` one cycle later, and `DataReg`
drives the data bus. The processor can write only the data array.
Assertions check that it never writes the program array and never reads
and writes in the same cycle.

The host port (`host_we`, `host_prog`, `host_addr`, `host_wdata`) fills
either array before a run. `host_rdata` returns a data memory word one
cycle after its address is presented. This port is this design's addition:
the description loads its memories from a text file in simulation.

## Top-level interface

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous active-high reset (registers, PC, IR and `DataReg` cleared) |
| `start` | in | one-cycle pulse: leave IDLE and run from the PC |
| `busy` | out | high from FETCH until HALT |
| `state_o`, `pc_o` | out | controller state and PC, for observation |
| `host_*` | in/out | memory access, see above |

Parameters: `ADDR_W` (8), `POLY` (8'h1B), `FIXED_COEFF` (8'h02).
`ADDR_W` may be at most 16, the width of the address field.

To use it: assert `rst` for a cycle, write the program and data, pulse
`start`, wait for `busy` to fall, then read the results back.

## How far it can be trusted

Each block has a self-checking testbench in `tb/`. Each testbench compares
against reference models written separately from the RTL:

* The ALU is checked on published AES values: {57}·{83} = {c1},
  {57}·{13} = {fe}, and two MixColumn test columns. It is also checked on
  3000 random operand pairs against its own model. A second instance, built
  for the polynomial x^8 + x^4 + x^3 + x^2 + 1 with coefficient {03},
  passes the same GF checks.
* The controller is checked state by state, with its control word and
  cycle count, over 600 random instructions.
* `tb_crypto_processor` runs a random 176-instruction program at the
  default size. The program is split in two parts by a HALT and a restart,
  and it includes a taken jump. The test compares all 256 data words and
  the cycle counts with an instruction-set model. It also counts every
  opcode, every overlapped fetch, the restart and the reset, and fails if
  any of them never happened.
* `tb_workload_cipher_steps` runs AES round 1 of the FIPS-197 example
  (MixColumns, then AddRoundKey) and gets the published state back. It
  also runs the data-dependent part of an RC6 round.

Where the design departs from, or goes beyond, the published description:

* Pipelining is limited to the fetch/write-back overlap described above.
* The buffer block is not built.
* There is no integer adder, so RC6's key additions mod 2^32 cannot run.
  Addition is XOR only, as described.
* The GF reduction polynomial is a synthesis parameter, not a register
  that software can change.
* Opcodes, field layout, memory sizes, reset values, the host port and
  all cycle counts are this design's own.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_crypto_processor \
    -y rtl -y tb +libext+.sv -Irtl rtl/crypto_pkg.sv tb/tb_crypto_processor.sv
./obj_dir/Vtb_crypto_processor
```

Replace the top module to run another testbench: `tb_crypto_alu`,
`tb_gp_registers`, `tb_reg_select_mux`, `tb_addr_mux`,
`tb_program_counter`, `tb_instruction_register`, `tb_crypto_memory`,
`tb_control_decoder` or `tb_workload_cipher_steps`. Each one prints
`TB_RESULT checks=N failures=M` and stops. Each has a watchdog that counts
a failure if the run hangs. All of them finish in well under a second.

To add an instruction, give it a code in `crypto_pkg::opcode_e`. Add a case
to `crypto_alu` and, if it writes a register, to `is_alu_op`. Memory-type
instructions need a branch in `control_decoder`'s ADDR_SETUP and
OPERAND_FETCH states.
