# PASM SIMD/MIMD processor array in SystemVerilog

PASM is a partitionable SIMD/MIMD machine designed for image processing. It has N = 1024
processing elements ("PCU processors") driven by Q = 16 Micro Controllers. Each controller
fetches one instruction stream. It executes the control flow itself and broadcasts each data
operation to its N/Q processors. Groups of controllers can run the same program, which makes one
larger SIMD machine. A processor can also leave SIMD mode and ignore its controller (MIMD mode).

This RTL is built from the 1978 description of the PASM processor organisation and instruction
language. It covers:

- the Micro Controller;
- the instruction stream handler that feeds it;
- the processor with its register-file stack and conditional mask stack;
- the encoded, error-protected broadcast link;
- the double-buffered controller memories and the switch that loads them;
- the top level that wires Q controllers to N processors.

The sections below follow the order in which an instruction travels through the machine.

## Organisation (`pasm_top`)

- Processor `p` belongs to controller `p mod Q`. Every processor on a controller has the same
  low `q = log2 Q` address bits, and those bits are the controller's number. Inside that
  controller, processor `p` is enable bit `p / Q` of the Mask Vector Register (MVR).
- A **partition** is `M = 2^m` controllers whose numbers agree in their low `q - m` bits. They
  run the same program on a machine of `M·N/Q` processors. The loader names a partition by one
  of its members and by `m`. The controller memory switch (`mc_mem_switch`) then writes the
  same byte into all `M` memories in one clock.
- Each controller owns a **memory module of two memories**, A and B (`mc_memory`).
  `mc_run_bank[c]` selects the memory the controller runs from. The loader fills the other one
  at the same time, so loading and computing overlap.
- Each processor has a 64 KiB byte-addressed memory (`pcu_memory`). A loader port stands in for
  the memory management system. It can write one processor, or all processors at once, and it
  can read back.
- `mimd[p]` blocks the broadcast words at processor `p`. The processor then holds its state.
- The interconnection network is not built. Each processor's transfer register (`tcr`) and the
  matching input (`xfer_in`) are brought out as top-level ports.
- The system control unit is not built either. Start, start address, halted and bank
  selection are ports.

Parameters: `N` (1024), `Q` (16), `PCU_MEM_DEPTH` (65536) and `MC_MEM_DEPTH` (65536).

## Instruction stream: nibbles and the null instruction

Instructions are strings of 4-bit nibbles. An instruction is:

- an 8-bit opcode;
- then 0 to 5 operand nibbles:
  - 1 for a register number or a small constant;
  - 2 for `Rn,Rm` or an 8-bit branch offset;
  - 3 for `Rn` plus an offset;
  - 4 for a 16-bit address or constant;
  - 5 for `Rn` plus 16 bits, or for a PE address mask.

So instructions often start in the middle of a byte.

A jump target must be byte aligned. The **null instruction** pads a stream up to a byte
boundary. Every opcode `F0`-`FF` is null. When the controller sees `F` as the first nibble, it
discards only that nibble. The nibble after it becomes the high half of the next opcode, so the
bytes `F5 AB` mean opcode `5A` followed by `B…`. A one-nibble pad therefore costs one clock, and
there is no separate 4-bit opcode space.

### Instruction stream handler (`ish`)

The handler is a nibble queue (capacity 6) between the memory and the decoder. It has four
controls:

- `SHFT1` removes one nibble;
- `SHFT2` removes two nibbles;
- `LOAD` appends the byte on `din` (two nibbles);
- `RESET` empties the queue and reloads the byte address counter. Jumps use this.

`dout` shows the first two queued nibbles, the first in bits 7:4.

The fetch address (`fetch_addr`) is always on the memory address lines. If a shift would leave
fewer than 3 nibbles, the handler loads the next byte in the same clock. Instruction fetch
therefore overlaps execution, and the decoder always finds an opcode waiting. The auto-load
condition is "after the shift, fewer than 3 nibbles remain". `count` is the queue occupancy
before the clock.

The controller sometimes uses the memory for an operand (CLDA, CST, JSR, RET). It then raises
`load_inhibit`, so that a shift in that window cannot load the operand byte as code. The
controller uses the window: if a null nibble is at the head of the queue, it shifts that nibble
out during the operand access.

## Micro Controller (`micro_controller`)

The controller is a multi-cycle state machine: `FILL → DEC → OPND → EXEC`, plus `MEM` for
memory operands.

| step | clocks |
|---|---|
| decode | 1 |
| operand nibbles | 1 per 1–2 nibbles |
| execute | 1 |
| memory operand | 2 (bytes are high then low) |
| refill after a jump | until 3 nibbles are queued |

Two kinds of instruction are handled differently:

- **PCU instructions** are not executed here. In the execute clock the controller registers a
  30-bit control word: a 6-bit micro-operation, two register numbers and a 16-bit immediate.
  That word is broadcast for exactly one clock. It is a NOP word otherwise.
- **Controller instructions** use 16 controller registers `R0`–`R15`:
  - `CLDC`, `CLDA`, `CST`, `CMOV` and `CCLR`;
  - `BRA`, `JMP`, `JMPR`, `DBNZ` and `IBNZ`;
  - `BRS`, `JSR`, `JSRR` and `RET`;
  - `IFANY` and `IFALL`, which branch when any or all of the enabled processors have their
    condition flip-flop set;
  - `HLT`;
  - the mask instructions below.

Details:

- Branch offsets are signed bytes, relative to the first byte of the next instruction.
- **Subroutine linkage stack (SLS).** By convention, `R0` points to the first free byte above
  the SLS in the controller's memory. `JSR` writes the two-byte return address at `R0` and adds
  2. `RET` subtracts 2 and reads it back. The return address is the first byte that was not
  consumed, so the code after a call must start on a byte boundary (pad with `F`). Parameters
  and results go on the same memory stack, addressed through the registers.

### Masks

- **PE address masks.** `PMSK` and `NMSK` take a 5-nibble operand that holds two bits per
  processor address bit, for the 10 address bits of 1024 processors:
  - `00` means the bit must be 0;
  - `01` means the bit must be 1;
  - `1x` means don't care.
- `pe_mask_decoder` turns the mask into this controller's MVR bits. `NMSK` selects the
  complement.
- `SMSK` and `LMSK` move the MVR to or from `Rn…Rn+3`. `ANDM`, `ORM` and `NOTM` combine masks
  held in registers.
- A processor whose MVR bit is 0 acts as inactive.

## The broadcast link: encoded control words with SEC-DED

Broadcasting raw microcode to 1024 processors would take a very wide bus. Instead, the
controller sends a short encoded word, and each processor expands it with its own small decoder
(`pcu_ctl_decoder`, a case table standing in for a logic array).

The link is protected with an extended Hamming code:

- `secded_enc` and `secded_dec`, 30 data bits → 37 code bits;
- bit 0 is overall parity;
- the check bits sit at the power-of-two positions.

A single error is corrected and reported on `link_corrected`. A double error is detected: the
processor discards the word and raises `link_fault`.

## PCU processor (`pcu_processor`)

### Register-file stack (`reg_stack`, `pcu_alu`)

The processor is a stack machine built on a 16-word register file, as in an AM2901 bit slice.
An external 4-bit up/down counter, `sp`, points at the top of the stack.

- Arithmetic takes its operands from the top two entries (TOS, NOS) and replaces them with the
  result.
- `LDSP n` sets the stack base. Registers below the base are ordinary registers, which
  instructions name directly (`Rn`). `R0` is the processor's own SLS pointer.
- A push at `sp = 15` is an overflow. A pop below the base is an underflow. Either one raises
  `stk_fault` and changes nothing.

The ALU works on 16 bits: add and subtract with and without carry, negate, increment,
decrement, signed multiply (low 16 bits kept; C and V flag a product that does not fit), logic
operations, shifts and rotates by one, shifts and rotates by `n` places (`ASLN`, `ASRN`, `ROLN`,
`RORN` with a count nibble; one micro-operation, the kind travels in the `rm` field), and
compare. Flags are C, V, N and Z.
After a subtraction, C is the borrow.

### Conditional Mask Stack (`cms_unit`)

Data-dependent work uses a bit stack. Its top element says whether the processor is active, and
it is ANDed with the processor's MVR bit. The condition flip-flop (CFF) and accumulator
flip-flop (AFF) evaluate conditions:

- `SCxx` sets CFF from the flags;
- `LDA`, `LDC`, `NOTC`, `ANDA` and `ORA` combine CFF and AFF.

Structured conditionals map onto the stack as follows:

- `WHERE A DO B`:
  1. `WPSH` pushes `A & top`.
  2. `B` runs.
  3. `CMPOP` pops.
- `WHERE A DO B ELSEWHERE C`:
  1. `WEPSH` pushes `~A & top` and then `A & top`, in one instruction.
  2. `B` runs.
  3. `CMPOP` pops.
  4. `C` runs.
  5. `CMPOP` pops.

Three rules make nesting safe:

1. Pushes are ANDed with the current top, so an inner WHERE cannot re-enable a processor that an
   outer one disabled.
2. `WPSH`, `WEPSH`, `CMPOP` and `ICMS` are privileged: inactive processors execute them too, so
   every stack stays the same depth.
3. `CMPOP` clears CFF.

### Instruction execution

The processor decodes each valid, uncorrupted broadcast word:

- an inactive processor executes only the privileged ones;
- a stack fault stops the result from being written;
- memory instructions use the processor's own memory in the same clock (combinational read,
  write at the clock edge);
- `TRANS` sends TOS to the transfer register for the network and replaces TOS with the word
  received from it (`xfer_in`).

## Opcode map

| hex | group |
|---|---|
| `10`–`29` | ALU |
| `30`–`43` | stack, memory and transfer |
| `48`–`49` | stack compare |
| `50`–`5C` | register-direct |
| `60`–`6E` | condition set and CFF/AFF logic |
| `70`–`73` | WHERE stack |
| `78`–`7E` | masks |
| `80`–`8C` | control flow |
| `90`–`94` | controller registers |
| `F0`–`FF` | null |

`pasm_pkg.sv` lists every code and its operand format.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=… failures=…`. Build one with
plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal rtl/pasm_pkg.sv rtl/*.sv \
          -y tb +libext+.sv tb/tb_pasm_top.sv --top-module tb_pasm_top
./obj_dir/Vtb_pasm_top
```

Each block has its own testbench (`tb_ish`, `tb_reg_stack`, `tb_pcu_alu`, `tb_cms_unit`,
`tb_secded`, `tb_pcu_ctl_decoder`, `tb_pcu_memory`, `tb_pe_mask_decoder`, `tb_mc_memory`,
`tb_mc_mem_switch`, `tb_pcu_processor`, `tb_micro_controller`). Most of them compare against a
reference model written in the testbench, using random stimulus.

`tb_pasm_top` runs the whole machine end to end with `N = 64`, `Q = 4` and 1 KiB memories:

- Every controller loads a program. It thresholds a pixel with WHERE/ELSEWHERE, calls a
  subroutine, uses IFANY, and writes through a PE address mask.
- One controller runs a second program from memory B.
- One processor is in MIMD mode.
- Controller memory B is reloaded while the machine runs.

The testbench checks every processor's results. It also counts and requires each mechanism:
broadcasts, null nibbles, shifts under load inhibit, overlapped loads, masked processors and
loading during computation. That is the largest size simulated. At `N = 1024`, `Q = 16` the
design lints and elaborates, but building the simulator takes more than ten minutes.

## Departures and gaps

- **Not built:**
  - MIMD-mode instruction fetch inside the processor. `mimd` only blocks the broadcast.
  - Divide, floating point and double precision.
  - Rotates through carry by more than one place, and `SWW` (swap word groups).
  - `DUP` and `DEL` of more than one element.
  - The interconnection network, the system control unit, the memory management system and
    the disks.
- **This design's own choices:**
  - All opcode values and the micro-operation encoding.
  - The 30-bit control word. The original encoded only the microcode in about ten bits;
    immediates travel in this word as well.
  - The SEC-DED code layout.
  - The mask-bit encoding.
  - Relative branches measured from the next byte.
  - High-byte-first storage.
  - Queue capacity 6 and CMS depth 16.
  - Overflow and underflow leave the stack unchanged.
- The register file is not reset, which matches a bit-slice RAM. Testbenches initialise it
  before reading.
