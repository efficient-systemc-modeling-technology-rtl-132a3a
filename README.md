# ARM7-like three-stage processor core in SystemVerilog

This is a 32-bit RISC core that runs the ARM v4 instruction set in ARM
state, organised like the ARM7: a three-stage pipeline (fetch, decode,
execute) on a single memory bus that carries both instructions and data.
The core is built from ten functional units: decoder, banked register file,
barrel shifter, ALU with a 64-bit adder, 32x8 multiplier, forwarding unit,
address register, read and write data selectors, and control logic. An
exception detector handles interrupts and memory aborts.

The control logic is what makes this design work. All multi-cycle behaviour
(loads and stores, block transfers, swaps, register-specified shifts,
branches and multiplies) is sequenced in the execute stage by one main FSM
and four sub-FSMs. The sections below spend most of their space on that
control logic.

Thumb state and coprocessor instructions are not implemented. A
coprocessor instruction raises the undefined-instruction exception.

## Files

| File | Contents |
|---|---|
| `rtl/arm7_pkg.sv` | Shared types: modes, the instruction-type enumeration, ALU opcodes, shift kinds, exception kinds, access sizes, address sources, the decoded-instruction struct. Also the banked-register index function and the condition test. |
| `rtl/arm7_core.sv` | The top: pipeline registers, main FSM and the load/store, shift and branch sub-FSMs, exception entry, bus outputs. |
| `rtl/arm7_decoder.sv` | Instruction classification, field extraction, condition test. |
| `rtl/arm7_regfile.sv` | 30 banked general registers, CPSR and five SPSRs. |
| `rtl/arm7_forward.sv` | Forwarding from the execute-stage write ports to the operand reads. |
| `rtl/arm7_barrel_shifter.sv` | LSL, LSR, ASR, ROR and RRX, with the shifter carry-out. |
| `rtl/arm7_alu.sv` | Reverse/invert multiplexer, logic unit, 64-bit adder. |
| `rtl/arm7_mul32x8.sv` | 32x8 → 40-bit partial-product multiplier. |
| `rtl/arm7_mul_fsm.sv` | The seven-state multiplication sub-FSM. |
| `rtl/arm7_addr_reg.sv` | Memory address register with its four sources. |
| `rtl/arm7_rdata_sel.sv`, `rtl/arm7_wdata_sel.sv` | Load alignment and extension; store replication. |
| `rtl/arm7_exc_detect.sv` | Interrupt synchroniser and abort classification. |
| `tb/tb_*.sv` | One self-checking testbench per unit, plus three for the whole core: `tb_arm7_core` (directed program), `tb_arm7_random` (random instructions against an instruction-level model) and `tb_arm7_workloads` (benchmark kernels). |
| `tb/arm7_mem_model.sv` | Behavioural zero-wait memory used by the core testbench. |

## Bus interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `nreset` | in | 1 | Rising-edge clock; asynchronous active-low reset. |
| `a` | out | 32 | Address. It comes from a register and changes after the rising edge. |
| `din` | in | 32 | Read data. It is sampled at the end of the same cycle, so memory must have zero wait states. |
| `dout` | out | 32 | Write data. Bytes and halfwords are replicated across all lanes. |
| `nrw` | out | 1 | 1 = write. |
| `mas` | out | 2 | Access size: byte, halfword or word. |
| `opc` | out | 1 | 1 = the access is an instruction fetch. |
| `mem_abort` | in | 1 | The current access is aborted. It becomes a prefetch abort if `opc` is high, otherwise a data abort. |
| `nfiq`, `nirq` | in | 1 | Interrupt requests, active low. |
| `isync` | in | 1 | 1 = the interrupt inputs are already synchronous. 0 = they pass through one synchronising register first. |

Memory is little-endian. There is no wait-state input. Adding one would
mean holding every register that is clocked by a bus access.

Reset is asynchronous. In simulation, give `nreset` a falling edge before
the first rising clock edge, as the testbenches do. A reset that is low from
time zero, with no edge, acts only at the first rising clock edge. At that
edge the bus registers still hold their power-up values, so a memory model
could see a random write.

## Pipeline

- **IF.** The address register drives `a`. In a fetch cycle the word on
  `din` is queued, together with its address and a prefetch-abort flag. The
  queue has two entries: the IF/ID register, and a one-word fetch buffer
  behind it.
- **ID.** The decoder classifies the instruction into one of 37 types:
  - branch and exchange
  - PSR transfers
  - swap
  - four multiplies
  - halfword and word loads/stores, with and without r15 as destination
  - data processing in its three operand forms, again split on whether
    Rd is r15
  - block transfers
  - branch
  - SWI
  - undefined

  These types have the numeric codes 101–137. Two codes are added for
  internal use: 100 marks a slot whose condition failed (it executes as a
  no-op), and 138 marks an exception-entry slot. Operands are read from the
  register file in the mode the instruction will run in, then passed
  through the forwarding unit.
- **EX.** The stage contains the barrel shifter, the ALU and the
  multiplier. Results are written back in the cycle they are produced,
  through two write ports: the ALU result, and load data or base
  write-back.

**Forwarding.** The instruction in ID reads the register file in the same
cycle that the instruction in EX writes it. The forwarding unit compares the
physical (banked) register index of each read with both write ports. On a
match it substitutes the data being written, so a dependent instruction never
waits.

**Reading r15.** r15 reads as the instruction's own address + 8. It reads as
+12 in two cases: when r15 is the register being stored, and when a
register-specified shift is used. This matches the architecture. The value is
computed from the address kept with each instruction, so it does not depend
on the pipeline state.

**Fetching.** The bus fetches whenever EX does not need it. In the address
cycle of a load or store, IF/ID still holds the next instruction, so the
word fetched then goes into the fetch buffer. When the store's data cycle
(or the load's last cycle) ends, the next instruction moves from IF/ID into
EX and the buffered word moves up into IF/ID. So the memory is busy in every
cycle, and a store of one word costs exactly two cycles, with no gap after
it. If both entries are full, the fetched word is dropped and its address is
fetched again later; this wastes bus cycles only, never EX cycles, because
the queue then already holds the next two instructions. Once the first
instruction has entered EX after reset, EX is never idle, so the cycle
counts below are also the time each instruction takes.

## Control FSMs (execute stage)

`X_NORMAL` is the main state and the last cycle of almost every instruction.

| Sub-FSM | States | Used by |
|---|---|---|
| load/store | `X_LS_ADDR` → `X_LS_DATA` (repeats once per word) → `X_NORMAL` | LDR, LDRH/LDRSB/LDRSH, LDM. `X_LS_ADDR` computes the address and the base write-back. A load into r15 goes on to the branch sub-FSM. |
| | `X_LS_ADDR` → `X_LS_DATA` (finish) | STR, STRH, STM. The store's last data cycle is its finish cycle. |
| | `X_LS_ADDR` → `X_LS_DATA` → `X_SWP_WR` → `X_NORMAL` | SWP, SWPB |
| shift | `X_SHIFT` → `X_NORMAL`, or → branch when Rd is r15 | Data processing with the shift amount in a register. The extra cycle reads Rs. |
| branch | `X_BR_CALC` → `X_BR_REFILL` → `X_NORMAL` | B, BL, BX, writes to r15 and exception entry. `X_BR_CALC` computes the target and flushes IF/ID. `X_BR_REFILL` fetches the target. |
| multiply | `X_MUL`, while `arm7_mul_fsm` runs | MUL, MLA, UMULL, UMLAL, SMULL, SMLAL |

Resulting EX-stage cycle counts:

| Instruction | EX cycles |
|---|---|
| Data processing | 1 |
| Data processing, register shift amount | 2 |
| Branch or PC write | 3 |
| LDR | 3 |
| STR | 2 |
| SWP | 4 |
| LDM, n registers | n + 2 |
| STM, n registers | n + 1 |
| Multiply | 2 to 7 |

The core testbench checks each of these counts.

### Multiplication

The multiplier takes the 32-bit multiplicand and one 8-bit slice of the
multiplier, and produces a 40-bit partial product. That product is
registered. In the next cycle the 64-bit adder adds it into an accumulator,
shifted by 8 bits per slice, while the multiplier works on the next slice.
The last product is added in `S_FINISH`, which is why even a one-byte
multiply takes two cycles.

`arm7_mul_fsm` steps through up to four slice states, `S1`–`S4`. After each
slice the multiplier register shifts right by 8 (arithmetically for a signed
long multiply). It leaves for `S_FINISH` as soon as every multiplier bit not
yet used is zero. A negative multiplier in SMULL/SMLAL always uses all four
slices, and the top slice is treated as signed.

After `S_FINISH`:
- An accumulating multiply spends one more state, `MLA`, adding Rd (or
  RdHi:RdLo).
- A long multiply spends one more state, `LWRITE`, writing the high word.

Resulting cycle counts:

| Instruction | Cycles |
|---|---|
| MUL | 2–5 |
| MLA, UMULL, SMULL | 3–6 |
| UMLAL, SMLAL | 4–7 |

The FSM raises `finish` in its last state.

## Exceptions

`arm7_exc_detect` does three things:
- It classifies an abort by the access type: a fetch gives a prefetch abort,
  any other access gives a data abort.
- It masks FIQ with the F bit and IRQ with the I bit.
- When `isync` is 0, it delays nFIQ and nIRQ by one register stage.

A prefetch abort is carried with the fetched word. It is raised only if that
instruction reaches EX.

At each instruction boundary the core takes the highest-priority pending
event, in this order:
1. data abort
2. FIQ
3. IRQ
4. prefetch abort
5. SWI or undefined instruction

Reset has the highest priority of all. It is asynchronous and leaves the core
in supervisor mode with I and F set, fetching from address 0.

Exception entry runs as an inserted slot through the branch sub-FSM:
- r14 and the SPSR of the new mode are written.
- The CPSR switches mode and sets I (and F, for FIQ).
- The vector is fetched.

| Exception | Vector | r14 |
|---|---|---|
| Undefined | 0x04 | instruction + 4 |
| SWI | 0x08 | instruction + 4 |
| Prefetch abort | 0x0C | instruction + 4 |
| Data abort | 0x10 | faulting instruction + 8 |
| IRQ | 0x18 | next instruction + 4 |
| FIQ | 0x1C | next instruction + 4 |

The handler returns with `SUBS pc, lr, #4` (or `#8` after a data abort), or
with `MOVS pc, lr` after SWI or undefined.

## Where this design departs from, or adds to, the description it follows

- **Fetching.** The bus protocol, the zero-wait timing and the
  two-entry fetch queue with its drop-and-refetch rule are this design's
  own.
- **Exception details.** Link values, vectors and mode changes follow the
  ARM v4 architecture, because the description does not give them.
- **Data aborts.** The base register is not restored after a data abort. A
  swap whose read aborts still performs its write.
- **Register file size.** The register file stores 30 general registers.
  r15 (the program counter) lives in the core.
- **Extra instruction types.** Codes 100 (condition failed) and 138
  (exception entry) are additions to the 37 instruction types.
- **PSR and BX limits.** MSR in user mode changes only the flags. BX ignores
  bit 0, since there is no Thumb state.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<m>`. Each one has a
watchdog, and draws its random stimulus with `$urandom`.

- **Leaf units.** Each leaf unit is compared with a reference model written
  independently inside its testbench:
  - the decoder against a pattern-table classifier, over 20,000 random words
    plus one example of every type
  - the register file against a per-mode register model
  - the ALU and the shifter against wide-integer arithmetic
  - the multiplication FSM: its slices must rebuild the exact 64-bit product
    in the expected number of cycles
- **`tb_arm7_core`.** This testbench runs the whole core at its default
  parameters from an assembled program:
  - It exercises every instruction class and every exception, with results
    stored to memory and compared.
  - It checks the EX cycle count of each class.
  - It counts these mechanisms and fails on any that never happened:
    forwarding, register-shift wait, branch refill, condition-failed slots,
    multiply early termination, the full 7-cycle multiply, block transfers,
    swap, fetch-buffer fills, dropped fetches, and each exception kind.
  - It checks that no store is followed by an idle EX cycle, and that EX
    is never idle after the first instruction.
  - It finishes in about 380 clock cycles.
- **`tb_arm7_random`.** This testbench generates 400 random instructions:
  - data processing with random conditions, S bits and operand forms
  - all six multiplies
  - byte and word loads and stores

  It runs them on the core. It also runs them through a sequential
  instruction-level model written in the testbench. At the end it compares
  all registers, the flags and the data memory of the two.
- **`tb_arm7_workloads`.** This testbench runs seven benchmark kernels on
  the core and checks their results against values computed in
  SystemVerilog:
  - bitcount over 64 random words, about 9,000 cycles
  - a bitwise CRC-32 over 256 bytes, about 14,000 cycles
  - a case-insensitive search for a 3-letter word in 256 bytes of text,
    about 7,300 cycles
  - the SHA-1 compression of one 512-bit block, with the message schedule
    expanded in memory, about 3,000 cycles
  - Dijkstra's shortest distances from one node of a complete 8-node graph
    with random weights, about 2,300 cycles
  - the integer 8×8 forward DCT of a JPEG encoder, as two matrix products
    with `MLA`, about 17,000 cycles
  - the inverse DCT of a JPEG decoder on that result, after scaling it down
    by a shift, about 16,000 cycles

To simulate with Verilator (5.x), for example the core:

    verilator --binary --timing --assert -Wno-fatal rtl/arm7_pkg.sv \
        $(ls rtl/*.sv | grep -v _pkg) tb/arm7_mem_model.sv tb/tb_arm7_core.sv \
        --top-module tb_arm7_core -o sim
    ./obj_dir/sim

A leaf unit needs only the package, its module and its testbench, for
example:

    verilator --binary --timing -Wno-fatal rtl/arm7_pkg.sv rtl/arm7_alu.sv tb/tb_arm7_alu.sv \
        --top-module tb_arm7_alu

The package must come first on the command line.

To run your own program, fill `mem.mem[]` in a copy of `tb_arm7_workloads`.
The memory model holds 8192 words (32 KB) by default; set its `WORDS`
parameter to change that. The core itself addresses the full 32-bit space.

## Programs the core is meant for

The core targets ordinary embedded programs, for example the MiBench
programs: bitcount, JPEG encode and decode, stringsearch, Dijkstra, SHA and
CRC32. These runs take between 2.9 million and 28 million cycles. They need
only the ARM-state instruction set and an external memory of a few hundred
kilobytes. Running the complete programs on this RTL needs a memory model
large enough for them, and a way to handle their file I/O. Neither is
included here. `tb_arm7_workloads` runs an inner loop of each of them on
generated data: bitcount, CRC32, stringsearch, SHA, Dijkstra, the forward
DCT of the JPEG encoder, and the inverse DCT of the JPEG decoder. These
kernels run for about 69,000 cycles in all. The rest of each program, such as
JPEG's quantisation and entropy coding, is not run.
