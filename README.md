# A non-pipelined ARM32 microcontroller core

This is a synthesizable SystemVerilog model of a single ARM 32-bit processor
core in a Harvard system: one memory for instructions and a separate one for
data. It runs the 32-bit ARM instruction set, with the seven processor modes
and the banked registers of the ARM11 programmer's model. Programs built by a
standard ARM C compiler run on it unchanged.

The core is built for clarity rather than speed. It has no pipeline. In one
clock cycle an instruction is fetched, tested against its condition, decoded
and executed. Only instructions that touch the data memory take more cycles.

The organisation follows the paper "Development of a Behavioral Model for the
ARM 32-Bit Processor": its single-core block diagram, its flowchart of
instruction execution, its datapath (register read, barrel shifter, ALU,
multiplier, CPSR/SPSR, PC with +4 and a hold multiplexer), its list of
instruction groups with their cycle counts, and its recursive-factorial
demonstration. Where the paper is silent, the ARM architecture's own rules
are used. The section "Design choices" lists where that happened.

## The system (`arm_top`)

```
            +--------------------+
            | instruction memory |<-- prog_we/prog_addr/prog_data (loader)
            +--------------------+
              i_addr |  ^ i_rdata (combinational)
                     v  |
 nirq, nfiq -->  +--------+   d_en/d_we/d_be/d_addr/d_wdata   +-------------+
                 |  core  |---------------------------------->| data memory |
                 +--------+<----------------------------------+-------------+
                              d_rdata (next cycle), d_err
```

| Parameter    | Default         | Meaning                                           |
|--------------|-----------------|---------------------------------------------------|
| `IMEM_WORDS` | 16384 (64 KiB)  | instruction memory, mapped from address 0, wraps   |
| `DMEM_WORDS` | 4096 (16 KiB)   | data memory                                        |
| `DMEM_BASE`  | `32'h2000_0000` | first byte address of the data memory              |
| `IMEM_INIT`  | `""`            | optional `$readmemh` file for the instruction memory |

The paper gives no memory sizes, so these defaults are this design's own. They
were chosen so that code linked at 0x8000 and stacks at 0x2000_00xx to
0x2000_03f8 fit, as in the paper's example.

Ports: `clk`, and `rst_n`, a synchronous active-low reset. `nirq` and `nfiq`
are the active-low, level-sensitive interrupt lines. The loader port
(`prog_we`, `prog_addr`, `prog_data`) writes one instruction word per clock
while reset is held. After reset the core starts at address 0 in SVC mode
with IRQ and FIQ masked.

The two memories are separate address spaces. A load can only read the data
memory, so compiled code must not use literal pools in the code section. An
access outside the data-memory window is a data abort.

## How one instruction runs

At every instruction boundary the core does what the paper's flowchart shows:

1. **Interrupt?** The interrupt controller (`arm_irq_ctrl`) passes each request
   line through a two-flop synchroniser. If FIQ is requested and CPSR.F is
   clear, or IRQ is requested and CPSR.I is clear, the core saves its context
   instead of executing. That means: R14 of the new mode gets PC + 4, the SPSR
   of the new mode gets the CPSR, the mode changes, I is set (and F for FIQ),
   and the PC jumps to 0x18 (IRQ) or 0x1C (FIQ). This takes one cycle. FIQ
   wins over IRQ.
2. **Condition.** `arm_cond` compares bits 31:28 with N, Z, C and V. If the
   condition fails, the PC only steps by 4.
3. **Register read.** `arm_decode` sorts the instruction into a class and
   splits out Rn, Rd, Rs and Rm. `arm_regfile` reads all four through the
   register bank of the current mode. A read of R15 gives the instruction's
   address + 8, which is the value ARM code expects.
4. **Execute.** The work is done by the barrel shifter (`arm_shifter`), the
   ALU (`arm_alu`), the multiplier (`arm_mul`) or the status registers
   (`arm_psr`). The result is written to Rd. Multiply writes the register in
   bits 19:16.
5. **Branch?** B and BL, a write to R15 and an LDM that includes the PC load
   the PC (`arm_pc`). Every other instruction adds 4. If the S bit is set on a
   write to R15, the CPSR is also restored from the SPSR. This is how an
   exception handler returns: `subs pc, lr, #4` or `movs pc, lr`.

### Instructions that take more than one cycle

The data memory returns read data one cycle after the request. While a
multi-cycle instruction runs, the PC is held (`nhold` low) and no interrupt is
taken. A state machine in `arm_core` sequences these instructions:

| Instruction               | Cycles | What happens in each cycle                                                  |
|---------------------------|--------|-----------------------------------------------------------------------------|
| data processing, MUL/MLA, MRS/MSR, B/BL | 1 | everything                                              |
| STR, STRB, STRH           | 1      | address, base write-back and memory write                                    |
| LDR, LDRB, LDRH, LDRSB, LDRSH | 2  | 1: address, read request, base write-back; 2: align/extend the data, write Rd (or the PC) |
| SWP, SWPB                 | 2      | 1: read request; 2: write Rm to memory, write the old value to Rd            |
| STM of n registers        | n + 1  | 1: set the address latch, write back the base; then one store per register   |
| LDM of n registers        | n + 2  | 1: set the address latch, write back the base; then n read requests, each writing the register of the one before; last: write the final register |

The one-cycle store and the two-cycle load and swap are the paper's figures.
So is the extra address-latch cycle of load-multiple. Giving store-multiple
the same address cycle is this design's choice.

During an LDM the reads overlap the register writes. In cycle *k* the core
requests word *k* and writes the word of request *k-1*, which arrives that
cycle. `m_pend`/`m_pend_reg` hold the register still waiting for its data.
The PC, if it is in the list, is always the last register. It is therefore
loaded in the final cycle, together with the optional CPSR restore
(`ldm sp!, {..., pc}^`).

Addressing modes: single transfers support an immediate or shifted-register
offset, added or subtracted, pre-indexed with optional write-back, or
post-indexed. Halfword transfers take an 8-bit immediate or register offset.
LDM/STM support IA, IB, DA and DB, with optional write-back. With the S bit,
and without the PC in an LDM list, they transfer the user-mode registers. An
unaligned word load returns the word rotated, as ARM7-class cores do.

Byte order: data are little-endian while CPSR.E is 0. When E is set (MSR to
the CPSR's extension field), word and halfword transfers, including SWP and
LDM/STM, reverse the bytes within the transfer. Byte addresses keep their
meaning, so a byte load sees the same memory byte in both orders. This is
the ARMv6 "BE-8" scheme. The instruction fetch is always little-endian.

## Modes, banked registers and status registers

| Mode | M[4:0] | Own registers        |
|------|--------|----------------------|
| USR  | 10000  | (user registers)     |
| FIQ  | 10001  | R8-R14, SPSR         |
| IRQ  | 10010  | R13, R14, SPSR       |
| SVC  | 10011  | R13, R14, SPSR       |
| ABT  | 10111  | R13, R14, SPSR       |
| UND  | 11011  | R13, R14, SPSR       |
| SYS  | 11111  | none; privileged USR |

`arm_regfile` holds 30 registers: 15 user, 7 FIQ, and 2 each for IRQ, SVC,
ABT and UND. `arm_pc` holds R15. Together they make the architecture's 31
registers. The register file has four read ports and two write ports. Each
write port carries its own mode. That lets an exception write the link
register of the mode it is entering, while the second port writes back a base
register.

The CPSR keeps N Z C V Q (31:27), GE (19:16), E (9), A (8), I (7), F (6) and
M (4:0). Writes to the reserved bits, T and J are ignored, because only the
32-bit ARM instruction set is executed. MSR writes the fields chosen by
instruction bits 19:16. In USR mode it can change only the flags. A mode value
not in the table above leaves the mode unchanged. Bit 22 selects the SPSR
instead of the CPSR.

## Exceptions

| Event                        | Mode | Vector | R14 of the new mode    | Return with        |
|------------------------------|------|--------|------------------------|--------------------|
| IRQ                          | IRQ  | 0x18   | interrupted PC + 4     | `subs pc, lr, #4`  |
| FIQ                          | FIQ  | 0x1C   | interrupted PC + 4     | `subs pc, lr, #4`  |
| undefined instruction        | UND  | 0x04   | instruction + 4        | `movs pc, lr`      |
| data access outside memory   | ABT  | 0x10   | instruction + 8        | `subs pc, lr, #4` (skips it) or `subs pc, lr, #8` (retries it) |

Some encodings are outside the implemented groups and execute as undefined.
These are long multiplies, BX, coprocessor instructions, SWI, LDRD/STRD and
the media space. A data abort in the middle of an LDM keeps the registers
already loaded.

## Files

| File | Block |
|------|-------|
| `rtl/arm_pkg.sv`      | modes, condition codes, opcodes, instruction classes, vectors, PSR bit positions |
| `rtl/arm_top.sv`      | system: core, instruction memory, data memory |
| `rtl/arm_core.sv`     | control state machine and datapath wiring |
| `rtl/arm_decode.sv`   | instruction classes and register fields |
| `rtl/arm_cond.sv`     | condition check |
| `rtl/arm_regfile.sv`  | banked R0-R14 |
| `rtl/arm_shifter.sv`  | barrel shifter, immediate rotation, shifter carry |
| `rtl/arm_alu.sv`      | 16 data-processing operations and flags; also forms load/store addresses |
| `rtl/arm_mul.sv`      | MUL / MLA |
| `rtl/arm_psr.sv`      | CPSR and the five SPSRs |
| `rtl/arm_pc.sv`       | R15, +4, hold/load multiplexer |
| `rtl/arm_irq_ctrl.sv` | interrupt synchroniser, masking, priority, vector |
| `rtl/arm_imem.sv`     | instruction memory with loader port |
| `rtl/arm_dmem.sv`     | byte-lane data memory with abort flag |

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- `tb_arm_top` runs the whole system at its default sizes. The program first
  sets the stack pointer of every mode, in the same order and to the same
  values as the paper's start-up sequence. It then computes 5! with the
  compiler-generated recursive factorial (push/pop, STR/LDR on the frame
  pointer, CMP/BGT, BL, MUL). After each multiply it checks r2, r3, fp and sp
  against the paper's execution trace: r3 = 2, 6, 24, 120, with frames 12
  bytes apart from fp = 0x200003f4 and sp = 0x200003ec. It also checks that sp
  returns to 0x200003f8. The program then tests SWP, byte and halfword
  transfers, an IRQ and an FIQ raised by the testbench, an undefined
  instruction and a data abort. For every instruction the testbench checks how
  many cycles the PC is held, and it counts each mechanism. The run takes
  about 350 cycles. If the program has not finished after 20000 cycles, the
  testbench reports that and still checks the state the program left.
- `tb_arm_core` drives the core with memories written in the testbench. It
  runs 3000 random data-processing and multiply instructions with random
  conditions and S bits. A reference model in the testbench computes each
  result independently, and after every instruction the testbench compares
  r0-r12 and the flags. A directed section then covers all four LDM/STM
  modes, pre- and post-indexing, unaligned loads, register offsets, STR of the
  PC, SWPB, MRS/MSR on the SPSR and user-bank transfers. It ends with
  big-endian stores and loads under CPSR.E.
- The unit testbenches cover the rest. The condition check is tested
  exhaustively. The shifter, ALU, multiplier, register file, PC and data
  memory are tested with random stimulus against reference models. The status
  registers, the interrupt controller (including its two-cycle latency) and
  the decoder are tested with directed sequences.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/arm_pkg.sv tb/tb_arm_top.sv -y rtl \
          --top-module tb_arm_top -Mdir obj_top && ./obj_top/Vtb_arm_top
```

Replace `tb_arm_top` with any other testbench name. The design is
two-state clean: every register that is read is reset or initialised.

To run your own program, assemble it for ARMv4 with the code at address 0 or
any address below 64 KiB. Keep the data and stacks in 0x20000000-0x20003fff.
Then either write the words through the loader port while `rst_n` is low, or
pass a hex file through `IMEM_INIT`.

## Design choices

These follow the paper:

- the Harvard arrangement
- the non-pipelined, mostly single-cycle execution and the order of the
  interrupt, condition and decode decisions
- the cycle counts of store, load, swap and load-multiple
- the seven modes and their encodings, and the register banking
- the status-register layout
- the datapath blocks and how they connect
- multiply writing the register in bits 19:16
- the treatment of any unlisted instruction as undefined

These are this design's own:

- memory sizes and the address map
- the loader port
- the synchronous data-memory read
- the two-flop interrupt synchroniser, FIQ-over-IRQ priority and vectors
- R15 reading as address + 8
- the big-endian scheme selected by the E bit
- the abort rule (any access outside the data memory)
- the NV condition meaning "never"
- STM's address-latch cycle
- the reset state (PC 0, SVC mode, I and F set, all registers 0)

Not built:

- the Thumb and Jazelle states
- the saturating and SIMD instructions that use Q and GE (both bits are only
  stored)
- prefetch aborts and software interrupts
- long multiplies
