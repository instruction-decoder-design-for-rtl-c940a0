# A COFFEE-style RISC pipeline that runs MIPS32 code

COFFEE is a six-stage embedded RISC core with its own instruction set. Its
control unit is itself a small pipeline that runs beside the datapath. Every
control stage looks at the instruction word again as that word moves along, and
decodes only the fields its own stage needs. Because of this, the instruction
format lives in only two places: the DECODE-stage datapath and the decode
functions of the control unit. Replace those, and the core runs a different
instruction set. The ALU, multiplier, register file, forwarding network and
memory stage stay as they are.

This RTL makes that change. The core decodes standard MIPS32 machine words,
so a normal MIPS compiler can produce its programs. It implements an integer
subset of MIPS32:

| class      | instructions                                   |
|------------|------------------------------------------------|
| arithmetic | ADD, ADDU, ADDI, ADDIU, SUB, SUBU, MUL         |
| logical    | AND, ANDI, OR, ORI, XOR                        |
| memory     | LW, SW                                         |
| other      | NOP (the all-zero word)                        |

Every other word is illegal and raises an exception.

## Pipeline

```
 FETCH -> DECODE -> EXE1 -> EXE2 -> EXE3 -> WRITE-BACK
          regfile   ALU     co-proc  memory  regfile write
          operands  mul.    addr     mul.
          forward   start   check    32x32
```

- **FETCH** drives the PC onto `i_addr`. The word on `i_rdata` is captured into the DECODE register.
- **DECODE** (`mips_decoder`) does the following:
  - picks the format from the opcode: R-type (`000000`, and `011100` for MUL), I-type, or J-type
  - extracts `rs`, `rt` and `rd`
  - reads the register file
  - zero-extends the immediate for ANDI/ORI and sign-extends it for the rest
  - replaces a register value with a forwarded one where the flow control asks for it
- **EXE1** runs the ALU (`alu`: add, sub, and, or, xor, pass). It also starts the multiplier.
- **EXE2** is the co-processor stage of the original core. Here it carries the value forward, and the `address_checker` validates the load/store address.
- **EXE3** drives the data-memory port. The 32x32 product completes here.
- **WRITE-BACK** writes either the pipeline value or the load data into the register file.

The multiplier (`multiplier`) follows the original latencies:
- 16x16 products take two cycles and are ready in EXE2. The MIPS subset does not use them.
- 32x32 products take three cycles and give a full 64-bit result in EXE3.

MUL writes the low half of the 64-bit result. Inside, the multiplier splits
the operands into four 17x17 partial products and adds them over two register
stages.

## The control pipeline

`core_control_unit` holds seven entities:

| entity | runs on the word in | produces |
|--------|---------------------|----------|
| `ccu_decode1` | DECODE (combinational) | instruction class, format, register usage, destination, ALU opcode, immediate select, illegal flag, *safe stage* |
| `ccu_decode2` | DECODE, registered into EXE1 | ALU opcode, overflow enable, multiplier start/mode; inserts bubbles |
| `ccu_decode3` | EXE1, registered into EXE2 | EXE2 data source, load/store, address-check request |
| `ccu_decode4` | EXE2, registered into EXE3 | memory read/write, EXE3 source (pipeline or 32x32 product) |
| `ccu_decode5` | EXE3, registered into WRITE-BACK | register-file write enable, destination, pipeline or memory data |
| `flow_control` | DECODE | forwarding selects and stalls |
| `master_control` | DECODE, EXE1, EXE2 | exceptions, interrupts, flushes, PC override |

The decode rules are shared functions in `coffee_pkg`. Each DECODE *n* entity
takes the instruction word, registered beside the datapath, and calls the
functions it needs. It then registers its controls for the next stage. So the
controls of a stage are ready at the start of that stage's cycle.

Entities III to V also report a small record (`hz_info_t`) for the instruction
they see. The record says:
- whether the instruction writes a register, and which one
- whether its result already exists in that stage
- the last stage in which it can still raise an exception (its *safe stage*)

Flow control and master control work entirely from these records. They do not
decode anything themselves.

Each of the five decode entities decodes the word it receives again. This
costs a few gates, but each entity depends only on the instruction word and
its stage. That independence is what made the instruction-set change a local
one.

## Forwarding and stalls

Flow control looks at the two source registers of the instruction in DECODE.
For each one, it searches EXE1, EXE2, EXE3 and WRITE-BACK, youngest first, for
an instruction that will write it.

- **Result already exists.** If the match holds a finished result, the DECODE
  multiplexer takes that value. The value can come from:
  - the EXE1 ALU output, the same cycle
  - the EXE2 or EXE3 registers
  - the write-back data
- **Result not ready yet.** A load or MUL result exists only in WRITE-BACK.
  If the match is such an instruction, FETCH and DECODE hold and a bubble
  enters EXE1. An instruction that uses a load or MUL result immediately
  waits 3 cycles.
- **No match.** Without a match, the register-file value is used.

A register written in WRITE-BACK is also forwarded, so the register file
needs no internal write-to-read bypass.

`bus_stall` (a cache miss or a bus wait) freezes every stage and every control
register. A program's results do not depend on when or how often it is raised.
The end-to-end test checks this with random stalls.

## Exceptions and interrupts

Master control knows three exceptions. From highest to lowest priority, which
is oldest instruction first:

| cause (`exc_cause`) | stage | raised by |
|---|---|---|
| `EXC_ADDR` (3) | EXE2 | LW/SW address not word-aligned, or outside `[ADDR_LO, ADDR_HI]` |
| `EXC_OVERFLOW` (2) | EXE1 | ADD, ADDI or SUB signed overflow. ADDU/ADDIU/SUBU never trap. |
| `EXC_ILLEGAL` (1) | DECODE | unknown opcode or function, or an R-type word with a nonzero shift amount |

When an exception is taken:
- The faulting instruction and every younger one are flushed.
- Older instructions complete.
- FETCH restarts at `EXC_VECTOR`.
- `ccb_we` pulses for one cycle, with the cause on `exc_cause` and the faulting instruction's PC on `exc_pc`. These three are the write port of a configuration/status register block, which is outside this design.

An interrupt (`int_req`, level-sensitive) is taken only when both of these hold:
- No exception is pending.
- The instructions in EXE1 and EXE2 are past their safe stage, so none of them can still trap.

When it is taken:
- The instruction in DECODE is flushed.
- `int_ack` pulses.
- `exc_cause` = `EXC_INT` (4) and `exc_pc` = the PC to return to.
- Fetch restarts at `INT_VECTOR`.

There is no return-from-exception instruction in the subset. The handler code
at the vectors is up to the user.

## Parameters

| parameter | default | module | meaning |
|---|---|---|---|
| `RESET_PC` | `0x0000_0000` | top | first fetch address |
| `EXC_VECTOR` | `0x0000_0100` | top, CCU, master control | exception handler address |
| `INT_VECTOR` | `0x0000_0200` | top, CCU, master control | interrupt handler address |
| `R0_ZERO` | 0 | top, CCU, decode I/III/IV/V | 1: writes to register 0 are dropped |
| `NREGS` | 32 | register file | number of registers |
| `ADDR_LO`/`ADDR_HI` | full range | address checker | allowed data addresses |

## Departures from the original core and from MIPS

- **Register 0 is writable by default.** The original core has no hard-wired
  zero register, and this design keeps that, so MIPS code that writes `$0` and
  then reads it sees the value written. With `R0_ZERO=1`, the decoders drop
  writes to register 0. Since reset clears every register, it then reads zero,
  as MIPS requires.
- **No LUI.** LUI is not in the subset. LW/SW can therefore reach only
  addresses that a 16-bit immediate (via ORI/ADDIU) plus a 16-bit offset can
  form.
- **No branches, jumps, shifts, HI/LO or byte/half-word memory access.**
  These are not in the subset.
- **Condition registers and conditional execution are not built.** The
  original core has them, but MIPS code never uses them. The ALU still
  produces Z/N/C flags, which nothing stores.
- **Only one register set.** The original core's second (superuser) register
  set, and its processor status registers, are not built.
- **Not built in the control unit:**
  - the co-processor mapping of DECODE II
  - the hardware control stack and context switching of flow control
  - the status-flag override of master control
- **This design's own choices:**
  - reset PC and vectors
  - cause codes
  - exception priority
  - same-cycle memory timing
  - the forwarding points
  - the internal structure of the multiplier and the address checker

## Files

- `rtl/coffee_pkg.sv`: constants, encodings, control structs and the decode functions.
- `rtl/coffee_mips_core.sv`: the top level.
- All other modules in `rtl/` are named as above.
- Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each ends by printing
  `TB_RESULT checks=<n> failures=<m>`.

`tb/tb_coffee_mips_core.sv` runs the top at its default parameters. It has its
own MIPS encoder functions and a behavioural instruction and data memory. It
runs the following:
- the arithmetic test program: 14 instructions in 14 consecutive write-back cycles
- load/store and multiply programs with dependent instructions: an exact stall count, then again under random bus stalls
- one overflow, one illegal instruction, one misaligned load and one interrupt

It counts each forwarding path, stalls, bus freezes, exceptions and
interrupts, and fails if any of them never happened.

`tb/tb_coffee_mips_core_r0.sv` runs one core with `R0_ZERO=0` and one with
`R0_ZERO=1` side by side, on a program that writes register 0 by ORI and by
LW. In the second core the writes disappear, and the load into register 0
no longer costs a load-use stall.

## Simulating

Verilator 5 with timing support is enough. From the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/coffee_pkg.sv tb/tb_coffee_mips_core.sv --top-module tb_coffee_mips_core
./obj_dir/Vtb_coffee_mips_core
```

Replace `tb_coffee_mips_core` with any other testbench name to run a
different block's test. Each test runs in a few seconds. For lint only:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/coffee_pkg.sv rtl/coffee_mips_core.sv
```

## Extending the instruction set

To add an instruction:
1. Add a value to `instr_t`, and extend the decode functions in `coffee_pkg`:
   - `mips_kind`
   - `kind_writes_rf`
   - `kind_alu_result` (is the result ready after EXE1?)
   - `kind_safe_stage`
2. Add its controls to whichever DECODE entities must act on it.
3. If its result appears later than EXE1, set `ready` in the hazard record accordingly. Flow control then stalls for it on its own.
