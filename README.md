# T0: a vector microprocessor in SystemVerilog

T0 is a single-chip vector microprocessor for fixed-point multimedia and
neural-network work. A MIPS-II scalar CPU provides control flow and addresses.
A vector coprocessor does the bulk of the arithmetic:

- 16 vector registers of 32 × 32-bit elements;
- two 8-lane arithmetic units, VP0 and VP1, of which only VP0 has multipliers;
- one vector memory unit.

Everything outside the chip goes through one 128-bit memory port to single-cycle
pipelined SRAM. A byte-wide JTAG-like port, the SIP (system interface port), lets
a host load memory, single-step the CPU and raise interrupts. At 45 MHz the two
arithmetic units sustain 720 M operations/s while the memory unit moves 720 MB/s.

This repository holds RTL for everything on the chip **except the scalar CPU
pipeline**. The CPU's side of every interface is brought out of the top level as
`cpu_*` ports. A CPU model, or a testbench as here, drives those ports the way
T0's instructions would.

## The one memory pipeline

The most important thing to understand about T0 is that it has a single memory
port and a single memory pipeline (`t0_memif`), shared by four users. Each cycle
starts at most one access, chosen in fixed priority:

1. a SIP host access (MEMREAD, MEMWRITE, ICWRITE);
2. an instruction-cache refill;
3. a scalar load or store, or a vector memory transfer (the "exec" port);
4. an instruction prefetch, only if nobody else wants the port.

Every access takes two cycles on the pins:

- **Cycle t (address phase):** `a[31:4]` carries the 16-byte block address.
  The access type is on `nkrwb` (the access may be a write), `id` (instruction
  fetch) and `ku` (user mode).
- **Cycle t+1 (data phase):** `rw`, the active-low byte enables `bwenb[15:0]`
  and the write data are driven. Each half of `bwenb` is further gated by the
  external pulse `weninb[1:0]`. A store killed by an exception (`cpu_mkill`)
  leaves the bus undriven and `rw` high.

Read data is registered at the end of the data phase and handed to the
requester, with its valid flag, in cycle t+2.

Losing the port has consequences across the chip:

- **Vector memory unit loses:** the whole vector unit stops (`vu_stall`),
  arithmetic units included, so that chained instructions stay in step.
- **Scalar access loses:** only that access waits.

Because prefetch fills any idle port cycle, the instruction cache usually
already has the missing line on its way when a miss is detected.

## Instruction cache and fetch

`t0_icache` is 1 KB, direct mapped: 64 lines of four instructions, with an
18-bit tag from address bits 27:10. Lookup is combinational, so a hit costs
nothing. A miss costs:

- **2 cycles** if the prefetch of that line was granted in the fetch cycle: the
  line comes back two cycles later.
- **3 cycles** if the prefetch lost the port: the miss engine spends one cycle
  issuing a refill request, which outranks scalar and vector traffic.

A SIP access that holds the port adds its own cycles. The refilled line is
written into the array and passed to decode in the same cycle.

Two test bits from the SIP change the cache:

- `icinv` clears all valid bits every cycle, so every fetch goes to memory.
- `icfrz` makes every lookup hit whatever the tag, turning the cache into a
  1 KB instruction RAM. It overrides `icinv`.

The SIP ICWRITE instruction writes a whole line directly.

## Vector unit

### Register file

`t0_vregfile` stores each register as four rows of eight elements. Every
functional unit has its own ports, each moving one row per cycle:

- VP0 and VP1 each have three read ports (a, b, and the old destination for
  conditional moves) and one write port.
- The memory unit has two read and two write ports, because a memory block can
  straddle two rows.

`vr0` reads as zero and ignores writes.

### Arithmetic units, VP0 and VP1

`t0_vau` handles eight lanes, one row per cycle, so an instruction on a
vector of length `vlr` keeps its unit busy for ceil(vlr/8) cycles. The pipeline
has four stages:

| stage | work |
|-------|------|
| R  | read the operand row. The first row is read in the issue cycle itself. |
| X1 | adder, logic unit, shifters, 16×16 multiplier (VP0 only) |
| X2 | clipping / conditional-move select; the row is written at the end of X2 |
| W  | the row's condition, overflow and saturation flags reach the control registers |

The operations are:

- add and subtract (signed ones set `vovf`);
- saturating fixed-point add, subtract and multiply (`fx*`, which set `vsat`);
- AND, OR, XOR and NOR;
- shifts;
- compares, which write `vcond` and not a register;
- conditional moves.

Either operand can be a scalar broadcast from the CPU. FXMUL multiplies the low
16 bits of each element as signed numbers, rounds half up while shifting right by
`shamt`, and clips to the signed 16-bit range.

### Dispatch and chaining

`t0_vdispatch` decides where a vector arithmetic instruction goes:

- A multiply must go to VP0.
- Anything else goes to VP1 if both units are free, otherwise to the free one.
- A length above 32 raises the vector-unit exception (`vue`) instead of issuing.
- Length 0 issues and does nothing.

There is no bypass network. Chaining works through the multi-ported register
file: a producer writes row *k* at the end of its third cycle. So an instruction
that reads the producer's result may issue two cycles after the producer and
then follows it row by row. The dispatcher holds a reader that comes sooner
(`cpu_va_interlock`).

The memory pipeline is one stage shorter than the arithmetic pipeline. So a
vector load (or `vext.v`) whose destination is that of the arithmetic
instruction issued in the cycle before is held one cycle (`cpu_vm_interlock`).
Without the hold, the load could write first and then be overwritten.

### Vector memory unit

`t0_vmp` moves vectors between registers and memory. Element *e* lives at
`base + e*stride`; contiguous transfers use the element size as the stride.

| transfer | memory cycles |
|----------|---------------|
| contiguous bytes | one per aligned 8-byte block touched (up to 8 elements/cycle) |
| contiguous halfwords | one per aligned 16-byte block (up to 8 elements/cycle) |
| contiguous words | one per aligned 16-byte block (up to 4 elements/cycle) |
| strided | one per element (`vlr` cycles) |
| indexed load | 3 start-up cycles, then one per element (3 + `vlr`) |
| indexed store | 2 start-up cycles, then one per element plus one per group of 8 indices (2 + ceil(`vlr`/8) + `vlr`) |

For an indexed transfer, element *e* lives at `base + vindex[e]`. The index
register `ireg` holds byte offsets. The start-up cycles model the time the
first index takes to reach the address generator, and they make no memory
request. Indexed stores have only one register-file read port for both the
indices and the data, so every eighth element they stop for a cycle to read
the next row of indices. Indexed loads read the index row through the unit's
second read port.

Loads return two cycles after each grant and are sign- or zero-extended.

Two conditions are address errors:

- an element address that is not naturally aligned;
- a user-mode access to the kernel segment (address bit 31 set).

An address error stops the transfer at the faulting element, so nothing is
written there. It reports the instruction's PC and the faulting address, which
CP0 keeps in `vuepc` / `vubadvaddr`. It also sets the sticky interrupt flag
`cause.ip5`.

### Extract and insert

Three instructions move elements by a run-time index `rd` held in a scalar
register:

- `vext.v` copies `vt[rd+i]` to `vd[i]` for each `i < vlr`.
- `vins.s` writes a scalar into `vd[rd]`.
- `vext.s` returns `vt[rd]` to the CPU two cycles after its memory-pipeline
  cycle (`cpu_vm_xs_valid`).

The memory unit handles them with its crossbar instead of memory. They still
occupy the memory pipeline: they wait for SIP accesses and cache refills, and
they hold off scalar accesses and prefetch.

`vext.v` moves eight elements per cycle when `rd` is a multiple of 8, and four
otherwise. It needs one more alignment cycle when `rd` is not a multiple of 4
and the elements cross a 4-element boundary. The scalar forms take one cycle
and ignore `vlr`.

An index past the register end raises `cpu_vm_xvue`, and nothing is done. That
means `rd >= 32`, or `rd + vlr > 32` for `vext.v`.

The index is not known when the instruction issues. So extract and insert are
held (`cpu_vm_interlock`) until all vector arithmetic has finished with the
register file.

### Control registers

`t0_vu_cregs` holds `vrev`, `vcount` (the cycle counter), `vlr`, and the
32-bit sticky flag registers `vcond`, `vovf` and `vsat`, one bit per element.
The CPU accesses them with ctc2/cfc2; unknown register numbers are flagged
illegal.

## System coprocessor (CP0) and exceptions

`t0_cp0` holds these registers:

- `fromhost` / `tohost`, the SIP mailbox;
- `vuepc` and `vubadvaddr`;
- `badvaddr`;
- `count` / `compare`;
- `status`, `cause`, `epc`;
- `prid`.

It decides, for the instruction entering the M stage, whether to take an
exception:

- **Interrupts** are level sensitive and outrank every synchronous exception.
  Their order is: host (ip6, from SIP INTWRITE), vector address error (ip5),
  timer (ip7, set when `count == compare` and cleared by writing `compare`),
  external 0 (ip4) and external 1 (ip3).
- **External interrupts** have their own vectors, 0x1200 and 0x1300.
- **Everything else** goes to 0x1100, with `cause.exccode` set. Reset starts
  at 0x1000.
- **Synchronous exceptions** are ranked AdEF, CpU, RI, Sys, Bp, Ov, VUE, AdEL,
  AdES.

Taking an exception pushes the two-bit KU/IE stack in `status` and loads `epc`.
In a branch delay slot, `epc` points at the branch and `cause.bd` is set. `rfe`
pops the stack.

## System interface port (SIP)

The SIP is a JTAG TAP that shifts a byte per cycle on `tdi[7:0]` / `tdo[7:0]`,
clocked by the chip clock. There is no separate test clock. Holding `tms`
high for six cycles resets it to the BYPASS instruction. `t0_sip_tap` is the
16-state controller. `t0_sip` holds two data registers:

- **`regio`**, 8 bits, used by BYPASS, TESTIO, INTWRITE, SIPIO and RUNCPU;
- **`memio`**, 20 bytes, used by the memory instructions. The first 16 bytes
  are data, lowest address nearest `tdo`. The last 4 are the address, most
  significant byte first.

| instruction | IR | effect at Update-DR |
|-------------|----|---------------------|
| MEMREAD  | 0000 | read the 16-byte block at the shifted-in address; the result (and the CPU's PC in the address bytes) is shifted out by the next scan |
| MEMWRITE | 0001 | write the 16 data bytes to memory |
| ICWRITE  | 0011 | write the 16 bytes into the cache line for that address |
| TESTIO   | 1000 | write `testcntl` (suspend, icfrz, icinv); Capture reads `testresult` |
| INTWRITE | 1001 | write the host interrupt bit |
| SIPIO    | 1010 | write CP0 `fromhost`; Capture reads `tohost` |
| RUNCPU   | 1011 | while suspended, allow one CPU issue per Run-Test-Idle cycle |
| BYPASS   | 1111 | nothing |

The memory request leaves the SIP one cycle after Update-DR. This gives the
pipelined read loop Select, Capture, 16×Shift, Exit1, Update, Run-Test-Idle:
21 cycles per 16 bytes, 34 MB/s at 45 MHz. The write loop shifts 20 bytes in
24 cycles, 30 MB/s. The system reset `rstb` does not reach the SIP, so a host
can load memory while the CPU is held in reset.

## Other blocks

- **`t0_muldiv`** is the scalar multiplier and divider. A 32×32→64 multiply
  takes 18 cycles (radix 4); a 32/32 divide takes 33 cycles (restoring),
  leaving the quotient in `lo` and the remainder in `hi`. `busy` tells the CPU
  when `hi` and `lo` are not ready.
- **`t0_hpm`** drives eight performance-monitor pins, registered one cycle:
  exception, scalar memory stall, interlock, I-cache miss, VP0 / VP1 / VMP
  useful work, and vector memory stall.
- **`t0_clkgen`** divides `clk2xin` by two into the internal clock `phi`;
  `clkout` is `phi` inverted.
- **`t0_pkg`** holds the shared constants and types: vectors, exception codes,
  register numbers, SIP codes, the memory request struct and the vector
  operation encoding.

## Where this RTL departs from T0, or chooses for itself

Not built:

- **The scalar CPU pipeline and instruction decode** (fetch/decode/execute of
  MIPS-II and the vector instruction set). Its interfaces are the `cpu_*`
  ports of `t0_top`.
- **The scalar bus hazard.** Indexed transfers occupy the bus that also
  carries coprocessor register values, and avoiding that conflict is the CPU
  side's job.
- **"Arithmetic pipeline" instructions** that chain several operations inside
  one vector instruction. The vector operation set and its encoding
  (`vau_op_e`) are this design's.
- **Pads and the external SRAM.** The bidirectional data bus appears as
  `d_in`, `d_out` and `d_oe`.

Behaviour that is simplified or left to the CPU side:

- A vector arithmetic instruction that uses a register a vector memory
  instruction is still using is held until that instruction has finished
  (`cpu_va_interlock`). This covers the memory instruction's data register and
  its index register. T0 instead lets arithmetic chain behind fast contiguous
  loads and extracts, so the design is slower there but never wrong.
  Chaining between arithmetic instructions follows T0.
- Vector loads never take the extra cycle T0 can need for some alignments.
- The `icinv` cache flush acts from the next cycle, not exactly four cycles
  after the instruction.

Own choices:

- FXMUL rounding and clipping; FXADD / FXSUB clipping to 32 bits.
- Divide-by-zero result: an all-ones quotient and the dividend as remainder.
- Kernel segment = address bit 31.
- `prid` and `vrev` read as zero.
- Indices of indexed transfers are byte offsets from the base.
- The element-level definitions of `vext.v`, `vins.s` and `vext.s`, and their
  range rule.
- The `vext.v` alignment cycle follows the rule that it is needed only when
  the vector crosses a 4-element boundary, not the simpler table figure.
- An extract or insert that follows a load waits until the load's data is
  written, because the two share a register-file write port.
- Extracts wait for all arithmetic, as inserts do in T0, rather than only for
  writes to their source register.
- Reset clears the cache valid bits and `vlr`. It leaves the vector flags
  alone, like most other state.
- SIP accesses appear on the pins as kernel data accesses.
- RUNCPU grants one issue per Run-Test-Idle cycle.
- The SIP's `testcntl` and interrupt registers clear in Test-Logic-Reset.

## Using and simulating it

All files are plain SystemVerilog-2017.

- `rtl/` holds one module or package per file; `t0_pkg.sv` must be compiled
  first. The top level is `t0_top`.
- `tb/` holds one self-checking testbench per block, plus `tb_t0_top`. That one
  runs the whole chip at its full size: a host on the SIP, an SRAM model on the
  memory pins and a scripted CPU on the `cpu_*` ports. It checks each
  mechanism above (both miss penalties, SIP DMA, stalls, chaining, both
  arithmetic units, contiguous, strided and indexed transfers, extract and
  insert with their interlock, `vue`, every
  interrupt source, single-stepping) and fails
  if any never happens.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. For
example:

```
verilator --binary --timing -Wno-fatal --top-module tb_t0_top \
    rtl/t0_pkg.sv rtl/*.sv tb/tb_t0_top.sv
./obj_dir/Vtb_t0_top
```

Parameters:

| module | parameter | default |
|--------|-----------|---------|
| `t0_icache` | `LINES` | 64 |
| `t0_vregfile` | `NREGS` | 16 |
| `t0_vregfile` | `NRD` | 8 |
| `t0_vregfile` | `NWR` | 4 |
| `t0_vau` | `HAS_MUL` | 1 (0 for VP1) |
| `t0_cp0` | `PRID_REV` | 0 |
| `t0_vu_cregs` | `VREV_REV` | 0 |

The vector length (32) and lane count (8) are package constants.
