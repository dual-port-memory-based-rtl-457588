# A parallel DSP array whose processing units talk through dual-port RAM

An FPGA can hold many arithmetic units working in parallel. The hard part is
moving data between them. A shared data bus needs an arbiter and becomes the
bottleneck. Wiring every unit to a big register file costs too much routing.
This design solves it with the FPGA's plentiful dual-port block RAMs.
Any two units that need to exchange data share one dual-port RAM. Each unit
uses its own port, so both can read and write at full speed and nothing
needs arbitration. A handful of one-bit *synchronization lines* run next to
each shared RAM. Programs use them to say "buffer ready" or "buffer free",
which also keeps the two units from writing the same word at the same time.

The result is a ring of small programmable processing units (PUs). The number
of units is set by a parameter. Every unit also has a shortcut ("bypass") link
across the ring. The host loads programs and data through one
memory-mapped bus.

```
            +--------------------- bypass links (DPS) ----------------------+
            |                                                               |
   ...-DPS-[PU0]-DPS-[PU1]-DPS-[PU2]-DPS-[PU3]-DPS-[PU4]-DPS-[PU5]-DPS-... (ring closes)
             |        |        |        |        |        |
            DPR      DPR      DPR      DPR      DPR      DPR
             |        |        |        |        |        |
   ==========+========+========+========+========+========+====  programming interface (host bus)
```

* **DPS** is a link between two units: one dual-port RAM plus sync lines in
  both directions (`rtl/dps.sv`).
* **DPR** is a unit's link to the host: a code RAM, a data RAM and a path to
  the unit's control registers (`rtl/dpr.sv`).

## Topology: ring plus bypass links

Units are numbered 0 to N-1, where N is even and at least 6 (parameter
`N_UNITS`, default 6). Ring link *k* joins unit *k* (its port 2, "right") to
unit *(k+1) mod N* (its port 1, "left"). Link N-1 closes the ring back to
unit 0.

A signal that has to cross the ring one link at a time takes a long time.
So each unit has a fourth memory interface (port 3), joined to a partner
three positions away:

| unit *k* | partner *j* |
|----------|-------------|
| even     | (k + 3) mod N |
| odd      | (k − 3) mod N |

For N = 6 the pairs are 0–3, 2–5 and 4–1. For N = 12 they are 0–3, 2–5,
4–7, 6–9, 8–11 and 10–1. Each pair shares one bypass link: even unit *2b*
is side A of link *b*, and its partner is side B. N units therefore use
N ring links, N/2 bypass links and N DPRs. `dsp_array` builds all of this
with generate loops; `dsp_pkg::bypass_partner` holds the rule.

## The processing unit

The PU (`rtl/pu.sv`) is the part that needs the most explanation. It has no
register file. Each instruction names its two sources and its destination
directly as *(memory interface, offset)* pairs. It works straight out of the
four data memories it can reach:

| port | memory |
|------|--------|
| 0 `P_DPR`    | data area of its own DPR (shared with the host) |
| 1 `P_LEFT`   | ring link to unit k−1 |
| 2 `P_RIGHT`  | ring link to unit k+1 |
| 3 `P_BYPASS` | bypass link to its partner |

Instructions come from the DPR's code RAM through a separate fetch port.

### Instruction format

32-bit instructions and 32-bit two's-complement fixed-point data.

```
 31    27 26 25 24      18 17 16 15       9 8  7 6        0
+--------+-----+----------+-----+----------+-----+----------+
| opcode |dport|  doff    |aport|  aoff    |bport|  boff    |   three-operand form
+--------+-----+----------+-----+----------+-----+----------+
| opcode |dport|  doff    |        imm18 (bits 17:0)        |   immediate form
+--------+-----+----------+---------------------------------+
```

The memory address of an operand is `base[port] + offset`. Each port has a
9-bit base register, set with `SETB` and stepped with `ADDB`. A loop walks a
vector this way, even though the offset field is only 7 bits wide.

| group | opcodes | effect |
|-------|---------|--------|
| arithmetic | `ADD SUB MUL MULH` | d = a op b; `MUL` keeps the low word, `MULH` the high word of the signed 64-bit product (Q1.31 × Q1.31 → Q1.31 / 2) |
| logic, shifts | `AND OR XOR SHL SHR SRA` | shift count = b[4:0] |
| moves | `MOV`, `LDI` | d = a; d = sign-extended imm18 |
| compare | `CMP` | Z = (a == b), N = (a < b, signed) |
| control flow | `JMP BZ BNZ BLT BGE` | pc = imm when the condition holds |
| procedures | `CALL RET` | 16-level return stack (`pu_stack`) |
| loops | `LDLC`, `DJNZ` | loop counter = imm; decrement and jump while not zero |
| base registers | `SETB`, `ADDB` | base[dport] = imm / += imm |
| sync lines | `SSET SCLR STST` | set or clear output line *imm* of link *dport*; test the partner's line (Z = line is low) |
| | `NOP`, `HALT` | |

`dsp_pkg::enc3` and `dsp_pkg::enci` encode instructions. The testbenches
write their programs with them.

### Pipeline and port stalls

There are three stages:

1. **F** – the program counter addresses the code RAM.
2. **D** – the instruction arrives and is decoded. Base registers are
   applied and the two source reads are issued. `SETB` and `ADDB` take
   effect here.
3. **X** – the read data arrive, the ALU computes, and the result is written
   to the destination memory. Flags, jumps, calls, the loop counter and sync
   lines are updated here too.

In steady state the unit does all of this in one cycle: it fetches
instruction *i+2*, reads the two sources of instruction *i+1*, and writes
the result of instruction *i*. This holds when the two sources and the
destination sit in different memories. A straight-line program of *n*
instructions, ending in `HALT`, then runs in *n* + 2 cycles. `tb_pu`
checks this count.

Each memory port does one access per cycle. D waits one cycle (a "port
stall") in two cases:

* **Write-port conflict.** A source is in the memory that X writes in the
  same cycle.
* **Shared source memory.** Both sources are in the same memory. The first
  is read in one cycle and the second in the next; the first word is kept
  in a hold register.

The write-port stall also orders a write and a later read of the same
memory correctly. So no forwarding path exists, and a value is readable by
the very next instruction. Jumps, taken branches, `CALL`, `RET` and taken
`DJNZ` are resolved in X. The two younger instructions are dropped, a
penalty of two cycles.

Memory written by the *other* unit of a link is not ordered by hardware.
Programs must use the sync lines. The usual pattern: the producer writes
its buffer, then `SSET`s a line. The consumer loops on `STST` / `BZ` until
the line is high, then reads. The DPS registers the lines once, so a set
line is visible to the partner one cycle later. Two units must never write
the same word of a shared RAM in the same cycle. `dpram` has an assertion
for that case.

### Control, status and errors

A unit runs while its `running` flag is set. Start and stop come from its
control register or from the global start/stop registers. When it stops,
the instructions already in D and X finish. The PC then points at the next
instruction, so a restart carries on from there.

`HALT` stops the unit and sets `halted`. These conditions stop it with the
sticky `error` flag and a cause code:

* an illegal opcode
* a `CALL` on a full stack
* a `RET` on an empty stack
* a sync instruction aimed at port 0

The PC is left at the faulting instruction. A start is refused while
`error` is set.

## Programming interface

There is one synchronous host bus (`prog_if`). A request takes one cycle.
Read data come back on `host_rdata` with `host_rvalid` one cycle later.

```
host_addr = { global(1) | unit(clog2 N) | region(2) | offset(9) }     15 bits for N = 6
```

| region | unit window |
|--------|-------------|
| 0 | code RAM (program) |
| 1 | data RAM (the unit's port 0: input data, coefficients, results) |
| 2 | unit registers |

| unit register | read | write |
|---------------|------|-------|
| 0 `REG_CTRL`   | bit0 running, bit1 error, bit2 halted | bit0 start, bit1 stop, bit2 clear error |
| 1 `REG_PC`     | program counter | new PC (only while stopped) |
| 2 `REG_RETIRE` | instructions completed since reset | – |
| 3 `REG_ERRC`   | error cause (1 illegal, 2 overflow, 3 underflow, 4 sync on port 0) | – |

With `global` = 1, the offset selects a global register (`global_regs`):

| global register | |
|-----------------|--|
| 0 `GREG_CTRL`    | write bit0: start all units in the same cycle; bit1: stop all |
| 1 `GREG_ERROR`   | error flag of each unit (bit k = unit k); also the `any_error` output |
| 2 `GREG_RUNNING` | running flag of each unit |
| 3 `GREG_NUNITS`  | N |

## Files

| file | block |
|------|-------|
| `rtl/dsp_pkg.sv` | shared types, opcodes, register map, bypass rule, instruction encoders |
| `rtl/dsp_array.sv` | top level: units, ring and bypass links, DPRs, host bus, global registers |
| `rtl/pu.sv` | processing unit |
| `rtl/pu_alu.sv` | ALU |
| `rtl/pu_stack.sv` | 16-level return stack |
| `rtl/dpram.sv` | true dual-port RAM (two clocks, synchronous read-first ports) |
| `rtl/dps.sv` | unit-to-unit link: RAM + sync lines |
| `rtl/dpr.sv` | unit-to-host link: code RAM, data RAM, register path |
| `rtl/prog_if.sv` | host bus decoder and read multiplexer |
| `rtl/global_regs.sv` | global error / start / stop registers |

Parameters of `dsp_array`, with their defaults:

* `N_UNITS = 6`
* `CODE_DEPTH = 512`
* `MEM_DEPTH = 512`: the DPR data area and every link
* `SYNC_BITS = 4`
* `STACK_DEPTH = 16`

A 512 × 32 RAM is one Virtex-4 RAMB16. At the defaults the array holds
21 such RAMs, six 32 × 32 multipliers and about 2,200 flip-flops. The
whole design runs on one clock. Reset `rst` is synchronous and active high.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dsp_pkg.sv tb/tb_ring_prog_pkg.sv tb/tb_dsp_array.sv \
    --top-module tb_dsp_array -o sim
./obj_dir/sim
```

For any other testbench, swap in `tb/tb_<name>.sv` and
`--top-module tb_<name>`. `tb/tb_ring_prog_pkg.sv` is needed only by the
two array tests.

* `tb_dsp_array` runs the array at its default size, with everything going
  through the host bus. It runs three phases:
  1. A ring pipeline. Every unit applies y = y·C(k) + B(k) to a 48-word
     vector and passes it to the next unit. The vector comes back to unit 0
     over the link that closes the ring. Every unit swaps a checksum with
     its bypass partner.
  2. Error reporting.
  3. Global stop.

  The test counts how often each mechanism happened and fails if one never
  did: both kinds of port stall, sync waits, calls, traffic on the
  ring-closing link and the bypass links, global start/stop and error
  detection. It takes about 5,000 cycles, well under a second.
* `tb_dsp_array_n12` runs the same pipeline on 12 units.
* `tb_pu` checks one unit on its own:
  * every opcode
  * one-instruction-per-cycle timing
  * stall counts
  * loops, calls, branches and sync waits
  * each error cause
  * stop and restart
* The others test one block each against a model in the testbench.

## What is specified and what is this design's own

These parts follow the architecture as published:

* DPRAM links between neighbours, with sync lines in both directions.
* One DPR per unit, split into a code area and a data area, with register
  access.
* The ring, and the bypass rule with N even and N ≥ 6.
* Four memory interfaces per unit, used to fetch, read two arguments and
  write one result per cycle.
* 32-bit instructions and fixed-point data.
* The kinds of operations: add, subtract, multiply, shift, logic, loops,
  comparisons, jumps, conditional branches.
* A 16-level stack for procedures.
* Set, clear and test of sync bits.
* Per-unit control and status registers.
* Global registers that show errors and start or stop all units at once.
* 6 units as the main configuration (12 also works).

These choices are this design's own, because the architecture leaves them
open:

* The instruction encoding, including base registers, the loop counter,
  `MULH` and the error causes.
* The pipeline and the port-stall rules.
* All memory sizes, and the number of sync lines.
* One clock for everything.
* The host bus protocol, address map and register layout.
* The one-cycle register stage on the sync lines.

Differences worth knowing:

* **The DPR is built as two RAMs.** The architecture describes one memory
  split into a code area and a data area, counted as one of the unit's
  memory interfaces. Here it is two RAMs behind one host window, so a unit
  can fetch and touch its data area in the same cycle. The unit therefore
  has a fetch port plus four data ports. Port 0 (the DPR data area) can be
  an operand like the three link RAMs.
* **Any operand can use any port.** The architecture pictures the two
  sources and the destination in three different shared RAMs. This design
  accepts any combination and stalls when a port is needed twice.
* **The original memory sizes are unknown.** The published synthesis
  results report every block RAM of the target chip as used, so those sizes
  cannot be reconstructed. The 512-word defaults are a choice, and all
  sizes are parameters.
* **Write collisions are not resolved in hardware.** Avoiding two writes to
  one address from both sides of a link is left to the programs, as the
  architecture intends. Simulation flags it with an assertion.
* **No I/O is included.** High-speed serial I/O units, and units with extra
  functions such as division or square root, are mentioned as future
  extensions and are not part of this RTL. The host bus is the only I/O.
* **Timing is not verified.** The original proof-of-concept ran at about
  66 MHz on Virtex-4. This RTL has not been timed on an FPGA; the X stage
  (multiply, then write) is the likely critical path.
