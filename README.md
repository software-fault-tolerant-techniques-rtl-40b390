# Checkpoint-and-rollback protection for a LEON3 softcore in an SRAM FPGA

A processor built in the fabric of an SRAM-based FPGA is exposed to radiation in
a way an ASIC processor is not. An upset can flip one of the FPGA's
configuration bits. That bit controls a lookup table or a routing switch, so the
upset changes the processor's *logic* and stays until the device is
reconfigured. The usual answer is triple modular redundancy, which roughly
triples the area. This design takes the opposite trade. It uses cheap
detectors, mostly software, and recovers by **rolling back to a checkpoint**.
The cost is paid in run time instead of area.

The scheme combines four mechanisms:

| Threat | Detector | Where |
|---|---|---|
| upset in the register file or the logic in front of it | complement duplicate-with-compare (CDWC) on every register read | hardware, `cdwc_regfile` |
| upset in stored memory bits | byte parity on main memory, caches and tags | hardware, `ckpt_mem`, `l1_cache` |
| upset that sends the program down a wrong path | control-flow signatures checked at the start of every code block | software on the core, reported on `sw_err` |
| upset in the multiplier/divider, caches, memory paths | consistency checks run by a periodic interrupt routine | software on the core, reported on `sw_err` |

Every detected error is recovered the same way. The design restores main
memory from its checkpoint image, invalidates both caches, and restarts the core
in a restore routine. That routine reloads the registers and state registers
from the restored memory.

This repository holds the hardware side of that scheme as synthesizable
SystemVerilog:

- a register file with CDWC;
- 1 KB direct-mapped write-through instruction and data caches with parity;
- a block-RAM main memory that can save and restore its whole contents in a
  fixed number of cycles;
- the controller that sequences checkpoints and rollbacks.

The LEON3 integer unit itself (SPARC V8 pipeline, multiplier/divider,
interrupt controller) is not included. Its side of every connection is a port
of the top module `ft_leon3_sys`.

## How a fault is caught and undone

The hardest part to follow is how hardware and software divide the work.
There are three sequences.

**Normal run.** The core fetches through the instruction cache. It loads and
stores through the data cache, which writes every store straight through to
main memory. Main memory therefore always holds the complete architectural
memory state, and no cache content ever has to be saved.

**Checkpoint.** Every `CKPT_INTERVAL` cycles the controller raises `irq`. The
interrupt routine on the core then:

1. acknowledges the interrupt with `irq_ack`;
2. runs the consistency checks;
3. stores all registers and the processor state registers to a save area in
   main memory;
4. pulses `sw_ckpt_req`.

The controller then does its part:

1. It raises `core_hold`. The core must issue nothing new.
2. It waits until both caches are idle.
3. It holds `mem_save_req` until the memory reports `done`. During that time the
   memory copies its working image into its checkpoint image.
4. It sets `ckpt_valid`, counts the checkpoint in `n_ckpt`, and drops
   `core_hold`.

The register state is part of the checkpoint because the routine stored it into
memory before the copy.

**Rollback.** Any detected error starts a rollback:

- `rf_err`, a complement mismatch on a register read;
- `mem_perr`, a parity error on a main-memory read;
- `sw_err`, a failed software check.

The controller then:

1. raises `core_hold` and waits for the caches to finish the access in flight;
2. holds `mem_restore_req` until the memory has copied its checkpoint image back
   over the working image;
3. pulses the cache `flush` for one cycle, which clears every valid bit in both
   caches;
4. pulses `core_restart` for one cycle and releases the core.

On `core_restart` the core must enter its restore routine. That routine reads
the save area, now holding the checkpoint's values, and reloads the registers.
It then resumes from the checkpointed program point. `last_err` shows which
detector fired, and `n_rollback` counts rollbacks.

A flush is required, not an optimisation. After the restore, a cache line may
still hold a value stored after the checkpoint. That value would be read as
current. The end-to-end test checks exactly this case.

**Corner cases** the controller resolves:

- An error in the same cycle as a checkpoint request wins, and the request is
  dropped.
- An error reported while a save is running is handled as soon as the save
  ends, without releasing the core. The rollback then goes to the new
  checkpoint.
- Error and checkpoint requests seen during a rollback belong to the abandoned
  execution and are discarded.
- An error before the first checkpoint cannot be recovered. The controller
  raises `fatal` and keeps the core held until reset.

**Errors that need no rollback.** A parity error in a cache line or tag is
corrected locally. The cache treats the lookup as a miss and fetches the word
again from main memory, which is always up to date because the caches are
write-through. These events pulse `ic_perr_fix` or `dc_perr_fix`.

## Checkpointed main memory (`ckpt_mem`, `ckpt_bank`)

Main memory is built from on-chip block RAMs. That normally limits its size,
but it also makes a full-memory checkpoint cheap. Each bank (`ckpt_bank`)
holds two arrays of the same depth:

- the **working** image, which the bus reads and writes;
- the **checkpoint** image.

Each array has one port, which matches one physical block RAM per image. A save
streams `working[i] -> checkpoint[i]` and a restore streams
`checkpoint[i] -> working[i]`. Each bank moves one word per cycle, and **all
banks do it in the same cycle**. A copy therefore takes `BANK_DEPTH + 1` cycles:
`BANK_DEPTH` reads, with the writes one cycle behind. The time does not depend
on `NBANKS`, so more memory costs block RAMs, not checkpoint time. The unit
testbench runs a 4-bank and an 8-bank memory side by side and checks that they
finish in the same cycle.

Seen from the controller, a request lasts `BANK_DEPTH + 2` cycles: one cycle for
the memory to start the copy, then the copy itself.

Other details:

- **Stored word layout.** A stored word is `{parity[3:0], data[31:0]}`, with
  even parity per byte. That is the 36-bit word of an FPGA block RAM.
- **Byte writes.** A byte write updates that byte and its parity bit.
- **Copies move stored words unchanged.** A copy moves raw 36-bit words, parity
  included. A corrupted word in the working image is therefore overwritten by a
  restore.
- **Bus addressing.** On the bus, the upper word-address bits select the bank
  and the lower bits select the row. Address bits above the memory size are
  ignored.
- **Bus timing.** An access is taken when the memory is idle and is acknowledged
  in the next cycle. A read returns `rdata` and `perr` with the acknowledge.
- **Copy start.** A copy starts only between bus accesses. While it runs, `busy`
  is high and requests wait.
- **After reset.** Both images are cleared to zero with good parity, which takes
  `BANK_DEPTH` cycles.

## Register file with complement duplicate-with-compare (`cdwc_regfile`)

The windowed SPARC register file has 8 globals plus 16 registers per window:
136 registers for 8 windows. It is stored twice. A write puts the value in the
primary array and its bitwise complement in the shadow array. A read fetches
both and flags `errN` when `primary != ~shadow`.

Storing the complement matters. A plain duplicate cannot detect a fault that
delivers the same wrong value to both copies, such as an upset on the shared
write-data or write-enable routing. With the complement, that fault shows up as
a mismatch. The unit test covers this case, and the fault copy of the module,
which uses a plain duplicate, fails it.

The check is done in hardware on every read, so it adds no instructions. The
module only detects. It returns the primary copy and leaves recovery to the
rollback.

Timing:

- There are two synchronous read ports and one write port. Address and `reN`
  are sampled at a clock edge, and `rdataN`/`errN` are valid for the following
  cycle.
- `errN` is qualified by `reN`, so idle ports never raise errors.
- A read of the register being written in the same cycle returns the old value.
- After reset, a clearing pass writes every register, taking `NREGS` cycles with
  `init_busy` high. No register is ever compared uninitialised.

## Caches (`l1_cache`, `mem_arb`)

One module serves as both caches. The instruction cache never receives a
write. Its organisation:

- 1 KB, direct mapped;
- one 32-bit word per line, giving 256 lines, an 8-bit index and a 22-bit tag;
- data and tag arrays in block RAM with parity;
- valid bits in flip-flops, so `flush` clears them all in one cycle.

Writes go through to memory and update the line only on a hit. There is no
write-allocate.

Timing:

- A read hit is acknowledged two cycles after the request: one cycle for the
  array read, one for the compare.
- A miss adds the memory access and fills the line.
- A main-memory parity error is passed to the core on `crsp.perr`, and that word
  is not cached.

`mem_arb` shares the single memory port between the two caches. It gives fixed
priority to the data cache and holds a grant until the acknowledge.

## Interfaces

All memory-side traffic uses the two structs in `ft_pkg`:

```
mem_req_t: req, we, addr[29:0] (word address), be[3:0], wdata[31:0]
mem_rsp_t: ack, rdata[31:0], perr
```

The master raises `req` and holds the request unchanged until the cycle `ack`
is high. `l1_cache` asserts this rule on its processor side. The top's core-side
ports are:

- `i_req`/`i_rsp` and `d_req`/`d_rsp`: the instruction and data accesses;
- the register-file ports `rf_*`;
- `irq`, `irq_ack`, `sw_ckpt_req`, `sw_err`, `core_hold` and `core_restart`.

Status and event outputs (`n_ckpt`, `n_rollback`, `last_err`, hit/miss pulses,
etc.) are there for monitoring. `init_busy` is high after reset until the
register file and memory have been cleared.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `NWIN` | 8 | register windows (136 registers) |
| `CACHE_BYTES` | 1024 | size of each cache |
| `NBANKS` | 4 | main-memory block RAMs per image |
| `BANK_DEPTH` | 512 | words per bank: 4 x 512 words = 8 KB |
| `CKPT_INTERVAL` | 10000 | cycles between check/checkpoint interrupts |

Only the 1 KB direct-mapped write-through caches and the 32-bit word are fixed
by the scheme as published. The window count, memory size, interval, line size,
parity layout, bus and all handshakes are choices of this implementation.

## How far to trust it, and where it departs

- **No processor core.** This is not a processor. The integer unit,
  multiplier/divider and interrupt controller are outside, and the software
  routines (signatures, consistency checks, register save and restore) are the
  core's job. The testbench plays that role.
- **Core contract.** The hold and restart contract with the core (`core_hold`,
  `core_restart`) is this design's own. A real LEON3 would need a small wrapper
  that stalls the pipeline and redirects the PC to the restore routine.
- **Simplified bus.** The LEON3's own bus is replaced by the simple
  request/acknowledge bus above, and the caches use one-word lines.
- **One checkpoint image.** Only one is kept. An error that stays undetected
  across a checkpoint is saved into it and cannot be undone. This is the
  "detected but not recoverable" outcome the scheme accepts.
- **Not FPGA-tested.** All results come from simulation. The design has not
  been run on an FPGA or under configuration-bit fault injection. The
  testbenches inject upsets by flipping stored bits, not configuration bits.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
ends with `$finish`. With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module ft_leon3_sys_tb \
  -y rtl -y tb +libext+.sv rtl/ft_pkg.sv tb/ft_leon3_sys_tb.sv
./obj_dir/Vft_leon3_sys_tb
```

Replace the module name for the unit tests:

| Testbench | What it checks |
|---|---|
| `ft_leon3_sys_tb` | whole subsystem at default parameters, described below |
| `cdwc_regfile_tb` | clearing pass, dual-port reads against a model, upsets in either copy, same-value fault on both copies |
| `l1_cache_tb` | hit latency, write-through, no allocate, conflicts, flush, data/tag parity refetch, memory parity passthrough, random traffic |
| `ckpt_mem_tb` | byte writes, save/restore contents and cycle counts at 4 and 8 banks, parity detection, requests waiting during a copy |
| `ckpt_ctrl_tb` | interrupt period, fatal path, save waiting for idle caches, rollback order for each error source, precedence rules |

`ft_leon3_sys_tb` runs the whole subsystem at its default parameters. A model
of the core boots, runs a program on both caches at once, and takes checkpoints
from the interval interrupt. It then injects three upsets in turn:

- a register-file bit;
- a main-memory bit;
- a software-reported control-flow error.

After each rollback it checks that every memory word and every register equals
the checkpoint, reading the data region first so that any stale cache line
would show. It also checks cache parity corrections and the fatal path, and
counts that every mechanism happened at least once. It runs in well under a
second.

## Files

- `rtl/ft_pkg.sv`: bus structs, error-source struct, parity helpers
- `rtl/ft_leon3_sys.sv`: top
- `rtl/cdwc_regfile.sv`, `rtl/l1_cache.sv`, `rtl/mem_arb.sv`, `rtl/ckpt_mem.sv`,
  `rtl/ckpt_bank.sv`, `rtl/ckpt_ctrl.sv`: the blocks described above
- `tb/*_tb.sv`: the testbenches
