# OLLAF: a dual-plane reconfigurable fabric built for an operating system

A fine-grained reconfigurable fabric (an FPGA-like array of LUTs and
flip-flops) is hard to share between tasks. Loading a task's bitstream takes
thousands of clocks. Preempting a task means moving the state of every
flip-flop out and back in. If the fabric spends more time reconfiguring than
computing, a real-time kernel cannot schedule it usefully.

OLLAF attacks this in hardware, with three ideas:

1. **Columns.** The fabric is cut into identical columns that are reconfigured
   one at a time. A task uses a whole number of columns. Because every column
   is the same, a task can move to any free column with the same bitstream, so
   placement is a one-dimensional problem.
2. **Two planes.** Every configuration bit and every flip-flop of the logic
   exists twice. One copy, the *run plane*, drives the running task. The other
   copy, the *scan plane*, is a hidden shift register. The next task's
   configuration and state are shifted into the scan plane while the current
   task keeps running. Swapping the planes then takes a single clock. Once it
   is swapped out, the old task's state is shifted out in the background.
3. **A memory hierarchy for bitstreams and contexts.** Each column has a small
   local memory (LCM) next to it. The supervisor processor owns a large central
   repository (CCR). Both are managed like caches. Contexts carry version tags,
   so the operating system can tell a stale copy from the latest one.

This repository holds synthesizable SystemVerilog for all of that machinery:
dual-plane flip-flops, scanpaths, local memories, the per-column managers, the
control bus and the central repository with its transfer engine. It does not
contain the logic elements themselves (LUTs, routing); see *What is not here*.

## Sizes and transfer levels

The default parameters are those of a reference platform:

| quantity | value |
|---|---|
| columns (`N_COLS`) | 4 |
| logic elements per column (`N_LE`) | 1024 |
| context per column | 1024 bits (one flip-flop per LE) |
| bitstream per column | 87 Kbit = 1024 LE x 87 bits (`CFG_PER_LE`) |
| control bus | 32 bits |
| local memory per column (`SLOTS`) | 3 bitstreams + 3 contexts = 264 Kbit |
| central repository | 16 bitstreams + 128 contexts (`CFG_ENTRIES`, `CTX_ENTRIES`) |

Data moves between four levels. Each transfer has a fixed cost in clocks:

| name | from -> to | what moves | clocks (this RTL) |
|---|---|---|---|
| L0  | CCR -> LCM | bitstream + context, 32 bits/clock | 2816 bus words, + 1 tag write, + 1 clock of read latency |
| L0' | LCM -> CCR | context | 32 bus words, + 1 write that marks the slot clean |
| L1  | LCM -> scan planes | bitstream and context in parallel, one LE per clock | 1024 shift clocks after the command clock |
| L1' | scan plane -> LCM | context | 1024 shift clocks (can share the pass with an L1) |
| L2  | scan plane <-> run plane | everything, both directions | 1 clock |

In the best case a preemption costs one clock: the next task's bitstream and
context are already in the LCM, and L1 has been done ahead of time.

## The dual-plane flip-flop (`dual_plane_ff`)

Each bit has two flip-flops, FF1 and FF2, with a multiplexer in front of each
and one multiplexer on each output. The plane select `csrs` gives the roles:

| `csrs` | run plane (`d` -> `q`) | scan plane (`csin` -> `csout`) |
|---|---|---|
| 0 | FF1 | FF2 |
| 1 | FF2 | FF1 |

The run plane loads `d` when `run_en` is high. The scan plane loads `csin`
when `scan_en` is high. Everything runs on one clock; the two planes' separate
clocks are modelled as clock enables. A module instance covers `WIDTH` bits
that share one `csrs`.

## Scanpaths and bit order (`dual_plane_scanpath`)

A scanpath is `N_LE` dual-plane stages whose scan planes form a shift
register. Stage 0 takes `scan_in`, and `scan_out` is the last stage. Two
instances exist per column:

- the **context plane**, 1 bit wide: the run plane *is* the LE flip-flop;
- the **configuration plane**, 87 bits wide (87 parallel chains). Its run
  plane never loads (`run_en` = 0), because a configuration does not change
  while it runs.

Both share the column's plane select, so configuration and state swap in the
same clock.

Bit order matters to anyone preparing bitstreams or reading contexts. At shift
k (0 ... N_LE-1) the managers feed the data of **LE N_LE-1-k**. The bit that
comes out at that shift is the old content of the same LE. So after a full
pass, every LE holds its own data, and the data that left is in the same
order. In memory:

- context bit j (flip-flop of LE j) is bit j%32 of word j/32 of its slot;
- bitstream bit b is bit b%32 of bus word b/32, and LE r uses bitstream bits
  [87r, 87r+86].

## One column (`ollaf_column`)

```
 control bus ──► bus slave ──► command / status / tag registers
                    │
          ┌─────────┴──────────┐
          ▼                    ▼
 local_config_memory    local_context_memory (+ tags)
   (gearbox 32→87)            ▲      │
          │                   │      ▼
         hcm                  └──── cmu
          │                          │
          ▼                          ▼
 configuration scanpath      context scanpath ◄── le_d / ──► le_q
   (87 bits/LE) ──► cfg_q        (1 bit/LE)
          └───────── plane select (swap) ─────────┘
```

- **`local_config_memory`** stores `SLOTS` bitstreams as 1024 rows of 87
  bits. The bus delivers 32-bit words, so a small gearbox accumulates words
  and writes a row whenever 87 bits are there. Word 0 of a slot restarts it.
  Words must then arrive in order.
- **`local_context_memory`** stores `SLOTS` contexts of 32 words. It has three
  ports: bus, CMU read and CMU write. Each slot has a tag {valid, dirty,
  task id, version}.
- **`hcm`** (hardware configuration manager) reads one row per clock and
  shifts it into the configuration scan plane.
- **`cmu`** (context management unit) restores a context into the scan plane,
  saves the scan plane into a slot, or does both in one pass.

### Registers (word address inside a column, 20 bits)

| address | access | meaning |
|---|---|---|
| `[19:18]=00`, `[17:0]` = slot*32 + word | R/W | context words |
| `[19:18]=01`, `[15:12]` = slot, `[11:0]` = word | W | bitstream words, in order |
| `10`, reg 0 `CMD` | W | command, see below |
| `10`, reg 1 `STATUS` | R | bit0 HCM busy, bit1 CMU busy, bit2 plane, bit3 error, [15:8] running task, [23:16] its version |
| `10`, reg 4+s `TAG[s]` | R/W | bit0 valid, bit1 dirty, [15:8] task id, [23:16] version |
| `10`, reg 8+s `CLEAN[s]` | W | clear the dirty bit of slot s |

`CMD` word: bit0 `cfg_load`, bit1 `ctx_restore`, bit2 `ctx_save`,
bit3 `swap`, [7:4] bitstream slot, [11:8] restore slot, [15:12] save slot.
Bits 0-2 start the HCM and/or the CMU. `swap` must be alone.

### Versioning and consistency rules

A context may exist in several places at once: the run plane, the scan plane,
one or more LCM slots and the repository. The hardware helps the operating
system keep track:

- The CMU keeps a tag for the context in each plane. A restore copies the
  slot's tag to the scan plane, and a swap exchanges the two plane tags.
- A save writes the slot's tag as {valid, **dirty**, same task,
  **version + 1**}. The kernel counts saves too. If a slot's version equals
  the kernel's count, that slot holds the latest copy.
- A dirty slot holds the only copy of a context. Context words and tag writes
  into a dirty slot are refused. The slot becomes writable again once an L0'
  has copied it to the repository: the engine then writes `CLEAN`.
- These operations are refused and set the sticky `error` bit:
  - a swap while the HCM or CMU is shifting;
  - a command to a manager that is busy;
  - a restore from an invalid or non-existent slot;
  - a write into a dirty slot.

  A `CMD` write with bits 3:0 all zero clears `error`.

## Control bus and central repository (`ctrl_bus`, `ccr`)

The bus has a single master and never stalls. A read returns its data one
clock later. Each request carries a column mask, and a write goes to every
masked column in the same clock. This is how the columns of a multi-column
task swap together (`tb_ollaf_top` swaps three columns in one clock).

`ccr` holds bitstreams from word 0 and contexts from word
16 x 2784. The supervisor processor reads and writes this memory through
`sup_mem_*`. It issues work through `sup_cmd` (type `sup_cmd_t`):

- `OP_L0`: bitstream `cfg_idx` and/or context `ctx_idx` into slot `slot` of
  one column, then the slot's tag from `data`, with dirty cleared;
- `OP_L0P`: context slot `slot` of one column into context `ctx_idx`, then
  `CLEAN`;
- `OP_REG_WR` / `OP_REG_RD`: one column register access.

`sup_cmd_ready` is high when the engine is idle. `sup_done` pulses at the end
of each command.

A typical preemption of T1 by T2 on one column, with both already in the LCM:

1. `CMD` = `cfg_load | ctx_restore` with T2's slots. T1 keeps running for
   the 1024 clocks.
2. `CMD` = `swap`. T2 runs from the next clock.
3. `CMD` = `ctx_save` to a free slot. T1's state leaves while T2 runs.
4. `OP_L0P` of that slot. The repository now has the latest T1 context.

## What is not here

- **The logic elements and routing.** The LUT structure, interconnect and
  meaning of the 87 configuration bits per LE are not specified, so they are
  not built. Their signals are top-level ports. Per column, `le_d` is the
  next state the task logic computes for each LE flip-flop, `le_q` is the
  flip-flop value, and `cfg_q` is the configuration the LE runs with.
  `task_en` is the run-plane clock enable of each column.
- **The application communication medium.** This is the per-column ports for
  data exchange and I/O; its design is open.
- **The supervisor processor and its kernel.** This includes the scheduler,
  the prefetching policy and the choice of slots. They are software on an
  ordinary CPU; this RTL gives them the `sup_*` ports.

## Choices this RTL makes that the architecture leaves open

- One clock with enables, not separate task and scan clocks.
- 87 bits per LE shifted as 87 parallel chains, which makes a bitstream load
  take 1024 clocks, as long as a context load.
- LCM of 3 slots (the reference platform). An earlier stage of the
  architecture quotes about 10 contexts per column. `SLOTS` up to 16 is
  supported but not the default and has not been simulated.
- The bus protocol, register map, tag format, dirty-slot protection and
  error handling.
- The transfer engine inside `ccr`, which sequences L0/L0' at one word per
  clock. Its command set and the 16-bitstream repository size are this
  design's own.
- Memories have one clock of read latency. This adds one clock to each L0 and
  one command clock to each L1 on top of the nominal transfer times.

## Files

`rtl/` holds one module or package per file:

- `ollaf_pkg` holds types, sizes and the register map.
- `ollaf_top` is the top level.
- Below it: `ccr`, `ctrl_bus` and `ollaf_column`. Each column contains
  `local_config_memory`, `local_context_memory`, `hcm`, `cmu`, and two
  `dual_plane_scanpath`s built from `dual_plane_ff`.

`tb/` has one self-checking testbench per module (`tb_<module>`). Each prints
`TB_RESULT checks=N failures=M`. `tb_ollaf_top` runs the whole preemption
scenario above at the full reference size. It counts every mechanism (L0,
L0', L1, L1', L2, running during a load, multi-column swap, each refusal,
version increment) and fails if any did not happen.

`tb_case_study` runs a six-task reference schedule on 4 columns of 64 LEs,
with the tick shortened to 1500 clocks:

- T1 and T1' use column 0. They share one bitstream.
- T2 uses two columns. T3 and T5 use one column each.
- T4 uses all four columns. It preempts T2 and T3.
- T2 and T3 then resume on different columns.

The task logic is a simple model: each LE takes its neighbour's flip-flop
XOR one configuration bit. The testbench checks every task's state against a
reference model at the end of the task. It also checks each context saved
back to the repository, together with its version.

## Simulating

Verilator 5 (the testbenches use `--timing`):

```
verilator --binary --timing --assert -Irtl rtl/ollaf_pkg.sv tb/tb_ollaf_top.sv \
          --top-module tb_ollaf_top -j 8
./obj_dir/Vtb_ollaf_top
```

Replace `tb_ollaf_top` with any other testbench name. At full size the top
level holds about 720 K flip-flops (the two 87-bit planes of 4 x 1024 LEs)
and 2.6 Mbit of memory. Verilator needs a few minutes to build it. The
simulation then runs in seconds.

Main parameters of `ollaf_top`:

- `N_COLS`, `N_LE`, `CFG_PER_LE`, `SLOTS`, `CFG_ENTRIES` and `CTX_ENTRIES`.
- `N_LE` must be a multiple of 32.
- `CFG_PER_LE` must be at least 32, and `N_LE x CFG_PER_LE` must be a multiple
  of 32.
- A bitstream must stay within 4096 bus words.
