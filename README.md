# VIREMENT: a reconfigurable functional unit inside each CPU core

Mobile multicore processors give up per-core resources, and with them
single-thread speed. VIREMENT (Virtual REconfigurable Micro-ENgine for
Translation) wins some of it back without dedicated accelerators. Each core
of a four-core processor gets a small **reconfigurable functional unit
(VRFU)** in its datapath. A run-time compiler turns each hot basic block of a
kernel into a *configuration context* for that unit. In the program it then
replaces the block with one instruction, **BXV** ("Branch-to-Virement"),
which carries the context's address. When the core decodes a BXV it stalls.
The VRFU loads the context and reads its operands from the core's register
file. It then evaluates the whole block as one combinational network, does
the block's loads and stores through the core's L1 data cache, writes the
results back and releases the core.

This repository holds synthesizable SystemVerilog for the reconfigurable
part of the processor:

* the VRFU of each core: the control unit (VCU) with its context cache, and
  the reconfigurable datapath (VRD);
* the decode-stage logic that recognises a BXV and stalls the core;
* the DMA that fetches contexts from main memory for all four VCUs;
* a top level that joins four cores' worth of these.

The host CPU pipelines (ARM926EJ-S class), their register files, their L1
caches and main memory are not part of it. They connect through ports, and
the testbenches model them.

## How one BXV executes

```
 decode ──BXV address──▶ VCU ──lookup──▶ context cache ──miss──▶ DMA ──▶ main memory
   ▲ stall                │  latch r0..r15 and NZCV as operands
   │                      ▼
   │                VRD (combinational) ◀── context
   │                      │  loads/stores row by row ──▶ data cache bank 0 / bank 1
   └────── done ◀── write-back of registers and flags
```

Cycle by cycle, from `vcu.sv`:

| cycle | VCU state | what happens |
|------:|-----------|--------------|
| 0 | IDLE | The decoder sees the BXV, raises `stall` and pulses `bxv_valid` with the 24-bit address. The VCU latches the address, all 16 registers and the flags. |
| 1 | LOOKUP | Context-cache tag compare. A hit marks the entry most recently used. A miss invalidates the entry to be replaced (an empty one if there is one, else the least recently used) and goes to the DMA. |
| (miss) | DMA_REQ, FILL | The VCU posts a 37-word transfer from byte address `addr*4`. Words are written into the entry as they arrive. After the last one the entry is valid and most recently used. |
| 2 … ROWS+1 | EXEC | One datapath row per cycle, top to bottom (see below). |
| ROWS+2 | WB | Register and flag writes go to the host for one cycle. `done` drops the decoder's stall in the same cycle. |

So a cached context with no data-cache waits completes `ROWS + 2` cycles
after `bxv_valid`: 6 cycles for the 4 × 4 array. Memory accesses add cycles
only on a bank conflict or a cache miss.

## The reconfigurable datapath (VRD)

The VRD is a `ROWS × COLS` grid of processing elements (4 × 4 by default).
It holds no state, and data flows from top to bottom.

```
        r0..r15, NZCV (latched)        immediates (one per PE)
               │                                │
   ┌───────────▼────────────────────────────────▼──┐
   │ data switch + flag switch (row 0)              │
   └──┬───────────┬───────────┬───────────┬────────┘
    [0,0]LS     [0,1]LS     [0,2]       [0,3]        PE = ALU (+ load/store in LS columns)
   ┌──▼───────────▼───────────▼───────────▼────────┐
   │ data switch + flag switch (row 1)  ◀── registers, flags, immediates
   └──┬────────────────────────────────────────────┘
      …                                               rows 2, 3
   ┌──▼────────────────────────────────────────────┐
   │ result switch: any PE ─▶ any of r0..r15, NZCV  │
   └───────────────────────────────────────────────┘
```

* **Switches.** In front of each row, a data switch gives each PE input one
  of three sources: any output of the row directly above, any of the 16 host
  registers, or the PE's immediate. A flag switch gives each PE's 1-bit flag
  operand one of: any of the four flags of any PE in the row above, any host
  flag, or a constant. Only the row directly above is reachable, which keeps
  placement trivial for a run-time compiler. A value needed two rows further
  down must be passed along by a `MOV` in between. Host registers and flags
  reach every row, because an operand that is live on entry needs no PE to
  carry it.
* **ALU** (`vrd_alu.sv`). Every PE computes one of 16 integer operations
  from two 32-bit operands and a flag operand. It produces a 32-bit result
  and N, Z, C, V flags in the host's ARM convention, so flags pass freely
  between core and datapath.

  | code | op | result | C | V |
  |---:|----|--------|---|---|
  | 0–1 | ADD, ADC | a + b (+ fin) | carry out | signed overflow |
  | 2–3 | SUB, SBC | a − b (− !fin) | not borrow | signed overflow |
  | 4–5 | RSB, RSC | b − a (− !fin) | not borrow | signed overflow |
  | 6–9 | AND, ORR, EOR, BIC | logic | fin | 0 |
  | 10–11 | MOV, MVN | b, ~b | fin | 0 |
  | 12–15 | LSL, LSR, ASR, ROR | a shifted by b[7:0] | last bit out (fin if 0) | 0 |

  Shifts follow ARM register-specified shifts, including amounts of 32 and
  more. There is no multiply and no floating point.
* **Loads and stores.** PEs in columns `0 … NLS-1` of each row (two by
  default) can be load/store PEs instead of ALUs. Operand A is the word
  address, which the compiler computes in an ALU of the row above. Operand B
  is the store data. Accesses are 32-bit words only. A load PE's output is
  the loaded word, with flags 0.
* **Result switch.** After the last row, each of the 16 host registers and
  the flag register may take the value of any PE in any row. A value defined
  in row 0 can therefore be live out without being carried down.

Because the grid is combinational and the data cache is not, the VRD shows
each load/store PE's request on `ls[row][col]`. The VCU performs it and
returns loaded words on `ld_data[row][col]`. Those words are held in VCU
registers for the rest of the BXV, so everything below a load sees a stable
value once its row has been served.

## Configuration contexts

All contexts have the same size, so the context cache never fragments. For
a `ROWS × COLS` array a context is `2·ROWS·COLS + 5` 32-bit words: 37 for
4 × 4. PE `p = row·COLS + col` occupies words `2p` (control) and `2p+1`
(immediate).

Control word of a PE:

| bits | field | meaning |
|------|-------|---------|
| 1:0 | mode | 0 idle (output 0), 1 ALU, 2 load, 3 store (2 and 3 only in load/store columns) |
| 5:2 | op | ALU operation, table above |
| 13:6 | srca | operand A source |
| 21:14 | srcb | operand B source |
| 29:22 | fsel | flag operand source |
| 31:30 | — | zero |

Operand source codes: `0–15` host register r0–r15; `16+c` output of column
`c` in the row above; `255` the PE's immediate; anything else reads as 0.
The "row above" codes also read as 0 in row 0.

Flag source codes: `0–3` host N, Z, C, V; `4 + 4c + f` flag `f`
(0 = N … 3 = V) of column `c` in the row above; `254` constant 0; `255`
constant 1.

Write-back words: word `2·ROWS·COLS + i/4`, byte `i%4`, is the select for
register `ri`. Word `2·ROWS·COLS + 4`, byte 0, is the select for the flags.
A select byte is `{enable, pe[6:0]}`. Registers whose enable is clear are
not written.

Example (`ctx_example` in `tb/vrm_tb_pkg.sv`): a basic block with four
dependent micro-ops, placed the way a greedy placer would place them:

| row, col | micro-op | control fields |
|---|---|---|
| 0,0 | `r5 = add r4, r3` | ALU ADD, srca 4, srcb 3 |
| 1,0 | `r3 = adc r2, r5, C` | ALU ADC, srca 2, srcb 16 (col 0 above), fsel 6 (C of col 0 above) |
| 2,0 | `t1 = sub r3, r0` | ALU SUB, srca 16, srcb 0 |
| 3,0 | `r4 = ldr [t1]` | LOAD, srca 16 |

It writes back r5 ← PE 0, r3 ← PE 4, r4 ← PE 12 and the flags ← PE 4.

## The control unit and its memories

* **Context cache** (`vcu_ctx_cache.sv`). Four fully associative entries of
  one context each, tagged with the 24-bit BXV address. Replacement is exact
  LRU, using one age counter per entry; an empty entry is filled before any
  valid one is evicted. The storage is a register array, so the whole
  context drives the datapath at once.
* **DMA** (`cfg_dma.sv`). One DMA serves the four VCUs, taking requests
  round robin. It issues word reads back to back to main memory (`mem_req`
  and `mem_addr`, accepted on `mem_gnt`). It accepts read data in order
  (`mem_rvalid`, `mem_rdata`) with any latency, and passes each word with its
  index to the requesting VCU.
* **Data-cache access.** Each core's L1 data cache has two banks and can
  serve two accesses per cycle if they go to different banks. The VCU uses
  address bit 2 as the bank, so consecutive words alternate banks. Port `b`
  of the `dc_*` bundle carries only bank-`b` addresses. Two accesses of one
  row to the same bank go one after the other, lower column first. A port
  whose `dc_ready` stays low is a cache miss and holds the row. Read data is
  taken in the cycle `dc_ready` is high; a write happens in that cycle.
  Stores and loads keep program order as the rows give it. Coherence is left
  to the host's caches, since every access goes through them.
* **Events.** `ev` (type `vcu_ev_t`) pulses for: context hit, context miss,
  eviction, bank conflict, cache-miss stall, load, store and completion. It
  is meant for performance counters.

## Decode-stage BXV logic

`bxv_decoder.sv` recognises a BXV in ARM state. The instruction set leaves
the encoding open, so this implementation uses bits `[31:24] = 0xF7` (an
undefined unconditional ARMv5 encoding) with the context's word address in
bits `[23:0]`. The decoder stalls the pipeline while the BXV is in decode and
hands the address over once. It drops the stall in the cycle of `done`, so
the BXV leaves decode on that clock edge. In Thumb state nothing is
recognised.

## Top level (`virement_top.sv`)

Parameters: `NCORES = 4`, `ROWS = 4`, `COLS = 4`, `NLS = 2`, `NBANKS = 2`,
`CTX_ENTRIES = 4`, `LENW = 8` (DMA length field).

Per-core port arrays (index `[core]`):

| ports | direction | meaning |
|-------|-----------|---------|
| `id_valid`, `id_instr`, `id_arm_state` / `id_stall` | in / out | decode stage |
| `rf_regs[core][16]`, `rf_flags` | in | register file and NZCV; read when the BXV is taken |
| `rf_we[core][16]`, `rf_wdata`, `rf_fwe`, `rf_fdata` | out | write-back, valid in the cycle `id_stall` drops |
| `dc_req/we/addr/wdata[core][bank]` / `dc_rdata`, `dc_ready` | out / in | data-cache bank ports |
| `ev[core]` | out | event pulses |

Shared ports: `mem_req`, `mem_addr` / `mem_gnt`, `mem_rvalid`, `mem_rdata`,
the DMA's main-memory read port. Reset is asynchronous and active low
(`rst_n`).

## Where this implementation makes its own choices

The architecture fixes the structure (a 4 × 4 combinational PE grid,
row-to-row switch boxes, flag switches, two load/store PEs per row, a VCU
with an LRU context cache fed by DMA, a two-bank data cache, BXV with a
stall-and-release decode handshake) and the 32-bit operands and four flags.
The following are this design's own and may differ from the original
implementation:

* the ALU operation list and flag rules for logic and shift operations;
* host registers and flags available to every row, not only the first;
* one 32-bit immediate per PE;
* the context layout and select codes, and the BXV encoding;
* which columns can load/store (the first `NLS`); word-only accesses; the
  address taken unmodified from operand A;
* the result switch reaching every PE;
* one row per cycle in EXEC, the bank mapping (address bit 2) and the
  conflict order;
* the context-cache size (4) and organisation (fully associative);
* one DMA shared round robin by the four cores, and its handshake;
* operands latched at BXV entry, and write-back in a single cycle.

The original implementation reported roughly 66.8 k gate equivalents for the
VRD and 51.6 k for the VCU, against 226 k for the host CPU. This RTL has not
been compared with those figures.

## Files

| file | content |
|------|---------|
| `rtl/vrm_pkg.sv` | shared types: PE descriptor, flags, select codes, events, `ctx_words()` |
| `rtl/vrd_alu.sv`, `rtl/vrd_pe.sv` | ALU and processing element |
| `rtl/vrd_data_switch.sv`, `rtl/vrd_flag_switch.sv`, `rtl/vrd_result_switch.sv` | switch boxes |
| `rtl/vrd.sv` | the datapath grid |
| `rtl/vcu_ctx_cache.sv`, `rtl/vcu.sv` | context cache and control unit |
| `rtl/vrfu.sv` | VCU + VRD of one core |
| `rtl/bxv_decoder.sv` | decode-stage BXV logic |
| `rtl/cfg_dma.sv` | context DMA |
| `rtl/virement_top.sv` | four cores and the shared DMA |
| `tb/vrm_tb_pkg.sv` | reference ALU and context evaluator, context builders |
| `tb/tb_dcache_model.sv`, `tb/tb_mem_model.sv` | behavioural two-bank data cache (random misses) and main memory |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_virement_kernels` (two small programs end to end) |

## Verification

Every testbench checks its block against values worked out independently:

* `tb_vrd_alu`: all 16 operations, corner operands and 20 000 random
  vectors, against a reference written with 64-bit integer arithmetic.
* `tb_vrd_data_switch`, `tb_vrd_flag_switch`, `tb_vrd_result_switch`:
  random select codes, first-row and inner-row variants.
* `tb_vrd`: the example block with hand-computed results, then 2 000 random
  contexts. The testbench serves loads and stores row by row, and results
  and memory are compared with a row-by-row reference evaluator.
* `tb_vcu_ctx_cache`: a random address stream over 7 contexts, against a
  reference LRU list, with every word read back.
* `tb_cfg_dma`: four requesters with random timing and a random-grant
  memory. Checks data, order, done and round-robin fairness.
* `tb_bxv_decoder`: stall, single hand-over, release on done, back-to-back
  BXVs, Thumb state.
* `tb_vrfu`: one VRFU with DMA, memory and data-cache models; 400 BXVs over
  8 contexts with 30 % cache-miss cycles. Checks write-backs, memory, hit and
  miss prediction, and the 6-cycle hit latency.
* `tb_virement_top`: all four cores at default parameters, running
  interleaved instruction streams against shared memory. It counts and
  requires stalls, context hits, misses, evictions, simultaneous DMA
  requests, bank conflicts, cache-miss stalls, loads, stores and Thumb-state
  pass-through.
* `tb_virement_kernels`: two small programs on the four cores, with their
  hot loops mapped by hand to contexts and their branches taken by the
  host model from the returned flags. Cores 0 and 2 compute Fibonacci
  numbers, where the loop body is one single-row context. Cores 1 and 3
  bubble-sort 12 signed words in their data cache with three contexts:
  load and compare, swap (two stores), and pointer step and compare. It
  checks the final values, the sorted order and that nothing was lost, and
  prints the average decode cycles per BXV (about 8.5 with 10 % data-cache
  miss cycles and cold context caches).

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_vrfu rtl/vrm_pkg.sv tb/vrm_tb_pkg.sv tb/tb_vrfu.sv
./obj_dir/Vtb_vrfu +verilator+rand+reset+2
```

Replace `tb_vrfu` with any other testbench name. `verilator --lint-only -Wall` reports only
notices: unused package constants, unused descriptor bits, and the reset
used both as an asynchronous reset and in assertion `disable iff` clauses.

## Not included

* The host CPU pipeline and register file (an existing ARM-class core), and
  its instruction and data caches: their sizes and organisation are not
  specified here. Only the data cache's two-bank port behaviour is defined,
  and a behavioural model stands in for it.
* The run-time compiler that produces contexts: it is software. The
  testbenches build contexts directly.
