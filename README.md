# BLASTn seed lookup engine

BLAST compares a query DNA sequence against a database in three steps: seeding, extension and evaluation. Seeding
finds every place where a short word of the database sequence (the *subject*) also occurs in the query. It is the
most expensive step in software. This RTL moves the core of nucleotide seeding into hardware. The host hands the
engine one 8-nucleotide subject word at a time. The engine looks the word up in two precomputed query tables. For
every occurrence it writes a 64-bit *offset pair* (subject offset, query offset) to memory for the extension step.
It returns the number of occurrences.

The design is an FPGA "personality" for a hybrid CPU + FPGA coprocessor: a set of custom instructions that a host
program issues through the coprocessor's dispatch port. It follows the second-generation BLASTn personality of a
published hardware/software co-design of NCBI BLASTn on such a machine. It is built in the configuration that was
evaluated there: one lookup engine (the *hitter*) on one application-engine FPGA, 65536-entry tables and a 150 MHz
clock. The vendor's interface blocks are not included (see "What is not here").

## Words and the two query tables

A nucleotide is 2 bits. Eight of them make a 16-bit word, with the first residue in the high bits. The query is
preprocessed in software, once per query, into two tables of 65536 signed 16-bit entries:

| backbone[word]       | meaning                                                                  |
|----------------------|--------------------------------------------------------------------------|
| `-1`                 | the word does not occur in the query                                     |
| `v >= 0`             | the word occurs exactly once, at query offset `v`                        |
| `v <= -2`            | the word occurs several times; its offsets are listed in the overflow table from address `-v` |

An overflow list holds query offsets at consecutive addresses and ends with `-1`. Address 0 and 1 are never a list
start, because a pointer is always `<= -2`. Example: a word at query offsets 17, 230 and 402 could have
`backbone[w] = -40` and `overflow[40..43] = 17, 230, 402, -1`.

The tables are loaded through a simple write port (`tbl_we`, `tbl_sel` 0 = backbone / 1 = overflow, `tbl_addr`,
`tbl_data`), one entry per cycle, while the engine is idle. The original design preloaded them into block RAM at
FPGA configuration, for one fixed query. The load port lets any query be used. Offsets must be below 32768 so that a
single-hit entry stays non-negative.

## One coprocessor call

For each word the host issues five instructions on the dispatch port:

1. AEG write, index 0 (`Init_index`): the word, in bits 15:0.
2. AEG write, index 1 (`mem_base`): the byte address where this call's pairs go.
3. AEG write, index 2 (`s_off`): the word's offset within its subject sequence (32 bits).
4. `caep00`: custom instruction 0, which starts the lookup. `cae_stall` rises on the next cycle.
5. When `cae_stall` is low again: AEG read, index 30 (`Hits_num`). The count appears on `cae_ret_data` one cycle
   later, with `cae_ret_data_vld`.

The pairs of one call go to `mem_base`, `mem_base + 8`, `mem_base + 16`, and so on. The host moves `mem_base` on by
8 × count between calls. Each pair is

```
{ s_off[31:0], 16'b0, query_offset[15:0] }      // 64 bits
```

The AEG (application engine general) registers are 64 bits wide. An AEG index other than 0, 1, 2 or 30 raises the
*invalid index* exception. Any custom instruction other than `caep00`, or an unknown opcode, raises the
*unimplemented instruction* exception. `cae_exception` is a one-cycle 16-bit pulse `{14'b0, invalid_index,
unimplemented}`. `csr_exc_sticky` accumulates it since reset.

The instruction word is this design's own encoding, since the coprocessor's real one is not part of it:

| bits  | field                                                           |
|-------|-----------------------------------------------------------------|
| 31:28 | opcode: 0 NOP, 1 AEG write, 2 AEG read, 3 caep                  |
| 27:18 | ignored                                                          |
| 17:0  | AEG index, or the custom instruction number for caep            |

## Inside a lookup: the hitter

```
 caep00 ─► CAE control FSM ──start──► hitter FSM ──► backbone RAM (addr = word)
 (IDLE → COUNT → AEG_STORE)             │   ▲        overflow RAM (addr = list pointer)
      ▲  stall / idle                   │   └── entries
      └──────── ended ──────────────────┤
                                        ├─► hits counter ─► Hits_num (AEG 30)
                                        └─► write address generator + pair ─► crossbar ─► 8 MC ports
```

The **hitter FSM** has four states:

* **IDLE**: on `start`, reads `backbone[word]`, clears the hit counter and loads `mem_base` into the address
  generator.
* **CK_INDEX**: the backbone entry is available. `-1` ends the lookup with no hit. `>= 0` issues one pair and ends.
  `<= -2` loads the list pointer with its negation and goes on.
* **HAVE_OVF**: issues the first overflow read (the RAMs have one cycle of read latency).
* **CK_OVF**: checks one overflow entry per cycle. An offset issues a pair and reads the next entry. `-1` ends the
  lookup.

The end of a lookup is signalled by `ended`, a registered one-cycle pulse. When it is high the count is final.
The **CAE control FSM** then spends one cycle in AEG_STORE writing the count into `Hits_num`, and returns to IDLE.

Latency, counted from the cycle `caep00` is on the dispatch port, with no memory stalls:

| word has          | hitter `ended` after | `cae_stall` high for |
|-------------------|----------------------|----------------------|
| 0 or 1 occurrence | 2 cycles             | 3 cycles             |
| n ≥ 2 occurrences | n + 4 cycles         | n + 5 cycles         |

With the AEG writes and the read around it, a call takes about 10 cycles. That is 67 ns at
150 MHz. In the original system the measured time per call was about 11.6 µs, dominated by the host and the
coprocessor's scalar processor issuing the instructions, not by the lookup itself.

**Memory writes.** A pair is issued as `mc_req.st` together with `mc_req.vadr` and `mc_req.wrd`. Writes get no
response. The **crossbar** sends each request to the memory-controller port that owns its address: port
`vadr[8:6]`, the binary interleave of the coprocessor memory. It passes that port's `mc_rq_stall` back to the
hitter. A hit is never issued into a stalled port. While stalled, the hitter holds the current entry (the RAM read
enable is dropped, so its output holds) and resumes when the stall clears. Each stalled cycle adds one cycle to the
call.

## Files

| file                | contents                                                                     |
|---------------------|------------------------------------------------------------------------------|
| `rtl/blast_pkg.sv`  | widths, table encoding, AEG map, instruction format, FSM state types, `mc_req_t` |
| `rtl/blastn_pers.sv`| top: decoder, AEG registers, CAE FSM, hitter, crossbar                       |
| `rtl/inst_decoder.sv`, `rtl/aeg_regs.sv`, `rtl/cae_fsm.sv` | dispatch-side blocks                     |
| `rtl/hitter.sv`     | the lookup engine: two `lut_bram`, `hitter_fsm`, `hits_counter`, `wr_addr_gen` |
| `rtl/mem_xbar.sv`   | write routing to the eight memory-controller ports                           |
| `tb/tb_*.sv`        | one self-checking testbench per module, plus `tb_workload_blastn`            |
| `tb/seed_model_pkg.sv` | testbench reference: builds both tables from a query and lists every word's offsets |

Top parameters: `BB_DEPTH` = `OV_DEPTH` = 65536 (table entries). Every other size is fixed in `blast_pkg`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
          rtl/blast_pkg.sv tb/seed_model_pkg.sv $(ls rtl/*.sv | grep -v blast_pkg) \
          tb/tb_blastn_pers.sv --top-module tb_blastn_pers -o sim
./obj_dir/sim
```

Replace `tb_blastn_pers` with any other `tb_*` module. The packages must come first on the command line, and each
file only once. The `--timescale` default is needed because only the testbenches declare one.

* `tb_blastn_pers` drives the whole design at its default sizes. It builds the tables of a random 782-residue query
  with repeated segments and loads all 131072 entries. It then plays the host over a 3000-residue subject
  (749 calls at stride 4). The first half runs without memory stalls and checks each call's stall length against
  the table above. The second half stalls the memory ports at random. It checks every count, every pair and its
  address and port, and that nothing stray is written. It also checks both exceptions. It requires every mechanism
  to have happened: zero, single and multiple hits, dispatch stall, memory stall, all eight ports, both exceptions.
* `tb_workload_blastn` runs the two smaller evaluated databases against a 782-residue query, at full size: 6
  sequences with 4309 residues in all, and one sequence of 3,756,989 residues. The stride-4 scan makes 1069 and
  939,246 calls, the call counts reported for those databases. It checks all counts and pairs, under random memory
  stalls. It takes about 6 s. The real query and databases are not included; residues are random.
* The unit testbenches check their module against values worked out in the testbench. They cover the FSM latency,
  the RAM read-enable hold, counter and address priority rules, crossbar routing, AEG read timing and the decoder's
  outcomes.

## Departures and choices

Taken from the original design: the block structure and wiring; both FSMs' states and transitions; the table
encoding; the loop of one overflow entry per cycle; the AEG register map; `caep00` as the only custom instruction;
the two exceptions and the exception-vector layout; the pair format; 65536 × 16 tables; 32-bit subject offsets;
routing by address bits 8:6; eight memory controllers.

This design's own choices:

* **A single hit is `>= 0`.** The original text says `>= 0`, while its state diagram is labelled `> 0`. Offset 0 is
  a real query position, so `>= 0` is used.
* **Query offset of a single hit.** It is taken from the backbone entry. The original block diagram draws the pair
  from the overflow RAM output only, but a single hit never reads that RAM.
* **Interface details.** The instruction encoding, 64-bit AEGs, one-cycle AEG read latency, and missing AEG indices
  reading as 0 are all own choices.
* **Loading and stalls.** The table load port replaces configuration-time initialisation. The per-port memory stall
  and its handling are added.
* **Reset.** Synchronous, active-high reset of all control state. Table contents are not reset.
* **Crossbar.** It is a minimal combinational write router. The original used a vendor-supplied crossbar.
* **Addresses.** `mem_base` is reloaded on every call and pairs are packed from it. The host advances it.

## What is not here

* The coprocessor's vendor-supplied blocks: the dispatch interface, the management/CSR ring and its agent, the
  memory-controller interfaces (the 300 MHz link split into even/odd 150 MHz ports, write-data and read-control
  buffers), the AE-to-AE links, and the memory controllers and DIMMs. The top's `cae_*` ports stand where the
  dispatch interface connects. `mc_req` / `mc_rq_stall` stand where the memory-controller interfaces connect.
  `csr_exc_sticky`, `cae_state` and `hitter_state` are what a CSR agent would expose.
* The host software: forming words from the packed subject sequence, building the tables, and the extension step
  that reads the pairs.
* The first-generation engine, which only counted occurrences. The hitter here does that and also writes the pairs.
* Several hitters in parallel. Resource figures suggest five would fit on one FPGA, but the evaluated design used
  one. `blastn_pers` instantiates one.
