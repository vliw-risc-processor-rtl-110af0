# Six-slot VLIW - RISC core

A small VLIW processor core. Each instruction bundle holds six 32-bit words, one
for each functional unit: two load units, two arithmetic units, one store unit
and one branch unit. A bundle is fetched every cycle and flows through a
five-stage pipeline (IF, ID, RF, ME, WB). No hardware looks for parallelism.
The compiler fills the six slots, and the hardware only keeps each unit from
using a register before it has been written.

The core has two main ideas:

* **Every unit stalls on its own.** Each unit checks its registers in a
  busy-register table (called the *reservation station* here). A blocked unit
  waits. The other units of the same bundle go ahead.
* **Load misses do not stop the machine.** The data cache is non-blocking. A
  missing load is passed to a pipelined synchronous DRAM (SDRAM) and leaves
  the load pipe. Its word comes back later through a register-file write port
  reserved for returning misses. Until then, only the instructions that need
  that register wait.

The register file therefore has nine read ports and five write ports.

## Bundles and issue

The bundle sits in the ID stage, where each unit decodes its own word:

| slot | unit | registers checked |
|---|---|---|
| 0, 1 | load 0, load 1 | base `rs` (read), `rd` (written) |
| 2, 3 | arithmetic 0, 1 | `rs`, `rt` if register form (read), `rd` (written) |
| 4 | store | base `rs` and data `rd` (both read) |
| 5 | branch | condition `rs` (read) |

A unit may issue when none of its registers is busy. "Busy" means an
instruction has been issued that will write the register, and its write-back
has not happened yet. A write-back in the same cycle already counts as free.
Both rules are checked:

* read-after-write: a source register is busy;
* write-after-write: the destination is busy.

When a unit issues, its destination becomes busy. When the word is written
back, the register becomes free again.

Slots that have issued are marked done in a mask, and their units see a no-op
from then on. The bundle leaves ID, and the next bundle is latched from the
instruction cache, in the first cycle in which every slot is done. A
bundle's slots can therefore issue in different cycles. What the table does
not check is left to the compiler:

* No slot may read or write a register that another slot of the same bundle
  writes.
* No bundle may both load and store the same address.

The branch slot is held until every other slot of its bundle has issued. The
branch then leaves ID together with its bundle.

`ev_rs_stall[5:0]` pulses for each slot that is blocked in a cycle.

## Fetch and the instruction cache

The instruction cache is direct mapped. It has `ICACHE_LINES` lines (default
256), and each line holds one whole bundle, so a hit delivers all six words in
one cycle. The PC counts bundles and is `PCW` bits wide (default 16).

A fetch that misses leaves ID empty for that cycle, and the same address is
fetched again every cycle. The refill asks external instruction memory for
the six words one per cycle, using word addresses `{bundle, slot}` on
`imem_req_*`. The words come back in order on `imem_resp_*`. After the sixth
word the line is written, and the repeated fetch hits. With a memory of
latency L that is always ready, a miss costs 6 + L + 1 cycles. Only one
refill runs at a time.

A branch is decided while its delay-slot bundle is in ID. If that bundle
missed, it is not there yet. The target is then kept until the delay slot
has been fetched, so the delay slot is never skipped.

## The pipes

Every pipe keeps the stage names. The operands read in RF are held in a
register while the pipe waits in ME, so a later write to a source register
cannot change an instruction that has already issued.

* **Load:** ID decodes and sign-extends the 18-bit offset. RF reads the base
  register and adds the offset. ME looks up the data cache. On a hit, WB
  writes the word, three cycles after issue. On a miss, the cache takes the
  address and the destination register number, and the pipe goes on. The
  pipe holds in ME only when the cache refuses the load because its queue is
  full (`ev_queue_stall`).
* **Arithmetic:** RF reads two registers, or one register and the immediate.
  ME runs the adder/subtractor and the barrel shifter in parallel and picks
  one result. WB writes it, three cycles after issue. The pipe never stalls
  after issue.
* **Store:** RF reads the base and data registers and adds the offset. ME
  offers the store to the cache and holds until the cache accepts it.
* **Branch:** RF reads the condition register and decides. A taken branch
  redirects fetch to *bundle address of the branch + offset*. The bundle
  after the branch is already fetched and always executes (one delay slot).

## Non-blocking data cache

* **Organisation:** direct mapped, with one-word lines and word addresses.
  There are two load ports and one store port, and every port is looked up
  combinationally in ME.
* **Load hit:** the word goes back through the load pipe's own write port.
* **Load miss:** the register number and address enter the request queue,
  which holds `MISSQ_DEPTH` entries (default 4, taken as the SDRAM pipeline
  depth). The queue sends one request per cycle, in order. A response-queue
  entry whose word returns in the same cycle counts as free, so a run of
  misses streams: after the first word, one word returns every cycle.
* **Response queue:** each read sent moves to a response queue of the same
  depth. That queue pairs the SDRAM's in-order answers with their register
  numbers. An answer:
  * is written through register write port 4 (`ev_fill`);
  * fills the line;
  * is forwarded to a load asking for the same address in that cycle.
* **Stores:** write-through, with no allocation on a miss. A store updates a
  resident line and always enters the same request queue as an SDRAM write.
  Because the queue keeps order, a later load miss reads the stored word. A
  load in the same cycle to the store's address gets the stored word.
* **Queued read overtaken by a store:** if a store is queued after a read of
  the same address, the read is marked. Its old word still goes to the
  read's register, but it neither fills the line nor is forwarded.
* **Full queue:** a load that finds the queue full is refused and waits in
  ME. A refused store also refuses the loads beside it, so no load passes
  it.

While a miss is outstanding, a hit under the miss needs no special case. The
miss's destination register stays busy, and that is all the reservation
station needs to know.

SDRAM port of `vliw_top`:

* `mem_req_valid` / `mem_req_ready` handshake, with `mem_req_write`,
  `mem_req_addr` and `mem_req_wdata`.
* `mem_resp_valid` / `mem_resp_data` return read words in request order, at
  any latency. Writes get no answer.

`tb/sdram_model.sv` is a behavioural SDRAM with a fixed latency (4 cycles by
default). It can also refuse requests, to test back-pressure.

## Instruction encoding

Every slot uses one layout:

| bits | field | meaning |
|---|---|---|
| 31:28 | `op` | opcode of the slot's unit, 0 = no-op |
| 27:23 | `rd` | destination (store: register stored) |
| 22:18 | `rs` | first source / base / branch condition |
| 17:13 | `rt` | second source (register forms) |
| 17:0 | `imm` | 18-bit signed immediate / offset |

| unit | op | instruction |
|---|---|---|
| load | 1 | `LW rd, imm(rs)` |
| store | 1 | `SW rd, imm(rs)` |
| branch | 1 / 2 / 3 | `J imm`, `BEQZ rs, imm`, `BNEZ rs, imm` |
| arithmetic | 1–5 | `ADD SUB SLL SRL SRA rd, rs, rt` |
| arithmetic | 9–D | the same operations with `imm` in place of `rt` |

Shift amounts are the low five bits of the second operand. Arithmetic wraps
around, and there are no flags or exceptions. Undefined opcodes behave as
no-ops.

## Register file ports

| read port | user | write port | user |
|---|---|---|---|
| 0, 1 | load 0 / 1 base | 0, 1 | load 0 / 1 hits |
| 2, 3 | arithmetic 0 a / b | 2, 3 | arithmetic 0 / 1 |
| 4, 5 | arithmetic 1 a / b | 4 | returning load misses |
| 6, 7 | store base / data | | |
| 8 | branch condition | | |

Other details:

* Reads are combinational.
* Writes land at the clock edge. No bypass is needed, because the
  reservation station delays a reader until the write has happened.
* If two ports write one register in the same cycle, the higher-numbered
  port wins. Correct code never does this.
* All registers reset to zero.

## Modules

| file | role |
|---|---|
| `rtl/vliw_pkg.sv` | widths, slot numbers, instruction struct, opcodes |
| `rtl/vliw_top.sv` | fetch, bundle issue, wiring of all units |
| `rtl/icache.sv` | six-word-per-cycle instruction cache with refill from instruction memory |
| `rtl/res_station.sv` | busy-register table and stall logic |
| `rtl/regfile.sv` | 9-read / 5-write register file |
| `rtl/load_pipe.sv`, `arith_pipe.sv`, `store_pipe.sv`, `branch_unit.sv` | the units |
| `rtl/dcache.sv` | non-blocking data cache with request and response queues |
| `rtl/alu.sv`, `shifter.sv`, `sign_ext.sv` | datapath pieces |

Default sizes: a 16-bit bundle PC, 256 instruction-cache lines, 256
data-cache lines, and a 4-entry miss queue. All three are parameters of `vliw_top`.

## How this relates to the original design

The core follows a published student design whose parts are known:

* the six-slot bundle and its unit mix;
* the five stages;
* the reservation-station stalls;
* the non-blocking data cache in front of an SDRAM, with a queue sized to the
  SDRAM pipeline;
* the 9-read / 5-write register file.

The following are this design's own choices:

* **Clocking:** the original runs on two non-overlapping clock phases, with a
  latch pair per stage. Here each pair is one rising-edge flip-flop. The stage
  timing is the same.
* **Instruction set:** the word width, register count, encoding and
  operations are defined here.
* **Store and branch units:** the original gives only their purpose. The
  versions here are the simplest that do the job: a store pipe shaped like
  the load pipe, and a branch unit with one delay slot.
* **Cache organisation:** the line size, mapping, write policy, use of the
  fifth write port, forwarding and queue handling.
* **Instruction cache:** the original gives only its purpose and its address
  and data pins. The organisation and the refill protocol are defined here.
* **Unbuilt blocks:** small blocks that appear in the original pipeline
  drawings without explanation are not built. Neither are the custom
  register-file cells, sense amplifiers and pad ring.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if it
hangs. With Verilator 5, for example:

    verilator --binary --timing -Wno-fatal -Irtl --top-module tb_vliw_top \
        rtl/vliw_pkg.sv rtl/*.sv tb/sdram_model.sv tb/tb_vliw_top.sv
    ./obj_dir/Vtb_vliw_top

Put `rtl/vliw_pkg.sv` first. Only `tb_dcache` and `tb_vliw_top` need
`tb/sdram_model.sv`.

`tb_vliw_top` runs the whole core at its default sizes:

* An instruction memory model in the testbench answers refill requests
  after 3 cycles.
* The program is 200 generated bundles and runs twice. The second pass runs
  from a warm instruction cache. The program holds:
  * two bundles that set base registers;
  * twenty independent arithmetic bundles;
  * a counted loop of three bundles that runs five times per pass;
  * random loads, stores, arithmetic and forward branches, with dependences
    between bundles.
* The SDRAM model has random back-pressure.
* A reference model in the testbench executes the same program one bundle
  at a time.
* At the end it compares all 32 registers and every written memory word.
* It checks the fetch rate on the twenty independent bundles:
  * on the cold pass, one cycle plus a full refill per bundle;
  * on the warm pass, one cycle per bundle.
* It counts each mechanism and fails if any never happened: per-slot stalls,
  partial issue, the held branch slot, hits, misses, fills, hits under
  misses, queue-full refusals, SDRAM back-pressure, stores, taken and
  not-taken branches, instruction-cache hits and misses, and a branch target
  kept over a delay-slot miss.
