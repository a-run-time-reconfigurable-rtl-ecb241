# A run-time reconfigurable cache

The right cache organisation depends on the program. One program streams through memory and gains nothing from associativity. Another thrashes a direct-mapped cache and needs four or eight ways. Write-back or write-through, and whether a write miss allocates a line, matter just as much. A cache built in FPGA block RAM does not have to be fixed when it is synthesised. This design is a cache controller that software can **re-shape while it runs**. Through a small register file it can change:

- the number of lines in use;
- the associativity (1 to 16 ways);
- the replacement strategy (random, pseudo-random, FIFO, pseudo-LRU, LRU);
- the write policy;
- the allocation policy;
- a monitoring mode.

The cache does **not** flush itself to do this. The reconfiguration unit rearranges the lines already in the block RAMs into the new organisation. It writes back only the lines that have no place in it. In the cycles it takes, a change costs about what a single flush of part of the cache costs, and the cached working set survives.

The cache sits between a processor bus (an IBM CoreConnect PLB with a PowerPC 405, attached through a bus-interface core) and a DDR SDRAM controller. Both of those are vendor cores. Here they are replaced by two simple request/acknowledge ports on the top module `plb_ddr_cc`.

## Organisation of the storage

A cache line is one 64-bit memory word (8 bytes). The line address is therefore the byte address without its low three bits (29 bits). Three separate single-port block RAMs (`sp_bram`), each `NUM_LINES` deep (4096 by default), hold the cache:

| memory | width | contents per entry |
|---|---|---|
| cache data | 64 | the line's 8 bytes |
| control | 38 | 8 byte-valid bits, Modified bit, full 29-bit line address |
| replacement | 28 | replacement word of a set (only the first `sets` entries are used) |

With `L = 2^size_log2` lines in use and `2^k` ways, there are `S = L/2^k` sets. Set `s` occupies physical lines `s·2^k … s·2^k + 2^k − 1`. The set index is the low `log2 S` bits of the line address.

The control word stores **the whole line address**, not a shortened tag. When the associativity or the size changes, the boundary between tag and index moves. Because every address bit is kept, no stored tag ever needs lengthening or shortening, and every line can always say where it belongs. This costs a few BRAM bits per line and removes a whole class of reconfiguration work.

There are no per-line valid bits. A line is valid where at least one byte-valid bit is set. The byte-valid bits let a write miss allocate a line without fetching it. They also make a read that needs a byte the cache does not hold a miss. The fetched word is then merged under the cached bytes, so bytes written earlier are not lost.

## Serving requests (`cache_controller`)

The ways of a set are searched **one after another, one per cycle**. The FPGA design this follows does the same, and that is why higher associativity costs time there. A read that hits in way `w` is acknowledged `w + 2` cycles after the request appears. The sequence is:

1. The controller reads the control word of way 0 (1 cycle).
2. It compares that word and reads the next one (1 cycle per way).

On a miss, the victim is the first way with no valid byte, or otherwise the way the replacement logic names. A modified victim is written back, then the word is fetched and installed. The policies are:

- **Write hit.** The bytes are merged. Under write-back the Modified bit is set. Under write-through the write also goes to memory.
- **Write miss.** With write-allocate, a line is allocated without a fetch. With no-allocate, the write goes to memory only.
- **Modified bit.** It is checked on every eviction, whatever the write policy. A line made dirty under write-back is therefore still written back after a switch to write-through.

Each completed access updates the set's replacement word and produces one monitor event.

The controller accepts a reconfiguration only in its idle state with no request waiting. By then every write it issued to memory has completed. It then hands the three BRAM ports and the memory port to the reconfiguration unit. Requests that arrive meanwhile wait, and are served afterwards under the new configuration.

## Replacement strategies (`cc_replacement`)

| strategy | state | victim |
|---|---|---|
| random | 16-bit LFSR, free-running | LFSR bits mod ways |
| pseudo-random | one global counter, advanced on each fill | counter mod ways |
| FIFO | per set: way written last | last + 1 mod ways |
| pseudo-LRU | per set: binary tree, ways−1 bits | follow the tree bits |
| LRU | per set: pairwise order matrix, n(n−1)/2 bits | the way older than all others |

For eight ways, LRU needs 28 bits per set, which sets the replacement word width. Pseudo-LRU and LRU are limited to 8 ways. An all-zero word is a valid state for every strategy. A cleared set therefore works at once under any strategy.

## Reconfiguration (`reconfiguration`)

This is the core of the design. The unit holds the **active** configuration. It compares it with the **requested** one and walks from one to the other in single steps. Each step doubles or halves the number of lines, the number of ways, or both together. Steps run in the order: lines and ways together, grow the number of lines, change the associativity, shrink the number of lines, clear the replacement words. Below, `L` is the number of lines in use at that step.

### Doubling the associativity (2^k → 2^(k+1) ways, sets halve)

Old sets `j` and `j + S/2` merge into new set `j`. The old sets with the top index bit set are exactly the **rear half** of the lines (L/2 … L−1). The schedule is:

1. **2 setup cycles.**
2. **Rear-half flush.** Each rear line costs 2 cycles: read its control word, then clear it. A modified rear line costs 3 cycles plus the memory write.
3. **1 synchronisation cycle.**
4. **Front-half move.** Every front line (old set `j`, way `w`) moves to line `j·2^(k+1) + w` of the doubled set. Each move takes 3 cycles: read, write, clear the old place. Lines move highest first, so no line is overwritten before it has moved.
5. **2 final cycles.**

For L = 1024 and a clean cache this gives 2 + 512·2 + 1 + 512·3 + 2 = **2565 cycles**. With a 9-cycle memory write, a dirty line costs 12 cycles, and a fully dirty rear half costs 2 + 512·12 + 1 + 512·3 + 2 = **7685 cycles**. At the default 4096 lines the same formulas give 10245 and 30725 cycles.

### Halving the associativity (2^k → 2^(k−1) ways, sets double)

The rear half is flushed exactly as above. Each front line of old set `j` then belongs to new set `j` or `j + S`, chosen by the address bit that joins the set index. It is written to the next free way of that set. A new set holds only 2^(k−1) lines, so a line that finds its set full is written back if modified and dropped. This costs 3 cycles per line plus any write-back.

### Growing and shrinking the cache

Growing (L → 2L, same ways, sets double) needs no flush. A line whose newly significant address bit is 1 moves from set `j` to set `j + S` in the added rear half, in the same way; the other lines stay. This costs 2 + 3·L + 2 cycles.

Shrinking (L → L/2) flushes the rear half and leaves the front lines where they are. This costs 2 cycles + the rear flush + 2 cycles.

Changing the line count at a **constant number of sets** doubles or halves the lines and the ways together, in one step:

- **Doubling.** Every line moves from old set `j`, way `w`, to line `j·2^(k+1) + w`, the lower half of its doubled set. Lines move highest first. Nothing is written back. This costs 2 + 3·L + 2 cycles.
- **Halving.** Each set keeps at most 2^(k−1) valid lines, packed to the front of the halved set. The others are written back if modified, then dropped. This costs 2 + 3·L + 2 cycles plus the write-backs. The kept lines depend on the strategy:
  - under LRU, only lines in the more recently used half of the ways are kept. The set's replacement word is read alongside each line, at no extra cost;
  - under the other strategies, the lowest valid ways are kept.

### Replacement strategy, write strategies, monitor mode

- **Replacement strategy.** A change clears all per-set replacement words, reusing nothing: 2 setup cycles, one cycle per set and 1 final cycle. That is 1027 cycles for 1024 sets. Stored data are untouched.
- **Write policy, allocation policy and monitor mode.** These are register values only. Such a change costs 4 cycles.

### Limits fixed at synthesis

- `NUM_LINES` — the block RAM depth.
- `MAX_ASSOC_LOG2` — the highest associativity (default 4, i.e. 16 ways).
- `MAX_REPL` — the most informed strategy built (default LRU). For example, setting it to pseudo-random removes the FIFO, pseudo-LRU and LRU state.

Requests beyond these limits are lowered to them. Pseudo-LRU and LRU also cap the associativity at 8.

## Software interface (`dcr_ctrl`)

The registers sit on the DCR bus at `BASE_ADDR` (default `10'h080`). Each is 32 bits wide.

| offset | register | meaning |
|---|---|---|
| 0 | control/status | write bit 0 = 1: "Done", start the reconfiguration; read: bit 0 busy, bit 1 finished |
| 1 | cache size | log2 of the lines in use (≤ log2 NUM_LINES) |
| 2 | line size | read only, log2 bytes per line = 3 |
| 3 | associativity | log2 ways, 0–4 |
| 4 | replacement | 0 random, 1 pseudo-random, 2 FIFO, 3 pseudo-LRU, 4 LRU |
| 5 | write policy | 1 write-back, 0 write-through |
| 6 | allocation | 1 write-allocate, 0 no-write-allocate |
| 7 | monitor mode | 0 off, 1 line record, 2 record with address |

The sequence is:

1. Software writes the new values.
2. Software writes "Done". The register block pulses `values_received` and shows busy.
3. The controller finishes its current request, starts the reconfiguration unit, and answers with `cc_done` when the unit is finished.
4. The status then reads "finished".

A DCR access is acknowledged one cycle after it is presented. When the block is not addressed, `dcr_dbus_in` passes through to `dcr_dbus_out`, as on a DCR daisy chain. A "Done" written while busy is ignored.

## Monitor (`monitor`)

Each completed access becomes one 41-bit record in the monitor output register. The record is valid for one cycle, and `mon_count` counts the records.

| bits | field |
|---|---|
| 40:11 | address bits 31:2 (mode 2 only, else zero) |
| 10:7 | way within the set |
| 6 | write |
| 5 | hit |
| 4:1 | first enabled byte of the access |
| 0 | valid |

The bit layout is this design's. A handler that stores the stream, for example into a BlockRAM area, is outside the cache.

## Ports of `plb_ddr_cc`

- **Request port** (from the processor-bus interface):
  - inputs `req_valid`, `req_we`, `req_addr[31:0]`, `req_be[7:0]`, `req_wdata[63:0]`;
  - outputs `req_ack`, `rsp_rdata[63:0]`;
  - the request is held until `req_ack`, which is high for one cycle with the read data.
- **Memory port** (to the DDR controller):
  - outputs `mem_req`, `mem_we`, `mem_addr[28:0]` (line address), `mem_be`, `mem_wdata`;
  - inputs `mem_ack`, `mem_rdata`;
  - the request is held until `mem_ack`.
- **DCR:** `dcr_abus[9:0]`, `dcr_dbus_in`, `dcr_read`, `dcr_write`, `dcr_ack`, `dcr_dbus_out`.
- **Observation:** `mon_rec`, `mon_count`, `active_cfg` (the configuration in force), `reconf_busy`.

Clock `clk`; synchronous active-high reset `rst`. After reset the configuration is: all lines, direct-mapped, write-back, write-allocate, random replacement, monitor off.

## Where this design goes beyond, or departs from, its source

The published design describes the blocks, the register count, the reconfiguration algorithms and their cycle counts. The following are choices made here:

- The line is one 64-bit word. A longer line (several words per line) and a change of line size are not built. The line-size register is read-only.
- Control words hold the full line address instead of a tag.
- Pseudo-LRU uses a 7-bit tree for 8 ways. The source quotes 10 bits per set without a layout.
- The schedules for halving the associativity, for growing and shrinking, and for changing lines and ways together are this design's. So are the rules that choose which lines are dropped, and the step order.
- The register map, encodings, base address, DCR timing, request/memory handshakes, reset configuration and monitor bit layout are this design's.
- The bus-interface core, the DDR controller, the processor and the monitoring handler are not part of the RTL.
- The processor's own caches and the benchmark program of the original evaluation are not reproduced. The test benches check function and cycle counts instead of program run times.

## Files

| file | contents |
|---|---|
| `rtl/rca_pkg.sv` | widths, configuration/control/monitor record types |
| `rtl/sp_bram.sv` | single-port block RAM |
| `rtl/cc_replacement.sv` | victim choice and replacement-word update |
| `rtl/cache_controller.sv` | request state machine |
| `rtl/reconfiguration.sv` | reconfiguration unit |
| `rtl/dcr_ctrl.sv` | DCR register file |
| `rtl/monitor.sv` | monitor output register |
| `rtl/plb_ddr_cc.sv` | top level |
| `tb/ddr_mem_model.sv` | behavioural main memory with fixed latency |
| `tb/tb_*.sv` | self-checking test benches, one per module |

## Simulating

Every test bench is self-checking. It ends by printing `TB_RESULT checks=<n> failures=<m>`, and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/rca_pkg.sv tb/tb_plb_ddr_cc.sv --top-module tb_plb_ddr_cc \
    --Mdir obj_top -o sim
./obj_top/sim
```

Replace the name for the other benches: `tb_rca_table1`, `tb_cache_controller`, `tb_reconfiguration`, `tb_cc_replacement`, `tb_dcr_ctrl`, `tb_monitor`, `tb_sp_bram`.

- **`tb_plb_ddr_cc`** runs the top at its default size (4096 lines, 16 ways maximum), with no parameter overrides, in well under a minute. It:
  - walks through every associativity, strategy and policy, and through size changes 4096 → 1024 → 4096, and lines and ways halved and doubled together;
  - compares every read with a reference memory image;
  - checks the cycle counts above: 10245 clean and 30725 dirty doublings, sets + 3 for a strategy change, 4 for a policy change, 9224 for growing from 1024 to 4096 lines;
  - counts each mechanism (hits, misses, partial-byte misses, write-through, no-allocate writes, dirty evictions, evictions under each strategy, waiting requests, rear-half write-backs, dropped lines, grow and shrink steps, monitor records), and fails if one never happened.
- **`tb_rca_table1`** runs a short test program under the twelve configurations of the original evaluation (1, 2, 4, 8 and 16 ways; write-through and write-back; with and without write-allocate; pseudo-LRU, FIFO, LRU and pseudo-random). It moves from one to the next by DCR reconfiguration, without a reset. The program uses first writes, overwrites with and without replacement, reads of kept and replaced lines, byte-valid misses and tag misses. For every phase, the hits (counted from the monitor stream) and the memory writes are checked against values derived from the configuration. It also checks that tag misses cost more cycles at each higher associativity, because the ways are searched one by one. It prints the cycles of each row.
- **`tb_reconfiguration`** includes a 1024-line instance that checks the 2565-cycle figure exactly.
- **`tb_cache_controller`** checks the `w + 2` hit latency and the FIFO and LRU victim choice.

The memory model `tb/ddr_mem_model.sv` acknowledges `LAT + 1` cycles after a request and stays busy for `LAT + 2` cycles. With the default `LAT = 7`, a memory write takes 9 cycles, which makes a dirty rear line cost 12 cycles.
