# Memory profiling unit: hardware-generated memory access profiles

An operating system that places pages across several kinds of memory (SRAM,
DRAM, Flash, ...) wants to know which pages are used most and which are used
least. Reading one counter per page and sorting in software is far too slow
when there are thousands of pages. The memory profiling unit (MPU) solves this
in hardware. It listens to the memory bus and counts every read and every
write per memory region. In the background it keeps short sorted lists of the
best candidates: the four most read, four least read, four most written and
four least written regions. The operating system reads a candidate with one
access instead of scanning all counters.

The unit never stalls the bus and accepts one memory reference per clock.

## Structure

```
 memory bus ──┬──> address monitors 0..15  (bank 0)  ──┐
 (address,    │                                        │  counter pairs
  read/write) └──> address monitors 16..31 (bank 1)  ──┤
                                                       v
                          update logic: 14-bit scan counter + multiplexer
                                                       │  profiling bus
                                                       │  (key, reads, writes)
                                       ┌───────────────┴───────────────┐
                                       v                               v
                            profiler 0 (keys of bank 0)     profiler 1 (keys of bank 1)
                            4 sorted lists                  4 sorted lists
                                       └───────────┬───────────────────┘
                                                   v
                                 profile selector ─> key + count of one entry
```

| file | module | role |
|---|---|---|
| `rtl/mpu_pkg.sv` | package | widths, `entry_t`, `prof_bus_t`, `mpu_events_t`, profile codes |
| `rtl/mpu.sv` | `mpu` | the top: 32 monitors, update logic, 2 profilers, read-out mux |
| `rtl/address_monitor.sv` | `address_monitor` | maps an address to a region and counts reads and writes |
| `rtl/ref_counter_block.sv` | `ref_counter_block` | 512 x 36-bit counter memory, increment port + query port |
| `rtl/update_logic.sv` | `update_logic` | scans all 16384 counter pairs onto the profiling bus |
| `rtl/topflop_profiler.sv` | `topflop_profiler` | four sorted lists over a key range, indexed read-out |
| `rtl/top4.sv` | `top4` | one sorted list of four key/value pairs (TOP4 or FLOP4) |

## Address monitors and regions

Each monitor covers 512 contiguous regions of equal size. It is configured by a
start address and a 5-bit size code `s`:

* each region is `2^s` bytes,
* the monitored range is `2^(s+9)` bytes, starting at the start address,
* an address `a` inside the range goes to counter `(a - start) >> s`.

Each monitor has two counter blocks, one for reads and one for writes.

The MPU fixes the monitors in two banks:

| bank | monitors | range (default) | per monitor | per region | size code |
|---|---|---|---|---|---|
| 0 | 0..15 | 0 .. 64 MiB | 4 MiB | 8 KiB | 13 |
| 1 | 16..31 | 0 .. 32 KiB | 2 KiB | 4 B | 2 |

The ranges may overlap. With the defaults, a reference below 32 KiB is counted
by both banks: coarsely in bank 0 and finely in bank 1. Parameters
`BANK0_BASE`, `BANK0_SIZE`, `BANK1_BASE` and `BANK1_SIZE` move and rescale the
banks. Monitor `m` of a bank starts at `BASE + m * 2^(SIZE+9)`.

### Keys

Every counter pair has a 16-bit global key, `{2'b0, monitor[4:0], index[8:0]}`.
Bank 0 owns keys 0..8191 and bank 1 owns keys 8192..16383. To turn a profile
key back into an address, take its monitor and index:
`start_of(monitor) + index * 2^size`.

## Counting at one reference per clock

A counter block is a 512-word memory. Every cycle it must do a
read-increment-write of one counter, and it must also read any other counter
for the scan. `ref_counter_block` keeps both jobs at full rate:

* The increment is pipelined. In cycle t the counter is read. In cycle t+1
  the value plus one is written back.
* A second increment of the same counter in cycle t+1 would read the old
  value, because the write has not happened yet. In that case the value being
  written is forwarded, so back-to-back references to one region are all
  counted.
* The query port is a separate synchronous read port. Its data comes one cycle
  after the index.

The memory therefore has one write port and two read ports. FPGA block RAMs
have only two ports. To get the extra port on such a target, run the block
RAM at twice the system clock: one internal cycle for the increment and one for
the query. This RTL leaves that to synthesis or to a wrapper; it is written
with a single clock.

After reset, each counter block writes zero to all 512 counters, one per cycle.
`oReady` goes high once this is done (512 cycles). References arriving
during the clear are not counted.

Counters are 36 bits wide and wrap around. Nothing handles saturation. If
needed, one fix is to halve all counters when one of them saturates; this
keeps the ratios between counters and so leaves the profiles unchanged. That
is not implemented here.

## Why the profiles are fed by a periodic scan

Consider a profiler that is told only about the counters that change. It can
find the most used region. It can never find a region that is never accessed,
because that region's counter never changes. So the update logic walks
through **all** counters continuously, whether they change or not. A 14-bit
roll-over counter runs through the keys:

* its low 9 bits go to every monitor as the query index;
* its high 5 bits pick the monitor whose answer goes on the profiling bus.

One full sweep takes 16384 cycles, and each profiler sees each of its 8192
keys once per sweep. A beat appears on the bus two clock edges after its
query index was applied: one edge for the monitor's read and one for the bus
register.

## The sorted lists (TOP4 / FLOP4)

`top4` holds four (key, value) pairs, best first. A TOP4 list ranks the
largest value first. A FLOP4 list ranks the smallest value first. Each cycle
it takes one incoming pair and finds two things:

* **key position**: the slot that already holds this key, or none;
* **value position**: where the new value ranks. A key already in the list
  is ranked against the other three entries. A new key is ranked against all
  four entries and may fail to make the list.

Those two numbers select the next list contents:

| key in list? | value position | result |
|---|---|---|
| no | none | unchanged |
| no | v | new pair at slot v; slots v.. move down one; the last entry drops out |
| at k | v = k | value updated in place |
| at k | v < k | updated pair to slot v; slots v..k-1 move down one |
| at k | v > k | updated pair to slot v; slots k+1..v move up one |

This covers all 21 cases of the original transition table. Ranking is the only
part that differs between TOP and FLOP, so both use the same transition logic.

Tie-break rules, chosen for this design:

* a new key must beat an equal value to enter the list;
* a known key keeps its order among entries of equal value;
* empty slots (after reset) rank below everything, and `oValid` marks the
  filled slots.

Concurrent assertions in `top4` check the list after every clock: filled
slots come first, they are sorted, and no key appears twice. Simulate with
assertions enabled (`--assert` in Verilator) to use them.

Consider a key that is in the list but whose value no longer ranks. It does
not leave the list; it moves to the last slot. A key that did not make the
list may not have been able to enter while other entries held stale values.
Because every key comes by once per sweep, the lists are exact again two full
sweeps after the counts stop changing. While references keep arriving, the
lists follow the counts with that delay.

## Profiler and read-out

`topflop_profiler` feeds four lists from the profiling bus. It only takes beats
whose key lies in its inclusive range `[iStartKey, iEndKey]`:

| `iProfile[3:2]` | profile |
|---|---|
| 0 | most read (TOP4 of read counts) |
| 1 | least read (FLOP4 of read counts) |
| 2 | most written (TOP4 of write counts) |
| 3 | least written (FLOP4 of write counts) |

`iProfile[1:0]` selects the slot; slot 0 is the most (or least) referenced.
The selected entry is registered at the next clock edge.

In the MPU, `iProfile[4]` selects profiler 0 (bank 0) or profiler 1 (bank 1),
and the rest of the index goes to both profilers. So `oProfileKey` and
`oProfileValue` hold the entry for `iProfile` one clock edge after it is
applied. `oProfileValid` is low for a slot that holds nothing yet.

## Top-level interface (`mpu`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `iAccessValid` | in | 1 | a memory reference takes place this cycle |
| `iAddress` | in | 32 | its physical address |
| `iWriteAccess` | in | 1 | 1 = write, 0 = read |
| `iEnableMonitoring` | in | 1 | count references (gates `iAccessValid`) |
| `iEnableProfiling` | in | 1 | run the scan; when low, the lists hold still |
| `iProfile` | in | 5 | profiler, profile and slot to read |
| `oProfileKey` | out | 16 | key of that entry |
| `oProfileValue` | out | 36 | its count |
| `oProfileValid` | out | 1 | the slot holds an entry |
| `oReady` | out | 1 | counters cleared after reset; the scan starts then |
| `oEvents` | out | 6 | per-cycle flags: range hit, forwarding, sweep wrap, profile update, list insert, list move |

There is no bus slave for the system bus. To let software read profiles with
load instructions, connect the address of a small register window to
`iProfile` and return `{oProfileValid, oProfileKey, oProfileValue}` as data;
the one-cycle latency fits an ordinary registered read. The monitor ranges are
set by parameters rather than by registers.

## Size

With the defaults, the design has 64 counter memories of 512 x 36 bits
(1,179,648 bits). On an FPGA that is 64 block RAMs of 18 Kibit. The rest is
small: about 3,900 flip-flop bits in the increment pipelines, the eight sorted
lists (4 entries of 53 bits each), the scan counter and the output registers.

## Departures from the original design and own choices

* The counter memory uses a single clock with two read ports and a pipelined,
  forwarded increment, instead of a dual-port RAM run at twice the clock.
  The behaviour seen at the ports is the same: one increment and one query
  per cycle.
* Added ports: `iAccessValid`, `oReady`, `oProfileValid`, `oEvents`,
  `oHit`/`oBypass` on the monitor, `oValid`/`oInsert`/`oMove` on the lists and
  valid flags on the buses. The original treats `iEnableMonitoring` and
  `iEnableProfiling` only by name; here they gate counting and scanning.
* `iProfile[4]` selects the profiler; the original does not say how the five
  bits divide.
* Reset behaviour (clear sweep, empty lists), the tie rules and all pipeline
  registers are this design's own choices.
* Not included: the memory-mapped register slave, runtime configuration
  registers for monitor ranges, and counter saturation handling.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_ref_counter_block` | clear sweep length, random increments with back-to-back hits, query latency and independence |
| `tb_address_monitor` | three range configurations, range boundaries, hit flag, every counter against a model |
| `tb_top4` | TOP4 and FLOP4 against a queue model, sortedness, all 21 table cases, a directed insertion |
| `tb_topflop_profiler` | exact lists after two sweeps of fixed counts, key range filtering, read-out latency |
| `tb_update_logic` | key order, data alignment, two-edge latency, wrap pulse, enable |
| `tb_mpu` | whole unit at default size: mixed traffic, monitoring and profiling switched off, all 32 profile entries checked; every mechanism must occur |
| `tb_untouched_regions` | never-referenced regions among thousands of referenced ones must be exactly the least-read and least-written candidates of both banks |

`tb_mpu` runs the design with every parameter at its default.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/mpu_pkg.sv tb/tb_mpu.sv --top-module tb_mpu -o sim
./obj_dir/sim
```

Put the package first. The other files are found by their module name through
`-y`. To lint the design:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/mpu_pkg.sv rtl/mpu.sv --top-module mpu
```

This only warns that a few package constants are unused in some modules.
