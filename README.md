# Memory-based computing for a multicore: integer add and multiply by table lookup

On a chip made in a scaled process, an integer adder or multiplier can fail. A
manufacturing defect can kill it, process variation can make it miss timing, or
it can get too hot to be used. The embedded memories next to it are easier to
protect: redundancy and remapping handle bad SRAM cells. This design keeps such
a core working. When a functional unit may not be used, the issue stage sends
the add or multiply to a small piece of *glue logic*, which computes it from
precomputed result tables (lookup tables, LUTs) held in the memory hierarchy:

* each core has a private **L1 MBC cache** ("MBC" = memory-based computing)
  for the table words it uses most;
* all cores share an **L2 MBC cache**, so a table word fetched by one core is
  on chip for the others;
* the tables themselves are in **main memory**. The operating system loads
  them page by page on demand, like any other data.

Software sees no difference: an operation gets the same result, only later.

This repository has synthesizable SystemVerilog for the MBC part of such a
multicore. That part is the bypass decision in the issue stage, the glue logic
with its comparator, priority encoder and shifter, the LUT address formation,
a translation table for the LUT pages, the L1 and L2 MBC caches, and the top
level that wires N cores to the shared L2. Behavioural models of main memory
and of the operating system's page-fault path are in `tb/`. Also outside the
RTL: the rest of each processor core, its conventional instruction and data
caches, and the conventional L2.

## How an operation is computed

### Addition: bit slices and carry select

A 32-bit addition is cut into four 8-bit slices. For every slice pair
(Xi, Yi), one ADD-table word holds **both** possible answers:

```
ADD word = {14'b0, c1, s1[7:0], c0, s0[7:0]}
  s0, c0 = sum and carry out of Xi + Yi
  s1, c1 = sum and carry out of Xi + Yi + 1
```

The words come back slice 0 first. The carry out of slice i-1 then picks the
carry-in-0 or the carry-in-1 half of slice i's word: a carry-select adder in
which the table replaces the two 8-bit adders of each slice. The only logic
left is a 2:1 multiplexer per slice. The carry out of slice 3 is the carry out
of the whole addition. Each core reports it as `out_carry` next to the result,
and it has the same value when an adder computes the sum.

Three rules keep the number of lookups small:

* **Zero operand.** If a or b is 0, the result is the other operand. It is
  ready one cycle later and costs no lookup.
* **Narrow operands.** A priority encoder finds the width of `a | b` in
  slices, n = 1..4. Only n slices are looked up. A carry out of the top slice
  becomes the next result bit. Many integer operands in real programs are
  8 bits wide or less, so n is often 1.
* **Commutativity.** F(x, y) = F(y, x), so the word address puts the larger
  slice in the high byte: `{table, max(x,y), min(x,y)}`. Only half of each
  table is ever referenced, loaded or cached.

### Multiplication: partial products through the same tables

The MUL table holds the 16-bit product of every 8x8 slice pair. A 32-bit
comparator puts the larger operand first. The priority encoder gives the
slice counts of both operands. For each slice pair (i of the larger, j of the
smaller) with i + j < 4, the glue logic does three steps:

1. looks up Xi*Yj;
2. shifts it left by 8*(i+j) with the 32-bit shifter;
3. adds it to the running product with the table-based addition above.

The first partial product is added to 0, which needs no lookup. The result is
the low 32 bits of a*b, so the same bits come out for signed and unsigned
operands. A full 32x32 multiply needs 10 product lookups plus their additions.
An 8x8 multiply needs one lookup.

### Timing

There is one lookup port, and an L1 MBC hit answers the next cycle at one word
per cycle. When every word hits in L1, an add with n significant slices
finishes **n cycles after issue**, so 4 cycles at full width. A zero operand
takes 1 cycle. An L1 miss that hits in L2 adds a few cycles. An L2 miss also
adds the main-memory latency. A LUT page that is not yet translated stalls the
lookup until the operating system provides the translation. The working
functional units answer in 1 cycle.

## The memory side: virtual LUT addresses, pages and caches

The glue logic issues **virtual** word addresses, 17 bits wide:
`{table bit, high slice, low slice}`. They are grouped into 1024-word pages,
so the upper 7 bits are the virtual page number (VPN). The ADD table uses
pages 0-63 and the MUL table pages 64-127.

`mbc_map_table` is each core's translation buffer for those pages. It has
32 entries, is fully associative, and looks up in the same cycle as the
request. On a miss it raises `map_miss` with the VPN and holds the lookup.
The operating system handles this as a page fault: the first time any core
touches a page, it loads that page of the table into a free physical page.
It then writes the translation through `map_fill_*`. Translations are
replaced round-robin. The physical word address is 24 bits:
`{PPN[13:0], offset[9:0]}`.

`mbc_cache` is a read-only, direct-mapped cache with one word per line.
Nothing ever writes the tables from the core side. Hits stream at one per
cycle. A miss blocks the cache until the next level answers. It is used as
the L1 MBC cache (1024 words per core) and, inside `mbc_l2_shared`, as the
L2 MBC cache (16384 words). `mbc_l2_shared` puts a round-robin arbiter in
front of it, with one request in flight at a time. `mbc_flush` invalidates
every MBC cache and every translation, for example when the operating system
unloads or moves the tables.

When the stage first bypasses an operation kind after reset, it pulses
`os_load_req[ADD]` or `os_load_req[MUL]`. This asks the operating system to
make that table available.

## The bypass decision

`mbc_issue_bypass` models one core's integer execution stage, with
`N_ADD` = 6 adders and `N_MUL` = 2 multipliers. Each unit has a defect
flag. The stage has one 8-bit temperature input, in °C, for the whole integer
execution unit. An operation goes to the lowest-numbered working unit of its
kind. It goes to the glue logic instead when no unit of that kind works, or
when the temperature is **above** `TEMP_TH` = 100 °C. At exactly 100 °C the
units are still used. The stage issues one operation at a time and stalls
while an operation is in the MBC path. `out_via_mbc` says which path produced
a result.

## Modules

| file | role |
|---|---|
| `rtl/mbc_pkg.sv` | widths, operation enum, ADD word struct, `lut_word()` (the table contents) |
| `rtl/mbc_multicore.sv` | **top**: `N_CORES` × `mbc_core_path` + `mbc_l2_shared` |
| `rtl/mbc_core_path.sv` | one core: issue/bypass → glue logic → mapping table → L1 MBC cache |
| `rtl/mbc_issue_bypass.sv` | functional units or MBC; defect and temperature rules; OS indication |
| `rtl/mbc_glue_logic.sv` | sequencing of slice lookups, carry select, partial products |
| `rtl/mbc_operand_align.sv` | 32-bit comparator (larger operand first) |
| `rtl/mbc_width_encoder.sv` | 32-bit priority encoder (width in bits and in slices) |
| `rtl/mbc_shifter.sv` | 32-bit shifter for partial-product weight |
| `rtl/mbc_lut_addr.sv` | slice pair → virtual LUT word address |
| `rtl/mbc_map_table.sv` | LUT page translation buffer |
| `rtl/mbc_cache.sv` | read-only LUT cache (L1 MBC, and the array of the L2 MBC) |
| `rtl/mbc_l2_shared.sv` | shared L2 MBC cache with round-robin arbiter |

The top-level parameters and their defaults are `N_CORES` = 2, `N_ADD` = 6,
`N_MUL` = 2, `TEMP_TH` = 100, `L1_DEPTH` = 1024, `L2_DEPTH` = 16384 and
`MAP_ENTRIES` = 32. Per-core ports are indexed by core. One-bit signals are
packed vectors with bit c for core c, and wider signals are unpacked arrays. The
main-memory port (`mem_*`) is valid/ready for requests, and the response is a
`mem_resp_valid` pulse that cannot be refused. Every module uses an
active-low asynchronous reset `rst_n` and clock `clk`.

Table contents are given by the formula in `mbc_pkg::lut_word()`: for the ADD
table, the two 9-bit sums x+y and x+y+1; for the MUL table, x*y. The
main-memory model computes words with this function instead of storing them.

## Where this design departs from, or adds to, the scheme it implements

* **Table word size.** Each ADD word holds both carry-in results (18 bits,
  stored in a 32-bit word). The referenced half of the ADD table is 32896
  words, which is 128.5 KiB at 32 bits per word (74 KiB if packed at 18
  bits). The scheme quotes 64 KB for it, which would be about 2 bytes per
  slice pair. This design keeps the one-lookup-per-slice structure instead.
* **One lookup per cycle.** The four slice lookups go one after another
  through one cache port (4 cycles at full width). They are not issued to
  parallel banks.
* **Multiply schedule.** The order of the partial products, adding them
  through the ADD table, skipping pairs above bit 31, and the zero shortcut on
  each addition are this design's choices. The scheme names only the
  comparator, shifter and priority encoder.
* **Single-issue stage.** In the scheme's defect experiment, 4 of 6 adders
  and 1 of 2 multipliers are broken. In an out-of-order core, operations that
  would have gone to the broken units are sent to memory while the others keep
  working. This stage issues one operation at a time, so it needs memory only
  when every unit of a kind is unusable. The sharing of work between working
  units and MBC is not modelled.
* **Dedicated MBC caches.** The L1 and L2 MBC caches are separate memories.
  The alternative of partitioning the L1 data cache and the L2 cache is not
  built, because the conventional caches are not part of this RTL.
* **Own choices where the scheme is silent:** cache sizes and organisation,
  the size and policy of the mapping table, page size, address widths, the
  8-bit temperature input, handshakes, reset, arbitration, and the
  `os_load_req` pulse.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`, and a watchdog ends
a run that hangs. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mbc_pkg.sv tb/tb_mbc_multicore.sv --top-module tb_mbc_multicore -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_mbc_multicore` | the whole design at its default parameters. Two cores run together through five phases: healthy; 4/6 adders and 1/2 multipliers defective; one core hot and one fully defective; after a flush; repaired. Every result and path is checked, the 4-cycle full-width add is checked, and each mechanism must occur at least once (thermal and defect bypass, zero shortcut, narrow add, MBC multiply, page fault, L1/L2 hit and miss, L2 contention, OS request, flush) |
| `tb_mbc_multicore_4core` | the same with `N_CORES` = 4 |
| `tb_mbc_thermal_workload` | thermal management at the default parameters: a thermal model heats each core's integer unit by 0.6 °C per operation done in a unit and cools it towards 85 °C. With operand widths skewed towards narrow values and operand reuse, work must move to memory and back hundreds of times, and the temperature must stay below 103 °C. Reports the share of operations done in memory and the cycles per operation |
| `tb_mbc_core_path` | one core against main memory: first and repeated full-width add latency (4 cycles once cached), defect and thermal bypass, threshold edge |
| `tb_mbc_glue_logic` | 5000 random and directed adds and multiplies; exact cycle and lookup counts; random back-pressure and response delays |
| `tb_mbc_issue_bypass` | path and unit choice under random defect masks and temperatures 90-110 °C, stall, one OS request per kind |
| `tb_mbc_cache`, `tb_mbc_l2_shared`, `tb_mbc_map_table` | hit/miss behaviour, streaming, eviction, flush, routing, round robin, replacement |
| `tb_mbc_width_encoder`, `tb_mbc_operand_align`, `tb_mbc_shifter`, `tb_mbc_lut_addr` | the small combinational units |

`tb/mbc_main_memory.sv` is a main memory with a fixed latency of 10 cycles.
It knows which table page the operating system put in each physical page.
`tb/mbc_os_pager.sv` answers mapping-table misses after 20 cycles and serves
the cores in turn. Both models are behavioural and not part of the design.

Every testbench runs in about a second or less. The streams use random
operands, which touch many table pages, so the 32-entry mapping table and the
L1 MBC caches miss far more often than they would with real programs. The
cycle counts these testbenches report are therefore pessimistic.

For scale, here is one run of `tb_mbc_thermal_workload`, two cores with 4000
operations each. About 8 % of the operations went to memory, and each core
crossed the threshold about 500 times. The peak temperature was 102.1 °C.
The average was about 18 cycles per operation, compared with 1 cycle for a
functional unit. Most of that time is mapping-table refills at 20 cycles each
and main-memory reads at 10 cycles each, because the L1 MBC hit rate on these
operands is only about 22 %. Operands that repeat more, as in real programs,
and a larger mapping table both lower that figure. These numbers describe the
test streams, not a benchmark.
