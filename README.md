# Low-power access schemes for a four-way set-associative cache

A conventional four-way set-associative cache reads the tag and the data
of all four ways of a set on every access. At most one way can hold the
requested line, so at least three of the four data reads are wasted. The
data sub-arrays are also far larger than the tag sub-arrays: a 256-bit line
against a 20-bit tag. Nearly all of the access energy goes into reading SRAM
sub-arrays, so the energy of an access can be taken as

    E ≈ N_tag · E_tag + N_data · E_data,   with E_tag ≈ 0.078 · E_data (20/256)

where N_tag and N_data are the numbers of tag and data sub-arrays activated.

This RTL implements three caches that lower N_tag and N_data in three
different ways:

| module | idea | latency (request to result) |
|---|---|---|
| `phased_parallel_cache` | all four tags in cycle 1, then only the hit way's data in cycle 2 | 2 cycles |
| `phased_sequential_cache` | one tag per cycle starting at way 0, stop at the first hit, then only that way's data | 2 cycles (way 0) to 5 cycles (way 3 or a miss) |
| `precheck_parallel_cache` | one-cycle parallel access, but a way whose line is invalid is not activated at all | 1 cycle |

`cache_arch_top` places the three side by side so that one access stream
can be run through all of them and compared.

## Cache geometry

All three caches are the same 16 KB cache:

* 4 ways, 32-byte lines, so 16384 / (32 · 4) = 128 sets;
* 32-bit byte address, split as tag `[31:12]` (20 bits), set index
  `[11:5]` (7 bits) and byte offset `[4:0]` (5 bits);
* an 8-bit processor word, so a lookup returns one byte.

Each way has a 128 × 20 tag sub-array, a 128 × 256 data sub-array (both
`sram_subarray`) and 128 valid bits. The valid bits of all ways are held
together in one `valid_bank` of flip-flops. They are read combinationally:
a 7-to-128 decoder (`index_decoder`) selects the set, and each way ANDs its
valid bits with the decoder lines. This lets the pre-check cache know the
valid bits of a set in the request cycle, before it enables any SRAM.

The geometry is set by parameters (`ADDR_W`, `TAG_W`, `INDEX_W`,
`OFFSET_W`, `WAYS`, `WORD_W`, `LINE_W`) whose defaults come from
`cache_pkg`. `TAG_W` must equal `ADDR_W - INDEX_W - OFFSET_W`, and `LINE_W`
must equal `WORD_W << OFFSET_W`. The fill port `fill_way` is 2 bits wide
for four ways.

## The SRAM model and what "activated" means

`sram_subarray` is a single-port synchronous memory with a chip enable.
With `ce` low it does nothing. With `ce` high it writes on the clock edge
(`we` = 1), or it copies the addressed word into its output register
`rdata` (`we` = 0). `rdata` holds between reads, so it serves as the buffer
that keeps a read tag or line available for later cycles of the same
access. One cycle with `ce` high counts as one activation. Every cache
brings out its per-way enables as `tag_ce[3:0]` and `data_ce[3:0]`, so
N_tag and N_data can be counted directly in simulation.

## The three access schemes

Cycles are counted from the cycle in which the request (`en && read`) is
presented. "Edge k" is the k-th rising clock edge after the request was
first presented. `done` pulses in the cycle after the last edge of an
access.

### Phased parallel (`phased_parallel_cache`)

* **Edge 1.** All four tag sub-arrays are read. The address fields and the
  set's four valid bits are registered. `busy` goes high.
* **Cycle 2.** Four comparators (`way_hit`: tag equality AND valid) give a
  one-hot hit vector. Only the data sub-array of the hit way is enabled.
  On a miss, no data sub-array is enabled.
* **Edge 2.** That one line is read. `done` pulses. `tag_hit` and `out`
  (the byte selected by the offset through `byte_select`) are valid and
  stay until the next lookup.

Per lookup: N_tag = 4 and N_data = 1 on a hit, 0 on a miss. A conventional
parallel cache has N_data = 4.

### Phased sequential (`phased_sequential_cache`)

A 2-bit way counter selects which way is examined.

* **Edge 1.** Only the tag sub-array of way 0 is read. The counter is 0.
* **Each later cycle.** The counter's tag, with its valid bit, is compared
  with the requested tag.
  * On a hit, the data sub-array of that way is read on the next edge,
    and `done` follows.
  * On a miss with ways left, the next way's tag sub-array is read on the
    next edge and the counter increments.
  * On a miss at way 3, `done` follows with `tag_hit` = 0. No data
    sub-array is read.

| hit in way | tag reads | data reads | cycles |
|---|---|---|---|
| 0 | 1 | 1 | 2 |
| 1 | 2 | 1 | 3 |
| 2 | 3 | 1 | 4 |
| 3 | 4 | 1 | 5 |
| miss | 4 | 0 | 5 |

This is the lowest-energy scheme and the slowest. Lines placed in low ways
are found fastest, because the search always starts at way 0.

### Parallel with valid-bit pre-check (`precheck_parallel_cache`)

* **Request cycle.** The set's valid bits come out of `valid_bank`. Both
  sub-arrays of each valid way are enabled; invalid ways are left off.
* **Edge 1.** The enabled tags and lines are read. Which ways were read is
  registered, so a way that was left off cannot produce a hit from its old
  buffer contents. `done` pulses. The comparators select the hit line, and
  `out` and `tag_hit` are valid.

Per lookup, N_tag = N_data = the number of valid lines in the set, from 0
to 4. The cache behaves as a 0- to 4-way cache on each access and keeps
the one-cycle latency. It saves energy only while sets are not full, for
example after a cold start or after `clr`. Once every line of a set is
valid, it is a conventional parallel cache. `busy` is always 0 in this
design.

## Interface (identical for the three caches)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `clr` | in | 1 | synchronous clear: all valid bits, the result and the controller |
| `en` | in | 1 | enable. Nothing starts while it is low |
| `read` | in | 1 | with `en`: start a lookup of `CPU_address` |
| `CPU_address` | in | 32 | byte address |
| `fill` | in | 1 | with `en` and not `read`: load a line |
| `fill_way` | in | 2 | way to load |
| `fill_line` | in | 256 | line to load; byte *k* is bits `[8k+7:8k]` |
| `out` | out | 8 | the addressed byte; 0 after a miss |
| `tag_hit` | out | 1 | the last lookup hit |
| `done` | out | 1 | one-cycle pulse: `out`/`tag_hit` now hold the new result |
| `busy` | out | 1 | an access is in progress; requests are not accepted |
| `tag_ce`, `data_ce` | out | 4 | per way: that sub-array is activated in this cycle |

Rules:

* A fill takes one cycle. It writes the tag field of `CPU_address` and
  `fill_line` into way `fill_way` of the addressed set, and sets the
  valid bit.
* The cache has no replacement policy and no connection to main memory.
  The surrounding system decides which way to fill after a miss.
* No set may hold the same tag in two ways. The parallel caches assert
  that at most one way hits.
* The phased caches assert that no request is made while `busy` is high.
* Assert `clr` once before use. The SRAM contents and buffers are not
  reset, but `clr` marks everything invalid.

`cache_arch_top` brings out these ports three times, prefixed `pp_`, `ps_`
and `vp_`, with one shared `clk`.

## What is specified and what was chosen here

The following come from the reference design:

* the three access schemes;
* the cache geometry and address split;
* the comparator-and-valid AND per way, and the decoder ANDed with the
  valid bits;
* the port names `CPU_address`, `clk`, `clr`, `en`, `read`, `out` and
  `tag_hit`;
* the latencies: 1 cycle for the pre-check cache, 2 for phased parallel,
  and 2 to 5 for phased sequential.

The reference describes lookups only. The following are this
implementation's own choices:

* **Loading.** The `fill` port exists because the reference gives no way
  to load lines.
* **Handshake.** `done`/`busy` were added because the latency varies.
* **Activity outputs.** `tag_ce`/`data_ce` make the energy measure visible.
* **`clr`.** It is a synchronous invalidate-all.
* **Miss timing.** A miss takes 2 cycles in the phased parallel cache and
  5 in the phased sequential cache, and returns 0 on `out`.
* **SRAM model.** Reads are registered (synchronous).
* **Valid bits.** They are kept in flip-flops, one per line (128 per way).
* **Sequential search.** The phased sequential cache reads only the
  counter's tag sub-array in each cycle, not all four tags behind a
  multiplexer. That is what makes its tag reads sequential.

Not included:

* the conventional parallel and conventional sequential caches, which
  serve only as the baselines the three schemes are measured against;
* write hits, write policies (write-through or write-back, dirty bits),
  replacement, and miss refill, none of which the reference specifies for
  these caches.

## Measured activations

`tb/tb_cache_arch_top.sv` runs the same 632-lookup stream through the
three caches. The stream has a cold start, sets filled with 0 to 4 lines,
loop-like walks over resident lines, misses, replacements and a final
`clr`. It reports these activation totals:

| design | tag reads | data reads | relative SRAM energy (E_tag = 0.078 E_data) |
|---|---|---|---|
| conventional parallel (4 + 4 per lookup, computed) | 2528 | 2528 | 1.00 |
| phased parallel | 2528 | 488 | 0.25 |
| phased sequential | 1784 | 488 | 0.23 |
| parallel with pre-check | 1940 | 1940 | 0.77 |

These figures cover SRAM activations only. They leave out the
comparators, multiplexers and control. They depend on the stream, and
above all on how full the sets are for the pre-check cache. They are not a
power measurement of any implementation.

## Files

* `rtl/cache_pkg.sv`: default geometry and the `addr_t` address struct.
* `rtl/sram_subarray.sv`: tag or data sub-array.
* `rtl/index_decoder.sv`, `rtl/valid_bank.sv`: valid bits with decoded
  read.
* `rtl/way_hit.sv`: comparator AND valid.
* `rtl/byte_select.sv`: offset multiplexer.
* `rtl/phased_parallel_cache.sv`, `rtl/phased_sequential_cache.sv`,
  `rtl/precheck_parallel_cache.sv`: the three caches.
* `rtl/cache_arch_top.sv`: the three side by side.
* `tb/tb_<module>.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`. The three cache testbenches compare
  every lookup (byte, hit, latency, and exactly which sub-arrays were
  enabled) with a reference model of the contents.
  `tb/tb_cache_arch_top.sv` runs the whole top at its default size.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/cache_pkg.sv \
        tb/tb_cache_arch_top.sv --top-module tb_cache_arch_top -o sim
    ./obj_dir/sim

Replace `cache_arch_top` with any other module name to run that module's
testbench. Every testbench runs at full size in well under a second. Each
has a cycle watchdog that ends the run with a failure.
