# Single-way-selective (SWS) set-associative data cache

A conventional 4-way set-associative cache reads all four data ways (and all
four tags) on every access, then throws three of the four results away through
a way multiplexer. Most of the access energy goes into bitlines and sense
amplifiers of those discarded ways. This cache reads only **one** data way and
**one** tag per access. It still has the hit rate of a 4-way cache and needs
no extra cycle.

The trick is a small extra array and a constraint on where blocks may be
placed:

* Every block also keeps a **mini-tag**: the four least significant bits of
  its tag.
* The cache **never lets two blocks of the same set share a mini-tag**.

Under that rule the four mini-tags of a set are all different. Comparing them
with the request's mini-tag therefore names at most one way, and that way is
the only place the requested block can be. This is an exact selection, not a
prediction. A wrong guess cannot happen, so there is no second probe and no
variable latency. Only the selected way gets a data wordline. Only the selected
way's full tag is read, to confirm the hit.

The RTL is parameterized. Its defaults are the configuration described here:
16 KB, 32-byte lines, 4 ways, 128 sets, 4-bit mini-tags, 32-bit addresses.

## Address fields

```
 31                12 11         5 4      0
+--------------------+------------+--------+
|        tag (20)    | index (7)  | offset |
+--------------------+------------+--------+
              [15:12] = mini-tag (low 4 tag bits)
```

Bits [4:2] of the offset pick the 32-bit word within a line.

## Keeping mini-tags unique: the allocation rule

The rule is enforced only when a block is brought in, by `sws_victim_select`.
On a miss in set *s* for tag *T*:

1. If a valid block of set *s* has mini-tag `T[3:0]`, **that block is the
   victim**, whatever its age and even if another way is empty. Keeping it next
   to the new block would leave two equal mini-tags in the set.
2. Otherwise, the lowest-numbered empty way is used.
3. Otherwise, the replacement policy chooses. `REPL_RR` (the default) keeps a
   2-bit round-robin pointer per set and advances it each time it is used.
   `REPL_RANDOM` uses a 16-bit LFSR (x^16+x^14+x^13+x^11+1).

Rule 1 turns the cache, for blocks with equal low tag bits, into a
direct-mapped cache. Such blocks fight for one way even when other ways of the
set hold unrelated data. The bet is that blocks mapping to the same set rarely
share their low tag bits, because nearby data differ in exactly those bits.
Published results for this scheme on embedded benchmarks show an average
miss-rate increase of about 0.1 % with random replacement and 0.2 % with LRU,
against an ordinary 4-way cache.

The bet can be lost. Data structures placed a multiple of 64 KB apart have
equal index bits and equal mini-tags. They must then share one way of each
set, even though the other three ways are free. `tb_sws_cache_workloads`
shows this case (`vec64k` below).

LRU is a poor fit for this cache. Rule 1 often overrides it, so the cache
offers only round-robin and random.

The rule also has to cover refills and the lookup that follows them. The new
block always goes into the way chosen above. Its mini-tag is written into the
mini-tag array in the same cycle as its data and tag. Nothing else writes
mini-tags, so the invariant holds at all times. `sws_way_select` asserts it on
every lookup.

## The lookup path

```
            index ──► sws_index_decoder ──► wordline[127:0] ──┐
                                                               ▼
 mini-tag, index ──► sws_way_select ──► match[3:0] ──► sws_gated_wordline
   (mini-tag array + 4 comparators)       (one-hot)            │ gated_wl[w][r] = wordline[r] & match[w]
                                                               ▼
                                          sws_data_array: only way w with a raised
                                          wordline is read/written; ways OR-ed, no mux
 tag, index, match ──► sws_tag_array: reads only way `match`, compares full tag ──► hit
```

* **Way selection** (`sws_way_select`). This is a small RAM of 4 x 128 entries
  of 4 bits plus a valid bit, with one equality comparator per way. The valid
  bit is part of the comparison, so an empty way never matches.
* **Gated wordline** (`sws_gated_wordline`). Each data-array way has its own
  copy of every wordline. Way *w*'s copy is the decoder wordline ANDed with
  comparator hit *w*. The three unselected ways see no wordline, so their
  bitlines and sense amplifiers stay idle.
* **Data array** (`sws_data_array`). There is one bank per way. The read
  outputs of the banks are ORed, because only the enabled bank drives a
  non-zero value. This models the removal of the way multiplexer from the read
  path. Writes take a byte mask: a 4-byte store writes only its bytes, and a
  refill writes the whole line.
* **Tag check** (`sws_tag_array`). Only the selected way's tag, valid and dirty
  bits are read, and its full 20-bit tag is compared. The data is already on
  its way out while the tag is checked. A failed check (a miss) cancels the
  response. If no mini-tag matched, no way is enabled and the access is
  certainly a miss.

A hit therefore activates exactly one data way and one tag way. A miss
activates one way or none. The top level exports `data_way_en` and
`tag_way_en` so this can be observed and counted.

## Miss handling and timing (`sws_cache`)

The controller allows one outstanding miss and uses write-back with
write-allocate.

| state    | what happens |
|----------|--------------|
| `IDLE`   | Accepts a request (`cpu_req_ready`=1) and looks it up in the same cycle. On a hit, a store writes its bytes and sets the dirty bit, and the response register loads. On a miss, the request and the chosen victim are latched. |
| `EVICT`  | Reads the victim's tag and dirty bit, and its data through the gated wordline. If the victim is valid and dirty, the line is written back (`mem_req_we`=1). |
| `REFILL` | Sends the line read request. |
| `WAIT`   | When `mem_rsp_valid` arrives, writes the line, tag (clean) and mini-tag into the victim way, and advances the round-robin pointer if the policy chose the victim. |
| `REPLAY` | Looks the latched request up again. It now hits, and a store is merged into the line here. |

Latency is counted from the cycle in which the request is accepted to the
cycle in which `cpu_rsp_valid` is high:

* a hit takes 1 cycle, and back-to-back hits run at one per cycle;
* a miss takes L + 4 cycles, where L is the memory's read latency. For the
  22-cycle memory of the reference system (13+3+3+3 cycles),
  a miss takes 26 cycles. This holds when the memory accepts at once; a
  write-back that is accepted at once adds no cycle.

Array reads are combinational within the cycle. The single-cycle hit therefore
assumes that the whole lookup path (mini-tag array and compare, then gated data
wordline, then data read) fits in one clock period. The case for this design
is that the mini-tag path, a 7-bit decode, a 4-bit array and a 4-bit compare,
finishes while the much larger data array is still decoding. It then replaces
the tag-compare, way-mux and output-driver path of a conventional cache, and
so does not lengthen the access. Reported circuit estimates for a 0.13 µm
process put the conventional path at about 0.92 ns and the SWS path at about
0.91 ns. RTL cannot show this; it depends on the SRAM implementation.

## Interfaces of the top level

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears valid, dirty, round-robin pointers) |
| `cpu_req_valid` / `cpu_req_ready` | in / out | 1 | request handshake |
| `cpu_req_we`, `cpu_req_addr`, `cpu_req_wdata`, `cpu_req_be` | in | 1, 32, 32, 4 | store flag, byte address, store data, byte enables |
| `cpu_rsp_valid`, `cpu_rsp_rdata` | out | 1, 32 | one pulse per accepted request; load data |
| `mem_req_valid` / `mem_req_ready` | out / in | 1 | line request handshake |
| `mem_req_we`, `mem_req_addr`, `mem_req_wdata` | out | 1, 27, 256 | write-back (1) or refill read (0), line address, line data |
| `mem_rsp_valid`, `mem_rsp_rdata` | in | 1, 256 | refill line, one pulse per read |
| `data_way_en`, `tag_way_en` | out | 4 | ways activated this cycle |
| `events` | out | `sws_events_t` | one-cycle pulses: `hit`, `miss`, `victim_minitag`, `victim_invalid`, `victim_policy`, `writeback` |

Parameters of `sws_cache`: `ADDR_W` (32), `CACHE_BYTES` (16384), `LINE_BYTES`
(32), `WAYS` (4), `MINI_W` (4) and `REPL` (`REPL_RR` or `REPL_RANDOM`). The set
count and field widths are derived from these. The data port is fixed at 32
bits. `REPL_RANDOM` needs `WAYS` to be a power of two.

## Files

| file | contents |
|------|----------|
| `rtl/sws_pkg.sv` | default geometry, `repl_e`, `sws_events_t` |
| `rtl/sws_cache.sv` | top level: controller and wiring |
| `rtl/sws_way_select.sv` | mini-tag array and comparators |
| `rtl/sws_index_decoder.sv` | index to one-hot wordline |
| `rtl/sws_gated_wordline.sv` | wordline AND comparator hit, per way |
| `rtl/sws_data_array.sv` | per-way data banks, ORed outputs |
| `rtl/sws_tag_array.sv` | tags, valid and dirty bits, single-way tag compare |
| `rtl/sws_victim_select.sv` | the allocation rule and the round-robin/random policy |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/sws_cache_checker.sv` | stimulus and reference model for the whole cache |
| `tb/sws_mem_model.sv`, `tb/tb_sws_pkg.sv` | behavioural memory (22-cycle reads, optional random back-pressure) and its initial-contents function |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself. A
watchdog counts a failure if a run hangs. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/sws_pkg.sv tb/tb_sws_pkg.sv tb/tb_sws_cache.sv --top-module tb_sws_cache
./obj_dir/Vtb_sws_cache
```

Replace `tb_sws_cache` with any other testbench name. The unit testbenches do
not need `tb/tb_sws_pkg.sv`, but listing it does no harm.

* `tb_sws_cache` runs the cache at its default size with round-robin
  replacement and an always-ready 22-cycle memory. It issues 11 directed
  requests that force each victim kind, then 600 requests to a working set
  that fits (mostly hits), then 4000 random requests to a few sets with a
  narrow tag range, so mini-tags collide often. Its reference model predicts
  the following for every request: hit or miss, the victim way and the rule
  that chose it, whether a write-back happens, the load data, and the exact
  latency. Every cycle it checks that at most one data way and one tag way
  are active. At the end it checks that each mechanism happened at least
  once: load/store hit, load/store miss, each victim kind, write-back, stall,
  and back-to-back hits. It also prints how many data ways the lookups read,
  against four per lookup for a cache that reads all ways. The run takes well
  under a second.
* `tb_sws_cache_random` runs the same stimulus with `REPL_RANDOM` and a memory
  that randomly withholds `ready`. It reads each policy victim from the refill
  and checks everything else as above, except the exact miss latency.
* `tb_sws_cache_workloads` sends synthetic access patterns through the cache.
  It checks every hit and miss against a model of the SWS rule, and compares
  the result with a model of a conventional 4-way round-robin cache. It also
  estimates energy. A hit costs 1.0 in the conventional cache and 0.41 in the
  SWS cache (one way read instead of four). Handling a miss costs 50
  conventional hits. The results:

  | pattern | accesses | SWS misses | conventional misses | SWS / conventional energy |
  |---------|---------:|-----------:|--------------------:|--------------------------:|
  | `stream`: sequential reads over 64 KB | 16384 | 2048 | 2048 | 0.92 |
  | `vec16k`: c[i]=a[i]+b[i], arrays 16 KB apart | 6144 | 384 | 384 | 0.86 |
  | `vec64k`: the same, arrays 64 KB apart | 6144 | 6144 | 384 | 12.2 |
  | `table`: random reads in an 8 KB table | 6000 | 256 | 256 | 0.81 |
  | `random`: loads/stores over 64 KB | 6000 | 4587 | 4578 | 0.99 |

  The `random` row depends on the simulator's random seed.
* `tb_sws_way_select`, `tb_sws_index_decoder`, `tb_sws_gated_wordline`,
  `tb_sws_data_array`, `tb_sws_tag_array` and `tb_sws_victim_select` check
  each module against its own reference model.

## What is design choice rather than part of the scheme

The scheme itself fixes the following: the mini-tag array and comparators, the
gated wordlines, single-way data and tag reads, removal of the way multiplexer,
rule 1 of the allocation, the round-robin/random policies, and the geometry.
This implementation chose the rest:

* 32-bit addresses and data words, and a 20-bit tag;
* write-back with write-allocate, with a dirty bit per line;
* valid bits, including one kept next to each mini-tag;
* filling empty ways before applying the policy (rule 2);
* the round-robin pointer per set and the LFSR polynomial;
* the five-state controller, the replay after the refill, one outstanding
  miss, and the resulting L + 4 cycle miss latency;
* the 256-bit line-wide memory port with posted write-backs;
* synchronous reset.

The RTL does not model the following:

* Sense amplifiers and output drivers. These are analog circuits. The banks'
  combinational read and the response register stand in for them.
* The CAM form of the mini-tag array. The RAM-plus-comparators form is used.
* An LRU variant. It performs worse with this allocation rule.
* Circuit delays and energy. The `data_way_en` and `tag_way_en` outputs give
  activity counts from which energy can be estimated.
* TLB and processor. The cache takes physical addresses.
