# Per-channel caches for HLS-generated accelerators

An accelerator produced by high-level synthesis usually reaches external
memory (DRAM behind an AXI controller) through one or more AXI master
channels, often one per pointer argument of the C kernel. Every load and store
then pays the full memory latency, typically tens of cycles, while the
datapath waits. This RTL puts a small, separately configured cache on each of
those channels. A cache turns a miss into one AXI burst that fetches a whole
line. It absorbs repeated accesses. It writes dirty data back in bursts, and it
does not wait for one write's response before issuing the next. A flush
writes every dirty line back before the accelerator reports that it is done.

The design follows the accelerator caches described in *Improving Memory
Interfacing in HLS-Generated Accelerators with Custom Caches*. That work
specifies what the caches must do and gives their configuration. How they do
it here (state machine, replacement, interfaces, buffer sizes) is this
implementation's own design. The list of choices is in
[What is specified and what is chosen](#what-is-specified-and-what-is-chosen).

## Structure

```
hls_cache_system            one cache per channel, common flush
 └─ hls_cache  (x N_CHANNELS)  controller: lookup, miss handling, flush walk
     ├─ cache_tags             tag / valid / dirty per way and set, hit, victim
     ├─ cache_data_ram         line data, whole-line read, byte-enable write
     ├─ axi_read_fill          one AXI4 INCR read burst per refill
     └─ axi_write_unit         write buffer + AXI4 writes, outstanding-write FIFO
cache_pkg                   AXI and request structs, write-policy enum
```

Each channel's cache is independent: there is no coherence between them. That
is safe only when the channels touch disjoint memory regions, and it is up to
the accelerator's source code to guarantee that. Keeping the caches separate
means each can be sized for its own access pattern. It also means that two
data structures streamed at the same time do not evict each other's lines.

## The cache (`hls_cache`)

### Geometry and address split

A cache has `N_WAYS` ways. Each way holds `WAY_SIZE` lines of `LINE_SIZE`
32-bit words. A byte address is split as

```
| tag (32 - 2 - log2 LINE_SIZE - log2 WAY_SIZE) | set index | word in line | 2 byte bits |
```

With the defaults (1 way, 16 lines, 16 words) a cache holds 256 words (1 KiB),
and a refill moves 64 bytes. `WAY_SIZE` and `LINE_SIZE` must be powers of two
and at least 2.

### Serving a request

The controller serves one request at a time:

1. **S_IDLE** – `fe_req_ready` is high, unless a flush is requested. The
   request is registered when it is accepted.
2. **S_LOOKUP** – the tag store compares all ways of the set at once.
   - *Read hit*: the word comes from the data store, and `fe_rsp_valid`
     pulses in this cycle.
   - *Write hit, write-back*: the bytes selected by `wstrb` are written, and
     the line is marked dirty. The request is then answered.
   - *Write hit, write-through*: the line is updated, and the word also goes
     to memory (S_WT_WRITE).
   - *Miss*: the victim way is registered. For a write miss under
     write-through, the word goes straight to memory (no allocation).
3. **S_EVICT** – if the victim line is valid and dirty, it is copied in one
   cycle into the write unit's buffer. From there it leaves as a
   `LINE_SIZE`-beat burst, while the refill goes ahead.
4. **S_FILL_WAIT** – the refill may not overtake a write to the same line,
   because AXI does not order the read channel against the write channel.
   The controller waits while the write unit reports a pending write to that
   line. This usually costs nothing, since the victim's line is a different
   line.
5. **S_FILL** – one read burst. Each beat is written into the victim way as it
   arrives. With the last beat the tag is installed (valid, clean). The
   controller then returns to S_LOOKUP, which now hits.

Replacement takes the lowest-numbered invalid way first. Once every way of a
set is valid, it uses a per-set round-robin pointer.

### Write policies

`WRITE_POLICY` is set per cache:

| | write hit | write miss | memory traffic |
|---|---|---|---|
| `WRITE_BACK` | update line, mark dirty | allocate (refill), then update | line bursts on eviction and flush |
| `WRITE_THROUGH` | update line and send word | send word, no allocation | one single-beat write per store (with byte strobes) |

### Outstanding writes (`axi_write_unit`)

The write unit takes a write in one cycle: a start address, the number of
beats, the data and the byte strobes of up to one line. It copies the write
into its buffer. Then it drives AW and W on their own handshakes, in either
order. When the buffer has gone out, the unit takes the next write, **without
waiting for the B response of the previous one**. It allows up to
`MAX_OUTSTANDING` unanswered writes. Their addresses sit in a FIFO that each B
response pops. All transactions use AXI ID 0, so responses come back in order.
The same FIFO drives the same-line check above, and also the unit's `idle`
output, which a flush waits for.

This is what makes frequent writes cheap. A run of write-through stores, or of
dirty evictions, proceeds at the rate the buffer drains, not one memory
round trip per write.

### Flush

`flush_req` is taken in S_IDLE. The controller walks every (set, way). For
each valid, dirty line it hands a burst to the write unit and clears the dirty
bit. After the last entry it waits until the write unit is idle, that is until
every write has been answered. Then it pulses `flush_done`. Lines stay valid
and clean, so the accelerator could go on using them. Under write-through
there is nothing dirty, and the flush only waits for outstanding writes to
drain.

## The system (`hls_cache_system`)

The top instantiates `N_CHANNELS` caches. Their geometry and policy come from
the parameter arrays `N_WAYS`, `WAY_SIZE`, `LINE_SIZE` and `WRITE_POLICY`, one
entry per channel. A single `flush_req` is forwarded to every cache until that
cache reports completion. `flush_done` pulses once all of them have reported.

The default is three channels with 16-line × 16-word caches. This matches the
running example of the original work: a matrix multiply
`mmult(int *a, int *b, int *output)` with one AXI bundle per argument.

## Interfaces

All ports are plain signals or packed structs from `cache_pkg`. Per-channel
ports are unpacked arrays.

**Accelerator side** (per channel):

| signal | dir | meaning |
|---|---|---|
| `fe_req_valid` / `fe_req_ready` | in / out | request handshake, taken at the rising edge when both are high |
| `fe_req` (`fe_req_t`) | in | `{we, addr[31:0] (byte), wdata[31:0], wstrb[3:0]}` |
| `fe_rsp_valid` | out | one-cycle pulse answering the request (reads and writes); no back-pressure |
| `fe_rsp_rdata` | out | read data, valid with `fe_rsp_valid` |
| `flush_req` / `flush_done` | in / out | hold `flush_req` until the `flush_done` pulse |

**Memory side** (per channel): an AXI4 master as two structs. `axi_req_t`
carries AW, W, B-ready, AR and R-ready. `axi_rsp_t` carries AW-ready, W-ready,
B, AR-ready and R. Addresses and data are 32 bits wide. Bursts are INCR with
4-byte beats: `LINE_SIZE` beats for refills and write-backs, one beat with
strobes for write-through. Error responses are ignored.

Reset is synchronous and active low (`rst_n`). It invalidates every line and
empties the write unit. The data array is not reset.

## Timing

Timing is counted from the rising edge that accepts the request:

- **Read hit:** answered 1 cycle later.
- **Write hit (write-back):** answered 1 cycle later.
- **Write through:** 2 cycles when the write unit is free.
- **Read miss, clean victim:** `LAT + LINE_SIZE + 4` cycles. `LAT` is the
  memory's delay from the AR handshake to the first R beat.
- **Dirty victim:** costs the same when the write unit's buffer is free,
  because the line is handed over in the cycle that checks the victim. If the
  buffer is still busy with an earlier write, the miss waits for it. The
  write-back itself never adds to the miss.

With the default configuration and a 50-cycle memory, a refill therefore
costs 70 cycles for 16 words, against 50+ cycles for every single uncached
word.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N_CHANNELS` | 3 | the three AXI bundles of the matrix-multiply example |
| `WAY_SIZE` (lines per way) | 16 | `way_size = 16` of the example configuration |
| `LINE_SIZE` (words per line) | 16 | `line_size = 16` of the example configuration |
| `N_WAYS` | 1 | own choice. Ways are configurable in the original, but no default is given. With one way a cache holds 256 words, the largest size evaluated there |
| `WRITE_POLICY` | `WRITE_BACK` | own choice. Both policies are named as options |
| `MAX_OUTSTANDING` | 4 | own choice. Outstanding writes are specified, their number is not |

The evaluated configurations use total cache sizes of 16 to 256 words per
channel. They are reached by choosing `WAY_SIZE × LINE_SIZE × N_WAYS`, for
example 4 × 4 × 1 = 16 words.

## What is specified and what is chosen

Specified by the original work:

- a cache per AXI memory channel, each with its own size, number of ways and
  write-back / write-through behaviour;
- an AXI4 master towards memory that moves a whole line per burst;
- writes that can be issued before earlier ones have been answered;
- a flush that writes dirty lines back before the accelerator finishes;
- no coherence between caches;
- 4-byte words.

Chosen here:

- the accelerator-side request/response port, with one request in service
  per cache;
- synchronous reset;
- replacement: invalid way first, then round-robin;
- write-allocate under write-back and no-allocate under write-through;
- a one-line write buffer, and a FIFO of `MAX_OUTSTANDING` pending writes;
- the read-after-write check for the same line;
- asynchronous (LUT/flip-flop style) arrays;
- lines stay valid after a flush;
- the combined flush handshake of the system;
- 32-bit addresses, AXI ID 0, error responses ignored.

Where this design departs from, or cannot be held against, the original:

- The original caches grew out of an existing open-source cache whose
  internals are not described. The internals here (controller states, write
  unit, replacement, address split) are therefore this design's own. Only the
  features listed above are taken from the original.
- The original reports area overhead on an FPGA and speed-ups for
  accelerators generated from C. Neither is reproduced. The testbenches
  play the accelerator with one access at a time, so only the trends can be
  compared: caches pay more as latency grows, a small cache for the
  column-read matrix is the costly case, and the size of the row-read cache
  hardly matters.
- The original describes a cache's size in words (16 to 256) and the example
  directives give `way_size` and `line_size`. The meaning of `way_size` is
  taken here as lines per way.

Not included: the accelerator datapath itself, which the HLS tool generates
from C, and the tool extension that reads the per-channel cache directives.

## Verification

Every testbench checks its own results and ends with a line
`TB_RESULT checks=<n> failures=<n>`. External memory is modelled by
`tb/axi_mem_model.sv`. It is an AXI4 slave with a fixed latency and any number
of queued requests, and it can drop its ready signals at random. The
accelerator of the matrix-multiply example is modelled by `tb/mmult_accel.sv`.

| testbench | what it shows |
|---|---|
| `tb_cache_tags` | hit/miss, invalid-first then round-robin victims, dirty set/clear, reset |
| `tb_cache_data_ram` | byte-masked writes, whole-line reads, against a reference array |
| `tb_axi_read_fill` | AR fields, beat order and data, exact burst timing, random back-pressure |
| `tb_axi_write_unit` | three writes in flight, a fourth refused, same-line check, data under back-pressure |
| `tb_hls_cache` | 3000 random loads/stores (byte masks) on a write-back and a write-through cache against a reference memory, with random AXI stalls; hit and miss latencies; write-through memory current before the flush; write-back memory current only after it; bursts; outstanding writes |
| `tb_hls_cache_system` | the 10×10 matrix multiply on two small-cache systems (all write-back, and write-through output). Checks the result in memory, and that hits, refills, dirty evictions, flush write-backs, outstanding writes and write-through writes all occur |
| `tb_hls_cache_system_full` | the same multiply on the default configuration: each matrix is fetched once (7 lines), the output is written back only by the flush, and the run meets a cycle bound |
| `tb_polybench` | the kernels 2mm, atax, bicg, doitgen and mvt (vectors of 10, 10×10 matrices, doitgen 10×10×10) on the default configuration at 50-cycle latency, with every output checked; atax and 2mm again at latencies 5, 10 and 25 |
| `tb_vector_kernel_sweep` | atax, bicg and mvt on five systems whose caches hold 16, 32, 64, 128 and 256 words, at latency 50, with every output checked |
| `tb_cache_size_sweep` | the matrix multiply on nine systems side by side, one per combination of cache sizes for the row-read and the column-read matrix, each run at latencies 5, 10, 25 and 50 |

Cycle counts from `tb_polybench`, default configuration, memory latency 50.
The testbench issues one access at a time. "Uncached" is simply accesses ×
(50 + 2), a rough figure for the same accesses made as single AXI transfers:

| kernel | accesses | cycles with caches | uncached estimate |
|---|---|---|---|
| atax | 520 | 1394 | 27040 |
| bicg | 430 | 1387 | 22360 |
| mvt | 440 | 1307 | 22880 |
| 2mm | 4300 | 21153 | 223600 |
| doitgen | 23000 | 28439 | 1196000 |

Latency sweep from the same testbench (cycles with caches):

| kernel | latency 5 | 10 | 25 | 50 |
|---|---|---|---|---|
| atax | 899 | 954 | 1119 | 1394 |
| 2mm | 10308 | 11513 | 15128 | 21153 |

`tb_vector_kernel_sweep` gives these cycles at latency 50. All three caches of
a system have the size shown, as one way of 8-word lines:

| cache words | atax | bicg | mvt |
|---|---|---|---|
| 16 | 2898 | 3967 | 7913 |
| 32 | 2898 | 3967 | 7913 |
| 64 | 2898 | 3967 | 5290 |
| 128 | 1869 | 1913 | 1833 |
| 256 | 1869 | 1913 | 1833 |

Up to 64 words, the two vectors that share channel 1 (placed 64 words apart)
map to the same lines and keep evicting each other. From 128 words they no
longer collide. mvt gains the most because its second half reads the matrix
down the columns, and a column touches 10 different lines.

`tb_cache_size_sweep` gives the cycles of the matrix multiply with one-way
caches of 8-word lines. Sizes are in words, given as (cache of `a`, read along
rows; cache of `b`, read down columns). The output cache has 256 words.

| (row, column) | latency 5 | 10 | 25 | 50 |
|---|---|---|---|---|
| (16..256, 256) | 2735 | 2920 | 3490 | 4500 |
| (256, 128) | 2735 | 2920 | 3490 | 4500 |
| (256, 64) | 11473 | 14393 | 23168 | 37853 |
| (256, 32) | 18351 | 23416 | 38626 | 64036 |
| (256, 16) | 18351 | 23416 | 38626 | 64036 |

The row-read matrix needs almost no cache, because each line is used up
before it is replaced. The column-read matrix touches a new line on every
access, so it needs enough lines to hold a whole column's worth of lines (10
here). Below that, every access misses and pays a full line burst. The
multiply makes 2100 accesses, so single transfers would cost about
2100 × (latency + 2): 14700 cycles at latency 5 and 109200 at latency 50. A
column cache that is too small is therefore a slowdown at low latency
(18351 against 14700) and still a gain at high latency (64036 against
109200). Caching pays more the slower the memory is.

These numbers show the mechanism, not the published speed-ups. The original
accelerators overlap computation with memory access and were measured in
their own environment.

### Running a testbench

From the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/cache_pkg.sv tb/tb_hls_cache.sv --top-module tb_hls_cache -o sim
./obj_dir/sim
```

Replace `tb_hls_cache` with any testbench name. Each one simulates in a few
seconds at most. `tb_cache_size_sweep` holds nine systems and takes about a
minute to compile. The memory model's `LATENCY` parameter sets the starting
latency. Its `latency` variable can be changed between runs, as
`tb_polybench` does. The RTL also carries concurrent assertions for the AXI stability rules,
the burst length and the outstanding-write limit. `--assert` enables them.
