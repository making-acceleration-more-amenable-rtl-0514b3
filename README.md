# Cache-compute-cache accelerator with packed and multi-pumped DSPs

This repository holds synthesizable SystemVerilog for a small FPGA accelerator built from three
ideas that can be combined.

- **Caches as dataflow tasks.** A kernel does not touch off-chip memory itself. Each array it uses
  gets a cache task that owns an AXI master. The compute task only exchanges requests and
  responses with the caches over FIFOs. The cache serves a hit in one cycle and hides its slow
  miss path in a separate task. This is the *cache-compute-cache* (CCC) structure.
- **Packing several narrow operations into one DSP.** A DSP48-class slice has a 27×18 multiplier
  and a 48-bit adder. Two 8-bit products that share a factor fit in one multiplication.
  Four 4-bit products that share a factor fit in one multiplication plus a small correction.
  The adder can also be split into four 12-bit or two 24-bit lanes.
- **Multi-pumping.** A task whose logic can close timing at a multiple M of the system clock runs
  in its own clock domain at M times the frequency. Its initiation interval (II) is M, so each
  DSP is reused M times per system-clock cycle. The throughput stays the same with 1/M of the DSPs.
  Dual-clock FIFOs join the domains.

The top level, `ccc_scal_top`, applies all three to the kernel `c[i] = a[i] * b` on 8-bit
integers, unrolled by four. Without any of the ideas, this kernel would use four DSPs and access
memory directly. Here, the a and c arrays sit behind cache tasks, the four products are packed
into two DSP operations, and the compute task is double-pumped, so it needs **one** DSP slice.
Next to the kernel sits a second multi-pumped task. It is the multiply-accumulate core of a
15×15 2D filter: 225 MACs per window. It runs at II = 2 on `clk2x` with 113 shared multipliers
instead of 225, and still takes one window per `clk` cycle. The top also brings out the SIMD adder
and the four-way 4-bit multiplier as stand-alone units with their own ports. Neither has a place
in the scal kernel.

## Structure of the top

```
            clk (system clock)                         clk2x (2 x clk)
 AXI m_a_* <-> dach_l2 "a-cache" --async_fifo rq/rs--> dach_l1 <-> scal_compute
 AXI m_c_* <-> dach_l2 "c-cache" <-async_fifo rq/rs--------------------'   (1 packed DSP)
                 |                                                        
        dach_core + sync_fifo x2 + dach_mem_if                            
 flt_* stream --async_fifo--------------------------> mpump_filter2d (113 multipliers)
              <-async_fifo---------------------------'
 silvia_add_simd, silvia_mul4: combinational, own ports
```

| module | role |
|---|---|
| `dach_pkg` | shared enums: request opcode (`OP_LOAD`, `OP_STORE`, `OP_STOP`), address mapping, replacement policy |
| `dach_core` | L2 hit path: port arbitration, tag lookup, data array, replacement, stop/flush, counters |
| `dach_raw_cache` | two-line register cache that hides the read-after-write hazard of the data array |
| `dach_mem_if` | L2 miss path: write back a dirty victim, read a line, over AXI bursts |
| `sync_fifo` | request/response channels between the core and the memory interface |
| `dach_l2` | a complete L2 cache task: core + two FIFOs + memory interface |
| `dach_l1` | private read-only L1 in front of one L2 port |
| `async_fifo` | dual-clock FIFO (Gray pointers, two-flop synchronisers) |
| `silvia_muladd`, `silvia_muladd_extract` | two 8-bit multiply-adds on one DSP, and result extraction |
| `silvia_mul4` | four 4-bit products on one multiplier |
| `silvia_add_simd` | four 12-bit or two 24-bit additions/subtractions on one 48-bit adder |
| `scal_compute` | the compute task of the kernel |
| `mpump_filter2d` | multi-pumped 15×15 filter MAC task |
| `ccc_scal_top` | everything above, wired together |

## The L2 cache task

### Request/response protocol

A cache port is a pair of channels: requests go in and responses come out. A client does not wait
for the response before sending the next request. It keeps up to D requests in flight, where D is
the *request-response distance*. Otherwise each access would cost a full cache round trip.
`scal_compute` uses D = 6. The cache pipeline is shallower than the memory round trip, so a
distance of about 6 keeps it full.

Requests carry an opcode, a word address and, for a store, one data word.

- A load returns the **whole line** that holds the word. The client picks its words out of the
  line. This is how one request feeds an unrolled loop.
- A store updates one word and returns nothing.
- A stop writes every dirty line back to memory and then returns a one-cycle acknowledgement. A
  kernel uses it to make its results visible before it signals completion.

### Hit pipeline (`dach_core`)

`dach_core` serves the ports in round-robin order, one request per clock.

- **Stage A** picks a port and compares the tags of all ways in the set. On a hit it starts the
  synchronous read of the data array.
- **Stage B**, one cycle later, has the line. A load puts it on `rs_line` with a one-cycle
  `rs_valid` pulse for its port. A store merges its word into the line and writes the line back.

A request accepted in cycle t is therefore answered in cycle t+1, and back-to-back hits run at one
per cycle. The core accepts a load only while that port's response FIFO has room for two entries
(`rs_afull` is low). As a result, stage B never has to wait.

**Read-after-write hazard.** A store writes its line back in the same cycle that the next request
reads the array. That read returns the old line. `dach_raw_cache` keeps the last two written
lines in registers, fully associative with FIFO replacement. Stage B takes the line from there
whenever it holds it. With this bypass, a store followed by a load of the same line still runs at
II = 1. An entry is dropped when its line is refilled from memory.

**Misses.** A miss does not enter stage B. The core sends one request to the memory interface
holding the dirty victim line (if any) and the address of the line to read. It then stalls: no
other port is served until the line has come back and been installed. The missed request is then
retried first, and hits. There is no hit-under-miss.

**Configuration.**
- Sets: any power of two. Ways: any number, so a 15-way cache can buffer the 15 rows of a
  15×15 window.
- Replacement: LRU, kept with an age counter per way with invalid ways filled first, or FIFO,
  kept with a pointer per set.
- Address mapping:
  - *Standard* places the set index directly above the line offset.
  - *Swapped* places the tag bits there and the set index at the top of the address. Walking down
    a column of a row-major matrix then visits different sets instead of evicting the same one
    again and again.
- Write policy: write-back with write-allocate.
- Counters: `hits` counts requests served without a miss; `misses` counts refills. Their sum is
  the number of accepted loads and stores.

### Miss path (`dach_mem_if`)

This state machine runs as its own task. It waits for a request (`INIT`/`RRQ`). It then writes
the victim line back (`AW`, `W`, `B`), reads the new line (`AR`, `R`), and returns the line
(`WRS`). The AXI side is a subset of AXI4: one incrementing burst per line, with the byte
address `line_address * LINE_BYTES`, `awlen = arlen = beats - 1`, and no IDs, sizes or cache
attributes. With the defaults (16 words of 8 bits, 64-bit beats) a line is two beats.
Assertions check that `valid` and the payload stay stable while `ready` is low.
`dach_l2` puts a two-entry `sync_fifo` on each channel between the core and this task.

## L1 cache (`dach_l1`)

The a port of the compute task has a private L1. It is read-only, and its sets, ways and words
per line are parameters. Its line may be shorter than the L2 line, as long as the L2 line is a
multiple of it; a refill keeps only the part of the L2 line that holds the missed word.
Replacement within a set is first-in first-out. In the top it is direct-mapped, has 4 sets and
uses the same 16-word line as the L2.

- A hit returns the line one cycle after the request.
- A miss sends one load to the L2 port, waits for the line, installs it and answers.
- Only one miss is outstanding at a time.

For the scal kernel, four consecutive requests fall in each line, so three of four requests hit
in the L1 and the L2 sees one load per line.

## Packed DSP arithmetic

### Two 8-bit products per multiplier (`silvia_muladd`, `silvia_muladd_extract`)

Pre-adder input: `A = x_hi * 2^18 + x_lo` (27 bits). The multiplier's other input is the shared
factor `w` (18 bits). The slice computes `P = A * w + pcin = (x_hi*w) * 2^18 + x_lo*w + pcin`.

- The lower field `P[17:0]` holds the sum of the `x_lo*w` products.
- The upper field `P[35:18]` holds the sum of the `x_hi*w` products, minus one when the lower sum
  is negative (its two's-complement sign borrows from the upper field). `silvia_muladd_extract`
  therefore returns `hi = P[35:18] + P[17]` and `lo = P[17:0]`.
- Slices can be chained through `pcin`. For signed 8-bit factors the 18-bit field has room for
  the sum of at most seven products, so a chain may be up to 7 slices long. The testbench checks
  chains of 1 to 7.

`scal_compute` uses this unit with `pcin = 0`, so each DSP operation yields two products of
`a[i] * b`.

### Four 4-bit products per multiplier (`silvia_mul4`)

The 27-bit input is `{a0, 0000, a1, 0000, a2, 0000, a3[3:1]}`, and the other input is `b`. Each
product is read from an 8-bit field of the result. The lowest factor only fits with its top three
bits. The missing `a3[0]*b` term is added outside the multiplier as a shift and a small adder:
`p3 = (a3[3:1]*b)*2 + a3[0]*b`. When `b` is signed (`B_SIGNED = 1`), each negative field borrows
from the one above it, so the sign bit of each field is added back to the next field.

### SIMD adder (`silvia_add_simd`)

This unit is the 48-bit post-adder split into lanes with no carry between them:
- four 12-bit lanes, or two 24-bit lanes (`mode_two24`);
- add or subtract (`sub`);
- one carry-out per lane.

## Multi-pumped compute task (`scal_compute`) and clock domains

Each iteration handles `UNROLL = 4` elements.

1. It issues a load for the line holding `a[4i..4i+3]`. Up to `DIST = 6` loads can be
   outstanding.
2. It takes the response, selects the four words, and computes the four products. There are two
   pairs, because each DSP operation gives two products.
3. It sends four stores to the c-cache.

With `PUMP = 2` the multiplier stage has II = 2 and instantiates `UNROLL/2/PUMP = 1` packed
DSP. In slot k of an iteration, DSP d computes pair `k*NDSP + d`. At the end the task sends
`OP_STOP`, waits for the acknowledgement, and raises `done`. Products are truncated to 8 bits,
as a C store into an `int8` array would do. `dsp_ops` counts DSP operations (2 per iteration) and
`cycles` counts compute-clock cycles.

In the top, the compute task and the L1 run on `clk2x` and the caches on `clk`. Four
`async_fifo`s cross between the domains:
- a-requests into the a-cache;
- a-lines back to the L1, with the FIFO's `wr_almost_full` driving the cache's `rs_afull`;
- c-requests, packed as `{op, addr, data}`;
- the one-bit stop acknowledgement.

`clk2x` must be exactly twice `clk`. Both clocks and the reset come from outside the design.
`rst_n` is asynchronous and must be released synchronously to both clocks.

## Multi-pumped filter task (`mpump_filter2d`)

One sample is a window of `N_OP = 225` unsigned 8-bit pixels and 225 signed 8-bit coefficients.
The result is their full-precision dot product: signed, 25 bits, so no overflow is possible.
- The task has II = `PUMP` = 2 and `NMUL = ceil(225/2) = 113` multipliers.
- In slot s of a sample, multiplier m handles element `s*113 + m`. The second slot has one idle
  multiplier.
- An adder tree sums a slot's products into the accumulator. The result leaves after the last
  slot.
- A new sample is accepted in the cycle the previous one finishes, so the task delivers one
  result every `PUMP` fast-clock cycles.
- A result that is not taken holds the task in its last slot.
- `mac_ops` counts MACs, 225 per sample.

The normalisation and clipping of a complete image filter are not described by the architecture,
so they are not built. Nor are the line buffer and window generator that would feed the task;
`tb_wl_conv2d` shows a 15-way cache in that role.

In the top, the `flt_*` streams are in the `clk` domain. A dual-clock FIFO of depth 4 carries each
sample (3600 bits) to the task on `clk2x`, and another carries the result back. The end-to-end
test streams 100 samples through at one per `clk` cycle.

## Top-level interface and timing

- **Kernel control** (`clk2x` domain):
  - Inputs: `start` (a one-cycle pulse), `n_elems` (a multiple of 4), `a_base` (aligned to 4
    words), `c_base` and `b`. All must be held while `busy` is high.
  - `done` stays high from the end of a run to the next `start`.
  - Addresses are word addresses, and a word is one byte.
- **Memory:** `m_a_*` and `m_c_*` are two AXI4-subset masters with 64-bit data, in the `clk`
  domain. Byte address = word address.
- **Profiling** (32-bit counters): `a_hits`, `a_misses`, `c_hits`, `c_misses`, `l1_accesses`,
  `l1_hits`, `dsp_ops` and `kernel_cycles`.
- **Filter task:** `flt_in_valid/flt_in_ready` with `flt_win[225]` and `flt_coef[225]`, and
  `flt_out_valid/flt_out_ready` with the signed 25-bit `flt_out_y`. Both streams are in the `clk`
  domain, and results come back in sample order. `flt_mac_ops` counts in the `clk2x` domain.
- **Stand-alone units:** `simd_*` and `mul4_*` are combinational.

Default parameters:

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 8 | element width |
| `LINE_WORDS` | 16 | words per cache line (L1 and both L2s) |
| `A_SETS`, `A_WAYS`, `C_SETS`, `C_WAYS` | 4, 1, 4, 1 | L2 geometry, LRU, standard mapping |
| `L1_SETS` | 4 | L1 lines |
| `BEAT_WORDS` | 8 | words per AXI beat (64-bit bus) |
| `UNROLL`, `PUMP`, `DIST` | 4, 2, 6 | unroll factor, pump factor, request-response distance |
| `CDC_DEPTH` | 8 | dual-clock FIFO depth (the filter streams use depth 4) |
| `FLT_W`, `FLT_N` | 8, 225 | filter operand width, MACs per sample |

## Simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dach_pkg.sv tb/tb_ccc_scal_top.sv --top-module tb_ccc_scal_top -Mdir obj_top
./obj_top/Vtb_ccc_scal_top
```

| testbench | what it covers |
|---|---|
| `tb_ccc_scal_top` | the top with all defaults (see below) |
| `tb_mpump_filter2d` (`tb_f2d_harness`) | the filter task pumped 2, 3 and 1 times (113, 75 and 225 multipliers), plus a 4-bit 10-term task pumped 4 times with a partly idle last slot. Each configuration gets 400 random samples, with full-scale corner cases, compared with a direct sum. In the first half both handshakes stay open, and a result must leave every `PUMP` cycles. The second half adds random input gaps and output stalls. Also checks the MAC count |
| `tb_scal_compute` | compute task with behavioural caches that answer in random order of delay and apply back-pressure. Checks every product, the DSP-operation count, the one-iteration-per-4-cycles throughput with ideal caches, and that the distance limit, response stalls and store back-pressure all occur |
| `tb_dach_l2` | L2 task on an AXI memory model. Random loads and stores from two ports against a reference memory, then a stop and a full memory compare. Read and write burst counts must match the miss and write-back counts |
| `tb_dach_core` (`tb_core_harness`) | the core in three configurations: two ports with 2-way LRU; 8 sets with 2-way FIFO and swapped mapping; direct mapped. Checks the one-cycle latency, line data, flush, and that misses, write-backs, RAW bypasses and back-to-back accepts occur |
| `tb_dach_l1` (`tb_l1_harness`) | L1 in three geometries (direct mapped; 4-way with 8-word lines under a 32-word L2 line; 2-way with 16-word lines under a 64-word L2 line) against a reference tag model. Checks the hit count and one-cycle hit latency, under consumer back-pressure |
| `tb_dach_mem_if`, `tb_dach_raw_cache`, `tb_sync_fifo`, `tb_async_fifo` | the building blocks, with random traffic |
| `tb_silvia_muladd` | chains of 1..7 packed slices, random signed operands, including extraction |
| `tb_silvia_mul4` | all 2^20 operand combinations, signed and unsigned `b` |
| `tb_silvia_add_simd` | random operands in all modes, including lane carries |

### Workload testbenches

These run the cache and packed-arithmetic blocks in the configurations the architecture was
evaluated with, at reduced sizes. The testbench itself plays the compute task.

| testbench | kernel and configuration | result |
|---|---|---|
| `tb_wl_mmm` | C = A×B, 32-bit, N=4, M=128, P=64. A: direct mapped, 8 sets, 16-word lines. B: direct mapped, 128 sets, 32-word lines, swapped mapping, address width of the B array | A hits 99.9 %, B hits 96.9 %. The same column walk with standard mapping hits 0 % |
| `tb_wl_conv2d` | 15×15 convolution of a 20×128 8-bit image. 15 ways, 2 sets, 64-word lines. Run once through one port, then through 15 ports (one per kernel row, all in parallel) | 99.97 % hits both times, every output checked. 15 ports: 155 k cycles for 154 k accesses, against 309 k cycles with one port |
| `tb_wl_bitonic` | bitonic sort of 2048 32-bit values through a read-write cache. 64-word lines, 2 ways, 8 sets | 99.0 % hits; memory sorted after the stop flush |
| `tb_wl_rowread` | rows of a 32-bit matrix read many times, as the A operand of a matrix product: 4 rows of 1024 words, each row 8 times, through a direct-mapped cache holding exactly one row. Four line sizes side by side: 8, 16, 32 and 64 words (128, 64, 32 and 16 lines) | every word checked. Misses are exactly one per line of each row: hit rates of 98.4, 99.2, 99.6 and 99.8 % |
| `tb_wl_subiso` | the two caches of a sub-graph matching accelerator, with 128-bit words: node table behind a one-port cache of 512 sets × 16 words, edge table behind a two-port cache of 4096 sets × 8 words. The access pattern is a walk over a synthetic 2048-node graph chosen for this test, mostly local with random jumps. Edges are fetched two at a time on the two ports | every loaded word and the label sum checked. Node cache 97.4 % hits, edge cache 82.7 % hits; both ports used in parallel 2043 times |
| `tb_wl_silvia` | 192×192 int8 matrix-vector product on chains of three packed multiply-add slices; 4-bit 32×32×32 matrix product on the four-way multiplier; 192-element 8-bit vector addition in four-lane mode; 512-element int8 axpy with two products per packed slice and the addend added outside the DSP | all results checked |

`tb/axi_mem_model.sv` is a behavioural AXI slave with latency and random ready stalls. Its
`mem` array can be preloaded and inspected from the testbench.

The end-to-end testbench runs the top with every parameter at its default:
- two memory models;
- `clk2x` exactly twice `clk`;
- three kernel runs (256, 512 and 128 elements, different bases, the last one without a reset so
  that cached lines are reused);
- two streams of 100 filter samples, alongside the first and the last kernel run. The first
  keeps both handshakes open and must finish at one sample per `clk` cycle. The second throttles
  both sides at random. Every result is checked against a direct sum.

After each run it compares every byte of both memories with a reference. It also counts the
mechanisms and fails if any of them never happens:
- misses in both caches;
- c-cache write-backs;
- RAW bypasses;
- stalls while a miss is served;
- L1 hits and misses;
- traffic through all four clock crossings;
- both SIMD modes and operations;
- checked outputs of the 4-bit multiplier.

A write into a full crossing FIFO counts as a failure.

## Where this design departs from the architecture it follows, and its limits

- **Sizes.** The cache geometry, the address width, the AXI beat width and the FIFO depths of the
  scal top are this design's choices. The 8-bit data, unroll by 4, packing into two DSPs, pump
  factor 2 and distance 6 follow the architecture. So do the filter task's 225 MACs per sample,
  II of 2 and 113 multipliers. Its operand types (unsigned 8-bit pixels, signed 8-bit
  coefficients) and its slot schedule are this design's choices. Its 113 products and their
  adder tree complete in one fast-clock cycle; to close timing at twice the system clock on a
  real device, the multipliers and the tree would need pipeline registers. That adds latency
  but does not change the II.
- **L1.** The L1 handles one miss at a time and uses FIFO replacement. Because it blocks on a
  miss, at most about two a-line requests are ever in flight in the top. The distance of 6
  therefore only shows its effect in the compute task's own testbench.
- **Store throughput.** Stores are word-granular, one request per element. The c-cache, on the
  system clock, accepts one store per cycle, so the top produces at most one element per
  system-clock cycle. The packed, double-pumped DSP is not the bottleneck. Misses dominate the
  run time with the small default caches: about 5 compute cycles per element in the end-to-end
  test.
- **Write policy.** The L2 is write-back with write-allocate, and a stop request flushes it.
  Neither the policy nor the flush request is specified by the architecture. The L1 is
  read-only, so it needs no write policy.
- **Memory types, interconnect and clocking.** The choice of memory type (BRAM/URAM/LUTRAM) is
  left to synthesis. The AXI interconnect, the DRAM, and the clock generator that makes `clk2x`
  are outside the design.
- **No compiler or HLS flow.** The compiler passes that find packable operations and the HLS flow
  that picks pump factors and inserts the crossing FIFOs are not hardware. What they would
  produce is written here by hand: the packed units and the double-pumped compute task.
- **Other kernels.** Only the scal kernel is wired end to end. The cache blocks can be
  configured for the other access patterns the architecture was evaluated on (matrix multiply
  with swapped mapping, a 15-way line buffer for a 2D convolution, a 2-way read-write cache for
  bitonic sorting). The workload testbenches drive the caches in those configurations, with the
  testbench standing in for the compute task. Those kernels' compute tasks as hardware (32-bit
  MAC arrays, sorting networks, CNN layers, the optical-flow and molecule-screening tasks)
  are not part of this design. Of the multi-pumped convolution, only the filter's MAC task is
  built, as `mpump_filter2d`.
