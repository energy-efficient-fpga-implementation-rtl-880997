# Streaming k-nearest-neighbour search accelerator

Given a query point *q* and *n* two-dimensional reference points in external
memory, this accelerator returns the indices of the *K* points nearest to *q*,
with their squared Euclidean distances, nearest first. It searches one reference
point per clock. At the default sizes (K = 5, up to 2^19 points) a search over
300,000 points takes 300,040 cycles, which is 1.25 ms at 240 MHz.

The RTL follows the FPGA architecture of the article *Energy-efficient FPGA
Implementation of the k-Nearest Neighbors Algorithm Using OpenCL* (its
"Implementation II"). That architecture has two kernels:

* a **distance kernel** computes every distance;
* a **k-smallest kernel** selects the K smallest.

The kernels pass the distances through an array held in on-chip block RAM
instead of external DRAM. Selecting the K smallest does not spread well across
many parallel threads, but it pipelines well. So on an FPGA both kernels can
stream at one element per clock, side by side.

In the article this hardware came from OpenCL through high-level synthesis.
Here it is written directly as SystemVerilog. The article gives what each part
must do, not how it is built inside. The micro-architecture below (ring buffer,
credit scheme, insertion list, handshakes, number format) is this design's own.
It was chosen to meet the article's measured behaviour: about one point per
clock at 240 MHz, k = 5, and about 300,000 points.

## Data path

```
 global memory ──► burst_reader ──► local_buffer ──► dist_unit ──► dist_buffer ──► kmin_kernel ──► result[K]
   (AXI-like          (bursts,        (ring of        (3-stage       ("dist",        (kmin_unit:
    read port)         credits)        2·WG points)    (dx²+dy²))      2^19 words)     sorted list)
 └──────────────────── dist_kernel ───────────────────────────┘                 └── follows wr_count ──┘
```

1. **`burst_reader`** (in `dist_kernel`) issues read bursts of `BURST_LEN`
   points, starting at word `base`. Point *i* is at word `base + i`, one point
   per beat. Bursts go out back to back, without waiting for data, as long as
   the local ring has room for the whole burst.
2. **`local_buffer`** is the kernel's local memory. It is a ring of
   `2·WG` points (default 512): point *p* is stored at *p* mod 512. One work
   group of 256 points can be copied in while the previous one is computed.
3. **`dist_unit`** computes d = (x − qx)² + (y − qy)² in three register stages:
   difference, square, sum. It takes one point per cycle and keeps the result
   exact.
4. **`dist_buffer`** is the on-chip distance array. It is a simple dual-port
   RAM: the distance kernel writes distance *i* at address *i*, and the
   k-smallest kernel reads it back.
5. **`kmin_kernel`** reads the distances in index order and feeds
   **`kmin_unit`**, a sorted list of K (distance, index) registers.

## How the two kernels stream without stalling each other

This is the part of the design that needs the most care. Two flow-control
loops keep the pipeline running at one point per clock.

**Memory to local ring (credits).** `burst_reader` tracks three counts:

* `req_ptr`: points requested so far;
* `received`: points that have arrived;
* `consumed`: points the compute side has taken out of the ring.

It requests the next burst only when `req_ptr + len − consumed ≤ 2·WG`.
Room for a burst is therefore reserved when the burst is requested, so data
beats never need back-pressure (`r_ready` stays high during a transfer).
Several bursts can be in flight at once, which hides the memory latency. With a
memory that answers every cycle, one point arrives per cycle after the first
latency. The compute side reads ring slot `cp_ptr` whenever
`cp_ptr < received`. A slot written on one clock edge can be read on the next.

**Distance kernel to k-smallest kernel (write count).** Distances are written
in index order, so `dist_kernel` only has to publish `wr_count`, the number
written so far. `kmin_kernel` starts at the same time as the distance kernel
and reads `dist[i]` only once `wr_count > i`. Otherwise it waits, and
`stalled` is high for that cycle. At the start of a run it waits for the
memory latency plus the pipeline depth, about 20 cycles. After that it runs one
cycle behind the producer. The buffer is never read before it is written, and
the two kernels never need a handshake of their own.

**The K-smallest list.** `kmin_unit` compares each incoming candidate with
all K entries at once:

* `closer[j]` is true when entry *j* is empty or farther away than the
  candidate. Because the list is sorted, `closer` is monotone: once true, it
  stays true for every later entry.
* The first true position takes the candidate. The entries behind it move back
  one place, and the last entry drops out.
* A candidate that is no nearer than the K-th entry is dropped.

The list therefore accepts one candidate per clock and needs no full sort of the
*n* distances. On equal distances the earlier point (lower index) stays ahead.
If *n* < K, only the first *n* entries are marked valid.

## Interface (`knn_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle launch, accepted while `busy` is low |
| `n` | in | 20 | number of reference points, 0 … `N_MAX` |
| `base` | in | 32 | word address of point 0 |
| `query` | in | 32 | query point, packed `{y, x}` |
| `busy` / `done` | out | 1 | search running / result final (one-cycle pulse) |
| `result[K]` | out | 53 each | `{dsq[33:0], idx[18:0]}`, nearest first; held until the next start |
| `result_valid[K]` | out | 1 each | entry holds a neighbour |
| `run_cycles`, `stall_cycles`, `insert_count` | out | 32 | cycles of the last search; cycles the k-smallest kernel waited; list insertions |
| `dist_done` | out | 1 | distance kernel finished (pulse) |
| `mem_ar_valid/ready/addr/len` | out/in | 1/1/32/8 | read request: word address and burst length − 1 |
| `mem_r_valid/ready/data/last` | in/out | 1/1/32/1 | read data: one point per beat, in order; `last` on each burst's final beat |

A point is 32 bits: x in bits [15:0], y in bits [31:16], both signed two's
complement. The memory channel follows the usual AXI rules: a request or beat
is taken when valid and ready are both high, and a waiting request must stay
unchanged. `burst_reader` checks these rules with assertions. Inside the design
the channel is the `mem_rd_if` interface; the top brings it out as plain
signals. Shared types (`point_t`, `dist_t`, `cand_t`) are in `knn_pkg`.

**Timing.** With a memory of latency *L* that answers every cycle, a search
takes about *n* + *L* + 10 cycles from `start` to `done`. Under memory
back-pressure both kernels slow down together, and the result is the same.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `K` | 5 | k = 5, as in the article's experiments |
| `N_MAX` (dist buffer depth) | 2^19 = 524,288 | the ~300,000-point data set, rounded up to a power of two |
| `WG` (work group, points) | 256 | this design's choice; the local ring holds 2·WG |
| `BURST_LEN` | 16 | this design's choice |
| `COORD_W` (`knn_pkg`) | 16 | this design's choice; distances are `2·COORD_W+2` = 34 bits |
| `IDX_W` (`knn_pkg`) | 19 | fits `N_MAX` |

`WG` must be a power of two. `N_MAX` may be any size up to 2^`IDX_W`.

## Where this departs from the article's implementation

* **Number format.** The original kernels use floating-point coordinates.
  Here coordinates are 16-bit signed fixed point, and the distance is exact in
  34 bits, so nothing is rounded. The distance pipeline has two 17×17
  multipliers. The article reports 12 DSP blocks, which fits floating-point
  operators.
* **Buffer size.** The article reports 512 block RAMs (36 Kbit each) for its
  design. A 2^19 × 32-bit float array fills exactly that. Here the array is
  2^19 × 34 bits (17.8 Mbit), slightly wider because of the fixed-point format.
* **One result per search.** The article's listing describes its output as the
  k smallest "per work group" in one place, and as the overall k smallest in
  another. This design returns the overall K smallest, with no merge step
  needed on the host.
* **Concurrent kernels.** The article maps the distance array on chip and
  streams between the kernels, and it gives no mechanism for this. Here the
  second kernel follows the first kernel's write count.
* **Not included.** The host processor, the PCIe link and the DDR3 memory with
  its controller are outside the RTL. The memory port is brought out of the
  top, and the host's control is reduced to `start`/`n`/`base`/`query`. The
  article's other FPGA variant computes only the distances, writes them back
  to external memory and leaves the sorting to the host. It is a point of
  comparison and is not built here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module's output with an independent reference model, stops itself with a
watchdog, and ends with a `TB_RESULT checks=… failures=…` line.

| testbench | what it covers |
|---|---|
| `dist_unit_tb` | extreme and random points; exact distances; 3-cycle latency |
| `dist_buffer_tb`, `local_buffer_tb` | random read/write traffic; use as a ring that fills up |
| `kmin_unit_tb` | list after every candidate against a full stable sort; ties; clear; insert flag |
| `kmin_kernel_tb` | prefilled buffer (n + 3 cycles); slow random producer (stalls); n < K; ties |
| `burst_reader_tb` | data and positions; burst count; short last burst; window limit with a slow consumer; back-pressure; n + L + 6 cycle bound |
| `dist_kernel_tb` | every distance and its address; `wr_count`; cycle bound; load/compute overlap |
| `knn_top_tb` | reduced sizes (WG = 32, N_MAX = 4096): 9 searches against a full sort; cycle bound; checks that stalls, back-pressure, short bursts and groups, ties, n < K and a full buffer each occur |
| `knn_top_full_tb` | default parameters, 300,000 points, memory latency 30: result against a full sort; at most n + 64 cycles (measured 300,040) |

`tb/mem_model.sv` is a behavioural model of the global memory. It has
configurable latency and random back-pressure, and each word's content is a
hash of its address. The testbenches compute the same hash in their reference
models.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl \
    rtl/knn_pkg.sv tb/knn_top_full_tb.sv --top-module knn_top_full_tb -o sim
./obj_dir/sim
```

Use the same command for any other testbench, with its file and module name in
place of `knn_top_full_tb`. The full-size run builds and simulates in a few
seconds.

## Files

* `rtl/knn_pkg.sv`: widths and types.
* `rtl/mem_rd_if.sv`: memory read channel.
* `rtl/dist_unit.sv`, `rtl/local_buffer.sv`, `rtl/burst_reader.sv`,
  `rtl/dist_kernel.sv`: the distance kernel.
* `rtl/dist_buffer.sv`: the on-chip distance array.
* `rtl/kmin_unit.sv`, `rtl/kmin_kernel.sv`: the k-smallest kernel.
* `rtl/knn_top.sv`: the top level.
* `tb/`: one testbench per module, the full-size testbench and the memory
  model.
