# Vectorized Lloyd K-Means accelerator

One iteration of Lloyd's K-Means on two-dimensional points, split over many
identical compute tiles. Lloyd's rule makes this possible. Every point is
assigned to its nearest centre while the centres stay fixed, and the centres
only move after the last point. So no tile ever needs to know what another tile
did: each one gets all the centres and its own share of the points, and it
returns per-cluster partial sums. A final stage adds those partial sums and
turns them into the new centres.

The design follows the vectorized Lloyd algorithm of *Accelerating K-Means: A
Vectorized Approach for AI Engines & Neural Processing Units*. There, the
compute tiles are AI Engine vector processors running a kernel, and
programmable logic moves the data. Here the kernel is turned into a fixed
datapath. Its main features come from that work: 1024-bit vectors of 16
fp32 coordinate pairs, one point measured against a whole vector of centres
at once, centre updates delayed to the end, padding that tiles skip, and a
default of 32 tiles. The encodings, handshakes and cycle-level behaviour are
this design's own.

```
                    header, centres (broadcast)
 memory ──► data_dispatcher ──┬──► kmeans_tile[0]  ──┐
   ▲         point vector v   ├──► kmeans_tile[1]  ──┤ partial sums
   │         → tile v mod N   ├──► ...              ──┤ and counts
   │                          └──► kmeans_tile[N-1]──┤
   │                header, centres ────────────────►├──► data_collector
   └──────────────────── new centres ◄───────────────┘
```

## Data format

Every transfer is one 1024-bit vector (`kmeans_pkg::vec_t`): 16 lanes of 64
bits. Each lane holds one point or centre, with x in bits `[31:0]` and y in bits
`[63:32]`. Both are IEEE-754 single precision. The same format is used in
memory, so one memory word holds 16 points:

| memory words | content |
|---|---|
| `clu_base .. clu_base+ceil(K/16)-1` | current centres, lanes past K ignored |
| `pts_base .. pts_base+ceil(P/16)-1` | the P points, lanes past P ignored |
| `res_base .. res_base+ceil(K/16)-1` | new centres written by the collector, lanes past K are zero |

Three other beat types use the same 1024 bits:

* **Data information** (`header_t`): `n_clusters` in bits `[31:0]`,
  `n_vectors` in `[63:32]` and `n_pad` in `[95:64]`. `n_vectors` is the number
  of point vectors the tile will receive. `n_pad` is the number of padded
  (not real) points at the end of those vectors.
* **Sum beat**: a `vec_t` of per-cluster coordinate sums for 16 clusters.
* **Count beat** (`count_vec_t`): 16 point counts of 32 bits each in the low
  512 bits.

## One iteration

The host pulses `start` with K (from 1 to `MAX_CLUSTERS`), P and the three base
addresses. `done` pulses once the new centres are in memory. To run more
iterations, the host starts again with the new centres.

1. **Dispatch.** `data_dispatcher` first sends a header to each of the N tiles
   and to the collector. Next it reads each centre vector once and broadcasts
   it to all N+1 destinations. A broadcast beat waits until every destination
   has taken it. Then it deals the point vectors out round-robin: vector v goes
   to tile `v mod N`.
2. **Padding.** The point stream is rounded up to a multiple of N×16 points, so
   every tile gets the same number of vectors (`ceil(P / (16N))`). Vectors that
   lie wholly past the end of the data are made as zeros and never read from
   memory. Each tile's header says how many of its points are padding. The
   count is exact per tile: only the tile that receives the partly filled last
   vector, and the tiles after it in the round, have padding.
3. **Assign and accumulate.** Each `kmeans_tile` works through its points,
   described below.
4. **Collect.** `data_collector` takes the result blocks of tiles 0, 1, …, N−1
   in that order. It adds the sums lane by lane in fp32 (32 adders) and the
   counts as integers. Then, for each cluster, it divides the x and y sums by
   the count to give the mean. A cluster that received no points keeps its
   current centre. Last, it writes `ceil(K/16)` words.

Memory reads are single-word requests with in-order responses of any latency.
Responses have no back-pressure. The dispatcher lets at most `FIFO_DEPTH`
words be in flight or buffered, so every response has room. With a memory
that answers every clock and tiles that are ready, one vector leaves the
dispatcher per clock.

## Inside a compute tile

The tile keeps up to `MAX_CLUSTERS` = 32 centres in local registers, as two
16-lane vectors ("chunks"). The point vector in hand is processed one point at
a time. For each point, and for each chunk of centres:

* `vec_distance` computes the 16 squared distances
  `(px−cx)² + (py−cy)²` at once. This is one `sq_dist` lane per centre: two
  fp32 subtractions, two multiplications and one addition, all combinational.
  The square root is left out because it does not change which centre is
  nearest.
* `min_dist` picks the smallest distance among the lanes that hold a real
  centre. Distances are never negative, so their bit patterns can be compared
  as unsigned integers. A tree of 4 compare levels does this, and on a tie the
  lower lane wins.
* The chunk's winner replaces the running best only if it is strictly nearer.
  So across chunks, too, the lowest cluster index wins a tie.

After the last chunk, `accumulate_coords` adds the point to the winning
cluster: fp32 x and y sums and an integer count. This read-modify-write takes
one clock, so the same cluster can be hit on every clock. Centres never
change inside the tile.

**Timing.** A point takes one clock per chunk, so a vector takes
`16 × ceil(K/16)` clocks. A 2-entry input buffer lets the next vector start
with no idle clock between vectors. When the tile reaches its first padded
point, it drops the rest of that vector in one clock. All later fully padded
vectors take one clock each. When the last vector is done, the tile sends two
beats per chunk (sums, then counts) and marks the final one `last`. Then it
waits for the next header.

At the default size, 32 tiles each get one vector every 32 clocks while a
vector takes 16 or 32 clocks. So the dispatcher, not the tiles, sets the pace.
With fewer tiles, the tiles fill their buffers and hold the dispatcher back
through `ready`.

## Streams

Tiles connect through `vec_stream_if`: `valid`, `ready`, `last` and 1024-bit
`data`. A beat moves on a rising edge where `valid` and `ready` are both high.
While stalled, the source must hold the beat steady. An assertion in the
interface checks this rule, and `sync_fifo` asserts against overflow and
underflow. The dispatcher and collector have plain array ports, one element
per tile. The top wraps these into one interface pair per tile.

## Arithmetic

All arithmetic is IEEE-754 single precision, rounded to nearest-even after
every operation (`fp32_add`, `fp32_mul`, `fp32_div`, `u32_to_fp32`):

* Subnormal inputs are read as zero and subnormal results are flushed to zero.
* Infinities pass through, and inf−inf and inf×0 give a quiet NaN. NaN inputs
  are not otherwise treated specially.
* Division is sequential: one quotient bit per clock, with `done` 30 clocks
  after `start`. The collector runs x and y in parallel, so it spends about 31
  clocks per non-empty cluster.

The sums depend on the order of addition. Each tile adds in point order, and
the collector adds tiles in index order. Results are bit-exact for that order.
They can differ in the last bits from a software K-Means that adds in another
order.

## Parameters (top)

| parameter | default | meaning |
|---|---|---|
| `N_AIE` | 32 | compute tiles, the largest tile count evaluated in the reference work |
| `MAX_CLUSTERS` | 32 | centres a tile holds, the largest K evaluated there |
| `ADDR_W` | 32 | word-address width |
| `FIFO_DEPTH` | 8 | dispatcher read buffer, and the limit on words in flight |

The top also has one-clock event outputs for monitoring (`ev_backpressure`,
`ev_pad_vector`, `ev_pad_skip`, `ev_tile_stall`, `ev_empty_cluster`).

## How far to trust it, and where it departs

* Every block has a self-checking testbench. Each checks against an
  independent reference: double-precision arithmetic rounded to fp32 in the
  test's own code. The end-to-end tests compare every new centre bit for bit.
  They run at the default size (32 tiles, K = 4, 8, 16, 17 and 32, up to 2048
  points), with 4 tiles and with a single tile. The runs with fewer tiles make
  back-pressure and full tile buffers happen. Memory latency and ready signals are random.
* The distance path is one long combinational chain per clock: subtract,
  multiply, add, four compare levels, then the accumulate adder. It has not been
  pipelined or timing-closed. For a real clock target, registers belong
  after `vec_distance` and `min_dist`. The one-clock-per-chunk rate would stay
  the same, at the cost of a forwarding path for back-to-back updates of the same
  cluster.
* Area is large: 32 tiles × 16 lanes × 5 fp32 operators, plus the collector.
  The reference work maps this onto programmable vector processors and runs
  them at a higher clock than the data movers. Here everything is one
  synchronous clock domain.
* The reference work deals points to tiles with a stride of one point. Here the
  stride is one 16-point vector, which keeps whole vectors together and gives
  the same balance.
* The collector also receives the current centres from the dispatcher. It
  needs them for clusters that got no points. This side stream, the fixed
  tile order, the division by the count and the empty-cluster rule are this
  design's choices.
* The reference work reads memory in bursts of wide words. Here the read port
  takes one 1024-bit word per request and keeps up to `FIFO_DEPTH` requests in
  flight, which gives the same one-word-per-clock rate. It does not model
  burst setup or a narrower memory bus.
* Only two dimensions are built. The vector layout leaves no room for more
  without reducing the lane count.
* `n_clusters` of 0 or above `MAX_CLUSTERS` is not checked in hardware.

## Files

| file | role |
|---|---|
| `rtl/kmeans_pkg.sv` | vector, point, header and count types |
| `rtl/vec_stream_if.sv` | valid/ready vector stream with its hold assertion |
| `rtl/kmeans_top.sv` | dispatcher, N tiles and collector |
| `rtl/data_dispatcher.sv` | headers, centre broadcast, round-robin points, padding |
| `rtl/kmeans_tile.sv` | one compute tile |
| `rtl/vec_distance.sv`, `rtl/sq_dist.sv` | 16-lane squared distance |
| `rtl/min_dist.sv` | nearest lane |
| `rtl/accumulate_coords.sv` | per-cluster sums and counts |
| `rtl/data_collector.sv` | combine tiles, mean, write-back |
| `rtl/fp32_add.sv`, `fp32_mul.sv`, `fp32_div.sv`, `u32_to_fp32.sv` | fp32 arithmetic |
| `rtl/sync_fifo.sv` | small buffer |
| `tb/tb_*.sv` | one self-checking test per block, plus `tb_fp32_ops`, `tb_kmeans_top_full` (32 tiles) and `tb_kmeans_top_one` (1 tile) |
| `tb/fp_ref_pkg.sv`, `tb/kmeans_ref_pkg.sv` | reference arithmetic and reference iteration |

## Simulating

Each test prints `TB_RESULT checks=N failures=M` and stops. For example, the
4-tile end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/kmeans_pkg.sv tb/fp_ref_pkg.sv tb/kmeans_ref_pkg.sv rtl/vec_stream_if.sv \
  rtl/sync_fifo.sv rtl/fp32_add.sv rtl/fp32_mul.sv rtl/fp32_div.sv rtl/u32_to_fp32.sv \
  rtl/sq_dist.sv rtl/vec_distance.sv rtl/min_dist.sv rtl/accumulate_coords.sv \
  rtl/kmeans_tile.sv rtl/data_dispatcher.sv rtl/data_collector.sv rtl/kmeans_top.sv \
  tb/tb_kmeans_top.sv --top-module tb_kmeans_top
./obj_dir/Vtb_kmeans_top
```

Swap in `tb/tb_kmeans_top_full.sv` and `--top-module tb_kmeans_top_full` for
the 32-tile run. Building that model takes about two minutes; the run itself
takes under a second. A 32-cluster, 1124-point iteration takes about 1200
clocks, and most of that is the collector's divisions. For the block tests,
list only the files a block uses, with its `tb/tb_<block>.sv`.

To change the tile count or capacity, override `N_AIE` or `MAX_CLUSTERS` on
`kmeans_top`. The reference iteration in `kmeans_ref_pkg` takes the tile
count as an argument.
