# Dual-streaming ray tracing processor

Ray tracing is hard on memory because every ray walks the scene's
acceleration tree along its own path. Each thread fetches tree nodes and
triangles from wherever its ray happens to be, and no cache holds a large
scene. Dual streaming turns this around. The scene is cut into *segments*,
which are sub-trees (treelets) of the bounding-volume hierarchy, each stored
contiguously in DRAM. The segments are visited in a fixed order, parents
before children, and each segment is loaded onto the chip at most once per
wavefront of rays.

Every segment owns a *ray queue* in DRAM. When a ray leaves a segment
through one of its child boxes, it is not followed there. It is copied into
the child's queue and picked up when that child's turn comes. So the chip
reads and writes only two kinds of sequential data:

* the **scene stream**: whole segments, line by line, into an on-chip scene
  buffer;
* the **ray stream**: 2 KB buckets of rays, read from one queue and appended
  to another.

Both streams are known ahead of time, so they can be prefetched. The only
random DRAM traffic left is the update of each ray's closest hit.

This repository is synthesizable SystemVerilog for the processor around
that idea. The datapath has:

* fixed-function ray-box and ray-triangle pipelines;
* the staging buffers that feed rays to the threads;
* per-group L1 caches;
* the global scene buffer;
* the stream scheduler, which does all the queue bookkeeping;
* the hit record updater.

The programmable thread processors are not included. They run the traversal
program, and their requests enter through ports. The memory controller and
DRAM are outside the chip.

## Organisation

```
ds_top
 |- thread_multiprocessor x NUM_TM (128)      one group of TPS (16) thread ports
 |    |- ray_staging_buffer   two 2 KB halves: one fills while the threads drain the other
 |    |- l1_cache             16 KB, 8 banks, read-only scene data
 |    |- recip_unit           shared divider: 1/direction for a newly fetched ray
 |    |- ray_box_unit         slab test, one per cycle, 8-cycle latency
 |    |- ray_tri_unit x 2     Pluecker test, one per 18 cycles each, 31-cycle latency
 |    `- rr_arbiter x 7       round-robin access of the threads to each unit
 |- stream_scheduler          segment order, working set, ray queues, bucket fills
 |- scene_buffer              64 slots x 64 KB = 4 MB, one write and one read port
 |- hit_record_updater        merging queue + read-compare-write of closest hits
 `- rr_arbiter x 3            TMs -> write queue, hit updater, scene-buffer read port
ds_pkg                        number formats, ray/bucket/hit records, memory requests
```

`ds_top` has three memory channels, each with valid/ready requests and
in-order read responses:

| Channel | Traffic                    | Unit                   |
|---------|----------------------------|------------------------|
| `sc_*`  | scene lines, 64 B reads    | serves the scene buffer |
| `rm_*`  | ray slots, 32 B reads and writes | bucket traffic   |
| `hm_*`  | hit records                | read and write         |

The thread ports are brought out as arrays indexed `[TM][TP]`.

## The stream scheduler (the hard part)

Start with `stream_scheduler.sv` and its opening comment. It has four jobs.

### Segment table
For each segment, the table holds:
* its DRAM line address and length;
* its children, as one contiguous id range;
* its queue: head bucket, tail bucket, fill of the tail bucket, and number of buckets.

The table holds up to 1024 segments. It is loaded through `cfg_*` before a
wavefront.

### Order and working set
A stack holds the segments still to process, in depth-first order. A popped
segment with an empty queue is skipped, and its whole subtree with it,
because no ray can reach a descendant without passing through it.

Any other popped segment takes a free scene-buffer slot (64 slots, 64 KB
each). Its data is then streamed in by one of 8 stream trackers, one line
per request.

A resident segment *completes* when all three hold:
* all its buckets were handed out;
* its data is loaded;
* every ray handed out has been reported finished.

Then its slot is freed and its children are pushed onto the stack.

### Writes
Threads send two kinds of message through one ordered write queue: rays for
child segments, and "ray finished" notices. Because the queue keeps their
order, a segment cannot complete before the rays it produced were appended
to their queues.

A ray goes into the tail bucket of its destination. When the tail is full
or missing, a new bucket is taken, and the link is written into the old
tail's header. New buckets come from a free list of recycled buckets first,
then from a bump pointer.

A child is loaded only after its parent completes. So rays are never
written into a resident segment, and an assertion checks this.

### Reads
A TM's staging buffer asks for a bucket whenever one half is empty. The
scheduler serves the request in this order:
1. a bucket of the same segment that TM worked on last, which keeps its L1
   warm;
2. otherwise, a bucket of any fully loaded resident segment.

The scheduler reads the bucket header (next pointer and count), then the
rays, and forwards them to the TM with the slot number.

When a slot is given to a new segment, every L1 is flushed. L1 tags are
scene-buffer slot numbers, so stale lines would otherwise alias.

### Bucket format
A bucket is 2 KB, made of 64 slots of 32 bytes. Slot 0 is the header
(next bucket, ray count), so a bucket holds 63 rays. A ray slot holds:
* origin and direction, 3 x 16 bits each;
* a 24-bit ray id;
* a 16-bit node field.

## Thread interface

Each TM has one request/grant/done port per thread and per shared unit.
* A thread raises `req` with its operands and holds them until `gnt`.
* Results return with the thread number as tag. They show as a one-cycle
  `done` bit, with the data on a bus shared by the TM.
* Ray-triangle results have a bus per thread, because the two pipelines
  finish independently.
* A thread sends rays for children on `tp_rq_*` (`fin = 0`, `dst` = child
  segment). It sends "finished with this ray" with `fin = 1` and `dst` = its
  slot.
* A thread sends closest-hit candidates on `tp_hit_*`.

A thread should keep at most one request outstanding per unit.

The traversal step a thread runs is:
1. fetch a ray;
2. invert its direction;
3. read node data through the L1, using byte address {slot, line, offset};
4. box-test the children;
5. forward the ray to each child it enters;
6. intersect the triangles;
7. send hit updates;
8. send the finish notice.

## Arithmetic

The pipelines use fixed point, a choice made here:
* coordinates are Q8.8 (16 bits);
* distances and inverse directions are Q16.16 (32 bits), saturating.

`ray_box_unit` computes the slab distances with the precomputed inverse
direction in the first stage, reduces them in the second, and delays the
result to the 8-cycle latency.

`ray_tri_unit` first tests the ray against the three edges in Pluecker form,
as scalar triple products, in 13 cycles. Only then does a radix-4 divider
compute `t`, in 18 cycles, so a result appears 31 cycles after it is
accepted. A new triangle is accepted every 18 cycles. The hit condition is
`0 < t < tmax`.

`recip_unit` is a restoring divider producing 1/d, 27 cycles per request.

## Where this departs from the source design

* **Thread processors, instruction cache, shared execution units, L2,
  memory controller, DRAM:** not built. The threads' requests are ports, and
  memory is three external channels.
* **Early ray termination:** the threads cannot read hit records. The
  source design lets a thread check the shared hit record of a ray before
  or after traversing a segment, and drop the ray if a duplicate already
  found a closer hit. Without this, every duplicate runs to completion. The
  final hit records are the same; only the amount of work differs.
* **Floating point:** the described hardware uses floating point. This RTL
  uses the fixed-point formats above.
* **Bucket capacity:** a 2 KB bucket is said to hold 64 rays and also to
  carry a header. This RTL keeps the 2 KB size and gives the header one
  slot, leaving 63 rays.
* **L1 cache:** direct-mapped. Its 8 banks hold the lines but are not
  accessed in parallel, and there is one miss at a time. This block is
  marked partial.
* **Own choices (not specified by the source):**
  * the segment table size (1024 segments);
  * queue depths (16-entry write queue and hit-updater queue);
  * one bucket transfer at a time;
  * round-robin arbitration everywhere;
  * L1 flush on slot reuse;
  * synchronous active-low reset;
  * all handshakes.

### Workload fit
The evaluated scenes are rendered at 1024x1024 with up to about 2 million
rays per wavefront.
* Their ray ids (24 bits) and bucket traffic fit.
* The segment table probably does not fit most of them. From their
  scene-stream traffic, most scenes touch more than 1024 segments of 64 KB
  per wavefront. The exceptions are the two small ones, Fairy Forest and
  Crytek Sponza.

`MAX_SEGS` is a parameter.

## Simulating

Every block has a self-checking testbench in `tb/`, ending in a
`TB_RESULT checks=N failures=M` line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ds_pkg.sv \
    rtl/<block>.sv [rtl/<sub-blocks>.sv] tb/tb_<block>.sv --top-module tb_<block>
./obj_dir/Vtb_<block>
```

For the whole chip, compile all of `rtl/*.sv` (package first) with
`tb/ds_top_harness.sv` and one of the two top testbenches:

* `tb/tb_ds_top.sv`: 2 TMs of 4 threads, a 4-slot working set, 16-line
  segments. It runs in well under a second.
* `tb/tb_ds_top_full.sv`: `ds_top` with every parameter at its default (128
  TMs x 16 threads, 64 slots, 1024 segments), with 2 active threads per TM.
  Compiling takes a few minutes, and simulating about half a minute.

### The end-to-end harness
`ds_top_harness` plays all roles around `ds_top`: the threads, the three
memory channels, and the host that loads the segment table.

The scene is a ten-segment tree over a 16x16 square. Each segment carries
its children's boxes and two triangles at known depths. The harness:
1. writes 128 primary rays into the root;
2. starts the wavefront;
3. runs a traversal loop in each thread model.

At the end, every ray's hit record must hold the nearest triangle among the
segments it actually crossed. That value is computed independently in the
harness.

The harness also counts each mechanism and fails if one never happened:
* skipped subtrees;
* multi-bucket queues;
* same-segment bucket refills;
* L1 flushes;
* L1 hits and misses;
* hit merges;
* hit writes.

The full-size run does not require an L1 flush. Its 64 slots are never
reused by the seven segments of this scene.

To change the design, edit the parameters of `ds_top`. Field widths follow
from them, except the number formats and record layouts in `ds_pkg`.
