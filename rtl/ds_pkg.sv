// ds_pkg: types and constants shared by the dual-streaming ray tracing
// processor.
//
// Sizes follow the configuration the design is evaluated in: 2 KB ray
// buckets, 64 KB scene segments (treelets), 64-byte memory lines and a 4 MB
// scene buffer. The number format is this design's own choice: coordinates
// are 16-bit two's-complement fixed point with 8 fraction bits, distances
// and inverse directions are 32-bit with 16 fraction bits.
//
// A ray occupies one 32-byte slot of a bucket (2 KB / 64). Slot 0 of each
// bucket holds the bucket header (next-bucket address and ray count), so a
// bucket carries up to 63 rays.
package ds_pkg;

  // ---- number formats ---------------------------------------------------
  localparam int COORD_W    = 16;   // Q8.8
  localparam int COORD_FRAC = 8;
  localparam int DIST_W     = 32;   // Q16.16
  localparam int DIST_FRAC  = 16;

  typedef logic signed [COORD_W-1:0] coord_t;
  typedef logic signed [DIST_W-1:0]  dist_t;
  typedef coord_t [2:0]              vec3_t;
  typedef dist_t  [2:0]              dvec3_t;

  localparam dist_t DIST_MAX = 32'sh7fff_ffff;

  // ---- memory organisation ---------------------------------------------
  localparam int LINE_BYTES    = 64;
  localparam int LINE_W        = LINE_BYTES * 8;
  localparam int SLOT_BYTES    = 32;                     // one ray slot
  localparam int SLOT_W        = SLOT_BYTES * 8;
  localparam int BUCKET_BYTES  = 2048;
  localparam int BUCKET_SLOTS  = BUCKET_BYTES / SLOT_BYTES;   // 64
  localparam int BUCKET_RAYS   = BUCKET_SLOTS - 1;            // 63
  localparam int SEG_BYTES     = 65536;
  localparam int SEG_LINES     = SEG_BYTES / LINE_BYTES;      // 1024

  localparam int RAYID_W  = 24;     // >= 10.5 M rays per frame
  localparam int NODE_W   = 16;     // byte offset of a node inside a segment
  localparam int PRIM_W   = 32;
  localparam int SEG_W    = 10;     // segment identifier
  localparam int BADDR_W  = 26;     // bucket index: 2^26 x 2 KB = 128 GB space
  localparam int LADDR_W  = 26;     // DRAM line address (64 B lines, 4 GB)

  // ---- ray record ---------------------------------------------------------
  typedef struct packed {
    vec3_t               org;
    vec3_t               dir;
    logic [RAYID_W-1:0]  id;
    logic [NODE_W-1:0]   node;
  } ray_t;                                    // 136 bits

  localparam int RAY_W = $bits(ray_t);

  // ---- bucket header, stored in slot 0 of a bucket ------------------------
  typedef struct packed {
    logic [BADDR_W-1:0] next;
    logic [6:0]         count;
  } bucket_hdr_t;

  // ---- shared hit record --------------------------------------------------
  typedef struct packed {
    dist_t              t;
    logic [PRIM_W-1:0]  prim;
  } hit_rec_t;

  typedef struct packed {
    logic [RAYID_W-1:0] id;
    hit_rec_t           hit;
  } hit_upd_t;

  // ---- memory-controller request formats ----------------------------------
  // Ray stream channel: one 32-byte slot per access.
  typedef struct packed {
    logic                                     we;
    logic [BADDR_W+$clog2(BUCKET_SLOTS)-1:0]  addr;   // slot address
    logic [SLOT_W-1:0]                        wdata;
  } ray_mem_req_t;

  // Scene stream channel: one 64-byte line per read.
  typedef struct packed {
    logic [LADDR_W-1:0] addr;
  } scene_mem_req_t;

  // Hit record channel: one record per access, addressed by ray index.
  typedef struct packed {
    logic               we;
    logic [RAYID_W-1:0] addr;
    hit_rec_t           wdata;
  } hit_mem_req_t;

  // ---- operands a thread sends to the TM's intersection pipelines ---------
  typedef struct packed {
    vec3_t  org;
    dvec3_t inv;       // inverse direction, from the division unit
    vec3_t  bmin;
    vec3_t  bmax;
    dist_t  tmax;
  } box_op_t;

  typedef struct packed {
    vec3_t  org;
    vec3_t  dir;
    vec3_t  v0;
    vec3_t  v1;
    vec3_t  v2;
    dist_t  tmax;
  } tri_op_t;

  // ---- helpers ------------------------------------------------------------
  function automatic logic [SLOT_W-1:0] ray_to_slot(ray_t r);
    return SLOT_W'(r);
  endfunction

  function automatic ray_t slot_to_ray(logic [SLOT_W-1:0] s);
    return ray_t'(s[RAY_W-1:0]);
  endfunction

endpackage
