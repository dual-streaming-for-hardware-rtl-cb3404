// ray_box_unit: fixed-function ray / axis-aligned box intersection pipeline.
//
// Each thread multiprocessor has one of these, shared by its thread
// processors. It uses the slab method with the ray's precomputed inverse
// direction, so no division happens here: per axis the distances to the two
// box planes are (plane - origin) * inv_dir; the entry distance is the
// largest of the per-axis minima (clamped to 0) and the exit distance the
// smallest of the per-axis maxima (clamped to the ray's current tmax). The
// box is hit when entry <= exit.
//
// Timing: a new test is accepted every cycle (initiation interval 1) and its
// result appears LATENCY = 8 cycles later, as in the evaluated design.
// Reset (rst_n) is synchronous and active low. The
// split of the arithmetic into stages is this design's own: stage 1 forms the
// products, stage 2 the min/max reduction, the remaining stages only delay.
// A tag travels with each test so the result can be routed back to the
// requesting thread.
module ray_box_unit
  import ds_pkg::*;
#(
  parameter int LATENCY = 8,
  parameter int TAG_W   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  vec3_t            in_org,
  input  dvec3_t           in_inv,      // inverse direction, Q16.16
  input  vec3_t            in_bmin,
  input  vec3_t            in_bmax,
  input  dist_t            in_tmax,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic             out_hit,
  output dist_t            out_tnear,
  output logic [TAG_W-1:0] out_tag
);

  // (plane - origin) [Q8.8, 17 bit] * inv [Q16.16] -> Q.24, scaled to Q16.16
  function automatic dist_t plane_dist(coord_t p, coord_t o, dist_t inv);
    logic signed [COORD_W:0]     d;
    logic signed [COORD_W+DIST_W:0] prod;
    logic signed [COORD_W+DIST_W:0] sh;
    d    = (COORD_W+1)'(p) - (COORD_W+1)'(o);
    prod = (COORD_W+DIST_W+1)'(d) * (COORD_W+DIST_W+1)'(inv);
    sh   = prod >>> COORD_FRAC;
    if (sh > (COORD_W+DIST_W+1)'(DIST_MAX))       return DIST_MAX;
    else if (sh < -(COORD_W+DIST_W+1)'(DIST_MAX)) return -DIST_MAX;
    else                                          return dist_t'(sh);
  endfunction

  function automatic dist_t dmax(dist_t a, dist_t b);
    return (a > b) ? a : b;
  endfunction
  function automatic dist_t dmin(dist_t a, dist_t b);
    return (a < b) ? a : b;
  endfunction

  // ---- stage 1: per-axis slab distances ----------------------------------
  dvec3_t            s1_lo, s1_hi;
  dist_t             s1_tmax;
  logic              s1_valid;
  logic [TAG_W-1:0]  s1_tag;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
    end else begin
      s1_valid <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    for (int a = 0; a < 3; a++) begin
      dist_t ta, tb;
      ta = plane_dist(in_bmin[a], in_org[a], in_inv[a]);
      tb = plane_dist(in_bmax[a], in_org[a], in_inv[a]);
      s1_lo[a] <= dmin(ta, tb);
      s1_hi[a] <= dmax(ta, tb);
    end
    s1_tmax <= in_tmax;
    s1_tag  <= in_tag;
  end

  // ---- stage 2: reduction --------------------------------------------------
  logic             s2_valid, s2_hit;
  dist_t            s2_tnear;
  logic [TAG_W-1:0] s2_tag;

  always_comb begin
    dist_t tn, tf;
    tn = dmax(dmax(s1_lo[0], s1_lo[1]), dmax(s1_lo[2], '0));
    tf = dmin(dmin(s1_hi[0], s1_hi[1]), dmin(s1_hi[2], s1_tmax));
    s2_hit   = (tn <= tf);
    s2_tnear = tn;
    s2_tag   = s1_tag;
    s2_valid = s1_valid;
  end

  // ---- delay to the specified latency -------------------------------------
  localparam int DLY = LATENCY - 1;   // stage 1 already used one cycle
  typedef struct packed {
    logic             valid;
    logic             hit;
    dist_t            tnear;
    logic [TAG_W-1:0] tag;
  } res_t;

  res_t pipe [DLY];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DLY; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= '{valid: s2_valid, hit: s2_hit, tnear: s2_tnear, tag: s2_tag};
      for (int i = 1; i < DLY; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign out_valid = pipe[DLY-1].valid;
  assign out_hit   = pipe[DLY-1].hit;
  assign out_tnear = pipe[DLY-1].tnear;
  assign out_tag   = pipe[DLY-1].tag;

endmodule
