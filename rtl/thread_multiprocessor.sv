// thread_multiprocessor (TM): a group of TPS thread processors (TPs) and the
// units they share.
//
// Shared units inside: the input ray staging buffer (two buckets), the L1
// scene-data cache, one ray-box pipeline, two ray-triangle pipelines and the
// division unit that inverts ray directions. The thread processors
// themselves are programmable cores running the traversal program and are
// not part of this RTL: their requests enter through the tp_* ports.
//
// Every shared unit is reached the same way: a TP raises its request bit
// with its operands and holds them until it sees its grant bit (one cycle);
// a round-robin arbiter picks one TP per unit per cycle when the unit can
// accept. Results come back with the TP number as tag and are presented as a
// one-cycle *_done pulse on that TP's bit with the data on a shared bus (the
// triangle results have one bus per pipeline, selected per TP). Outgoing
// traffic - rays written to child segments, "ray finished" notices and hit
// updates - is arbitrated the same way onto the TM's two outgoing ports,
// which the stream scheduler and hit record updater serve.
//
// Which units a TM shares follows the design; arbitration, handshakes and
// the per-TP port shape are this design's own. A TP should keep at most one
// request outstanding per unit. Reset (rst_n) is synchronous and active low.
module thread_multiprocessor
  import ds_pkg::*;
#(
  parameter int TPS      = 16,
  parameter int SW       = 6,       // working-set slot id width
  parameter int GW       = 10,      // segment id width
  parameter int L1_BYTES = 16384,
  parameter int L1_BANKS = 8,
  parameter int SEG_LINES = ds_pkg::SEG_LINES,  // 64-byte lines per segment
  localparam int TGW = (TPS > 1) ? $clog2(TPS) : 1,
  localparam int AW  = SW + $clog2(SEG_LINES) + 6   // scene-buffer byte address
) (
  input  logic               clk,
  input  logic               rst_n,
  // ---- thread processor side ---------------------------------------------
  // ray fetch from the staging buffer
  input  logic [TPS-1:0]     tp_ray_req,
  output logic [TPS-1:0]     tp_ray_gnt,
  output logic [TPS-1:0]     tp_ray_done,
  output ray_t               tp_ray,
  output logic [SW-1:0]      tp_ray_slot,
  // inverse direction
  input  logic [TPS-1:0]     tp_div_req,
  input  vec3_t              tp_div_dir [TPS],
  output logic [TPS-1:0]     tp_div_gnt,
  output logic [TPS-1:0]     tp_div_done,
  output dvec3_t             tp_div_inv,
  // ray-box
  input  logic [TPS-1:0]     tp_box_req,
  input  box_op_t            tp_box_op [TPS],
  output logic [TPS-1:0]     tp_box_gnt,
  output logic [TPS-1:0]     tp_box_done,
  output logic               tp_box_hit,
  output dist_t              tp_box_tnear,
  // ray-triangle
  input  logic [TPS-1:0]     tp_tri_req,
  input  tri_op_t            tp_tri_op [TPS],
  output logic [TPS-1:0]     tp_tri_gnt,
  output logic [TPS-1:0]     tp_tri_done,
  output logic [TPS-1:0]     tp_tri_hit,
  output dist_t              tp_tri_t [TPS],
  // scene data through L1
  input  logic [TPS-1:0]     tp_l1_req,
  input  logic [AW-1:0]      tp_l1_addr [TPS],
  output logic [TPS-1:0]     tp_l1_gnt,
  output logic [TPS-1:0]     tp_l1_done,
  output logic [LINE_W-1:0]  tp_l1_data,
  // rays to child segments / ray finished
  input  logic [TPS-1:0]     tp_rq_req,
  input  logic [TPS-1:0]     tp_rq_fin,       // 1: "ray finished" notice
  input  logic [GW-1:0]      tp_rq_dst [TPS], // child segment, or slot when finished
  input  ray_t               tp_rq_ray [TPS],
  output logic [TPS-1:0]     tp_rq_gnt,
  // hit record updates
  input  logic [TPS-1:0]     tp_hit_req,
  input  hit_upd_t           tp_hit [TPS],
  output logic [TPS-1:0]     tp_hit_gnt,
  // ---- chip side --------------------------------------------------------------
  output logic               fill_ready,
  input  logic               fill_valid,
  input  ray_t               fill_ray,
  input  logic               fill_last,
  input  logic [SW-1:0]      fill_slot,
  output logic               want_bucket,
  output logic [SW-1:0]      last_slot,
  input  logic               l1_flush,
  output logic               sb_req,
  output logic [AW-7:0]      sb_line,
  input  logic               sb_gnt,
  input  logic [LINE_W-1:0]  sb_data,
  output logic               rq_valid,
  input  logic               rq_ready,
  output logic               rq_fin,
  output logic [GW-1:0]      rq_dst,
  output ray_t               rq_ray,
  output logic               hit_valid,
  input  logic               hit_ready,
  output hit_upd_t           hit_upd,
  output logic [31:0]        l1_hits,
  output logic [31:0]        l1_misses
);

  // ---- staging buffer ------------------------------------------------------
  logic          st_avail, st_rd_valid;
  logic [TGW-1:0] ray_idx, ray_tag;
  logic          ray_any;
  ray_t          st_ray;
  logic [SW-1:0] st_seg;

  rr_arbiter #(.N(TPS)) u_arb_ray (.clk, .rst_n, .en(st_avail), .ack(1'b1), .req(tp_ray_req),
    .gnt(tp_ray_gnt), .idx(ray_idx), .any(ray_any));

  ray_staging_buffer #(.SLOT_W(SW)) u_stage (
    .clk, .rst_n,
    .fill_ready, .fill_valid, .fill_ray, .fill_last, .fill_seg(fill_slot),
    .want_bucket, .last_seg(last_slot),
    .rd_avail(st_avail), .rd_req(ray_any), .rd_valid(st_rd_valid), .rd_ray(st_ray), .rd_seg(st_seg));

  always_ff @(posedge clk) if (ray_any) ray_tag <= ray_idx;

  always_comb begin
    tp_ray_done = '0;
    if (st_rd_valid) tp_ray_done[ray_tag] = 1'b1;
  end
  assign tp_ray      = st_ray;
  assign tp_ray_slot = st_seg;

  // ---- division unit --------------------------------------------------------
  logic           div_ready, div_any, div_ov;
  logic [TGW-1:0] div_idx, div_otag;
  rr_arbiter #(.N(TPS)) u_arb_div (.clk, .rst_n, .en(div_ready), .ack(1'b1), .req(tp_div_req),
    .gnt(tp_div_gnt), .idx(div_idx), .any(div_any));
  recip_unit #(.TAG_W(TGW)) u_div (.clk, .rst_n, .in_valid(div_any), .in_ready(div_ready),
    .in_dir(tp_div_dir[div_idx]), .in_tag(div_idx), .out_valid(div_ov), .out_inv(tp_div_inv),
    .out_tag(div_otag));
  always_comb begin
    tp_div_done = '0;
    if (div_ov) tp_div_done[div_otag] = 1'b1;
  end

  // ---- ray-box pipeline -------------------------------------------------------
  logic           box_any, box_ov;
  logic [TGW-1:0] box_idx, box_otag;
  box_op_t        bop;
  rr_arbiter #(.N(TPS)) u_arb_box (.clk, .rst_n, .en(1'b1), .ack(1'b1), .req(tp_box_req),
    .gnt(tp_box_gnt), .idx(box_idx), .any(box_any));
  assign bop = tp_box_op[box_idx];
  ray_box_unit #(.TAG_W(TGW)) u_box (.clk, .rst_n, .in_valid(box_any), .in_org(bop.org),
    .in_inv(bop.inv), .in_bmin(bop.bmin), .in_bmax(bop.bmax), .in_tmax(bop.tmax),
    .in_tag(box_idx), .out_valid(box_ov), .out_hit(tp_box_hit), .out_tnear(tp_box_tnear),
    .out_tag(box_otag));
  always_comb begin
    tp_box_done = '0;
    if (box_ov) tp_box_done[box_otag] = 1'b1;
  end

  // ---- two ray-triangle pipelines ----------------------------------------------
  logic [1:0]     tri_ready, tri_ov, tri_hit;
  dist_t          tri_t [2];
  logic [TGW-1:0] tri_otag [2];
  logic           tri_any;
  logic [TGW-1:0] tri_idx;
  logic           tri_sel;                      // pipeline taking this request
  tri_op_t        top_;
  assign tri_sel = !tri_ready[0];
  rr_arbiter #(.N(TPS)) u_arb_tri (.clk, .rst_n, .en(|tri_ready), .ack(1'b1), .req(tp_tri_req),
    .gnt(tp_tri_gnt), .idx(tri_idx), .any(tri_any));
  assign top_ = tp_tri_op[tri_idx];

  for (genvar u = 0; u < 2; u++) begin : g_tri
    ray_tri_unit #(.TAG_W(TGW)) u_tri (.clk, .rst_n,
      .in_valid(tri_any && (tri_sel == 1'(u))), .in_ready(tri_ready[u]),
      .in_org(top_.org), .in_dir(top_.dir), .in_v0(top_.v0), .in_v1(top_.v1), .in_v2(top_.v2),
      .in_tmax(top_.tmax), .in_tag(tri_idx),
      .out_valid(tri_ov[u]), .out_hit(tri_hit[u]), .out_t(tri_t[u]), .out_tag(tri_otag[u]));
  end

  always_comb begin
    tp_tri_done = '0;
    tp_tri_hit  = '0;
    for (int i = 0; i < TPS; i++) tp_tri_t[i] = '0;
    for (int u = 0; u < 2; u++) begin
      if (tri_ov[u]) begin
        tp_tri_done[tri_otag[u]] = 1'b1;
        tp_tri_hit[tri_otag[u]]  = tri_hit[u];
        tp_tri_t[tri_otag[u]]    = tri_t[u];
      end
    end
  end

  // ---- L1 cache ------------------------------------------------------------------
  logic           l1_ready, l1_any, l1_rv;
  logic [TGW-1:0] l1_idx, l1_rtag;
  rr_arbiter #(.N(TPS)) u_arb_l1 (.clk, .rst_n, .en(l1_ready), .ack(1'b1), .req(tp_l1_req),
    .gnt(tp_l1_gnt), .idx(l1_idx), .any(l1_any));
  l1_cache #(.SIZE_BYTES(L1_BYTES), .BANKS(L1_BANKS), .AW(AW), .TAG_W(TGW)) u_l1 (
    .clk, .rst_n, .flush(l1_flush),
    .req_valid(l1_any), .req_ready(l1_ready), .req_addr(tp_l1_addr[l1_idx]), .req_tag(l1_idx),
    .resp_valid(l1_rv), .resp_data(tp_l1_data), .resp_tag(l1_rtag),
    .sb_req, .sb_line, .sb_gnt, .sb_data, .hits(l1_hits), .misses(l1_misses));
  always_comb begin
    tp_l1_done = '0;
    if (l1_rv) tp_l1_done[l1_rtag] = 1'b1;
  end

  // ---- outgoing rays / finished notices ----------------------------------------
  // selection does not depend on rq_ready, acceptance does
  logic [TPS-1:0] rq_sel, hit_sel;
  logic [TGW-1:0] rq_idx, hit_idx;
  rr_arbiter #(.N(TPS)) u_arb_rq (.clk, .rst_n, .en(1'b1), .ack(rq_ready), .req(tp_rq_req),
    .gnt(rq_sel), .idx(rq_idx), .any(rq_valid));
  assign tp_rq_gnt = rq_sel & {TPS{rq_ready}};
  assign rq_fin    = tp_rq_fin[rq_idx];
  assign rq_dst    = tp_rq_dst[rq_idx];
  assign rq_ray    = tp_rq_ray[rq_idx];

  // ---- hit updates -------------------------------------------------------------------
  rr_arbiter #(.N(TPS)) u_arb_hit (.clk, .rst_n, .en(1'b1), .ack(hit_ready), .req(tp_hit_req),
    .gnt(hit_sel), .idx(hit_idx), .any(hit_valid));
  assign tp_hit_gnt = hit_sel & {TPS{hit_ready}};
  assign hit_upd    = tp_hit[hit_idx];

endmodule
