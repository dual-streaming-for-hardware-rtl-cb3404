// ds_top: the dual-streaming ray tracing processor.
//
// NUM_TM thread multiprocessors (each with TPS thread ports, a staging
// buffer, an L1, one ray-box and two ray-triangle pipelines and a division
// unit) share three chip-wide units:
//  * the stream scheduler, which admits scene segments into the working set,
//    streams their data into the scene buffer, keeps every segment's ray
//    queue as linked buckets in DRAM and fills the TMs' staging buffers;
//  * the scene buffer (4 MB, 64 segment slots), read by the L1s on misses;
//  * the hit record updater, which merges and applies closest-hit updates to
//    the shared hit records in DRAM.
// The memory controller and DRAM are outside: the three memory streams leave
// the chip as separate request/response channels - scene stream (line
// reads), ray stream (32-byte slot reads and writes) and hit records - each
// with valid/ready requests and in-order read responses. The thread
// processors are outside too: their per-TM request ports are brought out as
// arrays indexed [TM][TP].
//
// Chip-level arbitration (this design's choice): a round-robin arbiter per
// shared port picks one TM per cycle - for the scheduler's ray write queue,
// for the hit record updater and for the scene buffer's read port. Bucket
// fills from the scheduler go to the TM it names.
//
// Use: load the segment table through cfg_*, have the threads write the
// wavefront's rays into segment 0 (rq with fin = 0), pulse start, and wait
// for pass_done. Reset (rst_n) is synchronous and active low.
module ds_top
  import ds_pkg::*;
#(
  parameter int NUM_TM     = 128,
  parameter int TPS        = 16,
  parameter int MAX_SEGS   = 1024,
  parameter int WS_SLOTS   = 64,
  parameter int STREAMS    = 8,
  parameter int SEG_LINES  = ds_pkg::SEG_LINES,
  parameter int L1_BYTES   = 16384,
  parameter int L1_BANKS   = 8,
  parameter int HRU_DEPTH  = 16,
  localparam int GW  = $clog2(MAX_SEGS),
  localparam int SW  = $clog2(WS_SLOTS),
  localparam int LW  = $clog2(SEG_LINES),
  localparam int AW  = SW + LW + $clog2(LINE_BYTES),
  localparam int TMW = (NUM_TM > 1) ? $clog2(NUM_TM) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // segment table and control
  input  logic               cfg_we,
  input  logic [GW-1:0]      cfg_seg,
  input  logic [LADDR_W-1:0] cfg_line,
  input  logic [LW:0]        cfg_nlines,
  input  logic [GW-1:0]      cfg_first_child,
  input  logic [GW:0]        cfg_nchild,
  input  logic [BADDR_W-1:0] bucket_base,
  input  logic               start,
  output logic               busy,
  output logic               pass_done,
  output logic               hits_idle,
  // thread processor ports, [TM][TP]
  input  logic [TPS-1:0]     tp_ray_req  [NUM_TM],
  output logic [TPS-1:0]     tp_ray_gnt  [NUM_TM],
  output logic [TPS-1:0]     tp_ray_done [NUM_TM],
  output ray_t               tp_ray      [NUM_TM],
  output logic [SW-1:0]      tp_ray_slot [NUM_TM],
  input  logic [TPS-1:0]     tp_div_req  [NUM_TM],
  input  vec3_t              tp_div_dir  [NUM_TM][TPS],
  output logic [TPS-1:0]     tp_div_gnt  [NUM_TM],
  output logic [TPS-1:0]     tp_div_done [NUM_TM],
  output dvec3_t             tp_div_inv  [NUM_TM],
  input  logic [TPS-1:0]     tp_box_req  [NUM_TM],
  input  box_op_t            tp_box_op   [NUM_TM][TPS],
  output logic [TPS-1:0]     tp_box_gnt  [NUM_TM],
  output logic [TPS-1:0]     tp_box_done [NUM_TM],
  output logic               tp_box_hit  [NUM_TM],
  output dist_t              tp_box_tnear[NUM_TM],
  input  logic [TPS-1:0]     tp_tri_req  [NUM_TM],
  input  tri_op_t            tp_tri_op   [NUM_TM][TPS],
  output logic [TPS-1:0]     tp_tri_gnt  [NUM_TM],
  output logic [TPS-1:0]     tp_tri_done [NUM_TM],
  output logic [TPS-1:0]     tp_tri_hit  [NUM_TM],
  output dist_t              tp_tri_t    [NUM_TM][TPS],
  input  logic [TPS-1:0]     tp_l1_req   [NUM_TM],
  input  logic [AW-1:0]      tp_l1_addr  [NUM_TM][TPS],
  output logic [TPS-1:0]     tp_l1_gnt   [NUM_TM],
  output logic [TPS-1:0]     tp_l1_done  [NUM_TM],
  output logic [LINE_W-1:0]  tp_l1_data  [NUM_TM],
  input  logic [TPS-1:0]     tp_rq_req   [NUM_TM],
  input  logic [TPS-1:0]     tp_rq_fin   [NUM_TM],
  input  logic [GW-1:0]      tp_rq_dst   [NUM_TM][TPS],
  input  ray_t               tp_rq_ray   [NUM_TM][TPS],
  output logic [TPS-1:0]     tp_rq_gnt   [NUM_TM],
  input  logic [TPS-1:0]     tp_hit_req  [NUM_TM],
  input  hit_upd_t           tp_hit      [NUM_TM][TPS],
  output logic [TPS-1:0]     tp_hit_gnt  [NUM_TM],
  // scene stream memory channel
  output logic               sc_req_valid,
  input  logic               sc_req_ready,
  output scene_mem_req_t     sc_req,
  input  logic               sc_resp_valid,
  input  logic [LINE_W-1:0]  sc_resp_data,
  // ray stream memory channel
  output logic               rm_req_valid,
  input  logic               rm_req_ready,
  output ray_mem_req_t       rm_req,
  input  logic               rm_resp_valid,
  input  logic [SLOT_W-1:0]  rm_resp_data,
  // hit record memory channel
  output logic               hm_req_valid,
  input  logic               hm_req_ready,
  output hit_mem_req_t       hm_req,
  input  logic               hm_resp_valid,
  input  hit_rec_t           hm_resp_data,
  // statistics
  output logic [31:0]        n_seg_done,
  output logic [31:0]        n_seg_skipped,
  output logic [31:0]        n_bkt_alloc,
  output logic [31:0]        n_bkt_read,
  output logic [31:0]        n_affinity,
  output logic [31:0]        n_rays_written,
  output logic [31:0]        n_hit_merged,
  output logic [31:0]        n_hit_written,
  output logic [31:0]        n_hit_stall,
  output logic [31:0]        l1_hits     [NUM_TM],
  output logic [31:0]        l1_misses   [NUM_TM]
);

  // ---- TM-side signals ----------------------------------------------------------
  logic [NUM_TM-1:0] tm_fill_ready, tm_want, tm_sb_req, tm_sb_gnt;
  logic [NUM_TM-1:0] tm_rq_valid, tm_rq_ready, tm_rq_fin, tm_hit_valid, tm_hit_ready;
  logic [SW-1:0]     tm_last_slot [NUM_TM];
  logic [AW-7:0]     tm_sb_line   [NUM_TM];
  logic [GW-1:0]     tm_rq_dst    [NUM_TM];
  ray_t              tm_rq_ray    [NUM_TM];
  hit_upd_t          tm_hit_upd   [NUM_TM];

  // scheduler outputs
  logic            fill_valid, fill_last, l1_flush;
  logic [TMW-1:0]  fill_tm;
  ray_t            fill_ray;
  logic [SW-1:0]   fill_slot;
  logic            sb_we;
  logic [SW-1:0]   sb_wslot;
  logic [LW-1:0]   sb_wline;
  logic [LINE_W-1:0] sb_wdata, sb_rdata;

  // ---- thread multiprocessors ---------------------------------------------------------
  for (genvar i = 0; i < NUM_TM; i++) begin : g_tm
    thread_multiprocessor #(.TPS(TPS), .SW(SW), .GW(GW), .L1_BYTES(L1_BYTES),
                            .L1_BANKS(L1_BANKS), .SEG_LINES(SEG_LINES)) u_tm (
      .clk, .rst_n,
      .tp_ray_req(tp_ray_req[i]), .tp_ray_gnt(tp_ray_gnt[i]), .tp_ray_done(tp_ray_done[i]),
      .tp_ray(tp_ray[i]), .tp_ray_slot(tp_ray_slot[i]),
      .tp_div_req(tp_div_req[i]), .tp_div_dir(tp_div_dir[i]), .tp_div_gnt(tp_div_gnt[i]),
      .tp_div_done(tp_div_done[i]), .tp_div_inv(tp_div_inv[i]),
      .tp_box_req(tp_box_req[i]), .tp_box_op(tp_box_op[i]), .tp_box_gnt(tp_box_gnt[i]),
      .tp_box_done(tp_box_done[i]), .tp_box_hit(tp_box_hit[i]), .tp_box_tnear(tp_box_tnear[i]),
      .tp_tri_req(tp_tri_req[i]), .tp_tri_op(tp_tri_op[i]), .tp_tri_gnt(tp_tri_gnt[i]),
      .tp_tri_done(tp_tri_done[i]), .tp_tri_hit(tp_tri_hit[i]), .tp_tri_t(tp_tri_t[i]),
      .tp_l1_req(tp_l1_req[i]), .tp_l1_addr(tp_l1_addr[i]), .tp_l1_gnt(tp_l1_gnt[i]),
      .tp_l1_done(tp_l1_done[i]), .tp_l1_data(tp_l1_data[i]),
      .tp_rq_req(tp_rq_req[i]), .tp_rq_fin(tp_rq_fin[i]), .tp_rq_dst(tp_rq_dst[i]),
      .tp_rq_ray(tp_rq_ray[i]), .tp_rq_gnt(tp_rq_gnt[i]),
      .tp_hit_req(tp_hit_req[i]), .tp_hit(tp_hit[i]), .tp_hit_gnt(tp_hit_gnt[i]),
      .fill_ready(tm_fill_ready[i]), .fill_valid(fill_valid && fill_tm == TMW'(i)),
      .fill_ray, .fill_last, .fill_slot,
      .want_bucket(tm_want[i]), .last_slot(tm_last_slot[i]), .l1_flush,
      .sb_req(tm_sb_req[i]), .sb_line(tm_sb_line[i]), .sb_gnt(tm_sb_gnt[i]), .sb_data(sb_rdata),
      .rq_valid(tm_rq_valid[i]), .rq_ready(tm_rq_ready[i]), .rq_fin(tm_rq_fin[i]),
      .rq_dst(tm_rq_dst[i]), .rq_ray(tm_rq_ray[i]),
      .hit_valid(tm_hit_valid[i]), .hit_ready(tm_hit_ready[i]), .hit_upd(tm_hit_upd[i]),
      .l1_hits(l1_hits[i]), .l1_misses(l1_misses[i]));
  end

  // ---- ray write queue port: TMs -> scheduler ----------------------------------------------
  logic [NUM_TM-1:0] rq_sel;
  logic [TMW-1:0]    rq_idx;
  logic              rq_any, sched_rq_ready;
  rr_arbiter #(.N(NUM_TM)) u_arb_rq (.clk, .rst_n, .en(1'b1), .ack(sched_rq_ready),
    .req(tm_rq_valid), .gnt(rq_sel), .idx(rq_idx), .any(rq_any));
  assign tm_rq_ready = rq_sel & {NUM_TM{sched_rq_ready}};

  // ---- hit updates: TMs -> hit record updater -------------------------------------------------
  logic [NUM_TM-1:0] hit_sel;
  logic [TMW-1:0]    hit_idx;
  logic              hit_any, hru_ready;
  rr_arbiter #(.N(NUM_TM)) u_arb_hit (.clk, .rst_n, .en(1'b1), .ack(hru_ready),
    .req(tm_hit_valid), .gnt(hit_sel), .idx(hit_idx), .any(hit_any));
  assign tm_hit_ready = hit_sel & {NUM_TM{hru_ready}};

  // ---- scene buffer read port: L1 misses ------------------------------------------------------
  logic [TMW-1:0] sb_idx;
  logic           sb_any;
  rr_arbiter #(.N(NUM_TM)) u_arb_sb (.clk, .rst_n, .en(1'b1), .ack(1'b1),
    .req(tm_sb_req), .gnt(tm_sb_gnt), .idx(sb_idx), .any(sb_any));

  scene_buffer #(.SLOTS(WS_SLOTS), .SEG_LINES(SEG_LINES)) u_sb (
    .clk,
    .wr_en(sb_we), .wr_slot(sb_wslot), .wr_line(sb_wline), .wr_data(sb_wdata),
    .rd_en(sb_any), .rd_slot(tm_sb_line[sb_idx][LW +: SW]), .rd_line(tm_sb_line[sb_idx][LW-1:0]),
    .rd_data(sb_rdata));

  // ---- stream scheduler -----------------------------------------------------------------------
  stream_scheduler #(.MAX_SEGS(MAX_SEGS), .WS_SLOTS(WS_SLOTS), .STREAMS(STREAMS),
                     .NUM_TM(NUM_TM), .SEG_LINES(SEG_LINES)) u_sched (
    .clk, .rst_n,
    .cfg_we, .cfg_seg, .cfg_line, .cfg_nlines, .cfg_first_child, .cfg_nchild, .bucket_base,
    .start, .busy, .pass_done,
    .rq_valid(rq_any), .rq_ready(sched_rq_ready), .rq_done(tm_rq_fin[rq_idx]),
    .rq_dst(tm_rq_dst[rq_idx]), .rq_ray(tm_rq_ray[rq_idx]),
    .tm_want, .tm_last_slot,
    .fill_valid, .fill_tm, .fill_ray, .fill_last, .fill_slot,
    .sb_we, .sb_slot(sb_wslot), .sb_line(sb_wline), .sb_data(sb_wdata), .l1_flush,
    .sc_req_valid, .sc_req_ready, .sc_req, .sc_resp_valid, .sc_resp_data,
    .rm_req_valid, .rm_req_ready, .rm_req, .rm_resp_valid, .rm_resp_data,
    .n_seg_done, .n_seg_skipped, .n_bkt_alloc, .n_bkt_read, .n_affinity, .n_rays_written);

  // ---- hit record updater ------------------------------------------------------------------------
  hit_record_updater #(.DEPTH(HRU_DEPTH)) u_hru (
    .clk, .rst_n,
    .upd_valid(hit_any), .upd_ready(hru_ready), .upd(tm_hit_upd[hit_idx]),
    .mem_req_valid(hm_req_valid), .mem_req_ready(hm_req_ready), .mem_req(hm_req),
    .mem_resp_valid(hm_resp_valid), .mem_resp(hm_resp_data),
    .idle(hits_idle), .n_merged(n_hit_merged), .n_written(n_hit_written),
    .n_full_stall(n_hit_stall));

  // a fill goes only to a TM that asked for it
  a_fill_target: assert property (@(posedge clk) disable iff (!rst_n)
    fill_valid |-> tm_fill_ready[fill_tm]);

endmodule
