// stream_scheduler: the central controller of dual streaming.
//
// Ray tracing is reorganised into two predictable memory streams. The scene
// is split into segments (BVH treelets, each stored contiguously in DRAM);
// every segment owns a ray queue, a linked list of 2 KB buckets in DRAM.
// Segments are processed in a fixed parent-before-child order, so each is
// loaded at most once per wavefront, and rays that leave a segment are copied
// into the queues of the child segments they enter. This unit does all the
// bookkeeping; threads never address DRAM for rays or scene data.
//
// Parts (named after the blocks of the design):
//  * Meta data: per segment its DRAM line address and length, its children
//    (a contiguous range of segment ids), and its ray queue: head and tail
//    bucket, rays in the tail bucket, number of buckets. Loaded through the
//    cfg_* port before a frame (the scene stream is prepared by the host).
//  * Scheduling logic: a depth-first stack of segments waiting to be
//    processed and the working set (WS_SLOTS resident segments, one per
//    scene-buffer slot). A segment popped with an empty queue is skipped with
//    its whole subtree. A resident segment is complete when all its buckets
//    were sent, its scene data is loaded and every ray sent to the TMs has
//    been reported done; then its slot is freed and its children are pushed
//    (last child first, so the first child is processed first).
//  * Scene stream logic + prefetch queue: STREAMS trackers (line address and
//    lines left) stream newly admitted segments into their scene-buffer slot,
//    one line per request; the queue remembers where each returning line
//    goes. A segment's rays are dispatched only once it is fully loaded.
//  * Ray write queue + ray stream logic (write side): TPs' rays for child
//    segments, and their "ray finished" notices, arrive through one queue, in
//    order, so that a segment can only complete after the writes its rays
//    produced are recorded. Each ray is written into the tail bucket of its
//    destination queue; a full (or missing) tail gets a new bucket, and the
//    old tail's header receives the link.
//  * Ray read logic: when a TM's staging buffer asks for a bucket, a bucket
//    of the segment that TM worked on last is preferred, otherwise any ready
//    resident segment. The header (next pointer, count) is read unless the
//    bucket is the tail, whose count is on chip; then the rays are read and
//    forwarded to the staging buffer, and the bucket is recycled.
//
// Choices of this design where the document gives none: one bucket transfer
// at a time; memory channels with valid/ready requests and in-order read
// responses; buckets allocated from a recycle FIFO of FREE_DEPTH entries or
// else by bumping a pointer from bucket_base; the scheduler asks TM L1 caches
// to flush when a reused scene-buffer slot receives a new segment. Rays must
// not be written into a segment while it is resident (true for tree-shaped
// segmentation: rays only flow to children); an assertion checks it.
// Data returning from memory is not stored here: scene lines go straight on
// to the scene buffer (sb_data) and ray slots to the staging buffers
// (fill_ray); the scheduler only computes where they go and when.
// Reset (rst_n) is synchronous and active low.
module stream_scheduler
  import ds_pkg::*;
#(
  parameter int MAX_SEGS   = 1024,
  parameter int WS_SLOTS   = 64,
  parameter int STREAMS    = 8,
  parameter int NUM_TM     = 128,
  parameter int SEG_LINES  = ds_pkg::SEG_LINES,
  parameter int WQ_DEPTH   = 16,
  parameter int PF_DEPTH   = 16,
  parameter int FREE_DEPTH = 64,
  localparam int GW = $clog2(MAX_SEGS),
  localparam int SW = $clog2(WS_SLOTS),
  localparam int TW = (NUM_TM > 1) ? $clog2(NUM_TM) : 1,
  localparam int LW = $clog2(SEG_LINES),
  localparam int AW = BADDR_W + $clog2(BUCKET_SLOTS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration of the scene stream
  input  logic                 cfg_we,
  input  logic [GW-1:0]        cfg_seg,
  input  logic [LADDR_W-1:0]   cfg_line,        // first DRAM line of the segment
  input  logic [LW:0]          cfg_nlines,      // 1 .. SEG_LINES
  input  logic [GW-1:0]        cfg_first_child,
  input  logic [GW:0]          cfg_nchild,
  input  logic [BADDR_W-1:0]   bucket_base,     // first free bucket in DRAM
  // control
  input  logic                 start,           // trace one wavefront from segment 0
  output logic                 busy,
  output logic                 pass_done,       // pulse at the end of a wavefront
  // ray write queue (from the TMs)
  input  logic                 rq_valid,
  output logic                 rq_ready,
  input  logic                 rq_done,         // 1: ray finished in slot rq_dst
  input  logic [GW-1:0]        rq_dst,          // segment (write) or slot (done)
  input  ray_t                 rq_ray,
  // staging buffers
  input  logic [NUM_TM-1:0]    tm_want,
  input  logic [SW-1:0]        tm_last_slot [NUM_TM],
  output logic                 fill_valid,
  output logic [TW-1:0]        fill_tm,
  output ray_t                 fill_ray,
  output logic                 fill_last,
  output logic [SW-1:0]        fill_slot,
  // scene buffer and L1s
  output logic                 sb_we,
  output logic [SW-1:0]        sb_slot,
  output logic [LW-1:0]        sb_line,
  output logic [LINE_W-1:0]    sb_data,
  output logic                 l1_flush,
  // scene stream memory channel
  output logic                 sc_req_valid,
  input  logic                 sc_req_ready,
  output scene_mem_req_t       sc_req,
  input  logic                 sc_resp_valid,
  input  logic [LINE_W-1:0]    sc_resp_data,
  // ray stream memory channel
  output logic                 rm_req_valid,
  input  logic                 rm_req_ready,
  output ray_mem_req_t         rm_req,
  input  logic                 rm_resp_valid,
  input  logic [SLOT_W-1:0]    rm_resp_data,
  // statistics
  output logic [31:0]          n_seg_done,
  output logic [31:0]          n_seg_skipped,
  output logic [31:0]          n_bkt_alloc,
  output logic [31:0]          n_bkt_read,
  output logic [31:0]          n_affinity,
  output logic [31:0]          n_rays_written
);

  localparam int IFW = 20;                      // rays in flight per slot
  localparam int CW  = $clog2(BUCKET_SLOTS);    // 6: slot index in a bucket

  // ===================================================================
  // Meta data
  // ===================================================================
  logic [LADDR_W-1:0] m_line   [MAX_SEGS];
  logic [LW:0]        m_nlines [MAX_SEGS];
  logic [GW-1:0]      m_fchild [MAX_SEGS];
  logic [GW:0]        m_nchild [MAX_SEGS];
  logic [BADDR_W-1:0] m_head   [MAX_SEGS];
  logic [BADDR_W-1:0] m_tail   [MAX_SEGS];
  logic [CW-1:0]      m_tcnt   [MAX_SEGS];
  logic               m_hastl  [MAX_SEGS];
  logic [BADDR_W-1:0] m_nbkt   [MAX_SEGS];

  // ===================================================================
  // Working set
  // ===================================================================
  logic [WS_SLOTS-1:0] ws_valid, ws_loaded, ws_used;
  logic [GW-1:0]       ws_seg   [WS_SLOTS];
  logic [BADDR_W-1:0]  ws_bleft [WS_SLOTS];
  logic [IFW-1:0]      ws_infl  [WS_SLOTS];

  // ===================================================================
  // Ray write queue
  // ===================================================================
  typedef struct packed {
    logic          done;
    logic [GW-1:0] dst;
    ray_t          ray;
  } wq_t;
  wq_t                      wq [WQ_DEPTH];
  logic [$clog2(WQ_DEPTH):0] wq_cnt;
  logic [$clog2(WQ_DEPTH)-1:0] wq_rp, wq_wp;
  wq_t                      wq_head;
  assign wq_head  = wq[wq_rp];
  assign rq_ready = (wq_cnt != ($clog2(WQ_DEPTH)+1)'(WQ_DEPTH));

  // ===================================================================
  // Free bucket list
  // ===================================================================
  logic [BADDR_W-1:0]            fl [FREE_DEPTH];
  logic [$clog2(FREE_DEPTH):0]   fl_cnt;
  logic [$clog2(FREE_DEPTH)-1:0] fl_rp, fl_wp;
  logic [BADDR_W-1:0]            bump;

  // ===================================================================
  // Scene stream trackers and prefetch queue
  // ===================================================================
  logic [STREAMS-1:0]  tr_valid;
  logic [SW-1:0]       tr_slot [STREAMS];
  logic [LADDR_W-1:0]  tr_addr [STREAMS];
  logic [LW:0]         tr_left [STREAMS];
  logic [LW-1:0]       tr_idx  [STREAMS];

  typedef struct packed {
    logic [SW-1:0] slot;
    logic [LW-1:0] idx;
    logic          last;
  } pf_t;
  pf_t                          pf [PF_DEPTH];
  logic [$clog2(PF_DEPTH):0]    pf_cnt;
  logic [$clog2(PF_DEPTH)-1:0]  pf_rp, pf_wp;

  // ===================================================================
  // State machines
  // ===================================================================
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_PUSH} sstate_t;
  typedef enum logic [2:0] {R_IDLE, R_HDR, R_HWAIT, R_RAYS, R_DRAIN} rstate_t;
  typedef enum logic [1:0] {W_IDLE, W_HDR, W_RAY} wstate_t;
  sstate_t sstate;
  rstate_t rstate;
  wstate_t wstate;

  logic [GW-1:0]  stack [MAX_SEGS];
  logic [GW:0]    sp;
  logic [GW-1:0]  push_seg;
  logic [GW:0]    push_left;

  // read FSM registers
  logic [TW-1:0]      r_tm;
  logic [SW-1:0]      r_slot;
  logic [BADDR_W-1:0] r_bkt;
  logic [CW:0]        r_cnt, r_iss, r_rcv;
  logic [TW-1:0]      rr_tm;

  // write FSM registers
  logic [BADDR_W-1:0] w_new;

  // ---- combinational selections --------------------------------------
  // slots ready to hand out buckets
  logic [WS_SLOTS-1:0] slot_ok;
  always_comb begin
    for (int i = 0; i < WS_SLOTS; i++)
      slot_ok[i] = ws_valid[i] && ws_loaded[i] && (ws_bleft[i] != '0);
  end

  // completed slot
  logic          cmp_any;
  logic [SW-1:0] cmp_slot;
  always_comb begin
    cmp_any  = 1'b0;
    cmp_slot = '0;
    for (int i = 0; i < WS_SLOTS; i++) begin
      if (!cmp_any && ws_valid[i] && ws_loaded[i] && ws_bleft[i] == '0 && ws_infl[i] == '0 &&
          !(rstate != R_IDLE && r_slot == SW'(i))) begin
        cmp_any  = 1'b1;
        cmp_slot = SW'(i);
      end
    end
  end

  // free slot and free tracker
  logic          free_slot_any, free_tr_any;
  logic [SW-1:0] free_slot;
  logic [$clog2(STREAMS > 1 ? STREAMS : 2)-1:0] free_tr;
  always_comb begin
    free_slot_any = 1'b0; free_slot = '0;
    for (int i = 0; i < WS_SLOTS; i++)
      if (!free_slot_any && !ws_valid[i]) begin free_slot_any = 1'b1; free_slot = SW'(i); end
    free_tr_any = 1'b0; free_tr = '0;
    for (int i = 0; i < STREAMS; i++)
      if (!free_tr_any && !tr_valid[i]) begin free_tr_any = 1'b1; free_tr = ($bits(free_tr))'(i); end
  end

  // bucket dispatch choice: round-robin over TMs wanting a bucket
  logic          d_any, d_aff;
  logic [TW-1:0] d_tm;
  logic [SW-1:0] d_slot;
  always_comb begin
    logic          any_ok;
    logic [SW-1:0] first_ok;
    logic [TW:0]   t;
    any_ok = 1'b0; first_ok = '0; t = '0;
    for (int i = 0; i < WS_SLOTS; i++)
      if (!any_ok && slot_ok[i]) begin any_ok = 1'b1; first_ok = SW'(i); end
    d_any = 1'b0; d_tm = '0;
    for (int k = 0; k < NUM_TM; k++) begin
      t = {1'b0, rr_tm} + (TW+1)'(k);
      if (t >= (TW+1)'(NUM_TM)) t = t - (TW+1)'(NUM_TM);
      if (!d_any && tm_want[t[TW-1:0]]) begin d_any = any_ok; d_tm = t[TW-1:0]; end
    end
    d_aff  = slot_ok[tm_last_slot[d_tm]];
    d_slot = d_aff ? tm_last_slot[d_tm] : first_ok;
  end

  // scene prefetch choice
  logic          pf_any;
  logic [$clog2(STREAMS > 1 ? STREAMS : 2)-1:0] pf_tr;
  always_comb begin
    pf_any = 1'b0; pf_tr = '0;
    for (int i = 0; i < STREAMS; i++)
      if (!pf_any && tr_valid[i] && tr_left[i] != '0) begin pf_any = 1'b1; pf_tr = ($bits(pf_tr))'(i); end
  end
  assign sc_req_valid = pf_any && (pf_cnt != ($clog2(PF_DEPTH)+1)'(PF_DEPTH));
  assign sc_req.addr  = tr_addr[pf_tr];

  // ray memory channel: the read side has priority
  logic rd_req, wr_req;
  ray_mem_req_t rd_r, wr_r;
  always_comb begin
    bucket_hdr_t h;
    h      = '0;
    rd_req = (rstate == R_HDR) || (rstate == R_RAYS && r_iss != r_cnt);
    rd_r       = '0;
    rd_r.we    = 1'b0;
    rd_r.addr  = {r_bkt, (rstate == R_HDR) ? CW'(0) : CW'(r_iss + 1'b1)};
    wr_req = (wstate == W_HDR) || (wstate == W_RAY);
    wr_r = '0;
    wr_r.we = 1'b1;
    if (wstate == W_HDR) begin
      h.next     = w_new;
      h.count    = 7'(BUCKET_RAYS);
      wr_r.addr  = {m_tail[wq_head.dst], CW'(0)};
      wr_r.wdata = SLOT_W'(h);
    end else begin
      wr_r.addr  = {m_tail[wq_head.dst], CW'(m_tcnt[wq_head.dst] + 1'b1)};
      wr_r.wdata = ray_to_slot(wq_head.ray);
    end
    rm_req_valid = rd_req || wr_req;
    rm_req       = rd_req ? rd_r : wr_r;
  end
  logic rd_go, wr_go;
  assign rd_go = rd_req && rm_req_ready;
  assign wr_go = !rd_req && wr_req && rm_req_ready;

  // staging-buffer fill from read responses
  assign fill_valid = rm_resp_valid && (rstate == R_RAYS || rstate == R_DRAIN);
  assign fill_tm    = r_tm;
  assign fill_ray   = slot_to_ray(rm_resp_data);
  assign fill_last  = (r_rcv + 1'b1 == r_cnt);
  assign fill_slot  = r_slot;

  // scene buffer writes from scene responses
  assign sb_we   = sc_resp_valid;
  assign sb_slot = pf[pf_rp].slot;
  assign sb_line = pf[pf_rp].idx;
  assign sb_data = sc_resp_data;

  assign busy = (sstate != S_IDLE);

  // ===================================================================
  // Sequential logic
  // ===================================================================
  // rays in flight per slot: + on dispatch, - on "ray finished"
  logic           infl_inc;
  logic [SW-1:0]  infl_inc_slot;
  logic [CW:0]    infl_amt;
  logic           infl_dec;
  logic [SW-1:0]  infl_dec_slot;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sstate <= S_IDLE; rstate <= R_IDLE; wstate <= W_IDLE;
      ws_valid <= '0; ws_loaded <= '0; ws_used <= '0;
      tr_valid <= '0;
      sp <= '0; push_left <= '0; push_seg <= '0;
      wq_cnt <= '0; wq_rp <= '0; wq_wp <= '0;
      fl_cnt <= '0; fl_rp <= '0; fl_wp <= '0; bump <= '0;
      pf_cnt <= '0; pf_rp <= '0; pf_wp <= '0;
      rr_tm <= '0; r_tm <= '0; r_slot <= '0; r_cnt <= '0; r_iss <= '0; r_rcv <= '0; r_bkt <= '0;
      pass_done <= 1'b0; l1_flush <= 1'b0;
      n_seg_done <= '0; n_seg_skipped <= '0; n_bkt_alloc <= '0; n_bkt_read <= '0;
      n_affinity <= '0; n_rays_written <= '0;
      for (int i = 0; i < WS_SLOTS; i++) begin
        ws_infl[i] <= '0; ws_bleft[i] <= '0; ws_seg[i] <= '0;
      end
      for (int i = 0; i < MAX_SEGS; i++) begin
        m_hastl[i] <= 1'b0; m_nbkt[i] <= '0; m_tcnt[i] <= '0;
        m_head[i] <= '0; m_tail[i] <= '0;
        m_line[i] <= '0; m_nlines[i] <= '0; m_fchild[i] <= '0; m_nchild[i] <= '0;
      end
    end else begin
      logic [$clog2(WQ_DEPTH):0]   wqc;
      logic [$clog2(FREE_DEPTH):0] flc;
      logic [$clog2(PF_DEPTH):0]   pfc;
      wqc = wq_cnt; flc = fl_cnt; pfc = pf_cnt;
      pass_done <= 1'b0;
      l1_flush  <= 1'b0;

      // ---------------- configuration --------------------------------
      if (cfg_we) begin
        m_line[cfg_seg]   <= cfg_line;
        m_nlines[cfg_seg] <= cfg_nlines;
        m_fchild[cfg_seg] <= cfg_first_child;
        m_nchild[cfg_seg] <= cfg_nchild;
        m_hastl[cfg_seg]  <= 1'b0;
        m_nbkt[cfg_seg]   <= '0;
        if (bump < bucket_base) bump <= bucket_base;
      end

      // ---------------- ray write queue: enqueue -------------------------
      if (rq_valid && rq_ready) begin
        wq[wq_wp] <= '{done: rq_done, dst: rq_dst, ray: rq_ray};
        wq_wp     <= wq_wp + 1'b1;
        wqc       = wqc + 1'b1;
      end

      // ---------------- write side of the ray stream ---------------------
      case (wstate)
        W_IDLE: if (wq_cnt != '0) begin
          if (wq_head.done) begin
            wq_rp <= wq_rp + 1'b1; wqc = wqc - 1'b1;     // handled by infl_dec
          end else if (!m_hastl[wq_head.dst] || m_tcnt[wq_head.dst] == CW'(BUCKET_RAYS)) begin
            // new bucket needed
            logic [BADDR_W-1:0] nb;
            if (fl_cnt != '0) begin
              nb = fl[fl_rp]; fl_rp <= fl_rp + 1'b1; flc = flc - 1'b1;
            end else begin
              nb = bump; bump <= bump + 1'b1;
            end
            w_new       <= nb;
            n_bkt_alloc <= n_bkt_alloc + 1;
            m_nbkt[wq_head.dst] <= m_nbkt[wq_head.dst] + 1'b1;
            if (m_hastl[wq_head.dst]) begin
              wstate <= W_HDR;                 // link the full tail first
            end else begin
              m_head[wq_head.dst]  <= nb;
              m_tail[wq_head.dst]  <= nb;
              m_tcnt[wq_head.dst]  <= '0;
              m_hastl[wq_head.dst] <= 1'b1;
              wstate <= W_RAY;
            end
          end else begin
            wstate <= W_RAY;
          end
        end
        W_HDR: if (wr_go) begin
          m_tail[wq_head.dst] <= w_new;
          m_tcnt[wq_head.dst] <= '0;
          wstate <= W_RAY;
        end
        W_RAY: if (wr_go) begin
          m_tcnt[wq_head.dst] <= m_tcnt[wq_head.dst] + 1'b1;
          n_rays_written <= n_rays_written + 1;
          wq_rp <= wq_rp + 1'b1; wqc = wqc - 1'b1;
          wstate <= W_IDLE;
        end
        default: wstate <= W_IDLE;
      endcase

      // ---------------- read side of the ray stream ----------------------
      case (rstate)
        R_IDLE: if (d_any) begin
          logic [GW-1:0] s;
          s = ws_seg[d_slot];
          r_tm   <= d_tm;
          r_slot <= d_slot;
          r_bkt  <= m_head[s];
          r_iss  <= '0;
          r_rcv  <= '0;
          rr_tm  <= TW'((int'(d_tm) + 1) % NUM_TM);
          if (d_aff) n_affinity <= n_affinity + 1;
          if (m_head[s] == m_tail[s]) begin
            // tail bucket: its count is on chip, the queue becomes empty
            r_cnt      <= (CW+1)'(m_tcnt[s]);
            m_hastl[s] <= 1'b0;
            m_nbkt[s]  <= m_nbkt[s] - 1'b1;
            ws_bleft[d_slot] <= ws_bleft[d_slot] - 1'b1;
            rstate <= R_RAYS;
          end else begin
            rstate <= R_HDR;
          end
        end
        R_HDR: if (rd_go) rstate <= R_HWAIT;
        R_HWAIT: if (rm_resp_valid) begin
          bucket_hdr_t h;
          h = bucket_hdr_t'(rm_resp_data[$bits(bucket_hdr_t)-1:0]);
          r_cnt <= (CW+1)'(h.count);
          m_head[ws_seg[r_slot]] <= h.next;
          m_nbkt[ws_seg[r_slot]] <= m_nbkt[ws_seg[r_slot]] - 1'b1;
          ws_bleft[r_slot]       <= ws_bleft[r_slot] - 1'b1;
          rstate <= R_RAYS;
        end
        R_RAYS, R_DRAIN: begin
          if (rd_go) r_iss <= r_iss + 1'b1;
          if (rm_resp_valid) r_rcv <= r_rcv + 1'b1;
          if (rstate == R_RAYS && rd_go && r_iss + 1'b1 == r_cnt) rstate <= R_DRAIN;
          if (rm_resp_valid && fill_last) begin
            // bucket consumed: recycle it
            if (fl_cnt != ($clog2(FREE_DEPTH)+1)'(FREE_DEPTH)) begin
              fl[fl_wp] <= r_bkt; fl_wp <= fl_wp + 1'b1; flc = flc + 1'b1;
            end
            n_bkt_read <= n_bkt_read + 1;
            rstate <= R_IDLE;
          end
        end
        default: rstate <= R_IDLE;
      endcase

      // ---------------- scene stream ----------------------------------
      if (sc_req_valid && sc_req_ready) begin
        pf[pf_wp] <= '{slot: tr_slot[pf_tr], idx: tr_idx[pf_tr], last: (tr_left[pf_tr] == 1)};
        pf_wp <= pf_wp + 1'b1; pfc = pfc + 1'b1;
        tr_addr[pf_tr] <= tr_addr[pf_tr] + 1'b1;
        tr_idx[pf_tr]  <= tr_idx[pf_tr] + 1'b1;
        tr_left[pf_tr] <= tr_left[pf_tr] - 1'b1;
        if (tr_left[pf_tr] == 1) tr_valid[pf_tr] <= 1'b0;
      end
      if (sc_resp_valid) begin
        if (pf[pf_rp].last) ws_loaded[pf[pf_rp].slot] <= 1'b1;
        pf_rp <= pf_rp + 1'b1; pfc = pfc - 1'b1;
      end

      // ---------------- scheduling logic --------------------------------
      case (sstate)
        S_IDLE: if (start) begin
          stack[0] <= '0;               // root segment
          sp       <= 1;
          sstate   <= S_RUN;
        end
        S_RUN: begin
          if (cmp_any) begin
            logic [GW-1:0] s;
            s = ws_seg[cmp_slot];
            ws_valid[cmp_slot] <= 1'b0;
            n_seg_done <= n_seg_done + 1;
            if (m_nchild[s] != '0) begin
              push_seg  <= GW'(m_fchild[s] + m_nchild[s] - 1'b1);
              push_left <= m_nchild[s];
              sstate    <= S_PUSH;
            end
          end else if (sp != '0 && free_slot_any && free_tr_any) begin
            logic [GW-1:0] s;
            s  = stack[sp[GW-1:0] - 1'b1];
            sp <= sp - 1'b1;
            if (m_nbkt[s] == '0) begin
              n_seg_skipped <= n_seg_skipped + 1;   // no rays: skip subtree
            end else begin
              ws_valid[free_slot]  <= 1'b1;
              ws_loaded[free_slot] <= 1'b0;
              ws_used[free_slot]   <= 1'b1;
              ws_seg[free_slot]    <= s;
              ws_bleft[free_slot]  <= m_nbkt[s];
              if (ws_used[free_slot]) l1_flush <= 1'b1;
              tr_valid[free_tr] <= 1'b1;
              tr_slot[free_tr]  <= free_slot;
              tr_addr[free_tr]  <= m_line[s];
              tr_left[free_tr]  <= m_nlines[s];
              tr_idx[free_tr]   <= '0;
            end
          end else if (sp == '0 && ws_valid == '0) begin
            pass_done <= 1'b1;
            sstate    <= S_IDLE;
          end
        end
        S_PUSH: begin
          stack[sp[GW-1:0]] <= push_seg;
          sp        <= sp + 1'b1;
          push_seg  <= push_seg - 1'b1;
          push_left <= push_left - 1'b1;
          if (push_left == 1) sstate <= S_RUN;
        end
        default: sstate <= S_IDLE;
      endcase

      wq_cnt <= wqc;
      fl_cnt <= flc;
      pf_cnt <= pfc;

      // ---------------- rays in flight ------------------------------------
      for (int i = 0; i < WS_SLOTS; i++) begin
        logic [IFW-1:0] v;
        v = ws_infl[i];
        if (infl_inc && infl_inc_slot == SW'(i)) v = v + IFW'(infl_amt);
        if (infl_dec && infl_dec_slot == SW'(i)) v = v - 1'b1;
        ws_infl[i] <= v;
      end
    end
  end

  // rays of a bucket count as in flight from the moment its size is known
  always_comb begin
    logic [GW-1:0] s;
    bucket_hdr_t   h;
    s = ws_seg[d_slot];
    h = bucket_hdr_t'(rm_resp_data[$bits(bucket_hdr_t)-1:0]);
    infl_inc      = 1'b0;
    infl_amt      = '0;
    infl_inc_slot = d_slot;
    if (rstate == R_IDLE && d_any && m_head[s] == m_tail[s]) begin
      infl_inc = 1'b1;
      infl_amt = (CW+1)'(m_tcnt[s]);
    end else if (rstate == R_HWAIT && rm_resp_valid) begin
      infl_inc      = 1'b1;
      infl_amt      = (CW+1)'(h.count);
      infl_inc_slot = r_slot;
    end
    infl_dec      = (wstate == W_IDLE) && (wq_cnt != '0) && wq_head.done;
    infl_dec_slot = wq_head.dst[SW-1:0];
  end

  // a ray write whose destination is resident
  logic wr_to_resident;
  always_comb begin
    wr_to_resident = 1'b0;
    for (int i = 0; i < WS_SLOTS; i++)
      if (ws_valid[i] && ws_seg[i] == wq_head.dst) wr_to_resident = 1'b1;
  end

  // ---- rules ----------------------------------------------------------
  // a resident segment never receives rays
  a_no_write_to_resident: assert property (@(posedge clk) disable iff (!rst_n)
    (wstate == W_IDLE && wq_cnt != 0 && !wq_head.done) |-> !wr_to_resident);
  a_infl_nonneg: assert property (@(posedge clk) disable iff (!rst_n)
    infl_dec |-> ws_infl[infl_dec_slot] != '0 || infl_inc);

endmodule
