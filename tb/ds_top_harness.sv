// ds_top_harness: end-to-end test of the whole processor, shared by the
// reduced-size and the full-size testbench. It is the environment of ds_top:
// its ports mirror ds_top's (same names, opposite directions), and the
// testbench modules instantiate the two side by side. FULL = 1 relaxes the
// one check that needs slot reuse (64 slots are never reused here).
//
// Scene: a tree of segments over the square [0,16) x [0,16) in x/y:
//   0 (all) -> 1 (x<8,y<8), 2 (x>=8,y<8), 3 (x<8,y>=8), 4 (x>=8,y>=8)
//   1 -> 5 (x<4), 6 (4<=x<8);  2 -> 7 (y<4), 8 (y>=4);  4 -> 9
// Line 0 of every segment holds the boxes of its children and two triangles
// at depths zt[s] and zt[s]+3 covering the segment's region; the memory models here
// serve these lines, ray buckets and hit records.
// Threads (models of the thread processors) first write NRAYS primary rays
// travelling along +z into segment 0, then run the traversal loop: fetch a
// ray, invert its direction, load line 0 of its segment through the L1,
// box-test every child and write the ray into each child it enters,
// triangle-test the segment's triangles and send a hit update per hit, and
// report the ray finished. No ray reaches 3, 4 or 9, so they are skipped.
// At the end every ray's hit record must hold the nearest triangle among
// the segments it crossed (computed here independently), and each
// mechanism of the design must have occurred: segment skip, multi-bucket
// queue, same-segment bucket preference, L1 flush on slot reuse, L1 hits and
// misses, hit merging and hit writes.
module ds_top_harness
  import ds_pkg::*;
#(
  parameter bit FULL       = 0,        // 1: ds_top runs at its default size
  parameter int NUM_TM     = 2,
  parameter int TPS        = 4,
  parameter int ACTIVE_TPS = 4,        // thread models started per TM
  parameter int MAX_SEGS   = 16,
  parameter int WS_SLOTS   = 4,
  parameter int SEG_LINES  = 16,
  parameter int NRAYS      = 128,
  parameter int WATCHDOG   = 200000,
  localparam int GW  = $clog2(MAX_SEGS),
  localparam int SW  = $clog2(WS_SLOTS),
  localparam int LW  = $clog2(SEG_LINES),
  localparam int AW  = SW + LW + 6
) (
  output  logic               clk,
  output  logic               rst_n,
  // segment table and control
  output  logic               cfg_we,
  output  logic [GW-1:0]      cfg_seg,
  output  logic [LADDR_W-1:0] cfg_line,
  output  logic [LW:0]        cfg_nlines,
  output  logic [GW-1:0]      cfg_first_child,
  output  logic [GW:0]        cfg_nchild,
  output  logic [BADDR_W-1:0] bucket_base,
  output  logic               start,
  input  logic               busy,
  input  logic               pass_done,
  input  logic               hits_idle,
  // thread processor ports, [TM][TP]
  output  logic [TPS-1:0]     tp_ray_req  [NUM_TM],
  input  logic [TPS-1:0]     tp_ray_gnt  [NUM_TM],
  input  logic [TPS-1:0]     tp_ray_done [NUM_TM],
  input  ray_t               tp_ray      [NUM_TM],
  input  logic [SW-1:0]      tp_ray_slot [NUM_TM],
  output  logic [TPS-1:0]     tp_div_req  [NUM_TM],
  output  vec3_t              tp_div_dir  [NUM_TM][TPS],
  input  logic [TPS-1:0]     tp_div_gnt  [NUM_TM],
  input  logic [TPS-1:0]     tp_div_done [NUM_TM],
  input  dvec3_t             tp_div_inv  [NUM_TM],
  output  logic [TPS-1:0]     tp_box_req  [NUM_TM],
  output  box_op_t            tp_box_op   [NUM_TM][TPS],
  input  logic [TPS-1:0]     tp_box_gnt  [NUM_TM],
  input  logic [TPS-1:0]     tp_box_done [NUM_TM],
  input  logic               tp_box_hit  [NUM_TM],
  input  dist_t              tp_box_tnear[NUM_TM],
  output  logic [TPS-1:0]     tp_tri_req  [NUM_TM],
  output  tri_op_t            tp_tri_op   [NUM_TM][TPS],
  input  logic [TPS-1:0]     tp_tri_gnt  [NUM_TM],
  input  logic [TPS-1:0]     tp_tri_done [NUM_TM],
  input  logic [TPS-1:0]     tp_tri_hit  [NUM_TM],
  input  dist_t              tp_tri_t    [NUM_TM][TPS],
  output  logic [TPS-1:0]     tp_l1_req   [NUM_TM],
  output  logic [AW-1:0]      tp_l1_addr  [NUM_TM][TPS],
  input  logic [TPS-1:0]     tp_l1_gnt   [NUM_TM],
  input  logic [TPS-1:0]     tp_l1_done  [NUM_TM],
  input  logic [LINE_W-1:0]  tp_l1_data  [NUM_TM],
  output  logic [TPS-1:0]     tp_rq_req   [NUM_TM],
  output  logic [TPS-1:0]     tp_rq_fin   [NUM_TM],
  output  logic [GW-1:0]      tp_rq_dst   [NUM_TM][TPS],
  output  ray_t               tp_rq_ray   [NUM_TM][TPS],
  input  logic [TPS-1:0]     tp_rq_gnt   [NUM_TM],
  output  logic [TPS-1:0]     tp_hit_req  [NUM_TM],
  output  hit_upd_t           tp_hit      [NUM_TM][TPS],
  input  logic [TPS-1:0]     tp_hit_gnt  [NUM_TM],
  // scene stream memory channel
  input  logic               sc_req_valid,
  output  logic               sc_req_ready,
  input  scene_mem_req_t     sc_req,
  output  logic               sc_resp_valid,
  output  logic [LINE_W-1:0]  sc_resp_data,
  // ray stream memory channel
  input  logic               rm_req_valid,
  output  logic               rm_req_ready,
  input  ray_mem_req_t       rm_req,
  output  logic               rm_resp_valid,
  output  logic [SLOT_W-1:0]  rm_resp_data,
  // hit record memory channel
  input  logic               hm_req_valid,
  output  logic               hm_req_ready,
  input  hit_mem_req_t       hm_req,
  output  logic               hm_resp_valid,
  output  hit_rec_t           hm_resp_data,
  // statistics
  input  logic [31:0]        n_seg_done,
  input  logic [31:0]        n_seg_skipped,
  input  logic [31:0]        n_bkt_alloc,
  input  logic [31:0]        n_bkt_read,
  input  logic [31:0]        n_affinity,
  input  logic [31:0]        n_rays_written,
  input  logic [31:0]        n_hit_merged,
  input  logic [31:0]        n_hit_written,
  input  logic [31:0]        n_hit_stall,
  input  logic [31:0]        l1_hits     [NUM_TM],
  input  logic [31:0]        l1_misses   [NUM_TM],
  input  logic               l1_flush_mon       // ds_top's L1 flush signal, observed
);
  localparam int NSEG = 10;

  initial begin clk = 0; rst_n = 0; end
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  int flushes = 0;
  always @(posedge clk) if (rst_n && l1_flush_mon) flushes++;

  // ---- scene description -----------------------------------------------------
  int xmin[NSEG], xmax[NSEG], ymin[NSEG], ymax[NSEG], zt[NSEG], fch[NSEG], nch[NSEG], par[NSEG];
  function automatic int seg_dram_line(int s); return 4096 + s * SEG_LINES; endfunction

  function automatic logic [LINE_W-1:0] scene_line(int s);
    logic [15:0] h [32];
    logic [LINE_W-1:0] v;
    for (int i = 0; i < 32; i++) h[i] = '0;
    h[0] = 16'(fch[s]); h[1] = 16'(nch[s]);
    for (int k = 0; k < nch[s] && k < 4; k++) begin
      int c; c = fch[s] + k;
      h[2 + 4*k] = 16'(xmin[c] * 256); h[3 + 4*k] = 16'(xmax[c] * 256);
      h[4 + 4*k] = 16'(ymin[c] * 256); h[5 + 4*k] = 16'(ymax[c] * 256);
    end
    // triangle covering [xmin,xmax] x [ymin,ymax] at z = zt
    h[18] = 16'((xmin[s] - 1) * 256); h[19] = 16'((ymin[s] - 1) * 256);
    h[20] = 16'((2 * xmax[s] - xmin[s] + 2) * 256); h[21] = 16'((ymin[s] - 1) * 256);
    h[22] = 16'((xmin[s] - 1) * 256); h[23] = 16'((2 * ymax[s] - ymin[s] + 2) * 256);
    h[24] = 16'(zt[s] * 256);
    h[25] = 16'((zt[s] + 3) * 256);      // second, farther triangle with the same outline
    for (int i = 0; i < 32; i++) v[i*16 +: 16] = h[i];
    return v;
  endfunction

  // ---- memory models -------------------------------------------------------------
  typedef struct { int due; logic [LINE_W-1:0] d; } sresp_t;
  sresp_t sq[$];
  always @(posedge clk) begin
    sc_resp_valid <= 0;
    if (rst_n && sc_req_valid && sc_req_ready) begin
      sresp_t e; int a, s;
      a = int'(sc_req.addr) - 4096; s = a / SEG_LINES;
      e.due = cyc + $urandom_range(4, 20);
      e.d = (a % SEG_LINES == 0) ? scene_line(s) : {16{32'(a)}};
      if (sq.size() != 0 && sq[$].due > e.due) e.due = sq[$].due;
      sq.push_back(e);
    end
    if (sq.size() != 0 && sq[0].due <= cyc) begin
      sc_resp_valid <= 1; sc_resp_data <= sq[0].d; void'(sq.pop_front());
    end
    sc_req_ready <= ($urandom_range(0, 3) != 0);
  end

  logic [SLOT_W-1:0] rmem [int];
  typedef struct { int due; logic [SLOT_W-1:0] d; } rresp_t;
  rresp_t rqm[$];
  always @(posedge clk) begin
    rm_resp_valid <= 0;
    if (rst_n && rm_req_valid && rm_req_ready) begin
      if (rm_req.we) rmem[int'(rm_req.addr)] = rm_req.wdata;
      else begin
        rresp_t e; e.due = cyc + $urandom_range(4, 20);
        e.d = rmem.exists(int'(rm_req.addr)) ? rmem[int'(rm_req.addr)] : '0;
        if (rqm.size() != 0 && rqm[$].due > e.due) e.due = rqm[$].due;
        rqm.push_back(e);
      end
    end
    if (rqm.size() != 0 && rqm[0].due <= cyc) begin
      rm_resp_valid <= 1; rm_resp_data <= rqm[0].d; void'(rqm.pop_front());
    end
    rm_req_ready <= ($urandom_range(0, 4) != 0);
  end

  hit_rec_t hmem [int];
  typedef struct { int due; hit_rec_t d; } hresp_t;
  hresp_t hq[$];
  always @(posedge clk) begin
    hm_resp_valid <= 0;
    if (rst_n && hm_req_valid && hm_req_ready) begin
      if (hm_req.we) hmem[int'(hm_req.addr)] = hm_req.wdata;
      else begin
        hresp_t e; e.due = cyc + $urandom_range(10, 30);
        e.d = hmem.exists(int'(hm_req.addr)) ? hmem[int'(hm_req.addr)] : '{t: DIST_MAX, prim: '1};
        if (hq.size() != 0 && hq[$].due > e.due) e.due = hq[$].due;
        hq.push_back(e);
      end
    end
    if (hq.size() != 0 && hq[0].due <= cyc) begin
      hm_resp_valid <= 1; hm_resp_data <= hq[0].d; void'(hq.pop_front());
    end
    hm_req_ready <= ($urandom_range(0, 2) != 0);
  end

  // ---- thread processor models -----------------------------------------------------------
  function automatic ray_t prim_ray(int r);
    ray_t x;
    x.org = {-16'sd50 * 16'sd256, 16'((r / 16) * 256 + 128), 16'((r % 16) * 256 + 128)};
    x.dir = {16'sd256, 16'sd0, 16'sd0};      // +z
    x.id  = RAYID_W'(r);
    x.node = '0;
    return x;
  endfunction

  int visits = 0, box_tests = 0, tri_tests = 0, hits_sent = 0;
  bit stop_threads = 0;

  task automatic thread(int i, int t);
    forever begin
      ray_t ray; logic [SW-1:0] slot; dvec3_t inv; logic [LINE_W-1:0] ln; int fc, nc;
      logic [15:0] h [32];
      // fetch a ray
      @(negedge clk); tp_ray_req[i][t] = 1;
      do @(posedge clk); while (!tp_ray_gnt[i][t]);
      #1 tp_ray_req[i][t] = 0;
      while (!tp_ray_done[i][t]) begin @(posedge clk); #1; end
      ray = tp_ray[i]; slot = tp_ray_slot[i];
      visits++;
      // inverse direction
      tp_div_dir[i][t] = ray.dir;
      @(negedge clk); tp_div_req[i][t] = 1;
      do @(posedge clk); while (!tp_div_gnt[i][t]);
      #1 tp_div_req[i][t] = 0;
      while (!tp_div_done[i][t]) begin @(posedge clk); #1; end
      inv = tp_div_inv[i];
      // node data: line 0 of the segment
      tp_l1_addr[i][t] = {slot, LW'(0), 6'(ray.node)};
      @(negedge clk); tp_l1_req[i][t] = 1;
      do @(posedge clk); while (!tp_l1_gnt[i][t]);
      #1 tp_l1_req[i][t] = 0;
      while (!tp_l1_done[i][t]) begin @(posedge clk); #1; end
      ln = tp_l1_data[i];
      for (int k = 0; k < 32; k++) h[k] = ln[k*16 +: 16];
      fc = int'(h[0]); nc = int'(h[1]);
      // children: box test, write the ray into each child it enters
      for (int k = 0; k < nc && k < 4; k++) begin
        logic hit;
        tp_box_op[i][t].org  = ray.org;
        tp_box_op[i][t].inv  = inv;
        tp_box_op[i][t].bmin = {-16'sd100 * 16'sd256, h[4 + 4*k], h[2 + 4*k]};
        tp_box_op[i][t].bmax = { 16'sd100 * 16'sd256, h[5 + 4*k], h[3 + 4*k]};
        tp_box_op[i][t].tmax = DIST_MAX;
        @(negedge clk); tp_box_req[i][t] = 1;
        do @(posedge clk); while (!tp_box_gnt[i][t]);
        #1 tp_box_req[i][t] = 0;
        while (!tp_box_done[i][t]) begin @(posedge clk); #1; end
        hit = tp_box_hit[i];
        box_tests++;
        if (hit) begin
          tp_rq_ray[i][t] = ray; tp_rq_fin[i][t] = 0; tp_rq_dst[i][t] = GW'(fc + k);
          @(negedge clk); tp_rq_req[i][t] = 1;
          do @(posedge clk); while (!tp_rq_gnt[i][t]);
          #1 tp_rq_req[i][t] = 0;
        end
      end
      // the segment's two triangles; each hit is sent as its own update
      for (int k = 0; k < 2; k++) begin
        tp_tri_op[i][t].org = ray.org;
        tp_tri_op[i][t].dir = ray.dir;
        tp_tri_op[i][t].v0  = {h[24 + k], h[19], h[18]};
        tp_tri_op[i][t].v1  = {h[24 + k], h[21], h[20]};
        tp_tri_op[i][t].v2  = {h[24 + k], h[23], h[22]};
        tp_tri_op[i][t].tmax = DIST_MAX;
        @(negedge clk); tp_tri_req[i][t] = 1;
        do @(posedge clk); while (!tp_tri_gnt[i][t]);
        #1 tp_tri_req[i][t] = 0;
        while (!tp_tri_done[i][t]) begin @(posedge clk); #1; end
        tri_tests++;
        if (tp_tri_hit[i][t]) begin
          tp_hit[i][t] = '{id: ray.id, hit: '{t: tp_tri_t[i][t], prim: 32'(2 * slot + k)}};
          @(negedge clk); tp_hit_req[i][t] = 1;
          do @(posedge clk); while (!tp_hit_gnt[i][t]);
          #1 tp_hit_req[i][t] = 0;
          hits_sent++;
        end
      end
      // finished with this ray in this segment
      tp_rq_fin[i][t] = 1; tp_rq_dst[i][t] = GW'(slot);
      @(negedge clk); tp_rq_req[i][t] = 1;
      do @(posedge clk); while (!tp_rq_gnt[i][t]);
      #1 tp_rq_req[i][t] = 0;
    end
  endtask


  initial begin
    cfg_we = 0; cfg_seg = 0; cfg_line = 0; cfg_nlines = 0; cfg_first_child = 0; cfg_nchild = 0;
    bucket_base = 26'd64; start = 0;
    for (int i = 0; i < NUM_TM; i++) begin
      tp_ray_req[i] = 0; tp_div_req[i] = 0; tp_box_req[i] = 0; tp_tri_req[i] = 0; tp_l1_req[i] = 0;
      tp_rq_req[i] = 0; tp_rq_fin[i] = 0; tp_hit_req[i] = 0;
      for (int t = 0; t < TPS; t++) begin
        tp_div_dir[i][t] = '0; tp_box_op[i][t] = '0; tp_tri_op[i][t] = '0; tp_l1_addr[i][t] = '0;
        tp_rq_dst[i][t] = '0; tp_rq_ray[i][t] = '0; tp_hit[i][t] = '0;
      end
    end
    // scene
    xmin = '{0, 0, 8, 0, 8, 0, 4, 8, 8, 8};   xmax = '{16, 8, 16, 8, 16, 4, 8, 16, 16, 16};
    ymin = '{0, 0, 0, 8, 8, 0, 0, 0, 4, 8};   ymax = '{16, 8, 8, 16, 16, 8, 8, 4, 8, 16};
    zt   = '{40, 30, -60, 20, 10, 35, 5, 25, 15, 1};
    fch  = '{1, 5, 7, 0, 9, 0, 0, 0, 0, 0};    nch  = '{4, 2, 2, 0, 1, 0, 0, 0, 0, 0};
    for (int s = 0; s < NSEG; s++) for (int c = fch[s]; c < fch[s] + nch[s]; c++) par[c] = s;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < NSEG; s++) begin
      cfg_we = 1; cfg_seg = GW'(s); cfg_line = LADDR_W'(seg_dram_line(s));
      cfg_nlines = (LW+1)'(1 + s % 4); cfg_first_child = GW'(fch[s]); cfg_nchild = (GW+1)'(nch[s]);
      @(negedge clk);
    end
    cfg_we = 0;
    // primary rays, written by thread 0 of TM 0 into segment 0
    for (int r = 0; r < NRAYS; r++) begin
      tp_rq_ray[0][0] = prim_ray(r); tp_rq_fin[0][0] = 0; tp_rq_dst[0][0] = '0;
      @(negedge clk); tp_rq_req[0][0] = 1;
      do @(posedge clk); while (!tp_rq_gnt[0][0]);
      #1 tp_rq_req[0][0] = 0;
    end
    while (n_rays_written != 32'(NRAYS)) @(negedge clk);
    for (int i = 0; i < NUM_TM; i++)
      for (int t = 0; t < ACTIVE_TPS; t++) begin
        automatic int ii = i, tt = t;
        fork thread(ii, tt); join_none
      end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!pass_done) @(negedge clk);
    repeat (10) @(negedge clk);
    while (!hits_idle) @(negedge clk);
    repeat (10) @(negedge clk);
    // expected nearest hits
    for (int r = 0; r < NRAYS; r++) begin
      int x, y, best; bit vis [NSEG];
      x = r % 16; y = r / 16; best = -1;
      for (int s = 0; s < NSEG; s++) vis[s] = 0;
      vis[0] = 1;
      for (int s = 1; s < NSEG; s++)
        vis[s] = vis[par[s]] && x >= xmin[s] && x < xmax[s] && y >= ymin[s] && y < ymax[s];
      for (int s = 0; s < NSEG; s++) if (vis[s] && zt[s] > -50 && (best < 0 || zt[s] < best)) best = zt[s];
      checks++;
      if (best < 0) begin
        if (hmem.exists(r)) begin failures++; $display("ray %0d: unexpected hit", r); end
      end else if (!hmem.exists(r) || hmem[r].t != dist_t'((best + 50) * 65536)) begin
        failures++;
        $display("ray %0d: hit t=%0d expected %0d", r, hmem.exists(r) ? hmem[r].t : -1, (best + 50) * 65536);
      end
    end
    begin
      int l1h, l1m;
      l1h = 0; l1m = 0;
      for (int i = 0; i < NUM_TM; i++) begin l1h += int'(l1_hits[i]); l1m += int'(l1_misses[i]); end
      $display("segments done %0d skipped %0d | buckets %0d read %0d | same-segment %0d | flushes %0d",
               n_seg_done, n_seg_skipped, n_bkt_alloc, n_bkt_read, n_affinity, flushes);
      $display("visits %0d box %0d tri %0d hits %0d | hit merged %0d written %0d stalls %0d | L1 %0d/%0d",
               visits, box_tests, tri_tests, hits_sent, n_hit_merged, n_hit_written, n_hit_stall, l1h, l1m);
      checks++; if (n_seg_done != 7)            begin failures++; $display("segments processed"); end
      checks++; if (n_seg_skipped == 0)         begin failures++; $display("no skip"); end
      checks++; if (n_bkt_alloc <= 7)           begin failures++; $display("no multi-bucket queue"); end
      checks++; if (n_bkt_read != n_bkt_alloc)  begin failures++; $display("buckets lost"); end
      checks++; if (n_affinity == 0)            begin failures++; $display("no same-segment refill"); end
      checks++; if (!FULL && flushes == 0)      begin failures++; $display("no L1 flush"); end
      checks++; if (l1h == 0 || l1m == 0)       begin failures++; $display("L1 hit/miss"); end
      checks++; if (n_hit_merged == 0)          begin failures++; $display("no hit merge"); end
      checks++; if (n_hit_written == 0)         begin failures++; $display("no hit write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: segments done %0d", n_seg_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
