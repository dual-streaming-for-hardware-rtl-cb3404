// tb_stream_scheduler: one wavefront through a small tree of scene segments.
//
// Segment tree (ids): 0 -> {1,2,3}; 1 -> {4,5,6}; 2 -> {7,8}; 6 -> {9}.
// Rays are routed by a fixed hash of (ray id, child segment); no ray ever
// enters segment 3 or 8, so those are skipped (9 only through 6).
// Models here: DRAM for the scene and ray channels (random, in-order
// latency), the scene buffer (to learn which segment sits in which slot),
// and thread multiprocessors that take buckets, "trace" each ray by writing
// it into the child segments it enters and then report it finished.
// Checked: every (ray, segment) visit the routing implies happens exactly
// once and no other; rays arrive intact; no segment's rays are dispatched
// before its scene data is fully loaded or before its parent is finished;
// every segment is loaded at most once; skips, multi-bucket queues, bucket
// recycling, same-segment preference and L1 flushes all occur; the pass ends.
module tb_stream_scheduler;
  import ds_pkg::*;
  localparam int MS = 16, WS = 3, NT = 3, SL = 16;
  localparam int GW = 4, SW = 2, TW = 2, LW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;

  logic cfg_we; logic [GW-1:0] cfg_seg, cfg_first_child; logic [LADDR_W-1:0] cfg_line;
  logic [LW:0] cfg_nlines; logic [GW:0] cfg_nchild; logic [BADDR_W-1:0] bucket_base;
  logic start, busy, pass_done;
  logic rq_valid, rq_ready, rq_done; logic [GW-1:0] rq_dst; ray_t rq_ray;
  logic [NT-1:0] tm_want; logic [SW-1:0] tm_last_slot [NT];
  logic fill_valid, fill_last; logic [TW-1:0] fill_tm; ray_t fill_ray; logic [SW-1:0] fill_slot;
  logic sb_we, l1_flush; logic [SW-1:0] sb_slot; logic [LW-1:0] sb_line; logic [LINE_W-1:0] sb_data;
  logic sc_req_valid, sc_req_ready, sc_resp_valid; scene_mem_req_t sc_req; logic [LINE_W-1:0] sc_resp_data;
  logic rm_req_valid, rm_req_ready, rm_resp_valid; ray_mem_req_t rm_req; logic [SLOT_W-1:0] rm_resp_data;
  logic [31:0] n_seg_done, n_seg_skipped, n_bkt_alloc, n_bkt_read, n_affinity, n_rays_written;

  stream_scheduler #(.MAX_SEGS(MS), .WS_SLOTS(4), .STREAMS(2), .NUM_TM(NT), .SEG_LINES(SL),
                     .FREE_DEPTH(4)) dut (.*);

  // ---- scene ------------------------------------------------------------
  int fchild[MS], nchild[MS], parent[MS], nlines[MS];
  function automatic logic enters(int r, int c);
    if (c == 3 || c == 8) return 0;
    return ((r * 7 + c * 13) % 5) < 3;
  endfunction
  function automatic int seg_line(int s); return 1000 + s * 64; endfunction

  // expected visits
  bit exp_visit [int];     // key r*MS+s
  bit got_visit [int];
  int NR = 150;
  int seg_rays_total[MS], seg_rays_done[MS];

  // ---- scene memory model ----------------------------------------------
  typedef struct { int due; logic [LINE_W-1:0] d; } sresp_t;
  sresp_t sq[$];
  always @(posedge clk) begin
    sc_resp_valid <= 0;
    if (rst_n && sc_req_valid && sc_req_ready) begin
      sresp_t e; e.due = cyc + $urandom_range(2, 9); e.d = {16{32'(sc_req.addr)}};
      if (sq.size() != 0 && sq[$].due > e.due) e.due = sq[$].due;
      sq.push_back(e);
    end
    if (sq.size() != 0 && sq[0].due <= cyc) begin
      sc_resp_valid <= 1; sc_resp_data <= sq[0].d; void'(sq.pop_front());
    end
    sc_req_ready <= ($urandom_range(0, 3) != 0);
  end

  // ---- scene buffer model -----------------------------------------------
  int slot_seg[4], slot_lines[4], seg_loads[MS];
  always @(posedge clk) if (rst_n && sb_we) begin
    int s;
    s = (int'(sb_data[31:0]) - 1000) / 64;
    if (sb_line == 0) begin
      slot_seg[sb_slot] = s; slot_lines[sb_slot] = 0; seg_loads[s]++;
    end
    checks++;
    if (int'(sb_data[31:0]) != seg_line(slot_seg[sb_slot]) + int'(sb_line)) begin
      failures++; $display("scene line to wrong place");
    end
    slot_lines[sb_slot]++;
  end

  // ---- ray memory model --------------------------------------------------
  logic [SLOT_W-1:0] rmem [int];
  typedef struct { int due; logic [SLOT_W-1:0] d; } rresp_t;
  rresp_t rqm[$];
  always @(posedge clk) begin
    rm_resp_valid <= 0;
    if (rst_n && rm_req_valid && rm_req_ready) begin
      if (rm_req.we) rmem[int'(rm_req.addr)] = rm_req.wdata;
      else begin
        rresp_t e; e.due = cyc + $urandom_range(2, 12);
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

  // ---- TM models ------------------------------------------------------------
  function automatic ray_t mk_ray(int r);
    ray_t x;
    x.org = {16'(r), 16'(r * 3), 16'(r * 5)};
    x.dir = {16'(r + 1), 16'(~r), 16'(r * 9)};
    x.id = RAYID_W'(r); x.node = 16'(r * 11);
    return x;
  endfunction

  typedef struct { logic done; int dst; ray_t ray; } msg_t;
  msg_t outq[$];
  typedef struct { ray_t ray; int slot; } work_t;
  work_t work [NT][$];
  bit receiving [NT];

  always @(posedge clk) if (rst_n) begin
    if (fill_valid) begin
      int s; int r;
      s = slot_seg[fill_slot]; r = int'(fill_ray.id);
      checks++;
      if (fill_ray != mk_ray(r)) begin failures++; $display("ray %0d corrupted", r); end
      if (got_visit.exists(r * MS + s)) begin failures++; $display("ray %0d visits %0d twice", r, s); end
      got_visit[r * MS + s] = 1;
      if (slot_lines[fill_slot] != nlines[s]) begin failures++; $display("seg %0d not loaded", s); end
      if (s != 0 && seg_rays_done[parent[s]] != seg_rays_total[parent[s]]) begin
        failures++; $display("seg %0d before parent done", s);
      end
      work[fill_tm].push_back('{ray: fill_ray, slot: int'(fill_slot)});
      receiving[fill_tm] = !fill_last;
      tm_last_slot[fill_tm] <= fill_slot;
    end
    for (int t = 0; t < NT; t++) begin
      if (fill_valid && int'(fill_tm) == t && !fill_last) receiving[t] = 1;
      if (work[t].size() != 0 && $urandom_range(0, 2) == 0) begin
        work_t w; int s, r;
        w = work[t].pop_front();
        s = slot_seg[w.slot]; r = int'(w.ray.id);
        for (int c = fchild[s]; c < fchild[s] + nchild[s]; c++)
          if (enters(r, c)) outq.push_back('{done: 0, dst: c, ray: w.ray});
        outq.push_back('{done: 1, dst: w.slot, ray: w.ray});
        seg_rays_done[s]++;
      end
    end
  end
  always_comb for (int t = 0; t < NT; t++) tm_want[t] = !receiving[t] && work[t].size() < 4;

  // message port
  always @(posedge clk) if (rst_n && rq_valid && rq_ready) void'(outq.pop_front());
  always_comb begin
    rq_valid = (outq.size() != 0);
    rq_done  = rq_valid ? outq[0].done : 1'b0;
    rq_dst   = rq_valid ? GW'(outq[0].dst) : '0;
    rq_ray   = rq_valid ? outq[0].ray : '0;
  end

  int pass_cnt = 0, flushes = 0;
  always @(posedge clk) begin
    if (rst_n && pass_done) pass_cnt++;
    if (rst_n && l1_flush) flushes++;
  end

  initial begin
    cfg_we = 0; cfg_seg = 0; cfg_line = 0; cfg_nlines = 0; cfg_first_child = 0; cfg_nchild = 0;
    bucket_base = 26'd100; start = 0;
    for (int t = 0; t < NT; t++) begin receiving[t] = 0; tm_last_slot[t] = 0; end
    for (int s = 0; s < MS; s++) begin
      fchild[s] = 0; nchild[s] = 0; parent[s] = 0; nlines[s] = $urandom_range(1, SL);
      seg_rays_total[s] = 0; seg_rays_done[s] = 0; seg_loads[s] = 0;
    end
    fchild[0] = 1; nchild[0] = 3; fchild[1] = 4; nchild[1] = 3; fchild[2] = 7; nchild[2] = 2;
    fchild[6] = 9; nchild[6] = 1;
    for (int s = 0; s < MS; s++) for (int c = fchild[s]; c < fchild[s] + nchild[s]; c++) parent[c] = s;
    // expected visits
    for (int r = 0; r < NR; r++) begin
      bit vis [MS];
      for (int s = 0; s < MS; s++) vis[s] = 0;
      vis[0] = 1;
      for (int s = 0; s < MS; s++) if (vis[s]) begin
        exp_visit[r * MS + s] = 1; seg_rays_total[s]++;
        for (int c = fchild[s]; c < fchild[s] + nchild[s]; c++) if (enters(r, c)) vis[c] = 1;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 10; s++) begin
      cfg_we = 1; cfg_seg = GW'(s); cfg_line = LADDR_W'(seg_line(s)); cfg_nlines = (LW+1)'(nlines[s]);
      cfg_first_child = GW'(fchild[s]); cfg_nchild = (GW+1)'(nchild[s]);
      @(negedge clk);
    end
    cfg_we = 0;
    // primary rays into the root queue
    for (int r = 0; r < NR; r++) outq.push_back('{done: 0, dst: 0, ray: mk_ray(r)});
    while (n_rays_written != 32'(NR)) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    while (pass_cnt == 0) @(negedge clk);
    // every expected visit happened, and nothing else
    foreach (exp_visit[k]) begin
      checks++;
      if (!got_visit.exists(k)) begin failures++; $display("missing visit ray %0d seg %0d", k / MS, k % MS); end
    end
    foreach (got_visit[k]) begin
      checks++;
      if (!exp_visit.exists(k)) begin failures++; $display("extra visit %0d", k); end
    end
    for (int s = 0; s < MS; s++) begin
      checks++;
      if (seg_loads[s] > 1 || (seg_rays_total[s] != 0) != (seg_loads[s] == 1)) begin
        failures++; $display("segment %0d loaded %0d times", s, seg_loads[s]);
      end
    end
    checks++;
    $display("segs done %0d skipped %0d buckets %0d/%0d affinity %0d flushes %0d written %0d",
             n_seg_done, n_seg_skipped, n_bkt_alloc, n_bkt_read, n_affinity, flushes, n_rays_written);
    if (n_seg_skipped < 2 || n_bkt_alloc != n_bkt_read || n_bkt_alloc < 8 || n_affinity == 0 ||
        flushes == 0 || n_seg_done != 8 || busy) begin
      failures++; $display("mechanism missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
