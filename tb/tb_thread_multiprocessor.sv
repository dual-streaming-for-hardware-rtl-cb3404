// tb_thread_multiprocessor: all 16 thread ports of a TM exercised at once.
// A bucket of rays is filled into the staging buffer and every ray must
// reach exactly one thread; every thread then, concurrently, inverts a
// direction, runs a box test and a triangle test with known outcome, loads
// two scene lines through the L1 (scene buffer modelled here), sends a ray
// to a child segment, a "finished" notice and a hit update. Each result must
// come back to the thread that asked, with the right value; outgoing
// messages must each arrive exactly once.
module tb_thread_multiprocessor;
  import ds_pkg::*;
  localparam int TPS = 16, SW = 6, GW = 10, AW = 22;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [TPS-1:0] tp_ray_req, tp_ray_gnt, tp_ray_done, tp_div_req, tp_div_gnt, tp_div_done;
  logic [TPS-1:0] tp_box_req, tp_box_gnt, tp_box_done, tp_tri_req, tp_tri_gnt, tp_tri_done, tp_tri_hit;
  logic [TPS-1:0] tp_l1_req, tp_l1_gnt, tp_l1_done, tp_rq_req, tp_rq_fin, tp_rq_gnt, tp_hit_req, tp_hit_gnt;
  ray_t tp_ray; logic [SW-1:0] tp_ray_slot; vec3_t tp_div_dir [TPS]; dvec3_t tp_div_inv;
  box_op_t tp_box_op [TPS]; logic tp_box_hit; dist_t tp_box_tnear;
  tri_op_t tp_tri_op [TPS]; dist_t tp_tri_t [TPS];
  logic [AW-1:0] tp_l1_addr [TPS]; logic [LINE_W-1:0] tp_l1_data;
  logic [GW-1:0] tp_rq_dst [TPS]; ray_t tp_rq_ray [TPS]; hit_upd_t tp_hit [TPS];
  logic fill_ready, fill_valid, fill_last, want_bucket, l1_flush, sb_req, sb_gnt;
  ray_t fill_ray; logic [SW-1:0] fill_slot, last_slot; logic [AW-7:0] sb_line; logic [LINE_W-1:0] sb_data;
  logic rq_valid, rq_ready, rq_fin, hit_valid, hit_ready; logic [GW-1:0] rq_dst; ray_t rq_ray; hit_upd_t hit_upd;
  logic [31:0] l1_hits, l1_misses;

  thread_multiprocessor dut (.*);

  // scene buffer model
  always @(posedge clk) begin
    sb_gnt  <= sb_req && !sb_gnt && $urandom_range(0, 1);
    sb_data <= {32{sb_line}};
  end

  // outgoing message sinks
  int rq_seen [int], hit_seen [int];
  always @(posedge clk) begin
    rq_ready  <= $urandom_range(0, 1);
    hit_ready <= $urandom_range(0, 1);
    if (rst_n && rq_valid && rq_ready) begin
      int k; k = int'(rq_ray.id) * 2 + int'(rq_fin);
      rq_seen[k] = rq_seen.exists(k) ? rq_seen[k] + 1 : 1;
      checks++;
      if (rq_dst != (rq_fin ? GW'(5) : GW'(rq_ray.id + 100))) begin failures++; $display("rq dst"); end
    end
    if (rst_n && hit_valid && hit_ready) begin
      int k; k = int'(hit_upd.id);
      hit_seen[k] = hit_seen.exists(k) ? hit_seen[k] + 1 : 1;
      checks++;
      if (hit_upd.hit.t != dist_t'(k * 3)) begin failures++; $display("hit payload"); end
    end
  end

  int got_ray [int];

  task automatic req_wait(ref logic [TPS-1:0] req, ref logic [TPS-1:0] gnt, input int t);
    @(negedge clk); req[t] = 1;
    do @(posedge clk); while (!gnt[t]);
    #1 req[t] = 0;
  endtask

  task automatic wait_done(ref logic [TPS-1:0] done, input int t);
    int n; n = 0;
    while (!done[t] && n < 500) begin @(posedge clk); #1 n++; end
    checks++;
    if (!done[t]) begin failures++; $display("tp %0d: no result", t); end
  endtask

  task automatic thread(int t);
    ray_t my;
    // 1. fetch a ray
    req_wait(tp_ray_req, tp_ray_gnt, t);
    wait_done(tp_ray_done, t);
    my = tp_ray;
    got_ray[int'(tp_ray.id)]++;
    checks++;
    if (tp_ray_slot != 6'd5 || tp_ray.node != 16'(tp_ray.id * 7)) begin failures++; $display("ray data"); end
    // 2. inverse direction: d = t+1 (Q8.8 raw) -> 2^24/(t+1)
    tp_div_dir[t] = {16'(t + 1), -16'(t + 1), 16'd256};
    req_wait(tp_div_req, tp_div_gnt, t);
    wait_done(tp_div_done, t);
    checks++;
    if (tp_div_inv[2] != dist_t'((1 << 24) / (t + 1)) || tp_div_inv[1] != -dist_t'((1 << 24) / (t + 1)) ||
        tp_div_inv[0] != 32'sh1_0000) begin failures++; $display("tp %0d inverse %0d", t, tp_div_inv[2]); end
    // 3. box: origin 0, direction (1,1,1): box ahead for even threads, behind for odd
    tp_box_op[t].org = '0;
    tp_box_op[t].inv = {3{32'sh1_0000}};
    tp_box_op[t].bmin = (t % 2 == 0) ? {3{16'sh0100}} : {3{-16'sh0300}};
    tp_box_op[t].bmax = (t % 2 == 0) ? {3{16'sh0200}} : {3{-16'sh0200}};
    tp_box_op[t].tmax = DIST_MAX;
    req_wait(tp_box_req, tp_box_gnt, t);
    wait_done(tp_box_done, t);
    checks++;
    if (tp_box_hit != (t % 2 == 0) || (t % 2 == 0 && tp_box_tnear != 32'sh1_0000)) begin
      failures++; $display("tp %0d box %0d %0d", t, tp_box_hit, tp_box_tnear);
    end
    // 4. triangle in the plane z = 2 around the z axis, ray along +z (even) or -z (odd)
    tp_tri_op[t].org = '0;
    tp_tri_op[t].dir = (t % 2 == 0) ? {16'sh0100, 16'sh0, 16'sh0} : {-16'sh0100, 16'sh0, 16'sh0};
    tp_tri_op[t].v0 = {16'sh0200, -16'sh0100, -16'sh0100};
    tp_tri_op[t].v1 = {16'sh0200, -16'sh0100,  16'sh0200};
    tp_tri_op[t].v2 = {16'sh0200,  16'sh0200, -16'sh0100};
    tp_tri_op[t].tmax = DIST_MAX;
    req_wait(tp_tri_req, tp_tri_gnt, t);
    wait_done(tp_tri_done, t);
    checks++;
    if (tp_tri_hit[t] != (t % 2 == 0) || (t % 2 == 0 && tp_tri_t[t] != 32'sh2_0000)) begin
      failures++; $display("tp %0d tri %0d %0d", t, tp_tri_hit[t], tp_tri_t[t]);
    end
    // 5. two scene-data loads (the second one hits for most threads)
    for (int k = 0; k < 2; k++) begin
      logic [AW-7:0] ln;
      ln = 16'(t % 4 + 40);
      tp_l1_addr[t] = {ln, 6'd8};
      req_wait(tp_l1_req, tp_l1_gnt, t);
      wait_done(tp_l1_done, t);
      checks++;
      if (tp_l1_data != {32{ln}}) begin failures++; $display("tp %0d l1 data", t); end
    end
    // 6. ray to a child segment, then "finished", then a hit update
    tp_rq_ray[t] = my; tp_rq_fin[t] = 0; tp_rq_dst[t] = GW'(my.id + 100);
    req_wait(tp_rq_req, tp_rq_gnt, t);
    tp_rq_fin[t] = 1; tp_rq_dst[t] = GW'(5);
    req_wait(tp_rq_req, tp_rq_gnt, t);
    tp_hit[t] = '{id: my.id, hit: '{t: dist_t'(my.id * 3), prim: 32'(t)}};
    req_wait(tp_hit_req, tp_hit_gnt, t);
  endtask

  initial begin
    tp_ray_req = 0; tp_div_req = 0; tp_box_req = 0; tp_tri_req = 0; tp_l1_req = 0; tp_rq_req = 0;
    tp_hit_req = 0; tp_rq_fin = 0;
    for (int t = 0; t < TPS; t++) begin
      tp_div_dir[t] = '0; tp_box_op[t] = '0; tp_tri_op[t] = '0; tp_l1_addr[t] = '0;
      tp_rq_dst[t] = '0; tp_rq_ray[t] = '0; tp_hit[t] = '0;
    end
    fill_valid = 0; fill_last = 0; fill_ray = '0; fill_slot = 0; l1_flush = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // a bucket of TPS rays
    @(negedge clk);
    checks++;
    if (!want_bucket || !fill_ready) begin failures++; $display("not asking for a bucket"); end
    for (int i = 0; i < TPS; i++) begin
      fill_valid = 1; fill_last = (i == TPS - 1); fill_slot = 6'd5;
      fill_ray = '0; fill_ray.id = RAYID_W'(i + 1000); fill_ray.node = 16'((i + 1000) * 7);
      @(negedge clk);
    end
    fill_valid = 0; fill_last = 0;
    checks++;
    if (last_slot != 6'd5) begin failures++; $display("last_slot"); end
    for (int t = 0; t < TPS; t++) begin
      automatic int tt = t;
      fork thread(tt); join_none
    end
    wait fork;
    repeat (20) @(posedge clk);
    for (int i = 0; i < TPS; i++) begin
      checks++;
      if (!got_ray.exists(i + 1000) || got_ray[i + 1000] != 1) begin failures++; $display("ray %0d", i); end
      checks++;
      if (!rq_seen.exists((i + 1000) * 2) || rq_seen[(i + 1000) * 2] != 1 ||
          !rq_seen.exists((i + 1000) * 2 + 1) || rq_seen[(i + 1000) * 2 + 1] != 1 ||
          !hit_seen.exists(i + 1000) || hit_seen[i + 1000] != 1) begin failures++; $display("msgs %0d", i); end
    end
    checks++;
    if (l1_hits == 0 || l1_misses == 0) begin failures++; $display("l1 %0d %0d", l1_hits, l1_misses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
