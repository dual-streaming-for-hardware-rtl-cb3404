// tb_ray_tri_unit: sends rays aimed at (or near) random triangles into the
// ray-triangle pipeline as fast as it accepts them, and checks hit/miss and
// distance against a reference computed here with integer edge tests and a
// real-valued division. Also checks the 18-cycle issue interval and the
// 31-cycle latency.
module tb_ray_tri_unit;
  import ds_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready; vec3_t org, dir, v0, v1, v2; dist_t tmax; logic [3:0] tag;
  logic out_valid, out_hit; dist_t out_t; logic [3:0] out_tag;

  ray_tri_unit dut (.clk, .rst_n, .in_valid, .in_ready, .in_org(org), .in_dir(dir),
    .in_v0(v0), .in_v1(v1), .in_v2(v2), .in_tmax(tmax), .in_tag(tag),
    .out_valid, .out_hit, .out_t, .out_tag);

  typedef struct { logic hit; real t; logic unsure; int issue; logic [3:0] tag; } exp_t;
  exp_t q[$];
  int cyc = 0, nhit = 0, nmiss = 0, last_issue = -100;

  function automatic longint tp(longint ax, longint ay, longint az, longint bx, longint by,
                                longint bz, longint cx, longint cy, longint cz);
    // a . (b x c)
    return ax*(by*cz - bz*cy) + ay*(bz*cx - bx*cz) + az*(bx*cy - by*cx);
  endfunction

  function automatic exp_t ref_tri();
    exp_t e; longint w[3][3], d[3], s0, s1, s2, sum, num; real t;
    for (int k = 0; k < 3; k++) begin
      w[0][k] = longint'(v0[k]) - longint'(org[k]);
      w[1][k] = longint'(v1[k]) - longint'(org[k]);
      w[2][k] = longint'(v2[k]) - longint'(org[k]);
      d[k] = longint'(dir[k]);
    end
    s0 = tp(d[0],d[1],d[2], w[1][0],w[1][1],w[1][2], w[2][0],w[2][1],w[2][2]);
    s1 = tp(d[0],d[1],d[2], w[2][0],w[2][1],w[2][2], w[0][0],w[0][1],w[0][2]);
    s2 = tp(d[0],d[1],d[2], w[0][0],w[0][1],w[0][2], w[1][0],w[1][1],w[1][2]);
    num = tp(w[0][0],w[0][1],w[0][2], w[1][0],w[1][1],w[1][2], w[2][0],w[2][1],w[2][2]);
    sum = s0 + s1 + s2;
    e.unsure = 0;
    if (sum == 0 || !((s0 >= 0 && s1 >= 0 && s2 >= 0) || (s0 <= 0 && s1 <= 0 && s2 <= 0))) begin
      e.hit = 0; e.t = 0;
    end else begin
      t = real'(num) / real'(sum) * 65536.0;
      e.t = t;
      e.hit = (t >= 1.0) && (t < real'(tmax));
      if ((t > -2.0 && t < 2.0) || (t > real'(tmax) - 2.0 && t < real'(tmax) + 2.0)) e.unsure = 1;
    end
    return e;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        e = q.pop_front();
        if (cyc - e.issue != 31 || out_tag != e.tag) begin
          failures++; $display("latency %0d tag %0d/%0d", cyc - e.issue, out_tag, e.tag);
        end else if (!e.unsure) begin
          if (out_hit != e.hit) begin
            failures++; $display("hit %0d expected %0d (t=%f)", out_hit, e.hit, e.t);
          end else if (e.hit && (real'(out_t) > e.t + 1.0 || real'(out_t) < e.t - 1.0)) begin
            failures++; $display("t %0d expected %f", out_t, e.t);
          end
        end
        if (e.hit) nhit++; else nmiss++;
      end
    end
    if (in_valid && in_ready) begin
      exp_t e;
      if (cyc - last_issue < 18) begin failures++; $display("issued too early"); end
      checks++;
      last_issue = cyc;
      e = ref_tri(); e.issue = cyc; e.tag = tag; q.push_back(e);
    end
  end

  initial begin
    in_valid = 0; tag = 0;
    org = '0; dir = '0; v0 = '0; v1 = '0; v2 = '0; tmax = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 120; n++) begin
      int a, b; longint tgt[3];
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        org[k] = coord_t'($urandom_range(0, 8192) - 4096);
        v0[k]  = coord_t'($urandom_range(0, 8192) - 4096);
        v1[k]  = coord_t'($urandom_range(0, 8192) - 4096);
        v2[k]  = coord_t'($urandom_range(0, 8192) - 4096);
      end
      // aim at a barycentric point, inside for a<b<=100 roughly half the time
      a = $urandom_range(0, 140); b = $urandom_range(0, 140 - a);
      for (int k = 0; k < 3; k++) begin
        tgt[k] = (longint'(v0[k]) * (140 - a - b) + longint'(v1[k]) * a + longint'(v2[k]) * b) / 140;
        if ($urandom_range(0, 3) == 0) tgt[k] += $urandom_range(0, 600) - 300;
        dir[k] = coord_t'((tgt[k] - longint'(org[k])) / 4);
      end
      tmax = ($urandom_range(0, 3) == 0) ? dist_t'($urandom_range(32'h1_0000, 32'h5_0000)) : DIST_MAX;
      tag = 4'(n);
      in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk); in_valid = 0;
    end
    repeat (40) @(posedge clk);
    checks++;
    if (q.size() != 0 || nhit < 10 || nmiss < 10) begin
      failures++; $display("left %0d hits %0d misses %0d", q.size(), nhit, nmiss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
