// tb_ray_box_unit: drives one random box test per cycle into the ray-box
// pipeline and compares each result, and its arrival exactly 8 cycles after
// issue, with a reference slab test computed here in 64-bit integers.
module tb_ray_box_unit;
  import ds_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid; vec3_t org, bmin, bmax; dvec3_t inv; dist_t tmax; logic [3:0] tag;
  logic out_valid, out_hit; dist_t out_tnear; logic [3:0] out_tag;

  ray_box_unit dut (.clk, .rst_n, .in_valid, .in_org(org), .in_inv(inv), .in_bmin(bmin),
    .in_bmax(bmax), .in_tmax(tmax), .in_tag(tag), .out_valid, .out_hit, .out_tnear, .out_tag);

  typedef struct { logic hit; longint tn; int issue; } exp_t;
  exp_t q[$];
  int cyc = 0, nhit = 0;

  function automatic longint sat(longint v);
    if (v > 64'sh7fffffff) return 64'sh7fffffff;
    if (v < -64'sh7fffffff) return -64'sh7fffffff;
    return v;
  endfunction

  function automatic exp_t ref_box(vec3_t o, dvec3_t iv, vec3_t lo, vec3_t hi, dist_t tm);
    exp_t e; longint tn, tf, a, b;
    tn = 0; tf = tm;
    for (int k = 0; k < 3; k++) begin
      a = sat(((longint'(lo[k]) - longint'(o[k])) * longint'(iv[k])) >>> 8);
      b = sat(((longint'(hi[k]) - longint'(o[k])) * longint'(iv[k])) >>> 8);
      if (a > b) begin longint t; t = a; a = b; b = t; end
      if (a > tn) tn = a;
      if (b < tf) tf = b;
    end
    e.hit = (tn <= tf); e.tn = tn;
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
        if (out_hit !== e.hit || (e.hit && out_tnear != dist_t'(e.tn)) || cyc - e.issue != 8) begin
          failures++;
          $display("mismatch hit %0d/%0d tn %0d/%0d lat %0d", out_hit, e.hit, out_tnear, e.tn, cyc - e.issue);
        end
        if (e.hit) nhit++;
      end
    end
  end

  initial begin
    in_valid = 0; tag = 0; org = '0; inv = '0; bmin = '0; bmax = '0; tmax = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < 3; k++) begin
        coord_t c0, c1;
        org[k] = coord_t'($urandom_range(0, 4096) - 2048);
        c0 = coord_t'($urandom_range(0, 4096) - 2048);
        c1 = coord_t'($urandom_range(0, 4096) - 2048);
        bmin[k] = (c0 < c1) ? c0 : c1; bmax[k] = (c0 < c1) ? c1 : c0;
        inv[k] = dist_t'($urandom_range(0, 32'h0008_0000)) - 32'sh0004_0000;
      end
      tmax = dist_t'($urandom_range(32'h1000, 32'h0100_0000));
      if (in_valid) begin
        exp_t e; e = ref_box(org, inv, bmin, bmax, tmax); e.issue = cyc + 1;
        q.push_back(e);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (q.size() != 0 || nhit == 0) begin failures++; $display("left %0d hits %0d", q.size(), nhit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
