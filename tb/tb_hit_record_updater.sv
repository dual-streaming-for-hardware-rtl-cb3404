// tb_hit_record_updater: bursts of hit updates for a few ray indices (so the
// queue fills and requests merge) against a memory model with random delays.
// At the end every record in memory must hold the closest hit sent for that
// ray; merges, writes and full-queue stalls must each have happened.
module tb_hit_record_updater;
  import ds_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic upd_valid, upd_ready, mem_req_valid, mem_req_ready, mem_resp_valid, idle;
  hit_upd_t upd; hit_mem_req_t mem_req; hit_rec_t mem_resp;
  logic [31:0] n_merged, n_written, n_full_stall;
  hit_record_updater dut (.*);

  localparam int NR = 24;
  hit_rec_t mem [NR];
  hit_rec_t best [NR];
  hit_rec_t rq[$];

  always @(posedge clk) begin
    mem_resp_valid <= 0;
    if (rst_n && mem_req_valid && mem_req_ready) begin
      if (mem_req.we) mem[mem_req.addr] = mem_req.wdata;
      else rq.push_back(mem[mem_req.addr]);
    end
    if (rq.size() != 0 && $urandom_range(0, 3) == 0) begin
      mem_resp_valid <= 1; mem_resp <= rq.pop_front();
    end
    mem_req_ready <= ($urandom_range(0, 1) == 0);
  end

  initial begin
    upd_valid = 0; upd = '0;
    for (int i = 0; i < NR; i++) begin
      mem[i] = '{t: DIST_MAX, prim: '1}; best[i] = mem[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      upd_valid = ($urandom_range(0, 3) != 0) || (n > 1000 && n < 1300);
      upd.id = RAYID_W'($urandom_range(0, NR - 1));
      upd.hit.t = dist_t'({$urandom_range(1, 32'h3fff), 12'(n)});
      upd.hit.prim = 32'(n);
      @(posedge clk);
      if (upd_valid && upd_ready && upd.hit.t < best[upd.id].t) best[upd.id] = upd.hit;
      while (upd_valid && !upd_ready) begin
        @(posedge clk);
        if (upd_ready && upd.hit.t < best[upd.id].t) best[upd.id] = upd.hit;
      end
    end
    @(negedge clk) upd_valid = 0;
    repeat (5) @(posedge clk);
    while (!idle) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int i = 0; i < NR; i++) begin
      checks++;
      if (mem[i] != best[i]) begin failures++; $display("ray %0d t %0d expected %0d", i, mem[i].t, best[i].t); end
    end
    checks++;
    if (n_merged == 0 || n_written == 0 || n_full_stall == 0) begin
      failures++; $display("merged %0d written %0d stalls %0d", n_merged, n_written, n_full_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
