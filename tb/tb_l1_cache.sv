// tb_l1_cache: random line reads from a small address range (so lines are
// reused and also evicted) against a scene-buffer model with a randomly
// delayed grant. Checks the data of every answer, that hits answer in one
// cycle, that hit and miss counts match a reference cache model, and that a
// flush makes the next access miss.
module tb_l1_cache;
  import ds_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flush, req_valid, req_ready, resp_valid, sb_req, sb_gnt;
  logic [21:0] req_addr; logic [3:0] req_tag, resp_tag; logic [15:0] sb_line;
  logic [LINE_W-1:0] resp_data, sb_data; logic [31:0] hits, misses;
  l1_cache dut (.*);

  function automatic logic [LINE_W-1:0] line_val(logic [15:0] l);
    return {16{l, ~l}};
  endfunction

  // scene buffer model: grant after a random delay, data one cycle later
  always @(posedge clk) begin
    sb_gnt  <= sb_req && !sb_gnt && ($urandom_range(0, 2) == 0);
    sb_data <= line_val(sb_line);
  end

  // reference direct-mapped model
  logic [15:0] ref_line [256];
  logic        ref_v    [256];
  int exp_hits = 0, exp_miss = 0;

  initial begin
    flush = 0; req_valid = 0; req_addr = 0; req_tag = 0;
    for (int i = 0; i < 256; i++) ref_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      logic [15:0] l; int lat; logic exp_hit;
      @(negedge clk);
      if (n % 400 == 399) begin
        flush = 1; @(negedge clk); flush = 0;
        for (int i = 0; i < 256; i++) ref_v[i] = 0;
      end
      l = 16'($urandom_range(0, 700)) + 16'h3000;
      req_addr = {l, 6'($urandom)}; req_tag = 4'(n); req_valid = 1;
      exp_hit = ref_v[l[7:0]] && ref_line[l[7:0]] == l;
      if (exp_hit) exp_hits++; else exp_miss++;
      ref_v[l[7:0]] = 1; ref_line[l[7:0]] = l;
      @(posedge clk); #1 req_valid = 0;
      lat = 1;
      while (!resp_valid && lat < 50) begin @(posedge clk); #1 lat++; end
      checks++;
      if (resp_data != line_val(l) || resp_tag != 4'(n)) begin failures++; $display("bad data"); end
      if (exp_hit) begin
        checks++;
        if (lat != 1) begin failures++; $display("hit latency %0d", lat); end
      end
    end
    checks++;
    if (hits != 32'(exp_hits) || misses != 32'(exp_miss)) begin
      failures++; $display("hits %0d/%0d misses %0d/%0d", hits, exp_hits, misses, exp_miss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
