// tb_ray_staging_buffer: a scheduler model writes buckets of random size and
// segment whenever the buffer asks for one, while a thread model takes rays
// at random times. Every ray must come out once, in order, with its bucket's
// segment; the test also counts fills that overlap draining (double
// buffering) and requires some.
module tb_ray_staging_buffer;
  import ds_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic fill_ready, fill_valid, fill_last, want_bucket, rd_avail, rd_req, rd_valid;
  ray_t fill_ray, rd_ray; logic [5:0] fill_seg, last_seg, rd_seg;

  ray_staging_buffer dut (.*);

  typedef struct { ray_t r; logic [5:0] s; } exp_t;
  exp_t q[$];
  int overlap = 0, got = 0, sent = 0;

  always @(posedge clk) begin
    if (rst_n && rd_valid) begin
      exp_t e; checks++;
      e = q.pop_front();
      if (rd_ray != e.r || rd_seg != e.s) begin failures++; $display("mismatch ray %0d", got); end
      got++;
    end
    if (rst_n && fill_valid && fill_ready && rd_avail) overlap++;
  end

  // thread side
  initial begin
    rd_req = 0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      rd_req = ($urandom_range(0, 2) != 0);
    end
  end

  initial begin
    fill_valid = 0; fill_last = 0; fill_ray = '0; fill_seg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 40; b++) begin
      int n; logic [5:0] s;
      n = (b % 5 == 0) ? BUCKET_RAYS : $urandom_range(1, BUCKET_RAYS);
      s = 6'($urandom);
      @(negedge clk);
      while (!want_bucket) @(negedge clk);
      for (int i = 0; i < n; i++) begin
        exp_t e;
        fill_valid = 1; fill_last = (i == n - 1); fill_seg = s;
        fill_ray = ray_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        e.r = fill_ray; e.s = s; q.push_back(e); sent++;
        @(negedge clk);
        if (i < n - 1 && !fill_ready) begin failures++; $display("fill_ready dropped in a bucket"); end
      end
      fill_valid = 0; fill_last = 0;
      checks++;
      if (last_seg != s) begin failures++; $display("last_seg"); end
    end
    while (q.size() != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (got != sent || overlap == 0) begin failures++; $display("got %0d sent %0d overlap %0d", got, sent, overlap); end
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
