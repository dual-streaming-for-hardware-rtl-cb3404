// tb_recip_unit: random directions, including zero, negative and extreme
// components, through the shared division unit; each inverse is compared
// with 2^24 / d computed here, and the latency with 27 cycles.
module tb_recip_unit;
  import ds_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid; vec3_t dir; dvec3_t inv; logic [3:0] tag, out_tag;
  recip_unit dut (.clk, .rst_n, .in_valid, .in_ready, .in_dir(dir), .in_tag(tag),
                  .out_valid, .out_inv(inv), .out_tag);

  function automatic dist_t ref_inv(coord_t d);
    longint m;
    if (d == 0) return DIST_MAX;
    m = (64'sd1 << 24) / ((d < 0) ? -longint'(d) : longint'(d));
    return (d < 0) ? dist_t'(-m) : dist_t'(m);
  endfunction

  initial begin
    in_valid = 0; dir = '0; tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int start, lat;
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        case ($urandom_range(0, 5))
          0: dir[k] = '0;
          1: dir[k] = 16'sh8001;
          2: dir[k] = 16'sd1;
          default: dir[k] = coord_t'($urandom);
        endcase
      end
      tag = 4'(n); in_valid = 1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      start = 0;
      @(negedge clk); in_valid = 0;
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 27 || out_tag != 4'(n)) begin failures++; $display("latency %0d", lat); end
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (inv[k] != ref_inv(dir[k])) begin
          failures++; $display("d=%0d inv=%0d expected %0d", dir[k], inv[k], ref_inv(dir[k]));
        end
      end
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
