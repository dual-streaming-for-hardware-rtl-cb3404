// tb_scene_buffer: writes lines into random slots of the full-size scene
// buffer, then reads them back (and while other writes go on), comparing
// with a model; a read returns data one cycle after it is issued.
module tb_scene_buffer;
  import ds_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en, rd_en; logic [5:0] wr_slot, rd_slot; logic [9:0] wr_line, rd_line;
  logic [LINE_W-1:0] wr_data, rd_data;
  scene_buffer dut (.*);

  logic [LINE_W-1:0] model [int];
  int keys[$];

  function automatic logic [LINE_W-1:0] rnd_line();
    logic [LINE_W-1:0] v;
    for (int i = 0; i < LINE_W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    wr_en = 0; rd_en = 0; wr_slot = 0; rd_slot = 0; wr_line = 0; rd_line = 0; wr_data = '0;
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      int k;
      wr_en = 1; wr_slot = 6'($urandom); wr_line = 10'($urandom); wr_data = rnd_line();
      k = {wr_slot, wr_line};
      if (!model.exists(k)) keys.push_back(k);
      model[k] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int n = 0; n < 600; n++) begin
      int k;
      k = keys[$urandom_range(0, keys.size() - 1)];
      rd_en = 1; {rd_slot, rd_line} = 16'(k);
      // a concurrent write elsewhere
      wr_en = 1; wr_slot = 6'($urandom); wr_line = 10'($urandom); wr_data = rnd_line();
      if ({wr_slot, wr_line} == 16'(k)) wr_en = 0;
      @(negedge clk);
      if (wr_en) begin
        if (!model.exists({wr_slot, wr_line})) keys.push_back({wr_slot, wr_line});
        model[{wr_slot, wr_line}] = wr_data;
      end
      checks++;
      if (rd_data != model[k]) begin failures++; $display("read mismatch at %0d", k); end
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
