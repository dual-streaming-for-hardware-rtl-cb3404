// tb_ds_top_full: the end-to-end test on ds_top at its full default size
// (128 TMs of 16 thread processors, 64-slot working set of 64 KB segments,
// 1024-segment table, 16 KB L1s). Two thread processors per TM are driven,
// so 256 threads work on the scene; see ds_top_harness for what it runs and
// checks.
module tb_ds_top_full;
  import ds_pkg::*;
  localparam int NUM_TM = 128, TPS = 16, MAX_SEGS = 1024, WS_SLOTS = 64, SEG_LINES = 1024;
  localparam int GW = $clog2(MAX_SEGS), SW = $clog2(WS_SLOTS), LW = $clog2(SEG_LINES);
  localparam int AW = SW + LW + 6;
  `include "ds_top_sigs.svh"

  ds_top dut (.*);
  assign l1_flush_mon = dut.l1_flush;
  ds_top_harness #(.FULL(1), .NUM_TM(NUM_TM), .TPS(TPS), .ACTIVE_TPS(2), .MAX_SEGS(MAX_SEGS),
                   .WS_SLOTS(WS_SLOTS), .SEG_LINES(SEG_LINES)) h (.*);
endmodule
