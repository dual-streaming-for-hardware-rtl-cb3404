// tb_ds_top: the end-to-end test at reduced size (2 TMs of 4 threads, a
// 4-slot working set, 16-line segments of a 16-segment table, a 512-byte
// L1); see ds_top_harness for what it runs and checks.
module tb_ds_top;
  import ds_pkg::*;
  localparam int NUM_TM = 2, TPS = 4, MAX_SEGS = 16, WS_SLOTS = 4, SEG_LINES = 16;
  localparam int GW = $clog2(MAX_SEGS), SW = $clog2(WS_SLOTS), LW = $clog2(SEG_LINES);
  localparam int AW = SW + LW + 6;
  `include "ds_top_sigs.svh"

  ds_top #(.NUM_TM(NUM_TM), .TPS(TPS), .MAX_SEGS(MAX_SEGS), .WS_SLOTS(WS_SLOTS),
           .STREAMS(2), .SEG_LINES(SEG_LINES), .L1_BYTES(512)) dut (.*);
  assign l1_flush_mon = dut.l1_flush;
  ds_top_harness #(.FULL(0), .NUM_TM(NUM_TM), .TPS(TPS), .ACTIVE_TPS(4), .MAX_SEGS(MAX_SEGS),
                   .WS_SLOTS(WS_SLOTS), .SEG_LINES(SEG_LINES)) h (.*);
endmodule
