// scene_buffer: the global on-chip scratchpad that holds the scene data of
// every segment in the working set.
//
// It is organised as SLOTS segment slots of SEG_LINES 64-byte lines
// (64 x 64 KB = 4 MB by default). Only the stream scheduler writes it, one
// line per cycle as a segment is prefetched from DRAM; the thread
// multiprocessors only read it, on L1 misses. There are no tags, no misses
// and no replacement: the scheduler decides what is resident, so a read
// simply indexes {slot, line}.
//
// Timing (this design's choice): one write port and one read port; a read
// issued in one cycle returns rd_data in the next. Reset is not needed: the
// contents are defined by the scheduler's writes before any ray of that
// segment is dispatched.
module scene_buffer
  import ds_pkg::*;
#(
  parameter int SLOTS     = 64,
  parameter int SEG_LINES = ds_pkg::SEG_LINES,
  localparam int SW = $clog2(SLOTS),
  localparam int LW = $clog2(SEG_LINES)
) (
  input  logic              clk,
  // write port: stream scheduler
  input  logic              wr_en,
  input  logic [SW-1:0]     wr_slot,
  input  logic [LW-1:0]     wr_line,
  input  logic [LINE_W-1:0] wr_data,
  // read port: L1 caches of the TMs
  input  logic              rd_en,
  input  logic [SW-1:0]     rd_slot,
  input  logic [LW-1:0]     rd_line,
  output logic [LINE_W-1:0] rd_data
);

  logic [LINE_W-1:0] mem [SLOTS*SEG_LINES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_slot, wr_line}] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[{rd_slot, rd_line}];
  end

endmodule
