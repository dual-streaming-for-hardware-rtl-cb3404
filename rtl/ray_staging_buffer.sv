// ray_staging_buffer: a thread multiprocessor's input ray buffer.
//
// It holds exactly two ray buckets in two halves. The stream scheduler
// writes a bucket, one ray per cycle, into the fill half while the thread
// processors take rays from the drain half. When the drain half runs out and
// the fill half holds a complete bucket, the halves swap, so the next bucket
// can be fetched from memory while the current one is processed.
//
// Fill side (stream scheduler): fill_ready says the fill half is free; the
// scheduler then sends fill_valid/fill_ray for each ray of one bucket and
// marks the last with fill_last. fill_seg, sampled with the first ray, names
// the working-set slot (scene segment) of the bucket. want_bucket is
// fill_ready: the scheduler polls it to find empty staging buffers;
// last_seg is the slot of the most recently filled bucket, which the
// scheduler uses to prefer another bucket of the same segment.
//
// Drain side (thread processors, after the TM's arbiter): rd_avail says a ray
// can be taken; rd_req takes it and rd_valid/rd_ray/rd_seg follow one cycle
// later. The order of rays within a bucket is kept, though threads take no
// fixed share of them.
//
// Two halves and one-ray-per-cycle transfer follow the design; the one-cycle
// read latency and the handshake are this design's own choice.
// Reset (rst_n) is synchronous and active low.
module ray_staging_buffer
  import ds_pkg::*;
#(
  parameter int RAYS   = BUCKET_RAYS,     // rays per bucket (one half)
  parameter int SLOT_W = 6                // width of a working-set slot id
) (
  input  logic              clk,
  input  logic              rst_n,
  // fill side
  output logic              fill_ready,
  input  logic              fill_valid,
  input  ray_t              fill_ray,
  input  logic              fill_last,
  input  logic [SLOT_W-1:0] fill_seg,
  output logic              want_bucket,
  output logic [SLOT_W-1:0] last_seg,
  // drain side
  output logic              rd_avail,
  input  logic              rd_req,
  output logic              rd_valid,
  output ray_t              rd_ray,
  output logic [SLOT_W-1:0] rd_seg
);

  localparam int PW = $clog2(RAYS + 1);

  ray_t              mem [2][RAYS];
  logic [PW-1:0]     cnt     [2];
  logic [1:0]        full;
  logic [SLOT_W-1:0] seg     [2];
  logic              drain;               // index of the drain half
  logic [PW-1:0]     rd_ptr, wr_ptr;

  logic fill_half;
  assign fill_half   = ~drain;
  assign fill_ready  = ~full[fill_half];
  assign want_bucket = fill_ready;
  assign rd_avail    = full[drain] && (rd_ptr < cnt[drain]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full     <= '0;
      drain    <= 1'b0;
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      rd_valid <= 1'b0;
      last_seg <= '0;
      cnt[0]   <= '0;
      cnt[1]   <= '0;
    end else begin
      rd_valid <= 1'b0;
      // fill
      if (fill_valid && fill_ready) begin
        if (wr_ptr == '0) begin
          seg[fill_half] <= fill_seg;
          last_seg       <= fill_seg;
        end
        if (fill_last) begin
          full[fill_half] <= 1'b1;
          cnt[fill_half]  <= wr_ptr + 1'b1;
          wr_ptr          <= '0;
        end else begin
          wr_ptr <= wr_ptr + 1'b1;
        end
      end
      // drain
      if (rd_req && rd_avail) begin
        rd_valid <= 1'b1;
        rd_seg   <= seg[drain];
        rd_ray   <= mem[drain][rd_ptr];
        if (rd_ptr + 1'b1 == cnt[drain]) begin
          full[drain] <= 1'b0;
          rd_ptr      <= '0;
        end else begin
          rd_ptr <= rd_ptr + 1'b1;
        end
      end else if (!full[drain] && full[fill_half]) begin
        drain <= ~drain;      // swap halves
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid && fill_ready) mem[fill_half][wr_ptr[$clog2(RAYS)-1:0]] <= fill_ray;
  end

  a_no_overfill: assert property (@(posedge clk) disable iff (!rst_n)
                                  fill_valid && fill_ready && !fill_last |-> wr_ptr < PW'(RAYS - 1));

endmodule
