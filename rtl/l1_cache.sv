// l1_cache: a thread multiprocessor's read-only L1 cache for scene data.
//
// Threads load tree nodes and triangles by their address in the scene
// buffer ({working-set slot, line, byte}); recently used lines stay here so
// that the threads of a TM do not all go to the global scene buffer. Scene
// data is never written by the threads, so the cache has no write path.
//
// Organisation: SIZE_BYTES (16 KB) of 64-byte lines, direct-mapped, lines
// interleaved over BANKS (8) banks by the low bits of the line index. Size and
// bank count follow the evaluated design; direct mapping, one request per
// cycle and a blocking miss are this design's own simplifications.
//
// Timing: a hit answers one cycle after the request. A miss holds req_ready
// low, asks the scene buffer (sb_req until sb_gnt), fills the line with the
// data that arrives the cycle after the grant and answers in the cycle after
// that. flush clears every line; the stream scheduler raises it when a
// working-set slot is given a new segment, so stale lines of the old one are
// never returned. Reset (rst_n) is synchronous and active low.
module l1_cache
  import ds_pkg::*;
#(
  parameter int SIZE_BYTES = 16384,
  parameter int BANKS      = 8,
  parameter int AW         = 22,          // scene-buffer byte address width
  parameter int TAG_W      = 4,
  localparam int LINES = SIZE_BYTES / LINE_BYTES,
  localparam int OFS   = $clog2(LINE_BYTES),
  localparam int IDXW  = $clog2(LINES),
  localparam int BW    = $clog2(BANKS),
  localparam int TW    = AW - OFS - IDXW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,
  // thread side
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [AW-1:0]     req_addr,
  input  logic [TAG_W-1:0]  req_tag,
  output logic              resp_valid,
  output logic [LINE_W-1:0] resp_data,
  output logic [TAG_W-1:0]  resp_tag,
  // scene buffer side
  output logic              sb_req,
  output logic [AW-OFS-1:0] sb_line,       // {slot, line}
  input  logic              sb_gnt,
  input  logic [LINE_W-1:0] sb_data,
  // statistics
  output logic [31:0]       hits,
  output logic [31:0]       misses
);

  logic [LINE_W-1:0] data  [BANKS][LINES/BANKS];
  logic [TW-1:0]     tags  [BANKS][LINES/BANKS];
  logic [LINES-1:0]  valid;

  typedef enum logic [1:0] {IDLE, MISS, FILL} state_t;
  state_t state;

  logic [AW-1:0]    m_addr;
  logic [TAG_W-1:0] m_tag;

  logic [IDXW-1:0] idx;
  logic [BW-1:0]   bank;
  logic [IDXW-BW-1:0] row;
  logic [TW-1:0]   tg;
  assign idx  = req_addr[OFS +: IDXW];
  assign bank = idx[BW-1:0];
  assign row  = idx[IDXW-1:BW];
  assign tg   = req_addr[AW-1 -: TW];

  logic hit;
  assign hit       = valid[idx] && (tags[bank][row] == tg);
  assign req_ready = (state == IDLE) && !flush;
  assign sb_req    = (state == MISS);
  assign sb_line   = m_addr[AW-1:OFS];

  logic [IDXW-1:0] m_idx;
  assign m_idx = m_addr[OFS +: IDXW];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= IDLE;
      valid      <= '0;
      resp_valid <= 1'b0;
      hits       <= '0;
      misses     <= '0;
    end else begin
      resp_valid <= 1'b0;
      case (state)
        IDLE: begin
          if (flush) begin
            valid <= '0;
          end else if (req_valid) begin
            if (hit) begin
              resp_valid <= 1'b1;
              resp_data  <= data[bank][row];
              resp_tag   <= req_tag;
              hits       <= hits + 1;
            end else begin
              m_addr <= req_addr;
              m_tag  <= req_tag;
              state  <= MISS;
              misses <= misses + 1;
            end
          end
        end
        MISS: if (sb_gnt) state <= FILL;
        FILL: begin
          data[m_idx[BW-1:0]][m_idx[IDXW-1:BW]] <= sb_data;
          tags[m_idx[BW-1:0]][m_idx[IDXW-1:BW]] <= m_addr[AW-1 -: TW];
          valid[m_idx]                          <= 1'b1;
          resp_valid <= 1'b1;
          resp_data  <= sb_data;
          resp_tag   <= m_tag;
          state      <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
