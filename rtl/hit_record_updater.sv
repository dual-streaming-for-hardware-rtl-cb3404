// hit_record_updater: keeps the shared hit records in DRAM up to date.
//
// A ray may have been duplicated into several scene segments, and all copies
// share one hit record (closest distance and primitive) in DRAM. Whenever a
// thread finds an intersection it sends {ray index, distance, primitive}
// here and goes on; it blocks only when the queue is full.
//
// How it works (the behaviour follows the design; sizes and handshakes are
// this design's own):
//  * Request queue ("hit record file"): DEPTH entries kept in arrival order.
//    A new request whose ray index is already queued is merged into that
//    entry, keeping the closer hit, and takes no new entry.
//  * Compare/fetch logic: takes the oldest entry, reads the ray's record from
//    memory, and writes the new hit back only if it is closer. One
//    read-compare-write runs at a time, so updates of one record are atomic
//    with respect to each other.
//
// Interfaces: upd_valid/upd_ready from the thread multiprocessors. Memory
// channel: mem_req_valid/mem_req_ready with a hit_mem_req_t (read or write of
// one record addressed by ray index); read data returns on mem_resp_valid in
// request order. Reset (rst_n) is synchronous and active low.
module hit_record_updater
  import ds_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         upd_valid,
  output logic         upd_ready,
  input  hit_upd_t     upd,
  output logic         mem_req_valid,
  input  logic         mem_req_ready,
  output hit_mem_req_t mem_req,
  input  logic         mem_resp_valid,
  input  hit_rec_t     mem_resp,
  output logic         idle,
  output logic [31:0]  n_merged,
  output logic [31:0]  n_written,
  output logic [31:0]  n_full_stall
);

  localparam int PW = $clog2(DEPTH);

  hit_upd_t         q     [DEPTH];
  logic [DEPTH-1:0] qv;
  logic [PW-1:0]    head, tail;
  logic [PW:0]      count;

  typedef enum logic [1:0] {S_IDLE, S_READ, S_WAIT, S_WRITE} state_t;
  state_t   state;
  hit_upd_t cur;

  // ---- merge search ------------------------------------------------------------
  logic          match;
  logic [PW-1:0] match_idx;
  always_comb begin
    match     = 1'b0;
    match_idx = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (qv[i] && q[i].id == upd.id && !match) begin
        match     = 1'b1;
        match_idx = PW'(i);
      end
    end
  end

  logic pop;
  assign pop = (state == S_IDLE) && (count != '0);

  assign upd_ready = match ? !(pop && match_idx == head)
                           : (count != (PW+1)'(DEPTH));

  assign idle = (state == S_IDLE) && (count == '0);

  // ---- memory requests ----------------------------------------------------------
  assign mem_req_valid = (state == S_READ) || (state == S_WRITE);
  always_comb begin
    mem_req       = '0;
    mem_req.we    = (state == S_WRITE);
    mem_req.addr  = cur.id;
    mem_req.wdata = cur.hit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      qv           <= '0;
      head         <= '0;
      tail         <= '0;
      count        <= '0;
      state        <= S_IDLE;
      n_merged     <= '0;
      n_written    <= '0;
      n_full_stall <= '0;
    end else begin
      logic [PW:0] c;
      c = count;
      // enqueue or merge
      if (upd_valid && upd_ready) begin
        if (match) begin
          if (upd.hit.t < q[match_idx].hit.t) q[match_idx].hit <= upd.hit;
          n_merged <= n_merged + 1;
        end else begin
          q[tail]  <= upd;
          qv[tail] <= 1'b1;
          tail     <= tail + 1'b1;
          c        = c + 1'b1;
        end
      end
      if (upd_valid && !upd_ready) n_full_stall <= n_full_stall + 1;
      // compare / fetch state machine
      case (state)
        S_IDLE: if (pop) begin
          cur      <= q[head];
          qv[head] <= 1'b0;
          head     <= head + 1'b1;
          c        = c - 1'b1;
          state    <= S_READ;
        end
        S_READ:  if (mem_req_ready) state <= S_WAIT;
        S_WAIT:  if (mem_resp_valid) state <= (cur.hit.t < mem_resp.t) ? S_WRITE : S_IDLE;
        S_WRITE: if (mem_req_ready) begin
          state     <= S_IDLE;
          n_written <= n_written + 1;
        end
        default: state <= S_IDLE;
      endcase
      count <= c;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (PW+1)'(DEPTH));

endmodule
