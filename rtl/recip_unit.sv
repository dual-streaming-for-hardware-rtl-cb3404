// recip_unit: the thread multiprocessor's shared division unit, used to
// invert a ray direction once, right after the ray is fetched from the
// staging buffer; the ray-box pipeline then needs only multiplications.
//
// Input: a direction in Q8.8 per axis. Output: 1/d per axis in Q16.16,
// i.e. 2^24 / d_int, truncated toward zero. A zero component gives the
// largest representable magnitude (positive), so the slab test treats the
// ray as parallel to that pair of planes.
//
// The divider is this design's own: a restoring divider producing one
// quotient bit per cycle for the three axes in parallel. It takes one
// request at a time: in_ready is low while busy. A request accepted in
// cycle 0 delivers out_valid for one cycle in cycle QBITS + 2 = 27 (one load cycle, 25 quotient steps, one result cycle). A tag
// returns with the result so the requesting thread can be identified.
// Reset (rst_n) is synchronous and active low.
module recip_unit
  import ds_pkg::*;
#(
  parameter int TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  vec3_t            in_dir,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output dvec3_t           out_inv,
  output logic [TAG_W-1:0] out_tag
);

  localparam int QBITS = 2 * COORD_FRAC + DIST_FRAC - COORD_FRAC + 1;  // 25: quotient of 2^24
  localparam int NUMER = QBITS - 1;                                    // dividend is 2^NUMER

  logic                       busy;
  logic [$clog2(QBITS+1)-1:0] cnt;
  logic [TAG_W-1:0]           tag_q;
  logic [2:0]                 neg, zero;
  logic [COORD_W-1:0]         den [3];
  logic [COORD_W:0]           rem [3];
  logic [QBITS-1:0]           quo [3];

  assign in_ready = !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      cnt       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        busy  <= 1'b1;
        cnt   <= '0;
        tag_q <= in_tag;
        for (int a = 0; a < 3; a++) begin
          neg[a]  <= in_dir[a][COORD_W-1];
          zero[a] <= (in_dir[a] == '0);
          den[a]  <= in_dir[a][COORD_W-1] ? COORD_W'(-in_dir[a]) : COORD_W'(in_dir[a]);
          rem[a]  <= '0;
          quo[a]  <= '0;
        end
      end else if (busy) begin
        if (cnt < QBITS[$bits(cnt)-1:0]) begin
          // dividend bit shifted in this step: only bit NUMER is set
          for (int a = 0; a < 3; a++) begin
            logic [COORD_W+1:0] r;
            r = {rem[a], (cnt == '0)};
            if (r >= (COORD_W+2)'(den[a])) begin
              rem[a] <= (COORD_W+1)'(r - (COORD_W+2)'(den[a]));
              quo[a] <= {quo[a][QBITS-2:0], 1'b1};
            end else begin
              rem[a] <= r[COORD_W:0];
              quo[a] <= {quo[a][QBITS-2:0], 1'b0};
            end
          end
          cnt <= cnt + 1'b1;
        end else begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          out_tag   <= tag_q;
          for (int a = 0; a < 3; a++) begin
            if (zero[a])     out_inv[a] <= DIST_MAX;
            else if (neg[a]) out_inv[a] <= -dist_t'(quo[a]);
            else             out_inv[a] <= dist_t'(quo[a]);
          end
        end
      end
    end
  end

endmodule
