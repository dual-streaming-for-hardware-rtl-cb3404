// ray_tri_unit: fixed-function ray / triangle intersection pipeline.
//
// Each thread multiprocessor has two of these. The test uses Plucker
// coordinates in the form of scalar triple products, so the only division is
// postponed until the ray is known to pass the edge tests:
//   w_i = v_i - origin
//   s0 = d.(w1 x w2),  s1 = d.(w2 x w0),  s2 = d.(w0 x w1)
//   the ray crosses the triangle's supporting edges when s0, s1, s2 share a
//   sign (and their sum, d.n, is non-zero); the distance is then
//   t = w0.(w1 x w2) / (s0 + s1 + s2).
// A hit is reported when 0 < t < tmax.
//
// Timing: initiation interval II = 18 cycles, latency LATENCY = 31 cycles,
// as in the evaluated design. How these are met is this design's own choice:
// a front end holds the ray for FRONT = LATENCY - II = 13 cycles and
// forms the edge tests, then an iterative divider produces the 32-bit
// Q16.16 distance two quotient bits per cycle (16 steps, one load cycle and
// one result cycle = 18). Front end and divider work on two different rays
// at once. in_ready is high only when the interval since the last accepted
// request has passed. Reset (rst_n) is synchronous and active low.
module ray_tri_unit
  import ds_pkg::*;
#(
  parameter int II      = 18,
  parameter int LATENCY = 31,
  parameter int TAG_W   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  vec3_t            in_org,
  input  vec3_t            in_dir,
  input  vec3_t            in_v0,
  input  vec3_t            in_v1,
  input  vec3_t            in_v2,
  input  dist_t            in_tmax,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic             out_hit,
  output dist_t            out_t,
  output logic [TAG_W-1:0] out_tag
);

  localparam int QSTEPS = DIST_W / 2;              // 16 radix-4 steps
  localparam int FRONT  = LATENCY - QSTEPS - 2;    // 13 cycles in front end
  localparam int W      = 64;                      // front-end arithmetic width

  typedef logic signed [W-1:0] wide_t;
  typedef wide_t [2:0]         wvec_t;

  function automatic wvec_t cross3(wvec_t a, wvec_t b);
    wvec_t c;
    c[0] = a[1]*b[2] - a[2]*b[1];
    c[1] = a[2]*b[0] - a[0]*b[2];
    c[2] = a[0]*b[1] - a[1]*b[0];
    return c;
  endfunction

  function automatic wide_t dot3(wvec_t a, wvec_t b);
    return a[0]*b[0] + a[1]*b[1] + a[2]*b[2];
  endfunction

  // ---- issue interval ------------------------------------------------------
  logic [$clog2(II+1)-1:0] ii_cnt;
  logic                    f_busy;
  logic                    accept;

  assign in_ready = !f_busy && (ii_cnt == '0);
  assign accept   = in_valid && in_ready;

  // ---- front end: edge tests --------------------------------------------------
  vec3_t            f_org, f_dir, f_v0, f_v1, f_v2;
  dist_t            f_tmax;
  logic [TAG_W-1:0] f_tag;
  logic [$clog2(FRONT+1)-1:0] f_cnt;

  // combinational evaluation of the captured ray/triangle
  logic  f_pass;
  wide_t f_num, f_den;
  always_comb begin
    wvec_t w0, w1, w2, d;
    wide_t s0, s1, s2, sum, num;
    for (int a = 0; a < 3; a++) begin
      w0[a] = wide_t'(f_v0[a]) - wide_t'(f_org[a]);
      w1[a] = wide_t'(f_v1[a]) - wide_t'(f_org[a]);
      w2[a] = wide_t'(f_v2[a]) - wide_t'(f_org[a]);
      d[a]  = wide_t'(f_dir[a]);
    end
    s0  = dot3(d, cross3(w1, w2));
    s1  = dot3(d, cross3(w2, w0));
    s2  = dot3(d, cross3(w0, w1));
    num = dot3(w0, cross3(w1, w2));
    sum = s0 + s1 + s2;
    // normalise to a positive denominator
    if (sum < 0) begin
      f_den = -sum;
      f_num = -num;
    end else begin
      f_den = sum;
      f_num = num;
    end
    f_pass = (sum != 0) &&
             (((s0 >= 0) && (s1 >= 0) && (s2 >= 0)) ||
              ((s0 <= 0) && (s1 <= 0) && (s2 <= 0))) &&
             (f_num > 0);
  end

  // ---- divider -----------------------------------------------------------------
  // dividend = num * 2^16 (Q16.16 result). Quotients of 2^31 and more exceed
  // the distance range and count as a miss. Remainder starts at the dividend's
  // part above the 32 quotient bits, which is then below the divisor.
  localparam int DW = W + DIST_FRAC;                 // dividend width
  typedef logic [DW-1:0] dvd_t;

  logic             b_busy;
  logic [$clog2(QSTEPS+1)-1:0] b_cnt;
  logic             b_pass;
  dist_t            b_tmax;
  logic [TAG_W-1:0] b_tag;
  dvd_t             b_rem;           // partial remainder
  logic [DIST_W-1:0] b_q;            // quotient, low dividend bits shifted in
  dvd_t             b_den;

  logic handoff;
  assign handoff = f_busy && (f_cnt == FRONT[$bits(f_cnt)-1:0] - 1'b1);

  // radix-4 step as two restoring steps
  function automatic logic [DW+DIST_W-1:0] div_step(dvd_t rem, logic [DIST_W-1:0] q, dvd_t den);
    dvd_t r; logic [DIST_W-1:0] qq;
    r = rem; qq = q;
    for (int k = 0; k < 2; k++) begin
      r  = {r[DW-2:0], qq[DIST_W-1]};
      qq = {qq[DIST_W-2:0], 1'b0};
      if (r >= den) begin
        r     = r - den;
        qq[0] = 1'b1;
      end
    end
    return {r, qq};
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ii_cnt    <= '0;
      f_busy    <= 1'b0;
      f_cnt     <= '0;
      b_busy    <= 1'b0;
      b_cnt     <= '0;
      out_valid <= 1'b0;
      out_hit   <= 1'b0;
      out_t     <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= 1'b0;
      // issue interval
      if (accept)            ii_cnt <= ($bits(ii_cnt))'(II - 1);
      else if (ii_cnt != '0) ii_cnt <= ii_cnt - 1'b1;
      // front end
      if (accept) begin
        f_busy <= 1'b1;
        f_cnt  <= '0;
        f_org  <= in_org;  f_dir <= in_dir;
        f_v0   <= in_v0;   f_v1  <= in_v1;  f_v2 <= in_v2;
        f_tmax <= in_tmax; f_tag <= in_tag;
      end else if (handoff) begin
        f_busy <= 1'b0;
      end else if (f_busy) begin
        f_cnt <= f_cnt + 1'b1;
      end
      // divider: load, QSTEPS steps, result
      if (handoff) begin
        logic [DW-1:0] dvd;
        dvd    = dvd_t'(f_num) << DIST_FRAC;
        b_busy <= 1'b1;
        b_cnt  <= '0;
        b_tmax <= f_tmax;
        b_tag  <= f_tag;
        b_den  <= dvd_t'(f_den);
        b_rem  <= dvd >> DIST_W;
        b_q    <= dvd[DIST_W-1:0];
        // quotient >= 2^31 does not fit a distance
        b_pass <= f_pass && ((dvd >> (DIST_W - 1)) < dvd_t'(f_den));
      end else if (b_busy) begin
        if (b_cnt < QSTEPS[$bits(b_cnt)-1:0]) begin
          {b_rem, b_q} <= div_step(b_rem, b_q, b_den);
          b_cnt        <= b_cnt + 1'b1;
        end else begin
          b_busy    <= 1'b0;
          out_valid <= 1'b1;
          out_tag   <= b_tag;
          out_t     <= dist_t'(b_q);
          out_hit   <= b_pass && (dist_t'(b_q) > 0) && (dist_t'(b_q) < b_tmax);
        end
      end
    end
  end

  // The divider is always free when the front end hands over, because
  // requests are at least II cycles apart.
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n)
                               handoff |-> !b_busy);

endmodule
