// rr_arbiter: round-robin arbiter used wherever several requesters share one
// unit (threads sharing a TM's pipelines and ports, TMs sharing global
// ports).
//
// Each cycle in which `en` is high and some req bit is set, exactly one
// requester is selected (gnt one-hot, idx its number), starting the search
// just after the requester served last. The pointer moves past the selected
// requester on the clock edge only when `ack` says the shared resource took
// the request; so a consumer whose ready depends on the request's contents
// can see the selected request first (en = 1) and accept it afterwards
// without a combinational loop. Every requester is served within N accepted
// grants. Tie ack high when en already means "accepted".
// Reset (rst_n) is synchronous and active low.
module rr_arbiter #(
  parameter int N = 4,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          ack,
  input  logic [N-1:0]  req,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] idx,
  output logic          any
);

  logic [IW-1:0] ptr;     // highest priority this cycle

  always_comb begin
    int k;
    gnt = '0;
    idx = '0;
    any = 1'b0;
    k   = 0;
    for (int i = 0; i < N; i++) begin
      k = int'(ptr) + i;
      if (k >= N) k = k - N;
      if (!any && en && req[k]) begin
        any    = 1'b1;
        idx    = IW'(k);
        gnt[k] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)   ptr <= '0;
    else if (any && ack) ptr <= (int'(idx) == N - 1) ? '0 : IW'(int'(idx) + 1);
  end

endmodule
