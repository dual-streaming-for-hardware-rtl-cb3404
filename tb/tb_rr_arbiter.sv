// tb_rr_arbiter: random request patterns; checks that a grant is one-hot,
// goes to a requester, matches idx, is withheld when en is low, and follows
// round-robin order, moving on only when ack is high (reference pointer
// kept here).
module tb_rr_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 5;
  logic en, ack, any; logic [N-1:0] req, gnt; logic [2:0] idx;
  rr_arbiter #(.N(N)) dut (.*);
  int ptr = 0;
  initial begin
    en = 0; ack = 0; req = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int e;
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0); ack = ($urandom_range(0, 3) != 0); req = N'($urandom);
      #1;
      e = -1;
      if (en) for (int i = 0; i < N; i++) if (e < 0 && req[(ptr + i) % N]) e = (ptr + i) % N;
      checks++;
      if (e < 0) begin
        if (any || gnt != 0) begin failures++; $display("grant without request"); end
      end else begin
        if (!any || gnt != N'(1 << e) || idx != 3'(e)) begin failures++; $display("expected %0d got %b", e, gnt); end
        if (ack) ptr = (e + 1) % N;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
