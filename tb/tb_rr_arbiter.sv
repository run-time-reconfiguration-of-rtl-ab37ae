// tb_rr_arbiter: checks the round-robin grant against a reference pointer
// model for random request patterns; the grant is one-hot, only goes to a
// requester, and with all four requesting each is served once in four grants.
`timescale 1ns/1ps
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, advance = 0;
  logic [N-1:0] req = 0, gnt; logic [1:0] gnt_idx;
  int ptr = 0;
  int checks = 0, failures = 0;
  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int served [N];
    foreach (served[i]) served[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      logic [N-1:0] exp;
      int k;
      @(negedge clk);
      req = (n < 40) ? 4'hF : 4'($urandom); advance = 1'($urandom) | (n < 40);
      #1;
      exp = 0; k = -1;
      for (int i = 0; i < N; i++) if (k < 0 && req[(ptr + i) % N]) k = (ptr + i) % N;
      if (k >= 0) exp[k] = 1'b1;
      checks++;
      if (gnt !== exp) begin failures++; $display("FAIL req %b ptr %0d gnt %b exp %b", req, ptr, gnt, exp); end
      if (k >= 0 && n < 40) served[k]++;
      @(posedge clk);
      if (advance && k >= 0) ptr = (k + 1) % N;
    end
    for (int p = 0; p < N; p++) begin checks++; if (served[p] != 10) begin failures++; $display("FAIL unfair: %0d served %0d", p, served[p]); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
