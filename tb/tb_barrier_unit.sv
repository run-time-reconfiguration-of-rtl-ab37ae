// tb_barrier_unit: processors arriving together are released in the same
// cycle; a processor that arrives early waits until the last of its mask
// arrives; two disjoint barriers run independently; random arrival orders
// are compared with a reference model.
`timescale 1ns/1ps
module tb_barrier_unit;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] arrive = 0, release_o, status_o;
  logic [N-1:0][N-1:0] mask = 0;
  int checks = 0, failures = 0;
  barrier_unit dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string s, logic [N-1:0] g, logic [N-1:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %b vs %b", s, g, e); end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // all four together: immediate release
    @(negedge clk); arrive = 4'hF; mask = {4'hF, 4'hF, 4'hF, 4'hF}; #1;
    chk("simultaneous release", release_o, 4'hF);
    @(negedge clk); arrive = 0; #1; chk("status cleared", status_o, 0);
    // staggered: 0 then 1 then 2 (mask 0x7)
    @(negedge clk); arrive = 4'b0001; mask[0] = 4'h7; #1; chk("0 waits", release_o, 0);
    @(negedge clk); arrive = 4'b0010; mask[1] = 4'h7; #1; chk("1 waits", release_o, 0);
    @(negedge clk); arrive = 0; #1; chk("still waiting", release_o, 0); chk("status", status_o, 4'b0011);
    @(negedge clk); arrive = 4'b0100; mask[2] = 4'h7; #1; chk("2 completes", release_o, 4'b0111);
    @(negedge clk); arrive = 0;
    // disjoint sets {0,1} and {2,3}
    @(negedge clk); arrive = 4'b0101; mask[0] = 4'b0011; mask[2] = 4'b1100; #1; chk("disjoint wait", release_o, 0);
    @(negedge clk); arrive = 4'b1000; mask[3] = 4'b1100; #1; chk("pair 2,3", release_o, 4'b1100);
    @(negedge clk); arrive = 4'b0010; mask[1] = 4'b0011; #1; chk("pair 0,1", release_o, 4'b0011);
    @(negedge clk); arrive = 0;
    // random orders for a full barrier
    for (int r = 0; r < 100; r++) begin
      logic [N-1:0] got, rel_all;
      got = 0; rel_all = 0;
      while (got != 4'hF) begin
        @(negedge clk);
        arrive = 4'($urandom) & ~got;
        for (int p = 0; p < N; p++) mask[p] = 4'hF;
        #1;
        got |= arrive;
        chk("random order", release_o, (got == 4'hF) ? 4'hF : 4'h0);
      end
      @(negedge clk); arrive = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
