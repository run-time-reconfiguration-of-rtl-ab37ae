// tb_shared_regfile: every processor writes a different shared register,
// then every processor reads every register; checks the data, that rvalid
// comes one cycle after the request (two-cycle access), that reset clears the
// registers, and the four-cycle write-then-read round trip between two
// processors.
`timescale 1ns/1ps
module tb_shared_regfile;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = 0, we = 0, rvalid;
  logic [N-1:0][4:0] idx = 0; logic [N-1:0][31:0] wdata = 0, rdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  shared_regfile dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string s, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s: %h vs %h", s, g, e); end
  endtask
  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 40; round++) begin
      // writes: four processors, distinct registers
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        req[p] = 1; we[p] = 1; idx[p] = 5'((round * 4 + p * 7) % 32); wdata[p] = $urandom;
        model[idx[p]] = wdata[p];
      end
      @(negedge clk); req = 0; we = 0;
      chk("write rvalid", 32'(rvalid), 32'hF);
      // reads: random registers
      for (int p = 0; p < N; p++) begin req[p] = 1; we[p] = 0; idx[p] = 5'($urandom); end
      @(negedge clk); req = 0;
      chk("read rvalid", 32'(rvalid), 32'hF);
      for (int p = 0; p < N; p++) chk($sformatf("read p%0d s%0d", p, idx[p]), rdata[p], model[idx[p]]);
    end
    // round trip: processor 2 writes in cycle 0-1, processor 1 reads in cycle 2-3
    @(negedge clk); req = 4'b0100; we = 4'b0100; idx[2] = 9; wdata[2] = 32'hCAFE_F00D;
    @(negedge clk); req = 0; we = 0;
    @(negedge clk); req = 4'b0010; idx[1] = 9;
    @(negedge clk); req = 0;
    chk("round trip", rdata[1], 32'hCAFE_F00D);
    // reset clears
    rst_n = 0; @(negedge clk); rst_n = 1;
    @(negedge clk); req = 4'b0001; idx[0] = 9;
    @(negedge clk); req = 0;
    chk("after reset", rdata[0], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
