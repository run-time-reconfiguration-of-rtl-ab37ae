// tb_local_dmem: random writes and reads against a reference array; every
// access must answer with rvalid exactly two cycles after its request, so an
// instruction that issues in cycle 0 completes in its third cycle.
`timescale 1ns/1ps
module tb_local_dmem;
  logic clk = 0, rst_n = 0, req = 0, we = 0, rvalid;
  logic [12:0] addr = 0; logic [31:0] wdata = 0, rdata;
  logic [31:0] model [int];
  int checks = 0, failures = 0;
  local_dmem dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int lat;
      logic [12:0] a;
      @(negedge clk);
      a = (model.size() > 0 && n % 2 == 1) ? 13'($urandom_range(0, 31)) : 13'($urandom_range(0, 31));
      req = 1; we = (n < 40) ? 1'b1 : 1'($urandom); addr = a; wdata = $urandom;
      if (we) model[a] = wdata;
      @(negedge clk); req = 0;
      lat = 1;
      while (!rvalid && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL rvalid after %0d cycles", lat); end
      if (!we && model.exists(a)) begin
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL [%0d] %h vs %h", a, rdata, model[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
