// tb_local_imem: loads random words through the write port and reads them
// back one cycle after the address; with en low the output must hold.
`timescale 1ns/1ps
module tb_local_imem;
  localparam int W = 16384;
  logic clk = 0, en = 0, we = 0;
  logic [13:0] addr = 0, waddr = 0; logic [15:0] wdata = 0, rdata;
  logic [15:0] model [int];
  int checks = 0, failures = 0;
  local_imem #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [15:0] held;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk); we = 1; waddr = 14'($urandom); wdata = 16'($urandom); model[waddr] = wdata;
    end
    @(negedge clk) we = 0;
    // boundary addresses
    @(negedge clk) we = 1; waddr = 0; wdata = 16'hA5A5; model[0] = 16'hA5A5;
    @(negedge clk) waddr = 14'(W-1); wdata = 16'h5A5A; model[W-1] = 16'h5A5A;
    @(negedge clk) we = 0;
    foreach (model[k]) begin
      @(negedge clk) en = 1; addr = 14'(k);
      @(negedge clk) en = 0;
      checks++; if (rdata !== model[k]) begin failures++; $display("FAIL [%0d] %h vs %h", k, rdata, model[k]); end
      held = rdata; addr = addr + 1;
      @(negedge clk);
      checks++; if (rdata !== held) begin failures++; $display("FAIL output changed with en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
