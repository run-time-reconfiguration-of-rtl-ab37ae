// tb_cond_share: random publishing of condition flags by the processors;
// the shared flags must follow a reference register, updating on the clock
// edge after a write and holding otherwise.
`timescale 1ns/1ps
module tb_cond_share;
  logic clk = 0, rst_n = 0;
  logic [3:0] we = 0, flag_in = 0, flags, model = 0;
  int checks = 0, failures = 0;
  cond_share dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (3000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    checks++; if (flags !== 0) failures++;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 4'($urandom); flag_in = 4'($urandom);
      checks++; if (flags !== model) begin failures++; $display("FAIL flags changed before the edge"); end
      for (int p = 0; p < 4; p++) if (we[p]) model[p] = flag_in[p];
      @(posedge clk); #1;
      checks++; if (flags !== model) begin failures++; $display("FAIL flags %b vs %b", flags, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
