// tb_ncore_regfile: checks the local register file against a reference
// array: reset to zero, random writes, and both read ports on random
// addresses, with a write visible in the cycle after it.
`timescale 1ns/1ps
module tb_ncore_regfile;
  logic clk = 0, rst_n = 0;
  logic [3:0] ra1, ra2, wa; logic [31:0] rd1, rd2, wd; logic we;
  int checks = 0, failures = 0;
  logic [31:0] model [16];
  ncore_regfile dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (2000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra1 = 4'(i); #1; checks++; if (rd1 !== 0) begin failures++; $display("FAIL reset r%0d", i); end
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // check reads of the current state
      ra1 = 4'($urandom); ra2 = 4'($urandom); #1;
      checks += 2;
      if (rd1 !== model[ra1]) begin failures++; $display("FAIL rd1 r%0d %h vs %h", ra1, rd1, model[ra1]); end
      if (rd2 !== model[ra2]) begin failures++; $display("FAIL rd2 r%0d", ra2); end
      we = 1'($urandom); wa = 4'($urandom); wd = $urandom;
      @(posedge clk); #1;
      if (we) model[wa] = wd;
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
