// tb_ncore_mul: checks products of the iterative multiplier and its cycle
// count: with early exit the result is ready max(1, nibbles of b) cycles
// after start, with fixed latency always 8 cycles after start.
`timescale 1ns/1ps
module tb_ncore_mul;
  logic clk = 0, rst_n = 0, start = 0, fixed = 0, done;
  logic [31:0] a = 0, b = 0, p;
  int checks = 0, failures = 0;
  ncore_mul dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic int nibbles(logic [31:0] x);
    int n = 1;
    for (int i = 1; i < 8; i++) if ((x >> (4*i)) != 0) n = i + 1;
    return n;
  endfunction
  initial begin
    int cycles, expc;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      a = $urandom;
      case (n % 4) 0: b = $urandom_range(0, 15); 1: b = $urandom_range(0, 4095); default: b = $urandom; endcase
      fixed = 1'(n % 3 == 0);
      start = 1;
      @(negedge clk); start = 0;
      cycles = 1;
      while (!done && cycles < 20) begin @(negedge clk); cycles++; end
      expc = fixed ? 8 : nibbles(b);
      checks += 2;
      if (p !== a * b) begin failures++; $display("FAIL %h*%h=%h got %h", a, b, a*b, p); end
      if (cycles != expc) begin failures++; $display("FAIL latency %0d expected %0d (b=%h fixed=%0d)", cycles, expc, b, fixed); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
