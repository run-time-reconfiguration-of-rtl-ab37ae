// tb_ext_memory: Wishbone single and four-lane accesses at random (also
// unaligned) addresses against a reference array, through the bus port and
// the host port; ack must come in the third cycle of the strobe, and read
// data is returned per bank (bank b holds word adr + ((b - adr) mod 4)).
`timescale 1ns/1ps
module tb_ext_memory;
  localparam int W = 1024;
  logic clk = 0, rst_n = 0;
  logic wb_cyc = 0, wb_stb = 0, wb_we = 0, wb_ack;
  logic [9:0] wb_adr = 0; logic [3:0] wb_sel = 0;
  logic [3:0][31:0] wb_dat_w = 0, wb_dat_r;
  logic host_we = 0; logic [9:0] host_addr = 0; logic [31:0] host_wdata = 0, host_rdata;
  logic [31:0] model [W];
  int checks = 0, failures = 0;
  ext_memory #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic access(logic we, logic [9:0] adr, logic [3:0] sel, logic [3:0][31:0] d);
    int n;
    @(negedge clk); wb_cyc = 1; wb_stb = 1; wb_we = we; wb_adr = adr; wb_sel = sel; wb_dat_w = d;
    n = 1;
    #1; while (!wb_ack && n < 10) begin @(negedge clk); #1; n++; end
    checks++; if (n != 3) begin failures++; $display("FAIL ack after %0d cycles", n); end
    if (!we) begin
      for (int j = 0; j < 4; j++) if (sel[j]) begin
        logic [9:0] w; w = adr + 10'(j);
        checks++;
        if (wb_dat_r[w[1:0]] !== model[w]) begin failures++; $display("FAIL read lane %0d word %0d: %h vs %h", j, w, wb_dat_r[w[1:0]], model[w]); end
      end
    end else begin
      for (int j = 0; j < 4; j++) if (sel[j]) model[10'(adr + 10'(j))] = d[j];
    end
    @(negedge clk); wb_cyc = 0; wb_stb = 0;
  endtask

  initial begin
    logic [3:0][31:0] d;
    repeat (2) @(negedge clk); rst_n = 1;
    // fill through the host port
    for (int i = 0; i < W; i++) begin
      @(negedge clk); host_we = 1; host_addr = 10'(i); host_wdata = $urandom; model[i] = host_wdata;
    end
    @(negedge clk) host_we = 0;
    for (int n = 0; n < 300; n++) begin
      for (int j = 0; j < 4; j++) d[j] = $urandom;
      access(1'($urandom), 10'($urandom_range(0, W - 5)), (n % 2) ? 4'hF : 4'b0001, d);
    end
    // host read back
    for (int i = 0; i < 64; i++) begin
      @(negedge clk) host_addr = 10'(i * 13);
      @(negedge clk);
      checks++; if (host_rdata !== model[i * 13]) begin failures++; $display("FAIL host read %0d", i * 13); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
