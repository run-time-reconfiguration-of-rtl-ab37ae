// tb_cluster_bus: the shared bus in front of a real ext_memory. Checks the
// paper's access times: a lone single access 6 cycles from request to
// response, four simultaneous single accesses 6, 9, 12 and 15 cycles in
// round-robin order, a fast adjacent (block) read and write 7 cycles with
// the four words distributed to / collected from the right processors, and
// random traffic against a reference memory.
`timescale 1ns/1ps
module tb_cluster_bus;
  import qc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  xreq_t [N-1:0] req;
  logic [N-1:0][31:0] wdata, rsp_data;
  logic [N-1:0] rsp_valid;
  logic wb_cyc, wb_stb, wb_we, wb_ack; logic [15:0] wb_adr; logic [3:0] wb_sel;
  logic [3:0][31:0] wb_dat_w, wb_dat_r;
  logic host_we = 0; logic [15:0] host_addr = 0; logic [31:0] host_wdata = 0, host_rdata;
  logic [31:0] model [int];
  longint cyc = 0;
  longint t_req [N];
  int lat [N];
  logic [N-1:0] got;
  logic [N-1:0][31:0] data;
  int checks = 0, failures = 0;

  cluster_bus dut (.clk, .rst_n, .req, .wdata, .rsp_valid, .rsp_data,
    .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_sel, .wb_dat_w, .wb_dat_r, .wb_ack);
  ext_memory #(.WORDS(65536)) u_mem (.clk, .rst_n, .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_sel,
    .wb_dat_w, .wb_dat_r, .wb_ack, .host_we, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int p = 0; p < N; p++) if (rsp_valid[p]) begin
      got[p] <= 1'b1; data[p] <= rsp_data[p]; lat[p] <= int'(cyc - t_req[p] + 1);
    end
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string s, longint g, longint e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: %0d vs %0d", s, g, e); end
  endtask

  // issue requests from the processors in mask (same cycle), wait for answers
  task automatic issue(logic [N-1:0] who, logic we, logic block, logic [3:0] lanes, logic [15:0] base [N],
                       logic [N-1:0] expect_rsp);
    @(negedge clk);
    got = 0;
    for (int p = 0; p < N; p++) begin
      req[p] = '0;
      if (who[p]) begin
        req[p].valid = 1; req[p].we = we; req[p].block = block; req[p].lanes = lanes; req[p].addr = base[p];
        t_req[p] = cyc;
      end
      if (block) t_req[p] = cyc;
      wdata[p] = $urandom;
    end
    if (we) begin
      for (int p = 0; p < N; p++)
        if (block ? lanes[p] : who[p]) model[block ? int'(base[0]) + p : int'(base[p])] = wdata[p];
    end
    @(negedge clk);
    for (int p = 0; p < N; p++) req[p] = '0;
    while ((got & expect_rsp) != expect_rsp) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    logic [15:0] base [N];
    int l [$];
    req = '0; wdata = '0; got = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // lone single write and read: 6 cycles
    base[0] = 16'd40;
    issue(4'b0001, 1, 0, 4'b0001, base, 4'b0001); chk("lone write latency", lat[0], 6);
    issue(4'b0001, 0, 0, 4'b0001, base, 4'b0001); chk("lone read latency", lat[0], 6);
    chk("lone read data", data[0], model[40]);
    // four simultaneous single accesses
    for (int p = 0; p < N; p++) base[p] = 16'(100 + p);
    issue(4'hF, 1, 0, 4'b0001, base, 4'hF);
    l = {}; for (int p = 0; p < N; p++) l.push_back(lat[p]); l.sort();
    chk("contention 1", l[0], 6); chk("contention 2", l[1], 9); chk("contention 3", l[2], 12); chk("contention 4", l[3], 15);
    issue(4'hF, 0, 0, 4'b0001, base, 4'hF);
    for (int p = 0; p < N; p++) chk($sformatf("contended read p%0d", p), data[p], model[100 + p]);
    // block read of 100..103 by processor 0 for all four: 7 cycles, distributed
    base[0] = 16'd100;
    issue(4'b0001, 0, 1, 4'hF, base, 4'hF);
    for (int p = 0; p < N; p++) begin
      chk($sformatf("block read latency p%0d", p), lat[p], 7);
      chk($sformatf("block read data p%0d", p), data[p], model[100 + p]);
    end
    // unaligned block write collecting all four lanes, then read back
    base[0] = 16'd203;
    issue(4'b0001, 1, 1, 4'hF, base, 4'hF);
    chk("block write latency", lat[0], 7);
    issue(4'b0001, 0, 1, 4'hF, base, 4'hF);
    for (int p = 0; p < N; p++) chk($sformatf("unaligned block p%0d", p), data[p], model[203 + p]);
    // random traffic
    for (int n = 0; n < 200; n++) begin
      logic [N-1:0] who;
      logic blk, we;
      blk = (n % 5 == 0);
      we = 1'($urandom);
      who = blk ? 4'b0001 : 4'($urandom_range(1, 15));
      for (int p = 0; p < N; p++) base[p] = 16'($urandom_range(0, 63) * 4 + p);
      if (!we && !blk) for (int p = 0; p < N; p++) if (who[p] && !model.exists(int'(base[p]))) model[int'(base[p])] = 0;
      if (!we && !blk) begin
        // make sure the words are defined
        for (int p = 0; p < N; p++) if (who[p]) begin
          logic [15:0] b1 [N];
          b1 = base;
          issue(4'(1 << p), 1, 0, 4'b0001, b1, 4'(1 << p));
        end
      end
      if (blk && !we) begin
        logic [15:0] b1 [N];
        b1 = base;
        issue(4'b0001, 1, 1, 4'hF, b1, 4'hF);
      end
      issue(who, we, blk, 4'hF, base, blk ? 4'hF : who);
      if (!we) for (int p = 0; p < N; p++) if (blk || who[p])
        chk($sformatf("random read p%0d", p), data[p], model[blk ? int'(base[0]) + p : int'(base[p])]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
