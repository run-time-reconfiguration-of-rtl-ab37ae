// tb_ncore: one processor on its own, in asynchronous mode, with simple
// models of its surroundings (its execute stage fed by its own decode stage,
// immediate barrier release, a shared register file answering after one
// cycle, an external memory answering five cycles after the request). A program exercises
// arithmetic, constants, shifts, multiply, local/shared/external loads and
// stores, compare, flag publishing, taken and not-taken branches, a loop,
// a shared-flag branch, barrier, reconfiguration and halt. Register results
// are compared with values computed by hand, and cycle counts are checked:
// one cycle per ALU instruction, two bubbles after a taken branch, 3 cycles
// for local memory, 2 for shared registers, 6 for an external access.
`timescale 1ns/1ps
module tb_ncore;
  import qc_pkg::*;
  `include "qc_asm.svh"
  logic clk = 0, rst_n = 0, start = 0;
  logic prog_we = 0; logic [13:0] prog_addr = 0; logic [15:0] prog_data = 0;
  dec_t dec_o;
  logic done_o, rcfg_we_o, bar_arrive_o, srf_req_o, srf_we_o, flag_we_o, flag_o, halted_o;
  mode_e rcfg_mode_o; logic [3:0] rcfg_mask_o, bar_mask_o;
  logic [4:0] srf_idx_o; logic [31:0] srf_wdata_o, xwdata_o;
  logic srf_rvalid_i = 0; logic [31:0] srf_rdata_i = 0;
  logic [3:0] flags_i = 4'b0010;
  xreq_t xreq_o;
  logic xrsp_valid_i = 0; logic [31:0] xrsp_data_i = 0;
  logic bar_release_i;
  longint cyc = 0;
  longint commit_at [64];
  int flag_pub = 0, rcfg_seen = 0;
  int checks = 0, failures = 0;
  logic [31:0] srf_model [32];
  logic [31:0] ext_model [int];

  ncore #(.CPU_ID(0)) dut (
    .clk, .rst_n, .start, .prog_we, .prog_addr, .prog_data,
    .dec_o, .ex_i(dec_o), .adv_i(done_o), .id_take_i(done_o), .done_o,
    .mode_i(MODE_ASYNC), .slave_i(1'b0), .group_i(4'b0001),
    .rcfg_we_o, .rcfg_mode_o, .rcfg_mask_o,
    .bar_arrive_o, .bar_mask_o, .bar_release_i,
    .srf_req_o, .srf_we_o, .srf_idx_o, .srf_wdata_o, .srf_rvalid_i, .srf_rdata_i,
    .flag_we_o, .flag_o, .flags_i,
    .xreq_o, .xwdata_o, .xrsp_valid_i, .xrsp_data_i, .halted_o
  );
  assign bar_release_i = bar_arrive_o;

  always #5 clk = ~clk;
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // environment models
  logic [4:0] s_idx; logic s_pend = 0;
  int x_cnt = 0; xreq_t x_q; logic [31:0] x_wd;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    srf_rvalid_i <= 1'b0;
    if (srf_req_o) begin
      srf_rvalid_i <= 1'b1;
      srf_rdata_i  <= srf_model[srf_idx_o];
      if (srf_we_o) srf_model[srf_idx_o] <= srf_wdata_o;
    end
    xrsp_valid_i <= 1'b0;
    if (xreq_o.valid) begin x_cnt <= 4; x_q <= xreq_o; x_wd <= xwdata_o; end
    else if (x_cnt > 0) begin
      x_cnt <= x_cnt - 1;
      if (x_cnt == 1) begin
        xrsp_valid_i <= 1'b1;
        if (x_q.we) ext_model[int'(x_q.addr)] = x_wd;
        else xrsp_data_i <= ext_model.exists(int'(x_q.addr)) ? ext_model[int'(x_q.addr)] : 32'h0;
      end
    end
    if (dut.commit) commit_at[dut.ex_q.pc] <= cyc;
    if (flag_we_o) begin flag_pub++; checks++; if (flag_o !== 1'b1) begin failures++; $display("FAIL published flag"); end end
    if (rcfg_we_o) rcfg_seen++;
  end

  task automatic chk(string s, longint g, longint e);
    checks++; if (g != e) begin failures++; $display("FAIL %s: %0d vs %0d", s, g, e); end
  endtask

  logic [15:0] p [$];
  initial begin
    foreach (srf_model[i]) srf_model[i] = 0;
    foreach (commit_at[i]) commit_at[i] = 0;
    p = {a_li(1, 7), a_li(2, -3), a_add(3, 1, 2), a_sub(4, 1, 2), a_xor(5, 1, 2),
         a_li(6, 8'h12), a_lsh(6, 8'h34), a_shift(6, 0, 4), a_mul(7, 1, 4),
         a_li(8, 9), a_stl(7, 8), a_ldl(9, 8), a_sts(9, 5), a_lds(10, 5),
         a_li(11, 50), a_stx(11, 8), a_ldx(12, 8), a_cmp(2, 2, 1), a_sflg(),
         a_br(1, 3), a_li(13, 1), a_li(13, 2), a_addi(13, 5),
         a_li(14, 3), a_addi(14, -1), a_cmp(1, 14, 0), a_br(1, -2),
         a_sbr(0, 4'b0001, 2), a_li(15, 1), a_bar(1), a_rcfg(MODE_ASYNC, 1), a_halt()};
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (p[i]) begin @(negedge clk); prog_we = 1; prog_addr = 14'(i); prog_data = p[i]; end
    @(negedge clk) prog_we = 0; start = 1;
    @(negedge clk) start = 0;
    wait (halted_o);
    @(negedge clk);
    chk("r3", dut.u_rf.regs[3], 4);
    chk("r4", dut.u_rf.regs[4], 10);
    chk("r5", dut.u_rf.regs[5], 7 ^ 32'hFFFF_FFFD);
    chk("r6", dut.u_rf.regs[6], 32'h12340);
    chk("r7", dut.u_rf.regs[7], 70);
    chk("r9", dut.u_rf.regs[9], 70);
    chk("r10", dut.u_rf.regs[10], 70);
    chk("r12", dut.u_rf.regs[12], 50);
    chk("r13", dut.u_rf.regs[13], 5);
    chk("r14", dut.u_rf.regs[14], 0);
    chk("r15", dut.u_rf.regs[15], 0);
    chk("shared register 5", srf_model[5], 70);
    chk("flag published", flag_pub, 1);
    chk("reconfiguration committed", rcfg_seen, 1);
    chk("ALU back to back", commit_at[4] - commit_at[2], 2);
    chk("local load 3 cycles", commit_at[11] - commit_at[10], 3);
    chk("shared load 2 cycles", commit_at[13] - commit_at[12], 2);
    chk("external load 6 cycles", commit_at[16] - commit_at[15], 6);
    chk("taken branch penalty", commit_at[22] - commit_at[19], 3);
    chk("not-taken branch", commit_at[23] - commit_at[22], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
