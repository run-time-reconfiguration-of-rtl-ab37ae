// tb_reconfig_interconnect: drives decoded instructions (tagged by their
// pc), random done signals and reconfiguration commits, and checks against
// a reference model: asynchronous processors advance on their own done and
// execute their own instructions; lock-step groups advance only when every
// member is done; SIMD slaves receive the master's instruction from the very
// cycle the reconfiguration commits, do not consume their own decode stage,
// and get their own stream back when the group returns to asynchronous mode.
`timescale 1ns/1ps
module tb_reconfig_interconnect;
  import qc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  dec_t [N-1:0] dec, ex_in;
  logic [N-1:0] done, rcfg_we, adv, id_take, slave;
  mode_e [N-1:0] rcfg_mode, mode;
  logic [N-1:0][3:0] rcfg_mask, group;
  mode_e m_mode [N];
  logic [3:0] m_mask [N];
  int checks = 0, failures = 0;
  int n_simd = 0, n_sync = 0;
  reconfig_interconnect dut (.*);
  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int master_of(logic [3:0] m);
    for (int i = 0; i < N; i++) if (m[i]) return i;
    return 0;
  endfunction

  // check outputs for the current inputs against the model
  task automatic check_now();
    for (int p = 0; p < N; p++) begin
      logic e_adv, e_slave_n;
      mode_e mn; logic [3:0] kn;
      int src;
      if (m_mode[p] == MODE_ASYNC) e_adv = done[p];
      else e_adv = ((done | ~(m_mask[p] | 4'(1 << p))) == 4'hF);
      mn = rcfg_we[p] ? rcfg_mode[p] : m_mode[p];
      kn = rcfg_we[p] ? rcfg_mask[p] : m_mask[p];
      e_slave_n = (mn == MODE_SIMD) && master_of(kn) != p;
      src = e_slave_n ? master_of(kn) : p;
      checks += 4;
      if (adv[p] !== e_adv) begin failures++; $display("FAIL adv[%0d]", p); end
      if (ex_in[p] !== dec[src]) begin failures++; $display("FAIL ex_in[%0d] from %0d", p, src); end
      if (id_take[p] !== (e_adv && !e_slave_n)) begin failures++; $display("FAIL id_take[%0d]", p); end
      if (mode[p] !== m_mode[p]) begin failures++; $display("FAIL mode[%0d]", p); end
    end
  endtask

  // one cycle; optionally a group reconfigures (all members commit together)
  task automatic step(logic [3:0] grp, mode_e md);
    @(negedge clk);
    for (int p = 0; p < N; p++) begin
      dec[p] = '0; dec[p].valid = 1; dec[p].pc = 14'($urandom); dec[p].rd = 4'(p);
    end
    done = 4'($urandom);
    rcfg_we = '0;
    if (grp != 0) begin
      done = done | grp;
      for (int p = 0; p < N; p++) if (grp[p]) begin rcfg_mode[p] = md; rcfg_mask[p] = grp; end
      // commit only when the group advances (all members done)
      for (int p = 0; p < N; p++) if (grp[p]) rcfg_we[p] = 1'b1;
    end
    #1;
    check_now();
    @(posedge clk); #1;
    for (int p = 0; p < N; p++) if (rcfg_we[p]) begin m_mode[p] = rcfg_mode[p]; m_mask[p] = rcfg_mask[p]; end
    for (int p = 0; p < N; p++) begin
      if (m_mode[p] == MODE_SIMD) n_simd++;
      if (m_mode[p] == MODE_SYNC) n_sync++;
    end
  endtask

  initial begin
    for (int p = 0; p < N; p++) begin m_mode[p] = MODE_ASYNC; m_mask[p] = 4'(1 << p); end
    dec = '0; done = 0; rcfg_we = 0; rcfg_mode = '0; rcfg_mask = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (20) step(0, MODE_ASYNC);
    step(4'b0111, MODE_SYNC);   repeat (30) step(0, MODE_ASYNC);
    step(4'b0111, MODE_ASYNC);  repeat (10) step(0, MODE_ASYNC);
    step(4'b1111, MODE_SIMD);   repeat (30) step(0, MODE_ASYNC);
    step(4'b1111, MODE_ASYNC);  repeat (10) step(0, MODE_ASYNC);
    step(4'b0011, MODE_SIMD);   step(4'b1100, MODE_SIMD); repeat (30) step(0, MODE_ASYNC);
    step(4'b1100, MODE_SYNC);   repeat (20) step(0, MODE_ASYNC);
    step(4'b0011, MODE_ASYNC);  step(4'b1100, MODE_ASYNC); repeat (10) step(0, MODE_ASYNC);
    checks++; if (n_simd == 0 || n_sync == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
