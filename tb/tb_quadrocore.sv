// tb_quadrocore: end-to-end test of the QuadroCore cluster at its default
// sizes.
//
// It loads one program per processor, starts the cluster and, after every
// processor has halted, reads the results back from external memory through
// the host port and compares them with values computed here. The programs
// walk through the cluster's mechanisms in order:
//  1. asynchronous MIMD: four simultaneous external stores (round-robin
//     contention: latencies 6, 9, 12 and 15 cycles are checked), local
//     memory store/load (3 cycles), early-exit multiply, a shared-register
//     write by processor 0 read by all after a barrier that processor 3
//     reaches late, condition-flag sharing and collective branches;
//  2. processors 0-2 reconfigure to synchronous MIMD (lock-step is checked
//     every cycle, multiplies take the fixed 9 cycles, one member's external
//     load stalls the others) while processor 3 runs a loop asynchronously;
//  3. all four reconfigure to SIMD with processor 0 as master: forwarded
//     instructions, per-processor address offsets on single external
//     accesses, a fast adjacent load and store (7 cycles each), a master
//     branch the slaves follow, then back to asynchronous MIMD, after which
//     the slaves resume their own instruction streams.
// Every mechanism is counted and a mechanism that never happened is a
// failure. A watchdog ends the run after 20000 cycles.
`timescale 1ns/1ps
module tb_quadrocore;
  import qc_pkg::*;
  `include "qc_asm.svh"

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic prog_we = 1'b0; logic [1:0] prog_cpu = '0; logic [13:0] prog_addr = '0; logic [15:0] prog_data = '0;
  logic host_we = 1'b0; logic [EXT_AW-1:0] host_addr = '0; logic [31:0] host_wdata = '0, host_rdata;
  logic [NCPU-1:0] halted;
  mode_e [NCPU-1:0] mode;

  int checks = 0, failures = 0;
  longint cyc = 0;

  quadrocore dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- programs ----------------
  logic [15:0] prog [NCPU][$];

  function automatic void build(int c);
    logic [15:0] q[$];
    q.push_back(a_li(1, 10*(c+1)));          // r1 = 10(c+1)
    q.push_back(a_li(2, 100 + c));           // r2 = 100+c
    q.push_back(a_stx(1, 2));                // ext[100+c] = r1 (contention)
    q.push_back(a_li(3, 5));
    q.push_back(a_stl(1, 3));                // local[5] = r1
    q.push_back(a_ldl(4, 3));                // r4 = local[5]
    q.push_back(a_mul(5, 1, 1));             // r5 = r1*r1 (early exit)
    q.push_back(a_li(7, 25));
    q.push_back(a_cmp(2, 1, 7));             // F = r1 < 25
    q.push_back(a_sflg());
    if (c == 0) q.push_back(a_sts(1, 3));    // S[3] = r1 of processor 0
    else if (c == 3) q.push_back(a_ldx(15, 2)); // processor 3 arrives late
    else q.push_back(a_nop());
    q.push_back(a_bar(4'hF));
    q.push_back(a_lds(6, 3));                // r6 = S[3]
    q.push_back(a_li(9, 0));
    q.push_back(a_sbr(3, 4'hF, 2));          // any flag set: taken
    q.push_back(a_addi(9, 16));
    q.push_back(a_addi(9, 1));
    q.push_back(a_sbr(2, 4'hF, 2));          // all flags set: not taken
    q.push_back(a_addi(9, 2));
    q.push_back(a_sbr(1, 4'h2, 2));          // flag of processor 2 clear: taken
    q.push_back(a_addi(9, 32));
    q.push_back(a_addi(9, 4));               // r9 = 7
    if (c < 3) begin
      q.push_back(a_rcfg(MODE_SYNC, 4'h7));
      q.push_back(a_mul(11, 1, 7));          // fixed-latency multiply
      if (c == 1) q.push_back(a_ldx(12, 2)); // stalls the whole group
      else        q.push_back(a_add(12, 1, 1));
      q.push_back(a_rcfg(MODE_ASYNC, 4'h7));
    end else begin
      q.push_back(a_li(10, 5));
      q.push_back(a_addi(10, -1));
      q.push_back(a_cmp(1, 10, 0));
      q.push_back(a_br(1, -2));
    end
    q.push_back(a_rcfg(MODE_SIMD, 4'hF));
    if (c == 0) begin                         // SIMD body, fetched by processor 0 only
      q.push_back(a_li(8, 0));
      q.push_back(a_lsh(8, 200));            // r8 = 200
      q.push_back(a_add(13, 1, 1));          // r13 = 2*r1
      q.push_back(a_stx(13, 8));             // ext[200+c] = r13
      q.push_back(a_li(10, 100));
      q.push_back(a_ldv(14, 10));            // r14 = ext[100+c], fast access
      q.push_back(a_addi(14, 1));
      q.push_back(a_li(15, 1));
      q.push_back(a_lsh(15, 8'h2C));         // r15 = 300
      q.push_back(a_stv(14, 15));            // ext[300+c] = r14, fast access
      q.push_back(a_br(0, 2));
      q.push_back(a_li(13, 99));             // skipped by every processor
      q.push_back(a_mul(3, 14, 14));         // r3 = r14^2
      q.push_back(a_rcfg(MODE_ASYNC, 4'hF));
    end
    // own stream again: dump results to ext[0x400 + 16c ...]
    q.push_back(a_li(15, 4));
    q.push_back(a_lsh(15, 16*c));
    foreach (dump_regs[i]) begin
      q.push_back(a_stx(dump_regs[i], 15));
      q.push_back(a_addi(15, 1));
    end
    q.push_back(a_halt());
    prog[c] = q;
  endfunction

  int dump_regs[9] = '{4, 5, 6, 9, 11, 12, 13, 3, 14};

  function automatic longint expect_reg(int c, int r);
    longint r1 = 10*(c+1);
    case (r)
      4:  return r1;
      5:  return r1*r1;
      6:  return 10;
      9:  return 7;
      11: return (c < 3) ? r1*25 : 0;
      12: return (c == 1) ? 20 : (c < 3 ? 2*r1 : 0);
      13: return 2*r1;
      3:  return (r1+1)*(r1+1);
      14: return r1 + 1;
      default: return -1;
    endcase
  endfunction

  // ---------------- mechanism monitors ----------------
  int n_single = 0, n_contended = 0, n_block = 0, n_bar_wait = 0;
  int n_to_sync = 0, n_to_simd = 0, n_to_async = 0, n_forward = 0, n_lockstep = 0;
  int n_mul_early = 0, n_mul_fixed = 0, n_srf = 0, n_sbr_taken = 0, n_slave_idle = 0;
  int n_local = 0;
  int first_lat[$];
  int max_lat = 0;
  mode_e [NCPU-1:0] mode_prev;

  for (genvar p = 0; p < NCPU; p++) begin : g_mon
    longint t_x = 0, t_m = 0, t_l = 0, t_b = 0;
    logic   x_block = 1'b0;
    always @(posedge clk) if (rst_n) begin
      if (dut.xreq[p].valid) begin t_x = cyc; x_block = dut.xreq[p].block; end
      if (dut.xrsp_valid[p] && t_x != 0) begin
        int lat;
        lat = int'(cyc - t_x + 1);
        if (x_block) begin
          n_block++;
          check($sformatf("block access latency cpu%0d", p), lat, 7);
        end else begin
          n_single++;
          if (lat > 6) n_contended++;
          if (lat > max_lat) max_lat = lat;
          if (first_lat.size() < 4) first_lat.push_back(lat);
          checks++;
          if (lat < 6 || lat > 15) begin failures++; $display("FAIL single latency %0d", lat); end
        end
        t_x = 0;
      end
      // multiplies: latency from entering execute to commit
      if (dut.g_cpu[p].u_cpu.issue && dut.g_cpu[p].u_cpu.ex_q.kind == EX_MUL) t_m = cyc;
      if (dut.g_cpu[p].u_cpu.commit && dut.g_cpu[p].u_cpu.ex_q.kind == EX_MUL) begin
        int lat;
        lat = int'(cyc - t_m + 1);
        if (mode[p] == MODE_ASYNC) begin
          n_mul_early++;
          checks++; if (lat >= 9) begin failures++; $display("FAIL async mul took %0d", lat); end
        end else begin
          n_mul_fixed++;
          check("fixed multiply latency", lat, 9);
        end
      end
      // local memory: three cycles
      if (dut.g_cpu[p].u_cpu.issue && dut.g_cpu[p].u_cpu.ex_q.kind inside {EX_LDL, EX_STL}) t_l = cyc;
      if (dut.g_cpu[p].u_cpu.commit && dut.g_cpu[p].u_cpu.ex_q.kind inside {EX_LDL, EX_STL}) begin
        n_local++;
        check("local memory latency", cyc - t_l + 1, 3);
      end
      if (dut.srf_req[p]) n_srf++;
      if (dut.bar_arrive[p]) t_b = cyc;
      if (dut.bar_release[p] && cyc > t_b) n_bar_wait++;
      if (dut.g_cpu[p].u_cpu.commit && dut.g_cpu[p].u_cpu.ex_q.kind == EX_SBR &&
          dut.g_cpu[p].u_cpu.taken) n_sbr_taken++;
      if (dut.slave[p]) begin
        if (dut.adv[p] && dut.ex_in[p].valid) n_forward++;
        n_slave_idle++;
        checks++;
        if (dut.g_cpu[p].u_cpu.fetch_en) begin failures++; $display("FAIL slave %0d fetches", p); end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NCPU; p++) begin
      if (mode[p] != mode_prev[p]) begin
        if (mode[p] == MODE_SYNC) n_to_sync++;
        if (mode[p] == MODE_SIMD) n_to_simd++;
        if (mode[p] == MODE_ASYNC) n_to_async++;
      end
    end
    mode_prev <= mode;
    if (mode[0] == MODE_SYNC && mode[1] == MODE_SYNC && mode[2] == MODE_SYNC) begin
      n_lockstep++;
      checks++;
      if (!(dut.adv[0] == dut.adv[1] && dut.adv[1] == dut.adv[2])) begin
        failures++; $display("FAIL lock-step broken at cycle %0d", cyc);
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic mechanism(string name, int n);
    checks++;
    $display("  %-28s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", name); end
  endtask

  initial begin
    mode_prev = '0;
    for (int c = 0; c < NCPU; c++) build(c);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int c = 0; c < NCPU; c++)
      foreach (prog[c][i]) begin
        @(negedge clk);
        prog_we = 1'b1; prog_cpu = 2'(c); prog_addr = 14'(i); prog_data = prog[c][i];
      end
    @(negedge clk) prog_we = 1'b0;
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (halted == '1);
    $display("all processors halted after %0d cycles", cyc);
    repeat (2) @(posedge clk);
    // results in external memory
    for (int c = 0; c < NCPU; c++) begin
      longint r1;
      r1 = 10*(c+1);
      host_read(EXT_AW'(100 + c)); check($sformatf("ext[%0d]", 100+c), host_rdata, r1);
      host_read(EXT_AW'(200 + c)); check($sformatf("ext[%0d]", 200+c), host_rdata, 2*r1);
      host_read(EXT_AW'(300 + c)); check($sformatf("ext[%0d]", 300+c), host_rdata, r1+1);
      foreach (dump_regs[i]) begin
        host_read(EXT_AW'(32'h400 + 16*c + i));
        check($sformatf("cpu%0d r%0d", c, dump_regs[i]), host_rdata, expect_reg(c, dump_regs[i]));
      end
    end
    first_lat.sort();
    check("contention latencies", first_lat.size(), 4);
    if (first_lat.size() == 4) begin
      check("first access latency", first_lat[0], 6);
      check("second access latency", first_lat[1], 9);
      check("third access latency", first_lat[2], 12);
      check("fourth access latency", first_lat[3], 15);
    end
    $display("mechanisms:");
    mechanism("single external accesses", n_single);
    mechanism("contended accesses", n_contended);
    mechanism("fast adjacent accesses", n_block);
    mechanism("barrier waits", n_bar_wait);
    mechanism("switches to synchronous", n_to_sync);
    mechanism("switches to SIMD", n_to_simd);
    mechanism("switches to asynchronous", n_to_async);
    mechanism("lock-step cycles", n_lockstep);
    mechanism("forwarded SIMD instructions", n_forward);
    mechanism("idle slave cycles", n_slave_idle);
    mechanism("early-exit multiplies", n_mul_early);
    mechanism("fixed-latency multiplies", n_mul_fixed);
    mechanism("shared register accesses", n_srf);
    mechanism("taken shared-flag branches", n_sbr_taken);
    mechanism("local memory accesses", n_local);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_read(logic [EXT_AW-1:0] a);
    @(negedge clk) host_addr = a;
    @(negedge clk);
  endtask
endmodule
