// tb_wl_poly: the poly workload on the QuadroCore cluster at its default
// sizes.
//
// The workload evaluates a polynomial of degree 16 whose 17 coefficients
// are variables in memory, p(x) = sum a[i]*x^i, at four points x. The
// testbench writes coefficients and points into external memory through the
// host port, runs three configurations and checks the four results after
// each (32-bit arithmetic, wrapping):
//   single  processor 0 runs Horner's rule over all 17 coefficients, the
//           others halt at once;
//   async   asynchronous MIMD: with y = x^4, processor c runs Horner's rule
//           on q_c(y) = sum_j a[4j+c]*y^j, multiplies by x^c and writes the
//           term to shared register c; after a barrier processor 0 adds the
//           four shared registers and stores p(x); a second barrier keeps
//           the next point from overwriting a term still being read;
//   sync    the same split in synchronous MIMD (lock-step) mode, entered and
//           left with RCFG. The four programs have the same number of
//           instructions (a processor pads with multiplies by 1 and NOPs
//           where the others do real work), so the group stays in step and
//           needs no barrier between writing and reading the shared
//           registers.
// Coefficients a[17..19] are zero so that every processor has five. The
// cycle count of each run is printed; the async run must beat the single
// one. Data values come from a fixed-seed generator. A watchdog ends the
// run after 200000 cycles.
`timescale 1ns/1ps
module tb_wl_poly;
  import qc_pkg::*;
  `include "qc_asm.svh"

  localparam int NA = 17, NV = 4;
  localparam int AB = 'h2000, XV = 'h2100, PR = 'h2200;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic prog_we = 1'b0; logic [1:0] prog_cpu = '0; logic [13:0] prog_addr = '0; logic [15:0] prog_data = '0;
  logic host_we = 1'b0; logic [EXT_AW-1:0] host_addr = '0; logic [31:0] host_wdata = '0, host_rdata;
  logic [NCPU-1:0] halted;
  mode_e [NCPU-1:0] mode;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int a [NA];
  int xv [NV];

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

  function automatic void emit_const(ref logic [15:0] q[$], input int r, input int v);
    q.push_back(a_li(r, v >> 8));
    q.push_back(a_lsh(r, v & 'hFF));
  endfunction

  // Counted loop over the NV points around body(); r9 = &x, r13 = &p(x)
  function automatic void emit_single(ref logic [15:0] q[$]);
    int l_v, l_h;
    q.push_back(a_li(0, 0));
    emit_const(q, 9, XV);
    emit_const(q, 13, PR);
    q.push_back(a_li(12, NV));
    l_v = q.size();
    q.push_back(a_ldx(1, 9));                // r1 = x
    q.push_back(a_li(3, 0));                 // r3 = acc
    emit_const(q, 4, AB + NA - 1);           // r4 = &a[16]
    q.push_back(a_li(5, NA));
    l_h = q.size();
    q.push_back(a_mul(3, 3, 1));
    q.push_back(a_ldx(6, 4));
    q.push_back(a_add(3, 3, 6));
    q.push_back(a_addi(4, -1));
    q.push_back(a_addi(5, -1));
    q.push_back(a_cmp(1, 5, 0));
    q.push_back(a_br(1, l_h - q.size()));
    q.push_back(a_stx(3, 13));
    q.push_back(a_addi(9, 1));
    q.push_back(a_addi(13, 1));
    q.push_back(a_addi(12, -1));
    q.push_back(a_cmp(1, 12, 0));
    q.push_back(a_br(1, l_v - q.size()));
  endfunction

  function automatic void emit_split(ref logic [15:0] q[$], input int c, input bit use_bar);
    int l_v, l_h;
    q.push_back(a_li(0, 0));
    q.push_back(a_li(10, 1));
    emit_const(q, 9, XV);
    emit_const(q, 13, PR);
    q.push_back(a_li(12, NV));
    l_v = q.size();
    q.push_back(a_ldx(1, 9));                // r1 = x
    q.push_back(a_mul(2, 1, 1));
    q.push_back(a_mul(2, 2, 2));             // r2 = y = x^4
    q.push_back(a_li(3, 0));
    emit_const(q, 4, AB + 16 + c);           // r4 = &a[16+c]
    q.push_back(a_li(5, 5));
    l_h = q.size();
    q.push_back(a_mul(3, 3, 2));
    q.push_back(a_ldx(6, 4));
    q.push_back(a_add(3, 3, 6));
    q.push_back(a_addi(4, -4));
    q.push_back(a_addi(5, -1));
    q.push_back(a_cmp(1, 5, 0));
    q.push_back(a_br(1, l_h - q.size()));
    for (int i = 0; i < NCPU - 1; i++)       // term = x^c * q_c
      q.push_back(a_mul(3, 3, i < c ? 1 : 10));
    q.push_back(a_sts(3, c));
    if (use_bar) q.push_back(a_bar(4'hF));
    if (c == 0) begin
      q.push_back(a_lds(7, 0));
      q.push_back(a_lds(8, 1));
      q.push_back(a_add(7, 7, 8));
      q.push_back(a_lds(8, 2));
      q.push_back(a_add(7, 7, 8));
      q.push_back(a_lds(8, 3));
      q.push_back(a_add(7, 7, 8));
      q.push_back(a_stx(7, 13));
    end else if (!use_bar) begin
      repeat (8) q.push_back(a_nop());
    end
    if (use_bar) q.push_back(a_bar(4'hF));
    q.push_back(a_addi(9, 1));
    q.push_back(a_addi(13, 1));
    q.push_back(a_addi(12, -1));
    q.push_back(a_cmp(1, 12, 0));
    q.push_back(a_br(1, l_v - q.size()));
  endfunction

  // cfg 0 single, 1 asynchronous MIMD, 2 synchronous MIMD
  function automatic void build(int cfg, int c);
    logic [15:0] q[$];
    case (cfg)
      0: if (c == 0) emit_single(q);
      1: emit_split(q, c, 1'b1);
      default: begin
        q.push_back(a_rcfg(MODE_SYNC, 4'hF));
        emit_split(q, c, 1'b0);
        q.push_back(a_rcfg(MODE_ASYNC, 4'hF));
      end
    endcase
    q.push_back(a_halt());
    prog[c] = q;
  endfunction

  // ---------------- data ----------------
  int unsigned seed = 32'h5A17C3E1;
  function automatic int rnd(int lo, int hi);
    seed = seed * 32'd1103515245 + 32'd12345;
    return lo + int'((seed >> 8) % (hi - lo + 1));
  endfunction

  task automatic host_write(int adr, int v);
    @(negedge clk);
    host_we = 1'b1; host_addr = EXT_AW'(adr); host_wdata = v;
    @(negedge clk) host_we = 1'b0;
  endtask

  task automatic host_read(int adr);
    @(negedge clk) host_addr = EXT_AW'(adr);
    @(negedge clk);
  endtask

  function automatic int p_ref(int x);
    int s = 0;
    for (int i = NA - 1; i >= 0; i--) s = s * x + a[i];
    return s;
  endfunction

  // ---------------- one run ----------------
  task automatic run(int cfg, string name, output longint cycles);
    longint t0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < NV; i++) host_write(PR + i, 32'hDEAD_0000 + i);
    for (int c = 0; c < NCPU; c++) build(cfg, c);
    for (int c = 0; c < NCPU; c++)
      foreach (prog[c][i]) begin
        @(negedge clk);
        prog_we = 1'b1; prog_cpu = 2'(c); prog_addr = 14'(i); prog_data = prog[c][i];
      end
    @(negedge clk) prog_we = 1'b0;
    start = 1'b1;
    t0 = cyc;
    @(negedge clk) start = 1'b0;
    wait (halted == '1);
    cycles = cyc - t0;
    $display("%-7s %0d cycles", name, cycles);
    for (int i = 0; i < NV; i++) begin
      host_read(PR + i);
      check($sformatf("%s p(%0d)", name, xv[i]), longint'(signed'(host_rdata)), p_ref(xv[i]));
    end
    check($sformatf("%s mode after run", name), mode, '0);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_single, t_async, t_sync;
    foreach (a[i]) a[i] = rnd(-100, 100);
    xv = '{2, -3, 5, 1};
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 20; i++) host_write(AB + i, i < NA ? a[i] : 0);
    for (int i = 0; i < NV; i++) host_write(XV + i, xv[i]);
    run(0, "single", t_single);
    run(1, "async", t_async);
    run(2, "sync", t_sync);
    $display("speed-up async %0.2f, sync %0.2f",
             real'(t_single) / real'(t_async), real'(t_single) / real'(t_sync));
    checks++;
    if (!(t_async < t_single)) begin failures++; $display("FAIL async run not faster"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
