// tb_wl_fft: the fft workload on the QuadroCore cluster at its default
// sizes.
//
// The workload has the data-dependent access pattern of a Fast Fourier
// Transformation on two arrays of 16 elements, the real and the imaginary
// parts: a 16-point radix-2 decimation-in-time FFT in fixed point (twiddle
// factors scaled by 2^14, each product shifted right by 14). Input is stored
// in bit-reversed order, so four stages of eight butterflies give the
// output in natural order. Every butterfly reads its entry of a table in
// external memory: the addresses of its two elements and its twiddle
// factor (wr, wi), so the program has no address arithmetic of its own and
// the loads and stores go wherever the table says. The testbench writes
// data and table through the host port, runs four configurations and
// checks the 32 output words after each against the same integer algorithm
// computed here:
//   single  processor 0 performs all 32 butterflies in order;
//   async   asynchronous MIMD: processor c performs butterflies 2c and 2c+1
//           of each stage and a barrier separates the stages;
//   simd    the four processors switch to SIMD, processor 0 fetches the
//           program and processor c performs butterflies c and c+4 of each
//           stage. Single external accesses in SIMD mode add the processor
//           number to the address, so the table keeps the four processors'
//           entries interleaved and stores their element addresses less
//           the processor number. Lock-step execution separates the stages
//           without a barrier;
//   sync    the async programs without their barriers in synchronous MIMD
//           (lock-step) mode between two RCFGs: the group stays in step, so
//           a stage cannot start before the previous one has finished.
// The cycle count of each run is printed; every parallel run must beat the
// single one. Data come from a fixed-seed generator. A watchdog ends the
// run after 200000 cycles.
`timescale 1ns/1ps
module tb_wl_fft;
  import qc_pkg::*;
  `include "qc_asm.svh"

  localparam int N = 16, NST = 4, NB = N / 2;
  localparam int DR = 'h4000, DI = DR + N, TB1 = 'h4100, TB2 = 'h4200;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic prog_we = 1'b0; logic [1:0] prog_cpu = '0; logic [13:0] prog_addr = '0; logic [15:0] prog_data = '0;
  logic host_we = 1'b0; logic [EXT_AW-1:0] host_addr = '0; logic [31:0] host_wdata = '0, host_rdata;
  logic [NCPU-1:0] halted;
  mode_e [NCPU-1:0] mode;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int in_re [N], in_im [N];        // input, natural order
  int ref_re [N], ref_im [N];      // expected output
  int wr [NB], wi [NB];            // twiddle factors W16^k, scaled by 2^14

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

  // ---------------- butterfly geometry ----------------
  function automatic int bf_i(int s, int b);
    return ((b >> s) << (s + 1)) + (b & ((1 << s) - 1));
  endfunction
  function automatic int bf_k(int s, int b);
    return (b & ((1 << s) - 1)) << (NST - 1 - s);
  endfunction
  function automatic int bitrev(int n);
    int r = 0;
    for (int i = 0; i < NST; i++) r |= ((n >> i) & 1) << (NST - 1 - i);
    return r;
  endfunction

  // ---------------- programs ----------------
  logic [15:0] prog [NCPU][$];

  function automatic void emit_const(ref logic [15:0] q[$], input int r, input int v);
    q.push_back(a_li(r, v >> 8));
    q.push_back(a_lsh(r, v & 'hFF));
  endfunction

  // One butterfly; r3 points at its table entry, which it steps over
  function automatic void emit_butterfly(ref logic [15:0] q[$], input int fstep);
    q.push_back(a_ldx(2, 3));                // r2 = &re[i]
    q.push_back(a_addi(3, fstep));
    q.push_back(a_ldx(4, 3));                // r4 = &re[j]
    q.push_back(a_addi(3, fstep));
    q.push_back(a_ldx(5, 3));                // r5 = wr
    q.push_back(a_addi(3, fstep));
    q.push_back(a_ldx(6, 3));                // r6 = wi
    q.push_back(a_addi(3, fstep));
    q.push_back(a_ldx(7, 4));                // br
    q.push_back(a_addi(4, N));
    q.push_back(a_ldx(8, 4));                // bi
    q.push_back(a_mul(9, 7, 5));
    q.push_back(a_mul(1, 8, 6));
    q.push_back(a_sub(9, 9, 1));
    q.push_back(a_shift(9, 2, 14));          // tr = (br*wr - bi*wi) >>> 14
    q.push_back(a_mul(10, 7, 6));
    q.push_back(a_mul(1, 8, 5));
    q.push_back(a_add(10, 10, 1));
    q.push_back(a_shift(10, 2, 14));         // ti = (br*wi + bi*wr) >>> 14
    q.push_back(a_ldx(7, 2));                // ar
    q.push_back(a_addi(2, N));
    q.push_back(a_ldx(8, 2));                // ai
    q.push_back(a_sub(1, 8, 10));
    q.push_back(a_stx(1, 4));                // im[j] = ai - ti
    q.push_back(a_add(1, 8, 10));
    q.push_back(a_stx(1, 2));                // im[i] = ai + ti
    q.push_back(a_addi(2, -N));
    q.push_back(a_addi(4, -N));
    q.push_back(a_sub(1, 7, 9));
    q.push_back(a_stx(1, 4));                // re[j] = ar - tr
    q.push_back(a_add(1, 7, 9));
    q.push_back(a_stx(1, 2));                // re[i] = ar + tr
  endfunction

  // n_stages x per_stage butterflies; skip is added to r3 after a stage
  function automatic void emit_fft(ref logic [15:0] q[$], input int tbl, input int per_stage,
                                   input int fstep, input int skip, input bit use_bar);
    int l_st, l_bf;
    q.push_back(a_li(0, 0));
    emit_const(q, 3, tbl);
    q.push_back(a_li(11, NST));
    l_st = q.size();
    q.push_back(a_li(12, per_stage));
    l_bf = q.size();
    emit_butterfly(q, fstep);
    q.push_back(a_addi(12, -1));
    q.push_back(a_cmp(1, 12, 0));
    q.push_back(a_br(1, l_bf - q.size()));
    if (skip != 0) q.push_back(a_addi(3, skip));
    if (use_bar) q.push_back(a_bar(4'hF));
    q.push_back(a_addi(11, -1));
    q.push_back(a_cmp(1, 11, 0));
    q.push_back(a_br(1, l_st - q.size()));
  endfunction

  // cfg 0 single, 1 asynchronous MIMD, 2 SIMD, 3 synchronous MIMD
  function automatic void build(int cfg, int c);
    logic [15:0] q[$];
    case (cfg)
      0: if (c == 0) emit_fft(q, TB1, NB, 1, 0, 1'b0);
      1: emit_fft(q, TB1 + 8 * c, 2, 1, 4 * NB - 8, 1'b1);
      3: begin
        q.push_back(a_rcfg(MODE_SYNC, 4'hF));
        emit_fft(q, TB1 + 8 * c, 2, 1, 4 * NB - 8, 1'b0);
        q.push_back(a_rcfg(MODE_ASYNC, 4'hF));
      end
      default: begin
        q.push_back(a_rcfg(MODE_SIMD, 4'hF));
        if (c == 0) begin
          emit_fft(q, TB2, 2, NCPU, 0, 1'b0);
          q.push_back(a_rcfg(MODE_ASYNC, 4'hF));
        end
      end
    endcase
    q.push_back(a_halt());
    prog[c] = q;
  endfunction

  // ---------------- data ----------------
  int unsigned seed = 32'h7E57F00D;
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

  function automatic void fft_ref();
    for (int n = 0; n < N; n++) begin
      ref_re[n] = in_re[bitrev(n)];
      ref_im[n] = in_im[bitrev(n)];
    end
    for (int s = 0; s < NST; s++)
      for (int b = 0; b < NB; b++) begin
        int i, j, k, tr, ti, ar, ai;
        i = bf_i(s, b); j = i + (1 << s); k = bf_k(s, b);
        tr = (ref_re[j] * wr[k] - ref_im[j] * wi[k]) >>> 14;
        ti = (ref_re[j] * wi[k] + ref_im[j] * wr[k]) >>> 14;
        ar = ref_re[i]; ai = ref_im[i];
        ref_re[i] = ar + tr; ref_im[i] = ai + ti;
        ref_re[j] = ar - tr; ref_im[j] = ai - ti;
      end
  endfunction

  // Tables: TB1 holds entry (s, b) at TB1 + 4(8s + b), words &re[i], &re[j],
  // wr, wi. TB2 holds, for step k of stage s on processor c (butterfly
  // b = 4k + c), word f at TB2 + 16(2s + k) + 4f + c, addresses less c.
  task automatic write_tables();
    for (int s = 0; s < NST; s++)
      for (int b = 0; b < NB; b++) begin
        int i, j, kk, e1, e2, c;
        i = bf_i(s, b); j = i + (1 << s); kk = bf_k(s, b);
        e1 = TB1 + 4 * (NB * s + b);
        host_write(e1 + 0, DR + i);
        host_write(e1 + 1, DR + j);
        host_write(e1 + 2, wr[kk]);
        host_write(e1 + 3, wi[kk]);
        c = b % NCPU;
        e2 = TB2 + 16 * (2 * s + b / NCPU) + c;
        host_write(e2 + 0, DR + i - c);
        host_write(e2 + 4, DR + j - c);
        host_write(e2 + 8, wr[kk]);
        host_write(e2 + 12, wi[kk]);
      end
  endtask

  // ---------------- one run ----------------
  task automatic run(int cfg, string name, output longint cycles);
    longint t0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int n = 0; n < N; n++) begin
      host_write(DR + n, in_re[bitrev(n)]);
      host_write(DI + n, in_im[bitrev(n)]);
    end
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
    for (int n = 0; n < N; n++) begin
      host_read(DR + n);
      check($sformatf("%s re[%0d]", name, n), longint'(signed'(host_rdata)), ref_re[n]);
      host_read(DI + n);
      check($sformatf("%s im[%0d]", name, n), longint'(signed'(host_rdata)), ref_im[n]);
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
    longint t_single, t_async, t_simd, t_sync;
    foreach (in_re[n]) begin
      in_re[n] = rnd(-1000, 1000);
      in_im[n] = rnd(-1000, 1000);
    end
    for (int k = 0; k < NB; k++) begin
      wr[k] = int'($rtoi($floor(16384.0 * $cos(2.0 * 3.14159265358979 * k / N) + 0.5)));
      wi[k] = -int'($rtoi($floor(16384.0 * $sin(2.0 * 3.14159265358979 * k / N) + 0.5)));
    end
    fft_ref();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    write_tables();
    run(0, "single", t_single);
    run(1, "async", t_async);
    run(2, "simd", t_simd);
    run(3, "sync", t_sync);
    $display("speed-up sync %0.2f", real'(t_single) / real'(t_sync));
    checks++;
    if (!(t_sync < t_single)) begin failures++; $display("FAIL sync run not faster"); end
    $display("speed-up async %0.2f, simd %0.2f",
             real'(t_single) / real'(t_async), real'(t_single) / real'(t_simd));
    checks++;
    if (!(t_async < t_single)) begin failures++; $display("FAIL async run not faster"); end
    checks++;
    if (!(t_simd < t_single)) begin failures++; $display("FAIL simd run not faster"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
