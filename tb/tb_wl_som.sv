// tb_wl_som: training steps of a Kohonen self-organizing map on the
// QuadroCore cluster at its default sizes.
//
// A one-dimensional map of 16 neurons with 4-dimensional integer weights
// is trained on 4 input vectors. Per input: every neuron's squared distance
// to the input is computed, the winner is the neuron with the smallest
// distance (ties go to the lower index: the key compared is distance*16 +
// index), and the winner and its two map neighbours move a quarter of the
// way towards the input, w += (x - w) >>> 2. The sizes are this testbench's
// choice. Weights and inputs live in external memory, word (m, d) of the
// weights at WB + 16d + m and input t, dimension d at XB + 16t + 4d + j,
// four copies j = 0..3. Three configurations, each checked for the four
// winners and all 64 final weights against a model computed here:
//   single     processor 0 handles all 16 neurons;
//   mimd       asynchronous MIMD: processor c owns neurons 4j + c; each
//              finds its local winner, posts its key in shared register c,
//              and after a barrier every processor picks the global winner
//              from the four; a second barrier protects the shared
//              registers from the next input;
//   mimd-simd  the same, but the distance and update phases, which are the
//              same for every neuron, run in SIMD mode (processor 0 fetches,
//              single accesses are offset by the processor number) and only
//              the data-dependent winner search runs in asynchronous MIMD,
//              with RCFG switching between the two four times per input.
// The update is branch-free (a mask selects the neighbourhood), so it can
// run in SIMD. Each processor learns its own number by loading word IDB + c.
// The cycle count and instruction fetches of each run are printed; the
// parallel runs must beat the single one and the mixed run must fetch
// fewer instructions than the MIMD run. A watchdog ends the run after
// 400000 cycles.
`timescale 1ns/1ps
module tb_wl_som;
  import qc_pkg::*;
  `include "qc_asm.svh"

  localparam int NM = 16, D = 4, T = 4;
  localparam int WB = 'h6000, XB = 'h6100, IDB = 'h6200, WIN = 'h6210;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic prog_we = 1'b0; logic [1:0] prog_cpu = '0; logic [13:0] prog_addr = '0; logic [15:0] prog_data = '0;
  logic host_we = 1'b0; logic [EXT_AW-1:0] host_addr = '0; logic [31:0] host_wdata = '0, host_rdata;
  logic [NCPU-1:0] halted;
  mode_e [NCPU-1:0] mode;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int w0 [NM][D];                  // initial weights
  int wref [NM][D];                // weights after training
  int xin [T][D];
  int winref [T];

  quadrocore dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  longint fetches = 0;
  always @(posedge clk)
    fetches <= fetches + longint'(dut.g_cpu[0].u_cpu.fetch_en) + longint'(dut.g_cpu[1].u_cpu.fetch_en)
                       + longint'(dut.g_cpu[2].u_cpu.fetch_en) + longint'(dut.g_cpu[3].u_cpu.fetch_en);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- programs ----------------
  // r1..r4 input, r9 best key, r10 winner, r13 own number, r14 = -1
  logic [15:0] prog [NCPU][$];

  function automatic void emit_const(ref logic [15:0] q[$], input int r, input int v);
    q.push_back(a_li(r, v >> 8));
    q.push_back(a_lsh(r, v & 'hFF));
  endfunction

  // Distances of the owned neurons m = stride*j + r13 into local words j.
  function automatic void emit_distance(ref logic [15:0] q[$], input int t, input int ca,
                                        input int nn, input int stride);
    for (int d = 0; d < D; d++) begin
      emit_const(q, 12, XB + 16*t + 4*d + ca);
      q.push_back(a_ldx(1 + d, 12));
    end
    for (int j = 0; j < nn; j++) begin
      q.push_back(a_li(5, 0));
      for (int d = 0; d < D; d++) begin
        emit_const(q, 12, WB + 16*d + stride*j + ca);
        q.push_back(a_ldx(6, 12));
        q.push_back(a_sub(7, 1 + d, 6));
        q.push_back(a_mul(7, 7, 7));
        q.push_back(a_add(5, 5, 7));
      end
      q.push_back(a_shift(5, 0, 4));
      q.push_back(a_li(8, stride*j));
      q.push_back(a_add(8, 8, 13));
      q.push_back(a_add(5, 5, 8));           // key = dist*16 + m
      q.push_back(a_li(12, j));
      q.push_back(a_stl(5, 12));
    end
  endfunction

  // r9 = min(r9, r6) without changing anything else
  function automatic void emit_min(ref logic [15:0] q[$]);
    q.push_back(a_cmp(3, 6, 9));             // F = r6 <u r9
    q.push_back(a_br(2, 2));                 // skip if not smaller
    q.push_back(a_add(9, 6, 0));
  endfunction

  function automatic void emit_winner(ref logic [15:0] q[$], input int nn, input int c,
                                      input bit shared, input int t);
    q.push_back(a_li(12, 0));
    q.push_back(a_ldl(9, 12));
    for (int j = 1; j < nn; j++) begin
      q.push_back(a_li(12, j));
      q.push_back(a_ldl(6, 12));
      emit_min(q);
    end
    if (shared) begin
      q.push_back(a_sts(9, c));
      q.push_back(a_bar(4'hF));
      q.push_back(a_lds(9, 0));
      for (int p = 1; p < NCPU; p++) begin
        q.push_back(a_lds(6, p));
        emit_min(q);
      end
      q.push_back(a_bar(4'hF));
    end
    q.push_back(a_li(15, NM - 1));
    q.push_back(a_and(10, 9, 15));     // winner = key & 15
    if (c == 0) begin
      emit_const(q, 12, WIN + t);
      q.push_back(a_stx(10, 12));
    end
  endfunction

  function automatic void emit_update(ref logic [15:0] q[$], input int ca, input int nn,
                                      input int stride);
    q.push_back(a_li(14, -1));
    for (int j = 0; j < nn; j++) begin
      q.push_back(a_li(8, stride*j));
      q.push_back(a_add(8, 8, 13));
      q.push_back(a_sub(15, 8, 10));
      q.push_back(a_addi(15, 1));            // u = m - winner + 1, inside iff 0 <= u < 3
      q.push_back(a_add(11, 15, 0));
      q.push_back(a_addi(11, -3));
      q.push_back(a_shift(11, 2, 31));       // all ones if u < 3
      q.push_back(a_shift(15, 2, 31));
      q.push_back(a_xor(15, 15, 14));        // all ones if u >= 0
      q.push_back(a_and(11, 11, 15));
      for (int d = 0; d < D; d++) begin
        emit_const(q, 12, WB + 16*d + stride*j + ca);
        q.push_back(a_ldx(6, 12));
        q.push_back(a_sub(7, 1 + d, 6));
        q.push_back(a_shift(7, 2, 2));
        q.push_back(a_and(7, 7, 11));
        q.push_back(a_add(6, 6, 7));
        q.push_back(a_stx(6, 12));
      end
    end
  endfunction

  // cfg 0 single, 1 MIMD, 2 MIMD-SIMD
  function automatic void build(int cfg, int c);
    logic [15:0] q[$];
    int ca, nn, stride;
    bit simd;
    simd = (cfg == 2);
    ca = (cfg == 1) ? c : 0;
    nn = (cfg == 0) ? NM : NM / NCPU;
    stride = (cfg == 0) ? 1 : NCPU;
    if (cfg != 0 || c == 0) begin
      q.push_back(a_li(0, 0));
      emit_const(q, 12, IDB + c);
      q.push_back(a_ldx(13, 12));            // r13 = own number
      for (int t = 0; t < T; t++) begin
        if (simd) q.push_back(a_rcfg(MODE_SIMD, 4'hF));
        if (!simd || c == 0) begin
          emit_distance(q, t, ca, nn, stride);
          if (simd) q.push_back(a_rcfg(MODE_ASYNC, 4'hF));
        end
        emit_winner(q, nn, c, cfg != 0, t);
        if (simd) q.push_back(a_rcfg(MODE_SIMD, 4'hF));
        if (!simd || c == 0) begin
          emit_update(q, ca, nn, stride);
          if (simd) q.push_back(a_rcfg(MODE_ASYNC, 4'hF));
        end
      end
    end
    q.push_back(a_halt());
    prog[c] = q;
  endfunction

  // ---------------- data and model ----------------
  int unsigned seed = 32'h50A7E11A;
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

  function automatic void som_ref();
    wref = w0;
    for (int t = 0; t < T; t++) begin
      int best, win;
      best = -1;
      for (int m = 0; m < NM; m++) begin
        int sq;
        sq = 0;
        for (int d = 0; d < D; d++) sq += (xin[t][d] - wref[m][d]) * (xin[t][d] - wref[m][d]);
        if (best < 0 || sq * 16 + m < best) best = sq * 16 + m;
      end
      win = best & (NM - 1);
      winref[t] = win;
      for (int m = 0; m < NM; m++)
        if (m >= win - 1 && m <= win + 1)
          for (int d = 0; d < D; d++) wref[m][d] += (xin[t][d] - wref[m][d]) >>> 2;
    end
  endfunction

  // ---------------- one run ----------------
  task automatic run(int cfg, string name, output longint cycles, output longint nfetch);
    longint t0, f0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int m = 0; m < NM; m++)
      for (int d = 0; d < D; d++) host_write(WB + 16*d + m, w0[m][d]);
    for (int t = 0; t < T; t++) host_write(WIN + t, -1);
    for (int c = 0; c < NCPU; c++) build(cfg, c);
    for (int c = 0; c < NCPU; c++)
      foreach (prog[c][i]) begin
        @(negedge clk);
        prog_we = 1'b1; prog_cpu = 2'(c); prog_addr = 14'(i); prog_data = prog[c][i];
      end
    @(negedge clk) prog_we = 1'b0;
    start = 1'b1;
    t0 = cyc;
    f0 = fetches;
    @(negedge clk) start = 1'b0;
    wait (halted == '1);
    cycles = cyc - t0;
    nfetch = fetches - f0;
    $display("%-9s %0d cycles, %0d instruction fetches, program of processor 0: %0d instructions",
             name, cycles, nfetch, prog[0].size());
    for (int t = 0; t < T; t++) begin
      host_read(WIN + t);
      check($sformatf("%s winner %0d", name, t), longint'(signed'(host_rdata)), winref[t]);
    end
    for (int m = 0; m < NM; m++)
      for (int d = 0; d < D; d++) begin
        host_read(WB + 16*d + m);
        check($sformatf("%s w[%0d][%0d]", name, m, d), longint'(signed'(host_rdata)), wref[m][d]);
      end
    check($sformatf("%s mode after run", name), mode, '0);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_single, t_mimd, t_simd, f_single, f_mimd, f_simd;
    foreach (w0[m, d]) w0[m][d] = rnd(0, 255);
    foreach (xin[t, d]) xin[t][d] = rnd(0, 255);
    som_ref();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int c = 0; c < NCPU; c++) host_write(IDB + c, c);
    for (int t = 0; t < T; t++)
      for (int d = 0; d < D; d++)
        for (int j = 0; j < NCPU; j++) host_write(XB + 16*t + 4*d + j, xin[t][d]);
    run(0, "single", t_single, f_single);
    run(1, "mimd", t_mimd, f_mimd);
    run(2, "mimd-simd", t_simd, f_simd);
    $display("speed-up mimd %0.2f, mimd-simd %0.2f",
             real'(t_single) / real'(t_mimd), real'(t_single) / real'(t_simd));
    checks++;
    if (!(t_mimd < t_single)) begin failures++; $display("FAIL mimd run not faster"); end
    checks++;
    if (!(t_simd < t_single)) begin failures++; $display("FAIL mimd-simd run not faster"); end
    checks++;
    if (!(f_simd < f_mimd)) begin failures++; $display("FAIL mimd-simd run fetches no less"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
