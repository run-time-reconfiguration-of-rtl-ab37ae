// tb_wl_convolution: the convolution workload on the QuadroCore cluster at
// its default sizes.
//
// The workload is the discrete convolution of a 50-element array x with a
// 16-element array h, y[n] = sum_k h[k]*x[n-k], n = 0..64. The testbench
// writes x (zero padded on both sides) and h into external memory through
// the host port, runs the same kernel on groups of P = 1..4 processors
// (the processors outside the group halt at once) and checks all 65
// outputs after each run:
//   async   asynchronous MIMD: processor c computes the outputs n = c mod P,
//           each from its own copy of the program with its own start
//           addresses; P = 1 is the single-processor reference;
//   simd    one RCFG puts processors 0..P-1 in SIMD mode; processor 0
//           fetches a program with no processor number in it and the
//           per-processor offset of single external accesses (address +
//           processor number) spreads the outputs n = c mod P over the
//           group; a second RCFG returns to asynchronous MIMD;
//   sync    (P = 4) the async programs, which have the same length, run in
//           synchronous MIMD mode between two RCFGs: the group advances in
//           lock-step, so each round of loads waits for the slowest.
// h is stored four times interleaved (h[k] at HB + 4k + j, j = 0..3) so
// that the offset SIMD load of every processor finds the same coefficient.
// The kernel is two nested counted loops with LDX, LDX, MUL, ADD per tap.
// The cycle count of each run is printed; in each mode a larger group must
// be faster than a smaller one. Data values come from a fixed-seed
// generator. A watchdog ends the run after 400000 cycles.
`timescale 1ns/1ps
module tb_wl_convolution;
  import qc_pkg::*;
  `include "qc_asm.svh"

  localparam int NX = 50, NH = 16, NY = NX + NH - 1;
  localparam int NYR = 72;                    // outputs computed: NY rounded up to 2, 3 and 4
  localparam int XB = 'h1000, HB = 'h1100, YB = 'h1200;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic prog_we = 1'b0; logic [1:0] prog_cpu = '0; logic [13:0] prog_addr = '0; logic [15:0] prog_data = '0;
  logic host_we = 1'b0; logic [EXT_AW-1:0] host_addr = '0; logic [31:0] host_wdata = '0, host_rdata;
  logic [NCPU-1:0] halted;
  mode_e [NCPU-1:0] mode;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int x [NX];
  int h [NH];

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

  // ---------------- kernel ----------------
  logic [15:0] prog [NCPU][$];

  function automatic void emit_const(ref logic [15:0] q[$], input int r, input int v);
    q.push_back(a_li(r, v >> 8));
    q.push_back(a_lsh(r, v & 'hFF));
  endfunction

  // Outputs n = off + step*m, m = 0..count-1; hsel picks the copy of h.
  function automatic void emit_kernel(ref logic [15:0] q[$], input int off, input int step,
                                      input int count, input int hsel);
    int l_outer, l_inner;
    q.push_back(a_li(0, 0));
    emit_const(q, 8, YB + off);              // r8  = &y[n]
    emit_const(q, 11, XB + NH - 1 + off);    // r11 = &xpad[n + 15]
    q.push_back(a_li(10, count));            // r10 = outputs left
    l_outer = q.size();
    q.push_back(a_li(1, 0));                 // r1  = accumulator
    q.push_back(a_add(2, 11, 0));            // r2  = &xpad[n + 15 - k]
    emit_const(q, 3, HB + hsel);             // r3  = &h[k] copy hsel
    q.push_back(a_li(4, NH));                // r4  = taps left
    l_inner = q.size();
    q.push_back(a_ldx(5, 2));
    q.push_back(a_ldx(6, 3));
    q.push_back(a_mul(7, 5, 6));
    q.push_back(a_add(1, 1, 7));
    q.push_back(a_addi(2, -1));
    q.push_back(a_addi(3, 4));
    q.push_back(a_addi(4, -1));
    q.push_back(a_cmp(1, 4, 0));             // F = taps left != 0
    q.push_back(a_br(1, l_inner - q.size()));
    q.push_back(a_stx(1, 8));
    q.push_back(a_addi(8, step));
    q.push_back(a_addi(11, step));
    q.push_back(a_addi(10, -1));
    q.push_back(a_cmp(1, 10, 0));
    q.push_back(a_br(1, l_outer - q.size()));
  endfunction

  // md 0: asynchronous MIMD, 1: SIMD, 2: synchronous MIMD; np processors take part
  function automatic void build(int md, int np, int c);
    logic [15:0] q[$];
    if (c < np) begin
      if (md == 0) emit_kernel(q, c, np, NYR / np, c);
      else if (md == 2) begin
        q.push_back(a_rcfg(MODE_SYNC, (1 << np) - 1));
        emit_kernel(q, c, np, NYR / np, c);
        q.push_back(a_rcfg(MODE_ASYNC, (1 << np) - 1));
      end else begin
        q.push_back(a_rcfg(MODE_SIMD, (1 << np) - 1));
        if (c == 0) begin
          emit_kernel(q, 0, np, NYR / np, 0);
          q.push_back(a_rcfg(MODE_ASYNC, (1 << np) - 1));
        end
      end
    end
    q.push_back(a_halt());
    prog[c] = q;
  endfunction

  // ---------------- data ----------------
  int unsigned seed = 32'h1F2E3D4C;
  function automatic int rnd(int lo, int hi);
    seed = seed * 32'd1103515245 + 32'd12345;
    return lo + int'((seed >> 8) % (hi - lo + 1));
  endfunction

  task automatic host_write(int a, int v);
    @(negedge clk);
    host_we = 1'b1; host_addr = EXT_AW'(a); host_wdata = v;
    @(negedge clk) host_we = 1'b0;
  endtask

  task automatic host_read(int a);
    @(negedge clk) host_addr = EXT_AW'(a);
    @(negedge clk);
  endtask

  function automatic int y_ref(int n);
    int s = 0;
    for (int k = 0; k < NH; k++)
      if (n - k >= 0 && n - k < NX) s += h[k] * x[n - k];
    return s;
  endfunction

  // ---------------- one run ----------------
  task automatic run(int md, int np, output longint cycles);
    string name;
    longint t0;
    name = $sformatf("%s P=%0d", md == 0 ? "async" : md == 1 ? "simd" : "sync", np);
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < NYR; i++) host_write(YB + i, 32'hDEAD_0000 + i);
    for (int c = 0; c < NCPU; c++) build(md, np, c);
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
    $display("%-10s %0d cycles", name, cycles);
    for (int n = 0; n < NY; n++) begin
      host_read(YB + n);
      check($sformatf("%s y[%0d]", name, n), longint'(signed'(host_rdata)), y_ref(n));
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
    longint t_async [1:NCPU], t_simd [2:NCPU], t_sync;
    foreach (x[i]) x[i] = rnd(-200, 200);
    foreach (h[k]) h[k] = rnd(-60, 60);
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // zero-padded x and four interleaved copies of h; memory keeps them over resets
    for (int i = 0; i < NYR + NH - 1; i++)
      host_write(XB + i, (i >= NH - 1 && i < NH - 1 + NX) ? x[i - (NH - 1)] : 0);
    for (int k = 0; k < NH; k++)
      for (int j = 0; j < NCPU; j++) host_write(HB + NCPU*k + j, h[k]);
    for (int np = 1; np <= NCPU; np++) run(0, np, t_async[np]);
    for (int np = 2; np <= NCPU; np++) run(1, np, t_simd[np]);
    run(2, NCPU, t_sync);
    $display("P=%0d speed-up sync %0.2f", NCPU, real'(t_async[1]) / real'(t_sync));
    checks++;
    if (!(t_sync < t_async[1])) begin failures++; $display("FAIL sync run not faster"); end
    for (int np = 2; np <= NCPU; np++) begin
      $display("P=%0d speed-up async %0.2f, simd %0.2f", np,
               real'(t_async[1]) / real'(t_async[np]), real'(t_async[1]) / real'(t_simd[np]));
      checks++;
      if (!(t_async[np] < t_async[np-1])) begin failures++; $display("FAIL async P=%0d not faster", np); end
      checks++;
      if (!(t_simd[np] < t_async[1]) || (np > 2 && !(t_simd[np] < t_simd[np-1]))) begin
        failures++; $display("FAIL simd P=%0d not faster", np);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
