// tb_wl_sharpening: the image sharpening workload on the QuadroCore cluster
// at its default sizes.
//
// A 10x10 image of 8-bit pixels, one pixel per 32-bit word in row-major
// order, is sharpened with the 3x3 kernel
//       0 -1  0
//      -1  5 -1
//       0 -1  0
// at the 8x8 interior pixels (output not clamped). The testbench writes the
// image into external memory through the host port, runs four
// configurations and checks all 64 outputs after each:
//   single  processor 0 visits every interior pixel with single external
//           loads and stores, the others halt at once;
//   async   asynchronous MIMD: processor c sharpens rows 1+c and 5+c;
//   simd    the processors switch to SIMD with RCFG, processor 0 fetches the
//           program and every load and store is a fast adjacent access:
//           one 7-cycle transaction moves four neighbouring pixels, lane j
//           to or from processor j, so the group covers four columns per
//           step; a second RCFG returns to asynchronous MIMD;
//   sync    the async programs, which have the same length, in synchronous
//           MIMD (lock-step) mode between two RCFGs.
// The cycle count of each run is printed; every parallel run must beat the
// single one. The image comes from a fixed-seed generator. A watchdog ends
// the run after 200000 cycles.
`timescale 1ns/1ps
module tb_wl_sharpening;
  import qc_pkg::*;
  `include "qc_asm.svh"

  localparam int W = 10;
  localparam int IMG = 'h3000, OUT = 'h3100;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic prog_we = 1'b0; logic [1:0] prog_cpu = '0; logic [13:0] prog_addr = '0; logic [15:0] prog_data = '0;
  logic host_we = 1'b0; logic [EXT_AW-1:0] host_addr = '0; logic [31:0] host_wdata = '0, host_rdata;
  logic [NCPU-1:0] halted;
  mode_e [NCPU-1:0] mode;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int img [W][W];

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

  // Rows: n_rows, columns per row: n_cols steps of col_step; r3 walks the
  // input, r3 + r15 is the matching output word.
  function automatic void emit_kernel(ref logic [15:0] q[$], input int first, input int n_rows,
                                      input int n_cols, input int col_step, input int row_skip,
                                      input bit block);
    int l_row, l_col;
    int ld, st;
    ld = block ? 4 : 2;
    st = block ? 5 : 3;
    q.push_back(a_li(0, 0));
    emit_const(q, 3, first);
    emit_const(q, 15, OUT - IMG);
    q.push_back(a_li(10, n_rows));
    l_row = q.size();
    q.push_back(a_li(12, n_cols));
    l_col = q.size();
    q.push_back(a_mem(5, 3, ld));            // centre
    q.push_back(a_add(2, 3, 0));
    q.push_back(a_addi(2, -1));
    q.push_back(a_mem(6, 2, ld));            // west
    q.push_back(a_addi(2, 2));
    q.push_back(a_mem(7, 2, ld));            // east
    q.push_back(a_addi(2, -1 - W));
    q.push_back(a_mem(8, 2, ld));            // north
    q.push_back(a_addi(2, 2 * W));
    q.push_back(a_mem(11, 2, ld));           // south
    q.push_back(a_add(1, 5, 0));
    q.push_back(a_shift(1, 0, 2));
    q.push_back(a_add(1, 1, 5));             // 5 * centre
    q.push_back(a_sub(1, 1, 6));
    q.push_back(a_sub(1, 1, 7));
    q.push_back(a_sub(1, 1, 8));
    q.push_back(a_sub(1, 1, 11));
    q.push_back(a_add(4, 3, 15));
    q.push_back(a_mem(1, 4, st));
    q.push_back(a_addi(3, col_step));
    q.push_back(a_addi(12, -1));
    q.push_back(a_cmp(1, 12, 0));
    q.push_back(a_br(1, l_col - q.size()));
    q.push_back(a_addi(3, row_skip));
    q.push_back(a_addi(10, -1));
    q.push_back(a_cmp(1, 10, 0));
    q.push_back(a_br(1, l_row - q.size()));
  endfunction

  // cfg 0 single, 1 asynchronous MIMD, 2 SIMD with fast adjacent access, 3 synchronous MIMD
  function automatic void build(int cfg, int c);
    logic [15:0] q[$];
    case (cfg)
      0: if (c == 0) emit_kernel(q, IMG + W + 1, 8, 8, 1, W - 8, 1'b0);
      1: emit_kernel(q, IMG + (1 + c) * W + 1, 2, 8, 1, 4 * W - 8, 1'b0);
      3: begin
        q.push_back(a_rcfg(MODE_SYNC, 4'hF));
        emit_kernel(q, IMG + (1 + c) * W + 1, 2, 8, 1, 4 * W - 8, 1'b0);
        q.push_back(a_rcfg(MODE_ASYNC, 4'hF));
      end
      default: begin
        q.push_back(a_rcfg(MODE_SIMD, 4'hF));
        if (c == 0) begin
          emit_kernel(q, IMG + W + 1, 8, 2, 4, W - 8, 1'b1);
          q.push_back(a_rcfg(MODE_ASYNC, 4'hF));
        end
      end
    endcase
    q.push_back(a_halt());
    prog[c] = q;
  endfunction

  // ---------------- data ----------------
  int unsigned seed = 32'h0BADCAFE;
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

  function automatic int sharp_ref(int r, int c);
    return 5 * img[r][c] - img[r][c-1] - img[r][c+1] - img[r-1][c] - img[r+1][c];
  endfunction

  // ---------------- one run ----------------
  task automatic run(int cfg, string name, output longint cycles);
    longint t0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < W * W; i++) host_write(OUT + i, 32'hDEAD_0000 + i);
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
    for (int r = 1; r < W - 1; r++)
      for (int c = 1; c < W - 1; c++) begin
        host_read(OUT + r * W + c);
        check($sformatf("%s out[%0d][%0d]", name, r, c), longint'(signed'(host_rdata)), sharp_ref(r, c));
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
    foreach (img[r, c]) img[r][c] = rnd(0, 255);
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    foreach (img[r, c]) host_write(IMG + r * W + c, img[r][c]);
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
