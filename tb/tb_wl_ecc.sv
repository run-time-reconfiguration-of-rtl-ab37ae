// tb_wl_ecc: the multiplication of elliptic-curve cryptography on the
// QuadroCore cluster at its default sizes.
//
// The workload multiplies two binary polynomials of degree up to 232 (the
// operands of a GF(2^233) multiplication, eight 32-bit words each) into a
// 15-word product. Karatsuba's method applied three times (8 -> 4 -> 2 -> 1
// words) turns it into 27 word-level carry-less 32x32 -> 64 bit
// multiplications. The testbench flattens the recursion, the way a compiler
// would: leaf l multiplies the XOR of a set of words of A by the XOR of the
// same words of B, and its 64-bit product is XORed into the result at a set
// of word offsets. It emits one straight-line program per processor from
// that list. A word multiplication is a branch-free 32-step shift-and-XOR
// loop, so its time does not depend on the data and it can run in SIMD.
// Each processor accumulates its leaves into a private 16-word partial
// result in local data memory. Three configurations:
//   single     processor 0 computes all 27 leaves, the others halt at once;
//   mimd       asynchronous MIMD: processor c computes leaves c, c+4, ...,
//              writes its partial result to external memory, and after a
//              barrier processor c XORs words 4c..4c+3 of the four partials;
//   mimd-simd  seven rounds: in asynchronous mode every processor gathers
//              the operands of its leaf (4r + c), one RCFG switches to SIMD
//              and processor 0's multiplication loop runs on all four, a
//              second RCFG returns to asynchronous mode, where each
//              processor accumulates its own product; the partial results
//              are then combined as in mimd.
// Processor 0 then reduces the product modulo the field polynomial
// x^233 + x^74 + 1 word by word in external memory: each word above bit 232
// is folded down with four shifted XORs, then the top bits of word 7. The
// eight result words are checked against a schoolbook carry-less product
// reduced bit by bit here. The
// cycle count and the number of instruction fetches of each run are
// printed; the parallel runs must beat the single one, and the mixed run
// must fetch fewer instructions than the MIMD run, its slaves' fetch
// being idle in SIMD mode. A watchdog ends the run after 400000 cycles.
`timescale 1ns/1ps
module tb_wl_ecc;
  import qc_pkg::*;
  `include "qc_asm.svh"

  localparam int NW = 8, NL = 27;
  localparam int AB = 'h5000, BB = 'h5010, CB = 'h5020, PB = 'h5040;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic prog_we = 1'b0; logic [1:0] prog_cpu = '0; logic [13:0] prog_addr = '0; logic [15:0] prog_data = '0;
  logic host_we = 1'b0; logic [EXT_AW-1:0] host_addr = '0; logic [31:0] host_wdata = '0, host_rdata;
  logic [NCPU-1:0] halted;
  mode_e [NCPU-1:0] mode;

  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [31:0] opa [NW], opb [NW];
  logic [31:0] cref [2*NW];
  logic [NW-1:0]   leaf_set [$];     // words XORed into the leaf's operands
  logic [2*NW-1:0] leaf_off [$];     // word offsets its product is XORed at

  quadrocore dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // instruction memory reads of the whole cluster
  longint fetches = 0;
  always @(posedge clk)
    fetches <= fetches + longint'(dut.g_cpu[0].u_cpu.fetch_en) + longint'(dut.g_cpu[1].u_cpu.fetch_en)
                       + longint'(dut.g_cpu[2].u_cpu.fetch_en) + longint'(dut.g_cpu[3].u_cpu.fetch_en);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- Karatsuba flattening ----------------
  // Operand word i of the current level is the XOR of the original words
  // in s[i]; its product goes to the offsets in off.
  function automatic void kara(int n, logic [NW-1:0] s [NW], logic [2*NW-1:0] off);
    logic [NW-1:0] lo [NW], hi [NW], md [NW];
    int h;
    if (n == 1) begin
      leaf_set.push_back(s[0]);
      leaf_off.push_back(off);
      return;
    end
    h = n / 2;
    foreach (lo[i]) begin lo[i] = '0; hi[i] = '0; md[i] = '0; end
    for (int i = 0; i < h; i++) begin
      lo[i] = s[i]; hi[i] = s[i+h]; md[i] = s[i] ^ s[i+h];
    end
    kara(h, lo, off ^ (off << h));
    kara(h, hi, (off << (2*h)) ^ (off << h));
    kara(h, md, off << h);
  endfunction

  function automatic logic [63:0] clmul(logic [31:0] a, logic [31:0] b);
    logic [63:0] r = '0;
    for (int i = 0; i < 32; i++) if (b[i]) r ^= 64'(a) << i;
    return r;
  endfunction

  // ---------------- programs ----------------
  logic [15:0] prog [NCPU][$];

  function automatic void emit_const(ref logic [15:0] q[$], input int r, input int v);
    q.push_back(a_li(r, v >> 8));
    q.push_back(a_lsh(r, v & 'hFF));
  endfunction

  // r1 = XOR of A words in the set, r2 = same for B
  function automatic void emit_gather(ref logic [15:0] q[$], input logic [NW-1:0] set);
    q.push_back(a_li(1, 0));
    q.push_back(a_li(2, 0));
    for (int i = 0; i < NW; i++) if (set[i]) begin
      emit_const(q, 12, AB + i);
      q.push_back(a_ldx(13, 12));
      q.push_back(a_xor(1, 1, 13));
      emit_const(q, 12, BB + i);
      q.push_back(a_ldx(13, 12));
      q.push_back(a_xor(2, 2, 13));
    end
  endfunction

  // {r4, r3} = r1 x r2 carry-less, branch-free inside the loop
  function automatic void emit_clmul(ref logic [15:0] q[$]);
    int l;
    q.push_back(a_li(3, 0));
    q.push_back(a_li(4, 0));
    q.push_back(a_add(5, 1, 0));             // r5:r6 = a shifted, low:high
    q.push_back(a_li(6, 0));
    q.push_back(a_li(9, 1));
    q.push_back(a_li(10, 32));
    l = q.size();
    q.push_back(a_and(7, 2, 9));       // r7 = b & 1
    q.push_back(a_sub(8, 0, 7));             // r8 = all ones if set
    q.push_back(a_and(11, 5, 8));
    q.push_back(a_xor(3, 3, 11));
    q.push_back(a_and(11, 6, 8));
    q.push_back(a_xor(4, 4, 11));
    q.push_back(a_shift(6, 0, 1));
    q.push_back(a_add(7, 5, 0));
    q.push_back(a_shift(7, 1, 31));
    q.push_back(a_or(6, 6, 7));       // high |= low >> 31
    q.push_back(a_shift(5, 0, 1));
    q.push_back(a_shift(2, 1, 1));
    q.push_back(a_addi(10, -1));
    q.push_back(a_cmp(1, 10, 0));
    q.push_back(a_br(1, l - q.size()));
  endfunction

  // local partial[o] ^= r3, partial[o+1] ^= r4 for every offset o
  function automatic void emit_accumulate(ref logic [15:0] q[$], input logic [2*NW-1:0] off);
    for (int o = 0; o < 2*NW - 1; o++) if (off[o]) begin
      q.push_back(a_li(12, o));
      q.push_back(a_ldl(13, 12));
      q.push_back(a_xor(13, 13, 3));
      q.push_back(a_stl(13, 12));
      q.push_back(a_addi(12, 1));
      q.push_back(a_ldl(13, 12));
      q.push_back(a_xor(13, 13, 4));
      q.push_back(a_stl(13, 12));
    end
  endfunction

  function automatic void emit_clear(ref logic [15:0] q[$]);
    q.push_back(a_li(0, 0));
    for (int o = 0; o < 2*NW; o++) begin
      q.push_back(a_li(12, o));
      q.push_back(a_stl(0, 12));
    end
  endfunction

  // copy the local partial to dst..dst+15 in external memory
  function automatic void emit_flush(ref logic [15:0] q[$], input int dst);
    emit_const(q, 14, dst);
    for (int o = 0; o < 2*NW; o++) begin
      q.push_back(a_li(12, o));
      q.push_back(a_ldl(13, 12));
      q.push_back(a_stx(13, 14));
      q.push_back(a_addi(14, 1));
    end
  endfunction

  // after a barrier: C[i] = XOR of the four partials, i = 4c..4c+3
  function automatic void emit_combine(ref logic [15:0] q[$], input int c);
    q.push_back(a_bar(4'hF));
    for (int i = 4*c; i < 4*c + 4; i++) begin
      q.push_back(a_li(1, 0));
      for (int p = 0; p < NCPU; p++) begin
        emit_const(q, 12, PB + 16*p + i);
        q.push_back(a_ldx(13, 12));
        q.push_back(a_xor(1, 1, 13));
      end
      emit_const(q, 12, CB + i);
      q.push_back(a_stx(1, 12));
    end
  endfunction

  // C[dst] ^= r1 shifted (kind, amount)
  function automatic void emit_fold(ref logic [15:0] q[$], input int dst, input int kind,
                                    input int amt);
    q.push_back(a_add(2, 1, 0));
    q.push_back(a_shift(2, kind, amt));
    emit_const(q, 12, CB + dst);
    q.push_back(a_ldx(3, 12));
    q.push_back(a_xor(3, 3, 2));
    q.push_back(a_stx(3, 12));
  endfunction

  // reduce C[0..14] modulo x^233 + x^74 + 1 into C[0..7]
  function automatic void emit_reduce(ref logic [15:0] q[$]);
    for (int i = 2*NW - 2; i >= NW; i--) begin
      emit_const(q, 12, CB + i);
      q.push_back(a_ldx(1, 12));
      emit_fold(q, i - 8, 0, 23);
      emit_fold(q, i - 7, 1, 9);
      emit_fold(q, i - 5, 0, 1);
      emit_fold(q, i - 4, 1, 31);
    end
    emit_const(q, 12, CB + NW - 1);
    q.push_back(a_ldx(1, 12));
    q.push_back(a_shift(1, 1, 9));           // bits 233.. of the word-7 level
    emit_fold(q, 0, 0, 0);
    emit_fold(q, 2, 0, 10);
    emit_fold(q, 3, 1, 22);
    emit_const(q, 4, 'h1FF);
    emit_const(q, 12, CB + NW - 1);
    q.push_back(a_ldx(3, 12));
    q.push_back(a_and(3, 3, 4));
    q.push_back(a_stx(3, 12));
  endfunction

  // cfg 0 single, 1 MIMD, 2 MIMD-SIMD
  function automatic void build(int cfg, int c);
    logic [15:0] q[$];
    case (cfg)
      0: if (c == 0) begin
        emit_clear(q);
        for (int l = 0; l < NL; l++) begin
          emit_gather(q, leaf_set[l]);
          emit_clmul(q);
          emit_accumulate(q, leaf_off[l]);
        end
        emit_flush(q, CB);
        emit_reduce(q);
      end
      1: begin
        emit_clear(q);
        for (int l = c; l < NL; l += NCPU) begin
          emit_gather(q, leaf_set[l]);
          emit_clmul(q);
          emit_accumulate(q, leaf_off[l]);
        end
        emit_flush(q, PB + 16*c);
        emit_combine(q, c);
        q.push_back(a_bar(4'hF));
        if (c == 0) emit_reduce(q);
      end
      default: begin
        emit_clear(q);
        for (int r = 0; r < (NL + NCPU - 1) / NCPU; r++) begin
          int l;
          l = NCPU*r + c;
          emit_gather(q, l < NL ? leaf_set[l] : '0);
          q.push_back(a_rcfg(MODE_SIMD, 4'hF));
          if (c == 0) begin
            emit_clmul(q);
            q.push_back(a_rcfg(MODE_ASYNC, 4'hF));
          end
          if (l < NL) emit_accumulate(q, leaf_off[l]);
        end
        emit_flush(q, PB + 16*c);
        emit_combine(q, c);
        q.push_back(a_bar(4'hF));
        if (c == 0) emit_reduce(q);
      end
    endcase
    q.push_back(a_halt());
    prog[c] = q;
  endfunction

  // ---------------- data ----------------
  int unsigned seed = 32'hEC233EC2;
  function automatic logic [31:0] rnd32();
    seed = seed * 32'd1103515245 + 32'd12345;
    rnd32[31:16] = seed[30:15];
    seed = seed * 32'd1103515245 + 32'd12345;
    rnd32[15:0] = seed[30:15];
  endfunction

  task automatic host_write(int adr, logic [31:0] v);
    @(negedge clk);
    host_we = 1'b1; host_addr = EXT_AW'(adr); host_wdata = v;
    @(negedge clk) host_we = 1'b0;
  endtask

  task automatic host_read(int adr);
    @(negedge clk) host_addr = EXT_AW'(adr);
    @(negedge clk);
  endtask

  // ---------------- one run ----------------
  task automatic run(int cfg, string name, output longint cycles, output longint nfetch);
    longint t0, f0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2*NW; i++) host_write(CB + i, 32'hDEAD_0000 + i);
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
    for (int i = 0; i < NW; i++) begin
      host_read(CB + i);
      check($sformatf("%s C[%0d]", name, i), longint'(host_rdata), longint'(cref[i]));
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
    logic [NW-1:0] s0 [NW];
    foreach (opa[i]) begin opa[i] = rnd32(); opb[i] = rnd32(); end
    opa[NW-1] &= 32'h1FF;                    // degree <= 232
    opb[NW-1] &= 32'h1FF;
    foreach (cref[i]) cref[i] = '0;
    for (int i = 0; i < NW; i++)
      for (int j = 0; j < NW; j++) begin
        logic [63:0] p;
        p = clmul(opa[i], opb[j]);
        cref[i+j] ^= p[31:0];
        cref[i+j+1] ^= p[63:32];
      end
    // reduction modulo x^233 + x^74 + 1, one bit at a time from the top
    for (int k = 2*NW*32 - 1; k >= 233; k--)
      if (cref[k/32][k%32]) begin
        cref[k/32][k%32] = 1'b0;
        cref[(k-159)/32][(k-159)%32] ^= 1'b1;
        cref[(k-233)/32][(k-233)%32] ^= 1'b1;
      end
    foreach (s0[i]) s0[i] = NW'(1) << i;
    kara(NW, s0, 16'h0001);
    check("Karatsuba leaves", leaf_set.size(), NL);
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < NW; i++) begin
      host_write(AB + i, opa[i]);
      host_write(BB + i, opb[i]);
    end
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
