// qc_asm.svh: instruction-word builders for the QuadroCore encoding (see
// qc_pkg), used by testbenches to write small programs.
`ifndef QC_ASM_SVH
`define QC_ASM_SVH
function automatic logic [15:0] a_rrr(logic [3:0] op, int rd, int rs, int rt);
  return {op, 4'(rd), 4'(rs), 4'(rt)};
endfunction
function automatic logic [15:0] a_add(int rd, int rs, int rt); return a_rrr(4'h1, rd, rs, rt); endfunction
function automatic logic [15:0] a_sub(int rd, int rs, int rt); return a_rrr(4'h2, rd, rs, rt); endfunction
function automatic logic [15:0] a_and(int rd, int rs, int rt); return a_rrr(4'h3, rd, rs, rt); endfunction
function automatic logic [15:0] a_or(int rd, int rs, int rt);  return a_rrr(4'h4, rd, rs, rt); endfunction
function automatic logic [15:0] a_xor(int rd, int rs, int rt); return a_rrr(4'h5, rd, rs, rt); endfunction
function automatic logic [15:0] a_mul(int rd, int rs, int rt); return a_rrr(4'h6, rd, rs, rt); endfunction
function automatic logic [15:0] a_shift(int rd, int kind, int amt); return {4'h7, 4'(rd), 2'(kind), 1'b0, 5'(amt)}; endfunction
function automatic logic [15:0] a_li(int rd, int imm);   return {4'h8, 4'(rd), 8'(imm)}; endfunction
function automatic logic [15:0] a_lsh(int rd, int imm);  return {4'h9, 4'(rd), 8'(imm)}; endfunction
function automatic logic [15:0] a_addi(int rd, int imm); return {4'hA, 4'(rd), 8'(imm)}; endfunction
function automatic logic [15:0] a_mem(int r, int base, int sub); return {4'hB, 4'(r), 4'(base), 4'(sub)}; endfunction
function automatic logic [15:0] a_ldl(int rd, int base); return a_mem(rd, base, 0); endfunction
function automatic logic [15:0] a_stl(int rs, int base); return a_mem(rs, base, 1); endfunction
function automatic logic [15:0] a_ldx(int rd, int base); return a_mem(rd, base, 2); endfunction
function automatic logic [15:0] a_stx(int rs, int base); return a_mem(rs, base, 3); endfunction
function automatic logic [15:0] a_ldv(int rd, int base); return a_mem(rd, base, 4); endfunction
function automatic logic [15:0] a_stv(int rs, int base); return a_mem(rs, base, 5); endfunction
function automatic logic [15:0] a_lds(int rd, int idx); return {4'hC, 4'(rd), 1'b0, 2'b0, 5'(idx)}; endfunction
function automatic logic [15:0] a_sts(int rs, int idx); return {4'hC, 4'(rs), 1'b1, 2'b0, 5'(idx)}; endfunction
function automatic logic [15:0] a_br(int cond, int off); return {4'hD, 2'(cond), 10'(off)}; endfunction
function automatic logic [15:0] a_bar(int mask); return {4'hE, 4'h0, 4'h0, 4'(mask)}; endfunction
function automatic logic [15:0] a_rcfg(int mode, int mask); return {4'hE, 4'h1, 2'b0, 2'(mode), 4'(mask)}; endfunction
function automatic logic [15:0] a_sflg(); return {4'hE, 4'h2, 8'h0}; endfunction
function automatic logic [15:0] a_halt(); return {4'hE, 4'h3, 8'h0}; endfunction
function automatic logic [15:0] a_sbr(int kind, int mask, int off); return {4'hE, 1'b1, 2'(kind), 4'(mask), 5'(off)}; endfunction
function automatic logic [15:0] a_cmp(int cond, int rs, int rt); return {4'hF, 4'(cond), 4'(rs), 4'(rt)}; endfunction
function automatic logic [15:0] a_nop(); return 16'h0000; endfunction
`endif
