// qc_pkg: types and constants shared by the QuadroCore cluster.
//
// The cluster has four 32-bit N-Core processors with 16-bit instructions, a
// 16x32 local register file each, a 32x32 shared register file and a shared
// external memory. Those sizes follow the paper. The instruction encoding
// below is this design's own: the paper keeps the base N-Core instruction
// set and only says that the extensions (barrier, reconfiguration, shared
// register access, shared branch condition, collective branch, fast adjacent
// memory access) live in its free opcode space.
//
// Instruction formats (16 bits, fields [15:12] opcode, [11:8] a, [7:4] b, [3:0] c):
//   0x0 NOP
//   0x1..0x5 ADD/SUB/AND/OR/XOR  rd=a, rs=b, rt=c          rd = rs op rt
//   0x6 MUL                      rd=a, rs=b, rt=c          rd = low(rs*rt)
//   0x7 SHIFT rd=a, [7:6] kind (SLL,SRL,SRA,ROR), [4:0] amount: rd = rd shift amt
//   0x8 LI   rd=a, imm8                                    rd = sext(imm8)
//   0x9 LSH  rd=a, imm8                                    rd = (rd<<8)|imm8
//   0xA ADDI rd=a, imm8                                    rd = rd + sext(imm8)
//   0xB MEM  rd=a, rs=b (address), [3:0] sub:
//            0 LDL / 1 STL   local data memory, 3 cycles
//            2 LDX / 3 STX   external memory, one word, 6..15 cycles
//            4 LDV / 5 STV   external memory, fast adjacent access, 7 cycles
//   0xC SRF  r=a, [7] store, [4:0] shared register index, 2 cycles
//   0xD BR   [11:10] cond (0 always, 1 F set, 2 F clear), [9:0] signed offset
//   0xE EXT  [11:8] sub:
//            0 BAR   [3:0] barrier mask
//            1 RCFG  [5:4] mode, [3:0] processor mask
//            2 SFLG  publish own condition flag F
//            3 HALT
//            8..15 SBR [10:9] kind (0 flag of k set, 1 flag of k clear,
//                      2 all flags of mask set, 3 any flag of mask set),
//                      [8:5] mask (k = [6:5]), [4:0] signed offset
//   0xF CMP  [11:8] cond (0 EQ,1 NE,2 LT,3 LTU,4 GE,5 GEU), rs=b, rt=c -> F
// Branch targets are relative to the address of the branch instruction.
package qc_pkg;

  localparam int unsigned XLEN   = 32;
  localparam int unsigned NCPU   = 4;
  localparam int unsigned NLREGS = 16;   // local registers per processor
  localparam int unsigned NSREGS = 32;   // shared registers
  localparam int unsigned EXT_AW = 16;   // external memory word address width

  typedef enum logic [3:0] {
    OP_NOP  = 4'h0, OP_ADD = 4'h1, OP_SUB = 4'h2, OP_AND  = 4'h3,
    OP_OR   = 4'h4, OP_XOR = 4'h5, OP_MUL = 4'h6, OP_SHIFT = 4'h7,
    OP_LI   = 4'h8, OP_LSH = 4'h9, OP_ADDI = 4'hA, OP_MEM = 4'hB,
    OP_SRF  = 4'hC, OP_BR  = 4'hD, OP_EXT = 4'hE, OP_CMP   = 4'hF
  } opcode_e;

  // ALU operations
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA,
    ALU_ROR, ALU_PASSB, ALU_LSH8
  } alu_op_e;

  typedef enum logic [2:0] {
    CMP_EQ = 3'd0, CMP_NE = 3'd1, CMP_LT = 3'd2, CMP_LTU = 3'd3,
    CMP_GE = 3'd4, CMP_GEU = 3'd5
  } cmp_e;

  // Operating modes selected by the reconfiguration instruction (Table I).
  // Fast memory access and shared-register communication are instructions
  // available in every mode, not separate mode register settings.
  typedef enum logic [1:0] {
    MODE_ASYNC = 2'd0,   // asynchronous MIMD, barriers for synchronisation
    MODE_SYNC  = 2'd1,   // synchronous MIMD, lock-step group
    MODE_SIMD  = 2'd2    // SIMD, lowest processor of the mask is the master
  } mode_e;

  // Execute-stage instruction classes
  typedef enum logic [3:0] {
    EX_NOP, EX_ALU, EX_MUL, EX_CMP, EX_LDL, EX_STL, EX_LDX, EX_STX, EX_LDV,
    EX_STV, EX_LDS, EX_STS, EX_BR, EX_SBR, EX_BAR, EX_RCFG
  } ex_kind_e;

  typedef enum logic [3:0] {
    EX2_NONE, EX2_SFLG, EX2_HALT
  } ex_misc_e;

  // Decoded instruction: what the decode stage hands to an execute stage,
  // either its own or, in SIMD mode, that of every processor in the group.
  typedef struct packed {
    logic          valid;
    ex_kind_e      kind;
    ex_misc_e      misc;
    alu_op_e       alu;
    logic          b_imm;      // ALU operand b is the immediate
    cmp_e          cmp;
    logic [3:0]    rd;
    logic [3:0]    rs;
    logic [3:0]    rt;
    logic [31:0]   imm;
    logic [1:0]    bcond;      // BR condition / SBR kind
    logic [3:0]    mask;       // barrier, reconfiguration or SBR mask
    mode_e         rmode;      // RCFG target mode
    logic [4:0]    sidx;       // shared register index
    logic [13:0]   pc;         // address of the instruction
  } dec_t;

  localparam dec_t DEC_BUBBLE = '0;

  // One processor's request to the external-memory bus
  typedef struct packed {
    logic              valid;
    logic              we;
    logic              block;   // fast adjacent access: one transaction, four lanes
    logic [NCPU-1:0]   lanes;   // processors receiving / supplying a lane
    logic [EXT_AW-1:0] addr;    // word address (base for block accesses)
  } xreq_t;

  // Lowest set bit of a processor mask: the SIMD master of that group
  function automatic logic [1:0] mask_master(logic [NCPU-1:0] m);
    logic [1:0] r;
    r = '0;
    for (int i = NCPU - 1; i >= 0; i--) if (m[i]) r = 2'(i);
    return r;
  endfunction

endpackage
