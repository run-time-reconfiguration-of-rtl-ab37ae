// ncore_decode: instruction decoder of an N-Core processor.
//
// Combinational. Turns a 16-bit instruction word (encoding listed in qc_pkg)
// into the decoded form dec_t that travels from the decode stage, through
// the reconfigurable interconnect, to an execute stage. Because decoded
// instructions, not raw ones, cross the interconnect, a SIMD master's single
// decode serves every processor of its group. Register operands are decoded
// here but read in the execute stage, from the executing processor's own
// register file. Unknown encodings decode to a bubble.
module ncore_decode
  import qc_pkg::*;
(
  input  logic        valid,
  input  logic [15:0] instr,
  input  logic [13:0] pc,
  output dec_t        dec
);
  logic [3:0] fa, fb, fc;
  assign fa = instr[11:8];
  assign fb = instr[7:4];
  assign fc = instr[3:0];

  always_comb begin
    dec       = '0;
    dec.pc    = pc;
    dec.rd    = fa;
    dec.rs    = fb;
    dec.rt    = fc;
    dec.valid = valid;
    dec.kind  = EX_NOP;
    dec.misc  = EX2_NONE;
    dec.alu   = ALU_ADD;
    dec.cmp   = CMP_EQ;
    dec.rmode = MODE_ASYNC;
    unique case (opcode_e'(instr[15:12]))
      OP_NOP:   dec.kind = EX_NOP;
      OP_ADD:   begin dec.kind = EX_ALU; dec.alu = ALU_ADD; end
      OP_SUB:   begin dec.kind = EX_ALU; dec.alu = ALU_SUB; end
      OP_AND:   begin dec.kind = EX_ALU; dec.alu = ALU_AND; end
      OP_OR:    begin dec.kind = EX_ALU; dec.alu = ALU_OR;  end
      OP_XOR:   begin dec.kind = EX_ALU; dec.alu = ALU_XOR; end
      OP_MUL:   dec.kind = EX_MUL;
      OP_SHIFT: begin
        dec.kind  = EX_ALU;
        dec.rs    = fa;
        dec.b_imm = 1'b1;
        dec.imm   = 32'(instr[4:0]);
        unique case (instr[7:6])
          2'd0: dec.alu = ALU_SLL;
          2'd1: dec.alu = ALU_SRL;
          2'd2: dec.alu = ALU_SRA;
          default: dec.alu = ALU_ROR;
        endcase
      end
      OP_LI:    begin dec.kind = EX_ALU; dec.alu = ALU_PASSB; dec.b_imm = 1'b1;
                      dec.imm = 32'($signed(instr[7:0])); end
      OP_LSH:   begin dec.kind = EX_ALU; dec.alu = ALU_LSH8; dec.rs = fa; dec.b_imm = 1'b1;
                      dec.imm = 32'(instr[7:0]); end
      OP_ADDI:  begin dec.kind = EX_ALU; dec.alu = ALU_ADD; dec.rs = fa; dec.b_imm = 1'b1;
                      dec.imm = 32'($signed(instr[7:0])); end
      OP_MEM: begin
        unique case (fc)
          4'd0: dec.kind = EX_LDL;
          4'd1: dec.kind = EX_STL;
          4'd2: dec.kind = EX_LDX;
          4'd3: dec.kind = EX_STX;
          4'd4: dec.kind = EX_LDV;
          4'd5: dec.kind = EX_STV;
          default: dec.valid = 1'b0;
        endcase
      end
      OP_SRF: begin
        dec.kind = instr[7] ? EX_STS : EX_LDS;
        dec.sidx = instr[4:0];
      end
      OP_BR: begin
        dec.kind  = EX_BR;
        dec.bcond = instr[11:10];
        dec.imm   = 32'($signed(instr[9:0]));
      end
      OP_EXT: begin
        if (instr[11]) begin
          dec.kind  = EX_SBR;
          dec.bcond = instr[10:9];
          dec.mask  = instr[8:5];
          dec.imm   = 32'($signed(instr[4:0]));
        end else begin
          unique case (instr[10:8])
            3'd0: begin dec.kind = EX_BAR; dec.mask = fc; end
            3'd1: begin dec.kind = EX_RCFG; dec.mask = fc; dec.rmode = mode_e'(instr[5:4]); end
            3'd2: begin dec.kind = EX_NOP; dec.misc = EX2_SFLG; end
            3'd3: begin dec.kind = EX_NOP; dec.misc = EX2_HALT; end
            default: dec.valid = 1'b0;
          endcase
        end
      end
      OP_CMP:   begin dec.kind = EX_CMP; dec.cmp = cmp_e'(fa[2:0]); end
      default:  dec.valid = 1'b0;
    endcase
    if (!valid) dec = '0;
  end
endmodule
