// ncore_alu: the 32-bit single-cycle ALU of an N-Core processor.
//
// Combinational: y is the result of op applied to a and b, and flag is the
// outcome of the comparison cmp between a and b (used by CMP to set the
// processor's condition flag). The paper gives a 32-bit ALU with
// single-cycle arithmetic and logic; the operation set is this design's own.
// ALU_LSH8 shifts a left by eight bits and inserts the low byte of b, which
// builds 32-bit constants eight bits at a time.
module ncore_alu
  import qc_pkg::*;
#(
  parameter int unsigned XLEN = 32
) (
  input  alu_op_e         op,
  input  cmp_e            cmp,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y,
  output logic            flag
);
  logic [4:0] sh;
  assign sh = b[4:0];

  always_comb begin
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = a - b;
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SLL:   y = a << sh;
      ALU_SRL:   y = a >> sh;
      ALU_SRA:   y = XLEN'($signed(a) >>> sh);
      ALU_ROR:   y = (a >> sh) | (a << (XLEN - 32'(sh)));
      ALU_PASSB: y = b;
      ALU_LSH8:  y = {a[XLEN-9:0], b[7:0]};
      default:   y = a;
    endcase
  end

  always_comb begin
    unique case (cmp)
      CMP_EQ:  flag = (a == b);
      CMP_NE:  flag = (a != b);
      CMP_LT:  flag = ($signed(a) < $signed(b));
      CMP_LTU: flag = (a < b);
      CMP_GE:  flag = ($signed(a) >= $signed(b));
      CMP_GEU: flag = (a >= b);
      default: flag = 1'b0;
    endcase
  end
endmodule
