// tb_ncore_alu: compares every ALU operation and comparison with a reference
// model on random and corner-case operands.
`timescale 1ns/1ps
module tb_ncore_alu;
  import qc_pkg::*;
  alu_op_e op; cmp_e cmp; logic [31:0] a, b, y; logic flag;
  int checks = 0, failures = 0;
  ncore_alu dut (.*);
  function automatic logic [31:0] ref_y(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD: return x + z;  ALU_SUB: return x - z;  ALU_AND: return x & z;
      ALU_OR:  return x | z;  ALU_XOR: return x ^ z;
      ALU_SLL: return x << z[4:0]; ALU_SRL: return x >> z[4:0];
      ALU_SRA: return 32'($signed(x) >>> z[4:0]);
      ALU_ROR: return 32'({x, x} >> z[4:0]);
      ALU_PASSB: return z;
      ALU_LSH8: return (x << 8) | {24'h0, z[7:0]};
      default: return x;
    endcase
  endfunction
  function automatic logic ref_f(cmp_e c, logic [31:0] x, logic [31:0] z);
    case (c)
      CMP_EQ: return x == z; CMP_NE: return x != z;
      CMP_LT: return $signed(x) < $signed(z); CMP_LTU: return x < z;
      CMP_GE: return $signed(x) >= $signed(z); default: return x >= z;
    endcase
  endfunction
  initial begin
    for (int n = 0; n < 3000; n++) begin
      op  = alu_op_e'($urandom_range(0, 10));
      cmp = cmp_e'($urandom_range(0, 5));
      case (n % 4)
        0: begin a = $urandom; b = $urandom; end
        1: begin a = 32'h8000_0000; b = $urandom_range(0, 40); end
        2: begin a = $urandom; b = a; end
        default: begin a = 32'hFFFF_FFFF; b = 32'(n); end
      endcase
      #1;
      checks += 2;
      if (y !== ref_y(op, a, b)) begin failures++; $display("FAIL %s %h %h -> %h", op.name(), a, b, y); end
      if (flag !== ref_f(cmp, a, b)) begin failures++; $display("FAIL cmp %s %h %h", cmp.name(), a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
