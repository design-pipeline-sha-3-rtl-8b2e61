// tb_alu_control: the three ALUOp cases and every supported funct code
// against the MIPS32 funct table written out here.
`include "tb_common.svh"
module tb_alu_control;
  import mips_pkg::*;
  `TB_SCAFFOLD(10000)
  aluop_t     aluop;
  logic [5:0] funct;
  alu_op_t    op;
  alu_control dut (.aluop, .funct, .op);
  initial begin
    for (int f = 0; f < 64; f++) begin
      funct = 6'(f);
      aluop = ALUOP_ADD; #1; `CHECK(op == ALU_ADD, "ALUOp 00 -> add")
      aluop = ALUOP_SUB; #1; `CHECK(op == ALU_SUB, "ALUOp 01 -> sub")
    end
    aluop = ALUOP_FUNCT;
    funct = 6'd32; #1; `CHECK(op == ALU_ADD,  "add")
    funct = 6'd34; #1; `CHECK(op == ALU_SUB,  "sub")
    funct = 6'd36; #1; `CHECK(op == ALU_AND,  "and")
    funct = 6'd37; #1; `CHECK(op == ALU_OR,   "or")
    funct = 6'd38; #1; `CHECK(op == ALU_XOR,  "xor")
    funct = 6'd39; #1; `CHECK(op == ALU_NOR,  "nor")
    funct = 6'd42; #1; `CHECK(op == ALU_SLT,  "slt")
    funct = 6'd4;  #1; `CHECK(op == ALU_SLLV, "sllv")
    funct = 6'd6;  #1; `CHECK(op == ALU_SRLV, "srlv")
    `TB_END
  end
endmodule
