// alu_control: selects the ALU operation in the EX stage.
//
// ALUOp 00 gives add (address arithmetic, addi), 01 gives subtract (beq/bne
// compare through the Zero flag) and 10 decodes the R-type funct field
// instr[5:0]. An unknown funct falls back to add. Combinational.
module alu_control
  import mips_pkg::*;
(
  input  aluop_t     aluop,
  input  logic [5:0] funct,
  output alu_op_t    op
);
  always_comb begin
    unique case (aluop)
      ALUOP_ADD: op = ALU_ADD;
      ALUOP_SUB: op = ALU_SUB;
      ALUOP_FUNCT: begin
        unique case (funct)
          FN_ADD:  op = ALU_ADD;
          FN_SUB:  op = ALU_SUB;
          FN_AND:  op = ALU_AND;
          FN_OR:   op = ALU_OR;
          FN_XOR:  op = ALU_XOR;
          FN_NOR:  op = ALU_NOR;
          FN_SLT:  op = ALU_SLT;
          FN_SLLV: op = ALU_SLLV;
          FN_SRLV: op = ALU_SRLV;
          default: op = ALU_ADD;
        endcase
      end
      default: op = ALU_ADD;
    endcase
  end
endmodule
