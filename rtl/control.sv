// control: main decoder of the ID stage.
//
// Turns the opcode instr[31:26] into the control word, grouped as in the
// classic pipelined datapath into EX (RegDst, ALUSrc, ALUOp), M (Branch,
// MemRead, MemWrite, plus this design's Bne and Jump) and WB (RegWrite,
// MemtoReg). The groups ride down the pipeline registers with the
// instruction. An opcode outside the subset yields an all-zero word, which
// makes the instruction a nop. Combinational.
module control
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '0;
    unique case (opcode)
      OP_RTYPE: begin
        ctrl.ex.reg_dst   = 1'b1;
        ctrl.ex.alu_op    = ALUOP_FUNCT;
        ctrl.wb.reg_write = 1'b1;
      end
      OP_LW: begin
        ctrl.ex.alu_src    = 1'b1;
        ctrl.ex.alu_op     = ALUOP_ADD;
        ctrl.m.mem_read    = 1'b1;
        ctrl.wb.reg_write  = 1'b1;
        ctrl.wb.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.ex.alu_src  = 1'b1;
        ctrl.ex.alu_op   = ALUOP_ADD;
        ctrl.m.mem_write = 1'b1;
      end
      OP_ADDI: begin
        ctrl.ex.alu_src   = 1'b1;
        ctrl.ex.alu_op    = ALUOP_ADD;
        ctrl.wb.reg_write = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ex.alu_op = ALUOP_SUB;
        ctrl.m.branch  = 1'b1;
      end
      OP_BNE: begin
        ctrl.ex.alu_op = ALUOP_SUB;
        ctrl.m.bne     = 1'b1;
      end
      OP_J: begin
        ctrl.m.jump = 1'b1;
      end
      default: ctrl = '0;
    endcase
  end
endmodule
