// tb_control: every opcode of the subset against the expected control
// word (the classic single-cycle control table, extended by bne and j),
// and unknown opcodes decode to all zeros.
`include "tb_common.svh"
module tb_control;
  import mips_pkg::*;
  `TB_SCAFFOLD(10000)
  logic [5:0] opcode;
  ctrl_t      ctrl;
  control dut (.opcode, .ctrl);
  // expected {RegWrite, MemtoReg, Branch, Bne, Jump, MemRead, MemWrite, RegDst, ALUSrc, ALUOp[1:0]}
  function automatic logic [10:0] expect_of(int op);
    case (op)
      0:  return 11'b1_0_0_0_0_0_0_1_0_10;   // R-type
      35: return 11'b1_1_0_0_0_1_0_0_1_00;   // lw
      43: return 11'b0_0_0_0_0_0_1_0_1_00;   // sw
      8:  return 11'b1_0_0_0_0_0_0_0_1_00;   // addi
      4:  return 11'b0_0_1_0_0_0_0_0_0_01;   // beq
      5:  return 11'b0_0_0_1_0_0_0_0_0_01;   // bne
      2:  return 11'b0_0_0_0_1_0_0_0_0_00;   // j
      default: return 11'b0;
    endcase
  endfunction
  initial begin
    logic [10:0] got;
    for (int op = 0; op < 64; op++) begin
      opcode = 6'(op); #1;
      got = {ctrl.wb.reg_write, ctrl.wb.mem_to_reg, ctrl.m.branch, ctrl.m.bne, ctrl.m.jump,
             ctrl.m.mem_read, ctrl.m.mem_write, ctrl.ex.reg_dst, ctrl.ex.alu_src, ctrl.ex.alu_op};
      `CHECK(got == expect_of(op), $sformatf("opcode %0d: %b", op, got))
    end
    `TB_END
  end
endmodule
