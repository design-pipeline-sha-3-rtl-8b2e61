// tb_alu: every operation on random and corner operands against values
// computed here with plain SystemVerilog operators; Zero flag checked each
// time.
`include "tb_common.svh"
module tb_alu;
  import mips_pkg::*;
  `TB_SCAFFOLD(20000)
  logic [31:0] a, b, y, e;
  alu_op_t     op;
  logic        zero;
  alu #(.W(32)) dut (.a, .b, .op, .y, .zero);
  alu_op_t ops[9] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_XOR, ALU_NOR, ALU_SUB, ALU_SLT, ALU_SLLV, ALU_SRLV};
  initial begin
    int sa, sb;
    for (int n = 0; n < 3000; n++) begin
      a = $urandom; b = $urandom;
      if (n % 7 == 0) b = a;
      if (n % 11 == 0) a = 32'h8000_0000;
      op = ops[n % 9]; #1;
      sa = int'(a); sb = int'(b);
      case (op)
        ALU_AND:  e = a & b;
        ALU_OR:   e = a | b;
        ALU_ADD:  e = 32'(sa + sb);
        ALU_XOR:  e = a ^ b;
        ALU_NOR:  e = ~(a | b);
        ALU_SUB:  e = 32'(sa - sb);
        ALU_SLT:  e = (sa < sb) ? 32'd1 : 32'd0;
        ALU_SLLV: e = b << (a % 32);
        ALU_SRLV: e = b >> (a % 32);
        default:  e = 'x;
      endcase
      `CHECK(y == e, $sformatf("op %s a=%h b=%h y=%h exp %h", op.name(), a, b, y, e))
      `CHECK(zero == (e == 0), "zero flag")
    end
    `TB_END
  end
endmodule
