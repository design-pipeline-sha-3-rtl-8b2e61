// tb_pc_src: all 16 input combinations against the rule
// (beq and Zero) or (bne and not Zero) or jump.
`include "tb_common.svh"
module tb_pc_src;
  `TB_SCAFFOLD(10000)
  logic branch, bne, jump, zero, pcsrc;
  pc_src dut (.branch, .bne, .jump, .zero, .pcsrc);
  initial begin
    bit exp_v;
    for (int i = 0; i < 16; i++) begin
      {branch, bne, jump, zero} = 4'(i); #1;
      exp_v = 1'b0;
      if (jump) exp_v = 1'b1;
      if (branch && zero) exp_v = 1'b1;
      if (bne && !zero) exp_v = 1'b1;
      `CHECK(pcsrc == exp_v, $sformatf("combination %0d", i))
    end
    `TB_END
  end
endmodule
