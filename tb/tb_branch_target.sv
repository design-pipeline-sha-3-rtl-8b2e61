// tb_branch_target: branch targets for positive and negative word offsets,
// computed as pc4 + 4*offset, and pseudodirect jump targets.
`include "tb_common.svh"
module tb_branch_target;
  `TB_SCAFFOLD(10000)
  logic [31:0] pc4, imm, target;
  logic        jump;
  logic [25:0] jindex;
  branch_target dut (.pc4, .imm, .jump, .jindex, .target);
  initial begin
    int off;
    repeat (300) begin
      pc4 = {$urandom} & 32'hFFFF_FFFC; off = $urandom_range(0, 65535) - 32768;
      imm = 32'(off); jump = 1'b0; jindex = 26'($urandom); #1;
      `CHECK(target == pc4 + 32'(off * 4), $sformatf("branch pc4=%h off=%0d", pc4, off))
      jump = 1'b1; #1;
      `CHECK(target == ((pc4 & 32'hF000_0000) | (32'(jindex) * 4)), "jump")
    end
    `TB_END
  end
endmodule
