// tb_pc_reg: reset to 0, then pc follows pc_next one cycle later; reset
// again in the middle of a sequence.
`include "tb_common.svh"
module tb_pc_reg;
  `TB_SCAFFOLD(10000)
  logic reset = 1'b1;
  logic [31:0] pc_next = 32'h1234, pc;
  pc_reg #(.W(32)) dut (.clk, .reset, .pc_next, .pc);
  initial begin
    logic [31:0] prev;
    @(negedge clk); @(negedge clk);
    `CHECK(pc == 0, "reset value")
    reset = 1'b0;
    repeat (50) begin
      prev = $urandom; pc_next = prev;
      @(negedge clk);
      `CHECK(pc == prev, "load")
    end
    reset = 1'b1; pc_next = 32'hABCD;
    @(negedge clk);
    `CHECK(pc == 0, "reset during run")
    `TB_END
  end
endmodule
