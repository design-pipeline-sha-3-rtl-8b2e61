// tb_mem_wb_reg: random words pass through one cycle later; reset clears the
// register to zeros (a bubble).
`include "tb_common.svh"
module tb_mem_wb_reg;
  import mips_pkg::*;
  `TB_SCAFFOLD(10000)
  logic reset = 1'b1;
  mem_wb_t d, q, prev;
  mem_wb_reg dut (.clk, .reset, .d, .q);
  function automatic mem_wb_t rnd();
    logic [$bits(mem_wb_t)-1:0] v;
    for (int i = 0; i < $bits(mem_wb_t); i += 32) v[i +: 32] = $urandom;
    return mem_wb_t'(v);
  endfunction
  initial begin
    d = rnd();
    @(negedge clk); @(negedge clk);
    `CHECK(q == '0, "reset clears")
    reset = 1'b0;
    repeat (100) begin
      prev = rnd(); d = prev;
      @(negedge clk);
      `CHECK(q == prev, "load")
    end
    reset = 1'b1; @(negedge clk);
    `CHECK(q == '0, "reset again")
    `TB_END
  end
endmodule
