// tb_ex_mem_reg: random words pass through one cycle later; reset clears the
// register to zeros (a bubble).
`include "tb_common.svh"
module tb_ex_mem_reg;
  import mips_pkg::*;
  `TB_SCAFFOLD(10000)
  logic reset = 1'b1;
  ex_mem_t d, q, prev;
  ex_mem_reg dut (.clk, .reset, .d, .q);
  function automatic ex_mem_t rnd();
    logic [$bits(ex_mem_t)-1:0] v;
    for (int i = 0; i < $bits(ex_mem_t); i += 32) v[i +: 32] = $urandom;
    return ex_mem_t'(v);
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
