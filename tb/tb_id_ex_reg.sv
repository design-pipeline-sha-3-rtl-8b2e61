// tb_id_ex_reg: random words pass through one cycle later; reset clears the
// register to zeros (a bubble).
`include "tb_common.svh"
module tb_id_ex_reg;
  import mips_pkg::*;
  `TB_SCAFFOLD(10000)
  logic reset = 1'b1;
  id_ex_t d, q, prev;
  id_ex_reg dut (.clk, .reset, .d, .q);
  function automatic id_ex_t rnd();
    logic [$bits(id_ex_t)-1:0] v;
    for (int i = 0; i < $bits(id_ex_t); i += 32) v[i +: 32] = $urandom;
    return id_ex_t'(v);
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
