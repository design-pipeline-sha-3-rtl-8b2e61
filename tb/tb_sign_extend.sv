// tb_sign_extend: exhaustive over all 65536 immediates; the expected value
// comes from a signed 16-bit to int conversion.
`include "tb_common.svh"
module tb_sign_extend;
  `TB_SCAFFOLD(10000)
  logic [15:0] a;
  logic [31:0] y;
  shortint     sv;
  int          iv;
  sign_extend dut (.a, .y);
  initial begin
    for (int i = 0; i < 65536; i++) begin
      a = 16'(i); #1;
      sv = shortint'(a); iv = int'(sv);
      `CHECK(y == 32'(iv), $sformatf("%h -> %h", a, y))
    end
    `TB_END
  end
endmodule
