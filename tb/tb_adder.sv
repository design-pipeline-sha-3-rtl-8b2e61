// tb_adder: random and corner operands; sum compared with 64-bit arithmetic
// truncated to 32 bits.
`include "tb_common.svh"
module tb_adder;
  `TB_SCAFFOLD(10000)
  logic [31:0] a, b, y;
  longint unsigned s;
  adder #(.W(32)) dut (.a, .b, .y);
  initial begin
    static logic [31:0] av[4] = '{32'h0, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000};
    foreach (av[i]) foreach (av[j]) begin
      a = av[i]; b = av[j]; #1;
      s = longint'(a) + longint'(b);
      `CHECK(y == s[31:0], $sformatf("%h+%h=%h", a, b, y))
    end
    repeat (500) begin
      a = $urandom; b = $urandom; #1;
      s = longint'(a) + longint'(b);
      `CHECK(y == s[31:0], $sformatf("%h+%h=%h", a, b, y))
    end
    a = 32'h0000_0010; b = 32'd4; #1;
    `CHECK(y == 32'h14, "PC+4")
    `TB_END
  end
endmodule
