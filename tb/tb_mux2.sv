// tb_mux2: both select values with random data, at W = 32 and W = 5.
`include "tb_common.svh"
module tb_mux2;
  `TB_SCAFFOLD(10000)
  logic [31:0] d0, d1, y;
  logic [4:0]  e0, e1, z;
  logic        s;
  mux2 #(.W(32)) dut  (.d0, .d1, .s, .y);
  mux2 #(.W(5))  dut5 (.d0(e0), .d1(e1), .s, .y(z));
  initial begin
    repeat (200) begin
      d0 = $urandom; d1 = $urandom; e0 = 5'($urandom); e1 = 5'($urandom); s = 1'($urandom);
      #1;
      `CHECK(y == (s ? d1 : d0), "mux32")
      `CHECK(z == (s ? e1 : e0), "mux5")
    end
    `TB_END
  end
endmodule
