// tb_imem: words written through the load port are read back at byte
// address 4*index, in the same cycle as the address; unwritten words read 0;
// addresses past the end read 0.
`include "tb_common.svh"
module tb_imem;
  `TB_SCAFFOLD(20000)
  localparam int WORDS = 64;
  logic [31:0] addr = '0, rdata, waddr = '0, wdata = '0;
  logic        we = 1'b0;
  logic [31:0] model [WORDS];
  imem #(.WORDS(WORDS)) dut (.clk, .addr, .rdata, .we, .waddr, .wdata);
  initial begin
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < WORDS; i += 2) begin
      @(negedge clk); we = 1'b1; waddr = i; wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < WORDS; i++) begin
      addr = 32'(4 * i); #1;
      `CHECK(rdata == model[i], $sformatf("word %0d", i))
    end
    addr = 32'(4 * WORDS); #1;
    `CHECK(rdata == 0, "past the end")
    `TB_END
  end
endmodule
