// tb_dmem: random processor and host accesses against a shadow array:
// synchronous writes, asynchronous reads, read data 0 while MemRead is low,
// the processor's write winning a same-word collision.
`include "tb_common.svh"
module tb_dmem;
  `TB_SCAFFOLD(20000)
  localparam int WORDS = 64;
  logic [31:0] addr = '0, wdata = '0, rdata, h_addr = '0, h_wdata = '0, h_rdata;
  logic        we = 1'b0, re = 1'b0, h_we = 1'b0;
  logic [31:0] model [WORDS];
  dmem #(.WORDS(WORDS)) dut (.clk, .addr, .wdata, .we, .re, .rdata, .h_we, .h_addr, .h_wdata, .h_rdata);
  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (1500) begin
      @(negedge clk);
      addr = 32'(4 * $urandom_range(0, WORDS - 1)); h_addr = 32'(4 * $urandom_range(0, WORDS - 1));
      if ($urandom_range(0, 4) == 0) h_addr = addr;
      we = 1'($urandom); h_we = 1'($urandom); re = 1'($urandom);
      wdata = $urandom; h_wdata = $urandom;
      #1;
      `CHECK(rdata == (re ? model[addr/4] : 32'd0), "processor read")
      `CHECK(h_rdata == model[h_addr/4], "host read")
      @(posedge clk);
      if (h_we) model[h_addr/4] = h_wdata;
      if (we)   model[addr/4]   = wdata;
    end
    @(negedge clk); we = 1'b0; h_we = 1'b0; re = 1'b1; addr = 32'(4 * WORDS); #1;
    `CHECK(rdata == 0, "past the end")
    `TB_END
  end
endmodule
