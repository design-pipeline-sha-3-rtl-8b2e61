// tb_regfile: random writes and reads against a shadow array; register 0
// stays 0; a read of the register written in the same cycle returns the new
// value; reset clears everything.
`include "tb_common.svh"
module tb_regfile;
  `TB_SCAFFOLD(20000)
  logic reset = 1'b1, we = 1'b0;
  logic [4:0]  ra1 = '0, ra2 = '0, wa = '0;
  logic [31:0] wd = '0, rd1, rd2;
  logic [31:0] shadow [32];
  regfile #(.NREGS(32), .W(32)) dut (.clk, .reset, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);
  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    @(negedge clk); @(negedge clk); reset = 1'b0;
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); #1;
      `CHECK(rd1 == 0, "reset clears")
    end
    repeat (2000) begin
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = ($urandom_range(0, 3) == 0) ? wa : 5'($urandom);
      #1;
      `CHECK(rd1 == ((we && wa == ra1 && ra1 != 0) ? wd : shadow[ra1]), "rd1")
      `CHECK(rd2 == ((we && wa == ra2 && ra2 != 0) ? wd : shadow[ra2]), "rd2")
      @(negedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    we = 1'b0; ra1 = 0; #1;
    `CHECK(rd1 == 0, "$0 reads 0")
    `TB_END
  end
endmodule
