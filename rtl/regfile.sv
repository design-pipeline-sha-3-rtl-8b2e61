// regfile: the 32 x 32-bit register file read in ID and written in WB.
//
// Two asynchronous read ports (ra1/rd1 for rs, ra2/rd2 for rt) and one write
// port written on the rising edge when we is high. Register 0 always reads 0
// and ignores writes. A read of the register being written in the same cycle
// returns the new value (write-through), which stands in for the usual
// "write in the first half, read in the second half" timing: an instruction
// in ID sees the result of the one in WB, three instructions earlier.
// Synchronous reset clears all registers. Write-through and reset are this
// design's choices.
module regfile #(
  parameter int NREGS = 32,
  parameter int W     = 32
) (
  input  logic                     clk,
  input  logic                     reset,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  output logic [W-1:0]             rd1,
  output logic [W-1:0]             rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [W-1:0]             wd
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    if (ra1 == '0)                rd1 = '0;
    else if (we && wa == ra1)     rd1 = wd;
    else                          rd1 = regs[ra1];
    if (ra2 == '0)                rd2 = '0;
    else if (we && wa == ra2)     rd2 = wd;
    else                          rd2 = regs[ra2];
  end
endmodule
