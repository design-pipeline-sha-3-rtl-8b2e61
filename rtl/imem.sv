// imem: instruction memory of the IF stage.
//
// WORDS 32-bit words, read asynchronously at the word index addr[..:2] of the
// byte address held in the PC, so an instruction is available in the same
// cycle as its PC. A synchronous host write port (we, waddr as a word index,
// wdata) loads the program, normally while the processor is held in reset.
// The array starts at all zeros; an all-zero word is an R-type add whose
// destination is $0, so it acts as a nop. Addresses beyond the
// array read as 0; addr[1:0] is unused because instructions are word
// aligned. Size and load port are this design's choices.
module imem #(
  parameter int WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  localparam int AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we && waddr < 32'(WORDS)) mem[waddr[AW-1:0]] <= wdata;
  end

  logic [31:0] widx;
  assign widx  = {2'b00, addr[31:2]};
  assign rdata = (widx < 32'(WORDS)) ? mem[widx[AW-1:0]] : '0;
endmodule
