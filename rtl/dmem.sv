// dmem: data memory of the MEM stage.
//
// WORDS 32-bit words addressed by byte address; the word index is
// addr[..:2] and the two low bits (of both ports) are unused (only word loads and stores are
// in the instruction subset). The processor port reads asynchronously while
// MemRead is high (rdata is 0 otherwise) and writes on the rising edge when
// MemWrite is high. A second host port (h_*) reads asynchronously and writes
// synchronously; it is used to place the round-constant tables and the padded
// message before a run and to read the digest afterwards. If both ports write
// the same cycle, the processor's write is applied last and wins. Addresses
// beyond the array read as 0 and writes there are dropped. Size, host port
// and read gating are this design's choices.
module dmem #(
  parameter int WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic        we,
  input  logic        re,
  output logic [31:0] rdata,
  input  logic        h_we,
  input  logic [31:0] h_addr,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata
);
  localparam int AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  logic [31:0] idx, hidx;
  assign idx  = {2'b00, addr[31:2]};
  assign hidx = {2'b00, h_addr[31:2]};

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (h_we && hidx < 32'(WORDS)) mem[hidx[AW-1:0]] <= h_wdata;
    if (we && idx < 32'(WORDS))    mem[idx[AW-1:0]]  <= wdata;
  end

  assign rdata   = (re && idx < 32'(WORDS)) ? mem[idx[AW-1:0]] : '0;
  assign h_rdata = (hidx < 32'(WORDS)) ? mem[hidx[AW-1:0]] : '0;
endmodule
