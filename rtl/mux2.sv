// mux2: two-input multiplexer of width W, y = s ? d1 : d0.
//
// One parameterised mux serves the four selection points of the datapath:
// PCSrc (next PC), ALUSrc (ALU B operand), RegDst (write register, W = 5) and
// MemtoReg (write-back data). Combinational.
module mux2 #(
  parameter int W = 32
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         s,
  output logic [W-1:0] y
);
  assign y = s ? d1 : d0;
endmodule
