// adder: W-bit two's-complement adder, y = a + b (carry out dropped).
//
// Used in the IF stage to form PC+4. Purely combinational.
module adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  assign y = a + b;
endmodule
