// alu: 32-bit arithmetic and logic unit of the EX stage.
//
// a is srca (the rs value), b is srcb (the rt value or the immediate).
// Operations: add, sub, and, or, xor, nor, signed set-less-than, and the
// variable shifts sllv/srlv, which shift b by a[4:0] as MIPS does. Zero is
// high when the result is 0 and drives the branch decision. The logic and
// shift operations are what the Keccak permutation needs: xor for theta and
// iota, nor and and for chi, and pairs of shifts for the 64-bit lane
// rotations of theta and rho. Combinational.
module alu
  import mips_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_t      op,
  output logic [W-1:0] y,
  output logic         zero
);
  localparam int SW = $clog2(W);

  always_comb begin
    unique case (op)
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_ADD:  y = a + b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SUB:  y = a - b;
      ALU_SLT:  y = W'($signed(a) < $signed(b));
      ALU_SLLV: y = b << a[SW-1:0];
      ALU_SRLV: y = b >> a[SW-1:0];
      default:  y = a + b;
    endcase
  end

  assign zero = (y == '0);
endmodule
