// branch_target: target address computation of the EX stage.
//
// For beq/bne the target is PC+4 plus the sign-extended offset shifted left
// by two (the "shift left 2" and branch adder of the datapath, merged here).
// For j (jump high) the target is pseudodirect: {PC+4[31:28], index, 2'b00}.
// The chosen target is carried to MEM, where the branch decision is made.
// imm[31:30] is unused: shifting left by two drops it. Combinational.
module branch_target (
  input  logic [31:0] pc4,
  input  logic [31:0] imm,
  input  logic        jump,
  input  logic [25:0] jindex,
  output logic [31:0] target
);
  logic [31:0] btarget;
  assign btarget = pc4 + {imm[29:0], 2'b00};
  assign target  = jump ? {pc4[31:28], jindex, 2'b00} : btarget;
endmodule
