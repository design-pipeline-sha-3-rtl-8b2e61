// pc_src: the branch decision of the MEM stage.
//
// PCSrc = (Branch & Zero) | (Bne & ~Zero) | Jump. The Branch AND gate is the
// one of the classic datapath; the bne and jump terms are this design's
// additions. When PCSrc is high the PC loads the target held in EX/MEM, so
// the three instructions already fetched behind a taken branch or jump still
// execute (no flush). Combinational.
module pc_src (
  input  logic branch,
  input  logic bne,
  input  logic jump,
  input  logic zero,
  output logic pcsrc
);
  assign pcsrc = (branch & zero) | (bne & ~zero) | jump;
endmodule
