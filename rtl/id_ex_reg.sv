// id_ex_reg: pipeline register between two stages.
//
// ID/EX: holds the EX, M and WB control groups, PC+4, both register operands, the sign-extended immediate (its low six bits are the funct field), rt, rd and the jump index for the EX stage.
// Loads on every rising clock edge (there is no stall or flush: the pipeline
// has no hazard unit). Synchronous, active-high reset clears it to all
// zeros, which is a bubble with every control signal low.
module id_ex_reg
  import mips_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  id_ex_t d,
  output id_ex_t q
);
  always_ff @(posedge clk) begin
    if (reset) q <= '0;
    else       q <= d;
  end
endmodule
