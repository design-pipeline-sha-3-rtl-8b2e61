// ex_mem_reg: pipeline register between two stages.
//
// EX/MEM: holds the M and WB control groups, the branch or jump target, the Zero flag, the ALU result, the store data and the write register for the MEM stage.
// Loads on every rising clock edge (there is no stall or flush: the pipeline
// has no hazard unit). Synchronous, active-high reset clears it to all
// zeros, which is a bubble with every control signal low.
module ex_mem_reg
  import mips_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  ex_mem_t d,
  output ex_mem_t q
);
  always_ff @(posedge clk) begin
    if (reset) q <= '0;
    else       q <= d;
  end
endmodule
