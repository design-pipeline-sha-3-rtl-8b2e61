// if_id_reg: pipeline register between two stages.
//
// IF/ID: holds the fetched instruction and PC+4 for the ID stage.
// Loads on every rising clock edge (there is no stall or flush: the pipeline
// has no hazard unit). Synchronous, active-high reset clears it to all
// zeros, which is a bubble with every control signal low.
module if_id_reg
  import mips_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  if_id_t d,
  output if_id_t q
);
  always_ff @(posedge clk) begin
    if (reset) q <= '0;
    else       q <= d;
  end
endmodule
