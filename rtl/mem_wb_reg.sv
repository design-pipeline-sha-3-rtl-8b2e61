// mem_wb_reg: pipeline register between two stages.
//
// MEM/WB: holds the WB control group, the loaded word, the ALU result and the write register for the WB stage.
// Loads on every rising clock edge (there is no stall or flush: the pipeline
// has no hazard unit). Synchronous, active-high reset clears it to all
// zeros, which is a bubble with every control signal low.
module mem_wb_reg
  import mips_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  mem_wb_t d,
  output mem_wb_t q
);
  always_ff @(posedge clk) begin
    if (reset) q <= '0;
    else       q <= d;
  end
endmodule
