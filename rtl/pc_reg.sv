// pc_reg: the program counter of the IF stage.
//
// Loads pc_next on every rising clock edge; there is no stall input because
// the pipeline has no hazard unit. A synchronous, active-high reset returns
// the PC to address 0, where the program starts. Reset value and reset style
// are this design's choice.
module pc_reg #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [W-1:0] pc_next,
  output logic [W-1:0] pc
);
  always_ff @(posedge clk) begin
    if (reset) pc <= '0;
    else       pc <= pc_next;
  end
endmodule
