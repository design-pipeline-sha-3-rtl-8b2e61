// sign_extend: widens the 16-bit immediate instr[15:0] to 32 bits by
// replicating bit 15. Used in ID for addi, lw/sw offsets and branch offsets.
// After synthesis it is wiring only (bit 15 fanned out to the upper half);
// it is kept as its own block because the datapath draws it as one.
// Combinational.
module sign_extend (
  input  logic [15:0] a,
  output logic [31:0] y
);
  assign y = {{16{a[15]}}, a};
endmodule
