// tb_common.svh: shared testbench scaffolding: a free-running clock, check
// counters, a CHECK macro and a watchdog that ends the run after a fixed
// number of cycles with a failure.
`ifndef TB_COMMON_SVH
`define TB_COMMON_SVH
`define TB_SCAFFOLD(WATCHDOG_CYCLES) \
  logic clk = 1'b0; \
  always #5 clk = ~clk; \
  int checks = 0, failures = 0; \
  initial begin : watchdog \
    repeat (WATCHDOG_CYCLES) @(posedge clk); \
    failures++; \
    $display("FAIL: watchdog"); \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s", msg); end end
`define TB_END \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
