// Shared testbench helpers: a clock, check counters, a check macro, a watchdog and the
// result line every testbench ends with.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
`define TB_CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s", msg); end end
`define TB_FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define TB_WATCHDOG(clk, n) \
  initial begin repeat (n) @(posedge clk); failures++; \
    $display("watchdog expired"); `TB_FINISH end
`endif
