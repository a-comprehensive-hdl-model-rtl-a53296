// Shared testbench bookkeeping: counters, a check macro and the result line.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define TB_CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL: %s", msg); end end
`define TB_FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`endif
