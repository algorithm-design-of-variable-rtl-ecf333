// tb_check.svh: check counting shared by the testbenches.
// CHECK(cond, msg) counts one check and, if cond is false, one failure.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin checks++; if (!(cond)) begin failures++; $display("FAIL %s @%0t", msg, $time); end end
`endif
