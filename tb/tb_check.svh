// tb_check.svh: check counting shared by the testbenches.
// A testbench declares "int checks = 0, failures = 0;" and uses CHECK.
`ifndef TB_CHECK_SVH
`define TB_CHECK_SVH
`define CHECK(cond, msg) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures <= 10) $display("FAIL %s (t=%0t)", msg, $time); \
    end \
  end
`endif
