// Shared testbench helpers: result counters, checks, watchdog and the
// closing TB_RESULT line. A testbench declares 'int checks, failures' and a
// clock named clk before using them.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH

`define CHECK_EQ(got, exp, what) \
  begin \
    checks++; \
    if ((got) != (exp)) begin \
      failures++; \
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); \
    end \
  end

`define CHECK_TRUE(cond, what) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      $display("FAIL %s", what); \
    end \
  end

`define TB_FINISH \
  begin \
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); \
    $finish; \
  end

`define TB_WATCHDOG(ncycles) \
  initial begin \
    repeat (ncycles) @(posedge clk); \
    failures++; \
    $display("FAIL watchdog after %0d cycles", ncycles); \
    `TB_FINISH \
  end

`endif
