// Shared testbench helpers: pass/fail counters, the check task, the result
// line and a cycle watchdog. Include inside a testbench module that has a
// clock named clk.
int checks = 0;
int failures = 0;

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask

task automatic finish_tb();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask

`define TB_WATCHDOG(CYCLES) \
  initial begin \
    repeat (CYCLES) @(posedge clk); \
    failures++; \
    $display("FAIL: watchdog"); \
    finish_tb(); \
  end
