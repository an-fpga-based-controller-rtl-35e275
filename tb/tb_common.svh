// Shared testbench bookkeeping: check counters and the pass/fail report.
// Include inside a testbench module that declares a clock named clk.
int checks   = 0;
int failures = 0;

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL %0t: %s", $time, what);
  end
endtask

task automatic report_and_finish();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
