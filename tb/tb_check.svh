// tb_check.svh: check counter shared by the testbenches.
//
// Included inside a testbench module. check() counts one check and reports
// and counts a failure when the condition is false; finish() prints the
// result line every testbench ends with and stops the simulation.
int checks = 0;
int failures = 0;

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask

task automatic finish();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
