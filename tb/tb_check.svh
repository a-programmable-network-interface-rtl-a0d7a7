// Shared testbench helpers: a check counter and the final result line.
int checks = 0;
int failures = 0;

task automatic chk(input bit ok, input string what);
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
