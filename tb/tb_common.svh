// Common testbench helpers: check counters, a result line and a watchdog.
int checks = 0, failures = 0;
task automatic check(input bit c, input string msg);
  checks++;
  if (!c) begin
    failures++;
    $display("FAIL: %s", msg);
  end
endtask
task automatic tb_finish();
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
`define WATCHDOG(CLK, N) initial begin repeat (N) @(posedge CLK); failures++; $display("FAIL: watchdog expired"); tb_finish(); end
