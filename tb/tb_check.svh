// tb_check.svh: counters, check task and watchdog shared by the testbenches.
// Include inside a testbench module.
int checks   = 0;
int failures = 0;
task automatic check_it(bit cond, string msg);
  checks++;
  if (!cond) begin
    failures++;
    $display("FAIL @%0t: %s", $time, msg);
  end
endtask
`define CHECK(cond, msg) check_it((cond), msg)
`define FINISH \
  begin $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
`define WATCHDOG(clk, n) \
  initial begin repeat (n) @(posedge clk); failures++; $display("FAIL: watchdog"); `FINISH end
