// tb_common.svh: clock, check counter and watchdog shared by the block
// testbenches. Define WATCHDOG_CYCLES before including to change the limit.
`ifndef WATCHDOG_CYCLES
`define WATCHDOG_CYCLES 100000
`endif
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin
    repeat (`WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end
