// tb_util.svh: check counter, compare task and watchdog shared by the
// unit testbenches.  Include inside a module.
`ifndef TB_UTIL_SVH
`define TB_UTIL_SVH
  int checks = 0, failures = 0;
  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask
  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin
    #10ms;
    failures++;
    $display("FAIL watchdog");
    finish_tb();
  end
`endif
