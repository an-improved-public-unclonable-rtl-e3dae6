// tb_trojan_fsm: the trojan with PRESCALE = 3 and EVAL_TICKS = 4 must
// raise lock exactly 12 clock cycles after reset, stay locked for 100
// cycles, leave the locked state on one auth_pass pulse and never lock
// again. A second instance receives auth_pass during the evaluation period
// and must never lock.
`timescale 1ns / 1ps
module tb_trojan_fsm;
  import puf_pkg::*;
  logic clk = 1'b0, rst_n, pass0, pass1, lock0, lock1;
  trojan_state_t st0, st1;
  int checks = 0, failures = 0, lock_cycle = -1;

  trojan_fsm #(.PRESCALE(3), .EVAL_TICKS(4)) d0 (.clk, .rst_n, .auth_pass(pass0), .lock(lock0), .state(st0));
  trojan_fsm #(.PRESCALE(3), .EVAL_TICKS(4)) d1 (.clk, .rst_n, .auth_pass(pass1), .lock(lock1), .state(st1));

  always #20.833 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lock1_seen = 0;
    rst_n = 1'b0; pass0 = 1'b0; pass1 = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    for (int c = 1; c <= 30; c++) begin
      @(negedge clk);
      if (c == 5) pass1 = 1'b1; else pass1 = 1'b0;
      if (lock0 && lock_cycle < 0) lock_cycle = c;
      if (lock1) lock1_seen++;
    end
    checks++;
    if (lock_cycle != 12) begin failures++; $display("locked at cycle %0d, expected 12", lock_cycle); end
    checks++;
    if (st0 != TJ_LOCKED || !lock0) begin failures++; $display("d0 not locked"); end
    repeat (100) @(negedge clk);
    checks++;
    if (!lock0) begin failures++; $display("lock released without authentication"); end
    pass0 = 1'b1;
    @(negedge clk) pass0 = 1'b0;
    checks++;
    if (lock0 || st0 != TJ_UNLOCKED) begin failures++; $display("authentication did not unlock"); end
    for (int c = 0; c < 100; c++) begin
      @(negedge clk);
      if (lock0 || lock1) lock1_seen++;
    end
    checks++;
    if (lock1_seen != 0 || st1 != TJ_UNLOCKED) begin failures++; $display("unlocked instance locked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
