// tb_full_size: the licensed divider with every parameter at its default
// (90-bit PUF of chip seed 10, 24 MHz clock, 4-minute evaluation period).
// One complete operation of each kind inside the evaluation period:
// 15 / 3 = 5 remainder 0 (the document's demonstration operands), an
// authentication with the enrolled challenge 0001 (response 0011, pass)
// and one with challenge 0100 (fail). After the passing authentication the
// trojan must be in its unlocked state. The 5.76e9-cycle trigger itself is
// exercised by tb_puf_locked_divider_top at a shortened period.
`timescale 1ns / 1ps
module tb_full_size;
  logic clk = 1'b0, rst_n, go, auth_req, div_done, auth_done, auth_pass;
  logic [3:0] dividend, divisor, quotient, remainder, challenge, auth_response;
  int checks = 0, failures = 0;

  puf_locked_divider_top dut (
    .clk, .rst_n, .go, .dividend, .divisor, .quotient, .remainder, .div_done,
    .auth_req, .challenge, .auth_done, .auth_pass, .auth_response);

  always #20.833 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic authenticate(input logic [3:0] ch, input bit exp_pass, input logic [3:0] exp_resp);
    @(negedge clk) begin auth_req = 1'b1; challenge = ch; end
    @(negedge clk) auth_req = 1'b0;
    repeat (8) @(negedge clk);
    checks++;
    if (!auth_done || auth_pass !== exp_pass || auth_response !== exp_resp) begin
      failures++;
      $display("challenge %b: done %b pass %b response %b", ch, auth_done, auth_pass, auth_response);
    end
  endtask

  initial begin
    rst_n = 1'b0; go = 1'b0; auth_req = 1'b0; dividend = '0; divisor = '0; challenge = '0;
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) begin go = 1'b1; dividend = 4'd15; divisor = 4'd3; end
    @(negedge clk) go = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (!div_done || quotient != 4'd5 || remainder != 4'd0) begin
      failures++;
      $display("15 / 3: done %b q %0d r %0d", div_done, quotient, remainder);
    end
    authenticate(4'b0100, 1'b0, 4'b1111);
    authenticate(4'b0001, 1'b1, 4'b0011);
    @(negedge clk);   // the trojan takes the pass on the next edge
    checks++;
    if (dut.u_trojan.state != puf_pkg::TJ_UNLOCKED) begin failures++; $display("not unlocked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
