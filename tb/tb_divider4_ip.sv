// tb_divider4_ip: all 256 dividend/divisor pairs. Each result must equal
// dividend / divisor and dividend % divisor (quotient 15 and remainder =
// dividend for a zero divisor), with done exactly 4 cycles after go.
// Then with lock high the same operations must return zero results, and
// the true result must reappear when lock falls.
`timescale 1ns / 1ps
module tb_divider4_ip;
  logic clk = 1'b0, rst_n, go, lock, busy, done;
  logic [3:0] dividend, divisor, quotient, remainder;
  int checks = 0, failures = 0;

  divider4_ip dut (.clk, .rst_n, .go, .dividend, .divisor, .lock, .quotient, .remainder, .busy, .done);

  always #20.833 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input int a, b, input logic lk);
    int eq, er, lat;
    eq = (b == 0) ? 15 : a / b;
    er = (b == 0) ? a : a % b;
    if (lk) begin eq = 0; er = 0; end
    lock = lk;
    @(negedge clk) begin go = 1'b1; dividend = 4'(a); divisor = 4'(b); end
    @(negedge clk) begin go = 1'b0; dividend = 4'(~a); divisor = 4'(~b); end
    lat = 0;   // cycles after the edge that sampled go
    while (!done && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 4 || int'(quotient) != eq || int'(remainder) != er) begin
      failures++;
      $display("%0d / %0d lock %b: q %0d r %0d after %0d cycles, expected %0d %0d after 4",
               a, b, lk, quotient, remainder, lat, eq, er);
    end
  endtask

  initial begin
    rst_n = 1'b0; go = 1'b0; lock = 1'b0; dividend = '0; divisor = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        divide(a, b, 1'b0);
    divide(15, 3, 1'b1);
    divide(13, 4, 1'b1);
    lock = 1'b0;
    #1;
    checks++;
    if (quotient != 4'd3 || remainder != 4'd1) begin failures++; $display("result not back after lock"); end
    divide(15, 3, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
