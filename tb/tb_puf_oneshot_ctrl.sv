// tb_puf_oneshot_ctrl: checks the one-shot sequence with SHOTS = 1,
// SETTLE = 2 (defaults) and with SHOTS = 3, SETTLE = 1. For every cycle
// after `start` the exact control pattern is compared with the expected
// LOAD, INIT, SHIFT x SHOTS, SETTLE x SETTLE, CAPTURE order, `done` must come
// 3 + SHOTS + SETTLE cycles after the clock edge that samples start, and
// `signature` must hold the value sig_q had at the capture edge (sig_q
// changes every cycle here).
`timescale 1ns / 1ps
module tb_puf_oneshot_ctrl;
  localparam int N = 90;
  logic clk = 1'b0, rst_n, start;
  logic [N-1:0] sig_q;
  logic [1:0]   load, init, shift, busy, done;
  logic [N-1:0] sig0, sig1;
  int checks = 0, failures = 0;

  puf_oneshot_ctrl #(.PUF_BITS(N)) d0 (.clk, .rst_n, .start, .sig_q,
    .lut_load(load[0]), .ff_init(init[0]), .lut_shift(shift[0]), .busy(busy[0]), .done(done[0]), .signature(sig0));
  puf_oneshot_ctrl #(.PUF_BITS(N), .SHOTS(3), .SETTLE(1)) d1 (.clk, .rst_n, .start, .sig_q,
    .lut_load(load[1]), .ff_init(init[1]), .lut_shift(shift[1]), .busy(busy[1]), .done(done[1]), .signature(sig1));

  always #20.833 clk = ~clk;

  // sig_q changes every cycle: a counter pattern
  always_ff @(posedge clk) sig_q <= sig_q + N'(1);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected controls in cycle c after the start edge (c = 1 is the first).
  function automatic logic [3:0] exp_ctl(input int shots, settle, c);
    // {load, init, shift, done}
    if (c == 1) return 4'b1000;
    if (c == 2) return 4'b0100;
    if (c >= 3 && c < 3 + shots) return 4'b0010;
    if (c == 4 + shots + settle) return 4'b0001;
    return 4'b0000;
  endfunction

  initial begin
    logic [N-1:0] at_capture [2];
    rst_n = 1'b0; start = 1'b0; sig_q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 5; rep++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;   // start edge has passed: cycle 1
      for (int c = 1; c <= 10; c++) begin
        checks++;
        if ({load[0], init[0], shift[0], done[0]} !== exp_ctl(1, 2, c) ||
            {load[1], init[1], shift[1], done[1]} !== exp_ctl(3, 1, c)) begin
          failures++;
          $display("rep %0d cycle %0d: d0 %b d1 %b", rep, c,
                   {load[0], init[0], shift[0], done[0]}, {load[1], init[1], shift[1], done[1]});
        end
        if (c == 6) at_capture[0] = sig_q;   // CAPTURE state, d0
        if (c == 7) at_capture[1] = sig_q;   // CAPTURE state, d1
        if (c == 7) begin
          checks++;
          if (sig0 !== at_capture[0]) begin failures++; $display("d0 signature wrong"); end
        end
        if (c == 8) begin
          checks++;
          if (sig1 !== at_capture[1]) begin failures++; $display("d1 signature wrong"); end
        end
        @(negedge clk);
      end
      checks++;
      if (busy !== 2'b00) begin failures++; $display("still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
