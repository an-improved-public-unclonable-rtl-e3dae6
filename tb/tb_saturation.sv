// tb_saturation: why the PUF is sampled one-shot. The default chip (seed
// 10) is evaluated by three controllers that differ only in how many
// LUT shift edges they apply before capturing: 1 (one-shot), 2 and 16
// (free running). The Hamming weight (number of 1 bits) is recorded for
// each, over 3 repeated evaluations.
//   one-shot:      61 ones, every evaluation (a bit is 0 only where the
//                  top path wins by >= 25 ps)
//   2 or 16 edges: 28 ones; the reverse race on the second edge also
//                  clears every bit whose bottom path wins by >= 25 ps, so
//                  only near-balanced bits survive
// The expected weights come from the delay model: 61 bits with
// vB - vA < 25, 28 bits with |vB - vA| < 25.
`timescale 1ns / 1ps
module tb_saturation;
  localparam int N = 90;
  localparam int SHOTS [3] = '{1, 2, 16};
  localparam int EXP_W [3] = '{61, 28, 28};

  logic clk = 1'b0, rst_n, start;
  logic [N-1:0] sig_q [3];
  logic [N-1:0] sig [3];
  logic [2:0] load, init, shift, busy, done;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < 3; k++) begin : g_mode
    puf_oneshot_ctrl #(.PUF_BITS(N), .SHOTS(SHOTS[k])) u_ctrl (
      .clk, .rst_n, .start, .sig_q(sig_q[k]), .lut_load(load[k]), .ff_init(init[k]),
      .lut_shift(shift[k]), .busy(busy[k]), .done(done[k]), .signature(sig[k]));
    puf_array #(.PUF_BITS(N), .DEVICE_SEED(10)) u_puf (
      .clk, .lut_load(load[k]), .lut_shift(shift[k]), .ff_init(init[k]), .sig_q(sig_q[k]));
  end

  always #20.833 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] seen;
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      seen = '0;
      while (seen != 3'b111) begin
        for (int k = 0; k < 3; k++)
          if (done[k]) begin
            seen[k] = 1'b1;
            checks++;
            $display("run %0d, %0d edge(s): Hamming weight %0d of %0d", run, SHOTS[k],
                     $countones(sig[k]), N);
            if ($countones(sig[k]) != EXP_W[k]) begin
              failures++;
              $display("  expected %0d", EXP_W[k]);
            end
          end
        @(negedge clk);
      end
    end
    checks++;
    if ((sig[1] & ~sig[0]) != '0) begin
      failures++;
      $display("free-running set a bit the one-shot sample had cleared");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
