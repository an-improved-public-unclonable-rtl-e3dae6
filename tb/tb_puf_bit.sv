// tb_puf_bit: three one-bit PUF instances with chosen path delays (ps):
//   b0: A 400, B 440 + 60   A faster by 100 -> glitch passes, bit 0
//   b1: A 500, B 400 + 60   B faster        -> no glitch,     bit 1
//   b2: A 450, B 400 + 60   A faster by 10  -> filtered,      bit 1
// Sequence: reload LUTs, set the flip-flops, one shift (the one-shot race),
// check {b2,b1,b0} = 110. A second shift reverses the race (A 1->0,
// B 0->1): b1's bottom path is now ahead by 40 ps and it falls to 0,
// which is the drift the free-running PUF shows. Re-running the one-shot
// sequence from that state must give 110 again, and the reload glitch must
// not survive the flip-flop initialisation.
`timescale 1ns / 1ps
module tb_puf_bit;
  logic clk = 1'b0, lut_load, lut_shift, ff_init;
  logic [2:0] q;
  int checks = 0, failures = 0;

  puf_bit #(.T_A_PS(400), .T_B_PS(440), .T_EXT_PS(60), .T_FILTER_PS(25)) b0
    (.clk, .lut_load, .lut_shift, .ff_init, .q(q[0]));
  puf_bit #(.T_A_PS(500), .T_B_PS(400), .T_EXT_PS(60), .T_FILTER_PS(25)) b1
    (.clk, .lut_load, .lut_shift, .ff_init, .q(q[1]));
  puf_bit #(.T_A_PS(450), .T_B_PS(400), .T_EXT_PS(60), .T_FILTER_PS(25)) b2
    (.clk, .lut_load, .lut_shift, .ff_init, .q(q[2]));

  always #20.833 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  task automatic expect_q(input string what, input logic [2:0] e);
    checks++;
    if (q !== e) begin
      failures++;
      $display("%s: q=%b expected %b", what, q, e);
    end
  endtask

  initial begin
    lut_load = 1'b0; lut_shift = 1'b0; ff_init = 1'b0;
    repeat (3) @(posedge clk);
    for (int run = 0; run < 3; run++) begin
      pulse(lut_load);
      pulse(ff_init);
      @(negedge clk);
      expect_q("after init", 3'b111);
      pulse(lut_shift);
      repeat (2) @(negedge clk);
      expect_q("one-shot", 3'b110);
      pulse(lut_shift);
      repeat (2) @(negedge clk);
      expect_q("second edge", 3'b100);
      if (run == 1) begin
        // third and fourth edges: repeats of the first two, nothing recovers
        pulse(lut_shift);
        pulse(lut_shift);
        repeat (2) @(negedge clk);
        expect_q("free running", 3'b100);
      end
    end
    // reload right after a one-shot: b1 glitches on the reload edge, but the
    // following initialisation restores the bits
    pulse(lut_load); pulse(ff_init); pulse(lut_shift);
    pulse(lut_load);
    pulse(ff_init);
    @(negedge clk);
    expect_q("reload then init", 3'b111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
