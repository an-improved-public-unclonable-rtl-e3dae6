// tb_carry_glitch_chain: drives the LUT outputs of the glitch-chain model
// directly and checks the race.
// Cases (delays in ps; glitch width = T_B + T_EXT - T_A):
//   u0: A faster by 100   -> N2 pulses low 100 ps, clr_n pulses low 75 ps
//   u1: B faster          -> N2 and clr_n stay high
//   u2: A faster by 10    -> N2 pulses 10 ps, filtered: clr_n stays high
//   u0 with the extra LUT at 0 -> no glitch at all
// The opposite edge (A 1->0, B 0->1) must glitch on u1 (B faster) only.
`timescale 1ns / 1ps
module tb_carry_glitch_chain;
  logic a, b, x;
  logic n2_0, n2_1, n2_2, c0, c1, c2;
  int   checks = 0, failures = 0;
  int   f2[3], fc[3];
  realtime t_fall[3], w2[3];

  carry_glitch_chain #(.T_A_PS(400), .T_B_PS(440), .T_EXT_PS(60), .T_FILTER_PS(25))
    u0 (.lut_a(a), .lut_b(b), .lut_x(x), .n2(n2_0), .clr_n(c0));
  carry_glitch_chain #(.T_A_PS(500), .T_B_PS(400), .T_EXT_PS(60), .T_FILTER_PS(25))
    u1 (.lut_a(a), .lut_b(b), .lut_x(x), .n2(n2_1), .clr_n(c1));
  carry_glitch_chain #(.T_A_PS(450), .T_B_PS(400), .T_EXT_PS(60), .T_FILTER_PS(25))
    u2 (.lut_a(a), .lut_b(b), .lut_x(x), .n2(n2_2), .clr_n(c2));

  always @(negedge n2_0) begin f2[0]++; t_fall[0] = $realtime; end
  always @(negedge n2_1) begin f2[1]++; t_fall[1] = $realtime; end
  always @(negedge n2_2) begin f2[2]++; t_fall[2] = $realtime; end
  always @(posedge n2_0) w2[0] = $realtime - t_fall[0];
  always @(posedge n2_2) w2[2] = $realtime - t_fall[2];
  always @(negedge c0) fc[0]++;
  always @(negedge c1) fc[1]++;
  always @(negedge c2) fc[2]++;

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_counts(input string what, input int e2_0, e2_1, e2_2, ec0, ec1, ec2);
    checks++;
    if (f2[0] != e2_0 || f2[1] != e2_1 || f2[2] != e2_2 ||
        fc[0] != ec0 || fc[1] != ec1 || fc[2] != ec2) begin
      failures++;
      $display("%s: n2 falls %0d %0d %0d clr falls %0d %0d %0d", what,
               f2[0], f2[1], f2[2], fc[0], fc[1], fc[2]);
    end
  endtask

  task automatic clear_counts();
    foreach (f2[i]) begin f2[i] = 0; fc[i] = 0; end
  endtask

  initial begin
    a = 1'b0; b = 1'b1; x = 1'b1;
    #10;
    clear_counts();
    // rising race edge
    a = 1'b1; b = 1'b0;
    #5;
    expect_counts("A up / B down", 1, 0, 1, 1, 0, 0);
    checks++;
    if (w2[0] < 0.099 || w2[0] > 0.101 || w2[2] < 0.009 || w2[2] > 0.011) begin
      failures++;
      $display("glitch widths %f %f ns", w2[0], w2[2]);
    end
    checks++;
    if (!(c0 && c1 && c2 && n2_0 && n2_1 && n2_2)) begin
      failures++;
      $display("outputs not back at rest");
    end
    // opposite edge: the race now favours the bottom path
    clear_counts();
    a = 1'b0; b = 1'b1;
    #5;
    expect_counts("A down / B up", 0, 1, 0, 0, 1, 0);
    // extra carry LUT at 0 breaks the chain: no glitch
    x = 1'b0;
    #5;
    clear_counts();
    a = 1'b1; b = 1'b0;
    #5;
    expect_counts("extra LUT off", 0, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
