// tb_region_distance: the uniqueness / reliability experiment on the
// 90-bit PUF. Four PUF placements (regions of one FPGA, or four chips) are
// modelled as four puf_array instances with device seeds 10, 20, 30 and 40,
// each with its own one-shot controller. Each is evaluated 5 times.
//   intra-distance: Hamming distance between repeated evaluations of one
//                   placement; must be 0 (the model has no noise)
//   inter-distance: Hamming distance between the 6 pairs of placements;
//                   must equal the values computed from the delay model
//                   (49 35 47 44 44 54, mean 45.5) and the mean must lie
//                   within 45 +/- 5, the ideal for a 90-bit signature.
`timescale 1ns / 1ps
module tb_region_distance;
  localparam int N = 90;
  localparam int unsigned SEEDS [4] = '{10, 20, 30, 40};
  localparam int EXP_D [6] = '{49, 35, 47, 44, 44, 54};

  logic clk = 1'b0, rst_n, start;
  logic [N-1:0] sig_q [4];
  logic [N-1:0] sig [4];
  logic [N-1:0] first [4];
  logic [3:0] load, init, shift, busy, done;
  int checks = 0, failures = 0;

  for (genvar r = 0; r < 4; r++) begin : g_region
    puf_oneshot_ctrl #(.PUF_BITS(N)) u_ctrl (
      .clk, .rst_n, .start, .sig_q(sig_q[r]), .lut_load(load[r]), .ff_init(init[r]),
      .lut_shift(shift[r]), .busy(busy[r]), .done(done[r]), .signature(sig[r]));
    puf_array #(.PUF_BITS(N), .DEVICE_SEED(SEEDS[r])) u_puf (
      .clk, .lut_load(load[r]), .lut_shift(shift[r]), .ff_init(init[r]), .sig_q(sig_q[r]));
  end

  always #20.833 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, sum, intra;
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    intra = 0;
    for (int run = 0; run < 5; run++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (done !== 4'hF) @(negedge clk);
      for (int r = 0; r < 4; r++) begin
        if (run == 0) first[r] = sig[r];
        else intra += $countones(sig[r] ^ first[r]);
      end
    end
    checks++;
    if (intra != 0) begin failures++; $display("intra-distance %0d, expected 0", intra); end
    k = 0; sum = 0;
    for (int i = 0; i < 4; i++)
      for (int j = i + 1; j < 4; j++) begin
        int d;
        d = $countones(first[i] ^ first[j]);
        sum += d;
        $display("placements %0d-%0d: inter-distance %0d of %0d", i, j, d, N);
        checks++;
        if (d != EXP_D[k]) begin failures++; $display("  expected %0d", EXP_D[k]); end
        k++;
      end
    $display("mean inter-distance %0.2f bits", real'(sum) / 6.0);
    checks++;
    if (sum < 6 * 40 || sum > 6 * 50) begin failures++; $display("mean outside 45 +/- 5"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
