// tb_puf_array: two simulated chips (DEVICE_SEED 10 and 77) of the full
// 90-bit PUF array. The controls are driven directly with one one-shot
// sequence per run. The expected signature is computed here from the
// delay model: per bit, offsets vA, vB uniform in [-100, 100] ps from the
// xorshift32 hash of (seed, index, path); the bit is 0 when the bottom
// path is slower by 25 ps or more, i.e. vB - vA >= 25.
// Checks: each chip matches its expected signature, repeated evaluations
// give the same signature (no intra-chip change), the two chips differ,
// and seed 10 carries 4'b0011 in bits 7..4.
`timescale 1ns / 1ps
module tb_puf_array;
  localparam int N = 90;
  logic clk = 1'b0, lut_load, lut_shift, ff_init;
  logic [N-1:0] s10, s77, e10, e77;
  int checks = 0, failures = 0;

  puf_array #(.PUF_BITS(N), .DEVICE_SEED(10)) chip10 (.clk, .lut_load, .lut_shift, .ff_init, .sig_q(s10));
  puf_array #(.PUF_BITS(N), .DEVICE_SEED(77)) chip77 (.clk, .lut_load, .lut_shift, .ff_init, .sig_q(s77));

  always #20.833 clk = ~clk;

  function automatic logic [31:0] step(input logic [31:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    return x ^ (x << 5);
  endfunction

  function automatic int offset(input int unsigned seed, idx, input bit b);
    logic [31:0] h;
    h = seed ^ ((idx + 1) * 32'h9E3779B9) ^ (b ? 32'h85EBCA6B : 32'h27D4EB2F);
    h = step(step(h));
    return int'(h % 201) - 100;
  endfunction

  function automatic logic [N-1:0] expected(input int unsigned seed);
    logic [N-1:0] e;
    for (int i = 0; i < N; i++)
      e[i] = !((offset(seed, i, 1'b1) - offset(seed, i, 1'b0)) >= 25);
    return e;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  initial begin
    lut_load = 1'b0; lut_shift = 1'b0; ff_init = 1'b0;
    e10 = expected(10);
    e77 = expected(77);
    repeat (2) @(posedge clk);
    for (int run = 0; run < 4; run++) begin
      pulse(lut_load); pulse(ff_init); pulse(lut_shift);
      repeat (2) @(negedge clk);
      checks++;
      if (s10 !== e10) begin failures++; $display("seed 10: %h expected %h", s10, e10); end
      checks++;
      if (s77 !== e77) begin failures++; $display("seed 77: %h expected %h", s77, e77); end
    end
    checks++;
    if (s10[7:4] !== 4'b0011) begin failures++; $display("seed 10 bits 7..4 = %b", s10[7:4]); end
    checks++;
    if ($countones(s10 ^ s77) < 20) begin failures++; $display("chips too similar"); end
    $display("ones: chip10 %0d chip77 %0d, inter-chip distance %0d of %0d",
             $countones(s10), $countones(s77), $countones(s10 ^ s77), N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
