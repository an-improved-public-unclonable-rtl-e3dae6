// puf_bit: one bit of the proposed glitch PUF (improved Anderson PUF).
//
// Two LUTs in shift-register mode hold complementary patterns: LUT A (top)
// 16'h5555 and LUT B (bottom) 16'hAAAA. Their outputs select the carry-chain
// multiplexers, whose constants are swapped relative to the original Anderson
// PUF so that a race won by the top path produces an active-low glitch on N2.
// N2 drives the asynchronous CLEAR of the bit flip-flop (the original drove
// PRESET with an active-high glitch). A third LUT, holding all ones, selects
// an extra carry multiplexer that lengthens the chain (the extended-carry
// "one-shot" measure).
//
// Operation, driven by puf_oneshot_ctrl:
//   lut_load  - reload all three LUTs (A = 0, B = 1 at the outputs)
//   ff_init   - set the flip-flop to 1 on the next clock edge
//   lut_shift - advance the LUTs one step: A 0->1, B 1->0, the race
// After the race q is 1 when path B won (no glitch) and 0 when path A won by
// more than the routing filter lets through. The clear is asynchronous and
// wins over ff_init.
//
// The delays are per-instance parameters standing for process variation
// (this design's model); the carry-chain part is a behavioural model.
`timescale 1ns / 1ps
module puf_bit #(
  parameter int unsigned T_A_PS      = 460,
  parameter int unsigned T_B_PS      = 400,
  parameter int unsigned T_EXT_PS    = 60,
  parameter int unsigned T_FILTER_PS = 25
) (
  input  logic clk,
  input  logic lut_load,
  input  logic lut_shift,
  input  logic ff_init,
  output logic q
);

  logic lut_a, lut_b, lut_x;
  logic n2, clr_n;

  lut_srl16 #(.INIT(16'h5555)) u_lut_a (.clk, .load(lut_load), .shift(lut_shift), .q(lut_a));
  lut_srl16 #(.INIT(16'hAAAA)) u_lut_b (.clk, .load(lut_load), .shift(lut_shift), .q(lut_b));
  lut_srl16 #(.INIT(16'hFFFF)) u_lut_x (.clk, .load(lut_load), .shift(lut_shift), .q(lut_x));

  carry_glitch_chain #(
    .T_A_PS(T_A_PS), .T_B_PS(T_B_PS), .T_EXT_PS(T_EXT_PS), .T_FILTER_PS(T_FILTER_PS)
  ) u_chain (
    .lut_a, .lut_b, .lut_x, .n2, .clr_n
  );

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)       q <= 1'b0;
    else if (ff_init) q <= 1'b1;
  end

endmodule
