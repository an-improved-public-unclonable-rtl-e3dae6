// lut_srl16: one FPGA look-up table used in shift-register mode (SRL16), as
// the glitch PUF uses it to drive a carry-chain multiplexer select.
//
// The 16-bit register holds INIT after `load` and rotates left by one on
// every cycle with `shift` high: the output is bit 15 and is fed back into
// bit 0, so the pattern repeats every 16 shifts. With INIT = 16'h5555 the
// output is 0 and becomes 1 after one shift; with 16'hAAAA it goes 1 -> 0.
// `load` has priority over `shift`. Both act on the rising clock edge; the
// output is the register bit itself, so it changes right after the edge.
// The patterns and the feedback follow the document; the explicit `load`
// (re-initialising the LUT for each new sample) is how this design provides
// what the one-shot evaluation needs.
`timescale 1ns / 1ps
module lut_srl16 #(
  parameter logic [15:0] INIT = 16'h5555
) (
  input  logic clk,
  input  logic load,   // reload INIT
  input  logic shift,  // rotate one position
  output logic q       // LUT output (bit 15)
);

  logic [15:0] sr = INIT;

  always_ff @(posedge clk) begin
    if (load)       sr <= INIT;
    else if (shift) sr <= {sr[14:0], sr[15]};
  end

  assign q = sr[15];

endmodule
