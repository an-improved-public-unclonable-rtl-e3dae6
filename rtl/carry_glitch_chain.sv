// carry_glitch_chain: BEHAVIOURAL MODEL (not synthesizable) of the carry-chain
// part of one bit of the proposed glitch PUF, with the routing that leads
// from the chain to the flip-flop's clear input.
//
// Logic, as in the proposed (active-low) variant of the Anderson PUF:
//   bottom carry mux, select = LUT B:  N1  = B ? 0 : 1     (= ~B)
//   extra carry mux,  select = LUT X:  N1X = X ? N1 : 1    (one-shot extension)
//   top carry mux,    select = LUT A:  N2  = A ? N1X : 1
// With A and B complementary, N2 rests at 1. On the edge where A goes 0->1
// and B goes 1->0, N2 dips to 0 for (path B delay - path A delay) if the top
// path A is faster, and stays 1 if the bottom path B is faster.
//
// Timing model (this design's own; the document gives no numbers): path A
// delays LUT A by T_A_PS, path B delays LUT B by T_B_PS, the extra stage adds
// T_EXT_PS. The routing to the clear pin is a low-pass filter: a low pulse on
// N2 shorter than T_FILTER_PS never reaches `clr_n`; a longer one reaches it
// shortened by T_FILTER_PS. All times are in ps of simulated time.
// A synthesis tool that reads this model anyway turns the filter's `clr_n`
// into a latch and drops the delays; that netlist is not a PUF. On an FPGA
// this module is replaced by placed LUT and carry primitives.
`timescale 1ns / 1ps
module carry_glitch_chain #(
  parameter int unsigned T_A_PS      = 460,
  parameter int unsigned T_B_PS      = 400,
  parameter int unsigned T_EXT_PS    = 60,
  parameter int unsigned T_FILTER_PS = 25
) (
  input  logic lut_a,   // top LUT output, select of the top carry mux
  input  logic lut_b,   // bottom LUT output, select of the bottom carry mux
  input  logic lut_x,   // extra LUT output, select of the extra carry mux
  output logic n2,      // raw carry-chain output (active-low glitch)
  output logic clr_n    // filtered glitch at the flip-flop clear pin
);

  logic        a_d;     // LUT A after path A delay
  logic        n1_d;    // bottom mux output after path B delay
  logic        n1x_d;   // extra mux output after the extra stage delay
  int unsigned n_rise;  // rising edges of N2 seen so far

  initial begin
    n_rise = 0;
    clr_n  = 1'b1;
  end

  // The LUT outputs change at most once per clock, so these delays act as
  // plain transport delays.
  assign #(T_A_PS * 1ps)   a_d   = lut_a;
  assign #(T_B_PS * 1ps)   n1_d  = ~lut_b;
  assign #(T_EXT_PS * 1ps) n1x_d = lut_x ? n1_d : 1'b1;

  assign n2 = a_d ? n1x_d : 1'b1;

  // Low-pass routing: a low pulse is passed on only if it outlasts T_FILTER_PS.
  always @(posedge n2) n_rise <= n_rise + 1;

  always begin : filter
    int unsigned rises_at_fall;
    @(negedge n2);
    rises_at_fall = n_rise;
    #(T_FILTER_PS * 1ps);
    if (n_rise == rises_at_fall && !n2) begin
      clr_n = 1'b0;
      wait (n2);
      clr_n = 1'b1;
    end
  end

endmodule
