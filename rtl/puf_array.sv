// puf_array: the 90-bit signature generator, PUF_BITS instances of puf_bit
// side by side, all driven by the same load / init / shift controls.
//
// Each instance gets its own path delays, standing for the random process
// variation of its LUTs and routing (this design's model, see puf_pkg):
//   path A = T_LUT_PS + T_EXT_PS + var_A,  path B = T_LUT_PS + var_B,
// and the chain adds T_EXT_PS to path B, so nominally the two paths balance
// and var_A, var_B (uniform within +/-VAR_PS) decide each race. A bit is 0
// when path B is slower than path A by T_FILTER_PS or more.
// DEVICE_SEED selects the simulated chip. The default seed is one whose
// bits 7..4 read 4'b0011, the response that the licensing demonstration
// expects for challenge 4'b0001.
`timescale 1ns / 1ps
module puf_array #(
  parameter int unsigned PUF_BITS    = puf_pkg::PUF_N_BITS,
  parameter int unsigned DEVICE_SEED = 10,
  parameter int unsigned T_LUT_PS    = 400,
  parameter int unsigned T_EXT_PS    = 60,
  parameter int unsigned VAR_PS      = 100,
  parameter int unsigned T_FILTER_PS = 25
) (
  input  logic                clk,
  input  logic                lut_load,
  input  logic                lut_shift,
  input  logic                ff_init,
  output logic [PUF_BITS-1:0] sig_q     // live flip-flop outputs
);

  for (genvar i = 0; i < PUF_BITS; i++) begin : g_bit
    localparam int unsigned TA =
      unsigned'(int'(T_LUT_PS + T_EXT_PS) + puf_pkg::puf_var_ps(DEVICE_SEED, i, 1'b0, VAR_PS));
    localparam int unsigned TB =
      unsigned'(int'(T_LUT_PS) + puf_pkg::puf_var_ps(DEVICE_SEED, i, 1'b1, VAR_PS));
    puf_bit #(
      .T_A_PS(TA), .T_B_PS(TB), .T_EXT_PS(T_EXT_PS), .T_FILTER_PS(T_FILTER_PS)
    ) u_bit (
      .clk, .lut_load, .lut_shift, .ff_init, .q(sig_q[i])
    );
  end

endmodule
