// puf_pkg: types, constants and the process-variation model shared by the
// glitch PUF, its one-shot controller, the authentication unit and the FSM
// trojan of the PUF-licensed divider IP.
//
// The delay model is this design's own: silicon delays cannot be written in
// RTL, so every bit of the simulated device gets a fixed, pseudo-random
// offset on each of its two LUT paths, drawn from a 32-bit xorshift hash of
// (DEVICE_SEED, bit index, path). One seed stands for one chip; another seed
// is another chip with another signature.
`timescale 1ns / 1ps
package puf_pkg;

  // Size of the signature: 90 one-bit PUF instances.
  localparam int unsigned PUF_N_BITS = 90;

  // Challenge and response widths of the licensing demonstration (4 bits each).
  localparam int unsigned CHAL_W = 4;
  localparam int unsigned RESP_W = 4;

  // The FSM trojan: three states.
  typedef enum logic [1:0] {
    TJ_EVAL     = 2'd0,  // evaluation period running, IP works
    TJ_LOCKED   = 2'd1,  // period over, payload zeroes the divider results
    TJ_UNLOCKED = 2'd2   // PUF authentication passed, IP works
  } trojan_state_t;

  // One xorshift32 step.
  function automatic logic [31:0] xorshift32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  // Process-variation offset in ps, uniform in [-var_ps, +var_ps], of one LUT
  // path (path 0: top LUT A, path 1: bottom LUT B) of bit `idx`.
  function automatic int puf_var_ps(input int unsigned seed, input int unsigned idx,
                                    input bit path, input int unsigned var_ps);
    logic [31:0] x;
    x = seed ^ ((idx + 1) * 32'h9E37_79B9) ^ (path ? 32'h85EB_CA6B : 32'h27D4_EB2F);
    x = xorshift32(xorshift32(x));
    return int'(x % (2 * var_ps + 1)) - int'(var_ps);
  endfunction

endpackage
