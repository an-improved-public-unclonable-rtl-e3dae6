// puf_locked_divider_top: a 4-bit divider IP protected for evaluation by an
// FSM hardware trojan and licensed by a glitch PUF.
//
// The divider works normally for the evaluation period. Then the trojan
// locks it and both results read zero. An authentication request applies a
// challenge to the on-chip PUF: a one-shot evaluation of the 90-bit glitch
// PUF is run, the challenge picks a 4-bit group of the signature, and if it
// matches the enrolled challenge-response pair (0001 -> 0011) the trojan
// moves to its unlocked state for good (until reset).
//
//   divider4_ip <- lock -- trojan_fsm <- auth_pass -- puf_auth
//                                                       | start / done, signature
//                                   puf_array <-> puf_oneshot_ctrl
//
// Interface: clk is the board clock (24 MHz in the document), rst_n an
// asynchronous active-low reset. go/dividend/divisor -> quotient/remainder
// with div_done after 4 cycles. auth_req/challenge -> auth_done after
// 8 cycles, with auth_pass and the measured auth_response.
// The signature never leaves the chip.
`timescale 1ns / 1ps
module puf_locked_divider_top
  import puf_pkg::*;
#(
  parameter int unsigned       PUF_BITS       = puf_pkg::PUF_N_BITS,
  parameter int unsigned       DEVICE_SEED    = 10,
  parameter int unsigned       PRESCALE       = 24_000_000,
  parameter int unsigned       EVAL_TICKS     = 240,
  parameter logic [CHAL_W-1:0] AUTH_CHALLENGE = 4'b0001,
  parameter logic [RESP_W-1:0] AUTH_RESPONSE  = 4'b0011
) (
  input  logic              clk,
  input  logic              rst_n,
  // divider IP
  input  logic              go,
  input  logic [3:0]        dividend,
  input  logic [3:0]        divisor,
  output logic [3:0]        quotient,
  output logic [3:0]        remainder,
  output logic              div_done,
  // licensing
  input  logic              auth_req,
  input  logic [CHAL_W-1:0] challenge,
  output logic              auth_done,
  output logic              auth_pass,
  output logic [RESP_W-1:0] auth_response
);

  logic                lock, pass_q, auth_pulse;
  logic                puf_start, puf_done;
  logic                lut_load, lut_shift, ff_init;
  logic [PUF_BITS-1:0] sig_q, signature;
  trojan_state_t       tj_state;

  divider4_ip #(.W(4)) u_div (
    .clk, .rst_n, .go, .dividend, .divisor, .lock,
    .quotient, .remainder, .busy(), .done(div_done)
  );

  trojan_fsm #(.PRESCALE(PRESCALE), .EVAL_TICKS(EVAL_TICKS)) u_trojan (
    .clk, .rst_n, .auth_pass(auth_pulse), .lock, .state(tj_state)
  );

  puf_auth #(
    .PUF_BITS(PUF_BITS), .AUTH_CHALLENGE(AUTH_CHALLENGE), .AUTH_RESPONSE(AUTH_RESPONSE)
  ) u_auth (
    .clk, .rst_n, .req(auth_req), .challenge, .busy(), .done(auth_done),
    .pass(pass_q), .response(auth_response),
    .puf_start, .puf_done, .signature
  );

  assign auth_pulse = auth_done & pass_q;
  assign auth_pass  = pass_q;

  puf_oneshot_ctrl #(.PUF_BITS(PUF_BITS)) u_oneshot (
    .clk, .rst_n, .start(puf_start), .sig_q,
    .lut_load, .ff_init, .lut_shift, .busy(), .done(puf_done), .signature
  );

  puf_array #(.PUF_BITS(PUF_BITS), .DEVICE_SEED(DEVICE_SEED)) u_puf (
    .clk, .lut_load, .lut_shift, .ff_init, .sig_q
  );

endmodule
