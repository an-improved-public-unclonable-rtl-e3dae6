// puf_auth: PUF challenge-response check that unlocks the divider IP.
//
// On `req` the 4-bit challenge is latched and a one-shot PUF evaluation is
// started. The challenge selects a 4-bit group of the signature:
// response = signature[4*challenge +: 4]. The IP holds one enrolled
// challenge-response pair (AUTH_CHALLENGE, AUTH_RESPONSE); authentication
// passes when the challenge is the enrolled one and the freshly measured
// response equals the enrolled response. A challenge whose group lies
// outside the signature fails. `done` pulses one cycle after the PUF
// reports its signature, with `pass` and `response` valid and held until the
// next request. Requests are ignored while busy.
// The enrolled pair 0001 -> 0011 is the document's; the slicing of the
// signature into 4-bit groups and the handshake are this design's.
`timescale 1ns / 1ps
module puf_auth
  import puf_pkg::*;
#(
  parameter int unsigned       PUF_BITS       = puf_pkg::PUF_N_BITS,
  parameter logic [CHAL_W-1:0] AUTH_CHALLENGE = 4'b0001,
  parameter logic [RESP_W-1:0] AUTH_RESPONSE  = 4'b0011
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req,
  input  logic [CHAL_W-1:0]   challenge,
  output logic                busy,
  output logic                done,       // one-cycle pulse
  output logic                pass,       // result of the last check
  output logic [RESP_W-1:0]   response,   // response measured for the last challenge
  // PUF measurement handshake
  output logic                puf_start,
  input  logic                puf_done,
  input  logic [PUF_BITS-1:0] signature
);

  localparam int unsigned GROUPS = PUF_BITS / RESP_W;

  typedef enum logic [1:0] {A_IDLE, A_START, A_WAIT} state_t;

  state_t            state;
  logic [CHAL_W-1:0] chal_q;
  logic [RESP_W-1:0] resp_sel;
  logic              chal_ok;

  always_comb begin
    chal_ok  = 32'(chal_q) < GROUPS;
    resp_sel = '0;
    for (int unsigned g = 0; g < GROUPS; g++)
      if (32'(chal_q) == g) resp_sel = signature[g*RESP_W +: RESP_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= A_IDLE;
      chal_q   <= '0;
      done     <= 1'b0;
      pass     <= 1'b0;
      response <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        A_IDLE:  if (req) begin chal_q <= challenge; state <= A_START; end
        A_START: state <= A_WAIT;
        A_WAIT:  if (puf_done) begin
                   response <= resp_sel;
                   pass     <= chal_ok && chal_q == AUTH_CHALLENGE && resp_sel == AUTH_RESPONSE;
                   done     <= 1'b1;
                   state    <= A_IDLE;
                 end
        default: state <= A_IDLE;
      endcase
    end
  end

  assign puf_start = (state == A_START);
  assign busy      = (state != A_IDLE);

  // The PUF reports a signature only for a measurement this unit started.
  a_done_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    puf_done |-> state == A_WAIT);

endmodule
