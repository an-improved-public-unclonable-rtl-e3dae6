// trojan_fsm: finite-state-machine hardware trojan that gives the divider IP
// a limited evaluation period.
//
// Three states (puf_pkg::trojan_state_t):
//   TJ_EVAL     the IP works; a prescaler counts PRESCALE clock cycles per
//               tick and a tick counter counts EVAL_TICKS ticks
//   TJ_LOCKED   entered when both counters reach their last value together
//               (the rare trigger condition); `lock` drives the payload that
//               forces the divider results to zero
//   TJ_UNLOCKED entered on `auth_pass` (a successful PUF authentication),
//               from either other state; the IP works and the counters stop
// With the defaults (24 MHz clock, PRESCALE = 24e6, EVAL_TICKS = 240) the
// trigger fires 4 minutes after reset, 5.76e9 cycles. The document gives
// the three states, the counters and the 4-minute period at 24 MHz; the
// split into a one-second prescaler and a tick counter, and accepting an
// authentication during the evaluation period, are this design's.
`timescale 1ns / 1ps
module trojan_fsm
  import puf_pkg::*;
#(
  parameter int unsigned PRESCALE   = 24_000_000,
  parameter int unsigned EVAL_TICKS = 240
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          auth_pass,  // one-cycle pulse from puf_auth
  output logic          lock,       // payload trigger
  output trojan_state_t state
);

  localparam int unsigned PW = $clog2(PRESCALE + 1);
  localparam int unsigned TW = $clog2(EVAL_TICKS + 1);

  logic [PW-1:0] pre_cnt;
  logic [TW-1:0] tick_cnt;
  logic          pre_last, tick_last;

  assign pre_last  = (pre_cnt == PW'(PRESCALE - 1));
  assign tick_last = (tick_cnt == TW'(EVAL_TICKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= TJ_EVAL;
      pre_cnt  <= '0;
      tick_cnt <= '0;
    end else if (auth_pass) begin
      state <= TJ_UNLOCKED;
    end else begin
      unique case (state)
        TJ_EVAL: begin
          pre_cnt <= pre_last ? '0 : pre_cnt + 1'b1;
          if (pre_last) begin
            tick_cnt <= tick_last ? '0 : tick_cnt + 1'b1;
            if (tick_last) state <= TJ_LOCKED;
          end
        end
        TJ_LOCKED:   state <= TJ_LOCKED;
        TJ_UNLOCKED: state <= TJ_UNLOCKED;
        default:     state <= TJ_LOCKED;
      endcase
    end
  end

  assign lock = (state == TJ_LOCKED);

  // Once the evaluation period is over it never restarts without a reset.
  a_no_return_to_eval: assert property (@(posedge clk) disable iff (!rst_n)
    state != TJ_EVAL |=> state != TJ_EVAL);

endmodule
