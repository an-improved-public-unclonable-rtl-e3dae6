// puf_oneshot_ctrl: sequences one "one-shot" evaluation of the glitch PUF
// and latches the resulting signature.
//
// The free-running glitch PUF saturates: with the LUT patterns rotating, the
// race repeats on every edge and the flip-flops drift over time. The
// one-shot evaluation samples the PUF once from a known start instead:
//   LOAD    (1 cycle)      re-initialise the LUTs (A = 0, B = 1)
//   INIT    (1 cycle)      set every bit flip-flop to 1; any glitch caused
//                          by the reload has died away by then
//   SHIFT   (SHOTS cycles) advance the LUTs; SHOTS = 1 is the one-shot race
//   SETTLE  (SETTLE cycles) let glitches reach the clear pins
//   CAPTURE (1 cycle)      latch sig_q into `signature`, pulse `done`
// `start` is sampled in IDLE only. From start to done takes
// 3 + SHOTS + SETTLE cycles. The document gives the one-shot idea and the
// LUT re-initialisation; the state sequence and its lengths are this
// design's.
`timescale 1ns / 1ps
module puf_oneshot_ctrl #(
  parameter int unsigned PUF_BITS = puf_pkg::PUF_N_BITS,
  parameter int unsigned SHOTS    = 1,
  parameter int unsigned SETTLE   = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [PUF_BITS-1:0] sig_q,      // live PUF flip-flops
  output logic                lut_load,
  output logic                ff_init,
  output logic                lut_shift,
  output logic                busy,
  output logic                done,       // one-cycle pulse, signature valid
  output logic [PUF_BITS-1:0] signature
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_INIT, S_SHIFT, S_SETTLE, S_CAPTURE} state_t;

  localparam int unsigned CW = $clog2((SHOTS > SETTLE ? SHOTS : SETTLE) + 1);

  state_t        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      done      <= 1'b0;
      signature <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:   if (start) state <= S_LOAD;
        S_LOAD:   state <= S_INIT;
        S_INIT:   begin state <= S_SHIFT; cnt <= '0; end
        S_SHIFT:  if (cnt == CW'(SHOTS - 1)) begin
                    state <= (SETTLE == 0) ? S_CAPTURE : S_SETTLE;
                    cnt   <= '0;
                  end else cnt <= cnt + 1'b1;
        S_SETTLE: if (cnt == CW'(SETTLE - 1)) state <= S_CAPTURE;
                  else cnt <= cnt + 1'b1;
        S_CAPTURE: begin
          signature <= sig_q;
          done      <= 1'b1;
          state     <= S_IDLE;
        end
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign lut_load  = (state == S_LOAD);
  assign ff_init   = (state == S_INIT);
  assign lut_shift = (state == S_SHIFT);
  assign busy      = (state != S_IDLE);

  // At most one PUF control is active in any cycle.
  a_one_control: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({lut_load, ff_init, lut_shift, done}));

endmodule
