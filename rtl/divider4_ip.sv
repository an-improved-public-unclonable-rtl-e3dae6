// divider4_ip: the 4-bit binary divider IP core that carries the trojan.
//
// Restoring division, one quotient bit per clock: `go` (sampled when idle)
// latches dividend and divisor; four cycles later `done` pulses for one
// cycle and quotient/remainder hold the result until the next `go`. A zero
// divisor gives quotient 4'hF and remainder = dividend, which is what the
// restoring algorithm yields. While `lock` (the trojan payload) is high the
// quotient and remainder outputs read zero; the core keeps running, so the
// correct result appears again as soon as lock falls.
// The document gives the divider's function, the Go start and the zeroed
// results under the payload; the algorithm, latency and divide-by-zero
// behaviour are this design's.
`timescale 1ns / 1ps
module divider4_ip #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         go,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  input  logic         lock,       // trojan payload: force results to zero
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder,
  output logic         busy,
  output logic         done        // one-cycle pulse
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  q_r, d_r;         // quotient / shifted dividend, divisor
  logic [W-1:0]  r_r;              // partial remainder
  logic [CW-1:0] step;
  logic [W:0]    r_shift, r_sub;

  assign r_shift = {r_r, q_r[W-1]};
  assign r_sub   = r_shift - {1'b0, d_r};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r  <= '0;
      d_r  <= '0;
      r_r  <= '0;
      step <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (go) begin
          q_r  <= dividend;
          d_r  <= divisor;
          r_r  <= '0;
          step <= '0;
          busy <= 1'b1;
        end
      end else begin
        if (r_sub[W]) begin            // negative: restore
          r_r <= r_shift[W-1:0];
          q_r <= {q_r[W-2:0], 1'b0};
        end else begin
          r_r <= r_sub[W-1:0];
          q_r <= {q_r[W-2:0], 1'b1};
        end
        step <= step + 1'b1;
        if (step == CW'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // A result is reported only at the end of a division.
  a_done_ends_busy: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !busy);

  // Payload gate.
  assign quotient  = lock ? '0 : q_r;
  assign remainder = lock ? '0 : r_r;

endmodule
