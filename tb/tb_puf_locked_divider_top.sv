// tb_puf_locked_divider_top: end-to-end run of the licensed divider with a
// short evaluation period (PRESCALE = 4, EVAL_TICKS = 10: 40 cycles) and
// the full 90-bit PUF of the default chip (seed 10).
//   1. evaluation period: 15 / 3 and random divisions give correct results
//   2. the trojan triggers; divisions now return 0 / 0 (payload)
//   3. authentication with challenge 0010 and 0000 fails; still locked
//   4. authentication with challenge 0001 measures response 0011 and passes
//   5. divisions are correct again and stay correct
// Each mechanism is counted; one that never happened is a failure. The
// one-shot PUF evaluation must give the same signature on every request,
// with both 0 bits (glitch reached the clear pin) and 1 bits present.
`timescale 1ns / 1ps
module tb_puf_locked_divider_top;
  logic clk = 1'b0, rst_n, go, auth_req, div_done, auth_done, auth_pass;
  logic [3:0] dividend, divisor, quotient, remainder, challenge, auth_response;
  int checks = 0, failures = 0;
  int n_eval_ok = 0, n_trigger = 0, n_payload = 0, n_auth_fail = 0, n_auth_pass = 0,
      n_unlocked_ok = 0, n_glitch_bits = 0, n_quiet_bits = 0;
  int cycle = 0, lock_cycle = -1;
  logic [89:0] first_sig;
  bit have_sig = 0;

  puf_locked_divider_top #(.PRESCALE(4), .EVAL_TICKS(10)) dut (
    .clk, .rst_n, .go, .dividend, .divisor, .quotient, .remainder, .div_done,
    .auth_req, .challenge, .auth_done, .auth_pass, .auth_response);

  always #20.833 clk = ~clk;
  always @(posedge clk) cycle++;
  always @(posedge dut.u_trojan.lock) begin n_trigger++; lock_cycle = cycle; end

  // every one-shot evaluation must reproduce the same signature
  always @(negedge clk) if (dut.puf_done) begin
    checks++;
    if (!have_sig) begin
      first_sig = dut.signature;
      have_sig = 1;
      n_glitch_bits = 90 - $countones(first_sig);
      n_quiet_bits = $countones(first_sig);
    end else if (dut.signature !== first_sig) begin
      failures++;
      $display("signature changed between evaluations");
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input int a, b, input bit expect_zero, output bit ok);
    int eq, er, lat;
    eq = expect_zero ? 0 : (b == 0 ? 15 : a / b);
    er = expect_zero ? 0 : (b == 0 ? a : a % b);
    @(negedge clk) begin go = 1'b1; dividend = 4'(a); divisor = 4'(b); end
    @(negedge clk) go = 1'b0;
    lat = 0;
    while (!div_done && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    ok = (lat == 4) && int'(quotient) == eq && int'(remainder) == er;
    if (!ok) begin
      failures++;
      $display("%0d / %0d: q %0d r %0d after %0d, expected %0d %0d after 4", a, b,
               quotient, remainder, lat, eq, er);
    end
  endtask

  task automatic authenticate(input logic [3:0] ch, input bit exp_pass, input logic [3:0] exp_resp);
    int lat;
    @(negedge clk) begin auth_req = 1'b1; challenge = ch; end
    @(negedge clk) auth_req = 1'b0;
    lat = 0;
    while (!auth_done && lat < 40) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 8 || auth_pass !== exp_pass || auth_response !== exp_resp) begin
      failures++;
      $display("challenge %b: pass %b response %b after %0d, expected %b %b after 8",
               ch, auth_pass, auth_response, lat, exp_pass, exp_resp);
    end
    if (auth_pass) n_auth_pass++; else n_auth_fail++;
  endtask

  initial begin
    bit ok;
    rst_n = 1'b0; go = 1'b0; auth_req = 1'b0; dividend = '0; divisor = '0; challenge = '0;
    @(negedge clk) rst_n = 1'b1;
    // 1. evaluation period
    divide(15, 3, 0, ok); if (ok) n_eval_ok++;
    divide(11, 4, 0, ok); if (ok) n_eval_ok++;
    // 2. wait for the trigger, then the payload
    while (lock_cycle < 0) @(negedge clk);
    checks++;
    // reset is released after edge 1; the trigger comes 40 edges later
    if (lock_cycle != 41) begin failures++; $display("trigger at edge %0d, expected 41", lock_cycle); end
    for (int i = 0; i < 4; i++) begin
      divide(15 - i, 3, 1, ok); if (ok) n_payload++;
    end
    // 3. wrong challenges
    authenticate(4'b0010, 1'b0, 4'b1110);
    authenticate(4'b0000, 1'b0, 4'b0110);
    divide(15, 3, 1, ok); if (ok) n_payload++;
    // 4. enrolled challenge
    authenticate(4'b0001, 1'b1, 4'b0011);
    // 5. unlocked
    divide(15, 3, 0, ok); if (ok) n_unlocked_ok++;
    repeat (100) @(negedge clk);
    for (int i = 0; i < 10; i++) begin
      int a, b;
      a = $urandom % 16; b = 1 + $urandom % 15;
      divide(a, b, 0, ok); if (ok) n_unlocked_ok++;
    end
    $display("mechanisms: eval-ok %0d trigger %0d payload %0d auth-fail %0d auth-pass %0d unlocked-ok %0d glitch-bits %0d quiet-bits %0d",
             n_eval_ok, n_trigger, n_payload, n_auth_fail, n_auth_pass, n_unlocked_ok, n_glitch_bits, n_quiet_bits);
    checks++;
    if (n_eval_ok == 0 || n_trigger != 1 || n_payload == 0 || n_auth_fail == 0 || n_auth_pass == 0 ||
        n_unlocked_ok == 0 || n_glitch_bits == 0 || n_quiet_bits == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
