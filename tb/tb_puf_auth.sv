// tb_puf_auth: puf_auth against a stand-in PUF that answers puf_start with
// puf_done after a random delay and a signature chosen by the test.
// 200 random (challenge, signature) trials plus directed ones: the measured
// response must be signature[4*challenge +: 4] and pass must be set only for
// challenge 0001 with response 0011. A second instance with a 40-bit PUF
// (10 groups) must fail every challenge of 10 and above. Latency from the
// PUF's done to auth done is one cycle.
`timescale 1ns / 1ps
module tb_puf_auth;
  logic clk = 1'b0, rst_n, req;
  logic [3:0] challenge;
  logic [89:0] signature;
  logic busy, done, pass, puf_start, puf_done;
  logic [3:0] response;
  logic busy_s, done_s, pass_s, start_s, puf_done_s;
  logic [3:0] resp_s;
  int checks = 0, failures = 0, passes = 0;

  puf_auth dut (.clk, .rst_n, .req, .challenge, .busy, .done, .pass, .response,
                .puf_start, .puf_done, .signature);
  puf_auth #(.PUF_BITS(40)) dut_s (.clk, .rst_n, .req, .challenge, .busy(busy_s), .done(done_s),
                .pass(pass_s), .response(resp_s), .puf_start(start_s), .puf_done(puf_done_s),
                .signature(signature[39:0]));

  always #20.833 clk = ~clk;

  // stand-in PUF measurement for both instances
  int delay_q;
  initial begin
    puf_done = 1'b0;
    forever begin
      @(posedge clk);
      if (puf_start) begin
        repeat (delay_q) @(posedge clk);
        puf_done <= 1'b1;
        @(posedge clk) puf_done <= 1'b0;
      end
    end
  end
  assign puf_done_s = puf_done;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic trial(input logic [3:0] ch, input logic [89:0] sig);
    logic [3:0] exp_r;
    logic exp_p, exp_ps;
    int waited;
    signature = sig;
    challenge = ch;
    delay_q = 1 + ($urandom % 5);
    exp_r  = sig[4*ch +: 4];
    exp_p  = (ch == 4'b0001) && (exp_r == 4'b0011);
    exp_ps = (ch < 10) && exp_p;
    @(negedge clk) req = 1'b1;
    @(negedge clk) req = 1'b0;
    challenge = ~ch;                 // must have been latched
    waited = 0;
    while (!done) begin @(negedge clk); waited++; end
    checks++;
    if (response !== exp_r || pass !== exp_p || done_s !== 1'b1 || pass_s !== exp_ps) begin
      failures++;
      $display("ch %h: resp %b pass %b small-pass %b, expected %b %b %b", ch, response, pass,
               pass_s, exp_r, exp_p, exp_ps);
    end
    if (pass) passes++;
    @(negedge clk);
    checks++;
    if (done || busy) begin failures++; $display("done/busy not cleared"); end
  endtask

  initial begin
    logic [89:0] s;
    rst_n = 1'b0; req = 1'b0; challenge = '0; signature = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    s = '0; s[7:4] = 4'b0011;
    trial(4'b0001, s);                  // enrolled pair: pass
    trial(4'b0010, s);                  // other challenge: fail
    s[7:4] = 4'b0111;
    trial(4'b0001, s);                  // wrong response: fail
    for (int i = 0; i < 200; i++) begin
      s = {$urandom, $urandom, $urandom};
      if (i % 4 == 0) s[7:4] = 4'b0011;
      trial(4'($urandom), s);
    end
    checks++;
    if (passes == 0) begin failures++; $display("no pass seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
