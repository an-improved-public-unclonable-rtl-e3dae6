// tb_lut_srl16: checks the SRL16 LUT model. Two instances (16'h5555 and a
// non-symmetric 16'h8C31) are loaded and rotated for 40 shifts, with idle
// cycles in between; the output after k shifts must be INIT[(15-k) mod 16].
// A reload mid-sequence must restart the pattern.
`timescale 1ns / 1ps
module tb_lut_srl16;
  logic clk = 1'b0, load, shift;
  logic qa, qb;
  int   checks = 0, failures = 0;

  localparam logic [15:0] IA = 16'h5555, IB = 16'h8C31;

  lut_srl16 #(.INIT(IA)) dut_a (.clk, .load, .shift, .q(qa));
  lut_srl16 #(.INIT(IB)) dut_b (.clk, .load, .shift, .q(qb));

  always #20.833 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int k);
    checks++;
    if (qa !== IA[(15 - k) % 16] || qb !== IB[(15 - k) % 16]) begin
      failures++;
      $display("shift %0d: qa=%b qb=%b expected %b %b", k, qa, qb, IA[(15-k)%16], IB[(15-k)%16]);
    end
  endtask

  initial begin
    load = 1'b0; shift = 1'b0;
    @(negedge clk) load = 1'b1;
    @(negedge clk) load = 1'b0;
    check(0);
    for (int k = 1; k <= 40; k++) begin
      shift = 1'b1;
      @(negedge clk) shift = 1'b0;
      check(k);
      if (k % 3 == 0) begin
        @(negedge clk);       // idle cycle: no change
        check(k);
      end
    end
    // reload wins over shift
    load = 1'b1; shift = 1'b1;
    @(negedge clk) begin load = 1'b0; shift = 1'b0; end
    check(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
