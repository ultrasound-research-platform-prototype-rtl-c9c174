// tb_ddr_xor_out: checks the double-edge XOR output cell.
//
// A new random sample pair is presented in every cycle of the 4 ns
// (250 MHz) clock, back to back. The pin is sampled 1 ns after each rising and
// each falling edge and must show the pair presented in the previous cycle:
// its rise sample in the high half, its fall sample in the low half, i.e.
// 500 MS/s from one clock with one cycle of latency. Reset must hold the
// pin low.
`timescale 1ns/1ps
module tb_ddr_xor_out;
  localparam int NPAIRS = 4000;
  logic clk = 1'b0, rst = 1'b1, d_rise = 1'b0, d_fall = 1'b0, q;
  int checks = 0, failures = 0;
  logic [1:0] pairs [NPAIRS];

  ddr_xor_out dut (.clk, .rst, .d_rise, .d_fall, .q);

  always #2 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin
    foreach (pairs[i]) pairs[i] = 2'($urandom);
    pairs[0] = 2'b11; pairs[1] = 2'b10; pairs[2] = 2'b01; pairs[3] = 2'b00;
    repeat (3) @(posedge clk);
    #1 check(q, 1'b0, "reset high half");
    @(negedge clk);
    #1 check(q, 1'b0, "reset low half");
    @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < NPAIRS; i++) begin
      #0.5 {d_rise, d_fall} = pairs[i];
      @(posedge clk);
      #1 check(q, pairs[i][1], "rise sample");
      @(negedge clk);
      #1 check(q, pairs[i][0], "fall sample");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * NPAIRS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
