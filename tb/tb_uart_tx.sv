// tb_uart_tx: checks the 8N1 UART transmitter.
//
// Random bytes are offered back to back, each as soon as `ready` allows.
// An independent line decoder waits for each falling start edge and then
// samples the start bit and every data bit in its middle; it must read each byte in order with a high stop bit.
// The frame length (start edge to the next ready) is checked against
// 10 bit periods, and the line must idle high.
`timescale 1ns/1ps
module tb_uart_tx;
  localparam int CPB = 12;
  localparam int NBYTES = 100;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] data = '0;
  logic valid = 1'b0, ready, txd;
  int checks = 0, failures = 0;
  byte unsigned sent [$];
  int n_rx = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .data, .valid, .ready, .txd);

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // line decoder
  initial begin
    @(negedge rst);
    forever begin
      byte unsigned b;
      @(negedge txd);
      repeat (CPB / 2) @(posedge clk);
      check(txd == 1'b0, "start bit low at its middle");
      repeat (CPB) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        b[i] = txd;
        repeat (CPB) @(posedge clk);
      end
      check(txd == 1'b1, "stop bit high");
      check(sent.size() > 0, "byte expected");
      if (sent.size() > 0) begin
        byte unsigned e;
        e = sent.pop_front();
        check(b == e, $sformatf("byte %02x expected %02x", b, e));
      end
      n_rx++;
    end
  end

  initial begin
    int t0, t1;
    repeat (4) @(posedge clk);
    check(txd == 1'b1, "idle high in reset");
    rst = 1'b0;
    repeat (4) @(posedge clk);
    check(txd == 1'b1 && ready, "idle high and ready");
    for (int i = 0; i < NBYTES; i++) begin
      while (!ready) @(posedge clk);
      data  <= 8'($urandom);
      valid <= 1'b1;
      @(posedge clk);
      sent.push_back(data);
      valid <= 1'b0;
      t0 = int'($time / 4);
      @(posedge clk);
      while (!ready) @(posedge clk);
      t1 = int'($time / 4);
      check(t1 - t0 >= 10 * CPB && t1 - t0 <= 10 * CPB + 2, $sformatf("frame took %0d clocks", t1 - t0));
    end
    repeat (3 * CPB) @(posedge clk);
    check(n_rx == NBYTES, $sformatf("decoded %0d bytes", n_rx));
    check(txd == 1'b1, "idle high after");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBYTES * 12 * CPB + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
