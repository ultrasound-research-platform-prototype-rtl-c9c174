// tb_uart_rx: checks the 8N1 UART receiver.
//
// The line is driven with random bytes at 16 clocks per bit with random
// idle gaps (none included), followed by frames with
// a low stop bit and a short start glitch. Every good byte must come out
// once, in order, within 10 bit periods of its start edge; a bad stop bit
// must give frame_err and no byte; a glitch must give nothing.
`timescale 1ns/1ps
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 1'b0, rst = 1'b1, rxd = 1'b1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  byte unsigned expq [$];
  int unsigned start_cyc [$];
  int unsigned cyc = 0;
  int n_err = 0, n_valid = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rxd, .data, .valid, .frame_err);

  always #2 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  task automatic send(input byte unsigned b, input bit stop, input int per);
    rxd = 1'b0;
    repeat (per) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (per) @(posedge clk);
    end
    rxd = stop;
    repeat (per) @(posedge clk);
    rxd = 1'b1;
  endtask

  always @(posedge clk) if (!rst) begin
    if (valid) begin
      n_valid++;
      check(expq.size() > 0, "unexpected byte");
      if (expq.size() > 0) begin
        byte unsigned e;
        int unsigned s;
        e = expq.pop_front();
        s = start_cyc.pop_front();
        check(data == e, $sformatf("data %02x expected %02x", data, e));
        check(cyc - s <= 10 * CPB && cyc - s >= 9 * CPB, $sformatf("latency %0d", cyc - s));
      end
    end
    if (frame_err) n_err++;
  end

  initial begin
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      byte unsigned b;
      int per;
      b = 8'($urandom);
      per = CPB;
      expq.push_back(b);
      start_cyc.push_back(cyc);
      send(b, 1'b1, per);
      repeat ($urandom_range(0, 20)) @(posedge clk);
    end
    repeat (2 * CPB) @(posedge clk);
    check(expq.size() == 0, "all bytes received");
    check(n_valid == 200, "byte count");
    check(n_err == 0, "no frame errors on good frames");
    // bad stop bit
    send(8'hA5, 1'b0, CPB);
    repeat (4 * CPB) @(posedge clk);
    check(n_err == 1, "frame error flagged");
    check(n_valid == 200, "no byte from a bad frame");
    // start glitch shorter than half a bit
    rxd = 1'b0;
    repeat (CPB / 4) @(posedge clk);
    rxd = 1'b1;
    repeat (12 * CPB) @(posedge clk);
    check(n_valid == 200 && n_err == 1, "glitch ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * 12 * CPB + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
