// tb_ultra_tx_full: one complete operation of the transmitter at its
// default sizes, 115200 baud from a 250 MHz clock included.
//
// The PC side uploads four different sigma-delta modulated waveforms (the
// 4-12 MHz chirp, a 12-4 MHz chirp, an 8.3 MHz pulse and a weaker 4-12 MHz
// chirp) into four waveform slots, assigns one to each pin, gives the pins
// delays of 0, 25, 50 and 75 clocks (100 ns steps, as for steering a beam)
// and sends output-now. This is the largest settings load the platform
// takes; the time from the first upload byte to the last acknowledgement
// before output-now must stay under the 1 s requirement. The DDR2 model has
// 24 clocks of read latency and refresh stalls. Each pin is captured at
// 500 MS/s and must carry the 1536 samples of its own waveform starting
// exactly at its delay after the delay counter starts, and be low
// otherwise. Every command must be acknowledged. About 18 million clocks
// are simulated.
`timescale 1ns/1ps
module tb_ultra_tx_full;
  import ultra_pkg::*;
  import sdm_ref_pkg::*;

  localparam int CPB = CLK_HZ / BAUD;
  localparam int P   = NUM_PINS;
  localparam int WIN = 4000;    // cycles captured after output now

  logic clk = 1'b0, rst = 1'b1, uart_rxd = 1'b1;
  logic uart_txd;
  logic mem_cmd_valid, mem_cmd_we, mem_cmd_ready, mem_rsp_valid;
  logic [MEM_ADDR_W-1:0] mem_cmd_addr;
  logic [MEM_DATA_W-1:0] mem_cmd_wdata, mem_rsp_rdata;
  logic [P-1:0] tx_pin;
  logic armed, busy, tx_done, uart_err, underrun;

  ultra_tx_top dut (
    .clk, .rst, .uart_rxd, .uart_txd, .mem_cmd_valid, .mem_cmd_we, .mem_cmd_addr,
    .mem_cmd_wdata, .mem_cmd_ready, .mem_rsp_valid, .mem_rsp_rdata, .tx_pin,
    .armed, .busy, .tx_done, .uart_err, .underrun
  );

  ddr2_model #(.LATENCY(24)) mem (
    .clk, .rst, .cmd_valid(mem_cmd_valid), .cmd_we(mem_cmd_we), .cmd_addr(mem_cmd_addr),
    .cmd_wdata(mem_cmd_wdata), .cmd_ready(mem_cmd_ready), .rsp_valid(mem_rsp_valid),
    .rsp_rdata(mem_rsp_rdata)
  );

  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // capture window, opened at output now
  int c = 0, base_c = -1;
  logic [P-1:0] hi [WIN];
  logic [P-1:0] lo [WIN];
  int start_cyc [P];
  int start_cnt [P];
  int n_done = 0, n_underrun = 0;

  initial forever begin
    int k;
    @(posedge clk);
    c++;
    #1;
    k = c - base_c;
    if (base_c >= 0 && k < WIN) hi[k] = tx_pin;
    for (int p = 0; p < P; p++)
      if (!rst && dut.start[p]) begin
        start_cyc[p] = k;
        start_cnt[p] = int'(dut.count);
      end
    if (!rst && tx_done) n_done++;
    if (!rst && underrun) n_underrun++;
    @(negedge clk);
    #1;
    if (base_c >= 0 && k < WIN) lo[k] = tx_pin;
  end

  byte unsigned replies [$];
  initial begin
    @(negedge rst);
    forever begin
      byte unsigned b;
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge clk);
      replies.push_back(b);
    end
  end

  task automatic send_byte(byte unsigned b);
    uart_rxd = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (CPB) @(posedge clk);
    end
    uart_rxd = 1'b1;
    repeat (CPB) @(posedge clk);
  endtask

  task automatic expect_ack(string what);
    int t;
    t = 0;
    while (replies.size() == 0 && t < 20 * CPB) begin @(posedge clk); t++; end
    check(replies.size() > 0 && replies[0] == RSP_ACK, {what, ": acknowledged"});
    if (replies.size() > 0) void'(replies.pop_front());
  endtask

  initial begin
    logic [WAVE_BITS-1:0] w [P];
    int dly [P], slot [P], wave_of [P];
    longint t_load;
    dly     = '{0, 25, 50, 75};
    slot    = '{7, 0, 42, 254};
    wave_of = '{2, 0, 3, 1};     // pin p plays waveform wave_of[p]
    for (int p = 0; p < P; p++) start_cyc[p] = -1;
    w[0] = sdm2(chirp(4.0e6, 12.0e6, 0.5));
    w[1] = sdm2(chirp(12.0e6, 4.0e6, 0.5));
    w[2] = sdm2(pulse(8.3e6, 0.6));
    w[3] = sdm2(chirp(4.0e6, 12.0e6, 0.25));
    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (20) @(posedge clk);

    // load settings: four waveforms, then a waveform and a delay per pin
    t_load = longint'(c);
    for (int q = 0; q < P; q++) begin
      send_byte(CMD_WAVE);
      send_byte(8'(slot[q]));
      for (int k = 0; k < WAVE_BITS / 8; k++) send_byte(w[q][8*k +: 8]);
      expect_ack("upload");
    end
    for (int p = 0; p < P; p++) begin
      send_byte(CMD_PIN); send_byte(8'(p)); send_byte(8'(slot[wave_of[p]]));
      expect_ack("assign");
      send_byte(CMD_DELAY); send_byte(8'(p)); send_byte(8'(dly[p])); send_byte(8'd0);
      expect_ack("delay");
    end
    t_load = longint'(c) - t_load;
    $display("settings for %0d pins loaded in %0d clocks (%0.1f ms)", P, t_load,
             real'(t_load) * 1.0e3 / real'(CLK_HZ));
    check(t_load < longint'(CLK_HZ), "settings load under 1 s");
    check(armed, "armed");
    send_byte(CMD_GO);
    base_c = c;
    expect_ack("output now");
    while (n_done == 0 && c - base_c < WIN - 10) @(posedge clk);
    repeat (5) @(posedge clk);
    check(n_done == 1 && !busy, "transmission finished");
    check(n_underrun == 0, "no underrun");
    for (int p = 0; p < P; p++) begin
      int bad;
      logic [WAVE_BITS-1:0] wp;
      wp = w[wave_of[p]];
      bad = 0;
      check(start_cyc[p] > 0 && start_cnt[p] == dly[p], $sformatf("pin %0d start at its delay", p));
      for (int k = 1; k < WIN - 10; k++) begin
        int j;
        logic eh, el;
        j = k - (start_cyc[p] + 2);
        eh = (j >= 0 && j < WAVE_BITS / 2) ? wp[2*j]   : 1'b0;
        el = (j >= 0 && j < WAVE_BITS / 2) ? wp[2*j+1] : 1'b0;
        if (hi[k][p] != eh || lo[k][p] != el) bad++;
      end
      check(bad == 0, $sformatf("pin %0d: %0d wrong half-cycle pairs", p, bad));
      check(start_cyc[p] - start_cyc[0] == dly[p], "relative timing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (22_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
