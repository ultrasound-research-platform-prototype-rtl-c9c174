// tb_ultra_tx_top: end-to-end test of the transmitter.
//
// The testbench plays the PC: it prepares excitations with a second-order
// sigma-delta modulator (a 4-12 MHz linear chirp, a two-cycle 8.3 MHz
// pulse, random streams), uploads them over the UART at 8 clocks per bit,
// assigns them to pins with delays and sends output-now. A behavioural
// DDR2 model with 24 clocks of read latency and refresh stalls sits on the
// memory port. Every pin is captured 1 ns after each clock edge, i.e. at
// 500 MS/s, and compared with the expected stream: each assigned pin must
// carry its full 1536-sample waveform starting exactly `delay` clocks after
// the delay counter starts (plus the fixed two-clock output latency), and
// be low before and after; unassigned pins must stay low.
// During the first shot another waveform is uploaded; the pin delays of that
// shot are chosen so that three pins are transmitting, and refilling their
// buffers from memory, when the first word of the upload is written, so the
// upload socket competes with the pin sockets.
// Counted, and each required at least once: waveform uploads, arbitration
// decided by priority (upload socket passed over), arbitration decided by
// history (among pin sockets), memory reads while pins transmit, samples
// whose two half-cycles differ (double-edge output), NAK replies and UART
// frame errors. Underruns must never occur. The chirp captured on a pin is
// also low-pass filtered and correlated with the original chirp.
`timescale 1ns/1ps
module tb_ultra_tx_top;
  import ultra_pkg::*;
  import sdm_ref_pkg::*;

  localparam int CPB  = 8;
  localparam int MAXC = 120000;
  localparam int P    = NUM_PINS;
  localparam int LOADER = NUM_PINS;

  logic clk = 1'b0, rst = 1'b1, uart_rxd = 1'b1;
  logic uart_txd;
  logic mem_cmd_valid, mem_cmd_we, mem_cmd_ready, mem_rsp_valid;
  logic [MEM_ADDR_W-1:0] mem_cmd_addr;
  logic [MEM_DATA_W-1:0] mem_cmd_wdata, mem_rsp_rdata;
  logic [P-1:0] tx_pin;
  logic armed, busy, tx_done, uart_err, underrun;

  ultra_tx_top #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst, .uart_rxd, .uart_txd, .mem_cmd_valid, .mem_cmd_we, .mem_cmd_addr,
    .mem_cmd_wdata, .mem_cmd_ready, .mem_rsp_valid, .mem_rsp_rdata, .tx_pin,
    .armed, .busy, .tx_done, .uart_err, .underrun
  );

  ddr2_model #(.LATENCY(24), .REFRESH_PERIOD(700), .REFRESH_LEN(30), .STALL_PCT(10)) mem (
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

  // ---------------- capture and event counters
  int c = 0;
  logic [P-1:0] hi [MAXC];
  logic [P-1:0] lo [MAXC];
  int start_cyc [P];
  int start_cnt [P];
  int n_prio = 0, n_hist = 0, n_refill = 0, n_ddr = 0, n_underrun = 0, n_ferr = 0;
  int n_done = 0, n_upload = 0, n_nak = 0;

  initial forever begin
    @(posedge clk);
    c++;
    #1;
    if (c < MAXC) hi[c] = tx_pin;
    if (!rst) begin
      for (int p = 0; p < P; p++)
        if (dut.start[p]) begin
          start_cyc[p] = c;
          start_cnt[p] = int'(dut.count);
        end
      if (!dut.u_arb.owned && dut.u_arb.pick != '0) begin
        if (dut.u_arb.req[LOADER] && !dut.u_arb.pick[LOADER]) n_prio++;
        if ($countones(dut.u_arb.cand) > 1) n_hist++;
      end
      if (mem_cmd_valid && mem_cmd_ready && !mem_cmd_we && dut.active != '0) n_refill++;
      if (underrun) n_underrun++;
      if (uart_err) n_ferr++;
      if (tx_done) n_done++;
    end
    @(negedge clk);
    #1;
    if (c < MAXC) begin
      lo[c] = tx_pin;
      if (hi[c] != lo[c]) n_ddr++;
    end
  end

  // ---------------- UART, PC side
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

  task automatic send_byte(byte unsigned b, bit stop = 1'b1);
    uart_rxd = 1'b0;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd = b[i];
      repeat (CPB) @(posedge clk);
    end
    uart_rxd = stop;
    repeat (CPB) @(posedge clk);
    uart_rxd = 1'b1;
    repeat (CPB) @(posedge clk);
  endtask

  task automatic expect_reply(byte unsigned e, string what);
    int t;
    t = 0;
    while (replies.size() == 0 && t < 2000 * CPB) begin @(posedge clk); t++; end
    check(replies.size() > 0, {what, ": reply received"});
    if (replies.size() > 0) begin
      byte unsigned r;
      r = replies.pop_front();
      if (r == RSP_NAK) n_nak++;
      check(r == e, $sformatf("%s: reply %c expected %c", what, r, e));
    end
  endtask

  task automatic upload(int idx, logic [WAVE_BITS-1:0] w);
    send_byte(CMD_WAVE);
    send_byte(8'(idx));
    for (int k = 0; k < WAVE_BITS / 8; k++) send_byte(w[8*k +: 8]);
    expect_reply(RSP_ACK, $sformatf("upload waveform %0d", idx));
    n_upload++;
  endtask

  task automatic assign_pin(int p, int idx);
    send_byte(CMD_PIN); send_byte(8'(p)); send_byte(8'(idx));
    expect_reply(RSP_ACK, $sformatf("assign pin %0d", p));
  endtask

  task automatic set_delay(int p, int d);
    send_byte(CMD_DELAY); send_byte(8'(p)); send_byte(8'(d)); send_byte(8'(d >> 8));
    expect_reply(RSP_ACK, $sformatf("delay pin %0d", p));
  endtask

  // Compare the captured pins of one shot with the expected streams.
  task automatic check_shot(int go_c, int end_c, int wave_of [P], int dly [P],
                            logic [WAVE_BITS-1:0] waves [8]);
    for (int p = 0; p < P; p++) begin
      int bad, s0;
      bad = 0;
      if (wave_of[p] < 0) begin
        for (int cc = go_c; cc < end_c; cc++) if (hi[cc][p] || lo[cc][p]) bad++;
        check(bad == 0, $sformatf("unassigned pin %0d held low", p));
        continue;
      end
      check(start_cyc[p] > go_c && start_cnt[p] == dly[p],
            $sformatf("pin %0d started at count %0d, delay %0d", p, start_cnt[p], dly[p]));
      s0 = start_cyc[p] + 2;
      for (int cc = go_c; cc < end_c; cc++) begin
        int k;
        logic eh, el;
        k = cc - s0;
        if (k >= 0 && k < WAVE_BITS / 2) begin
          eh = waves[wave_of[p]][2*k];
          el = waves[wave_of[p]][2*k+1];
        end else begin
          eh = 1'b0; el = 1'b0;
        end
        if (hi[cc][p] != eh || lo[cc][p] != el) bad++;
      end
      check(bad == 0, $sformatf("pin %0d stream: %0d wrong half-cycle pairs", p, bad));
    end
    for (int p = 0; p < P; p++)
      for (int q = 0; q < P; q++)
        if (wave_of[p] >= 0 && wave_of[q] >= 0)
          check(start_cyc[p] - start_cyc[q] == dly[p] - dly[q], "relative pin timing");
  endtask

  task automatic run_shot(int wave_of [P], int dly [P], logic [WAVE_BITS-1:0] waves [8],
                          int upload_idx, logic [WAVE_BITS-1:0] upload_w);
    int go_c, d0, maxd;
    maxd = 0;
    for (int p = 0; p < P; p++) begin
      assign_pin(p, wave_of[p] < 0 ? 255 : wave_of[p]);
      set_delay(p, dly[p]);
      start_cyc[p] = -1;
      if (wave_of[p] >= 0 && dly[p] > maxd) maxd = dly[p];
    end
    check(armed && !busy, "armed before output now");
    d0 = n_done;
    go_c = c;
    send_byte(CMD_GO);
    expect_reply(RSP_ACK, "output now");
    check(busy, "busy during transmission");
    if (upload_idx >= 0) begin
      send_byte(CMD_GO);
      expect_reply(RSP_NAK, "output now while busy");
      upload(upload_idx, upload_w);
    end
    while (n_done == d0 && c < MAXC - 1000) @(posedge clk);
    repeat (10) @(posedge clk);
    check(n_done == d0 + 1, "one tx_done per shot");
    check(!busy, "idle after shot");
    check_shot(go_c, c - 2, wave_of, dly, waves);
  endtask

  initial begin
    logic [WAVE_BITS-1:0] waves [8];
    sig_t chirp_sig;
    int wave_of [P];
    int dly [P];
    for (int p = 0; p < P; p++) start_cyc[p] = -1;
    chirp_sig = chirp(4.0e6, 12.0e6, 0.5);
    waves[0] = sdm2(chirp_sig);
    waves[1] = sdm2(pulse(8.3e6, 0.6));
    for (int i = 2; i < 8; i++)
      for (int k = 0; k < WAVE_BITS / 32; k++) waves[i][32*k +: 32] = $urandom;

    repeat (5) @(posedge clk);
    rst = 1'b0;
    repeat (20) @(posedge clk);
    check(!armed && !busy && tx_pin == '0, "idle after reset");

    upload(0, waves[0]);
    upload(1, waves[1]);
    upload(2, waves[2]);
    send_byte(CMD_PIN); send_byte(8'd9); send_byte(8'd0);
    expect_reply(RSP_NAK, "pin out of range");

    // shot 1: three pins, one unassigned, upload of waveform 3 meanwhile
    wave_of = '{0, 1, 2, -1};
    dly     = '{2900, 2937, 3000, 5};
    run_shot(wave_of, dly, waves, 3, waves[3]);

    // shot 2: the waveform uploaded during shot 1, and the chirp again
    wave_of = '{-1, 0, -1, 3};
    dly     = '{0, 300, 9, 0};
    run_shot(wave_of, dly, waves, -1, waves[3]);

    // the chirp as seen after band-limiting
    begin
      logic [WAVE_BITS-1:0] cap;
      real r_sdm, r_cap;
      for (int k = 0; k < WAVE_BITS / 2; k++) begin
        cap[2*k]   = hi[start_cyc[1] + 2 + k][1];
        cap[2*k+1] = lo[start_cyc[1] + 2 + k][1];
      end
      r_sdm = filtered_corr(waves[0], chirp_sig, 16);
      r_cap = filtered_corr(cap, chirp_sig, 16);
      $display("chirp correlation after 16-tap low-pass: modulated %0.4f, pin %0.4f", r_sdm, r_cap);
      check(r_cap > 0.9, "pin output follows the chirp after low-pass");
    end

    // a frame with a bad stop bit
    send_byte(8'h55, 1'b0);
    repeat (20 * CPB) @(posedge clk);

    $display("uploads %0d, priority decisions %0d, history decisions %0d, reads while transmitting %0d",
             n_upload, n_prio, n_hist, n_refill);
    $display("double-edge samples %0d, NAKs %0d, frame errors %0d, underruns %0d",
             n_ddr, n_nak, n_ferr, n_underrun);
    check(n_upload == 4, "waveform uploads");
    check(n_prio > 0, "arbitration by priority happened");
    check(n_hist > 0, "arbitration by history happened");
    check(n_refill > 0, "memory read while transmitting");
    check(n_ddr > 0, "both clock edges carried different samples");
    check(n_nak >= 2, "refused commands answered");
    check(n_ferr == 1, "frame error reported");
    check(n_underrun == 0, "no underrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
