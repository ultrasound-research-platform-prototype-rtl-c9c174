// tb_cmd_loader: checks the upload command decoder.
//
// Bytes are fed to the loader as the UART receiver would give them, one
// `rx_valid` pulse every 20 clocks. The testbench memory grants the socket
// after a random wait and takes writes with random ready; a run with a
// grant wait longer than a word's upload time checks that a lost word is
// reported. Checked: two waveforms land at word address index * 6 with the
// right 256-bit contents (byte k = samples 8k..8k+7), the pin and delay
// table writes and the output-now pulse carry the right values, and every
// command gets the right reply: 'K', or 'N' for an unknown code, a pin out
// of range, output-now when not armed, settings while busy, and a waveform
// whose words could not all be written.
`timescale 1ns/1ps
module tb_cmd_loader;
  import ultra_pkg::*;
  localparam int GAP = 20;

  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] rx_data = '0, rsp_data;
  logic rx_valid = 1'b0, rsp_valid, rsp_ready = 1'b1;
  logic req, gnt = 1'b0, cmd_ready = 1'b0;
  mem_cmd_t cmd;
  logic pin_wr, dly_wr, go;
  logic [1:0] pin_sel, dly_sel;
  logic [WAVE_IDX_W-1:0] pin_wave;
  logic [DELAY_W-1:0] dly_val;
  logic ctrl_busy = 1'b0, ctrl_armed = 1'b0;

  int checks = 0, failures = 0;
  logic [MEM_DATA_W-1:0] mem [logic [MEM_ADDR_W-1:0]];
  byte unsigned replies [$];
  int n_go = 0, n_pin = 0, n_dly = 0;
  logic [1:0] last_pin_sel, last_dly_sel;
  logic [7:0] last_pin_wave;
  logic [15:0] last_dly_val;
  int min_wait = 0, max_wait = 10, wait_left = 0;

  cmd_loader dut (.clk, .rst, .rx_data, .rx_valid, .rsp_data, .rsp_valid, .rsp_ready,
    .req, .gnt, .cmd, .cmd_ready, .pin_wr, .pin_sel, .pin_wave, .dly_wr, .dly_sel,
    .dly_val, .go, .ctrl_busy, .ctrl_armed);

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (!req) begin
      gnt <= 1'b0;
      wait_left <= int'($urandom_range(min_wait, max_wait));
    end else if (!gnt) begin
      if (wait_left == 0) gnt <= 1'b1; else wait_left <= wait_left - 1;
    end
    cmd_ready <= 1'($urandom);
    if (cmd.valid && cmd_ready) begin
      check(cmd.we, "loader only writes");
      mem[cmd.addr] = cmd.wdata;
    end
    if (rsp_valid && rsp_ready) replies.push_back(rsp_data);
    if (go) n_go++;
    if (pin_wr) begin n_pin++; last_pin_sel = pin_sel; last_pin_wave = pin_wave; end
    if (dly_wr) begin n_dly++; last_dly_sel = dly_sel; last_dly_val = dly_val; end
  end

  task automatic put(byte unsigned b);
    @(negedge clk); rx_data = b; rx_valid = 1'b1;
    @(negedge clk); rx_valid = 1'b0;
    repeat (GAP - 2) @(negedge clk);
  endtask

  task automatic expect_reply(byte unsigned e, string what);
    repeat (GAP * 40) begin
      if (replies.size() > 0) break;
      @(negedge clk);
    end
    check(replies.size() == 1, {what, ": one reply"});
    if (replies.size() > 0) begin
      byte unsigned r;
      r = replies.pop_front();
      check(r == e, $sformatf("%s: reply %c expected %c", what, r, e));
    end
  endtask

  task automatic upload(int idx, ref logic [WAVE_BITS-1:0] w);
    put(CMD_WAVE);
    put(8'(idx));
    for (int k = 0; k < WAVE_BITS / 8; k++) put(w[8*k +: 8]);
  endtask

  initial begin
    logic [WAVE_BITS-1:0] w1, w2;
    for (int k = 0; k < WAVE_BITS / 32; k++) begin
      w1[32*k +: 32] = $urandom;
      w2[32*k +: 32] = $urandom;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    upload(3, w1);
    expect_reply(RSP_ACK, "waveform 3");
    for (int k = 0; k < WAVE_WORDS; k++)
      check(mem.exists(MEM_ADDR_W'(18 + k)) && mem[MEM_ADDR_W'(18 + k)] == w1[k*MEM_DATA_W +: MEM_DATA_W],
            $sformatf("waveform 3 word %0d", k));
    upload(0, w2);
    expect_reply(RSP_ACK, "waveform 0");
    for (int k = 0; k < WAVE_WORDS; k++)
      check(mem.exists(MEM_ADDR_W'(k)) && mem[MEM_ADDR_W'(k)] == w2[k*MEM_DATA_W +: MEM_DATA_W],
            $sformatf("waveform 0 word %0d", k));
    check(mem.size() == 12, "no stray writes");

    put(CMD_PIN); put(8'd2); put(8'd3);
    expect_reply(RSP_ACK, "pin 2 <- 3");
    check(n_pin == 1 && last_pin_sel == 2 && last_pin_wave == 3, "pin table write");
    put(CMD_PIN); put(8'd4); put(8'd1);
    expect_reply(RSP_NAK, "pin 4 out of range");
    check(n_pin == 1, "no write for a bad pin");
    put(CMD_DELAY); put(8'd1); put(8'h34); put(8'h12);
    expect_reply(RSP_ACK, "delay pin 1");
    check(n_dly == 1 && last_dly_sel == 1 && last_dly_val == 16'h1234, "delay table write");
    put(CMD_GO);
    expect_reply(RSP_NAK, "output now, not armed");
    check(n_go == 0, "no go when not armed");
    ctrl_armed = 1'b1;
    put(CMD_GO);
    expect_reply(RSP_ACK, "output now");
    check(n_go == 1, "go pulse");
    ctrl_busy = 1'b1;
    put(CMD_DELAY); put(8'd0); put(8'h01); put(8'h00);
    expect_reply(RSP_NAK, "delay while busy");
    put(CMD_GO);
    expect_reply(RSP_NAK, "output now while busy");
    check(n_dly == 1 && n_go == 1, "nothing written while busy");
    ctrl_busy = 1'b0;
    put(8'h3F);
    expect_reply(RSP_NAK, "unknown command");
    // memory far too slow: a word is lost and the upload is refused
    min_wait = 1500; max_wait = 2000;
    upload(5, w1);
    expect_reply(RSP_NAK, "waveform with a lost word");
    min_wait = 0; max_wait = 10;
    upload(5, w2);
    expect_reply(RSP_ACK, "waveform 5 again");
    for (int k = 0; k < WAVE_WORDS; k++)
      check(mem[MEM_ADDR_W'(30 + k)] == w2[k*MEM_DATA_W +: MEM_DATA_W], $sformatf("waveform 5 word %0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
