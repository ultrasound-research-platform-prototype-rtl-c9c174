// tb_tx_channel: checks one pin's transmit channel.
//
// A behavioural memory in the testbench grants the socket after a random
// wait, accepts commands with random ready, and returns read data after a
// fixed latency; the word at address a is a fixed scramble of a. For each
// shot the channel is told to fetch from a base address, must read exactly
// the two first words and raise `loaded`, and after a `start` pulse must put
// out the 1536 samples of the six words two per clock (earlier sample on
// d_rise) in the 768 cycles following the start, then pulse `done` once and
// hold both outputs low. All six words must be read once, in order, without
// underrun while the grant wait stays well under two word times (256
// clocks); thirteen shots use fixed and random base addresses and grant
// waits. A last shot with grant waits of up to 400 clocks must report
// underrun.
`timescale 1ns/1ps
module tb_tx_channel;
  import ultra_pkg::*;
  localparam int WORDS = WAVE_BITS / MEM_DATA_W;
  localparam int PAIRS = WAVE_BITS / 2;
  localparam int LAT = 6;

  logic clk = 1'b0, rst = 1'b1;
  logic [MEM_ADDR_W-1:0] base_addr = '0;
  logic fetch = 1'b0, start = 1'b0;
  logic loaded, active, done, underrun, d_rise, d_fall, req;
  logic gnt = 1'b0, cmd_ready = 1'b0;
  mem_cmd_t cmd;
  mem_rsp_t rsp;

  int checks = 0, failures = 0;
  int n_underrun = 0;
  int max_wait = 20;
  int wait_left = 0;
  logic [MEM_ADDR_W-1:0] reads [$];
  logic [MEM_DATA_W-1:0] pipe_data [LAT];
  logic pipe_v [LAT];

  tx_channel dut (.clk, .rst, .base_addr, .fetch, .loaded, .start, .active, .done,
                  .underrun, .d_rise, .d_fall, .req, .gnt, .cmd, .cmd_ready, .rsp);

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [MEM_DATA_W-1:0] word_of(logic [MEM_ADDR_W-1:0] a);
    logic [MEM_DATA_W-1:0] w;
    for (int k = 0; k < 8; k++) w[k*32 +: 32] = (32'(a) + 32'(k)) * 32'h9E37_79B1 ^ 32'h5A5A_0F0F;
    return w;
  endfunction

  // behavioural memory and grant
  always @(posedge clk) begin
    if (rst) begin
      gnt <= 1'b0;
      for (int i = 0; i < LAT; i++) pipe_v[i] <= 1'b0;
    end else begin
      if (!req) begin
        gnt <= 1'b0;
        wait_left <= int'($urandom_range(0, max_wait));
      end else if (!gnt) begin
        if (wait_left == 0) gnt <= 1'b1;
        else wait_left <= wait_left - 1;
      end
      cmd_ready <= 1'($urandom);
      pipe_v[0]    <= cmd.valid && cmd_ready && !cmd.we;
      pipe_data[0] <= word_of(cmd.addr);
      if (cmd.valid && cmd_ready) reads.push_back(cmd.addr);
      for (int i = 1; i < LAT; i++) begin
        pipe_v[i]    <= pipe_v[i-1];
        pipe_data[i] <= pipe_data[i-1];
      end
    end
  end
  assign rsp.rvalid = pipe_v[LAT-1];
  assign rsp.rdata  = pipe_data[LAT-1];

  always @(posedge clk) if (!rst && underrun) n_underrun++;

  task automatic shot(input logic [MEM_ADDR_W-1:0] base, input bit expect_underrun);
    logic [WAVE_BITS-1:0] wave;
    int n_active, n_done, bad;
    for (int k = 0; k < WORDS; k++) wave[k*MEM_DATA_W +: MEM_DATA_W] = word_of(base + MEM_ADDR_W'(k));
    reads.delete();
    @(negedge clk);
    base_addr = base;
    fetch = 1'b1;
    @(negedge clk);
    fetch = 1'b0;
    while (!loaded) @(negedge clk);
    check(reads.size() == 2, $sformatf("prefetch read %0d words", reads.size()));
    repeat ($urandom_range(0, 30)) @(negedge clk);
    check(loaded && !active && !d_rise && !d_fall, "waiting, pin low");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n_active = 0; n_done = 0; bad = 0;
    for (int p = 0; p < PAIRS; p++) begin
      if (active) n_active++;
      if (done) n_done++;
      if (!expect_underrun) begin
        if (d_rise != wave[2*p] || d_fall != wave[2*p+1]) bad++;
        check(d_rise == wave[2*p] && d_fall == wave[2*p+1], $sformatf("sample pair %0d", p));
      end
      @(negedge clk);
    end
    if (!expect_underrun) check(bad == 0, $sformatf("%0d sample pairs wrong", bad));
    check(n_active == PAIRS, $sformatf("active for %0d cycles", n_active));
    check(n_done == 0, "no early done");
    check(done && !active, "done right after the last pair");
    @(negedge clk);
    check(!done && !d_rise && !d_fall && (expect_underrun || !req), "idle after done");
    while (req) @(negedge clk);
    if (!expect_underrun) begin
      check(reads.size() == WORDS, $sformatf("read %0d words", reads.size()));
      for (int k = 0; k < reads.size(); k++)
        check(reads[k] == base + MEM_ADDR_W'(k), "read order");
    end
  endtask

  initial begin
    for (int i = 0; i < LAT; i++) begin pipe_v[i] = 1'b0; pipe_data[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    max_wait = 0;   shot(16'd0, 0);
    max_wait = 40;  shot(16'd12, 0);
    max_wait = 100; shot(16'd300, 0);
    // random waveform slots and grant delays that the refill deadline still covers
    repeat (10) begin
      max_wait = int'($urandom_range(0, 120));
      shot(MEM_ADDR_W'($urandom_range(0, 255) * WORDS), 0);
    end
    check(n_underrun == 0, "no underrun while memory keeps up");
    max_wait = 400; shot(16'd30, 1);
    check(n_underrun > 0, $sformatf("underrun reported when memory is too slow (%0d)", n_underrun));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
