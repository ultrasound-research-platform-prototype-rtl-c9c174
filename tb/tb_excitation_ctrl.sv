// tb_excitation_ctrl: checks the pin tables and the delay counter.
//
// Model channels in the testbench report `loaded` a random time after their
// `fetch` and `chan_done` a fixed time after their `start`. Several shots
// are run with random waveform assignments (some pins unassigned) and random
// delays, including equal delays and a delay of zero. Checked: base address
// = waveform index * 6 words, fetch only to assigned pins, counting starts
// only once every assigned pin is loaded, each assigned pin starts exactly
// `delay` clocks (4 ns each) after counting starts and only once,
// unassigned pins never start, tx_done comes when the last pin has
// finished, table writes are ignored while busy, and output-now with no
// pin assigned does nothing.
`timescale 1ns/1ps
module tb_excitation_ctrl;
  import ultra_pkg::*;
  localparam int P = NUM_PINS;
  localparam int RUNLEN = 40;     // model channel playback length
  localparam int SHOTS = 30;

  logic clk = 1'b0, rst = 1'b1;
  logic pin_wr = 0, dly_wr = 0, go = 0;
  logic [$clog2(P)-1:0] pin_sel = '0, dly_sel = '0;
  logic [WAVE_IDX_W-1:0] pin_wave = '0;
  logic [DELAY_W-1:0] dly_val = '0;
  logic [P-1:0][MEM_ADDR_W-1:0] base_addr;
  logic [P-1:0] fetch, loaded, start, chan_done;
  logic busy, armed, tx_done;
  logic [DELAY_W:0] count;

  int checks = 0, failures = 0;
  int load_timer [P];
  int run_timer [P];

  excitation_ctrl dut (.clk, .rst, .pin_wr, .pin_sel, .pin_wave, .dly_wr, .dly_sel,
    .dly_val, .go, .base_addr, .fetch, .loaded, .start, .chan_done, .busy, .armed,
    .tx_done, .count);

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // model channels
  always @(posedge clk) begin
    for (int p = 0; p < P; p++) begin
      chan_done[p] <= 1'b0;
      if (rst) begin
        loaded[p] <= 1'b0; load_timer[p] <= -1; run_timer[p] <= -1;
      end else begin
        if (fetch[p]) begin loaded[p] <= 1'b0; load_timer[p] <= int'($urandom_range(1, 20)); end
        else if (load_timer[p] > 0) load_timer[p] <= load_timer[p] - 1;
        else if (load_timer[p] == 0) begin loaded[p] <= 1'b1; load_timer[p] <= -1; end
        if (start[p]) begin loaded[p] <= 1'b0; run_timer[p] <= RUNLEN; end
        else if (run_timer[p] > 1) run_timer[p] <= run_timer[p] - 1;
        else if (run_timer[p] == 1) begin chan_done[p] <= 1'b1; run_timer[p] <= -1; end
      end
    end
  end

  task automatic write_pin(int p, int idx);
    @(negedge clk); pin_wr = 1; pin_sel = 2'(p); pin_wave = 8'(idx);
    @(negedge clk); pin_wr = 0;
  endtask
  task automatic write_dly(int p, int d);
    @(negedge clk); dly_wr = 1; dly_sel = 2'(p); dly_val = 16'(d);
    @(negedge clk); dly_wr = 0;
  endtask

  initial begin
    int wave [P];
    int dly [P];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // nothing assigned: output now must do nothing
    check(!armed && !busy, "not armed after reset");
    @(negedge clk) go = 1;
    @(negedge clk) go = 0;
    repeat (5) @(negedge clk);
    check(!busy && fetch == '0, "output now ignored with no pin assigned");
    for (int s = 0; s < SHOTS; s++) begin
      int en_count, fetched, t_run, started_at [P], done_at, t;
      en_count = 0;
      for (int p = 0; p < P; p++) begin
        wave[p] = ($urandom_range(0, 3) == 0) ? 255 : int'($urandom_range(0, 200));
        if (s == 0) wave[p] = (p == 2) ? 255 : p + 1;
        dly[p] = (s == 0) ? p * 7 : int'($urandom_range(0, 60));
        if (s == 1) dly[p] = 0;
        if (wave[p] != 255) en_count++;
        write_pin(p, wave[p]);
        write_dly(p, dly[p]);
        started_at[p] = -1;
      end
      if (en_count == 0) begin wave[0] = 9; en_count = 1; write_pin(0, 9); end
      for (int p = 0; p < P; p++)
        if (wave[p] != 255) check(base_addr[p] == MEM_ADDR_W'(wave[p] * WAVE_WORDS), "base address");
      check(armed, "armed");
      @(negedge clk) go = 1;
      @(negedge clk) go = 0;
      // fetch pulse seen during the first cycle after go
      fetched = 0;
      t = 0; t_run = -1; done_at = -1;
      while (t < 400 && done_at < 0) begin
        if (fetch != '0) begin
          for (int p = 0; p < P; p++) check(fetch[p] == (wave[p] != 255), "fetch only assigned pins");
          fetched++;
        end
        if (start != '0 && t_run < 0) t_run = t - int'(count);
        for (int p = 0; p < P; p++) if (start[p]) begin
          check(started_at[p] < 0, "single start");
          check(loaded[p], "started only when loaded");
          started_at[p] = t;
        end
        if (tx_done) done_at = t;
        if (t == 3) begin
          // table writes during the shot are ignored
          pin_wr = 1; pin_sel = 2'd0; pin_wave = 8'd77;
        end else pin_wr = 0;
        @(negedge clk); t++;
      end
      pin_wr = 0;
      check(fetched == 1, "one fetch pulse");
      check(done_at > 0, "tx_done");
      for (int p = 0; p < P; p++) begin
        if (wave[p] == 255) check(started_at[p] < 0, "unassigned pin never starts");
        else check(started_at[p] - t_run == dly[p],
                   $sformatf("pin %0d started %0d after count start, delay %0d", p, started_at[p] - t_run, dly[p]));
      end
      begin
        int last;
        last = 0;
        for (int p = 0; p < P; p++) if (wave[p] != 255 && started_at[p] > last) last = started_at[p];
        check(done_at == last + RUNLEN + 2, $sformatf("tx_done at %0d, last start %0d", done_at, last));
      end
      check(!busy, "idle after shot");
      check(base_addr[0] == MEM_ADDR_W'((wave[0] == 255 ? 255 : wave[0]) * WAVE_WORDS), "write during shot ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SHOTS * 600 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
