// tb_mem_arbiter: checks the memory arbiter against a reference model.
//
// Five sockets with priorities 1, 1, 0, 0, 2 (socket 0..4) raise requests at
// random, keep them for a random list of 1..4 commands once granted, then
// release. A reference model keeps the time of each socket's last grant and,
// for every new grant, predicts the winner: the requesters of the highest
// requesting priority, and of those the one served longest ago. Also
// checked every cycle: at most one grant, a grant only to a requester, no
// change of owner while the owner still requests, no idle cycle beyond the
// one after a release, and the routing of commands, ready and read data.
// The test counts grants decided by priority and grants decided by history
// and fails if either never occurred.
`timescale 1ns/1ps
module tb_mem_arbiter;
  import ultra_pkg::*;
  localparam int N = 5;
  localparam logic [N*PRIO_W-1:0] PRIO = {2'd2, 2'd0, 2'd0, 2'd1, 2'd1};
  localparam int CYCLES = 20000;

  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] req = '0, gnt, cmd_ready;
  mem_cmd_t [N-1:0] cmd;
  mem_rsp_t [N-1:0] rsp;
  mem_cmd_t mem_cmd;
  logic mem_ready = 1'b0;
  mem_rsp_t mem_rsp;

  int checks = 0, failures = 0;
  int n_grants = 0, n_by_prio = 0, n_by_history = 0;
  int last_grant [N];
  int hold_left [N];
  int idle_left [N];
  logic [N-1:0] req_prev, gnt_prev;

  mem_arbiter #(.N(N), .PRIO(PRIO)) dut (
    .clk, .rst, .req, .cmd, .gnt, .cmd_ready, .rsp, .mem_cmd, .mem_ready, .mem_rsp
  );

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int prio_of(int i);
    return int'(PRIO[i*PRIO_W +: PRIO_W]);
  endfunction

  function automatic int model_pick(logic [N-1:0] r, output bit by_prio, output bit by_hist);
    int top, best, ncand;
    top = -1; best = -1; ncand = 0;
    by_prio = 0;
    for (int i = 0; i < N; i++) if (r[i] && prio_of(i) > top) top = prio_of(i);
    for (int i = 0; i < N; i++) if (r[i] && prio_of(i) < top) by_prio = 1;
    for (int i = 0; i < N; i++)
      if (r[i] && prio_of(i) == top) begin
        ncand++;
        if (best < 0 || last_grant[i] < last_grant[best]) best = i;
      end
    by_hist = (ncand > 1);
    return best;
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      last_grant[i] = i - N;   // reset order: lower index counts as older
      hold_left[i] = 0;
      idle_left[i] = 0;
      cmd[i] = '0;
    end
    mem_rsp = '0;
    req_prev = '0;
    gnt_prev = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      // ---- checks on the state after this rising edge
      check($onehot0(gnt), "one grant at most");
      check((gnt & ~req_prev) == '0, "grant only to a requester");
      for (int i = 0; i < N; i++)
        if (gnt_prev[i] && req_prev[i]) check(gnt == gnt_prev, "owner kept while requesting");
      if (gnt_prev == '0 && req_prev != '0) check(gnt != '0, "grant after an idle cycle");
      if (gnt != '0 && gnt != gnt_prev) begin
        bit bp, bh;
        int exp;
        exp = model_pick(req_prev, bp, bh);
        check(gnt == N'(1) << exp, $sformatf("grant %b expected socket %0d (req %b)", gnt, exp, req_prev));
        n_grants++;
        if (bp) n_by_prio++;
        if (bh) n_by_history++;
        for (int i = 0; i < N; i++) if (gnt[i]) begin
          last_grant[i] = cyc;
          hold_left[i] = int'($urandom_range(1, 4));
        end
      end
      // ---- socket behaviour for the next cycle
      for (int i = 0; i < N; i++) begin
        if (gnt[i] && req[i]) begin
          if (hold_left[i] == 0) begin
            req[i] = 1'b0;
            idle_left[i] = int'($urandom_range(0, 3));
          end else hold_left[i]--;
        end else if (!req[i]) begin
          if (idle_left[i] > 0) idle_left[i]--;
          else if ($urandom_range(0, 3) == 0) req[i] = 1'b1;
        end
        cmd[i].valid = req[i] && gnt[i] && $urandom_range(0, 1) == 1;
        cmd[i].we    = 1'($urandom);
        cmd[i].addr  = MEM_ADDR_W'(i * 256 + cyc % 256);
        cmd[i].wdata = {8{32'($urandom)}};
      end
      mem_ready      = 1'($urandom);
      mem_rsp.rvalid = 1'($urandom);
      mem_rsp.rdata  = {8{32'($urandom)}};
      req_prev = req;
      gnt_prev = gnt;
      // ---- routing, after the inputs settle
      #0.5;
      for (int i = 0; i < N; i++) begin
        check(cmd_ready[i] == (gnt[i] & mem_ready), "ready routed to owner");
        check(rsp[i].rvalid == (gnt[i] & mem_rsp.rvalid), "read data routed to owner");
        if (gnt[i]) begin
          check(mem_cmd == cmd[i], "owner's command on the memory port");
          check(rsp[i].rdata == mem_rsp.rdata, "read data value");
        end
      end
      if (gnt == '0) check(!mem_cmd.valid, "no command without an owner");
    end
    $display("grants %0d, by priority %0d, by history %0d", n_grants, n_by_prio, n_by_history);
    check(n_by_prio > 0, "priority elimination happened");
    check(n_by_history > 0, "history decision happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
