// mem_arbiter: shares the single DDR2 user port among N sockets.
//
// A socket raises `req` and keeps it high for its whole list of reads and
// writes; while it owns the port its commands go to memory, `ready` comes
// back to it and read data is routed to it. Only when the owner lowers `req`
// are the other requests looked at again, so a socket's list is never cut
// into. A new owner is chosen in two steps, as the design describes: every
// requester whose priority is below the highest requesting priority is
// dropped, and of those left the one whose previous grant lies furthest in
// the past wins. That history is kept as an age matrix (older[i][j] set when
// socket i was last served before socket j), reset to index order. A grant
// is registered: it appears the cycle after the port falls idle, and one
// idle cycle follows each release. PRIO holds PRIO_W bits per socket, higher
// value winning; the values and the port handshake are this
// implementation's choices.
module mem_arbiter
  import ultra_pkg::*;
#(
  parameter int unsigned          N    = 5,
  parameter logic [N*PRIO_W-1:0]  PRIO = '0
) (
  input  logic             clk,
  input  logic             rst,
  // socket side
  input  logic [N-1:0]     req,
  input  mem_cmd_t [N-1:0] cmd,
  output logic [N-1:0]     gnt,
  output logic [N-1:0]     cmd_ready,
  output mem_rsp_t [N-1:0] rsp,
  // memory side
  output mem_cmd_t         mem_cmd,
  input  logic             mem_ready,
  input  mem_rsp_t         mem_rsp
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0][N-1:0] older;
  logic                owned;
  logic [IW-1:0]       owner;

  // Arbitration: priority filter, then least recently served.
  logic [PRIO_W-1:0] top_prio;
  logic [N-1:0]      cand;
  logic [N-1:0]      pick;
  logic [IW-1:0]     pick_idx;

  always_comb begin
    top_prio = '0;
    for (int i = 0; i < N; i++)
      if (req[i] && PRIO[i*PRIO_W +: PRIO_W] > top_prio)
        top_prio = PRIO[i*PRIO_W +: PRIO_W];
    for (int i = 0; i < N; i++)
      cand[i] = req[i] && (PRIO[i*PRIO_W +: PRIO_W] == top_prio);
    pick     = '0;
    pick_idx = '0;
    for (int i = 0; i < N; i++) begin
      logic oldest;
      oldest = cand[i];
      for (int j = 0; j < N; j++)
        if (j != i && cand[j] && !older[i][j]) oldest = 1'b0;
      if (oldest && pick == '0) begin
        pick[i]  = 1'b1;
        pick_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      owned <= 1'b0;
      owner <= '0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          older[i][j] <= (i < j);
    end else if (owned) begin
      if (!req[owner]) owned <= 1'b0;
    end else if (pick != '0) begin
      owned <= 1'b1;
      owner <= pick_idx;
      for (int j = 0; j < N; j++)
        if (j != int'(pick_idx)) begin
          older[pick_idx][j] <= 1'b0;
          older[j][pick_idx] <= 1'b1;
        end
    end
  end

  always_comb begin
    gnt       = '0;
    cmd_ready = '0;
    mem_cmd   = '0;
    for (int i = 0; i < N; i++) begin
      rsp[i].rvalid = 1'b0;
      rsp[i].rdata  = mem_rsp.rdata;
    end
    if (owned) begin
      gnt[owner]        = 1'b1;
      cmd_ready[owner]  = mem_ready;
      mem_cmd           = cmd[owner];
      rsp[owner].rvalid = mem_rsp.rvalid;
    end
  end

  // At most one socket owns the port.
  a_onehot_gnt: assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));
  // The owner keeps its request until it releases the port.
  a_mem_cmd_owned: assert property (@(posedge clk) disable iff (rst)
                                    mem_cmd.valid |-> owned);
endmodule
