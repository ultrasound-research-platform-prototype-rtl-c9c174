// ddr2_model: behavioural model of the DDR2 memory and its controller, as
// seen from the transmitter's memory port. Not synthesizable; testbench use
// only.
//
// Commands are taken when `cmd_valid` and `cmd_ready` are high. `cmd_ready`
// drops for REFRESH_LEN clocks every REFRESH_PERIOD clocks, like a
// controller busy with refresh, and otherwise at random STALL_PCT percent of
// the time. Writes store a 256-bit word; reads return the stored word (zero
// if never written) LATENCY clocks later, in order. Counters of reads and
// writes are kept for the testbench.
module ddr2_model
  import ultra_pkg::*;
#(
  parameter int LATENCY        = 24,
  parameter int REFRESH_PERIOD = 700,
  parameter int REFRESH_LEN    = 30,
  parameter int STALL_PCT      = 10
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cmd_valid,
  input  logic                  cmd_we,
  input  logic [MEM_ADDR_W-1:0] cmd_addr,
  input  logic [MEM_DATA_W-1:0] cmd_wdata,
  output logic                  cmd_ready,
  output logic                  rsp_valid,
  output logic [MEM_DATA_W-1:0] rsp_rdata
);
  logic [MEM_DATA_W-1:0] store [logic [MEM_ADDR_W-1:0]];
  logic                  pipe_v [LATENCY];
  logic [MEM_DATA_W-1:0] pipe_d [LATENCY];
  int                    tick = 0;
  int                    n_reads = 0, n_writes = 0;

  assign rsp_valid = pipe_v[LATENCY-1];
  assign rsp_rdata = pipe_d[LATENCY-1];

  always @(posedge clk) begin
    if (rst) begin
      cmd_ready <= 1'b0;
      tick      <= 0;
      for (int i = 0; i < LATENCY; i++) begin
        pipe_v[i] <= 1'b0;
        pipe_d[i] <= '0;
      end
    end else begin
      tick <= tick + 1;
      cmd_ready <= (tick % REFRESH_PERIOD) >= REFRESH_LEN &&
                   $urandom_range(0, 99) >= STALL_PCT;
      pipe_v[0] <= 1'b0;
      pipe_d[0] <= '0;
      if (cmd_valid && cmd_ready) begin
        if (cmd_we) begin
          store[cmd_addr] = cmd_wdata;
          n_writes++;
        end else begin
          pipe_v[0] <= 1'b1;
          pipe_d[0] <= store.exists(cmd_addr) ? store[cmd_addr] : '0;
          n_reads++;
        end
      end
      for (int i = 1; i < LATENCY; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
    end
  end
endmodule
