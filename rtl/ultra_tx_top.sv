// ultra_tx_top: FPGA side of the multi-element ultrasound transmitter.
//
// Sigma-delta modulated excitations (1-bit streams, 1536 samples = 3 us at
// 500 MS/s) are uploaded from a PC over a 115200-baud UART together with
// the waveform assigned to each of the four output pins and each pin's
// delay. Waveforms are kept in external DDR2 memory, reached through a
// single user port (`mem_*`) that an arbiter shares among five memory
// sockets: one per pin (priority 1, they feed transmission) and the upload
// loader (priority 0). On "output now" every assigned pin's channel reads
// the first two words of its waveform, then a delay counter starts and
// each pin begins when the count matches its delay, reading the rest of
// its waveform while it transmits; samples leave two per 250 MHz clock through a
// rising/falling-edge XOR output cell, giving 500 MS/s per pin. Unassigned
// and idle pins are held low.
//
// Memory port (towards a DDR2 controller, which is not part of this RTL):
// a command is taken when mem_cmd_valid and mem_cmd_ready are both high;
// mem_cmd_addr is a 256-bit word address. Read data returns in order on
// mem_rsp_valid/mem_rsp_rdata, with any latency. Status: `armed` is high
// while idle with at least one pin assigned, `busy` during a transmission,
// `tx_done` pulses when every assigned pin has finished and `uart_err`
// pulses on a received frame with a bad stop bit, `underrun` pulses if a
// pin ran out of waveform data (memory too slow; should never happen).
// The UART link, DDR2 storage, the four pins, the priority of transmission
// over upload, the delay counter and the double-edge output follow the
// design description; the number of sockets and their priority values, the
// memory port handshake and the status outputs are this implementation's.
module ultra_tx_top
  import ultra_pkg::*;
#(
  parameter int unsigned CLKS_PER_BIT = CLK_HZ / BAUD
) (
  input  logic                  clk,
  input  logic                  rst,
  // UART to the PC
  input  logic                  uart_rxd,
  output logic                  uart_txd,
  // DDR2 controller user port
  output logic                  mem_cmd_valid,
  output logic                  mem_cmd_we,
  output logic [MEM_ADDR_W-1:0] mem_cmd_addr,
  output logic [MEM_DATA_W-1:0] mem_cmd_wdata,
  input  logic                  mem_cmd_ready,
  input  logic                  mem_rsp_valid,
  input  logic [MEM_DATA_W-1:0] mem_rsp_rdata,
  // excitation pins (to the high-voltage amplifiers)
  output logic [NUM_PINS-1:0]   tx_pin,
  // status
  output logic                  armed,
  output logic                  busy,
  output logic                  tx_done,
  output logic                  uart_err,
  output logic                  underrun
);
  localparam int unsigned NSOCK = NUM_PINS + 1;
  localparam int unsigned LOADER = NUM_PINS;
  // Pin sockets priority 1, loader socket priority 0.
  localparam logic [NSOCK*PRIO_W-1:0] SOCK_PRIO =
    {PRIO_W'(0), {NUM_PINS{PRIO_W'(1)}}};

  // UART
  logic [7:0] rx_data, rsp_data;
  logic       rx_valid, rsp_valid, rsp_ready;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst, .rxd(uart_rxd), .data(rx_data), .valid(rx_valid),
    .frame_err(uart_err)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst, .data(rsp_data), .valid(rsp_valid), .ready(rsp_ready),
    .txd(uart_txd)
  );

  // Sockets and arbiter
  logic     [NSOCK-1:0] sock_req, sock_gnt, sock_ready;
  mem_cmd_t [NSOCK-1:0] sock_cmd;
  mem_rsp_t [NSOCK-1:0] sock_rsp;
  mem_cmd_t             mem_cmd;
  mem_rsp_t             mem_rsp;

  assign mem_rsp.rvalid = mem_rsp_valid;
  assign mem_rsp.rdata  = mem_rsp_rdata;
  assign mem_cmd_valid  = mem_cmd.valid;
  assign mem_cmd_we     = mem_cmd.we;
  assign mem_cmd_addr   = mem_cmd.addr;
  assign mem_cmd_wdata  = mem_cmd.wdata;

  mem_arbiter #(.N(NSOCK), .PRIO(SOCK_PRIO)) u_arb (
    .clk, .rst, .req(sock_req), .cmd(sock_cmd), .gnt(sock_gnt),
    .cmd_ready(sock_ready), .rsp(sock_rsp), .mem_cmd(mem_cmd),
    .mem_ready(mem_cmd_ready), .mem_rsp(mem_rsp)
  );

  // Upload loader
  logic                        pin_wr, dly_wr, go, ctrl_busy, ctrl_armed;
  logic [$clog2(NUM_PINS)-1:0] pin_sel, dly_sel;
  logic [WAVE_IDX_W-1:0]       pin_wave;
  logic [DELAY_W-1:0]          dly_val;
  logic [DELAY_W:0]            count;

  cmd_loader #(.PINS(NUM_PINS)) u_loader (
    .clk, .rst, .rx_data, .rx_valid, .rsp_data, .rsp_valid, .rsp_ready,
    .req(sock_req[LOADER]), .gnt(sock_gnt[LOADER]), .cmd(sock_cmd[LOADER]),
    .cmd_ready(sock_ready[LOADER]), .pin_wr, .pin_sel, .pin_wave, .dly_wr,
    .dly_sel, .dly_val, .go, .ctrl_busy, .ctrl_armed
  );

  // Excitation control
  logic [NUM_PINS-1:0][MEM_ADDR_W-1:0] base_addr;
  logic [NUM_PINS-1:0] fetch, loaded, start, chan_done, active, d_rise, d_fall;
  logic [NUM_PINS-1:0] chan_underrun;

  excitation_ctrl #(.PINS(NUM_PINS), .DW(DELAY_W)) u_ctrl (
    .clk, .rst, .pin_wr, .pin_sel, .pin_wave, .dly_wr, .dly_sel, .dly_val,
    .go, .base_addr, .fetch, .loaded, .start, .chan_done, .busy(ctrl_busy),
    .armed(ctrl_armed), .tx_done, .count
  );

  // Channels and double-edge output cells
  for (genvar p = 0; p < NUM_PINS; p++) begin : g_pin
    tx_channel u_chan (
      .clk, .rst, .base_addr(base_addr[p]), .fetch(fetch[p]),
      .loaded(loaded[p]), .start(start[p]), .active(active[p]),
      .done(chan_done[p]), .underrun(chan_underrun[p]), .d_rise(d_rise[p]), .d_fall(d_fall[p]),
      .req(sock_req[p]), .gnt(sock_gnt[p]), .cmd(sock_cmd[p]),
      .cmd_ready(sock_ready[p]), .rsp(sock_rsp[p])
    );
    ddr_xor_out u_out (
      .clk, .rst, .d_rise(d_rise[p]), .d_fall(d_fall[p]), .q(tx_pin[p])
    );
  end

  assign armed = ctrl_armed;
  assign busy     = ctrl_busy;
  assign underrun = |chan_underrun;
endmodule
