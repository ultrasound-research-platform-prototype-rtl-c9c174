// cmd_loader: decodes the upload stream from the PC and carries it out.
//
// Bytes from the UART receiver form commands (codes in ultra_pkg):
//   'W' idx d0..d191   store waveform idx (1536 samples, byte k holds
//                      samples 8k..8k+7, LSB earliest) at word address
//                      idx * WAVE_WORDS of the DDR2 memory
//   'P' pin idx        assign waveform idx to a pin (8'hFF: none)
//   'D' pin lo hi      set a pin's delay, in 4 ns clock counts
//   'G'                output now
// Each command is answered with one byte, 'K' when carried out and 'N' when
// refused (unknown code, pin out of range, settings changed or output
// started while a transmission runs, output started with no pin assigned,
// or a memory word not written before the next one was complete).
// Waveform bytes are gathered into a 256-bit word; a finished word moves
// to a one-word write buffer and is written through this block's memory
// socket, which has the lowest priority, while the next word is gathered.
// The socket holds its request for a single write. The design names the
// UART upload, the waveform/delay/pin settings, the 1536-bit length and the
// 256-bit memory format; the byte protocol and the replies are this
// implementation's own.
module cmd_loader
  import ultra_pkg::*;
#(
  parameter int unsigned PINS = NUM_PINS
) (
  input  logic                    clk,
  input  logic                    rst,
  // from uart_rx
  input  logic [7:0]              rx_data,
  input  logic                    rx_valid,
  // reply to uart_tx
  output logic [7:0]              rsp_data,
  output logic                    rsp_valid,
  input  logic                    rsp_ready,
  // memory socket
  output logic                    req,
  input  logic                    gnt,
  output mem_cmd_t                cmd,
  input  logic                    cmd_ready,
  // excitation control
  output logic                    pin_wr,
  output logic [$clog2(PINS)-1:0] pin_sel,
  output logic [WAVE_IDX_W-1:0]   pin_wave,
  output logic                    dly_wr,
  output logic [$clog2(PINS)-1:0] dly_sel,
  output logic [DELAY_W-1:0]      dly_val,
  output logic                    go,
  input  logic                    ctrl_busy,
  input  logic                    ctrl_armed
);
  localparam int unsigned BYTES_PER_WORD = MEM_DATA_W / 8;             // 32
  localparam int unsigned WAVE_BYTES     = WAVE_BITS / 8;              // 192
  localparam int unsigned SW             = $clog2(PINS);

  typedef enum logic [3:0] {
    L_CMD, L_WIDX, L_WDATA, L_WFLUSH, L_PPIN, L_PIDX, L_DPIN, L_DLO, L_DHI
  } lstate_t;
  lstate_t state;

  logic [MEM_DATA_W-9:0] gather;     // bytes 0..30 of the word being gathered
  logic [7:0]            nbyte;      // waveform byte counter
  logic [MEM_ADDR_W-1:0] waddr;      // next word address
  logic                  wr_pending;
  logic [MEM_DATA_W-1:0] wr_data;
  logic [MEM_ADDR_W-1:0] wr_addr;
  logic                  overflow;
  logic [7:0]            arg_pin;
  logic [7:0]            arg_lo;

  function automatic logic pin_ok(logic [7:0] p);
    return p < 8'(PINS);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= L_CMD;
      gather     <= '0;
      nbyte      <= '0;
      waddr      <= '0;
      wr_pending <= 1'b0;
      wr_data    <= '0;
      wr_addr    <= '0;
      overflow   <= 1'b0;
      arg_pin    <= '0;
      arg_lo     <= '0;
      rsp_valid  <= 1'b0;
      rsp_data   <= '0;
      pin_wr     <= 1'b0;
      pin_sel    <= '0;
      pin_wave   <= '0;
      dly_wr     <= 1'b0;
      dly_sel    <= '0;
      dly_val    <= '0;
      go         <= 1'b0;
    end else begin
      pin_wr <= 1'b0;
      dly_wr <= 1'b0;
      go     <= 1'b0;
      if (rsp_valid && rsp_ready) rsp_valid <= 1'b0;
      if (cmd.valid && cmd_ready) wr_pending <= 1'b0;

      unique case (state)
        L_CMD: if (rx_valid) begin
          unique case (rx_data)
            CMD_WAVE:  state <= L_WIDX;
            CMD_PIN:   state <= L_PPIN;
            CMD_DELAY: state <= L_DPIN;
            CMD_GO: begin
              if (!ctrl_busy && ctrl_armed) begin
                go <= 1'b1;
                rsp_data <= RSP_ACK;
              end else begin
                rsp_data <= RSP_NAK;
              end
              rsp_valid <= 1'b1;
            end
            default: begin
              rsp_data  <= RSP_NAK;
              rsp_valid <= 1'b1;
            end
          endcase
        end
        L_WIDX: if (rx_valid) begin
          waddr    <= MEM_ADDR_W'(rx_data) * MEM_ADDR_W'(WAVE_WORDS);
          nbyte    <= '0;
          overflow <= 1'b0;
          state    <= L_WDATA;
        end
        L_WDATA: if (rx_valid) begin
          gather <= {rx_data, gather[MEM_DATA_W-9:8]};
          nbyte  <= nbyte + 1'b1;
          if (nbyte % 8'(BYTES_PER_WORD) == 8'(BYTES_PER_WORD - 1)) begin
            if (wr_pending && !(cmd.valid && cmd_ready)) begin
              overflow <= 1'b1;
            end else begin
              wr_pending <= 1'b1;
              wr_data    <= {rx_data, gather};
              wr_addr    <= waddr;
            end
            waddr <= waddr + 1'b1;
          end
          if (nbyte == 8'(WAVE_BYTES - 1)) state <= L_WFLUSH;
        end
        L_WFLUSH: if (!wr_pending) begin
          rsp_data  <= overflow ? RSP_NAK : RSP_ACK;
          rsp_valid <= 1'b1;
          state     <= L_CMD;
        end
        L_PPIN: if (rx_valid) begin
          arg_pin <= rx_data;
          state   <= L_PIDX;
        end
        L_PIDX: if (rx_valid) begin
          if (pin_ok(arg_pin) && !ctrl_busy) begin
            pin_wr   <= 1'b1;
            pin_sel  <= arg_pin[SW-1:0];
            pin_wave <= rx_data;
            rsp_data <= RSP_ACK;
          end else begin
            rsp_data <= RSP_NAK;
          end
          rsp_valid <= 1'b1;
          state     <= L_CMD;
        end
        L_DPIN: if (rx_valid) begin
          arg_pin <= rx_data;
          state   <= L_DLO;
        end
        L_DLO: if (rx_valid) begin
          arg_lo <= rx_data;
          state  <= L_DHI;
        end
        L_DHI: if (rx_valid) begin
          if (pin_ok(arg_pin) && !ctrl_busy) begin
            dly_wr   <= 1'b1;
            dly_sel  <= arg_pin[SW-1:0];
            dly_val  <= DELAY_W'({rx_data, arg_lo});
            rsp_data <= RSP_ACK;
          end else begin
            rsp_data <= RSP_NAK;
          end
          rsp_valid <= 1'b1;
          state     <= L_CMD;
        end
        default: state <= L_CMD;
      endcase
    end
  end

  assign req = wr_pending;

  always_comb begin
    cmd       = '0;
    cmd.valid = gnt && wr_pending;
    cmd.we    = 1'b1;
    cmd.addr  = wr_addr;
    cmd.wdata = wr_data;
  end
endmodule
