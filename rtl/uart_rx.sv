// uart_rx: 8N1 UART receiver for the PC-to-FPGA upload link.
//
// The serial line is brought into the clock domain by a two-flop
// synchronizer. A falling edge starts a frame; the start bit is re-checked at
// its middle (a glitch returns to idle), then the eight data bits are
// sampled LSB first at the middle of each bit period and the stop bit is
// checked. A good frame gives a one-cycle `valid` pulse with `data`; a frame
// whose stop bit is low gives a one-cycle `frame_err` pulse instead.
// CLKS_PER_BIT defaults to the 250 MHz system clock over the 115200 baud rate
// named by the design (2170); the 8N1 format and the oversampling scheme are
// this implementation's choices. The synchronizer delays the edge by two
// clocks, so CLKS_PER_BIT should be at least 8.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = ultra_pkg::CLK_HZ / ultra_pkg::BAUD
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_t;
  state_t state;

  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic          rx;

  assign rx = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= 2'b11;
      state     <= S_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: if (!rx) begin
          state <= S_START;
          cnt   <= CW'(CLKS_PER_BIT / 2);
        end
        S_START: if (cnt == 0) begin
          if (!rx) begin
            state   <= S_DATA;
            cnt     <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
          end else begin
            state <= S_IDLE;
          end
        end else cnt <= cnt - 1'b1;
        S_DATA: if (cnt == 0) begin
          shreg <= {rx, shreg[7:1]};
          cnt   <= CW'(CLKS_PER_BIT - 1);
          if (bit_idx == 3'd7) state <= S_STOP;
          bit_idx <= bit_idx + 1'b1;
        end else cnt <= cnt - 1'b1;
        S_STOP: if (cnt == 0) begin
          state <= S_IDLE;
          if (rx) begin
            data  <= shreg;
            valid <= 1'b1;
          end else begin
            frame_err <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
