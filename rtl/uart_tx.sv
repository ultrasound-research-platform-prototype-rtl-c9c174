// uart_tx: 8N1 UART transmitter for replies from the FPGA to the PC.
//
// A byte is accepted with `valid` while `ready` is high; the line then
// carries a low start bit, the eight data bits LSB first and a high stop
// bit, each CLKS_PER_BIT clocks long, and `ready` returns high after the stop
// bit. The line idles high. The baud rate (115200 at a 250 MHz clock) is the
// design's; the reply direction itself is this implementation's choice,
// used to acknowledge each upload command.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = ultra_pkg::CLK_HZ / ultra_pkg::BAUD
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [8:0]    frame;   // stop, data[7:0]; shifted out LSB first
  logic [3:0]    nbits;   // bits still to send after the current one
  logic [CW-1:0] cnt;     // clocks left in the current bit
  logic          busy;

  assign ready = !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      frame <= '1;
      nbits <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      txd   <= 1'b1;
    end else if (!busy) begin
      if (valid) begin
        txd   <= 1'b0;                 // start bit
        frame <= {1'b1, data};
        nbits <= 4'd9;
        cnt   <= CW'(CLKS_PER_BIT - 1);
        busy  <= 1'b1;
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else if (nbits != 0) begin
      txd   <= frame[0];
      frame <= {1'b1, frame[8:1]};
      nbits <= nbits - 1'b1;
      cnt   <= CW'(CLKS_PER_BIT - 1);
    end else begin
      busy <= 1'b0;
    end
  end
endmodule
