// ddr_xor_out: doubles the output rate of a pin by using both clock edges.
//
// Each clock cycle carries two samples: `d_rise` is shown during the high
// half of the cycle after it is presented and `d_fall` during the low half.
// As the design describes, there are two flip-flop paths, one clocked on the
// rising edge and one on the falling edge, and the pin is their XOR. Each
// path stores its sample XORed with the other path's current value, so that
// when it updates, the XOR equals the new sample: rise <= d_rise ^ fall at
// the rising edge, fall <= d_fall ^ rise at the falling edge. `d_fall` is
// first captured on the rising edge so the falling-edge path reads a stable
// value. At 250 MHz this gives 500 MS/s. Latency: a pair presented in cycle
// t appears on `q` in cycle t+1 (first half d_rise, second half d_fall).
// The XOR output can glitch between edges; that is inherent to the scheme.
module ddr_xor_out (
  input  logic clk,
  input  logic rst,
  input  logic d_rise,
  input  logic d_fall,
  output logic q
);
  logic rise_q, fall_q, fall_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      rise_q <= 1'b0;
      fall_d <= 1'b0;
    end else begin
      rise_q <= d_rise ^ fall_q;
      fall_d <= d_fall;
    end
  end

  always_ff @(negedge clk) begin
    if (rst) fall_q <= 1'b0;
    else     fall_q <= fall_d ^ rise_q;
  end

  assign q = rise_q ^ fall_q;
endmodule
