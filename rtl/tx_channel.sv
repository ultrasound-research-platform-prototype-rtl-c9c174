// tx_channel: the transmit side of one output pin.
//
// It is a high-priority memory socket feeding a two-word buffer. A `fetch`
// pulse (output now) resets it to the waveform assigned to its pin, at word
// address `base_addr`, and it reads the first two words; `loaded` then rises.
// A `start` pulse, given when the delay counter reaches this pin's delay,
// begins playback: a 256-bit shift register hands out two samples per clock,
// the earlier on `d_rise` and the later on `d_fall`, for WAVE_BITS/2 clocks,
// then `done` pulses for one cycle. Each time a word moves from the buffer
// into the shift register the socket asks for the next word, so the rest
// of the waveform is read from memory while the pin is transmitting; as
// the buffer still holds the following word, a refill has two word times
// (256 clocks) to arrive. A word that is
// not in the buffer when it is needed gives an `underrun` pulse and zeros on
// the pin for that word. Outside playback the outputs are 0 (pin held low).
// Each memory request is a list of as many reads as the buffer has free
// slots; the request is held until all their data has come back. Reading
// during transmission follows the design; the two-word prefetch before the
// counter starts, which makes the start time independent of memory
// latency, is this implementation's choice.
module tx_channel
  import ultra_pkg::*;
#(
  parameter int unsigned WAVE_BITS_P = WAVE_BITS
) (
  input  logic                  clk,
  input  logic                  rst,
  // control
  input  logic [MEM_ADDR_W-1:0] base_addr,
  input  logic                  fetch,
  output logic                  loaded,
  input  logic                  start,
  output logic                  active,
  output logic                  done,
  output logic                  underrun,
  // sample pair for the double-edge output cell
  output logic                  d_rise,
  output logic                  d_fall,
  // memory socket
  output logic                  req,
  input  logic                  gnt,
  output mem_cmd_t              cmd,
  input  logic                  cmd_ready,
  input  mem_rsp_t              rsp
);
  localparam int unsigned WORDS      = WAVE_BITS_P / MEM_DATA_W;
  localparam int unsigned WW         = $clog2(WORDS + 1);
  localparam int unsigned PAIRS      = WAVE_BITS_P / 2;
  localparam int unsigned PW         = $clog2(PAIRS + 1);
  localparam int unsigned WORD_PAIRS = MEM_DATA_W / 2;
  localparam int unsigned SW         = $clog2(WORD_PAIRS + 1);

  typedef enum logic [1:0] {C_IDLE, C_PREFETCH, C_READY, C_RUN} cstate_t;
  cstate_t state;

  // two-entry word buffer
  logic [1:0][MEM_DATA_W-1:0] slot;
  logic                       wr_ptr, rd_ptr;
  logic [1:0]                 fill;
  // memory list in progress
  logic                       sock_on;
  logic [1:0]                 to_issue, to_recv;
  logic [MEM_ADDR_W-1:0]      addr;
  logic [WW-1:0]              issued;     // words requested so far
  // playback
  logic [MEM_DATA_W-1:0]      sh;
  logic [SW-1:0]              sh_left;
  logic [PW-1:0]              pairs_left;

  logic fetch_pend;
  logic push, pop, issue;
  logic [1:0] want;

  assign issue = cmd.valid && cmd_ready;
  assign push  = sock_on && gnt && rsp.rvalid;
  assign pop   = (state == C_READY && start) ||
                 (state == C_RUN && sh_left == 1 && pairs_left != 1);

  always_comb begin
    want = 2'd2 - fill;
    if (WW'(want) > WW'(WORDS) - issued) want = 2'(WW'(WORDS) - issued);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= C_IDLE;
      slot       <= '0;
      wr_ptr     <= 1'b0;
      rd_ptr     <= 1'b0;
      fill       <= '0;
      sock_on    <= 1'b0;
      to_issue   <= '0;
      to_recv    <= '0;
      addr       <= '0;
      issued     <= '0;
      sh         <= '0;
      sh_left    <= '0;
      pairs_left <= '0;
      done       <= 1'b0;
      underrun   <= 1'b0;
      fetch_pend <= 1'b0;
    end else begin
      done     <= 1'b0;
      underrun <= 1'b0;

      // memory list: start one when idle and the buffer has room
      if (!sock_on) begin
        if ((state == C_PREFETCH || state == C_RUN) && want != 0 && !pop) begin
          sock_on  <= 1'b1;
          to_issue <= want;
          to_recv  <= want;
        end
      end else begin
        if (issue) begin
          to_issue <= to_issue - 1'b1;
          addr     <= addr + 1'b1;
          issued   <= issued + 1'b1;
        end
        if (push) begin
          to_recv <= to_recv - 1'b1;
          if (to_recv == 2'd1) sock_on <= 1'b0;
        end
      end

      // word buffer
      if (push) begin
        slot[wr_ptr] <= rsp.rdata;
        wr_ptr       <= ~wr_ptr;
      end
      if (pop && fill != 0) rd_ptr <= ~rd_ptr;
      fill <= fill + 2'(push) - 2'(pop && fill != 0);

      unique case (state)
        C_IDLE, C_READY: begin
          if ((fetch || fetch_pend) && !sock_on) begin
            fetch_pend <= 1'b0;
            state  <= C_PREFETCH;
            addr   <= base_addr;
            issued <= '0;
            wr_ptr <= 1'b0;
            rd_ptr <= 1'b0;
            fill   <= '0;
          end else if (fetch) begin
            fetch_pend <= 1'b1;   // a list from the last shot is still open
          end else if (start && state == C_READY) begin
            state      <= C_RUN;
            sh         <= slot[rd_ptr];
            sh_left    <= SW'(WORD_PAIRS);
            pairs_left <= PW'(PAIRS);
          end
        end
        C_PREFETCH: if (!sock_on && (fill == 2'd2 || issued == WW'(WORDS)) && want == 0)
          state <= C_READY;
        C_RUN: begin
          pairs_left <= pairs_left - 1'b1;
          if (pairs_left == 1) begin
            state <= C_IDLE;
            done  <= 1'b1;
          end else if (sh_left == 1) begin
            sh_left <= SW'(WORD_PAIRS);
            if (fill != 0) sh <= slot[rd_ptr];
            else begin
              sh       <= '0;
              underrun <= 1'b1;
            end
          end else begin
            sh      <= sh >> 2;
            sh_left <= sh_left - 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign req    = sock_on;
  assign loaded = (state == C_READY);
  assign active = (state == C_RUN);
  assign d_rise = active & sh[0];
  assign d_fall = active & sh[1];

  always_comb begin
    cmd       = '0;
    cmd.valid = gnt && sock_on && (to_issue != 0);
    cmd.we    = 1'b0;
    cmd.addr  = addr;
  end

  // The buffer never holds more than two words.
  a_fill: assert property (@(posedge clk) disable iff (rst) fill <= 2'd2);
endmodule
