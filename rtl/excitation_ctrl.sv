// excitation_ctrl: the per-pin excitation settings and the delay counter.
//
// It holds two tables with one entry per output pin: the waveform assigned
// to the pin (a waveform index, WAVE_NONE for an unused pin, turned into the
// waveform's DDR2 word address, index * WAVE_WORDS) and the pin's delay in
// clock counts. On `go` (the "output now" command) with at least one pin
// assigned, it pulses `fetch` to the assigned pins' channels and waits until
// all of them hold their waveform. Then the delay counter starts at 0 and
// rises by one every clock (4 ns at 250 MHz, the delay resolution); each
// assigned pin gets its `start` pulse in the cycle the count equals its
// delay, so pins start independently and unassigned pins stay low. When
// every assigned pin has reported `chan_done`, `tx_done` pulses and the
// block returns to idle. Table writes are taken only while idle (`busy`
// low). The tables, the counter and the compare-per-pin start follow the
// design; the fetch-before-count step and the table write ports are this
// implementation's choices.
module excitation_ctrl
  import ultra_pkg::*;
#(
  parameter int unsigned PINS = NUM_PINS,
  parameter int unsigned DW   = DELAY_W
) (
  input  logic                             clk,
  input  logic                             rst,
  // table writes
  input  logic                             pin_wr,
  input  logic [$clog2(PINS)-1:0]          pin_sel,
  input  logic [WAVE_IDX_W-1:0]            pin_wave,
  input  logic                             dly_wr,
  input  logic [$clog2(PINS)-1:0]          dly_sel,
  input  logic [DW-1:0]                    dly_val,
  input  logic                             go,
  // channels
  output logic [PINS-1:0][MEM_ADDR_W-1:0]  base_addr,
  output logic [PINS-1:0]                  fetch,
  input  logic [PINS-1:0]                  loaded,
  output logic [PINS-1:0]                  start,
  input  logic [PINS-1:0]                  chan_done,
  // status
  output logic                             busy,
  output logic                             armed,
  output logic                             tx_done,
  output logic [DW:0]                      count
);
  typedef enum logic [1:0] {E_IDLE, E_FETCH, E_LOAD, E_RUN} estate_t;
  estate_t state;

  logic [PINS-1:0][WAVE_IDX_W-1:0] wave_tab;
  logic [PINS-1:0][DW-1:0]         dly_tab;
  logic [PINS-1:0]                 en, started, finished;

  always_comb
    for (int p = 0; p < PINS; p++) begin
      en[p]        = (wave_tab[p] != WAVE_NONE);
      base_addr[p] = MEM_ADDR_W'(wave_tab[p]) * MEM_ADDR_W'(WAVE_WORDS);
      start[p]     = (state == E_RUN) && en[p] && !started[p] &&
                     (count == {1'b0, dly_tab[p]});
    end

  assign busy  = (state != E_IDLE);
  assign armed = (state == E_IDLE) && (en != '0);
  assign fetch = (state == E_FETCH) ? en : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= E_IDLE;
      wave_tab <= {PINS{WAVE_NONE}};
      dly_tab  <= '0;
      started  <= '0;
      finished <= '0;
      count    <= '0;
      tx_done  <= 1'b0;
    end else begin
      tx_done <= 1'b0;
      unique case (state)
        E_IDLE: begin
          if (pin_wr) wave_tab[pin_sel] <= pin_wave;
          if (dly_wr) dly_tab[dly_sel]  <= dly_val;
          if (go && en != '0) state <= E_FETCH;
        end
        E_FETCH: state <= E_LOAD;
        E_LOAD: if ((loaded & en) == en) begin
          state    <= E_RUN;
          count    <= '0;
          started  <= '0;
          finished <= '0;
        end
        E_RUN: begin
          if (count != '1) count <= count + 1'b1;
          started  <= started | start;
          finished <= finished | chan_done;
          if (((finished | chan_done) & en) == en) begin
            state   <= E_IDLE;
            tx_done <= 1'b1;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end
endmodule
