// ultra_pkg: types and constants shared by the ultrasound transmitter.
//
// A waveform is a 1-bit sigma-delta stream of 1536 samples (1500 samples of
// a 3 us excitation at 500 MS/s plus 36 padding samples), stored in external
// DDR2 memory as six 256-bit words. Sample n of a waveform is bit n of the
// concatenated words, word 0 first and bit 0 earliest; a '1' sample is the
// +1 level and drives the pin high. The 256-bit word, the 1536-sample length,
// the four output pins and the 250 MHz clock follow the design description;
// the address width, delay width, command bytes and memory port handshake
// are this implementation's own choices.
package ultra_pkg;

  localparam int unsigned CLK_HZ      = 250_000_000;
  localparam int unsigned BAUD        = 115_200;
  localparam int unsigned MEM_DATA_W  = 256;
  localparam int unsigned MEM_ADDR_W  = 16;
  localparam int unsigned WAVE_BITS   = 1536;
  localparam int unsigned WAVE_WORDS  = WAVE_BITS / MEM_DATA_W;   // 6
  localparam int unsigned NUM_PINS    = 4;
  localparam int unsigned DELAY_W     = 16;
  localparam int unsigned WAVE_IDX_W  = 8;
  localparam int unsigned PRIO_W      = 2;

  // Upload protocol, one command byte followed by its arguments.
  localparam logic [7:0] CMD_WAVE  = 8'h57; // 'W' idx, 192 data bytes
  localparam logic [7:0] CMD_PIN   = 8'h50; // 'P' pin, idx (8'hFF = none)
  localparam logic [7:0] CMD_DELAY = 8'h44; // 'D' pin, delay lo, delay hi
  localparam logic [7:0] CMD_GO    = 8'h47; // 'G' output now
  localparam logic [7:0] RSP_ACK   = 8'h4B; // 'K'
  localparam logic [7:0] RSP_NAK   = 8'h4E; // 'N'
  localparam logic [7:0] WAVE_NONE = 8'hFF;

  // One memory command from a socket (valid/ready handshake).
  typedef struct packed {
    logic                  valid;
    logic                  we;
    logic [MEM_ADDR_W-1:0] addr;
    logic [MEM_DATA_W-1:0] wdata;
  } mem_cmd_t;

  // Read data returned to a socket, in request order.
  typedef struct packed {
    logic                  rvalid;
    logic [MEM_DATA_W-1:0] rdata;
  } mem_rsp_t;

endpackage
