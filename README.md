# Four-pin sigma-delta ultrasound transmitter (FPGA RTL)

Ultrasound research with coded excitations (chirps, pre-enhanced chirps and
similar long waveforms) normally needs a DAC and a linear power amplifier per
element. This design removes both. The excitation is turned into a 1-bit
sigma-delta stream on the host PC, so each transducer element only ever sees
two voltage levels. The transducer's own band-pass response then recovers the
analog shape. The price is sample rate: a 3 µs excitation is sent as 1500
one-bit samples at 500 MS/s.

This RTL is the FPGA part of such a platform:

- it receives waveforms, pin assignments and per-pin delays from the PC over a
  115200-baud UART;
- it keeps the waveforms in external DDR2 memory, shared among several
  "sockets" by a priority/least-recently-served arbiter;
- on an *output now* command, it sends each assigned waveform on its own pin
  at 500 MS/s. It does this from a 250 MHz clock by using both clock edges.
  Each pin starts after its own delay, set in 4 ns steps.

Everything runs on one 250 MHz clock. The falling edge of that clock is also
used, but only inside the output cells.

```
            UART 115200                               DDR2 controller (external)
 PC  ──rxd──► uart_rx ─► cmd_loader ──socket 4 (prio 0)──┐        ▲ mem_cmd_* / mem_rsp_*
     ◄─txd── uart_tx ◄──┘   │ pin/delay table writes, go  │        │
                            ▼                             ▼        │
                      excitation_ctrl              mem_arbiter ────┘
                      (tables, delay counter)         ▲  ▲  ▲  ▲
                        │fetch/start per pin          │  │  │  │ sockets 0..3 (prio 1)
                        ▼                             │  │  │  │
                     tx_channel ×4 ───────────────────┘──┘──┘──┘
                        │ d_rise, d_fall (2 samples / clock)
                        ▼
                     ddr_xor_out ×4 ──► tx_pin[3:0] ──► high-voltage amplifiers
```

## Files

| file | what it is |
|---|---|
| `rtl/ultra_pkg.sv` | shared constants, command codes, memory command/response structs |
| `rtl/ultra_tx_top.sv` | top level, wiring of everything below |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | 8N1 UART, 2170 clocks per bit by default |
| `rtl/cmd_loader.sv` | upload protocol decoder, upload memory socket |
| `rtl/mem_arbiter.sv` | memory port arbiter |
| `rtl/excitation_ctrl.sv` | pin-to-waveform table, delay table, delay counter |
| `rtl/tx_channel.sv` | per-pin memory socket, two-word buffer, sample shifter |
| `rtl/ddr_xor_out.sv` | double-edge XOR output cell |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ultra_tx_full` |
| `tb/ddr2_model.sv` | behavioural DDR2 controller + memory (testbench only) |
| `tb/sdm_ref_pkg.sv` | second-order sigma-delta modulator and test signals (testbench only) |

## Waveform format

A waveform is 1536 one-bit samples. That is 1500 samples (3 µs at 500 MS/s)
plus 36 padding samples, which make it exactly six 256-bit memory words. A `1`
sample is the +1 level and drives the pin high; a `0` drives it low. Sample
*n* is bit *n mod 256* of word *n / 256*, so bit 0 of word 0 goes out first.
Waveform number *i* (0–255) is stored at word address `6·i`.

The modulator itself runs on the PC, not in this RTL. The testbenches use the
same algorithm (`tb/sdm_ref_pkg.sv`). It is an error-feedback loop whose noise
transfer function is (1 − z⁻¹)²:

```
y[n] = x[n] − 2·e[n−1] + e[n−2]      v[n] = sign(y[n])      e[n] = v[n] − y[n]
```

This second-order loop is what the platform uses. A third-order loop tends to
overload on strong, fast signals.

## Upload protocol

Every command starts with one byte and is answered with one byte: `K` (0x4B)
if it was carried out, `N` (0x4E) if it was refused.

| bytes | meaning | refused when |
|---|---|---|
| `W` idx d0 … d191 | store waveform idx; byte k holds samples 8k…8k+7, LSB first | a memory word could not be written before the next one was complete |
| `P` pin idx | assign waveform idx to pin 0–3; idx 0xFF means no waveform | pin ≥ 4, or a transmission is running |
| `D` pin lo hi | set the pin's delay to `{hi,lo}` clock counts (4 ns each) | pin ≥ 4, or a transmission is running |
| `G` | output now | no pin assigned, or a transmission is running |

Unknown command bytes get `N`. Waveform uploads are accepted even while pins
are transmitting. Their memory writes then simply wait behind the pin sockets.
Overwriting a waveform that a pin is playing at that moment is not prevented;
the host must avoid it.
The host should wait for each reply before it sends the next command. At
115200 baud, four different waveforms plus all settings take about 70 ms.
After power-up all pins are unassigned and every delay is 0.

## Memory sockets and arbitration

The DDR2 port is the only path to the waveforms. Five clients ("sockets") use
it:

| socket | client | priority |
|---|---|---|
| 0–3 | `tx_channel` of pin 0–3 (reads) | 1 |
| 4 | `cmd_loader` (writes) | 0 |

A socket raises `req` and keeps it high for its whole list of commands. For a
pin that is up to two reads; for the loader it is one write. The socket keeps
`req` high until its read data is back. The arbiter never takes the port away
from a socket in the middle of a list.

When the port is free, `mem_arbiter` picks the next owner in two steps:

1. It drops every requester whose priority is below the highest priority now
   requesting. A pin that needs data for transmission therefore always beats
   an upload.
2. Among the requesters left, it picks the one whose previous grant lies
   furthest in the past. This round-robin-like rule stops one pin from
   starving another.

The history is an N×N age matrix. `older[i][j]` is set when socket *i* was
last served before socket *j*. When socket *k* is granted, row *k* is cleared
and column *k* is set. After reset, a lower index counts as older.

The grant is registered: it appears one clock after the port falls idle. There
is also one idle clock after each release. While a socket owns the port, its
command goes to memory, `mem_cmd_ready` goes only to it, and read data is
flagged valid only for it. Two assertions check that there is at most one
owner and that no command reaches memory without an owner.

`PRIO` is a parameter with `PRIO_W` bits per socket, so other priority
layouts need no code change.

## Transmission and timing

`excitation_ctrl` holds the two per-pin tables. On `G`:

1. It pulses `fetch` to every assigned pin. Each `tx_channel` reads the first
   two words of its waveform into a two-word buffer and raises `loaded`.
2. When every assigned pin is loaded, the delay counter starts at 0 and
   counts up by one every clock.
3. In the clock where the count equals pin *p*'s delay, pin *p* gets a
   `start` pulse. Each pin starts on its own; unassigned pins never start.
4. A started channel moves one word into a 256-bit shift register and hands
   out two samples per clock for 768 clocks. `d_rise` carries the earlier
   sample and `d_fall` the later one. Every time a word leaves the buffer, the
   channel asks the arbiter for the next word. The rest of the waveform is
   therefore read while the pin is already transmitting.
5. When every assigned pin has finished, `tx_done` pulses and the block is idle
   again.

**Cycle timing.** Say the counter shows 0 in clock T₀. Then sample 2k of pin
*p* is on the pin in the high half of clock T₀ + delay*p* + 2 + k, and sample
2k+1 in the low half. The two clocks of latency are one in the channel and one
in the output cell. They are the same for all pins, so the relative timing
between pins is exactly the delay difference, in 4 ns steps. The time from the
`G` byte to T₀ depends on memory latency; the prefetch exists to keep that
latency out of the pin-to-pin timing.

**Refill deadline.** When a word moves into the shifter, the buffer still holds
the next word. A refill request therefore has two word times (256 clocks) to
be served. Four pins need one word each per 128 clocks, while the port takes
one command per clock. If a word is still missing at a word boundary, the
channel pulses `underrun` and sends zeros for that word. This is a fault
indicator and should never fire with a working memory.

## Double-edge output cell

FPGA flip-flops switch on one clock edge only, yet the pin must change twice
per 250 MHz clock. `ddr_xor_out` therefore uses two flip-flops: `rise_q`,
clocked on the rising edge, and `fall_q`, clocked on the falling edge. The pin
is `rise_q XOR fall_q`. Each flip-flop stores its new sample XORed with the
*other* flip-flop's current value:

```
rising edge :  rise_q <= d_rise ^ fall_q      → pin = d_rise   (high half)
falling edge:  fall_q <= d_fall ^ rise_q      → pin = d_fall   (low half)
```

`d_fall` is captured on the rising edge first, so the falling-edge flip-flop
reads a value that is stable for half a clock. For a pair presented in clock
*t*, the pin shows `d_rise` in the high half and `d_fall` in the low half of
clock *t*+1.

The XOR output is combinational and can glitch briefly after each edge. Its
timing also depends on how the two flip-flops and the gate are placed, so on
an FPGA the cell needs location constraints. A vendor DDR output register
could replace it with the same port behaviour.

## Outside this RTL

- **DDR2 controller and memory.** The top exposes a generic port:
  - a command is taken when `mem_cmd_valid && mem_cmd_ready`;
  - `mem_cmd_addr` is a 256-bit word address;
  - read data returns in order on `mem_rsp_valid`/`mem_rsp_rdata`, with any
    latency.

  An FPGA memory-interface core needs a thin adapter to this port.
  `tb/ddr2_model.sv` models it with a 24-clock read latency, periodic
  refresh stalls and random back-pressure.
- **Host software:** waveform generation, sigma-delta modulation and the GUI.
- **Analog path:** the pins drive the high-voltage amplifiers, which feed the
  transducer through a transmit/receive switch. Receive-side capture and all
  image processing (Wiener-filter pulse compression, delay-and-sum
  beamforming, log compression, time-gain compensation, envelope detection)
  run on the PC.

## Where this RTL makes its own choices

The original prototype describes:

- the UART link, the 1536-bit/256-bit waveform format and four pins;
- the pin and delay tables with a free-running delay counter and 4 ns
  resolution;
- the two-step arbiter with priority for transmission over upload;
- the rising/falling/XOR output method.

The following are this implementation's own:

- the byte protocol and the `K`/`N` replies;
- waveform placement at `6·index`;
- the memory port handshake;
- the 16-bit delay (max ≈ 262 µs) and address widths;
- the two-word prefetch before the delay counter starts;
- the two-word per-pin buffer;
- synchronous active-high reset;
- refusing settings while a transmission runs;
- keeping the pin and delay tables in registers; only waveforms go to DDR2.

The original reads waveforms "after the delay". Here the first two words are
read before counting starts, and the rest during transmission. The original
host GUI shows eight pin slots, but the platform drives at most four pins.
Four is what is built.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `CLKS_PER_BIT` | 2170 | top, UARTs | 250 MHz / 115200 baud; must be ≥ 8 |
| `NUM_PINS` | 4 | package | output pins |
| `WAVE_BITS` | 1536 | package | samples per waveform |
| `MEM_DATA_W` | 256 | package | memory word |
| `MEM_ADDR_W` | 16 | package | word address width |
| `DELAY_W` | 16 | package | delay table width |
| `PRIO`, `N` | per top | `mem_arbiter` | socket priorities, socket count |

## Verification

Every testbench checks itself against values it works out independently,
stops at a watchdog, and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | covers |
|---|---|
| `tb_ddr_xor_out` | 4000 random pairs back to back; both half-cycles checked 1 ns after each edge |
| `tb_uart_rx` | 200 random bytes, latency window, bad stop bit, start glitch |
| `tb_uart_tx` | 100 bytes decoded mid-bit by an independent decoder, frame length |
| `tb_mem_arbiter` | 20 000 random cycles against a reference model (priority, then oldest grant); hold, liveness, routing |
| `tb_excitation_ctrl` | 30 random shots: base addresses, fetch set, exact start cycle = delay, single start, `tx_done`, writes refused while busy |
| `tb_cmd_loader` | uploads and memory contents, table writes, all ACK/NAK cases, lost-word detection |
| `tb_tx_channel` | exact sample stream and read order under random grant waits; underrun forced with very slow grants |
| `tb_ultra_tx_top` | end to end at 8 clocks per UART bit (see below) |
| `tb_ultra_tx_full` | the largest settings load (four waveforms, four pins) and a four-pin shot at default parameters (115200 baud); checks the load takes under 1 s (it takes about 71 ms); about 18 M clocks |

`tb_ultra_tx_top` works as follows:

- It uploads a sigma-delta 4–12 MHz chirp, an 8.3 MHz pulse and random
  streams.
- It runs two shots with different pin assignments and delays. One pin is
  left unassigned.
- It compares every pin at 500 MS/s against the expected stream and timing.
- During the first shot it uploads another waveform. Arbitration by priority
  and by history must then both occur; the testbench counts them and also
  counts reads during transmission, NAKs and frame errors. It requires that no
  underrun occurs.
- It low-pass filters the captured chirp and correlates it with the original
  chirp. The result is 0.98 with a 16-tap moving average.

To run one testbench with plain Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv rtl/ultra_pkg.sv tb/sdm_ref_pkg.sv \
    tb/tb_ultra_tx_top.sv --top-module tb_ultra_tx_top
./obj_dir/Vtb_ultra_tx_top
```

Swap in another `tb_*.sv` the same way. `tb_ultra_tx_full` takes about half a
minute.

## How far to trust it

- The logic has been simulated and linted, and yosys elaborates it. It has
  not been placed and routed, so 250 MHz timing on a real FPGA is unproven.
  The 256-bit muxes in the arbiter and the 1536-bit-wide paths are the likely
  critical paths.
- The double-edge cell is correct in zero-delay simulation only. Its
  behaviour on silicon depends on placement, as described above.
- The memory port is tested only against the behavioural model, not against
  a real controller.
