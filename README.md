# FOMS: FPDP-commanded serial outputs over fibre

FOMS (FPDP Output Module – Serial) turns 32-bit command words on an FPDP
(Front Panel Data Port, VITA 17) bus into eight slow, self-clocking serial
lines. Each line carries a 12-bit setpoint plus four control bits to a remote
receiver. That receiver drives a DAC for a power-supply firing generator or a
switching power amplifier. A host writes one FPDP word per setpoint. The
transmitter picks out the words meant for it, holds them in a double-buffered
register per channel, and sends each value as a Manchester-coded frame. It
sends a frame only when a value is loaded, not continuously. The receiver
decodes the frames and drives its outputs from the last good one. It falls
back to a safe default level when frames stop arriving.

This repository holds the logic of both ends in synthesizable SystemVerilog:

* the transmitter board's CPLD functions plus the FPDP FIFO (`foms_tx`);
* the receiver's CPLD (`foms_receiver`);
* a top level (`foms_top`) that puts one transmitter and eight receivers
  side by side, so the whole link can be simulated.

The optics, DAC, latch, connectors and power supplies are board parts and
are not described here.

## Command word

Each FPDP word addresses one channel of one module:

| bits  | field | use |
|-------|-------|-----|
| 11..0 | alpha | 12-bit setpoint |
| 12 | READY | control bit, passed to the receiver |
| 13 | SPARE | control bit, passed to the receiver |
| 14 | BYPASS | control bit, passed to the receiver |
| 15 | CONVERT | control bit, passed to the receiver |
| 18..16 | channel select | which of the 8 outputs |
| 23..19 | module select | must equal the 5-bit module address |
| 24 | parity of bits 15..0 | odd |
| 25 | parity of bits 23..16 | odd |
| 26 | Sync | marks the last word of a command block |
| 27 | PC Fault | not used |
| 28 | spare | not used |
| 31..29 | group select | must equal the 3-bit group address; 111 is never valid |

`foms_pkg::cmd_word_t` is this layout as a packed struct.

Setpoint coding is the user's business. For a unipolar firing generator,
0x000 is 0° and 0xFFF is 165°. For a bipolar amplifier, 0x7FF is +full
scale, 0x000 is zero and 0x800 is −full scale.

## Transmitter data path

```
 FPDP bus ─► foms_fpdp_rx ─► foms_fifo ─► foms_cmd_ctrl ─► 8 × foms_channel ─► sout[7:0]
 (PSTROBE)   buffer, group   1024 × 33    address, parity   holding reg ─►
             filter          dual clock   write, load       shift reg + encoder
                                              ▲      ▲
                               J5 update mode │      │ foms_keepalive
                    ext_sync / PIO2 edges ────┘      │ foms_bit_clock (half-bit ticks)
                                                     └ foms_status_leds
```

### Bus side: input buffer and group filter

`foms_fpdp_rx` runs on the FPDP strobe (16 MHz). It registers the bus on
every rising PSTROBE edge while DVALID* is low. One strobe later, it writes
the word to the FIFO if either of these holds:

* the group select equals the board's group address (000..110);
* the word is a sync word. A sync word has SYNC* asserted together with
  DVALID*, or command bit 26 set.

Sync words are written whatever their group. The sync is meant to go on the
last word of the whole command block. That word is usually addressed to
another module, and every module must still see it. The FIFO entry is 33 bits
wide: the word plus a sync flag.

NRFD* and SUSPEND* are tied to "ready". A FOMS never stalls the shared bus.
When its FIFO is full, it loses the word, and the FIFO LED latches.

### FIFO and clock crossing

`foms_fifo` is a standard dual-clock FIFO with binary and Gray-coded pointers
and two-flop synchronizers. Its depth is 1024 words. Full and empty are
registered. The read data is a registered output, valid the cycle after a pop.

### Command controller

`foms_cmd_ctrl` runs on the system clock (50 MHz). It has four states:

* **IDLE**: pops a word from the FIFO.
* **CHECK**: compares the module and group fields with the board's address
  and checks both parity bits.
* **LOAD**: writes the addressed channel's holding register and, depending
  on the update mode, pulses that channel's load line.
* **SAFE**: writes the reset value to all eight holding registers and loads
  them. This state serves the keep-alive.

An addressed word takes 3 clocks (60 ns). A word that is not for this module
takes 2 clocks (40 ns). Either way, the controller empties the FIFO faster
than the bus can fill it (62.5 ns per word). A continuous stream of
addressed words needs a system clock of at least 48 MHz (3 clocks per
62.5 ns). Below that, the FIFO absorbs bursts of up to 1024 words.

Jumper J5 selects the update method (`j5_t`, decoded by `decode_j5`):

| J5 | method | what loads the shift registers |
|----|--------|--------------------------------|
| 7-8 | asynchronous | the write itself: only that channel is loaded |
| 3-4 | FPDP sync | a sync word from the FIFO: all eight channels |
| 5-6 | external sync | rising edge of `ext_sync`: all eight channels |
| 1-2 | PIO2 sync | rising edge of the FPDP PIO2 line: all eight channels |
| none, or several | error | `cfg_error` is high; no loads |

A sync word is first handled like any other word: it is written if it is
addressed to this module. Then all channels are loaded. So the last write of
a block still makes it into the same update.

`ext_sync` and `pio2` are synchronized and edge-detected. Their edges are
held pending until the controller is idle between words. A load therefore
never lands in the middle of a holding-register write.

### Output channel: double buffer, frame and Manchester coding

Each `foms_channel` has a 17-bit holding register: 16 data bits plus odd
parity. Every write updates it. A load copies it into the encoder, and the
encoder sends one frame. The half-bit strobe from `foms_bit_clock` times the
frame. With `HALF_BIT_CYCLES = 8` at 50 MHz, one bit lasts 320 ns
(3.125 Mbit/s).

```
        ┌──────┐      ┌─┐ ┌─┐   ┌─┐ ┌─┐                 ┌─┐ ┌─┐
 ───────┘      └──────┘ └─┘ └...┘ └─┘ └─ ...  ─┐ ┌─┐ ┌─┘ └─┘ └─ ...
  zeros  sync   sync   D15  D14 ...         P   then Manchester 0s
         high   low
        1.5 bit 1.5 bit  17 bits, MSB first, odd parity last
```

* **Sync**: the line is high for 1.5 bits, then low for 1.5 bits. Manchester
  data never stays at one level for longer than one bit, so the receiver can
  recognize the sync.
* **Bits**: a "1" is low then high. A "0" is high then low. The encoder
  shifts left and feeds zeros in from the right. After the parity bit, the
  line therefore carries Manchester zeros until the next frame.
* **Frame length**: 6 sync half-bits + 34 data half-bits = 40 half-bits =
  20 bits. Back-to-back frames repeat every 6.4 µs, which is 156.25 kHz per
  channel.

A frame starts only on a bit boundary. A load that arrives while a frame is
being sent is remembered. The next frame follows straight after the current
one and carries the newest holding value. A load is never lost, and a frame
is never cut short.

After reset, every holding register holds the reset value and sends it once.

## Reset value and keep-alive

The reset value is chosen once per board with jumper block JMPR 3:

| position | reset value |
|----------|-------------|
| 3-4 | 0x000 |
| 5-6 | 0xFFF |
| 7-8 | 0x7FF |
| 9-10 | 0x800 |

More than one position fitted sets `cfg_error` and falls back to 0x000. The
four control bits of the reset value are 0.

With the keep-alive enabled (JMPR 3 1-2, input `ka_enable`), `foms_keepalive`
counts down from `KEEPALIVE_CYCLES` (5,000,000 clocks = 100 ms). Every
command accepted for this module restarts it. If it runs out, the controller
takes the SAFE path: every channel gets the reset value and sends it once.
The timer then waits for the next command. Words for other modules do not
restart it. The time is a parameter, so it can be set anywhere from
microseconds to seconds.

## Front-panel LEDs

`foms_status_leds` produces the 16 LED drives, `led[15:0]`, from top to
bottom of the panel:

| bits | LED | meaning |
|------|-----|---------|
| 15..13 | GA2..GA0 | group address |
| 12..8 | MA4..MA0 | module address |
| 7 | Pwr | `power_ok` |
| 6 | Bus | FPDP word seen, stretched |
| 5 | Mod | word accepted for this module, stretched |
| 4 | Load | shift register load, stretched |
| 3 | Prty | parity error, latched |
| 2 | FIFO | overflow, latched |
| 1 | Vflt | power fault (`power_ok` low), latched |
| 0 | Adr | group address 111, latched |

Activity pulses are stretched to `STRETCH_CYCLES` (about 42 ms) so that they
are visible. LATCH RESET (`latch_rst_n`) clears the four latched LEDs. A fault
that occurs in the same cycle still wins. The module reset clears everything.

## Test points

`foms_tx` brings out the board's probe points as one packed struct,
`tp` (`test_pts_t`; `tx_tp` on `foms_top`):

| field | board point | shows |
|-------|-------------|-------|
| `buf_d11` | TP1 | bit 11 of the word in the input buffer |
| `fifo_d11` | TP2 | bit 11 of the FIFO output word |
| `fifo_load` | TP3 | FIFO write, one PSTROBE cycle per word |
| `load_sr` | TP4 | shift-register load, any channel |
| `fifo_unload` | TP5 | FIFO read, one clock per word |
| `fifo_sync_n` | TP9 | FIFO output word carries a sync (low) |
| `fifo_dvalid_n` | TP10 | FIFO holds data (low) |
| `buf_dvalid_n` | TP15 | input buffer holds a valid word (low) |
| `buf_sync_n` | TP17 | input buffer holds a SYNC* word (low) |
| `write_sr` | TP46 | holding-register write, any channel |
| `sel_sr0`, `sel_sr1` | TP47, TP48 | holding register 0 / 1 selected |

On the board, the FIFO load and unload points are clock edges. Here they are
one-cycle enables in the clock domain named. The other board points (DVALID*,
PSTROBE, Power OK, the serial outputs) are ports already.

## Receiver

`foms_receiver` is the logic between the optical receiver's quantizer and
the output parts. It has two halves: a frame decoder and a validity
watchdog.

### Frame decoder

`foms_rx_decoder` samples the line with its own 50 MHz clock, 8 samples per
half-bit. The line has no clock of its own, so the decoder locks onto the
sync:

1. It hunts for a high run longer than 2.5 half-bits. Data never produces
   one.
2. The falling edge that ends that run starts the sync-low field. The
   decoder checks that the line is still low in the middle of that field.
3. It then samples the middle of every half-bit. The two halves of a bit
   must differ; the second half is the bit value.
4. After 17 bits it checks odd parity.

A good frame pulses `frame_ok`. A coding violation, a parity error or a
broken sync pulses `frame_error`, and the outputs stay as they were.

The decoder times the whole frame from one edge. Two crystals 0.05 % apart
drift by about 3 ns over a 6.4 µs frame, far inside the 80 ns margin of
mid-half sampling.

### Validity watchdog

The watchdog reloads on every good frame. Its default, `WATCHDOG_CYCLES` =
10,000,000 clocks, is 200 ms, twice the transmitter's keep-alive time.

`data_valid` is high while the watchdog runs and the quantizer reports
`link_good`. While it is high:

* `dac_data` carries the last good 12-bit value;
* READY, SPARE, BYPASS and CONVERT follow bits 12..15.

When it drops:

* `dac_data` goes to the default level. This is selected with the same four
  positions as the transmitter's reset value.
* The control lines go to 0.

`data_valid` is also the enable of the external 12-bit latch, so the latch
keeps the last good value. It also drives the Data Valid LED and the valid
signal to the fault detector. `link_led` shows `link_good`.

The unipolar and bipolar receivers differ only in the analog range after the
DAC, so one module serves both.

## Timing

The original specification lists times for a 60 MHz CPLD clock with a FIFO
chip. This design was measured in simulation at 50 MHz (`tb_foms_tx`):

| event | specified (60 MHz) | this design (50 MHz) |
|-------|--------------------|----------------------|
| first output update, asynchronous | 178 ns | 300 ns to load strobe, 340 ns to start of frame |
| 8th update, 8 contiguous words | 1300 ns | 980 ns to start of 8th frame |
| external sync edge to load | 97 ns | 100 ns to load strobe, 400 ns to start of frames |
| sync word to load | 144 ns | 280 ns to load strobe, 540 ns to start of frames |
| discard a word for another module | 64 ns | 40 ns |

Most of the gap on the first update and on the sync word comes from the FIFO
crossing. There is one PSTROBE cycle into the buffer, one into the FIFO, and
then two system clocks of pointer synchronizer plus the registered empty
flag. A faster clock shortens the controller part only.

The wait for the next bit boundary, up to 320 ns, is counted from the load
strobe to the start of the frame.

## Departures from the specification and own choices

* **FPDP parity sense**: the two FPDP parity bits are taken as odd. Only the
  serial parity is specified as odd.
* **Sync words**: a sync word enters the FIFO regardless of its group. The
  group filter applies to all other words.
* **Pending loads**: a load that arrives during a frame is deferred, not
  dropped and not allowed to cut the frame short. This case is not
  specified.
* **Start-up frame**: after reset each channel sends its reset value once.
  This makes the receivers valid without any command.
* **Keep-alive**: the timer is one-shot (one safe frame per expiry), and only
  accepted commands restart it.
* **External sync**: the external and PIO2 sync edges are served between
  FIFO words. This is how the loads are kept synchronized with bus-driven
  writes.
* **Latency**: the measured latencies above miss three of the specified
  figures, mostly because of the synchronizing FIFO and the 50 MHz clock.
* **Unused fields**: the PC Fault bit (27) and bit 28 are ignored.
* **Error reporting**: J5 and JMPR 3 errors appear on `cfg_error`. The group
  address 111 appears on the Adr LED. The specification names these
  conditions as errors without giving an indicator.
* **Receiver**: the whole receiver behaviour is this design's own. This
  covers the decoding method, how `data_valid` is formed, the watchdog time,
  and the default control lines. Only a block diagram is specified.
* **Test points**: the CPLD's spare pins (TP7, 8, 12-14, 16) and the
  supply and ground points have no counterpart here.

## Module map

| module | role |
|--------|------|
| `foms_pkg` | command word struct, jumper types, parity and default-level functions |
| `foms_fpdp_rx` | FPDP input buffer and group filter (PSTROBE domain) |
| `foms_fifo` | 1024 × 33 dual-clock FIFO |
| `foms_cmd_ctrl` | command controller and update methods |
| `foms_keepalive` | keep-alive timer |
| `foms_bit_clock` | half-bit strobe generator |
| `foms_channel` | holding register, shift register, sync and Manchester encoder |
| `foms_status_leds` | front-panel LED drive |
| `foms_sync2`, `foms_rst_sync` | synchronizers |
| `foms_tx` | transmitter |
| `foms_rx_decoder` | serial frame decoder |
| `foms_receiver` | receiver logic for one channel |
| `foms_top` | one transmitter plus eight receivers |

Parameters and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `FIFO_DEPTH` | 1024 | FIFO words |
| `HALF_BIT_CYCLES` | 8 | system clocks per half-bit (320 ns bit at 50 MHz) |
| `KEEPALIVE_CYCLES` | 5,000,000 | 100 ms |
| `STRETCH_CYCLES` | 2,097,152 | LED pulse stretch, ≈42 ms |
| `WATCHDOG_CYCLES` | 10,000,000 | receiver validity, 200 ms |

For another system clock, scale `HALF_BIT_CYCLES` and the two timers. The
receiver's `HALF_BIT_CYCLES` must match its own clock.

## Simulation

Every block has a self-checking bench in `tb/`. Each bench prints
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/foms_pkg.sv \
          tb/tb_foms_top.sv --top-module tb_foms_top
./obj_dir/Vtb_foms_top
```

`tb_foms_top` runs the link at full size, with every parameter at its
default. It connects the eight serial outputs to the eight receivers, and
the receivers run on a clock 0.05 % off the transmitter's. It sends:

* random asynchronous traffic, with words for other modules mixed in;
* a deferred load and words with bad parity;
* all three sync modes;
* a 1400-word burst with the system clock slowed to 10 MHz, which overflows
  the FIFO.

It then clears the latched LEDs, drops the link on one receiver, and lets the
100 ms keep-alive and the 200 ms watchdog expire. It counts each of these
mechanisms and fails if any did not happen. It simulates about 300 ms and
takes well under a minute.

`tb_foms_tx` covers the transmitter alone and reports the latencies above.
It uses `tb_foms_line_monitor`, a decoder written independently of the RTL.
The other benches test one module each.
