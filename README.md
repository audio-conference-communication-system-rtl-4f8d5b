# ACCS: a three-party audio conference system over polled serial lines

Three telephone stations (A, B and C) talk to each other through a central
coordinator. Each station has one serial line to the coordinator and one
back, and nothing else. Neither the stations nor the coordinator ever
transmit at will. The coordinator polls the stations in a fixed round of six
time slots. In each slot it asks one station either whom it wants to call or
for one audio sample. It then passes that sample on to the stations in a
call with the talker. Every station mixes the latest samples of its two
peers into its headphone. So A can talk with B, and A, B and C can hold a
three-way conference. A station can also record and replay voicemail, play a
ring tone, and draw a phone on its screen. The coordinator's screen shows
who is in a call.

This repository holds synthesizable SystemVerilog for the coordinator and
the stations, a top level that joins them (`accs_top`), and self-checking
testbenches. It follows the final report of the "Audio Conference
Communication System" project. The section "Departures from the report"
lists where this RTL differs from that report.

## System overview

```
                      +--------------------- coordinator ----------------------+
 stn_tx[A] --sync2--> | one_byte_decoder (input = line of the slot's station)  |
 stn_tx[B] --sync2--> |   |-> calling_module -> user_id (6 connection bits)   |
 stn_tx[C] --sync2--> |   |-> talking_module                                  |
                      | tdma_window + window_timer (6 slots, time-out, guard)  |
                      | byte_serializer x2 (command, listener) -> output_mux   | --> coord_tx[A,B,C]
                      | coordinator_display (VGA)                              |
                      +--------------------------------------------------------+

 user_station (x3): sync2 -> command_detector -> user_end -> byte_serializer -> stn_tx
                    dialing_module (switches -> dial code)
                    audio_mixer, ring_tone, voicemail (external ZBT SRAM), station_display
```

In the real system the lines run through RS-485 transceivers and cables.
Those are not logic, so `accs_top` brings the six lines out as ports. The
user must join them: `coord_tx[s]` to `stn_rx[s]` and `stn_tx[s]` to
`coord_rx[s]`. The testbenches do this, optionally through delay lines.
`accs_pkg` holds the command codes, dial codes, the window type and small
helper functions.

## The serial line

A line idles low. A byte goes out as eight bits, least significant first,
with no start or stop bit. Each bit lasts `BIT_CYCLES` = 27 clocks, so a byte
takes 216 clocks. All of this is fixed by the report except the idle level
and the bit order.

### Receiving a bit: oversampling and edge re-alignment (`bit_sampler`)

The receiver counts the clocks of a bit period in which the line was high.
It decides 1 when the count exceeds `ONES_THRESHOLD` = 18 (two thirds of 27).
Counting suppresses short glitches. The harder problem is that the sender
and the receiver need not agree on where bit periods start. The report
places the stations on separate boards with their own clocks. A round trip
through cables and synchronisers also shifts the reply by several cycles.
The sampler therefore re-aligns on every edge of the line:

* An edge in the **first half** of a period means the bit really starts
  now. The period restarts and the samples taken so far are discarded.
* An edge in the **second half** means the next bit arrived early. The
  current bit is decided from the samples taken so far, with the threshold
  scaled to their number. A new period starts at the edge.

Because every edge re-aligns the grid, errors do not build up over a byte.
A long run of equal bits has no edges, so the clocks must still agree to
well under half a bit over eight bits. A `resync` pulse marks each
re-alignment; the testbenches count these pulses.

Two receivers use the sampler:

* `one_byte_decoder` (coordinator) is started for exactly one byte and
  delivers it with a `valid` pulse.
* `command_detector` (station) runs freely. It shifts every recovered bit
  into an 8-bit window and compares the window with the command codes.

A free-running receiver has a weakness: a silent gap of half a bit or
more inside a transfer shows up as an extra 0 bit. The coordinator's timing
below is built so that no such gap ever occurs.

### Command packages

| code (bit 7..0) | hex | meaning at the station |
|---|---|---|
| 0111 1110 | 7E | call: reply with your dial code |
| 0101 1110 | 5E | talk: reply with your latest microphone sample |
| 0110 1110 | 6E | the next byte is audio from A |
| 0111 0110 | 76 | the next byte is audio from B |
| 0111 1010 | 7A | the next byte is audio from C |

Every code begins (bit 0) and ends (bit 7) with 0 and has a 1 in bit 1. Any
window that still holds idle-line zeros therefore cannot match, and a code
cannot appear across the boundary of two packages. After an "audio from X"
command the detector takes the next eight bits as data without matching
them. An audio byte equal to a command code is thus harmless.

## The polling round (`tdma_window`, `calling_module`, `talking_module`)

The round has six windows: A_CALL, A_TALK, B_CALL, B_TALK, C_CALL and
C_TALK. Exactly one window is open at a time. Its enable selects the
controller that works in it and the station whose line feeds the shared
decoder. A window ends when its transaction reports `finished` or when the
window timer runs out after `WINDOW_CYCLES` = 800 cycles, whichever comes
first.

**Call window** (about 446 cycles):

```
coord -> station  |<---- CALL (216) ---->|
station -> coord                          ~5 |<---- dial code (216) ---->|
decoder                                    8 |<-------- 216 ------------>| valid -> user_id, finished
```

**Talk window** (664 cycles):

```
coord -> talker     |<---- TALK (216) ---->|
talker -> coord                             ~5 |<--- sample (216) --->|
coord -> listeners                           8 |<-- FROM_X (216) ---->|<--- sample or 0 (216) --->| finished
```

Two delays matter here:

* **Decoder start delay.** A station answers about 5 cycles after the
  command's last bit reaches it: its synchroniser, its bit decision and the
  start of its serialiser. The answer then passes the coordinator's
  synchroniser, which adds 2 more. The coordinator therefore starts its
  decoder `REPLY_DELAY` = 8 cycles after the command has left. On lines
  without delay the reply's bit grid then matches the decoder's. The edge
  re-alignment absorbs up to about 13 cycles of extra round-trip cable
  delay.
* **Source-command delay.** The listeners are told whose audio comes next
  while the talker is still answering. The coordinator starts "audio from
  X" 8 cycles after the talk command, the same delay as the decoder. It
  ends as the sample is captured, and the sample follows straight after.
  Started any earlier, it would leave a gap of half a bit in front of the
  audio byte. The free-running station receivers would then insert a bit.

The output multiplexer (`output_mux`) drives the window's station from the
command serialiser and the other two stations from the listener serialiser.
It forces the audio byte, but not the source command, to zero for a
listener not in a call with the talker. Such a station hears silence from
that peer.

**Time-out and guard.** If a window runs out, the coordinator does three
things:

1. It clears both serialisers.
2. It returns both controllers to idle.
3. It holds every line idle for `GUARD_CYCLES` = 243 (nine bit times)
   before opening the next window.

Without the guard, a listener cut off inside an audio byte would take the
first bits of the next command as the rest of that byte and miss the
command. A timed-out window therefore lasts 800 + 243 + 1 cycles. A window
closed by its transaction ends two cycles after `finished`. At the default
sizes no window times out. The end-to-end test runs a second system with
500-cycle windows to exercise this path.

A round takes 3329 cycles on lines without delay. Each station is therefore
served once per round. The report gives the system clock as 1 MHz. At that
clock a round is about 3.3 ms, so each station's audio is forwarded about
300 times per second, and a line carries 37 kbit/s. At the lab board's
27 MHz the same round would take 123 µs (about 8100 samples per second).

## Calls: dial codes and the connection register (`dialing_module`, `user_id`)

A station has two call switches, one per peer. Peers are taken in A/B/C
order: A's peers are B and C, B's are A and C, C's are A and B. The station
turns the switches into a dial code, which it sends in its call window:

| code | meaning |
|---|---|
| 0 | hang up (no call) |
| 1, 2, 3 | call A, B, C |
| 4 | call both peers |

`user_id` keeps six "X calls Y" bits:

| bit | 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| meaning | B→A | A→B | C→A | A→C | C→B | B→C |

A dial code rewrites both of the caller's outgoing bits. Two stations are
in a call only when each has dialled the other, i.e. both bits of the pair
are set. A three-way conference is three such pairs. A station that stops
dialling a peer ends that pair at its next call window. The other side
then hears silence from it within one round.

## The station (`user_station`)

* **`command_detector`** recovers the commands and the announced audio
  bytes, as described above.
* **`user_end`** answers "call" with the dial code and "talk" with the
  microphone sample latched at the last codec strobe. It stores audio from
  each peer in that peer's register and ignores audio announced as its own.
  The reply starts one cycle after the command is recognised.
* **`audio_mixer`** mixes the two peers' samples. It computes
  `y = a + b − a·b/256` on unsigned 8-bit samples, saturated at 255, with 0
  as silence. One peer alone passes unchanged; two loud peers do not wrap
  around.
* **Headphone source.** On every codec strobe (`codec_ready`) the headphone
  register loads:
  * the voicemail player's output while `vm_listen` is high, or else
  * the ring tone while `ringing` is high, or else
  * the mix.

  The ring tone and voicemail outputs update on that same strobe, so they
  reach the headphone one sample later.
* **`ring_tone`** steps through a 64-entry sine table, one entry per strobe.
  At a 48 kHz strobe that is a 750 Hz tone. The table is computed at
  elaboration with the integer approximation
  `sin(d) ≈ 4d(180−d) / (40500 − d(180−d))` (d in degrees). Each sample is
  `128 + 127·sin`.
* **`voicemail`** records the microphone while `vm_record` is high and
  replays message `vm_msg_num` while `vm_listen` is high. Storage is an
  external ZBT SRAM of 36-bit words:
  * Four samples go in the low 32 bits of each word, the first sample in
    bits 7:0; bits 35:32 are written as zero.
  * Up to four messages lie back to back, and their start addresses are
    kept in registers.
  * Reads are issued ahead of use, allowing for the RAM's 2-cycle latency.
  * `vm_delete` removes a message. Once all are deleted the memory is
    reused from address 0.
* **`station_display`** draws a white phone (a body and a handset, both
  rectangles) on a 1024×768 raster. While `ringing` is high the phone moves
  8 pixels right per frame and alternates between full and half size every
  16 frames.

`ringing` is an input, driven for example by a switch. The stations receive
no packet from which they could work it out (see below).

The coordinator's screen (`coordinator_display`) shows:

* three station boxes, green when the station is in a call and grey when
  not;
* a yellow bar between each pair of stations in a call.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `BIT_CYCLES` | 27 | top | clocks per bit |
| `ONES_THRESHOLD` | 18 | top | more ones than this decides a 1 |
| `WINDOW_CYCLES` | 800 | top | window time-out |
| `REPLY_DELAY` | 8 | coordinator | decoder start after a command |
| `SRC_DELAY` | 8 | talking_module | source command start (set to `REPLY_DELAY`) |
| `GUARD_CYCLES` | 9 × `BIT_CYCLES` | tdma_window | idle time after a time-out |
| `MSGS`, `ADDR_W`, `RAM_LATENCY` | 4, 19, 2 | voicemail | messages, word address width, SRAM latency |

`WINDOW_CYCLES` must cover a talk window, `24·BIT_CYCLES + 16` cycles (664 at the defaults).

## Departures from the report

* **Window length.** The report's text gives 656 cycles, and its timing
  figure prints a countdown of 800. A talk window needs three byte times
  plus latency (664 cycles here), which does not fit in 656. 800 is used.
* **Dial codes.** The report's text gives one example encoding of "A calls
  B" that disagrees with its dialing logic. This design uses the small codes
  of the dialing logic (0–4), which cover every case.
* **No separate acknowledgement packets.** The report speaks of
  acknowledgement packets after each transfer. Here the station's reply
  byte is the acknowledgement: a separate packet would not fit into the
  window.
* **Connection register.** The report describes nine bits. Three of them
  flag incoming voicemail and were never tied to anything. Only the six
  call bits are built.
* **Voicemail is local.** The report's voicemail was not integrated with
  the conference system. It gives no command for announcing voicemail
  audio and no timeout after which an unanswered call becomes a message.
  Here a station records and replays its own microphone, with the storage
  format the report describes.
* **Five command packages.** The report counts seven command packages
  but defines five. The two undefined ones are not built.
* **Ringing** is an input, as in the report's own tests. No packet tells a
  station that it is being called.
* **Added by this design:**
  * the decoder-start and source-command delays;
  * the guard interval after a time-out;
  * clearing both controllers at a time-out;
  * saturation in the mixer;
  * the phone drawing;
  * the ring-tone content;
  * synchronous active-high reset everywhere (the report relies on
    power-up values).
* **One clock in the top.** `accs_top` runs everything on one clock. Each
  station still receives and answers through its own synchroniser and
  edge-aligned sampler, so the stations can sit on separate boards with
  their own clocks. `tb_accs_clocks` tests exactly that: it builds the
  system from a coordinator and three stations clocked 1% slow, 1% fast and
  2% slow. The same test also passed with mismatches of 3–4% and failed at
  5–6%.
* **Not built:** the RS-485 transceivers (analog), the AC'97 codec and its
  controller (bought in; the stations take and give 8-bit samples with a
  ready strobe), the ZBT SRAM chip (a simulation model is in
  `tb/zbt_model.sv`), and a keypad, which was only planned.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each
also has a watchdog that counts a failure if the run hangs. With plain
Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/accs_pkg.sv tb/tb_accs_top.sv --top-module tb_accs_top
./obj_dir/Vtb_accs_top
```

Replace `tb_accs_top` with any testbench name in `tb/`. Verilator finds the
other modules through `-y`.

| testbench | what it runs |
|---|---|
| `tb_accs_full` | the top at its default parameters, no overrides: A and B dial each other and exchange audio while C hears silence. Checks the round time (3329 cycles) and that no window times out. A few seconds. |
| `tb_accs_top` | end to end, default sizes, with 1–5 cycle line delays in each direction, plus a second system with 500-cycle windows (see below). About 500,000 cycles, under a second. |
| `tb_accs_clocks` | coordinator and stations on four different clocks in a conference; every received audio byte is checked |
| `tb_coordinator` | the coordinator against behavioural stations |
| `tb_user_station` | a station against a testbench coordinator |
| `tb_<block>` | one block each, compared with values the testbench works out itself |

`tb_accs_top` goes through these steps:

1. idle;
2. a call A↔B;
3. a three-way conference, held until both screens have drawn their boxes
   and the phone;
4. a hang-up;
5. the ring tone;
6. a voicemail recording and its replay.

Throughout, it checks every forwarded sample and every headphone sample. It
counts each mechanism and fails any that never happened: call set-up,
hang-up, forwarding, silencing, two-peer mixing, windows closed by their
transaction and by time-out, re-alignment at the coordinator and at the
stations, ring tone and voicemail playback.

`tb/zbt_model.sv` models the SRAM: writes take effect at once, and a read
returns the word addressed `LATENCY` clocks earlier.
