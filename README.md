# Wireless rover with a reversible drive history

A tracked rover is driven from a base station using a PlayStation digital
pad. The two ends talk over a packet radio. Each end has a small FPGA, and a
radio microcontroller sits between the FPGA and the air.

The interesting part is at the base station. While the operator drives, the
station keeps a compact log of what the treads were told to do: each time the
speed pair changes, it pushes one record holding the previous speed pair and
how many samples it lasted. If the rover gets stuck, the operator presses
START. The station then pops the log and sends each speed pair with its
direction flipped, for as long as it was originally held. The rover retraces
its path backwards to where logging began. After that, normal driving and
logging resume.

The radio side is built around one idea. Every packet is a complete
fixed-size snapshot, 40 bits long. Every bit not needed for data carries a
known verification pattern. Packets cross the FPGA/microcontroller wire MSB
first, so a slipped or missed clock damages the low-order end, where the
pattern sits. A receiver that finds the pattern broken drops the packet and
keeps acting on the last good one.

All of this is synthesizable SystemVerilog in `rtl/`, with a self-checking
testbench per module in `tb/`.

## Contents

- [Structure](#structure)
- [The history log: store, stack and replay](#the-history-log-store-stack-and-replay)
- [Sequencing a sample: the major FSM](#sequencing-a-sample-the-major-fsm)
- [Reading the PlayStation pad](#reading-the-playstation-pad)
- [Commands and display](#commands-and-display)
- [The FPGA/radio links](#the-fpgaradio-links)
- [The rover end](#the-rover-end)
- [Parameters](#parameters)
- [Simulating](#simulating)
- [Where this RTL departs from, or adds to, the original design](#where-this-rtl-departs-from-or-adds-to-the-original-design)
- [Not included](#not-included)

## Structure

```
wireless_rover_top
├── base_station
│   ├── sample_divider      20 Hz sample pulse
│   ├── major_fsm           runs one sample: pad poll, then store or replay
│   ├── psx_controller      pad bus master (ATT/CLOCK/COMMAND/DATA/ACK)
│   ├── command_calc        buttons -> speeds, light, claw; builds command packet
│   ├── store_data          run-length recorder of the speed pair
│   ├── replay_fsm          plays the record backwards
│   ├── stack_fsm           push/pop of two-byte records
│   │   └── history_ram     8 KiB byte-wide RAM
│   ├── tx_interface        uploads the command packet to the radio
│   ├── rx_interface        downloads and verifies sensor packets
│   └── display_calc        temperature digits and 8-LED compass
└── rover
    ├── rx_interface        downloads and verifies command packets
    ├── pwm (x2)            tread motor speed
    └── tx_interface        uploads the sensor packet
```

`rover_pkg` holds the packet structs, the speed types, the verification
constants, the pad's byte values and its button bit positions. `sync2` is a
two-flop synchronizer that every asynchronous input passes through.

The top puts the two FPGA designs side by side with one shared clock and
reset. Nothing joins them inside the top. Each side's radio wires, the pad
bus, the display, the sensor inputs and the actuator outputs are all top-level
ports. A testbench closes the radio loop.

## The history log: store, stack and replay

This is the part of the design with the most state and the least obvious
timing.

### Record format

Each tread speed is kept as 4-bit sign-magnitude, `{dir, mag[2:0]}`, where
`dir` = 1 means reverse. A speed pair fits one byte, with the right tread in
the high nibble (`motor_pair_t`).

A record is two bytes: the speed pair, then an 8-bit duration counted in
samples (20 Hz, so at most 12.75 s per record). The stack lives in
`history_ram`. `top` counts the bytes in use:

- **push** writes the speed byte at `top` and the duration at `top+1`, then
  sets `top += 2`.
- **pop** reads the duration from `top-1` and the speeds from `top-2`, then
  sets `top -= 2`.

Each operation takes 5 clocks from the request to `done`:

| Operation | States |
|---|---|
| push | INIT_PUSH1 → PUSH_MOTORS → INIT_PUSH2 → PUSH_DURATION → FINISH |
| pop | INIT_POP1 → POP_DURATION → INIT_POP2 → POP_MOTORS → FINISH |

Edge cases:

- A push that would not fit is dropped. It pulses `overflow`, and the older
  history is kept.
- A pop on an empty stack returns zeros ("stop") and pulses `underflow`.
- `empty`, `full` and `top` are outputs.
- An assertion catches a new request made while an operation is in progress.

### Recording: `store_data`

`store_data` holds one *open run*: a speed pair and how many samples it has
lasted so far. Each sample does one of the following:

| Situation | Action |
|---|---|
| Same speeds, run below 255 | The duration grows by one. |
| Same speeds, run at 255 | The run is pushed, and a new run of one sample starts. |
| Speeds changed | The old run is pushed, and the new speeds start a run of one sample. |
| Replay just requested | The open run is pushed, with this sample counted in it. If this sample's speeds differ from the run's, the old run is pushed and then a one-sample run of the new speeds. The open run is then emptied. |
| Open run is empty (after reset or a replay) | Nothing is pushed; the sample starts a new run. |

The push on a replay request matters. Without it, the movement since the last
speed change would not be in the log, and the replay would start from the
wrong place.

### Replaying: `replay_fsm`

`replay_fsm` does nothing on a sample unless a replay was just requested or
is already running. When it acts, it looks at a hold counter:

- **Counter not zero:** count down one and keep the current speeds.
- **Counter zero, stack not empty:** pop a record. Send its speeds with each
  moving tread's direction flipped (`reverse_motor`; a stopped tread stays
  stopped). Load the counter with `duration − 1`, because the popping sample
  already counts as the first of the step.
- **Counter zero, stack empty:** the replay is over. `active` falls and the
  speeds return to stop.

With the `duration − 1` load, a record of N samples is replayed for exactly N
samples.

While `active` is high, the command packet takes its tread speeds from the
replay FSM. The pad's D-pad is ignored for driving, but the light and claw
still follow the pad. Nothing is recorded while a replay runs.

Example, with samples numbered from reset, each row one 20 Hz sample:

```
samples 0-1    idle, run {stop,2}
samples 2-4    forward: push {stop,2}, run {fwd,3}
samples 5-6    spin left: push {fwd,3}, run {left,2}
sample  7      START pressed, pad otherwise idle:
               push {left,2}, push {stop,1}, run emptied;
               replay starts in the same sample: pop {stop,1} -> stop
samples 8-9    pop {left,2}  -> spin right
samples 10-12  pop {fwd,3}   -> reverse
samples 13-14  pop {stop,2}  -> stop
sample  15     stack empty: replay ends, recording resumes
```

## Sequencing a sample: the major FSM

`sample_divider` pulses `tick` every `CLK_HZ / SAMPLE_HZ` clocks. On each tick
`major_fsm` runs the other machines one after another, waiting for each to
finish:

1. **Poll the pad** (`psx_controller`). `command_calc` then updates the live
   speeds, and pulses `replay_req` if START was just pressed.
2. **Store or replay:**
   - If a replay is running, only the replay FSM runs.
   - Otherwise the store FSM runs. If `replay_req` is set, the replay FSM runs
     after it, so the log is complete before the first pop.

A tick that arrives while a sample is still being handled is ignored and
pulses `overrun`.

A whole sample takes a few hundred clocks. The pad poll takes 5 bytes × 8
bits × 2·`PSX_HALF` = 320 clocks, plus the pad's ACK delays, which are each at
most `ACK_TIMEOUT`. Store or replay takes at most about 20 clocks more. All of
this is far inside the 92,160-clock sample period.

## Reading the PlayStation pad

The pad is a synchronous serial slave with five wires:

| Wire | Meaning |
|---|---|
| ATT | Low for the whole transaction. |
| CLOCK | Idles high. |
| COMMAND | FPGA to pad. |
| DATA | Pad to FPGA. |
| ACK | The pad pulls it low briefly after each byte that is to be followed by another. |

Bits go LSB first. The sender changes a bit on the falling edge of CLOCK, and
the receiver takes it while CLOCK is high.

`psx_controller` has one state per byte:

| State | FPGA sends | Pad answers |
|---|---|---|
| INIT_CONTROLLER | 0x01 | 0xFF |
| REQUEST_DATA | 0x42 | ID, 0x41 for a digital pad |
| GET_READY_FOR_DATA | 0xFF | 0x5A, "data follows" |
| READ_BUTTONS1 | 0xFF | SELECT, –, –, START, UP, RIGHT, DOWN, LEFT |
| READ_BUTTONS2 | 0xFF | L2, R2, L1, R1, △, ○, ×, □ |

Buttons are active low, and the first bit listed is bit 0. After the fifth
byte, ATT goes high at once, without waiting for ACK.

Timing inside a byte:

- CLOCK is low for `PSX_HALF` clocks, then high for `PSX_HALF` clocks.
- DATA passes through `sync2` and is taken on the last clock of the high half.
  The synchronizer adds two clocks of delay, so `PSX_HALF` must be at least 3.
- A gap of `PSX_HALF` clocks follows ATT falling and each ACK.

After each of the first four bytes, the FSM waits for ACK low. If ACK does not
come within `ACK_TIMEOUT` clocks (184, about 100 µs), the poll is abandoned:
ATT goes high, `ack_timeout` pulses, and the FSM returns to idle. This keeps a
missing ACK from hanging the whole station, which only advances when the poll
finishes.

`valid` reports whether the poll succeeded. A poll fails on a timeout, or if
the ID byte is not 0x41 or the ready byte is not 0x5A. `buttons` changes only
after a valid poll.

## Commands and display

`command_calc` turns the buttons into a command:

| Input | Effect |
|---|---|
| UP / DOWN | Both treads forward / reverse at `DRIVE_SPEED`. |
| LEFT | Left tread reverse, right tread forward (spin left). |
| RIGHT | The mirror of LEFT. |
| Several directions at once | Priority UP, DOWN, LEFT, RIGHT. |
| No direction | Stop. |
| △ press | Toggles the search light. |
| ○ held | Opens the claw. |
| × held | Closes the claw. |
| R1 / L1 | Raise / lower the claw inclination by `INCL_STEP` per sample, saturating at 0 and 255. |
| START press | Requests a replay. |

The command packet (`cmd_packet_t`, 40 bits, MSB first on the wire):

| Bits | Field |
|---|---|
| 39:35 | right tread `{dir, mag[3:0]}` |
| 34:30 | left tread `{dir, mag[3:0]}` |
| 29 | search light |
| 28:21 | claw inclination |
| 20:19 | claw motion: 0 idle, 1 open, 2 close |
| 18:0 | verification pattern 0x2A5A5 |

On the link a tread speed has a 4-bit magnitude, as the rover's PWM takes.
The log keeps only 3 bits. `widen_motor` maps 0..7 to 0..15 by repeating the
top bit (`{mag, mag[2]}`), so 7 becomes 15, full on.

The sensor packet (`sens_packet_t`):

| Bits | Field |
|---|---|
| 39:32 | temperature in °C, unsigned |
| 31:24 | heading, 256 steps per turn, 0 = north, clockwise |
| 23:0 | verification pattern 0x02A5A5 |

`display_calc` shows the last verified sensor packet:

- The temperature is two hex digits.
- The heading lights one of 8 compass LEDs: bit 0 is north, then clockwise.
  The LED index is `(heading + 16) >> 5`, wrapping at 8, so each LED covers
  ±22.5°.

## The FPGA/radio links

The radio microcontroller is the master on both FPGA links: it decides when
packets move. Each FPGA has two one-way serial links to it. Each link has a
strobe, a sync clock and a data wire.

### Upload: `tx_interface`

The FPGA sends a packet to the microcontroller's transmit buffer.

1. The microcontroller raises `request_tx`. It holds it high for the whole
   transfer.
2. On that rising edge, `tx_interface` captures `packet` and drives its MSB on
   `data_out`.
3. The microcontroller sends 40 pulses on `sync_in` and reads `data_out` while
   each one is high.
4. On each falling edge of `sync_in`, the FSM presents the next bit.
5. After the 40th pulse, `done` pulses and the FSM goes idle.

The states are Idle, Wait start, Update data, Wait sync high and Wait sync
low.

If `request_tx` falls before the 40th pulse, the transfer is abandoned and
`aborted` pulses. This handles a lost sync pulse: without it the FSM would sit
in Wait sync high forever. Both inputs pass through `sync2`, so the
microcontroller's pulses must each last at least 3 FPGA clocks.

### Download: `rx_interface`

The FPGA reads a received packet out of the microcontroller, and here the FPGA
makes the clock.

1. A rising edge on `rx_received` starts the transfer.
2. For each of the 40 bits, `sync_out` is low for `SYNC_HALF` clocks, then
   high for `SYNC_HALF` clocks.
3. At the end of the high half, `data_in` (synchronized) is shifted in, MSB
   first.
4. The half-period timer reloads on entry to every state, so every pulse,
   including the first, has the same length.

After 40 bits, `(word & VERIFY_MASK) == VERIFY_VALUE` is tested. If it holds,
the word becomes `packet` and `pkt_valid` pulses. If it does not, `pkt_error`
pulses and `packet` keeps the last good value. Between transfers `sync_out`
rests high.

`SYNC_HALF` = 92 gives 50 µs per half at the assumed 1.8432 MHz clock, so a
download takes about 4 ms.

## The rover end

`rover` takes the command link, drives the treads and tools from the last
verified command, and returns the sensor packet.

Each tread gets an enable from a `pwm` and a direction bit:

- The `pwm` counter runs over `PWM_PERIOD` = 63 clocks, about 29 kHz at
  1.8432 MHz.
- The output is high while the count is at most 4·duty.
- Duty 0 is never on, and duty 15 is always on.

The tool outputs:

| Output | Meaning |
|---|---|
| `light` | Search light. |
| `claw_on`, `claw_dir` | Claw motor; `claw_dir` = 1 closes. |
| `claw_incl` | Inclination set point, 8 bits. |

The sensor packet is rebuilt every clock from the `temperature` and `heading`
inputs, and captured when the microcontroller asks for it.

## Parameters

Defaults assume the 1.8432 MHz clock of the original lab boards.

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 1_843_200 | Clock frequency. Only used to derive the sample divider. |
| `SAMPLE_HZ` | 20 | Sample rate of the major FSM. |
| `PSX_HALF` | 4 | Half a pad bit, in clocks (≈230 kHz pad clock). |
| `ACK_TIMEOUT` | 184 | Clocks to wait for the pad's ACK (≈100 µs). |
| `SYNC_HALF` | 92 | Half a download sync pulse, in clocks (≈50 µs). |
| `RAM_ADDR_W` | 13 | Log RAM address width: 8 KiB, 4096 records. That is at least 204 s of driving (a new record every sample) and up to 14.5 h (every record 255 samples long). |
| `PWM_PERIOD` | 63 | PWM counter period. |
| `DRIVE_SPEED` | 7 | Stored tread magnitude for a D-pad press (`command_calc`). |
| `INCL_STEP` | 8 | Inclination change per sample (`command_calc`). |

To run on another clock, change `CLK_HZ` and rescale `PSX_HALF`,
`ACK_TIMEOUT` and `SYNC_HALF` to keep the same times.

## Simulating

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=<n> failures=<m>`, and has a watchdog that fails it if it
hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/rover_pkg.sv \
    tb/tb_wireless_rover_top.sv --top-module tb_wireless_rover_top
./obj_dir/Vtb_wireless_rover_top
```

Replace the name to run any other testbench.

Two behavioural models stand in for the parts that are not logic here:

- `psx_pad_model` answers polls with settable buttons and ID. Its ACK can be
  switched off.
- `xcvr_model` plays the radio microcontroller on one FPGA link. It can
  upload a packet, dropping a chosen sync pulse to imitate a lost pulse, and
  download one.

The testbenches:

- **Unit testbenches** (`tb_<module>`) check each block against a model
  written independently inside the testbench. Where the design fixes a cycle
  count, they check that too: the sample period, stack operation time, bit
  timing of the pad and both links, and the PWM period.
- **`tb_base_station`** runs about 150 samples with random button presses
  through the pad model. It compares every command packet with a reference
  model of the whole store/replay behaviour. It covers replays, stack
  overflow, pad timeouts, an ignored sample tick and corrupted sensor
  packets.
- **`tb_wireless_rover_top`** runs the whole system with a fast sample rate,
  a 32-byte log and short sync pulses. The testbench moves packets between
  the two FPGAs, in the role of the radios. It checks the rover's tread, light
  and claw outputs and the station's display against a model. It counts, and
  requires at least once, each of:
  - a replay seen at the rover
  - a log overflow
  - a pad timeout
  - a command packet rejected for a broken pattern
  - a lost sync pulse on upload
  - a rejected sensor packet
- **`tb_wireless_rover_full`** uses every default: 1.8432 MHz, 20 Hz, 8 KiB
  log. It drives forward for three samples, spins left for two, presses START,
  and checks that the rover replays the steps in reverse, each for its
  recorded length, and then stops. It takes about 0.8 s of simulated time.

Verilator is two-state and, in these runs, starts registers at random values.
All state that is read is reset, and the testbench monitors ignore the cycles
before reset.

## Where this RTL departs from, or adds to, the original design

The original design is described at the level of its state machines and
packet formats. The points below are either where this RTL differs from that
description or where it fills in something the description leaves open.

1. **Log RAM.** Originally an external 8-bit SRAM chip of unstated size. Here
   it is an on-chip array with a synchronous read, 8 KiB by default. The
   stack's five-clock operations leave room for an external RAM's
   access time.
2. **Replay request during a speed change.** The description pushes "the old
   speeds and duration" when a replay is requested. Here, if the requesting
   sample itself has new speeds, both the old run and the new one-sample run
   are pushed, so no sample is lost. This needs the extra store state
   WAIT_FOR_STORE2.
3. **Replay step length.** The hold counter is loaded with `duration − 1`, so
   each step lasts exactly as long as it was recorded.
4. **Run length limit.** Not addressed originally. Here a run is closed at
   255 samples.
5. **Full and empty stack.** Not addressed originally. Here they are handled
   as described above, with a FINISH state added to the stack FSM.
6. **Tread speed width.** The log keeps 4 bits per tread and the packet
   carries 5. These are bridged by widening the magnitude.
7. **Download sync timing.** Here both halves of a sync pulse last 50 µs. One
   statement of the original timing gave 50 ms for the high half, which would
   make a download take seconds.
8. **Download register.** The download is stored in one 40-bit register. The
   original split it into two words only because of a tool limit.
9. **Pad checks and buttons.** Checking the pad's ID and ready bytes, keeping
   the old buttons after a failed poll, the timeout length, and the button
   assignments other than "the D-pad steers" are all this design's choices.
10. **Sensor packet layout.** Its bit layout is this design's, as is the
    heading scale. Only the field contents were given.
11. **Inclination output.** The inclination is given to the rover hardware as
    an 8-bit set point. How the rover turns it into motion is not described.
12. **Abandoned sample ticks.** A sample tick that comes while a sample is
    being handled is ignored and flagged. With the default timing this cannot
    happen.
13. **Clock and reset.** Both FPGAs share one clock and reset in the top. On
    hardware each runs from its own oscillator, and the links are
    synchronized on entry, so that is safe.

## Not included

- **The radio microcontrollers and their firmware.** These decide when
  packets are sent and fetched, and run the send/receive loop between the two
  ends. Their FPGA-facing wires are ports here, and `xcvr_model` imitates them
  in simulation.
- **The PlayStation pad.** `psx_pad_model` stands in for it in simulation.
- **The rover's board, mechanics, H-bridges, camera and sensors.** The
  temperature and heading enter as 8-bit ports. The motor and tool controls
  leave as ports.
