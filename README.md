# Wakeup call system

An FPGA design that runs a telephone wakeup service for five-digit campus
phone numbers. A user calls the system and keys in a phone number and a
four-digit PIN. The system then plays a menu: the user can book a call for a
given time (AM/PM, hour, minute), or cancel their next booking. At the booked
minute the system dials the number. When the called party answers, it plays a
wakeup message followed by a piece of music and hangs up.

Everything the caller hears is a recorded message played from on-chip ROM.
Everything the caller does is a DTMF key press. The logic never sees audio from
the line. It sees only digits decoded by a DTMF transceiver chip, and a few
status lines from the line interface chip.

## The parts around the FPGA

The RTL stops at the pins of four external chips. They appear as top-level ports:

| Chip | Role | Ports on `wakeup_top` |
|---|---|---|
| MH88437 line interface | Takes the line off hook and reports ringing and loop current | `lc` out; `rv`, `lcd` in |
| LM393 comparator | Detects line reversal, i.e. that the far end answered a call placed by the system | `line_reversal` in |
| MT8889 DTMF transceiver | Decodes key presses and generates dial tones; 4-bit register bus in Motorola mode | `mt_ds`, `mt_cs_bar`, `mt_r_wbar`, `mt_rs0`, `mt_data_out/oe/in`, `mt_est` |
| LM4550 AC'97 codec | Turns samples into the analog audio sent down the line | `ac97_bit_clk`, `ac97_sync`, `ac97_sdata_out`, `ac97_sdata_in`, `audio_reset_b` |

The MT8889 data bus is bidirectional. In the RTL it is split into `mt_data_out`,
`mt_data_oe` and `mt_data_in`, and a tristate pad joins them at the pin.

The board also has an op-amp stage that moves the codec output from a 0 V bias
to a 2 V bias for the line interface. It has no logic in it.

`rv`, `lcd`, `line_reversal` and `mt_est` are asynchronous. They pass through
the two-flop `synchronizer` before the control unit sees them.

## Block structure

```
wakeup_top
├── synchronizer          RV, LCD, LR, EST into the 27 MHz domain
├── control_unit          major FSM + greet / take-request / cancel minor FSMs
├── mt8889_controller     DTMF chip driver
│   ├── est_to_newtone    EST rising edge -> new_tone pulse
│   ├── mt8889_major_fsm  init, receive and dial sequences
│   ├── mt8889_minor_fsm  one bus read or write (DS, CS, R/W, RS0 timing)
│   ├── digit_rx          digit counter, digit1..digit5 registers
│   └── digit_tx          digit counter, digit / control-value selection
├── audio_unit            message playback
│   ├── divcounter        8 kHz sample strobe (27 MHz / 3375)
│   ├── audio_fsm         ROM address sequencing
│   ├── message_rom x12   8-bit sample ROMs
│   ├── ac97_reg          sample register, 8 -> 20 bits
│   └── ac97_controller   AC'97 link master
├── pin_lookup            PIN CAM + phone-number ROM
├── request_memory        sorted store of bookings
│   ├── memory_controller store / cancel / timer FSMs
│   ├── shifting_unit     moves a range of rows up or down
│   ├── time_compare      before / equal / after
│   └── request_ram       256 x 31 single-port RAM
└── time_unit             real-time clock, new_minute pulse
```

Shared types live in `wakeup_pkg`:
- `tod_t` is `{hour[4:0], minute[5:0]}`, on a 24-hour clock.
- `request_t` is `{tod_t, phonenum[19:0]}`, 31 bits, one RAM row.

The package also holds the message numbers and the MT8889 register constants.

Phone numbers and PINs are stored as MT8889 key codes, four bits per key. The
chip reports key 0 as `4'hA`, so phone number 564-07 is `20'h564A7`.

## The control unit

The major FSM has two paths from `IDLE`.

**Incoming call.** Ringing (`rv`) starts it:
1. Raise `lc` and wait for `lcd`.
2. Run the greet FSM: welcome message, prompt, 5 digits, prompt, 4 digits, PIN lookup.
3. If the lookup fails, or the stored number differs from the number entered, play "PIN invalid" and hang up.
4. Otherwise play the menu and read one key:
   - Key 1 runs the take-request FSM: prompt for AM/PM (key 1/2), read 1 digit; prompt for the hour, read 2 digits; prompt for the minute, read 2 digits. It converts the time to 24 hours (12 AM is 0, 12 PM is 12), pulses `store` and plays the acknowledgement.
   - Key 2 runs the cancel FSM: pulse `cancel` with the caller's number, then play the cancel acknowledgement.
   - Any other key plays the menu again.
5. Return to `IDLE`, which hangs up.

**Outgoing call.** `req_pending` from the request memory starts it:
1. Raise `lc` and wait for `lcd`.
2. Dial the five digits of `pending_phone`.
3. Wait for `line_reversal`, with no timeout.
4. Play the wakeup message, then the music.
5. Pulse `done_req`.
6. Wait until the request memory has dropped `req_pending`. Without this step the same request would be taken twice.

A due wakeup call wins over a ring arriving in the same cycle.

`lc` is high in every state except `INITIALIZE` and `IDLE`. `INITIALIZE`
waits for the MT8889 controller to finish its power-up writes.

Every interaction with the other units uses the same pattern: a one-cycle
request pulse, then a wait for a one-cycle done pulse.
- Messages: `msg_req` and `msg_no`, then `msg_done`.
- Key entry: `receive_digits` and `max_number_rx`, then `rx_done` with `digit[0..4]`.
- Dialing: `dial`, then `tx_done`.
- PIN check: `pin_lookup`, then `pin_valid`.
- Storing and cancelling: `store`/`cancel`, then `done_store`/`done_cancel`.

Message numbers (`wakeup_pkg`):

| No. | Message | No. | Message |
|---|---|---|---|
| 0 | welcome | 6 | enter hour |
| 1 | enter phone number | 7 | enter minute |
| 2 | enter PIN | 8 | request acknowledged |
| 3 | PIN invalid | 9 | cancel acknowledged |
| 4 | menu | 10 | wakeup |
| 5 | enter AM/PM | 11 | music |

## Driving the MT8889

The chip has five 4-bit registers behind a 4-bit bus. `rs0` selects between
data (transmit/receive) and control/status. The controller uses Motorola bus
mode, DTMF burst mode and the interrupt enabled. Three layers drive it.

**`mt8889_minor_fsm`** performs one bus access:
- Set up `cs_bar`, `r_wbar` and `rs0` for `SETUP_CYC` cycles.
- Raise `ds` for `DS_CYC` cycles (8 cycles, about 300 ns) and sample read data at its end.
- Hold for `HOLD_CYC` cycles.

**`mt8889_major_fsm`** sequences the accesses:
- **Power-up**: read status, then write CRA=0, CRB=0, CRA=8, CRB=0, CRA=0xD, CRB=0, then read status. CRA bit 3 (RS0 in CRA) makes the next control write go to CRB. The final CRA value turns on tone output, DTMF, the IRQ and burst mode. `ready` rises at the end.
- **Receive N digits**: wait for `new_tone`, the rising edge of EST. Wait `TONE_DELAY` cycles (50 ms) for the decode to settle, then read the receive register. Load the value into the digit register selected by `digit_rx` and count. Repeat until `digit_rx` reports N.
- **Dial N digits**: write the digit picked by `digit_tx` to the transmit register. Then read the status register every `POLL_GAP` cycles (1 ms) until the transmit-done bit (bit 1) is set, and count. Repeat until `digit_tx` reports N.

**`digit_tx`** drives the bus value. During power-up it gives the control value
chosen by `control_reg_sel`. When dialing it gives the digit of `phone_no`
chosen by its count, most significant nibble first.

`digit_rx` ignores load strobes while the status register is being read, so a
status value never lands in a digit register.

## Playing messages

Twelve ROMs hold 8-bit two's-complement samples at 8 kHz: eleven voice messages
and one music piece. `audio_fsm` steps through them:
1. **`WAIT_REQ`** latches `msg_no` on `msg_req`.
2. **`WAIT_SEND_ADDR`** waits for the 8 kHz `send_pulse` and raises `le_audioreg`, which loads the ROM output into `ac97_reg`.
3. **`UPDATE_ADDR`** drops the load.
4. **`UPDATE_ADDR_DELAY`** moves to the next address. It goes to **`SEND_MSG_DONE`** after the last sample, which pulses `msg_done`.

A message of N samples therefore lasts N × 3375 cycles, about N/8000 seconds.
All ROMs share one address counter and a per-message length table (`MSG_LEN`).
A 12-way multiplexer on `msg_sel` picks the ROM output. A `msg_req` that arrives
while the FSM is still finishing the previous message is held and played next.

`ac97_reg` puts the 8-bit sample in bits 19:12 of a 20-bit word, so the codec
sees the same value at full scale.

`ac97_controller` runs in the codec's 12.288 MHz `ac97_bit_clk` domain.
- **Reset**: after system reset it holds `audio_reset_b` low for `RESET_CYCLES` system clocks. `sync` and `sdata_out` stay low during that time, which the codec requires.
- **Frames**: it then sends 256-bit frames at 48 kHz. `sync` is high for the 16 tag bits.
- **Tag**: the tag is `F800`, marking the frame, command address, command data, and left and right PCM as valid.
- **Commands**: slots 1 and 2 rotate through four codec register writes. They set master volume (02h=0000), headphone volume (04h=0000), PCM out gain (18h=0808) and DAC rate (2Ch=BB80, 48000 Hz).
- **Samples**: slots 3 and 4 carry the current sample. It crosses from the 27 MHz domain through two registers and is taken at the frame boundary only when both agree.

The link runs at 48 kHz and samples change at 8 kHz, so each sample goes out in
six consecutive frames.

The message ROMs here do not hold recordings. Each one holds a triangle tone
computed at elaboration, with a period that depends on the message number.
Every message therefore sounds different, and the playback path can be checked
sample by sample. Setting `message_rom`'s `INIT_FILE` loads real samples with
`$readmemh`. The default lengths are this design's choice: 32768 samples (4.1 s)
for each voice message and 65536 (8.2 s) for the music.

## PIN lookup

`pin_lookup` models a content-addressable memory of 16-bit PINs beside a ROM of
20-bit phone numbers, with 16 entries by default. It reads both from small hex
tables, `rtl/pin_table.hex` and `rtl/phone_table.hex`, which hold four sample
users. Edit them to change the users.

The lookup is a three-stage pipeline:
1. Register the PIN.
2. Compare it against every entry in parallel and register the matching address.
3. Read the phone number from the ROM.

`valid` pulses three cycles after `lookup`, with `match` and `phone`.
A PIN of 0000 marks an empty entry and never matches.

## The request memory

This is the most involved part of the design. Bookings live in a 256 × 31
single-port RAM with one cycle of read latency:
- Rows 1..`tail` are kept sorted by time, earliest first.
- Row 0 is unused.
- `tail` is the number of bookings, brought out as `num_requests`.

Sorting at insertion time means the timer only ever looks at row 1.

`memory_controller` has three operations. They share the RAM with
`shifting_unit` through a multiplexer.

**Store.**
1. Read rows 1, 2, … and compare each with the new time using `time_compare`.
2. Stop at the first row whose time is strictly later, or after `tail`.
3. Have the shifting unit move that row through `tail` down by one address.
4. Write the new request into the freed row and increment `tail`.

A booking for the same minute as existing ones goes after them. A store into a
full memory is dropped, but `store_done` still pulses so the caller hears the
acknowledgement.

**Cancel.**
1. Scan rows 1..`tail` for the first row with the caller's phone number. This is their earliest booking.
2. Shift the rows after it up by one and decrement `tail`.

If no row matches, nothing is deleted.

**Request timer.** On every `new_minute`, read row 1 and test whether its time
is at or before the system time. If it is:
1. Latch its phone number as `pending_phone`.
2. Shift rows 2..`tail` up and decrement `tail`.
3. Hold `request_pending` until `request_reset` arrives.

Then test the new row 1 the same way, until no booking is due. Testing "at or
before", rather than only "equal", means a booking that fell due during a long
call is still made, one minute late.

Stores and cancels that arrive while a wakeup call is pending are handled at once.

`shifting_unit` takes a row range `a..b` and a direction. It copies one row per
read/write pair, two cycles per row. It walks from the far end so that no row
is overwritten before it is read. An empty range (`a > b`) finishes at once.
It does not touch `tail`; the controller owns that.

A store or cancel costs at most about 3 cycles per stored row for the scan,
plus 2 cycles per row shifted. With 255 bookings that is about 1300 cycles,
roughly 50 µs.

## Time unit

`time_unit` divides the 27 MHz clock to 1 Hz. It counts seconds, minutes
(`new_minute` pulses as the seconds wrap) and hours on a 24-hour clock. It also
keeps day, month (no leap years) and day of week, which nothing else uses yet.

`set_time` loads `set_value`, the date inputs, and zero seconds. This is how the
clock is set at power-up.

## Parameters of `wakeup_top`

| Parameter | Default | Meaning |
|---|---|---|
| `CLK_HZ` | 27 000 000 | system clock, for the 1 Hz divider |
| `DIV` | 3375 | clocks per audio sample (8 kHz) |
| `MSG_LEN` | 32768 × 11, 65536 | samples in each message |
| `TONE_DELAY` | 1 350 000 | wait after EST before reading a digit (50 ms) |
| `POLL_GAP` | 27 000 | interval between status polls while dialing (1 ms) |
| `REQ_DEPTH` | 256 | rows of the request RAM |
| `PIN_ENTRIES` | 16 | entries of the PIN table |

The following come from the original design description: the 27 MHz clock, the
3375 divider and 8 kHz rate, the 256 × 31 RAM, the 16-bit PINs, 20-bit phone
numbers and 8-bit samples, and the CAM and RAM latencies. The message lengths,
`TONE_DELAY`, `POLL_GAP`, the bus timings, the PIN table size and its contents
are this design's choices.

## Where this design departs from, or fills in, the original

- **Upsampling factor.** The link sends each sample in 6 frames, not 8, because 48 kHz / 8 kHz = 6.
- **Store order.** The store FSM inserts in ascending time order, which is what the sorted layout needs.
- **Cancel with no match.** It deletes nothing. A literal reading of the cancel state diagram would remove the last row instead.
- **Timer test.** The timer fires for bookings at or before the current time (see above), not only at an exact match.
- **`msg_done` at reset.** `msg_done` is low in the audio FSM's idle state.
- **Filled-in details.** These are not in the original:
  - the key assignments, message numbering and invalid-PIN behaviour;
  - the MT8889 control register values and bus timing (from the chip's data sheet);
  - the AC'97 register writes;
  - the clock-domain crossing;
  - the behaviour when the RAM is full;
  - the phone/PIN consistency check;
  - the no-timeout wait for an answer.

## Simulating

Every testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if something
hangs.

With plain Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_wakeup_top \
    -y rtl -y tb rtl/wakeup_pkg.sv tb/tb_wakeup_top.sv -o sim -Mdir obj
obj/sim
```

Replace `tb_wakeup_top` with any other testbench name. `pin_lookup` reads its
tables by the relative path `rtl/...`, so run from that directory.

Testbench helpers in `tb/`:
- `mt8889_model.sv` is a bus-level model of the DTMF chip. It records control writes and dialed digits, simulates the tone-send time through the status register, and presents key presses via EST and the receive register.
- `ac97_decoder.sv` deserialises the AC'97 link and exposes the tag and slots.

Testbenches:
- **`tb_wakeup_top`** runs the whole system with short timings: 1000-cycle seconds, 12-sample messages, short DTMF delays. The scenario:
  1. Three callers book 08:00, 07:30 (inserted ahead) and 7:30 PM.
  2. A caller gives a wrong PIN.
  3. A caller presses an unknown menu key and then cancels.
  4. A booking is remade.
  5. At 07:30 and 08:00 the system dials out, waits for the answer and plays the wakeup message and music.

  It checks the RAM rows, the dialed numbers, every message length and the AC'97 samples. It counts each mechanism (incoming call, invalid PIN, menu replay, store with shift down, cancel with shift up, timer firing and not firing, dial, answer, wakeup, music) and fails any that never happened.
- **`tb_wakeup_full`** uses every parameter at its default. Booking a call at full size takes about 900 million cycles of audio prompts, so this bench covers the outgoing side only:
  1. MT8889 power-up.
  2. Two bookings forced onto the request memory's store port while the control unit is idle.
  3. One forced minute tick.
  4. Full dialing with the 1 ms polls.
  5. The real 32768-sample wakeup message and 65536-sample music (332 million cycles).

  It runs in about 5 minutes. The incoming path at full size has not been simulated; its largest simulated form is the short-timing run above.
- **One testbench per block** (`tb_<block>`). The request memory bench runs with 16 rows and fills the memory. The audio unit bench runs with short messages. The rest run at default sizes. Each compares against values computed in the testbench and checks cycle counts where the design has a fixed rate or latency.

## Limits

- Audio content is a synthetic tone until real recordings are loaded.
- The PIN and phone tables are fixed at build time. There is no way to add users while running.
- An unanswered wakeup call waits forever, and a caller who hangs up mid-call is not detected. The line interface gives no clear signal for either.
- The request memory holds one booking per row with no date, so a booking repeats only if made again. The date counters exist for a later extension.
