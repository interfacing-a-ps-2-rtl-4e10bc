# PS/2 keyboard scan code display

This design lets an FPGA listen to a standard PC keyboard over its PS/2 port.
Each key press or release makes the keyboard send one or more *scan codes*.
The design receives those bytes, checks them, buffers them, and shows them
one at a time on two seven-segment digits, as a hex byte, at about one update
per second. It also talks back to the keyboard. Each press of Caps Lock
toggles the keyboard's Caps Lock LED, which only lights when the host tells
it to. It targets a 20 MHz system clock.

The keyboard may send codes much faster than one per second. A FIFO absorbs
the difference. The keyboard also owns the PS/2 clock, which has no relation
to the system clock, even when the host is the one sending. Most of the
design is about turning that slow foreign clock into clean, one-cycle
events inside the 20 MHz domain.

## What the keyboard sends

A PS/2 link has two open-collector lines, Clock and Data, each pulled up to
logic 1 when nobody drives it. The keyboard generates the clock, with a
period of 60-100 us. It changes Data while Clock is high. Data is valid at
the falling edge of Clock, at least 5 us after it changed.

One transfer is an 11-bit frame:

| bit       | value                                          |
|-----------|------------------------------------------------|
| start     | 0                                              |
| data 0..7 | the scan code, least significant bit first     |
| parity    | odd parity: data bits plus this bit hold an odd number of ones |
| stop      | 1                                              |

Keyboards use scan code set 2. A key press sends its *make* code, for
example `1C` for A. A release sends `F0` followed by the make code
(`F0 1C`). The design does not interpret the codes: it shows each byte as
received, so a press and release of A shows `1C`, `F0`, `1C` over three
seconds.

## Block structure

```
            +-----------+   +--------------------------- ser2par ---------------------------+
PS2Clk ---->|           |-->| one_shot --PS2ClkPulse--> receiver_fsm --Shift_en--> shift_reg |
PS2Data --->| input_reg |-->|                             ^   |                      |  (9b) |
            +-----------+   |               parity_checker-+   +--FifoWrite            |       |
                            +-------------------------------------|--------------------|------+
                                                                   v                    v [7:0]
                                     +-----------+  RD_EN   +----------------------------+
                                     |   timer   |--------->| sync_fifo  8 x 256         |
                                     |  (1 Hz)   |<-EMPTY---|                            |
                                     +-----------+          +----------------------------+
                                           | out_en (RD_EN one cycle later)   | DOUT
                                           v                                   v
                                     +----------------------------------------------+
                                     | output_reg: byte register -> 2 x seg_rom     |--> seg_hi, seg_lo
                                     +----------------------------------------------+

  received bytes (FifoWrite + byte) --> caps_lock_ctrl --start/byte--> ps2_tx --> ps2_clk_out, ps2_data_out
                                              |  caps_led                 | busy: holds ser2par in reset
```

| module           | role |
|------------------|------|
| `ps2_kbd_top`    | top level; wires the chain above |
| `input_reg`      | two flip-flops per line bring PS2Clk and PS2Data into the clock domain |
| `ser2par`        | the receiver: one-shot, FSM, shift register and parity checker |
| `one_shot`       | one-cycle pulse on each falling edge of the synchronised PS2Clk |
| `receiver_fsm`   | decides which pulses carry frame bits; issues shift and write strobes |
| `shift_reg`      | 9-bit shift register collecting the data bits and the parity bit |
| `parity_checker` | combinational odd-parity check, 1 = no error |
| `sync_fifo`      | 8-bit x 256 single-clock FIFO with FULL/EMPTY |
| `timer`          | once per period reads the FIFO if it is not empty |
| `output_reg`     | holds the displayed byte; two `seg_rom` lookups drive the digits |
| `seg_rom`        | hex digit to seven-segment pattern |
| `caps_lock_ctrl` | spots Caps Lock presses, toggles `caps_led`, runs the LED update |
| `ps2_tx`         | sends one byte from host to keyboard |
| `smd098_pkg`     | shared package: state type, widths, `hex_to_7seg` |

## The receiver

This is the part that needs the most care.

**Edge detection.** PS2Clk first passes through `input_reg`. `one_shot` then
keeps the previous sample and raises `pulse` for exactly one system cycle
when it sees 1 followed by 0. A falling edge on the pin thus becomes a pulse
two to three system cycles later. At that moment the synchronised PS2Data is
the bit the keyboard meant, because the keyboard holds Data for the whole
low half of its clock: at least 600 system cycles.

**Framing.** Not every falling edge is a data bit. `receiver_fsm` has one
state per frame position:

| state      | on a pulse                                                    |
|------------|---------------------------------------------------------------|
| `Idle`     | PS2Data = 0 is a start bit: go to `S0`. PS2Data = 1: stay, ignore it |
| `S0`..`S7` | raise `shift_en` (data bit 0..7 enters), go to the next state  |
| `Parity`   | raise `shift_en` (parity bit enters), go to `StopBit`          |
| `StopBit`  | if PS2Data = 1 and parity is good, raise `fifo_write`; else raise `frame_error`. Go to `Idle` either way |

Without a pulse the FSM holds its state and all outputs are 0. The outputs
are Mealy outputs: they are high in the same cycle as the pulse, and the
state changes at the end of that cycle. Assertions in the module check that
at most one output is high and never without a pulse.

**Bit placement.** `shift_reg` shifts toward bit 0 and takes the new bit
in at bit 8. After nine shifts the LSB-first data bits sit in `q[7:0]` and
the parity bit in `q[8]`. `parity_checker` XORs all nine bits, so
`parity_ok` is 1 when the count of ones is odd. It is valid throughout the
`StopBit` state. The byte stays on `scan_code` until the next frame's first
data bit, so the FIFO samples it safely at the `fifo_write` strobe.

**Errors.** A frame with a wrong parity bit or a stop bit of 0 is dropped,
and `frame_error` pulses for one cycle. The FSM does not look at FIFO FULL.
A good code that arrives while the FIFO is full is lost. There is no timeout.
If a frame is cut off half way, the FSM waits in its state until more clock
edges arrive. Only reset, or the start of a host transfer, clears it.

## Buffering and display pacing

`sync_fifo` stores up to 256 codes. A read accepted at a clock edge puts the
word on `dout` at that edge, so `dout` is valid the cycle after `rd_en`. A
write while full and a read while empty are ignored.

`timer` counts `CLK_HZ / RATE_HZ` cycles: 20,000,000 by default, one second.
On the tick cycle it raises `fifo_rd`, but only if the FIFO is not empty.
An empty tick is skipped and the display keeps its value. `out_en` is
`fifo_rd` delayed by one cycle, so `output_reg` loads `dout` exactly when it
has become valid.

Timing seen from the outside:

- A code enters the FIFO 2-3 cycles after the stop bit's falling edge on
  the pin.
- Ticks fall N, 2N, ... cycles after reset is released, with
  N = `CLK_HZ/RATE_HZ`. The display changes two cycles after a tick: one
  cycle for the FIFO read, one for the output register load.
- One PS/2 frame takes 660-1100 us, that is 13,200-22,000 cycles. A
  keyboard that never paused could fill the FIFO in well under a second.
  Ordinary typing fills it in a few seconds if nothing is read.

## Talking back to the keyboard: the Caps Lock LED

The keyboard does not light its own Caps Lock LED. The host must send it a
set-LEDs command (`ED`) and then an LED byte. In that byte, bit 2 is Caps
Lock, bit 1 Num Lock and bit 0 Scroll Lock. The keyboard answers each byte
with `FA` (acknowledge). These codes, and the Caps Lock make code `58`, are
those of standard PC keyboards.

**Finding the key.** `caps_lock_ctrl` watches every good byte the receiver
delivers. `F0` marks the next code as a release. A `58` that is not a release
toggles `caps_led`, unless the key is already held. A held key sends
repeated make codes, and those must not toggle again. The release clears
"held".

**The update.** Each toggle runs one sequence:

1. send `ED`;
2. wait for the next received byte, which must be `FA`;
3. send `{5'b0, caps_led, 2'b00}`;
4. wait for the next received byte (`FA`).

If the keyboard does not acknowledge on the line, or replies with something
other than `FA`, the update is abandoned. There is no retry. The keyboard's
`FA` replies also go into the FIFO and appear on the display, like any other
byte.

**Sending a byte (`ps2_tx`).** The keyboard generates the clock even when
the host sends, so the host must first ask for it:

1. Hold Clock low for `INHIBIT_CYC` cycles, 100 us by default. This also
   stops any transfer from the keyboard.
2. Pull Data low (the start bit) and release Clock.
3. The keyboard now produces clock pulses. After each falling edge the
   transmitter puts the next bit on Data: data bits 0-7, odd parity, then
   stop (Data released). The keyboard reads each bit while Clock is high.
4. On the eleventh pulse the keyboard holds Data low as its acknowledge.
   `ack_ok` records whether it did.
5. When both lines are released again, `done` pulses for one cycle.

The transmitter reuses `one_shot` to find falling edges. While it is busy,
the top level holds `ser2par` in reset. Otherwise the receiver would see the
host's own start bit and clock pulses as an incoming frame. There is no
timeout: if no keyboard answers, the transmitter waits until reset.

## Display encoding

`seg_hi` shows bits 7:4 and `seg_lo` bits 3:0. Each is `{g,f,e,d,c,b,a}`,
and a 1 lights the segment. The glyphs are the usual hex shapes, with
lower-case `b` and `d`. If your board's digits are active low, or wired in
another order, change `hex_to_7seg` in `smd098_pkg`.

## Pins and line drivers

Each PS/2 line is driven through an open-collector style buffer. Driving its
enable (`ps2_clk_out`, `ps2_data_out`) to 1 pulls the line low; 0 releases
it to the pull-up. The enables are 0 except while `ps2_tx` sends an LED
update. With `CAPS_LOCK = 0` they are tied to 0 and the design only
listens. The tri-state buffers and pull-up resistors belong in the FPGA pad
ring and on the board, not in this RTL. Connect `ps2_clk`/`ps2_data` to the
input side of those pads, so that they show the real line level, including
the host's own drive.

## Parameters

| parameter (module)                 | default    | meaning |
|------------------------------------|------------|---------|
| `CLK_HZ` (`ps2_kbd_top`, `timer`)  | 20,000,000 | system clock frequency |
| `RATE_HZ` (`ps2_kbd_top`, `timer`) | 1          | display updates per second |
| `FIFO_DEPTH` (`ps2_kbd_top`), `DEPTH` (`sync_fifo`) | 256 | codes buffered |
| `WIDTH` (`sync_fifo`)              | 8          | FIFO word width |
| `WIDTH` (`shift_reg`)              | 9          | data bits + parity |
| `STAGES` (`input_reg`)             | 2          | synchroniser flip-flops per line |
| `CAPS_LOCK` (`ps2_kbd_top`)        | 1          | 1: Caps Lock LED control on; 0: receive only |
| `INHIBIT_CYC` (`ps2_tx`)           | 2000 (top: `CLK_HZ/10000`) | Clock-inhibit time before a host transfer |
| `CAPS_CODE`, `BREAK_CODE`, `CMD_LEDS`, `ACK_CODE` (`caps_lock_ctrl`) | 58, F0, ED, FA | keyboard codes |

The clock rate, display rate, FIFO size and the frame format come from the
original design. `STAGES`, `INHIBIT_CYC`, the Caps Lock, set-LEDs and
acknowledge codes are standard PS/2 values or this design's choices.

## Design choices and departures

The following are choices made here, where the original description leaves
the detail open or reads two ways:

- **Start bit and write condition.** The start bit is taken as PS2Data = 0,
  as the protocol defines it. A frame is written when the parity check
  reports *no error*. The original state chart can be read with the opposite
  polarity on both branches; the protocol and the checker's definition
  decide it here.
- **FSM style.** One state per bit, rather than a bit counter. Both are
  allowed.
- **Input register.** Two flip-flops per line, a synchroniser. There is no
  glitch filter on PS2Clk. A noisy cable can therefore create false edges;
  the parity and stop checks catch most of the resulting bad frames.
- **FIFO.** The original uses a vendor FIFO core of the same size and ports
  (DIN, DOUT, WR_EN, RD_EN, FULL, EMPTY, CLK, SINIT). This is a plain RTL
  equivalent: an array with wrapping pointers and a count. The read is
  registered, so synthesis can map it to block RAM.
- **Timer on an empty FIFO.** The tick is skipped; the timer does not wait
  for data. The next chance to display comes a whole period later.
- **Reset.** One synchronous, active-high `rst` for everything. It also
  drives the FIFO's SINIT. The digits show `00` after reset.
- **Extra outputs.** `code`, `fifo_full`, `fifo_empty` and `frame_error`
  are brought out for observation and debug.
- **Caps Lock extension.** The original asks only that the LED follow the
  key. The transfer protocol and keyboard codes used for that are the
  standard PS/2 ones, described above. Holding the receiver in reset during
  a host transfer and showing the `FA` replies are this design's choices.
- **Not included.** There is no retry or timeout for the LED update. There
  is no scan-code-to-ASCII translation.

## Simulation

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. They need
Verilator 5 with `--timing`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/smd098_pkg.sv tb/ps2_kbd_top_tb.sv --top-module ps2_kbd_top_tb
./obj_dir/Vps2_kbd_top_tb
```

| testbench             | what it checks |
|-----------------------|----------------|
| `parity_checker_tb`   | all 512 inputs against a count of ones |
| `seg_rom_tb`          | all 16 glyphs against a lit-segment list |
| `shift_reg_tb`        | a known frame lands in `q[7:0]`/`q[8]`; random shifts against a model |
| `one_shot_tb`         | one pulse per falling edge, in the right cycle, for random clock runs |
| `input_reg_tb`        | reset value 1 and a delay of exactly `STAGES` cycles |
| `receiver_fsm_tb`     | idle pulses ignored; 9 shifts per frame; write or error on the stop bit; reset mid-frame |
| `ser2par_tb`          | frames from a keyboard model: all sample make codes, F0, random bytes, parity and stop errors, stray edges; write latency of at most 3 cycles |
| `sync_fifo_tb`        | fill to FULL, overflow, drain to EMPTY, empty reads, SINIT, random traffic against a queue |
| `timer_tb`            | read exactly every period when not empty; `out_en` one cycle later |
| `output_reg_tb`       | load on enable only; both digits' segments |
| `ps2_tx_tb`           | bytes sent to a keyboard model over open-collector lines: received intact, clock inhibited long enough, one `done`, `ack_ok` with and without the keyboard's acknowledge |
| `caps_lock_ctrl_tb`   | press toggles and sends `ED` then the LED byte; auto-repeat, release and other keys send nothing; a missing or wrong acknowledge abandons the update |
| `ps2_kbd_top_tb`      | whole design at small scale (3000-cycle period, 4-deep FIFO) against a model of the display. It counts codes buffered behind others, empty ticks, parity errors, stop-bit errors, stray edges, codes lost to a full FIFO and Caps Lock LED updates (on and off, checked byte by byte), and fails if any of them never happened |
| `ps2_kbd_typing_tb`   | presses and releases every key A-Z (78 codes) at real PS/2 timing, once with a 100 us and once with a 60 us keyboard clock, at the default 20 MHz clock and 256-deep FIFO with 200 display updates per second, in the receive-only configuration (`CAPS_LOCK = 0`); the display must show all 156 codes in order |
| `ps2_kbd_top_full_tb` | whole design at default size: 20 MHz, 1 s period, 256-deep FIFO. Sends A press/release, a bad frame, a Caps Lock press (the design must send `ED 04`) and 256 more codes, then checks the first three updates and that the FIFO filled. About 60 M cycles, under a minute |

`ps2_device_model` (in `tb/`) is a behavioural keyboard. It sends frames
with a configurable clock half period and can inject parity errors, stop-bit
errors and stray clock edges. It also receives host transfers and
acknowledges them (or not, on request). Testbenches model each wire as the
AND of the keyboard's drive and the inverted host drive enable.
