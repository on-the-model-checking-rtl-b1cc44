# SpaceWire link interface in SystemVerilog

SpaceWire is a full-duplex serial link used on spacecraft. Each direction uses two wires,
Data and Strobe. The data bit goes on Data, and Strobe toggles whenever Data does not, so
exactly one wire changes per bit and the receiver recovers the clock by XOR-ing the two.
Before any data moves, the two ends of a link bring it up together through a handshake of
NULL characters and flow-control tokens (FCTs). Any error tears the link down and starts
the bring-up again.

This RTL implements the link interface described in the paper "On the Model Checking of
the SpaceWire Link Interface". It has eight modules: controller, transmitter, receiver,
timer, recovery, credit counter, transmit baud-rate counter and error notification. The
paper gives the inside of two of them, the controller state machine and the six-part
transmitter. For the other six it gives only a purpose. Those were filled in here with
the simplest logic that does the job, following common SpaceWire practice wherever the
paper is silent. The paper's own focus is formally checking the transmitter and
controller. The nine properties it checks are carried over as simulation checks and
assertions (see "Verification").

## The link state machine (`spw_controller`)

This is the heart of the design. It has seven states, numbered S0 to S6 in this order:

| # | State                | Transmitter may send                  | Resets held              |
|---|----------------------|---------------------------------------|--------------------------|
| 0 | ErrorReset           | nothing                               | TX_Reset, RX_Reset       |
| 1 | ErrorWait            | nothing                               | TX_Reset                 |
| 2 | Ready                | nothing                               | TX_Reset                 |
| 3 | Started              | NULLs                                 | –                        |
| 4 | Connecting           | NULLs, FCTs                           | –                        |
| 5 | Run                  | NULLs, FCTs, N-Chars, Time-Codes      | –                        |
| 6 | ErrAnalysis_DataSave | nothing                               | TX_Reset                 |

Transitions:

- **ErrorReset → ErrorWait** after 6.4 µs. ErrorReset is also where a system reset lands.
- **ErrorWait → Ready** after 12.8 µs.
- **Ready → Started** when the link is enabled.
- **Started → Connecting** once a NULL has been received (gotNULL).
- **Connecting → Run** on the first received FCT.
- **Run → ErrAnalysis_DataSave** on a receive error, a credit error or LINK DISABLE.
- **ErrAnalysis_DataSave → ErrorReset** when the host has saved its data (`fifo_empty`)
  and has read the error record (ErrorReadDone).
- **Fall back to ErrorReset** from ErrorWait, Ready, Started and Connecting on any
  receive error (disconnect, parity, escape). The same happens on any received character
  that is not allowed yet: FCT, N-Char or Time-Code, with FCT allowed in Connecting.
  Started and Connecting also fall back after 12.8 µs without progress.

The "link enabled" condition is `!link_disable && (link_start || (autostart && gotNULL))`.
With AUTOSTART, an end waits in Ready until the other end's NULLs arrive.

ErrAnalysis_DataSave is the paper's addition to the standard SpaceWire state machine. On
a Run-state failure the link holds its transmitter quiet until the host has looked at the
error, instead of resetting at once. Without a host that reads `err_status` and pulses
`err_read`, the link stays there.

The timer (`spw_timer`) restarts on every state change, so every timeout is measured from
entry into the current state.

## What goes on the wire

Every character starts with a parity bit and a control flag:

| Character  | Bits, first sent first           | Length  |
|------------|----------------------------------|---------|
| FCT        | P 1 0 0                          | 4       |
| EOP        | P 1 0 1                          | 4       |
| EEP        | P 1 1 0                          | 4       |
| ESC        | P 1 1 1                          | 4       |
| data       | P 0 d0 d1 … d7                   | 10      |
| NULL       | ESC then FCT                     | 8       |
| Time-Code  | ESC then data {F1 F0 T5 … T0}    | 14      |

P makes the parity odd. The bits it covers are the previous character's data or control
bits, P itself and the current control flag. The transmitter sends one bit per
TX_Clockenable pulse, with no gaps between characters. When it has nothing else to send
it sends NULLs. While TX_Reset is high both wires are held at 0.

The receiver first searches the raw bit stream for a NULL (`x1110100`). That locks it to
the character boundaries and sets gotNULL. From then on it decodes characters and checks
each parity bit. An ESC followed by anything other than an FCT or a data character is an
escape error. No bit edge for 850 ns after the first one is a disconnect error. Before
gotNULL, nothing is reported.

## Flow control (`spw_credit_counter`)

An FCT means "I have room for 8 more N-Chars" (N-Chars are data bytes, EOP and EEP).

- **Transmit side.** Each received FCT adds 8 to `tx_credit`. Each N-Char sent uses 1.
  At zero, NoCredit stalls the transmitter's N-Char path; NULLs, FCTs and Time-Codes
  still flow. An FCT that would push the credit past 56 is a credit error.
- **Receive side.** While the host asserts BUFFER_READY and 8 more fit under 56, the
  counter pulses EightMore and adds 8 to `rx_credit`. Each pulse queues one FCT in the
  transmitter. Each N-Char received uses 1. An N-Char arriving with no credit granted is a
  credit error.

BUFFER_READY is therefore read as "the host can take another eight characters". The host
should lower it when its buffer is nearly full. The receiver writes every N-Char it
decodes, on `buffer_write`, without waiting.

## Transmitter structure (`spw_transmitter`)

The transmitter is built from the six parts the paper names:

- `spw_tx_data_char_reg` (DataCharacterReg): one-entry host register. TX_Ready is high
  while it is empty. A TX_Write while TX_Ready is high stores TX_Data and drops TX_Ready.
  TX_Data is 9 bits: bit 8 set means a control character, with bit 0 = 0 for EOP and
  1 for EEP.
- `spw_tx_timecode_reg` (TimeCodeRegister): captures TIME_IN and CONTROL FLAGS IN on
  TICK_IN.
- `spw_tx_simple_adapter` (SimpleHandshakeAdapter): holds a tick request until it is
  served.
- `spw_tx_collecting_adapter` (CollectingHandshakeAdapter): counts EightMore requests
  (up to 7) until FCTs may be sent.
- `spw_tx_controller` (TX_Controller): at each free bit slot it picks, in this order, a
  Time-Code (Run only), an FCT (Connecting and Run, and only after the first NULL has
  gone), an N-Char (Run, with credit), or a NULL. The priority order is the usual
  SpaceWire one.
- `spw_tx_register` (TX_Register): builds the bit string with its parity and shifts it
  out DS-encoded.

A tick waits at most one character, 14 bits at worst, before its Time-Code starts.

## Other modules

- `spw_recovery`: `rx_clock = d_in ^ s_in`. It is brought out as RX_CLOCK. The receiver
  itself does not use it as a clock (see below).
- `spw_tx_baudrate_counter`: TX_Clockenable, one cycle in DIVISOR.
- `spw_error_notification`: a sticky `err_status = {credit, escape, parity, disconnect}`,
  a saturating `err_count`, and `err_read_done = (err_status == 0)`. A one-cycle
  `err_read` clears the status.
- `spw_link`: the top, wiring all of the above. `spw_pkg` holds the state and character
  types and the default constants.

## Timing and parameters

Everything runs on one clock, with a synchronous active-high reset. The paper gives no
clock frequency, so the defaults assume 100 MHz:

| Parameter (`spw_link`) | Default | Meaning                                      |
|------------------------|---------|----------------------------------------------|
| `T6U4_CYC`             | 640     | 6.4 µs                                       |
| `T12U8_CYC`            | 1280    | 12.8 µs                                      |
| `DISC_CYC`             | 85      | 850 ns disconnect timeout                    |
| `TX_DIV`               | 10      | clock cycles per transmitted bit (10 Mb/s)   |

For another clock, scale all four. The receiver oversamples Datain/Strobein through
two-flop synchronisers, so the system clock must be several times the bit rate of the
far end. With the default divisor of 10, both ends running from equal clocks have ample
margin. The transmit rate is fixed. Standard SpaceWire starts at 10 Mb/s and may change
rate in Run; this design does not.

## Where this design departs from or goes beyond the paper

- **The paper's choices that are kept:** the eight modules and their signal names, the
  seven states and their transitions, the outputs per state, the six-part transmitter,
  the TX_Ready/TX_Write handshake, 8 N-Chars per FCT, the Time-Code taken at the tick
  and sent after the current character, the 6.4 / 12.8 µs timeouts, and RX_CLOCK as an
  XOR.
- **Taken from common SpaceWire practice**, because the paper is silent:
  - character formats and parity, and the transmit priority;
  - the credit limit of 56 and the 850 ns disconnect timeout;
  - the "link enabled" equation and the first-NULL search.
- **This design's own choices:**
  - the system-clock oversampling receiver;
  - RX_Reset asserted in ErrorReset only;
  - the error register and its read protocol;
  - BUFFER_READY as the FCT-grant condition;
  - `fifo_empty` as a plain host input (the paper does not say which FIFO it means);
  - the 9-bit N-Char word;
  - timeouts measured from state entry.
- **One conflict in the paper.** In its first description of Run, errors go straight to
  ErrorReset. It then adds ErrAnalysis_DataSave between the two. This RTL has the added
  state.
- **Not covered:** changing the bit rate after connection, and clocking the receiver from
  RX_CLOCK.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- **`tb_spw_link`** runs two links, A and B, back to back at the default parameters:
  - bring-up, with B on AUTOSTART;
  - random N-Chars, EOP and EEP in both directions;
  - a Time-Code from A to B;
  - a credit stall: B withholds BUFFER_READY, A stops after 56 N-Chars, then resumes;
  - a wire freeze, which gives a disconnect error;
  - a single inverted bit, which gives a parity or escape error;
  - LINK DISABLE.

  After each disruption it checks that the links pass through ErrAnalysis_DataSave, wait
  for the error read, and come back to Run.
- **`tb_spw_transmitter`** drives the transmitter from `tb/spw_env_fsm.sv`. That model
  steps through S0 to S6 with the per-state outputs of the table above, the same
  abstraction the paper uses for its ninth property. The testbench decodes the line
  independently.

`tb_spw_link` also counts clock cycles:

- ErrorReset lasts exactly 640 cycles (6.4 µs).
- ErrorWait lasts exactly 1280 cycles (12.8 µs).
- In Run, a bit goes out every 10 cycles.

**`tb_spw_properties`** checks the paper's nine properties on two links. Random traffic
runs throughout. The links are disturbed at random: wire freezes, single inverted bits,
LINK DISABLE at either end, and system resets at either end. A property fails if it is
violated or if it is never triggered.

- **P1-P2:** after a disconnection error, Data and Strobe go to 0.
- **P3-P6:** in ErrorReset or ErrorWait, once the timeout that ends it has passed, Data
  and Strobe go to 0.
- **P7-P8:** after RESET, Data and Strobe go to 0.

  For P1 to P8, "go to 0" means within 3 clock cycles.
- **P9:** every bit of an FCT sent in Connecting changes exactly one wire. If the
  transmitter is reset partway through the FCT, the check ends there, because P1-P8 then
  require both wires to drop to 0 together.

An assertion in `spw_link` also checks, in any simulation, that both wires are low in the
cycle after TX_Reset.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_spw_link -y rtl -y tb +libext+.sv -Irtl rtl/spw_pkg.sv tb/tb_spw_link.sv
./obj_dir/Vtb_spw_link
```

Use the same command for any other testbench, changing the two names. `tb_spw_link`
simulates about 1 ms of link time in a few seconds.
