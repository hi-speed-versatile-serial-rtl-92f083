# Serial crate controller for CAMAC on a biphase party line

This is the RTL for a CAMAC serial crate controller (SCC). Up to 16 CAMAC
crates hang on a single twisted pair run as a party line. One driver is the
only master on that pair. The driver sends a short self-clocked message at
5 Mbit/s. The crate it addresses carries out one dataway cycle and answers
on the same pair with Q, X, its L status and, for a read, the data word. The
whole exchange of a 16-bit read takes about 11.7 us.

The design is built to be simple:

- There is no phase-locked loop. The receiver gets its clock from the
  transitions in the data.
- There is no sync search. A double-width sync pulse starts every message
  and resets every receiver on the line.
- The receive side and the transmit side are both small state machines.
  Both read their step from one shared bit counter.

A second pair carries a "prompt L" signal: any enabled look-at-me (L) line
in any crate asserts it at once.

The architecture comes from a published crate controller used in a large
accelerator control system. That covers the block diagram, the line code and
its 150 ns and 350 ns decoder windows, the sync pulse, the three line-control
bits and the 16/24-bit words. It also covers block transfers, the response
with Q/X/L, the L enable and the read-all-L command. Several details were
not available and are this RTL's own choices, listed in the section
[What is chosen here](#what-is-chosen-here-rather-than-given). The main ones
are the exact bit layout of each message, the special-command codes, the
terminator shape and the dataway cycle timing.

## The line code

Each bit lasts 200 ns. The code is polar biphase-M:

- The level changes at every bit boundary. The receiver gets its clock from
  these changes.
- A "one" has a second change in the middle of the bit. A "zero" has none.

```
 bits:        0       0       1       0       1
           |       |       |       |       |       |
 line:  ___/¯¯¯¯¯¯¯\_______/¯¯¯\___/¯¯¯¯¯¯¯\___/¯¯¯\___
           ^ boundary changes   ^ mid-bit change = one
```

A message on the line has this frame:

```
 idle (low, no driver) | SYNC | A | B | C | message bits | T | idle
```

- **SYNC** is a positive pulse 400 ns long, two bit times with no change.
  Well-formed data never stays still that long, so the sync is always
  recognised. The falling edge at its end is the boundary of bit A.
- **T** (terminator): the sender holds the level for two more bit times and
  then turns its driver off.
- The receiver finds the end of the message from the 350 ns silence. It does
  not need to know the length in advance.

## Messages and transactions

The bits of each field go most significant first.

| message | A | B | C | then |
|---|---|---|---|---|
| CAMAC command (driver → SCC) | 0 | 0 | word length | crate (4), F (5), N (5), A (4): 18 bits |
| write data (driver → SCC) | 0 | 1 | 0: 16 bits, 1: 24 bits | the word |
| short command (driver → SCC) | 0 | 1 | x | nothing |
| short response (SCC → driver) | 1 | 0 | word length | D, L, Q, X |
| data response (SCC → driver) | 1 | 1 | 0: 16 bits, 1: 24 bits | D, L, Q, X, the word |

In a response:

- **D** is the state of the L enable flip-flop.
- **L** is "any of the 23 L lines, gated by L enable". This gives a polled
  L on every answer.
- **Q** and **X** are the dataway responses of the cycle.

The receiver tells a write-data message from a short command by its length,
which it learns from the terminator.

The transactions are:

- **Read** (F0–F7): the command is answered with a data response.
- **Control** (F8–F15, F24–F31): the command is answered with a short
  response.
- **Write** (F16–F23): the command itself gets **no** answer. The crate
  stores F, N, A and waits. The driver then sends a write-data message, and
  the crate runs the cycle and gives a short response.
- **Single-address block transfers**:
  - A short command repeats the stored read or control command.
  - Each further write-data message repeats the stored write.
  - A short command is 7 bit times on the line instead of 25, so block
    transfers run faster.
- **Selection**: a CAMAC command whose crate field matches the crate
  address switch selects that crate. Any other CAMAC command deselects it,
  including a malformed one. Short commands and write data only act on the
  selected crate.
- **Ignored messages**: responses of other crates (A = 1) and messages of
  the wrong length. They get no answer. The driver's timeout is the error
  path; there is no parity.

### Special commands

Commands to station 28 or 30 are served by the controller itself:

| command | action | response |
|---|---|---|
| N28 A8 F26 | dataway Z cycle | short |
| N28 A9 F26 | dataway C cycle | short |
| N30 A9 F26 / F24 | set / clear inhibit I | short |
| N30 A9 F27 | test inhibit | short, Q = I |
| N30 A10 F26 / F24 | set / clear L enable | short |
| N30 A10 F27 | test L enable | short, Q = L enable |
| N30 A0 F0 | read all 23 L lines | 24-bit data, L(k) in bit k−1 |
| other N28/N30 codes | nothing | short, Q = X = 0 |

### Timing of one 16-bit read (default parameters)

| phase | bit times | time |
|---|---|---|
| command: sync 2 + ABC 3 + 18 + terminator 2 | 25 | 5.0 us |
| terminator detection, dataway cycle, turnaround | | ≈ 1.25 us |
| response: sync 2 + ABC 3 + DLQX 4 + 16 + terminator 2 | 27 | 5.4 us |

The simulated total is 11.65 us from the driver's sync to the release of the
line after the response. The original unit was quoted at "about 10 us". The
difference comes from the field widths, the turnaround and the 1 us dataway
cycle chosen here.

## Receiving: the decoder

`biphase_decoder` is the hardest part to follow. It is a clocked copy of a
circuit built from two one-shots.

1. `line_rx` is asynchronous. It passes through two flip-flops, and each
   change of level becomes an *edge pulse*.
2. **Clock recovery, non-retriggerable 150 ns window** (6 clocks at
   40 MHz). An edge that arrives while the window is closed is a bit
   boundary and opens the window. An edge inside the window is a mid-bit
   change, so the bit is a one. When the window closes the decoder pulses
   `bit_strobe`, and `bit_data` gives the bit. The next boundary, 200 ns
   after the last one, finds the window closed again.
3. **Sync detection, retriggerable 350 ns timer** (14 clocks). Every edge
   restarts it. When it runs out, the decoder pulses `gap_strobe` once, and
   `gap_level` gives the line level.
   - A gap with the line high while the receiver is idle is a sync.
   - A gap in the middle of a message is the terminator.

Tolerances at 8 samples per bit:

- A mid-bit change is recognised from 25 ns to 150 ns after the boundary.
  The nominal time is 100 ns.
- A boundary may come up to 25 ns early. Arbitrary lateness is accepted
  until the 350 ns gap.

The sync edge itself produces one stray bit strobe, before the sync is
recognised. The receive control is still idle at that point and ignores it.

## Control on a common bit counter

`bit_counter` has 64 states (6 bits) and is shared. Only one side uses it at
a time; the top has an assertion for that.

**`rx_control` (receive side).** The sync clears the counter. Each decoded
bit is steered by the count:

- Bits 0–2 go to the control-bit register.
- In a CAMAC command, bits 3–6 go to the crate register and bits 7–20 to
  the command (F, N, A) register.
- In a data message, every bit from 3 on goes to the write register.

At the terminator the count gives the message length. The control judges
the message as described above. It then does one of three things:

- runs a special command directly;
- starts `camac_cycle` and waits for it;
- does nothing.

It then hands a response descriptor (`resp_t`) to the transmit side. After
its own response it ignores the line for 350 ns, so the end of its own
terminator is not taken for a sync.

**`tx_control` (transmit side).** It runs on a 10 MHz half-bit enable
divided from the 40 MHz clock. In order, it sends:

1. 2 idle half-bits of turnaround, so the driver has released the line;
2. 4 sync half-bits;
3. two half-bits per bit;
4. 4 terminator half-bits.

It clears the counter at the end of the sync and counts bits with it.
`tx_mux` turns the count into the bit to send, from the response fields or
from the top of the read or L register. Those registers shift once per data
bit.

`biphase_encoder` takes mode, boundary phase and bit on each half-bit
enable:

- it toggles the line at a boundary and, for a one, in the middle of the
  bit;
- it forces the line high for the sync;
- it holds the level for the terminator;
- its `line_oe` is the driver gate.

## Dataway side

`camac_cycle` makes a 1 us cycle with the defaults:

- B is held for the whole cycle.
- N (one-hot on N1–N23), A, F and W are stable throughout.
- S1 runs from 400 to 600 ns and S2 from 800 to 1000 ns.
- Q and X are latched at the end of S1. At the same moment the read
  register takes R.
- Z and C are cycles without a station address, with S2 only.

`lam_control` holds the L enable and inhibit flip-flops. It drives the
prompt L pair with `L enable AND (any L)`, which is also the L bit of every
response.

## Files

| file | contents |
|---|---|
| `rtl/scc_pkg.sv` | timing constants, field widths, message constants, `fna_t`, `special_op_t`, `tx_mode_t`, `cycle_kind_t`, `resp_t` |
| `rtl/scc_top.sv` | the controller: wires all blocks as in the original block diagram |
| `rtl/biphase_decoder.sv` | data decoder, clock recovery and sync detector |
| `rtl/biphase_encoder.sv` | biphase-M encoder with sync, terminator and driver gate |
| `rtl/bit_counter.sv` | shared 64-state bit counter |
| `rtl/sipo_register.sv` | receive shift registers (control bits, crate, command, write) |
| `rtl/piso_register.sv` | read register and L register |
| `rtl/tx_mux.sv` | transmit bit multiplexer |
| `rtl/special_decoder.sv` | special-command decoder |
| `rtl/lam_control.sv` | L enable, inhibit, polled and prompt L |
| `rtl/camac_cycle.sv` | dataway cycle generator |
| `rtl/rx_control.sv` | receive control |
| `rtl/tx_control.sv` | transmit control |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_scc_top` is the end-to-end test |
| `tb/camac_dataway_model.sv` | behavioural CAMAC crate used by `tb_scc_top` |

The top module's ports are plain signals:

- `line_rx`, `line_tx` and `line_oe` go to an RS-422A receiver and a
  tri-state driver.
- `l_bus_drive` goes to the prompt-L driver.
- The `dw_*` signals are the dataway.
- `my_crate` is the crate address switch.

Reset is synchronous and active high. The clock is 40 MHz.

## What is chosen here rather than given

- **One 40 MHz clock.** It replaces the analog one-shots of the receiver
  and the separate 10 MHz transmit crystal. The 10 MHz survives as the
  half-bit enable.
- **Message layout**:
  - the crate field is 4 bits, F/N/A are 5/5/4 bits, and the order is
    crate, F, N, A;
  - fields go most significant bit first;
  - Q and X follow D and L in the status field;
  - a short command is told apart from write data by its length.
- **Terminator.** Two bit times without a change, then the driver is
  released. The original only says a terminator closes each message.
- **Response rules.** The write command itself is not answered, and the
  write-data message is.
- **Special-command codes and the inhibit flip-flop.** They follow common
  CAMAC crate-controller practice.
- **Timing.**
  - The dataway cycle follows the usual CAMAC 1 us cycle.
  - The 200 ns turnaround before a response is this design's.
  - So is the 350 ns hold-off after a response.
- **Selection rules.** Deselection on a malformed command and the dropping
  of wrong-length messages are this design's.

Physical parts are outside the RTL: the RS-422A line receiver and driver,
the crystal, the cable and its terminations. So are the driver at the other
end of the line and the CAMAC modules.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog,
and none needs parameters. With Verilator 5, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/scc_pkg.sv \
    rtl/biphase_decoder.sv rtl/biphase_encoder.sv rtl/bit_counter.sv \
    rtl/sipo_register.sv rtl/piso_register.sv rtl/tx_mux.sv \
    rtl/special_decoder.sv rtl/lam_control.sv rtl/camac_cycle.sv \
    rtl/rx_control.sv rtl/tx_control.sv rtl/scc_top.sv \
    tb/camac_dataway_model.sv tb/tb_scc_top.sv --top-module tb_scc_top
./obj_dir/Vtb_scc_top
```

For a unit test, list `rtl/scc_pkg.sv`, the module, anything it
instantiates and its `tb/tb_<module>.sv`.

`tb_scc_top` puts two controllers (crates 3 and 12) on one line. It drives
them from a behavioural driver that encodes and decodes the line code by
itself, and checks every response bit by bit. It covers:

- 16- and 24-bit reads and writes;
- control commands;
- block reads and writes;
- the unanswered write command;
- moving the selection from crate to crate;
- absent stations and absent crates;
- every special command;
- the prompt and polled L.

It also checks that two drivers are never on the line at once, and it
prints the measured transaction times. It runs at the default parameters in
well under a second.

`tb_party_line16` puts sixteen controllers, the most one line serves, on
one line. It addresses each in turn with reads, writes and read-backs, and
checks that only the addressed crate ever drives the line. It measures:

- a mean 16-bit read transaction of 11.65 us;
- a 16-bit single-address block read of 8.4 us per word, including the
  0.4 us the test driver waits between messages.

`tb_biphase_decoder` moves every edge by up to ±25 ns, which is 12.5 % of a
bit, and checks that every bit still decodes.

To change the bit timing, edit `SAMPLES_PER_BIT` in `scc_pkg`. The decoder
windows are derived from it as 3/4 and 7/4 of a bit. The dataway timing is
set by the `T_*` parameters of `camac_cycle`.
