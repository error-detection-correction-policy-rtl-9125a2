# L2 serial link with error detection and event-boundary protection

Front-end boards of a Level-2 trigger send one event after another over
serial links. Data on such a link can be hit by bit errors, a receiver can
lose its character framing or its PLL lock, and a Begin or End Event
character can be destroyed. Most of these faults cost one event at worst,
with one exception. If a receiver loses an event boundary, it glues two
events together or splits one. From then on its event fragments no longer
match those of the other inputs. The only cure is an SCL_INITIALIZE, which
clears every buffer in every front-end crate.

This design is one end of such a link: a transmitter and a receiver, as on a
board that has both (an FIC, SLIC or MBT-style card). It follows one error
policy throughout:

* keep an error inside one event on one channel;
* count every error where it is detected, and make the counts readable;
* do not try to repair what cannot be repaired locally; tag the event and
  pass it on;
* above all, never lose an event boundary. Where one is lost anyway, put a
  boundary back in a known place and record that this was done.

The SystemVerilog is synthesizable. It compiles without errors under
Verilator's lint and the slang front end, and a self-checking testbench
drives each module. The serializer/deserializer chipset is not part of it;
the chipset's character interface is the boundary of the design.

## Link characters

Each clock carries one character (`l2_link_pkg::link_sym_t`):

| kind          | meaning                                                 |
|---------------|---------------------------------------------------------|
| `SYM_DATA`    | a data byte                                             |
| `SYM_SPECIAL` | a special (control) character, code in `code`           |
| `SYM_VIOL`    | a code violation: a character the receiver could not decode |

There are 12 valid special codes. Three have a meaning: Pad = 0,
Begin Event = 1 and End Event = 2. A special character with a code of 12 or
more is *unknown*. The code values are this design's choice. The chipset
supplies the character kind and the violation flag.

## What goes on the wire

### L2 event format (`l2_trailer_gen`)

The sending processor supplies the header and the objects. The header is
`B1` 4-byte words long, 12 bytes by default:

| byte | content                                                        |
|------|----------------------------------------------------------------|
| B0   | number of objects (at most 255)                                 |
| B1   | header length in 4-byte words (3 by default)                    |
| B2   | object length in 4-byte words (all objects are the same size)   |
| B3   | header/trailer format # (top 3 bits), object format # (low 5)   |
| B4   | data type #                                                     |
| B5   | bunch #                                                         |
| B6-7 | rotation # (B6 is the least significant byte)                   |
| B8-9 | algorithm version, or processor-specific bits                   |
| B10  | processor-specific bits                                         |
| B11  | status bits (b7 = error on this event)                          |

`l2_trailer_gen` forwards these bytes unchanged. It then appends a 4-byte
**logical trailer**:

| byte | content                                                     |
|------|-------------------------------------------------------------|
| T0   | bunch #, copy of B5                                         |
| T1   | data type #, copy of B4                                     |
| T2   | XOR of all even-numbered bytes before the trailer           |
| T3   | XOR of all odd-numbered bytes before the trailer            |

After the trailer come zero bytes up to the next multiple of 16. The bunch #
therefore appears twice, at the start and at the end of the event. A one-bit
error in one copy can still be detected and outvoted.

### Framing (`tx_framer`, `selftest_gen`)

Between events the transmitter sends Pads, which a receiver with a lost frame
can lock onto again. An event goes out as Begin, its bytes, two Pads
(`PADS_BEFORE_END`), then End. A receiver that is reframing after a data
error resynchronises on those Pads before the End arrives, and so still sees
the End. Gaps in the input stream are filled with Pads. The receiver ignores
these Pads. While `tx_hold` is set, no new event starts.

An output board (an MBT Out, `TX_PHYS_TRAILER = 1`) also appends a 2-byte
physical trailer, described below, after the padding of each event it
transmits. The helper module `tx_tag_adapter` presents the formatted event
to `phys_trailer_gen` as FIFO entries, so the same trailer logic serves both
directions.

In self-test mode, `selftest_gen` drives the link instead. It sends every
symbol in turn: data 0x00 to 0xFF, then special characters 0 to 11, over and
over. Self-test is started and stopped by a register bit, not by a special
character, because every special character is part of the test sequence.

## The receiver

```
rx_sym ─┬─> reframe_ctrl ── reframing ──┐
        ├─> selftest_chk                v
        └───────────────────────> input_fsm ──> event_fifo ──> phys_trailer_gen ──> ev_out
                                      │ counts      │ hwm → L1 Busy       │
                                      v             v                     └─> l2_frame_check
                                 status_regs <── all error pulses ──────────────┘
```

### Input state machine (`input_fsm`)

This is the core of the boundary protection. There are two states. In IDLE
the FIFO is disabled; in EVENT it is enabled. Every character is handled
according to the current state:

| character     | in IDLE                               | in EVENT                                          |
|---------------|---------------------------------------|---------------------------------------------------|
| Pad           | ignored                               | ignored                                           |
| data          | counted (data while idle)             | written, tag DATA                                 |
| violation     | counted (error while idle)            | written, tag ERROR                                |
| Begin         | go to EVENT: normal start             | **End was lost**: write END with the *forced* flag, stay in EVENT for the new event |
| End           | **Begin was lost**: counted, stay IDLE | write END, go to IDLE: normal end                |
| other special | counted                               | written, tag ERROR                                |

Two properties follow from this table:

* **Two Begins or two Ends in a row put a boundary back.** A lost End means
  that the next Begin closes the old event and opens the new one. The closed
  event is still delivered, with its status marked. A lost Begin means that
  the event's characters arrive while the FSM is in IDLE. They are counted
  and the event is dropped. The next Begin starts the next event cleanly.
* **The FSM is always ready for the next Begin.** After a lost End, for
  example, it does not have to guess which event the following data belongs
  to.

A character that cannot be decoded is still written, tagged ERROR, with
whatever code the chipset returned. It keeps its place in the event, so the
event keeps its length and format, and the rest of the event can still be
parsed.

Some further details:

* **Reframing.** While `reframing` is high, nothing is written and the state
  does not change. An event that was open during reframing gets the
  *reframe* flag in its END mark.
* **FIFO full.** When the FIFO has one place left, DATA and ERROR bytes are
  dropped and the event gets the *overflow* flag. The last place is kept for
  the END mark, so the boundary still reaches the FIFO.
* **SCL_INITIALIZE** (`clear`) returns the FSM to IDLE.

A variant that starts an event on two consecutive data characters in IDLE
was considered in the original design notes and marked unlikely. It is not
built: such characters are only counted.

### Reframing (`reframe_ctrl`)

The deserializer chip searches for a new character boundary only while its
reframe-enable pin `rf_en` is high. This block sets that pin when one of
these things happens:

* power-up (reset);
* `N_BAD` (4) consecutive bad characters, where a bad character is a
  violation or a special character with an unknown code;
* a front-panel request;
* a register request;
* SCL_INITIALIZE;
* loss of PLL lock (`rx_lock` low).

The pin stays high until the PLL is locked and a Pad has been received.
There is no timeout. While the pin is high, nothing enters the FIFO. Each
entry into reframing is counted and sets a LED flip-flop, which a register
write clears.

### FIFO and physical trailer (`event_fifo`, `phys_trailer_gen`)

The FIFO holds 1024 entries. Each entry is a tagged byte: a 2-bit tag
(DATA, ERROR or END) and 8 bits. For an END entry, the 8 bits hold the
event's flags: forced, reframe and overflow.

`phys_trailer_gen` reads the FIFO and forwards each event byte. It also
computes the XOR of all received bytes and collects the event's errors. When
it reads an END entry, it appends the **physical trailer**. The last
trailer byte carries `last`, which means End of Event.

* FIC, SLIC and MBT outputs (`MBT_INPUT = 0`) send a 2-byte trailer:
  B0 is the parity of the received bytes and B1 is the status byte.
* An MBT input (`MBT_INPUT = 1`) sends 14 bytes. The upstream board's 2-byte
  trailer has already arrived as the last two data bytes. Together with them,
  the 14 bytes make a 16-byte trailer. B2 to B13 are zero, B14 is the MBT's
  own parity over everything it received, and B15 is its own status. The
  2-byte trailer breaks the 16-byte alignment, and the MBT's 14 bytes restore
  it.

Status byte (the status byte itself is not included in the parity):

| bit | meaning                                         | origin        |
|-----|-------------------------------------------------|---------------|
| 7   | any receive error in this event                 | link format   |
| 5   | bytes dropped, FIFO full                        | this design   |
| 4   | reframing during the event                      | this design   |
| 3   | End was missed, boundary inserted               | this design   |
| 2   | violation or unexpected special inside the event | this design  |
| 1:0 | board type: 0 FIC, 1 SLIC, 2 MBT (`TYPE_ID`)   | link format   |

### Header/trailer check and event synchronisation (`l2_frame_check`)

This block watches the outgoing event stream and locates the logical trailer
at byte 4·B1 + 4·B0·B2. It reports:

* `bunch_mismatch`: T0 differs from B5;
* `dtype_mismatch`: T1 differs from B4;
* `parity_err`: T2 or T3 is wrong;
* `no_trailer`: the event ended before its trailer.

It also compares the bunch # with `scl_bunch`, the bunch number the timing
system expects. An **event synchronisation error** is flagged only when
neither the header copy nor the trailer copy matches. If the header copy is
wrong but the trailer copy is right, the event is accepted. Such an error
sets the sticky `sync_error` output for the central error collection. Only
SCL_INITIALIZE clears it.

### Self-test check (`selftest_chk`)

The checker starts at the first data byte 0x00 it receives and then expects
the sequence in order. One wrong or undecodable symbol counts as one error,
and the checker carries on with its own count. Two wrong symbols in a row are
taken to be a slip: the checker counts two errors and follows the received
sequence from there. `selftest_pass` pulses once per correct pass, so it can
drive a front-panel test point. The error count can be read as a register.

## L1 Busy and SCL_INITIALIZE

`l1_busy` is raised when the FIFO holds 768 or more entries (`FIFO_HWM`). If
`BUSY_ON_REFRAME` is set, it is also raised while the receiver is reframing.
Busy during reframing only helps on an unbuffered link, where busy really
stops the source. On a buffered link the next event comes anyway, and a
mismatch leads to SCL_INITIALIZE regardless.

`scl_init` does the following:

* flushes the FIFO;
* returns the input FSM to IDLE;
* resets the trailer generator;
* clears `sync_error`;
* starts a reframe.

It does **not** clear the error counters. The evidence of what went wrong
survives the re-initialisation, for diagnosis.

## Registers (`status_regs`)

16-bit words. Writes take effect at the clock edge; reads are combinational.

| address | content                                                                   |
|---------|---------------------------------------------------------------------------|
| 0       | control: b0 self-test enable, b4 transmit hold (read/write); b1 reframe request, b2 LED clear, b3 counter clear (write 1 to pulse) |
| 1       | status: b0 in event, b1 reframing, b2 LED, b3 L1 Busy, b4 sync error, b5 FIFO empty, b6 FIFO full |
| 2       | self-test error count                                                     |
| 3       | FIFO fill level                                                           |
| 16..29  | counters: 16 events begun, 17 events ended, 18 missed End, 19 missed Begin, 20 data while idle, 21 violations while idle, 22 other specials while idle, 23 error characters in events, 24 FIFO overflow, 25 reframings, 26 sync errors, 27 trailer parity errors, 28 header/trailer mismatches, 29 events without trailer |

All counters saturate at 0xFFFF.

## Top level (`l2_link_top`)

The top level instantiates every block above and brings out these
interfaces:

* the chipset interface: `tx_sym`, `rx_sym`, `rx_lock`, `rf_en`;
* the event streams: `ev_in_*` and `ev_out_*` (valid/ready; one byte per
  beat, with `last` on the final byte);
* the timing-system signals: `scl_init`, `scl_bunch`, `l1_busy`,
  `sync_error`;
* the per-event check result: `chk_*`;
* the front panel: `fp_reframe`, `led`, `selftest_*`;
* the register port: `reg_*`.

| parameter         | default | meaning                                          |
|-------------------|---------|--------------------------------------------------|
| `TYPE_ID`         | 1 (SLIC)| board type in the status byte                   |
| `MBT_INPUT`       | 0       | 1: append the 16-byte MBT-input trailer          |
| `FIFO_DEPTH`      | 1024    | receive FIFO entries (bytes)                    |
| `FIFO_HWM`        | 768     | L1 Busy threshold                                |
| `N_BAD`           | 4       | consecutive bad characters that force reframing  |
| `PADS_BEFORE_END` | 2       | Pads sent before End Event                       |
| `BUSY_ON_REFRAME` | 1       | raise L1 Busy while reframing                    |
| `TX_PHYS_TRAILER` | 0       | 1: append a 2-byte physical trailer on transmit (output board, MBT Out) |

Throughput is one character per clock in both directions. Each event adds
2 + `PADS_BEFORE_END` characters of framing on the link.

The largest event an L2 header can describe has 255 objects of 255 words:
12 + 260 100 bytes, plus the trailer and padding. The byte counters in
`l2_trailer_gen` and `l2_frame_check` are 20 bits wide, enough for such an
event. The FIFO does not need to hold a whole event: it streams.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/l2_link_pkg.sv tb/tb_l2_link_top.sv --top-module tb_l2_link_top
./obj_dir/Vtb_l2_link_top
```

The testbenches are `tb_l2_link_top`, `tb_input_fsm`, `tb_reframe_ctrl`,
`tb_event_fifo`, `tb_phys_trailer_gen`, `tb_l2_trailer_gen`,
`tb_l2_frame_check`, `tb_tx_framer`, `tb_selftest`, `tb_status_regs`
and `tb_l2_mbt_chain`.

`tb_l2_mbt_chain` connects three link ends in a chain. A SLIC-type board's
output is framed again and sent to an MBT-input board
(`MBT_INPUT = 1`). An output board (`TX_PHYS_TRAILER = 1`) also feeds the
MBT input. The test checks the 16-byte trailer byte by byte and checks that
each board reports only the errors on its own link.

`tb_l2_link_top` runs the top at its default parameters. It loops the
transmitter back to the receiver through a channel model that damages the
character stream, and checks every output byte, every status byte and every
check flag against values computed from the format rules. It covers these
cases:

* clean events;
* a violation inside an event;
* a lost End;
* a lost Begin;
* a stray special character between events;
* bad-character bursts between events and inside an event;
* PLL lock loss;
* a front-panel reframe;
* a wrong bunch #, cleared again by SCL_INITIALIZE;
* a full FIFO, which raises L1 Busy and overflows, followed by
  SCL_INITIALIZE;
* transmit hold;
* the self-test;
* the largest possible L2 event.

At the end it reads every error counter over the register port and compares
it with the damage injected. It then prints how often each mechanism
happened (events, missed boundaries, idle characters, error characters,
overflow, reframings, sync errors, L1 Busy cycles, self-test passes). A
mechanism that never happened counts as a failure. The run takes about 15 s.

## Departures and open points

These are this design's own choices, where the original notes leave the
point open:

* code values of the special characters;
* FIFO depth and high-water mark;
* `N_BAD` and the number of Pads before End;
* status bits 2 to 5;
* the register map;
* the self-test order and its resynchronisation rule;
* the parity range (every byte before the trailer);
* the way lock loss is handled.

These parts of the original design are not built:

* the alternative trailer that carries the rotation # instead of the two
  parities;
* error locations in bytes B4 to B13 of the MBT trailer (they are zero
  here);
* padding the FIFO to 16 bytes after an error;
* selecting a channel from the front panel (the design has a single
  channel);
* the L2 processors' standard status bits in header B11, which the processor
  software sets.

Self-test takes over the link as soon as it is enabled, so it cuts off an
event that is being sent. The serializer/deserializer chipsets, the SCL
receiver, the central error collection and the crate controller's register
bus are outside this design.
