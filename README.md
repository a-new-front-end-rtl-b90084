# CPV front-end readout: column controllers and Readout Common Board

The Charged-Particle Veto (CPV) detector of ALICE reads its pads through
Gassiplex front-end chips and DiLogic digital processors. The older readout
walks through the DiLogic chips one column at a time and reaches only a few
kHz of event rate. This RTL implements a faster readout with two kinds of
FPGA:

* a **column controller** per segment board, which reads all of its
  5-DiLogic cards **at the same time** and sends the event over a 3.125 Gb/s
  serial link, and
* a **Readout Common Board (RCB)**, which takes the L0 trigger, holds
  **busy** until the event has left, collects the frames of four column
  controllers, checks their CRC, and sends one event, headed by a 10-word
  Common Data Header (CDH), to the data acquisition. It sends either over the
  DDL2 (SIU) protocol or to the GBT link bank.

The top level, `cpv_readout_top`, is one RCB with four column controllers on
its links. Each controller serves four 5-DiLogic cards, the two columns of a
segment board. That makes 16 cards, 80 DiLogic chips and 3840 pads: half of
one CPV module.

## Event flow

```
 L0 ──► segment_controller ──busy──►
            │ trigger word on every link (link_tx)
            ▼
   column_controller (x4)
     gassiplex_ctrl : Track/Hold, 48 multiplexer clock pulses
     dilogic_reader x4 : EnIn_N / StrIn_N / EnOut_N chain readout, all cards in parallel
     parity_fifo x4 : one per card
     column_framer  : SOF, header, data, CRC-32, EOF
            │ link words (link_rx)
            ▼
   link_frame_rx (x4) : find frame, buffer data, check CRC
            ▼
   segment_controller : CDH + per-link header + data
            ├── siu_ddl2 (siu_en = 1) ──► DDL2 words + status words
            └── gbt_* port (siu_en = 0) ──► GBT link bank
```

1. An L0 pulse on `l0` makes `segment_controller` raise `busy` in the next
   clock, count the event and put a trigger control word, carrying the 16-bit
   event number, on every downlink. An L0 that arrives while `busy` is high is
   refused and counted (`l0_refused`).
2. Each `column_controller` that sees the trigger runs `gassiplex_ctrl`. It
   raises Track/Hold (`gas_th`), so every Gassiplex channel keeps its charge.
   It then gives 48 clock pulses (`gas_clk`) that step the analogue
   multiplexer through the channels. The ADCs and DiLogic chips on the cards
   digitise and store the hits during this burst.
3. The controller then starts one `dilogic_reader` per card, all in the same
   clock. Each reader empties its card into its own FIFO.
4. When the last card is finished, `column_framer` sends the frame up the
   link.
5. When every link has delivered a complete frame, the RCB sends the event.
   `busy` drops in the clock in which the last event word is accepted
   downstream. Back-pressure from the DDL2 flow control or from the GBT side
   therefore lengthens `busy`.

## The DiLogic chain handshake

This is the least obvious part of the design. The five DiLogic chips of a
card share one 18-bit bus and are chained by their enables: the `EnOut_N` of
one chip drives the `EnIn_N` of the next. The FPGA drives `EnIn_N` of the
first chip and `StrIn_N` of all five, and sees `EnOut_N` of the last chip.

* `dl_en_in_n` low puts the chain in readout mode. It stays low for the
  whole card.
* Every strobe period (`STRB_DIV` clocks, 10 MHz from a 40 MHz clock) has
  `StrIn_N` low for the first half. On the falling edge the chip holding the
  enable drives its next word on the bus. The reader samples the bus in the
  last clock of the low half.
* A chip with an empty FIFO passes the enable on within the same strobe. When
  the last chip passes it on, `dl_en_out_n` is low at the sampling point. That
  strobe carries no word: the reader releases `EnIn_N` and the card is done.
* Readout time from `start` to `done` is `(words + 1) * STRB_DIV + 1` clocks.
  Strobes pause while the card FIFO is full.

The DiLogic word is taken as a 6-bit channel address (bits 17:12) above a
12-bit amplitude. The reader does not depend on this split. It stores the
word as it comes, and the chip a word came from is not recorded.

## Link frames (column controller to RCB)

The links carry a 32-bit word per clock with one K (control character) flag
per byte, as on the parallel side of an 8B/10B transceiver. A control word
always has the K28.5 comma (`BC`) in byte lane 0, with a code in byte 1 and a
16-bit argument in bytes 3:2. So the receiver can find a frame start in a
fixed lane.

| word | content |
|------|---------|
| IDLE | control, code `00` (between frames, and one clock per card inside a frame) |
| TRIG | control, code `10`, argument = event number (downlink only) |
| SOF  | control, code `20`, argument = event number |
| HDR  | `[31:30]=01`, `[29:24]` column id, `[23:20]` cards, `[15:0]` data word count |
| DATA | `[31:30]=10`, `[29:28]` card, `[18]` FIFO parity error, `[17:0]` DiLogic word |
| CRC  | CRC-32 over HDR and all DATA words |
| EOF  | control, code `30`, argument = data word count |

The CRC is CRC-32 with polynomial `04C11DB7`, initial value `FFFFFFFF`, taken
MSB first, one word per clock, with no final inversion (`crc32_d32`).
`link_frame_rx` recomputes it. It counts a wrong CRC (`crc_err`), a comma in
another byte lane (`lane_err`) and a broken sequence (`format_err`). A new SOF
always restarts reception. A frame that starts before the previous one was
acknowledged is refused.

## Event format (RCB output)

| word | content |
|------|---------|
| 0 | block length in bytes, header included |
| 1 | `[31:24]` header version (`02`), `[15:0]` event number |
| 2 | L0 triggers accepted |
| 3 | `[15:8]` links present, `[7:0]` links with a CRC or format error |
| 4 | L0 triggers refused while busy |
| 5–9 | zero |
| per link | link header: `[31:30]=11`, `[29:27]` link, `[26]` present, `[25]` frame good, `[21:16]` column id, `[15:0]` word count; then the link's DATA words |

Links follow in order, and inside a link the cards follow in order. If a link
has not answered within `TIMEOUT` clocks, it is sent as absent, with a zero
count, and `timeouts` counts it.

## DDL2 (SIU) side

`siu_ddl2` implements the front-end end of the DDL transaction:

* `RDYRX` (code `14`) opens the transfer. It is answered by a CTSTW status
  word that echoes the 4-bit transaction id (command bits 11:8).
* While the transfer is open, every event is one data block. It is followed
  by FESTW with the end-of-block flag (bit 31) and the block length in words
  (bits 30:12).
* `ddl_fc_stop` (flow control) pauses data.
* `EOBTR` (code `B4`) closes the transfer once the block in progress has
  ended, and is answered by CTSTW.
* While the transfer is closed, event data are held back, so `busy` stays
  high.

The command and status codes and field positions are this design's
assumptions, not values of the DDL standard.

## Error protection

* Every card FIFO and every RCB link buffer is a `parity_fifo`. It stores an
  even-parity bit with each word and flags a mismatch on read. Column-side
  errors are marked in bit 18 of the DATA word and counted (`col_perr_count`).
  RCB-side errors are counted in `buf_perr_count`.
* The CRC-32 on every link frame is checked by the RCB. The result goes into
  the CDH error mask and the link header. A CRC error is detected; it is not
  corrected.

## What is outside the RTL

Each of these parts is a set of ports on the top, or a direct connection:

* **Serial transceivers** (8B/10B coding, serialisers, 3.125 Gb/s lanes): the
  parallel sides of each column link are wired straight together inside the
  top.
* **GBT link bank** (GBTx encoder/scrambler and its receiver): the event
  stream is brought out as `gbt_data/gbt_valid/gbt_last/gbt_ready`. The
  trigger is taken from the `l0` port, not decoded from a TTC stream.
* **DiLogic chips, Gassiplex chips and ADCs**: the card pins are ports.
  `tb/dilogic_card_model.sv` is a behavioural model of a 5-DiLogic card and
  its Gassiplex front end, used by the testbenches. It is not synthesizable.
* **Trigger system and DAQ receiver**: the `l0`/`busy` ports and the `ddl_*`
  ports.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_LINKS` | 4 | column controllers per RCB (four full-duplex transceivers) |
| `N_CARDS` | 4 | 5-DiLogic cards per column controller (two columns) |
| `STRB_DIV` | 4 | clocks per DiLogic strobe (10 MHz at 40 MHz) |
| `N_PULSES` | 48 | Gassiplex multiplexer pulses (480 pads / 10 DiLogic chips) |
| `PULSE_HALF` | 2 | clocks per half Gassiplex pulse |
| `HOLD_SETUP` | 8 | clocks from Track/Hold to the first pulse |
| `FIFO_DEPTH` | 2560 | words per card FIFO (5 chips x 512) |
| `BUF_DEPTH` | 10240 | words per RCB link buffer |
| `TIMEOUT` | 2^20 | clocks to wait for the link frames |

The fixed numbers are in `rtl/cpv_pkg.sv`: 18-bit word, 12-bit amplitude,
5 chips, 512-word chip FIFO, 48 channels per chip, 10-word CDH.

## Timing and rate

All logic runs on one clock, assumed to be 40 MHz. At that clock, one event
takes:

* Gassiplex sequence: 200 clocks (5 us).
* Card readout: `(words of the fullest card + 1) * 4` clocks, because all
  cards are read in parallel.
* Column frame: `words + 8` clocks.
* RCB output: one word per clock, with the links sent one after another.

The simulated busy time is about 7.6 us at 1 % occupancy. It is 18.7 us for a
1.3 kbyte event, which is inside the 20 us of a 50 kHz readout, and 26 us for
a 2.1 kbyte event.

The prototype this design follows reports busy times of 5.6–8.2 us for
0.5–2.1 kbyte events. This RTL is slower for larger events for three reasons:

* it sends the RCB output at 32 bits per 40 MHz clock;
* it reads the whole event into each column controller before sending;
* it sends the links one after another.

A faster RCB clock, or streaming the frames while they arrive, would close the
gap. Neither is implemented.

## Departures and open points

* Number of cards per column controller. The segment board serves four
  5-DiLogic cards (two columns), while the column controller diagram and its
  readout state machine are drawn for two. This RTL follows the segment board
  (`N_CARDS = 4`). Each card has its own reader, so `N_CARDS = 2` gives the
  two-card form.
* How the trigger reaches the column controllers is not specified. Here it
  is a control word on the downlink.
* All frame, CDH and DDL2 field layouts and codes are this design's own.
* Only the sizes and meanings listed above are fixed.
* A frame that arrives after its event has timed out is taken as the next
  event's frame. Nothing checks event numbers across links.
* There is no GBT encoding, TTC decoding or error correction.

## Files and simulation

`rtl/` holds one module or package per file. The hierarchy is:

```
cpv_readout_top
├── rcb_top
│   ├── link_frame_rx (x N_LINKS) ── crc32_d32, parity_fifo
│   ├── segment_controller
│   └── siu_ddl2
└── column_controller (x N_LINKS)
    ├── gassiplex_ctrl
    ├── dilogic_reader (x N_CARDS), parity_fifo (x N_CARDS)
    └── column_framer ── crc32_d32
```

`tb/` holds one self-checking testbench per module (`tb_<module>.sv`). Each
prints `TB_RESULT checks=N failures=M`. Besides these, there are:

* `tb_cpv_readout_top`: end to end at the default sizes. It covers busy and
  L0 refusal, the GBT path with back-pressure, the DDL2 open/block/flow
  control/close sequence, a CRC error injected on a link, and a parity error
  injected in an RCB buffer. It checks every event word against a prediction.
* `tb_readout_rate`: busy times for events of 0.5–2.6 kbyte.
* `cpv_tb_pkg.sv`: the hit pattern function and a long-division CRC
  reference.
* `dilogic_card_model.sv`: the card model.

To run a testbench with Verilator 5 (add `tb/cpv_tb_pkg.sv` where it is
used):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/cpv_pkg.sv tb/cpv_tb_pkg.sv tb/tb_cpv_readout_top.sv \
  --top-module tb_cpv_readout_top -Mdir obj
./obj/Vtb_cpv_readout_top
```

Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/cpv_pkg.sv rtl/<module>.sv`.
