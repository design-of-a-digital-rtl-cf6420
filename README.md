# DAIO: a digital audio input/output chip

The DAIO connects a computer bus to consumer and studio digital audio
equipment. On one side is the serial AES line (a single wire carrying
two channels of audio in biphase-mark code), and on the other is a 16- or
32-bit microprocessor bus. The chip is full duplex and the two directions
mirror each other:

* **Receive.** The chip recovers the bits and the frame structure from the
  oversampled line and collects four stereo frames in registers. Then it
  hands them to the host through a second buffer, using an interrupt or a
  DMA request.
* **Transmit.** The chip takes four frames from a host-written buffer,
  serialises them with the right preambles, and codes them back onto the
  line.

The main idea is that all line timing is done by counting on one fast
clock. The receiver takes ten samples per source bit and decides each bit
with a small up/down counter. The transmitter makes one line cell every
five clocks. Between them and the host sit double buffers of four frames
each, so the host has about 90 µs at 44.1 kHz to service each group.

## The AES line format

* **Frames and blocks.** Audio travels in *blocks* of 192 *frames*. A frame
  has two 32-bit *subframes*: A (left) and B (right).
* **Subframe layout.** This design sends and receives the bits of a
  subframe in this order:

  | Bits | Contents |
  |------|----------|
  | 4 | preamble (sync pattern) |
  | 8 | unused (sent as zero, ignored on receive) |
  | 16 | audio, most significant bit first |
  | 4 | V (validity), U (user), C (channel status), P (parity) |

* **Parity.** P makes the 28 bits after the preamble even.
* **Biphase-mark coding.** Each source bit becomes two line cells. The line
  level flips at every bit boundary. It flips again in the middle of a 1 and
  stays for a 0. So a 0 looks like `00` or `11`, and a 1 looks like `01` or
  `10`.
* **Preambles.** A preamble breaks this rule on purpose: it holds runs of
  three equal cells, which coded data can never produce. There are three of
  them, each written here as 8 cells, when the line was low before the
  preamble. If the line was high, each cell is inverted.

  | Preamble | Cells | Marks |
  |----------|-------|-------|
  | 1 | `11101000` | subframe A at the start of a block |
  | 2 | `11100010` | any other subframe A |
  | 3 | `11100100` | subframe B |

## Clocking and reset

The chip has one clock: `clk_sel`, chosen from the four crystal inputs
`xtal[3:0]`.

* **Which crystal.** The choice comes from MODE[1:0] of the enabled
  direction. If both directions are enabled, TXMODE wins. With neither
  enabled, XTAL10 (`xtal[0]`) is used.
* **Frequency.** The crystal must run at 640 × the audio frame rate, for
  example 28.224 MHz for 44.1 kHz:
  * receive: 64 bits × 10 samples per frame;
  * transmit: 128 cells × 5 clocks per frame.
* **The bus.** The host bus is sampled on `clk_sel`, and `clk_sel` is brought
  out so that the bus can be synchronous to it. The mux is combinational, so
  `clk_sel` can glitch when MODE changes. Change the clock select only while
  the chip is idle.
* **Reset.** `reset` is asynchronous and active high.

## Receive path

`DI → daio_phase_decoder → daio_rx_shift → daio_rx_load (under daio_rx_control) → daio_rx_buffer → host`

### Phase decoder (`daio_phase_decoder`)

This is the hardest part of the chip. It must recover bits, bit boundaries,
violations and preambles from a sampled line. It has no clock from the
transmitter to work with, and the line may have jitter and spikes.

* **Input cleaning.** DI passes a two-flop synchroniser. A three-sample
  majority filter then finds the edges, so a one-sample spike neither moves
  a window nor splits a run. The counter adds the raw sample delayed by one,
  which keeps it aligned with the filtered edges.
* **Bit decision.** A window of ten samples starts at a bit boundary. A
  4-bit counter adds one for each high sample and subtracts one for each low
  sample.
  * A 0 (no mid-bit transition) ends at +10 or −10, which is 10 or 6
    modulo 16.
  * A 1 ends near 0.

  The decoder calls values 6..10 a 0 and anything else a 1. This decision
  still holds with two wrong samples, and with windows shortened to 8 or 9
  samples.
* **Boundary tracking.** The next window starts at a transition found up to
  `TOL` = 2 samples before or after the expected boundary.
  * If no transition is found by two samples after the boundary, the bit is
    flagged as a *biphase violation* (`bit_viol`). The window carries on at
    the expected position.
  * So each bit is reported (`bit_valid`) 1 to 3 samples after its last
    sample.
* **Lock and re-alignment.** Every preamble opens with three equal cells: a
  run of about 15 samples, longer than anything in coded data.
  * A run of `RUN_SYNC` = 13 to `RUN_MAX` = 18 samples marks a preamble. A
    longer run is an idle line and is ignored.
  * When such a run ends, the decoder is at the middle of the preamble's
    second bit. It forces its window to that position and seeds the counter
    with what the first half of the bit must have held. This gives the
    initial lock and corrects any drift at every subframe.
  * Preambles 1 and 2 hold a second long run that ends exactly on a bit
    boundary. A long run within 40 samples of the previous one is treated
    as that second run. It restarts the window, unless the window is
    already at a boundary.
* **Preamble detection.** The decoder keeps the last four bits and their
  violation flags. It compares them with the three patterns:

  | Preamble | Bits | Violations |
  |----------|------|------------|
  | 1 | `0110` | `1010` |
  | 2 | `0101` | `1100` |
  | 3 | `0110` | `1100` |

  On a match, `pre_valid` rises together with the fourth bit, and
  `pre_type` says which preamble it was. The three patterns differ, and no
  coded data can produce them because they contain violations.

### Shift register and subframe assembly

* **Shift register (`daio_rx_shift`).** This 20-bit register shifts in every
  decoded bit. At the end of a subframe, bits 19..4 hold the audio and bits
  3..0 hold V, U, C, P. The preamble and the 8 unused bits have dropped out
  of the top.
* **Assembly (`daio_rx_load`).** It copies the register into the RXDATA and
  RXCTRL words:
  * Subframe *i* (0..7) of a four-frame group goes to RXDATA01, 23, 45 or
    67.
  * Subframe A takes the left 16 bits of its word and B the right 16 bits.
  * The V, U, C and P bits are gathered by type, so that each has its own
    byte of RXCTRL: V in [31:24], U in [23:16], C in [15:8], P in [7:0].
    Subframe *i* is at bit 7−*i* of each byte.

### Receive sequencer (`daio_rx_control`)

* **States.** The sequencer has three:
  * *hunt*: wait for preamble 1;
  * *data*: count the 28 bits after a preamble;
  * *wait-preamble*: expect the next preamble within four bits.
* **Loading.** One clock after the 28th bit, it pulses `load` with the
  subframe index. One clock after the eighth load, `buf_load` copies the
  group into the host buffer.
* **Frame count.** `frame_count` advances after each B subframe. After frame
  191 the sequencer expects preamble 1 again.
* **Errors.** Three kinds are reported:
  * a violation inside the data;
  * a parity error;
  * a missing or out-of-order preamble. This one also sends the sequencer
    back to hunting.

  An early preamble 1 restarts the block.

### Receive buffer (`daio_rx_buffer`)

The buffer keeps a copy of the five words for the host. It sets `full` and
tracks which halves the host has read. When every half has been read, the
buffer counts as empty. If a new group arrives while it is still full, the
new group overwrites the old one, and `overflow` pulses.

## Transmit path

`host → daio_tx_buffer → daio_tx_control (TX registers, daio_preamble_rom, header/data shift registers, daio_biphase_mod) → DO`

### Transmit buffer (`daio_tx_buffer`)

The host writes four data words and TXCTRL, with the same layout as on
receive. The buffer counts as full when every half has been written. At a
transfer, the transmitter takes the words, or zeros if the buffer was not
full. This makes the line carry silence, not stale data, and reports an
underrun.

### Serialiser (`daio_tx_control`)

* **Subframe timing.** Each subframe is 64 cells: a 24-cell *header*,
  followed by 20 source bits of 2 cells each.
* **Header.** The header is the preamble plus 8 coded zeros. It is taken
  from `daio_preamble_rom`, which holds the six headers (three preambles in
  two polarities), and is shifted out one cell per cell period.
* **Data.** The 20 data bits (16 audio bits, then V, U, C, P) leave a
  separate shift register at half that rate. `daio_biphase_mod` codes each
  one into two cells.
* **Preamble choice.** Subframe A of frame 0 gets preamble 1. Other A
  subframes get preamble 2, and B subframes get preamble 3.
* **Buffer transfer.** The buffer is copied into the TX registers when
  transmission starts and after every eighth subframe.
* **Output.** DO comes from a flip-flop.

**Polarity look-ahead.** The header must be chosen and loaded before the
last data cell of the previous subframe has been sent. So the polarity of
the next preamble must be known in advance.

* In biphase-mark code, a 0 flips the line once and a 1 flips it twice.
* So after 20 data bits, the line level is the level at the start of the
  data XOR the parity of the 20 bits.
* A header ends on the level it started from.

The next header's polarity is therefore known as soon as the data word is
loaded. The next header starts with the opposite of that final level.
An assertion (`a_polarity`) checks at every header start that the first
cell differs from the last cell sent.

## Host interface (`daio_host_if`)

* **Bus cycle.** One access takes one clock with `cs` high. `rw` = 1 reads
  and `rw` = 0 writes.
* **Addressing.** `addr[5:2]` selects the register. `addr[1]` selects the
  half in 16-bit mode (`mode32` = 0), where data uses D[15:0] and the host
  alternates left and right halves.
* **Read data.** Reads are combinational: `d_out` is valid, with `d_oe`
  high, in the same clock.
* **Register map:**

  | A[5:2] | Register | Access |
  |--------|----------|--------|
  | 0–3 | RXDATA01, 23, 45, 67 | read |
  | 4 | RXCTRL | read |
  | 5 | RXMODE | read/write |
  | 6 | RXSTAT | read, write 1 to clear bits 26..29 |
  | 8–11 | TXDATA01, 23, 45, 67 | write |
  | 12 | TXCTRL | write |
  | 13 | TXMODE | read/write |
  | 14 | TXSTAT | read, write 1 to clear bit 26 |

* **MODE bits:**

  | Bits | Meaning |
  |------|---------|
  | [1:0] | clock select (XTAL10..XTAL13) |
  | [4] | enable |
  | [5] | error interrupt enable (RXMODE) |
  | [6] | DMA instead of interrupts |

* **STAT bits:**

  | Bits | RXSTAT | TXSTAT |
  |------|--------|--------|
  | [0] | buffer full | buffer empty |
  | [1] | inside a block | — |
  | [15:8] | frame count | frame count |
  | [26] | overflow | underrun |
  | [27] | biphase violation | — |
  | [28] | parity error | — |
  | [29] | sync lost | — |

* **Error pin.** `error` is high while RXMODE[5] is set and any of
  RXSTAT[29:26] is set.
* **Programmed IO** (MODE[6] = 0):
  * `rxirq` is high while the receive buffer is full;
  * `txirq` is high while the enabled transmitter's buffer is not full.
* **DMA** (MODE[6] = 1):
  * `rxreq` and `txreq` are raised instead of the interrupts;
  * each `rxack` or `txack` pulse reads or writes the next half (16-bit) or
    word (32-bit) in buffer order;
  * the internal pointer restarts at each new group;
  * `txreq` does not wait for the transmit enable, so DMA can fill the
    buffer before transmission starts.

## Mode controller (`daio_mode_ctrl`)

This combinational block does three things:

* it turns the enable bits into `run_receive` and `run_transmit`;
* it picks the clock as described above;
* it drives the error pin.

## Top level (`daio_top`)

`daio_top` wires all the blocks together.

* **Data bus.** The bidirectional data pins are not modelled. They appear
  as `d_in`, `d_out` and `d_oe`; add a three-state pad cell outside.
* **Parameters.** The top has none. Its sizes come from `daio_pkg`: 192
  frames, 4-frame buffers, 10 samples per bit and 5 clocks per cell.

## Size

After generic synthesis, the whole chip holds about 900 flip-flop bits. Most
are the four 160-bit register banks: RXDATA/RXCTRL, the receive buffer, the
transmit buffer and the TX registers. The phase decoder needs 39 bits and
the receive sequencer 26.

## Where this design departs from the original chip description

* **One clock.** The original runs only the phase decoder on the sampling
  clock, and everything else on a system clock recovered from the line.
  Here everything runs on the sampling clock, with enables. The host bus
  is therefore synchronous to `clk_sel`.
* **Output register.** DO comes from a flip-flop, not a D-latch.
* **Polarity look-ahead.** The original derives the next preamble's
  polarity from an XOR over the last doublets. Here it comes from the
  parity of the whole data word. Both give the same answer.
* **Audio bit order.** Audio is sent and expected most significant bit
  first, following the subframe drawing of the original. Standard AES3
  equipment sends the least significant bit first, so connecting to it
  needs the bit order reversed in `daio_rx_load` and `daio_tx_control`.
* **Added features.**
  * error flags for parity and for lost sync;
  * error recovery by hunting for the next block start;
  * the lock and re-alignment scheme of the phase decoder, which is this
    design's own;
  * the majority filter and the synchroniser.
* **This design's own choices.** The original gives only the error bits
  26..29, the enable, the clock select and the error-interrupt enable. This
  design chose the following:
  * the register numbers, and the remaining STAT and MODE bit positions,
    including the DMA bit;
  * the DMA pointer scheme;
  * write-1-to-clear for the error flags;
  * the rule that the buffers count as full or empty by halves.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M`.

* **Shared package.** `tb/daio_tb_pkg.sv` holds a reference AES subframe
  encoder and decoder, written independently of the RTL.
* **Block tests.** The phase-decoder test feeds streams with jitter, single
  spikes and a restart in the middle of data. It checks every bit, every
  violation and every preamble, and the bit rate.
* **End-to-end test.** `tb_daio_top` loops DO back into DI and runs the
  whole chip at its real sizes. It covers:
  * programmed IO and DMA, in both directions;
  * 16- and 32-bit modes;
  * more than one 192-frame block;
  * an underrun and an overflow;
  * parity and sync errors on the error pin;
  * a change of crystal.

  It counts every one of these mechanisms and fails if any of them never
  happened. It takes well under a minute.

To simulate with Verilator 5, for example the end-to-end test, run this
from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/daio_pkg.sv tb/daio_tb_pkg.sv tb/tb_daio_top.sv \
        --top-module tb_daio_top -Mdir obj_top
    ./obj_top/Vtb_daio_top

* **Other tests.** To run a block test, replace `tb_daio_top` with its name,
  for example `tb_daio_phase_decoder`. The `-y` options let Verilator find
  each module in the file of the same name.
* **Warnings.** `-Wno-fatal` keeps the remaining lint warnings from stopping
  the build. They are:
  * unused package constants;
  * unused signals at the top: the clock index, the TX status bits, `addr[0]`;
  * an output left open: `level` of the biphase encoder;
  * the asynchronous reset net also reaching the assertion.
