# Real-time ATM test-bed in SystemVerilog

This is the digital hardware of a laboratory test-bed for cell-based (ATM)
networks. Two network nodes exchange 53-byte cells over a 155.52 Mb/s
STM-1 line. A network emulator sits between them and gives each virtual
channel a delay, delay jitter, cell loss and payload bit errors that you
program. Only two board types are needed:

* **UNI board.** The user-network interface: an ATM-layer controller, two
  payload FIFOs, and the transmission-convergence (TC) sublayer that turns
  cells into a byte stream and back.
* **Emulator board (EB).** It plugs into the internal bus of a UNI like any
  terminal adapter and emulates one virtual channel.

A node is one UNI board plus up to eight terminal adapters (TAs) on its
internal bus. The network emulator is two UNI boards back to back. Its
emulator boards take cells off the receive bus of one UNI and put them,
delayed and damaged, onto the transmit bus of the other.

All logic runs on one clock, 20 MHz by default. The line's byte rate
(19.44 Mbyte/s) arrives as a byte enable rather than as a second clock.

## Module map

```
testbed_top                 two nodes + network emulator
├── uni_board  x4           0 = node A, 1 = emulator UNI facing A, 2 = emulator UNI facing B, 3 = node B
│   ├── atm_controller      ATM layer
│   │   ├── atm_spi         local CPU register port
│   │   ├── atm_arbiter     round-robin choice of the next TA
│   │   ├── tx_dma          TA -> Tx FIFO, 24 words, no address bus
│   │   ├── psm             header memory, 8 blocks x 4 bytes
│   │   ├── atm_tx_ctrl     sequencing, header/payload to TC, unassigned cells
│   │   ├── cam             VPI/VCI -> TA position
│   │   ├── atm_rx_ctrl     CAM lookup, Rx FIFO writes, destination queue
│   │   ├── rx_dma          Rx FIFO -> TA, 24 words
│   │   └── fifo_err_detector x2   payload checksum across each FIFO
│   ├── sync_fifo x2        Tx FIFO, Rx FIFO (16 bit)
│   ├── tc_transmitter      HEC, scrambling, idle cells  (tc_crc_gen, tc_scrambler)
│   └── tc_receiver         delineation, header correction, idle removal, descrambling
│                           (tc_delineation, tc_single_err, xor_plane, tc_scrambler, sync_fifo)
└── emu_board x (2*N_VC)    one per emulated channel and direction
    ├── sync_fifo           Rx FIFO, Rx timing FIFO, Tx FIFO
    ├── cell_delay_gen      departure time = arrival + mean +/- jitter
    ├── error_rate_ctrl     cell rejection and single-bit word errors
    └── xor_plane           applies the error mask to the moving payload
```

`atm_pkg` holds the shared constants, header and configuration types, and
the CRC-8 functions used for the HEC.

## Cell flow through a node

### The internal bus (TxBus / RxBus)

Each direction has a 16-bit data bus. There is no address bus. The
controller board-selects one TA with a one-hot enable and clocks 24 words,
one 48-byte payload, with a bus clock that it generates. The bus clock is
`clk/2`: high for one clock and low for the next. That moves one word per
two clocks, i.e. 20 Mbyte/s at 20 MHz.

* On the TxBus the TA drives the current word while selected. The
  controller samples it in the clock's high phase. The TA moves on to the
  next word after each high phase.
* On the RxBus the TA samples during the high phase.
* There is no handshake: a selected TA must keep up. Each TA raises a
  cell-available line when it has a cell to send.

### Transmit path and the 50-clock cell cycle

1. `atm_arbiter` scans the cell-available lines round robin, starting after
   the TA served last. It registers its choice while the previous payload is
   still moving, so the next decision is ready when that payload ends.
2. `atm_tx_ctrl` starts `tx_dma` for the chosen TA when the Tx FIFO can take
   24 more words. One DMA cell takes 48 clocks. One clock to start and one to
   close give 50 clocks per cell, i.e. **400 kcell/s at 20 MHz**. This is more
   than the line's 366 kcell/s.
3. At the same time the TA's index goes into a small header queue. The
   header itself is not copied. The PSM (position selectable memory) holds
   four header bytes per TA position, written by the local CPU when a
   connection is set up. The header queue is this design's own mechanism for
   keeping headers and FIFO payloads paired.
4. The TC transmitter asks for a cell through three signals:
   * `c_rdy`: a cell is ready.
   * `head_en`: pull four header bytes. `data_in[7:0]` is the PSM output
     addressed by {queued TA, 2-bit byte counter}.
   * `info_en`: pull 24 payload words from the Tx FIFO, high byte first.
5. If no user cell is queued and the CPU has set control bit 0, the
   controller sends an unassigned cell instead: an all-zero header and a 0x6A
   payload. Otherwise `c_rdy` stays low and the TC inserts idle cells.

### Receive path

The TC receiver hands the ATM layer two header words (`rx_hdr`=1) and then
24 payload words.

1. `atm_rx_ctrl` forms a 24-bit key from the second word: the 8-bit VPI
   and the 16-bit VCI. The CAM returns the TA whose entry matches. The
   lowest entry wins if two match.
2. On a hit with room in the Rx FIFO, the payload is written to the Rx FIFO
   and the TA index is queued.
3. Cells with no match are dropped and counted. So are cells that would
   overflow the FIFO.
4. `rx_dma` empties one queued payload at a time onto the RxBus, with that
   TA selected.

### FIFO error detectors

Each FIFO has a checker. It folds every payload into a 16-bit
rotate-and-XOR checksum as it is written. It keeps the checksums in a small
queue and repeats the fold on the read side. A mismatch pulses `*_fifo_err`
and is counted. Errors are detected only, not corrected; see *Departures*.

### Local CPU port (`atm_spi`)

The port takes one write per clock (strobe, 5-bit address, 32-bit data) and
reads combinationally.

| address | write | read |
|---|---|---|
| 0x00-0x07 | PSM block k: header bytes of TA k, first byte in [31:24] | |
| 0x08-0x0F | CAM entry k: bit 24 valid, [23:0] = {VPI, VCI} | |
| 0x10 | bit 0: send unassigned cells | control |
| 0x11 | | {unassigned, user} cells sent |
| 0x12 | | {unmatched, accepted} cells received |
| 0x13 | | cells dropped for a full Rx FIFO |
| 0x14 | | {Rx, Tx} FIFO error counts |
| 0x15 | | last accepted header |

## The TC sublayer

### Transmitter (`tc_transmitter`)

The transmitter produces a 53-byte cell for every byte slot the framer
grants (`txf_en`). Byte slots may stop at any byte, as frame overhead would
stop them, and cells carry on after the pause. `txf_sop` marks the first byte
of a cell.

* **HEC.** The four header bytes pass through `tc_crc_gen`, a CRC-8 with
  polynomial x^8+x^2+x+1, MSB first. Its output is XORed with 0x55 to form
  byte 5.
* **Scrambling.** The 48 payload bytes pass through `tc_scrambler`, a
  self-synchronising x^43+1 scrambler, 8 bits per byte, MSB first. The
  header is never scrambled.
* **Idle cells.** If `c_rdy` is low at a cell boundary, an idle cell goes
  out instead. It has the header 00 00 00 01, its HEC 0x52, and 48 bytes of
  0x6A, scrambled like any payload.

### Receiver (`tc_receiver`)

This is the hardest part of the design.

**Delineation** (`tc_delineation`):

* The last five bytes are held in a window, and the HEC syndrome of the
  window is computed at every byte, so every byte position is a candidate
  cell boundary.
* States:
  * HUNT looks for any position with a zero syndrome.
  * PRESYNC checks the same position 53 bytes later. It needs DELTA = 6
    correct HECs in a row and falls back to HUNT on the first bad one.
  * SYNC is left after ALPHA = 7 bad HECs in a row.

**Header correction** (`tc_single_err`, `xor_plane`):

* `tc_single_err` is a table of the 40 syndromes that a single-bit error in
  the 5 header bytes produces. It is computed from the CRC when the design is
  elaborated. It gives the byte number and bit position of the error.
* A syndrome that is not zero and not in the table flags the cell as
  uncorrectable, and the cell is discarded.
* Otherwise the XOR plane flips the bad bit as the header goes out.

**Payload:**

* Payload bytes are descrambled (the descrambler runs on every line byte, so
  it stays in lock) and paired into 16-bit words.
* The words wait in an 8-word payload buffer until the header decision is
  known. Header words always go out first.
* An idle cell (corrected header 00 00 00 01), an uncorrectable cell, or any
  cell outside SYNC is dropped, and its buffer contents are cleared.
* Counters record good, corrected, discarded and idle cells, and losses of
  SYNC.

## The emulator board (`emu_board`)

An EB behaves as a receiving TA on one UNI's RxBus and as a transmitting TA
at the same slot on the other UNI's TxBus.

1. **Arrival.** A 32-bit free-running timer stamps each arriving cell with
   the time of its first word. The payload goes to the Rx FIFO. The stamp
   goes to the Rx timing FIFO only once the last word is in, so even a zero
   delay never sends a cell that is still arriving. This is the "AAL-ATM
   interface controller" part.
2. **Delay.** `cell_delay_gen` sets departure = arrival + mean + jitter. The
   jitter is uniform in [-jitter, +jitter], drawn from a 32-bit xorshift
   generator. The delay never goes below zero, and a cell never departs
   before the one in front of it, so order is kept.
3. **Errors.** When a cell is due, its 24 words move from the Rx FIFO to the
   Tx FIFO through the XOR plane. At the start of the move, `error_rate_ctrl`
   decides whether the whole cell is rejected: its draw falls below the cell
   rejection probability. For each word it decides whether to flip one
   randomly chosen bit (word error probability). Both probabilities are
   32-bit fractions of 2^32. Converting a target BER into these two numbers
   is left to the CPU.
4. **Departure.** A finished cell in the Tx FIFO raises `tx_avail` on the
   other UNI's TxBus.

The CPU-set parameters come in as one struct, `emu_cfg_t`:

| field | meaning |
|---|---|
| `mean_delay` | mean delay in clocks |
| `jitter` | jitter bound in clocks |
| `jitter_en` | turns jitter on |
| `word_err_p` | word error probability |
| `cell_rej_p` | cell rejection probability |

## Top level (`testbed_top`)

Parameters: `N_VC` = 2 emulated channels per direction, and `FIFO_DEPTH`
= 256 words per UNI FIFO.

* **Ports.** Every UNI-indexed array port uses 0 = node A, 1 = emulator UNI
  facing A, 2 = emulator UNI facing B, 3 = node B.
  * The two nodes' TA buses come out as `a_*` and `b_*`.
  * The line byte streams come out per UNI (`line_txf_*`, `line_rxf_*`).
    The surrounding environment (framers and cables) connects UNI 0 with
    UNI 1 and UNI 2 with UNI 3.
  * Each UNI's CPU port is `cpu_*[u]`.
* **EB slots.** EB `k` of the A→B direction uses slot `k` of UNI 1's RxBus
  and UNI 2's TxBus. EB `N_VC+k` of the B→A direction uses slot `k` of
  UNI 2's RxBus and UNI 1's TxBus. Program the emulator UNIs' CAMs and PSMs
  so that each channel's cells reach the right EB slot and leave with the
  right header.

## Departures and choices not fixed by the source design

* **Line-side parts are not built.** The STM-1 frame controller, the frame
  synchroniser, the CMI coder, the line interface and the clock generator
  are bought or analog parts. Their byte streams are ports.
* **No CPU hardware is built.** The local CPUs, the host and the GPIB/RS-232
  links are represented only by register and configuration ports.
* **HEC, scrambler and delineation.** The HEC coset, the x^43+1 scrambler,
  the idle-cell pattern, and the delineation constants ALPHA = 7 and
  DELTA = 6 follow ITU-T I.432. The source design only names these
  functions.
* **Single-bit header errors are always corrected.** The I.432
  correction/detection mode switch is not built.
* **The FIFO error detectors detect but do not correct.** The source says
  they also correct, but gives no method.
* **Designed here, not taken from the source:**
  * the bus timing details;
  * the CAM key format and its priority rule;
  * the unassigned cell format;
  * the register map;
  * all FIFO and queue depths;
  * the delay distribution (uniform);
  * the error model (at most one bit per word).
* **The emulator board has one job here.** It only emulates a channel. Its
  other uses (node management, low-speed terminal interface) are software on
  its CPU.
* **The receiver's output interface differs from the source's.** The TC
  receiver hands words to the ATM layer as valid/header-flag words, not as
  the header/info enable strobes of the source's diagram.

## Verification and how far to trust it

Every module has a self-checking testbench in `tb/`, `tb_<module>.sv`. Each
compares the module against an independent model:

* a long-division CRC for the HEC;
* a bit-serial reference scrambler;
* queue models for FIFOs and DMAs;
* line streams with injected errors for the receiver;
* behavioural TAs (`ta_tx_model`, `ta_rx_model`) for the bus-level tests.

Where a rate is known, the cycle count is checked too: 48 clocks per DMA
cell, 50 clocks per controller cell, and one byte per enable in the TC. Every
testbench ends with a `TB_RESULT checks=N failures=M` line and has a
watchdog.

`tb_testbed_top` runs the whole test-bed at its default parameters with a
20 MHz clock. It sends three connections through it:

* **A→B with a fixed delay.** The cells must arrive intact and in order.
* **A→B with jitter, 10 % cell rejection and word errors.** The gaps must
  match the rejections exactly, and the bit errors must match those the EB
  inserted.
* **B→A.** The cells must arrive intact and in order.

On the line the testbench pauses the byte stream, flips single header bits
in user cells and double bits in idle cells. It also checks that each of
these mechanisms happened at least once:

* arbitration between TAs;
* pauses;
* idle cells and unassigned cells;
* corrected and discarded headers;
* delay and jitter;
* rejections and bit errors.

`tb_workload_node` runs the two loads the test-bed is sized for through a
UNI at its defaults. The line is paced like STM-1: 19.44 Mbyte/s, with 10 of
every 270 byte slots taken by overhead.

* **One 10 Mb/s constant-bit-rate stream in AAL type 1 cells.** That is one
  cell per 752 clocks.
* **Eight terminals at 10 Mb/s each.** That is about 208 kcell/s.

Every cell must arrive intact and in order, and no cell may be dropped.
Each channel's measured cell period must be within 2 % of the offered one.

What is not verified:

* behaviour with real STM-1 framers;
* timing closure on any FPGA;
* long runs at full line load through the emulator.

Assertions in the RTL guard against:

* FIFO overflow and underflow;
* a DMA completion outside a DMA cycle;
* a header request with no cell ready;
* a payload buffer left non-empty when a new cell is accepted.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`, for any
testbench `T`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    --top-module T -Irtl -Itb -y rtl -y tb \
    rtl/atm_pkg.sv tb/tb_pkg.sv tb/T.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

The run prints `TB_RESULT checks=... failures=...`. `+verilator+rand+reset+2`
starts all state at random values, which checks that reset covers
everything that is read. The end-to-end test runs in seconds. To
change the number of emulated channels or the FIFO depth, override
`N_VC` / `FIFO_DEPTH` on `testbed_top`. The TA count `N_TA` = 8 is a
package constant because the PSM and CAM sizes follow from it.
