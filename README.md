# SVX-II silicon detector test stand — SystemVerilog model

This is a test stand for silicon strip detectors read out by SVX chips. SVX
chips are 128-channel front-end chips. Each channel has a 32-cell analog
pipeline and an 8-bit ADC. A chip has four operating modes: configuration,
acquire, digitize and readout. The test stand steps chains of these chips
through those modes and collects their data. The events come from a beam,
cosmic rays, a pulsed laser or injected calibration charge.

Three boards share the work:

```
  ext. trigger ─►┌──────────┐ high level cmds ┌──────────┐ serial low level ┌─────────┐ HDI A/B/C ┌───────────┐
  laser pulser ◄─│   STAR   │── J3 / front ──►│   TFIB   │── cmds + clocks ─►│   TPC   │◄────────►│ SVX chips │
                 │ beam emu │     panel       │          │                   │         │           └───────────┘
     VME bus ◄──►│ buffers  │◄──────────┬─────│ data FIFO│◄────────┬─────────│ EOR ins.│
                 └──────────┘   readout │     └──────────┘ readout │         └─────────┘
                                data    └──────────────────────────┘ data (3 byte-wide buses)
```

- **STAR.** It emulates the accelerator's beam timing and turns triggers into
  *high level commands*, such as "digitize and read out one event". It stores
  the data the chips return in three 64k × 16 buffers, which a VME CPU reads
  out.
- **TFIB.** It carries out each high level command as a timed sequence of
  *low level commands*. These go to the TPC over a single serial line with
  two clocks. The TFIB also generates the SVX chip clock, downloads chip
  configuration and TPC DAC settings, and can run command lists from its own
  FIFO without a STAR.
- **TPC.** This is the port card next to the detector. Its controller steps
  one state per serial clock edge and drives the SVX control lines on up to
  three HDI cables. It appends an end-of-readout (EOR) code to each data
  stream when the chips have finished.

The top module is `svx_test_stand` (rtl/svx_test_stand.sv). It holds one of
each board, wired together. Its ports are everything that leaves the boards:

- the VME bus;
- the trigger inputs and the laser trigger output;
- the beam SYNC and crossing signals;
- the three HDI control and data ports;
- the memory-test cable;
- the TPC DAC serial lines;
- the G-Link transmitter ports.

## Clocking and the byte bus

A single clock runs the whole design. It represents the STAR's 53 MHz RF
clock, and the TFIB and TPC run from it as well. The SVX readout runs at
26.5 MHz, one byte on each half of the readout clock, which gives 53 MB/s. In
the RTL this byte bus is a struct with one byte per system clock:

```
svx_byte_t = { valid, hi_half, data[7:0] }
```

`hi_half` is the level of the readout clock for that byte. A chip's readout
starts with its chip ID in a high half and its status byte in the following
low half. After that come channel address (high half) and ADC value (low
half) pairs. Receivers pair a high-half byte with the next low-half byte to
form a 16-bit word, high byte in bits 15:8.

The end-of-readout marker is the byte `8'hFF` in a high half, followed by
`8'h00`. It is only recognised in a high half, so an ADC value of 0xFF in a
low half cannot be mistaken for it. Channel addresses are at most 127, so
they never collide with it either.

## The three command layers

The hardest part of the design is how a command travels from STAR to chip.

### 1. High level commands (STAR → TFIB)

The STAR sends commands on the command bus `cmd_bus_t = {strobe, cmd[3:0]}`.
The same command goes out on the J3 backplane and on the front panel. A MUX
in the TFIB listens to one of them, chosen by `CTRL[0]`.

| code | command | TFIB program (micro-operations) |
|---|---|---|
| 1 | ACQUIRE | SEND LL_ACQUIRE, EDGE, start acquisition clock |
| 2 | DIG_READOUT | stop acq. clock, SEND LL_DIG_READOUT, EDGE, DIG, EDGE, RO, SEND LL_ACQUIRE, EDGE, start acq. clock |
| 3 | READOUT | as DIG_READOUT without the digitize step |
| 4 | CAL_INJECT | SEND LL_CAL_INJECT, EDGE, HOLD, EDGE |
| 5 | PREAMP_RESET | SEND LL_PREAMP_RESET, EDGE, HOLD, EDGE |
| 6 | RESET | stop acq. clock, TPC reset for 4 clocks |
| 7 | TEST | one-clock `test_pulse` (diagnostic answer) |

The micro-operations are:

- **SEND:** sends a low level command on the serial line.
- **EDGE:** one more serial clock pulse, which advances the TPC controller one
  state.
- **DIG:** `n_dig` SVX clocks for the ADC conversion.
- **RO:** SVX readout clocks until every enabled HDI stream has carried the
  EOR code. The TFIB then stops the clock. It gives up after `ro_max` clocks
  and sets a timeout flag.
- **HOLD:** waits `hold` clocks between the two edges of a pulse command.

The digitize-readout program is the event readout sequence of the original
system. Its steps are:

1. The STAR sends DIG_READOUT.
2. The TFIB sends the low level command.
3. The TPC switches the chips to digitize.
4. The TFIB supplies the conversion clocks.
5. The TPC switches the chips to readout.
6. The TFIB clocks the data out and stops when it sees EOR.
7. The TFIB returns the chips to acquisition.

A command that arrives while another runs waits in a one-deep queue. A
further one is dropped and counted in `DROPPED`.

The TFIB has two more command sources:

- **Immediate commands** are written to the TFIB `IMM` register:
  - run one high level command (`IMM_HL` with the command as argument);
  - start emulation;
  - download the SVX configuration;
  - download the TPC controller configuration byte;
  - read back the TPC controller's configuration and state;
  - reset.
- **Emulation** uses a list of high level commands written into the Cmd/Conf
  FIFO. The list is run, word by word, until the FIFO is empty. This lets the
  TFIB and TPC be exercised without a STAR.

Priority is: immediate commands first, then the emulation list, then STAR
commands.

### 2. Low level serial commands (TFIB → TPC)

There are three lines: `scmd` (serial command), `sclk` (serial command clock)
and `svx_clk` (SVX chip clock). The TPC samples `scmd` on rising `sclk`.

A command consists of:

- a start bit `1`;
- a 3-bit code, MSB first, one `sclk` pulse per bit;
- a fixed number of further `sclk` edges, `ll_edges()` in `svx_pkg`, each of
  which moves the TPC controller to its next state.

The TFIB sets each state's duration by spacing these edges. The gaps used are
`n_dig` SVX clocks, the readout time and `hold`.

| code | command | extra edges: state reached at each edge |
|---|---|---|
| 0 | INIT | 1: configuration mode; `scmd` routed to the chips' serial input |
| 1 | READOUT | 1: readout mode |
| 2 | ACQUIRE | 1: acquire mode, reset and inject lines low |
| 3 | PREAMP_RESET | 1: preamp reset high; 2: low |
| 4 | CAL_INJECT | 1: calibration inject high; 2: low |
| 5 | DIG_READOUT | 1: digitize mode; 2: readout mode |
| 6 | READBACK | 1..16: one bit each on `sdo`, MSB first: configuration byte, then status byte {1, mode, previous command, 10} |
| 7 | CONFIG_TPC | 1..8: one configuration bit each from `scmd`, MSB first; the byte takes effect at edge 8 |

The controller's `ready` output is high when it can take a new command.

### 3. SVX control lines (TPC → chips)

`hdi_ctrl_t` holds the lines sent to the chips:

- `mode` (configuration / acquire / digitize / readout);
- `preamp_reset`;
- `cal_inject`;
- the buffered chip clock;
- the serial configuration input.

All three HDIs get the same lines. The chip clock is `svx_clk` delayed by one
register stage. Each HDI's clock is gated by its bit in the TPC controller's
configuration byte:

- bits [2:0] enable HDI A, B and C;
- the reset value `8'h07` clocks all three;
- the upper bits are stored and read back only.

## Acquisition clock and beam structure

While the chips acquire, the TFIB runs the SVX clock by itself. The clock is
`acq_hi` clocks high and `acq_lo` clocks low; the reset values 4 + 3 give 7
clocks, which is 132 ns at 53 MHz.

The STAR's `master_clock` emulates the accelerator:

- `sync` is a one-clock pulse every 7 RF clocks. It marks a possible beam
  crossing.
- `beam_xing` is high during a crossing that holds a bunch.
- A turn has `TURN_LEN` crossings. The first `N_BUNCHES` bunch slots are
  filled, one every `SPACING` crossings.
  - 132 ns operation: spacing 1.
  - 396 ns operation: spacing 3, for example 36 bunches in 108 crossings.

Triggers are issued one clock after a SYNC:

- **External** (beam, cosmic ray): taken from `ext_trigger` through a
  two-flop synchroniser and held until the next SYNC.
- **Laser:** generated internally at crossing `INT_XING` every `INT_TURNS`
  turns. The laser pulser is fired through `laser_trigger` in the same clock.
- **Charge injection:** generated internally in the same way.

A trigger that arrives while the readout state machine is busy is counted in
`TRIG_LOST`.

The readout state machine answers each trigger type as follows:

- External and laser triggers get DIG_READOUT.
- Charge triggers get CAL_INJECT, then DIG_READOUT after `CAL_LAT` clocks.

The machine then waits until every enabled STAR buffer has received EOR, or
until `TIMEOUT` × 256 clocks have passed, before it accepts the next trigger.

## Data path

- **TPC.** Each HDI stream passes through an `eor_inserter`. Once the chip
  chain reports that it is done, the inserter puts `FF` in the next free high
  half and `00` in the following low half.
- **STAR.** A `data_demux` per HDI builds 16-bit words and appends them to a
  64k × 16 buffer. It sets a flag when the EOR word arrives. Events pile up
  until the buffers are cleared (`CTRL[6]`). A full buffer drops further
  words and flags an overflow.
- **TFIB.** Three data FIFOs (4096 × 9: {half, byte}) capture the same
  streams while `CTRL[1]` is set. They can be read by VME or by the two G-Link
  transmitters:
  - G-Link A&B takes a byte from FIFO A and FIFO B together (18 bits), so the
    two HDIs leave aligned.
  - G-Link C takes FIFO C.

**Memory test.** The STAR's 32k × 16 test memory and `data_mux` produce an
SVX-like stream on the `test_data` cable. The stream is:

1. a header {chip ID, status} from `TM_HDR`;
2. `TM_WORDS` words, high byte then low byte, one byte per clock;
3. the EOR trailer.

To test a STAR buffer, loop `test_data` back into one of the `star` module's
`svx_data` inputs; `tb_star` does this. In the top, the STAR data inputs are
wired to the TPC. There the stream leaves on the `test_data` port, for testing
the buffers of other boards.

## Register maps

All registers are 16 bits, addressed by word offset from the board base. The
bus is a simplified A24/D16 VME slave. `addr[23:16]` selects the board: STAR
at `0x10`, TFIB at `0x20`. `addr[8:1]` selects the register. DTACK comes 3
clocks after DS on writes and 5 on reads. "w1" marks a register whose write
is a one-clock action.

**STAR**

| offset | name | contents |
|---|---|---|
| 0x00 | CTRL | [0] readout enable, [2:1] trigger mode (0 ext, 1 laser, 2 charge, 3 off), [5:3] buffer enable A/B/C, [6] w1 clear buffers |
| 0x01 | STATUS | [2:0] overflow, [5:3] EOR seen, [6] busy, [7] timed out, [8] test playback busy |
| 0x02–0x06 | TURN_LEN, N_BUNCHES, SPACING, INT_XING, INT_TURNS | beam structure and internal trigger position |
| 0x07 | CAL_LAT | clocks from CAL_INJECT to DIG_READOUT |
| 0x08 | TIMEOUT | readout timeout / 256 |
| 0x09 | SW_CMD | w1: send high level command [3:0] |
| 0x0A–0x0C | EVENTS, TRIG_LOST, XING | counters, current crossing |
| 0x10–0x15 | TM_ADDR, TM_DATA, TM_WORDS, TM_HDR, TM_START, TM_BLOCKS | test memory |
| 0x20+4k | BUF_ADDR k | read pointer of buffer k |
| 0x21+4k | BUF_DATA k | read word, pointer + 1 |
| 0x22+4k, 0x23+4k | BUF_COUNT k | words stored, low 16 bits and bit 16 |

**TFIB**

| offset | name | contents |
|---|---|---|
| 0x00 | CTRL | [0] front panel (else J3), [1] capture data, [2] w1 clear data FIFOs, [3] w1 clear Cmd/Conf FIFO |
| 0x01 | IMM | w1: immediate command [6:4] (0 HL, 1 emulate, 2 configure SVX, 3 readback, 4 reset, 5 configure TPC), argument [3:0] |
| 0x02 | STATUS | [0] busy, [1] emulating, [2] acquiring, [3] readout timeout, [4] config underrun, [5] Cmd/Conf empty, [6] DAC busy, [7] Cmd/Conf full, [10:8] data FIFO full |
| 0x03 | FIFO_WR | w1: push into Cmd/Conf FIFO |
| 0x04–0x0F | SCLK_HALF, ACQ_HI, ACQ_LO, DIG_HI, DIG_LO, N_DIG, RO_HI, RO_LO, RO_MAX, HOLD, CFG_BYTES, HDI_EN | timing and sizes |
| 0x10–0x13 | READBACK, CMD_DONE, DROPPED, RO_CLOCKS | results and counters (READBACK = {TPC configuration byte, status byte}) |
| 0x14 | DAC_WORD | w1: shift one 16-bit word to the TPC DACs |
| 0x18+k | DFIFO k | {not empty, half, byte}, pops |
| 0x1C+k, 0x1F | counts | data FIFO k, Cmd/Conf FIFO |

To download the SVX configuration:

1. Write `CFG_BYTES`.
2. Push the bytes into the Cmd/Conf FIFO, the byte for the first chip of the
   chain first.
3. Write `IMM` = configure.

The TFIB then:

1. sends LL_INIT, which puts the chips into configuration mode;
2. shifts the bytes out MSB first on `scmd`, one SVX clock per bit;
3. returns the chips to acquisition.

The TPC controller is configured the same way. Push one byte and write
`IMM` = configure TPC. The TFIB sends LL_CONFIG_TPC followed by the byte's
eight bits, one serial clock pulse each. An empty FIFO sets the
configuration-underrun status bit in both cases.

## Sizes

| parameter | default | origin |
|---|---|---|
| STAR data buffers | 3 × 65536 × 16 | original design (64k × 16, three buffers) |
| STAR test memory | 32768 × 16 | original design (32k × 16) |
| RF clocks per crossing | 7 | original design |
| HDIs per TPC | 3 | original design |
| Cmd/Conf FIFO | 1024 × 16 | chosen here |
| TFIB data FIFOs | 3 × 4096 × 9 | chosen here; only "smaller than the STAR buffers" is known |
| serial code width, readback length, TPC configuration | 3, 16, 8 bits | chosen here |
| EOR code | FF then 00 | chosen here |

An unsparsified 128-channel chip gives 130 words per event, so one STAR
buffer holds 504 events. It takes 260 clocks (4.9 µs) to read out.

## What is modelled differently or not at all

The following follow the original system:

- the block structure;
- the three command sources;
- the split of control between the TFIB and the TPC;
- the serial line with two clocks;
- the fixed number of edges per low level command;
- the event readout sequence;
- EOR insertion by the TPC and detection by the TFIB;
- the buffer and test memory sizes;
- the beam structure.

The following are choices made here, because no source for them exists:

- all command codes;
- the serial framing;
- the register maps;
- the FIFO sizes;
- the EOR value;
- the bit-level control sequences.

Not built:

- **TPC controller FPGA programming.** The original TFIB loads the TPC
  controller's FPGA and can read back that configuration. Here the TPC
  controller is ordinary logic. Its "configuration" is the byte loaded with
  CONFIG_TPC; READBACK returns that byte plus a status byte.
- **SVX clock shaping.** It is reduced to programmable high and low times.
  Skew control between several TFIBs is not modelled.
- **Board clock sources.** Oscillators and the STAR external clock input are
  left out; every board runs from `clk`.
- **Off-board parts.** The G-Link chips, the TPC DACs and power regulation,
  the VME CPU and the workstation are outside the RTL. Their digital
  interfaces are ports of the top.
- **VME.** Only single D16 cycles (AS, DS, WRITE, DTACK) are handled. There
  are no address modifiers, block transfers or interrupts.
- **SVX chips.** They are mixed-signal parts. `tb/svx_chip_model.sv` is a
  behavioural model used by the testbenches, with:
  - a configuration shift register (one threshold byte per chip);
  - a deterministic channel pattern;
  - sparse readout of channels above threshold;
  - a `done` line after the last chip.

  How the real TPC recognises the end of a chain's readout is not known. In
  this model it is that `done` line.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  --top-module tb_svx_test_stand -Irtl -Itb -y rtl -y tb \
  rtl/svx_pkg.sv tb/tb_svx_test_stand.sv --Mdir obj -o sim
./obj/sim
```

`tb_svx_test_stand` runs the whole test stand at its default sizes, with
three chains of two modelled chips. It checks data against values computed
from the chip model. It also counts how often each mechanism happened, and
fails if any of these never happened:

- SVX configuration;
- the 132 ns acquisition clock;
- external, laser and charge-injection events;
- EOR insertion;
- all three STAR buffers;
- the G-Link FIFOs;
- the 53 MB/s byte rate;
- emulation;
- preamp reset;
- readback;
- TPC controller configuration;
- DAC download;
- the front-panel bus;
- the 396 ns pattern;
- test memory playback;
- a dropped command;
- a readout timeout.

Each module has its own testbench (`tb/tb_<module>.sv`). `tb_star`,
`tb_tfib` and `tb_tpc` test the boards one at a time:

- `tb_star` uses the memory-test loopback, VME buffer readout and an external
  trigger.
- `tb_tfib` decodes the serial line and checks the G-Link and VME FIFO reads,
  bus selection, emulation, the DAC, the TPC configuration download and
  reset.
- `tb_tpc` checks the three HDI streams with EOR against the chip model, and
  the per-HDI clock enables.

`tb_kek_beam_test` is a beam-test workload at full size. It puts one chip on
each HDI and sends beam triggers until STAR buffer A overflows. The model's
channel pattern gives 128 words per event, so 512 events fill the buffer
exactly and the overflow flag must rise in event 513. The test checks that
prediction and reads the last event back over VME.

Some unit testbenches shrink memory depths through parameters so that their
full/overflow checks run quickly. All of them finish in seconds.
