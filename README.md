# PSB synchronising chip and board logic

The Pipelined Synchronising Buffer (PSB) is a 9U trigger board. It receives trigger data from
the calorimeter trigger and hands them, aligned, to the global trigger logic over a GTL+
backplane. The data arrive in two forms:

- eight 1.4 Gbit/s serial links, each giving a 16-bit word every 12.5 ns;
- up to 64 parallel LVDS bits at 40 MHz.

Cables, link chips and clock phases all differ, so the data come in with arbitrary phase and
delay with respect to the local bunch-crossing (bx) clock. This RTL is the logic of the board's
synchronising chip. For every channel it:

1. picks the cleanest of four samples per bit period;
2. delays the data by a programmable number of bunch crossings;
3. drives the result to the backplane.

While doing so it keeps a short history of every channel in a ring buffer. On a Level-1 Accept
(L1A) it copies the triggering crossing and its neighbours into derandomising FIFOs. A readout
controller then sends them as formatted records over a 28-bit Channel Link.

Two extra features help commissioning:

- **SIM/SPY memory.** A per-channel memory that can record one orbit of input ("spy"), or replace
  the input with simulation data played back in step with the LHC orbit.
- **Phase monitoring.** Counters that show where the input edges fall between the four samples.

Around the chip, the board has two VME chips. This RTL also contains:

- the register set of the VME interface chip, `vme_chip_psb_regs`;
- the CR/CSR space of the VME64x protocol chip, `vme64x_cr_csr`;
- a board-level top, `psb_board`, that joins them with the PSB chip.

Everything runs in one 40 MHz clock domain. A serial channel's two 16-bit words of one bx (A
in the first 12.5 ns, B in the second) are carried internally as the 32-bit pair `{B, A}`.
The 80 MHz multiplexing onto the backplane pins is left to the I/O cells.

## Block structure

```
 ser_samp[c] --> serial_oversampler --> delay_line --+
                  (phase select,        (CHAN_DELAY)  |   sel_lvdsdata (ch 0, 1)
                   phase counters)                    +--> mux --> sim_spy_mem --> mux --> gtl_out[c]
 lvds_samp_n --> lvds_oversampler --> [edge_pulse] --> delay_line x16 --^    (SIM/SPY)      |  tx_out[c] (ch 0..3)
                 (invert, per-group                    (LVDS_DELAY)                        v
                  phase, counters)                                                    ring_buffer[c]
                                                                                          |
 bcres_in --> bc_counter --> bcres_int (write-counter clear), bcres_lat (read-counter clear)
                                                                                          |
 l1a_in ----------------------------------------------> rop: L1A queue -> sequencer -> 9 FIFOs -> ROC -> chlink
 robus_* --> robus_decoder (BGo START/STOP) ------------^
 bus_*   --> psb_regs (registers, command pulses, counters, memory window)
             testpoint_mux (7 test points)

 board level (psb_board):
 vme_* --> vme_chip_psb_regs --bus_*--> psb_chip          csr_* --> vme64x_cr_csr
            (own registers, serlink_err_cnt)                (CR/CSR, RESET_MODE, function decode)
```

| module | role |
|---|---|
| `psb_board` | Top level. Joins the PSB chip, the VME-chip register set and the VME64x CR/CSR space. Also models the LVDS receiver enables and the PSB-chip reset. |
| `vme64x_cr_csr` | Configuration ROM, user ROM, CRAM, control/status registers and base-address decode of the VME64x chip. |
| `vme_chip_psb_regs` | Register set of the VME interface chip. Forwards accesses to the PSB chip. |
| `serlink_err_cnt` | Counters of lost LOCKED signals of the eight serial-link receivers. |
| `psb_chip` | Top of the PSB chip. Wires the 8 channels, the LVDS path, the bunch counter, the bunch-number ring, the readout, the register file and the test points. |
| `psb_channel` | One serial channel: oversampler, delay, LVDS/serial select, SIM/SPY memory, output register, ring buffer. Parameters `HAS_LVDS` (channels 0, 1) and `HAS_TX` (channels 0..3). |
| `serial_oversampler` | Phase selection of a serial word; four phase counters on bit 0. |
| `lvds_oversampler` | Inversion of the negative-logic LVDS inputs; phase selection per 4-bit group; phase counters per group. |
| `phase_counter` | 8-bit counter that stops at FF and is cleared when read. |
| `edge_pulse` | One-clock pulse on each edge (Technical Trigger inputs). |
| `delay_line`, `srl_stage` | Programmable delay of 0..48 bx built from four shift-register stages. |
| `bc_counter` | Internal bunch counter, internal BCRES, BCRES and latency delays, BC_ERROR. |
| `sim_spy_mem` | 8k x 16 SIM/SPY memory of one channel. |
| `ring_buffer` | 256-entry dual-port ring with orbit-locked write and read counters. |
| `derand_fifo` | Synchronous FIFO with empty, full and 75 % flags (also used as the L1A queue). |
| `rop` | Readout processor: L1A queue, transfer sequencer, 9 FIFOs, readout controller, status. |
| `robus_decoder` | BGo commands from the timing board's readout bus. |
| `psb_regs` | Register file on a simple local bus. |
| `testpoint_mux` | Seven masked-OR test points. |
| `psb_pkg` | Widths, register field structs, mode enum, record codes. |

## Phase selection and phase counters

Capture flip-flops outside the chip sample every input four times per bit period, at 0°, 90°,
180° and 270° of the bit clock.

**Serial channels.** `CHAN_REG[1:0]` selects the sample:

| code | sample |
|---|---|
| `00` | phase 0 |
| `10` | phase 2 |
| `01`, `11` | data inhibited (the channel sends 0) |

The selection is made separately for the A and B words, with one code for both.

**LVDS bits.** Each 4-bit group has its own 2-bit code, which selects any of the four samples.
Groups 0..7 are set in `SEL_PHASE3100` and groups 8..15 in `SEL_PHASE6332`, two bits per group
with group 0 in bits 1..0. The inputs are negative logic and are inverted first.

**Where the edges fall.** The chip compares neighbouring samples of one monitored bit: bit 0 of
a serial word, or the lowest bit of an LVDS group. A change between two samples increments one
of four 8-bit counters:

- `c0p3`: from sample 3 of the previous period to sample 0;
- `c10`, `c21`, `c32`: between samples 0-1, 1-2 and 2-3.

Reading the counters:

- `PHASE_CNTR_A = {c10, c0p3}` and `PHASE_CNTR_B = {c32, c21}`.
- A counter stops at FF.
- Reading a word clears both of its counters.
- For serial channels, transitions of both words of a bx count, so a counter can advance by 2
  per bx.

Data that are stable around the selected sample show counts only in the counters of the other
phases.

## Delays

All delays use one register format: **delay = bits[1:0] + A + B + C** bunch crossings.

| bits | field |
|---|---|
| 15..12 | C |
| 11..8 | B |
| 7..4 | A |
| 3..2 | ignored |
| 1..0 | 0..3 |

The delay line is a chain of four shift-register stages, of depth 3, 15, 15 and 15. Each stage
has an output multiplexer, the way an SRL16 primitive works, and select 0 bypasses the stage.
The range is therefore 0..48 bx.

The same format, and the same module, serves:

- `CHAN_DELAY` (serial channels);
- `LVDS_DELAY` (one per 4-bit group);
- `BCRES_DELAY` (external BCRES);
- `LATENCY_DELAY` (ring read counter).

## Bunch counter and orbit alignment

`bc_counter` keeps its own bunch number, because the distributed BCRES need not arrive every
orbit.

- It counts 0..`MAX_BC_NUMBER` (default 3563, orbit length 3564) and wraps.
- `bcres_int` is high in the clock where the count is 0. Every orbit-locked circuit uses this
  pulse.
- `MAX_BC_NUMBER` = 0 turns the internal wrap off.

The external BCRES, or the `BCRes_vme` command, is first delayed by `BCRES_DELAY`. The delayed
pulse forces the count to 0. If the counter was not at `MAX_BC_NUMBER` at that moment, the two
disagreed, and the sticky `BC_ERROR` flag (`PSB_STATUS` bit 4) is set. Reset also sets it. Only
the `Res_BC_error` command clears it. A BCRES that arrives exactly one orbit after the previous
one therefore leaves it clear.

## Ring buffers and trigger latency

Each channel writes its backplane word into a 256-entry ring every clock. The write counter
restarts at `bcres_int`. The read counter is an identical counter that restarts at `bcres_int`
delayed by `LATENCY_DELAY`. It therefore always points at the data written `LATENCY_DELAY` bx
earlier, which is the crossing an L1A arriving now refers to.

A 12-bit companion ring stores the bunch number of each entry, used for the C headers of the
readout.

Because 3564 is not a multiple of 256, the addresses restart at each orbit. For an L1A whose
window (±1 or ±2 bx) straddles the point where the read counter restarts, the neighbouring
entries are not the neighbouring crossings. The C header carries the true bunch number of each
entry, so such records can be recognised.

## SIM/SPY memory

Each channel has 8k x 16 words, kept as two 4k x 16 banks for the A and B words. The word
address seen from VME is `{bx, tick}`: word `2·bx` is the A word and `2·bx+1` the B word of
crossing `bx`.

Running the memory:

- A `run_next_orbit[c]` command arms the memory.
- It runs from the next internal BCRES for exactly one orbit.
- If `sel_contin_mode` is set, it runs every orbit until the bit is cleared.

What it does while running depends on `sel_sim_mode`:

| `sel_sim_mode` | behaviour |
|---|---|
| 0 (spy) | Stores the trigger word of every bx at its bunch number. |
| 1 (simulation) | Replaces the trigger word on the backplane and in the ring with the stored word, and outputs 0 while not running. |

On channels 0..3, `en_trx_data` also sends the simulation data to the serial-link transmitter
output `tx_out`.

The word stored at bx `b` leaves the chip in bx `b + 2` (memory read plus output register).

## Readout

**Run control.** `ROP_SETUP[1:0]` sets the board mode: `00` DISCONNECTED, `01` BUSY, `10` READY,
`11` BAD CODE (test only). The run flag:

- is set by a START while READY;
- is cleared by a STOP, or by leaving READY.

START and STOP come from the command register or, with `en_robust`, from ROBUS BGo commands
(`RDRQST` with strobe `001`; BX5 = START_RUN, BX6 = STOP_RUN).

**Event numbers.** Every L1A increments the 24-bit event number, and the first after a reset is
1. The event counter reset (backplane or command) sets it back to 0.

**Accepting an L1A.** While the run flag is set, an L1A pushes the event number and the current
ring read address into a 16-entry queue.

**Transfer sequencer.** The sequencer takes one queue entry at a time.

- It checks that the FIFOs have room for the whole event. If not, it drops the event and sets
  the sticky `l1a_lost`.
- Otherwise it reads the rings at address −1..+1 (or −2..+2 with `five_bx_event`), one bx per
  clock.
- It pushes the 8 channel words and a bookkeeping word into 9 FIFOs of 512 entries. The
  bookkeeping word holds the event number, the offset, the bunch number, the ring address and a
  last-bx flag.

A full queue also sets `l1a_lost`.

**Readout controller.** The readout controller sends one record per event, one word per clock:

| word | content (28 bits, hex digit 27..24 first) |
|---|---|
| A | `A`, `00`, event number 15..0 |
| B | `B`, `0000`, event number 23..16 |
| C | `C`, `00`, bx offset (−2..+2, 4-bit two's complement), bunch number |
| D | `D`, `00`, `BOARD_ID` |
| 8 x | `1`, `00`, A word of channel 0..7 |
| 8 x | `1`, `00`, B word of channel 0..7 |
| E | `E`, 11 zero bits, ring address |
| 3 x | `E000000` |

The 24-word section repeats for each bx, and `FFFFFFF` ends the record. A record is 73 words
long (121 with five bx). Between records the link carries `IDLE_ID` (default `555AAAA`), and
`chlink_rec` marks record words. An L1A reaches the link about 7 clocks later when the FIFOs are
empty.

**L1Res.** L1Res (backplane or command) empties the queue and the FIFOs. It waits until the
record being sent and the transfer under way are finished, so records are never cut.

**Status.** `ROP_STATUS` holds:

- bit 15: readout controller idle;
- bit 14: run flag;
- bit 12: out_of_sync (the FIFOs' empty flags disagreed; sticky until `reset_error_flag`);
- bit 10: warning (more than 75 % full);
- bit 9: full;
- bits 8..0: the empty flags.

The 4-bit PSB status code to the trigger control is `{Ready, Busy, Out_of_Sync, Warning}`:

| condition | code |
|---|---|
| DISCONNECTED | `0000` |
| BAD CODE | `1111` |
| out_of_sync | `0010` |
| a FIFO full, or BUSY mode | `0100` |
| warning | `0001` |
| otherwise | `1000` (READY) |

The conditions are tested in that order.

## Registers

The register file sits on a local bus from the board's VME interface chip:

- `bus_en` is a one-clock request with `bus_wr`, a word address (`bus_addr` = A19..A1) and the
  write data.
- `bus_ack` and `bus_rdata` come exactly two clocks later.

Byte offsets:

| offset | register |
|---|---|
| 0x000-0x00E | `CHAN_REG0..7`: bit 5 `en_trx_data`, 4 `sel_contin_mode`, 3 `sel_sim_mode`, 2 `sel_lvdsdata`, 1..0 `sel_phase` |
| 0x010-0x01E | `CHAN_DELAY0..7` |
| 0x020-0x03E | `LVDS_DELAY0..15` |
| 0x040 / 0x042 / 0x044 | `BOARD_ID` / `BCRES_DELAY` / `LATENCY_DELAY` |
| 0x046 | `ROP_SETUP`: bit 3 `en_robust`, 2 `five_bx_event`, 1..0 mode |
| 0x048 | `MAX_BC_NUMBER` (reset 0x0DEB) |
| 0x04A / 0x04C | `SEL_PHASE3100` / `SEL_PHASE6332` |
| 0x04E / 0x050 | `IDLE_ID` bits 15..0 / 27..16 |
| 0x052-0x05E | `TESTMASK0..6` |
| 0x070 | `CMD_PULSE` (write only): 15 reset_error_flag, 14 stop, 13 start, 12 Res_BC_error, 11 reset event number, 10 reset orbit number, 9 BCRes_vme, 8 L1Res, 7..0 run_next_orbit |
| 0x800 / 0x810 | serial `PHASE_CNTR_A0..7` / `PHASE_CNTR_B0..7` |
| 0x820 / 0x840 | LVDS `PHASE_CNTR_A` / `PHASE_CNTR_B` of groups 0..15 |
| 0x860 / 0x862 | `PSB_STATUS` / `ROP_STATUS` |
| 0x864 / 0x866 / 0x868 | `CHIP_ID` 8131 / `VERSION_NR` 0005 / `CHIP_IDH` 0001 |
| 0x20000 + 0x4000·n | SIM/SPY memory n |

Other behaviour:

- Reset loads 0 into every register except `MAX_BC_NUMBER` and `IDLE_ID`.
- Unused addresses read 0.
- Writes to read-only words are ignored.

## VME interface chip

VME addresses A23..A20 select the chip:

- `0000`: the VME chip's own registers. They answer DTACK one clock after the request.
- `0001`: the PSB chip. The access goes on the local bus with A19..A1. DTACK comes when the PSB
  chip acknowledges, three clocks after the request. If the PSB chip stays silent for
  `PSB_TIMEOUT` clocks, the answer is BERR.
- Anything else gives BERR.

The VME protocol engine in front of this chip is not part of the RTL. It hands over each access
as a one-clock `vme_req`.

| offset | register |
|---|---|
| 0x00 / 0x02 / 0x04 | `CMD_ENPROG` / `CMD_NPROG` / `CMD_INIT` (bit 0) |
| 0x06 / 0x08 | `STAT_INIT` / `STAT_DONE` (read) |
| 0x0A | `CONF_PSB` (write): with ENPROG set, bit 0 goes to DIN and one CCLK pulse follows a clock later |
| 0x10 | command pulses (write): D0 PWRDWN_PSB, D1 RES_DCM_PSB, D2 RESET_PSB, D3 SET_RUNNING |
| 0x12 | status (read): D1 CLK_LOCKED_PSB, D2 LOCKED_LED, D3 RUNNING |
| 0x14 | command: D0 EN_CHLINK, D1 EN_ROBUS, D2 VME_CONF, D3 V_SEL_CABLES, D4 V_SEL_BACKPL |
| 0x16 | status (read): D0 EN_CHLINK active, D2 STATUS_SEL_VME, D5 JTAG_JUMPER |
| 0x20-0x26 / 0x28-0x2E | chip_id 0x00018x21 (x = card number) / version 0x00001004, one byte each |
| 0x40 / 0x42 / 0x44 | SERLINK0 / SERLINK1 / SERLINK2: serial-link chip control |
| 0x46 | LOCKED of the eight receivers (read) |
| 0x50 | EN_TTIN: enables of the sixteen LVDS receivers |
| 0x60-0x6E | lost-LOCKED counters 0..7: 8-bit, stop at FF, cleared by the read |

Behaviour of the outputs:

- Channel Link chips are enabled only while the PSB chip's clock is locked.
- The LOCKED LED lights when the PSB clock is locked and every enabled receiver is locked.
- JTAG chains go to the cables when V_SEL_CABLES is set or the jumper is in. Otherwise they go
  to the backplane if V_SEL_BACKPL is set, and to VME if not.
- A disabled LVDS receiver sends 1111. Its lines are negative logic, so the PSB chip sees zeros.
- RESET_PSB (command pulse D2 or RESET_MODE) resets the PSB chip. RESET_MODE is bit 7 of the
  VME64x bit set/clear registers.

Choices made here:

- Other accesses to the chip (unused offsets, writes to read-only registers, reads of write-only
  ones) answer BERR.
- The JTAG-controller registers 0x30-0x3E also answer BERR.
- Pulses last one clock.
- A lost lock is counted once per falling LOCKED edge, and only for an enabled receiver.
- STATUS_SEL_VME shows VME_CONF.
- RUNNING is cleared only by reset.
- Receiver g drives LVDS bits 4g..4g+3.

## VME64x CR/CSR space

CR/CSR accesses use address modifier 0x2F and single bytes at addresses 3 mod 4. A23..A19
must match the BAR. The BAR holds the slot number from the geographic-address pins, or the
amnesia address 11110 when the pins give 0. The access is answered one clock after the request.

| address (A18..A0) | contents |
|---|---|
| 0x00003-0x007FF | configuration ROM: access widths 0x81, space ID 0x02, program ID 0x01, user-CR/CRAM/user-CSR/serial-number offsets, DAWPR 0x83, AMCAP 0x2200 (function 0) and 0x8800 (function 1), ADEM 0xFE000000 |
| 0x01003-0x0101F | chip_id 0x00018n11 (n = card number), version 0x0000100C |
| 0x01023-0x01033 | serial number "PSBxx" in ASCII: the card number in decimal, card 0 being board 16 |
| 0x03003-0x037FF | CRAM, 512 bytes |
| 0x05003 / 0x05007 | TEST_OUT selection: four 4-bit codes |
| 0x7FF63-0x7FF7F | ADER of functions 0 and 1 |
| 0x7FFF7 / 0x7FFFB | bit clear / bit set: bit 7 RESET_MODE, bit 4 module enable, bit 3 BERR flag |
| 0x7FFFF | BAR |

Behaviour:

- After reset the module is disabled. Writing 0x10 to the bit set register enables it.
- Function 0 accepts AM 0x0D and 0x09, function 1 AM 0x0F and 0x0B.
- A data access is selected when A31..A25 equal the function's ADER and the module is enabled.
- A BERR answer from the VME chip sets the BERR flag.

Choices made here:

- The ROM checksum, length, board ID and revision ID read 0.
- The "CR" bytes at 0x1F/0x23 follow the VME64 standard.
- The AM field of ADER is not compared.
- Both VME chips share one card-number input.

## Test points

Each of the seven test points outputs the OR of the internal signals its `TESTMASK` register
selects, registered. Signal lists per test point are in `psb_chip.sv`. Examples:

- internal BCRES on test point 0, mask bit 14;
- BC_ERROR, the FIFO strobes, the Channel Link identifier bits, ROP_STATUS bits and the command
  pulses.

Clocks, clock-lock signals and the per-clock counter strobes are not brought out, and read 0.

## Choices made in this design

The behaviour above follows the board's description, except for the points below, which are
this design's own.

**Implementation and sizing:**

- Single clock domain with `{B, A}` word pairs. Delays step in whole bx.
- LVDS bits 31..0 go to channel 0 and 63..32 to channel 1, low half as the A word. On channels
  without LVDS, `sel_lvdsdata` gives 0.
- FIFO depth (512), L1A queue depth (16), the room check before copying an event, and the
  separate `l1a_lost` output.
- The local bus protocol. `IDLE_ID` resets to the example idle word.
- The registered outputs and their latencies (see below). The one-pulse-per-command ROBUS
  decoding.

**Readout format and run control:**

- The ring stores one 32-bit entry per bx, so the E word's ring address steps by 1 per bx.
- Phase counters are cleared by reading, not at every orbit.
- The priority of the PSB status conditions.
- `BC_ERROR` is set only when a BCRES disagrees with the counter, or by reset.

**Not built:**

- ROP_STATUS bit 11 (error) stays 0.
- HARD_RES and user BGo commands are decoded but have no effect.
- The orbit-number reset only reaches a test point, since no orbit counter is described for
  the chip.
- The serial-link chips, the GTL+/LVDS I/O cells with their four-phase capture flip-flops,
  and the clock managers are outside this RTL. The ports stand where they connect.
- On the VME side: the VME protocol engine (cycle decoding, DTACK/BERR drivers, D08/D16
  transfers), the JTAG controller registers, and the configuration PROMs.

## Timing summary (from the testbenches)

| path | clocks |
|---|---|
| serial sample → `gtl_out` | 2 + `CHAN_DELAY` |
| LVDS sample → `gtl_out` | 2 + `LVDS_DELAY` (+1 with Technical Trigger edges) |
| SIM word of bx b → `gtl_out` | bx b + 2 |
| central bx of a record | L1A bx − `LATENCY_DELAY` |
| L1A → first record word (idle FIFOs) | 7 |
| record | 73 (3 bx) or 121 (5 bx) words, one per clock |
| bus request → `bus_ack` | 2 |
| VME request → DTACK (VME-chip register / PSB chip) | 1 / 3 |

## Simulation

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog.

`tb_psb_board` runs the whole board logic at full size (3564-bx orbit, 8k memories, 512-entry
FIFOs) for about 65 000 clocks. `tb_psb_chip` runs the same sequence on the PSB chip alone.
Everything is set up over VME (or the local bus), and the testbench checks and counts each
mechanism:

- phase selection and inhibit, phase counters;
- delays, LVDS groups, edge pulses;
- simulation playback of a full orbit, spy of a full orbit;
- BC_ERROR and resynchronisation, test point;
- BGo START/STOP;
- 3- and 5-bx records, event-counter reset;
- FIFO warning, full and L1A loss, L1Res;
- VME-chip registers and bus errors, LVDS receiver enables, lost-LOCKED counters, PSB reset;
- VME64x identification, module enable and function decode, BERR flag, RESET_MODE.

Example with Verilator 5 (the package first):

```
verilator --binary --timing --top-module tb_psb_board rtl/psb_pkg.sv \
  $(ls rtl/*.sv | grep -v psb_pkg) tb/tb_psb_board.sv
./obj_dir/Vtb_psb_board
```

For a single block, list only its files, e.g.
`rtl/psb_pkg.sv rtl/derand_fifo.sv rtl/rop.sv tb/tb_rop.sv`.

The testbenches are written for a two-state simulator: every register that is read is reset, and
random stimulus uses `$urandom`.
