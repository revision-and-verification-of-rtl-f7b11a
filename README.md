# eUART: a self-synchronising, oversampling UART for time-triggered field buses

Small sensor and actuator nodes on TTP/A or LIN buses are cheapest when the
whole node sits on one die, which means running it from an on-chip RC
oscillator instead of a crystal. Such an oscillator can be off by tens of
percent and drifts with temperature and supply, so a UART with a fixed
divisor cannot keep its bit rate matched to the bus. The eUART solves this in
hardware:

* **It measures the bit rate from the bus.** TTP/A and LIN masters open each
  communication round with a synchronisation frame whose transitions are all
  equally spaced. The eUART can be told to search for it at any time; it
  watches every transition on the bus and, once it has seen eight equal bit
  cells in a row, loads the measured bit period into its baud rate setting.
* **It samples each bit cell 16 times.** The samples are judged either by
  majority (best availability) or against a stricter, programmable threshold
  (best error detection). The samples of the last bad cell are kept so that
  software can tell a noisy line from a node that has lost synchronisation.
* **It sends on time.** A bit-cell timer, restarted by each completed
  synchronisation, can start a transmission at a programmed time mark. The
  frame then begins a fixed number of clock cycles after the mark, with no
  jitter.

The module is a peripheral with eight 16-bit registers on a simple memory
interface, one interrupt line and two bus pins (`rxd_i`, `txd_o`). The bus is
assumed to be wired-AND: the eUART always reads back its own frames.

## Structure

```
            memory interface, irq
                    |
           +------------------+      +------------------+
           |   euart_ctrl     |------|  euart_timing    |  bit-cell timer,
           | registers, cmds, |      | (own tick gen.)  |  time mark
           | status, irq      |      +------------------+
           +------------------+
             |    |      |    \__________________
   EUBRS,    |    |      |                       \
   config    |    |  euart_errctl             euart_sync
             |    |   (parity, stop, sampling,  (pattern search,
             |    |    read-back, diagnosis)     bit-period measure)
       euart_tx   |      |                         |
   (+ tick gen.)  euart_rx (+ tick gen.)           |
             \    (euart_sample_eval)              |
              \_____________|______________________|
                      euart_busdriver
                 (synchroniser, glitch filter)
                            |
                          bus
```

| File | Block |
|---|---|
| `rtl/euart_pkg.sv` | shared constants, register addresses, enums and structs |
| `rtl/euart.sv` | top level |
| `rtl/euart_busdriver.sv` | bus driver: synchroniser and glitch filter |
| `rtl/euart_baudgen.sv` | enhanced baud rate generator (fractional tick generator) |
| `rtl/euart_sync.sv` | synchronisation-pattern detector |
| `rtl/euart_rx.sv` | receiver |
| `rtl/euart_sample_eval.sv` | evaluation of a cell's 16 samples |
| `rtl/euart_tx.sv` | transmitter |
| `rtl/euart_errctl.sv` | error control and diagnosis |
| `rtl/euart_timing.sv` | bit-cell time base |
| `rtl/euart_ctrl.sv` | control unit and register file |

Receiver, transmitter and time base each have their own copy of the baud
rate generator. This way the receiver can re-align its sampling on every
start edge without moving the transmitter's or the timer's bit boundaries.

## Bit period representation

The bit period is held in register EUBRS as a count of clock cycles with four
fractional bits (Q12.4). For example, 50 cycles per bit is 800, and 37.25
cycles per bit is 596. The baud rate generator adds 256 (16 samples × 16) to
an accumulator every clock. Each time the accumulator reaches EUBRS, it
subtracts EUBRS and issues a sample tick. Sixteen ticks therefore always take
exactly one bit period on average, even when the period is not a whole number
of cycles. Any single tick is off by at most one clock cycle. Valid periods
run from 16 cycles (one tick per clock) to 4095.94 cycles. The reset value is
50 cycles, i.e. 20 kbit/s from a 1 MHz clock.

## Finding the synchronisation pattern

This is the core of the design (`euart_sync`). While a search is active
(COMMAND.SYNC), every transition on the filtered bus line closes an interval
measured in clock cycles:

1. The first interval of a search becomes the **reference**.
2. Each later interval must lie within reference ± reference/16 (6.25 %,
   integer division).
3. When **8 intervals** in a row pass, the pattern is found. The 8 intervals
   are summed; sum × 16 / 8 = sum × 2 is the Q12.4 bit period. The search
   ends, EUBRS is loaded, STATUS.SYNCED is set and the time base restarts.
4. If an interval fails the tolerance, the search starts over with that
   interval as the new reference. If an interval is shorter than 16 cycles,
   or if no transition comes for 4095 cycles, the search starts over with no
   reference.

With the usual pattern, the byte 0x55, the transitions from the start bit to
the last data bit give exactly eight equal cells. The search ends on the
falling edge into data bit 7. The receiver is off during the search and
afterwards waits for the next falling edge, so the rest of that frame is not
mistaken for a start bit.

Why 6.25 %: the tolerance has two bounds. It must be larger than the
measurement error. Over an 8-cell pattern at 50 cycles per bit this error is
dominated by one clock cycle of quantisation, a few percent (the design
assumes 4 %). It must also be smaller than the step at which ordinary
traffic aliases into a pattern. In a 13-cell TTP/A slot, runs of 6 and 7
equal bits differ by 7/6 − 1 = 16.6 %. One sixteenth lies between the two
bounds and costs only a shift. For slots with an even number of bits, a
suitable parity choice keeps a data frame from forming two equal halves. The
short parity cell then breaks the run (the testbench checks this case). The
synchronisation frame itself may use a parity setting different from data
frames.

## Sampling and its diagnosis

Frames are: a start bit (0), 8 data bits with the LSB first, an optional
parity bit (even or odd), and a stop bit (1). That is 11 cells with parity,
which fits a 13-cell TTP/A slot.

On a falling edge the receiver re-aligns its tick generator so that the 16
samples of each cell fall at (k + ½)/16 of the cell. After the 16th sample,
`euart_sample_eval` decides the bit:

| Mode (EUART CONFIG bit 2) | bit = 1 if | bit = 0 if | otherwise |
|---|---|---|---|
| majority (0) | ≥ 9 ones | ≥ 9 zeros | 8:8 tie → sampling error |
| robust (1) | ≥ T ones | ≥ T zeros | sampling error |

T is the threshold field (bits 9:5), limited to the range 9..16. Robust mode
trades availability for detection. A cell whose edge has drifted inside the
sampling window, or which carries a short burst, is reported instead of
being silently accepted. The outermost samples are only 1/32 of a bit from
the cell edges, so T = 16 also flags edge jitter of one clock cycle at short
bit periods. T = 13..15 is the practical range.

Glitches of up to 2 clock cycles never reach the sampler: the bus driver
passes a new level only after 3 equal consecutive samples. A disturbance
shorter than half a cell is outvoted in majority mode. A longer disturbance
flips the bit, which parity catches when an odd number of bits is hit.

When a cell fails, error control keeps its 16 samples. Software reads them
through the COMMAND register. Error control also classifies the failure:

* **at most one level change** (e.g. `0000000011111111`): a clean edge inside
  the cell. The receiver's bit period no longer matches the sender's, so the
  node has lost synchronisation. STATUS.DIAG_TIMING = 1.
* **several changes** (e.g. `0101010101010101`): a noisy line.
  STATUS.DIAG_TIMING = 0.

Because the bus is wired-AND, the eUART receives every frame it sends. If a
frame started while the transmitter was busy and its data differ from the
sent byte, STATUS.BIT_ERR is set (a collision or a disturbance).

## Time base and jitter-free sending

`euart_timing` counts bit cells at the EUBRS rate. It restarts at 0 when a
synchronisation completes, so timer increments line up with the master's
bit grid. Software may also write the timer. When the timer reaches TS/TM,
the TIME_MARK flag is set. If a SEND_MARK command is pending, the
transmitter starts in that same cycle. The transmitter re-aligns its own
tick generator on every start, so the start bit appears exactly 2 cycles
after the mark pulse, every time. A plain SEND starts the frame in the cycle
after the write.

## Register map

All registers are 16 bits wide, at addresses 0..7 (`reg_addr_e`). Reads are
combinational. Writes take effect at the clock edge.

| Addr | Name | Write | Read |
|---|---|---|---|
| 0 | STATUS | 1 clears the sticky flags | flags below |
| 1 | CONFIGURATION | interrupt enable, one bit per STATUS bit | same |
| 2 | EUART CONFIG | [1:0] parity 0 none / 1 even / 2 odd; [2] 0 majority / 1 robust; [9:5] robust threshold | same |
| 3 | COMMAND | [0] SYNC, [1] SEND, [2] SEND_MARK, [3] SYNC_STOP | samples of the last failing cell |
| 4 | MESSAGE | byte to send | last byte received (reading clears RX_FULL) |
| 5 | TIMER | sets the timer | bit-cell timer |
| 6 | TS/TM | time mark | same |
| 7 | EUBRS | bit period, Q12.4 | same (also loaded by a synchronisation) |

STATUS bits: 0 RX_FULL*, 1 TX_BUSY, 2 SYNCED, 3 SYNC_ACTIVE, 4 PARITY_ERR*,
5 FRAME_ERR*, 6 SAMPLE_ERR*, 7 BIT_ERR*, 8 TIME_MARK*, 9 OVERRUN*,
10 DIAG_TIMING, 11 TX_DONE*, 12 SEND_PEND. Bits marked * are sticky. The
others show the current state. `irq_o` is high while any enabled bit is set.
An error report also updates MESSAGE, so a faulty byte can still be
inspected.

Typical use: write EUART CONFIG, then issue SYNC, then wait for SYNCED. After
that, read frames on RX_FULL. To send in a given slot, write MESSAGE and
TS/TM, then issue SEND_MARK.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_euart.sv` runs the whole module at
its default parameters. A master node at 37.25 cycles per bit sends
ordinary traffic and then a 0x55 pattern. The eUART must synchronise (EUBRS
596 ± 1 %), receive and send frames, and detect a collision. It must send
twice at time marks with identical mark-to-start delay, filter glitches, and
correct and diagnose bursts. It must diagnose a 12 %-fast sender as a
timing failure and flag parity, framing and overrun errors. Finally it must
resynchronise to 45.5 cycles per bit. Each of these mechanisms is counted.
The run takes well under a second.

`tb/tb_euart_ttpa_rounds.sv` plays the target workload. It runs five TTP/A
rounds of 13-cell slots. Slot 0 carries the synchronisation frame, slots 1..4
carry master data, and in slot 5 the eUART answers at its time mark. The
master's rate differs from round to round: 50, 25, 75, 33.3 and 61.7 cycles
per bit. This spans ±50 % around 20 kbit/s from a 1 MHz clock, which an RC
oscillator can reach. In every round the measured period is within 1 % and
all bytes arrive. The answer starts 7 to 10 cycles after the slot boundary,
well inside the two spare cells of the slot.
That delay is constant, not jitter: 2 cycles of input synchroniser, 3 of
filter, and the pipeline from the end of the pattern to the timer restart
and from the mark to the bus pin. It is not compensated in hardware.

With plain Verilator (5.x), from the directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_euart \
    -y rtl -y tb +libext+.sv rtl/euart_pkg.sv tb/tb_euart.sv
./obj_dir/Vtb_euart
```

Replace `tb_euart` with any other testbench name (`tb_euart_sync`,
`tb_euart_rx`, ...) to run that block alone. All RTL lints cleanly with
`verilator --lint-only -Wall`, apart from warnings about unused package
constants and register bits.

## Where this design makes its own choices

The three mechanisms above, the 16-fold oversampling with its two
interpretation modes, the 2-cycle glitch filter, the 8-cell pattern with
2^-4 tolerance and the names of the blocks and registers describe the eUART
as designed. The following details are this implementation's and may differ
from other implementations of the same idea:

* the register widths, bit fields, command encoding and reset values, and
  the use of the COMMAND read for the sample pattern;
* the Q12.4 fractional baud generator, and separate generators for receive,
  transmit and time base;
* the first interval as the synchronisation reference, averaging of the 8
  intervals, and the 16- and 4095-cycle limits;
* 8 data bits per frame, false-start rejection, the stop-bit check, the
  read-back bit error and overrun;
* the "one level change = timing failure" rule;
* a timer counting bit cells, and SEND_MARK as the way to send at a mark;
* the memory interface handshake (select, write enable, 3-bit address,
  16-bit data, combinational read). The host processor's own bus protocol
  is not modelled.

Not verified: behaviour with a real transceiver or analogue bus, gate-level
timing, and oscillator drift during a frame. The testbenches use fixed but
fractional bit periods on both sides.
