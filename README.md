# On-line monitor for intermittent resistive faults on serial board links

A solder joint or connector that is starting to crack rarely fails
outright. For a few hundred nanoseconds at a time, its resistance rises
from almost nothing to hundreds or thousands of ohms. This is an
intermittent resistive fault (IRF). With the input capacitance of the
receiver, the extra resistance slows the edges on the line. While the
resistance stays small, the only symptom is an edge that arrives late.
Only at a larger resistance does the edge arrive after the receiver has
sampled, and then a wrong bit is received.

An off-line test almost never catches such a fault, because the fault is
rarely active during the test. This design watches the line while the
system runs. Next to each serial receiver sits a small digital monitor
that notices when a data edge arrives **just before** the receiver's
sampling edge. That is the stage where the fault makes the margin shrink
but does not yet corrupt data. A host reads the monitors through JTAG
(an IJTAG network behind a standard TAP). The host can then track
warnings over time and tell a one-off event from a growing fault.

The RTL contains:

- the monitor itself and its delay chain;
- the monitor's IJTAG segment;
- the IJTAG network and the JTAG TAP controller;
- two example links that the monitor watches:
  - a UART at 3 MBd, with 8 data bits, even parity and two stop bits;
  - a mode-0 SPI link, with 8 data bits and even parity.

As an alternative payload code, both links can send each byte as two
Hamming (7,4) code words instead of using a parity bit.

## How the monitor sees a late edge

```
 line ──┬──────────────────────────────► receiver FF (Q0) ──┐
        │                                                    │
        └─► [delay] ─D1─► [delay] ─D2─┐                      │
                  │                   │                      │
               Q1 FF ◄──────────── Q2 FF ◄── gclk            │
                                      │                      │
                                      └──► XOR ◄─────────────┘
                                            │
                                      Warning FF (falling gclk)
   gclk = clk & enable & ~warning
```

The receiver samples the line on the rising edge of its capture clock
into its own flip-flop (Q0). That flip-flop belongs to the receiver. The
monitor only reads its output (`q0`).

The monitor works as follows:

- **Delayed copies.** The monitor receives the same line through a chain
  of `TAPS` delay elements, which produce D1..D`TAPS`.
- **Capture.** It samples those copies on the same rising clock edge,
  into Q1..Q`TAPS`.
- **What Q2 shows.** D2 is the line as it was `TAPS × TAP_DELAY_PS`
  before the edge. Q2 therefore differs from Q0 exactly when the line
  changed inside that *detection window* before the sampling edge.
- **Compare.** On the falling edge, the monitor compares Q0 with the last
  tap. A mismatch sets **Warning**.
- **Clock gating.** The monitor's clock is `clk & enable & ~warning`. A
  warning therefore freezes Q1..Q`TAPS` with the pattern that caused it,
  until the host reads it. A disabled monitor captures nothing.
- **Severity.** Q1 is read out but not compared. `Out` = {Q2, Q1} holds
  the raw captured values. When Warning is set, Q2 differs from Q0, so Q0
  is the inverse of Q2 and the host needs only `Out` to grade the
  violation. With two taps:

  | Out (Q2 Q1) | meaning |
  |---|---|
  | `10` or `01` | only Q2 saw the old level: the edge came between one and two delays before sampling (mild) |
  | `11` or `00` | Q1 saw the old level too: the edge came less than one delay before sampling (severe) |

  For example, a late rising edge with a mild violation reads `01`, and a
  late falling edge with a mild violation reads `10`.

- **Reset.** `rst` clears the flip-flops. It comes from the Ack register
  (see below).

**Reset release.** Releasing `rst` is re-timed to the next falling edge
of the monitor clock by one extra flip-flop (`rst_hold`). This is a
choice of this design. Without it, a host could release Ack while the
capture clock is high. The next falling edge would then compare Q0 with
the cleared Q2 and raise a false warning. The fault-injection testbench
produced exactly that false warning before the change.

**Size.** The monitor is 4 flip-flops and 3 gates after synthesis with
yosys. Its IJTAG segment adds about 30 generic cells.

**Clock for each link.** The monitor clock must be the clock that the
receiver really samples with:

- **UART.** The receiver oversamples 16 times, but it also produces an
  explicit capture clock `cap_clk`. That clock is high for half a bit,
  starting at the middle of every data, parity and stop bit. There is no
  pulse for the start bit, so a frame has 11 pulses. The receiver's
  flip-flop samples the raw line on the rising edge of `cap_clk`.
- **SPI.** The monitor runs on SCLK, and the slave samples MOSI on the
  rising SCLK edge.

**Delay chain.** `irf_delay_chain` is a *behavioural model* with
transport delays, so it passes short pulses. It is not synthesizable.
For silicon or an FPGA, replace it with delay cells that set the wanted
window. The default is 2 × 50 ns = 100 ns against a 333 ns bit, chosen
here. The design does not depend on any other property of the chain.

## Reading the monitors: the IJTAG segment

Each monitor sits behind its own segment (`irf_wrapped_monitor`):

```
 SI ─┬─► Warning ───────────────────────► mux 0 ─┐
     └─► Out[0] ─► Out[1] ─► Ack ───────► mux 1 ─┴─► SIB ─► SO
                                                   (update bit selects the mux)
```

**Segment insertion bit (SIB).** The SIB is the cell nearest SO, and its
update bit resets to 0.

- **SIB closed (0).** The segment is two bits long, Warning then SIB.
  Polling many monitors therefore costs 2 bits each.
- **SIB open (1).** The segment is four bits long: Out[0], Out[1], Ack,
  SIB.

**Cells.**

- Warning, Out[0] and Out[1] are capture-only cells.
- Ack is a read/write cell. Its update bit drives the monitor's reset.

**Timing.** Cells capture and shift on rising `tck`. Update registers
load on falling `tck` during Update-DR. The IJTAG reset (TAP
Test-Logic-Reset) has two effects:

- it closes the SIB and clears Ack;
- it holds the monitor in reset, which gives the monitor a defined state
  after power-up. This is a choice of this design.

**Network.** `ijtag_network` chains `N_MON` segments in series, with
monitor 0 nearest TDI. On the board top, monitor 0 watches the UART link
and monitor 1 the SPI link.

**TAP controller.** `jtag_tap` is the IEEE 1149.1 16-state TAP
controller:

- the IR is 4 bits wide and captures `0001`;
- the IJTAG instruction is `1000`, which selects the network as the data
  register;
- every other value, including the reset value `1111`, selects a 1-bit
  BYPASS register;
- TDO changes on the falling edge of TCK.

The TAP drives the client controls `{sel, ce, se, ue, rst}` in the
`ijtag_ctrl_t` struct:

- `ce` in Capture-DR;
- `se` in Shift-DR;
- `ue` in Update-DR;
- `rst` in Test-Logic-Reset.

### Host procedure

The host first loads IR = `1000`. It then repeats the following steps.
The bit counts are for the default network of two monitors. The first
bit out of TDO is the cell nearest TDO.

1. **Poll.** All SIBs are closed, so shift 4 bits. TDO gives, in order:
   - SIB 1;
   - Warning 1;
   - SIB 0;
   - Warning 0.

   Shift in zeros to keep the SIBs closed.
2. **Open.** For a monitor *k* that reports a warning, shift again with
   a 1 placed so that it lands in SIB *k*. Its segment is now 4 bits.
3. **Read and acknowledge in one scan.** This scan returns Ack, Out[1]
   and Out[0] of monitor *k*. It also writes Ack = 1 and keeps SIB *k* at
   1. Ack = 1 clears the monitor and holds it in reset.
4. **Release.** Write Ack = 0. The monitor re-arms at its next falling
   clock edge.
5. **Close.** Write SIB *k* = 0.

The testbenches contain a host model (`scan`, `net_scan`, `service`,
`poll` tasks) that does exactly this.

## The example links

| | UART (`uart_tx`, `uart_rx`) | SPI (`spi_master`, `spi_slave`) |
|---|---|---|
| Rate | 3 MBd = 48 MHz / 16 | SCLK 3 MHz = 48 MHz / 16 |
| Frame | start, payload LSB first, 2 stop bits | `cs_n` low, payload LSB first on MOSI, mode 0 |
| Payload (`CODE_PARITY`) | 8 data bits + even parity | 8 data bits + even parity |
| Payload (`CODE_HAMMING`) | 2 × Hamming (7,4), low nibble first | same |
| Frame check | a stop bit read as 0 sets `frame_err` | a bit count ≠ frame size sets `frame_err` |
| Monitor clock | `cap_clk` from the receiver | SCLK |

The Hamming code word is sent in the order p1 p2 d0 p3 d1 d2 d3 (bit 0
first), with:

- p1 = d0^d1^d3;
- p2 = d0^d2^d3;
- p3 = d1^d2^d3.

The Hamming code is used only to **detect** errors. Any non-zero
syndrome sets `parity_err`, and nothing is corrected. `frame_encoder` and
`frame_decoder` hold the coding, and `irf_pkg` holds the shared
functions and types.

**UART receiver.** The receiver:

- finds the start edge on a synchronised copy of the line;
- checks the start bit again half a bit later;
- raises `cap_clk` at mid-bit, with a fixed compensation for the
  synchroniser delay;
- after a frame, waits for the line to be high before it looks for the
  next start bit.

**SPI slave.** The slave samples in the SCLK domain into a shift
register and advances a free-running edge counter. Nothing there needs a
reset. Only `cs_n` crosses into `clk`. On the rising edge of `cs_n`:

- the frame's bit count is the counter's difference from its value at
  the previous frame end;
- the payload is the top bits of the shift register;
- both are decoded, and `rx_valid` follows 3 `clk` cycles later.

A frame with no SCLK edge has a bit count of 0 and is flagged as a frame
error. The first SCLK edge must come at least three `clk` cycles after
`cs_n` falls. The master here gives eight. The counter has 5 bits, so frames of 32 or more edges are counted
modulo 32.

`uart_tx` and `spi_master` take a byte with a `valid`/`ready` handshake.

## Top level: `irf_board_top`

The top holds, for each link:

- its transmitter;
- its receiver;
- a delay chain;
- a monitor.

The two monitors form one IJTAG network behind the TAP.

**Parameters.**

| Parameter | Default | Meaning |
|---|---|---|
| `CLKS_PER_BIT` | 16 | clocks per UART bit and per SCLK period |
| `CODE` | `CODE_PARITY` | payload code for both links |
| `TAPS` | 2 | delay elements and flip-flops per monitor |
| `TAP_DELAY_PS` | 50000 | delay per element |

**Port groups.**

- **System:** `clk` (48 MHz) and `rst_n` (asynchronous, active low).
- **UART transmitter side:** `uart_tx_data/valid/ready` and `uart_txd`.
- **UART receiver side:** `uart_rxd` and `uart_rx_busy/data/valid/parity_err/frame_err`.
- **SPI master side:** `spi_tx_data/valid/ready` and
  `spi_sclk_o/cs_n_o/mosi_o`.
- **SPI slave side:** `spi_sclk_i/cs_n_i/mosi_i` and
  `spi_rx_busy/data/valid/parity_err/frame_err`.
- **Monitors:** `mon_enable[1:0]` enables each monitor. `mon_warning[1:0]`
  copies the Warning flags for observation.
- **JTAG:** `tck`, `tms`, `tdi`, `trst_n`, `tdo` and `tdo_en`.

Each link leaves the chip on its `_o`/`txd` ports and comes back on its
`_i`/`rxd` ports. The board trace, or a fault injector, sits between the
two. On a real board, the transmitter is usually on another chip. Only
MOSI is monitored on SPI. SCLK and CS are taken as clean.

**Enable.** `mon_enable` is a plain input. The monitor's clock gate uses
it, but the JTAG path has no register for it. If the enable must come
over JTAG, add a read/write cell next to Ack.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench:

- prints `TB_RESULT checks=N failures=M`;
- has a watchdog;
- ends with `$finish`.

Run one with Verilator 5, for example:

```
verilator --binary --timing rtl/irf_pkg.sv rtl/irf_monitor.sv tb/tb_irf_monitor.sv \
          --top-module tb_irf_monitor -o sim && obj_dir/sim
```

For the system-level benches, pass every `rtl/*.sv` file (package
first) plus `tb/irf_line_model.sv`.

### Line model

`tb/irf_line_model.sv` stands in for the faulty board trace:

- **Model.** The receiver input is a 200 pF node, charged through the
  injected series resistance. The node is stepped every 1 ns, and the
  receiver reads 1 above half the supply.
- **Delay.** This gives about 0.139 ns of edge delay per ohm.
- **Consequences.** With the 100 ns window and a 167 ns half-bit margin:
  - warnings start at about 480 Ω;
  - bit errors start at about 1.2 kΩ.

The capacitance was chosen to put those thresholds where faults of this
kind are typically seen. It is a model, not a measurement.

### Testbenches

| Testbench | What it shows |
|---|---|
| `tb_irf_monitor` | Random edge positions against the window, with expected Warning/Out computed independently. Covers gating, sticky warning, reset release in both clock phases and enable. |
| `tb_irf_delay_chain` | Per-tap delay, and short pulses surviving the chain |
| `tb_frame_encoder`, `tb_frame_decoder` | Both codes against independently computed payloads and checks, frame-size rule |
| `tb_uart_tx`, `tb_uart_rx` | Line value at every mid-bit, frame time of (1 + payload + 2) × 16 cycles, 11 capture pulses per frame, captured bit equal to the line, parity and stop-bit errors |
| `tb_spi_master`, `tb_spi_slave` | Mode-0 timing and bit order, 9 or 14 edges per frame, SCLK period, flipped bits, frames with 8 or 10 edges |
| `tb_irf_wrapped_monitor`, `tb_ijtag_network` | Path lengths of 2 and 4 bits, cell order, Ack clear and re-arm, reset |
| `tb_jtag_tap` | State machine, IR capture value, BYPASS, IJTAG selection |
| `tb_irf_board_top` | The whole top at its default parameters. Faults are injected in the middle of frames at 200, 650, 1000, 2000 and 2500 Ω, and the host procedure reads severity 1 and 2, wrong data and frame errors. Also covers the disabled monitor and clean traffic. It counts each mechanism and fails on one that never happened. |
| `tb_measured_examples` | The two measured example cases of the monitor at default parameters, described below |
| `tb_fault_campaign` | Statistical campaign, described below |

### Measured example cases

`tb_measured_examples` replays two example cases that were measured on
hardware with this kind of monitor.

**UART case.** The bit stream `10101100` is sent as data bits in sending
order, so the byte is 0x35. A burst of three pulses hits the line. Times
are counted from the start-bit edge:

| Pulse | Time | What it covers | Delay | Result |
|---|---|---|---|---|
| 460 Ω | 1.80–2.60 µs | a falling data edge | 64 ns | too little for the 100 ns window, no warning |
| 535 Ω | 3.20–3.75 µs | the rising parity-to-stop edge | 74 ns | Warning, Out = `01` |
| 1720 Ω | 4.00–4.60 µs | the idle line, no edge | none | no effect |

The byte arrives intact, with no parity or frame error. This is the case
the monitor exists for: a timing violation that no error check sees.

**SPI case.** A single 580 Ω pulse of 0.56 µs covers one falling MOSI
edge. The delay is 80 ns against a 167 ns half period. Result: Warning,
Out = `10`, and the byte arrives intact.

The testbench also checks, from the transmitted waveform, that each
pulse covers exactly the edges listed.

### Fault campaign

`tb_fault_campaign` uses two boards in one JTAG chain:

- one board with parity frames;
- one board with Hamming frames.

**Injections.** On all four lines, every round injects a random burst:

- 1–5 pulses of 1 Ω–2.5 kΩ;
- each pulse active for 0.2–1.5 µs;
- 0.2–1.0 µs at 1 Ω between pulses;
- 1–20 µs of safe time after the burst.

Random bytes flow all the time. After each round, the host polls and
acknowledges over JTAG.

**Results.** One run of 4000 injections per line gave:

| Board, link | logic errors | flagged by parity/frame | not flagged | warnings | warning only |
|---|---|---|---|---|---|
| parity, UART | 1683 (42 %) | 1270 | 413 (25 % of errors) | 2227 (56 %) | 995 |
| parity, SPI | 2005 (50 %) | 1601 | 404 (20 % of errors) | 2487 (62 %) | 1069 |
| Hamming, UART | 1159 (29 %) | 1140 | 19 (2 % of errors) | 2336 (58 %) | 1192 |
| Hamming, SPI | 1045 (26 %) | 1043 | 2 (0.2 % of errors) | 2432 (61 %) | 1229 |

**Reading the results.** The pattern is the expected one:

- the monitor warns on more than half of the injections;
- about a quarter of the injections give a warning with no error at all;
- Hamming frames leave far fewer logic errors undetected than single
  parity.

The absolute rates depend on the line model.

**Run time.** The campaign takes about 2 minutes of Verilator time. Raise
`N_INJ` for more injections; nothing in the design limits the count.

## Limits and departures

- **Delay chain.** The delay chain is behavioural. The detection window
  must be set with real delay cells and checked with timing analysis in
  the target technology.
- **Enable.** Monitor enable is a pin, not a JTAG register (see above).
- **Extra resets.** These are choices of this design:
  - the re-timed reset release in the monitor;
  - the monitor reset taken from the IJTAG reset.
- **Fixed choices.** Also chosen here, and changeable in the RTL:
  - the IR width and the IJTAG opcode;
  - the Hamming bit order;
  - the 48 MHz system clock;
  - the handshakes.
- **No error correction.** Hamming frames are checked only. No error is
  corrected.
- **No host software.** There is no host software. Keeping warning
  history and classifying faults as transient, intermittent or
  permanent is left to the host. The testbench host model shows only
  the scan sequence.
- **No measurements.** The RTL comes with no area or power numbers. The cell
  counts above are generic yosys cells.

## Files

| File | Content |
|---|---|
| `rtl/irf_pkg.sv` | shared types (`code_e`, `ijtag_ctrl_t`), payload lengths, Hamming functions |
| `rtl/irf_monitor.sv` | the monitor core |
| `rtl/irf_delay_chain.sv` | behavioural delay chain |
| `rtl/irf_wrapped_monitor.sv` | monitor plus IJTAG segment (SIB, Warning, Out, Ack) |
| `rtl/ijtag_network.sv` | chain of wrapped monitors |
| `rtl/jtag_tap.sv` | TAP controller, IR, BYPASS |
| `rtl/frame_encoder.sv`, `rtl/frame_decoder.sv` | parity / Hamming payload coding and checks |
| `rtl/uart_tx.sv`, `rtl/uart_rx.sv` | UART link with capture clock |
| `rtl/spi_master.sv`, `rtl/spi_slave.sv` | SPI mode-0 link |
| `rtl/irf_board_top.sv` | top level |
| `tb/irf_line_model.sv` | RC model of a trace with a series fault |
| `tb/tb_*.sv` | testbenches |
