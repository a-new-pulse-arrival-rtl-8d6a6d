# PATRM/PCI: a 16-channel pulse arrival-time recorder

Neutron coincidence and multiplicity counting needs the arrival time of every
detector pulse, not just a count. The analysis can then run any
time-correlation algorithm on the same raw data afterwards. This recorder takes
up to 16 detector signals. Each pulse becomes an *event*:

* a 32-bit time mark (which time bin the pulse fell in);
* a 16-bit channel word (which channels fired in that bin);
* 16 status bits (external gate, flag, veto, overflow).

The events are buffered in an on-chip FIFO and streamed over a bus-mastering
PCI controller into host memory, so the amount of storage is set by the host,
not the card. Alongside the recording, a 32-bit scaler per channel counts
every pulse. The scalers can be read and cleared while recording goes on.

The RTL here is the FPGA logic of the card. It covers the input latch, the
programmable clock, the Programmable Delay Shift Register (PDSR), the hit
detector, the Time Mark Counter (TMC), the high-speed FIFO (HSF), the
readout state machine, the scalers with their multiplexer, and the status and
control registers. Three parts are outside it:

* the ECL line receivers, which are analog;
* the commercial PCI 2.1 bus-master controller chip;
* host memory.

The top module, `patrm_pci_top`, exposes the controller's add-on side as two
plain ports.

## How a pulse becomes an event

Everything runs on one base clock (`clk`, 100 MHz intended). Time advances in
*ticks*: one-cycle enables from `prog_clock`. Either a tick comes every
CLKDIV+1 base cycles, or each rising edge of the external clock makes one.
At 100 MHz, CLKDIV = 0 gives 10 ns bins and the reset value CLKDIV = 9 gives
100 ns bins. The period between two ticks is one time bin.

```
ch_in ─ sync2 ─ edge ─┬─ & CHMASK ─ period latch ─ PDSR (32 stages, tap DELAY) ─┬─ hit detector ─ wr
                      │                                                         └─ channels ┐
                      └─ 16 scalers ─ mux ─ reg_rdata          TMC ─ tmc ┐ status word ─────┤
                                                                         └──────────► HSF (64 x 64 bit)
                                                                                        │
                                                                             readout_sm ─ pci_wdata / pci_wr
```

1. **Synchronise and detect edges** (`input_latch`). Each input goes through
   two flip-flops and a rising-edge detector. An edge sampled at clock edge
   *e* shows as a one-cycle `pulse` three edges later. Pulses go unmasked to
   the scalers.
2. **Latch one bin** (`input_latch`). Pulses of selected channels (CHMASK)
   are ORed into a sticky 16-bit latch. At each tick the latch contents go to
   the PDSR, and the latch restarts with only the pulses of that same cycle.
   So a pulse shorter than a bin is not lost, and no pulse is counted in two
   bins. Several channels firing in one bin give one event with several
   channel bits set.
3. **Delay** (`pdsr`). The latched word moves one stage along a 32-stage
   shift register per tick. The output is taken at stage DELAY, so it comes
   out DELAY+1 ticks later. This lines the recording up with external events,
   such as a gate that arrives after the detector pulses.
4. **Detect and store** (`hit_detector`, `time_mark_counter`, `hs_fifo`). In
   a tick cycle, if the PDSR output is non-zero, recording is running, and
   there is no veto, the FIFO stores `{TMC, status word, PDSR output}`. The
   TMC then moves on. The store uses the PDSR output from before the shift,
   so each word is judged once.

The resulting timing rule is what the end-to-end testbench checks:

* After a CONTROL write with RUN and CLEAR, tick number *j* carries time
  mark *j*.
* A rising edge sampled at clock edge *e* belongs to bin *k*. Tick *k* is the
  first tick at or after edge *e*+4.
* That edge is stored with time mark *k* + DELAY + 1.

The time mark is thus the end of the bin delayed by the PDSR, not the bin the
pulse arrived in. Subtract DELAY+1 for the arrival bin. The constant offset
does not affect time-correlation analysis. The 32-bit TMC wraps after
2^32 bins, which is 42.9 s at 10 ns and 429 s at 100 ns. Software can unwrap it from the order
of the events, provided at least one event arrives per wrap period.

## Readout

`hs_fifo` is 64 entries of 64 bits. It absorbs bursts while the PCI side
reads more slowly. `readout_sm` sends each event as two 32-bit words:

* first the time mark;
* then `{status[15:0], channels[15:0]}`.

The event leaves the FIFO when its first word is sent, and the state machine
holds the second word, so a FIFO clear between the two words cannot split a
pair. It writes one word per base clock while `pci_full` is low and holds in either
state while it is high. An event costs two base cycles, so the readout
sustains one event per two cycles at most. With CLKDIV = 0 and an event in
every bin, the FIFO fills at half an event per cycle, so a burst of about
128 events fits. A slower PCI side shortens that: at the PCI bus's 132
Mbyte/s, about 16.5 M events/s, a burst of about 77 events fits.

When the FIFO is full, a new event is dropped and the sticky overflow status
bit is set. That bit is then stored in every later event and shown in
STATUS until software clears it. The readout does no data compression.

## Registers

Word addresses on `reg_addr`. Writes take effect at the clock edge where
`reg_wr` is high. Reads are combinational.

| addr      | name      | access | contents |
|-----------|-----------|--------|----------|
| 0x00      | CONTROL   | r/w    | bit0 RUN, bit1 EXTCLK (tick from `ext_clk`), bit2 VETOEN; write 1 to bit3 clears the overflow flag, write 1 to bit4 clears TMC, PDSR and FIFO |
| 0x01      | CLKDIV    | r/w    | 16 bits, one tick per CLKDIV+1 base cycles (reset 9) |
| 0x02      | DELAY     | r/w    | 8 bits, delay = DELAY+1 ticks; values above 31 act as 31 |
| 0x03      | CHMASK    | r/w    | 16 bits, 1 = channel recorded (reset all ones) |
| 0x04      | STATUS    | r      | [31:16] FIFO level, [15:0] status word |
| 0x05      | SCL_RST   | w      | bit n = 1 clears scaler n |
| 0x06      | TMC       | r      | current time mark |
| 0x10-0x1F | SCALER n  | r      | count of scaler n |

Status word, stored with each event and readable in STATUS:

* bit 0: external gate;
* bit 1: external flag;
* bit 2: veto active (VETOEN and gate);
* bit 3: FIFO overflow (sticky);
* bit 4: external clock selected;
* bits 15:5: zero.

Gate and flag are synchronised with two flip-flops. The status word stored
with an event shows their levels two clock edges before the store.

Software sequence:

1. Write CONTROL = 0 to stop.
2. Set CLKDIV, DELAY and CHMASK.
3. Write CONTROL with RUN, CLEAR and CLR_OVF set, plus any mode bits.

Change DELAY only while stopped, or clear afterwards. If DELAY changes while
running, the new tap outputs old PDSR contents, which are then recorded with
the current time mark.

## Scalers

Each `scaler` counts the synchronised rising edges of one channel. It ignores
RUN, CHMASK and veto, and stops at 2^32-1. A clear through SCL_RST takes
effect at the clock edge after the write. An edge pulse arriving at that same
edge leaves the count at 1, so clearing loses no counts while recording runs. The scaler
multiplexer selects by the low four address bits.

## External clock and gate

With EXTCLK set, each rising edge of `ext_clk` makes one tick, three base
cycles after the edge. The external clock must be slower than half the base
clock, with high and low phases of at least two base cycles each. The
testbenches use phases of two to six cycles. With VETOEN set, a high `ext_gate` stops events from being stored.
Combined with DELAY, the gate can veto pulses that arrived up to DELAY+1 bins
before it.

## What follows the source design and what is this design's own

From the source design:

* 16 channels;
* the latch, PDSR, hit detector, TMC, FIFO, state machine, scaler and
  multiplexer blocks, and how they connect;
* a 32-bit TMC incremented at the programmable rate;
* a store triggered by a non-zero PDSR output;
* the 64-bit event: TMC, channel word and 16 status bits;
* scalers that can be read and cleared during recording;
* the external gate/veto, flag and clock inputs;
* 10 ns and 100 ns resolutions.

This design's own choices:

* the single clock domain with a tick enable;
* the sticky period latch;
* where channel selection acts;
* one DELAY shared by all channels;
* the depths (PDSR 32 stages, FIFO 64 entries, neither given in the source);
* the register map, status bit positions and reset values;
* the veto-enable bit;
* the two-word readout format and the add-on port protocol;
* saturating scalers.

Not built:

* The data compression that the source's state machine performs. No scheme
  is described, so events are sent uncompressed.
* A per-channel delay. The source lists "channel delay gating" as a feature
  but draws the PDSR as one 16-bit register; one delay for all channels is
  built.
* The PCI controller and its configuration space, and the ECL receivers.
  They sit outside this logic.

## Files

`rtl/`:

* `patrm_pkg.sv`: types (`event_t`, `cfg_t`), register map, status bits;
* `patrm_pci_top.sv`: top, wires the blocks;
* `input_latch.sv`, `sync2.sv`: synchronisers, edge detection, period latch;
* `prog_clock.sv`: tick generator;
* `pdsr.sv`: programmable delay shift register;
* `hit_detector.sv`: non-zero detect and FIFO write enable;
* `time_mark_counter.sv`: 32-bit TMC;
* `hs_fifo.sv`: 64 x 64-bit show-ahead FIFO with overflow pulse;
* `readout_sm.sv`: two-word readout to the PCI add-on port;
* `scaler.sv`, `scaler_mux.sv`: per-channel counters and read mux;
* `status_ctrl_regs.sv`: registers and status word.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`.

## Simulating

Each testbench builds with Verilator 5 and runs in well under a second. For
example, the end-to-end test at the default sizes:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_patrm_pci_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/patrm_pkg.sv tb/tb_patrm_pci_top.sv
./obj_dir/Vtb_patrm_pci_top
```

To run another block's test, swap in its testbench name (`tb_hs_fifo`,
`tb_pdsr`, and so on). `tb_patrm_pci_top` plays the detectors, the external
gate, flag and clock, and the PCI controller, with random backpressure. It
predicts every event from the logged input edges and ticks, using the timing
rule above, and compares them word for word. It runs five phases:

* random traffic, with gate and flag status and a scaler clear mid-run;
* DELAY = 25 with a channel mask and veto;
* FIFO overflow with the PCI side held full;
* a 120-event burst at one event per base clock;
* external clock.

It counts each mechanism and fails if one never occurred. It uses only the
top's ports: it knows when ticks happen from its own model of the
programmable clock. The unit testbenches
compare each block with a model written independently in the testbench.

The sizes are the parameters `FIFO_DEPTH` (power of two) and `PDSR_DEPTH` on
`patrm_pci_top`. The channel count and word widths are in `patrm_pkg`.
