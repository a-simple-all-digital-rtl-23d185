# All-digital PET data acquisition front end

In a positron emission tomography (PET) scanner, each detected photon produces a
short charge pulse. Its energy and arrival time have to be measured. Conventional
front ends do this with analog circuits:
- a shaper with a single peak sample for the energy;
- a constant-fraction discriminator for the time.

These circuits are hard to calibrate across thousands of channels, and hard to
change later. This design moves the measurement into digital logic:

- The pulse is sampled at **1.5 GS/s** with an 8-bit ADC.
- A comparator at a small reference voltage opens and closes a capture window.
  Only the samples inside the window are kept.
- A **Nutt-interpolation time-to-digital converter (TDC)** time-stamps the
  comparator's rising and falling edges. It uses two delay lines and a main-clock
  counter, and resolves about 200 ps against a 75 MHz system clock. No
  constant-fraction discriminator is needed.
- A small processor per channel (**DSPU0**) turns the samples and time stamps into
  an event record: energy, peak, time over threshold, start and stop times.
- The records from several channels go into a **PCI interface board**. On that
  board, a 32K-word FIFO and a CPLD controller feed a PCI bridge, which moves the
  data to a PC by DMA.

The RTL covers the digital path from ADC codes and comparator output to the PCI
bridge's local bus. The ADC, comparator, PCI bridge and PCs are external parts.
Their signals are ports of the top module `pet_daq_top`.

```
            ┌──────────────────────── sampling_unit (one per detector channel) ─────────────────────┐
 ADC code ─▶│ adc_capture ─▶ async_fifo (ADC, 1.5 GHz → 75 MHz) ─┐                                    │
 comparator▶│      ▲ gate                                        ├─▶ dspu0 ─▶ 4-word event records ──┼─┐
            │      └──────── tdc (start = comparator ↑,          │                                    │ │
            │                     stop  = comparator ↓) ─▶ async_fifo (TDC words) ─┘                  │ │
            └──────────────────────────────────────────────────────────────────────────────────────────┘ │
 tdc_main_counter (75 MHz system time, shared) ──▶ all units                                             │
                                                                                                          ▼
            su_merge (round robin, whole records) ─▶ pci_board: async_fifo 32K x 32 ─▶ cpld_ctrl ─▶ PCI9054 local bus
```

## Timing a pulse: the Nutt TDC

This is the subtle part of the design (`rtl/tdc.sv`, `rtl/tdc_delay_line.sv`).

**Coarse time.** `tdc_main_counter` counts main-clock periods (T = 13.33 ns at
75 MHz). A count value *n* labels the clock edge at which the counter became *n*.

**Fine time.** Each TDC input (Start, Stop) has its own delay line:

1. An input flip-flop with D tied high is set by the input edge.
2. A second flip-flop copies it at the next main-clock edge. Its output is `hit`.
3. The input flip-flop's output runs down a chain of τ1 delays. `hit` runs down a
   chain of τ2 delays.
4. Each of the 126 cells holds a flip-flop. The i-th tap of the `hit` chain clocks
   it, and it records whether the i-th tap of the input chain has already risen.

The clock signal gains τ1 − τ2 per cell on the input signal. The number of fired
cells is therefore

    fine = floor((t_clock_edge − t_edge) / (τ1 − τ2))

This is a thermometer code of the time from the edge to the next clock edge. The
fine code is the count of ones, so a bubble in the thermometer costs at most one
LSB. The defaults give τ1 − τ2 = 196 ps for the start line and 256 ps for the stop
line. One 75 MHz period then spans 68 and 52 cells, which are the active-cell
counts the hardware was characterised with.

**Putting it together.** An edge's absolute time is

    t = edge(COARSE) − FINE × LSB          (one LSB after the true time at most)

and the start-to-stop interval is

    (STOP_COARSE − START_COARSE) × T + START_FINE × 196 ps − STOP_FINE × 256 ps

**Control sequence.** All control runs in the main-clock domain:
1. A line's `hit` rises on the clock edge after its input edge.
2. On the next edge, the fine code and the current count are captured.
3. When both lines have captured, the output multiplexer emits four tagged words
   on four consecutive clocks:

| tag | word                                   |
|-----|----------------------------------------|
| 0   | start fine code (fired cells)          |
| 1   | count at the clock edge after Start    |
| 2   | stop fine code                         |
| 3   | count at the clock edge after Stop     |

4. Both lines are then held in reset for `CLEAR_CYCLES` (3) clocks.

The reset has to last that long for a physical reason: the edge still travelling
down the τ1 chain (126 × 276 ps ≈ 35 ns) must leave the line before it can time the
next edge. The TDC is therefore blind for about 10 clocks (≈130 ns) after a stop
edge.

A stop edge with no start edge is discarded, and the stop line re-armed. This
happens when a pulse is already under way at reset.

The start flip-flop is clocked only by its input. An asynchronous reset that is
already high at power-up therefore has no edge to clear it. Its value at power-up
is declared as 0, the value FPGA registers have when they power up. The cell
flip-flops get the same declaration.

`tdc_delay_line` is a **behavioural model**: its `#` delays stand for FPGA carry
and routing delays, which cannot be synthesised from RTL. On a real FPGA this cell
is placed by hand, and each cell's actual delay is found by calibration. The
code-density testbench shows that calibration step.

## Sampling and event records

**Capture window (`adc_capture`, sampling clock).**
- The comparator output is asynchronous. Two flip-flops bring it into the
  sampling-clock domain, so the kept window lags the comparator by two samples.
- Each sample is held one cycle before it is written. This lets the final sample
  of a pulse carry a `last` flag.
- If the ADC FIFO is full:
  - the held word waits;
  - newer samples are dropped, and `adc_overflow` pulses;
  - a pulse that ends while its word waits still gets its `last` flag.
- The synchroniser resets to "high". A pulse present when reset is released shows
  no rising edge, so it is skipped whole, just as the TDC skips its stop edge.
  This keeps samples and time stamps paired.

**FIFOs (`async_fifo`).** Dual-clock, Gray-coded pointers with two-flop
synchronisers, first-word-fall-through output. The same module serves as:
- the ADC FIFO: 1024 × 9 bits, 1.5 GHz → 75 MHz;
- the TDC FIFO: 16 × 34 bits;
- the board FIFO: 32768 × 32 bits, 75 MHz → 40 MHz.

**DSPU0 (`dspu0`, main clock).**
1. Reads one pulse's samples up to `last`.
2. Reads the pulse's four TDC words, checking the tag order (`tag_error`).
3. Sends a 4-word record:

| word | bits                                                                 |
|------|----------------------------------------------------------------------|
| w0   | `[31:27]` unit id, `[26:19]` peak sample, `[18:0]` energy            |
| w1   | start coarse count                                                   |
| w2   | `[29:23]` stop fine, `[22:16]` start fine, `[15:0]` number of samples |
| w3   | stop coarse count                                                    |

The estimators are deliberately the simplest ones:
- energy = Σ max(0, sample − 128): the baseline is mid-scale of the ±250 mV ADC,
  for positive pulses; the sum saturates at 19 bits;
- peak = largest sample;
- time over threshold = number of samples.

More elaborate pulse-shape or pile-up algorithms would replace this module.

**Pairing rule.** Samples and TDC words are paired by order. Two conditions keep
them aligned:
- a pulse must be longer than one sample period;
- a pulse must start after the TDC's dead time following the previous pulse.

Pile-up closer than about 130 ns breaks the pairing. This design does not detect
that case.

## PCI interface board

The board FIFO (`pci_board`) decouples the sampling units from the host. `su_merge`
writes into it at 75 MHz. It grants one unit at a time, round robin, and keeps the
grant until that unit's `last` word has passed, so records are never interleaved.
`full` stalls the units. When stalled:
1. the DSPU0s stop;
2. then the ADC FIFOs fill;
3. then samples are dropped.

`cpld_ctrl` is the local-bus slave and arbiter for the PCI bridge (a PCI9054 in
C mode). The bridge is the DMA master:

- `LHOLD` is answered by `LHOLDA` one clock later.
- `ADS#` low for one clock starts an access. `LW/R#` gives the direction.
- In read data phases, `READY#` is low whenever the FIFO holds a word, with that
  word on `LD`. The word is popped at the clock edge.
- An empty FIFO inserts wait states (`READY#` high).
- The access ends at the edge where `READY#` and `BLAST#` are both low.
- Writes are acknowledged and discarded.
- `DREQ#` is low while the FIFO is not empty, for demand-mode DMA.

`READY#` and `LD` follow the first-word-fall-through FIFO combinationally, so a
burst moves one word per 40 MHz clock (160 MB/s peak). In simulation with 16-word
bursts, 2 MB move at 121.9 MB/s. The prototype board was measured at 43 MB/s end
to end, a figure that includes the host's PCI side.

## Clocks and reset

| clock        | frequency | domain                                              |
|--------------|-----------|-----------------------------------------------------|
| `sample_clk` | 1.5 GHz   | `adc_capture`, ADC FIFO write side                  |
| `main_clk`   | 75 MHz    | counter, TDCs, DSPU0s, `su_merge`, board FIFO write |
| `lclk`       | 40 MHz    | board FIFO read side, `cpld_ctrl`                   |

`rst_n` is active low and asynchronous, and is shared by all domains. It should be
released synchronously to each clock. `time_clr` zeroes the shared counter on the
next main-clock edge, which gives all units a common time origin.

## Where this RTL departs from, or adds to, the original system

- **Added.** Everything below the block level is this design's own:
  - the word formats and record layout;
  - the TDC output sequencing and dead time;
  - the `last` flag;
  - the multi-unit merge;
  - the local-bus handshake (taken from the bridge's public protocol, not from a
    published CPLD design);
  - the FIFO depths of the sampling unit;
  - the DSPU0 estimators.
- **Main clock.** Taken as 75 MHz. The TDC block diagram labels its clock 80 MHz,
  but 75 MHz is the stated system clock and the frequency the TDC was measured at.
- **Delay line length.** 126 cells, as drawn. A count of 127 also appears in the
  description of the calibration; with 1 ≤ K < P < 127 both allow at most 126
  active cells.
- **Inactive cells.** In the measured hardware some cells at the start of a line
  never fired, because of routing offsets; one line lost 6 at its start. The model's
  delays are ideal. Its active cells always begin at cell 1 and end where one
  clock period runs out (cell 68 or 52). A real line needs the calibration
  offsets K, found by the code-density test, subtracted from the fine code. This
  RTL does not apply them.
- **Vernier reading.** The delay cell's drawing shows two delays and a flip-flop,
  but not which chain clocks the flip-flop. The Vernier reading was chosen. The
  split of each line's LSB into τ1 and τ2 is assumed.
- **Board FIFO width.** The original board uses a 32K × 36 FIFO chip with 32 data
  bits connected. It is modelled here as a 32K × 32 RTL FIFO.
- **Number of units.** `NUM_SU` defaults to 2, as on the prototype board. The
  complete system would connect 4 to 32 units per board. The id field allows 32,
  but bus bandwidth (10 M events/s) and DSPU0 speed (one sample per main clock)
  are well short of the 60 M events/s the full system targets.
- **Not in RTL:**
  - the ADC (MAX108), the comparator (MAX9602) and the 50 Ω input termination;
  - the PCI bridge, its EEPROM and the PCI connector;
  - the singles-processing PC (energy calibration, time-stamp synchronisation
    across boards, block-detector positioning);
  - the network link;
  - the coincidence PC.

  These are chips or software; the original system describes no logic for them.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog.

| testbench                 | what it establishes                                                                                                                                                                                              |
|---------------------------|------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------------|
| `tb_async_fifo`           | order and integrity across unrelated clocks; full at the depth; drains to empty                                                                                                                                 |
| `tb_tdc_delay_line`       | `hit` timing; thermometer shape; the fine-code law for 300 random start times; reset                                                                                                                             |
| `tb_tdc_main_counter`     | increment, synchronous clear, wrap, reset                                                                                                                                                                        |
| `tb_tdc`                  | all four words against edge times; tag order; consecutive output; interval rebuilt within one LSB; dead time; orphan stop ignored                                                                               |
| `tb_tdc_code_density`     | the calibration test: uniformly random edges give 68 / 52 active cells, 196.1 / 256.4 ps mean resolution, accumulated error below 0.02 LSB (7,000 intervals; 70,000 is the usual count but takes about 15 minutes) |
| `tb_adc_capture`          | window placement; `last` flag; back-pressure and overflow; pulse at reset release skipped                                                                                                                       |
| `tb_dspu0`                | records against independently computed energy, peak and count, including saturation; throttled output; tag-order error                                                                                           |
| `tb_cpld_ctrl`            | local-bus protocol against a bridge model; no `READY#` on an empty FIFO; wait states; write ack; 16-word burst in 16 data clocks                                                                                |
| `tb_pci_board`            | one complete 2 MB DMA buffer through the 32K FIFO, with back-pressure; 121.9 MB/s                                                                                                                                |
| `tb_sampling_unit`        | 40 exponential pulses (40 ns decay) against a reference front-end model; energy, peak and count exact; both time stamps within one LSB of the true crossings                                                    |
| `tb_pet_daq_top`          | two units, board FIFO reduced to 256 words; every mechanism at least once (orphan stop, time clear, merge contention, board FIFO full, ADC overflow, wait states, bursts); every record checked                 |
| `tb_pet_daq_full`         | the same chain at the default size (32K board FIFO): reset with a pulse present, time clear, 70 pulses, all records checked                                                                                     |

Each testbench was also run against a deliberately broken copy of its module, and
failed.

`tb/pulse_source.sv` models a detector channel's analog front end. It is not RTL:
- exponential pulses;
- a comparator at 10 mV;
- an ideal 8-bit, ±250 mV ADC;
- a reference of what the design should report.

`tb/pci9054_local_model.sv` models the bridge's local-bus DMA master.

## Simulating

Verilator 5 with timing support is required, because the delay lines use `#`
delays. Packages go first. `-y` lets Verilator find the other modules by file
name:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/pet_pkg.sv tb/pulse_ref_pkg.sv tb/tb_pet_daq_top.sv --top-module tb_pet_daq_top
./obj_dir/Vtb_pet_daq_top
```

For a block testbench, substitute its name (`tb_tdc`, `tb_pci_board`, …).
`tb/pulse_ref_pkg.sv` is only needed by the testbenches that use `pulse_source`.
Uninitialised state is randomised (`+verilator+rand+reset+2`), and the design does
not depend on it.

Run times are dominated by the 1.5 GHz clock and the delay-line events:
- `tb_pet_daq_top`: about 15 s;
- `tb_tdc_code_density`: about 100 s;
- the others: a few seconds each.

## Parameters worth changing

| where                 | parameter                                          | default        | effect                                                         |
|-----------------------|----------------------------------------------------|----------------|----------------------------------------------------------------|
| `pet_daq_top`         | `NUM_SU`                                           | 2              | number of sampling units, up to 32                             |
| `pet_daq_top`         | `BOARD_FIFO_AW`                                    | 15             | board FIFO depth 2^AW words                                    |
| `sampling_unit`       | `ADC_FIFO_AW`, `TDC_FIFO_AW`                       | 10, 4          | per-channel buffering                                          |
| `tdc`                 | `START_TAU1_PS`/`START_TAU2_PS`, `STOP_TAU1_PS`/`STOP_TAU2_PS` | 216/20, 276/20 | model delays; resolution = τ1 − τ2                             |
| `tdc`                 | `CLEAR_CYCLES`                                     | 3              | must cover 126 × τ1                                            |
| `dspu0`               | `BASELINE`                                         | 128            | ADC code of zero volts                                         |
| `pet_pkg`             | `CELLS`, `COARSE_W`, `ENERGY_W`, …                 |                | widths shared by all modules                                   |
