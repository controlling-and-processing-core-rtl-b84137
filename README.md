# Controlling and processing core for an implantable telemetry system

An implant that measures physiological signals has to sample its sensors, buffer the
samples, hand them to a radio, listen now and then for commands from a base station, and do
all of that on a tiny power budget. This core is the digital part of such an implant. It is a
small controller built around one idea: **the fast clock only runs when there is work**.

- A slow 200 kHz clock is always running. It sets the pace: one ADC sample every 5 us, and a
  receive window for base-station commands every 10 ms.
- A faster 2 MHz clock drives the controller state machine. It is gated off almost all the
  time. Each slow-clock period that has work wakes it for a few cycles. The controller runs a
  short *pass* through its states and stops its own clock again.

Around that controller sit a clock manager, a mode controller (continuous, duty-cycle and
sleep modes) and a memory bank of three FIFOs, one per analog channel. The ADC, the radio and
its serial link, and the decoding of commands are outside the core. Their signals are ports
of the top module, `telemetry_core`.

```
             clk_ref 100 MHz
                  |
            +-------------+ clk_adc 20 MHz  +-------------------------------+
            | clk_manager |---------------->| fifo_bank                     |
            +-------------+                 |  adc_demux -> 3 x sync_fifo   |--> fifo_dout/valid
              |clk_hi  |clk_lo              +-------------------------------+
              |2 MHz   |200 kHz                 ^ ADC words       ^ rd_req   | full/empty
              |        +--> mode_ctrl  (tx_enable, duty_on)       |          v
              |        +--> rx_timer   (rx_phase)                 |
              |        +--> clk_enable_gen <-- sleep_req/wake_req |
              |                 | clk_enable                      |
              +--> clock_gate --+--> gclk --> ctrl_fsm -----------+--> adc_convst, send_packet,
                                                                       tx_ack, rx_radio
```

## Clocks and their phasing

`clk_manager` divides the 100 MHz reference with counters:

| clock | division | frequency | used by |
|---|---|---|---|
| `clk_adc` | 100 MHz / 5 | 20 MHz | ADC interface clock, FIFO bank |
| 10 MHz tick | 100 MHz / 10 | 10 MHz | internal only |
| `clk_hi` | 10 MHz / 5 | 2 MHz | controller state machine (through the gate) |
| `clk_lo` | 10 MHz / 50 | 200 kHz | mode control, receive timer, wake-up |

All three clocks are flip-flop outputs of the reference domain, so they are glitch-free and
have fixed phase relations. The design relies on those relations:

- `clk_adc` rises one reference cycle after a 10 MHz tick. Its rising edges never fall on a
  rising edge of `clk_hi` or `clk_lo`.
- `clk_lo` rises `LO_PHASE` = 2 ticks after `clk_hi` rises, that is while `clk_hi` is high.
  The wake-up edge and the sleep edge therefore never coincide.

Every signal that crosses between these domains is a register output of one domain. It is
sampled by another domain at edges that are at least one reference cycle (10 ns) away. No
synchronisers are used, and none are needed as long as the clocks come from `clk_manager`.
If you replace the clock source, you must keep these phase relations or add synchronisers.

## Clock gating: how the controller sleeps and wakes

This is the least obvious part of the design. Two blocks take part:

**`clk_enable_gen`** makes `clk_enable`. It holds two toggle flip-flops:

- `hi_tgl` is clocked by `clk_hi`. It toggles when the controller asks to sleep
  (`sleep_req`) while the clock is enabled.
- `lo_tgl` is clocked by `clk_lo`. It toggles when the low-clock side has work (`wake_req`)
  while the clock is disabled.
- `clk_enable = ~(hi_tgl ^ lo_tgl)`.

Each flip-flop records one kind of event, so no flip-flop is ever reset from the other
domain. After reset both are 0 and the clock is enabled, so the controller can leave its
Initialization state.

**`clock_gate`** is the usual integrated clock gate. A latch is transparent while `clk_hi` is
low, and `gclk = clk_hi & latched_enable`. A change of enable can only act at the next rising
edge and never shortens a pulse. The latch is intentional; lint tools report it as a latch.

`wake_req` is high when the low-clock side has work:

- a receive phase is open, or
- acquisition is allowed (`tx_enable`), or
- the radio is still on after its receive phase has closed, so one more pass is needed to switch it off.

### One pass

The controller `ctrl_fsm` runs on `gclk`. Its states use this encoding:

| state | code |
|---|---|
| Data Acquisition (`ST_DAQ`) | 0 |
| Receiving (`ST_RX`) | 1 |
| Sleep (`ST_SLEEP`) | 2 |
| Initialization (`ST_INIT`) | 3 |
| Main (`ST_MAIN`) | 4 |

An acquisition pass, in gated-clock pulses:

1. Sleep → Data Acquisition: `adc_convst` goes high and starts one ADC conversion.
2. Data Acquisition → Main: Main decides whether data must be sent (see below).
3. Main → Sleep: the pass is marked done.
4. Sleep with `sleep_req` high: on this edge `clk_enable_gen` clears `clk_enable`, and the
   gate lets no further pulse through.

So each woken 5 us period costs four pulses of the 2 MHz clock, 2 us of activity. The next
rising edge of `clk_lo` that brings work sets `clk_enable` again.

A receive pass is Sleep → RX → Main → Sleep on the first pass of a receive phase. In Main the
controller pulses `tx_ack`, the acknowledge to the base station, and switches `rx_radio` on.
Later passes of the same phase go Sleep → RX → Sleep. The first wake after the phase has
closed switches the radio off again. While a receive phase is open no samples are taken.

### Main: deciding what to send

Outside a receive phase, Main reads the FIFO flags and picks the FIFOs to read:

- if the base station has asked (`send_req`) and some FIFO holds data: every FIFO that is
  not empty;
- otherwise: every FIFO that is full.

If any FIFO is picked, Main pulses `send_packet` together with the read request of each
picked FIFO, for one gated-clock cycle. `send_packet` tells the link to the radio that a
packet follows on `fifo_dout`/`fifo_valid`.

## Operating modes

`mode_ctrl` runs on `clk_lo` and takes the requested mode from `mode_sel`.

| `mode_sel` | mode | acquisition (`tx_enable`, `adc_power`) |
|---|---|---|
| 0 | continuous | always |
| 1 | duty cycle | for `DC_ON` cycles, then off for `DC_OFF` cycles, repeating |
| 2, 3 | sleep | never |

- The defaults of 12,000,000 and 84,000,000 cycles are 1 minute on and 7 minutes off at
  200 kHz, a 12.5 % duty cycle.
- Entering duty-cycle mode starts a fresh on window. `duty_on` shows the window.
- In every mode, including sleep, `rx_timer` opens a receive phase every `RX_PERIOD` = 2000
  low-clock cycles (10 ms). The phase lasts `RX_WINDOW` = 20 cycles (100 us). The first phase
  opens on the first `clk_lo` edge after reset.
- During the duty-cycle off time and in sleep mode, the high clock runs only for receive
  passes and `adc_power` is low.

## Memory bank

`fifo_bank` runs on the 20 MHz ADC clock.

- The ADC is the analog-to-digital converter of the FPGA prototype. It runs its channel
  sequencer in event mode: each `adc_convst` pulse gives one conversion of the next channel.
- `adc_demux` registers each finished conversion (`adc_drdy`). It files the sample by
  channel number (`CH_ID` = 0, 1, 2). The sample is bits 15..4 of the 16-bit ADC word.
- Each channel has a `sync_fifo` of 256 words × 12 bits (384 bytes). The FIFO uses standard
  read timing: data and `valid` appear one clock after the read.
- A rising edge on a FIFO's read request starts a readout. The readout streams one word per
  20 MHz clock until that FIFO is empty. Samples written during the readout are sent too.

With the sequencer sampling at 200 kS/s in total, each channel is sampled at 66.7 kS/s. A
FIFO then fills in 256 × 15 us = 3.84 ms in continuous mode, and a readout of it takes
about 12.8 us.

## Parameters of `telemetry_core`

| parameter | default | meaning |
|---|---|---|
| `FIFO_DEPTH` | 256 | words per channel FIFO |
| `RX_PERIOD` | 2000 | low-clock cycles between receive phases (10 ms) |
| `RX_WINDOW` | 20 | low-clock cycles per receive phase |
| `DC_ON` / `DC_OFF` | 12,000,000 / 84,000,000 | duty-cycle on and off time in low-clock cycles |
| `ADC_DIV`, `MID_DIV` | 5, 10 | reference divisions for the ADC clock and the 10 MHz tick |
| `HI_DIV`, `LO_DIV` | 5, 50 | 10 MHz divisions for the high and low clocks |

`LO_DIV` must be a multiple of `HI_DIV` to keep the clock phasing described above.

## Where this design departs from its source description

- **High clock.** The source uses 2 MHz as its main processing clock, and one sentence calls
  it 1 MHz. This design uses 2 MHz. The 1 MHz value can be had with `HI_DIV = 10`.
- **Acquisition period.** The source asks for a capture every 5 us to keep up with 200 kS/s.
  Its description of the simulated continuous mode speaks of a phase every 50 us. This design
  follows the 5 us figure and runs one acquisition pass per 200 kHz period.
- **Clock-enable circuit.** The source's circuit has two flip-flops, one on each clock, fed by
  a single `sleep` signal, with outputs `clk_enable` and `sleep_state`. This design keeps one
  flip-flop per clock and the same two outputs. It makes them toggle flip-flops with separate
  sleep and wake requests, so each clock owns exactly one kind of edge of `clk_enable`.
  `sleep_state` is simply the inverse of `clk_enable`.
- **Main → Initialization.** The source's state diagram links Main and Initialization without
  a condition. Here Initialization is entered only at reset.
- **Readout length.** The source says the FIFOs are read when full or on request, but gives no
  burst length. Here a readout drains the FIFO until it is empty.
- **FIFO size.** The source gives a 384-byte memory block. It is taken as 256 × 12 bits per
  FIFO.
- **Receive window.** The source opens the receiver every 10 ms and also calls the receiving
  interval 10 ms. Both are read as the period. The window length is not given; 20 cycles
  (100 us) is this design's choice.
- **Clock synthesis.** The prototype's frequency synthesizer is replaced by counters. Its
  global clock buffer with enable is replaced by the latch-based gate.
- **Outside the core.**
  - The ADC: a behavioural model is in `tb/xadc_model.sv`.
  - The serial link to the RF front end.
  - The decoding of base-station commands.

  Their signals are ports. `mode_sel` and `send_req` stand for already-decoded commands.

## Files

| file | contents |
|---|---|
| `rtl/telem_pkg.sv` | state and mode enums, channel count, widths |
| `rtl/telemetry_core.sv` | top level |
| `rtl/clk_manager.sv` | clock dividers and phasing |
| `rtl/clk_enable_gen.sv`, `rtl/clock_gate.sv` | clock gating |
| `rtl/ctrl_fsm.sv` | function state machine and Main decision |
| `rtl/mode_ctrl.sv`, `rtl/rx_timer.sv` | operating modes, receive timer |
| `rtl/fifo_bank.sv`, `rtl/adc_demux.sv`, `rtl/sync_fifo.sv` | memory bank |
| `tb/xadc_model.sv` | ADC model: 78 DCLK cycles per conversion, channel sequence 0, 1, 2 |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/tb_telemetry_core.sv` | end to end at reduced sizes. Goes through every mode and counts each mechanism. |
| `tb/tb_telemetry_core_full.sv` | end to end at default sizes, about 10.3 ms of operation |
| `tb/tb_workload_sine.sv` | a 20 kHz sine on channel 0, checked by a discrete Fourier transform of one FIFO readout |

In `tb/tb_telemetry_core.sv`, the reduced sizes are 8-word FIFOs, a 40-cycle receive period
and a 30/50-cycle duty cycle. The mechanisms it counts are:

- acquisition passes;
- first and later receive passes;
- reads of full FIFOs and reads on request;
- clock-off periods;
- duty-cycle off windows;
- receive passes in sleep mode;
- radio switch-offs.

The full-size testbench `tb/tb_telemetry_core_full.sv` runs about 10.3 ms, mostly in continuous mode. It checks that:

- a FIFO fills after 3.84 ms;
- each FIFO reads out 256 words;
- two receive phases open 10 ms apart;
- a convert start comes every 5 us, with four gated-clock pulses per pass;
- a send request reads out every FIFO;
- in sleep mode, the gated clock and the conversions stop.

The 8-minute duty cycle at its default length is not simulated.

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog if
it hangs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/telem_pkg.sv \
    tb/tb_telemetry_core.sv --top-module tb_telemetry_core
./obj_dir/Vtb_telemetry_core
```

Replace the testbench name to run another one. Each testbench file is self-contained.
Verilator finds the modules it needs in `rtl/` and `tb/` through the `-I` paths. The
assertions in the RTL check the following rules:

- reads only go with `send_packet`;
- `sleep_req` is raised only in Sleep;
- the clock stops only in Sleep;
- the FIFO occupancy stays in range;
- at most one FIFO is written at a time.

Verilator reports the FIFO reset nets as used both synchronously and asynchronously. That
comes from the `disable iff` of the assertions and is harmless.
