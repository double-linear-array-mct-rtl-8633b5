# Double 32-element MCT line-array front end: timing controller and channel models

Two linear arrays of 32 mercury-cadmium-telluride (MCT) infrared sensors
watch a pulsed laser that fires at 1 kHz. Every sensor has its own analog
channel: an AC-coupled low-noise preamplifier (gain about 100), then a gated
integrator that collects the pulse for a few microseconds and holds the
result. Two 32-to-1 analog multiplexers then turn the 64 held values into two
CCD-like serial streams, a "signal" line and a "reference" line. Each stream
passes a buffer amplifier of gain 2 or 20 and is converted by a two-channel
16-bit ADC board.

Everything in that chain that switches is timed by one small piece of digital
logic, originally a 64-macrocell CPLD. This repository holds that logic as
synthesizable SystemVerilog. It:

- opens and closes the integration gate of all 64 integrators;
- decides when they are read out and reset;
- steps the multiplexer address;
- tells the ADC when to convert;
- selects the output gain;
- closes the clock PLL loop by dividing its output by 1000.

Around it sit behavioural models of the analog channel (preamplifier, gated
integrator, multiplexer, output buffer), written with `real` signals and
delays. The top module `mct_frontend` connects 64 channels, the two
multiplexers, the two buffers and the controller, so a whole acquisition, from
sensor voltage to the two serial outputs, can be simulated. The analog models
are for simulation only; they are not meant for synthesis.

## Time base

A 74HC4046-type PLL locks on the 1000th harmonic of the laser trigger, so the
controller clock `clk` runs at 1 MHz and one cycle is 1 µs. A modulo-1000
counter (`phase`, 0..999) gives the position inside the 1 ms trigger period.
Its registered decode of phase 0, `ckout`, goes back to the PLL phase
comparator. When the loop is locked, the rising edge of `ckout` coincides with
the trigger edge, so every event below is at a fixed delay from the laser
pulse.

## One trigger period

The integrator switches are active low: 0 means the switch is closed.

- `c0` connects the preamplifier to the integrator: 0 = run, 1 = hold.
- `c1` controls the reset switch across the integration capacitor: 1 = integrate, 0 = reset.

With the default parameters a read-out period looks like this (all times in
µs of phase):

| phase | event | outputs |
|---|---|---|
| 2 (STARTINT) | gate opens | `c0`=0, `c1`=1 |
| 7 (STOPINT) | gate closes, value held | `c0`=1 |
| 9 (STOPINT+MUXDELAY) | multiplexer scan starts | `trgout` rises |
| 14 + 20k, k = 0..31 | ADC conversion of sensor k | `sample` pulse, `ad`=k |
| 649 | scan done (32 x 20 µs) | `trgout` falls |
| 800 (RESETTIME) | integrators and scan reset | `c1`=0 until the next gate |

This gives the 5 µs integrate, about 800 µs hold and 200 µs reset cycle of
the channel design.

The gate and reset events change on the falling clock edge, half a cycle
after `phase` reaches the programmed value. The constants are compared for
equality, so a gate may straddle the end of the period: STARTINT = 998 with
STOPINT = 8 gives a 10 µs gate that opens before the trigger.

### Multiplexer addressing

Each 32-to-1 multiplexer is built from two 16-to-1 analog multiplexers.
`ad[3:0]` drives the address of both halves. `ad[4]` enables one half and
`ad4n` the other. Which sensor a given address reaches is fixed by the board
wiring.

A 5-bit prescaler counts the MUXTIME = 20 µs dwell time. Each time it wraps,
it steps a 6-bit address counter. The top bit of that counter is a stop
flag: it is set after the 32nd sensor and freezes the scan until the next
reset.

`sample` is a one-cycle pulse SAMPLE_DELAY = 5 µs after each address change,
which lets the analog path settle before conversion. That gives one ADC
trigger every 20 µs, so 50 kS/s per output. `trgout` stays high for the
whole scan; its rising edge can trigger a scope or the ADC board.

### Accumulating several pulses

In a period that is not read out, the scan is not started and the reset at
800 is skipped. The integrators keep their charge, and the next gate adds
the next pulse to it. The averaging counter counts periods modulo AVERAGE
(default 100, at most 1024). In the average modes it enables readout
(`ensample`) only in the period where it holds AVERAGE-1. The result is the
sum of AVERAGE pulses, read out and reset once.

### Signal and background gates

Integrator offsets, leakage and charge injection drift slowly. They are
measured by running the same cycle with the gate moved away from the laser
pulse, to STARTDUMMY..STOPDUMMY = 100..105, and subtracting the result in
software. The sequencer holds a flag `sig` (1 = gate on the pulse) and
updates it at each reset from the mode. The new value therefore applies from
the next acquisition on; a mode change does not move a gate that is already
scheduled.

A mode change in the middle of a scan does not stop that scan. The reset at
800 is then also done, even if the new mode would not read out in this
period, so the charge that was just read out is not added to the next pulse.

## Operating modes

| `mode` | name | gate | readout | gain (`gc`) |
|---|---|---|---|---|
| 0 | normal | signal | every period | 20 (`gc`=0) |
| 1 | average | signal | every AVERAGE periods | 2 (`gc`=1) |
| 2 | average | signal | every AVERAGE periods | 20 |
| 3 | background | background | every period | 20 |
| 4 | background average | background | every AVERAGE periods | 2 |
| 5 | background average | background | every AVERAGE periods | 20 |
| 6 | pseudo boxcar | alternates signal / background | every period | 20 |
| 7 | integrator off | both switches closed | none | 20 |

Mode 7 is a diagnostic mode:

- Both integrator switches stay closed, so each channel output follows its preamplifier (inverted).
- The multiplexer address is parked at SENSNUM (default 16, the middle of the array).
- Neither `sample` nor `trgout` pulses in this mode.

Used with the laser trigger on a scope, it shows where the gate should go.

## Blocks

| module | kind | role |
|---|---|---|
| `mct_pkg` | package | mode enum, widths, mode-decode functions |
| `mct_pll_divider` | RTL | phase counter 0..DIVIDE-1, `tick` at phase 0, registered `ckout` |
| `mct_integ_seq` | RTL | falling-edge sequencer: `c0`, `c1`, scan reset, fixed-address load, `sig` |
| `mct_mux_scan` | RTL | prescaler, address counter with stop bit, `ad`/`ad4n`, `sample`, `trgout` |
| `mct_avg_ctrl` | RTL | averaging counter and the per-mode readout enable `ensample` |
| `mct_gain_ctrl` | RTL | registered mode decode to `gc` |
| `mct_cpld` | RTL | the controller: wires the five together; ports as on the original CPLD plus `rst_n` |
| `mct_preamp` | model | AC-coupled preamplifier of one sensor |
| `mct_gated_integrator` | model | integrator with its run/hold and reset switches |
| `mct_adg406` | model | one 16-to-1 analog multiplexer with enable |
| `mct_mux32` | model | two of them forming a 32-to-1 multiplexer |
| `mct_out_amp` | model | output buffer with gain 2 or 20 |
| `mct_frontend` | top | 2 x 32 channels, two multiplexers, two buffers, controller |

### Parameters of `mct_cpld`

| parameter | default | meaning |
|---|---|---|
| DIVIDE | 1000 | clock cycles per trigger period (PLL multiplication) |
| STARTINT, STOPINT | 2, 7 | gate on the laser pulse (µs of phase) |
| STARTDUMMY, STOPDUMMY | 100, 105 | background gate |
| MUXDELAY | 2 | hold time before the scan starts |
| MUXTIME | 20 | dwell time per sensor (2..32) |
| SAMPLE_DELAY | 5 | `sample` delay after an address change |
| RESETTIME | 800 | phase of readout reset |
| AVERAGE | 100 | pulses per readout in modes 1, 2, 4, 5 (1..1024) |
| SENSNUM | 16 | sensor shown in mode 7 (0..31) |

Illegal values stop elaboration with an `$error`.

### Ports of `mct_cpld`

- `clk`: 1 MHz clock from the PLL.
- `rst_n`: asynchronous, active low.
- `mode[2:0]`: operating mode.
- `ad[4:0]`, `ad4n`: multiplexer address and enables.
- `c0`, `c1`: integrator switches.
- `sample`: ADC convert pulse.
- `trgout`: high during the scan.
- `gc`: 1 selects gain 2.
- `ckout`: feedback to the PLL.

`mode` is expected to be stable at the clock. Signals from front-panel
switches or a PC must be synchronised outside this block. Changes are safest
between phase 801 and the next gate.

## Analog channel models

The models step every `STEP_NS` = 100 ns (time unit 1 ns) with simple
first-order difference equations. They model gains, time constants and
clipping at +-13.5 V; they do not model noise, offsets, leakage or charge
injection.

- **Preamplifier** (`mct_preamp`). The sensor voltage is AC coupled through
  0.1 uF into 1 kOhm, a 100 us high-pass, so the slow bias level of the
  sensor is removed and only the laser pulse passes. A non-inverting stage of
  gain 101 with one pole at about 1 MHz (159 ns) follows.
- **Gated integrator** (`mct_gated_integrator`). An inverting integrator,
  1 kOhm into 1 nF, so 1 us time constant. While `c0` = 0 it integrates the
  preamplifier output against a slow average of it; while `c0` = 1 it holds.
  While `c1` = 0 the reset switch discharges the capacitor with a 1 us time
  constant. In mode 7 both switches are closed and the output follows the
  inverted input, with first-order settling. The held value is minus the
  time integral of the input divided by 1 us.
- **Multiplexer** (`mct_mux32`). `ad[3:0]` selects the input inside each
  16-to-1 half. The half with inputs 0..15 is enabled by `ad[4]`, the half
  with inputs 16..31 by `ad4n`. Address k therefore reads sensor
  (k + 16) mod 32: a scan reads sensors 16..31 first and then 0..15, and the
  mode-7 address 16 shows sensor 0.
- **Output buffer** (`mct_out_amp`). Gain 2 with `gc` = 1, gain 20 with
  `gc` = 0.

### Ports of `mct_frontend`

- `clk`, `rst_n`, `mode[2:0]`: as on `mct_cpld`.
- `sens_sig[32]`, `sens_ref[32]` (`real`, V): sensor voltages of the signal and reference arrays.
- `ds[32]`, `dr[32]` (`real`, V): integrator outputs, for observation.
- `outs`, `outr` (`real`, V): the two serial outputs to the ADC.
- `ad`, `ad4n`, `c0`, `c1`, `sample`, `gc`, `ckout`, `trgout`: the controller outputs.

It takes the same parameters as `mct_cpld`, plus `STEP_NS`.

## Where this RTL departs from the original logic

- **Reset.** The original CPLD relied on its power-up state. Here `rst_n` puts the controller in a safe state: integrators in reset, input held, scan held, signal gate selected.
- **One clock.** The original clocked the address counter with the prescaler carry and the averaging counter with `ckout`. Here both are enables on `clk`.
- **Address step.** The address now steps when the prescaler wraps rather than one count earlier. Every sensor then dwells exactly MUXTIME µs, and `sample` comes exactly SAMPLE_DELAY µs after the address change, which is the stated intent.
- **Mode 7 address.** The original loaded the mode-7 address without its stop bit, a slip in that code. The stop bit is set here, so the address really stays parked.
- **Leaving mode 7.** The first cycle out of mode 7 puts the scan back in reset, so the next readout scans all 32 sensors. The original would have started its first scan at the parked address.
- **Reset after a mode change.** The reset at 800 is done whenever a scan has run in the period, not only when the current mode reads out (see "Signal and background gates").
- **Wrapping sum.** STOPINT+MUXDELAY wraps at DIVIDE instead of at 1024. This gives the same result for the defaults.
- **Default number of averages.** The original text states 10 in one place and the logic uses 100. This RTL uses 100.

## What is not modelled

- the sensor bias regulators;
- the PLL itself (the testbenches drive `clk` directly);
- the parallel-port JTAG programming adapter;
- the connectors;
- the ADC board (a testbench reads `outs`/`outr` at each `sample` pulse).

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_mct_pll_divider` | phase sequence, `tick`, `ckout` only after phase 0, exactly once per 1000 cycles |
| `tb_mct_gain_ctrl` | `gc` against the mode table, all modes and random sequences |
| `tb_mct_avg_ctrl` | `ensample` per mode with AVERAGE = 4, one readout period in four |
| `tb_mct_mux_scan` | address per cycle, 32 samples at 5 + 20k, 640-cycle `trgout`, stop, no samples without `ensample`, fixed address |
| `tb_mct_integ_seq` | levels of all outputs in every cycle of a hand-written 18-period script covering all gate and readout cases, mode 7 and the return from it; a second instance with a gate across the period boundary |
| `tb_mct_cpld` | the controller end to end at the default parameters |
| `tb_mct_avg_max` | the controller with the largest average, AVERAGE = 1024: readouts exactly 1024 periods and 1024 gates apart, no reset in between |
| `tb_mct_preamp` | gain 101 for both signs, bandwidth pole, AC-coupling decay at 50, 100 and 200 us, clipping at both rails |
| `tb_mct_gated_integrator` | integration slope, hold with the input present, two pulses summed, reset time constant, both polarities, follower in mode 7, clipping |
| `tb_mct_mux32` | every address and both enables, (k + 16) mod 32 wiring |
| `tb_mct_out_amp` | both gains over a -8 V..+8 V sweep, clipping |
| `tb_mct_frontend` | the whole front end at the default parameters |

`tb_mct_cpld` runs about 530 trigger periods through modes 0, 3, 6, 1, 4, 2,
5, 7, 0. In every period it checks:

- gate position and length;
- `ckout`;
- `gc`;
- sample phases and addresses;
- `trgout` length;
- the reset, or the held charge in periods that are not read out;
- readouts exactly 100 periods apart in the average modes.

It also counts that readout, accumulation, both gate positions, boxcar
alternation, gain 2 and integrator-off each occurred. It takes under a second
of simulation time.

`tb_mct_frontend` runs the full design with its default parameters. A laser
pulse 2 us after each `ckout` edge reaches every sensor with a different
amplitude, different again on the reference array. At every `sample` pulse
the testbench works out which sensor the address reaches and compares `outs`
and `outr` with the expected integral (within 15 %) and their ratio (within
3 %). It goes through modes 0, 3 (background gate: under 5 % of the signal),
6 (alternation), 1 (100 pulses summed at gain 2, readouts exactly 100 ms
apart) and 7 (outputs follow the inverted preamplifier signal of sensor 0),
then back to 0. Modes 2, 4 and 5 are covered by `tb_mct_cpld`.
It takes about 40 s on a desktop.

To simulate a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
  rtl/mct_pkg.sv rtl/mct_frontend.sv tb/tb_mct_frontend.sv \
  --top-module tb_mct_frontend -Mdir obj && obj/Vtb_mct_frontend
```

Replace the module and testbench names to run another testbench; `-y rtl`
finds the submodules. The analog models use `#` delays in nanoseconds, so a
time unit of 1 ns is needed. The two-state simulator starts uninitialised variables at random,
so every register here has a reset.

Concurrent assertions in `mct_mux_scan` check two rules:

- a `sample` pulse only occurs during a read-out scan;
- the fixed diagnostic address never moves.
