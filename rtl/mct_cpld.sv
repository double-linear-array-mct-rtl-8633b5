// mct_cpld: timing controller of a 64-channel MCT (HgCdTe) line-array front end.
//
// Two linear arrays of 32 infrared sensors are read by 64 analog channels
// (preamplifier and gated integrator, which also holds the result) and two
// 32-to-1 analog multiplexers that turn them into two CCD-like serial outputs
// for a 16-bit ADC board. The laser fires at 1 kHz; a PLL multiplies its
// trigger by 1000 into the 1 MHz clock `clk` of this controller, which then
// does everything in 1 us steps within the 1000-cycle trigger period:
//   - mct_pll_divider : phase counter 0..999 and the ckout feedback to the PLL
//   - mct_integ_seq   : integration gate (c0/c1), hold, scan start, reset
//   - mct_mux_scan    : multiplexer address ad/ad4n, ADC sample pulses, trgout
//   - mct_avg_ctrl    : readout only every AVERAGE pulses in the average modes
//   - mct_gain_ctrl   : output amplifier gain 2 or 20 (gc)
// The mode input selects one of eight modes (see mct_pkg::mode_e): normal,
// averaging at gain 2 or 20, the same three with the gate moved away from the
// laser pulse to measure integrator offsets, alternating signal/background,
// and integrator-off diagnostics with one sensor parked on the outputs.
//
// Default timing, all in us after the period start: gate 2..7, scan start 9,
// one sensor every 20 us with its ADC sample 5 us after the address change
// (32 samples, last at 634), integrator reset from 800 to the next gate.
// Ports and their meaning follow the original CPLD pin list; rst_n is added.
module mct_cpld
  import mct_pkg::*;
#(
  parameter int unsigned DIVIDE       = 1000,
  parameter int unsigned STARTINT     = 2,
  parameter int unsigned STOPINT      = 7,
  parameter int unsigned STARTDUMMY   = 100,
  parameter int unsigned STOPDUMMY    = 105,
  parameter int unsigned MUXDELAY     = 2,
  parameter int unsigned MUXTIME      = 20,
  parameter int unsigned SAMPLE_DELAY = 5,
  parameter int unsigned RESETTIME    = 800,
  parameter int unsigned AVERAGE      = 100,
  parameter int unsigned SENSNUM      = 16
) (
  input  logic       clk,      // ckin, 1 MHz from the PLL
  input  logic       rst_n,
  input  logic [2:0] mode,
  output logic [4:0] ad,
  output logic       ad4n,
  output logic       c0,
  output logic       c1,
  output logic       sample,
  output logic       gc,
  output logic       ckout,
  output logic       trgout
);

  phase_t phase;
  logic   tick;
  logic   ensample;
  logic   scan_rst;
  logic   load_fixed;
  mode_e  mode_q;

  assign mode_q = mode_e'(mode);

  mct_pll_divider #(.DIVIDE(DIVIDE)) u_div (
    .clk, .rst_n, .phase, .tick, .ckout
  );

  mct_avg_ctrl #(.AVERAGE(AVERAGE)) u_avg (
    .clk, .rst_n, .tick, .mode(mode_q), .ensample
  );

  mct_gain_ctrl u_gain (
    .clk, .rst_n, .mode(mode_q), .gc
  );

  mct_integ_seq #(
    .DIVIDE(DIVIDE), .STARTINT(STARTINT), .STOPINT(STOPINT),
    .STARTDUMMY(STARTDUMMY), .STOPDUMMY(STOPDUMMY),
    .MUXDELAY(MUXDELAY), .RESETTIME(RESETTIME)
  ) u_seq (
    .clk, .rst_n, .phase, .mode(mode_q), .ensample,
    .c0, .c1, .scan_rst, .load_fixed,
    .sig()  // gate position, observed only by tests of the sequencer
  );

  mct_mux_scan #(
    .MUXTIME(MUXTIME), .SAMPLE_DELAY(SAMPLE_DELAY), .SENSNUM(SENSNUM)
  ) u_scan (
    .clk, .rst_n, .scan_rst, .load_fixed, .ensample,
    .ad, .ad4n, .sample, .trgout
  );

endmodule
