// mct_integ_seq: gated-integrator sequencer.
//
// Every channel is a gated integrator with two analog switches: C0 connects
// the preamplifier to the integrator (0 = run, switch closed; 1 = hold) and
// C1 opens the reset switch across the integration capacitor (1 = integrate;
// 0 = reset, switch closed). Within each 1000-cycle trigger period this block
// drives them from the phase counter:
//   phase START      : c0 = 0, c1 = 1      open the integration gate
//   phase STOP       : c0 = 1              hold
//   phase STOP+MUXDELAY : scan_rst = 0     start the multiplexer scan
//   phase RESETTIME  : scan_rst = 1, c1 = 0  reset integrators and scan
// The scan start only happens in a period whose `ensample` is high, and the
// reset in such a period or in one whose scan has started; otherwise
// the integrators keep their charge and the next gate adds to it, which is
// how the average modes accumulate pulses. START/STOP are STARTINT/STOPINT
// when the gate is on the laser pulse (`sig` = 1) and STARTDUMMY/STOPDUMMY
// for a background acquisition (`sig` = 0); `sig` for the next acquisition is
// chosen at each reset from the mode (signal in modes 0-2, background in
// 3-5, alternating in 6). Mode 7 closes both switches, releases the scan and
// parks the multiplexer address (load_fixed); on leaving mode 7 the scan is
// put back in reset so that the next readout scans all 32 sensors (a choice
// of this implementation: the original leaves the mode-7 address loaded).
//
// The second condition is this implementation's: in the original logic a
// mode change from a read-out mode to an average mode between the scan start
// and RESETTIME skipped the reset, leaving the scan stopped and the next
// averaged readout without its scan.
//
// Timing: the outputs change on the falling clock edge, half a cycle after
// the phase counter reaches the programmed value, as in the original design.
// Phases are compared for equality, so a gate may straddle the period wrap
// (START 998, STOP 8). STOP+MUXDELAY wraps at DIVIDE. The event table and
// mode behaviour follow the original design; the reset state (integrators in
// reset, input held, scan held, signal gate) is this implementation's choice.
module mct_integ_seq
  import mct_pkg::*;
#(
  parameter int unsigned DIVIDE     = 1000,
  parameter int unsigned STARTINT   = 2,
  parameter int unsigned STOPINT    = 7,
  parameter int unsigned STARTDUMMY = 100,
  parameter int unsigned STOPDUMMY  = 105,
  parameter int unsigned MUXDELAY   = 2,
  parameter int unsigned RESETTIME  = 800
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t phase,
  input  mode_e  mode,
  input  logic   ensample,
  output logic   c0,
  output logic   c1,
  output logic   scan_rst,
  output logic   load_fixed,
  output logic   sig
);

  if (STARTINT >= DIVIDE || STOPINT >= DIVIDE || STARTDUMMY >= DIVIDE ||
      STOPDUMMY >= DIVIDE || RESETTIME >= DIVIDE) begin : g_bad_phase
    $error("all event phases must be below DIVIDE");
  end

  localparam phase_t P_STARTINT   = phase_t'(STARTINT);
  localparam phase_t P_STOPINT    = phase_t'(STOPINT);
  localparam phase_t P_STARTDUMMY = phase_t'(STARTDUMMY);
  localparam phase_t P_STOPDUMMY  = phase_t'(STOPDUMMY);
  localparam phase_t P_MUXSIG     = phase_t'((STOPINT + MUXDELAY) % DIVIDE);
  localparam phase_t P_MUXDUMMY   = phase_t'((STOPDUMMY + MUXDELAY) % DIVIDE);
  localparam phase_t P_RESET      = phase_t'(RESETTIME);

  phase_t start_ph, stop_ph, mux_ph;

  always_comb begin
    start_ph = sig ? P_STARTINT : P_STARTDUMMY;
    stop_ph  = sig ? P_STOPINT  : P_STOPDUMMY;
    mux_ph   = sig ? P_MUXSIG   : P_MUXDUMMY;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c0         <= 1'b1;
      c1         <= 1'b0;
      scan_rst   <= 1'b1;
      load_fixed <= 1'b0;
      sig        <= 1'b1;
    end else if (mode == MODE_OFF) begin
      c0         <= 1'b0;
      c1         <= 1'b0;
      scan_rst   <= 1'b0;
      load_fixed <= 1'b1;
    end else begin
      load_fixed <= 1'b0;
      // leaving mode 7: clear the parked address so the next scan runs
      if (load_fixed) scan_rst <= 1'b1;
      if (phase == start_ph) begin
        c0 <= 1'b0;
        c1 <= 1'b1;
      end else if (phase == stop_ph) begin
        c0 <= 1'b1;
      end else if (phase == mux_ph) begin
        if (ensample) scan_rst <= 1'b0;
      end else if (phase == P_RESET) begin
        // a period whose scan was started always ends with the reset, even
        // if a mode change has dropped ensample since
        if (ensample || !scan_rst) begin
          scan_rst <= 1'b1;
          c1       <= 1'b0;
          sig      <= next_gate(mode, sig);
        end
      end
    end
  end

endmodule
