// mct_frontend: the complete double 32-element MCT line-array front end, the
// timing controller in synthesizable logic and the analog chain as
// behavioural models (so this top level is a simulation model, not a
// netlist).
//
// Each of the 64 sensors (32 on the signal array `sens_sig`, 32 on the
// reference array `sens_ref`) feeds its own preamplifier (mct_preamp) and
// gated integrator (mct_gated_integrator). All 64 integrators share the
// switch controls c0/c1 from the controller, so they integrate the same laser
// pulse and hold their results together. The held values of each array are
// available directly (`ds`, `dr`, the pre-multiplexer connectors) and through
// a 32-to-1 multiplexer (mct_mux32) and a gain-2/20 buffer (mct_out_amp) as
// the serial outputs `outs` and `outr`, which the ADC converts on each
// `sample` pulse. The controller (mct_cpld) runs from the 1 MHz clock `clk`,
// which in the instrument comes from a PLL locked on the 1 kHz laser trigger;
// here it is an input, and `ckout` is the controller's feedback to that PLL.
//
// Timing: see mct_cpld. Analog values are in volts, time unit 1 ns; the
// analog models advance every STEP_NS ns.
module mct_frontend
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
  parameter int unsigned SENSNUM      = 16,
  parameter real         STEP_NS      = 100.0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] mode,
  input  real        sens_sig [NSENS],
  input  real        sens_ref [NSENS],
  output real        ds [NSENS],
  output real        dr [NSENS],
  output real        outs,
  output real        outr,
  output logic [4:0] ad,
  output logic       ad4n,
  output logic       c0,
  output logic       c1,
  output logic       sample,
  output logic       gc,
  output logic       ckout,
  output logic       trgout
);

  real pre_sig [NSENS];
  real pre_ref [NSENS];
  real mux_s, mux_r;

  mct_cpld #(
    .DIVIDE(DIVIDE), .STARTINT(STARTINT), .STOPINT(STOPINT),
    .STARTDUMMY(STARTDUMMY), .STOPDUMMY(STOPDUMMY), .MUXDELAY(MUXDELAY),
    .MUXTIME(MUXTIME), .SAMPLE_DELAY(SAMPLE_DELAY), .RESETTIME(RESETTIME),
    .AVERAGE(AVERAGE), .SENSNUM(SENSNUM)
  ) u_cpld (
    .clk, .rst_n, .mode, .ad, .ad4n, .c0, .c1, .sample, .gc, .ckout, .trgout
  );

  for (genvar i = 0; i < NSENS; i++) begin : g_ch
    mct_preamp #(.STEP_NS(STEP_NS)) u_pre_s (.vin(sens_sig[i]), .vout(pre_sig[i]));
    mct_preamp #(.STEP_NS(STEP_NS)) u_pre_r (.vin(sens_ref[i]), .vout(pre_ref[i]));
    mct_gated_integrator #(.STEP_NS(STEP_NS)) u_int_s (
      .vin(pre_sig[i]), .c0, .c1, .vout(ds[i])
    );
    mct_gated_integrator #(.STEP_NS(STEP_NS)) u_int_r (
      .vin(pre_ref[i]), .c0, .c1, .vout(dr[i])
    );
  end

  mct_mux32 u_mux_s (.ad, .ad4n, .s(ds), .d(mux_s));
  mct_mux32 u_mux_r (.ad, .ad4n, .s(dr), .d(mux_r));

  mct_out_amp u_amp_s (.vin(mux_s), .gc, .vout(outs));
  mct_out_amp u_amp_r (.vin(mux_r), .gc, .vout(outr));

endmodule
