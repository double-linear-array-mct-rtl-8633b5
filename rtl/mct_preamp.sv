// mct_preamp: behavioural model (not synthesizable) of one sensor preamplifier.
//
// The channel input is AC coupled (0.1 uF into 1 kOhm, a 100 us high-pass,
// which removes the sensor bias voltage) and amplified by a low-noise op-amp
// in non-inverting configuration with 1 kOhm / 10 Ohm feedback, a gain of
// 101 and about 1 MHz bandwidth (one pole, 159 ns). The output saturates at
// +-13.5 V on the +-15 V rails. Component values are those of the channel
// schematic; modelling the bandwidth as a single pole and the saturation
// level are choices of this model. Noise is not modelled.
//
// Interface: `vin` is the sensor voltage, `vout` the preamplifier output, in
// volts. The model advances in steps of STEP_NS nanoseconds (time unit 1 ns)
// with exact first-order updates, so any step well below 1 us is accurate.
module mct_preamp #(
  parameter real GAIN      = 101.0,
  parameter real TAU_HP_NS = 100000.0,
  parameter real TAU_BW_NS = 159.0,
  parameter real VSAT      = 13.5,
  parameter real STEP_NS   = 100.0
) (
  input  real vin,
  output real vout
);

  localparam real K_HP = 1.0 - $exp(-STEP_NS / TAU_HP_NS);
  localparam real K_BW = 1.0 - $exp(-STEP_NS / TAU_BW_NS);

  real vcap;   // voltage across the coupling capacitor
  real vplus;  // high-passed input at the op-amp input
  real vamp;   // amplifier output before the bandwidth pole settles

  initial begin
    vcap = 0.0;
    vamp = 0.0;
    vout = 0.0;
  end

  always #(STEP_NS) begin
    vplus = vin - vcap;
    vcap  = vcap + K_HP * vplus;
    vamp  = vamp + K_BW * (GAIN * vplus - vamp);
    if (vamp > VSAT)  vamp = VSAT;
    if (vamp < -VSAT) vamp = -VSAT;
    vout  = vamp;
  end

endmodule
