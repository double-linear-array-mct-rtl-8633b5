// mct_gated_integrator: behavioural model (not synthesizable) of one gated
// integrator, which is also the channel's sample-and-hold.
//
// An inverting op-amp integrator with a 1 nF capacitor. Its input resistor
// (1 kOhm, so a 1 us time constant) reaches the preamplifier output through
// analog switch C0. A second switch, C1, puts 1 kOhm across the capacitor to
// discharge it. The non-inverting input sits on the preamplifier output
// low-passed by 100 kOhm / 0.1 uF (10 ms), so the integrator only sees the
// fast part of the signal. Both switches are closed when their control is 0:
//   c0 = 0 run (integrate the input), c0 = 1 hold;
//   c1 = 1 integrate, c1 = 0 reset (capacitor discharged in about 5 us).
// With both closed the stage is an inverting amplifier of gain -1 with a 1 us
// pole, which is what the integrator-off diagnostic mode shows.
// Output = baseline + capacitor voltage, clipped at +-13.5 V. Component
// values are those of the channel schematic; leakage and switch charge
// injection are not modelled (both are small next to a pulse).
//
// Interface: `vin` preamplifier output (V), `c0`, `c1` switch controls,
// `vout` integrator output (V). Steps of STEP_NS ns (time unit 1 ns) with
// exact first-order updates.
module mct_gated_integrator #(
  parameter real TAU_INT_NS  = 1000.0,
  parameter real TAU_RST_NS  = 1000.0,
  parameter real TAU_BASE_NS = 10000000.0,
  parameter real VSAT        = 13.5,
  parameter real STEP_NS     = 100.0
) (
  input  real  vin,
  input  logic c0,
  input  logic c1,
  output real  vout
);

  localparam real K_BASE = 1.0 - $exp(-STEP_NS / TAU_BASE_NS);
  localparam real K_RST  = $exp(-STEP_NS / TAU_RST_NS);

  real vbase;  // non-inverting input, slow average of the input
  real q;      // voltage across the integration capacitor

  initial begin
    vbase = 0.0;
    q     = 0.0;
    vout  = 0.0;
  end

  always #(STEP_NS) begin
    vbase = vbase + K_BASE * (vin - vbase);
    if (!c0 && !c1) begin
      // input and reset resistor both connected: first-order settling to
      // -(vin - vbase) * TAU_RST / TAU_INT
      q = q * K_RST - (1.0 - K_RST) * (vin - vbase) * (TAU_RST_NS / TAU_INT_NS);
    end else begin
      if (!c0) q = q - (vin - vbase) * STEP_NS / TAU_INT_NS;
      if (!c1) q = q * K_RST;
    end
    if (vbase + q > VSAT)  q = VSAT - vbase;
    if (vbase + q < -VSAT) q = -VSAT - vbase;
    vout = vbase + q;
  end

endmodule
