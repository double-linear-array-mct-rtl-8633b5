// mct_out_amp: behavioural model (not synthesizable) of one output buffer.
//
// A non-inverting op-amp stage after each 32-to-1 multiplexer. Half of an
// analog switch changes its feedback network so that the gain is 2 (gc = 1)
// or 20 (gc = 0, switch closed); the output clips at +-13.5 V. The two gains
// and the control polarity follow the design; the exact high gain of the
// real stage also depends on the switch resistance, which is not modelled.
// Output follows the input without delay.
module mct_out_amp #(
  parameter real GAIN_LO = 2.0,
  parameter real GAIN_HI = 20.0,
  parameter real VSAT    = 13.5
) (
  input  real  vin,
  input  logic gc,
  output real  vout
);

  real v;

  assign v    = vin * (gc ? GAIN_LO : GAIN_HI);
  assign vout = (v > VSAT) ? VSAT : (v < -VSAT) ? -VSAT : v;

endmodule
