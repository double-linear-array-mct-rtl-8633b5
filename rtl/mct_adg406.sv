// mct_adg406: behavioural model (not synthesizable) of a 16-to-1 analog
// multiplexer of the ADG406 type.
//
// When `en` is high, the drain `d` carries the source selected by the 4-bit
// address: a = 0 selects S1 (s[0]), a = 15 selects S16 (s[15]). When `en` is
// low every switch is open; the model then drives 0 V, so two multiplexers
// whose drains are tied together can be modelled by adding their outputs.
// Switch resistance and charge injection are not modelled; the output follows
// the inputs without delay.
module mct_adg406 (
  input  logic       en,
  input  logic [3:0] a,
  input  real        s [16],
  output real        d
);

  assign d = en ? s[a] : 0.0;

endmodule
