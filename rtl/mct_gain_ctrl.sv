// mct_gain_ctrl: gain select for the two output buffer amplifiers.
//
// After the 32-to-1 multiplexers each output goes through a non-inverting
// amplifier whose feedback resistor is switched by an analog switch, giving a
// gain of 2 or 20. This block decodes the operating mode into that switch
// control: gc = 1 (gain 2) in modes 1 and 4, gc = 0 (gain 20) in every other
// mode, as the original mode table specifies. The output is registered, so it
// follows a mode change one clock later.
module mct_gain_ctrl
  import mct_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  output logic  gc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) gc <= 1'b0;
    else        gc <= is_low_gain(mode);
  end

endmodule
