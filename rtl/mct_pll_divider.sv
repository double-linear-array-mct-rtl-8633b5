// mct_pll_divider: the divide-by-1000 in the loop of the clock PLL.
//
// The 1 MHz controller clock comes from a phase-locked loop that locks on the
// 1000th harmonic of the 1 kHz laser trigger. This block is the digital
// divider in that loop: a modulo-DIVIDE counter whose value, `phase`, is the
// position in the trigger period in microseconds and is the time base of the
// whole controller. `ckout` is a registered decode of phase == 0, a one-cycle
// pulse every DIVIDE cycles that goes back to the PLL phase comparator; when
// the loop is locked its rising edge coincides with the trigger edge.
//
// Timing: `phase` advances on every rising clk edge and wraps from DIVIDE-1 to
// 0. `tick` is high (combinationally) while phase == 0; `ckout` is high in the
// following cycle, while phase == 1.
// The modulus and the registered ckout follow the original design; the reset
// input is an addition of this implementation.
module mct_pll_divider
  import mct_pkg::*;
#(
  parameter int unsigned DIVIDE = 1000
) (
  input  logic   clk,
  input  logic   rst_n,
  output phase_t phase,
  output logic   tick,
  output logic   ckout
);

  if (DIVIDE < 2 || DIVIDE > 2 ** PHASE_W) begin : g_bad_divide
    $error("DIVIDE must be between 2 and 1024");
  end

  localparam phase_t LAST = phase_t'(DIVIDE - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      ckout <= 1'b0;
    end else begin
      phase <= (phase == LAST) ? '0 : phase + 1'b1;
      ckout <= (phase == '0);
    end
  end

  assign tick = (phase == '0);

endmodule
