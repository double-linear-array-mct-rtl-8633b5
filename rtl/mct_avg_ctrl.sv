// mct_avg_ctrl: readout enable for averaging over several laser pulses.
//
// In the average modes (1, 2, 4, 5) the gated integrators keep integrating
// over AVERAGE consecutive pulses and are read out and reset only once. This
// block counts trigger periods modulo AVERAGE (one count per `tick`, the
// start of a period) and produces `ensample`, which tells the integrator
// sequencer and the multiplexer scan whether the current period ends with a
// readout:
//   modes 0, 3, 6 : every period
//   modes 1, 2, 4, 5 : only the period in which the counter is at AVERAGE-1
//   mode 7 : never
// `ensample` is registered and stays constant for a whole period in the
// average modes, because the counter only moves at the period start.
// The counter keeps running in every mode; the modulus-counter structure and
// the mode table follow the original design, the reset is an addition.
module mct_avg_ctrl
  import mct_pkg::*;
#(
  parameter int unsigned AVERAGE = 100
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  tick,
  input  mode_e mode,
  output logic  ensample
);

  if (AVERAGE < 1 || AVERAGE > 2 ** AVG_W) begin : g_bad_average
    $error("AVERAGE must be between 1 and 1024");
  end

  localparam logic [AVG_W-1:0] LAST = (AVG_W)'(AVERAGE - 1);

  logic [AVG_W-1:0] count;
  logic             last;

  assign last = (count == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      ensample <= 1'b0;
    end else begin
      if (tick) count <= last ? '0 : count + 1'b1;
      if (mode == MODE_OFF)     ensample <= 1'b0;
      else if (is_average(mode)) ensample <= last;
      else                      ensample <= 1'b1;
    end
  end

endmodule
