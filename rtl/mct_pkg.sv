// mct_pkg: types and constants shared by the MCT front-end timing controller.
//
// The controller runs from a 1 MHz clock that a PLL derives from the 1 kHz
// laser trigger, so one clock cycle is 1 us and one trigger period is 1000
// cycles. A 10-bit phase counter gives the position inside the period. The
// eight operating modes are selected by three input lines; their encoding
// (0 = normal ... 7 = integrator off) is the one of the original design.
package mct_pkg;

  // Width of the phase counter inside one trigger period (counts to 999).
  localparam int unsigned PHASE_W = 10;
  // Width of the multiplexer address: two 32-to-1 multiplexers.
  localparam int unsigned ADDR_W  = 5;
  localparam int unsigned NSENS   = 2 ** ADDR_W;
  // Width of the averaging counter (up to 1024 averaged pulses).
  localparam int unsigned AVG_W   = 10;

  typedef logic [PHASE_W-1:0] phase_t;
  typedef logic [ADDR_W-1:0]  addr_t;

  typedef enum logic [2:0] {
    MODE_NORMAL     = 3'd0,  // integrate, read out and reset every pulse, gain 20
    MODE_AVG_G2     = 3'd1,  // average n pulses before readout, gain 2
    MODE_AVG_G20    = 3'd2,  // average n pulses before readout, gain 20
    MODE_BG_NORMAL  = 3'd3,  // as mode 0 with the gate moved away from the pulse
    MODE_BG_AVG_G2  = 3'd4,  // as mode 1, background gate
    MODE_BG_AVG_G20 = 3'd5,  // as mode 2, background gate
    MODE_BOXCAR     = 3'd6,  // alternate signal and background acquisitions
    MODE_OFF        = 3'd7   // integrators held in reset, one sensor on the outputs
  } mode_e;

  // Modes that accumulate several pulses before each readout.
  function automatic logic is_average(mode_e m);
    return m inside {MODE_AVG_G2, MODE_AVG_G20, MODE_BG_AVG_G2, MODE_BG_AVG_G20};
  endfunction

  // Low output gain (2) is used only in modes 1 and 4.
  function automatic logic is_low_gain(mode_e m);
    return m inside {MODE_AVG_G2, MODE_BG_AVG_G2};
  endfunction

  // Gate position for the acquisition after a readout: 1 = on the laser
  // pulse, 0 = background position. Mode 6 alternates.
  function automatic logic next_gate(mode_e m, logic cur);
    case (m)
      MODE_NORMAL, MODE_AVG_G2, MODE_AVG_G20:         return 1'b1;
      MODE_BG_NORMAL, MODE_BG_AVG_G2, MODE_BG_AVG_G20: return 1'b0;
      MODE_BOXCAR:                                     return ~cur;
      default:                                         return cur;
    endcase
  endfunction

endpackage
