// mct_mux_scan: address scan of the two 32-to-1 output multiplexers.
//
// Each 32-to-1 multiplexer is two 16-to-1 analog multiplexers sharing the
// address ad[3:0]; ad[4] enables one of them and ad4n the other. After the
// integrators have been put in hold, the scan steps the address through all
// 32 sensors, MUXTIME microseconds per sensor, and then stops until the next
// scan. A prescaler counts 0..MUXTIME-1; each time it wraps the 6-bit address
// counter advances, and its top bit, set after the 32nd sensor, stops it.
// `sample` tells the ADC board to convert both outputs; it is a one-cycle
// pulse SAMPLE_DELAY cycles after every address change, so 32 per scan.
// `trgout` is high for the whole scan (its rising edge triggers a scope or
// the ADC board).
//
// Control: scan_rst (high) clears prescaler and address and holds them; the
// scan starts on the first clock after it falls. load_fixed parks the address
// at SENSNUM with the stop bit set (diagnostic mode: one sensor permanently
// on the outputs, no samples). ensample low suppresses sample and trgout.
// Timing: address k is on the outputs for MUXTIME cycles (the first one for
// MUXTIME cycles plus the part cycle between scan_rst falling and the next
// clock edge); sample k is high while the prescaler equals SAMPLE_DELAY.
// The counter structure, the stop bit and the fixed address follow the
// original design. Here the address advances on the prescaler wrap, so every
// sensor gets the same dwell time and the sample delay is exactly
// SAMPLE_DELAY; both counters are on the one clock with an enable.
module mct_mux_scan
  import mct_pkg::*;
#(
  parameter int unsigned MUXTIME      = 20,
  parameter int unsigned SAMPLE_DELAY = 5,
  parameter int unsigned SENSNUM      = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  scan_rst,
  input  logic  load_fixed,
  input  logic  ensample,
  output addr_t ad,
  output logic  ad4n,
  output logic  sample,
  output logic  trgout
);

  if (MUXTIME < 2 || MUXTIME > 32) begin : g_bad_muxtime
    $error("MUXTIME must be between 2 and 32");
  end
  if (SAMPLE_DELAY >= MUXTIME) begin : g_bad_delay
    $error("SAMPLE_DELAY must be below MUXTIME");
  end
  if (SENSNUM >= NSENS) begin : g_bad_sensnum
    $error("SENSNUM must be below 32");
  end

  localparam logic [4:0] PRE_LAST = 5'(MUXTIME - 1);
  localparam logic [4:0] PRE_SMP  = 5'(SAMPLE_DELAY);

  logic [4:0]        pre;    // prescaler
  logic [ADDR_W:0]   addr;   // address with stop bit on top
  logic              wrap;
  logic              running;  // scan in progress

  assign wrap = (pre == PRE_LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre  <= '0;
      addr <= '0;
    end else if (scan_rst) begin
      pre  <= '0;
      addr <= '0;
    end else begin
      pre <= wrap ? '0 : pre + 1'b1;
      if (load_fixed)              addr <= {1'b1, addr_t'(SENSNUM)};
      else if (wrap && !addr[ADDR_W]) addr <= addr + 1'b1;
    end
  end

  assign ad      = addr[ADDR_W-1:0];
  assign ad4n    = ~addr[ADDR_W-1];
  assign running = !scan_rst && !addr[ADDR_W];
  assign trgout  = running && ensample;
  assign sample  = trgout && (pre == PRE_SMP);

  // A sample pulse always belongs to a running scan of an enabled period.
  a_sample_in_scan : assert property (@(posedge clk) disable iff (!rst_n)
    sample |-> (running && ensample));
  // Once loaded, the fixed address stays parked with the stop bit set.
  a_fixed_holds : assert property (@(posedge clk) disable iff (!rst_n)
    (load_fixed && !scan_rst && $past(load_fixed) && !$past(scan_rst))
      |-> (addr == {1'b1, addr_t'(SENSNUM)}));

endmodule
