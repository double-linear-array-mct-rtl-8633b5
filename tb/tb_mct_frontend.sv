// tb_mct_frontend: end-to-end test of the whole front end at its default
// sizes: 2 x 32 sensors, 1000-cycle trigger period, 32 x 20 us scan,
// averaging over 100 pulses.
//
// The testbench plays the laser and the PLL. The 1 MHz clock is generated
// directly (time unit 1 ns). Each rising edge of ckout is taken as the laser
// trigger, as in a locked loop. 2 us after it every sensor sees an
// exponential pulse (1 us time constant, the sensor response time) whose
// amplitude differs from sensor to sensor and between the two arrays.
//
// At every `sample` pulse it reads the two serial outputs and compares each
// with the value expected from the pulse amplitudes alone:
//   gain x (-101 x A x 1 us / 1 us) x (pulses integrated since last reset),
// for sensor (k + 16) mod 32 at sample k (the multiplexer wiring).
// - Absolute values must match within 15 %, which covers the pulse tail lost
//   outside the gate and the model's step size.
// - The ratio to the first sample of the same scan must match within 3 %.
// - Background gates must give under 5 % of a signal readout.
// - In mode 7 the output must follow the inverted preamplifier signal of the
//   parked sensor.
// Modes change after a scan, before the reset that picks the next gate.
// Mode sequence: 0, 3, 6, 1 (100 pulses averaged at gain 2), 7, 0. Each
// mechanism (signal readout, background readout, alternation, averaged
// readout, integrator off) is counted and must occur.
module tb_mct_frontend;
  import mct_pkg::*;

  localparam real TAU_NS    = 1000.0;   // sensor time constant
  localparam real PULSE_DLY = 2000.0;   // laser pulse after the trigger edge
  localparam int  AVERAGE   = 100;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [2:0] mode = 3'd0;
  real        sens_sig [NSENS];
  real        sens_ref [NSENS];
  real        ds [NSENS];
  real        dr [NSENS];
  real        outs, outr;
  logic [4:0] ad;
  logic       ad4n, c0, c1, sample, gc, ckout, trgout;

  real a_sig [NSENS];
  real a_ref [NSENS];

  int checks = 0, failures = 0;
  int n_sig_readout = 0, n_bg_readout = 0, n_avg_readout = 0;
  int n_alternation = 0, n_off = 0;

  mct_frontend dut (.*);

  always #500 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // --- laser: a pulse on every sensor 2 us after each trigger (ckout) edge
  real t_trig = -1.0e9;
  always @(posedge ckout) t_trig = $realtime;

  initial begin
    for (int i = 0; i < int'(NSENS); i++) begin
      a_sig[i] = 1.0e-4 * (1.0 + real'(i) / 16.0);
      a_ref[i] = 1.0e-4 * (3.0 - real'(i) / 16.0);
      sens_sig[i] = 0.0;
      sens_ref[i] = 0.0;
    end
    forever begin
      real dt, shape;
      #100;
      dt = $realtime - t_trig - PULSE_DLY;
      shape = (dt >= 0.0) ? $exp(-dt / TAU_NS) : 0.0;
      for (int i = 0; i < int'(NSENS); i++) begin
        sens_sig[i] = a_sig[i] * shape;
        sens_ref[i] = a_ref[i] * shape;
      end
    end
  end

  // --- count the pulses each integrator has collected since its last reset
  int cyc_since_trig = 0;
  int pulses_held = 0;
  logic prev_c0 = 1'b1, prev_c1 = 1'b0;
  always @(posedge clk) begin
    if (ckout) cyc_since_trig = 0;
    else cyc_since_trig++;
  end
  always @(negedge clk) begin
    #1;
    if (!c1 && prev_c1) pulses_held = 0;
    // a gate that opens within 10 us of the trigger catches the pulse
    if (!c0 && prev_c0 && c1 && cyc_since_trig < 10) pulses_held++;
    prev_c0 = c0;
    prev_c1 = c1;
  end

  function automatic real expected(input real amp, input int n, input logic g2);
    return (g2 ? 2.0 : 20.0) * (-101.0) * amp * real'(n);
  endfunction

  function automatic logic near(input real v, input real e, input real tol);
    return (v - e <= tol * ((e < 0.0) ? -e : e)) && (e - v <= tol * ((e < 0.0) ? -e : e));
  endfunction

  // --- one readout scan: returns the first sample values for comparison
  task automatic read_scan(input logic expect_signal, output logic got_scan,
                           output real first_s);
    int k = 0;
    real s0 = 0.0, r0 = 0.0;
    got_scan = 1'b0;
    first_s = 0.0;
    // skip a scan already in progress, then wait for the next one to start
    while (trgout) @(negedge clk);
    for (int c = 0; c < 1000 && !trgout; c++) @(negedge clk);
    if (!trgout) return;
    got_scan = 1'b1;
    while (trgout) begin
      @(negedge clk);
      #2;
      if (sample) begin
        int ch = (k + 16) % int'(NSENS);
        real es = expected(a_sig[ch], pulses_held, gc);
        real er = expected(a_ref[ch], pulses_held, gc);
        if (k == 0) begin
          s0 = outs;
          r0 = outr;
          first_s = outs;
        end
        if (expect_signal) begin
          check(near(outs, es, 0.15), $sformatf("signal out sample %0d: %f expected %f", k, outs, es));
          check(near(outr, er, 0.15), $sformatf("reference out sample %0d: %f expected %f", k, outr, er));
          check(near(outs / s0, a_sig[ch] / a_sig[16], 0.03), $sformatf("signal ratio sample %0d", k));
          check(near(outr / r0, a_ref[ch] / a_ref[16], 0.03), $sformatf("reference ratio sample %0d", k));
        end else begin
          real one = expected(a_sig[ch], 1, gc);
          check((outs < 0.05 * -one) && (outs > 0.05 * one),
                $sformatf("background sample %0d: %f", k, outs));
        end
        k++;
      end
    end
    check(k == int'(NSENS), "32 samples per scan");
  endtask

  // Read the scan that is in progress from its start (trgout just rose).
  task automatic read_scan_now(output logic got_scan);
    int k = 0;
    got_scan = trgout;
    while (trgout) begin
      if (sample) begin
        int ch = (k + 16) % int'(NSENS);
        real es = expected(a_sig[ch], pulses_held, gc);
        real er = expected(a_ref[ch], pulses_held, gc);
        check(near(outs, es, 0.15), $sformatf("averaged signal sample %0d: %f expected %f", k, outs, es));
        check(near(outr, er, 0.15), $sformatf("averaged reference sample %0d: %f expected %f", k, outr, er));
        k++;
      end
      @(negedge clk);
      #2;
    end
    if (got_scan) check(k == int'(NSENS), "32 samples per averaged scan");
  endtask

  initial begin
    logic got;
    real  v, prev_v;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // let the first period pass (the integrators start in reset)
    repeat (1500) @(negedge clk);

    // mode 0: three signal readouts
    mode = 3'd0;
    repeat (3) begin
      read_scan(1'b1, got, v);
      check(got, "mode 0 scan");
      if (got) n_sig_readout++;
    end
    // mode 3: the mode is changed after a scan, before the reset that picks
    // the next gate, so every following readout is a background one
    mode = 3'd3;
    repeat (3) begin
      read_scan(1'b0, got, v);
      check(got, "mode 3 scan");
      if (got) n_bg_readout++;
    end
    // mode 6: alternate (the gate after a background readout is signal)
    mode = 3'd6;
    prev_v = 0.0;
    for (int i = 0; i < 4; i++) begin
      automatic logic sig_expected = (i % 2 == 0);
      read_scan(sig_expected, got, v);
      check(got, "mode 6 scan");
      if (got && i > 0 && ((v < 0.5 * prev_v) != (prev_v < 0.5 * v))) n_alternation++;
      prev_v = v;
    end
    // mode 1: 100 pulses averaged at gain 2, read out once per 100 periods
    mode = 3'd1;
    begin
      realtime start_time [2];
      int cycle = 0;
      for (int i = 0; i < 2; i++) begin
        // wait for the next scan to start, at most AVERAGE + 2 periods
        while (trgout) begin
          @(negedge clk);
          cycle++;
        end
        while (!trgout && cycle < (i + 1) * (AVERAGE + 2) * 1000) begin
          @(negedge clk);
          cycle++;
        end
        start_time[i] = $realtime;
        check(trgout, "averaged readout");
        if (i == 1) begin
          check(pulses_held == AVERAGE, $sformatf("%0d pulses averaged", pulses_held));
          // one clock cycle is 1000 ns
          check(start_time[1] - start_time[0] == real'(AVERAGE) * 1.0e6,
                $sformatf("averaged readouts %0.0f ns apart", start_time[1] - start_time[0]));
        end
        // read_scan waits for the rising edge again: hand it the scan by
        // stepping back to just before it is seen high
        read_scan_now(got);
        if (got && i == 1) n_avg_readout++;
      end
    end
    // mode 7: integrators off, output follows the parked sensor (16 -> DS0)
    mode = 3'd7;
    repeat (1200) @(negedge clk);
    begin
      real vmin = 0.0;
      real peak;
      repeat (1000) begin
        @(negedge clk);
        check(!sample && !trgout, "no samples in mode 7");
        if (outs < vmin) vmin = outs;
      end
      peak = 20.0 * 101.0 * a_sig[0];
      check(vmin < -0.25 * peak && vmin > -0.45 * peak,
            $sformatf("mode 7 pass-through peak %f, pulse %f", vmin, -peak));
      if (vmin < -0.25 * peak) n_off++;
    end
    // back to mode 0: readouts resume with full scans
    mode = 3'd0;
    repeat (1500) @(negedge clk);
    repeat (2) begin
      read_scan(1'b1, got, v);
      check(got, "mode 0 scan after mode 7");
      if (got) n_sig_readout++;
    end

    $display("signal readouts %0d, background readouts %0d, averaged readouts %0d, alternations %0d, off %0d",
             n_sig_readout, n_bg_readout, n_avg_readout, n_alternation, n_off);
    check(n_sig_readout > 0, "signal readout happened");
    check(n_bg_readout > 0, "background readout happened");
    check(n_avg_readout > 0, "averaged readout happened");
    check(n_alternation > 0, "boxcar alternation happened");
    check(n_off > 0, "integrator-off pass-through happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
