// tb_mct_cpld: end-to-end test of the MCT front-end timing controller at its
// default sizes (1000-cycle trigger period, 32 sensors x 20 us, averaging
// over 100 pulses).
//
// The testbench supplies the 1 MHz clock (one 1 us cycle per clock) and
// walks the controller through every mode: normal, background, alternating
// (pseudo boxcar), the four averaging modes, integrator off, and back to
// normal. Modes change at phase 900 of a trigger period, where nothing is
// scheduled. Every period (counted from phase 900 to phase 899) is analysed
// against expectations worked out from the mode table:
//   - ckout high only in the cycle after the period start (1 kHz);
//   - one 5 us integration gate (c0 = 0, c1 = 1) at 2..7 on the laser pulse
//     or at 100..105 for background, the choice following the mode;
//   - a readout period has 32 sample pulses at STOP + 2 + 5 + 20k, each with
//     address k on ad (ad4n = ~ad[4]), trgout high for 640 us, and the
//     integrator reset at 800; other periods keep integrating (c1 stays 1);
//   - in the average modes readouts are exactly 100 periods apart;
//   - gc selects gain 2 only in modes 1 and 4;
//   - mode 7 holds c0 = c1 = 0, parks the address at 16, gives no samples.
// Each mechanism (readout, accumulation, signal and background gate,
// alternation, gain 2, integrator off) is counted and must occur.
module tb_mct_cpld;
  import mct_pkg::*;

  localparam int DIVIDE  = 1000;
  localparam int AVERAGE = 100;
  localparam int NS      = 32;
  localparam int MUXT    = 20;

  typedef struct {
    int unsigned mode;
    int          periods;
  } step_t;

  localparam int NSTEPS = 9;
  step_t steps [NSTEPS] = '{
    '{0, 3}, '{3, 3}, '{6, 4}, '{1, 2 * AVERAGE + 3}, '{4, AVERAGE + 3},
    '{2, AVERAGE + 3}, '{5, AVERAGE + 3}, '{7, 3}, '{0, 3}
  };

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [2:0] mode = 3'd0;
  logic [4:0] ad;
  logic       ad4n, c0, c1, sample, gc, ckout, trgout;

  int checks = 0, failures = 0;
  int n_readout = 0, n_accum = 0, n_sig_gate = 0, n_bg_gate = 0;
  int n_toggle = 0, n_gain2 = 0, n_off = 0, n_avg_interval = 0;

  mct_cpld dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (700000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   n = 0;            // rising clock edges since reset release
    logic exp_sig = 1'b1;   // expected gate for the next acquisition
    logic last_gate = 1'b1;
    logic after_off = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // run to phase 900 so that periods are analysed from 900 to 899
    while (n < 900) begin
      @(posedge clk) n++;
    end
    for (int s = 0; s < NSTEPS; s++) begin
      automatic int unsigned m = steps[s].mode;
      automatic int last_readout = -1;
      automatic logic is_avg = (m inside {1, 2, 4, 5});
      #1 mode = 3'(m);
      for (int per = 0; per < steps[s].periods; per++) begin
        automatic int gate_first = -1, gate_len = 0;
        automatic int n_smp = 0, n_trg = 0, trg_rise = -1;
        automatic logic reset_seen = 1'b0, c1_always = 1'b1;
        automatic logic prev_trg = 1'b0;
        automatic logic gate = exp_sig;
        automatic int start = gate ? 2 : 100;
        automatic int stop  = gate ? 7 : 105;
        for (int k = 0; k < DIVIDE; k++) begin
          automatic int p = n % DIVIDE;
          @(negedge clk);
          #1;
          check(ckout == (p == 1), "ckout at phase 1 only");
          if (k > 0) check(gc == (m == 1 || m == 4), "gain select");
          if (m == 7) begin
            if (k > 0) begin
              check(!c0 && !c1, "integrator off: switches closed");
              check(ad == 5'd16 && !ad4n, "integrator off: fixed sensor 16");
              check(!sample && !trgout, "integrator off: no samples");
            end
          end else begin
            if (!c0 && c1) begin
              if (gate_first < 0) gate_first = p;
              gate_len++;
            end
            if (!c1 && gate_first >= 0) c1_always = 1'b0;
            if (c1 == 1'b0 && p == 800) reset_seen = 1'b1;
            if (sample) begin
              check(p == stop + 2 + 5 + MUXT * n_smp, $sformatf("sample %0d phase %0d", n_smp, p));
              check(ad == 5'(n_smp) && ad4n == !ad[4], $sformatf("address at sample %0d", n_smp));
              n_smp++;
            end
            if (trgout) begin
              if (!prev_trg) trg_rise = p;
              n_trg++;
            end
            prev_trg = trgout;
          end
          @(posedge clk);
          n++;
        end
        if (m == 7) begin
          n_off++;
          after_off = 1'b1;
          continue;
        end
        // integration gate
        check(gate_first == start, $sformatf("gate start %0d expected %0d (mode %0d)", gate_first, start, m));
        check(gate_len == 5, "gate length 5 us");
        if (gate) n_sig_gate++; else n_bg_gate++;
        if (is_low_gain(mode_e'(m))) n_gain2++;
        if (reset_seen) begin
          n_readout++;
          check(n_smp == NS, $sformatf("samples per readout %0d", n_smp));
          check(n_trg == NS * MUXT, "trgout 640 us");
          check(trg_rise == stop + 2, "trgout start");
          if (is_avg && last_readout >= 0) begin
            check(per - last_readout == AVERAGE, "readout every AVERAGE periods");
            n_avg_interval++;
          end
          if (is_avg) last_readout = per;
          if (m == 6 && !after_off && gate != last_gate) n_toggle++;
          last_gate = gate;
          exp_sig = (m inside {0, 1, 2}) ? 1'b1 : (m == 6) ? !gate : 1'b0;
        end else begin
          check(is_avg, "non-averaging mode must read out every period");
          check(n_smp == 0 && n_trg == 0, "no samples without readout");
          check(c1_always, "integrator keeps charge between pulses");
          n_accum++;
        end
        after_off = 1'b0;
      end
      if (is_avg) check(last_readout >= 0, "average mode reads out");
    end
    $display("readouts %0d, accumulating periods %0d, signal gates %0d, background gates %0d",
             n_readout, n_accum, n_sig_gate, n_bg_gate);
    $display("boxcar alternations %0d, gain-2 periods %0d, off periods %0d, average intervals %0d",
             n_toggle, n_gain2, n_off, n_avg_interval);
    check(n_readout > 0, "readout happened");
    check(n_accum > 0, "accumulation happened");
    check(n_sig_gate > 0 && n_bg_gate > 0, "both gate positions used");
    check(n_toggle > 0, "boxcar alternation happened");
    check(n_gain2 > 0, "gain 2 selected");
    check(n_off > 0, "integrator-off mode ran");
    check(n_avg_interval > 0, "average interval measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
