// tb_mct_integ_seq: self-checking test of the gated-integrator sequencer.
//
// The testbench drives the 1000-cycle phase count itself and walks the
// sequencer through a scripted list of trigger periods (normal, background,
// alternating, averaging with readout enabled only in some periods, and the
// integrator-off mode). Mode and readout enable change at phase 900, where no
// event is scheduled. Each scripted period lists, worked out by hand, which
// gate (signal or background) it must use; from that the testbench derives
// the expected level of c0, c1, scan_rst, load_fixed and sig in every cycle:
// gate open from START to STOP (2..7 or 100..105), scan released at STOP+2,
// integrators and scan reset at 800 only in read-out periods, both switches
// closed in mode 7. A second instance with STARTINT = 998 and STOPINT = 8
// checks a gate that straddles the period boundary (10 cycles open). A last
// period switches to an average mode in the middle of a scan and checks that
// the scan and the integrators are still reset at 800.
module tb_mct_integ_seq;
  import mct_pkg::*;

  localparam int DIVIDE = 1000;

  typedef struct {
    mode_e mode;
    logic  en;
    logic  gate;   // expected gate: 1 = signal, 0 = background
  } frame_t;

  frame_t script [18] = '{
    '{MODE_NORMAL,    1'b1, 1'b1}, '{MODE_NORMAL,    1'b1, 1'b1},
    '{MODE_BG_NORMAL, 1'b1, 1'b1}, '{MODE_BG_NORMAL, 1'b1, 1'b0},
    '{MODE_BG_NORMAL, 1'b1, 1'b0}, '{MODE_BOXCAR,    1'b1, 1'b0},
    '{MODE_BOXCAR,    1'b1, 1'b1}, '{MODE_BOXCAR,    1'b1, 1'b0},
    '{MODE_BOXCAR,    1'b1, 1'b1}, '{MODE_AVG_G2,    1'b0, 1'b0},
    '{MODE_AVG_G2,    1'b0, 1'b0}, '{MODE_AVG_G2,    1'b1, 1'b0},
    '{MODE_AVG_G2,    1'b0, 1'b1}, '{MODE_AVG_G2,    1'b1, 1'b1},
    '{MODE_OFF,       1'b0, 1'b1}, '{MODE_OFF,       1'b0, 1'b1},
    '{MODE_NORMAL,    1'b1, 1'b1}, '{MODE_NORMAL,    1'b1, 1'b1}
  };

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  phase_t phase = phase_t'(900);
  mode_e  mode = MODE_NORMAL;
  logic   ensample = 1'b1;
  logic   c0, c1, scan_rst, load_fixed, sig;
  logic   c0_w, c1_w, scan_rst_w, load_fixed_w, sig_w;
  int     checks = 0, failures = 0;
  int     n_gate_sig = 0, n_gate_bg = 0, n_accumulate = 0, n_off = 0, n_midscan = 0;

  mct_integ_seq dut (.*);

  mct_integ_seq #(.STARTINT(998), .STOPINT(8)) dut_w (
    .clk, .rst_n, .phase, .mode(MODE_NORMAL), .ensample(1'b1),
    .c0(c0_w), .c1(c1_w), .scan_rst(scan_rst_w), .load_fixed(load_fixed_w), .sig(sig_w)
  );

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (25000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s_c0, s_c1, s_scan;   // levels at the start of a scripted period
    s_c0 = 1'b1; s_c1 = 1'b0; s_scan = 1'b1;
    @(negedge clk);
    #1 check(c0 && !c1 && scan_rst && !load_fixed && sig, "reset state");
    @(posedge clk) #1 rst_n = 1'b1;
    for (int f = 0; f < 18; f++) begin
      automatic frame_t fr = script[f];
      automatic int start = fr.gate ? 2 : 100;
      automatic int stop  = fr.gate ? 7 : 105;
      automatic int c0_low = 0;
      mode = fr.mode;
      ensample = fr.en;
      for (int k = 0; k < DIVIDE; k++) begin
        automatic int p = (900 + k) % DIVIDE;
        logic e_c0, e_c1, e_scan, e_ld, e_sig;
        // phase p is presented on this clock; the sequencer acts on the
        // falling edge
        @(negedge clk);
        #1;
        if (fr.mode == MODE_OFF) begin
          e_c0 = 1'b0; e_c1 = 1'b0; e_scan = 1'b0; e_ld = 1'b1; e_sig = fr.gate;
        end else begin
          automatic logic late = (k >= 100);    // phases 0..899 of the period
          e_ld  = 1'b0;
          e_c0  = (late && p >= start && p < stop) ? 1'b0 :
                  (late && p >= start) ? 1'b1 : s_c0;
          e_c1  = (!late || p < start) ? s_c1 : !(fr.en && p >= 800);
          e_scan = (!late || p < stop + 2 || !fr.en) ? s_scan : (p >= 800);
          e_sig = fr.gate;
          if (fr.en && late && p >= 800)
            e_sig = (fr.mode inside {MODE_NORMAL, MODE_AVG_G2, MODE_AVG_G20}) ? 1'b1 :
                    (fr.mode == MODE_BOXCAR) ? !fr.gate : 1'b0;
        end
        check(c0 == e_c0, $sformatf("c0 period %0d phase %0d", f, p));
        check(c1 == e_c1, $sformatf("c1 period %0d phase %0d", f, p));
        check(scan_rst == e_scan, $sformatf("scan_rst period %0d phase %0d", f, p));
        check(load_fixed == e_ld, "load_fixed");
        check(sig == e_sig, $sformatf("sig period %0d phase %0d", f, p));
        if (!c0 && c1) c0_low++;
        // wrapped gate of the second instance: open at 998, 999, 0..7
        if (f >= 2) check(c0_w == !(p >= 998 || p < 8), "wrapped gate");
        @(posedge clk);
        #1 phase = phase_t'((p + 1) % DIVIDE);
      end
      if (fr.mode != MODE_OFF) begin
        check(c0_low == 5, "integration gate length 5 us");
        if (fr.gate) n_gate_sig++; else n_gate_bg++;
        if (!fr.en) n_accumulate++;
        s_c0 = 1'b1;
        s_c1 = !fr.en;
        s_scan = fr.en ? 1'b1 : s_scan;
      end else begin
        n_off++;
        s_c0 = 1'b0; s_c1 = 1'b0; s_scan = 1'b1;  // scan reset on leaving mode 7
      end
    end
    // A period whose scan has started must end with the reset even if the
    // mode changes to an average mode (ensample low) during the scan.
    mode = MODE_NORMAL;
    ensample = 1'b1;
    for (int k = 0; k < DIVIDE; k++) begin
      automatic int p = (900 + k) % DIVIDE;
      @(negedge clk);
      #1;
      if (k >= 100 && p == 300) check(!scan_rst, "scan running before the mode change");
      if (k >= 100 && p == 500) begin
        mode = MODE_AVG_G2;
        ensample = 1'b0;
      end
      if (k >= 100 && p == 800) begin
        check(scan_rst && !c1, "reset after a mode change during the scan");
        if (scan_rst && !c1) n_midscan++;
      end
      @(posedge clk);
      #1 phase = phase_t'((p + 1) % DIVIDE);
    end
    check(n_gate_sig > 0 && n_gate_bg > 0 && n_accumulate > 0 && n_off > 0 && n_midscan > 0,
          "all cases covered");
    $display("signal gates %0d, background gates %0d, accumulating periods %0d, off periods %0d",
             n_gate_sig, n_gate_bg, n_accumulate, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
