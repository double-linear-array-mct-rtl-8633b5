// tb_mct_pll_divider: self-checking test of the divide-by-1000 phase counter.
//
// Runs 3.5 trigger periods at the default modulus of 1000 and checks, every
// cycle, `phase` against a counter kept by the testbench, `tick` against
// phase == 0, and that `ckout` is high exactly in the cycle after phase 0,
// once every 1000 cycles (the 1 kHz rate of the laser trigger).
module tb_mct_pll_divider;
  import mct_pkg::*;

  localparam int unsigned DIVIDE = 1000;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  phase_t phase;
  logic   tick, ckout;
  int     checks = 0, failures = 0;

  mct_pll_divider #(.DIVIDE(DIVIDE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_phase = 0;
    int last_rise = -1;
    int n_rise = 0;
    logic prev_ck = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 3500; cyc++) begin
      check(phase == phase_t'(exp_phase), "phase");
      check(tick == (exp_phase == 0), "tick");
      // ckout is the registered decode: high while phase == 1 (after cycle 0)
      check(ckout == (cyc > 0 && exp_phase == 1), "ckout");
      if (ckout && !prev_ck) begin
        if (last_rise >= 0) check(cyc - last_rise == DIVIDE, "ckout period");
        last_rise = cyc;
        n_rise++;
      end
      prev_ck = ckout;
      @(negedge clk);
      exp_phase = (exp_phase + 1) % DIVIDE;
    end
    check(n_rise == 4, "ckout pulses in 3500 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
