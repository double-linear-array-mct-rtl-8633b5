// tb_mct_avg_max: the controller with the largest number of averaged pulses,
// AVERAGE = 1024, in mode 2 (average, gain 20). All other parameters are at
// their defaults.
//
// Trigger periods are delimited by the rising edge of ckout. For every
// period the testbench counts, from the controller outputs alone:
//   - integration gates (c0 falling) and their length and position: exactly
//     one 5 us gate per period, starting STARTINT - 1 cycles after the cycle
//     in which ckout is first seen high (ckout is high during phase 1);
//   - ADC sample pulses and integrator resets (c1 falling).
// A readout period has 32 samples and one reset; every other period has
// neither, so the integrators keep summing. Consecutive readouts must be
// exactly 1024 periods and 1024 gates apart, and gc must stay 0 (gain 20).
// At least three readouts are required.
module tb_mct_avg_max;
  localparam int AVERAGE  = 1024;
  localparam int STARTINT = 2;
  localparam int NREAD    = 3;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [2:0] mode = 3'd2;
  logic [4:0] ad;
  logic       ad4n, c0, c1, sample, gc, ckout, trgout;

  int checks = 0, failures = 0;
  int n_readout = 0, n_accum = 0;

  mct_cpld #(.AVERAGE(AVERAGE)) dut (.*);

  always #500 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Per-period bookkeeping.
  logic c0_q = 1'b1, c1_q = 1'b0, ckout_q = 1'b0;
  bit   started = 1'b0;
  int   cyc = 0;            // cycles since ckout was first seen high
  int   period = 0;         // period index
  int   gates = 0, gate_start = -1, gate_len = 0, samples = 0, resets = 0;
  int   last_readout = -1;  // period index of the previous readout
  int   gates_total = 0, gates_at_readout = 0;

  always @(posedge clk) if (rst_n) begin
    if (ckout && !ckout_q) begin
      if (started) begin
        check(gates == 1, "one gate per period");
        check(gate_start == STARTINT - 1, "gate position");
        check(gate_len == 5, "gate length 5 us");
        if (samples > 0) begin
          check(samples == 32, "32 samples in a readout period");
          check(resets == 1, "reset in a readout period");
          if (last_readout >= 0) begin
            check(period - last_readout == AVERAGE, "readouts AVERAGE periods apart");
            check(gates_total - gates_at_readout == AVERAGE, "AVERAGE pulses summed");
          end
          last_readout     = period;
          gates_at_readout = gates_total;
          n_readout++;
        end else begin
          check(resets == 0, "no reset while accumulating");
          n_accum++;
        end
        period++;
      end
      started    = 1'b1;
      cyc        = 0;
      gates      = 0;
      gate_start = -1;
      gate_len   = 0;
      samples    = 0;
      resets     = 0;
    end else begin
      cyc++;
    end
    if (started) begin
      if (c0_q && !c0) begin
        gates++;
        gates_total++;
        gate_start = cyc;
      end
      if (!c0) gate_len++;
      if (c1_q && !c1) resets++;
      if (sample) samples++;
      check(gc == 1'b0, "gain 20 in mode 2");
    end
    c0_q    = c0;
    c1_q    = c1;
    ckout_q = ckout;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_readout == NREAD);
    check(n_accum >= (NREAD - 1) * (AVERAGE - 1), "accumulating periods seen");
    $display("readouts=%0d accumulating periods=%0d", n_readout, n_accum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: three readouts need about 3 x 1024 periods of 1000 cycles.
  initial begin
    repeat ((NREAD + 1) * AVERAGE * 1000 + 10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: only %0d readouts", n_readout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
