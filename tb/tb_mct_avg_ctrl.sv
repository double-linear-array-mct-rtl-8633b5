// tb_mct_avg_ctrl: self-checking test of the averaging readout enable.
//
// Uses AVERAGE = 4 and a trigger period of 8 cycles (tick every 8th cycle).
// For each mode it runs 13 periods and checks, in every cycle, that ensample
// is 1 in modes 0, 3, 6, 0 in mode 7, and in the average modes high for
// exactly one whole period out of every AVERAGE (delayed one cycle by
// its register), with the counter of periods
// kept by the testbench. It also checks the readout rate: 3 readout periods
// in 12 consecutive periods of an average mode.
module tb_mct_avg_ctrl;
  import mct_pkg::*;

  localparam int unsigned AVERAGE = 4;
  localparam int unsigned PERIOD  = 8;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  tick = 1'b0;
  mode_e mode = MODE_NORMAL;
  logic  ensample;
  int    checks = 0, failures = 0;

  mct_avg_ctrl #(.AVERAGE(AVERAGE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int periods = 0;  // number of ticks seen by the block since reset
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int m = 0; m < 8; m++) begin
      int readouts;
      readouts = 0;
      mode = mode_e'(m);
      for (int p = 0; p < 13; p++) begin
        for (int c = 0; c < int'(PERIOD); c++) begin
          int prev_periods;
          tick = (c == 0);
          prev_periods = periods;
          @(posedge clk);
          if (tick) periods++;
          @(negedge clk);
          // skip the first cycle after a mode change (registered output)
          if (!(p == 0 && c == 0)) begin
            logic exp;
            case (m)
              0, 3, 6: exp = 1'b1;
              7:       exp = 1'b0;
              default: exp = ((prev_periods % AVERAGE) == AVERAGE - 1);
            endcase
            check(ensample == exp, $sformatf("ensample mode %0d", m));
            if (c == 1 && exp && p >= 1) readouts++;
          end
        end
      end
      if (m inside {1, 2, 4, 5}) check(readouts == 3, "readout rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
