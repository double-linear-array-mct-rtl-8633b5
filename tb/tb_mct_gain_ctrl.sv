// tb_mct_gain_ctrl: self-checking test of the output gain select.
//
// Steps through the eight modes in random order and checks one clock later
// that gc selects gain 2 (gc = 1) exactly in modes 1 and 4, as the mode
// table prescribes, and gain 20 otherwise.
module tb_mct_gain_ctrl;
  import mct_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  mode_e mode = MODE_NORMAL;
  logic  gc;
  int    checks = 0, failures = 0;
  // gain-2 modes written out as a table: bit m set for mode m
  localparam logic [7:0] LOW_GAIN_MODES = 8'b0001_0010;

  mct_gain_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (gc !== 1'b0) failures++;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 64; i++) begin
      automatic logic [2:0] m = (i < 8) ? 3'(i) : 3'($urandom_range(0, 7));
      @(negedge clk) mode = mode_e'(m);
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (gc !== LOW_GAIN_MODES[m]) begin
        failures++;
        $display("FAIL mode %0d gc %0b", m, gc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
