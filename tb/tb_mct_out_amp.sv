// tb_mct_out_amp: self-checking test of the output buffer model.
//
// Checks gain 20 with gc = 0 and gain 2 with gc = 1 for inputs of both signs,
// and clipping at +-13.5 V, then sweeps the input from -8 V to +8 V at both
// gains against gain x input limited to +-13.5 V.
module tb_mct_out_amp;

  real  vin = 0.0;
  logic gc = 1'b0;
  real  vout;
  int   checks = 0, failures = 0;

  mct_out_amp dut (.vin, .gc, .vout);

  task automatic expect_out(input real v, input logic g, input real e);
    vin = v;
    gc = g;
    #10;
    checks++;
    if (vout - e > 1.0e-9 || e - vout > 1.0e-9) begin
      failures++;
      $display("FAIL vin %f gc %0b: %f expected %f", v, g, vout, e);
    end
  endtask

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_out(0.1, 1'b0, 2.0);
    expect_out(-0.03, 1'b0, -0.6);
    expect_out(0.1, 1'b1, 0.2);
    expect_out(-0.4, 1'b1, -0.8);
    expect_out(1.0, 1'b0, 13.5);
    expect_out(-1.0, 1'b0, -13.5);
    expect_out(-7.0, 1'b1, -13.5);
    // sweep -8 V .. +8 V in 0.25 V steps at both gains
    for (int i = -32; i <= 32; i++) begin
      automatic real v  = 0.25 * i;
      automatic real e2 = 2.0 * v;
      automatic real e20 = 20.0 * v;
      if (e2 > 13.5) e2 = 13.5;
      if (e2 < -13.5) e2 = -13.5;
      if (e20 > 13.5) e20 = 13.5;
      if (e20 < -13.5) e20 = -13.5;
      expect_out(v, 1'b1, e2);
      expect_out(v, 1'b0, e20);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
