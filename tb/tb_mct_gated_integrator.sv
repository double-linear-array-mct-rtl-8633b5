// tb_mct_gated_integrator: self-checking test of the gated-integrator model.
//
// With a 1 us integration time constant, 0.1 V integrated for 5 us gives
// -0.5 V, reached linearly at -0.1 V per us (checked every us). The test
// then holds, first 2 us with a 1 V input that the open run switch must
// keep out, then 500 us at 0 V (the value must stay within 3 %; the model's
// non-inverting input follows the input's 10 ms average, so a long or large
// input would shift the output), integrates a second 5 us pulse on
// top (-1.0 V: pulses add up while c1 = 1, which is how averaging works),
// resets (1/e of the value left after 1 us, below 1 mV after 20 us),
// integrates a negative input (positive output), closes both switches on a
// 50 mV input (inverting gain -1: -50 mV), and integrates 1 V long enough to
// clip at -13.5 V.
module tb_mct_gated_integrator;

  real  vin = 0.0;
  logic c0 = 1'b1;
  logic c1 = 1'b0;
  real  vout;
  int   checks = 0, failures = 0;

  mct_gated_integrator dut (.vin, .c0, .c1, .vout);

  task automatic check_near(input real v, input real e, input real tol, input string what);
    real m = (e < 0.0) ? -e : e;
    checks++;
    if (v - e > tol * m || e - v > tol * m) begin
      failures++;
      $display("FAIL %s: %f expected %f", what, v, e);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000;
    // integrate 0.1 V for 5 us
    vin = 0.1;
    c1 = 1'b1;
    c0 = 1'b0;
    for (int k = 1; k <= 4; k++) begin
      #1000;
      check_near(vout, -0.1 * k, 0.05, "linear ramp during the gate");
    end
    #1000;
    c0 = 1'b1;
    vin = 1.0;
    #100;
    check_near(vout, -0.5, 0.03, "integral of 0.1 V over 5 us");
    #1900;
    check_near(vout, -0.5, 0.03, "input ignored while holding");
    vin = 0.0;
    #500_000;
    check_near(vout, -0.5, 0.03, "held for 500 us");
    // second pulse added without a reset
    vin = 0.1;
    c0 = 1'b0;
    #5000;
    c0 = 1'b1;
    vin = 0.0;
    #100;
    check_near(vout, -1.0, 0.03, "second pulse adds to the first");
    // reset: 1 us time constant
    c1 = 1'b0;
    #1000;
    check_near(vout, -1.0 * $exp(-1.0), 0.05, "reset time constant 1 us");
    #19_000;
    check_near(vout - 1.0, -1.0, 1.0e-3, "reset discharges the capacitor");
    // opposite polarity
    c1 = 1'b1;
    vin = -0.2;
    c0 = 1'b0;
    #2000;
    c0 = 1'b1;
    vin = 0.0;
    #100;
    check_near(vout, 0.4, 0.03, "negative input gives a positive output");
    c1 = 1'b0;
    #20_000;
    // both switches closed: inverting follower
    vin = 0.05;
    c0 = 1'b0;
    #20_000;
    check_near(vout, -0.05, 0.03, "both switches closed: gain -1");
    // clipping
    c0 = 1'b1;
    vin = 0.0;
    #20_000;
    c1 = 1'b1;
    vin = 1.0;
    c0 = 1'b0;
    #20_000;
    check_near(vout, -13.5, 1.0e-3, "clips at the negative rail");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
