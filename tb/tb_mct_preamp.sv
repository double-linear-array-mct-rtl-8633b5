// tb_mct_preamp: self-checking test of the preamplifier model.
//
// Applies a 1 mV step and checks the response against the closed-form
// values of a gain-101 amplifier behind a 100 us AC coupling with a 159 ns
// bandwidth pole: about 63 % of 101 mV one pole time after the step, about
// 99 mV 2 us after it, the AC-coupling decay to 101 mV x exp(-t/100 us)
// after 50, 100 and 200 us, and back to zero. A -0.5 mV step must give the same
// gain with the opposite sign. Steps of +1 V and -1 V must clip at the
// +-13.5 V rails.
module tb_mct_preamp;

  real vin = 0.0;
  real vout;
  int  checks = 0, failures = 0;

  mct_preamp dut (.vin, .vout);

  task automatic check_near(input real v, input real e, input real tol, input string what);
    checks++;
    if (v - e > tol * e || e - v > tol * e) begin
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
    #1000;
    check_near(vout + 1.0, 1.0, 1.0e-6, "zero input gives zero output");
    vin = 1.0e-3;
    #159;
    check_near(vout, 0.101 * (1.0 - $exp(-1.0)), 0.15, "bandwidth pole");
    #(2000 - 159);
    check_near(vout, 0.101 * $exp(-2.0 / 100.0), 0.02, "gain 101");
    #48000;
    check_near(vout, 0.101 * $exp(-0.5), 0.03, "AC coupling after 50 us");
    #50000;
    check_near(vout, 0.101 * $exp(-1.0), 0.03, "100 us AC coupling");
    #100000;
    check_near(vout, 0.101 * $exp(-2.0), 0.03, "AC coupling after 200 us");
    vin = 0.0;
    #1_000_000;
    check_near(vout + 1.0, 1.0, 1.0e-4, "settles back to zero");
    // a negative step: same gain, opposite sign
    vin = -0.5e-3;
    #2000;
    check_near(-vout, 0.0505 * $exp(-2.0 / 100.0), 0.02, "gain 101, negative input");
    vin = 0.0;
    #1_000_000;
    vin = 1.0;
    #5000;
    check_near(vout, 13.5, 1.0e-6, "clips at the positive rail");
    vin = -1.0;
    #5000;
    check_near(-vout, 13.5, 1.0e-6, "clips at the negative rail");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
