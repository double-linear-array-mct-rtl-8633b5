// tb_mct_mux32: self-checking test of the 32-to-1 output multiplexer model.
//
// Gives every input a distinct voltage (input i carries i + 0.25 V) and
// checks for all 32 addresses that the output carries input (k + 16) mod 32,
// as the board wiring of the two 16-to-1 halves implies, and that the output
// is 0 V with both halves disabled.
module tb_mct_mux32;

  logic [4:0] ad = '0;
  logic       ad4n = 1'b1;
  real        s [32];
  real        d;
  int         checks = 0, failures = 0;

  mct_mux32 dut (.ad, .ad4n, .s, .d);

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) s[i] = real'(i) + 0.25;
    for (int k = 0; k < 32; k++) begin
      ad = 5'(k);
      ad4n = ~ad[4];
      #10;
      checks++;
      if (d != real'((k + 16) % 32) + 0.25) begin
        failures++;
        $display("FAIL address %0d: %f", k, d);
      end
    end
    ad = 5'd3;
    ad4n = 1'b0;
    #10;
    checks++;
    if (d != 0.0) begin
      failures++;
      $display("FAIL disabled output %f", d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
