// tb_mct_mux_scan: self-checking test of the multiplexer address scan.
//
// Default sizes (32 sensors, 20 cycles per sensor, sample 5 cycles after each
// address change). The control inputs change on the falling clock edge, as
// the integrator sequencer drives them. Checked cycle by cycle:
//   1. scan held: address 0, no sample, no trgout;
//   2. a read-out scan: address n/20 in cycle n after release, ad4n = ~ad[4],
//      exactly 32 sample pulses at cycles 5 + 20k carrying address k, trgout
//      high for 640 cycles (32 x 20 us), then the scan stops;
//   3. a scan with ensample low: addresses still step, no sample or trgout;
//   4. fixed address: ad parked at 16 with ad4n low, no sample or trgout;
//   5. scan reset returns the address to 0.
module tb_mct_mux_scan;
  import mct_pkg::*;

  localparam int unsigned MUXTIME = 20;
  localparam int unsigned SDELAY  = 5;
  localparam int unsigned SENSNUM = 16;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  scan_rst = 1'b1;
  logic  load_fixed = 1'b0;
  logic  ensample = 1'b1;
  addr_t ad;
  logic  ad4n, sample, trgout;
  int    checks = 0, failures = 0;

  mct_mux_scan #(.MUXTIME(MUXTIME), .SAMPLE_DELAY(SDELAY), .SENSNUM(SENSNUM)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Run one scan of `cycles` cycles from the release of scan_rst.
  task automatic run_scan(input logic en, input int cycles);
    int n_sample = 0, n_trg = 0;
    ensample = en;
    scan_rst = 1'b0;             // at a falling edge
    for (int n = 0; n < cycles; n++) begin
      int exp_addr = (n < int'(NSENS * MUXTIME)) ? n / int'(MUXTIME) : 0;
      logic exp_run = (n < int'(NSENS * MUXTIME));
      logic exp_smp = en && exp_run && (n % int'(MUXTIME) == int'(SDELAY));
      #1;
      check(ad == addr_t'(exp_addr), $sformatf("address at cycle %0d", n));
      check(ad4n == ~ad[4], "ad4n");
      check(trgout == (en && exp_run), "trgout");
      check(sample == exp_smp, $sformatf("sample at cycle %0d", n));
      if (sample) n_sample++;
      if (trgout) n_trg++;
      @(negedge clk);
    end
    check(n_sample == (en ? int'(NSENS) : 0), "samples per scan");
    check(n_trg == (en ? int'(NSENS * MUXTIME) : 0), "trgout length");
    scan_rst = 1'b1;
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // 1. held
    repeat (30) begin
      @(negedge clk);
      check(ad == '0 && !sample && !trgout, "held scan");
    end
    // 2. read-out scan
    run_scan(1'b1, 700);
    check(ad == '0, "address cleared by scan reset");
    // 3. scan without readout
    run_scan(1'b0, 700);
    // 4. fixed address
    ensample = 1'b1;
    load_fixed = 1'b1;
    scan_rst = 1'b0;
    @(negedge clk);
    repeat (100) begin
      @(negedge clk);
      check(ad == addr_t'(SENSNUM) && ad4n == 1'b0, "fixed address");
      check(!sample && !trgout, "no samples with fixed address");
    end
    // 5. reset
    load_fixed = 1'b0;
    scan_rst = 1'b1;
    @(negedge clk);
    @(negedge clk);
    check(ad == '0 && ad4n == 1'b1, "address after scan reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
