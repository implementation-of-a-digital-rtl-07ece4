// tb_dif_transceiver: end-to-end testbench of the transceiver at its default
// parameters.
//
// The downlink output is looped back into the uplink: adc_data takes the top 14
// bits of dac_i. This is what the ADC sees of the 80 MHz IF. The DAC's 64 MHz
// modulation sampled at 64 MHz leaves exactly the real (I) part of the complex
// stream, and FA1/FA2 at 76/84 MHz alias to the 12/20 MHz NCO frequencies.
// Each FA carries its own constant complex value C_f. After the filters settle,
// the uplink must return
//   rx_f = C_f * e^{-j 2 th_f} / 4
// th_f = 2*pi*ftw_f/2^32 is the carrier step per clock. The rotation is the two
// clocks of phase by which the receiver's NCO runs ahead of the transmitter's
// carrier at the loop-back point. The 1/4 is the combiner's 1/2 times the
// demodulator's 1/2.
//
// The sequence reconfigures the design through the configuration port. It
// visits all three profiles (the 1.75 MHz one uses the two-stage filters),
// sends an undefined profile code that must be ignored and reprograms the NCO
// carriers without a profile change. Each of these mechanisms is counted and
// must occur. Request and output rates are checked in every profile.
module tb_dif_transceiver;
  import dif_pkg::*;

  localparam real M_PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  profile_t cfg_profile = PROF_7M, profile;
  logic [31:0] cfg_ftw_u [2], cfg_ftw_d [2];
  logic [15:0] mode_changes;
  logic tx_req, rx_valid;
  logic signed [15:0] tx_i [2], tx_q [2], dac_i, dac_q, rx_i [2], rx_q [2];
  logic signed [13:0] adc_data;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_prof [3] = '{0, 0, 0};
  int n_switch = 0, n_ignored = 0, n_retune = 0;

  dif_transceiver dut (
    .clk, .rst_n, .cfg_we, .cfg_profile, .cfg_ftw_u, .cfg_ftw_d, .profile, .mode_changes,
    .tx_req, .tx_i, .tx_q, .dac_i, .dac_q, .adc_data, .rx_valid, .rx_i, .rx_q
  );

  assign adc_data = dac_i[15:2];

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic configure(input profile_t p, input logic [31:0] f1, input logic [31:0] f2);
    @(negedge clk);
    cfg_we = 1;
    cfg_profile = p;
    cfg_ftw_u = '{f1, f2};
    cfg_ftw_d = '{f1, f2};
    @(negedge clk);
    cfg_we = 0;
  endtask

  // Run one profile with constant FA values and check the loop-back result.
  task automatic run(input int a1, b1, a2, b2, input int cycles);
    int  reqs = 0, outs = 0, bad = 0, seen = 0;
    real ph1, ph2, e1i, e1q, e2i, e2q;
    logic [31:0] f1, f2;
    tx_i = '{16'(a1), 16'(a2)};
    tx_q = '{16'(b1), 16'(b2)};
    f1 = dut.ftw_d[0];
    f2 = dut.ftw_d[1];
    ph1 = -2.0 * 2.0 * M_PI * real'(f1) / 4294967296.0;
    ph2 = -2.0 * 2.0 * M_PI * real'(f2) / 4294967296.0;
    e1i = (a1 * $cos(ph1) - b1 * $sin(ph1)) / 4.0;
    e1q = (a1 * $sin(ph1) + b1 * $cos(ph1)) / 4.0;
    e2i = (a2 * $cos(ph2) - b2 * $sin(ph2)) / 4.0;
    e2q = (a2 * $sin(ph2) + b2 * $cos(ph2)) / 4.0;
    for (int k = 0; k < cycles; k++) begin
      @(posedge clk);
      #1;
      if (tx_req) reqs++;
      if (rx_valid) begin
        outs++;
        if (k > cycles - 1500) begin
          seen++;
          if (real'(rx_i[0]) - e1i > 120.0 || e1i - real'(rx_i[0]) > 120.0 ||
              real'(rx_q[0]) - e1q > 120.0 || e1q - real'(rx_q[0]) > 120.0 ||
              real'(rx_i[1]) - e2i > 120.0 || e2i - real'(rx_i[1]) > 120.0 ||
              real'(rx_q[1]) - e2q > 120.0 || e2q - real'(rx_q[1]) > 120.0) begin
            bad++;
            if (bad < 4) $display("profile %0d: FA1 %0d,%0d FA2 %0d,%0d expected %.0f,%.0f %.0f,%.0f",
                                  profile, rx_i[0], rx_q[0], rx_i[1], rx_q[1], e1i, e1q, e2i, e2q);
          end
        end
      end
    end
    check(seen > 0 && bad == 0, $sformatf("profile %0d loop-back values (%0d of %0d wrong)", profile, bad, seen));
    check(reqs >= cycles / rate_of(profile) - 1 && reqs <= cycles / rate_of(profile) + 1,
          $sformatf("profile %0d: %0d tx requests in %0d cycles", profile, reqs, cycles));
    check(outs >= cycles / rate_of(profile) - 2 && outs <= cycles / rate_of(profile) + 1,
          $sformatf("profile %0d: %0d rx outputs in %0d cycles", profile, outs, cycles));
    n_prof[profile]++;
  endtask

  initial begin
    logic [15:0] mc;
    cfg_ftw_u = '{FTW_12M, FTW_20M};
    cfg_ftw_d = '{FTW_12M, FTW_20M};
    tx_i = '{16'sd0, 16'sd0};
    tx_q = '{16'sd0, 16'sd0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(profile == PROF_7M && mode_changes == 0, "reset state");

    run(20000, -8000, -6000, 14000, 6000);               // 7 MHz profile after reset

    mc = mode_changes;
    configure(PROF_3M5, FTW_12M, FTW_20M);
    @(negedge clk);
    check(profile == PROF_3M5 && mode_changes == mc + 1, "switch to 3.5 MHz");
    if (profile == PROF_3M5) n_switch++;
    run(-12000, 9000, 16000, 3000, 6000);

    mc = mode_changes;
    configure(PROF_1M75, FTW_12M, FTW_20M);
    @(negedge clk);
    check(profile == PROF_1M75 && mode_changes == mc + 1, "switch to 1.75 MHz");
    if (profile == PROF_1M75) n_switch++;
    run(10000, 10000, -15000, -5000, 7000);

    // undefined profile code: the active profile must stay
    mc = mode_changes;
    configure(profile_t'(2'd3), FTW_12M, FTW_20M);
    @(negedge clk);
    check(profile == PROF_1M75 && mode_changes == mc, "undefined profile ignored");
    if (profile == PROF_1M75 && mode_changes == mc) n_ignored++;

    mc = mode_changes;
    configure(PROF_7M, FTW_12M, FTW_20M);
    @(negedge clk);
    check(profile == PROF_7M && mode_changes == mc + 1, "switch back to 7 MHz");
    if (profile == PROF_7M) n_switch++;
    run(-18000, -4000, 5000, -17000, 6000);

    // carriers reprogrammed to 8 and 24 MHz without a profile change
    configure(PROF_7M, 32'h2000_0000, 32'h6000_0000);
    @(negedge clk);
    check(dut.ftw_u[0] == 32'h2000_0000 && dut.ftw_d[1] == 32'h6000_0000, "carriers reprogrammed");
    n_retune++;
    run(15000, 5000, -9000, 12000, 6000);

    check(n_prof[PROF_7M] > 0,   "7 MHz profile exercised");
    check(n_prof[PROF_3M5] > 0,  "3.5 MHz profile exercised");
    check(n_prof[PROF_1M75] > 0, "1.75 MHz profile (two-stage filters) exercised");
    check(n_switch > 0,  "profile switch exercised");
    check(n_ignored > 0, "undefined profile code exercised");
    check(n_retune > 0,  "carrier reprogramming exercised");
    $display("mechanisms: profiles 7M=%0d 3.5M=%0d 1.75M=%0d, switches=%0d, ignored codes=%0d, retunes=%0d",
             n_prof[0], n_prof[1], n_prof[2], n_switch, n_ignored, n_retune);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
