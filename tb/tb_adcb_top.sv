// tb_adcb_top: end-to-end testbench of the two-path board at its default
// parameters.
//
// Each diversity path's downlink is looped back into its own uplink
// (adc_data[p] = dac_i[p][15:2]). That is what the ADC sees of the 80 MHz IF
// sampled at 64 MHz. Every path and FA carries a different constant complex
// value C. After the filters settle, each uplink output must read
//   C * e^{-j 2 th_f} / 4,   th_f = 2*pi*ftw_f / 2^32
// (two clocks of NCO phase between transmitter and receiver; 1/2 from the
// combiner and 1/2 from the demodulator). A swap of paths or FAs shows as
// wrong values.
//
// One configuration write reaches both paths. The sequence:
//   * visits all three profiles (two-stage filters in the 1.75 MHz one);
//   * sends an undefined profile code, which must be ignored;
//   * retunes the carriers without a profile change.
// It checks that both paths switch together, request and deliver samples
// in the same clocks, and keep the profile's rates. Each mechanism is counted
// and must occur.
module tb_adcb_top;
  import dif_pkg::*;

  localparam real M_PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  profile_t cfg_profile = PROF_7M;
  profile_t profile [2];
  logic [31:0] cfg_ftw_u [2], cfg_ftw_d [2];
  logic [15:0] mode_changes [2];
  logic tx_req [2], rx_valid [2];
  logic signed [15:0] tx_i [2][2], tx_q [2][2], dac_i [2], dac_q [2], rx_i [2][2], rx_q [2][2];
  logic signed [13:0] adc_data [2];
  int checks = 0, failures = 0;

  int n_prof [3] = '{0, 0, 0};
  int n_switch = 0, n_ignored = 0, n_retune = 0, n_misaligned = 0;

  adcb_top dut (
    .clk, .rst_n, .cfg_we, .cfg_profile, .cfg_ftw_u, .cfg_ftw_d, .profile, .mode_changes,
    .tx_req, .tx_i, .tx_q, .dac_i, .dac_q, .adc_data, .rx_valid, .rx_i, .rx_q
  );

  assign adc_data[0] = dac_i[0][15:2];
  assign adc_data[1] = dac_i[1][15:2];

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && (tx_req[0] != tx_req[1] || rx_valid[0] != rx_valid[1] || profile[0] != profile[1]))
      n_misaligned++;

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
    @(negedge clk);
  endtask

  function automatic bit near(input int got, input real want);
    return (real'(got) - want <= 120.0) && (want - real'(got) <= 120.0);
  endfunction

  // c[path][fa] = {re, im}; checks the loop-back result of both paths
  task automatic run(input int c [2][2][2], input int cycles);
    int  reqs = 0, outs = 0, bad = 0, seen = 0;
    real th, er [2][2], ei [2][2];
    for (int p = 0; p < 2; p++)
      for (int f = 0; f < 2; f++) begin
        tx_i[p][f] = 16'(c[p][f][0]);
        tx_q[p][f] = 16'(c[p][f][1]);
        th = -2.0 * 2.0 * M_PI * real'(cfg_ftw_d[f]) / 4294967296.0;
        er[p][f] = (c[p][f][0] * $cos(th) - c[p][f][1] * $sin(th)) / 4.0;
        ei[p][f] = (c[p][f][0] * $sin(th) + c[p][f][1] * $cos(th)) / 4.0;
      end
    for (int k = 0; k < cycles; k++) begin
      @(posedge clk);
      #1;
      if (tx_req[0]) reqs++;
      if (rx_valid[0]) begin
        outs++;
        if (k > cycles - 1500) begin
          seen++;
          for (int p = 0; p < 2; p++)
            for (int f = 0; f < 2; f++)
              if (!near(rx_i[p][f], er[p][f]) || !near(rx_q[p][f], ei[p][f])) begin
                bad++;
                if (bad < 4) $display("profile %0d path %0d FA%0d: %0d,%0d expected %.0f,%.0f",
                                      profile[0], p, f + 1, rx_i[p][f], rx_q[p][f], er[p][f], ei[p][f]);
              end
        end
      end
    end
    check(seen > 0 && bad == 0, $sformatf("profile %0d loop-back values (%0d wrong)", profile[0], bad));
    check(reqs >= cycles / rate_of(profile[0]) - 1 && reqs <= cycles / rate_of(profile[0]) + 1,
          $sformatf("profile %0d: %0d tx requests in %0d cycles", profile[0], reqs, cycles));
    check(outs >= cycles / rate_of(profile[0]) - 2 && outs <= cycles / rate_of(profile[0]) + 1,
          $sformatf("profile %0d: %0d rx outputs in %0d cycles", profile[0], outs, cycles));
    n_prof[profile[0]]++;
  endtask

  initial begin
    logic [15:0] mc;
    cfg_ftw_u = '{FTW_12M, FTW_20M};
    cfg_ftw_d = '{FTW_12M, FTW_20M};
    for (int p = 0; p < 2; p++) begin
      tx_i[p] = '{16'sd0, 16'sd0};
      tx_q[p] = '{16'sd0, 16'sd0};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(profile[0] == PROF_7M && profile[1] == PROF_7M && mode_changes[0] == 0, "reset state");

    run('{'{'{20000, -8000}, '{-6000, 14000}}, '{'{-11000, 3000}, '{9000, 9000}}}, 6000);

    mc = mode_changes[0];
    configure(PROF_3M5, FTW_12M, FTW_20M);
    check(profile[0] == PROF_3M5 && profile[1] == PROF_3M5 && mode_changes[0] == mc + 1, "switch to 3.5 MHz");
    if (profile[1] == PROF_3M5) n_switch++;
    run('{'{'{-12000, 9000}, '{16000, 3000}}, '{'{4000, -15000}, '{-7000, -7000}}}, 6000);

    mc = mode_changes[0];
    configure(PROF_1M75, FTW_12M, FTW_20M);
    check(profile[0] == PROF_1M75 && profile[1] == PROF_1M75 && mode_changes[1] == mc + 1, "switch to 1.75 MHz");
    if (profile[1] == PROF_1M75) n_switch++;
    run('{'{'{10000, 10000}, '{-15000, -5000}}, '{'{2000, 17000}, '{13000, -6000}}}, 7000);

    mc = mode_changes[0];
    configure(profile_t'(2'd3), FTW_12M, FTW_20M);
    check(profile[0] == PROF_1M75 && profile[1] == PROF_1M75 && mode_changes[0] == mc, "undefined profile ignored");
    if (profile[0] == PROF_1M75 && mode_changes[0] == mc) n_ignored++;

    configure(PROF_7M, 32'h2000_0000, 32'h6000_0000);     // 8 and 24 MHz carriers
    check(profile[0] == PROF_7M && profile[1] == PROF_7M, "switch back to 7 MHz with new carriers");
    if (profile[0] == PROF_7M) begin n_switch++; n_retune++; end
    run('{'{'{-18000, -4000}, '{5000, -17000}}, '{'{15000, 5000}, '{-9000, 12000}}}, 6000);

    check(n_prof[PROF_7M] > 0,   "7 MHz profile exercised");
    check(n_prof[PROF_3M5] > 0,  "3.5 MHz profile exercised");
    check(n_prof[PROF_1M75] > 0, "1.75 MHz profile (two-stage filters) exercised");
    check(n_switch > 0,  "profile switch exercised");
    check(n_ignored > 0, "undefined profile code exercised");
    check(n_retune > 0,  "carrier reprogramming exercised");
    check(n_misaligned == 0, "both paths switch and run in step");
    $display("mechanisms: profiles 7M=%0d 3.5M=%0d 1.75M=%0d, switches=%0d, ignored codes=%0d, retunes=%0d",
             n_prof[0], n_prof[1], n_prof[2], n_switch, n_ignored, n_retune);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
