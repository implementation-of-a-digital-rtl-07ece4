// tb_wimax_evm: 64-QAM OFDM workload through the whole transceiver, in each
// of the three bandwidth profiles.
//
// Each FA carries its own stream of OFDM symbols shaped like IEEE 802.16d
// OFDM: a 256-point FFT with 200 used subcarriers, a 1/4 cyclic prefix and
// 64-QAM on every used subcarrier. The baseband is sampled at twice the
// fundamental frequency (16, 8 or 4 MHz), so each symbol is built here with a
// 512-point inverse DFT (subcarriers -100..100, DC unused) followed by a
// 128-sample prefix. The downlink output is looped back into the uplink as in
// tb_dif_transceiver: adc_data = dac_i[15:2].
//
// The receiver side of the test first finds the loop delay by correlation.
// It then takes a 512-point DFT of each received symbol, with the window
// centred in the prefix. Symbol 1 serves as the channel estimate for each
// subcarrier; this absorbs the gain, the NCO rotation and the residual timing.
// Symbols 2..NSYM-1 are equalised, and the error vector magnitude over all
// their subcarriers must be below -40 dB for both FAs. Symbol 0 only fills
// the filters. The measured EVM is printed per profile and FA.
module tb_wimax_evm;
  import dif_pkg::*;

  localparam real M_PI = 3.14159265358979323846;
  localparam int N    = 512;     // DFT size at 2x oversampling
  localparam int CP   = 128;     // cyclic prefix (1/4)
  localparam int NU   = 100;     // used subcarriers on each side of DC
  localparam int NSYM = 5;
  localparam int SLEN = N + CP;
  localparam real EVM_LIMIT_DB = -40.0;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  profile_t cfg_profile = PROF_7M, profile;
  logic [31:0] cfg_ftw_u [2], cfg_ftw_d [2];
  logic [15:0] mode_changes;
  logic tx_req, rx_valid;
  logic signed [15:0] tx_i [2], tx_q [2], dac_i, dac_q, rx_i [2], rx_q [2];
  logic signed [13:0] adc_data;
  int checks = 0, failures = 0;

  dif_transceiver dut (
    .clk, .rst_n, .cfg_we, .cfg_profile, .cfg_ftw_u, .cfg_ftw_d, .profile, .mode_changes,
    .tx_req, .tx_i, .tx_q, .dac_i, .dac_q, .adc_data, .rx_valid, .rx_i, .rx_q
  );

  assign adc_data = dac_i[15:2];

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real cs [N], sn [N];                           // twiddles
  real xr [2][NSYM][2*NU+1], xi [2][NSYM][2*NU+1];   // transmitted QAM points
  real txr [2][], txi [2][];                     // transmitted samples
  real rxr [2][$], rxi [2][$];                   // received samples

  function automatic real qam_level();
    return real'(2 * int'($urandom_range(0, 7)) - 7);
  endfunction

  task automatic build_tx();
    real scale = 310.0;       // about -15 dBFS rms after the IDFT
    for (int f = 0; f < 2; f++) begin
      txr[f] = new[NSYM * SLEN];
      txi[f] = new[NSYM * SLEN];
      for (int s = 0; s < NSYM; s++) begin
        for (int k = -NU; k <= NU; k++) begin
          xr[f][s][k+NU] = (k == 0) ? 0.0 : qam_level();
          xi[f][s][k+NU] = (k == 0) ? 0.0 : qam_level();
        end
        for (int n = 0; n < N; n++) begin
          real ar = 0.0, ai = 0.0;
          for (int k = -NU; k <= NU; k++) begin
            int p = ((k * n) % N + N) % N;
            ar += xr[f][s][k+NU] * cs[p] - xi[f][s][k+NU] * sn[p];
            ai += xr[f][s][k+NU] * sn[p] + xi[f][s][k+NU] * cs[p];
          end
          txr[f][s * SLEN + CP + n] = ar * scale / 16.0;
          txi[f][s * SLEN + CP + n] = ai * scale / 16.0;
        end
        for (int n = 0; n < CP; n++) begin
          txr[f][s * SLEN + n] = txr[f][s * SLEN + N + n];
          txi[f][s * SLEN + n] = txi[f][s * SLEN + N + n];
        end
      end
    end
  endtask

  function automatic logic signed [15:0] q16(input real v);
    return 16'($rtoi(v + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  task automatic run_profile(input profile_t p);
    int  idx = 0, delay = 0;
    real best = -1.0;
    if (p != profile) begin
      @(negedge clk);
      cfg_we = 1; cfg_profile = p;
      @(negedge clk);
      cfg_we = 0;
    end
    build_tx();
    for (int f = 0; f < 2; f++) begin rxr[f].delete(); rxi[f].delete(); end
    // stream the symbols, then keep feeding zeros until the last symbol is out
    while (rxr[0].size() < NSYM * SLEN + 200) begin
      @(negedge clk);
      if (tx_req) begin
        for (int f = 0; f < 2; f++) begin
          tx_i[f] = (idx < NSYM * SLEN) ? q16(txr[f][idx]) : 16'sd0;
          tx_q[f] = (idx < NSYM * SLEN) ? q16(txi[f][idx]) : 16'sd0;
        end
        idx++;
      end
      @(posedge clk);
      #1;
      if (rx_valid)
        for (int f = 0; f < 2; f++) begin
          rxr[f].push_back(real'(rx_i[f]));
          rxi[f].push_back(real'(rx_q[f]));
        end
    end
    // loop delay by correlation (FA1, symbols 1..2)
    for (int d = 0; d < 200; d++) begin
      real cr = 0.0, ci = 0.0, m;
      for (int n = SLEN; n < 3 * SLEN; n += 2) begin
        cr += rxr[0][n + d] * txr[0][n] + rxi[0][n + d] * txi[0][n];
        ci += rxi[0][n + d] * txr[0][n] - rxr[0][n + d] * txi[0][n];
      end
      m = cr * cr + ci * ci;
      if (m > best) begin best = m; delay = d; end
    end
    for (int f = 0; f < 2; f++) begin
      real hr [2*NU+1], hi [2*NU+1];
      real err = 0.0, ref_p = 0.0, evm_db;
      for (int s = 1; s < NSYM; s++) begin
        int base = s * SLEN + CP / 2 + delay;
        for (int k = -NU; k <= NU; k++) begin
          real yr = 0.0, yi = 0.0;
          if (k == 0) continue;
          for (int n = 0; n < N; n++) begin
            int pp = ((-k * n) % N + N) % N;
            yr += rxr[f][base + n] * cs[pp] - rxi[f][base + n] * sn[pp];
            yi += rxr[f][base + n] * sn[pp] + rxi[f][base + n] * cs[pp];
          end
          // the window starts CP/2 early: undo the resulting phase ramp
          begin
            int pr = ((k * (CP / 2)) % N + N) % N;
            real tr = yr * cs[pr] - yi * sn[pr];
            real ti = yr * sn[pr] + yi * cs[pr];
            yr = tr; yi = ti;
          end
          if (s == 1) begin
            real d2 = xr[f][s][k+NU] ** 2 + xi[f][s][k+NU] ** 2;
            hr[k+NU] = (yr * xr[f][s][k+NU] + yi * xi[f][s][k+NU]) / d2;
            hi[k+NU] = (yi * xr[f][s][k+NU] - yr * xi[f][s][k+NU]) / d2;
          end else begin
            real h2 = hr[k+NU] ** 2 + hi[k+NU] ** 2;
            real er = (yr * hr[k+NU] + yi * hi[k+NU]) / h2 - xr[f][s][k+NU];
            real ei = (yi * hr[k+NU] - yr * hi[k+NU]) / h2 - xi[f][s][k+NU];
            err   += er * er + ei * ei;
            ref_p += xr[f][s][k+NU] ** 2 + xi[f][s][k+NU] ** 2;
          end
        end
      end
      evm_db = 10.0 * $log10(err / ref_p);
      $display("profile %0d FA%0d: loop delay %0d samples, EVM %.1f dB", p, f + 1, delay, evm_db);
      checks++;
      if (!(evm_db < EVM_LIMIT_DB)) begin
        failures++;
        $display("FAIL: EVM above %.0f dB", EVM_LIMIT_DB);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      cs[n] = $cos(2.0 * M_PI * n / N);
      sn[n] = $sin(2.0 * M_PI * n / N);
    end
    cfg_ftw_u = '{FTW_12M, FTW_20M};
    cfg_ftw_d = '{FTW_12M, FTW_20M};
    tx_i = '{16'sd0, 16'sd0};
    tx_q = '{16'sd0, 16'sd0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_profile(PROF_7M);
    run_profile(PROF_3M5);
    run_profile(PROF_1M75);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
