// tb_if_spectrum: checks where the two FAs land on the analog IF.
//
// The transceiver's downlink output drives the behavioural DAC model, which
// interpolates by 4 and modulates by 64 MHz at 256 MHz. A constant complex
// baseband value on one FA makes a pure tone at the FA's centre. A 1024-point
// DFT of the 256 MHz IF (bins of 0.25 MHz) then measures:
//   * FA1 alone: the tone at 76 MHz with the expected amplitude. Its mirror
//     at 64-12 = 52 MHz stays at least 50 dB lower (the complex modulation is
//     image-free), the other FA's slot at 84 MHz at least 45 dB lower;
//   * FA2 alone: the tone at 84 MHz, nothing at 44 MHz, and at most -45 dBc
//     at 76 MHz. In the 3.5 and 1.75 MHz profiles the 8 MHz interpolation
//     image of one FA falls on the other FA's centre at about -50 dBc. That
//     is the stop-band of the 129-tap fc = 2 MHz filter;
//   * both: tones at 76 and 84 MHz, symmetric about the 80 MHz IF.
// This runs in each profile.
module tb_if_spectrum;
  import dif_pkg::*;

  localparam real M_PI = 3.14159265358979323846;
  localparam int  NDFT = 1024;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  profile_t cfg_profile = PROF_7M, profile;
  logic [31:0] cfg_ftw_u [2], cfg_ftw_d [2];
  logic [15:0] mode_changes;
  logic tx_req, rx_valid;
  logic signed [15:0] tx_i [2], tx_q [2], dac_i, dac_q, rx_i [2], rx_q [2];
  logic signed [13:0] adc_data;
  real if_out [4];
  int checks = 0, failures = 0;

  dif_transceiver dut (
    .clk, .rst_n, .cfg_we, .cfg_profile, .cfg_ftw_u, .cfg_ftw_d, .profile, .mode_changes,
    .tx_req, .tx_i, .tx_q, .dac_i, .dac_q, .adc_data, .rx_valid, .rx_i, .rx_q
  );

  ad9777_model u_dac (.clk, .dac_i, .dac_q, .if_out);

  assign adc_data = '0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ifs [NDFT];

  function automatic real mag_at(input real f_mhz);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < NDFT; n++) begin
      re += ifs[n] * $cos(2.0 * M_PI * f_mhz / 256.0 * n);
      im -= ifs[n] * $sin(2.0 * M_PI * f_mhz / 256.0 * n);
    end
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real db(input real a, input real b);
    return 20.0 * $log10((a + 1e-9) / (b + 1e-9));
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // amp1/amp2: constant I value put on FA1/FA2 (Q = 0)
  task automatic measure(input int amp1, input int amp2);
    real m76, m84, m52, m44, want1, want2;
    tx_i = '{16'(amp1), 16'(amp2)};
    tx_q = '{16'sd0, 16'sd0};
    repeat (2500) @(posedge clk);            // let every filter settle
    for (int c = 0; c < NDFT / 4; c++) begin
      @(posedge clk);
      #1;
      for (int k = 0; k < 4; k++) ifs[4 * c + k] = if_out[k];
    end
    m76 = mag_at(76.0); m84 = mag_at(84.0); m52 = mag_at(52.0); m44 = mag_at(44.0);
    // a real tone of amplitude a gives |X| = N*a/2; the combiner halves each FA
    want1 = NDFT * (amp1 / 2.0) / 2.0;
    want2 = NDFT * (amp2 / 2.0) / 2.0;
    $display("profile %0d FA1=%0d FA2=%0d: |76|=%.0f |84|=%.0f |52|=%.0f |44|=%.0f MHz",
             profile, amp1, amp2, m76, m84, m52, m44);
    if (amp1 != 0) begin
      check(m76 > 0.97 * want1 && m76 < 1.03 * want1, "FA1 tone amplitude at 76 MHz");
      check(db(m76, m52) > 50.0, "FA1 mirror at 52 MHz suppressed");
    end else
      check(db(want2, m76) > 45.0, "76 MHz empty when FA1 is off");
    if (amp2 != 0) begin
      check(m84 > 0.97 * want2 && m84 < 1.03 * want2, "FA2 tone amplitude at 84 MHz");
      check(db(m84, m44) > 50.0, "FA2 mirror at 44 MHz suppressed");
    end else
      check(db(want1, m84) > 45.0, "84 MHz empty when FA2 is off");
  endtask

  initial begin
    cfg_ftw_u = '{FTW_12M, FTW_20M};
    cfg_ftw_d = '{FTW_12M, FTW_20M};
    tx_i = '{16'sd0, 16'sd0};
    tx_q = '{16'sd0, 16'sd0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      @(negedge clk);
      cfg_we = 1; cfg_profile = profile_t'(p);
      @(negedge clk);
      cfg_we = 0;
      measure(16000, 0);
      measure(0, 12000);
      measure(10000, 10000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
