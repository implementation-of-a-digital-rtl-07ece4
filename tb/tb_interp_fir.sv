// tb_interp_fir: self-checking testbench of the interpolation filter.
//
// For each profile it clears the filter and feeds random baseband samples on
// every request. Every 64 MHz output is compared with a floating-point model of
// the zero-stuffed raised-cosine filter (two cascaded stages for 1.75 MHz). The
// model computes its own taps from the raised-cosine formula (normalised to a
// tap sum of L). The tolerance
// covers coefficient quantisation and output rounding. It also checks:
//   * the request rate: 64, 32 or 16 requests per 256 cycles;
//   * unity DC gain: a constant input settles to the same value.
module tb_interp_fir;
  import dif_pkg::*;

  localparam real M_PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, clr = 0;
  profile_t profile = PROF_7M;
  logic in_req;
  logic signed [15:0] din, dout;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  interp_fir dut (.clk, .rst_n, .clr, .profile, .in_req, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rc(input int n, input real fc, input real fs);
    real t, sc, den;
    t  = 2.0 * fc / fs * n;
    sc = (n == 0) ? 1.0 : $sin(M_PI * t) / (M_PI * t);
    den = 1.0 - (0.23 * t) ** 2;
    if (den < 1e-9 && den > -1e-9) return sc * M_PI / 4.0;
    return sc * $cos(M_PI * 0.115 * t) / den;
  endfunction

  // Tap n (-64..64) of the filter, normalised so the 129 taps sum to l.
  function automatic real h_ref(input int n, input real fc, input real fs, input int l);
    real s = 0.0;
    if (n < -64 || n > 64) return 0.0;
    for (int k = -64; k <= 64; k++) s += rc(k, fc, fs);
    return l * rc(n, fc, fs) / s;
  endfunction

  // history of the stream entering the 64 MHz stage (value, edge index)
  real  main_x [$];
  int   main_t [$];
  // first stage history (1.75 MHz)
  real  pre_x  [$];
  real  pre_v;          // last first-stage output (8 MHz)
  int unsigned edge_n;

  function automatic real main_ref(input int n, input real fc, input int l);
    real y = 0.0;
    for (int k = 0; k < main_x.size(); k++)
      y += main_x[k] * h_ref(n - main_t[k] - 64, fc, 64.0, l);
    return y;
  endfunction

  function automatic real pre_ref();
    // pre_x holds the zero-stuffed 8 MHz stream, newest last
    real v = 0.0;
    int  m = pre_x.size();
    for (int k = 0; k < m && k < 129; k++)
      v += pre_x[m - 1 - k] * h_ref(k - 64, 1.2, 8.0, 2);
    return v;
  endfunction

  task automatic run(input profile_t p, input int n_out, input bit dc);
    int  reqs = 0;
    real fc;
    int  l;
    real exp_y, tol;
    @(negedge clk);
    profile = p;
    clr = 1;
    @(negedge clk);
    clr = 0;
    main_x.delete(); main_t.delete(); pre_x.delete(); pre_v = 0.0;
    fc  = (p == PROF_7M) ? 3.5 : 2.0;
    l   = (p == PROF_7M) ? 4 : 8;
    tol = (p == PROF_1M75) ? 12.0 : 8.0;
    edge_n = 0;
    din = dc ? 16'sd10000 : 16'($urandom_range(0, 16000)) - 16'sd8000;
    for (int n = 0; n < n_out; n++) begin
      // model the edge about to happen
      if (p == PROF_1M75) begin
        if (n % 8 == 0) begin
          main_x.push_back(pre_v);   // value registered at the previous 8 MHz edge
          main_t.push_back(n);
          pre_x.push_back(in_req ? real'(din) : 0.0);
          pre_v = real'($rtoi(pre_ref() + (pre_ref() >= 0 ? 0.5 : -0.5)));
        end
      end else if (in_req) begin
        main_x.push_back(real'(din));
        main_t.push_back(n);
      end
      if (in_req) reqs++;
      @(posedge clk);
      #1;
      exp_y = main_ref(n, fc, l);
      if (n >= 0) begin
        checks++;
        if (real'(dout) - exp_y > tol || exp_y - real'(dout) > tol) begin
          failures++;
          if (failures < 10) $display("profile %0d n=%0d dout=%0d expected=%f", p, n, dout, exp_y);
        end
      end
      @(negedge clk);
      if (in_req) din = dc ? 16'sd10000 : 16'($urandom_range(0, 16000)) - 16'sd8000;
    end
    // rate: requests seen over the run
    checks++;
    if (reqs != n_out / rate_of(p)) begin
      failures++;
      $display("profile %0d: %0d requests in %0d cycles", p, reqs, n_out);
    end
    if (dc) begin
      checks++;
      if (dout < 16'sd9700 || dout > 16'sd10300) begin
        failures++;
        $display("profile %0d: DC output %0d, expected about 10000", p, dout);
      end
    end
  endtask

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(PROF_7M,   1024, 0);
    run(PROF_3M5,  1024, 0);
    run(PROF_1M75, 2048, 0);
    run(PROF_7M,   1024, 1);
    run(PROF_3M5,  1024, 1);
    run(PROF_1M75, 2048, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
