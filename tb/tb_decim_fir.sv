// tb_decim_fir: self-checking testbench of the decimation filter.
//
// For each profile the filter is cleared and fed one random sample per clock.
// Every output is compared with a floating-point model. The model filters the
// input with raised-cosine taps it computes itself, normalised to sum to L, and
// divides by L. For 1.75 MHz it cascades the /8 stage (output rounded, as in
// hardware) and the /2 stage at 8 MHz. Also checked:
//   * output rate: one out_valid every 4, 8 or 16 cycles;
//   * latency: the output for the sample at edge n appears after edge n+1
//     (n+3 for the two-stage 1.75 MHz path);
//   * unity DC gain.
module tb_decim_fir;
  import dif_pkg::*;

  localparam real M_PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, clr = 0;
  profile_t profile = PROF_7M;
  logic out_valid;
  logic signed [15:0] din, dout;
  int checks = 0, failures = 0;

  decim_fir dut (.clk, .rst_n, .clr, .profile, .din, .out_valid, .dout);

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

  real hm [129];   // 64 MHz stage taps, normalised to sum 1
  real hp [129];   // 8 MHz stage taps (1.75 MHz), normalised to sum 1

  task automatic make_taps(input real fc, input real fs, output real h [129]);
    real s = 0.0;
    for (int k = 0; k < 129; k++) s += rc(k - 64, fc, fs);
    for (int k = 0; k < 129; k++) h[k] = rc(k - 64, fc, fs) / s;
  endtask

  real x [$];      // input history, x[n] entered at edge n
  real y8 [$];     // rounded /8 stage outputs (1.75 MHz)

  function automatic real fir_at(input int n, input real h [129], input real s [$], input int step);
    real y = 0.0;
    for (int k = 0; k < 129; k++)
      if (n - k * step >= 0) y += s[(n - k * step) / step] * h[k];
    return y;
  endfunction

  function automatic real main_at(input int n);
    real y = 0.0;
    for (int k = 0; k < 129; k++)
      if (n - k >= 0) y += x[n - k] * hm[k];
    return y;
  endfunction

  function automatic real rnd(input real v);
    return real'($rtoi(v + (v >= 0 ? 0.5 : -0.5)));
  endfunction

  task automatic run(input profile_t p, input int n_cyc, input bit dc);
    int  outs = 0, last_out = -1;
    int  l = rate_of(p);
    int  lat = (p == PROF_1M75) ? 3 : 1;
    real exp_y, tol = 3.0;
    @(negedge clk);
    profile = p;
    clr = 1;
    @(negedge clk);
    clr = 0;
    x.delete(); y8.delete();
    if (p == PROF_7M) make_taps(3.5, 64.0, hm); else make_taps(2.0, 64.0, hm);
    make_taps(1.2, 8.0, hp);
    for (int n = 0; n < n_cyc; n++) begin
      din = dc ? 16'sd12000 : 16'($urandom_range(0, 20000)) - 16'sd10000;
      x.push_back(real'(din));
      if (p == PROF_1M75 && n % 8 == 0) y8.push_back(rnd(main_at(n)));
      @(posedge clk);
      #1;
      if (out_valid) begin
        int m = n - lat;          // decimation instant this output belongs to
        outs++;
        checks++;
        if (m % l != 0 || (last_out >= 0 && n - last_out != l)) begin
          failures++;
          $display("profile %0d: output at edge %0d out of step (previous %0d)", p, n, last_out);
        end
        last_out = n;
        if (p == PROF_1M75) exp_y = fir_at(m / 8, hp, y8, 1);
        else                exp_y = main_at(m);
        checks++;
        if (real'(dout) - exp_y > tol || exp_y - real'(dout) > tol) begin
          failures++;
          if (failures < 10) $display("profile %0d edge %0d: dout=%0d expected=%f", p, n, dout, exp_y);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (outs < n_cyc / l - 1 || outs > n_cyc / l) begin
      failures++;
      $display("profile %0d: %0d outputs in %0d cycles", p, outs, n_cyc);
    end
    if (dc) begin
      checks++;
      if (dout < 16'sd11900 || dout > 16'sd12100) begin
        failures++;
        $display("profile %0d: DC output %0d, expected 12000", p, dout);
      end
    end
  endtask

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(PROF_7M,   1024, 0);
    run(PROF_3M5,  1024, 0);
    run(PROF_1M75, 4096, 0);
    run(PROF_7M,    512, 1);
    run(PROF_3M5,   512, 1);
    run(PROF_1M75, 2048, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
