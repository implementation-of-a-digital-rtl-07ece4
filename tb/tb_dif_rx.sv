// tb_dif_rx: self-checking testbench of the uplink path.
//
// The ADC stream is generated here as the undersampled IF: the sum of two
// carriers at the NCO frequencies, each modulated by a constant complex value,
//   x = A1 cos th1 - B1 sin th1 + A2 cos th2 - B2 sin th2.
// Here th_f = 2*pi*ftw_f/2^32 * (k - 2) for the sample taken at the k-th clock
// after the clear (the NCO output is registered). After the decimation filters
// settle, FA f must read (A_f + jB_f) * 4 / 2 on the 16-bit output scale. That
// is the 14-bit input left-aligned, halved by the demodulation. The other FA
// and the 2w image must be filtered out. Also checked: one rx output every
// 4, 8 or 16 cycles.
module tb_dif_rx;
  import dif_pkg::*;

  localparam real M_PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, clr = 0;
  profile_t profile = PROF_7M;
  logic [31:0] ftw [2];
  logic signed [13:0] adc_data;
  logic out_valid;
  logic signed [15:0] bb_i [2], bb_q [2];
  int checks = 0, failures = 0;

  dif_rx dut (.clk, .rst_n, .clr, .profile, .ftw, .adc_data, .out_valid, .bb_i, .bb_q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(input int got, input real want, input real tol);
    return (real'(got) - want <= tol) && (want - real'(got) <= tol);
  endfunction

  task automatic run(input profile_t p, input int a1, b1, a2, b2);
    int  outs = 0;
    real th1, th2, x;
    @(negedge clk);
    profile = p;
    clr = 1;
    adc_data = '0;
    @(posedge clk);        // clear edge: k = 0
    @(negedge clk);
    clr = 0;
    for (int k = 1; k <= 5000; k++) begin
      th1 = 2.0 * M_PI * real'(ftw[0]) / 4294967296.0 * real'(k - 2);
      th2 = 2.0 * M_PI * real'(ftw[1]) / 4294967296.0 * real'(k - 2);
      x = a1 * $cos(th1) - b1 * $sin(th1) + a2 * $cos(th2) - b2 * $sin(th2);
      adc_data = 14'($rtoi(x + (x >= 0 ? 0.5 : -0.5)));
      @(posedge clk);
      #1;
      if (out_valid) begin
        outs++;
        if (k > 3500) begin
          checks++;
          if (!near(bb_i[0], 2.0 * a1, 80.0) || !near(bb_q[0], 2.0 * b1, 80.0) ||
              !near(bb_i[1], 2.0 * a2, 80.0) || !near(bb_q[1], 2.0 * b2, 80.0)) begin
            failures++;
            if (failures < 10)
              $display("profile %0d k=%0d: FA1 %0d,%0d FA2 %0d,%0d expected %0d,%0d %0d,%0d",
                       p, k, bb_i[0], bb_q[0], bb_i[1], bb_q[1], 2*a1, 2*b1, 2*a2, 2*b2);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (outs < 5000 / rate_of(p) - 1 || outs > 5000 / rate_of(p) + 1) begin
      failures++;
      $display("profile %0d: %0d outputs in 5000 cycles", p, outs);
    end
  endtask

  initial begin
    ftw = '{FTW_12M, FTW_20M};
    adc_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(PROF_7M,   3000, -1500, -2000, 2500);
    run(PROF_3M5,  -2500, 1000, 1800, 3000);
    run(PROF_1M75, 4000, 1200, -600, -3500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
