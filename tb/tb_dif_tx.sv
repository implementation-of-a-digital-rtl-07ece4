// tb_dif_tx: self-checking testbench of the downlink path.
//
// Each FA gets a constant complex baseband value (a different one per FA) in
// each of the three profiles. Once the filters have settled, each DAC word
// must equal
//   dac_i + j dac_q = ((A1 + jB1) e^{j th1} + (A2 + jB2) e^{j th2}) / 2
// where th_f = 2*pi*ftw_f/2^32 * (m - 3) at the m-th clock after the clear.
// The "- 3" is the registered NCO plus the modulator and combiner registers.
// The tolerance (1 % of full scale) covers passband ripple and the rounding of
// coefficients and carriers. Also checked: one bb_req every 4, 8 or 16 cycles.
module tb_dif_tx;
  import dif_pkg::*;

  localparam real M_PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, clr = 0;
  profile_t profile = PROF_7M;
  logic [31:0] ftw [2];
  logic bb_req;
  logic signed [15:0] bb_i [2], bb_q [2];
  logic signed [15:0] dac_i, dac_q;
  int checks = 0, failures = 0;

  dif_tx dut (.clk, .rst_n, .clr, .profile, .ftw, .bb_req, .bb_i, .bb_q, .dac_i, .dac_q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input profile_t p, input int a1, b1, a2, b2);
    int  reqs = 0;
    real th1, th2, ei, eq;
    @(negedge clk);
    profile = p;
    bb_i = '{16'(a1), 16'(a2)};
    bb_q = '{16'(b1), 16'(b2)};
    clr = 1;
    @(posedge clk);        // the clear edge: m = 0
    @(negedge clk);
    clr = 0;
    for (int m = 1; m <= 4000; m++) begin
      if (bb_req) reqs++;
      @(posedge clk);
      #1;
      if (m > 2500) begin
        th1 = 2.0 * M_PI * real'(ftw[0]) / 4294967296.0 * real'(m - 3);
        th2 = 2.0 * M_PI * real'(ftw[1]) / 4294967296.0 * real'(m - 3);
        ei = (a1 * $cos(th1) - b1 * $sin(th1) + a2 * $cos(th2) - b2 * $sin(th2)) / 2.0;
        eq = (a1 * $sin(th1) + b1 * $cos(th1) + a2 * $sin(th2) + b2 * $cos(th2)) / 2.0;
        checks++;
        if (real'(dac_i) - ei > 330.0 || ei - real'(dac_i) > 330.0 ||
            real'(dac_q) - eq > 330.0 || eq - real'(dac_q) > 330.0) begin
          failures++;
          if (failures < 10) $display("profile %0d m=%0d: dac %0d,%0d expected %f,%f", p, m, dac_i, dac_q, ei, eq);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (reqs != 4000 / rate_of(p)) begin
      failures++;
      $display("profile %0d: %0d requests in 4000 cycles", p, reqs);
    end
  endtask

  initial begin
    ftw = '{FTW_12M, FTW_20M};
    bb_i = '{16'sd0, 16'sd0};
    bb_q = '{16'sd0, 16'sd0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(PROF_7M,   12000, -5000, -7000, 9000);
    run(PROF_3M5,  -8000, 3000, 6000, 11000);
    run(PROF_1M75, 15000, 7000, -2000, -13000);
    ftw = '{32'h2000_0000, 32'h6000_0000};   // reprogrammed carriers: 8 and 24 MHz
    run(PROF_7M,   10000, 10000, -10000, 4000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
