// tb_nco: self-checking testbench of the NCO.
//
// For the 12 and 20 MHz carriers and for random tuning words, it keeps its own
// phase accumulator. Each output is compared with round(32767 * cos/sin(2*pi*
// phase)) evaluated at the phase truncated to 10 bits, within one LSB. It also
// checks that the 12 MHz carrier repeats every 16 samples (3 cycles) and that
// clr restarts the phase.
module tb_nco;
  import dif_pkg::*;

  localparam real M_PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, clr = 0;
  logic [31:0] ftw;
  amp_t cos_o, sin_o;
  int checks = 0, failures = 0;

  nco dut (.clk, .rst_n, .clr, .ftw, .cos_o, .sin_o);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int near(input real v);
    return (v >= 0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
  endfunction

  task automatic check_amp(input string what, input amp_t got, input int want);
    checks++;
    if (got - want > 1 || want - got > 1) begin
      failures++;
      if (failures < 10) $display("%s: got %0d want %0d (ftw %h)", what, got, want, ftw);
    end
  endtask

  task automatic run(input logic [31:0] f, input int n);
    logic [31:0] ph;
    amp_t first_s [16];
    @(negedge clk);
    ftw = f;
    clr = 1;
    @(negedge clk);
    clr = 0;
    // outputs right after the clear show phase 0
    check_amp("cos at phase 0", cos_o, 32767);
    check_amp("sin at phase 0", sin_o, 0);
    ph = 0;
    for (int k = 0; k < n; k++) begin
      @(posedge clk);
      #1;
      // the registered outputs show the phase held before this edge
      check_amp("cos", cos_o, near(32767.0 * $cos(2.0 * M_PI * real'(ph >> 22) / 1024.0)));
      check_amp("sin", sin_o, near(32767.0 * $sin(2.0 * M_PI * real'(ph >> 22) / 1024.0)));
      if (f == FTW_12M) begin
        if (k < 16) first_s[k] = sin_o;
        else begin
          checks++;
          if (sin_o != first_s[k % 16]) begin
            failures++;
            $display("12 MHz carrier not periodic in 16 samples at %0d", k);
          end
        end
      end
      ph = ph + f;
    end
  endtask

  initial begin
    ftw = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(FTW_12M, 64);
    run(FTW_20M, 64);
    for (int r = 0; r < 20; r++) run($urandom, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
