// tb_quad_demod: self-checking testbench of the quadrature demodulator.
// Random 14-bit ADC words and carrier words are applied every cycle. One
// cycle later the outputs are compared with round(4x*cos/2^15) and
// round(-4x*sin/2^15) (the ADC word left-aligned to 16 bits), saturated.
module tb_quad_demod;
  import dif_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [13:0] x_in;
  logic signed [15:0] i_out, q_out;
  amp_t cos_in, sin_in;
  int checks = 0, failures = 0;

  quad_demod dut (.clk, .rst_n, .x_in, .cos_in, .sin_in, .i_out, .q_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rsat(input longint v);
    longint r = (v + 16384) >>> 15;
    if (r > 32767) return 32767;
    if (r < -32768) return -32768;
    return r;
  endfunction

  initial begin
    longint ei, eq;
    x_in = 0; cos_in = 0; sin_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      x_in = 14'($urandom); cos_in = 16'($urandom); sin_in = 16'($urandom);
      if (k % 50 == 0) begin x_in = -14'sd8192; sin_in = -16'sd32768; end
      ei = rsat(longint'(x_in) * 4 * cos_in);
      eq = rsat(-(longint'(x_in) * 4 * sin_in));
      @(posedge clk);
      #1;
      checks += 2;
      if (i_out != 16'(ei) || q_out != 16'(eq)) begin
        failures++;
        if (failures < 10) $display("x=%0d c=%0d s=%0d: got %0d,%0d want %0d,%0d",
                                    x_in, cos_in, sin_in, i_out, q_out, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
