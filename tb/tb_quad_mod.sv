// tb_quad_mod: self-checking testbench of the complex quadrature modulator.
// Random baseband and carrier words (including full-scale corners) are applied
// every cycle. One cycle later each output is compared with
// round((I*cos - Q*sin)/2^15) and round((I*sin + Q*cos)/2^15), saturated to
// 16 bits, computed here in 64-bit integers.
module tb_quad_mod;
  import dif_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] i_in, q_in, i_out, q_out;
  amp_t cos_in, sin_in;
  int checks = 0, failures = 0;

  quad_mod dut (.clk, .rst_n, .i_in, .q_in, .cos_in, .sin_in, .i_out, .q_out);

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

  function automatic logic signed [15:0] pick();
    case ($urandom_range(0, 9))
      0: return 16'sh7fff;
      1: return -16'sh8000;
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    longint ei, eq;
    int sat_hits = 0;
    i_in = 0; q_in = 0; cos_in = 0; sin_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      i_in = pick(); q_in = pick(); cos_in = pick(); sin_in = pick();
      ei = rsat(longint'(i_in) * cos_in - longint'(q_in) * sin_in);
      eq = rsat(longint'(i_in) * sin_in + longint'(q_in) * cos_in);
      if (ei == 32767 || ei == -32768) sat_hits++;
      @(posedge clk);
      #1;
      checks += 2;
      if (i_out != 16'(ei) || q_out != 16'(eq)) begin
        failures++;
        if (failures < 10) $display("I=%0d Q=%0d c=%0d s=%0d: got %0d,%0d want %0d,%0d",
                                    i_in, q_in, cos_in, sin_in, i_out, q_out, ei, eq);
      end
    end
    checks++;
    if (sat_hits == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
