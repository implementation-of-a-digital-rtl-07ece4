// tb_fa_combiner: self-checking testbench of the FA combiner. Random
// modulated I/Q words of both FAs (full-scale corners included) are applied
// every cycle. One cycle later the outputs must equal floor((a + b + 1) / 2).
module tb_fa_combiner;

  logic clk = 0, rst_n = 0;
  logic signed [15:0] i1, q1, i2, q2, i_out, q_out;
  int checks = 0, failures = 0;

  fa_combiner dut (.clk, .rst_n, .i1_in (i1), .q1_in (q1), .i2_in (i2), .q2_in (q2), .i_out, .q_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int half(input int a, input int b);
    int s = a + b + 1;
    return (s >= 0) ? s / 2 : -((-s + 1) / 2);
  endfunction

  initial begin
    int ei, eq;
    i1 = 0; q1 = 0; i2 = 0; q2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      i1 = 16'($urandom); q1 = 16'($urandom); i2 = 16'($urandom); q2 = 16'($urandom);
      if (k % 40 == 0) begin i1 = 16'sh7fff; i2 = 16'sh7fff; q1 = -16'sh8000; q2 = -16'sh8000; end
      ei = half(i1, i2);
      eq = half(q1, q2);
      @(posedge clk);
      #1;
      checks += 2;
      if (i_out != 16'(ei) || q_out != 16'(eq)) begin
        failures++;
        if (failures < 10) $display("%0d+%0d, %0d+%0d: got %0d,%0d want %0d,%0d",
                                    i1, i2, q1, q2, i_out, q_out, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
