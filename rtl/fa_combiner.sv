// fa_combiner: digital combining of the two modulated FAs into the single
// complex stream that feeds the DAC.
//
//   i_out = (I1 + I2) / 2        q_out = (Q1 + Q2) / 2
//
// The two FAs lie at different NCO frequencies, so adding them places both
// carriers in one DAC stream. The halving (a rounded arithmetic shift) is this
// design's choice: it keeps the sum of two full-scale FAs inside the 16-bit DAC
// word. Latency: one clock.
module fa_combiner #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] i1_in,
  input  logic signed [W-1:0] q1_in,
  input  logic signed [W-1:0] i2_in,
  input  logic signed [W-1:0] q2_in,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out
);

  logic signed [W+1:0] i_sum, q_sum;

  always_comb begin
    i_sum = (W+2)'(i1_in) + (W+2)'(i2_in) + (W+2)'(1);
    q_sum = (W+2)'(q1_in) + (W+2)'(q2_in) + (W+2)'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= W'(i_sum >>> 1);
      q_out <= W'(q_sum >>> 1);
    end
  end

endmodule
