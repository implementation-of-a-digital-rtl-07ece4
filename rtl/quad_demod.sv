// quad_demod: quadrature demodulator of the receiver. It brings one FA of the
// real ADC stream down to baseband:
//
//   i_out = x*cos        q_out = -x*sin
//
// This is the real input times e^{-jwt}. The wanted FA then sits at DC, with
// half the input amplitude; the decimation filter removes the image at 2w and
// the other FA. The ADC_W-bit ADC word is left-aligned into W bits before the
// multiply. Each product is shifted right by 15 with rounding and saturated.
// Latency: one clock.
module quad_demod
  import dif_pkg::*;
#(
  parameter int unsigned ADC_W = 14,
  parameter int unsigned W     = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] x_in,
  input  amp_t                    cos_in,
  input  amp_t                    sin_in,
  output logic signed [W-1:0]     i_out,
  output logic signed [W-1:0]     q_out
);

  logic signed [W-1:0]       x_al;
  logic signed [W+AMP_W-1:0] i_p, q_p;

  assign x_al = {x_in, {(W - ADC_W){1'b0}}};

  always_comb begin
    i_p = (W+AMP_W)'(x_al) * (W+AMP_W)'(cos_in);
    q_p = -((W+AMP_W)'(x_al) * (W+AMP_W)'(sin_in));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= W'(sat((64'(i_p) + 64'sd16384) >>> 15, W));
      q_out <= W'(sat((64'(q_p) + 64'sd16384) >>> 15, W));
    end
  end

endmodule
