// quad_mod: digital complex quadrature modulator of the transmitter. It shifts
// one FA's baseband up to its NCO frequency.
//
//   i_out = I*cos - Q*sin        q_out = I*sin + Q*cos
//
// i.e. the complex product (I + jQ) * e^{jwt}. The image-free complex form
// is the transmitter's own. Each output is one registered adder after the four
// multipliers. Carriers are Q1.15, so each sum is shifted right by 15 with
// rounding and saturated to W bits. Latency: one clock.
module quad_mod
  import dif_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] i_in,
  input  logic signed [W-1:0] q_in,
  input  amp_t                cos_in,
  input  amp_t                sin_in,
  output logic signed [W-1:0] i_out,
  output logic signed [W-1:0] q_out
);

  localparam int unsigned XW = W + AMP_W + 1;

  logic signed [XW-1:0] i_sum, q_sum;

  always_comb begin
    i_sum = XW'(i_in) * XW'(cos_in) - XW'(q_in) * XW'(sin_in);
    q_sum = XW'(i_in) * XW'(sin_in) + XW'(q_in) * XW'(cos_in);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_out <= '0;
      q_out <= '0;
    end else begin
      i_out <= W'(sat((64'(i_sum) + 64'sd16384) >>> 15, W));
      q_out <= W'(sat((64'(q_sum) + 64'sd16384) >>> 15, W));
    end
  end

endmodule
