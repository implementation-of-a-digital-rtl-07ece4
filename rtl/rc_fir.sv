// rc_fir: 129-tap direct-form FIR core used by every interpolation and
// decimation filter of the transceiver.
//
// On each cycle with ce high the input sample din enters the delay line and the
// full-precision sum of coefficient x sample over all taps (the new sample
// included) is registered in acc. The result is therefore available one clock
// after the sample enters, and acc holds its value until the next ce. clr
// empties the delay line and the accumulator register synchronously.
//
// All taps are multiplied in parallel: the filters favour throughput over logic
// size, as the transceiver they belong to does. The coefficient set is an input
// so the owning filter can switch sets when the profile changes.
// The sum of all taps is formed in one clock. A faster implementation would
// pipeline the adder tree. That adds latency, and the owning filters' rate
// strobes would have to be delayed to match.
// Accumulator width = IN_W + COEF_W + ceil(log2(TAPS)), so the sum cannot
// overflow.
module rc_fir
  import dif_pkg::*;
#(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned ACC_W = IN_W + COEF_W + $clog2(TAPS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    ce,
  input  logic signed [IN_W-1:0]  din,
  input  coef_set_t               coefs,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [IN_W-1:0] dl [TAPS];   // dl[0] is the newest sample
  logic signed [ACC_W-1:0] sum;

  always_comb begin
    sum = ACC_W'(din) * ACC_W'(coefs[0]);
    for (int k = 1; k < TAPS; k++)
      sum += ACC_W'(dl[k-1]) * ACC_W'(coefs[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      for (int k = 0; k < TAPS; k++) dl[k] <= '0;
      acc <= '0;
    end else if (ce) begin
      dl[0] <= din;
      for (int k = 1; k < TAPS; k++) dl[k] <= dl[k-1];
      acc <= sum;
    end
  end

endmodule
