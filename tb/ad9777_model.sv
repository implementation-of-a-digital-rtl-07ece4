// ad9777_model: behavioural model (not synthesizable) of the DAC chip that
// follows the FPGA in the downlink. It exists only so testbenches can look at
// the analog IF.
//
// The chip takes the complex 64 MHz stream (dac_i, dac_q). It interpolates by
// 4 with two half-band x2 stages (64 -> 128 -> 256 MHz), modulates by a
// 64 MHz complex carrier (a quarter of 256 MHz, so cos/sin are 1, 0, -1, 0)
// and converts:
//   if_out[n] = I[n]*cos(pi*n/2) - Q[n]*sin(pi*n/2)
// Each rising edge of the 64 MHz clock produces four consecutive 256 MHz IF
// samples in if_out[0..3], as real numbers in DAC LSBs. The half-band filters
// here are 31-tap Blackman-windowed sinc filters of this model's own (the
// chip's coefficients are the vendor's). Their gain is 2, which keeps the
// signal level through the zero-stuffing.
module ad9777_model (
  input  logic               clk,
  input  logic signed [15:0] dac_i,
  input  logic signed [15:0] dac_q,
  output real                if_out [4]
);

  localparam int  HB_N = 31;
  localparam real M_PI = 3.14159265358979323846;

  real hb [HB_N];
  real s1i [HB_N], s1q [HB_N];   // 128 MHz zero-stuffed history
  real s2i [HB_N], s2q [HB_N];   // 256 MHz zero-stuffed history
  int  n256 = 0;

  initial begin
    for (int k = 0; k < HB_N; k++) begin
      int  m;
      real w;
      m = k - (HB_N - 1) / 2;
      w = 0.42 - 0.5 * $cos(2.0 * M_PI * k / (HB_N - 1)) + 0.08 * $cos(4.0 * M_PI * k / (HB_N - 1));
      hb[k] = ((m == 0) ? 1.0 : $sin(M_PI * m / 2.0) / (M_PI * m / 2.0)) * w;
    end
    for (int k = 0; k < HB_N; k++) begin
      s1i[k] = 0.0; s1q[k] = 0.0; s2i[k] = 0.0; s2q[k] = 0.0;
    end
    for (int k = 0; k < 4; k++) if_out[k] = 0.0;
  end

  function automatic real dot(input real h [HB_N], input real s [HB_N]);
    real acc = 0.0;
    for (int k = 0; k < HB_N; k++) acc += h[k] * s[k];
    return acc;
  endfunction

  // shift a new sample into one of the four histories
  task automatic push(input int which, input real v);
    for (int k = HB_N - 1; k > 0; k--) begin
      case (which)
        0: s1i[k] = s1i[k-1];
        1: s1q[k] = s1q[k-1];
        2: s2i[k] = s2i[k-1];
        default: s2q[k] = s2q[k-1];
      endcase
    end
    case (which)
      0: s1i[0] = v;
      1: s1q[0] = v;
      2: s2i[0] = v;
      default: s2q[0] = v;
    endcase
  endtask

  always @(posedge clk) begin
    for (int a = 0; a < 2; a++) begin
      real ui, uq;
      push(0, (a == 0) ? real'(dac_i) : 0.0);
      push(1, (a == 0) ? real'(dac_q) : 0.0);
      ui = dot(hb, s1i);
      uq = dot(hb, s1q);
      for (int b = 0; b < 2; b++) begin
        real vi, vq;
        int  ph;
        push(2, (b == 0) ? ui : 0.0);
        push(3, (b == 0) ? uq : 0.0);
        vi = dot(hb, s2i);
        vq = dot(hb, s2q);
        ph = n256 % 4;
        if_out[2 * a + b] = (ph == 0) ? vi : (ph == 1) ? -vq : (ph == 2) ? -vi : vq;
        n256++;
      end
    end
  end

endmodule
