// dif_tx: downlink half of the digital IF transceiver (FPGA part).
//
// Four baseband streams arrive from the modem: FA1_I, FA1_Q, FA2_I and FA2_Q.
// Each passes its own interpolation filter up to 64 MHz. The FA1 pair is then
// modulated onto the NCO carrier w_u1 (12 MHz by default), the FA2 pair onto
// w_u2 (20 MHz). The two complex results are added into one I and one Q word
// for the external DAC. The DAC interpolates by 4 to 256 MHz and shifts by
// 64 MHz, which places the FAs at 76 and 84 MHz around the 80 MHz IF.
//
// Interface: bb_req pulses once per baseband sample period (every 4, 8 or 16
// cycles, by profile). All four inputs are taken on that cycle. dac_i/dac_q
// carry a new 64 MHz word every clock.
// Latency from a baseband sample to the first output it affects:
// interpolator 1 + modulator 1 + combiner 1 = 3 clocks (plus 8 clocks for the
// first stage in the 1.75 MHz profile). The NCOs are registered, so carrier and
// data stay aligned without extra delay.
module dif_tx
  import dif_pkg::*;
#(
  parameter int unsigned BB_W  = 16,
  parameter int unsigned DAC_W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  profile_t               profile,
  input  logic [PHASE_W-1:0]     ftw [2],
  output logic                   bb_req,
  input  logic signed [BB_W-1:0] bb_i [2],
  input  logic signed [BB_W-1:0] bb_q [2],
  output logic signed [DAC_W-1:0] dac_i,
  output logic signed [DAC_W-1:0] dac_q
);

  logic signed [DAC_W-1:0] up_i [2], up_q [2];   // interpolated, 64 MHz
  logic signed [DAC_W-1:0] md_i [2], md_q [2];   // modulated
  amp_t                    c [2], s [2];
  logic                    req [2][2];

  for (genvar f = 0; f < 2; f++) begin : g_fa
    interp_fir #(.IN_W(BB_W), .OUT_W(DAC_W)) u_interp_i (
      .clk, .rst_n, .clr, .profile,
      .in_req (req[f][0]), .din (bb_i[f]), .dout (up_i[f])
    );
    interp_fir #(.IN_W(BB_W), .OUT_W(DAC_W)) u_interp_q (
      .clk, .rst_n, .clr, .profile,
      .in_req (req[f][1]), .din (bb_q[f]), .dout (up_q[f])
    );
    nco u_nco (
      .clk, .rst_n, .clr, .ftw (ftw[f]), .cos_o (c[f]), .sin_o (s[f])
    );
    quad_mod #(.W(DAC_W)) u_mod (
      .clk, .rst_n,
      .i_in (up_i[f]), .q_in (up_q[f]), .cos_in (c[f]), .sin_in (s[f]),
      .i_out (md_i[f]), .q_out (md_q[f])
    );
  end

  // All four filters share reset, clr and profile, so their requests coincide.
  assign bb_req = req[0][0];

  fa_combiner #(.W(DAC_W)) u_comb (
    .clk, .rst_n,
    .i1_in (md_i[0]), .q1_in (md_q[0]), .i2_in (md_i[1]), .q2_in (md_q[1]),
    .i_out (dac_i), .q_out (dac_q)
  );

  // The four rate counters must stay in step.
  a_req_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    req[0][0] == req[0][1] && req[0][0] == req[1][0] && req[0][0] == req[1][1]);

endmodule
