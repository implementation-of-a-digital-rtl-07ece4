// dif_rx: uplink half of the digital IF transceiver (FPGA part).
//
// The ADC samples the 80 MHz IF at 64 MHz (undersampling). The FAs at 76 and
// 84 MHz therefore appear at 12 and 20 MHz. The ADC stream is split into two
// channel paths. Each path is demodulated by its NCO (w_d1, w_d2) into I and Q,
// and each of the four streams is then low-pass filtered and decimated by 4, 8
// or 16 to the modem's baseband rate.
//
// Interface: adc_data is one sample per clock. out_valid pulses once per output
// sample, every 4, 8 or 16 clocks, and bb_i/bb_q hold FA1 (index 0) and FA2
// (index 1) until the next pulse. The wanted FA comes out at half the ADC
// amplitude (the loss of real-to-complex demodulation), on a 16-bit scale with
// the 14-bit ADC word left-aligned.
module dif_rx
  import dif_pkg::*;
#(
  parameter int unsigned ADC_W = 14,
  parameter int unsigned BB_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  profile_t                profile,
  input  logic [PHASE_W-1:0]      ftw [2],
  input  logic signed [ADC_W-1:0] adc_data,
  output logic                    out_valid,
  output logic signed [BB_W-1:0]  bb_i [2],
  output logic signed [BB_W-1:0]  bb_q [2]
);

  logic signed [BB_W-1:0] dm_i [2], dm_q [2];
  amp_t                   c [2], s [2];
  logic                   vld [2][2];

  for (genvar f = 0; f < 2; f++) begin : g_fa
    nco u_nco (
      .clk, .rst_n, .clr, .ftw (ftw[f]), .cos_o (c[f]), .sin_o (s[f])
    );
    quad_demod #(.ADC_W(ADC_W), .W(BB_W)) u_demod (
      .clk, .rst_n,
      .x_in (adc_data), .cos_in (c[f]), .sin_in (s[f]),
      .i_out (dm_i[f]), .q_out (dm_q[f])
    );
    decim_fir #(.IN_W(BB_W), .OUT_W(BB_W)) u_dec_i (
      .clk, .rst_n, .clr, .profile,
      .din (dm_i[f]), .out_valid (vld[f][0]), .dout (bb_i[f])
    );
    decim_fir #(.IN_W(BB_W), .OUT_W(BB_W)) u_dec_q (
      .clk, .rst_n, .clr, .profile,
      .din (dm_q[f]), .out_valid (vld[f][1]), .dout (bb_q[f])
    );
  end

  assign out_valid = vld[0][0];

  a_valid_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    vld[0][0] == vld[0][1] && vld[0][0] == vld[1][0] && vld[0][0] == vld[1][1]);

endmodule
