// dif_transceiver: FPGA part of a 2-FA digital IF transceiver for a WiMAX
// (IEEE 802.16d) base station, reconfigurable to the 7, 3.5 and 1.75 MHz
// bandwidth profiles.
//
// Downlink (dif_tx): the modem's baseband I/Q of two frequency assignments
// is interpolated to 64 MHz, modulated onto 12 and 20 MHz NCO carriers and
// combined into one complex 64 MHz stream for the DAC. The DAC's own x4
// interpolation and 64 MHz modulation put the FAs at 76 and 84 MHz, around an
// 80 MHz IF.
// Uplink (dif_rx): the ADC undersamples the 80 MHz IF at 64 MHz, so the FAs
// arrive at 12 and 20 MHz. Each is demodulated and decimated back to baseband.
//
// Configuration: cfg_we loads the profile and the four NCO tuning words in one
// cycle. When the profile changes, the next cycle issues a one-cycle clear to
// every filter and NCO. Stale samples of the old rate therefore never mix with
// new ones; the pipeline refills within 129 output samples of each filter.
// An undefined profile code (3) is ignored. After reset the 7 MHz profile and the 12/20 MHz carriers are active.
// mode_changes counts profile changes for monitoring.
//
// Everything runs on the single 64 MHz sample clock. Baseband samples are
// exchanged over parallel ports with a request/valid strobe. The modem's
// serial link and the converters themselves sit outside this module.
module dif_transceiver
  import dif_pkg::*;
#(
  parameter int unsigned BB_W  = 16,
  parameter int unsigned DAC_W = 16,
  parameter int unsigned ADC_W = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  logic                    cfg_we,
  input  profile_t                cfg_profile,
  input  logic [PHASE_W-1:0]      cfg_ftw_u [2],
  input  logic [PHASE_W-1:0]      cfg_ftw_d [2],
  output profile_t                profile,
  output logic [15:0]             mode_changes,
  // downlink
  output logic                    tx_req,
  input  logic signed [BB_W-1:0]  tx_i [2],
  input  logic signed [BB_W-1:0]  tx_q [2],
  output logic signed [DAC_W-1:0] dac_i,
  output logic signed [DAC_W-1:0] dac_q,
  // uplink
  input  logic signed [ADC_W-1:0] adc_data,
  output logic                    rx_valid,
  output logic signed [BB_W-1:0]  rx_i [2],
  output logic signed [BB_W-1:0]  rx_q [2]
);

  logic [PHASE_W-1:0] ftw_u [2], ftw_d [2];
  logic               clr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      profile      <= PROF_7M;
      ftw_u        <= '{FTW_12M, FTW_20M};
      ftw_d        <= '{FTW_12M, FTW_20M};
      clr          <= 1'b0;
      mode_changes <= '0;
    end else begin
      clr <= 1'b0;
      if (cfg_we) begin
        ftw_u <= cfg_ftw_u;
        ftw_d <= cfg_ftw_d;
        if (cfg_profile != profile && cfg_profile inside {PROF_7M, PROF_3M5, PROF_1M75}) begin
          profile      <= cfg_profile;
          clr          <= 1'b1;
          mode_changes <= mode_changes + 16'd1;
        end
      end
    end
  end

  dif_tx #(.BB_W(BB_W), .DAC_W(DAC_W)) u_tx (
    .clk, .rst_n, .clr, .profile,
    .ftw   (ftw_u),
    .bb_req(tx_req),
    .bb_i  (tx_i),
    .bb_q  (tx_q),
    .dac_i, .dac_q
  );

  dif_rx #(.ADC_W(ADC_W), .BB_W(BB_W)) u_rx (
    .clk, .rst_n, .clr, .profile,
    .ftw      (ftw_d),
    .adc_data,
    .out_valid(rx_valid),
    .bb_i     (rx_i),
    .bb_q     (rx_q)
  );

endmodule
