// adcb_top: digital IF board with two diversity paths.
//
// The transceiver board carries two conversion modules, one per diversity
// path (A = index 0, B = index 1). Each module has its own DAC, ADC and
// digital IF transceiver (dif_transceiver) handling both FAs of that path. The
// base-station manager reconfigures the board as a whole. Here one
// configuration write (cfg_*) therefore goes to both paths, which switch
// profile and carriers in the same clock and stay sample-aligned. Every other
// port is the per-path port of dif_transceiver, indexed by path.
//
// Both paths run on the shared 64 MHz sample clock. Latencies and rates are
// those of dif_transceiver.
module adcb_top
  import dif_pkg::*;
#(
  parameter int unsigned BB_W  = 16,
  parameter int unsigned DAC_W = 16,
  parameter int unsigned ADC_W = 14,
  parameter int unsigned PATHS = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration, common to both paths
  input  logic                    cfg_we,
  input  profile_t                cfg_profile,
  input  logic [PHASE_W-1:0]      cfg_ftw_u [2],
  input  logic [PHASE_W-1:0]      cfg_ftw_d [2],
  output profile_t                profile      [PATHS],
  output logic [15:0]             mode_changes [PATHS],
  // downlink, per path and FA
  output logic                    tx_req [PATHS],
  input  logic signed [BB_W-1:0]  tx_i   [PATHS][2],
  input  logic signed [BB_W-1:0]  tx_q   [PATHS][2],
  output logic signed [DAC_W-1:0] dac_i  [PATHS],
  output logic signed [DAC_W-1:0] dac_q  [PATHS],
  // uplink, per path and FA
  input  logic signed [ADC_W-1:0] adc_data [PATHS],
  output logic                    rx_valid [PATHS],
  output logic signed [BB_W-1:0]  rx_i     [PATHS][2],
  output logic signed [BB_W-1:0]  rx_q     [PATHS][2]
);

  for (genvar p = 0; p < PATHS; p++) begin : g_path
    dif_transceiver #(.BB_W(BB_W), .DAC_W(DAC_W), .ADC_W(ADC_W)) u_dicm (
      .clk, .rst_n,
      .cfg_we, .cfg_profile, .cfg_ftw_u, .cfg_ftw_d,
      .profile      (profile[p]),
      .mode_changes (mode_changes[p]),
      .tx_req       (tx_req[p]),
      .tx_i         (tx_i[p]),
      .tx_q         (tx_q[p]),
      .dac_i        (dac_i[p]),
      .dac_q        (dac_q[p]),
      .adc_data     (adc_data[p]),
      .rx_valid     (rx_valid[p]),
      .rx_i         (rx_i[p]),
      .rx_q         (rx_q[p])
    );
  end

endmodule
