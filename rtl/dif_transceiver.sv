// dif_transceiver: two-FA digital IF transceiver of a reconfigurable base
// station, the logic that sits in the FPGA between the modem link and the
// DAC/ADC chips.
//
// Downlink: the modem's two FA baseband I/Q streams are interpolated,
// modulated onto two NCO frequencies and combined into one I/Q pair for the
// DAC (dif_tx). Uplink: the band-pass-sampled ADC stream is split into two
// FA paths, demodulated by two NCOs and decimated back to baseband
// (dif_rx). Both directions run on the same IF sample clock (61.44 MHz for
// HSDPA, 64 MHz for WiMAX). PROFILE selects which standard the build serves,
// as a new FPGA configuration would; the NCO tuning words are run-time
// inputs from the management side.
//
// Interface: tx_bb_* are pulled with tx_bb_take; dac_* give one I/Q word per
// clock; adc_data takes one sample per clock; rx_bb_* are valid with
// rx_bb_valid. See dif_tx and dif_rx for timing. The modem link, DAC, ADC
// and clock generation are outside and meet this module at its ports.
module dif_transceiver
  import dif_pkg::*;
#(
  parameter profile_e PROFILE = PROF_HSDPA
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // NCO tuning words (f / fs * 2^32)
  input  logic [PHASE_W-1:0]      tx_ftw1,
  input  logic [PHASE_W-1:0]      tx_ftw2,
  input  logic [PHASE_W-1:0]      rx_ftw1,
  input  logic [PHASE_W-1:0]      rx_ftw2,
  // downlink: modem to DAC
  input  logic signed [BB_W-1:0]  tx_bb_i [2],
  input  logic signed [BB_W-1:0]  tx_bb_q [2],
  output logic                    tx_bb_take,
  output logic signed [DAC_W-1:0] dac_i,
  output logic signed [DAC_W-1:0] dac_q,
  output logic                    dac_valid,
  // uplink: ADC to modem
  input  logic signed [ADC_W-1:0] adc_data,
  output logic signed [BB_W-1:0]  rx_bb_i [2],
  output logic signed [BB_W-1:0]  rx_bb_q [2],
  output logic                    rx_bb_valid
);
  dif_tx #(.PROFILE(PROFILE)) u_tx (
    .clk, .rst_n, .ftw1(tx_ftw1), .ftw2(tx_ftw2),
    .bb_i(tx_bb_i), .bb_q(tx_bb_q), .bb_take(tx_bb_take),
    .dac_i, .dac_q, .dac_valid
  );

  dif_rx #(.PROFILE(PROFILE)) u_rx (
    .clk, .rst_n, .ftw1(rx_ftw1), .ftw2(rx_ftw2), .adc_data,
    .bb_i(rx_bb_i), .bb_q(rx_bb_q), .bb_valid(rx_bb_valid)
  );
endmodule
