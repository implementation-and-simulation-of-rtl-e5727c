// cdma_modem_top: the DS/CDMA modem FPGA design, station transmitter and
// mobile receiver side by side.
//
// The transmitter (cdma_tx) turns three bit streams (TLM 512 kbps, video 1
// and video 2 at 1.024 Mbps) plus a pilot into 12-bit baseband I/Q samples
// at 32.768 MS/s for the D/A converter. The receiver (cdma_rx) takes 6-bit
// I/Q samples from the A/D converter at the same rate and delivers
// deinterleaved 3-bit soft symbols for three external Viterbi decoders,
// plus acquisition and lock status. The controller's registers (channel
// gains, thresholds, AGC reference, search start) are ports; the D/A and A/D
// converters, the decoders and the controller are outside this design.
// One clock (the 32.768 MHz master clock) drives both halves.
module cdma_modem_top #(
  parameter int unsigned FRAME_CHIPS = 65536,
  parameter int unsigned ILV_ROWS    = 64,
  parameter int unsigned REACQ_SPAN  = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  // transmitter
  input  logic [3:0][7:0]    tx_gain,
  output logic               tlm_req,
  input  logic               tlm_bit,
  output logic               v1_req,
  input  logic               v1_bit,
  output logic               v2_req,
  input  logic               v2_bit,
  output logic               tx_frame_start,
  output logic signed [11:0] dac_i,
  output logic signed [11:0] dac_q,
  // receiver
  input  logic signed [5:0]  adc_i,
  input  logic signed [5:0]  adc_q,
  input  logic               search_start,
  input  logic [7:0]         agc_ref,
  input  logic [25:0]        thr_low,
  input  logic [25:0]        thr_high,
  input  logic [25:0]        lock_thr,
  output logic [5:0]         tlm_soft,
  output logic               tlm_valid,
  output logic               tlm_first,
  output logic [5:0]         v1_soft,
  output logic               v1_valid,
  output logic               v1_first,
  output logic [5:0]         v2_soft,
  output logic               v2_valid,
  output logic               v2_first,
  output logic               acquired,
  output logic               reacq_mode,
  output logic               ctl_locked,
  output logic               afc_locked,
  output logic               lose_lock,
  output logic [31:0]        hyp_count,
  output logic [15:0]        false_alarms,
  output logic [15:0]        ctl_adj_count,
  output logic signed [31:0] afc_freq,
  output logic [15:0]        agc_gain,
  output logic [$clog2(FRAME_CHIPS)-1:0] local_chip
);
  cdma_tx #(.FRAME_CHIPS(FRAME_CHIPS), .ILV_ROWS(ILV_ROWS)) u_tx (
    .clk, .rst_n, .gain(tx_gain), .tlm_req, .tlm_bit, .v1_req, .v1_bit, .v2_req, .v2_bit,
    .frame_start(tx_frame_start), .dac_i, .dac_q);

  cdma_rx #(.FRAME_CHIPS(FRAME_CHIPS), .ILV_ROWS(ILV_ROWS), .REACQ_SPAN(REACQ_SPAN)) u_rx (
    .clk, .rst_n, .adc_i, .adc_q, .search_start, .agc_ref, .thr_low, .thr_high, .lock_thr,
    .tlm_soft, .tlm_valid, .tlm_first, .v1_soft, .v1_valid, .v1_first, .v2_soft, .v2_valid, .v2_first,
    .acquired, .reacq_mode, .ctl_locked, .afc_locked, .lose_lock, .hyp_count, .false_alarms,
    .ctl_adj_count, .afc_freq, .agc_gain, .local_chip);
endmodule
