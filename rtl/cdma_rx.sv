// cdma_rx: receiver of the high-speed mobile.
//
// Signal path (4 samples per chip, one sample per clock):
//   6-bit ADC I/Q -> DC remover -> 48-tap SRRC chip-matched filter -> DAGC
//   -> decimator with 1/8-chip interpolation (rx_timing): early, on-time and
//      late samples once per chip, plus the local PN and frame position
//   -> on-time samples derotated by the AFC's NCO (nco_rotator)
//   -> despreaders: 128-chip pilot correlations (on-time, early, late) for the
//      searcher, code tracking loop and AFC; 8-chip pilot symbols for the
//      channel estimator; TLM (SF 16), video 1 and video 2 (SF 8) data
//   -> channel estimators (phase compensation) -> 3-bit soft QPSK decisions
//   -> block deinterleavers -> soft symbols for the external Viterbi decoders.
//
// Control: `search_start` starts the searcher; once it has detected and
// verified the PN phase (`acquired`) the code tracking loop and the AFC are
// enabled together. When the CTL lock detector reports loss of lock the
// searcher reacquires around the last phase. This order of operations
// follows the modem specification, where a small controller (CPU) sequences
// it; here the searcher's verification result enables the loops directly and
// the CPU's registers (thresholds, AGC reference) are ports.
//
// Frame alignment: the local PN restarts every 8 ms, so after acquisition
// the local chip position is the transmitter's frame position. Every data
// symbol carries its index within the frame through the channel estimator,
// and the deinterleaver writes by that index; this plays the role of the
// delay that aligns deinterleaver blocks with the frames. Deinterleaved
// symbols come out one frame later, only for frames received completely
// while acquired (*_valid), with *_first on the first symbol of a frame.
//
// Some sub-block outputs are left open on purpose: the searcher's
// last_energy, the channel estimates h_i/h_q, the CTL integral, the AFC
// sector and phase difference, the timing phase, the pilot-symbol index and
// the valid strobes of the early and late correlators (which dump together
// with the on-time one). They exist for observation in simulation and for
// a monitoring controller; the receiver itself does not need them.
module cdma_rx #(
  parameter int unsigned FRAME_CHIPS = 65536,
  parameter int unsigned ILV_ROWS    = 64,
  parameter int unsigned REACQ_SPAN  = 1024,
  parameter int unsigned FIR_SHIFT   = 8,
  localparam int unsigned CW = $clog2(FRAME_CHIPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic signed [5:0] adc_i,
  input  logic signed [5:0] adc_q,
  // controller registers
  input  logic              search_start,
  input  logic [7:0]        agc_ref,
  input  logic [25:0]       thr_low,
  input  logic [25:0]       thr_high,
  input  logic [25:0]       lock_thr,
  // deinterleaved soft symbols {Q[2:0], I[2:0]}
  output logic [5:0]        tlm_soft,
  output logic              tlm_valid,
  output logic              tlm_first,
  output logic [5:0]        v1_soft,
  output logic              v1_valid,
  output logic              v1_first,
  output logic [5:0]        v2_soft,
  output logic              v2_valid,
  output logic              v2_first,
  // status
  output logic              acquired,
  output logic              reacq_mode,
  output logic              ctl_locked,
  output logic              afc_locked,
  output logic              lose_lock,
  output logic [31:0]       hyp_count,
  output logic [15:0]       false_alarms,
  output logic [15:0]       ctl_adj_count,
  output logic signed [31:0] afc_freq,
  output logic [15:0]       agc_gain,
  output logic [CW-1:0]     local_chip
);
  // ---------------- front end ----------------
  logic signed [7:0] dc_i, dc_q, ag_i, ag_q;
  logic signed [9:0] mf_i, mf_q;

  dc_remover #(.IN_W(6), .K_SHIFT(5)) u_dc_i (.clk, .rst_n, .din(adc_i), .dout(dc_i));
  dc_remover #(.IN_W(6), .K_SHIFT(5)) u_dc_q (.clk, .rst_n, .din(adc_q), .dout(dc_q));
  srrc_fir #(.IN_W(8), .OUT_W(10), .SHIFT(FIR_SHIFT)) u_mf_i (.clk, .rst_n, .din(dc_i), .dout(mf_i));
  srrc_fir #(.IN_W(8), .OUT_W(10), .SHIFT(FIR_SHIFT)) u_mf_q (.clk, .rst_n, .din(dc_q), .dout(mf_q));
  dagc #(.IN_W(10), .OUT_W(8), .GF(8), .K_SHIFT(6)) u_agc (
    .clk, .rst_n, .din_i(mf_i), .din_q(mf_q), .ref_mag(agc_ref), .dout_i(ag_i), .dout_q(ag_q), .gain(agc_gain));

  // ---------------- timing ----------------
  logic              fine_adj, fine_late, s_fine, c_fine, c_late, slew_hold, slew_adv, t_busy;
  logic              chip_en, pn_i, pn_q;
  logic signed [8:0] on_i, on_q, e_i, e_q, l_i, l_q;
  logic [CW-1:0]     chip_idx;
  logic [3:0]        t_phase;

  assign fine_adj  = s_fine | c_fine;
  assign fine_late = c_fine & c_late;

  rx_timing #(.W(8), .FRAME_CHIPS(FRAME_CHIPS)) u_tim (
    .clk, .rst_n, .din_i(ag_i), .din_q(ag_q), .fine_adj, .fine_late, .slew_hold, .slew_adv,
    .busy(t_busy), .chip_en, .on_i, .on_q, .early_i(e_i), .early_q(e_q), .late_i(l_i), .late_q(l_q),
    .pn_i, .pn_q, .chip_idx, .phase(t_phase));
  assign local_chip = chip_idx;

  // ---------------- frequency correction ----------------
  logic [7:0]        angle;
  logic              r_en, r_pi, r_pq;
  logic signed [8:0] r_i, r_q;
  logic [CW-1:0]     r_idx;

  nco_rotator #(.W(9), .SB_W(CW + 2)) u_rot (
    .clk, .rst_n, .in_valid(chip_en), .in_i(on_i), .in_q(on_q), .in_sb({pn_q, pn_i, chip_idx}), .angle,
    .out_valid(r_en), .out_i(r_i), .out_q(r_q), .out_sb({r_pq, r_pi, r_idx}));

  // ---------------- despreaders ----------------
  localparam int unsigned PIW = CW - 7;
  logic               c_on_v, c_e_v, c_l_v;
  logic signed [16:0] c_on_i, c_on_q, c_e_i, c_e_q, c_l_i, c_l_q;
  logic [PIW-1:0]     unused_idx0, unused_idx1, unused_idx2;

  despreader #(.W(9), .LEN(128), .WALSH_ROW(3'd0), .FRAME_CHIPS(FRAME_CHIPS)) u_ds_on (
    .clk, .rst_n, .chip_en(r_en), .r_i(r_i), .r_q(r_q), .pn_i(r_pi), .pn_q(r_pq), .chip_idx(r_idx),
    .sym_valid(c_on_v), .sym_i(c_on_i), .sym_q(c_on_q), .sym_idx(unused_idx0));
  despreader #(.W(9), .LEN(128), .WALSH_ROW(3'd0), .FRAME_CHIPS(FRAME_CHIPS)) u_ds_early (
    .clk, .rst_n, .chip_en, .r_i(e_i), .r_q(e_q), .pn_i, .pn_q, .chip_idx,
    .sym_valid(c_e_v), .sym_i(c_e_i), .sym_q(c_e_q), .sym_idx(unused_idx1));
  despreader #(.W(9), .LEN(128), .WALSH_ROW(3'd0), .FRAME_CHIPS(FRAME_CHIPS)) u_ds_late (
    .clk, .rst_n, .chip_en, .r_i(l_i), .r_q(l_q), .pn_i, .pn_q, .chip_idx,
    .sym_valid(c_l_v), .sym_i(c_l_i), .sym_q(c_l_q), .sym_idx(unused_idx2));

  localparam int unsigned VIW = CW - 3;
  localparam int unsigned TIW = CW - 4;
  logic               p8_v, v1_v, v2_v, t_v;
  logic signed [12:0] p8_i, p8_q, v1_i, v1_q, v2_i, v2_q;
  logic signed [13:0] t_i, t_q;
  logic [VIW-1:0]     p8_idx, v1_idx, v2_idx;
  logic [TIW-1:0]     t_idx;

  despreader #(.W(9), .LEN(8), .WALSH_ROW(3'd0), .FRAME_CHIPS(FRAME_CHIPS)) u_ds_p8 (
    .clk, .rst_n, .chip_en(r_en), .r_i(r_i), .r_q(r_q), .pn_i(r_pi), .pn_q(r_pq), .chip_idx(r_idx),
    .sym_valid(p8_v), .sym_i(p8_i), .sym_q(p8_q), .sym_idx(p8_idx));
  despreader #(.W(9), .LEN(16), .WALSH_ROW(3'd1), .FRAME_CHIPS(FRAME_CHIPS)) u_ds_tlm (
    .clk, .rst_n, .chip_en(r_en), .r_i(r_i), .r_q(r_q), .pn_i(r_pi), .pn_q(r_pq), .chip_idx(r_idx),
    .sym_valid(t_v), .sym_i(t_i), .sym_q(t_q), .sym_idx(t_idx));
  despreader #(.W(9), .LEN(8), .WALSH_ROW(3'd2), .FRAME_CHIPS(FRAME_CHIPS)) u_ds_v1 (
    .clk, .rst_n, .chip_en(r_en), .r_i(r_i), .r_q(r_q), .pn_i(r_pi), .pn_q(r_pq), .chip_idx(r_idx),
    .sym_valid(v1_v), .sym_i(v1_i), .sym_q(v1_q), .sym_idx(v1_idx));
  despreader #(.W(9), .LEN(8), .WALSH_ROW(3'd3), .FRAME_CHIPS(FRAME_CHIPS)) u_ds_v2 (
    .clk, .rst_n, .chip_en(r_en), .r_i(r_i), .r_q(r_q), .pn_i(r_pi), .pn_q(r_pq), .chip_idx(r_idx),
    .sym_valid(v2_v), .sym_i(v2_i), .sym_q(v2_q), .sym_idx(v2_idx));

  // ---------------- acquisition and tracking ----------------
  searcher #(.CORR_W(17), .ESH(6), .E_W(26), .NN(2), .NV(4), .SPAN_INIT(FRAME_CHIPS), .REACQ_SPAN(REACQ_SPAN)) u_srch (
    .clk, .rst_n, .start(search_start), .corr_valid(c_on_v),
    .on_i(c_on_i), .on_q(c_on_q), .early_i(c_e_i), .early_q(c_e_q),
    .thr_low, .thr_high, .lose_lock, .timing_busy(t_busy),
    .slew_hold, .slew_adv, .fine_adj(s_fine), .acquired, .reacq_mode,
    .last_energy(), .hyp_count, .false_alarms);

  logic signed [23:0] ctl_integ;
  ctl #(.CORR_W(17), .ESH(6), .E_W(26)) u_ctl (
    .clk, .rst_n, .enable(acquired), .corr_valid(c_on_v),
    .on_i(c_on_i), .on_q(c_on_q), .early_i(c_e_i), .early_q(c_e_q), .late_i(c_l_i), .late_q(c_l_q),
    .lock_thr, .fine_adj(c_fine), .fine_late(c_late), .locked(ctl_locked), .lose_lock,
    .integ(ctl_integ), .adj_count(ctl_adj_count));

  logic [3:0]        afc_sector;
  logic signed [3:0] afc_pdd;
  afc #(.CORR_W(17)) u_afc (
    .clk, .rst_n, .enable(acquired), .corr_valid(c_on_v), .s_i(c_on_i), .s_q(c_on_q),
    .angle, .freq(afc_freq), .sector(afc_sector), .pdd(afc_pdd), .locked(afc_locked));

  // ---------------- channel estimation, demodulation, deinterleaving ----------------
  logic               ct_v, c1_v, c2_v;
  logic signed [15:0] ct_i, ct_q, c1_i, c1_q, c2_i, c2_q;
  logic [TIW-1:0]     ct_idx;
  logic [VIW-1:0]     c1_idx, c2_idx;

  channel_estimator #(.SW(14), .N(8), .DATA_DELAY(2), .IW(TIW), .OSH(13), .OW(16)) u_ce_t (
    .clk, .rst_n, .pilot_valid(p8_v), .pilot_i(14'(p8_i)), .pilot_q(14'(p8_q)),
    .data_valid(t_v), .data_i(t_i), .data_q(t_q), .data_idx(t_idx),
    .out_valid(ct_v), .out_i(ct_i), .out_q(ct_q), .out_idx(ct_idx), .h_i(), .h_q());
  channel_estimator #(.SW(13), .N(8), .DATA_DELAY(4), .IW(VIW), .OSH(12), .OW(16)) u_ce_1 (
    .clk, .rst_n, .pilot_valid(p8_v), .pilot_i(p8_i), .pilot_q(p8_q),
    .data_valid(v1_v), .data_i(v1_i), .data_q(v1_q), .data_idx(v1_idx),
    .out_valid(c1_v), .out_i(c1_i), .out_q(c1_q), .out_idx(c1_idx), .h_i(), .h_q());
  channel_estimator #(.SW(13), .N(8), .DATA_DELAY(4), .IW(VIW), .OSH(12), .OW(16)) u_ce_2 (
    .clk, .rst_n, .pilot_valid(p8_v), .pilot_i(p8_i), .pilot_q(p8_q),
    .data_valid(v2_v), .data_i(v2_i), .data_q(v2_q), .data_idx(v2_idx),
    .out_valid(c2_v), .out_i(c2_i), .out_q(c2_q), .out_idx(c2_idx), .h_i(), .h_q());

  logic           dt_v, d1_v, d2_v;
  logic [2:0]     dt_si, dt_sq, d1_si, d1_sq, d2_si, d2_sq;
  logic [TIW-1:0] dt_idx;
  logic [VIW-1:0] d1_idx, d2_idx;

  qpsk_soft_demod #(.W(16), .MSH(8), .IW(TIW)) u_dm_t (
    .clk, .rst_n, .in_valid(ct_v), .in_i(ct_i), .in_q(ct_q), .in_idx(ct_idx),
    .out_valid(dt_v), .soft_i(dt_si), .soft_q(dt_sq), .out_idx(dt_idx));
  qpsk_soft_demod #(.W(16), .MSH(8), .IW(VIW)) u_dm_1 (
    .clk, .rst_n, .in_valid(c1_v), .in_i(c1_i), .in_q(c1_q), .in_idx(c1_idx),
    .out_valid(d1_v), .soft_i(d1_si), .soft_q(d1_sq), .out_idx(d1_idx));
  qpsk_soft_demod #(.W(16), .MSH(8), .IW(VIW)) u_dm_2 (
    .clk, .rst_n, .in_valid(c2_v), .in_i(c2_i), .in_q(c2_q), .in_idx(c2_idx),
    .out_valid(d2_v), .soft_i(d2_si), .soft_q(d2_sq), .out_idx(d2_idx));

  block_interleaver #(.ROWS(ILV_ROWS), .COLS((FRAME_CHIPS / 16) / ILV_ROWS), .W(6), .DEINT(1'b1)) u_dil_t (
    .clk, .rst_n, .en(dt_v && acquired), .idx(dt_idx), .wr_data({dt_sq, dt_si}),
    .rd_data(tlm_soft), .rd_valid(tlm_valid), .rd_first(tlm_first));
  block_interleaver #(.ROWS(ILV_ROWS), .COLS((FRAME_CHIPS / 8) / ILV_ROWS), .W(6), .DEINT(1'b1)) u_dil_1 (
    .clk, .rst_n, .en(d1_v && acquired), .idx(d1_idx), .wr_data({d1_sq, d1_si}),
    .rd_data(v1_soft), .rd_valid(v1_valid), .rd_first(v1_first));
  block_interleaver #(.ROWS(ILV_ROWS), .COLS((FRAME_CHIPS / 8) / ILV_ROWS), .W(6), .DEINT(1'b1)) u_dil_2 (
    .clk, .rst_n, .en(d2_v && acquired), .idx(d2_idx), .wr_data({d2_sq, d2_si}),
    .rd_data(v2_soft), .rd_valid(v2_valid), .rd_first(v2_first));
endmodule
