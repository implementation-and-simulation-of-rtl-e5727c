// cdma_tx: transmitter of the station.
//
// Three data sources (TLM at 512 kbps, video 1 and video 2 at 1.024 Mbps) are
// each convolutionally encoded (K=7, R=1/2), block-interleaved over an 8 ms
// frame and QPSK-mapped (coded bit c0 on I, c1 on Q). A constant pilot
// (1+j) and the three channels are covered by Walsh rows, weighted, summed,
// complex-spread by the order-17 PN pair and pulse-shaped by the 48-tap SRRC
// filter at 4 samples per chip. This chain follows the modem specification.
//
// Timing: one clock = one sample (32.768 MHz), 4 clocks per chip. In every
// chip, sample 0 fetches the next symbol when a symbol starts (every 8 chips
// for video, every 16 for TLM: spread factors 8 and 16), sample 3 combines
// and spreads the chip, and the spread chip enters the filter followed by
// three zeros. A source bit is taken from *_bit in the cycle its *_req is
// high. frame_start marks sample 0 of chip 0 of each 65536-chip frame; the
// PN generators restart there.
//
// Choices of this implementation: the channels are summed before one pair of
// filters (equal, by linearity, to filtering each channel and then adding),
// Walsh rows 0..3 go to pilot, TLM, video 1, video 2, and the DAC words are
// 12 bits (the AD9762 width).
// The interleavers' frame-start flags (t_rf, a_rf, b_rf) are not used: the
// transmitter's own chip counter already marks the frame.
module cdma_tx #(
  parameter int unsigned FRAME_CHIPS = 65536,
  parameter int unsigned ILV_ROWS    = 64,
  parameter int unsigned FIR_SHIFT   = 7,
  localparam int unsigned CW = $clog2(FRAME_CHIPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0][7:0]   gain,        // [0] pilot, [1] TLM, [2] video 1, [3] video 2
  output logic              tlm_req,
  input  logic              tlm_bit,
  output logic              v1_req,
  input  logic              v1_bit,
  output logic              v2_req,
  input  logic              v2_bit,
  output logic              frame_start,
  output logic signed [11:0] dac_i,
  output logic signed [11:0] dac_q
);
  localparam int unsigned VSYM = FRAME_CHIPS / 8;    // video symbols per frame
  localparam int unsigned TSYM = FRAME_CHIPS / 16;   // TLM symbols per frame

  logic [1:0]    samp;
  logic [CW-1:0] chip;
  logic          s0, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samp <= '0;
      chip <= '0;
    end else begin
      samp <= samp + 1'b1;
      if (samp == 2'd3) chip <= chip + 1'b1;
    end
  end

  assign s0 = (samp == 2'd0);
  assign s3 = (samp == 2'd3);
  assign frame_start = s0 && (chip == '0);

  // Symbol requests at sample 0 of the first chip of each symbol.
  assign v1_req  = s0 && (chip[2:0] == 3'd0);
  assign v2_req  = v1_req;
  assign tlm_req = s0 && (chip[3:0] == 4'd0);

  // Encoders: coded pair out one cycle after the request.
  logic tv, tc0, tc1, av, ac0, ac1, bv, bc0, bc1;
  conv_encoder u_enc_t (.clk, .rst_n, .in_valid(tlm_req), .in_bit(tlm_bit), .out_valid(tv), .c0(tc0), .c1(tc1));
  conv_encoder u_enc_1 (.clk, .rst_n, .in_valid(v1_req),  .in_bit(v1_bit),  .out_valid(av), .c0(ac0), .c1(ac1));
  conv_encoder u_enc_2 (.clk, .rst_n, .in_valid(v2_req),  .in_bit(v2_bit),  .out_valid(bv), .c0(bc0), .c1(bc1));

  // Symbol index of the symbol being requested, delayed to line up with the encoder.
  logic [$clog2(VSYM)-1:0] vidx;
  logic [$clog2(TSYM)-1:0] tidx;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vidx <= '0;
      tidx <= '0;
    end else begin
      vidx <= chip[CW-1:3];
      tidx <= chip[CW-1:4];
    end
  end

  logic [1:0] t_sym, a_sym, b_sym;
  logic       t_rv, a_rv, b_rv, t_rf, a_rf, b_rf;
  block_interleaver #(.ROWS(ILV_ROWS), .COLS(TSYM / ILV_ROWS), .W(2)) u_ilv_t (
    .clk, .rst_n, .en(tv), .idx(tidx), .wr_data({tc1, tc0}), .rd_data(t_sym), .rd_valid(t_rv), .rd_first(t_rf));
  block_interleaver #(.ROWS(ILV_ROWS), .COLS(VSYM / ILV_ROWS), .W(2)) u_ilv_1 (
    .clk, .rst_n, .en(av), .idx(vidx), .wr_data({ac1, ac0}), .rd_data(a_sym), .rd_valid(a_rv), .rd_first(a_rf));
  block_interleaver #(.ROWS(ILV_ROWS), .COLS(VSYM / ILV_ROWS), .W(2)) u_ilv_2 (
    .clk, .rst_n, .en(bv), .idx(vidx), .wr_data({bc1, bc0}), .rd_data(b_sym), .rd_valid(b_rv), .rd_first(b_rf));

  // Hold each channel's current symbol for its spread factor.
  logic [1:0] t_hold, a_hold, b_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_hold <= '0;
      a_hold <= '0;
      b_hold <= '0;
    end else begin
      if (t_rv) t_hold <= t_sym;
      if (a_rv) a_hold <= a_sym;
      if (b_rv) b_hold <= b_sym;
    end
  end

  logic signed [10:0] c_i, c_q;
  walsh_combiner #(.NCH(4), .GW(8), .ROWS({3'd3, 3'd2, 3'd1, 3'd0})) u_comb (
    .clk, .rst_n, .chip_en(s3), .chip_idx(chip[2:0]),
    .sym_i({b_hold[0], a_hold[0], t_hold[0], 1'b0}),
    .sym_q({b_hold[1], a_hold[1], t_hold[1], 1'b0}),
    .gain, .sum_i(c_i), .sum_q(c_q));

  // PN for chip c is used at sample 3 of chip c+1 (the combiner output is
  // registered at sample 3 of chip c): step the PN one sample later.
  logic pn_i, pn_q;
  logic pn_step, pn_restart;
  assign pn_step    = s3;
  assign pn_restart = s3 && (chip == CW'(FRAME_CHIPS - 1)) ;
  logic pn_i_d, pn_q_d;
  pn_gen u_pn (.clk, .rst_n, .step(pn_step), .restart(pn_restart), .pn_i, .pn_q);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pn_i_d <= 1'b0;
      pn_q_d <= 1'b0;
    end else if (s3) begin
      pn_i_d <= pn_i;
      pn_q_d <= pn_q;
    end
  end

  logic signed [11:0] sp_i, sp_q;
  complex_spreader #(.W(11)) u_spr (
    .clk, .rst_n, .chip_en(s3), .d_i(c_i), .d_q(c_q), .pn_i(pn_i_d), .pn_q(pn_q_d), .s_i(sp_i), .s_q(sp_q));

  // 4x upsampling by zero insertion: the chip enters the filter at sample 0.
  logic signed [11:0] up_i, up_q;
  assign up_i = s0 ? sp_i : '0;
  assign up_q = s0 ? sp_q : '0;

  srrc_fir #(.IN_W(12), .OUT_W(12), .SHIFT(FIR_SHIFT)) u_fir_i (.clk, .rst_n, .din(up_i), .dout(dac_i));
  srrc_fir #(.IN_W(12), .OUT_W(12), .SHIFT(FIR_SHIFT)) u_fir_q (.clk, .rst_n, .din(up_q), .dout(dac_q));
endmodule
