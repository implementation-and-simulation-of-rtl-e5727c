// rx_timing: receiver PN clock generator and decimator.
//
// The receiver sees 4 samples per chip. A 9-deep sample line and the linear
// interpolator (the mean of two neighbouring samples, here kept as their sum)
// give 8 sampling moments per chip. Once per chip (`chip_en`) the module
// outputs the on-time sample and the samples half a chip earlier and later,
// together with the local PN chips and the chip position in the 8 ms frame.
// Interpolated values are twice the sample scale (one extra bit).
//
// Timing is moved in two ways, both from the modem specification:
//  * fine_adj (+1/-1 eighth of a chip, later/earlier) from the code tracking
//    loop. The on-time delay index d (in 1/8 chip, 4..11) is changed; when it
//    leaves that range the chip period is made 2 or 6 clocks instead of 4.
//  * slew_hold / slew_adv from the searcher: the PN generator and chip
//    counter skip one step (PN clock slower) or take two steps (PN clock
//    faster), moving the local PN by one whole chip.
// Requests are taken at the next chip strobe; `busy` is high while one waits.
// The delay-line organisation and the request handshake are this
// implementation's choices.
module rx_timing #(
  parameter int unsigned W           = 8,
  parameter int unsigned FRAME_CHIPS = 65536,
  localparam int unsigned CW = $clog2(FRAME_CHIPS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] din_i,
  input  logic signed [W-1:0] din_q,
  input  logic                fine_adj,
  input  logic                fine_late,   // 1: later by 1/8 chip, 0: earlier
  input  logic                slew_hold,
  input  logic                slew_adv,
  output logic                busy,
  output logic                chip_en,
  output logic signed [W:0]   on_i,
  output logic signed [W:0]   on_q,
  output logic signed [W:0]   early_i,
  output logic signed [W:0]   early_q,
  output logic signed [W:0]   late_i,
  output logic signed [W:0]   late_q,
  output logic                pn_i,
  output logic                pn_q,
  output logic [CW-1:0]       chip_idx,
  output logic [3:0]          phase        // on-time delay index d
);
  logic signed [W-1:0] sb_i [9];
  logic signed [W-1:0] sb_q [9];
  logic [2:0]          cnt;
  logic [3:0]          d;
  logic                strobe;
  logic                adj_pend, adj_late, hold_pend, adv_pend, adv_second;
  logic [CW-1:0]       cidx;
  logic                pn_step, pn_restart, pi_w, pq_w;

  // Value at delay k (1/8 chip units) behind the newest sample, doubled.
  function automatic logic signed [W:0] tap(input logic signed [W-1:0] sb [9], input logic [3:0] k);
    logic [3:0] h;
    h = {1'b0, k[3:1]};
    if (!k[0]) return (W+1)'(sb[h]) <<< 1;
    else       return (W+1)'(sb[h]) + (W+1)'(sb[h + 4'd1]);
  endfunction

  assign strobe = (cnt == 3'd0);
  assign phase  = d;
  assign busy   = adj_pend | hold_pend | adv_pend | adv_second;

  // PN steps once per strobe unless held; an advance adds a second step.
  assign pn_step    = (strobe && !hold_pend) || adv_second;
  assign pn_restart = pn_step && (cidx == CW'(FRAME_CHIPS - 1));

  pn_gen u_pn (.clk, .rst_n, .step(pn_step && !pn_restart), .restart(pn_restart), .pn_i(pi_w), .pn_q(pq_w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 9; k++) begin
        sb_i[k] <= '0;
        sb_q[k] <= '0;
      end
      cnt        <= 3'd3;
      d          <= 4'd8;
      adj_pend   <= 1'b0;
      adj_late   <= 1'b0;
      hold_pend  <= 1'b0;
      adv_pend   <= 1'b0;
      adv_second <= 1'b0;
      cidx       <= '0;
      chip_en    <= 1'b0;
      on_i <= '0; on_q <= '0; early_i <= '0; early_q <= '0; late_i <= '0; late_q <= '0;
      pn_i <= 1'b0; pn_q <= 1'b0; chip_idx <= '0;
    end else begin
      sb_i[0] <= din_i;
      sb_q[0] <= din_q;
      for (int k = 1; k < 9; k++) begin
        sb_i[k] <= sb_i[k-1];
        sb_q[k] <= sb_q[k-1];
      end
      if (fine_adj) begin
        adj_pend <= 1'b1;
        adj_late <= fine_late;
      end
      if (slew_hold) hold_pend <= 1'b1;
      if (slew_adv)  adv_pend  <= 1'b1;

      adv_second <= 1'b0;
      if (pn_step) cidx <= pn_restart ? '0 : cidx + 1'b1;

      chip_en <= strobe;
      if (strobe) begin
        // Outputs for the chip at the current timing.
        on_i    <= tap(sb_i, d);
        on_q    <= tap(sb_q, d);
        early_i <= tap(sb_i, d + 4'd4);
        early_q <= tap(sb_q, d + 4'd4);
        late_i  <= tap(sb_i, d - 4'd4);
        late_q  <= tap(sb_q, d - 4'd4);
        pn_i    <= pi_w;
        pn_q    <= pq_w;
        chip_idx <= cidx;
        if (hold_pend) hold_pend <= 1'b0;
        if (adv_pend) begin
          adv_pend   <= 1'b0;
          adv_second <= 1'b1;
        end
        // Timing for the next chip.
        cnt <= 3'd3;
        if (adj_pend) begin
          adj_pend <= 1'b0;
          if (adj_late) begin
            if (d == 4'd4) begin d <= 4'd7; cnt <= 3'd5; end   // period 6
            else             d <= d - 4'd1;
          end else begin
            if (d == 4'd11) begin d <= 4'd8; cnt <= 3'd1; end  // period 2
            else              d <= d + 4'd1;
          end
        end
      end else begin
        cnt <= cnt - 3'd1;
      end
    end
  end
endmodule
