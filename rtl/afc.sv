// afc: automatic frequency control loop (phase difference detector, loop
// filter, NCO angle and lock detector).
//
// Every pilot correlation period (128 chips) the frequency-corrected pilot
// sum S = S_I + jS_Q is placed in one of 16 sectors (0..15 counter-clockwise
// from the +I axis). The sector is found from the signs of S projected on
// eight axes through the origin, at 0, 26.6, 45, 63.4, 90, 116.6, 135 and
// 153.4 degrees (tests on S_Q, S_I - 2S_Q, S_I - S_Q, 2S_I - S_Q, S_I, ...),
// so no multiplier or arctangent is needed. The phase difference detector
// subtracts the previous sector (mod 16) and maps the difference with the
// table {0,1,2,3,4,3,2,1,0,-1,-2,-3,-4,-3,-2,-1}. The loop filter
// integrates the detector output scaled by K1 = 2^K1_SHIFT into a frequency
// word; the NCO phase advances by the frequency word scaled by
// K2 = 2^-K2_SHIFT once per update, and its top 8 bits address the NCO ROM
// (`angle`, used by nco_rotator). The lock detector watches the signs of the
// I and Q parts of consecutive corrected pilot sums: each sign change is a
// quarter turn, counted +1 counter-clockwise and -1 clockwise (a change of
// both signs at once is ambiguous and counted 0). At most LOCK_MAX net
// quarter turns in LOCK_PERIOD updates mean the residual offset is small.
// Counting net rather than all changes is this implementation's choice: a
// converged loop parks the phase on a sector edge, which can be an I or Q
// axis, and the hunting there flips one sign back and forth.
// Sectoring, the mapping table, the two gains, the ROM read at multiples of
// the loop output and the sign-based lock test follow the modem
// specification; word widths, gain values and lock limits are this
// implementation's choices. Idle (and cleared) while `enable` is low.
module afc #(
  parameter int unsigned CORR_W      = 17,
  parameter int unsigned K1_SHIFT    = 12,
  parameter int unsigned K2_SHIFT    = 8,
  parameter int unsigned LOCK_PERIOD = 64,
  parameter int unsigned LOCK_MAX    = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic                     corr_valid,
  input  logic signed [CORR_W-1:0] s_i,
  input  logic signed [CORR_W-1:0] s_q,
  output logic [7:0]               angle,
  output logic signed [31:0]       freq,
  output logic [3:0]               sector,
  output logic signed [3:0]        pdd,
  output logic                     locked
);
  localparam int unsigned XW = CORR_W + 2;
  localparam logic signed [7:0] LMAX = 8'(LOCK_MAX);

  logic [3:0]        sec_n, prev_sec, diff;
  logic signed [3:0] pdd_n;
  logic              have_prev, prev_si, prev_sq;
  logic [15:0]       phase;
  logic [7:0]        nupd;
  logic signed [7:0] net, net_n;
  logic [1:0]        quad, prev_quad, dq;

  // Sector from sign tests.
  always_comb begin
    logic signed [XW-1:0] i1, q1;
    logic [2:0] cnt;
    logic [6:0] c;
    i1 = XW'(s_i);
    q1 = XW'(s_q);
    // c[k] : angle of S is beyond the axis at 26.6, 45, 63.4, 90, 116.6, 135, 153.4 degrees
    c[0] = (2 * q1 - i1) > 0;
    c[1] = (q1 - i1) > 0;
    c[2] = (q1 - 2 * i1) > 0;
    c[3] = (-i1) > 0;
    c[4] = (-q1 - 2 * i1) > 0;
    c[5] = (-q1 - i1) > 0;
    c[6] = (-2 * q1 - i1) > 0;
    if (q1 < 0 || (q1 == 0 && i1 < 0)) c = ~c;
    cnt = '0;
    for (int k = 0; k < 7; k++) cnt += 3'(c[k]);
    sec_n = (q1 < 0 || (q1 == 0 && i1 < 0)) ? 4'd8 + 4'(cnt) : 4'(cnt);
    diff  = sec_n - prev_sec;
    case (diff)
      4'd0, 4'd8:   pdd_n = 4'sd0;
      4'd1, 4'd7:   pdd_n = 4'sd1;
      4'd2, 4'd6:   pdd_n = 4'sd2;
      4'd3, 4'd5:   pdd_n = 4'sd3;
      4'd4:         pdd_n = 4'sd4;
      4'd9, 4'd15:  pdd_n = -4'sd1;
      4'd10, 4'd14: pdd_n = -4'sd2;
      4'd11, 4'd13: pdd_n = -4'sd3;
      default:      pdd_n = -4'sd4;   // 12
    endcase
    // quadrant 0..3 counter-clockwise from the signs
    quad  = {s_q < 0, (s_i < 0) ^ (s_q < 0)};
    dq    = quad - prev_quad;
    net_n = net + ((dq == 2'd1) ? 8'sd1 : (dq == 2'd3) ? -8'sd1 : 8'sd0);
  end
  assign prev_quad = {prev_sq, prev_si ^ prev_sq};

  assign angle = phase[15:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_sec  <= '0;
      have_prev <= 1'b0;
      prev_si   <= 1'b0;
      prev_sq   <= 1'b0;
      freq      <= '0;
      phase     <= '0;
      sector    <= '0;
      pdd       <= '0;
      nupd      <= '0;
      net       <= '0;
      locked    <= 1'b0;
    end else if (!enable) begin
      have_prev <= 1'b0;
      freq      <= '0;
      phase     <= '0;
      nupd      <= '0;
      net       <= '0;
      locked    <= 1'b0;
    end else if (corr_valid) begin
      prev_sec  <= sec_n;
      have_prev <= 1'b1;
      sector    <= sec_n;
      prev_si   <= (s_i < 0);
      prev_sq   <= (s_q < 0);
      if (have_prev) begin
        pdd   <= pdd_n;
        freq  <= freq + (32'(pdd_n) <<< K1_SHIFT);
        phase <= phase + 16'((freq + (32'(pdd_n) <<< K1_SHIFT)) >>> K2_SHIFT);
        // Lock detector.
        if (nupd == 8'(LOCK_PERIOD - 1)) begin
          locked <= (net_n <= LMAX) && (net_n >= -LMAX);
          nupd   <= '0;
          net    <= '0;
        end else begin
          nupd <= nupd + 8'd1;
          net  <= net_n;
        end
      end
    end
  end
endmodule
