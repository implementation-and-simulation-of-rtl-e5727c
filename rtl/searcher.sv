// searcher: PN phase acquisition by non-coherent correlation energy.
//
// Each hypothesis of the local PN phase is tested with two correlators half
// a chip apart (dual search): the on-time and the half-chip-early pilot
// correlations over Nc = 128 chips (corr_valid strobes, from the despreaders).
// The energy E = sum over NN dumps of |corr|^2 (non-coherent
// combining) of each correlator is compared with the low detection threshold.
// A hypothesis that passes is re-tested (verification, NV dumps) against the
// high threshold; the first one to pass is declared acquired. A hypothesis
// that fails is left by slewing the local PN one chip (slew_hold), and the
// first correlation after a slew is discarded because it straddles the slew.
//
// Initial acquisition scans the whole 8 ms frame (SPAN_INIT hypotheses,
// repeated until found). Reacquisition after `lose_lock` first advances the
// PN clock by REACQ_SPAN/2 chips (slew_adv) so that the phase last in lock
// sits in the middle of the search window, then scans REACQ_SPAN hypotheses
// and falls back to initial acquisition if none is verified. On acquisition
// `acquired` rises (and stays high until lose_lock) and, if the early
// correlator won, four `fine_adj` earlier steps move the timing half a chip.
// This search structure (dual search, detection/verification, windows and
// slew) follows the modem specification; NN, NV, the energy scaling (>>> ESH
// before squaring) and the reacquisition window size are this
// implementation's choices. Thresholds are registers set by the controller.
module searcher #(
  parameter int unsigned CORR_W     = 17,
  parameter int unsigned ESH        = 6,
  parameter int unsigned E_W        = 26,
  parameter int unsigned NN         = 2,
  parameter int unsigned NV         = 4,
  parameter int unsigned SPAN_INIT  = 65536,
  parameter int unsigned REACQ_SPAN = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     corr_valid,
  input  logic signed [CORR_W-1:0] on_i,
  input  logic signed [CORR_W-1:0] on_q,
  input  logic signed [CORR_W-1:0] early_i,
  input  logic signed [CORR_W-1:0] early_q,
  input  logic [E_W-1:0]           thr_low,
  input  logic [E_W-1:0]           thr_high,
  input  logic                     lose_lock,
  input  logic                     timing_busy,
  output logic                     slew_hold,
  output logic                     slew_adv,
  output logic                     fine_adj,
  output logic                     acquired,
  output logic                     reacq_mode,
  output logic [E_W-1:0]           last_energy,
  output logic [31:0]              hyp_count,
  output logic [15:0]              false_alarms
);
  typedef enum logic [2:0] {S_IDLE, S_DISCARD, S_DETECT, S_VERIFY, S_FINE, S_LOCK, S_SLEW_ADV} state_t;
  state_t state;

  localparam int unsigned SQ_W = 2 * (CORR_W - ESH);

  logic [E_W-1:0]  e_on, e_early, eo_n, ee_n, e_max;
  logic [7:0]      ndump;
  logic [31:0]     span_left;
  logic [15:0]     adv_left;
  logic            slew_req;
  logic [2:0]      fine_left;

  function automatic logic [SQ_W-1:0] sq(input logic signed [CORR_W-1:0] a);
    logic signed [CORR_W-ESH-1:0] s;
    s = (CORR_W-ESH)'(a >>> ESH);
    return SQ_W'(s * s);
  endfunction

  always_comb begin
    eo_n = e_on    + E_W'(sq(on_i))    + E_W'(sq(on_q));
    ee_n = e_early + E_W'(sq(early_i)) + E_W'(sq(early_q));
    e_max = (eo_n >= ee_n) ? eo_n : ee_n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      e_on         <= '0;
      e_early      <= '0;
      ndump        <= '0;
      span_left    <= '0;
      adv_left     <= '0;
      slew_req     <= 1'b0;
      fine_left    <= '0;
      slew_hold    <= 1'b0;
      slew_adv     <= 1'b0;
      fine_adj     <= 1'b0;
      acquired     <= 1'b0;
      reacq_mode   <= 1'b0;
      last_energy  <= '0;
      hyp_count    <= '0;
      false_alarms <= '0;
    end else begin
      slew_hold <= 1'b0;
      slew_adv  <= 1'b0;
      fine_adj  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state      <= S_DISCARD;
          span_left  <= 32'(SPAN_INIT);
          reacq_mode <= 1'b0;
        end
        // Wait for a whole correlation period at the new hypothesis.
        S_DISCARD: if (corr_valid) begin
          state   <= S_DETECT;
          e_on    <= '0;
          e_early <= '0;
          ndump   <= '0;
        end
        S_DETECT: if (corr_valid) begin
          e_on    <= eo_n;
          e_early <= ee_n;
          ndump   <= ndump + 8'd1;
          if (ndump == 8'(NN - 1)) begin
            last_energy <= e_max;
            if (e_max > thr_low) begin
              state     <= S_VERIFY;
              e_on      <= '0;
              e_early   <= '0;
              ndump     <= '0;
            end else begin
              slew_req <= 1'b1;
            end
          end
        end
        S_VERIFY: if (corr_valid) begin
          e_on    <= eo_n;
          e_early <= ee_n;
          ndump   <= ndump + 8'd1;
          if (ndump == 8'(NV - 1)) begin
            last_energy <= e_max;
            if (e_max > thr_high) begin
              state     <= S_FINE;
              fine_left <= (ee_n > eo_n) ? 3'd4 : 3'd0;
            end else begin
              false_alarms <= false_alarms + 16'd1;
              slew_req     <= 1'b1;
            end
          end
        end
        S_FINE: if (!timing_busy && !fine_adj) begin
          if (fine_left == 3'd0) begin
            state    <= S_LOCK;
            acquired <= 1'b1;
          end else begin
            fine_adj  <= 1'b1;
            fine_left <= fine_left - 3'd1;
          end
        end
        S_LOCK: if (lose_lock) begin
          acquired   <= 1'b0;
          reacq_mode <= 1'b1;
          state      <= S_SLEW_ADV;
          adv_left   <= 16'(REACQ_SPAN / 2);
          span_left  <= 32'(REACQ_SPAN);
        end
        S_SLEW_ADV: if (!timing_busy && !slew_adv) begin
          if (adv_left == '0) state <= S_DISCARD;
          else begin
            slew_adv <= 1'b1;
            adv_left <= adv_left - 16'd1;
          end
        end
        default: state <= S_IDLE;
      endcase

      // Move to the next hypothesis: one chip later.
      if (slew_req && !timing_busy && !slew_hold) begin
        slew_req  <= 1'b0;
        slew_hold <= 1'b1;
        hyp_count <= hyp_count + 32'd1;
        state     <= S_DISCARD;
        if (span_left <= 32'd1) begin
          span_left  <= 32'(SPAN_INIT);
          reacq_mode <= 1'b0;
        end else begin
          span_left <= span_left - 32'd1;
        end
      end
    end
  end
endmodule
