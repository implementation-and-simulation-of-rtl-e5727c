// despreader: PN despreading, Walsh decovering and integrate-and-dump.
//
// For every chip (`chip_en`) the sample r is multiplied by the conjugate of
// the PN pair and by the Walsh chip of row WALSH_ROW (from walsh_gen):
//   I = r_I p_I + r_Q p_Q,  Q = r_Q p_I - r_I p_Q   (p = +-1)
// and accumulated over LEN chips aligned to the local frame (a dump after the
// chip whose position is LEN-1 modulo LEN). The sum, its index within the
// frame (chip_idx / LEN) and a valid strobe come out one cycle after the last
// chip. This undoes the complex spreading and Walsh covering of the
// transmitter; LEN is the spread factor (8 or 16) for data, 8 for the pilot
// symbols of the channel estimator and 128 for the pilot correlations of the
// searcher, code tracking loop and AFC. LEN must be a power of two >= 8.
module despreader #(
  parameter int unsigned W           = 9,
  parameter int unsigned LEN         = 8,
  parameter logic [2:0]  WALSH_ROW   = 3'd0,
  parameter int unsigned FRAME_CHIPS = 65536,
  localparam int unsigned CW = $clog2(FRAME_CHIPS),
  localparam int unsigned OW = W + 1 + $clog2(LEN),
  localparam int unsigned IW = $clog2(FRAME_CHIPS / LEN)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 chip_en,
  input  logic signed [W-1:0]  r_i,
  input  logic signed [W-1:0]  r_q,
  input  logic                 pn_i,
  input  logic                 pn_q,
  input  logic [CW-1:0]        chip_idx,
  output logic                 sym_valid,
  output logic signed [OW-1:0] sym_i,
  output logic signed [OW-1:0] sym_q,
  output logic [IW-1:0]        sym_idx
);
  import cdma_pkg::*;

  localparam int unsigned LB = $clog2(LEN);

  logic signed [OW-1:0] acc_i, acc_q, ci, cq, ri, rq, ni, nq;
  logic                 w, first, last;

  walsh_gen u_walsh (.row(WALSH_ROW), .chip_idx(chip_idx[2:0]), .chip(w));

  always_comb begin
    ri = OW'(r_i);
    rq = OW'(r_q);
    // Conjugate PN: I = rI pI + rQ pQ, Q = rQ pI - rI pQ.
    ci = (pn_i ? -ri : ri) + (pn_q ? -rq : rq);
    cq = (pn_i ? -rq : rq) - (pn_q ? -ri : ri);
    if (w) begin
      ci = -ci;
      cq = -cq;
    end
    first = (chip_idx[LB-1:0] == '0);
    last  = (chip_idx[LB-1:0] == LB'(LEN - 1));
    ni = (first ? '0 : acc_i) + ci;
    nq = (first ? '0 : acc_q) + cq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i     <= '0;
      acc_q     <= '0;
      sym_valid <= 1'b0;
      sym_i     <= '0;
      sym_q     <= '0;
      sym_idx   <= '0;
    end else begin
      sym_valid <= 1'b0;
      if (chip_en) begin
        acc_i <= ni;
        acc_q <= nq;
        if (last) begin
          sym_valid <= 1'b1;
          sym_i     <= ni;
          sym_q     <= nq;
          sym_idx   <= chip_idx[CW-1:LB];
        end
      end
    end
  end
endmodule
