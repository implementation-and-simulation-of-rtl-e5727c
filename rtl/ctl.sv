// ctl: code tracking loop (early-late gate) with lock detector.
//
// Every pilot correlation period (Nc = 128 chips) the early and late pilot
// correlations, half a chip before and after the on-time sample, give the
// timing error e = sign(|L|^2 - |E|^2): if the late correlation is stronger
// the sampling moment must move later. The loop filter has a proportional
// path (e * 2^P_SHIFT) and an integral path (integ += e * 2^I_SHIFT) that
// tracks the sampling frequency error (timing drift). Their sum accumulates
// in a phase register; each time it passes +-2^16 the decimator is slewed
// 1/8 chip (fine_adj, fine_late), the resolution given by the linear
// interpolator. With the loop converged, early and late energies are equal.
//
// The lock detector compares the on-time pilot energy with `lock_thr` and
// counts the passes in every LOCK_PERIOD correlations; fewer than LOCK_MIN
// passes raise `lose_lock` for one cycle and clear `locked`.
// The early-late structure, the proportional+integral loop filter and the
// pass-counting lock detector follow the modem specification; using the sign
// of the error, the gains and the lock period are this implementation's
// choices. The loop only runs while `enable` is high (after acquisition).
module ctl #(
  parameter int unsigned CORR_W      = 17,
  parameter int unsigned ESH         = 6,
  parameter int unsigned E_W         = 24,
  parameter int unsigned P_SHIFT     = 14,
  parameter int unsigned I_SHIFT     = 6,
  parameter int unsigned LOCK_PERIOD = 32,
  parameter int unsigned LOCK_MIN    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic                     corr_valid,
  input  logic signed [CORR_W-1:0] on_i,
  input  logic signed [CORR_W-1:0] on_q,
  input  logic signed [CORR_W-1:0] early_i,
  input  logic signed [CORR_W-1:0] early_q,
  input  logic signed [CORR_W-1:0] late_i,
  input  logic signed [CORR_W-1:0] late_q,
  input  logic [E_W-1:0]           lock_thr,
  output logic                     fine_adj,
  output logic                     fine_late,
  output logic                     locked,
  output logic                     lose_lock,
  output logic signed [23:0]       integ,
  output logic [15:0]              adj_count
);
  localparam int unsigned SQ_W = 2 * (CORR_W - ESH);
  localparam int signed ONE = 1 << 16;

  logic [E_W-1:0]       e_early, e_late, e_on;
  logic signed [1:0]    err;
  logic signed [23:0]   integ_n, lf;
  logic signed [23:0]   acc, acc_n;
  logic [7:0]           nupd, npass;

  function automatic logic [E_W-1:0] en(input logic signed [CORR_W-1:0] a, input logic signed [CORR_W-1:0] b);
    logic signed [CORR_W-ESH-1:0] x, y;
    x = (CORR_W-ESH)'(a >>> ESH);
    y = (CORR_W-ESH)'(b >>> ESH);
    return E_W'(SQ_W'(x * x)) + E_W'(SQ_W'(y * y));
  endfunction

  always_comb begin
    e_early = en(early_i, early_q);
    e_late  = en(late_i, late_q);
    e_on    = en(on_i, on_q);
    err     = (e_late > e_early) ? 2'sd1 : (e_late < e_early) ? -2'sd1 : 2'sd0;
    integ_n = integ + (24'(err) <<< I_SHIFT);
    lf      = (24'(err) <<< P_SHIFT) + integ_n;
    acc_n   = acc + lf;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      acc       <= '0;
      fine_adj  <= 1'b0;
      fine_late <= 1'b0;
      locked    <= 1'b0;
      lose_lock <= 1'b0;
      nupd      <= '0;
      npass     <= '0;
      adj_count <= '0;
    end else begin
      fine_adj  <= 1'b0;
      lose_lock <= 1'b0;
      if (!enable) begin
        integ  <= '0;
        acc    <= '0;
        locked <= 1'b0;
        nupd   <= '0;
        npass  <= '0;
      end else if (corr_valid) begin
        integ <= integ_n;
        if (acc_n >= 24'(ONE)) begin
          acc       <= acc_n - 24'(ONE);
          fine_adj  <= 1'b1;
          fine_late <= 1'b1;
          adj_count <= adj_count + 16'd1;
        end else if (acc_n <= -24'(ONE)) begin
          acc       <= acc_n + 24'(ONE);
          fine_adj  <= 1'b1;
          fine_late <= 1'b0;
          adj_count <= adj_count + 16'd1;
        end else begin
          acc <= acc_n;
        end
        // Lock detector.
        if (nupd == 8'(LOCK_PERIOD - 1)) begin
          nupd  <= '0;
          npass <= '0;
          if ((npass + 8'(e_on > lock_thr)) < 8'(LOCK_MIN)) begin
            locked    <= 1'b0;
            lose_lock <= 1'b1;
          end else begin
            locked <= 1'b1;
          end
        end else begin
          nupd  <= nupd + 8'd1;
          npass <= npass + 8'(e_on > lock_thr);
        end
      end
    end
  end
endmodule
