// dagc: digital automatic gain control.
//
// The chip-matched filter output is multiplied by a gain g (GF fractional
// bits) and saturated to OUT_W bits. The magnitude of the result, taken as
// |I| + |Q|, is compared with the reference `ref_mag`; the error drives an
// integrating loop filter g += err * 2^-K_SHIFT, so the average magnitude
// converges to the reference. The loop structure follows the modem
// specification; the |I|+|Q| magnitude, gain range and widths are this
// implementation's choice. One sample per clock, one cycle of latency; the
// gain starts at 1.0 after reset and is observable on `gain`.
module dagc #(
  parameter int unsigned IN_W    = 10,
  parameter int unsigned OUT_W   = 8,
  parameter int unsigned GF      = 8,
  parameter int unsigned K_SHIFT = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din_i,
  input  logic signed [IN_W-1:0]  din_q,
  input  logic [OUT_W-1:0]        ref_mag,
  output logic signed [OUT_W-1:0] dout_i,
  output logic signed [OUT_W-1:0] dout_q,
  output logic [GF+7:0]           gain
);
  localparam int unsigned GW = GF + 8;                 // gain width: up to 256x
  localparam int unsigned LW = GW + K_SHIFT + 1;       // loop accumulator
  localparam int unsigned PW = IN_W + GW + 1;
  localparam logic signed [PW-1:0] MAXV = PW'((1 << (OUT_W - 1)) - 1);

  logic signed [LW-1:0]    lacc;
  logic signed [PW-1:0]    pi, pq;
  logic signed [OUT_W-1:0] yi, yq;
  logic [OUT_W:0]          mag;
  logic signed [OUT_W+1:0] err;
  logic signed [LW:0]      sum;
  logic signed [LW-1:0]    nxt;

  function automatic logic signed [OUT_W-1:0] sat(input logic signed [PW-1:0] v);
    if (v > MAXV)       return OUT_W'(MAXV);
    else if (v < -MAXV) return OUT_W'(-MAXV);
    else                return OUT_W'(v);
  endfunction

  always_comb begin
    gain = lacc[LW-2 -: GW];
    pi   = (PW'(din_i) * $signed({1'b0, gain})) >>> GF;
    pq   = (PW'(din_q) * $signed({1'b0, gain})) >>> GF;
    yi   = sat(pi);
    yq   = sat(pq);
    mag  = (OUT_W+1)'(yi < 0 ? -yi : yi) + (OUT_W+1)'(yq < 0 ? -yq : yq);
    err  = $signed({2'b00, ref_mag}) - $signed({1'b0, mag});
    sum  = (LW+1)'(lacc) + (LW+1)'(err);
    if (sum < 0)                        nxt = '0;
    else if (sum > (LW+1)'(2**(LW-1) - 1)) nxt = LW'(2**(LW-1) - 1);
    else                                nxt = LW'(sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lacc   <= LW'(1) <<< (GF + K_SHIFT);    // gain 1.0
      dout_i <= '0;
      dout_q <= '0;
    end else begin
      lacc   <= nxt;
      dout_i <= yi;
      dout_q <= yq;
    end
  end
endmodule
