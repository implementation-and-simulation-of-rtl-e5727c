// srrc_fir: 48-tap square-root raised cosine FIR filter (rolloff 0.35).
//
// The same filter serves as the transmit pulse shaper and as the receive
// chip-matched filter: taps are spaced 1/32.768 us, i.e. 4 taps per chip, as
// in the modem specification. The input is taken every clock (the
// transmitter feeds a chip followed by three zeros, the receiver feeds ADC
// samples). Direct form: a 48-sample delay line, a sum of products, then an
// arithmetic right shift by SHIFT with rounding and saturation to OUT_W bits.
// The output is registered, so the filter delay is 1 cycle plus the 23.5
// sample group delay of the symmetric taps. Tap quantisation (centre taps =
// 256) and word widths are this implementation's choice.
module srrc_fir #(
  parameter int unsigned IN_W  = 12,
  parameter int unsigned OUT_W = 12,
  parameter int unsigned SHIFT = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  import cdma_pkg::*;

  localparam int unsigned AW = IN_W + 10 + 6;
  localparam logic signed [AW-1:0] MAXV = AW'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [AW-1:0] MINV = -AW'(1 << (OUT_W - 1));

  logic signed [IN_W-1:0] dl [SRRC_TAPS];
  logic signed [AW-1:0]   acc, sh;

  always_comb begin
    acc = '0;
    for (int n = 0; n < SRRC_TAPS; n++)
      acc += AW'(dl[n]) * AW'(SRRC_COEF[n]);
    sh = (acc + (AW'(1) <<< (SHIFT - 1))) >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < SRRC_TAPS; n++) dl[n] <= '0;
      dout <= '0;
    end else begin
      dl[0] <= din;
      for (int n = 1; n < SRRC_TAPS; n++) dl[n] <= dl[n-1];
      if (sh > MAXV)      dout <= MAXV[OUT_W-1:0];
      else if (sh < MINV) dout <= MINV[OUT_W-1:0];
      else                dout <= sh[OUT_W-1:0];
    end
  end
endmodule
