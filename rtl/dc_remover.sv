// dc_remover: first-order loop that removes the DC offset of the ADC samples.
//
// The running DC estimate `dc` (8 fractional bits) is subtracted from every
// input sample, and the difference, scaled by the loop gain K = 2^-K_SHIFT,
// is added back into the estimate: dc += K*(x - dc). This is the first-order
// DC removal loop of the modem specification, with K = 2^-5 taken from its
// convergence/jitter study. The output keeps two fractional bits (OUT_W =
// IN_W + 2) and is registered: one cycle of latency, one sample per clock.
module dc_remover #(
  parameter int unsigned IN_W    = 6,
  parameter int unsigned K_SHIFT = 5,
  localparam int unsigned OUT_W  = IN_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);
  localparam int unsigned F  = 8;            // fractional bits of the estimate
  localparam int unsigned AW = IN_W + F + 2;

  logic signed [AW-1:0] dc, err;

  always_comb err = (AW'(din) <<< F) - dc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc   <= '0;
      dout <= '0;
    end else begin
      dc   <= dc + (err >>> K_SHIFT);
      dout <= OUT_W'(err >>> (F - 2));
    end
  end
endmodule
