// complex_spreader: complex multiplication of the chip symbol by the PN pair.
//
// s_I + j s_Q = (d_I + j d_Q)(p_I + j p_Q) with p_I, p_Q = +-1, as in the
// modem specification; it rotates the constellation by the PN phase instead
// of spreading I and Q separately. PN chips arrive as bits (0 = +1). The
// result is registered when `chip_en` is high; the output is one bit wider
// than the input.
module complex_spreader #(
  parameter int unsigned W = 11
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                chip_en,
  input  logic signed [W-1:0] d_i,
  input  logic signed [W-1:0] d_q,
  input  logic                pn_i,
  input  logic                pn_q,
  output logic signed [W:0]   s_i,
  output logic signed [W:0]   s_q
);
  logic signed [W:0] di, dq, ipi, qpq, ipq, qpi;

  always_comb begin
    di  = (W+1)'(d_i);
    dq  = (W+1)'(d_q);
    ipi = pn_i ? -di : di;
    qpq = pn_q ? -dq : dq;
    ipq = pn_q ? -di : di;
    qpi = pn_i ? -dq : dq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_i <= '0;
      s_q <= '0;
    end else if (chip_en) begin
      s_i <= ipi - qpq;
      s_q <= ipq + qpi;
    end
  end
endmodule
