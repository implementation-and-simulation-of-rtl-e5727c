// qpsk_soft_demod: QPSK demodulation into 3-bit soft decisions.
//
// The phase-compensated symbol is split into its I and Q parts, each turned
// into a 3-bit soft decision for the external Viterbi decoder (3-bit soft
// decision input, as in the modem specification): bit 2 is the hard decision
// (0 for a positive value, the transmitter's bit convention), bits 1:0 the
// confidence, |x| >> MSH saturated to 3. The sign-magnitude format and the
// scaling are this implementation's choices. One register stage.
module qpsk_soft_demod #(
  parameter int unsigned W   = 16,
  parameter int unsigned MSH = 10,
  parameter int unsigned IW  = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  input  logic [IW-1:0]       in_idx,
  output logic                out_valid,
  output logic [2:0]          soft_i,
  output logic [2:0]          soft_q,
  output logic [IW-1:0]       out_idx
);
  function automatic logic [2:0] to_soft(input logic signed [W-1:0] x);
    logic [W-1:0] m;
    m = x[W-1] ? W'(-x) : W'(x);
    m = m >> MSH;
    return {x[W-1], (m > W'(3)) ? 2'd3 : m[1:0]};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      soft_i    <= '0;
      soft_q    <= '0;
      out_idx   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        soft_i  <= to_soft(in_i);
        soft_q  <= to_soft(in_q);
        out_idx <= in_idx;
      end
    end
  end
endmodule
