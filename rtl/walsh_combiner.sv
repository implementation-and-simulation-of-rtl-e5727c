// walsh_combiner: QPSK mapping, Walsh covering and summation of the channels.
//
// Each of NCH channels carries one QPSK symbol as two bits (0 = +1, 1 = -1 on
// I and Q). On `chip_en` the symbol of every channel is multiplied by the chip
// of its Walsh row at position `chip_idx`, weighted by its 8-bit gain and all
// channels are added; the complex sum is registered on sum_i/sum_q. Channel
// identification by order-8 Walsh rows and per-channel power weighting
// (pilot:TLM:video = 1:2:1:1 in power) follow the modem specification; the
// Walsh row numbers and gain values come from parameters and ports.
module walsh_combiner #(
  parameter int unsigned NCH = 4,
  parameter int unsigned GW  = 8,
  parameter logic [NCH*3-1:0] ROWS = {3'd3, 3'd2, 3'd1, 3'd0},
  localparam int unsigned OW = GW + $clog2(NCH) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  chip_en,
  input  logic [2:0]            chip_idx,
  input  logic [NCH-1:0]        sym_i,
  input  logic [NCH-1:0]        sym_q,
  input  logic [NCH-1:0][GW-1:0] gain,
  output logic signed [OW-1:0]  sum_i,
  output logic signed [OW-1:0]  sum_q
);
  import cdma_pkg::*;

  logic signed [OW-1:0] acc_i, acc_q;

  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int c = 0; c < NCH; c++) begin
      logic w;
      logic signed [OW-1:0] g;
      w = walsh_bit(ROWS[c*3 +: 3], chip_idx);
      g = OW'(gain[c]);
      acc_i += (sym_i[c] ^ w) ? -g : g;
      acc_q += (sym_q[c] ^ w) ? -g : g;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_i <= '0;
      sum_q <= '0;
    end else if (chip_en) begin
      sum_i <= acc_i;
      sum_q <= acc_q;
    end
  end
endmodule
