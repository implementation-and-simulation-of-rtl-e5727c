// nco_rotator: NCO read-out and complex derotation of chip samples.
//
// The NCO of the AFC is a ROM of complex values indexed by angle: here 256
// angles per turn, read from a quarter-wave sine table (cdma_pkg::SIN_QTR,
// amplitude 127). Each valid input sample r is multiplied by exp(-j*angle):
//   y_I = (r_I cos + r_Q sin) / 128,  y_Q = (r_Q cos - r_I sin) / 128.
// A ROM of complex values read at multiples of the loop filter output follows
// the modem specification; table size and widths are this implementation's
// choice. One register stage: out_valid follows in_valid by one cycle, and
// SB_W sideband bits travel along with the sample.
module nco_rotator #(
  parameter int unsigned W    = 9,
  parameter int unsigned SB_W = 18
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  input  logic [SB_W-1:0]     in_sb,
  input  logic [7:0]          angle,
  output logic                out_valid,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q,
  output logic [SB_W-1:0]     out_sb
);
  import cdma_pkg::*;

  localparam int unsigned PW = W + 9;
  localparam logic signed [PW-1:0] MAXV = PW'((1 << (W - 1)) - 1);

  logic signed [7:0]    c, s;
  logic signed [PW-1:0] yi, yq;

  function automatic logic signed [W-1:0] sat(input logic signed [PW-1:0] v);
    if (v > MAXV)       return W'(MAXV);
    else if (v < -MAXV) return W'(-MAXV);
    else                return W'(v);
  endfunction

  always_comb begin
    c  = cos256(angle);
    s  = sin256(angle);
    yi = (PW'(in_i) * PW'(c) + PW'(in_q) * PW'(s) + PW'(64)) >>> 7;
    yq = (PW'(in_q) * PW'(c) - PW'(in_i) * PW'(s) + PW'(64)) >>> 7;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      out_sb    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i  <= sat(yi);
        out_q  <= sat(yq);
        out_sb <= in_sb;
      end
    end
  end
endmodule
