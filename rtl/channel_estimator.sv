// channel_estimator: moving-average channel phase estimate and compensation.
//
// The last N frequency-corrected pilot symbols (8 chips each) are summed in a
// tapped delay line; the sum h is the moving-average channel estimate, up to
// the known pilot phase (1+j). A data symbol d is compensated with the
// estimate taken about the middle of that line: data symbols are delayed by
// DATA_DELAY symbols (N/2 pilot periods) and then multiplied as
//   y = d * conj(h) * (1+j)
// which removes the channel phase (and scales by the channel power). Only
// the phase is corrected: the DAGC already holds the amplitude. The data
// symbol index within the frame travels with the symbol. The moving average,
// the conjugate and the compensation at the middle of the line follow the
// modem specification; N = 8, the widths and the output scaling (>>> OSH)
// are this implementation's choices. Latency: one cycle after the data
// symbol that pushes the compensated one out of the delay line.
module channel_estimator #(
  parameter int unsigned SW         = 13,
  parameter int unsigned N          = 8,
  parameter int unsigned DATA_DELAY = 4,
  parameter int unsigned IW         = 13,
  parameter int unsigned OSH        = 12,
  parameter int unsigned OW         = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pilot_valid,
  input  logic signed [SW-1:0] pilot_i,
  input  logic signed [SW-1:0] pilot_q,
  input  logic                 data_valid,
  input  logic signed [SW-1:0] data_i,
  input  logic signed [SW-1:0] data_q,
  input  logic [IW-1:0]        data_idx,
  output logic                 out_valid,
  output logic signed [OW-1:0] out_i,
  output logic signed [OW-1:0] out_q,
  output logic [IW-1:0]        out_idx,
  output logic signed [SW+$clog2(N)-1:0] h_i,
  output logic signed [SW+$clog2(N)-1:0] h_q
);
  localparam int unsigned HW = SW + $clog2(N);
  localparam int unsigned PW = SW + HW + 3;
  localparam logic signed [PW-1:0] MAXV = PW'((1 << (OW - 1)) - 1);

  logic signed [SW-1:0] pl_i [N];
  logic signed [SW-1:0] pl_q [N];
  logic signed [SW-1:0] dl_i [DATA_DELAY];
  logic signed [SW-1:0] dl_q [DATA_DELAY];
  logic [IW-1:0]        dl_x [DATA_DELAY];
  logic [$clog2(DATA_DELAY+1)-1:0] fill;
  logic signed [PW-1:0] mi, mq, yi, yq;

  function automatic logic signed [OW-1:0] sat(input logic signed [PW-1:0] v);
    if (v > MAXV)       return OW'(MAXV);
    else if (v < -MAXV) return OW'(-MAXV);
    else                return OW'(v);
  endfunction

  always_comb begin
    h_i = '0;
    h_q = '0;
    for (int k = 0; k < N; k++) begin
      h_i += HW'(pl_i[k]);
      h_q += HW'(pl_q[k]);
    end
    // m = d_old * conj(h)
    mi = PW'(dl_i[DATA_DELAY-1]) * PW'(h_i) + PW'(dl_q[DATA_DELAY-1]) * PW'(h_q);
    mq = PW'(dl_q[DATA_DELAY-1]) * PW'(h_i) - PW'(dl_i[DATA_DELAY-1]) * PW'(h_q);
    // times (1 + j)
    yi = (mi - mq) >>> OSH;
    yq = (mi + mq) >>> OSH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        pl_i[k] <= '0;
        pl_q[k] <= '0;
      end
      for (int k = 0; k < DATA_DELAY; k++) begin
        dl_i[k] <= '0;
        dl_q[k] <= '0;
        dl_x[k] <= '0;
      end
      fill      <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
      out_idx   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (pilot_valid) begin
        pl_i[0] <= pilot_i;
        pl_q[0] <= pilot_q;
        for (int k = 1; k < N; k++) begin
          pl_i[k] <= pl_i[k-1];
          pl_q[k] <= pl_q[k-1];
        end
      end
      if (data_valid) begin
        dl_i[0] <= data_i;
        dl_q[0] <= data_q;
        dl_x[0] <= data_idx;
        for (int k = 1; k < DATA_DELAY; k++) begin
          dl_i[k] <= dl_i[k-1];
          dl_q[k] <= dl_q[k-1];
          dl_x[k] <= dl_x[k-1];
        end
        if (fill != ($clog2(DATA_DELAY+1))'(DATA_DELAY)) fill <= fill + 1'b1;
        out_valid <= (fill == ($clog2(DATA_DELAY+1))'(DATA_DELAY));
        out_i     <= sat(yi);
        out_q     <= sat(yq);
        out_idx   <= dl_x[DATA_DELAY-1];
      end
    end
  end
endmodule
