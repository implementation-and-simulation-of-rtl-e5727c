// block_interleaver: frame-based block interleaver / deinterleaver.
//
// A frame of ROWS*COLS symbols is written into one bank of a two-bank
// (ping-pong) memory while the previous frame is read out of the other bank.
// The interleaver (DEINT=0) writes in row order and reads in column order;
// the deinterleaver (DEINT=1) writes each symbol at its column-order position
// and reads in row order, undoing the interleaver. The 8 ms frame as the
// interleaving block follows the modem specification; the row/column split
// (64 rows) and the ping-pong organisation are this implementation's choice.
//
// Interface: one operation per `en` cycle carries the symbol index `idx`
// within the frame and the symbol `wr_data`. The same operation reads symbol
// `idx` of the previous frame: `rd_data`, `rd_valid` and `rd_first` appear on
// the next cycle. `rd_valid` is high only if the whole previous frame was
// written in order starting from index 0, so a receiver that locks in the
// middle of a frame emits nothing until a complete frame has been stored.
// ROWS and COLS must be powers of two.
module block_interleaver #(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned COLS  = 128,
  parameter int unsigned W     = 2,
  parameter bit          DEINT = 1'b0,
  localparam int unsigned N    = ROWS * COLS,
  localparam int unsigned AW   = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [AW-1:0] idx,
  input  logic [W-1:0]  wr_data,
  output logic [W-1:0]  rd_data,
  output logic          rd_valid,
  output logic          rd_first
);
  localparam int unsigned RB = $clog2(ROWS);

  logic [W-1:0]  mem [2*N];
  logic          wbank, rbank;
  logic          wbank_eff, rbank_eff;
  logic [AW-1:0] perm_idx, waddr, raddr, nxt;
  logic          seq_ok, seq_ok_now, full_flag;

  // Column-order position: row = idx mod ROWS, column = idx / ROWS.
  always_comb begin
    perm_idx = AW'((32'(idx) % ROWS) * COLS + (32'(idx) >> RB));
    waddr = DEINT ? perm_idx : idx;
    raddr = DEINT ? idx : perm_idx;
    wbank_eff = (idx == '0) ? ~wbank : wbank;
    rbank_eff = (idx == '0) ? ~rbank : rbank;
    seq_ok_now = (idx == '0) ? 1'b1 : (seq_ok && idx == nxt);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      mem[{wbank_eff, waddr}] <= wr_data;
      rd_data <= mem[{rbank_eff, raddr}];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      rbank     <= 1'b1;
      seq_ok    <= 1'b0;
      nxt       <= '0;
      full_flag <= 1'b0;
      rd_valid  <= 1'b0;
      rd_first  <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      rd_first <= 1'b0;
      if (en) begin
        wbank    <= wbank_eff;
        rbank    <= rbank_eff;
        seq_ok   <= seq_ok_now;
        nxt      <= idx + 1'b1;
        rd_valid <= full_flag;
        rd_first <= full_flag && (idx == '0);
        if (idx == AW'(N - 1)) full_flag <= seq_ok_now;
      end
    end
  end
endmodule
