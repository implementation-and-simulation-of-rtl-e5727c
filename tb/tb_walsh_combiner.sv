// tb_walsh_combiner: random symbols, gains and chip positions; the registered
// sums must equal sum_c gain_c * walsh_c(chip) * (+-1) on I and on Q, with
// Walsh chips from a Hadamard matrix built here, and must hold while
// chip_en is low.
module tb_walsh_combiner;
  logic clk = 0, rst_n = 0, chip_en = 0;
  logic [2:0] chip_idx;
  logic [3:0] sym_i, sym_q;
  logic [3:0][7:0] gain;
  logic signed [10:0] sum_i, sum_q;
  always #5 clk = ~clk;
  walsh_combiner #(.NCH(4), .GW(8), .ROWS({3'd7, 3'd5, 3'd1, 3'd0})) dut (.*);

  int checks = 0, failures = 0;
  int h [8][8];
  int rows [4] = '{0, 1, 5, 7};

  initial begin
    h[0][0] = 1;
    for (int n = 1; n < 8; n *= 2)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c+n] = h[r][c]; h[r+n][c] = h[r][c]; h[r+n][c+n] = -h[r][c];
        end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int ei, eq;
      logic signed [10:0] hi, hq;
      @(negedge clk);
      chip_idx = 3'($urandom); sym_i = 4'($urandom); sym_q = 4'($urandom);
      for (int c = 0; c < 4; c++) gain[c] = 8'($urandom);
      chip_en = ($urandom % 3 != 0);
      hi = sum_i; hq = sum_q;
      ei = 0; eq = 0;
      for (int c = 0; c < 4; c++) begin
        ei += int'(gain[c]) * h[rows[c]][chip_idx] * (sym_i[c] ? -1 : 1);
        eq += int'(gain[c]) * h[rows[c]][chip_idx] * (sym_q[c] ? -1 : 1);
      end
      @(posedge clk); #1;
      checks++;
      if (chip_en ? (sum_i != 11'(ei) || sum_q != 11'(eq)) : (sum_i != hi || sum_q != hq)) begin
        failures++;
        $display("FAIL n=%0d en=%0d got %0d,%0d exp %0d,%0d", n, chip_en, sum_i, sum_q, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
