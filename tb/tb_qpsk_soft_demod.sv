// tb_qpsk_soft_demod: random symbols; each soft value must be the sign
// (1 for negative) followed by |x| >> 8 limited to 3, and the index must
// travel with the symbol one cycle later.
module tb_qpsk_soft_demod;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [15:0] in_i, in_q;
  logic [12:0] in_idx, out_idx;
  logic [2:0] soft_i, soft_q;
  always #5 clk = ~clk;
  qpsk_soft_demod #(.W(16), .MSH(8), .IW(13)) dut (.*);

  int checks = 0, failures = 0;
  function automatic logic [2:0] ref_soft(input int x);
    int m;
    m = (x < 0 ? -x : x) / 256;
    if (m > 3) m = 3;
    return {x < 0, 2'(m)};
  endfunction
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_i = 16'($urandom_range(0, 2400) - 1200);
      in_q = 16'($urandom_range(0, 2400) - 1200);
      in_idx = 13'($urandom);
      @(posedge clk); #1;
      checks++;
      if (!out_valid || soft_i != ref_soft(int'(in_i)) || soft_q != ref_soft(int'(in_q)) || out_idx != in_idx) begin
        failures++;
        if (failures < 10) $display("FAIL %0d,%0d -> %b %b", in_i, in_q, soft_i, soft_q);
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
