// tb_complex_spreader: random chip symbols and PN pairs; the output must be
// the complex product (d_I + j d_Q)(p_I + j p_Q) with p = +-1, registered
// only when chip_en is high.
module tb_complex_spreader;
  logic clk = 0, rst_n = 0, chip_en = 0, pn_i, pn_q;
  logic signed [10:0] d_i, d_q;
  logic signed [11:0] s_i, s_q;
  always #5 clk = ~clk;
  complex_spreader #(.W(11)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      int pi, pq, ei, eq;
      logic signed [11:0] hi, hq;
      @(negedge clk);
      d_i = 11'($urandom_range(0, 2046) - 1023);
      d_q = 11'($urandom_range(0, 2046) - 1023);
      pn_i = 1'($urandom); pn_q = 1'($urandom);
      chip_en = ($urandom % 4 != 0);
      pi = pn_i ? -1 : 1; pq = pn_q ? -1 : 1;
      ei = int'(d_i) * pi - int'(d_q) * pq;
      eq = int'(d_i) * pq + int'(d_q) * pi;
      hi = s_i; hq = s_q;
      @(posedge clk); #1;
      checks++;
      if (chip_en ? (int'(s_i) != ei || int'(s_q) != eq) : (s_i != hi || s_q != hq)) begin
        failures++;
        $display("FAIL n=%0d got %0d,%0d exp %0d,%0d", n, s_i, s_q, ei, eq);
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
