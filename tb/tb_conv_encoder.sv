// tb_conv_encoder: checks the K=7, R=1/2 encoder: its impulse response must
// spell the generators 171 and 133 (octal) read from the newest bit, and a
// random bit stream with gaps in in_valid must match a reference encoder
// written here as a 7-bit window.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0, out_valid, c0, c1;
  always #5 clk = ~clk;
  conv_encoder dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  bit win [7];
  initial begin
    // impulse response, 171 = 1111001 and 133 = 1011011
    bit g0 [7] = '{1,1,1,1,0,0,1};
    bit g1 [7] = '{1,0,1,1,0,1,1};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 7; n++) begin
      @(negedge clk); in_valid = 1; in_bit = (n == 0);
      @(posedge clk); #1;
      chk(out_valid && c0 == g0[n] && c1 == g1[n], $sformatf("impulse %0d: %b%b", n, c0, c1));
    end
    @(negedge clk) in_valid = 0;
    // random stream
    for (int k = 0; k < 7; k++) win[k] = 0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      bit b, e0, e1;
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      b = 1'($urandom);
      in_bit = b;
      @(posedge clk); #1;
      chk(out_valid == in_valid, "valid");
      if (in_valid) begin
        for (int k = 6; k > 0; k--) win[k] = win[k-1];
        win[0] = b;                     // win[k] = bit k steps ago
        e0 = win[0]^win[1]^win[2]^win[3]^win[6];
        e1 = win[0]^win[2]^win[3]^win[5]^win[6];
        chk(c0 == e0 && c1 == e1, $sformatf("random bit %0d", n));
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
