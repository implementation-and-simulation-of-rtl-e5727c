// tb_nco_rotator: random samples and angles; the output must be
// r * exp(-j 2 pi angle / 256) computed in floating point (tolerance 1.5 LSB
// plus 1.2% of full scale: the sine table peaks at 127, not 128, and the
// product is truncated), one cycle later, with the sideband delayed alike.
module tb_nco_rotator;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [8:0] in_i, in_q, out_i, out_q;
  logic [17:0] in_sb, out_sb;
  logic [7:0] angle;
  always #5 clk = ~clk;
  nco_rotator #(.W(9), .SB_W(18)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      real a, ei, eq, tol;
      @(negedge clk);
      in_valid = 1;
      in_i = 9'($urandom_range(0, 360) - 180);
      in_q = 9'($urandom_range(0, 360) - 180);
      in_sb = 18'($urandom);
      angle = 8'($urandom);
      a = 2.0 * 3.14159265358979 * real'(angle) / 256.0;
      tol = 1.5 + 0.012 * 256.0;
      ei = real'(in_i) * $cos(a) + real'(in_q) * $sin(a);
      eq = real'(in_q) * $cos(a) - real'(in_i) * $sin(a);
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_sb != in_sb || (real'(out_i) - ei > tol || ei - real'(out_i) > tol) || (real'(out_q) - eq > tol || eq - real'(out_q) > tol)) begin
        failures++;
        if (failures < 10) $display("FAIL angle %0d in %0d,%0d got %0d,%0d exp %f,%f", angle, in_i, in_q, out_i, out_q, ei, eq);
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
