// tb_dc_remover: a +-8 random signal riding on a DC offset of +10 LSB.
// Right after reset the offset is still in the output; after convergence
// (about 2^K_SHIFT samples for K = 2^-5, checked within 400 samples) the
// output mean over 2000 samples must be within 0.25 LSB of zero while the
// signal itself is preserved. Then the offset jumps to -7 and must be
// removed again.
module tb_dc_remover;
  logic clk = 0, rst_n = 0;
  logic signed [5:0] din;
  logic signed [7:0] dout;
  always #5 clk = ~clk;
  dc_remover #(.IN_W(6), .K_SHIFT(5)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(input int dc, input string tag);
    real sum, pw;
    int first, zc;
    sum = 0; pw = 0;
    // early output still carries most of the offset (x4 for the 2 fraction bits)
    @(negedge clk) din = 6'(dc);
    @(negedge clk) din = 6'(dc);
    @(negedge clk);
    first = int'(dout);
    chk((dc > 0) ? first > 2 * dc : first < 2 * dc, $sformatf("%s: offset visible at first (%0d)", tag, first));
    zc = -1;
    for (int n = 0; n < 3000; n++) begin
      int s;
      s = $urandom_range(0, 16) - 8;
      @(negedge clk) din = 6'(dc + s);
      if (zc < 0 && ((dc > 0) ? dout <= 0 : dout >= 0)) zc = n;
      if (n >= 1000) begin sum += real'(dout) / 4.0; pw += (real'(dout) / 4.0) ** 2; end
    end
    chk(zc >= 0 && zc < 400, $sformatf("%s: converged after %0d samples", tag, zc));
    chk(sum / 2000.0 < 0.25 && sum / 2000.0 > -0.25, $sformatf("%s: residual mean %f", tag, sum / 2000.0));
    chk(pw / 2000.0 > 20.0, $sformatf("%s: signal power kept %f", tag, pw / 2000.0));
  endtask

  initial begin
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(10, "dc +10");
    run(-7, "dc -7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
