// tb_srrc_fir: checks the 48-tap SRRC filter.
//  * Impulse response: an input impulse of 256 with SHIFT = 8 must return
//    the taps, compared with h(t) of a square-root raised cosine (rolloff
//    0.35, t = (n - 23.5)/4 chips) computed here in floating point and
//    scaled to 256 at the centre taps (tolerance 1).
//  * Linearity/delay: random input against a convolution with those taps.
//  * Saturation at the output word.
module tb_srrc_fir;
  logic clk = 0, rst_n = 0;
  logic signed [11:0] din;
  logic signed [11:0] dout;
  always #5 clk = ~clk;
  srrc_fir #(.IN_W(12), .OUT_W(12), .SHIFT(8)) dut (.*);

  int checks = 0, failures = 0;
  real hr [48];
  int hq [48];
  localparam real PI = 3.14159265358979;

  function automatic real srrc(input real t);
    real b;
    b = 0.35;
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    return ($sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b))) /
           (PI * t * (1.0 - (4.0 * b * t) ** 2));
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int n = 0; n < 48; n++) hr[n] = srrc((real'(n) - 23.5) / 4.0);
    for (int n = 0; n < 48; n++) hq[n] = int'($floor(hr[n] / hr[23] * 256.0 + 0.5));
    din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // impulse
    @(negedge clk) din = 12'sd256;
    @(negedge clk) din = '0;
    for (int n = 0; n < 48; n++) begin
      @(negedge clk);
      chk((int'(dout) - hq[n]) <= 1 && (hq[n] - int'(dout)) <= 1, $sformatf("tap %0d: %0d vs %0d", n, dout, hq[n]));
    end
    @(negedge clk);
    chk(dout == 0, "impulse response ends after 48 taps");
    // random input against convolution (with the filter's own rounding)
    begin
      int hist [48];
      for (int k = 0; k < 48; k++) hist[k] = 0;
      for (int n = 0; n < 400; n++) begin
        longint acc;
        int e;
        @(negedge clk);
        // output now reflects inputs up to two cycles ago
        acc = 0;
        for (int k = 0; k < 48; k++) acc += longint'(hist[k]) * longint'(hq[k]);
        e = int'((acc + 128) >>> 8);
        if (e > 2047) e = 2047;
        if (e < -2048) e = -2048;
        if (n > 50) chk(int'(dout) - e <= 12 && e - int'(dout) <= 12, $sformatf("conv %0d: %0d vs %0d", n, dout, e));
        for (int k = 47; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(din);
        din = 12'($urandom_range(0, 400) - 200);
      end
    end
    // saturation
    @(negedge clk) din = 12'sd2047;
    repeat (60) @(negedge clk);
    chk(dout == 12'sd2047, $sformatf("positive saturation %0d", dout));
    din = -12'sd2048;
    repeat (60) @(negedge clk);
    chk(dout == -12'sd2048, $sformatf("negative saturation %0d", dout));
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
