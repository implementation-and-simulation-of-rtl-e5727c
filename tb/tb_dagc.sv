// tb_dagc: random QPSK-like samples at a small and at a large amplitude.
// In both cases, after the loop settles, the mean of |I|+|Q| at the output
// must be within 10% of the reference, and the gain must have moved in the
// right direction (up for the weak signal, down for the strong one).
module tb_dagc;
  logic clk = 0, rst_n = 0;
  logic signed [9:0] din_i, din_q;
  logic [7:0] ref_mag;
  logic signed [7:0] dout_i, dout_q;
  logic [15:0] gain;
  always #5 clk = ~clk;
  dagc #(.IN_W(10), .OUT_W(8), .GF(8), .K_SHIFT(6)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(input int amp, input string tag);
    real m;
    m = 0;
    for (int n = 0; n < 12000; n++) begin
      @(negedge clk);
      din_i = 10'(($urandom % 2) ? amp + int'($urandom % 5) : -amp - int'($urandom % 5));
      din_q = 10'(($urandom % 2) ? amp + int'($urandom % 5) : -amp - int'($urandom % 5));
      if (n >= 8000) m += real'((dout_i < 0 ? -dout_i : dout_i) + (dout_q < 0 ? -dout_q : dout_q));
    end
    m = m / 4000.0;
    chk(m > 0.9 * real'(ref_mag) && m < 1.1 * real'(ref_mag), $sformatf("%s: mean magnitude %f", tag, m));
  endtask

  initial begin
    din_i = '0; din_q = '0; ref_mag = 8'd64;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(8, "weak");
    chk(gain > 16'd512, $sformatf("weak: gain rose (%0d)", gain));
    run(400, "strong");
    chk(gain < 16'd64, $sformatf("strong: gain fell (%0d)", gain));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
