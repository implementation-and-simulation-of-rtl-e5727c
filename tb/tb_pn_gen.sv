// tb_pn_gen: checks the order-17 PN generators against the recurrences of
// their polynomials, the hold behaviour of `step`, the period of the I
// sequence (2^17 - 1, a maximal-length sequence) and the frame `restart`.
module tb_pn_gen;
  logic clk = 0, rst_n = 0, step = 0, restart = 0, pn_i, pn_q;
  always #5 clk = ~clk;
  pn_gen dut (.*);

  int checks = 0, failures = 0;
  bit ai [0:2047];
  bit aq [0:2047];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    // reference: a[n+17] = a[n+3] ^ a[n] (I), a[n+3]^a[n+2]^a[n+1]^a[n] (Q); seed 1 -> a0 = 1
    for (int n = 0; n < 17; n++) begin ai[n] = (n == 0); aq[n] = (n == 0); end
    for (int n = 0; n + 17 < 2048; n++) begin
      ai[n+17] = ai[n+3] ^ ai[n];
      aq[n+17] = aq[n+3] ^ aq[n+2] ^ aq[n+1] ^ aq[n];
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      chk(pn_i == ai[n] && pn_q == aq[n], $sformatf("chip %0d", n));
      step = (n % 3 != 2);            // also test holding
      if (!step) begin
        @(negedge clk);
        chk(pn_i == ai[n] && pn_q == aq[n], $sformatf("hold at chip %0d", n));
        step = 1;
      end
      @(posedge clk); #1 step = 0;
    end
    // restart returns to chip 0
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    chk(pn_i == ai[0] && pn_q == aq[0], "restart");
    // period of the I sequence: the register state repeats after 2^17-1 steps only
    begin
      logic [16:0] s0;
      int per;
      s0 = dut.sr_i;
      per = 0;
      step = 1;
      do begin @(posedge clk); #1; per++; end while (dut.sr_i != s0 && per < 140000);
      step = 0;
      chk(per == 131071, $sformatf("I period %0d", per));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
