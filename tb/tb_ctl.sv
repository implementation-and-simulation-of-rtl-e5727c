// tb_ctl: the code tracking loop closed around a behavioural correlator
// model. The model holds the timing error tau (local minus received timing,
// in chips); pilot correlations are A * R(x) with the triangular PN
// autocorrelation R(x) = max(0, 1 - |x|) at x = tau (on-time), tau - 0.5
// (early) and tau + 0.5 (late), with a random carrier phase and noise.
// fine_adj moves tau by 1/8 chip in the asked direction; the received timing
// drifts by 1/8 chip every 50 updates (a clock frequency error).
// Checked: from tau = 3/8 the loop pulls in and then holds |tau| <= 1/4 over
// the second half of the run despite the drift; the integral path has
// learned the drift sign; lock is reported; removing the signal raises
// lose_lock and clears locked; enable low clears the loop.
module tb_ctl;
  logic clk = 0, rst_n = 0, enable = 0, corr_valid = 0;
  logic signed [16:0] on_i, on_q, early_i, early_q, late_i, late_q;
  logic [25:0] lock_thr;
  logic fine_adj, fine_late, locked, lose_lock;
  logic signed [23:0] integ;
  logic [15:0] adj_count;
  always #5 clk = ~clk;
  ctl #(.E_W(26)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  real tau = 0.375;
  real amp = 8000.0;
  int n_lose = 0;
  always @(posedge clk) begin
    if (fine_adj) tau += fine_late ? 0.125 : -0.125;
    if (lose_lock) n_lose++;
  end

  function automatic real tri_ac(input real x);
    real a;
    a = x < 0 ? -x : x;
    return a >= 1.0 ? 0.0 : 1.0 - a;
  endfunction

  task automatic update(input int n);
    real c, s, ph;
    ph = real'($urandom % 628) / 100.0;
    c = $cos(ph); s = $sin(ph);
    @(negedge clk);
    // tau > 0: local late, the early correlator sits on the peak
    on_i    = 17'(int'(amp * tri_ac(tau) * c)       + int'($urandom_range(0, 200)) - 100);
    on_q    = 17'(int'(amp * tri_ac(tau) * s)       + int'($urandom_range(0, 200)) - 100);
    early_i = 17'(int'(amp * tri_ac(tau - 0.5) * c) + int'($urandom_range(0, 200)) - 100);
    early_q = 17'(int'(amp * tri_ac(tau - 0.5) * s) + int'($urandom_range(0, 200)) - 100);
    late_i  = 17'(int'(amp * tri_ac(tau + 0.5) * c) + int'($urandom_range(0, 200)) - 100);
    late_q  = 17'(int'(amp * tri_ac(tau + 0.5) * s) + int'($urandom_range(0, 200)) - 100);
    corr_valid = 1;
    @(negedge clk) corr_valid = 0;
    repeat (4) @(negedge clk);
    if (n % 50 == 49) tau -= 0.125;   // received timing drifts later
  endtask

  initial begin
    real worst;
    lock_thr = 26'd5000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) enable = 1;
    worst = 0;
    for (int n = 0; n < 3000; n++) begin
      update(n);
      if (n >= 1500 && (tau > worst || -tau > worst)) worst = tau < 0 ? -tau : tau;
    end
    chk(worst <= 0.25, $sformatf("tracking error up to %f chip", worst));
    chk(adj_count > 16'd50, $sformatf("%0d timing adjustments", adj_count));
    // one later step per 50 updates needs 2^16 / 50 = 1311 in the integral
    chk(integ > 24'sd900 && integ < 24'sd1800, $sformatf("integral path learned the drift (%0d)", integ));
    chk(locked && n_lose == 0, $sformatf("locked %0d, lose_lock %0d", locked, n_lose));
    amp = 0.0;
    for (int n = 0; n < 80; n++) update(n);
    chk(n_lose > 0 && !locked, "signal gone: lose_lock raised");
    @(negedge clk) enable = 0;
    @(negedge clk);
    chk(integ == 0, "enable low clears the loop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
