// tb_searcher: the searcher against a behavioural model of the correlators.
// The model keeps the hypothesis h (local PN phase relative to the frame,
// 0..63 with SPAN_INIT = 64): slew_hold moves it +1, slew_adv -1. At the
// true phase the correlators return a strong pilot, at one false phase a
// weaker one that passes the detection threshold but not the verification
// threshold, elsewhere small noise. Correlations arrive every 20 clocks and
// timing_busy is raised at random.
// Checked: acquisition exactly at the true phase with hyp_count equal to
// the number of slews; one false alarm from the false phase; four fine_adj
// pulses when the half-chip-early correlator is the stronger one and none
// when the on-time one is; after lose_lock REACQ_SPAN/2 = 8 slew_adv pulses,
// reacq_mode high, and reacquisition at the true phase inside the window;
// with the signal gone, a reacquisition window that runs out clears
// reacq_mode (back to the full search).
module tb_searcher;
  localparam int SPAN = 64, RSPAN = 16;
  logic clk = 0, rst_n = 0, start = 0, corr_valid = 0, lose_lock = 0, timing_busy = 0;
  logic signed [16:0] on_i, on_q, early_i, early_q;
  logic [25:0] thr_low, thr_high, last_energy;
  logic slew_hold, slew_adv, fine_adj, acquired, reacq_mode;
  logic [31:0] hyp_count;
  logic [15:0] false_alarms;
  always #5 clk = ~clk;
  searcher #(.SPAN_INIT(SPAN), .REACQ_SPAN(RSPAN)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  int h = 0, h_true, h_fa, n_fine = 0, n_adv = 0;
  bit early_wins = 0, signal_on = 1;

  always @(posedge clk) if (rst_n) begin
    if (slew_hold) h = (h + 1) % SPAN;
    if (slew_adv) begin h = (h + SPAN - 1) % SPAN; n_adv++; end
    if (fine_adj) n_fine++;
  end

  // correlation source
  initial begin
    forever begin
      int a_on, a_e;
      repeat (19) @(negedge clk);
      a_on = 0; a_e = 0;
      if (signal_on && h == h_true) begin a_on = early_wins ? 6400 : 9000; a_e = early_wins ? 9000 : 6400; end
      else if (signal_on && h == h_fa) begin a_on = 6400; a_e = 3000; end
      on_i = 17'(a_on + int'($urandom_range(0, 600)) - 300);
      on_q = 17'(int'($urandom_range(0, 600)) - 300);
      early_i = 17'(int'($urandom_range(0, 600)) - 300);
      early_q = 17'(-a_e + int'($urandom_range(0, 600)) - 300);
      corr_valid = 1;
      @(negedge clk) corr_valid = 0;
    end
  end
  always @(negedge clk) timing_busy = ($urandom % 8) == 0;

  task automatic wait_acq(input int limit);
    int n;
    n = 0;
    while (!acquired && n < limit) begin @(negedge clk); n++; end
  endtask

  initial begin
    int hc0;
    thr_low = 26'd15000; thr_high = 26'd60000;
    h_true = 12 + int'($urandom % 40);
    h_fa = int'($urandom % (h_true - 11));
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait_acq(200000);
    chk(acquired && h == h_true, $sformatf("acquired %0d at h=%0d, true %0d", acquired, h, h_true));
    chk(hyp_count == 32'(h_true), $sformatf("hyp_count %0d", hyp_count));
    chk(false_alarms == 16'd1, $sformatf("false alarms %0d (false phase %0d)", false_alarms, h_fa));
    chk(n_fine == 0, $sformatf("on-time winner: %0d fine steps", n_fine));
    chk(!reacq_mode, "no reacq mode at first acquisition");
    chk(last_energy > thr_high, "verification energy above threshold");
    // loss of lock: reacquisition in the window, early correlator now wins
    early_wins = 1;
    hc0 = int'(hyp_count);
    repeat (30) @(negedge clk);
    lose_lock = 1;
    @(negedge clk) lose_lock = 0;
    @(negedge clk);
    chk(!acquired && reacq_mode, "reacquisition mode entered");
    wait_acq(200000);
    chk(n_adv == RSPAN / 2, $sformatf("%0d slew_adv pulses", n_adv));
    chk(acquired && h == h_true && int'(hyp_count) - hc0 == RSPAN / 2, $sformatf("reacquired at h=%0d after %0d hypotheses", h, int'(hyp_count) - hc0));
    repeat (20) @(negedge clk);
    chk(n_fine == 4, $sformatf("early winner: %0d fine steps", n_fine));
    // signal lost: window runs out, back to the full search
    signal_on = 0;
    lose_lock = 1;
    @(negedge clk) lose_lock = 0;
    @(negedge clk);
    chk(reacq_mode, "reacquisition mode again");
    begin
      int n;
      n = 0;
      while (reacq_mode && n < 100000) begin @(negedge clk); n++; end
    end
    chk(!reacq_mode && !acquired, "window exhausted, full search resumed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
