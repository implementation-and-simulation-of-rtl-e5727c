// tb_rx_timing: random samples into the decimator (W = 8, 256-chip frame).
//  * Every chip output (on, early, late) is checked exactly against the
//    input history: delay k in eighths of a chip is sample k/2 back (doubled)
//    or the sum of samples (k-1)/2 and (k+1)/2 back, with on-time k = d,
//    early k = d + 4, late k = d - 4, d taken from `phase` before the strobe.
//  * Chip strobes come every 4 clocks, or 6 / 2 clocks after a 1/8-chip
//    step that wraps d (later at d = 4, earlier at d = 11).
//  * fine_adj moves d by one in the asked direction.
//  * chip_idx advances by 1 per chip, by 0 after a slew_hold and by 2 after a
//    slew_adv; the PN chips equal the I/Q m-sequences at that chip position.
module tb_rx_timing;
  localparam int FC = 256;
  logic clk = 0, rst_n = 0;
  logic signed [7:0] din_i, din_q;
  logic fine_adj = 0, fine_late = 0, slew_hold = 0, slew_adv = 0;
  logic busy, chip_en, pn_i, pn_q;
  logic signed [8:0] on_i, on_q, early_i, early_q, late_i, late_q;
  logic [7:0] chip_idx;
  logic [3:0] phase;
  always #5 clk = ~clk;
  rx_timing #(.W(8), .FRAME_CHIPS(FC)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 12) $display("FAIL %s", msg); end
  endtask

  // reference m-sequences for one frame
  bit ref_i [FC], ref_q [FC];
  initial begin
    logic [16:0] a, b;
    a = 17'h1; b = 17'h1;
    for (int n = 0; n < FC; n++) begin
      ref_i[n] = a[0]; ref_q[n] = b[0];
      a = {a[3] ^ a[0], a[16:1]};
      b = {b[3] ^ b[2] ^ b[1] ^ b[0], b[16:1]};
    end
  end

  // input history: hist[c] is the sample taken at rising edge c
  int hist_i [100000], hist_q [100000];
  int cyc = 0;
  logic [3:0] d_before;
  int last_strobe = -1, expect_period = 4;
  int last_idx = -1, expect_step = 1;
  int n_hold = 0, n_adv = 0, n_adj = 0, n_p6 = 0, n_p2 = 0, nchips = 0;

  function automatic int tapv(input int h[100000], input int c, input int k);
    // value of delay k (1/8 chip) as seen by the strobe at edge c
    if (k % 2 == 0) return 2 * h[c - 1 - k / 2];
    return h[c - 1 - k / 2] + h[c - 2 - k / 2];
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    hist_i[cyc] = int'(din_i);
    hist_q[cyc] = int'(din_q);
  end

  // Checker, runs just after each edge.
  always @(posedge clk) if (rst_n) begin
    #2;
    if (chip_en && cyc > 12) begin
      nchips++;
      chk(int'(on_i) == tapv(hist_i, cyc, d_before) && int'(on_q) == tapv(hist_q, cyc, d_before),
          $sformatf("on-time value at edge %0d d=%0d: %0d vs %0d", cyc, d_before, on_i, tapv(hist_i, cyc, d_before)));
      chk(int'(early_i) == tapv(hist_i, cyc, d_before + 4) && int'(late_q) == tapv(hist_q, cyc, d_before - 4),
          $sformatf("early/late value at edge %0d", cyc));
      if (last_strobe >= 0)
        chk(cyc - last_strobe == expect_period, $sformatf("chip period %0d expected %0d", cyc - last_strobe, expect_period));
      if (last_idx >= 0)
        chk(int'(chip_idx) == (last_idx + expect_step) % FC, $sformatf("chip_idx %0d after %0d step %0d", chip_idx, last_idx, expect_step));
      chk(pn_i == ref_i[chip_idx] && pn_q == ref_q[chip_idx], $sformatf("pn at chip %0d", chip_idx));
      last_strobe = cyc;
      last_idx = int'(chip_idx);
      // request() sets these for the next chip after the strobe that
      // takes a change
      expect_period = 4;
      expect_step = 1;
    end
    d_before = phase;
    din_i <= 8'($urandom);
    din_q <= 8'($urandom);
  end

  // Request a timing change and work out its expected effect at the strobe
  // that takes it.
  task automatic request(input int kind);
    logic [3:0] d0;
    while (busy) @(negedge clk);
    // pulse right after a strobe (periods are at least 2 clocks), so the
    // request is taken at the next strobe
    while (!chip_en) @(negedge clk);
    d0 = phase;
    case (kind)
      0, 1: begin fine_adj = 1; fine_late = (kind == 1); end
      2: slew_hold = 1;
      default: slew_adv = 1;
    endcase
    @(negedge clk);
    fine_adj = 0; slew_hold = 0; slew_adv = 0;
    // wait for the strobe that takes it
    while (!chip_en) @(negedge clk);
    case (kind)
      0: begin
        n_adj++;
        if (d0 == 4'd11) begin expect_period = 2; n_p2++; end
        chk(phase == ((d0 == 4'd11) ? 4'd8 : d0 + 4'd1), $sformatf("earlier step from d=%0d gives %0d", d0, phase));
      end
      1: begin
        n_adj++;
        if (d0 == 4'd4) begin expect_period = 6; n_p6++; end
        chk(phase == ((d0 == 4'd4) ? 4'd7 : d0 - 4'd1), $sformatf("later step from d=%0d gives %0d", d0, phase));
      end
      2: begin n_hold++; expect_step = 0; end
      default: begin n_adv++; expect_step = 2; end
    endcase
  endtask

  initial begin
    din_i = '0; din_q = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (400) @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      request($urandom % 4);
      repeat ($urandom % 12) @(negedge clk);
    end
    // push d through both wrap points on purpose
    for (int n = 0; n < 10; n++) request(1);
    for (int n = 0; n < 10; n++) request(0);
    repeat (20) @(negedge clk);
    chk(n_p2 > 0 && n_p6 > 0 && n_hold > 0 && n_adv > 0, $sformatf("all mechanisms seen p2=%0d p6=%0d hold=%0d adv=%0d", n_p2, n_p6, n_hold, n_adv));
    chk(nchips > 400, "chips produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
