// tb_cdma_modem_full: the end-to-end test of tb_cdma_modem_top run on the
// modem at its full size (65536-chip frames, 64x128 and 64x64 interleavers,
// 1024-chip reacquisition window): transmitter looped back into the receiver
// through a behavioural channel.
//
// The channel (in this testbench) delays the 12-bit transmit samples, adds a
// DC offset, applies a carrier frequency offset by rotating the samples, and
// scales them to the 6-bit A/D range. The test then checks that the receiver
// acquires the PN phase, that the CTL and AFC lock, and that every
// deinterleaved frame carries the coded bits the transmitter sent (hard
// decisions, at most 2% of a frame's symbols wrong: these are raw channel
// symbols ahead of the Viterbi decoder, while a misaligned frame shows about 75%),
// comparing with an independent encoder model. Midway the link is
// cut to force loss of lock and reacquisition. Each mechanism is counted and
// one that never happened counts as a failure.
module tb_cdma_modem_full;
  localparam int unsigned FRAME_CHIPS = 65536;
  localparam int unsigned CW = $clog2(FRAME_CHIPS);
  localparam int unsigned DELAY = 37;          // channel delay, samples
  localparam real FOFF_HZ = 8000.0;            // carrier offset
  localparam real FS = 32.768e6;

  logic clk = 0, rst_n = 0;
  always #15.2587890625 clk = ~clk;

  logic [3:0][7:0] tx_gain;
  logic tlm_req, tlm_bit, v1_req, v1_bit, v2_req, v2_bit, tx_frame_start;
  logic signed [11:0] dac_i, dac_q;
  logic signed [5:0] adc_i, adc_q;
  logic search_start;
  logic [7:0] agc_ref;
  logic [25:0] thr_low, thr_high, lock_thr;
  logic [5:0] tlm_soft, v1_soft, v2_soft;
  logic tlm_valid, tlm_first, v1_valid, v1_first, v2_valid, v2_first;
  logic acquired, reacq_mode, ctl_locked, afc_locked, lose_lock;
  logic [31:0] hyp_count;
  logic [15:0] false_alarms, ctl_adj_count, agc_gain;
  logic signed [31:0] afc_freq;
  logic [CW-1:0] local_chip;

  cdma_modem_top dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- sources: one PRBS per channel ----------------
  logic [22:0] prbs [3];
  initial begin
    for (int c = 0; c < 3; c++) prbs[c] = 23'($urandom) | 23'd1;   // random non-zero seeds
  end
  assign tlm_bit = prbs[0][0];
  assign v1_bit  = prbs[1][0];
  assign v2_bit  = prbs[2][0];

  // reference encoder model and per-frame store of coded symbols
  localparam int unsigned TN = FRAME_CHIPS / 16, VN = FRAME_CHIPS / 8;
  logic [5:0] enc_st [3];
  logic [1:0] store [3][8][VN];
  int txframe = -1;
  int symk [3];
  // returns {next state, c1, c0}; generators 171 and 133 octal, newest bit in the MSB
  function automatic logic [7:0] enc(input logic [5:0] st, input logic b);
    logic [6:0] w;
    w = {b, st};
    return {w[6:1], ^(w & 7'o133), ^(w & 7'o171)};
  endfunction
  task automatic encode(input int c, input logic b);
    logic [7:0] r;
    r = enc(enc_st[c], b);
    enc_st[c] = r[7:2];
    store[c][(txframe+8)%8][symk[c]] = r[1:0];
    symk[c]++;
  endtask
  initial begin
    for (int c = 0; c < 3; c++) begin enc_st[c] = '0; symk[c] = 0; end
  end
  always @(posedge clk) if (rst_n) begin
    if (tx_frame_start) begin
      txframe++;
      for (int c = 0; c < 3; c++) symk[c] = 0;
    end
    if (tlm_req) begin
      encode(0, tlm_bit);
      prbs[0] <= {prbs[0][0] ^ prbs[0][5], prbs[0][22:1]};
    end
    if (v1_req) begin
      encode(1, v1_bit);
      prbs[1] <= {prbs[1][0] ^ prbs[1][5], prbs[1][22:1]};
    end
    if (v2_req) begin
      encode(2, v2_bit);
      prbs[2] <= {prbs[2][0] ^ prbs[2][5], prbs[2][22:1]};
    end
  end

  // ---------------- channel ----------------
  real ph = 0.0;
  logic signed [11:0] dl_i [DELAY], dl_q [DELAY];
  bit link_cut = 0;
  int adc_scale_sh = 5;
  always @(posedge clk) begin
    real xi, xq, yi, yq;
    int ai, aq;
    for (int k = DELAY-1; k > 0; k--) begin dl_i[k] <= dl_i[k-1]; dl_q[k] <= dl_q[k-1]; end
    dl_i[0] <= dac_i; dl_q[0] <= dac_q;
    xi = real'(dl_i[DELAY-1]); xq = real'(dl_q[DELAY-1]);
    ph = ph + 2.0 * 3.14159265358979 * FOFF_HZ / FS;
    yi = xi * $cos(ph) - xq * $sin(ph);
    yq = xi * $sin(ph) + xq * $cos(ph);
    ai = int'(yi / real'(1 << adc_scale_sh)) + 3;   // +3 LSB DC offset
    aq = int'(yq / real'(1 << adc_scale_sh)) - 2;
    if (link_cut) begin ai = 3; aq = -2; end
    adc_i <= (ai > 31) ? 6'sd31 : (ai < -32) ? -6'sd32 : 6'(ai);
    adc_q <= (aq > 31) ? 6'sd31 : (aq < -32) ? -6'sd32 : 6'(aq);
  end

  // ---------------- receiver output checking ----------------
  int rxk [3];
  int match [3];
  int frames_ok [3];
  int sym_err [3];
  int frames_seen [3];
  task automatic rx_sym(input int c, input logic first, input logic [5:0] s);
    logic [1:0] hard;
    int n;
    n = (c == 0) ? TN : VN;
    hard = {s[5], s[2]};
    if (first) begin
      // find which transmitted frame this is from its first 16 symbols
      rxk[c] = 0; match[c] = -1;
      frames_seen[c]++;
    end
    if (rxk[c] < 0) return;
    if (rxk[c] == 0) begin
      // pick the candidate later, after collecting: here compare against all
      for (int f = 0; f < 8; f++) cand_err[c][f] = 0;
    end
    for (int f = 0; f < 8; f++) if (store[c][f][rxk[c]] != hard) cand_err[c][f]++;
    rxk[c]++;
    if (rxk[c] == n) begin
      int best;
      best = 0;
      for (int f = 1; f < 8; f++) if (cand_err[c][f] < cand_err[c][best]) best = f;
      if (!judge) begin rxk[c] = -1; return; end
      checks++;
      sym_err[c] += cand_err[c][best];
      sym_tot[c] += n;
      if (cand_err[c][best] * 50 > n) begin
        failures++;
        $display("frame error ch%0d: %0d of %0d symbols wrong", c, cand_err[c][best], n);
      end else frames_ok[c]++;
      rxk[c] = -1;
    end
  endtask
  int cand_err [3][8];
  int sym_tot [3];
  bit judge = 0;
  initial for (int c = 0; c < 3; c++) begin rxk[c] = -1; frames_ok[c] = 0; sym_err[c] = 0; sym_tot[c] = 0; frames_seen[c] = 0; end
  always @(posedge clk) if (rst_n) begin
    if (tlm_valid) rx_sym(0, tlm_first, tlm_soft);
    if (v1_valid)  rx_sym(1, v1_first, v1_soft);
    if (v2_valid)  rx_sym(2, v2_first, v2_soft);
  end

  // ---------------- mechanism counters ----------------
  int n_acq = 0, n_lose = 0, n_reacq = 0, n_afc_lock = 0, n_ctl_lock = 0;
  logic acq_d = 0, afc_d = 0, ctl_d = 0, rq_d = 0;
  always @(posedge clk) if (rst_n) begin
    acq_d <= acquired; afc_d <= afc_locked; ctl_d <= ctl_locked; rq_d <= reacq_mode;
    if (acquired && !acq_d) begin n_acq++; $display("[%0d] acquired, hyp=%0d chip=%0d", cyc, hyp_count, local_chip); end
    if (lose_lock) begin n_lose++; $display("[%0d] lose lock", cyc); end
    if (reacq_mode && !rq_d) n_reacq++;
    if (afc_locked && !afc_d) begin n_afc_lock++; $display("[%0d] afc lock freq=%0d", cyc, afc_freq); end
    if (ctl_locked && !ctl_d) begin n_ctl_lock++; $display("[%0d] ctl lock", cyc); end
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    tx_gain = {8'd64, 8'd64, 8'd91, 8'd64};
    search_start = 0;
    agc_ref = 8'd64;
    thr_low = 26'd15000; thr_high = 26'd36000; lock_thr = 26'd5000;
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    search_start = 1;
    @(posedge clk) search_start = 0;
    wait (acquired);
    wait (afc_locked);
    judge = 1;
    repeat (FRAME_CHIPS * 4 * 3) @(posedge clk);
    $display("phase 1 done: frames ok %0d %0d %0d", frames_ok[0], frames_ok[1], frames_ok[2]);
    judge = 0;
    link_cut = 1;
    wait (lose_lock);
    repeat (2000) @(posedge clk);
    link_cut = 0;
    wait (acquired);
    wait (afc_locked);
    judge = 1;
    repeat (FRAME_CHIPS * 4 * 3) @(posedge clk);
    for (int c = 0; c < 3; c++) $display("channel %0d: %0d symbol errors in %0d", c, sym_err[c], sym_tot[c]);
    need("acquisition", n_acq);
    need("reacquisition", n_reacq);
    need("loss of lock", n_lose);
    need("AFC lock", n_afc_lock);
    need("CTL lock", n_ctl_lock);
    need("CTL timing adjustments", int'(ctl_adj_count));
    need("TLM frames correct", frames_ok[0]);
    need("video 1 frames correct", frames_ok[1]);
    need("video 2 frames correct", frames_ok[2]);
    checks++;
    if (agc_gain == 16'd256) begin failures++; $display("FAIL: AGC gain never moved"); end
    $display("agc gain %0d afc freq %0d hyps %0d false alarms %0d", agc_gain, afc_freq, hyp_count, false_alarms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAME_CHIPS * 4 * 30) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // debug trace
  initial begin
    forever begin
      repeat (200000) @(posedge clk);
      $display("[%0d] dac %0d adc %0d agc %0d acq %0d hyp %0d st %0d E=%0d ctl %0d afc %0d f=%0d",
        cyc, dac_i, adc_i, agc_gain, acquired, hyp_count, dut.u_rx.u_srch.state, dut.u_rx.u_srch.last_energy,
        ctl_locked, afc_locked, afc_freq);
    end
  end
endmodule
