// tb_cdma_tx: the transmitter against a chip-exact reference model, with a
// 1024-chip frame and 8-row interleavers (the structure is the same at the
// full 65536-chip size).
//  * Request timing: video requests every 32 clocks (8 chips), TLM every
//    64 (16 chips), 128 / 64 of them per frame, frame_start every 4096.
//  * Output: the model encodes the recorded source bits (K=7, 171/133),
//    reads frame F-1's coded symbols in the interleaver's column order for
//    frame F, covers them with Walsh rows 0..3 and the gains, spreads with
//    the I/Q m-sequences (complex product d * p), upsamples by 4 and filters with
//    the SRRC taps using the filter's rounding and saturation. The DAC
//    words must match the model exactly once the pipeline offset (found at
//    the start of frame 2) is known.
module tb_cdma_tx;
  import cdma_pkg::*;
  localparam int FC = 1024, R = 8, VS = FC / 8, TS = FC / 16;
  logic clk = 0, rst_n = 0;
  logic [3:0][7:0] gain;
  logic tlm_req, tlm_bit, v1_req, v1_bit, v2_req, v2_bit, frame_start;
  logic signed [11:0] dac_i, dac_q;
  always #5 clk = ~clk;
  cdma_tx #(.FRAME_CHIPS(FC), .ILV_ROWS(R), .FIR_SHIFT(7)) dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // m-sequences of one frame
  int pni [FC], pnq [FC];
  initial begin
    logic [16:0] a, b;
    a = 17'h1; b = 17'h1;
    for (int n = 0; n < FC; n++) begin
      pni[n] = a[0] ? -1 : 1; pnq[n] = b[0] ? -1 : 1;
      a = {a[3] ^ a[0], a[16:1]};
      b = {b[3] ^ b[2] ^ b[1] ^ b[0], b[16:1]};
    end
  end

  // reference encoder, coded symbols per channel and frame
  logic [1:0] coded [3][8][VS];
  logic [5:0] st [3];
  int k [3];
  int frame = -1, n = 0;
  int fs_cycle [8];
  int dac_h_i [40000], dac_h_q [40000];
  int last_v = -1, last_t = -1, last_fs = -1;
  int nv [8], nt [8];

  task automatic enc(input int c, input logic b);
    logic [6:0] w;
    w = {b, st[c]};
    coded[c][frame][k[c]] = {^(w & 7'o133), ^(w & 7'o171)};
    st[c] = w[6:1];
    k[c]++;
  endtask

  initial for (int c = 0; c < 3; c++) begin st[c] = '0; k[c] = 0; end
  always @(posedge clk) if (rst_n) begin
    if (frame_start) begin
      if (frame >= 0) chk(nv[frame] == VS && nt[frame] == TS, $sformatf("frame %0d: %0d video, %0d TLM requests", frame, nv[frame], nt[frame]));
      if (last_fs >= 0) chk(n - last_fs == 4 * FC, $sformatf("frame period %0d", n - last_fs));
      last_fs = n;
      frame++;
      fs_cycle[frame] = n;
      nv[frame] = 0; nt[frame] = 0;
      for (int c = 0; c < 3; c++) k[c] = 0;
    end
    if (v1_req) begin
      chk(v2_req && (last_v < 0 || n - last_v == 32), $sformatf("video request spacing %0d", n - last_v));
      last_v = n;
      nv[frame]++;
      enc(1, v1_bit);
      enc(2, v2_bit);
    end
    if (tlm_req) begin
      chk(last_t < 0 || n - last_t == 64, $sformatf("TLM request spacing %0d", n - last_t));
      last_t = n;
      nt[frame]++;
      enc(0, tlm_bit);
    end
    n++;
  end
  always @(negedge clk) begin
    if (rst_n) begin dac_h_i[n] = int'(dac_i); dac_h_q[n] = int'(dac_q); end
    tlm_bit = 1'($urandom); v1_bit = 1'($urandom); v2_bit = 1'($urandom);
  end

  // model chip (I or Q) at chip c of frame f
  function automatic int perm(input int j, input int cols);
    return (j % R) * cols + j / R;
  endfunction
  function automatic void model_chip(input int f, input int c, output int si, output int sq);
    logic [1:0] s [4];
    int ci, cq, w;
    s[0] = 2'b00;
    s[1] = coded[0][f-1][perm(c / 16, TS / R)];
    s[2] = coded[1][f-1][perm(c / 8, VS / R)];
    s[3] = coded[2][f-1][perm(c / 8, VS / R)];
    ci = 0; cq = 0;
    for (int ch = 0; ch < 4; ch++) begin
      w = walsh_bit(3'(ch), 3'(c % 8));
      ci += ((s[ch][0] ^ w) ? -1 : 1) * int'(gain[ch]);
      cq += ((s[ch][1] ^ w) ? -1 : 1) * int'(gain[ch]);
    end
    si = ci * pni[c] - cq * pnq[c];
    sq = ci * pnq[c] + cq * pni[c];
  endfunction

  // model DAC sample at cycle m, chip c of frame f entering the filter at
  // cycle fs_cycle[f] + 4c + lat
  function automatic void model_dac(input int m, input int lat, output int yi, output int yq);
    longint ai, aq;
    ai = 0; aq = 0;
    for (int t = 0; t < SRRC_TAPS; t++) begin
      int e, f, c, xi, xq;
      e = m - t - lat;                 // cycle at which this tap's input entered
      f = 0;
      while (f < 7 && fs_cycle[f + 1] <= e) f++;
      if ((e - fs_cycle[f]) % 4 == 0) begin
        c = (e - fs_cycle[f]) / 4;
        model_chip(f, c, xi, xq);
        ai += longint'(xi) * SRRC_COEF[t];
        aq += longint'(xq) * SRRC_COEF[t];
      end
    end
    yi = int'((ai + 64) >>> 7); yq = int'((aq + 64) >>> 7);
    if (yi > 2047) yi = 2047; if (yi < -2048) yi = -2048;
    if (yq > 2047) yq = 2047; if (yq < -2048) yq = -2048;
  endfunction

  initial begin
    int lat;
    for (int ch = 0; ch < 4; ch++) gain[ch] = 8'(30 + $urandom % 60);
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (frame == 5);
    // pipeline offset: the one that matches 200 samples in frame 3
    lat = -1;
    for (int l = 0; l < 40 && lat < 0; l++) begin
      bit ok;
      ok = 1;
      for (int m = fs_cycle[3] + 60; m < fs_cycle[3] + 260 && ok; m++) begin
        int yi, yq;
        model_dac(m, l, yi, yq);
        if (yi != dac_h_i[m] || yq != dac_h_q[m]) ok = 0;
      end
      if (ok) lat = l;
    end
    chk(lat >= 0, "output matches the model at some pipeline offset");
    $display("pipeline offset %0d clocks", lat);
    if (lat >= 0)
      for (int m = fs_cycle[2] + 60; m < fs_cycle[5]; m++) begin
        int yi, yq;
        model_dac(m, lat, yi, yq);
        chk(yi == dac_h_i[m] && yq == dac_h_q[m], $sformatf("DAC at cycle %0d: %0d,%0d model %0d,%0d", m, dac_h_i[m], dac_h_q[m], yi, yq));
      end
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
