// tb_channel_estimator: pilot symbols A(1+j)e^{j phi} and QPSK data symbols
// A d e^{j phi} with noise, for several channel phases phi (the phase
// changes slowly during the run). After the moving average has filled, each
// compensated symbol must have the signs of the transmitted d, must come out
// DATA_DELAY symbols after it went in, and must carry its index.
module tb_channel_estimator;
  logic clk = 0, rst_n = 0, pilot_valid = 0, data_valid = 0, out_valid;
  logic signed [12:0] pilot_i, pilot_q, data_i, data_q;
  logic [12:0] data_idx, out_idx;
  logic signed [15:0] out_i, out_q, h_i, h_q;
  always #5 clk = ~clk;
  channel_estimator #(.SW(13), .N(8), .DATA_DELAY(4), .IW(13), .OSH(12), .OW(16)) dut (.*);

  int checks = 0, failures = 0;
  int sent_i [8192], sent_q [8192];
  initial begin
    real phi;
    phi = 0.3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      real a, di, dq;
      int si, sq;
      phi += 0.002;
      if (k == 1000) phi += 2.0;     // a sudden phase step
      a = 300.0;
      // pilot
      @(negedge clk);
      pilot_valid = 1;
      pilot_i = 13'(int'(a * ($cos(phi) - $sin(phi)) + real'($urandom_range(0, 40)) - 20.0));
      pilot_q = 13'(int'(a * ($cos(phi) + $sin(phi)) + real'($urandom_range(0, 40)) - 20.0));
      @(negedge clk);
      pilot_valid = 0;
      // data
      si = ($urandom % 2) ? 1 : -1; sq = ($urandom % 2) ? 1 : -1;
      sent_i[k] = si; sent_q[k] = sq;
      di = a * (real'(si) * $cos(phi) - real'(sq) * $sin(phi));
      dq = a * (real'(si) * $sin(phi) + real'(sq) * $cos(phi));
      data_valid = 1;
      data_i = 13'(int'(di)); data_q = 13'(int'(dq)); data_idx = 13'(k);
      @(posedge clk); #1;
      data_valid = 0;
      if (k >= 8 && (k < 1000 || k >= 1008)) begin
        checks++;
        if (!out_valid || out_idx != 13'(k - 4) ||
            (out_i > 0) != (sent_i[k-4] > 0) || (out_q > 0) != (sent_q[k-4] > 0)) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d out %0d,%0d idx %0d sent %0d,%0d", k, out_i, out_q, out_idx, sent_i[k-4], sent_q[k-4]);
        end
      end
    end
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
