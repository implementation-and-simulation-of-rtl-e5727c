// tb_afc: sector detector, phase difference table and the closed loop.
//  * Sectors: random vectors away from the sector edges (the axes at
//    multiples of 45 degrees and at +-atan(1/2), +-atan(2)) must fall in the
//    sector counted from the +I axis.
//  * Table: consecutive vectors in sectors s1 then s2 give pdd =
//    {0,1,2,3,4,3,2,1,0,-1,-2,-3,-4,-3,-2,-1}[(s2 - s1) mod 16].
//  * Loop: pilot sums rotating by f cycles per update, de-rotated here by
//    the NCO angle the AFC outputs (as nco_rotator does); the frequency word
//    must settle at f * 2^24 within 0.01 cycle per update; lock must be
//    absent while pulling in and reported once settled, for a positive and a
//    negative offset. enable low clears the loop.
module tb_afc;
  logic clk = 0, rst_n = 0, enable = 0, corr_valid = 0;
  logic signed [16:0] s_i, s_q;
  logic [7:0] angle;
  logic signed [31:0] freq;
  logic [3:0] sector;
  logic signed [3:0] pdd;
  logic locked;
  always #5 clk = ~clk;
  afc dut (.*);

  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  real edges [17];
  initial begin
    real b [4];
    b[0] = 0.0; b[1] = $atan(0.5) * 180.0 / PI; b[2] = 45.0; b[3] = $atan(2.0) * 180.0 / PI;
    for (int k = 0; k < 16; k++) edges[k] = 90.0 * (k / 4) + b[k % 4];
    edges[16] = 360.0;
  end

  // sector and a vector of length r at `deg`
  function automatic int ref_sector(input real deg);
    for (int k = 0; k < 16; k++) if (deg >= edges[k] && deg < edges[k+1]) return k;
    return 0;
  endfunction

  task automatic send(input real deg, input real r);
    @(negedge clk);
    s_i = 17'(int'(r * $cos(deg * PI / 180.0)));
    s_q = 17'(int'(r * $sin(deg * PI / 180.0)));
    corr_valid = 1;
    @(negedge clk) corr_valid = 0;
  endtask

  function automatic real rand_in_sector(input int k);
    real lo, hi;
    lo = edges[k] + 0.5; hi = edges[k+1] - 0.5;
    return lo + (hi - lo) * real'($urandom % 1000) / 1000.0;
  endfunction

  task automatic loop_test(input real f);
    real ph, fr;
    int nlock;
    @(negedge clk) enable = 0;
    @(negedge clk) enable = 1;
    ph = 0.7;
    nlock = 0;
    for (int n = 0; n < 3000; n++) begin
      real d;
      d = (ph - real'(angle) / 256.0) * 360.0;
      send(d - 360.0 * $floor(d / 360.0), 5000.0);
      ph += f;
      if (n > 2000 && locked) nlock++;
      if (n == 70) chk(!locked, $sformatf("f=%f: not locked while pulling in", f));
    end
    fr = real'(freq) / 16777216.0;
    chk(fr - f < 0.01 && f - fr < 0.01, $sformatf("f=%f: loop frequency %f", f, fr));
    chk(nlock > 900, $sformatf("f=%f: locked %0d of 999 updates", f, nlock));
  endtask

  initial begin
    s_i = '0; s_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) enable = 1;
    for (int n = 0; n < 500; n++) begin
      int k;
      k = $urandom % 16;
      send(rand_in_sector(k), 200.0 + real'($urandom % 60000));
      @(negedge clk);
      chk(int'(sector) == k, $sformatf("sector %0d expected %0d", sector, k));
    end
    for (int n = 0; n < 300; n++) begin
      int k1, k2, e;
      int tbl [16] = '{0, 1, 2, 3, 4, 3, 2, 1, 0, -1, -2, -3, -4, -3, -2, -1};
      k1 = $urandom % 16; k2 = $urandom % 16;
      @(negedge clk) enable = 0;
      @(negedge clk) enable = 1;
      send(rand_in_sector(k1), 3000.0);
      send(rand_in_sector(k2), 3000.0);
      @(negedge clk);
      e = tbl[(k2 - k1 + 16) % 16];
      chk(int'(pdd) == e, $sformatf("pdd %0d for sectors %0d -> %0d, expected %0d", pdd, k1, k2, e));
    end
    loop_test(0.05);
    loop_test(-0.09);
    @(negedge clk) enable = 0;
    @(negedge clk);
    chk(freq == 0 && !locked, "enable low clears the loop");
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
