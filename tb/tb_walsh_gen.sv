// tb_walsh_gen: checks the Walsh chips against an 8x8 Hadamard matrix built
// by the Sylvester recursion H2n = [Hn Hn; Hn -Hn], and checks that every
// pair of different rows is orthogonal over 8 chips.
module tb_walsh_gen;
  logic [2:0] row, chip_idx;
  logic chip;
  walsh_gen dut (.*);

  int checks = 0, failures = 0;
  int h [8][8];

  initial begin
    h[0][0] = 1;
    for (int n = 1; n < 8; n *= 2)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c+n]   = h[r][c];
          h[r+n][c]   = h[r][c];
          h[r+n][c+n] = -h[r][c];
        end
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        row = 3'(r); chip_idx = 3'(c);
        #1;
        checks++;
        if ((chip ? -1 : 1) != h[r][c]) begin failures++; $display("FAIL row %0d chip %0d", r, c); end
      end
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        int s, wa;
        s = 0;
        for (int c = 0; c < 8; c++) begin
          row = 3'(a); chip_idx = 3'(c); #1; wa = chip ? -1 : 1;
          row = 3'(b); #1; s += wa * (chip ? -1 : 1);
        end
        checks++;
        if (s != ((a == b) ? 8 : 0)) begin failures++; $display("FAIL orthogonality %0d %0d", a, b); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
