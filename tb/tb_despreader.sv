// tb_despreader: random chip samples and PN chips, Walsh row 5, LEN = 16.
// Every dump must equal the sum over the 16 chips of r * conj(p) * w
// computed here with integers, appear one cycle after the last chip, and
// carry the symbol index chip_idx / 16. Chip positions run continuously from
// 0 with gaps between chips.
module tb_despreader;
  logic clk = 0, rst_n = 0, chip_en = 0, pn_i, pn_q, sym_valid;
  logic signed [8:0] r_i, r_q;
  logic [15:0] chip_idx;
  logic signed [13:0] sym_i, sym_q;
  logic [11:0] sym_idx;
  always #5 clk = ~clk;
  despreader #(.W(9), .LEN(16), .WALSH_ROW(3'd5), .FRAME_CHIPS(65536)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    int ai, aq, nsym;
    ai = 0; aq = 0; nsym = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 16 * 60; c++) begin
      int pi, pq, w, ri, rq;
      @(negedge clk);
      chip_en = 1; chip_idx = 16'(c);
      r_i = 9'($urandom_range(0, 500) - 250); r_q = 9'($urandom_range(0, 500) - 250);
      pn_i = 1'($urandom); pn_q = 1'($urandom);
      pi = pn_i ? -1 : 1; pq = pn_q ? -1 : 1;
      w = (^(3'd5 & 3'(c))) ? -1 : 1;
      ri = int'(r_i); rq = int'(r_q);
      ai += w * (ri * pi + rq * pq);
      aq += w * (rq * pi - ri * pq);
      @(posedge clk); #1;
      chip_en = 0;
      checks++;
      if ((c % 16) == 15) begin
        if (!sym_valid || int'(sym_i) != ai || int'(sym_q) != aq || sym_idx != 12'(c / 16)) begin
          failures++;
          $display("FAIL symbol %0d: got %0d,%0d idx %0d exp %0d,%0d", c / 16, sym_i, sym_q, sym_idx, ai, aq);
        end
        ai = 0; aq = 0; nsym++;
      end else if (sym_valid) begin
        failures++;
        $display("FAIL unexpected dump at chip %0d", c);
      end
      repeat ($urandom % 3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
