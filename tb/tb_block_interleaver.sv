// tb_block_interleaver: checks the block interleaver and deinterleaver.
//
// An interleaver (ROWS=4, COLS=8) and a deinterleaver of the same size are
// chained, each doing one operation per frame index. The test checks that
// the interleaver output frame is the column-order read of the previous
// input frame (computed here from the row/column rule), that the chain
// restores the original order two frames later, that nothing is marked valid
// before a complete frame was written, and that a frame entered part-way
// through is not marked valid.
module tb_block_interleaver;
  localparam int R = 4, C = 8, N = R * C;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, en2;
  logic [4:0] idx, idx2;
  logic [7:0] wd, id, od;
  logic iv, ifst, ov, ofst;

  block_interleaver #(.ROWS(R), .COLS(C), .W(8), .DEINT(1'b0)) u_il (
    .clk, .rst_n, .en, .idx, .wr_data(wd), .rd_data(id), .rd_valid(iv), .rd_first(ifst));
  block_interleaver #(.ROWS(R), .COLS(C), .W(8), .DEINT(1'b1)) u_dl (
    .clk, .rst_n, .en(en2), .idx(idx2), .wr_data(id), .rd_data(od), .rd_valid(ov), .rd_first(ofst));

  int checks = 0, failures = 0;
  int frame;
  logic [7:0] sent [8][N];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    en = 0; en2 = 0; idx = '0; idx2 = '0; wd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a partial frame first (indices 20..31), which must not become valid
    for (int k = 20; k < N; k++) begin
      @(negedge clk); en = 1; idx = 5'(k); wd = 8'hEE;
    end
    for (frame = 0; frame < 5; frame++) begin
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        en = 1; idx = 5'(k); wd = 8'($urandom);
        sent[frame][k] = wd;
        @(posedge clk); #1;
        en = 0;
        // interleaver output: element read in column order from the previous frame
        if (frame == 0) chk(!iv, "interleaver valid after a partial frame");
        else begin
          chk(iv, "interleaver valid");
          chk(ifst == (k == 0), "interleaver first flag");
          chk(id == sent[frame-1][(k % R) * C + k / R], $sformatf("interleaver data f%0d k%0d", frame, k));
        end
        // feed the deinterleaver with the interleaver output
        @(negedge clk);
        en2 = iv; idx2 = 5'(k);
        @(posedge clk); #1;
        en2 = 0;
        if (frame >= 2) begin
          chk(ov, "deinterleaver valid");
          chk(od == sent[frame-2][k], $sformatf("deinterleaver data f%0d k%0d", frame, k));
          chk(ofst == (k == 0), "deinterleaver first flag");
        end else if (en2 || frame < 2) chk(!ov, "deinterleaver not valid early");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
