// walsh_gen: order-8 Hadamard-Walsh chip generator.
//
// Channels are told apart by rows of the 8x8 Sylvester Hadamard matrix, as in
// the modem specification. The chip of row `row` at chip position `chip_idx`
// (taken modulo 8) is the parity of row AND position; 0 stands for +1 and 1
// for -1. Purely combinational.
module walsh_gen
  import cdma_pkg::*;
(
  input  logic [2:0] row,
  input  logic [2:0] chip_idx,
  output logic       chip
);
  always_comb chip = walsh_bit(row, chip_idx);
endmodule
