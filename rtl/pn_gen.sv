// pn_gen: the pair of order-17 PN m-sequence generators of the modem.
//
// The I sequence uses p_I(D) = D^17 + D^3 + 1 and the Q sequence
// p_Q(D) = D^17 + D^3 + D^2 + D + 1, both as Fibonacci LFSRs; these
// polynomials follow the modem specification. The generators advance one chip
// when `step` is high. `restart` (the frame boundary) reloads the seeds, so
// each 8 ms frame carries the same 65536-chip segment of the m-sequences; the
// frame restart and the seeds are choices of this implementation.
// Outputs pn_i/pn_q are the current chips (0 = +1, 1 = -1), valid every cycle.
module pn_gen #(
  parameter logic [16:0] SEED_I = 17'h1,
  parameter logic [16:0] SEED_Q = 17'h1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  input  logic restart,
  output logic pn_i,
  output logic pn_q
);
  logic [16:0] sr_i, sr_q;

  // Bit k of the register holds a_{n+k}; a_{n+17} = a_{n+3} ^ a_n for p_I,
  // a_{n+17} = a_{n+3} ^ a_{n+2} ^ a_{n+1} ^ a_n for p_Q.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_i <= SEED_I;
      sr_q <= SEED_Q;
    end else if (restart) begin
      sr_i <= SEED_I;
      sr_q <= SEED_Q;
    end else if (step) begin
      sr_i <= {sr_i[3] ^ sr_i[0], sr_i[16:1]};
      sr_q <= {sr_q[3] ^ sr_q[2] ^ sr_q[1] ^ sr_q[0], sr_q[16:1]};
    end
  end

  assign pn_i = sr_i[0];
  assign pn_q = sr_q[0];
endmodule
