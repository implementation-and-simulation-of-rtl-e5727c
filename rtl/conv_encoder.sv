// conv_encoder: rate-1/2, constraint-length-7 convolutional encoder.
//
// Generators g0 = 171 and g1 = 133 (octal) as in the modem specification. For
// every input bit accepted with `in_valid`, one coded pair {c0, c1} comes out
// on the next cycle with `out_valid`. The encoder runs continuously across
// frames (no tail bits), which is this implementation's choice. Reset clears
// the shift register.
module conv_encoder #(
  parameter logic [6:0] G0 = 7'o171,
  parameter logic [6:0] G1 = 7'o133
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic out_valid,
  output logic c0,
  output logic c1
);
  logic [5:0] state;   // state[5] holds the most recent previous bit
  logic [6:0] window;

  always_comb window = {in_bit, state};   // window[6] = newest bit

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= '0;
      out_valid <= 1'b0;
      c0        <= 1'b0;
      c1        <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        state <= window[6:1];
        c0    <= ^(window & G0);
        c1    <= ^(window & G1);
      end
    end
  end
endmodule
