// cdma_pkg: constants and helper functions shared by the DS/CDMA modem.
//
// System numbers that follow the modem specification: 8.192 Mcps chip rate,
// 4 samples per chip (32.768 MHz system clock), order-17 PN m-sequences,
// order-8 Hadamard-Walsh channelisation, 8 ms frames, rate-1/2 K=7 coding and
// a 48-tap square-root raised cosine (rolloff 0.35) pulse shape.
//
// Design choices of this implementation: the PN generators restart at every
// 8 ms frame (65536 chips), so the PN phase also gives the frame position; the
// SRRC and sine tables below are quantised as described next to them.
package cdma_pkg;

  localparam int unsigned SRRC_TAPS = 48;

  // SRRC taps: h(t) of a square-root raised cosine with rolloff 0.35,
  // t = (n - 23.5)/4 chips, n = 0..47, scaled so the two centre taps are 256.
  localparam logic signed [9:0] SRRC_COEF [SRRC_TAPS] = '{
    -10'sd1,   10'sd0,   10'sd2,   10'sd2,   10'sd1,  -10'sd2,  -10'sd3,  -10'sd1,
     10'sd2,   10'sd3,   10'sd0,  -10'sd5,  -10'sd6,   10'sd1,   10'sd12,  10'sd17,
     10'sd6,  -10'sd19, -10'sd43, -10'sd39,  10'sd10,  10'sd97,  10'sd193, 10'sd256,
     10'sd256, 10'sd193, 10'sd97,  10'sd10, -10'sd39, -10'sd43, -10'sd19,  10'sd6,
     10'sd17,  10'sd12,  10'sd1,  -10'sd6,  -10'sd5,   10'sd0,   10'sd3,   10'sd2,
    -10'sd1,  -10'sd3,  -10'sd2,   10'sd1,   10'sd2,   10'sd2,   10'sd0,  -10'sd1
  };

  // Quarter sine table: round(127*sin(pi/2*k/64)), k = 0..64.
  localparam logic [6:0] SIN_QTR [65] = '{
      0,   3,   6,   9,  12,  16,  19,  22,  25,  28,  31,  34,  37,  40,  43,  46,
     49,  51,  54,  57,  60,  63,  65,  68,  71,  73,  76,  78,  81,  83,  85,  88,
     90,  92,  94,  96,  98, 100, 102, 104, 106, 107, 109, 111, 112, 113, 115, 116,
    117, 118, 120, 121, 122, 122, 123, 124, 125, 125, 126, 126, 126, 127, 127, 127,
    127
  };

  // Sine of an 8-bit angle (256 steps per turn), 8-bit signed, amplitude 127.
  function automatic logic signed [7:0] sin256(input logic [7:0] a);
    logic [6:0] k;
    logic [6:0] m;
    k = {1'b0, a[5:0]};
    m = a[6] ? SIN_QTR[7'd64 - k] : SIN_QTR[k];
    return a[7] ? -$signed({1'b0, m}) : $signed({1'b0, m});
  endfunction

  function automatic logic signed [7:0] cos256(input logic [7:0] a);
    return sin256(a + 8'd64);
  endfunction

  // Chip of Sylvester Hadamard row `row` at position `pos`: 0 means +1, 1 means -1.
  function automatic logic walsh_bit(input logic [2:0] row, input logic [2:0] pos);
    return ^(row & pos);
  endfunction

endpackage
