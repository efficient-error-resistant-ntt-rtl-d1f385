// h_compute: Hamming check bits of a 12-bit twiddle factor.
//
// The 12 data bits and 5 check bits form a 17-bit Hamming code word. Check
// bits sit at code positions 1, 2, 4, 8 and 16, data bits at the remaining
// positions 3, 5, 6, 7, 9..15 and 17 (data bit 0 at position 3, and so on).
// Check bit i is the XOR of the data bits whose position has bit i set, so
// every checked group, check bit included, has an even number of ones.
// The same function is used twice: to form the check bits when a twiddle
// factor is loaded, and to recompute them when the butterfly core reads it.
// Purely combinational. The 5-bit width follows 2^p > m + p + 1 for m = 12;
// the position layout is the classic one and is this implementation's choice.
module h_compute
  import ntt_pkg::*;
(
  input  coef_t         d,
  output logic [HP-1:0] c
);
  // Code position of each data bit.
  localparam int unsigned DPOS [CW] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17};

  always_comb begin
    c = '0;
    for (int i = 0; i < int'(HP); i++)
      for (int j = 0; j < int'(CW); j++)
        if (DPOS[j][i]) c[i] = c[i] ^ d[j];
  end
endmodule
