// h_correct: single-error correction of a Hamming-protected twiddle factor.
//
// The syndrome is the stored check bits XOR the check bits recomputed from
// the stored data (by h_compute). A zero syndrome means no error. A non-zero
// syndrome is the code position of the flipped bit: if it is a data position
// that data bit is inverted, if it is a check position (1, 2, 4, 8, 16) the
// data is already right. Syndromes above 17 cannot come from one flipped bit
// and leave the data unchanged. Purely combinational.
// Outputs: the corrected value, `err` when the syndrome is non-zero and
// `fixed` when a data bit was inverted.
module h_correct
  import ntt_pkg::*;
(
  input  coef_t         d,      // data bits as read
  input  logic [HP-1:0] c_rd,   // check bits as read
  input  logic [HP-1:0] c_new,  // check bits recomputed from d
  output coef_t         q,      // corrected data
  output logic          err,
  output logic          fixed
);
  localparam int unsigned DPOS [CW] = '{3, 5, 6, 7, 9, 10, 11, 12, 13, 14, 15, 17};

  logic [HP-1:0] syn;

  always_comb begin
    syn   = c_rd ^ c_new;
    q     = d;
    fixed = 1'b0;
    for (int j = 0; j < int'(CW); j++)
      if (syn == HP'(DPOS[j])) begin
        q[j]  = ~d[j];
        fixed = 1'b1;
      end
    err = |syn;
  end
endmodule
