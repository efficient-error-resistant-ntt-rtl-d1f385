// er_butterfly_core: error-resistant butterfly core.
//
// It wraps butterfly_core with the checks that protect its operands:
//  * u and v arrive with the parity bit they were stored with. Their parity
//    is recomputed; a mismatch raises rst_1 (for u) or rst_2 (for v), which
//    the sequence counter uses to restart the whole NTT.
//  * w arrives with its 5 Hamming check bits. h_compute recomputes them and
//    h_correct inverts a single flipped data bit before w is used, so a
//    single upset in a twiddle register never reaches the arithmetic.
//  * The two results leave with a freshly computed parity bit (13 bits), so
//    they are protected while they wait in the next register bank.
// Combinational, like the core inside it. `tw_err` flags a non-zero
// syndrome and `tw_fixed` a corrected data bit, for error accounting.
// The checks follow the design; which of u and v drives rst_1 is this
// implementation's choice.
module er_butterfly_core
  import ntt_pkg::*;
(
  input  pcoef_t u,
  input  pcoef_t v,
  input  htw_t   w,
  output pcoef_t a,
  output pcoef_t b,
  output logic   rst_1,
  output logic   rst_2,
  output logic   tw_err,
  output logic   tw_fixed
);
  logic          pu, pv, pa, pb;
  logic [HP-1:0] chk_new;
  coef_t         w_fix, a_val, b_val;

  parity_gen #(.W(CW)) u_par_u (.d(u.val), .p(pu));
  parity_gen #(.W(CW)) u_par_v (.d(v.val), .p(pv));

  h_compute u_hcomp (.d(w.val), .c(chk_new));
  h_correct u_hcorr (.d(w.val), .c_rd(w.chk), .c_new(chk_new),
                     .q(w_fix), .err(tw_err), .fixed(tw_fixed));

  butterfly_core u_bf (.u(u.val), .v(v.val), .w(w_fix), .a(a_val), .b(b_val));

  parity_gen #(.W(CW)) u_par_a (.d(a_val), .p(pa));
  parity_gen #(.W(CW)) u_par_b (.d(b_val), .p(pb));

  assign rst_1 = pu ^ u.par;
  assign rst_2 = pv ^ v.par;
  assign a     = '{par: pa, val: a_val};
  assign b     = '{par: pb, val: b_val};
endmodule
