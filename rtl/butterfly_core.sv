// butterfly_core: Cooley-Tukey butterfly of the Kyber NTT, modulo q.
//
// Given coefficients u, v and twiddle factor w (all below q), it forms the
// 24-bit product vw, the sum u + vw and the difference u - vw, and reduces
// both with two Barrett reducers working in parallel: a = (u + vw) mod q,
// b = (u - vw) mod q. To keep the difference non-negative for the reducer,
// q^2 is added to it (u + q^2 - vw < 2^24); this offset is a multiple of q
// and does not change the result. The core is combinational: one butterfly
// per clock cycle, with the result written to a register bank at the edge.
// The structure (one multiplier, adder, subtractor, two reducers) follows the
// design; the q^2 offset is this implementation's choice.
module butterfly_core
  import ntt_pkg::*;
(
  input  coef_t u,
  input  coef_t v,
  input  coef_t w,
  output coef_t a,   // (u + v*w) mod q
  output coef_t b    // (u - v*w) mod q
);
  logic [AW-1:0] vw, sum, dif;

  always_comb begin
    vw  = AW'(v) * AW'(w);
    sum = AW'(u) + vw;
    dif = AW'(u) + AW'(QSQ) - vw;
  end

  barrett_reduce u_red_sum (.a(sum), .z(a));
  barrett_reduce u_red_dif (.a(dif), .z(b));
endmodule
