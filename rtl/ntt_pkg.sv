// Shared constants and types of the error-resistant Kyber NTT.
//
// Kyber works modulo q = 3329 on polynomials of n = 256 coefficients. Every
// coefficient and twiddle factor is ceil(log2 q) = 12 bits wide. Coefficients
// carry one extra parity bit while they sit in a register bank (13 bits);
// twiddle factors carry P = 5 Hamming check bits (17 bits), the smallest P
// with 2^P > 12 + P + 1. The Barrett constants are K = 24 (the width of the
// largest value reduced, a < 2^24) and X = floor(2^K / q) = 5039.
package ntt_pkg;

  localparam int unsigned Q      = 3329;
  localparam int unsigned N      = 256;
  localparam int unsigned CW     = 12;            // coefficient width, ceil(log2 q)
  localparam int unsigned HP     = 5;             // Hamming check bits for CW data bits
  localparam int unsigned AW     = 24;            // width of the unreduced butterfly sums
  localparam int unsigned BK     = 24;            // Barrett shift k
  localparam int unsigned BX     = (1 << BK) / Q; // Barrett factor x = 5039
  localparam int unsigned QSQ    = Q * Q;         // offset that keeps u - vw non-negative

  typedef logic [CW-1:0] coef_t;

  // A coefficient as stored between layers: value plus its parity bit.
  typedef struct packed {
    logic  par;
    coef_t val;
  } pcoef_t;

  // A twiddle factor as stored: Hamming check bits plus value.
  typedef struct packed {
    logic [HP-1:0] chk;
    coef_t         val;
  } htw_t;

endpackage
