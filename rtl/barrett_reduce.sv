// barrett_reduce: z = a mod 3329 for a 24-bit a, by Barrett reduction.
//
// The modulus and the constants k and x = floor(2^k / q) are fixed, so both
// multiplications are by constants. The steps are y = (a * x) >> k, then
// z = a - y * q, then one conditional subtraction of q. With k = 24 and
// a < 2^24 the quotient estimate y is at most one below floor(a / q), so one
// subtraction always brings z below q. The two multiplications are in series,
// as in the reference structure; the block is purely combinational.
// The algorithm and constant-operand structure follow the design; k = 24 and
// x = 5039 are chosen here so that the single correction step is exact.
module barrett_reduce #(
  parameter int unsigned Q  = ntt_pkg::Q,
  parameter int unsigned AW = ntt_pkg::AW,
  parameter int unsigned K  = ntt_pkg::BK,
  parameter int unsigned X  = ntt_pkg::BX,
  parameter int unsigned CW = $clog2(Q)
) (
  input  logic [AW-1:0] a,
  output logic [CW-1:0] z
);
  localparam int unsigned XW = $clog2(X + 1);

  logic [AW+XW-1:0] ax;
  logic [AW-1:0]    y;
  logic [AW-1:0]    yq;
  logic [CW:0]      r;     // a - y*q, always below 2q

  always_comb begin
    ax = a * XW'(X);
    y  = AW'(ax >> K);
    yq = AW'(y * AW'(Q));
    r  = (CW+1)'(a - yq);
    z  = (r >= (CW+1)'(Q)) ? CW'(r - (CW+1)'(Q)) : CW'(r);
  end
endmodule
