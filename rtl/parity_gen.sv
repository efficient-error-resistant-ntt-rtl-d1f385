// parity_gen: single even-parity bit of a W-bit word.
//
// The bit is the XOR of all data bits, so the word together with its parity
// bit always holds an even number of ones. It is computed when a coefficient
// enters a register bank and again when the butterfly core reads it; a
// mismatch reveals any single flipped bit. Purely combinational.
// The use of one parity bit per coefficient follows the design; even (rather
// than odd) parity is this implementation's choice, so an all-zero register
// is consistent.
module parity_gen #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] d,
  output logic         p
);
  assign p = ^d;
endmodule
