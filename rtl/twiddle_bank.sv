// twiddle_bank: register bank of DEPTH Hamming-protected twiddle factors.
//
// Each register holds a 12-bit twiddle factor next to its 5 Hamming check
// bits (17 bits). One synchronous write port is used while the twiddle
// factors are loaded; one asynchronous read port feeds w of the butterfly
// core. Reset clears the bank; the all-zero word is a valid code word.
// The n/2 depth and the stored check bits follow the design; the port
// arrangement is this implementation's choice.
module twiddle_bank
  import ntt_pkg::*;
#(
  parameter int unsigned DEPTH = ntt_pkg::N / 2,
  parameter int unsigned AB    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AB-1:0] wa,
  input  htw_t          wd,
  input  logic [AB-1:0] ra,
  output htw_t          rd
);
  htw_t regs [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end

  assign rd = regs[ra];
endmodule
