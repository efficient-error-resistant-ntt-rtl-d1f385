// coef_bank: register bank of DEPTH parity-protected coefficients.
//
// Each register holds a 12-bit coefficient and its parity bit (13 bits).
// The bank is built from flip-flops so that any register can be read in the
// same cycle: two asynchronous read ports feed u and v of the butterfly
// core, and two write ports take its two results at the next clock edge
// (write port 0 also serves loading). The two write addresses never collide
// in this design; an assertion checks that. Reset clears every register to
// zero, which is a valid word under even parity.
// Register banks instead of block RAM, and the 13-bit width, follow the
// design; the port arrangement is this implementation's choice.
module coef_bank
  import ntt_pkg::*;
#(
  parameter int unsigned DEPTH = ntt_pkg::N,
  parameter int unsigned AB    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AB-1:0] ra0,
  output pcoef_t        rd0,
  input  logic [AB-1:0] ra1,
  output pcoef_t        rd1,
  input  logic          we0,
  input  logic [AB-1:0] wa0,
  input  pcoef_t        wd0,
  input  logic          we1,
  input  logic [AB-1:0] wa1,
  input  pcoef_t        wd1
);
  pcoef_t regs [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else begin
      if (we0) regs[wa0] <= wd0;
      if (we1) regs[wa1] <= wd1;
    end
  end

  assign rd0 = regs[ra0];
  assign rd1 = regs[ra1];

  a_no_collide: assert property (@(posedge clk) disable iff (rst)
                                 !(we0 && we1 && wa0 == wa1));
endmodule
