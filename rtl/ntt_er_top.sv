// ntt_er_top: error-resistant NTT for CRYSTALS-Kyber (n = 256, q = 3329).
//
// One butterfly core computes the forward NTT in 7 layers of 128 butterflies,
// one butterfly per clock cycle, so the computation takes 7 * 128 = 896
// cycles after 256 + 128 loading cycles. Coefficients ping-pong between two
// register banks (A and B); twiddle factors sit in a third bank of 128
// registers. Two protections guard against single event upsets:
//  * every stored coefficient carries an even-parity bit, computed when it
//    is written (on loading and on every butterfly output) and checked when
//    the butterfly core reads it; a mismatch restarts the NTT from loading;
//  * every twiddle factor carries 5 Hamming check bits, computed on loading,
//    and is corrected inside the butterfly core before use.
//
// Interface (all synchronous to clk, rst synchronous and active high):
//   coef_in/coef_valid/coef_ready  256 input coefficients (< q), index order;
//   tw_in/tw_valid/tw_ready        128 twiddle factors, zeta_k = 17^br7(k)
//                                  mod q for k = 0..127 (index 0 unused);
//   clr                            start over (back to coefficient loading);
//   done                           result ready; read it with rd_idx ->
//                                  rd_coef (combinational), rd_par_ok tells
//                                  whether the stored parity still matches;
//   restart                        one-cycle pulse: a parity error aborted
//                                  the NTT, coefficients and twiddle factors
//                                  must be sent again;
//   tw_fixed                       a twiddle data bit was corrected this cycle;
//   tw_err                         the twiddle read this cycle had a non-zero
//                                  Hamming syndrome (data or check bit);
//   layer                          NTT layer being computed (1..7).
// The output is in Kyber's NTT order (bit-reversed pairs), as produced by
// the Cooley-Tukey reference algorithm. Banks, core, protections and the
// cycle count follow the design; the handshakes and the readout port are
// this implementation's choice.
module ntt_er_top
  import ntt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 clr,
  input  coef_t                coef_in,
  input  logic                 coef_valid,
  output logic                 coef_ready,
  input  coef_t                tw_in,
  input  logic                 tw_valid,
  output logic                 tw_ready,
  output logic                 done,
  output logic                 restart,
  output logic                 tw_fixed,
  output logic                 tw_err,
  output logic [3:0]           layer,
  input  logic [$clog2(N)-1:0] rd_idx,
  output coef_t                rd_coef,
  output logic                 rd_par_ok
);
  localparam int unsigned AB = $clog2(N);
  localparam int unsigned TB = AB - 1;

  // controller
  logic          computing, dir, res_b, err;
  logic [AB-1:0] ld_idx, addr_u, addr_v;
  logic [TB-1:0] tw_ld_idx, tw_idx;

  sequence_counter u_seq (
    .clk, .rst, .clr,
    .coef_valid, .coef_ready, .ld_idx,
    .tw_valid, .tw_ready, .tw_ld_idx,
    .err, .computing, .addr_u, .addr_v, .tw_idx, .dir, .layer,
    .res_b, .done, .restart
  );

  // input protection: parity for coefficients, Hamming bits for twiddles
  logic          in_par;
  logic [HP-1:0] in_chk;
  parity_gen #(.W(CW)) u_in_par (.d(coef_in), .p(in_par));
  h_compute            u_in_ham (.d(tw_in),   .c(in_chk));

  // twiddle bank
  htw_t tw_rd;
  twiddle_bank u_twb (
    .clk, .rst,
    .we(tw_valid && tw_ready), .wa(tw_ld_idx), .wd('{chk: in_chk, val: tw_in}),
    .ra(tw_idx), .rd(tw_rd)
  );

  // coefficient banks A and B
  pcoef_t a_rd0, a_rd1, b_rd0, b_rd1;
  pcoef_t u_op, v_op, bf_a, bf_b;
  logic   rst_1, rst_2, wr_ok, out_b, tw_fixed_c, tw_err_c;
  logic [AB-1:0] ra0;

  assign out_b = computing ? ~dir : res_b;    // bank holding the newest data
  assign ra0   = computing ? addr_u : rd_idx;
  assign wr_ok = computing && !err;

  coef_bank u_bank_a (
    .clk, .rst,
    .ra0(ra0), .rd0(a_rd0), .ra1(addr_v), .rd1(a_rd1),
    .we0((coef_valid && coef_ready) || (wr_ok && dir)),
    .wa0(coef_ready ? ld_idx : addr_u),
    .wd0(coef_ready ? pcoef_t'{par: in_par, val: coef_in} : bf_a),
    .we1(wr_ok && dir), .wa1(addr_v), .wd1(bf_b)
  );

  coef_bank u_bank_b (
    .clk, .rst,
    .ra0(ra0), .rd0(b_rd0), .ra1(addr_v), .rd1(b_rd1),
    .we0(wr_ok && !dir), .wa0(addr_u), .wd0(bf_a),
    .we1(wr_ok && !dir), .wa1(addr_v), .wd1(bf_b)
  );

  // routing between the banks and the core
  assign u_op = dir ? b_rd0 : a_rd0;
  assign v_op = dir ? b_rd1 : a_rd1;

  er_butterfly_core u_bf (
    .u(u_op), .v(v_op), .w(tw_rd),
    .a(bf_a), .b(bf_b),
    .rst_1, .rst_2, .tw_err(tw_err_c), .tw_fixed(tw_fixed_c)
  );

  assign err      = computing && (rst_1 || rst_2);
  assign tw_fixed = computing && tw_fixed_c;
  assign tw_err   = computing && tw_err_c;

  // readout
  pcoef_t res;
  logic   res_p;
  assign res = out_b ? b_rd0 : a_rd0;
  parity_gen #(.W(CW)) u_out_par (.d(res.val), .p(res_p));
  assign rd_coef   = res.val;
  assign rd_par_ok = (res_p == res.par);
endmodule
