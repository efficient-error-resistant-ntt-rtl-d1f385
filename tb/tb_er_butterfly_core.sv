// tb_er_butterfly_core: error-resistant butterfly with injected upsets.
//
// Random operands are presented with correct parity and Hamming bits, and
// in some trials one bit of u, v or w (value, parity or check bit) is
// flipped. Expected: a and b equal the exact butterfly of the original
// values whenever u and v are intact (a twiddle upset is corrected), with
// parity bits matching the outputs; rst_1 is set exactly when u is
// corrupted and rst_2 exactly when v is; tw_err and tw_fixed follow the
// twiddle upset.
module tb_er_butterfly_core;
  import ntt_pkg::*;
  pcoef_t u, v, a, b;
  htw_t   w;
  logic   rst_1, rst_2, tw_err, tw_fixed;
  int checks = 0, failures = 0;
  int n_r1 = 0, n_r2 = 0, n_fix = 0;

  er_butterfly_core dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100000; i++) begin
      int iu, iv, iw, kind, bitn, wbit;
      longint t, ea, eb;
      bit ok;
      iu   = $urandom_range(0, Q - 1);
      iv   = $urandom_range(0, Q - 1);
      iw   = $urandom_range(0, Q - 1);
      kind = $urandom_range(0, 3);          // 0 none, 1 u, 2 v, 3 w
      bitn = $urandom_range(0, 12);
      wbit = $urandom_range(0, 16);
      u = '{par: ^coef_t'(iu), val: coef_t'(iu)};
      v = '{par: ^coef_t'(iv), val: coef_t'(iv)};
      w = '{chk: ntt_ref_pkg::ham_chk(coef_t'(iw)), val: coef_t'(iw)};
      if (kind == 1) u[bitn] = ~u[bitn];
      if (kind == 2) v[bitn] = ~v[bitn];
      if (kind == 3) w[wbit] = ~w[wbit];
      #1;
      t  = (longint'(iv) * iw) % Q;
      ea = (iu + t) % Q;
      eb = (iu - t + Q) % Q;
      ok = (rst_1 == (kind == 1)) && (rst_2 == (kind == 2)) &&
           (tw_err == (kind == 3)) && (tw_fixed == (kind == 3 && wbit < int'(CW))) &&
           (a.par == ^a.val) && (b.par == ^b.val);
      if (kind == 0 || kind == 3 || bitn == 12) ok = ok && longint'(a.val) == ea && longint'(b.val) == eb;
      n_r1 += rst_1; n_r2 += rst_2; n_fix += tw_fixed;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL: kind=%0d bit=%0d wbit=%0d a=%0d b=%0d exp %0d %0d r1=%b r2=%b",
                                    kind, bitn, wbit, a.val, b.val, ea, eb, rst_1, rst_2);
      end
    end
    checks++;
    if (n_r1 == 0 || n_r2 == 0 || n_fix == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
