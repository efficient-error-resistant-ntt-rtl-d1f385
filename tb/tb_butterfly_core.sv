// tb_butterfly_core: random and corner tests of the modular butterfly.
//
// For u, v, w below q, a must equal (u + v*w) mod q and b (u - v*w) mod q,
// computed here with 64-bit integers and %.
module tb_butterfly_core;
  import ntt_pkg::*;
  coef_t u, v, w, a, b;
  int checks = 0, failures = 0;

  butterfly_core dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int iu, int iv, int iw);
    longint t, ea, eb;
    u = coef_t'(iu); v = coef_t'(iv); w = coef_t'(iw);
    #1;
    t  = (longint'(iv) * iw) % Q;
    ea = (iu + t) % Q;
    eb = (iu - t + Q) % Q;
    checks++;
    if (longint'(a) != ea || longint'(b) != eb) begin
      failures++;
      if (failures < 10) $display("FAIL: u=%0d v=%0d w=%0d got %0d %0d exp %0d %0d", iu, iv, iw, a, b, ea, eb);
    end
  endtask

  initial begin
    int c [5] = '{0, 1, 2, Q - 2, Q - 1};
    foreach (c[i]) foreach (c[j]) foreach (c[k]) one(c[i], c[j], c[k]);
    for (int i = 0; i < 200000; i++)
      one($urandom_range(0, Q - 1), $urandom_range(0, Q - 1), $urandom_range(0, Q - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
