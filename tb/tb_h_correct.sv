// tb_h_correct: single-error correction over every twiddle word and bit.
//
// For each 12-bit value the reference check bits are formed, then the code
// word is read back unchanged and with each of its 17 bits flipped in turn.
// The corrected data must always equal the original; err must be set exactly
// when a bit was flipped, and fixed exactly when that bit was a data bit.
module tb_h_correct;
  import ntt_pkg::*;
  coef_t         d, q;
  logic [HP-1:0] c_rd, c_new;
  logic          err, fixed;
  int checks = 0, failures = 0;

  h_compute u_gen (.d(d), .c(c_new));
  h_correct dut (.d, .c_rd, .c_new, .q, .err, .fixed);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      for (int f = -1; f < int'(CW + HP); f++) begin
        d    = coef_t'(i);
        c_rd = ntt_ref_pkg::ham_chk(coef_t'(i));
        if (f >= 0 && f < int'(CW)) d[f] = ~d[f];
        if (f >= int'(CW))    c_rd[f - int'(CW)] = ~c_rd[f - int'(CW)];
        #1;
        checks++;
        if (q != coef_t'(i) || err != (f >= 0) || fixed != (f >= 0 && f < int'(CW))) begin
          failures++;
          if (failures < 10) $display("FAIL: d=%03h flip=%0d q=%03h err=%b fixed=%b", i, f, q, err, fixed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
