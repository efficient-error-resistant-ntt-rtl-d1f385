// tb_h_compute: exhaustive test of the Hamming check-bit generator.
//
// All 4096 12-bit values are compared with a reference that builds the
// 17-position code word and counts ones per check group.
module tb_h_compute;
  import ntt_pkg::*;
  coef_t         d;
  logic [HP-1:0] c;
  int checks = 0, failures = 0;

  h_compute dut (.d, .c);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      d = coef_t'(i);
      #1;
      checks++;
      if (c !== ntt_ref_pkg::ham_chk(d)) begin
        failures++;
        if (failures < 10) $display("FAIL: d=%03h c=%02h exp %02h", d, c, ntt_ref_pkg::ham_chk(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
