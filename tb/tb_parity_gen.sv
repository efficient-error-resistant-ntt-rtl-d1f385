// tb_parity_gen: parity of random and corner 12-bit words.
//
// The expected bit is the count of ones modulo 2.
module tb_parity_gen;
  logic [11:0] d;
  logic        p;
  int checks = 0, failures = 0;

  parity_gen dut (.d, .p);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4096; i++) begin
      d = 12'(i);
      #1;
      checks++;
      if (p != ($countones(d) % 2 == 1)) begin
        failures++;
        $display("FAIL: d=%03h p=%b", d, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
