// tb_barrett_reduce: exhaustive test of the Barrett reducer.
//
// Every 24-bit input a is applied and the output compared with a % 3329.
module tb_barrett_reduce;
  logic [23:0] a;
  logic [11:0] z;
  int checks = 0, failures = 0;

  barrett_reduce dut (.a, .z);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 24); i++) begin
      a = 24'(i);
      #1;
      checks++;
      if (int'(z) != i % 3329) begin
        failures++;
        if (failures < 10) $display("FAIL: a=%0d z=%0d expected %0d", i, z, i % 3329);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
