// tb_twiddle_bank: twiddle register bank against a model array.
//
// After reset every register reads zero; random writes and reads are then
// compared with a plain array updated at each clock edge.
module tb_twiddle_bank;
  import ntt_pkg::*;
  logic clk = 0, rst = 1, we = 0;
  logic [6:0] wa, ra;
  htw_t wd, rd;
  htw_t model [128];
  int checks = 0, failures = 0;

  twiddle_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 128; i++) begin
      model[i] = '0;
      ra = 7'(i);
      #1;
      checks++;
      if (rd != '0) failures++;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 7'($urandom); wd = htw_t'($urandom); ra = 7'($urandom);
      #1;
      checks++;
      if (rd != model[ra]) begin
        failures++;
        if (failures < 10) $display("FAIL: read %0d", ra);
      end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
