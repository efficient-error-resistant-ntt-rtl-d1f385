// tb_coef_bank: register bank reads and writes against a model array.
//
// After reset every register must read zero. Then random writes on both
// write ports (distinct addresses) and random reads on both read ports are
// checked against a plain array updated at each clock edge.
module tb_coef_bank;
  import ntt_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] ra0, ra1, wa0, wa1;
  pcoef_t rd0, rd1, wd0, wd1;
  logic we0 = 0, we1 = 0;
  pcoef_t model [256];
  int checks = 0, failures = 0;

  coef_bank dut (.*);

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
    for (int i = 0; i < 256; i++) begin
      model[i] = '0;
      ra0 = 8'(i); ra1 = 8'(255 - i);
      #1;
      checks++;
      if (rd0 != '0 || rd1 != '0) failures++;
    end
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      we0 = 1'($urandom); we1 = 1'($urandom);
      wa0 = 8'($urandom); wa1 = wa0 + 8'($urandom_range(1, 255));
      wd0 = pcoef_t'($urandom); wd1 = pcoef_t'($urandom);
      ra0 = 8'($urandom); ra1 = 8'($urandom);
      #1;
      checks++;
      if (rd0 != model[ra0] || rd1 != model[ra1]) begin
        failures++;
        if (failures < 10) $display("FAIL: read %0d/%0d", ra0, ra1);
      end
      @(posedge clk);
      if (we0) model[wa0] = wd0;
      if (we1) model[wa1] = wd1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
