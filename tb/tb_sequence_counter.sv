// tb_sequence_counter: phase sequence and address generation.
//
// Loading: coef_ready for exactly 256 accepted words with ld_idx counting
// 0..255 (with gaps in coef_valid), then tw_ready for 128 words. Compute:
// for 7 * 128 = 896 cycles the (addr_u, addr_v, tw_idx, dir) sequence must
// equal the one produced by the nested loops of the textbook Cooley-Tukey
// NTT, after which done rises. An err during layer 4 must pulse restart and
// return to coefficient loading; clr must do the same from DONE.
module tb_sequence_counter;
  logic       clk = 0, rst = 1, clr = 0;
  logic       coef_valid = 0, tw_valid = 0, err = 0;
  logic       coef_ready, tw_ready, computing, dir, res_b, done, restart;
  logic [7:0] ld_idx, addr_u, addr_v;
  logic [6:0] tw_ld_idx, tw_idx;
  logic [3:0] layer;
  int checks = 0, failures = 0;

  sequence_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic load();
    int nc = 0, nt = 0;
    while (nc < 256) begin
      coef_valid = 1'($urandom);
      #1;
      if (coef_valid) check(coef_ready && !tw_ready && ld_idx == 8'(nc), "coef load index");
      @(posedge clk);
      if (coef_valid) nc++;
      @(negedge clk);
    end
    coef_valid = 0;
    while (nt < 128) begin
      tw_valid = 1'($urandom);
      #1;
      if (tw_valid) check(tw_ready && !coef_ready && tw_ld_idx == 7'(nt), "twiddle load index");
      @(posedge clk);
      if (tw_valid) nt++;
      @(negedge clk);
    end
    tw_valid = 0;
  endtask

  // Runs the compute phase; if abort_layer > 0, raises err at the first
  // butterfly of that layer and expects a restart.
  task automatic run_compute(input int abort_layer);
    int k = 1, l = 1, cycles = 0;
    for (int len = 128; len >= 2; len /= 2) begin
      for (int start = 0; start < 256; start += 2 * len) begin
        for (int j = start; j < start + len; j++) begin
          #1;
          if (abort_layer == l) begin
            err = 1;
            @(posedge clk); #1;
            err = 0;
            check(restart && coef_ready && !computing, "err restarts");
            @(negedge clk);
            return;
          end
          check(computing && addr_u == 8'(j) && addr_v == 8'(j + len) &&
                tw_idx == 7'(k) && dir == (l % 2 == 0) && layer == 4'(l),
                $sformatf("layer %0d j %0d: got %0d %0d %0d", l, j, addr_u, addr_v, tw_idx));
          cycles++;
          @(negedge clk);
        end
        k++;
      end
      l++;
    end
    #1;
    check(done && !computing && res_b && cycles == 896, "done after 896 cycles");
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    load();
    run_compute(0);
    repeat (3) @(negedge clk);
    check(done, "done holds");
    clr = 1; @(negedge clk); clr = 0;
    check(coef_ready && !done, "clr returns to loading");
    load();
    run_compute(4);
    load();
    run_compute(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
