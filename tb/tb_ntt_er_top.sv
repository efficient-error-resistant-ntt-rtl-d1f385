// tb_ntt_er_top: end-to-end test of the error-resistant NTT at full size.
//
// Each run loads 256 random coefficients and the 128 Kyber twiddle factors,
// waits for done and compares all 256 outputs with a reference NTT. It
// checks that loading takes 256 + 128 accepted words and the computation
// exactly 7 * 128 = 896 cycles. Runs exercise every protection mechanism by
// flipping register bits behind the design's back (single event upsets):
//   run 0  no upset;
//   run 1  upsets in twiddle data bits and in a twiddle check bit: the
//          result must still be exact, with corrections counted;
//   run 2  upset in bank A while layer 1 reads it: rst_1/rst_2 must abort
//          the NTT with a restart, after which a reload gives the right
//          result;
//   run 3  upset in bank B during layer 2: restart again (the other
//          ping-pong direction);
//   run 4  upset in the result bank after done: the readout parity flag
//          must drop for that coefficient only;
//   runs 5-9  further random polynomials without upsets.
// Each mechanism (ping-pong in both directions, twiddle correction, check-bit
// syndrome, restart, clr, readout parity) is counted and must occur.
module tb_ntt_er_top;
  import ntt_pkg::*;
  import ntt_ref_pkg::poly_t;

  logic       clk = 0, rst = 1, clr = 0;
  coef_t      coef_in, tw_in;
  logic       coef_valid = 0, tw_valid = 0;
  logic       coef_ready, tw_ready, done, restart, tw_fixed, tw_err;
  logic [3:0] layer;
  logic [7:0] rd_idx = '0;
  coef_t      rd_coef;
  logic       rd_par_ok;

  ntt_er_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fixed = 0, n_syn = 0, n_restart = 0, n_dir0 = 0, n_dir1 = 0, n_clr = 0, n_parflag = 0;
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (tw_fixed) n_fixed++;
    if (tw_err && !tw_fixed) n_syn++;
    if (restart) n_restart++;
    if (dut.computing && !dut.dir) n_dir0++;
    if (dut.computing &&  dut.dir) n_dir1++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Send coefficients then twiddle factors; returns the cycle of the last
  // accepted twiddle factor.
  task automatic load(input poly_t f, output int t_end);
    int nc = 0, nt = 0;
    @(negedge clk);
    while (nc < N) begin
      coef_in = coef_t'(f[nc]); coef_valid = ($urandom_range(0, 7) != 0);
      @(posedge clk);
      if (coef_valid && coef_ready) nc++;
      @(negedge clk);
    end
    coef_valid = 0;
    while (nt < N / 2) begin
      tw_in = coef_t'(ntt_ref_pkg::zeta(nt)); tw_valid = 1;
      @(posedge clk);
      if (tw_valid && tw_ready) nt++;
      @(negedge clk);
    end
    tw_valid = 0;
    t_end = cyc;
    check(nc == N && nt == N / 2, "load counts");
  endtask

  task automatic wait_done(input int t0, output bit ok_done);
    int t = 0;
    ok_done = 0;
    while (!done && !restart && t < 2000) begin @(posedge clk); t++; end
    if (done) begin
      ok_done = 1;
      check(cyc - t0 == 7 * N / 2, $sformatf("compute took %0d cycles", cyc - t0));
    end
  endtask

  task automatic compare(input poly_t exp);
    int bad = 0;
    for (int i = 0; i < N; i++) begin
      rd_idx = 8'(i);
      #1;
      if (rd_coef != coef_t'(exp[i]) || !rd_par_ok) bad++;
    end
    check(bad == 0, $sformatf("%0d output coefficients wrong", bad));
  endtask

  task automatic do_clr();
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    n_clr++;
  endtask

  poly_t f, exp;
  int    t0;
  bit    ok;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;

    for (int run = 0; run < 10; run++) begin
      for (int i = 0; i < N; i++) f[i] = $urandom_range(0, Q - 1);
      if (run == 0) begin f[0] = Q - 1; f[128] = Q - 1; end
      exp = ntt_ref_pkg::ntt(f);
      if (run > 0) do_clr();
      load(f, t0);

      case (run)
        1: begin
          // twiddles used in layers 1, 3 and 7; one data bit each, one check bit
          dut.u_twb.regs[1].val[0]  = ~dut.u_twb.regs[1].val[0];
          dut.u_twb.regs[5].val[11] = ~dut.u_twb.regs[5].val[11];
          dut.u_twb.regs[100].val[6] = ~dut.u_twb.regs[100].val[6];
          dut.u_twb.regs[33].chk[2] = ~dut.u_twb.regs[33].chk[2];
        end
        2: begin
          // bank A index 200 is read by layer 1 at butterfly 72
          dut.u_bank_a.regs[200].val[4] = ~dut.u_bank_a.regs[200].val[4];
          wait_done(t0, ok);
          check(!ok && restart, "upset in bank A must restart");
          @(negedge clk);
          check(coef_ready, "restart returns to coefficient loading");
          load(f, t0);
        end
        3: begin
          // wait until layer 2 runs, then hit bank B
          while (layer != 4'd2) @(posedge clk);
          @(negedge clk);
          dut.u_bank_b.regs[250].par = ~dut.u_bank_b.regs[250].par;
          wait_done(t0, ok);
          check(!ok && restart, "upset in bank B must restart");
          load(f, t0);
        end
        default: ;
      endcase

      wait_done(t0, ok);
      check(ok, $sformatf("run %0d finished", run));
      if (run == 4) begin
        dut.u_bank_b.regs[17].val[9] = ~dut.u_bank_b.regs[17].val[9];
        rd_idx = 8'd17; #1;
        check(!rd_par_ok, "readout parity flags the upset");
        if (!rd_par_ok) n_parflag++;
        rd_idx = 8'd18; #1;
        check(rd_par_ok && rd_coef == coef_t'(exp[18]), "neighbour unaffected");
      end else begin
        compare(exp);
      end
    end

    check(n_fixed >= 3,  $sformatf("twiddle corrections seen: %0d", n_fixed));
    check(n_syn > 0,     $sformatf("check-bit syndromes seen: %0d", n_syn));
    check(n_restart == 2, $sformatf("restarts seen: %0d", n_restart));
    check(n_dir0 > 0 && n_dir1 > 0, "both ping-pong directions used");
    check(n_clr > 0 && n_parflag > 0, "clr and readout parity flag used");
    $display("mechanisms: fixed=%0d syndrome=%0d restart=%0d dirA->B=%0d dirB->A=%0d clr=%0d parflag=%0d",
             n_fixed, n_syn, n_restart, n_dir0, n_dir1, n_clr, n_parflag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
