// tb_seu_campaign: random single-event-upset campaign on the full NTT.
//
// Each of 60 transforms gets one bit flip in a random register (bank A,
// bank B or the twiddle bank, any stored bit including parity and check
// bits) at a random cycle of the computation. The outcome must be one of:
//   * exact result (the twiddle upset was corrected, or the flipped
//     coefficient was overwritten before anyone read it);
//   * a restart pulse (parity caught it), after which a reload gives the
//     exact result;
//   * an exact result except at coefficients whose rd_par_ok flag is low
//     (the upset hit the result bank after its last write).
// Anything else is silent corruption and counts as a failure. Each outcome
// class is counted; every transform must also take exactly 896 cycles.
module tb_seu_campaign;
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

  int checks = 0, failures = 0, cyc = 0;
  int n_clean = 0, n_restart = 0, n_flagged = 0, n_tw = 0;

  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic load(input poly_t f, output int t_end);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      coef_in = coef_t'(f[i]); coef_valid = 1;
      @(negedge clk);
    end
    coef_valid = 0;
    for (int i = 0; i < N / 2; i++) begin
      tw_in = coef_t'(ntt_ref_pkg::zeta(i)); tw_valid = 1;
      @(negedge clk);
    end
    tw_valid = 0;
    t_end = cyc;
  endtask

  poly_t f, exp;
  int    t0, when, target, idx, bitn, bad, flagged;
  bit    got_restart;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 60; run++) begin
      for (int i = 0; i < N; i++) f[i] = $urandom_range(0, Q - 1);
      exp = ntt_ref_pkg::ntt(f);
      if (run > 0) begin @(negedge clk); clr = 1; @(negedge clk); clr = 0; end
      load(f, t0);
      when   = $urandom_range(0, 7 * N / 2 - 1);
      target = $urandom_range(0, 2);
      repeat (when) @(negedge clk);
      case (target)
        0: begin idx = $urandom_range(0, N - 1); bitn = $urandom_range(0, 12);
                 dut.u_bank_a.regs[idx][bitn] = ~dut.u_bank_a.regs[idx][bitn]; end
        1: begin idx = $urandom_range(0, N - 1); bitn = $urandom_range(0, 12);
                 dut.u_bank_b.regs[idx][bitn] = ~dut.u_bank_b.regs[idx][bitn]; end
        default: begin idx = $urandom_range(0, N / 2 - 1); bitn = $urandom_range(0, 16);
                 dut.u_twb.regs[idx][bitn] = ~dut.u_twb.regs[idx][bitn]; n_tw++; end
      endcase
      got_restart = 0;
      while (!done) begin
        @(posedge clk);
        if (restart) got_restart = 1;
        if (restart) break;
      end
      if (got_restart) begin
        n_restart++;
        load(f, t0);
        while (!done) @(posedge clk);
      end
      check(cyc - t0 == 7 * N / 2, $sformatf("run %0d: compute took %0d cycles", run, cyc - t0));
      bad = 0; flagged = 0;
      for (int i = 0; i < N; i++) begin
        rd_idx = 8'(i);
        #1;
        if (!rd_par_ok) flagged++;
        else if (rd_coef != coef_t'(exp[i])) bad++;
      end
      check(bad == 0, $sformatf("run %0d: %0d silently wrong outputs (target %0d idx %0d bit %0d at %0d)",
                                run, bad, target, idx, bitn, when));
      if (flagged > 0) n_flagged++;
      else if (!got_restart) n_clean++;
    end
    check(n_clean > 0 && n_restart > 0 && n_tw > 0, "outcome classes seen");
    $display("outcomes: exact=%0d restart=%0d flagged_at_readout=%0d (twiddle upsets %0d)",
             n_clean, n_restart, n_flagged, n_tw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
