// tb_fit_top: end-to-end test of both fault injection systems at their
// default sizes, run concurrently on the shared clock.
//
// TMR side: all eight fault-switch settings; settings with at most one
// fault must pass after 32 vectors, the others must fail on vector 0. This
// is the 256-case experiment (8 settings x 32 vectors); 50% of it passes.
// Partial TMR side: with N3, N6, over6, under3, under6 high, the four
// settings of E0/E1 (only E0 = E1 = 0 passes), then N3 = 0 with the
// approximations still high, where the under-approximate branch is wrong and
// the vote masks it, and N6 = 0 with both E off, where two branches are
// wrong and the test fails on the second vector.
// Each mechanism is counted: start, sweep pass, sweep fail, again, reset,
// fault masked by the TMR voter, fault not masked, approximation error
// masked by the Partial TMR vote, error-input fail. One that never happens
// counts as a failure.
module tb_fit_top;
  import fit_pkg::*;
  import c17_ref_pkg::*;

  logic       clk = 1'b0;
  logic       tmr_reset, tmr_start, tmr_again;
  logic [2:0] tmr_p;
  logic       tmr_n22, tmr_n23, tmr_running, tmr_pass, tmr_fail;
  logic [4:0] tmr_i_cut;
  logic       ptmr_reset, ptmr_start, ptmr_again;
  logic       ptmr_sw_n3, ptmr_sw_n6, ptmr_over6, ptmr_under3, ptmr_under6;
  logic [1:0] ptmr_e;
  logic       ptmr_match, ptmr_running, ptmr_pass, ptmr_fail;
  c17_out_t   ptmr_golden_out, ptmr_orig_out, ptmr_over_out, ptmr_under_out;
  logic [2:0] ptmr_iv;

  int checks = 0, failures = 0;
  int c_start = 0, c_pass = 0, c_fail = 0, c_again = 0, c_reset = 0;
  int c_tmr_masked = 0, c_tmr_unmasked = 0, c_ptmr_masked = 0, c_ptmr_err_fail = 0;
  int tmr_cases_ok = 0;
  bit tmr_done = 0, ptmr_done = 0;

  fit_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    @(negedge clk);
  endtask

  // TMR test sequence.
  initial begin
    int n;
    logic [1:0] gold;
    logic seen_wrong_replica;
    tmr_reset = 1'b1; tmr_start = 1'b0; tmr_again = 1'b0; tmr_p = '0;
    @(negedge clk);
    tick();
    tmr_reset = 1'b0;
    for (int s = 0; s < 8; s++) begin
      tmr_p = 3'(s);
      if (s == 0) begin
        tmr_start = 1'b1; tick(); tmr_start = 1'b0; c_start++;
      end else if (s % 2 == 1) begin
        tmr_again = 1'b1; tick(); tmr_again = 1'b0; c_again++;
      end else begin
        tmr_reset = 1'b1; tick(); tmr_reset = 1'b0; c_reset++;
        check("tmr idle after reset", !tmr_running && !tmr_pass && !tmr_fail);
        tmr_start = 1'b1; tick(); tmr_start = 1'b0; c_start++;
      end
      n = 0;
      while (tmr_running && n < 100) begin
        gold = c17_ref(tmr_i_cut[4], tmr_i_cut[3], tmr_i_cut[2], tmr_i_cut[1], tmr_i_cut[0]);
        if ({tmr_n22, tmr_n23} == gold) tmr_cases_ok++;
        tick();
        n++;
      end
      if (ones3(tmr_p) <= 1) begin
        check("tmr pass", tmr_pass && n == 32);
        c_pass++;
        if (tmr_p != 0) c_tmr_masked++;
      end else begin
        check("tmr fail on vector 0", tmr_fail && n == 1 && tmr_i_cut == 0);
        c_fail++;
        c_tmr_unmasked++;
      end
    end
    check("tmr 128 of 256 cases correct", tmr_cases_ok == 128);
    $display("TMR: %0d of 256 switch/vector cases correct (%0d%%)", tmr_cases_ok,
             tmr_cases_ok * 100 / 256);
    tmr_done = 1;
  end

  // Partial TMR test sequence.
  task automatic ptmr_run(input logic expect_pass, input int expect_n,
                          output logic branch_wrong);
    int n = 0;
    branch_wrong = 1'b0;
    ptmr_start = 1'b1; tick(); ptmr_start = 1'b0; c_start++;
    while (ptmr_running && n < 100) begin
      if (ptmr_orig_out != ptmr_golden_out || ptmr_over_out != ptmr_golden_out ||
          ptmr_under_out != ptmr_golden_out)
        branch_wrong = 1'b1;
      tick();
      n++;
    end
    $display("ptmr run: sw=%b%b e=%b n=%0d pass=%b fail=%b iv=%b", ptmr_sw_n3, ptmr_sw_n6, ptmr_e, n, ptmr_pass, ptmr_fail, ptmr_iv);
    check("ptmr result", expect_pass ? (ptmr_pass && n == 8)
                                     : (ptmr_fail && n == expect_n));
    if (ptmr_pass) c_pass++;
    if (ptmr_fail) c_fail++;
    ptmr_reset = 1'b1; tick(); ptmr_reset = 1'b0; c_reset++;
  endtask

  initial begin
    logic bw;
    ptmr_reset = 1'b1; ptmr_start = 1'b0; ptmr_again = 1'b0;
    {ptmr_sw_n3, ptmr_sw_n6, ptmr_over6, ptmr_under3, ptmr_under6} = 5'b11111;
    ptmr_e = 2'b00;
    @(negedge clk);
    tick();
    ptmr_reset = 1'b0;
    for (int e = 0; e < 4; e++) begin
      ptmr_e = 2'(e);
      // Any raised error input inverts that output in all three branches,
      // so the sweep fails on its first vector.
      ptmr_run(e == 0, 1, bw);
      if (e != 0) c_ptmr_err_fail++;
    end
    ptmr_e = 2'b00;
    // N3 = 0: the under-approximation (N3 forced high) is wrong on some
    // vectors, but the other two branches outvote it.
    ptmr_sw_n3 = 1'b0;
    ptmr_run(1'b1, 8, bw);
    check("under branch wrong yet masked", bw);
    if (bw) c_ptmr_masked++;
    // N6 = 0 with N3 = 1: both approximations assume N6 = 1 and agree with
    // each other but not with C17 once N7 = 1 ({N1,N2,N7} = 001: C17 gives
    // N23 = 1, both approximations 0), so the vote is wrong and the sweep
    // stops on the second vector.
    ptmr_sw_n3 = 1'b1;
    ptmr_sw_n6 = 1'b0;
    ptmr_run(1'b0, 2, bw);
    ptmr_done = 1;
  end

  initial begin
    wait (tmr_done && ptmr_done);
    check("start seen",            c_start > 0);
    check("pass seen",             c_pass > 0);
    check("fail seen",             c_fail > 0);
    check("again seen",            c_again > 0);
    check("reset seen",            c_reset > 0);
    check("TMR fault masked",      c_tmr_masked > 0);
    check("TMR fault not masked",  c_tmr_unmasked > 0);
    check("PTMR approx masked",    c_ptmr_masked > 0);
    check("PTMR error fail",       c_ptmr_err_fail > 0);
    $display("mechanisms: start=%0d pass=%0d fail=%0d again=%0d reset=%0d tmr_masked=%0d tmr_unmasked=%0d ptmr_masked=%0d ptmr_err_fail=%0d",
             c_start, c_pass, c_fail, c_again, c_reset, c_tmr_masked, c_tmr_unmasked,
             c_ptmr_masked, c_ptmr_err_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_fit_top
