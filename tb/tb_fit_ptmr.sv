// tb_fit_ptmr: runs the Partial TMR fault injection test for all 128
// settings of the seven switches (N3, N6, over6, under3, under6, E0, E1).
// For each, an independent model of the three branches and the vote gives
// the first mismatching vector of the N1,N2,N7 sweep, or none; the test must
// then fail on exactly that vector, or pass 8 clocks after start. The
// per-branch outputs and the live match are checked on every vector. With
// the five input switches high, only E0 = E1 = 0 passes.
module tb_fit_ptmr;
  import fit_pkg::*;
  import c17_ref_pkg::*;

  logic       clk = 1'b0;
  logic       reset, start, again;
  logic       sw_n3, sw_n6, over6, under3, under6;
  logic [1:0] e;
  logic       match, running, pass, fail;
  c17_out_t   golden_out, orig_out, over_out, under_out;
  logic [2:0] iv;
  int checks = 0, failures = 0, n_pass = 0, n_fail = 0, n_masked = 0;

  fit_ptmr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: sw=%b%b%b%b%b e=%b iv=%03b pass=%b fail=%b", what,
               sw_n3, sw_n6, over6, under3, under6, e, iv, pass, fail);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    @(negedge clk);
  endtask

  // Reference branches for vector v = {N1,N2,N7}.
  function automatic logic [7:0] model(input int v);
    logic n1, n2, n7;
    logic [1:0] g, o, ov, un, err;
    {n1, n2, n7} = 3'(v);
    err = {e[0], e[1]};
    g   = c17_ref(n1, n2, sw_n3, sw_n6, n7);
    o   = g ^ err;
    ov  = c17_ref(n1, n2, sw_n3, over6, n7) ^ err;
    un  = c17_ref(n1, n2, under3, under6, n7) ^ err;
    return {g, o, ov, un};
  endfunction

  function automatic logic vote_ok(input int v);
    logic n1, n2, n7;
    logic [1:0] g, o, ov, un, err;
    {n1, n2, n7} = 3'(v);
    err = {e[0], e[1]};
    g   = c17_ref(n1, n2, sw_n3, sw_n6, n7);
    o   = g ^ err;
    ov  = c17_ref(n1, n2, sw_n3, over6, n7) ^ err;
    un  = c17_ref(n1, n2, under3, under6, n7) ^ err;
    return {maj_ref(o[1], ov[1], un[1]), maj_ref(o[0], ov[0], un[0])} == g;
  endfunction

  initial begin
    int n, first_bad;
    logic any_branch_wrong;
    reset = 1'b1; start = 1'b0; again = 1'b0;
    {sw_n3, sw_n6, over6, under3, under6, e} = '0;
    @(negedge clk);
    tick();
    for (int s = 0; s < 128; s++) begin
      {e, sw_n3, sw_n6, over6, under3, under6} = 7'(s);
      first_bad = -1;
      any_branch_wrong = 1'b0;
      for (int v = 7; v >= 0; v--) if (!vote_ok(v)) first_bad = v;
      reset = 1'b1;
      tick();
      reset = 1'b0;
      start = 1'b1;
      tick();
      start = 1'b0;
      n = 0;
      while (running && n < 100) begin
        check("branch outputs", {golden_out, orig_out, over_out, under_out} == model(int'(iv)));
        check("live match", match == vote_ok(int'(iv)));
        if (orig_out != golden_out || over_out != golden_out || under_out != golden_out)
          any_branch_wrong = 1'b1;
        tick();
        n++;
      end
      if (first_bad < 0) begin
        check("pass expected", pass && !fail && n == 8);
        n_pass++;
        if (any_branch_wrong) n_masked++;
      end else begin
        check("fail expected", fail && !pass && int'(iv) == first_bad && n == first_bad + 1);
        n_fail++;
      end
      if (sw_n3 && sw_n6 && over6 && under3 && under6)
        check("protected setting", pass == (e == 2'b00));
    end
    $display("Partial TMR: %0d settings pass (%0d with a masked branch error), %0d fail",
             n_pass, n_masked, n_fail);
    checks++;
    if (n_masked == 0 || n_fail == 0) begin
      failures++;
      $display("FAIL: masking or failing never seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_fit_ptmr
