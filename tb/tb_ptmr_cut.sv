// tb_ptmr_cut: all 1024 combinations of the five inputs, the three
// replacement inputs and the two error controls. Each branch output is
// checked against its own reference and the voted output against the
// majority of the references. With over6/under3/under6 high, no error and
// N3 = N6 = 1 the voted output must equal C17 (the protected input space);
// with either error input high it must differ from C17 on that output.
module tb_ptmr_cut;
  import fit_pkg::*;
  import c17_ref_pkg::*;

  c17_in_t    iv;
  logic       over6, under3, under6;
  logic [1:0] e;
  c17_out_t   out, orig_out, over_out, under_out;
  int checks = 0, failures = 0;

  ptmr_cut dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check2(input string what, input logic [1:0] got, exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: iv=%05b r=%b%b%b e=%b got %b exp %b", what, iv, over6,
               under3, under6, e, got, exp);
    end
  endtask

  initial begin
    logic [1:0] r_orig, r_over, r_under, r_vote, gold, err;
    for (int v = 0; v < 1024; v++) begin
      {e, over6, under3, under6, iv} = 10'(v);
      #1;
      err     = {e[0], e[1]};
      gold    = c17_ref(iv.n1, iv.n2, iv.n3, iv.n6, iv.n7);
      r_orig  = gold ^ err;
      r_over  = c17_ref(iv.n1, iv.n2, iv.n3, over6, iv.n7) ^ err;
      r_under = c17_ref(iv.n1, iv.n2, under3, under6, iv.n7) ^ err;
      r_vote  = {maj_ref(r_orig[1], r_over[1], r_under[1]),
                 maj_ref(r_orig[0], r_over[0], r_under[0])};
      check2("orig",  orig_out,  r_orig);
      check2("over",  over_out,  r_over);
      check2("under", under_out, r_under);
      check2("vote",  out,       r_vote);
      if (over6 && under3 && under6 && iv.n3 && iv.n6) begin
        check2("protected", out, gold ^ err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_ptmr_cut
