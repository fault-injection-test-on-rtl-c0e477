// tb_tmr_cut: drives all 256 combinations of the five C17 inputs and the
// three fault controls. With at most one replica faulted the voted output
// must equal C17; with two or three faulted both outputs are inverted (every
// faulted replica inverts both bits). It also counts the combinations whose
// output is correct: half of the 256, four of the eight fault settings.
module tb_tmr_cut;
  import fit_pkg::*;
  import c17_ref_pkg::*;

  c17_in_t    iv;
  logic [2:0] p;
  c17_out_t   out;
  int checks = 0, failures = 0, correct = 0;

  tmr_cut dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int v = 0; v < 256; v++) begin
      {p, iv} = 8'(v);
      #1;
      exp = c17_ref(iv.n1, iv.n2, iv.n3, iv.n6, iv.n7);
      if (ones3(p) >= 2) exp = ~exp;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("p=%03b iv=%05b out=%b exp=%b", p, iv, out, exp);
      end
      if (out == c17_ref(iv.n1, iv.n2, iv.n3, iv.n6, iv.n7)) correct++;
    end
    checks++;
    if (correct != 128) begin
      failures++;
      $display("correct combinations %0d, expected 128", correct);
    end
    $display("TMR correct for %0d of 256 combinations", correct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_tmr_cut
