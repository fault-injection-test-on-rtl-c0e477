// tb_compare: exhaustive check of the golden/CUT comparator over all 16
// combinations of the two 2-bit output words.
module tb_compare;
  import fit_pkg::*;

  c17_out_t golden, cut;
  logic     match;
  int checks = 0, failures = 0;

  compare dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {golden, cut} = 4'(v);
      #1;
      checks++;
      if (match !== (golden.n22 == cut.n22 && golden.n23 == cut.n23)) begin
        failures++;
        $display("golden=%b cut=%b match=%b", golden, cut, match);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_compare
