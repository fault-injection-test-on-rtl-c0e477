// tb_c17_under: all 128 combinations of N1,N2,under3,under6,N7,E0,E1. The
// branch must equal C17 with under3/under6 in place of N3/N6, with E0/E1
// inverting N22/N23. With both replacements high and no error it must give
// the reduced form N22 = N1, N23 = 0.
module tb_c17_under;
  import c17_ref_pkg::*;

  logic n1, n2, under3, under6, n7, e0, e1, n22, n23;
  int checks = 0, failures = 0;

  c17_under dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int v = 0; v < 128; v++) begin
      {e1, e0, n1, n2, under3, under6, n7} = 7'(v);
      #1;
      exp = c17_ref(n1, n2, under3, under6, n7) ^ {e0, e1};
      checks++;
      if ({n22, n23} !== exp) begin
        failures++;
        $display("v=%07b got %b%b exp %b", v[6:0], n22, n23, exp);
      end
      if (under3 && under6 && !e0 && !e1) begin
        checks++;
        if ({n22, n23} !== {n1, 1'b0}) begin
          failures++;
          $display("reduced form differs at v=%07b", v[6:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_c17_under
