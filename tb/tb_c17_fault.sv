// tb_c17_fault: all 128 combinations of the five inputs and the two error
// controls; N22 must be C17's N22 inverted when e0 is high, N23 likewise
// with e1.
module tb_c17_fault;
  import c17_ref_pkg::*;

  logic n1, n2, n3, n6, n7, e0, e1, n22, n23;
  int checks = 0, failures = 0;

  c17_fault dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int v = 0; v < 128; v++) begin
      {e1, e0, n1, n2, n3, n6, n7} = 7'(v);
      #1;
      exp = c17_ref(n1, n2, n3, n6, n7) ^ {e0, e1};
      checks++;
      if ({n22, n23} !== exp) begin
        failures++;
        $display("v=%07b got %b%b exp %b", v[6:0], n22, n23, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_c17_fault
