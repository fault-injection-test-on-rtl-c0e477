// tb_c17: exhaustive check of the C17 netlist against a sum-of-products
// reference over all 32 input vectors.
module tb_c17;
  import c17_ref_pkg::*;

  logic n1, n2, n3, n6, n7, n22, n23;
  int checks = 0, failures = 0;

  c17 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {n1, n2, n3, n6, n7} = 5'(v);
      #1;
      checks++;
      if ({n22, n23} !== c17_ref(n1, n2, n3, n6, n7)) begin
        failures++;
        $display("mismatch v=%05b got %b%b exp %b", v[4:0], n22, n23,
                 c17_ref(n1, n2, n3, n6, n7));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_c17
