// tb_voter: exhaustive check of the 1-bit majority voter and a random check
// of an 8-bit instance, against a ones-counting reference.
module tb_voter;
  import c17_ref_pkg::*;

  logic       a1, b1, c1, y1;
  logic [7:0] a8, b8, c8, y8;
  int checks = 0, failures = 0;

  voter          dut1 (.a(a1), .b(b1), .c(c1), .y(y1));
  voter #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .c(c8), .y(y8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a1, b1, c1} = 3'(v);
      #1;
      checks++;
      if (y1 !== maj_ref(a1, b1, c1)) begin
        failures++;
        $display("abc=%03b y=%b", v[2:0], y1);
      end
    end
    for (int t = 0; t < 200; t++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); c8 = 8'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (y8[i] !== maj_ref(a8[i], b8[i], c8[i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_voter
