// tb_fault_module: checks that the error module inverts every bit while
// enabled and passes the value unchanged while disabled, for a 1-bit and a
// 4-bit instance.
module tb_fault_module;
  logic       en1, en4;
  logic       d1, q1;
  logic [3:0] d4, q4;
  int checks = 0, failures = 0;

  fault_module          dut1 (.en(en1), .d(d1), .q(q1));
  fault_module #(.WIDTH(4)) dut4 (.en(en4), .d(d4), .q(q4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {en1, d1} = 2'(v);
      #1;
      checks++;
      if (q1 !== (en1 ? !d1 : d1)) begin
        failures++;
        $display("1-bit en=%b d=%b q=%b", en1, d1, q1);
      end
    end
    for (int v = 0; v < 32; v++) begin
      {en4, d4} = 5'(v);
      #1;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (q4[b] !== (en4 ? !d4[b] : d4[b])) begin
          failures++;
          $display("4-bit en=%b d=%b q=%b bit %0d", en4, d4, q4, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_fault_module
