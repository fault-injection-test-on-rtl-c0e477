// tb_fit_tmr: runs the TMR fault injection test for each of the eight
// settings of the fault switches P0..P2. A setting with at most one fault
// must pass after all 32 vectors, 32 clocks after start; one with two or
// three faults must fail on the first vector (the faulted replicas invert
// both outputs) and hold it. The voted outputs are checked against the
// C17 reference on every vector. In all, 4 of 8 settings (128 of the 256
// switch-and-vector combinations) pass. The second setting is rerun with
// again instead of reset.
module tb_fit_tmr;
  import c17_ref_pkg::*;

  logic       clk = 1'b0;
  logic       reset, start, again;
  logic [2:0] p;
  logic       n22_tmr, n23_tmr, running, pass, fail;
  logic [4:0] i_cut;
  int checks = 0, failures = 0, passes = 0, vectors_ok = 0;

  fit_tmr dut (.*);

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
      $display("FAIL %s: p=%03b i_cut=%05b pass=%b fail=%b", what, p, i_cut,
               pass, fail);
    end
  endtask

  task automatic tick();
    @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    int n;
    logic [1:0] gold;
    reset = 1'b1; start = 1'b0; again = 1'b0; p = '0;
    @(negedge clk);
    tick();
    for (int s = 0; s < 8; s++) begin
      p = 3'(s);
      if (s == 1) begin
        again = 1'b1;          // rerun without reset
        tick();
        again = 1'b0;
      end else begin
        reset = 1'b1;
        tick();
        reset = 1'b0;
        start = 1'b1;
        tick();
        start = 1'b0;
      end
      n = 0;
      while (running && n < 100) begin
        gold = c17_ref(i_cut[4], i_cut[3], i_cut[2], i_cut[1], i_cut[0]);
        check("voted output", {n22_tmr, n23_tmr} == (ones3(p) >= 2 ? ~gold : gold));
        if ({n22_tmr, n23_tmr} == gold) vectors_ok++;
        tick();
        n++;
      end
      if (ones3(p) <= 1) begin
        check("pass expected", pass && !fail && n == 32);
        passes++;
      end else begin
        check("fail expected", fail && !pass && n == 1 && i_cut == 5'd0);
        repeat (3) begin
          tick();
          check("fail held", fail && i_cut == 5'd0);
        end
      end
    end
    checks++;
    if (passes != 4 || vectors_ok != 128) begin
      failures++;
      $display("FAIL counts: passes=%0d vectors_ok=%0d", passes, vectors_ok);
    end
    $display("TMR: %0d of 8 fault settings pass (%0d%%), %0d of 128 tested vectors correct",
             passes, passes * 100 / 8, vectors_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_fit_tmr
