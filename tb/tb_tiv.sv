// tb_tiv: checks the test input vector controller (5-bit default).
// A behavioural comparator makes match low on one chosen vector (or never).
// Checked: idle after reset and no action without start; the full sweep
// 0..31 in order, one vector per clock, with pass exactly 32 clocks after
// start; pass held; again restarting from 0; stop with fail on the chosen
// vector, 14 clocks after again, holding that vector; reset from RUN.
module tb_tiv;
  localparam int W = 5;

  logic         clk = 1'b0;
  logic         reset, start, again, match;
  logic [W-1:0] iv;
  logic         running, pass, fail;
  int           fail_at;
  int checks = 0, failures = 0;

  tiv #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;
  always_comb match = (fail_at < 0) || (int'(iv) != fail_at);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: iv=%0d run=%b pass=%b fail=%b", what, $time,
               iv, running, pass, fail);
    end
  endtask

  // One clock edge, then settle on the falling edge.
  task automatic tick();
    @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    int n;
    fail_at = -1;
    reset = 1'b1; start = 1'b0; again = 1'b0;
    @(negedge clk);
    tick();
    reset = 1'b0;
    repeat (4) begin
      tick();
      check("idle", iv == 0 && !running && !pass && !fail);
    end

    // Full sweep.
    start = 1'b1;
    tick();
    start = 1'b0;
    n = 0;
    check("run entered", running && iv == 0);
    while (running && n < 100) begin
      check("vector order", int'(iv) == n);
      tick();
      n++;
    end
    check("pass after 32 clocks", pass && !fail && n == 32);
    $display("sweep took %0d clocks after start", n);
    start = 1'b1;              // start is ignored outside idle
    repeat (3) begin
      tick();
      check("pass held", pass && !running && iv == W'(31));
    end
    start = 1'b0;

    // Rerun with a mismatch on vector 13.
    fail_at = 13;
    again = 1'b1;
    tick();
    again = 1'b0;
    check("again restarts", running && iv == 0);
    n = 0;
    while (running && n < 100) begin
      tick();
      n++;
    end
    check("fail on vector 13", fail && !pass && iv == W'(13) && n == 14);
    repeat (3) begin
      tick();
      check("fail held", fail && iv == W'(13));
    end

    // Reset in the middle of a run.
    fail_at = -1;
    again = 1'b1;
    tick();
    again = 1'b0;
    repeat (5) tick();
    check("running before reset", running && iv == W'(5));
    reset = 1'b1;
    tick();
    reset = 1'b0;
    check("reset to idle", !running && !pass && !fail && iv == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_tiv
