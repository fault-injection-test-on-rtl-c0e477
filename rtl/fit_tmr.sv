// fit_tmr: fault injection test system for the TMR-protected C17.
//
// The test input vector controller (tiv) sweeps all 32 values of
// {N1,N2,N3,N6,N7}. Each vector goes at once to the golden C17 and to the
// TMR circuit under test, whose three replicas can be corrupted by the fault
// switches p[2:0] (P0..P2). compare checks the two, and tiv stops with pass
// after the 32nd matching vector or with fail on the first mismatch, leaving
// the failing vector on i_cut. On the board, i_cut drives LEDR2..LEDR6, pass
// LEDR8 and fail LEDR9; p comes from SW7..SW9 and start from SW0.
// Timing: one vector per clock; pass rises 32 clocks after start is sampled.
// The structure is that of the described framework; the bit order of i_cut
// (N1 as MSB) is this design's choice.
module fit_tmr
  import fit_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  input  logic       again,
  input  logic [2:0] p,
  output logic       n22_tmr,
  output logic       n23_tmr,
  output logic [4:0] i_cut,
  output logic       running,
  output logic       pass,
  output logic       fail
);

  c17_in_t  vec;
  c17_out_t golden, cut;
  logic     match;

  tiv #(.WIDTH(C17_NIN)) u_tiv (
    .clk(clk), .reset(reset), .start(start), .again(again), .match(match),
    .iv(i_cut), .running(running), .pass(pass), .fail(fail)
  );

  always_comb vec = c17_in_t'(i_cut);

  c17 u_golden (
    .n1(vec.n1), .n2(vec.n2), .n3(vec.n3), .n6(vec.n6), .n7(vec.n7),
    .n22(golden.n22), .n23(golden.n23)
  );

  tmr_cut u_cut (.iv(vec), .p(p), .out(cut));

  compare u_cmp (.golden(golden), .cut(cut), .match(match));

  always_comb begin
    n22_tmr = cut.n22;
    n23_tmr = cut.n23;
  end

endmodule : fit_tmr
