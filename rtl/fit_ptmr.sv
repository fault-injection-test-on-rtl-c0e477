// fit_ptmr: fault injection test system for the Partial-TMR-protected C17.
//
// The Partial TMR only guarantees agreement with C17 where its approximations
// hold, so N3 and N6 come from switches (SW2, SW3) and are set high for the
// test, as are the replacement inputs over6, under3 and under6 (SW5..SW7).
// The test input vector controller sweeps the remaining inputs {N1,N2,N7}
// (iv[2] = N1, iv[1] = N2, iv[0] = N7), one vector per clock. Each vector
// goes to the golden C17 (golden1) and to ptmr_cut, whose error modules are
// switched by e[0] (E0, SW8) and e[1] (E1, SW9). match is the live pass
// indication (LED0 on the board); golden_out, orig_out, over_out and
// under_out are the module outputs shown on LED1..LED8. tiv stops with pass
// after the 8th matching vector or with fail on the first mismatch.
// Timing: pass rises 8 clocks after start is sampled. Sweeping three inputs
// with the tiv is this design's reading of the described setup.
module fit_ptmr
  import fit_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       start,
  input  logic       again,
  input  logic       sw_n3,
  input  logic       sw_n6,
  input  logic       over6,
  input  logic       under3,
  input  logic       under6,
  input  logic [1:0] e,
  output logic       match,
  output c17_out_t   golden_out,
  output c17_out_t   orig_out,
  output c17_out_t   over_out,
  output c17_out_t   under_out,
  output logic [2:0] iv,
  output logic       running,
  output logic       pass,
  output logic       fail
);

  c17_in_t  vec;
  c17_out_t cut;

  tiv #(.WIDTH(3)) u_tiv (
    .clk(clk), .reset(reset), .start(start), .again(again), .match(match),
    .iv(iv), .running(running), .pass(pass), .fail(fail)
  );

  always_comb begin
    vec.n1 = iv[2];
    vec.n2 = iv[1];
    vec.n3 = sw_n3;
    vec.n6 = sw_n6;
    vec.n7 = iv[0];
  end

  c17 u_golden1 (
    .n1(vec.n1), .n2(vec.n2), .n3(vec.n3), .n6(vec.n6), .n7(vec.n7),
    .n22(golden_out.n22), .n23(golden_out.n23)
  );

  ptmr_cut u_cut (
    .iv(vec), .over6(over6), .under3(under3), .under6(under6), .e(e),
    .out(cut), .orig_out(orig_out), .over_out(over_out), .under_out(under_out)
  );

  compare u_cmp (.golden(golden_out), .cut(cut), .match(match));

endmodule : fit_ptmr
