// fit_top: the two fault injection test systems side by side.
//
// fit_tmr tests the fully triplicated C17 against a golden C17 over all 32
// input vectors with three fault switches; fit_ptmr tests the Partial TMR
// (original, over- and under-approximate C17 branches) over the vectors with
// N3 = N6 = 1 with two error switches. They share only the clock; each has
// its own reset, start, again, fault controls and results, prefixed tmr_ and
// ptmr_. Putting both on one clock is this design's choice.
module fit_top
  import fit_pkg::*;
(
  input  logic       clk,
  // TMR test system
  input  logic       tmr_reset,
  input  logic       tmr_start,
  input  logic       tmr_again,
  input  logic [2:0] tmr_p,
  output logic       tmr_n22,
  output logic       tmr_n23,
  output logic [4:0] tmr_i_cut,
  output logic       tmr_running,
  output logic       tmr_pass,
  output logic       tmr_fail,
  // Partial TMR test system
  input  logic       ptmr_reset,
  input  logic       ptmr_start,
  input  logic       ptmr_again,
  input  logic       ptmr_sw_n3,
  input  logic       ptmr_sw_n6,
  input  logic       ptmr_over6,
  input  logic       ptmr_under3,
  input  logic       ptmr_under6,
  input  logic [1:0] ptmr_e,
  output logic       ptmr_match,
  output c17_out_t   ptmr_golden_out,
  output c17_out_t   ptmr_orig_out,
  output c17_out_t   ptmr_over_out,
  output c17_out_t   ptmr_under_out,
  output logic [2:0] ptmr_iv,
  output logic       ptmr_running,
  output logic       ptmr_pass,
  output logic       ptmr_fail
);

  fit_tmr u_tmr (
    .clk(clk), .reset(tmr_reset), .start(tmr_start), .again(tmr_again),
    .p(tmr_p), .n22_tmr(tmr_n22), .n23_tmr(tmr_n23), .i_cut(tmr_i_cut),
    .running(tmr_running), .pass(tmr_pass), .fail(tmr_fail)
  );

  fit_ptmr u_ptmr (
    .clk(clk), .reset(ptmr_reset), .start(ptmr_start), .again(ptmr_again),
    .sw_n3(ptmr_sw_n3), .sw_n6(ptmr_sw_n6), .over6(ptmr_over6),
    .under3(ptmr_under3), .under6(ptmr_under6), .e(ptmr_e),
    .match(ptmr_match), .golden_out(ptmr_golden_out),
    .orig_out(ptmr_orig_out), .over_out(ptmr_over_out),
    .under_out(ptmr_under_out), .iv(ptmr_iv), .running(ptmr_running),
    .pass(ptmr_pass), .fail(ptmr_fail)
  );

endmodule : fit_top
