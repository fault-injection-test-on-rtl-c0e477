// ptmr_cut: C17 circuit under test protected by Partial TMR.
//
// Three branches are voted: the original C17 (c17_fault), an
// over-approximation with N6 replaced by over6 (c17_over) and an
// under-approximation with N3/N6 replaced by under3/under6 (c17_under). With
// over6, under3 and under6 high, all three agree with C17 for every vector
// with N3 = N6 = 1, which is the input space the Partial TMR protects. The
// error inputs e[0] (E0) and e[1] (E1) drive the error modules of all three
// branches, E0 on N22 and E1 on N23. Per-branch outputs are brought out for
// display. Combinational, no clock. Sharing E0/E1 across branches is how
// this design reads the branch port lists.
module ptmr_cut
  import fit_pkg::*;
(
  input  c17_in_t    iv,
  input  logic       over6,
  input  logic       under3,
  input  logic       under6,
  input  logic [1:0] e,
  output c17_out_t   out,
  output c17_out_t   orig_out,
  output c17_out_t   over_out,
  output c17_out_t   under_out
);

  c17_fault u_orig (
    .n1(iv.n1), .n2(iv.n2), .n3(iv.n3), .n6(iv.n6), .n7(iv.n7),
    .e0(e[0]), .e1(e[1]), .n22(orig_out.n22), .n23(orig_out.n23)
  );

  c17_over u_over (
    .n1(iv.n1), .n2(iv.n2), .n3(iv.n3), .over6(over6), .n7(iv.n7),
    .e0(e[0]), .e1(e[1]), .n22(over_out.n22), .n23(over_out.n23)
  );

  c17_under u_under (
    .n1(iv.n1), .n2(iv.n2), .under3(under3), .under6(under6), .n7(iv.n7),
    .e0(e[0]), .e1(e[1]), .n22(under_out.n22), .n23(under_out.n23)
  );

  voter #(.WIDTH(1)) u_vote_n22 (
    .a(orig_out.n22), .b(over_out.n22), .c(under_out.n22), .y(out.n22)
  );

  voter #(.WIDTH(1)) u_vote_n23 (
    .a(orig_out.n23), .b(over_out.n23), .c(under_out.n23), .y(out.n23)
  );

endmodule : ptmr_cut
