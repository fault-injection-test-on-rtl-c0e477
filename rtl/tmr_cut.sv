// tmr_cut: C17 circuit under test protected by full triple modular redundancy.
//
// The same input vector feeds three C17 replicas. Each replica's two outputs
// pass through its own fault module, switched by one of the controls p[0]
// (P0), p[1] (P1) and p[2] (P2). Two majority voters, one for N22 and one
// for N23, merge the three replicas. With at most one control raised the
// voted output is correct; with two or three raised it is wrong.
// Combinational, no clock. Structure as described for the TMR fault setup;
// grouping the ports into a struct and a 3-bit vector is this design's choice.
module tmr_cut
  import fit_pkg::*;
(
  input  c17_in_t    iv,
  input  logic [2:0] p,
  output c17_out_t   out
);

  c17_out_t rep   [3];   // fault-free replica outputs
  c17_out_t faulty[3];   // replica outputs after the fault modules

  for (genvar i = 0; i < 3; i++) begin : g_rep
    c17 u_c17 (
      .n1 (iv.n1), .n2 (iv.n2), .n3 (iv.n3), .n6 (iv.n6), .n7 (iv.n7),
      .n22(rep[i].n22), .n23(rep[i].n23)
    );

    fault_module #(.WIDTH(C17_NOUT)) u_err (
      .en(p[i]),
      .d (rep[i]),
      .q (faulty[i])
    );
  end

  voter #(.WIDTH(1)) u_vote_n22 (
    .a(faulty[0].n22), .b(faulty[1].n22), .c(faulty[2].n22), .y(out.n22)
  );

  voter #(.WIDTH(1)) u_vote_n23 (
    .a(faulty[0].n23), .b(faulty[1].n23), .c(faulty[2].n23), .y(out.n23)
  );

endmodule : tmr_cut
