// c17_under: under-approximation branch of the Partial TMR.
//
// The C17 netlist with inputs N3 and N6 replaced by the separate inputs
// under3 and under6. The test holds both high; N11 is then constant 0, N16
// and N19 constant 1, and the branch reduces to N22 = N1 and N23 = 0, which
// agrees with C17 whenever N3 = N6 = 1. Error modules follow: e0 inverts
// N22, e1 inverts N23. Combinational, no clock. Keeping under3/under6 as
// ports follows the Partial TMR port list; the reduced form is left to
// synthesis.
module c17_under (
  input  logic n1,
  input  logic n2,
  input  logic under3,
  input  logic under6,
  input  logic n7,
  input  logic e0,
  input  logic e1,
  output logic n22,
  output logic n23
);

  logic n10, n11, n16, n19, n22_c, n23_c;

  always_comb begin
    n10   = ~(n1     & under3);
    n11   = ~(under3 & under6);
    n16   = ~(n2     & n11);
    n19   = ~(n11    & n7);
    n22_c = ~(n10    & n16);
    n23_c = ~(n16    & n19);
  end

  fault_module #(.WIDTH(1)) u_err0 (.en(e0), .d(n22_c), .q(n22));
  fault_module #(.WIDTH(1)) u_err1 (.en(e1), .d(n23_c), .q(n23));

endmodule : c17_under
