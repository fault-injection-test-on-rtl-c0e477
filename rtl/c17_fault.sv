// c17_fault: the original-circuit branch of the Partial TMR.
//
// A C17 whose outputs pass through error modules: e0 inverts N22 and e1
// inverts N23 while high. Combinational, no clock. Which error input guards
// which output is this design's choice; the branch itself (original C17 plus
// error modules driven by E0 and E1) follows the Partial TMR description.
module c17_fault (
  input  logic n1,
  input  logic n2,
  input  logic n3,
  input  logic n6,
  input  logic n7,
  input  logic e0,
  input  logic e1,
  output logic n22,
  output logic n23
);

  logic n22_c, n23_c;

  c17 u_c17 (
    .n1(n1), .n2(n2), .n3(n3), .n6(n6), .n7(n7), .n22(n22_c), .n23(n23_c)
  );

  fault_module #(.WIDTH(1)) u_err0 (.en(e0), .d(n22_c), .q(n22));
  fault_module #(.WIDTH(1)) u_err1 (.en(e1), .d(n23_c), .q(n23));

endmodule : c17_fault
