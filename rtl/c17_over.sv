// c17_over: over-approximation branch of the Partial TMR.
//
// The C17 netlist with input N6 replaced by the separate input over6. The
// test holds over6 high, and the circuit then reduces to
//   N10 = NAND(N1, N3), N11 = NOT N3, N16 = NAND(N2, N11),
//   N19 = NAND(N11, N7), N22 = NAND(N10, N16), N23 = NAND(N16, N19),
// which synthesis derives by constant folding. It agrees with C17 whenever
// N6 = 1. Error modules follow: e0 inverts N22, e1 inverts N23.
// Combinational, no clock. The ports follow the Partial TMR description; the
// choice of keeping over6 as a port (rather than a constant inside) lets the
// board switch that drives it be kept.
module c17_over (
  input  logic n1,
  input  logic n2,
  input  logic n3,
  input  logic over6,
  input  logic n7,
  input  logic e0,
  input  logic e1,
  output logic n22,
  output logic n23
);

  logic n10, n11, n16, n19, n22_c, n23_c;

  always_comb begin
    n10   = ~(n1  & n3);
    n11   = ~(n3  & over6);
    n16   = ~(n2  & n11);
    n19   = ~(n11 & n7);
    n22_c = ~(n10 & n16);
    n23_c = ~(n16 & n19);
  end

  fault_module #(.WIDTH(1)) u_err0 (.en(e0), .d(n22_c), .q(n22));
  fault_module #(.WIDTH(1)) u_err1 (.en(e1), .d(n23_c), .q(n23));

endmodule : c17_over
