// c17: the ISCAS-85 / LGSynth91 C17 benchmark circuit.
//
// Five inputs (N1, N2, N3, N6, N7), two outputs (N22, N23) and six two-input
// NAND gates, as the benchmark defines it:
//   N10 = NAND(N1, N3)    N11 = NAND(N3, N6)
//   N16 = NAND(N2, N11)   N19 = NAND(N11, N7)
//   N22 = NAND(N10, N16)  N23 = NAND(N16, N19)
// Purely combinational, no clock. It serves as the golden reference of the
// fault injection test and as each replica inside the TMR circuit under test.
module c17 (
  input  logic n1,
  input  logic n2,
  input  logic n3,
  input  logic n6,
  input  logic n7,
  output logic n22,
  output logic n23
);

  logic n10, n11, n16, n19;

  always_comb begin
    n10 = ~(n1  & n3);
    n11 = ~(n3  & n6);
    n16 = ~(n2  & n11);
    n19 = ~(n11 & n7);
    n22 = ~(n10 & n16);
    n23 = ~(n16 & n19);
  end

endmodule : c17
