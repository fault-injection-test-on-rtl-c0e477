// compare: checks the output of the circuit under test against the golden
// C17.
//
// match is high when both N22 and N23 of the circuit under test equal the
// golden values for the vector now applied. Combinational; the test input
// vector controller samples match on its clock edge.
module compare
  import fit_pkg::*;
(
  input  c17_out_t golden,
  input  c17_out_t cut,
  output logic     match
);

  always_comb match = ~|(golden ^ cut);

endmodule : compare
