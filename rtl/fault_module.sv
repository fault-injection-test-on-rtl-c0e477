// fault_module: error module that emulates a single event upset on the
// outputs of one redundant module.
//
// While the control input en is high every guarded bit is inverted, so the
// module behind it delivers a wrong value; while en is low the value passes
// unchanged. In the test system en comes from a board switch (P0..P2 for the
// TMR, E0/E1 for the Partial TMR). Combinational, no clock.
// The fault model (an inversion of the output) is a choice of this design:
// the intent given for the block is only that it makes the output wrong.
module fault_module #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_comb q = d ^ {WIDTH{en}};

endmodule : fault_module
