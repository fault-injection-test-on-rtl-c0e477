// voter: bitwise 2-of-3 majority voter of a TMR stage.
//
// Each output bit takes the value held by at least two of the three inputs,
// so one wrong replica is masked and two wrong replicas win the vote.
// Combinational, no clock.
module voter #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);

  always_comb y = (a & b) | (a & c) | (b & c);

endmodule : voter
