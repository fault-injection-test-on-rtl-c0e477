// fit_pkg: types shared by the C17 fault injection test system.
//
// c17_in_t groups the five C17 inputs in the order N1,N2,N3,N6,N7 (N1 is the
// most significant bit, so counting the packed value from 0 to 31 walks every
// input combination). c17_out_t groups the two outputs N22,N23. tiv_state_e
// is the state of the test input vector controller. The bit order is a choice
// of this design; the benchmark itself only names the signals.
package fit_pkg;

  typedef struct packed {
    logic n1;
    logic n2;
    logic n3;
    logic n6;
    logic n7;
  } c17_in_t;

  typedef struct packed {
    logic n22;
    logic n23;
  } c17_out_t;

  // Number of C17 inputs and outputs.
  localparam int unsigned C17_NIN  = 5;
  localparam int unsigned C17_NOUT = 2;

  typedef enum logic [1:0] {
    TIV_IDLE = 2'd0,
    TIV_RUN  = 2'd1,
    TIV_PASS = 2'd2,
    TIV_FAIL = 2'd3
  } tiv_state_e;

endpackage : fit_pkg
