// tiv: test input vector controller of the fault injection test.
//
// After reset the controller is idle and drives vector 0. When start is high
// it enters RUN and applies one vector per clock cycle, counting from all
// zeros to all ones. On each clock edge in RUN it samples match, the result
// of comparing the circuit under test with the golden circuit for the vector
// now applied:
//   - match low: the sweep stops in FAIL, holding the failing vector on iv;
//   - match high on the last vector (all ones): the sweep stops in PASS;
//   - otherwise the vector advances by one.
// In PASS or FAIL, again restarts the sweep from vector 0. reset is
// synchronous and active high and returns to IDLE from any state.
// Timing: with start sampled at edge 0, vector k is applied during the cycle
// after edge k, and pass rises after edge 2**WIDTH when every vector matches.
// The stop-on-pass and stop-on-fail behaviour and the start/again/reset
// controls follow the described test; the cycle timing, the reset style and
// the state encoding are this design's choices.
module tiv
  import fit_pkg::*;
#(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic             again,
  input  logic             match,
  output logic [WIDTH-1:0] iv,
  output logic             running,
  output logic             pass,
  output logic             fail
);

  localparam logic [WIDTH-1:0] LAST = '1;

  tiv_state_e state;

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= TIV_IDLE;
      iv    <= '0;
    end else begin
      unique case (state)
        TIV_IDLE: begin
          iv <= '0;
          if (start) state <= TIV_RUN;
        end
        TIV_RUN: begin
          if (!match)           state <= TIV_FAIL;
          else if (iv == LAST)  state <= TIV_PASS;
          else                  iv    <= iv + 1'b1;
        end
        TIV_PASS, TIV_FAIL: begin
          if (again) begin
            state <= TIV_RUN;
            iv    <= '0;
          end
        end
        default: state <= TIV_IDLE;
      endcase
    end
  end

  always_comb begin
    running = (state == TIV_RUN);
    pass    = (state == TIV_PASS);
    fail    = (state == TIV_FAIL);
  end

  // While running with a match, the vector steps by exactly one.
  a_step: assert property (@(posedge clk) disable iff (reset)
    (state == TIV_RUN && match && iv != LAST && !reset) |=> (iv == $past(iv) + 1'b1))
    else $error("tiv: vector did not advance by one");

  // A failing vector is held while the controller waits in FAIL.
  a_hold: assert property (@(posedge clk) disable iff (reset)
    (state == TIV_FAIL && !again) |=> (state == TIV_FAIL && iv == $past(iv)))
    else $error("tiv: failing vector not held");

endmodule : tiv
