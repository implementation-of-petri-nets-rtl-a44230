// pn_relation: a basic logic structure of a Petri net as a circuit.
//
// Input places X1 and X2 are flip-flops, the transition T is the gate given
// by REL (see pn_pkg::pn_eval; an inhibitor arc is an inverter on that input)
// and the output place Y is a flip-flop, all on the same clock. y therefore
// shows REL(x1, x2) two rising edges after the inputs are applied.
// TRANSFER and INVERT use x1 only. The structure of place, gate, place and
// the Boolean functions follow the published circuits; the one-module,
// parameter-selected form is this design's own.
module pn_relation
  import pn_pkg::*;
#(
  parameter pn_relation_e REL = PN_AND
) (
  input  logic clk,
  input  logic rst,
  input  logic x1,
  input  logic x2,
  output logic y
);
  logic q1, q2, t;

  pn_place u_x1 (.clk, .rst, .d(x1), .q(q1));
  pn_place u_x2 (.clk, .rst, .d(x2), .q(q2));

  always_comb t = pn_eval(REL, q1, q2);

  pn_place u_y (.clk, .rst, .d(t), .q(y));
endmodule
