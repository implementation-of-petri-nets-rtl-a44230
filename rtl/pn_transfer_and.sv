// pn_transfer_and: TRANSFER AND structure ("if X then Y1 and Y2").
//
// Place X (flip-flop) feeds, through a transition that is only a connection
// point, the two output places Y1 and Y2, so a token in X appears in both
// outputs at the same time. y1 and y2 follow x after two rising clk edges.
// The structure is the published one; rst comes from pn_place.
module pn_transfer_and (
  input  logic clk,
  input  logic rst,
  input  logic x,
  output logic y1,
  output logic y2
);
  logic qx;

  pn_place u_x  (.clk, .rst, .d(x),  .q(qx));
  pn_place u_y1 (.clk, .rst, .d(qx), .q(y1));
  pn_place u_y2 (.clk, .rst, .d(qx), .q(y2));
endmodule
