// pn_identity: IDENTITY structure ("if X then X"), a self-holding place.
//
// The place's own output is fed back to its input through the connection
// point T, joined with the token input x, so D = x | Q. Once a token has
// arrived the place keeps it and supplies it at any time afterwards. y rises
// one clk edge after x; only rst (this design's addition) empties it.
module pn_identity (
  input  logic clk,
  input  logic rst,
  input  logic x,
  output logic y
);
  logic t;

  always_comb t = x | y;

  pn_place u_p (.clk, .rst, .d(t), .q(y));
endmodule
