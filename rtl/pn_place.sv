// pn_place: one Petri-net place.
//
// A place is a positive-edge D flip-flop; Q high means the place holds a
// token. The token arriving through the input transition is sampled on every
// rising clk edge, so q follows d one cycle later. rst (synchronous, active
// high) empties the place; it stands in for the clear the FPGA applies to its
// flip-flops at configuration and is this design's addition.
module pn_place (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);
  always_ff @(posedge clk) begin
    if (rst) q <= 1'b0;
    else     q <= d;
  end
endmodule
