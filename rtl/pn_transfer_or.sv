// pn_transfer_or: TRANSFER OR structure ("if X then Y1 or Y2").
//
// Place X (flip-flop) feeds two transitions T1 and T2. T1 fires when X holds
// a token and condition x1 is high, T2 likewise with x2; each transition is a
// two-input AND (the firing rule of a transition with two input arcs) that
// loads output place Y1 or Y2. x1 and x2 enter the gates directly, without a
// place, as in the published circuit. The circuit does not arbitrate: when
// x1 and x2 are both high both outputs receive the token. y1/y2 follow x
// after two rising edges and x1/x2 after one.
module pn_transfer_or (
  input  logic clk,
  input  logic rst,
  input  logic x,
  input  logic x1,
  input  logic x2,
  output logic y1,
  output logic y2
);
  logic qx, t1, t2;

  pn_place u_x (.clk, .rst, .d(x), .q(qx));

  always_comb begin
    t1 = qx & x1;
    t2 = qx & x2;
  end

  pn_place u_y1 (.clk, .rst, .d(t1), .q(y1));
  pn_place u_y2 (.clk, .rst, .d(t2), .q(y2));
endmodule
