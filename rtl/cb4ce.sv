// cb4ce: binary event counter with clock enable and asynchronous clear.
//
// Counts the rising clk edges at which ce is high, wrapping from all ones to
// zero. tc (terminal count) is high while every q bit is high; ceo = tc & ce
// enables a following stage so counters can be cascaded. clr is asynchronous
// and active high: while it is high q and tc are zero whatever the clock
// does. In the Petri-net circuits it records how often an event occurred.
// The pin set and the asynchronous clear follow the 4-bit library counter the
// original circuit uses; ceo = tc & ce and the wrap-around are assumed.
module cb4ce #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             clr,
  output logic [WIDTH-1:0] q,
  output logic             ceo,
  output logic             tc
);
  always_ff @(posedge clk or posedge clr) begin
    if (clr)     q <= '0;
    else if (ce) q <= q + 1'b1;
  end

  always_comb begin
    tc  = &q;
    ceo = tc & ce;
  end
endmodule
