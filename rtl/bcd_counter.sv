// bcd_counter: synchronous decade (BCD) counter in the manner of a 74160.
//
// q counts 0..9 and wraps to 0 on rising clk edges when both enp and ent are
// high. A low load_n loads d on the next rising edge, taking priority over
// counting. clr_n is an asynchronous, active-low clear. rco = ent & (q == 9)
// is the ripple carry used to enable the next decade. The timers cascade two
// of these (ones and tens). The original circuit uses a library 74160 and
// names its pins; the behaviour written here is the standard one for that
// part.
module bcd_counter (
  input  logic       clk,
  input  logic       clr_n,
  input  logic       load_n,
  input  logic       enp,
  input  logic       ent,
  input  logic [3:0] d,
  output logic [3:0] q,
  output logic       rco
);
  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)          q <= 4'd0;
    else if (!load_n)    q <= d;
    else if (enp && ent) q <= (q >= 4'd9) ? 4'd0 : q + 4'd1;
  end

  always_comb rco = ent && (q == 4'd9);
endmodule
