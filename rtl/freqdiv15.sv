// freqdiv15: divides a pulse train by DIV (15), the time-base prescaler of
// the timed transitions.
//
// Two cascaded decade counters (ones and tens) count in_tick pulses. When
// the DIV-th pulse arrives the count is at DIV-1; out_tick is raised in that
// same cycle and the counters are reloaded with zero, so exactly one out_tick
// leaves for every DIV in_tick pulses (15 Hz in, 1 Hz out in the original
// use). in_tick and out_tick are one-cycle enables on clk, not clocks. clr and
// rst (both synchronous, active high) restart the count. The two-decade
// structure and the division by 15 follow the original circuit; its
// asynchronous clear on a decoded count is replaced here by a synchronous
// reload. DIV must lie in 2..99.
module freqdiv15
  import pn_pkg::*;
#(
  parameter int unsigned DIV = 15
) (
  input  logic clk,
  input  logic rst,
  input  logic clr,
  input  logic in_tick,
  output logic out_tick
);
  localparam logic [7:0] LAST = pn_to_bcd(DIV - 1);

  logic [3:0] ones, tens;
  logic       ones_rco;
  logic       reload_n;

  always_comb begin
    out_tick = in_tick && ({tens, ones} == LAST);
    reload_n = !(rst || clr || out_tick);
  end

  bcd_counter u_ones (
    .clk, .clr_n(1'b1), .load_n(reload_n), .enp(in_tick), .ent(1'b1),
    .d(4'd0), .q(ones), .rco(ones_rco)
  );

  bcd_counter u_tens (
    .clk, .clr_n(1'b1), .load_n(reload_n), .enp(in_tick), .ent(ones_rco),
    .d(4'd0), .q(tens), .rco()
  );

  // A count that would need a third decade is outside the supported range.
  initial assert (DIV >= 2 && DIV <= 99)
    else $error("freqdiv15: DIV=%0d is outside 2..99", DIV);
endmodule
