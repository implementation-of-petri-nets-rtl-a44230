// delay20: timer of a timed transition (DELAY20 for N = 20).
//
// A rising edge on in2 sets the run flag (the start flip-flop of the original
// circuit). While it is set, base_tick pulses (15 Hz in the original) pass
// to a freqdiv15 prescaler, whose 1 Hz output advances a two-digit BCD count.
// When the count reaches N, out2 rises; it stays high for one prescaled
// period, and on the tick that would take the count to N+1 the flag, the
// prescaler and the count are cleared, ending the run. stop clears the timer
// at any time and blocks a start while it is high; a start edge during a run
// is ignored. With base_tick every cycle out2 is high from cycle
// PRESCALE*N+1 to PRESCALE*(N+1) after the start edge is sampled.
// busy mirrors the run flag and count shows the BCD count.
// The structure (start flip-flop, gated time base, divide-by-15, MOD-N BCD
// count, self-clear past N, output taken at the count of N) follows the
// original circuit. The synchronous clears, the enable in place of a gated
// clock, and clearing the prescaler between runs are this design's choices.
module delay20
  import pn_pkg::*;
#(
  parameter int unsigned PRESCALE = 15,
  parameter int unsigned N        = 20
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       base_tick,
  input  logic       in2,
  input  logic       stop,
  output logic       out2,
  output logic       busy,
  output logic [7:0] count
);
  localparam logic [7:0] N_BCD = pn_to_bcd(N);

  logic in2_q, start, run;
  logic gated_tick, sec_tick, finish, clr;
  logic ones_rco;

  // Edge detector for the trigger input.
  always_ff @(posedge clk) begin
    if (rst) in2_q <= 1'b0;
    else     in2_q <= in2;
  end

  always_comb begin
    start      = in2 && !in2_q;
    gated_tick = base_tick && run;
    finish     = run && sec_tick && (count == N_BCD);
    clr        = stop || finish;
    out2       = run && (count == N_BCD);
    busy       = run;
  end

  always_ff @(posedge clk) begin
    if (rst || clr) run <= 1'b0;
    else if (start) run <= 1'b1;
  end

  freqdiv15 #(.DIV(PRESCALE)) u_prescale (
    .clk, .rst, .clr, .in_tick(gated_tick), .out_tick(sec_tick)
  );

  bcd_counter u_ones (
    .clk, .clr_n(1'b1), .load_n(!(rst || clr)), .enp(sec_tick), .ent(1'b1),
    .d(4'd0), .q(count[3:0]), .rco(ones_rco)
  );

  bcd_counter u_tens (
    .clk, .clr_n(1'b1), .load_n(!(rst || clr)), .enp(sec_tick), .ent(ones_rco),
    .d(4'd0), .q(count[7:4]), .rco()
  );

  initial assert (N >= 1 && N <= 98)
    else $error("delay20: N=%0d is outside 1..98", N);

  // The count never runs past N.
  a_count_bound: assert property (@(posedge clk) disable iff (rst) count <= N_BCD);
endmodule
