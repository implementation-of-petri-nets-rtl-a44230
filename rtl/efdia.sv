// efdia: early failure detection and isolation arrangement (EFDIA) for one
// monitored subsystem i, the Petri net realised as a synchronous circuit.
//
// Places are pn_place flip-flops; each transition is an AND gate of its input
// places (an inhibitor arc adds an inverter); the timed transitions T_iM and
// T_iU are delay20 timers H3 and H4; counting places are cb4ce counters.
//
//   SIN (S_i) -> T_iS -> places PIB1, IWS (warning), PIT, NHPB2
//   TI-1S     ->          place PIB2
//   TIE = PIB1 & ~PIB2        -> place PIE  (error lies in subsystem i)
//   TIW = PIB2 & IRW          -> counter of the next-lower P^W
//   TIR = PIB1 & IRR          -> counter P_i^R
//   TIL = PIE  & IRE          -> counter P_i^L (error log)
//   TIP = PIA  & IWS          -> place PIP
//   H3 started by PIP & PIT,      output TIM -> counter P_i^M (maintenance)
//   H4 started by IWS & ~PIA,     output TIU -> place PIU
//   TIT = PIU & PIT           -> PI, ASFM, counter P_i^F (failure log)
//
// H4 measures the maintenance lead time: if no maintenance (PIA) comes within
// DELAY_N seconds, PIU and then PI / ASFM rise for one second and the failure
// counter counts. PIA stops H4 and, through PIP, starts H3, which measures the
// maintenance time and then counts the maintenance log. H4 is held stopped
// while H3 runs; this is this design's reading of the description that H4
// stops once H3 starts counting, and it needs PIA high for at least three clk
// cycles. Counters count the rising edges of their transition signal
// (edge detector on clk driving CE) and have asynchronous active-high clears
// (CPx pins, ORed with rst). Timing: a place follows its input one clk edge
// later; timers advance on f15_tick (PRESCALE ticks per second).
// The net list follows the published EFDIA schematic and Petri net; the
// single clock, the counter clocking, the H4 hold and H3's unused stop are
// this design's choices.
module efdia
  import pn_pkg::*;
#(
  parameter int unsigned PRESCALE = 15,
  parameter int unsigned DELAY_N  = 20
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       f15_tick,
  input  efdia_in_t  i,
  output efdia_out_t o
);
  logic tis;
  logic pib1, pib2, iws, pit, nhpb2, pie, pip, piu;
  logic tie, tiw, tir, til, tip, tim, tiu, tit;
  logic h3_in2, h3_busy, h4_in2, h4_stop, h4_busy;
  logic [7:0] h3_count, h4_count;

  // Immediate transition T_iS is a connection point.
  always_comb tis = i.sin;

  pn_place u_pib1  (.clk, .rst, .d(tis),    .q(pib1));
  pn_place u_iws   (.clk, .rst, .d(tis),    .q(iws));
  pn_place u_pit   (.clk, .rst, .d(tis),    .q(pit));
  pn_place u_nhpb2 (.clk, .rst, .d(tis),    .q(nhpb2));
  pn_place u_pib2  (.clk, .rst, .d(i.ti_1s), .q(pib2));

  always_comb begin
    tie = pib1 & ~pib2;     // inhibitor arc from PIB2
    tiw = pib2 & i.irw;
    tir = pib1 & i.irr;
    tip = i.pia & iws;
    h3_in2  = pip & pit;
    h4_in2  = iws & ~i.pia; // inhibitor arc from P_i^A
    h4_stop = i.pia | h3_busy;
    tit = piu & pit;
  end

  pn_place u_pie (.clk, .rst, .d(tie), .q(pie));
  pn_place u_pip (.clk, .rst, .d(tip), .q(pip));
  pn_place u_piu (.clk, .rst, .d(tiu), .q(piu));

  always_comb til = pie & i.ire;

  // Timed transitions.
  delay20 #(.PRESCALE(PRESCALE), .N(DELAY_N)) u_h3 (
    .clk, .rst, .base_tick(f15_tick), .in2(h3_in2), .stop(rst),
    .out2(tim), .busy(h3_busy), .count(h3_count)
  );

  delay20 #(.PRESCALE(PRESCALE), .N(DELAY_N)) u_h4 (
    .clk, .rst, .base_tick(f15_tick), .in2(h4_in2), .stop(h4_stop),
    .out2(tiu), .busy(h4_busy), .count(h4_count)
  );

  // Counting places: one count per firing (rising edge) of the transition.
  typedef enum int unsigned { CW, CR, CL, CM, CF, NCNT } cnt_e;
  logic [NCNT-1:0] fire, fire_q, cnt_ce, cnt_clr;
  logic [3:0]      cnt_q [NCNT];

  always_comb begin
    fire[CW] = tiw;  cnt_clr[CW] = i.cpi_1w | rst;
    fire[CR] = tir;  cnt_clr[CR] = i.cpir   | rst;
    fire[CL] = til;  cnt_clr[CL] = i.cpil   | rst;
    fire[CM] = tim;  cnt_clr[CM] = i.cpim   | rst;
    fire[CF] = tit;  cnt_clr[CF] = i.cpif   | rst;
    cnt_ce   = fire & ~fire_q;
  end

  always_ff @(posedge clk) begin
    if (rst) fire_q <= '0;
    else     fire_q <= fire;
  end

  for (genvar k = 0; k < NCNT; k++) begin : g_cnt
    cb4ce #(.WIDTH(4)) u_cnt (
      .clk, .ce(cnt_ce[k]), .clr(cnt_clr[k]), .q(cnt_q[k]), .ceo(), .tc()
    );
  end

  always_comb begin
    o.pit   = pit;
    o.pib1  = pib1;
    o.iws   = iws;
    o.pie   = pie;
    o.pwq   = cnt_q[CW];
    o.prq   = cnt_q[CR];
    o.plq   = cnt_q[CL];
    o.pfq   = cnt_q[CF];
    o.pmq   = cnt_q[CM];
    o.pi    = tit;
    o.pib2  = pib2;
    o.nhpb2 = nhpb2;
    o.asfm  = tit;
  end

  // While the maintenance timer runs, the lead-time timer is held stopped.
  a_h4_held_by_h3: assert property (@(posedge clk) disable iff (rst) h3_busy |=> !h4_busy);
endmodule
