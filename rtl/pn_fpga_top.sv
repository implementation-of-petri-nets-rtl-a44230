// pn_fpga_top: Petri nets as FPGA logic, top level.
//
// Two designs stand side by side on their own ports, sharing clk and rst:
//  * the EFDIA (early failure detection and isolation arrangement) on its
//    demonstration-board wiring (efdia_board), timed by f15_tick, the 15 Hz
//    time base of its two 20-second timers;
//  * the Petri-net macro library: one pn_relation for each basic logic
//    relation (lib_x1[k], lib_x2[k] -> lib_y[k] for relation k of
//    pn_pkg::pn_relation_e), plus the TRANSFER AND, TRANSFER OR and IDENTITY
//    structures. Their outputs follow the inputs after one or two clk edges.
// The on-chip oscillator is outside the design: clk is the circuit clock and
// f15_tick a one-cycle enable at the 15 Hz rate (every cycle when clk itself
// runs at 15 Hz). Placing the macro library beside the EFDIA is this design's
// choice; everything inside follows the modules' own descriptions.
module pn_fpga_top
  import pn_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       f15_tick,
  // EFDIA on the demonstration board
  input  logic [7:0] sw3,
  input  logic       sw4_n,
  input  logic       sw5_n,
  input  logic       cpif,
  output logic [7:0] led_n,
  output logic [6:0] u7_seg_n,
  output logic [6:0] u8_seg_n,
  output logic [5:0] aux_q,
  // Petri-net macro library
  input  logic [PN_NUM_RELATIONS-1:0] lib_x1,
  input  logic [PN_NUM_RELATIONS-1:0] lib_x2,
  output logic [PN_NUM_RELATIONS-1:0] lib_y,
  input  logic       ta_x,
  output logic       ta_y1,
  output logic       ta_y2,
  input  logic       to_x,
  input  logic       to_x1,
  input  logic       to_x2,
  output logic       to_y1,
  output logic       to_y2,
  input  logic       id_x,
  output logic       id_y
);
  efdia_board u_board (
    .clk, .rst, .f15_tick, .sw3, .sw4_n, .sw5_n, .cpif,
    .led_n, .u7_seg_n, .u8_seg_n, .aux_q
  );

  for (genvar k = 0; k < PN_NUM_RELATIONS; k++) begin : g_rel
    pn_relation #(.REL(pn_relation_e'(k))) u_rel (
      .clk, .rst, .x1(lib_x1[k]), .x2(lib_x2[k]), .y(lib_y[k])
    );
  end

  pn_transfer_and u_tand (.clk, .rst, .x(ta_x), .y1(ta_y1), .y2(ta_y2));
  pn_transfer_or  u_tor  (.clk, .rst, .x(to_x), .x1(to_x1), .x2(to_x2), .y1(to_y1), .y2(to_y2));
  pn_identity     u_id   (.clk, .rst, .x(id_x), .y(id_y));
endmodule
