// efdia_board: the EFDIA wired to the switches, pushbuttons, LEDs and
// seven-segment displays of a small FPGA demonstration board.
//
// Inputs: the eight SW3 switches give logic 1 when on and drive, in order
// SW3-1..SW3-8, CPI-1W, TI-1S, SIN, IRW, IRR, CPIL, CPIR, CPIM. The SW4 and
// SW5 pushbuttons are active low and give IRE and PIA. CPIF has no switch
// on the board layout and is a plain active-high input.
// Outputs: LEDs D9..D16 (led_n[0..7]) show PI, ASFM, IWS, PIT, PIB1, NHPB2,
// PIB2, PIE; display U7 shows the low bits of the next-lower warning counter
// and the R and L counters, display U8 those of the M and F counters, one
// bit per segment (a..g = bit 0..6). LEDs and segments light when driven
// low, so all of them are inverted. The six counter bits that no display
// shows leave, active high, on aux_q = {PIMQ3, PILQ3, PIRQ3, PIRQ2,
// PI-1WQ3, PI-1WQ2}. All of this is combinational around the efdia core;
// the assignment of signals to switches, LEDs and segments and the
// polarities follow the published board I/O assignment.
module efdia_board
  import pn_pkg::*;
#(
  parameter int unsigned PRESCALE = 15,
  parameter int unsigned DELAY_N  = 20
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       f15_tick,
  input  logic [7:0] sw3,       // bit 0 = SW3-1
  input  logic       sw4_n,     // IRE pushbutton
  input  logic       sw5_n,     // PIA pushbutton
  input  logic       cpif,
  output logic [7:0] led_n,     // bit 0 = D9
  output logic [6:0] u7_seg_n,  // bit 0 = segment a
  output logic [6:0] u8_seg_n,
  output logic [5:0] aux_q
);
  efdia_in_t  ci;
  efdia_out_t co;

  always_comb begin
    ci.cpi_1w = sw3[0];
    ci.ti_1s  = sw3[1];
    ci.sin    = sw3[2];
    ci.irw    = sw3[3];
    ci.irr    = sw3[4];
    ci.cpil   = sw3[5];
    ci.cpir   = sw3[6];
    ci.cpim   = sw3[7];
    ci.ire    = ~sw4_n;
    ci.pia    = ~sw5_n;
    ci.cpif   = cpif;
  end

  efdia #(.PRESCALE(PRESCALE), .DELAY_N(DELAY_N)) u_efdia (
    .clk, .rst, .f15_tick, .i(ci), .o(co)
  );

  always_comb begin
    led_n = ~{co.pie, co.pib2, co.nhpb2, co.pib1, co.pit, co.iws, co.asfm, co.pi};
    //            g          f          e          d          c          b          a
    u7_seg_n = ~{co.prq[0], co.plq[2], co.plq[1], co.plq[0], co.prq[1], co.pwq[1], co.pwq[0]};
    u8_seg_n = ~{co.pfq[0], co.pmq[2], co.pfq[2], co.pfq[3], co.pfq[1], co.pmq[1], co.pmq[0]};
    aux_q    = {co.pmq[3], co.plq[3], co.prq[3], co.prq[2], co.pwq[3], co.pwq[2]};
  end
endmodule
