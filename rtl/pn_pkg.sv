// pn_pkg: types and helpers shared by the Petri-net macro library and the
// EFDIA (early failure detection and isolation arrangement).
//
// pn_relation_e names the basic logic relations that a two-place Petri-net
// fragment can express; pn_eval gives the Boolean function of each one, i.e.
// the gate that stands in for the transition (an inhibitor arc becomes an
// inverter on that input). The EFDIA pin bundles are packed structs so the
// 11 input and 28 output pins of the EFDIA travel as two signals.
// The relations and pin names follow the original design; the enum coding
// and the struct grouping are this design's own.
package pn_pkg;

  typedef enum logic [3:0] {
    PN_TRANSFER    = 4'd0,  // Y = X
    PN_AND         = 4'd1,  // Y = X1 & X2
    PN_OR          = 4'd2,  // Y = X1 | X2
    PN_INVERT      = 4'd3,  // Y = ~X
    PN_INHIBITION  = 4'd4,  // Y = ~X1 & X2
    PN_IMPLICATION = 4'd5,  // Y = ~X1 | X2
    PN_NAND        = 4'd6,  // Y = ~(X1 & X2)
    PN_NOR         = 4'd7,  // Y = ~(X1 | X2)
    PN_XOR         = 4'd8,  // Y = X1 ^ X2
    PN_XNOR        = 4'd9   // Y = ~(X1 ^ X2)
  } pn_relation_e;

  localparam int unsigned PN_NUM_RELATIONS = 10;

  // Transition function of a basic logic relation.
  function automatic logic pn_eval(pn_relation_e rel, logic x1, logic x2);
    case (rel)
      PN_TRANSFER:    return x1;
      PN_AND:         return x1 & x2;
      PN_OR:          return x1 | x2;
      PN_INVERT:      return ~x1;
      PN_INHIBITION:  return ~x1 & x2;
      PN_IMPLICATION: return ~x1 | x2;
      PN_NAND:        return ~(x1 & x2);
      PN_NOR:         return ~(x1 | x2);
      PN_XOR:         return x1 ^ x2;
      PN_XNOR:        return ~(x1 ^ x2);
      default:        return 1'b0;
    endcase
  endfunction

  // Two-digit BCD code of v (0..99): tens digit in [7:4], ones in [3:0].
  function automatic logic [7:0] pn_to_bcd(int unsigned v);
    logic [3:0] tens, ones;
    tens = 4'((v / 10) % 10);
    ones = 4'(v % 10);
    return {tens, ones};
  endfunction

  // Input pins of the EFDIA macro (names of the original pins in comments).
  typedef struct packed {
    logic cpi_1w;  // CPI-1W : clear of the next-lower P^W counter
    logic ti_1s;   // TI-1S  : next-lower transition T_S fired
    logic sin;     // SIN    : S_i, monitored signal passed its warning value
    logic pia;     // PIA    : P_i^A, preventive maintenance / inspection action
    logic irw;     // IRW    : i-th reset W
    logic irr;     // IRR    : i-th reset R
    logic ire;     // IRE    : i-th reset E
    logic cpir;    // CPIR   : clear of the P_i^R counter
    logic cpim;    // CPIM   : clear of the P_i^M counter
    logic cpil;    // CPIL   : clear of the P_i^L counter
    logic cpif;    // CPIF   : clear of the P_i^F counter
  } efdia_in_t;

  // Output pins of the EFDIA macro.
  typedef struct packed {
    logic       pit;    // PIT   : P_i^T
    logic       pib1;   // PIB1  : P_i^B1
    logic       iws;    // IWS   : i-th warning signal
    logic       pie;    // PIE   : P_i^E, error located in subsystem i
    logic [3:0] pwq;    // PI-1WQ0..3 : warning log of the next-lower subsystem
    logic [3:0] prq;    // PIRQ0..3   : P_i^R counter
    logic [3:0] plq;    // PILQ0..3   : P_i^L counter (error log)
    logic [3:0] pfq;    // PIFQ0..3   : P_i^F counter (failure log)
    logic [3:0] pmq;    // PIMQ0..3   : P_i^M counter (maintenance log)
    logic       pi;     // PI    : P_i, failure of subsystem i
    logic       pib2;   // PIB2  : P_i^B2
    logic       nhpb2;  // NHPB2 : P^B2 of the next-higher subsystem
    logic       asfm;   // ASFM  : automatic shutdown / regulation request
  } efdia_out_t;

endpackage
