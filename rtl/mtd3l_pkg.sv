// mtd3l_pkg: shared types for the MTD3L (multi-threshold dual-spacer
// dual-rail delay-insensitive logic) intermediate product shifter.
//
// Every logical bit travels on two wires, rail 0 and rail 1.  A bit is DATA0
// when only rail 0 is high and DATA1 when only rail 1 is high.  Between data
// words the rails carry a spacer instead of a value: the all-zero spacer
// (both rails low) or the all-one spacer (both rails high).  Which spacer
// appears is set by the gates' sleep-to-0 / sleep-to-1 inputs.
//
// The rail encoding of data follows the dual-rail truth table of the
// multiplexer (S0=1, S1=0 means S=0).  Packing a pair as {r1, r0} is this
// design's own choice.
package mtd3l_pkg;

  // One dual-rail bit: r1 is the "value is 1" rail, r0 the "value is 0" rail.
  typedef struct packed {
    logic r1;
    logic r0;
  } dr_t;

  localparam dr_t DR_ZERO_SPACER = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_ONE_SPACER  = '{r1: 1'b1, r0: 1'b1};
  localparam dr_t DR_DATA0       = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_DATA1       = '{r1: 1'b1, r0: 1'b0};

  // Sleep pair {sleep0, sleep1} and what the gates do under it.
  typedef enum logic [1:0] {
    SLP_NORMAL   = 2'b00,  // evaluate
    SLP_ONE_SPC  = 2'b01,  // sleep-to-1: all-one spacer
    SLP_ZERO_SPC = 2'b10,  // sleep-to-0: all-zero spacer
    SLP_HOLD     = 2'b11   // both: output keeps its previous value
  } sleep_mode_e;

  // Encode a Boolean value as dual-rail data.
  function automatic dr_t dr_encode(input logic v);
    return v ? DR_DATA1 : DR_DATA0;
  endfunction

  // True when the pair carries data (exactly one rail high).
  function automatic logic dr_is_data(input dr_t d);
    return d.r1 ^ d.r0;
  endfunction

endpackage
