// mtd3l_sleep_stage: output stage shared by every MTD3L threshold gate.
//
// A threshold gate computes its SET function (the condition under which its
// output goes high).  The output stage then obeys the gate's two sleep
// inputs:
//   sleep0 sleep1   z
//     0      0      set_fn            normal evaluation
//     0      1      1                 all-one spacer
//     1      0      0                 all-zero spacer
//     1      1      previous z        pull-up and pull-down both cut off
// In the transistor stage the sleep-to-0 signal switches off the pull-up and
// turns on a pull-down, and the inverted sleep-to-1 signal does the opposite,
// so with both asserted neither network conducts and the output node keeps
// its charge.  The hold row is modelled with a level-sensitive latch; this
// latch is intended and is the only storage in the design.  The paper's
// sleep table calls that row invalid while its text says the output keeps its
// previous state; the text is followed here.
//
// Once this stage is inlined into a larger design, Verilator may report
// NOLATCH for the always_latch block.  The hold is still simulated, and the
// testbenches check it at every level.
//
// Purely combinational apart from the hold row: no clock, no reset.  The
// level of the latch after power-up is whatever was last driven.
module mtd3l_sleep_stage (
  input  logic set_fn,  // value of the gate's SET (threshold) function
  input  logic sleep0,  // sleep-to-0
  input  logic sleep1,  // sleep-to-1
  output logic z
);
  import mtd3l_pkg::*;

  sleep_mode_e mode;
  logic        open_n;  // 1: output node is driven (not both sleeps)
  logic        drive;   // value driven onto the output node

  assign mode   = sleep_mode_e'({sleep0, sleep1});
  assign open_n = (mode != SLP_HOLD);
  assign drive  = (mode == SLP_ONE_SPC) | ((mode == SLP_NORMAL) & set_fn);

  // Transparent while driven; SLP_HOLD closes it (the intended latch).
  always_latch begin
    if (open_n) z = drive;
  end
endmodule
