// mtd3l_thand0: THand0 threshold gate in MTD3L form.
//
// Four inputs A, B, C, D; output goes high when A.B + B.C + A.D holds.  In
// the multiplexer this gate produces one output rail: with A = B-input rail,
// B = A-input rail, C = select rail 0 and D = select rail 1 it is high when
// the selected input carries that rail (or both inputs agree).  The spacer is
// forced by the sleep pair through mtd3l_sleep_stage.  The gate name is the
// document's; its function is that of the standard NCL gate library.
// Combinational, no clock.
module mtd3l_thand0 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic sleep0,
  input  logic sleep1,
  output logic z
);
  logic set_fn;
  assign set_fn = (a & b) | (b & c) | (a & d);

  mtd3l_sleep_stage u_out (.set_fn(set_fn), .sleep0(sleep0), .sleep1(sleep1), .z(z));
endmodule
