// mtd3l_th22: TH22 threshold gate in MTD3L form.
//
// Output goes high when both inputs are high (SET function A.B).  As in
// multi-threshold NCL, the gate keeps no hysteresis of its own: the spacer
// between data words is forced by the sleep inputs through
// mtd3l_sleep_stage (sleep-to-0 gives 0, sleep-to-1 gives 1, both hold).
// The gate name comes from the paper; its function is that of the
// standard NCL gate library.  Combinational, no clock.
module mtd3l_th22 (
  input  logic a,
  input  logic b,
  input  logic sleep0,
  input  logic sleep1,
  output logic z
);
  logic set_fn;
  assign set_fn = a & b;

  mtd3l_sleep_stage u_out (.set_fn(set_fn), .sleep0(sleep0), .sleep1(sleep1), .z(z));
endmodule
