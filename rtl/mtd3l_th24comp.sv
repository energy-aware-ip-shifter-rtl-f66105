// mtd3l_th24comp: TH24comp threshold gate in MTD3L form.
//
// Four inputs A, B, C, D; output goes high when A.C + B.C + A.D + B.D, that
// is (A + B).(C + D), holds.  Fed with the two rails of both multiplexer data
// inputs it is high once both inputs carry data, so the multiplexer output
// waits for both.  The spacer is forced by the sleep pair through
// mtd3l_sleep_stage.  The gate name is the paper's; its function is that
// of the standard NCL gate library.  Combinational, no clock.
module mtd3l_th24comp (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic sleep0,
  input  logic sleep1,
  output logic z
);
  logic set_fn;
  assign set_fn = (a & c) | (b & c) | (a & d) | (b & d);

  mtd3l_sleep_stage u_out (.set_fn(set_fn), .sleep0(sleep0), .sleep1(sleep1), .z(z));
endmodule
