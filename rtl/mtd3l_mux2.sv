// mtd3l_mux2: dual-rail 2:1 multiplexer in MTD3L logic.
//
// Function: Z = A when S = 0, Z = B when S = 1, every signal on a rail pair.
// Five threshold gates, all driven by the same sleep pair:
//   g_z0  THand0 (B.r0, A.r0, S.r0, S.r1)  -> rail-0 condition
//         = A0.B0 + A0.S0 + B0.S1
//   g_z1  THand0 (B.r1, A.r1, S.r0, S.r1)  -> rail-1 condition
//   g_cmp TH24comp (A.r0, A.r1, B.r0, B.r1) -> both data inputs are valid
//   Z.r0 = TH22(g_z0, g_cmp), Z.r1 = TH22(g_cmp, g_z1)
// The gate list and the way they connect follow the paper's multiplexer
// diagram; the pin order inside each gate was chosen so that the result
// reproduces the paper's dual-rail truth table.
//
// Timing: combinational.  With both sleeps low and all inputs carrying data
// the output carries data, and it shows no data while either data input is
// still a spacer.  Sleep-to-0 drives both output rails to 0 (all-zero
// spacer), sleep-to-1 drives both to 1 (all-one spacer), both sleeps hold.
module mtd3l_mux2
  import mtd3l_pkg::*;
(
  input  dr_t  a,       // selected when S = 0
  input  dr_t  b,       // selected when S = 1
  input  dr_t  s,       // select
  input  logic sleep0,  // sleep-to-0
  input  logic sleep1,  // sleep-to-1
  output dr_t  z
);
  logic g_z0, g_z1, g_cmp;

  mtd3l_thand0 u_and_z0 (
    .a(b.r0), .b(a.r0), .c(s.r0), .d(s.r1),
    .sleep0(sleep0), .sleep1(sleep1), .z(g_z0));

  mtd3l_th24comp u_comp (
    .a(a.r0), .b(a.r1), .c(b.r0), .d(b.r1),
    .sleep0(sleep0), .sleep1(sleep1), .z(g_cmp));

  mtd3l_thand0 u_and_z1 (
    .a(b.r1), .b(a.r1), .c(s.r0), .d(s.r1),
    .sleep0(sleep0), .sleep1(sleep1), .z(g_z1));

  mtd3l_th22 u_out0 (
    .a(g_z0), .b(g_cmp), .sleep0(sleep0), .sleep1(sleep1), .z(z.r0));

  mtd3l_th22 u_out1 (
    .a(g_cmp), .b(g_z1), .sleep0(sleep0), .sleep1(sleep1), .z(z.r1));

endmodule
