// mtd3l_ip_shifter: intermediate product (IP) shifter in MTD3L dual-rail
// logic, the normalising shift of a floating-point multiplier's product.
//
// A row of OUT_W dual-rail 2:1 multiplexers shares one dual-rail select and
// one sleep pair.  Multiplexer i produces P[i] from IP[i] (select = 0) and
// IP[i+1] (select = 1):
//   select = 0 : P = IP[OUT_W-1:0]   (no shift)
//   select = 1 : P = IP[OUT_W:1]     (one-bit right shift; the top output
//                                     takes IP[OUT_W], which the user drives
//                                     DATA0 for a zero fill)
// The 47-input / 46-output size and the one-multiplexer-per-output structure
// are the paper's; the select polarity follows its text, worked example
// and simulated waveform.
//
// Timing and protocol: no clock and no storage besides the hold state of the
// gates.  The sleep pair sequences the data/spacer cycle from outside:
//   sleep0 sleep1 = 00  evaluate: P carries data once IP and select do
//                   10  all-zero spacer on every output rail pair
//                   01  all-one spacer on every output rail pair
//                   11  every gate holds its previous output
// In dual-spacer operation the spacer between successive data words
// alternates between all-zero and all-one.
module mtd3l_ip_shifter
  import mtd3l_pkg::*;
#(
  parameter int unsigned OUT_W = 46  // outputs; the input has OUT_W + 1 bits
) (
  input  dr_t  [OUT_W:0]   ip,      // intermediate product IP[OUT_W:0]
  input  dr_t              sel,     // DATA1 = shift right by one
  input  logic             sleep0,  // sleep-to-0
  input  logic             sleep1,  // sleep-to-1
  output dr_t  [OUT_W-1:0] p        // shifted product P[OUT_W-1:0]
);
  for (genvar i = 0; i < OUT_W; i++) begin : g_mux
    mtd3l_mux2 u_mux (
      .a(ip[i]), .b(ip[i+1]), .s(sel),
      .sleep0(sleep0), .sleep1(sleep1), .z(p[i]));
  end
endmodule
