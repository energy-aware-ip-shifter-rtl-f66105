// tb_mtd3l_mux2: self-checking test of the MTD3L dual-rail 2:1 multiplexer.
// Checks the eight data rows of the dual-rail truth table (written out below
// as rail values), the all-zero and all-one spacers, the hold setting, and
// that the output stays a spacer while either data input is still a spacer.
// A final phase changes one input at a time while the gates stay awake
// (data and spacer values mixed at random) and checks the output after each
// change: data when all inputs are data, the spacer while A or B is a
// spacer, and the common value when A = B but the select is still a spacer.
module tb_mtd3l_mux2;
  import mtd3l_pkg::*;
  dr_t  a, b, s, z;
  logic sleep0, sleep1;
  int checks = 0, failures = 0;

  mtd3l_mux2 dut (.a(a), .b(b), .s(s), .sleep0(sleep0), .sleep1(sleep1), .z(z));

  // Dual-rail truth table, one row per entry: {S0,S1,A0,A1,B0,B1,Z0,Z1}.
  localparam logic [7:0] TABLE [8] = '{
    8'b10_10_10_10, 8'b10_10_01_10, 8'b10_01_10_01, 8'b10_01_01_01,
    8'b01_10_10_10, 8'b01_10_01_01, 8'b01_01_10_10, 8'b01_01_01_01
  };

  // DATA0, DATA1 or the all-zero spacer, at random.
  function automatic dr_t rand_dr();
    case ($urandom_range(0, 2))
      0:       return DR_ZERO_SPACER;
      1:       return DR_DATA0;
      default: return DR_DATA1;
    endcase
  endfunction

  task automatic check(input dr_t exp, input string what);
    checks++;
    if (z !== exp) begin
      failures++;
      $display("FAIL %s: s=%b a=%b b=%b sleep=%b%b z=%b expected %b",
               what, s, a, b, sleep0, sleep1, z, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    // Random input changes while awake.
    sleep0 = 1; sleep1 = 0; a = DR_DATA0; b = DR_DATA0; s = DR_DATA0; #1;
    sleep0 = 0;
    for (int i = 0; i < 2000; i++) begin
      dr_t e;
      case ($urandom_range(0, 2))
        0: a = rand_dr();
        1: b = rand_dr();
        default: s = rand_dr();
      endcase
      #1;
      if (!dr_is_data(a) || !dr_is_data(b)) e = DR_ZERO_SPACER;
      else if (dr_is_data(s))                e = s.r1 ? b : a;
      else if (a == b)                       e = a;
      else                                   e = DR_ZERO_SPACER;
      check(e, "awake transition");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      logic [7:0] row;
      row = TABLE[r];
      s = '{r0: row[7], r1: row[6]};
      a = '{r0: row[5], r1: row[4]};
      b = '{r0: row[3], r1: row[2]};
      sleep0 = 1; sleep1 = 0; #1 check(DR_ZERO_SPACER, "all-zero spacer");
      sleep0 = 0; sleep1 = 0; #1 check('{r0: row[1], r1: row[0]}, "table row");
      sleep0 = 1; sleep1 = 1;
      a = DR_DATA1; b = DR_DATA0; s = DR_DATA0;
      #1 check('{r0: row[1], r1: row[0]}, "hold");
      sleep0 = 0; sleep1 = 1; #1 check(DR_ONE_SPACER, "all-one spacer");
    end
    // Input completeness: with a spacer on either data input the output
    // must not show data, whatever the select.
    sleep0 = 0; sleep1 = 0;
    for (int k = 0; k < 8; k++) begin
      s = k[0] ? DR_DATA1 : DR_DATA0;
      a = k[1] ? DR_DATA1 : DR_DATA0;
      b = k[1] ? DR_DATA0 : DR_DATA1;
      if (k[2]) a = DR_ZERO_SPACER; else b = DR_ZERO_SPACER;
      #1 check(DR_ZERO_SPACER, "incomplete input");
    end
    // Random input changes while awake.
    sleep0 = 1; sleep1 = 0; a = DR_DATA0; b = DR_DATA0; s = DR_DATA0; #1;
    sleep0 = 0;
    for (int i = 0; i < 2000; i++) begin
      dr_t e;
      case ($urandom_range(0, 2))
        0: a = rand_dr();
        1: b = rand_dr();
        default: s = rand_dr();
      endcase
      #1;
      if (!dr_is_data(a) || !dr_is_data(b)) e = DR_ZERO_SPACER;
      else if (dr_is_data(s))                e = s.r1 ? b : a;
      else if (a == b)                       e = a;
      else                                   e = DR_ZERO_SPACER;
      check(e, "awake transition");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
