// tb_mtd3l_ip_shifter: end-to-end test of the 47-in / 46-out MTD3L
// intermediate product shifter at its default size.
//
// Runs the shifter through dual-spacer cycles (data, all-zero spacer, data,
// all-one spacer, ...) and checks every output rail pair:
//   - the worked example: a 29-bit pattern passed unchanged with select 0
//     and shifted right by one with select 1 (expected strings written out);
//   - the seven low output bits of the simulated waveform sequence
//     (select 0, select 1, all-one spacer, all-zero spacer);
//   - 200 random products with both select values against P = IP >> sel;
//   - hold (both sleeps) keeps the outputs while inputs change;
//   - an output never shows data while an input bit is still a spacer.
// It counts how often each mechanism occurred (no shift, shift, all-zero
// spacer, all-one spacer, hold, incomplete input) and fails any that never
// happened.
module tb_mtd3l_ip_shifter;
  import mtd3l_pkg::*;
  localparam int OW = 46;
  localparam int IW = OW + 1;

  dr_t [IW-1:0] ip;
  dr_t          sel;
  logic         sleep0, sleep1;
  dr_t [OW-1:0] p;
  int checks = 0, failures = 0;
  int n_pass = 0, n_shift = 0, n_zspc = 0, n_ospc = 0, n_hold = 0, n_incomp = 0;

  mtd3l_ip_shifter dut (.ip(ip), .sel(sel), .sleep0(sleep0), .sleep1(sleep1), .p(p));

  function automatic dr_t [IW-1:0] encode_word(input logic [IW-1:0] v);
    dr_t [IW-1:0] d;
    for (int i = 0; i < IW; i++) d[i] = v[i] ? DR_DATA1 : DR_DATA0;
    return d;
  endfunction

  // Compare p with an expected Boolean word; every pair must be data.
  task automatic check_data(input logic [OW-1:0] exp, input string what);
    for (int i = 0; i < OW; i++) begin
      checks++;
      if (p[i] !== (exp[i] ? DR_DATA1 : DR_DATA0)) begin
        failures++;
        $display("FAIL %s: P[%0d]=%b expected value %b", what, i, p[i], exp[i]);
      end
    end
  endtask

  task automatic check_all(input dr_t exp, input string what);
    for (int i = 0; i < OW; i++) begin
      checks++;
      if (p[i] !== exp) begin
        failures++;
        $display("FAIL %s: P[%0d]=%b expected %b", what, i, p[i], exp);
      end
    end
  endtask

  // Dual-spacer cycle helpers.  Every data word is preceded by a spacer;
  // the spacer alternates between all-zero and all-one.
  bit next_one_spacer = 0;
  task automatic spacer();
    if (next_one_spacer) begin
      sleep0 = 0; sleep1 = 1; #1 check_all(DR_ONE_SPACER, "all-one spacer"); n_ospc++;
    end else begin
      sleep0 = 1; sleep1 = 0; #1 check_all(DR_ZERO_SPACER, "all-zero spacer"); n_zspc++;
    end
    next_one_spacer = !next_one_spacer;
  endtask

  task automatic apply(input logic [IW-1:0] v, input logic s, input string what);
    logic [IW-1:0] shifted;
    spacer();
    ip = encode_word(v); sel = s ? DR_DATA1 : DR_DATA0;
    #1;
    sleep0 = 0; sleep1 = 0; #1;
    shifted = s ? (v >> 1) : v;
    check_data(shifted[OW-1:0], what);
    if (s) n_shift++; else n_pass++;
  endtask

  // Parse a string of '0'/'1' characters, most significant first.
  function automatic logic [IW-1:0] from_string(input string str);
    logic [IW-1:0] v = '0;
    for (int i = 0; i < str.len(); i++) v = {v[IW-2:0], str[i] == "1"};
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [IW-1:0] v;
    logic [OW-1:0] held;
    sleep0 = 1; sleep1 = 0; sel = DR_ZERO_SPACER; ip = '0;

    // Worked example: IP[46] and the bits above the pattern are DATA0, so
    // the shift fills the top with zero.
    v = from_string("00010100101001010001001010010");
    apply(v, 1'b0, "example select=0");
    check_data(OW'(from_string("00010100101001010001001010010")), "example select=0 string");
    apply(v, 1'b1, "example select=1");
    check_data(OW'(from_string("00001010010100101000100101001")), "example select=1 string");

    // Waveform sequence, rail 1 of P6..P0: select 0 gives 1010010,
    // select 1 gives 0101001, then all-one spacer, then all-zero spacer.
    next_one_spacer = 0;
    v = from_string("1010010");
    apply(v, 1'b0, "waveform select=0");
    checks++;
    if ({p[6].r1, p[5].r1, p[4].r1, p[3].r1, p[2].r1, p[1].r1, p[0].r1} !== 7'b1010010) begin
      failures++; $display("FAIL waveform segment 1");
    end
    sel = DR_DATA1; #1;
    checks++;
    if ({p[6].r1, p[5].r1, p[4].r1, p[3].r1, p[2].r1, p[1].r1, p[0].r1} !== 7'b0101001) begin
      failures++; $display("FAIL waveform segment 2");
    end
    n_shift++;
    next_one_spacer = 1;
    spacer();
    spacer();

    // Random products, both select values.
    for (int k = 0; k < 200; k++) begin
      v = IW'({$urandom, $urandom});
      apply(v, k[0], "random");
    end

    // Hold: evaluate, freeze with both sleeps, change inputs and select.
    v = IW'({$urandom, $urandom});
    apply(v, 1'b1, "before hold");
    held = OW'(v >> 1);
    sleep0 = 1; sleep1 = 1; #1;
    ip = encode_word(~v); sel = DR_DATA0; #1;
    check_data(held, "hold"); n_hold++;
    // Hold during a spacer: the spacer must stay.
    spacer();
    sleep0 = 1; sleep1 = 1; ip = encode_word(v); #1;
    check_all(next_one_spacer ? DR_ZERO_SPACER : DR_ONE_SPACER, "hold spacer"); n_hold++;

    // Incomplete input: one IP bit still a spacer keeps that output a spacer
    // and leaves the others evaluating.
    next_one_spacer = 0;
    spacer();
    v = IW'({$urandom, $urandom});
    ip = encode_word(v); ip[10] = DR_ZERO_SPACER; sel = DR_DATA0;
    sleep0 = 0; sleep1 = 0; #1;
    checks++;
    if (p[10] !== DR_ZERO_SPACER || p[9] !== DR_ZERO_SPACER) begin
      failures++; $display("FAIL incomplete input: P[10]=%b P[9]=%b", p[10], p[9]);
    end
    checks++;
    if (p[11] !== (v[11] ? DR_DATA1 : DR_DATA0)) begin
      failures++; $display("FAIL complete neighbour: P[11]=%b", p[11]);
    end
    n_incomp++;

    $display("mechanisms: no-shift=%0d shift=%0d zero-spacer=%0d one-spacer=%0d hold=%0d incomplete=%0d",
             n_pass, n_shift, n_zspc, n_ospc, n_hold, n_incomp);
    if (n_pass == 0)   begin failures++; $display("FAIL no-shift never exercised"); end
    if (n_shift == 0)  begin failures++; $display("FAIL shift never exercised"); end
    if (n_zspc == 0)   begin failures++; $display("FAIL all-zero spacer never exercised"); end
    if (n_ospc == 0)   begin failures++; $display("FAIL all-one spacer never exercised"); end
    if (n_hold == 0)   begin failures++; $display("FAIL hold never exercised"); end
    if (n_incomp == 0) begin failures++; $display("FAIL incomplete input never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
