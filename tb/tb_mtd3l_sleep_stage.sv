// tb_mtd3l_sleep_stage: self-checking test of the MTD3L gate output stage.
// Drives every (set_fn, sleep0, sleep1) combination and checks the output
// against the sleep table: 00 passes set_fn, 01 gives 1, 10 gives 0, and 11
// keeps the previous output even while set_fn changes underneath.
module tb_mtd3l_sleep_stage;
  logic set_fn, sleep0, sleep1, z;
  int checks = 0, failures = 0;

  mtd3l_sleep_stage dut (.set_fn(set_fn), .sleep0(sleep0), .sleep1(sleep1), .z(z));

  task automatic check(input logic exp, input string what);
    checks++;
    if (z !== exp) begin
      failures++;
      $display("FAIL %s: set_fn=%b sleep0=%b sleep1=%b z=%b expected %b",
               what, set_fn, sleep0, sleep1, z, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Normal evaluation and both spacers.
    for (int v = 0; v < 2; v++) begin
      set_fn = v[0];
      sleep0 = 0; sleep1 = 0; #1 check(v[0], "normal");
      sleep0 = 0; sleep1 = 1; #1 check(1'b1, "sleep-to-1");
      sleep0 = 1; sleep1 = 0; #1 check(1'b0, "sleep-to-0");
    end
    // Hold: load a value, assert both sleeps, flip set_fn, value must stay.
    for (int v = 0; v < 2; v++) begin
      set_fn = v[0]; sleep0 = 0; sleep1 = 0; #1 check(v[0], "load before hold");
      sleep0 = 1; sleep1 = 1; #1 check(v[0], "hold entry");
      set_fn = ~v[0]; #1 check(v[0], "hold against changed set_fn");
      sleep0 = 0; sleep1 = 0; #1 check(~v[0], "release from hold");
    end
    // Hold the all-one and all-zero spacers.
    set_fn = 0; sleep0 = 0; sleep1 = 1; #1 check(1'b1, "one spacer");
    sleep0 = 1; #1 check(1'b1, "hold one spacer");
    sleep1 = 0; #1 check(1'b0, "zero spacer");
    sleep1 = 1; set_fn = 1; #1 check(1'b0, "hold zero spacer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
