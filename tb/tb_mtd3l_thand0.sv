// tb_mtd3l_thand0: self-checking test of the MTD3L THAND0 gate.
// Applies all 16 input patterns under each sleep setting and compares
// the output with the gate's threshold condition A.B + B.C + A.D (normal), 1
// (sleep-to-1) and 0 (sleep-to-0); then checks that asserting both sleeps
// holds the output while the inputs change.
module tb_mtd3l_thand0;
  localparam int N = 4;
  logic [N-1:0] x;
  logic sleep0, sleep1, z;
  int checks = 0, failures = 0;

  mtd3l_thand0 dut (.a(x[0]), .b(x[1]), .c(x[2]), .d(x[3]), .sleep0(sleep0), .sleep1(sleep1), .z(z));

  // Reference: the threshold condition written as sum of products.
  function automatic logic ref_fn(input logic [N-1:0] v);
    logic [3:0] w;
    w = 4'(v);
    return (w[0] & w[1]) | (w[1] & w[2]) | (w[0] & w[3]);
  endfunction

  task automatic check(input logic exp, input string what);
    checks++;
    if (z !== exp) begin
      failures++;
      $display("FAIL %s: x=%b sleep0=%b sleep1=%b z=%b expected %b",
               what, x, sleep0, sleep1, z, exp);
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
    for (int v = 0; v < (1 << N); v++) begin
      x = N'(v);
      sleep0 = 0; sleep1 = 0; #1 check(ref_fn(x), "normal");
      sleep0 = 0; sleep1 = 1; #1 check(1'b1, "sleep-to-1");
      sleep0 = 1; sleep1 = 0; #1 check(1'b0, "sleep-to-0");
    end
    // Hold: evaluate a pattern, freeze with both sleeps, sweep the inputs.
    for (int v = 0; v < (1 << N); v++) begin
      logic held;
      x = N'(v); sleep0 = 0; sleep1 = 0; #1 check(ref_fn(x), "before hold");
      held = ref_fn(x);
      sleep0 = 1; sleep1 = 1;
      for (int u = 0; u < (1 << N); u++) begin
        x = N'(u); #1 check(held, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
