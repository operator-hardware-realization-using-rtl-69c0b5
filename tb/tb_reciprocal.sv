// tb_reciprocal -- self-checking testbench for reciprocal.
//
// Checks 1/1 = 1, 1/2 = 0.5, 1/e^1.125 (six-term series value 3.076873, giving
// 0.325005, the Gaussian value the source reports), 1/7.387298, saturation for
// zero and negative divisors, values that underflow to 0, random divisors against 10^12 / v, and the two-cycle latency.
module tb_reciprocal;
  import cmac_pkg::*;

  logic  clk = 0, rst_n = 0, start = 0;
  fx64_t v;
  fx_t   result;
  logic  read_ena, busy;
  int    checks = 0, failures = 0;

  reciprocal dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fx64_t vv, input longint expv, input string what);
    int cyc;
    v = vv;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!read_ena) begin @(negedge clk); cyc++; end
    checks++;
    if (longint'(result) != expv) begin
      failures++;
      $display("FAIL %s: 1/%0d got %0d expected %0d", what, vv, result, expv);
    end
    checks++;
    if (cyc != 2) begin
      failures++;
      $display("FAIL %s: latency %0d", what, cyc);
    end
  endtask

  initial begin
    v = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(1_000_000, 1_000_000, "one");
    run(2_000_000, 500_000, "two");
    run(3_076_873, 325_005, "e^1.125 six terms");
    run(7_387_298, 135_367, "e^2");
    run(0, longint'(FX_MAX), "zero");
    run(-5, longint'(FX_MAX), "negative");
    run(64'sd2_000_000_000_000, 0, "underflow");
    run(1, longint'(FX_MAX), "overflow");
    for (int k = 0; k < 200; k++) begin
      longint vv;
      vv = longint'($urandom_range(1_000_000, 2_000_000_000));
      run(vv, 64'sd1_000_000_000_000 / vv, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
