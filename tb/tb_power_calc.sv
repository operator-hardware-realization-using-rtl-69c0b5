// tb_power_calc -- self-checking testbench for power_calc.
//
// Checks the worked example of the source (s = 5, m = 2, sigma = 2 gives 1.125),
// a two-input sum, a zero-width field, and 200 random vectors against an integer
// model written here, plus the latency of N_IN + 1 cycles to read_ena.
module tb_power_calc;
  import cmac_pkg::*;

  localparam int N_IN = 2;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  s [N_IN], m [N_IN], sigma [N_IN];
  fx_t  power;
  logic read_ena, busy;
  int   checks = 0, failures = 0;

  power_calc dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(input fx_t sv [N_IN], input fx_t mv [N_IN], input fx_t gv [N_IN]);
    longint total = 0;
    for (int i = 0; i < N_IN; i++) begin
      longint d  = longint'(sv[i]) - longint'(mv[i]);
      longint g2 = (longint'(gv[i]) * longint'(gv[i])) / 1_000_000;
      // (d*d)/1e6 can reach 2^53, times 1e6 overflows 64 bits: divide in two steps
      longint sq = (d * d) / 1_000_000;
      if (g2 == 0) return longint'(FX_MAX);
      total += 128'(sq) * 1_000_000 / (2 * g2) > 128'(FX_MAX) ? longint'(FX_MAX)
             : longint'(128'(sq) * 1_000_000 / (2 * g2));
    end
    return (total > longint'(FX_MAX)) ? longint'(FX_MAX) : total;
  endfunction

  task automatic run(input longint expect_v, input string what);
    int cyc = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!read_ena) begin @(negedge clk); cyc++; end
    checks++;
    if (longint'(power) != expect_v) begin
      failures++;
      $display("FAIL %s: power=%0d expected %0d", what, power, expect_v);
    end
    checks++;
    if (cyc != N_IN + 1) begin
      failures++;
      $display("FAIL %s: latency %0d expected %0d", what, cyc, N_IN + 1);
    end
  endtask

  initial begin
    for (int i = 0; i < N_IN; i++) begin s[i] = 0; m[i] = 0; sigma[i] = 1_000_000; end
    repeat (3) @(negedge clk); rst_n = 1;

    // Worked example: s=5, m=2, sigma=2 -> 1.125 ; the second input sits on its mean
    s[0] = 5_000_000; m[0] = 2_000_000; sigma[0] = 2_000_000;
    s[1] = 7_000_000; m[1] = 7_000_000; sigma[1] = 1_000_000;
    run(1_125_000, "example");

    // Two inputs: 1.125 + (1-0)^2/(2*0.5^2) = 1.125 + 2 = 3.125
    s[1] = 1_000_000; m[1] = 0; sigma[1] = 500_000;
    run(3_125_000, "two inputs");

    // Negative difference squares to the same value
    s[0] = -1_000_000; m[0] = 2_000_000; sigma[0] = 2_000_000;
    s[1] = 0; m[1] = 0;
    run(1_125_000, "negative difference");

    // Vanishing width saturates
    sigma[0] = 100;
    run(longint'(FX_MAX), "zero width");

    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < N_IN; i++) begin
        s[i]     = fx_t'($urandom_range(0, 20_000_000)) - 10_000_000;
        m[i]     = fx_t'($urandom_range(0, 10_000_000)) - 5_000_000;
        sigma[i] = fx_t'($urandom_range(200_000, 5_000_000));
      end
      run(model(s, m, sigma), "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
