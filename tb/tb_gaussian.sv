// tb_gaussian -- self-checking testbench for gaussian.
//
// A default unit (two inputs, seven series terms) and a six-term unit receive the
// same operands. Checks: the worked example of the source (s = 5, m = 2, sigma = 2;
// power 1.125, Gaussian 0.325005 with six terms), the value at the centre (1.0), a
// two-input field, random operands against an integer model written here and against
// the real Gaussian, and the latency of N_IN + TERMS + 4 cycles to read_ena.
module tb_gaussian;
  import cmac_pkg::*;

  localparam int N_IN = 2;

  logic  clk = 0, rst_n = 0, start = 0;
  fx_t   s [N_IN], m [N_IN], sigma [N_IN];
  fx_t   b7, b6, p7, p6;
  fx64_t e7, e6;
  logic  rd7, rd6, busy7, busy6;
  int    checks = 0, failures = 0;

  gaussian              u7 (.clk, .rst_n, .start, .s, .m, .sigma, .result(b7), .power(p7),
                            .exp_val(e7), .read_ena(rd7), .busy(busy7));
  gaussian #(.TERMS(6)) u6 (.clk, .rst_n, .start, .s, .m, .sigma, .result(b6), .power(p6),
                            .exp_val(e6), .read_ena(rd6), .busy(busy6));

  always #10 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Integer model: power, truncated series, reciprocal.
  function automatic longint model(input int terms);
    logic signed [127:0] p = 0, t, acc;
    for (int i = 0; i < N_IN; i++) begin
      logic signed [127:0] d, g2;
      d  = 128'(s[i]) - 128'(m[i]);
      g2 = 128'(sigma[i]) * 128'(sigma[i]) / 1_000_000;
      p += ((d * d) / 1_000_000) * 1_000_000 / (2 * g2);
    end
    if (p > 128'(FX_MAX)) p = 128'(FX_MAX);
    t = 1_000_000; acc = 1_000_000;
    for (int n = 1; n < terms; n++) begin
      t = (t * p) / 1_000_000 / n;
      acc += t;
    end
    return longint'(128'sd1_000_000_000_000 / acc);
  endfunction

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end
  endtask

  task automatic run();
    int cyc = 0, c7 = -1, c6 = -1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (c7 < 0) begin
      if (rd6 && c6 < 0) c6 = cyc;
      if (rd7) c7 = cyc;
      @(negedge clk); cyc++;
    end
    check("latency 7 terms", c7, N_IN + 7 + 4);
    check("latency 6 terms", c6, N_IN + 6 + 4);
    // 1.44 us at 50 MHz is 72 cycles
    checks++;
    if (c7 > 72) begin failures++; $display("FAIL slower than 1.44 us"); end
  endtask

  initial begin
    for (int i = 0; i < N_IN; i++) begin s[i] = 0; m[i] = 0; sigma[i] = 1_000_000; end
    repeat (3) @(negedge clk); rst_n = 1;

    s[0] = 5_000_000; m[0] = 2_000_000; sigma[0] = 2_000_000;
    run();
    check("example power", p7, 1_125_000);
    check("example six terms (reported 0.325005)", b6, 325_005);
    check("example seven terms", b7, model(7));

    s[0] = 2_000_000;
    run();
    check("centre", b7, 1_000_000);

    s[0] = 3_000_000; s[1] = -1_000_000; sigma[1] = 1_500_000;
    run();
    check("two inputs", b7, model(7));
    check("two inputs (6)", b6, model(6));

    for (int k = 0; k < 100; k++) begin
      real pr, exact;
      for (int i = 0; i < N_IN; i++) begin
        s[i]     = fx_t'($urandom_range(0, 4_000_000)) - 2_000_000;
        m[i]     = fx_t'($urandom_range(0, 4_000_000)) - 2_000_000;
        sigma[i] = fx_t'($urandom_range(1_000_000, 3_000_000));
      end
      run();
      check("random (7)", b7, model(7));
      check("random (6)", b6, model(6));
      // real Gaussian; the truncated series over-estimates e^-p slightly for p <= 1
      pr = real'(p7) / 1.0e6;
      if (pr <= 1.0) begin
        exact = $exp(-pr) * 1.0e6;
        checks++;
        if (real'(b7) < exact - 2.0 || real'(b7) > exact * 1.001 + 2.0) begin
          failures++;
          $display("FAIL accuracy p=%f got %0d exact %f", pr, b7, exact);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
