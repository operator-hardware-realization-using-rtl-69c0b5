// tb_exp_taylor -- self-checking testbench for exp_taylor.
//
// Runs the default seven-term unit and a nine-term unit side by side. Checks:
// e^0 = 1; e^2 with nine terms equals 7.387298, the value the source reports; e^2
// with seven terms equals 1 + 2 + 2 + 4/3 + 2/3 + 4/15 + 4/45 truncated term by term
// (7.355553); e^1.125 with six terms; random arguments against a model written here
// and against the real exponential within the truncation error; the latency of TERMS
// cycles to read_ena.
module tb_exp_taylor;
  import cmac_pkg::*;

  logic  clk = 0, rst_n = 0, start = 0;
  fx_t   x;
  fx64_t r7, r9;
  logic  rd7, rd9, busy7, busy9;
  int    checks = 0, failures = 0;

  exp_taylor                u7 (.clk, .rst_n, .start, .x, .result(r7), .read_ena(rd7), .busy(busy7));
  exp_taylor #(.TERMS(9))   u9 (.clk, .rst_n, .start, .x, .result(r9), .read_ena(rd9), .busy(busy9));

  always #10 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Series summed the same way: each term from the previous one, truncating.
  function automatic longint model(input longint xv, input int terms);
    logic signed [127:0] t, acc;
    t = 1_000_000;
    acc = 1_000_000;
    for (int n = 1; n < terms; n++) begin
      t = (t * xv) / 1_000_000 / n;
      acc += t;
    end
    if (acc > 128'(64'sh7FFF_FFFF_FFFF_FFFF)) return 64'sh7FFF_FFFF_FFFF_FFFF;
    return longint'(acc);
  endfunction

  task automatic check(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end
  endtask

  task automatic run(input fx_t xv);
    int cyc = 0, c7 = -1, c9 = -1;
    x = xv;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (c9 < 0) begin
      if (rd7 && c7 < 0) c7 = cyc;
      if (rd9) c9 = cyc;
      @(negedge clk); cyc++;
    end
    check("latency 7 terms", c7, 7);
    check("latency 9 terms", c9, 9);
  endtask

  initial begin
    x = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    run(0);
    check("e^0 (7)", r7, 1_000_000);
    check("e^0 (9)", r9, 1_000_000);

    run(2_000_000);
    check("e^2 nine terms, reported value", r9, 7_387_298);
    check("e^2 seven terms", r7, 1_000_000 + 2_000_000 + 2_000_000 + 1_333_333 + 666_666 + 266_666 + 88_888);

    run(1_125_000);
    check("e^1.125 seven terms", r7, model(1_125_000, 7));

    run(-1_000_000);
    check("e^-1 seven terms", r7, model(-1_000_000, 7));

    for (int k = 0; k < 100; k++) begin
      fx_t xv;
      real exact, err;
      xv = fx_t'($urandom_range(0, 3_000_000));
      run(xv);
      check("random (7)", r7, model(xv, 7));
      check("random (9)", r9, model(xv, 9));
      // nine terms of e^x for x <= 3 stay within 0.4 % of the real value
      exact = $exp(real'(xv) / 1.0e6) * 1.0e6;
      err = (exact - real'(r9)) / exact;
      checks++;
      if (err < 0.0 || err > 0.004) begin
        failures++;
        $display("FAIL accuracy x=%0d got %0d exact %f", xv, r9, exact);
      end
    end

    // Large argument: no overflow, result stays positive and saturates at most
    run(2_000_000_000);
    check("large x model", r7, model(2_000_000_000, 7));
    check("large x saturates (9)", r9, 64'sh7FFF_FFFF_FFFF_FFFF);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
