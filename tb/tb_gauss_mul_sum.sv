// tb_gauss_mul_sum -- self-checking testbench for gauss_mul_sum.
//
// Checks a hand-worked sum (0.5*10 + 0.25*(-4) + 1*2 + 0*7 + 0.1*3 = 6.3), random
// field values and weights against a model written here, saturation of a sum that
// leaves the 32-bit word, and the latency of N_R + 1 cycles.
module tb_gauss_mul_sum;
  import cmac_pkg::*;

  localparam int N_R = 5;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  b [N_R], w [N_R], y;
  logic read_ena, busy;
  int   checks = 0, failures = 0;

  gauss_mul_sum dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model();
    longint acc = 0;
    for (int j = 0; j < N_R; j++) acc += (longint'(b[j]) * longint'(w[j])) / 1_000_000;
    if (acc > longint'(FX_MAX)) return longint'(FX_MAX);
    if (acc < longint'(FX_MIN)) return longint'(FX_MIN);
    return acc;
  endfunction

  task automatic run(input longint expv, input string what);
    int cyc;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!read_ena) begin @(negedge clk); cyc++; end
    checks += 2;
    if (longint'(y) != expv) begin failures++; $display("FAIL %s: y=%0d exp %0d", what, y, expv); end
    if (cyc != N_R + 1)      begin failures++; $display("FAIL %s: latency %0d", what, cyc); end
  endtask

  initial begin
    for (int j = 0; j < N_R; j++) begin b[j] = 0; w[j] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;

    b = '{500_000, 250_000, 1_000_000, 0, 100_000};
    w = '{10_000_000, -4_000_000, 2_000_000, 7_000_000, 3_000_000};
    run(6_300_000, "worked sum");

    for (int k = 0; k < 200; k++) begin
      for (int j = 0; j < N_R; j++) begin
        b[j] = fx_t'($urandom_range(0, 1_000_000));
        w[j] = fx_t'($urandom_range(0, 200_000_000)) - 100_000_000;
      end
      run(model(), "random");
    end

    for (int j = 0; j < N_R; j++) begin b[j] = 1_000_000; w[j] = 32'sd2_000_000_000; end
    run(longint'(FX_MAX), "saturate high");
    for (int j = 0; j < N_R; j++) w[j] = -32'sd2_000_000_000;
    run(longint'(FX_MIN), "saturate low");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
