// tb_error_calc -- self-checking testbench for error_calc.
//
// Replays the example of the source: goal 5, state 3 gives error 2 and error
// difference 0 (first sample); state -1 then gives error 6 and difference
// 6 - 2 = 4. Then 200 random goal/state pairs are checked against e = goal - state
// and de = e(t) - e(t-1), including saturation at the word limits, and each
// operation must finish within the 160 ns (8 cycles) the source reports.
module tb_error_calc;
  import cmac_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  goal, state_in, e, de;
  logic read_ena, busy;
  int   checks = 0, failures = 0;
  longint prev_e;

  error_calc dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sat(input longint v);
    if (v > longint'(FX_MAX)) return longint'(FX_MAX);
    if (v < longint'(FX_MIN)) return longint'(FX_MIN);
    return v;
  endfunction

  task automatic run(input fx_t g, input fx_t st, input longint exp_e, input longint exp_de,
                     input string what);
    int cyc;
    goal = g; state_in = st;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!read_ena) begin @(negedge clk); cyc++; end
    checks += 3;
    if (longint'(e) != exp_e)   begin failures++; $display("FAIL %s: e=%0d exp %0d", what, e, exp_e); end
    if (longint'(de) != exp_de) begin failures++; $display("FAIL %s: de=%0d exp %0d", what, de, exp_de); end
    if (cyc != 2)               begin failures++; $display("FAIL %s: latency %0d", what, cyc); end
  endtask

  initial begin
    goal = 0; state_in = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(5_000_000, 3_000_000, 2_000_000, 0, "first sample");
    run(5_000_000, -1_000_000, 6_000_000, 4_000_000, "state -1");
    prev_e = 6_000_000;
    for (int k = 0; k < 200; k++) begin
      fx_t g, st;
      longint ee;
      g  = fx_t'($urandom);
      st = (k % 4 == 0) ? fx_t'($urandom) : fx_t'($urandom_range(0, 20_000_000)) - 10_000_000;
      if (k % 4 != 0) g = fx_t'($urandom_range(0, 20_000_000)) - 10_000_000;
      ee = sat(longint'(g) - longint'(st));
      run(g, st, ee, sat(ee - prev_e), "random");
      prev_e = ee;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
