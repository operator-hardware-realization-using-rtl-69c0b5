// tb_circle_area -- self-checking testbench for circle_area.
//
// Checks the example of the source, radius 5 giving 78.539800 (78,539,800 with
// pi = 3.141592), radius 0 and 1, random radii against a model written here and
// within 1e-5 of the real area, saturation for a large radius, and the latency of 3.
module tb_circle_area;
  import cmac_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  radius, area;
  logic read_ena, busy;
  int   checks = 0, failures = 0;

  circle_area dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fx_t r, input longint expv, input string what);
    int cyc;
    radius = r;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!read_ena) begin @(negedge clk); cyc++; end
    checks += 2;
    if (longint'(area) != expv) begin failures++; $display("FAIL %s: area=%0d exp %0d", what, area, expv); end
    if (cyc != 3)               begin failures++; $display("FAIL %s: latency %0d", what, cyc); end
  endtask

  initial begin
    radius = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    run(5_000_000, 78_539_800, "radius 5");
    run(0, 0, "radius 0");
    run(1_000_000, 3_141_592, "radius 1");
    for (int k = 0; k < 200; k++) begin
      fx_t r;
      longint r2;
      real rr, exact;
      r  = fx_t'($urandom_range(0, 25_000_000));
      r2 = (longint'(r) * longint'(r)) / 1_000_000;
      run(r, (r2 * 3_141_592) / 1_000_000, "random");
      rr = real'(r) / 1.0e6;
      exact = 3.14159265358979 * rr * rr;
      checks++;
      if (real'(area) / 1.0e6 - exact > 1.0e-5 || exact - real'(area) / 1.0e6 > 1.0e-5 + exact * 2.1e-7) begin
        failures++;
        $display("FAIL accuracy r=%0d area=%0d exact %f", r, area, exact);
      end
    end
    run(200_000_000, longint'(FX_MAX), "saturate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
