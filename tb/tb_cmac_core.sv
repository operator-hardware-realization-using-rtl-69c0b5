// tb_cmac_core -- self-checking testbench for cmac_core.
//
// Drives learning periods with fixed and random goal/state pairs and compares the
// error, error difference, the five field values, the response and the weights
// with the reference model after every period. Each period must finish within
// 1.6 us (80 cycles at 50 MHz); with the defaults it takes 28 cycles, and busy
// must stay high from start to read_ena.
module tb_cmac_core;
  import cmac_pkg::*;
  import cmac_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  goal, state_in, response, error, error_diff;
  fx_t  field_o [5], weights [5];
  logic read_ena, busy;
  int   checks = 0, failures = 0;
  ref_state_t st;

  cmac_core dut (.clk, .rst_n, .start, .goal, .state_in, .response, .read_ena, .busy,
                 .error, .error_diff, .field(field_o), .weights);

  always #10 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint got, input longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end
  endtask

  task automatic run(input fx_t g, input fx_t s);
    ref_out_t o;
    int cyc;
    goal = g; state_in = s;
    o = period(st, g, s);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!read_ena) begin
      chk("busy during period", busy, 1);
      @(negedge clk); cyc++;
    end
    chk("e", error, o.e);
    chk("de", error_diff, o.de);
    for (int j = 0; j < 5; j++) chk($sformatf("b[%0d]", j), field_o[j], o.b[j]);
    chk("response", response, o.y);
    for (int j = 0; j < 5; j++) chk($sformatf("w[%0d]", j), weights[j], st.w[j]);
    chk("latency", cyc, 28);
    checks++;
    if (cyc > 80) begin failures++; $display("FAIL period longer than 1.6 us"); end
  endtask

  initial begin
    goal = 0; state_in = 0;
    reset(st);
    repeat (3) @(negedge clk); rst_n = 1;

    run(5_000_000, 3_000_000);
    chk("first period: zero weights give zero response", response, 0);
    run(5_000_000, -1_000_000);
    chk("second period response nonzero", response != 0, 1);
    run(1_000_000, 1_000_000);
    for (int k = 0; k < 100; k++)
      run(fx_t'($urandom_range(0, 6_000_000)) - 3_000_000, fx_t'($urandom_range(0, 6_000_000)) - 3_000_000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
