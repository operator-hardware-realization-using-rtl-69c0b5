// tb_cmac_top -- end-to-end testbench of cmac_top at its default parameters.
//
// Closes the loop around the CMAC with a simple plant, a first-order lag whose state
// moves halfway towards a fiftieth of the control response per learning period:
//   state(t+1) = state(t) + (response(t) / 50 - state(t)) / 2.
// The goal is 5.0 from state 0, then steps to -3.0. Every learning period is
// compared with the reference model (error, error difference, fields, response,
// weights) and must finish within 1.6 us. The tracking error must fall below 2 %
// of each step before the step ends. Meanwhile the circle-area unit computes the
// area for radius 5 (78.5398) and a few others.
//
// Mechanisms counted, each of which must occur at least once: a learning period,
// the zero error difference of the first sample, positive and negative errors,
// weights rising and falling, a goal step, and a circle-area operation run in
// parallel with a learning period.
module tb_cmac_top;
  import cmac_pkg::*;
  import cmac_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ca_start = 0;
  fx_t  goal, state_in, response, error, error_diff, ca_radius, ca_area;
  fx_t  field_o [5], weights [5];
  logic read_ena, busy, ca_read_ena, ca_busy;
  int   checks = 0, failures = 0;
  ref_state_t st;

  int n_periods = 0, n_first_zero_de = 0, n_pos_err = 0, n_neg_err = 0;
  int n_w_up = 0, n_w_down = 0, n_goal_step = 0, n_circle = 0;

  cmac_top dut (
    .clk, .rst_n, .start, .goal, .state_in, .response, .read_ena, .busy,
    .error, .error_diff, .field(field_o), .weights,
    .ca_start, .ca_radius, .ca_area, .ca_read_ena, .ca_busy
  );

  always #10 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // Circle-area request running alongside the CMAC.
  task automatic circle(input fx_t r, input longint expv);
    ca_radius = r;
    @(negedge clk); ca_start = 1;
    @(negedge clk); ca_start = 0;
    while (!ca_read_ena) @(negedge clk);
    chk("circle area", ca_area, expv);
    n_circle++;
  endtask

  task automatic learn(input fx_t g, output longint e_out);
    ref_out_t o;
    longint w_before;
    int cyc;
    w_before = st.w[0];
    goal = g;
    o = cmac_ref_pkg::period(st, g, state_in);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!read_ena) begin @(negedge clk); cyc++; end
    chk("e", error, o.e);
    chk("de", error_diff, o.de);
    for (int j = 0; j < 5; j++) chk("field", field_o[j], o.b[j]);
    chk("response", response, o.y);
    for (int j = 0; j < 5; j++) chk("weight", weights[j], st.w[j]);
    checks++;
    if (cyc > 80) begin failures++; $display("FAIL period of %0d cycles", cyc); end
    n_periods++;
    if (n_periods == 1 && error_diff == 0 && error != 0) n_first_zero_de++;
    if (error > 0) n_pos_err++;
    if (error < 0) n_neg_err++;
    if (st.w[0] > w_before) n_w_up++;
    if (st.w[0] < w_before) n_w_down++;
    e_out = o.e;
    // plant
    state_in = fx_t'(longint'(state_in) + (longint'(response) / 50 - longint'(state_in)) / 2);
  endtask

  task automatic track(input fx_t g, input int n);
    longint e0, e;
    learn(g, e0);
    for (int k = 1; k < n; k++) learn(g, e);
    checks++;
    if ((e < 0 ? -e : e) * 50 > (e0 < 0 ? -e0 : e0)) begin
      failures++;
      $display("FAIL goal %0d: error %0d after %0d periods (start %0d)", g, e, n, e0);
    end else
      $display("goal %0d: error %0d -> %0d in %0d periods", g, e0, e, n);
  endtask

  initial begin
    goal = 0; state_in = 0; ca_radius = 0;
    reset(st);
    repeat (3) @(negedge clk); rst_n = 1;

    fork
      track(5_000_000, 60);
      begin
        circle(5_000_000, 78_539_800);
        circle(1_000_000, 3_141_592);
        circle(2_500_000, 19_634_950);
      end
    join
    n_goal_step++;
    track(-3_000_000, 60);

    $display("periods=%0d first_zero_de=%0d pos_err=%0d neg_err=%0d w_up=%0d w_down=%0d goal_steps=%0d circle=%0d",
             n_periods, n_first_zero_de, n_pos_err, n_neg_err, n_w_up, n_w_down, n_goal_step, n_circle);
    checks += 8;
    if (n_periods == 0)       begin failures++; $display("FAIL no learning period"); end
    if (n_first_zero_de == 0) begin failures++; $display("FAIL first sample difference not seen"); end
    if (n_pos_err == 0)       begin failures++; $display("FAIL no positive error"); end
    if (n_neg_err == 0)       begin failures++; $display("FAIL no negative error"); end
    if (n_w_up == 0)          begin failures++; $display("FAIL weights never rose"); end
    if (n_w_down == 0)        begin failures++; $display("FAIL weights never fell"); end
    if (n_goal_step == 0)     begin failures++; $display("FAIL no goal step"); end
    if (n_circle == 0)        begin failures++; $display("FAIL no circle area"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
