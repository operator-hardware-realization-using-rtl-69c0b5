// tb_weight_update -- self-checking testbench for weight_update.
//
// Replays the example of the source with K1 = 5, K2 = 3: from zero weights, e = 3 and
// de = 5 give 30; then e = 0 and de = -2 give 24. A second unit with per-weight
// rates checks that each weight uses its own rates. Random steps are checked against
// a model, the weights saturate at the word limits, and each update finishes in
// N_R + 1 cycles, within the 240 ns (12 cycles) the source reports.
module tb_weight_update;
  import cmac_pkg::*;

  localparam int N_R = 5;
  localparam fx_t K1B [N_R] = '{32'sd1_000_000, 32'sd500_000, -32'sd2_000_000, 32'sd0, 32'sd250_000};
  localparam fx_t K2B [N_R] = '{32'sd0, 32'sd1_500_000, 32'sd1_000_000, 32'sd3_000_000, -32'sd100_000};

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  e, de;
  fx_t  w [N_R], wb [N_R];
  logic read_ena, busy, rd_b, busy_b;
  int   checks = 0, failures = 0;
  longint mw [N_R], mwb [N_R];

  weight_update dut (.*);
  weight_update #(.N_R(N_R), .K1(K1B), .K2(K2B)) dut_b (
    .clk, .rst_n, .start, .e, .de, .w(wb), .read_ena(rd_b), .busy(busy_b));

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

  task automatic step(input fx_t ev, input fx_t dev);
    int cyc;
    e = ev; de = dev;
    for (int j = 0; j < N_R; j++) begin
      mw[j]  = sat(mw[j] + (5_000_000 * longint'(ev)) / 1_000_000 + (3_000_000 * longint'(dev)) / 1_000_000);
      mwb[j] = sat(mwb[j] + (longint'(K1B[j]) * ev) / 1_000_000 + (longint'(K2B[j]) * dev) / 1_000_000);
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!read_ena) begin @(negedge clk); cyc++; end
    for (int j = 0; j < N_R; j++) begin
      checks += 2;
      if (longint'(w[j]) != mw[j])   begin failures++; $display("FAIL w[%0d]=%0d exp %0d", j, w[j], mw[j]); end
      if (longint'(wb[j]) != mwb[j]) begin failures++; $display("FAIL wb[%0d]=%0d exp %0d", j, wb[j], mwb[j]); end
    end
    checks++;
    if (cyc != N_R + 1 || cyc > 12) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    e = 0; de = 0;
    for (int j = 0; j < N_R; j++) begin mw[j] = 0; mwb[j] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    checks++;
    if (w[0] != 0 || w[N_R-1] != 0) begin failures++; $display("FAIL reset value"); end

    step(3_000_000, 5_000_000);
    checks++; if (w[0] != 30_000_000) begin failures++; $display("FAIL example step 1: %0d", w[0]); end
    step(0, -2_000_000);
    checks++; if (w[0] != 24_000_000) begin failures++; $display("FAIL example step 2: %0d", w[0]); end

    for (int k = 0; k < 150; k++)
      step(fx_t'($urandom_range(0, 8_000_000)) - 4_000_000, fx_t'($urandom_range(0, 8_000_000)) - 4_000_000);

    // drive the weights into saturation
    for (int k = 0; k < 10; k++) step(32'sd400_000_000, 32'sd400_000_000);
    checks++; if (w[2] != FX_MAX) begin failures++; $display("FAIL no saturation: %0d", w[2]); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
