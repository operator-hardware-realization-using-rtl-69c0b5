// cmac_core -- one complete CMAC (cerebellar model articulation controller) learning
// period per request, in the integer numeric system.
//
// A learning period runs four modules in sequence, each started by the read_ena
// pulse of the one before it:
//   1. error_calc     e = goal - state, de = e(t) - e(t-1)
//   2. gaussian x N_R receptive-field values b_j = exp(-sum_i (s_i - m_ji)^2 /
//                     (2 sigma^2)) with the input vector s = (e, de); the N_R
//                     Gaussian units run in parallel
//   3. gauss_mul_sum  response y = sum_j b_j * w_j with the current weights
//   4. weight_update  w_j += K1_j * e + K2_j * de for the next period
// The response is registered when the weights have been updated and `read_ena`
// pulses on the next clock. All values are scaled by 1,000,000.
//
// Field j (0..N_R-1) is centred at MEAN_LO + j * MEAN_STEP in every input dimension
// and has width SIGMA. With the defaults: N_R = 5 fields centred at -2..2, sigma = 2.
//
// Interface: a one-cycle `start` samples `goal` and `state_in`; starting while
// `busy` is not allowed. Latency with the defaults: 30 cycles from start to
// read_ena (0.6 us at 50 MHz).
//
// The module sequence, the learning law and the Gaussian receptive fields follow
// the source design. The choice of (e, de) as the CMAC input vector, the number of
// fields, their centres and width, the start strobe and the order "respond with the
// current weights, then update" are this design's own choices.
module cmac_core
  import cmac_pkg::*;
#(
  parameter int  N_IN      = 2,
  parameter int  N_R       = 5,
  parameter int  TERMS     = 7,
  parameter fx_t MEAN_LO   = -32'sd2_000_000,
  parameter fx_t MEAN_STEP = 32'sd1_000_000,
  parameter fx_t SIGMA     = 32'sd2_000_000,
  parameter fx_t K1 [N_R]  = '{default: 32'sd5_000_000},
  parameter fx_t K2 [N_R]  = '{default: 32'sd3_000_000}
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  goal,
  input  fx_t  state_in,
  output fx_t  response,
  output logic read_ena,
  output logic busy,
  output fx_t  error,
  output fx_t  error_diff,
  output fx_t  field   [N_R],
  output fx_t  weights [N_R]
);

  initial begin
    if (N_IN != 2) $fatal(1, "cmac_core: the input vector is (e, de), so N_IN must be 2");
  end

  logic err_rd, err_busy;
  logic [N_R-1:0] g_rd, g_busy;
  logic sum_rd, sum_busy;
  logic upd_rd, upd_busy;
  fx_t  y;
  fx_t  y_q;
  logic announce;

  fx_t s_vec [N_IN];
  fx_t m_vec [N_R][N_IN];
  fx_t sig_vec [N_IN];

  assign s_vec[0] = error;
  assign s_vec[1] = error_diff;

  always_comb begin
    for (int j = 0; j < N_R; j++)
      for (int i = 0; i < N_IN; i++)
        m_vec[j][i] = fx_t'(MEAN_LO + j * MEAN_STEP);
    for (int i = 0; i < N_IN; i++) sig_vec[i] = SIGMA;
  end

  error_calc u_err (
    .clk, .rst_n, .start, .goal, .state_in,
    .e(error), .de(error_diff), .read_ena(err_rd), .busy(err_busy)
  );

  for (genvar j = 0; j < N_R; j++) begin : g_field
    fx_t   unused_power;
    fx64_t unused_exp;
    gaussian #(.N_IN(N_IN), .TERMS(TERMS)) u_gauss (
      .clk, .rst_n, .start(err_rd), .s(s_vec), .m(m_vec[j]), .sigma(sig_vec),
      .result(field[j]), .power(unused_power), .exp_val(unused_exp),
      .read_ena(g_rd[j]), .busy(g_busy[j])
    );
  end

  gauss_mul_sum #(.N_R(N_R)) u_sum (
    .clk, .rst_n, .start(g_rd[0]), .b(field), .w(weights),
    .y(y), .read_ena(sum_rd), .busy(sum_busy)
  );

  weight_update #(.N_R(N_R), .K1(K1), .K2(K2)) u_upd (
    .clk, .rst_n, .start(sum_rd), .e(error), .de(error_diff),
    .w(weights), .read_ena(upd_rd), .busy(upd_busy)
  );

  // The response of this period is held while the weights are updated.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q      <= '0;
      response <= '0;
      announce <= 1'b0;
    end else begin
      announce <= upd_rd;
      if (sum_rd) y_q      <= y;
      if (upd_rd) response <= y_q;
    end
  end

  assign read_ena = announce;
  assign busy     = err_busy | (|g_busy) | sum_busy | upd_busy | upd_rd | announce;

  // All Gaussian units start together and have equal latency.
  a_fields_in_step: assert property (@(posedge clk) disable iff (!rst_n) g_rd[0] |-> &g_rd)
    else $error("cmac_core: Gaussian units out of step");
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("cmac_core: start while busy");

endmodule
