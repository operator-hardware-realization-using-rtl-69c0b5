// gaussian -- Gaussian function operation module of the CMAC.
//
// Computes one multidimensional receptive-field value
//   b = exp( - sum_i (s_i - m_i)^2 / (2 sigma_i^2) )
// in three stages, each a block of its own: power_calc forms the exponent argument
// p, exp_taylor forms e^p by a truncated Taylor series, and reciprocal forms
// 1/e^p = e^-p. Values are scaled by 1,000,000, so b lies in 0..1,000,000.
// Each stage is started by the previous stage's read_ena pulse.
//
// Interface: a one-cycle `start` samples s, m and sigma. When b is ready it is
// placed on `result` and `read_ena` pulses for one cycle on the next clock. The
// intermediate `power` and `exp_val` stay visible for observation.
// Latency: (N_IN + 1) + TERMS + 2 + 1 cycles from start to read_ena; 13 cycles
// (260 ns at 50 MHz) with the defaults, inside the 1.44 us the source reports.
//
// The three-stage decomposition, the Taylor series and the scaling follow the
// source design; the serial chaining of the stages is this design's own choice.
module gaussian
  import cmac_pkg::*;
#(
  parameter int N_IN  = 2,
  parameter int TERMS = 7
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fx_t   s     [N_IN],
  input  fx_t   m     [N_IN],
  input  fx_t   sigma [N_IN],
  output fx_t   result,
  output fx_t   power,
  output fx64_t exp_val,
  output logic  read_ena,
  output logic  busy
);

  logic pw_rd, pw_busy;
  logic ex_rd, ex_busy;
  logic rc_rd, rc_busy;
  fx_t  rc_result;
  logic announce;

  power_calc #(.N_IN(N_IN)) u_power (
    .clk, .rst_n, .start, .s, .m, .sigma,
    .power(power), .read_ena(pw_rd), .busy(pw_busy)
  );

  exp_taylor #(.TERMS(TERMS)) u_exp (
    .clk, .rst_n, .start(pw_rd), .x(power),
    .result(exp_val), .read_ena(ex_rd), .busy(ex_busy)
  );

  reciprocal u_recip (
    .clk, .rst_n, .start(ex_rd), .v(exp_val),
    .result(rc_result), .read_ena(rc_rd), .busy(rc_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result   <= '0;
      announce <= 1'b0;
    end else begin
      announce <= rc_rd;
      if (rc_rd) result <= rc_result;
    end
  end

  assign read_ena = announce;
  assign busy     = pw_busy | ex_busy | rc_busy | rc_rd | announce;

endmodule
