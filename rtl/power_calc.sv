// power_calc -- power value (exponent argument) of the CMAC Gaussian receptive field.
//
// Computes  p = sum_{i<N_IN} (s_i - m_i)^2 / (2 * sigma_i^2)  in the integer numeric
// system (every value scaled by 1,000,000). For each input the difference is squared
// and divided by the scale once; sigma^2 is divided by the scale before it is doubled
// and used as the divisor, and the dividend is multiplied by the scale so the quotient
// keeps it. For N_IN = 1 this is the exponent of Eq. (1); for N_IN > 1 it is the sum of
// Eq. (4), so that one exponential gives the product of the per-input Gaussians.
//
// Interface: a one-cycle `start` samples s, m and sigma. One input is processed per
// clock. When the sum is complete it is placed on `power`, and `read_ena` pulses for
// one cycle on the following clock, so the receiver never samples a changing value.
// `power` then holds until the next start. Latency: start to read_ena = N_IN + 1 cycles.
//
// The operation sequence and scaling follow the source design. Handling N_IN inputs
// serially, saturating the result at the largest data word, and treating a sigma whose
// square rounds to zero as an infinitely narrow field (saturated power) are this
// design's own choices.
module power_calc
  import cmac_pkg::*;
#(
  parameter int N_IN = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  s     [N_IN],
  input  fx_t  m     [N_IN],
  input  fx_t  sigma [N_IN],
  output fx_t  power,
  output logic read_ena,
  output logic busy
);

  typedef enum logic [1:0] {ST_IDLE, ST_CALC, ST_ANNOUNCE} state_e;
  localparam int IDX_W = (N_IN > 1) ? $clog2(N_IN) : 1;

  state_e             state;
  fx_t                s_q     [N_IN];
  fx_t                m_q     [N_IN];
  fx_t                sigma_q [N_IN];
  logic [IDX_W-1:0]   idx;
  logic signed [127:0] acc;
  logic signed [127:0] term;

  // One input's contribution, computed in a single clock.
  always_comb begin
    logic signed [127:0] d, sq, sig2, den;
    d    = 128'(s_q[idx]) - 128'(m_q[idx]);
    sq   = (d * d) / 128'(SCALE);
    sig2 = (128'(sigma_q[idx]) * 128'(sigma_q[idx])) / 128'(SCALE);
    den  = 128'sd2 * sig2;
    if (den == 0) term = 128'(FX_MAX);
    else          term = (sq * 128'(SCALE)) / den;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      idx   <= '0;
      acc   <= '0;
      power <= '0;
      for (int i = 0; i < N_IN; i++) begin
        s_q[i]     <= '0;
        m_q[i]     <= '0;
        sigma_q[i] <= '0;
      end
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          s_q     <= s;
          m_q     <= m;
          sigma_q <= sigma;
          idx     <= '0;
          acc     <= '0;
          state   <= ST_CALC;
        end
        ST_CALC: begin
          if (int'(idx) == N_IN - 1) begin
            power <= (acc + term > 128'(FX_MAX)) ? FX_MAX : fx_t'(acc + term);
            state <= ST_ANNOUNCE;
          end else begin
            acc <= acc + term;
            idx <= idx + 1'b1;
          end
        end
        ST_ANNOUNCE: state <= ST_IDLE;
        default:     state <= ST_IDLE;
      endcase
    end
  end

  assign read_ena = (state == ST_ANNOUNCE);
  assign busy     = (state != ST_IDLE);

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("power_calc: start while busy");

endmodule
