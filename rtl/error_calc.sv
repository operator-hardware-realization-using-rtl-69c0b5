// error_calc -- error value calculation module of the CMAC.
//
// From the tracking goal (reference) and the measured plant state it forms the error
// e(t) = goal - state and the error difference de(t) = e(t) - e(t-1), both scaled by
// 1,000,000 and saturated to the 32-bit data word. The previous error is kept in a
// register. The first sample after reset has no previous error, so its error
// difference is 0.
//
// Interface: a one-cycle `start` samples goal and state; e and de are updated on the
// next clock and `read_ena` pulses on the clock after that. Latency: 2 cycles
// (40 ns at 50 MHz).
//
// The two outputs and their purpose (the learning inputs of the weight update)
// follow the source design. The sign convention de = e(t) - e(t-1), the zero
// difference on the first sample and the saturation are this design's own reading.
module error_calc
  import cmac_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  goal,
  input  fx_t  state_in,
  output fx_t  e,
  output fx_t  de,
  output logic read_ena,
  output logic busy
);

  typedef enum logic [1:0] {ST_IDLE, ST_CALC, ST_ANNOUNCE} state_e;

  state_e state;
  fx_t    goal_q, state_q;
  logic   have_prev;
  fx_t    e_new;

  assign e_new = sat_fx(fx64_t'(goal_q) - fx64_t'(state_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      goal_q    <= '0;
      state_q   <= '0;
      e         <= '0;
      de        <= '0;
      have_prev <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          goal_q  <= goal;
          state_q <= state_in;
          state   <= ST_CALC;
        end
        ST_CALC: begin
          // e still holds e(t-1) here
          de        <= have_prev ? sat_fx(fx64_t'(e_new) - fx64_t'(e)) : '0;
          e         <= e_new;
          have_prev <= 1'b1;
          state     <= ST_ANNOUNCE;
        end
        ST_ANNOUNCE: state <= ST_IDLE;
        default:     state <= ST_IDLE;
      endcase
    end
  end

  assign read_ena = (state == ST_ANNOUNCE);
  assign busy     = (state != ST_IDLE);

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("error_calc: start while busy");

endmodule
