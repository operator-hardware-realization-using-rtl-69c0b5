// reciprocal -- 1/v in the integer numeric system, used to turn e^p into e^-p.
//
// With v scaled by 1,000,000, the scaled reciprocal is 10^6 * 10^6 / v: the
// numerator carries the scale twice so that the quotient keeps it once. The quotient
// is truncated and saturated to the 32-bit data word; a divisor of zero or below
// gives the largest positive word.
//
// Interface: a one-cycle `start` samples v; the quotient is on `result` one clock
// later and `read_ena` pulses on the clock after that. Latency: 2 cycles.
//
// The double scaling of the numerator follows the source design; the saturation
// rules and the single-cycle divider are this design's own choices.
module reciprocal
  import cmac_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fx64_t v,
  output fx_t   result,
  output logic  read_ena,
  output logic  busy
);

  typedef enum logic [1:0] {ST_IDLE, ST_CALC, ST_ANNOUNCE} state_e;

  state_e state;
  fx64_t  v_q;
  fx_t    quotient;

  always_comb begin
    if (v_q <= 0) quotient = FX_MAX;
    else          quotient = sat_fx((SCALE * SCALE) / v_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      v_q    <= '0;
      result <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          v_q   <= v;
          state <= ST_CALC;
        end
        ST_CALC: begin
          result <= quotient;
          state  <= ST_ANNOUNCE;
        end
        ST_ANNOUNCE: state <= ST_IDLE;
        default:     state <= ST_IDLE;
      endcase
    end
  end

  assign read_ena = (state == ST_ANNOUNCE);
  assign busy     = (state != ST_IDLE);

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("reciprocal: start while busy");

endmodule
