// gauss_mul_sum -- Gaussian output multiplication and summation module (CMAC output).
//
// Forms the CMAC response y = sum_j b_j * w_j over the N_R receptive fields, where
// b_j is a Gaussian output (0..1,000,000 for 0..1) and w_j the weight of that field,
// both scaled by 1,000,000. Each product is divided by the scale once; the running
// sum is 64 bits wide and the response is saturated to the 32-bit data word.
// One multiply-accumulate is done per clock, so the fields share one multiplier.
//
// Interface: a one-cycle `start` samples b and w. After N_R clocks the sum is on `y`
// and `read_ena` pulses for one cycle on the next clock.
// Latency: N_R + 1 cycles from start to read_ena.
//
// That the response is the weighted sum of the Gaussian outputs follows the source
// design (its output equation); the serial multiply-accumulate, the order of
// truncation (per product) and the saturation are this design's own choices.
module gauss_mul_sum
  import cmac_pkg::*;
#(
  parameter int N_R = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  b [N_R],
  input  fx_t  w [N_R],
  output fx_t  y,
  output logic read_ena,
  output logic busy
);

  typedef enum logic [1:0] {ST_IDLE, ST_MAC, ST_ANNOUNCE} state_e;
  localparam int IDX_W = (N_R > 1) ? $clog2(N_R) : 1;

  state_e           state;
  fx_t              b_q [N_R];
  fx_t              w_q [N_R];
  logic [IDX_W-1:0] idx;
  fx64_t            acc;
  fx64_t            acc_next;

  assign acc_next = acc + fx_mul64(b_q[idx], w_q[idx]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      idx   <= '0;
      acc   <= '0;
      y     <= '0;
      for (int j = 0; j < N_R; j++) begin
        b_q[j] <= '0;
        w_q[j] <= '0;
      end
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          b_q   <= b;
          w_q   <= w;
          idx   <= '0;
          acc   <= '0;
          state <= ST_MAC;
        end
        ST_MAC: begin
          acc <= acc_next;
          if (int'(idx) == N_R - 1) begin
            y     <= sat_fx(acc_next);
            state <= ST_ANNOUNCE;
          end else begin
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
    else $error("gauss_mul_sum: start while busy");

endmodule
