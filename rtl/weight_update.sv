// weight_update -- weight update operation module (memory-weight space) of the CMAC.
//
// Holds the N_R weights of the memory-weight space and, on each learning step,
// applies  w_j(t+1) = w_j(t) + K1_j * e(t) + K2_j * de(t)  to every weight, where
// e is the tracking error, de the error difference and K1_j, K2_j the learning
// rates of weight j. All values are scaled by 1,000,000; each product is divided by
// the scale once and the new weight saturates to the 32-bit data word. Weights reset
// to 0. One weight is updated per clock through a single multiply-add datapath.
//
// Interface: a one-cycle `start` samples e and de. The weights are updated in index
// order over the next N_R clocks and `read_ena` pulses on the clock after the last.
// `w` always shows the stored weights. Latency: N_R + 1 cycles (120 ns at 50 MHz
// with N_R = 5).
//
// The update equation follows the source design; the default rates K1 = 5 and
// K2 = 3 are the values of its weight update example. The zero reset value, the
// serial update order and the saturation are this design's own choices.
module weight_update
  import cmac_pkg::*;
#(
  parameter int  N_R = 5,
  parameter fx_t K1 [N_R] = '{default: 32'sd5_000_000},
  parameter fx_t K2 [N_R] = '{default: 32'sd3_000_000}
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  e,
  input  fx_t  de,
  output fx_t  w [N_R],
  output logic read_ena,
  output logic busy
);

  typedef enum logic [1:0] {ST_IDLE, ST_UPDATE, ST_ANNOUNCE} state_e;
  localparam int IDX_W = (N_R > 1) ? $clog2(N_R) : 1;

  state_e           state;
  fx_t              e_q, de_q;
  logic [IDX_W-1:0] idx;
  fx_t              w_next;

  assign w_next = sat_fx(fx64_t'(w[idx]) + fx_mul64(K1[idx], e_q) + fx_mul64(K2[idx], de_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      e_q   <= '0;
      de_q  <= '0;
      idx   <= '0;
      for (int j = 0; j < N_R; j++) w[j] <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          e_q   <= e;
          de_q  <= de;
          idx   <= '0;
          state <= ST_UPDATE;
        end
        ST_UPDATE: begin
          w[idx] <= w_next;
          if (int'(idx) == N_R - 1) state <= ST_ANNOUNCE;
          else                      idx   <= idx + 1'b1;
        end
        ST_ANNOUNCE: state <= ST_IDLE;
        default:     state <= ST_IDLE;
      endcase
    end
  end

  assign read_ena = (state == ST_ANNOUNCE);
  assign busy     = (state != ST_IDLE);

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("weight_update: start while busy");

endmodule
