// exp_taylor -- e^x by a truncated Taylor series in the integer numeric system.
//
// e^x = sum_{n=0}^{TERMS-1} x^n / n!. Each term is derived from the previous one,
// t_n = t_{n-1} * x / 1,000,000 / n, so one multiplier and one divider serve all
// terms; one term is formed and added per clock. x and the result are scaled by
// 1,000,000. Terms are kept 128 bits wide so no term of the series can overflow for
// any 32-bit x with up to 12 terms; the sum is saturated to 64 bits.
//
// Interface: a one-cycle `start` samples x. After TERMS-1 clocks the sum is placed
// on `result`, and `read_ena` pulses for one cycle on the next clock.
// Latency: start to read_ena = TERMS cycles (TERMS >= 2).
//
// The series, its term-by-term summation and the scaling follow the source design.
// The source states that seven terms are used (the default here); its exponential
// example, e^2 = 7.387298, is exactly what nine terms give with truncating
// arithmetic, so the number of terms is a parameter. The recursive term formation
// and the 64-bit result are this design's own choices.
module exp_taylor
  import cmac_pkg::*;
#(
  parameter int TERMS = 7
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fx_t   x,
  output fx64_t result,
  output logic  read_ena,
  output logic  busy
);

  typedef enum logic [1:0] {ST_IDLE, ST_CALC, ST_ANNOUNCE} state_e;

  initial begin
    if (TERMS < 2 || TERMS > 12) $fatal(1, "exp_taylor: TERMS must be within 2..12");
  end

  state_e              state;
  fx_t                 x_q;
  logic [3:0]          n;      // index of the term being formed
  logic signed [127:0] term;   // t_{n-1}
  logic signed [127:0] sum;
  logic signed [127:0] term_next;
  logic signed [127:0] sum_next;

  always_comb begin
    term_next = ((term * 128'(x_q)) / 128'(SCALE)) / 128'($signed({1'b0, n}));
    sum_next  = sum + term_next;
  end

  function automatic fx64_t sat64(input logic signed [127:0] v);
    if (v > 128'sh7FFF_FFFF_FFFF_FFFF)       return 64'sh7FFF_FFFF_FFFF_FFFF;
    else if (v < -128'sh8000_0000_0000_0000) return 64'sh8000_0000_0000_0000;
    else                                     return fx64_t'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      x_q    <= '0;
      n      <= '0;
      term   <= '0;
      sum    <= '0;
      result <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          x_q   <= x;
          n     <= 4'd1;
          term  <= 128'(SCALE);
          sum   <= 128'(SCALE);
          state <= ST_CALC;
        end
        ST_CALC: begin
          term <= term_next;
          sum  <= sum_next;
          n    <= n + 4'd1;
          if (int'(n) == TERMS - 1) begin
            result <= sat64(sum_next);
            state  <= ST_ANNOUNCE;
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
    else $error("exp_taylor: start while busy");

endmodule
