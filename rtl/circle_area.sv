// circle_area -- circle area A = pi * r^2 in the integer numeric system.
//
// A small demonstrator of the integer numeric system: the radius is scaled by
// 1,000,000 (radius 5 is 5,000,000) and pi is the integer 3,141,592 (pi to six
// decimals, truncated). The square r*r/10^6 is formed on the first clock and the
// product with pi, again divided by 10^6, on the second; the area is therefore also
// scaled by 1,000,000 (radius 5 gives 78,539,800, i.e. 78.5398). The area saturates
// to the 32-bit data word.
//
// Interface: a one-cycle `start` samples the radius; `area` is valid when `read_ena`
// pulses, 3 cycles after start.
//
// The scaling, the value of pi and the radius-5 example follow the source design;
// the two-step pipeline and saturation are this design's own choices.
module circle_area
  import cmac_pkg::*;
#(
  parameter fx_t PI_FX = 32'sd3_141_592
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  radius,
  output fx_t  area,
  output logic read_ena,
  output logic busy
);

  typedef enum logic [1:0] {ST_IDLE, ST_SQUARE, ST_SCALE, ST_ANNOUNCE} state_e;

  state_e state;
  fx_t    r_q;
  fx_t    r2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      r_q   <= '0;
      r2_q  <= '0;
      area  <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          r_q   <= radius;
          state <= ST_SQUARE;
        end
        ST_SQUARE: begin
          r2_q  <= fx_mul(r_q, r_q);
          state <= ST_SCALE;
        end
        ST_SCALE: begin
          area  <= fx_mul(r2_q, PI_FX);
          state <= ST_ANNOUNCE;
        end
        ST_ANNOUNCE: state <= ST_IDLE;
        default:     state <= ST_IDLE;
      endcase
    end
  end

  assign read_ena = (state == ST_ANNOUNCE);
  assign busy     = (state != ST_IDLE);

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("circle_area: start while busy");

endmodule
