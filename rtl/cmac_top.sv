// cmac_top -- top level: the CMAC learning controller and the integer-numeric-system
// circle-area demonstrator, side by side with separate ports.
//
// The CMAC side takes a 50 MHz clock, an active-low reset, a 32-bit tracking goal and
// a 32-bit plant state (both scaled by 1,000,000) and returns a 32-bit control
// response with a one-cycle read_ena handshake, one learning period per `start`
// (30 cycles with the defaults). The error, the error difference, the receptive-field
// values and the weights are brought out for observation. The circle-area side
// computes pi * r^2 for a scaled radius. See cmac_core and circle_area for timing.
//
// The two designs share only clock and reset. Grouping them in one top is this
// design's own arrangement; the CMAC port list (clock, reset, goal, state, response,
// handshake) follows the source design, the start strobe and observation ports are
// additions.
module cmac_top
  import cmac_pkg::*;
#(
  parameter int N_R = 5
) (
  input  logic clk,
  input  logic rst_n,
  // CMAC
  input  logic start,
  input  fx_t  goal,
  input  fx_t  state_in,
  output fx_t  response,
  output logic read_ena,
  output logic busy,
  output fx_t  error,
  output fx_t  error_diff,
  output fx_t  field   [N_R],
  output fx_t  weights [N_R],
  // circle area
  input  logic ca_start,
  input  fx_t  ca_radius,
  output fx_t  ca_area,
  output logic ca_read_ena,
  output logic ca_busy
);

  cmac_core #(.N_R(N_R)) u_cmac (
    .clk, .rst_n, .start, .goal, .state_in,
    .response, .read_ena, .busy, .error, .error_diff, .field, .weights
  );

  circle_area u_circle (
    .clk, .rst_n, .start(ca_start), .radius(ca_radius),
    .area(ca_area), .read_ena(ca_read_ena), .busy(ca_busy)
  );

endmodule
