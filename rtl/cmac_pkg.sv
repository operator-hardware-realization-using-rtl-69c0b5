// cmac_pkg -- shared types, constants and arithmetic of the integer numeric system.
//
// Every real quantity in the CMAC is carried as a signed integer equal to the real
// value times SCALE = 1,000,000, so six decimal places survive and smaller parts are
// dropped (the integer numeric system). A product of two scaled values carries the
// scale twice and is divided by SCALE once; a quotient is formed by multiplying the
// dividend by SCALE first. All divisions truncate toward zero, as SystemVerilog
// integer division does. Results that do not fit the 32-bit data word saturate.
//
// The scale factor, the 32-bit data word and the "divide by one million after
// multiplying" rule follow the source design; saturation on overflow and the
// handling of a zero divisor are this design's own choices.
package cmac_pkg;

  // Scale of the integer numeric system: 1.0 is represented by SCALE.
  localparam longint SCALE = 64'sd1_000_000;

  // Width of a data word (goal, state, error, weight, response).
  localparam int DATA_W = 32;

  typedef logic signed [DATA_W-1:0] fx_t;
  typedef logic signed [63:0]       fx64_t;

  localparam fx_t FX_MAX = fx_t'({1'b0, {(DATA_W-1){1'b1}}});
  localparam fx_t FX_MIN = fx_t'({1'b1, {(DATA_W-1){1'b0}}});

  // Saturate a 64-bit value to the 32-bit data word.
  function automatic fx_t sat_fx(input fx64_t v);
    if (v > fx64_t'(FX_MAX))      return FX_MAX;
    else if (v < fx64_t'(FX_MIN)) return FX_MIN;
    else                          return fx_t'(v);
  endfunction

  // Scaled product a*b/SCALE, full 64-bit result (inputs are 32-bit, so no overflow).
  function automatic fx64_t fx_mul64(input fx_t a, input fx_t b);
    fx64_t p;
    p = fx64_t'(a) * fx64_t'(b);
    return p / SCALE;
  endfunction

  // Scaled product saturated to the data word.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    return sat_fx(fx_mul64(a, b));
  endfunction

endpackage
