// cmac_ref_pkg -- reference model of a CMAC learning period for the testbenches.
//
// An untimed model of cmac_core with its default receptive fields: the error and
// error difference, five two-input Gaussian fields centred at -2..2 with sigma = 2
// evaluated by a seven-term series, the weighted sum with the current weights, and
// the learning law w += 5 e + 3 de. All arithmetic is scaled by 1,000,000 and
// truncates like the hardware, so responses must match exactly.
package cmac_ref_pkg;

  localparam int     N_R   = 5;
  localparam int     TERMS = 7;
  localparam longint WMAX  = 64'sd2147483647;
  localparam longint WMIN  = -64'sd2147483648;

  typedef struct {
    longint e_prev;
    bit     have_prev;
    longint w [N_R];
  } ref_state_t;

  typedef struct {
    longint e, de, y;
    longint b [N_R];
  } ref_out_t;

  function automatic longint sat32(input longint v);
    return (v > WMAX) ? WMAX : (v < WMIN) ? WMIN : v;
  endfunction

  function automatic longint field(input longint s0, input longint s1, input int j);
    logic signed [127:0] p = 0, t, acc, d, mean, g2;
    mean = -2_000_000 + j * 1_000_000;
    g2   = (128'sd2_000_000 * 2_000_000) / 1_000_000;
    d = s0 - mean; p += ((d * d) / 1_000_000) * 1_000_000 / (2 * g2);
    d = s1 - mean; p += ((d * d) / 1_000_000) * 1_000_000 / (2 * g2);
    if (p > WMAX) p = WMAX;
    t = 1_000_000; acc = 1_000_000;
    for (int n = 1; n < TERMS; n++) begin
      t = (t * p) / 1_000_000 / n;
      acc += t;
    end
    return longint'(128'sd1_000_000_000_000 / acc);
  endfunction

  function automatic void reset(ref ref_state_t st);
    st.e_prev = 0;
    st.have_prev = 0;
    for (int j = 0; j < N_R; j++) st.w[j] = 0;
  endfunction

  function automatic ref_out_t period(ref ref_state_t st, input longint goal, input longint state);
    ref_out_t o;
    longint acc = 0;
    o.e  = sat32(goal - state);
    o.de = st.have_prev ? sat32(o.e - st.e_prev) : 0;
    st.e_prev = o.e;
    st.have_prev = 1;
    for (int j = 0; j < N_R; j++) begin
      o.b[j] = field(o.e, o.de, j);
      acc += (o.b[j] * st.w[j]) / 1_000_000;
    end
    o.y = sat32(acc);
    for (int j = 0; j < N_R; j++)
      st.w[j] = sat32(st.w[j] + (5 * o.e) + (3 * o.de));
    return o;
  endfunction

endpackage
