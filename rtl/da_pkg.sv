// da_pkg: constants, types and elaboration-time functions shared by the
// 48-tap distributed-arithmetic (DA) FIR filter with nonnegative lookup tables.
//
// The filter computes Y = sum_i c_i * x_i over N_TAPS taps of W-bit two's
// complement samples. Each input bit x_{i,j} is recoded as d_{i,j} in {-1,+1}
// (stored as 1 for -1 and 0 for +1). Writing c_i*d = |c_i|*(1 - 2u) with
// u = 1 exactly when sign(c_i)*d = -1 turns every lookup-table word into a
// sum of coefficient magnitudes, sum_i |c_i| u_i, which is never negative.
// In integer units (x_i read as an integer, not a fraction) the output is
//   Y = K_PROP - sum_{k=0}^{W-1} a_k * 2^k
//   K_PROP = S * 2^(W-1) - P,  S = sum_i |c_i|,  P = sum of positive c_i
// where a_k is the table word for bit plane k. The structure sizes (16-bit
// input, 48 taps, 12-bit coefficients, 13-bit 2^3-word and 2^12-word table
// outputs, 30-bit accumulator) follow the published design. The coefficient
// set is this design's own: the source gives only the lowpass specification
// (passband edge 0.26 fs, stopband edge 0.37 fs, 0.7 dB ripple, 50 dB
// attenuation), so DEFAULT_COEF is an equiripple design meeting it
// (about 0.02 dB ripple and 63 dB attenuation after rounding to 12 bits).
// The 15-bit width of the 2^48-word table output is derived: 30 accumulator
// bits minus the 15 fraction bits gained by 15 right shifts.
//
// Range rule for a coefficient set: every 3-tap group magnitude sum must fit
// LUT3_W bits, every 12-tap group sum LUT12_W bits, and S must stay below
// 2^(LUT48_W-1) so the accumulator cannot wrap. coef_set_fits() tests this.
package da_pkg;

  localparam int W       = 16;   // input sample width (bit planes per output)
  localparam int N_TAPS  = 48;   // filter taps
  localparam int C_W     = 12;   // coefficient width, two's complement
  localparam int LUT3_W  = 13;   // 2^3-word table output width
  localparam int LUT12_W = 13;   // 2^12-word table output width
  localparam int ACC_W   = 30;   // MAC register width
  localparam int LUT48_W = ACC_W - (W - 1);  // 2^48-word table output width (15)
  localparam int Y_W     = ACC_W + 1;        // signed filter output width
  localparam int CNT_W   = $clog2(W);        // bit-plane counter width (4)

  typedef logic signed [C_W-1:0]        coef_t;
  typedef logic [N_TAPS-1:0][C_W-1:0]   coef_set_t;   // element i = c_i
  typedef logic [W-1:0][N_TAPS-1:0]     plane_set_t;  // [bit j][tap i] = code of d_{i,j}

  // 48-tap lowpass, symmetric; element 47 is written first.
  localparam coef_set_t DEFAULT_COEF = {
       12'sd0,  12'sd0, -12'sd1,  12'sd2,  12'sd1, -12'sd5,  12'sd4,  12'sd7,
      -12'sd14,  12'sd1,  12'sd24, -12'sd24, -12'sd18,  12'sd57, -12'sd23, -12'sd69,
       12'sd101,  12'sd16, -12'sd179,  12'sd145,  12'sd170, -12'sd469,  12'sd173,  12'sd2047,
       12'sd2047,  12'sd173, -12'sd469,  12'sd170,  12'sd145, -12'sd179,  12'sd16,  12'sd101,
      -12'sd69, -12'sd23,  12'sd57, -12'sd18, -12'sd24,  12'sd24,  12'sd1, -12'sd14,
       12'sd7,  12'sd4, -12'sd5,  12'sd1,  12'sd2, -12'sd1,  12'sd0,  12'sd0};

  // |c| as a nonnegative integer.
  function automatic int coef_mag(logic [C_W-1:0] c);
    int v;
    v = int'(signed'(c));
    return (v < 0) ? -v : v;
  endfunction

  // u for one tap: 1 when sign(c)*d = -1. code = 1 means d = -1.
  function automatic logic u_bit(logic [C_W-1:0] c, logic code);
    return code ^ c[C_W-1];
  endfunction

  // Word of a 2^3-word table: sum over the three taps of |c_k| * u_k.
  function automatic int lut3_word(logic [2:0][C_W-1:0] c, logic [2:0] addr);
    int s;
    s = 0;
    for (int k = 0; k < 3; k++)
      if (u_bit(c[k], addr[k])) s += coef_mag(c[k]);
    return s;
  endfunction

  // Constant of the final subtraction, K_PROP = S*2^(W-1) - P.
  function automatic longint k_prop(coef_set_t c);
    longint s, p;
    s = 0;
    p = 0;
    for (int i = 0; i < N_TAPS; i++) begin
      s += longint'(coef_mag(c[i]));
      if (!c[i][C_W-1]) p += longint'(int'(signed'(c[i])));
    end
    return (s <<< (W - 1)) - p;
  endfunction

  // 1 when the coefficient set respects the range rule above.
  function automatic bit coef_set_fits(coef_set_t c);
    int g3, g12, s;
    bit ok;
    ok = 1'b1;
    s  = 0;
    for (int g = 0; g < N_TAPS / 12; g++) begin
      g12 = 0;
      for (int t = 0; t < 4; t++) begin
        g3 = 0;
        for (int k = 0; k < 3; k++) g3 += coef_mag(c[12*g + 3*t + k]);
        if (g3 >= (1 << LUT3_W)) ok = 1'b0;
        g12 += g3;
      end
      if (g12 >= (1 << LUT12_W)) ok = 1'b0;
      s += g12;
    end
    if (s >= (1 << (LUT48_W - 1))) ok = 1'b0;
    return ok;
  endfunction

endpackage
