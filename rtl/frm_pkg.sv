// frm_pkg: types and constants shared by the FRM filter bank.
//
// The filter bank is built from distributed-arithmetic (DA) processing units.
// Each unit reads pre-computed coefficient sums out of small RAMs and adds them
// with parallel prefix adders. This package holds:
//   - the adder architecture selector (Brent-Kung is the default, the other
//     three prefix networks are the alternatives the design was compared with),
//   - the reset contents selector for the coefficient RAMs,
//   - the 45-tap linear-phase model filter h(n), quantised to 16-bit two's
//     complement with 14 fraction bits: H_HALF[i] = round(h(i) * 2^14), i = 0..22,
//     h(44-i) = h(i). The real-valued taps are those of the model filter; the
//     word format is this design's choice.
//   - lut_init_value(), which computes a coefficient RAM word: the sum of the
//     taps of group g whose address bit is set.
package frm_pkg;

  typedef enum logic [1:0] {
    PPA_BK = 2'd0,   // Brent-Kung
    PPA_KS = 2'd1,   // Kogge-Stone
    PPA_HC = 2'd2,   // Han-Carlson
    PPA_LF = 2'd3    // Ladner-Fischer
  } ppa_kind_e;

  typedef enum logic [1:0] {
    INIT_MODEL   = 2'd0, // taps of the model filter h(n)
    INIT_IMPULSE = 2'd1, // unit impulse at tap 0 (pass-through)
    INIT_ZERO    = 2'd2  // all zero
  } lut_init_e;

  // Which processing unit a coefficient RAM write goes to.
  typedef enum logic [1:0] {
    SEL_MODEL = 2'd0,    // periodic model filter H(z^M)
    SEL_MASK  = 2'd1,    // masking filter H_M(z)
    SEL_CMASK = 2'd2     // complementary masking filter H_CM(z)
  } filter_sel_e;

  localparam int unsigned DATA_W     = 8;   // audio sample and output width
  localparam int unsigned COEF_W     = 16;  // coefficient word
  localparam int unsigned COEF_FRAC  = 14;  // fraction bits of a coefficient
  localparam int unsigned LUT_K      = 4;   // taps per coefficient RAM
  localparam int unsigned MODEL_TAPS = 45;  // length N of the model filter
  localparam int          UNITY      = 1 << COEF_FRAC;

  localparam int H_HALF [23] = '{
       4,    2,  -13,  -42,  -63,  -43,   30,  111,  115,   -4,
    -183, -252,  -82,  260,  484,  288, -330, -923, -820,  379,
    2387, 4286, 5065
  };

  // Tap n of the model filter (zero outside 0..MODEL_TAPS-1).
  function automatic int model_coef(int n);
    if (n < 0 || n >= int'(MODEL_TAPS)) return 0;
    return (n <= 22) ? H_HALF[n] : H_HALF[44 - n];
  endfunction

  // Tap n of a filter with the given reset contents.
  function automatic int init_coef(lut_init_e init, int n, int taps);
    if (n >= taps) return 0;
    case (init)
      INIT_MODEL:   return model_coef(n);
      INIT_IMPULSE: return (n == 0) ? UNITY : 0;
      default:      return 0;
    endcase
  endfunction

  // RAM word of group g at address a: sum of the taps g*k+j with a[j] = 1.
  function automatic int lut_init_value(lut_init_e init, int g, int a, int k, int taps);
    int s = 0;
    for (int j = 0; j < k; j++)
      if (((a >> j) & 1) == 1) s += init_coef(init, g * k + j, taps);
    return s;
  endfunction

endpackage
