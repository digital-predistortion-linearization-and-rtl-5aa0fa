// dpd_pkg: shared types and fixed-point helpers for the crest factor reduction
// and predistortion datapaths.
//
// Number formats (this design's own choice; the source sizes only the board
// converters, 14-bit DACs and 12-bit ADCs):
//   cplx_t  complex sample, 16-bit two's complement I and Q, Q1.15 (32768 = 1.0)
//   coef_t  complex coefficient, 16-bit I and Q, Q2.14 (16384 = 1.0)
//   mag_t   unsigned envelope |x|, same scale as a sample (32768 = 1.0)
// All products are rounded to nearest and saturated back to 16 bits.
package dpd_pkg;

  localparam int DW = 16;           // sample / coefficient part width

  typedef logic signed [DW-1:0] s16_t;
  typedef logic        [DW-1:0] mag_t;

  typedef struct packed {
    s16_t i;
    s16_t q;
  } cplx_t;

  typedef cplx_t coef_t;

  localparam cplx_t CPLX_ZERO = '{i: '0, q: '0};
  localparam coef_t COEF_ONE  = '{i: 16'sd16384, q: '0};

  // Saturate a wide signed value to 16 bits.
  function automatic s16_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sd32767;
    else if (v < -48'sd32768) return -16'sd32768;
    else                      return s16_t'(v);
  endfunction

  // Arithmetic shift right by sh with round-half-up, then saturate.
  function automatic s16_t rnd_sat(input logic signed [47:0] v, input int sh);
    logic signed [47:0] r;
    r = (v + (48'sd1 <<< (sh - 1))) >>> sh;
    return sat16(r);
  endfunction

  // Complex sample times complex Q2.14 coefficient.
  function automatic cplx_t cmul_coef(input cplx_t a, input coef_t b);
    logic signed [47:0] re, im;
    re = 48'(a.i) * 48'(b.i) - 48'(a.q) * 48'(b.q);
    im = 48'(a.i) * 48'(b.q) + 48'(a.q) * 48'(b.i);
    return '{i: rnd_sat(re, 14), q: rnd_sat(im, 14)};
  endfunction

  // Complex sample times complex Q1.15 phasor (frequency translation).
  function automatic cplx_t cmul_q15(input cplx_t a, input cplx_t b);
    logic signed [47:0] re, im;
    re = 48'(a.i) * 48'(b.i) - 48'(a.q) * 48'(b.q);
    im = 48'(a.i) * 48'(b.q) + 48'(a.q) * 48'(b.i);
    return '{i: rnd_sat(re, 15), q: rnd_sat(im, 15)};
  endfunction

  // Complex conjugate (saturating -32768).
  function automatic cplx_t conj(input cplx_t a);
    return '{i: a.i, q: sat16(-48'(a.q))};
  endfunction

  // Saturating complex add / subtract.
  function automatic cplx_t cadd(input cplx_t a, input cplx_t b);
    return '{i: sat16(48'(a.i) + 48'(b.i)), q: sat16(48'(a.q) + 48'(b.q))};
  endfunction

  function automatic cplx_t csub(input cplx_t a, input cplx_t b);
    return '{i: sat16(48'(a.i) - 48'(b.i)), q: sat16(48'(a.q) - 48'(b.q))};
  endfunction

  // Round a Q1.15 value to its w most significant bits (a w-bit converter
  // word, returned sign-extended) with saturation.
  function automatic s16_t round_to(input s16_t v, input int w);
    logic signed [47:0] r;
    r = (48'(v) + (48'sd1 <<< (15 - w))) >>> (16 - w);
    if (r > (48'sd1 <<< (w - 1)) - 1) r = (48'sd1 <<< (w - 1)) - 1;
    if (r < -(48'sd1 <<< (w - 1)))    r = -(48'sd1 <<< (w - 1));
    return s16_t'(r);
  endfunction

  // Tap k of an order-th order Lagrange interpolator whose delay is
  // D = (order-1)/2 + f/steps samples:  h_k = prod_{i != k} (D - i)/(k - i),
  // evaluated exactly in integers and rounded (half away from zero) to Q2.14.
  // Used at elaboration to build the fractional-delay tap tables.
  function automatic s16_t lagrange_tap(input int steps, input int order, input int f, input int k);
    longint num, den, v, st, c0;
    num = 1;
    den = 1;
    st  = longint'(steps);
    c0  = (longint'(order) - 1) / 2;
    for (int i = 0; i <= order; i++) begin
      if (i != k) begin
        num = num * (c0 * st + longint'(f) - longint'(i) * st);
        den = den * ((longint'(k) - longint'(i)) * st);
      end
    end
    if (den < 0) begin
      num = -num;
      den = -den;
    end
    v = (num >= 0) ? (2 * 16384 * num + den) / (2 * den)
                   : -((2 * 16384 * (-num) + den) / (2 * den));
    return s16_t'(v);
  endfunction

endpackage
