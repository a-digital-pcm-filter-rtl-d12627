// Reference model of the stored-product PCM filter arithmetic, for the testbenches.
//
// Written independently of the RTL: levels come straight from the companding-law
// formulas in real arithmetic, segments are found by threshold comparison rather than by
// leading-one detection, products are rounded in real arithmetic, and the accumulator
// is modelled as a real number clamped to the 18-bit range (13 integer bits).
package pcm_ref_pkg;

  // One sample as the reference sees it.
  typedef struct {
    bit sign;
    int seg;
    int q;     // 0..15, or 0..31 for a fine code in segments 5..7
    bit fine;  // the code belongs to the fine assignment
  } rcode_t;

  localparam real C_A [4] = '{0.2726230, 0.0808208, 0.0808208, 0.2726230};
  localparam real C_B [3] = '{-0.9877751, 0.7787396, -0.08407682};
  localparam int  F_A [4] = '{1, 4, 4, 1};
  localparam int  F_B [3] = '{1, 1, 4};

  localparam real ACC_MAX = 8192.0 - 1.0 / 16.0;
  localparam real ACC_MIN = -8192.0;

  function automatic bit is_fine_seg(rcode_t c);
    return c.fine && c.seg >= 5;
  endfunction

  // Magnitude of the quantization level (mid value of the quantum).
  function automatic real rlevel(rcode_t c);
    real p;
    if (c.seg == 0) return real'(c.q);
    if (c.seg == 1) return real'(c.q) + 16.0;
    p = 2.0 ** (c.seg - 1);
    if (is_fine_seg(c)) return (p / 2.0) * (real'(c.q) + 32.5) - 0.5;
    return p * (real'(c.q) + 16.5) - 0.5;
  endfunction

  // Quantize a signed integer (already rounded). Clips |m| > 2047 to the top level.
  function automatic rcode_t rquant(int m, bit fine, output bit clip);
    rcode_t c;
    int     a, lo, width;
    c.sign = (m < 0);
    a      = c.sign ? -m : m;
    clip   = (a > 2047);
    if (clip) a = 2047;
    c.fine = fine;
    c.seg  = 0;
    for (int l = 1; l <= 7; l++) if (a >= 8 * (2 ** l)) c.seg = l;
    if (c.seg == 0) c.q = a;
    else begin
      lo    = 8 * (2 ** c.seg);
      width = (fine && c.seg >= 5) ? 2 ** (c.seg - 2) : 2 ** (c.seg - 1);
      c.q   = (a - lo) / width;
    end
    return c;
  endfunction

  // Rounded stored product of a coefficient and a signed level, in real.
  function automatic real rprod(real coef, real level, int frac);
    real s;
    s = 2.0 ** frac;
    return $floor(coef * level * s + 0.5) / s;
  endfunction

  function automatic real rclamp(real v, output bit sat);
    sat = 0;
    if (v > ACC_MAX) begin sat = 1; return ACC_MAX; end
    if (v < ACC_MIN) begin sat = 1; return ACC_MIN; end
    return v;
  endfunction

  // Add (or subtract, for a negative sample) the product of one tap.
  function automatic real racc_tap(real acc, real coef, int frac, rcode_t c, inout bit sat);
    real p;
    bit  s;
    p   = rprod(coef, rlevel(c), frac);
    acc = c.sign ? acc - p : acc + p;
    acc = rclamp(acc, s);
    sat |= s;
    return acc;
  endfunction

  // One pass of the third-order section: x[0..3] = x(n)..x(n-3), y[0..2] = y(n-1)..y(n-3).
  // fine_out selects the level assignment of the result.
  function automatic rcode_t rsection(rcode_t x [4], rcode_t y [3], bit fine_out,
                                      output bit sat, output bit clip);
    real acc;
    acc = 0.5;
    sat = 0;
    for (int i = 0; i < 4; i++) acc = racc_tap(acc, C_A[i], F_A[i], x[i], sat);
    for (int i = 0; i < 3; i++) acc = racc_tap(acc, -C_B[i], F_B[i], y[i], sat);
    return rquant(int'($floor(acc)), fine_out, clip);
  endfunction

  // Standard 8-bit code {sign, L, q} of a reference code.
  function automatic logic [7:0] rcode8(rcode_t c);
    return {c.sign, 3'(c.seg), 4'(c.q)};
  endfunction

  function automatic rcode_t from_code8(logic [7:0] k);
    rcode_t c;
    c.sign = k[7];
    c.seg  = int'(k[6:4]);
    c.q    = int'(k[3:0]);
    c.fine = 0;
    return c;
  endfunction

  // 13-bit linear {sign, 2 x magnitude} of a reference code.
  function automatic logic [12:0] rlinear(rcode_t c);
    return {c.sign, 12'(int'(2.0 * rlevel(c)))};
  endfunction

endpackage
