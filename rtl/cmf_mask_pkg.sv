// cmf_mask_pkg: build-time computation of the CMF mask and of the
// multiplier plan for a round-off interval +-DELTA.
//
// The multiplier savings of the filter are decided when it is built:
// the mask is computed, its coefficients are moved by at most DELTA
// (in units of the 8-bit mask) so that as many products as possible need
// no multiplier, and the filter structure is generated from the result.
// These elaboration-time functions do that, so a filter for new mask
// parameters (r0, sigma, DELTA) is obtained by rebuilding.
//
// Mask (ideal, double precision), for the position (row, col) of an
// M x M mask with centre c = (M-1)/2, rho and theta the polar
// coordinates of (col - c, row - c) with rows counted downwards:
//   re + j*im = exp(j*2*theta) * r(rho)
//   r(rho)    = exp(-(rho - r0)^2 / sigma^2) + exp(-(rho + r0)^2 / sigma^2)
// and 0 at the centre, where theta is undefined. It is quantised to
// signed 8 bits with the largest magnitude at 127 (maximal dynamic range).
//
// Round-off: every position is treated on its own. Of the candidate
// pairs (re', im') with |re' - re| <= DELTA and |im' - im| <= DELTA that
// are (a) unchanged, (b) one or both parts moved to the nearest 0 or
// +-2^n, (c) equal values or (d) opposite values, the one needing the
// fewest multipliers is taken, and among those the one with the smallest
// squared error. The description says only that its round-off algorithm
// minimises the mask error; this greedy per-position rule is this
// design's own.
package cmf_mask_pkg;
  import cmf_pkg::*;

  localparam real PI = 3.14159265358979323846;

  function automatic real cmf_ideal(bit imag, int row, int col, int m, real r0, real sigma);
    real c   = real'(m - 1) / 2.0;
    real dx  = real'(col) - c;
    real dy  = real'(row) - c;
    real rho = $sqrt(dx * dx + dy * dy);
    real th, rr;
    if (rho == 0.0) return 0.0;
    th = $atan2(dy, dx);
    rr = $exp(-((rho - r0) ** 2) / (sigma * sigma)) + $exp(-((rho + r0) ** 2) / (sigma * sigma));
    return imag ? $sin(2.0 * th) * rr : $cos(2.0 * th) * rr;
  endfunction

  // Factor that puts the largest mask magnitude at 127.
  function automatic real cmf_scale(int m, real r0, real sigma);
    real mx = 0.0, v;
    for (int row = 0; row < m; row++)
      for (int col = 0; col < m; col++)
        for (int p = 0; p < 2; p++) begin
          v = cmf_ideal(p[0], row, col, m, r0, sigma);
          if (v < 0.0) v = -v;
          if (v > mx) mx = v;
        end
    return 127.0 / mx;
  endfunction

  function automatic int round_real(real v);
    return $rtoi($floor(v + 0.5));
  endfunction

  // Quantised coefficient; scale is cmf_scale(m, r0, sigma), passed in so
  // that it is computed once per mask.
  function automatic int cmf_quant(bit imag, int row, int col, int m, real r0, real sigma, real scale);
    return round_real(cmf_ideal(imag, row, col, m, r0, sigma) * scale);
  endfunction

  // 1 if a product with this coefficient needs a multiplier.
  function automatic int mul_cost(int v);
    return (plan_single(v).kind == TAP_MUL) ? 1 : 0;
  endfunction

  // Nearest 0 or +-2^n (n <= 7) to v; v itself if none lies within delta.
  function automatic int snap_pow2(int v, int delta);
    int best = v;
    int bd = delta + 1;
    int t, d;
    for (int i = -1; i < 2 * COEF_W; i++) begin
      if (i < 0) t = 0;
      else       t = (i % 2 == 0) ? (1 << (i / 2)) : -(1 << (i / 2));
      d = (t > v) ? t - v : v - t;
      if (d <= delta && d < bd) begin
        best = t;
        bd = d;
      end
    end
    return best;
  endfunction

  typedef struct packed {
    logic signed [15:0] re;
    logic signed [15:0] im;
  } coef_pair_t;

  function automatic coef_pair_t round_pair(int a, int b, int delta);
    int ca [6];
    int cb [6];
    int ok [6];
    int unsigned best = 0;
    int bcost = 3, berr = 0, cost, err, h;
    int sa = snap_pow2(a, delta);
    int sb = snap_pow2(b, delta);
    coef_pair_t r;
    ca[0] = a;  cb[0] = b;  ok[0] = 1;
    ca[1] = sa; cb[1] = b;  ok[1] = 1;
    ca[2] = a;  cb[2] = sb; ok[2] = 1;
    ca[3] = sa; cb[3] = sb; ok[3] = 1;
    h = round_real(real'(a + b) / 2.0);           // equal pair
    ca[4] = h;  cb[4] = h;
    ok[4] = (((a - h) <= delta) && ((h - a) <= delta) && ((b - h) <= delta) && ((h - b) <= delta)) ? 1 : 0;
    h = round_real(real'(a - b) / 2.0);           // opposite pair
    ca[5] = h;  cb[5] = -h;
    ok[5] = (((a - h) <= delta) && ((h - a) <= delta) && ((b + h) <= delta) && ((-h - b) <= delta)) ? 1 : 0;
    for (int i = 0; i < 6; i++) begin
      if (ok[i] != 0) begin
        if (i >= 4) cost = mul_cost(ca[i]);
        else        cost = mul_cost(ca[i]) + mul_cost(cb[i]);
        err = (ca[i] - a) * (ca[i] - a) + (cb[i] - b) * (cb[i] - b);
        if (cost < bcost || (cost == bcost && err < berr)) begin
          best = i; bcost = cost; berr = err;
        end
      end
    end
    r.re = 16'(ca[best]);
    r.im = 16'(cb[best]);
    return r;
  endfunction

  // Rounded coefficient of mask position (row, col).
  function automatic int cmf_rounded(bit imag, int row, int col, int m, real r0, real sigma,
                                     real scale, int delta);
    coef_pair_t p = round_pair(cmf_quant(1'b0, row, col, m, r0, sigma, scale),
                               cmf_quant(1'b1, row, col, m, r0, sigma, scale), delta);
    return imag ? int'(p.im) : int'(p.re);
  endfunction

  // Plan of active part k, position j of the filter, which multiplies
  // mask entry (M-1-k, M-1-j).
  function automatic tap_pair_plan_t cmf_tap_plan(int k, int j, int m, real r0, real sigma,
                                                  real scale, int delta);
    return plan_pair(cmf_rounded(1'b0, m - 1 - k, m - 1 - j, m, r0, sigma, scale, delta),
                     cmf_rounded(1'b1, m - 1 - k, m - 1 - j, m, r0, sigma, scale, delta));
  endfunction

endpackage
